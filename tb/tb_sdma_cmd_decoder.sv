// tb_sdma_cmd_decoder: self-checking test of the instruction front end.
//
// Sends config and mvin instructions with random operands and checks every field
// of the resulting job against values extracted here bit by bit. The job consumer
// stalls at random, so the test also checks that a waiting job holds still, that
// an mvin is refused while the job register is full, that a config issued then
// does not alter the waiting job, and that an unknown funct is ignored.
module tb_sdma_cmd_decoder;
  import sdma_pkg::*;

  logic            clk = 0, rst_n = 0;
  logic            cmd_valid = 0, cmd_ready;
  logic [6:0]      cmd_funct = 0;
  logic [63:0]     cmd_rs1 = 0, cmd_rs2 = 0;
  logic            job_valid, job_ready = 0;
  job_t            job;
  int              checks = 0, failures = 0, n_refused = 0;

  typedef struct {
    logic [63:0] da, ia, rs1, rs2;
  } exp_t;
  exp_t exp_q [$];

  sdma_cmd_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  // consumer: random ready, compare each job taken (sampled between edges)
  always @(negedge clk) if (rst_n) begin
    if (job_valid && job_ready) begin
      exp_t e;
      if (exp_q.size() == 0) chk(0, "unexpected job");
      else begin
        e = exp_q.pop_front();
        chk(job.data_addr  == e.da,            "data_addr");
        chk(job.index_addr == e.ia,            "index_addr");
        chk(job.to_acc     == e.rs2[31],       "to_acc");
        chk(job.accumulate == e.rs2[30],       "accumulate");
        chk(job.base       == e.rs2[28:0],     "base");
        chk(job.cols       == e.rs2[47:32],    "cols");
        chk(job.rows       == e.rs2[63:48],    "rows");
        chk(job.col_start  == e.rs1[15:0],     "col_start");
        chk(job.row_start  == e.rs1[31:16],    "row_start");
      end
    end
  end
  always @(posedge clk) #1 job_ready = ($urandom_range(2, 0) == 0);

  logic [63:0] cur_da, cur_ia;

  task automatic send(logic [6:0] f, logic [63:0] a, logic [63:0] b);
    logic acc;
    cmd_valid = 1; cmd_funct = f; cmd_rs1 = a; cmd_rs2 = b;
    do begin
      @(negedge clk);
      acc = cmd_ready;
      if (!acc && f == FN_MVIN_SPARSE_COO) n_refused++;
      @(posedge clk);
      #1;
    end while (!acc);
    cmd_valid = 0;
    if (f == FN_SPARSE_CONFIG) begin cur_da = a; cur_ia = b; end
    if (f == FN_MVIN_SPARSE_COO) exp_q.push_back('{da: cur_da, ia: cur_ia, rs1: a, rs2: b});
  endtask

  initial begin
    cur_da = 0; cur_ia = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 400; i++) begin
      int k;
      k = $urandom_range(9, 0);
      if (k < 3)       send(FN_SPARSE_CONFIG, {$urandom, $urandom}, {$urandom, $urandom});
      else if (k < 9)  send(FN_MVIN_SPARSE_COO, {$urandom, $urandom}, {$urandom, $urandom});
      else             send(7'd3, {$urandom, $urandom}, {$urandom, $urandom});
      if ($urandom_range(1, 0) == 1) begin @(posedge clk); #1; end
    end
    repeat (50) @(posedge clk);
    chk(exp_q.size() == 0, "jobs left over");
    chk(n_refused > 0, "an mvin was never refused");
    $display("refused mvin cycles: %0d", n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
