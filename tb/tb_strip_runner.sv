// tb_strip_runner: one sparse DMA with its memory model and driver, running the
// GCN-shaped strip workload at a given array dimension.
//
// The workload is a two-layer GCN on the first 1000 nodes of a citation graph with
// 3703 input features per node. Real graph data is not used: the runner generates
// matrices of that shape, a DIM-row strip of the adjacency matrix whose rows have
// a skewed number of nonzeros (a few rows are dense, most have a handful, each has
// its self loop) and a DIM-row strip of the input features with under 1% density.
// The adjacency strip (all 1000 columns) is loaded with one sparse mvin; the
// feature strip (3703 columns) with as many mvins as the scratchpad needs, each
// covering at most SP_ROWS columns. Every element is read back and compared, and
// the element rate is reported; with a memory that accepts a read every cycle the
// DMA must sustain at least 0.9 elements per cycle on these sparse strips.
// `finished` rises when the runner is done; checks and failures are its counts.
module tb_strip_runner #(
  parameter int DIM      = 16,
  parameter int SP_ROWS  = 2048,
  parameter int ACC_ROWS = 512
) (
  output logic finished,
  output int   checks,
  output int   failures
);
  import sdma_pkg::*;

  localparam int TAG_W = 4;
  localparam int NODES = 1000, FEATS = 3703, STRIP_ROW = 480;

  logic                 clk = 0, rst_n = 0;
  logic                 cmd_valid = 0, cmd_ready;
  logic [6:0]           cmd_funct = 0;
  logic [63:0]          cmd_rs1 = 0, cmd_rs2 = 0;
  logic                 mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [63:0]          mem_req_addr;
  logic [TAG_W-1:0]     mem_req_tag, mem_resp_tag;
  logic [31:0]          mem_resp_data;
  logic                 sp_rd_en = 0, acc_rd_en = 0;
  logic [28:0]          sp_rd_addr = 0, acc_rd_addr = 0;
  logic [DIM-1:0][31:0] sp_rd_data, acc_rd_data;
  logic                 busy, stall, done;
  initial begin checks = 0; failures = 0; finished = 0; end

  sdma_top #(.DIM(DIM), .SP_ROWS(SP_ROWS), .ACC_ROWS(ACC_ROWS)) dut (.*);

  tb_mem_model #(.TAG_W(TAG_W), .MAX_LAT(8), .READY_PCT(100)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .req_tag(mem_req_tag), .resp_valid(mem_resp_valid),
    .resp_tag(mem_resp_tag), .resp_data(mem_resp_data)
  );

  always #5 clk = ~clk;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  task automatic send(logic [6:0] f, logic [63:0] a, logic [63:0] b);
    logic acc;
    cmd_valid = 1; cmd_funct = f; cmd_rs1 = a; cmd_rs2 = b;
    do begin
      @(negedge clk);
      acc = cmd_ready;
      @(posedge clk);
      #1;
    end while (!acc);
    cmd_valid = 0;
  endtask

  // one strip: 16 rows x ncols, stored as a dense array here and as COO in memory
  logic [31:0] strip [DIM][FEATS];
  int          stalls = 0;
  always @(negedge clk) if (stall) stalls++;

  function automatic int put_coo(int c0, int nc, logic [63:0] da, logic [63:0] ia);
    int k = 0;
    for (int r = 0; r < DIM; r++)
      for (int c = c0; c < c0 + nc; c++)
        if (strip[r][c] != 0) begin
          mem.write_word(ia + 64'(8 * k),     32'(STRIP_ROW + r));
          mem.write_word(ia + 64'(8 * k + 4), 32'(c));
          mem.write_word(da + 64'(4 * k),     strip[r][c]);
          k++;
        end
    mem.write_word(ia + 64'(8 * k), 32'hffff_ffff);
    mem.write_word(ia + 64'(8 * k + 4), 32'hffff_ffff);
    return k;
  endfunction

  task automatic load_and_check(int c0, int nc, logic [63:0] da, logic [63:0] ia, string name);
    int nnz, t0, cyc, bad;
    real rate;
    nnz = put_coo(c0, nc, da, ia);
    send(FN_SPARSE_CONFIG, da, ia);
    t0 = $time;
    send(FN_MVIN_SPARSE_COO, {32'h0, 16'(STRIP_ROW), 16'(c0)}, {16'(DIM), 16'(nc), 3'b000, 29'd0});
    do begin @(posedge clk); #1; end while (busy);
    cyc  = ($time - t0) / 10;
    rate = real'(DIM * nc) / real'(cyc);
    $display("DIM=%0d %s: %0d x %0d elements, %0d nonzeros, %0d cycles, %.3f elements/cycle",
             DIM, name, DIM, nc, nnz, cyc, rate);
    chk(rate >= 0.9, $sformatf("%s: element rate %.3f below 0.9", name, rate));
    bad = 0;
    for (int r = 0; r < DIM; r++)
      for (int blk = 0; blk < (nc + DIM - 1) / DIM; blk++) begin
        sp_rd_en = 1; sp_rd_addr = 29'(r + blk * DIM);
        @(posedge clk);
        #1 sp_rd_en = 0;
        for (int j = 0; j < DIM && blk * DIM + j < nc; j++) begin
          checks++;
          if (sp_rd_data[j] !== strip[r][c0 + blk * DIM + j]) begin
            failures++;
            bad++;
            if (bad < 5) $display("%s (%0d,%0d): got %h expected %h", name, r,
                                  c0 + blk * DIM + j, sp_rd_data[j], strip[r][c0 + blk * DIM + j]);
          end
        end
      end
  endtask

  function automatic logic [31:0] rnd_val();
    return {1'b0, 8'($urandom_range(134, 118)), 23'($urandom)};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;

    // adjacency strip: self loop plus a skewed number of neighbours per row
    for (int r = 0; r < DIM; r++) begin
      int deg;
      for (int c = 0; c < FEATS; c++) strip[r][c] = 0;
      deg = (r % 7 == 3) ? $urandom_range(60, 20) : $urandom_range(4, 0);
      strip[r][STRIP_ROW + r] = rnd_val();
      for (int k = 0; k < deg; k++) strip[r][$urandom_range(NODES - 1, 0)] = rnd_val();
    end
    load_and_check(0, NODES, 64'h1000_0000, 64'h2000_0000, "adjacency strip");
    chk(NODES <= SP_ROWS, "adjacency strip fits one mvin");

    // input-feature strip, under 1% density
    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < FEATS; c++)
        strip[r][c] = ($urandom_range(999, 0) < 8) ? rnd_val() : 32'd0;
    // one mvin covers at most SP_ROWS / DIM column blocks, i.e. SP_ROWS columns
    for (int c0 = 0, p = 1; c0 < FEATS; c0 += SP_ROWS, p++)
      load_and_check(c0, (FEATS - c0 < SP_ROWS) ? FEATS - c0 : SP_ROWS,
                     64'h3000_0000 + 64'(p) * 64'h0100_0000, 64'h7000_0000 + 64'(p) * 64'h0100_0000,
                     $sformatf("feature strip, part %0d", p));

    $display("DIM=%0d expander stall cycles: %0d", DIM, stalls);
    finished = 1;
  end

endmodule
