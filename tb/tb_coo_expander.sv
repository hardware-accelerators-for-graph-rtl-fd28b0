// tb_coo_expander: self-checking test of the sparse-to-dense expansion loop.
//
// The testbench stands in for the COO reader: it offers the tile's nonzeros in
// row-major order, then entries that match no coordinate (as a reader that
// prefetches past the tile would), with random gaps, and it models busy falling a
// few cycles after stop. For random tiles (start row/column, up to DIM rows, up to
// several blocks of DIM columns, empty tiles, both targets and the accumulate flag)
// it checks every element write, in order, against a dense tile built here: local
// row base + r + (c / DIM) * DIM, element c % DIM, the value or zero. It checks the
// number of writes, that all nonzeros were consumed, a single done pulse, and that
// with entries always available the tile takes one cycle per element.
module tb_coo_expander;
  import sdma_pkg::*;

  localparam int DIM = 4;

  logic        clk = 0, rst_n = 0;
  logic        job_valid = 0, job_ready;
  job_t        job;
  logic        rd_start, rd_stop, rd_busy = 0;
  logic [63:0] rd_data_addr, rd_index_addr;
  logic        ent_valid = 0, ent_ready;
  coo_entry_t  ent;
  logic        wr_valid, wr_to_acc, wr_accumulate;
  logic [28:0] wr_addr;
  logic [1:0]  wr_col;
  logic [31:0] wr_data;
  logic        busy, stall, done;
  int          checks = 0, failures = 0;

  coo_expander #(.DIM(DIM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // entry source
  coo_entry_t ents [$];
  int         n_used = 0, gap_pct = 0, n_stall = 0;
  logic       src_on = 0;
  always @(posedge clk) begin
    #1;
    if (src_on) begin
      ent_valid = ($urandom_range(99, 0) >= gap_pct);
      ent = (n_used < ents.size()) ? ents[n_used]
                                   : '{row: 32'hffff_fff0, col: 32'h0, value: 32'hbad0_bad0};
    end else ent_valid = 0;
  end

  // reader busy model
  int stop_delay = -1;
  always @(posedge clk) begin
    if (rd_start) begin rd_busy <= 1; src_on <= 1; end
    if (rd_stop && stop_delay < 0) begin src_on <= 0; stop_delay = $urandom_range(4, 0); end
    if (stop_delay == 0) begin rd_busy <= 0; stop_delay = -1; end
    else if (stop_delay > 0) stop_delay--;
  end

  // expected writes
  typedef struct {
    logic [28:0] addr;
    logic [1:0]  col;
    logic [31:0] data;
  } w_t;
  w_t   exp_w [$];
  int   n_done = 0, first_wr = -1, last_wr = -1, cyc = 0;
  job_t cur;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (stall) n_stall++;
    if (done) n_done++;
    if (ent_valid && ent_ready) n_used++;
    if (wr_valid) begin
      w_t e;
      if (first_wr < 0) first_wr = cyc;
      last_wr = cyc;
      if (exp_w.size() == 0) chk(0, "extra write");
      else begin
        e = exp_w.pop_front();
        chk(wr_addr == e.addr && wr_col == e.col && wr_data == e.data,
            $sformatf("write: got %0d.%0d=%h expected %0d.%0d=%h",
                      wr_addr, wr_col, wr_data, e.addr, e.col, e.data));
        chk(wr_to_acc == cur.to_acc && wr_accumulate == cur.accumulate, "target flags");
      end
    end
  end

  task automatic run_tile(int rows, int cols, int gap);
    logic [31:0] dense [][];
    ents.delete();
    exp_w.delete();
    n_used = 0; n_done = 0; first_wr = -1; last_wr = -1;
    gap_pct = gap;
    cur.data_addr  = {$urandom, $urandom};
    cur.index_addr = {$urandom, $urandom};
    cur.to_acc     = 1'($urandom);
    cur.accumulate = 1'($urandom);
    cur.base       = 29'($urandom_range(1000, 0));
    cur.rows       = 16'(rows);
    cur.cols       = 16'(cols);
    cur.row_start  = 16'($urandom_range(3000, 0));
    cur.col_start  = 16'($urandom_range(3000, 0));
    dense = new[rows];
    for (int r = 0; r < rows; r++) begin
      dense[r] = new[cols];
      for (int c = 0; c < cols; c++) begin
        dense[r][c] = 0;
        if ($urandom_range(99, 0) < 20) begin
          dense[r][c] = $urandom | 32'h1;
          ents.push_back('{row: 32'(cur.row_start) + 32'(r), col: 32'(cur.col_start) + 32'(c),
                           value: dense[r][c]});
        end
        exp_w.push_back('{addr: cur.base + 29'(r) + 29'((c / DIM) * DIM),
                          col: 2'(c % DIM), data: dense[r][c]});
      end
    end
    job = cur;
    job_valid = 1;
    do begin @(negedge clk); end while (!job_ready);
    @(posedge clk);
    #1 job_valid = 0;
    while (n_done == 0) begin @(posedge clk); #1; end
    repeat (3) @(posedge clk);
    #1;
    chk(exp_w.size() == 0, $sformatf("%0d writes missing", exp_w.size()));
    chk(n_used == ents.size(), "not every nonzero consumed");
    chk(n_done == 1, "done pulses");
    chk(!busy && !rd_busy, "idle after done");
    if (gap == 0 && rows * cols > 0)
      chk(last_wr - first_wr == rows * cols - 1,
          $sformatf("element rate: %0d cycles for %0d elements", last_wr - first_wr + 1, rows * cols));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_tile(DIM, DIM, 0);
    run_tile(DIM, 3 * DIM + 1, 0);
    run_tile(0, DIM, 0);
    run_tile(DIM, 0, 0);
    run_tile(1, 1, 30);
    for (int i = 0; i < 60; i++)
      run_tile($urandom_range(DIM, 1), $urandom_range(4 * DIM, 1), $urandom_range(1, 0) ? 0 : 40);
    chk(n_stall > 0, "no stall happened");
    $display("stall cycles: %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
