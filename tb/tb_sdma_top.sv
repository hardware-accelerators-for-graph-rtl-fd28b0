// tb_sdma_top: end-to-end test of the sparse DMA at its default sizes.
//
// Builds a 64 x 64 sparse matrix with a skewed (power-law-like) number of nonzeros
// per row, as adjacency matrices of graphs have, and lays out the COO arrays of each
// tile in a main-memory model that answers reads out of order. It then issues the
// config and sparse-mvin instructions a driver would:
//   - two 16 x 32 tiles into the scratchpad (two column blocks each), back to back,
//     so the second mvin waits for the first;
//   - a 16 x 16 tile into the accumulator (overwrite), then another tile added on
//     top of it (accumulate), checked with a reference FP32 add;
//   - a tile with no nonzeros (its COO arrays start with an entry outside it),
//     issued behind the first two, and a tile with zero rows.
// Every written row is read back and compared with the dense matrix. The test
// counts how often each mechanism occurred (value written, zero written, reader
// stall, refused instruction, out-of-order memory response, second column block,
// accumulator overwrite, accumulate, empty tile) and fails for any that never did.
module tb_sdma_top;
  import sdma_pkg::*;
  import tb_fp32_ref::*;

  localparam int DIM = 16, N = 64, TAG_W = 4;

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
  int                   checks = 0, failures = 0;

  sdma_top dut (.*);

  tb_mem_model #(.TAG_W(TAG_W), .MAX_LAT(10), .READY_PCT(70)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .req_tag(mem_req_tag), .resp_valid(mem_resp_valid),
    .resp_tag(mem_resp_tag), .resp_data(mem_resp_data)
  );

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

  // ---------------------------------------------------------------- matrices
  logic [31:0] A [N][N];     // first sparse matrix
  logic [31:0] B [N][N];     // second sparse matrix (accumulated on A's tile)

  function automatic void make_sparse(ref logic [31:0] m [N][N]);
    for (int r = 0; r < N; r++) begin
      int deg;
      for (int c = 0; c < N; c++) m[r][c] = 32'd0;
      // most rows have few nonzeros, a few rows have many
      deg = ($urandom_range(9, 0) == 0) ? $urandom_range(30, 10) : $urandom_range(3, 0);
      for (int k = 0; k < deg; k++) m[r][$urandom_range(N - 1, 0)] = rand_f(118, 134);
    end
  endfunction

  // COO arrays of one tile, written to memory; returns the number of entries
  function automatic int put_tile(ref logic [31:0] m [N][N], input int r0, int nr, int c0, int nc,
                                  logic [63:0] da, logic [63:0] ia);
    int k = 0;
    for (int r = r0; r < r0 + nr; r++)
      for (int c = c0; c < c0 + nc; c++)
        if (m[r][c] != 0) begin
          mem.write_word(ia + 64'(8 * k),     32'(r));
          mem.write_word(ia + 64'(8 * k + 4), 32'(c));
          mem.write_word(da + 64'(4 * k),     m[r][c]);
          k++;
        end
    // the word after the last pair: a coordinate outside every tile
    mem.write_word(ia + 64'(8 * k), 32'hffff_ffff);
    mem.write_word(ia + 64'(8 * k + 4), 32'hffff_ffff);
    return k;
  endfunction

  // ---------------------------------------------------------------- commands
  int n_refused = 0;

  task automatic send(logic [6:0] f, logic [63:0] a, logic [63:0] b);
    logic acc;
    cmd_valid = 1; cmd_funct = f; cmd_rs1 = a; cmd_rs2 = b;
    do begin
      @(negedge clk);
      acc = cmd_ready;
      if (!acc) n_refused++;
      @(posedge clk);
      #1;
    end while (!acc);
    cmd_valid = 0;
  endtask

  task automatic config_(logic [63:0] da, logic [63:0] ia);
    send(FN_SPARSE_CONFIG, da, ia);
  endtask

  task automatic mvin(int base, logic to_acc, logic accumulate, int r0, int nr, int c0, int nc);
    send(FN_MVIN_SPARSE_COO, {32'h0, 16'(r0), 16'(c0)},
         {16'(nr), 16'(nc), to_acc, accumulate, 1'b0, 29'(base)});
  endtask

  task automatic wait_idle();
    do begin @(posedge clk); #1; end while (busy);
  endtask

  task automatic read_sp(int a, output logic [DIM-1:0][31:0] d);
    sp_rd_en = 1; sp_rd_addr = 29'(a);
    @(posedge clk);
    #1 sp_rd_en = 0;
    d = sp_rd_data;
  endtask

  task automatic read_acc(int a, output logic [DIM-1:0][31:0] d);
    acc_rd_en = 1; acc_rd_addr = 29'(a);
    @(posedge clk);
    #1 acc_rd_en = 0;
    d = acc_rd_data;
  endtask

  // dense check of a tile placed at `base`: element (r, c) at row base + r + (c/DIM)*DIM
  task automatic check_tile(logic is_acc, int base, int r0, int nr, int c0, int nc,
                            ref logic [31:0] e [N][N], input string name);
    int bad = 0;
    for (int r = 0; r < nr; r++)
      for (int blk = 0; blk < (nc + DIM - 1) / DIM; blk++) begin
        logic [DIM-1:0][31:0] d;
        if (is_acc) read_acc(base + r + blk * DIM, d);
        else        read_sp(base + r + blk * DIM, d);
        for (int j = 0; j < DIM && blk * DIM + j < nc; j++) begin
          checks++;
          if (d[j] !== e[r0 + r][c0 + blk * DIM + j]) begin
            failures++;
            bad++;
            if (bad < 5) $display("%s (%0d,%0d): got %h expected %h", name, r0 + r,
                                  c0 + blk * DIM + j, d[j], e[r0 + r][c0 + blk * DIM + j]);
          end
        end
      end
  endtask

  // ---------------------------------------------------------------- mechanisms
  int n_value = 0, n_zero = 0, n_stall = 0, n_block2 = 0, n_acc_over = 0, n_acc_add = 0;
  int n_empty = 0, n_done = 0;

  always @(negedge clk) if (rst_n) begin
    if (dut.wr_valid) begin
      if (dut.wr_data != 0) n_value++; else n_zero++;
      if (dut.wr_col == 0 && dut.u_exp.c >= 16'(DIM)) n_block2++;
      if (dut.wr_to_acc && !dut.wr_accumulate) n_acc_over++;
      if (dut.wr_to_acc && dut.wr_accumulate) n_acc_add++;
    end
    if (stall) n_stall++;
    if (done) n_done++;
  end

  // ---------------------------------------------------------------- sequence
  logic [31:0] S [N][N];     // expected accumulator contents (A tile + B tile)
  logic [31:0] Z [N][N];     // all zero

  initial begin
    int t0, ne;
    make_sparse(A);
    make_sparse(B);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      S[r][c] = add(A[r][c], B[r][c]);
      Z[r][c] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    #1;

    // two scratchpad tiles, back to back
    ne = put_tile(A, 0, 16, 0, 32, 64'h1000_0000, 64'h2000_0000);
    ne += put_tile(A, 16, 16, 32, 32, 64'h1100_0000, 64'h2100_0000);
    $display("scratchpad tiles: %0d nonzeros in 1024 elements", ne);
    t0 = $time;
    config_(64'h1000_0000, 64'h2000_0000);
    mvin(0, 0, 0, 0, 16, 0, 32);
    config_(64'h1100_0000, 64'h2100_0000);
    mvin(64, 0, 0, 16, 16, 32, 32);
    // a third instruction pair: the mvin waits while two are in the machine, and
    // the config that precedes it must not disturb the waiting job
    void'(put_tile(Z, 0, 16, 0, 16, 64'h1400_0000, 64'h2400_0000));
    config_(64'h1400_0000, 64'h2400_0000);
    mvin(200, 0, 0, 48, 16, 48, 16);
    wait_idle();
    $display("two 16x32 tiles and one 16x16 tile took %0d cycles", ($time - t0) / 10);
    check_tile(0, 0, 0, 16, 0, 32, A, "sp tile 0");
    check_tile(0, 64, 16, 16, 32, 32, A, "sp tile 1");
    check_tile(0, 200, 48, 16, 48, 16, Z, "zero tile");

    // accumulator: overwrite with A's tile, then add B's tile
    void'(put_tile(A, 32, 16, 16, 16, 64'h1200_0000, 64'h2200_0000));
    void'(put_tile(B, 32, 16, 16, 16, 64'h1300_0000, 64'h2300_0000));
    config_(64'h1200_0000, 64'h2200_0000);
    mvin(100, 1, 0, 32, 16, 16, 16);
    wait_idle();
    check_tile(1, 100, 32, 16, 16, 16, A, "acc overwrite");
    config_(64'h1300_0000, 64'h2300_0000);
    mvin(100, 1, 1, 32, 16, 16, 16);
    wait_idle();
    check_tile(1, 100, 32, 16, 16, 16, S, "acc accumulate");

    // a tile of zero rows writes nothing and still completes
    begin
      int n_before, nd;
      n_before = n_value + n_zero;
      nd = n_done;
      mvin(300, 0, 0, 0, 0, 0, 16);
      wait_idle();
      repeat (2) @(posedge clk);
      chk(n_value + n_zero == n_before, "empty tile wrote");
      chk(n_done == nd + 1, "empty tile did not complete");
      n_empty++;
    end

    $display("values %0d zeros %0d stalls %0d refused %0d out-of-order %0d block2 %0d acc_over %0d acc_add %0d empty %0d",
             n_value, n_zero, n_stall, n_refused, mem.n_ooo, n_block2, n_acc_over, n_acc_add, n_empty);
    chk(n_value > 0,    "no value written");
    chk(n_zero > 0,     "no zero written");
    chk(n_stall > 0,    "no stall");
    chk(n_refused > 0,  "no instruction refused");
    chk(mem.n_ooo > 0,  "no out-of-order response");
    chk(n_block2 > 0,   "no second column block");
    chk(n_acc_over > 0, "no accumulator overwrite");
    chk(n_acc_add > 0,  "no accumulate");
    chk(n_empty > 0,    "no empty tile");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
