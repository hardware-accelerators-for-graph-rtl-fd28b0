// tb_scratchpad: self-checking test of the scratchpad at a small size.
//
// Random element writes against a shadow copy, full-row reads with their one-cycle
// latency, a read and a write to the same row in one cycle (the read returns the
// old row), and writes beyond the last row, which must be dropped.
module tb_scratchpad;

  localparam int DIM = 4, ROWS = 16;

  logic                 clk = 0;
  logic                 wr_en = 0, rd_en = 0;
  logic [28:0]          wr_addr = 0, rd_addr = 0;
  logic [1:0]           wr_col = 0;
  logic [31:0]          wr_data = 0;
  logic [DIM-1:0][31:0] rd_data;
  logic [31:0]          shadow [ROWS][DIM];
  int                   checks = 0, failures = 0;

  scratchpad #(.DIM(DIM), .ROWS(ROWS)) dut (
    .clk, .wr_en, .wr_addr, .wr_col, .wr_data, .rd_en, .rd_addr, .rd_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int c, logic [31:0] d);
    wr_en = 1; wr_addr = 29'(a); wr_col = 2'(c); wr_data = d;
    @(posedge clk);
    #1 wr_en = 0;
    if (a < ROWS) shadow[a][c] = d;
  endtask

  task automatic check_row(int r, logic [DIM-1:0][31:0] exp);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("row %0d: got %h expected %h", r, rd_data, exp);
    end
  endtask

  task automatic check_all();
    for (int r = 0; r < ROWS; r++) begin
      logic [DIM-1:0][31:0] exp;
      for (int c = 0; c < DIM; c++) exp[c] = shadow[r][c];
      rd_en = 1; rd_addr = 29'(r);
      @(posedge clk);
      #1 rd_en = 0;
      check_row(r, exp);
    end
  endtask

  initial begin
    @(posedge clk);
    #1;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < DIM; c++) wr(r, c, 32'(r * 16 + c));
    check_all();
    for (int i = 0; i < 2000; i++) begin
      wr($urandom_range(ROWS - 1, 0), $urandom_range(DIM - 1, 0), $urandom);
      if (i % 400 == 399) check_all();
    end
    // read and write of the same row in one cycle: the read sees the old row
    begin
      logic [DIM-1:0][31:0] old;
      for (int c = 0; c < DIM; c++) old[c] = shadow[5][c];
      rd_en = 1; rd_addr = 5;
      wr(5, 2, 32'hdead_beef);
      rd_en = 0;
      check_row(5, old);
    end
    // writes past the end are dropped
    for (int c = 0; c < DIM; c++) wr(ROWS + 5, c, 32'hffff_0000 + 32'(c));
    wr(2 * ROWS + 1, 0, 32'h1111_2222);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
