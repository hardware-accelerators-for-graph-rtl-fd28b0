// tb_accumulator: self-checking test of the accumulator SRAM and its FP32 adder.
//
// Random overwrite and accumulate element writes at a small size, checked by
// reading rows back against a shadow memory computed with the reference FP32 add;
// directed adder cases (exact cancellation, round-to-even ties, infinities, NaN,
// overflow) and a dropped out-of-range write. Accumulate writes to the same element
// in consecutive cycles check the single-cycle read-modify-write.
module tb_accumulator;
  import tb_fp32_ref::*;

  localparam int DIM = 4, ROWS = 8;

  logic              clk = 0;
  logic              wr_en = 0, wr_acc = 0, rd_en = 0;
  logic [28:0]       wr_addr = 0, rd_addr = 0;
  logic [1:0]        wr_col = 0;
  logic [31:0]       wr_data = 0;
  logic [DIM-1:0][31:0] rd_data;
  logic [31:0]       shadow [ROWS][DIM];
  int                checks = 0, failures = 0;

  accumulator #(.DIM(DIM), .ROWS(ROWS)) dut (
    .clk, .wr_en, .wr_accumulate(wr_acc), .wr_addr, .wr_col, .wr_data,
    .rd_en, .rd_addr, .rd_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, int c, logic [31:0] d, logic acc);
    wr_en = 1; wr_addr = 29'(a); wr_col = 2'(c); wr_data = d; wr_acc = acc;
    @(posedge clk);
    #1 wr_en = 0;
    if (a < ROWS) shadow[a][c] = acc ? add(shadow[a][c], d) : d;
  endtask

  task automatic check_all();
    for (int r = 0; r < ROWS; r++) begin
      rd_en = 1; rd_addr = 29'(r);
      @(posedge clk);
      #1 rd_en = 0;
      for (int c = 0; c < DIM; c++) begin
        checks++;
        if (rd_data[c] !== shadow[r][c]) begin
          failures++;
          $display("row %0d col %0d: got %h expected %h", r, c, rd_data[c], shadow[r][c]);
        end
      end
    end
  endtask

  task automatic directed(logic [31:0] a, logic [31:0] b, logic [31:0] exp);
    wr(0, 0, a, 0);
    wr(0, 0, b, 1);
    rd_en = 1; rd_addr = 0;
    @(posedge clk);
    #1 rd_en = 0;
    checks++;
    if (rd_data[0] !== exp) begin
      failures++;
      $display("%h + %h: got %h expected %h", a, b, rd_data[0], exp);
    end
    shadow[0][0] = exp;
  endtask

  initial begin
    @(posedge clk);
    #1;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < DIM; c++) wr(r, c, 32'd0, 0);
    check_all();
    // directed adder cases
    directed(32'h3f80_0000, 32'hbf80_0000, 32'h0000_0000);   // 1 - 1 = +0
    directed(32'h3f80_0000, 32'h3380_0000, 32'h3f80_0000);   // 1 + 2^-24: tie, stays even
    directed(32'h3f80_0001, 32'h3380_0000, 32'h3f80_0002);   // odd + half ulp: rounds up
    directed(32'h3fc0_0000, 32'h4010_0000, 32'h4070_0000);   // 1.5 + 2.25 = 3.75
    directed(32'h7f7f_ffff, 32'h7f7f_ffff, 32'h7f80_0000);   // overflow to +inf
    directed(32'h7f80_0000, 32'h3f80_0000, 32'h7f80_0000);   // inf + 1
    directed(32'h7f80_0000, 32'hff80_0000, 32'h7fc0_0000);   // inf - inf = NaN
    directed(32'h7fc0_0001, 32'h3f80_0000, 32'h7fc0_0000);   // NaN in
    directed(32'h4b80_0000, 32'hbf80_0000, 32'h4b7f_ffff);   // 2^24 - 1: renormalise left
    directed(32'h3f80_0000, 32'h0000_0001, 32'h3f80_0000);   // subnormal reads as zero
    // random overwrites and accumulations, same element back to back included
    for (int i = 0; i < 3000; i++) begin
      int r, c;
      r = $urandom_range(ROWS - 1, 0);
      c = $urandom_range(DIM - 1, 0);
      if ($urandom_range(3, 0) == 0) wr(r, c, rand_f(110, 140), 0);
      else begin
        wr(r, c, rand_f(110, 140), 1);
        if ($urandom_range(1, 0) == 1) wr(r, c, rand_f(110, 140), 1);
      end
      if (i % 500 == 499) check_all();
    end
    // a write beyond the last row is dropped (no aliasing onto row 3)
    wr(ROWS + 3, 1, 32'h4120_0000, 0);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
