// tb_citeseer_strips: the sparse DMA on GCN-sized operands, at the default 16 x 16
// configuration and at a 32 x 32 configuration.
//
// Runs tb_strip_runner twice side by side: once with every parameter of the design
// at its default (16-element rows, 2048-row scratchpad, 512-row accumulator), once
// with 32-element rows and the same capacities (1024 and 256 rows). Each loads an
// adjacency strip of a 1000-node graph and a feature strip with 3703 features and
// checks every element; see tb_strip_runner for the workload.
module tb_citeseer_strips;

  logic fin16, fin32;
  int   chk16, chk32, fail16, fail32;
  int   checks, failures;
  logic clk = 0;

  tb_strip_runner u16 (.finished(fin16), .checks(chk16), .failures(fail16));
  tb_strip_runner #(.DIM(32), .SP_ROWS(1024), .ACC_ROWS(256)) u32 (
    .finished(fin32), .checks(chk32), .failures(fail32));

  always #5 clk = ~clk;

  initial begin
    int n = 0;
    while (!(fin16 === 1'b1 && fin32 === 1'b1) && n < 400000) begin
      @(posedge clk);
      n++;
    end
    checks   = chk16 + chk32;
    failures = fail16 + fail32;
    if (n >= 400000) begin
      failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
