// accumulator: the accelerator's accumulator SRAM as the sparse DMA sees it.
//
// ROWS rows of DIM FP32 elements. An element write either overwrites the stored
// element (wr_accumulate low) or adds the written value to it in IEEE-754 single
// precision (wr_accumulate high). The add is a read-modify-write completed in the
// cycle of the write, so back-to-back writes to the same element accumulate
// correctly. A write to a row outside the memory is dropped. Rows are read back
// with a one-cycle latency. The default size is 32 KB: 512 rows of sixteen 32-bit
// elements. Overwrite/accumulate behaviour follows the documented accumulate flag;
// the port structure and the single-cycle add are this design's choices.
module accumulator
  import sdma_pkg::*;
#(
  parameter int unsigned DIM    = 16,
  parameter int unsigned ROWS   = 512,
  parameter int unsigned COL_W  = $clog2(DIM),
  parameter int unsigned ROW_W  = $clog2(ROWS)
) (
  input  logic                        clk,
  // element write
  input  logic                        wr_en,
  input  logic                        wr_accumulate,
  input  logic [LOCAL_W-1:0]          wr_addr,
  input  logic [COL_W-1:0]            wr_col,
  input  logic [31:0]                 wr_data,
  // row read
  input  logic                        rd_en,
  input  logic [LOCAL_W-1:0]          rd_addr,
  output logic [DIM-1:0][31:0]        rd_data
);

  logic [DIM-1:0][31:0] mem [ROWS];
  logic [DIM-1:0][31:0] old_row;
  logic [31:0]          sum;

  assign old_row = mem[wr_addr[ROW_W-1:0]];

  fp32_add u_add (
    .a   (old_row[wr_col]),
    .b   (wr_data),
    .sum (sum)
  );

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < LOCAL_W'(ROWS))
      mem[wr_addr[ROW_W-1:0]][wr_col] <= wr_accumulate ? sum : wr_data;
    if (rd_en)
      rd_data <= mem[rd_addr[ROW_W-1:0]];
  end

endmodule
