// scratchpad: the accelerator's local memory as the sparse DMA sees it.
//
// ROWS rows of DIM elements of DATA_W bits. The sparse DMA writes one element per
// cycle (wr_en, row wr_addr, element wr_col); a write to a row outside the memory
// is dropped. A whole row can be read back with a one-cycle latency (rd_en,
// rd_addr -> rd_data in the next cycle), which is what the array side of the
// accelerator or a test uses. The default size is 128 KB: 2048 rows of sixteen
// 32-bit elements. Banking, the dense DMA port and the array-side ports of the
// full accelerator are not modelled; a single write and a single read port are
// this design's choice.
module scratchpad
  import sdma_pkg::*;
#(
  parameter int unsigned DIM    = 16,
  parameter int unsigned ROWS   = 2048,
  parameter int unsigned DW     = DATA_W,
  parameter int unsigned COL_W  = $clog2(DIM),
  parameter int unsigned ROW_W  = $clog2(ROWS)
) (
  input  logic                       clk,
  // element write
  input  logic                       wr_en,
  input  logic [LOCAL_W-1:0]         wr_addr,
  input  logic [COL_W-1:0]           wr_col,
  input  logic [DW-1:0]              wr_data,
  // row read
  input  logic                       rd_en,
  input  logic [LOCAL_W-1:0]         rd_addr,
  output logic [DIM-1:0][DW-1:0]     rd_data
);

  logic [DIM-1:0][DW-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr < LOCAL_W'(ROWS))
      mem[wr_addr[ROW_W-1:0]][wr_col] <= wr_data;
    if (rd_en)
      rd_data <= mem[rd_addr[ROW_W-1:0]];
  end

endmodule
