// sdma_top: sparse-to-dense decompression DMA with its local memories.
//
// Graph convolutional networks multiply a very sparse, renormalised adjacency
// matrix (and often ultra-sparse input features) with dense matrices. Loading such
// a matrix into a systolic-array accelerator with a dense DMA moves mostly zeros.
// This block instead reads the matrix in COO form (a value array and an array of
// (row, col) index pairs) from main memory and writes the dense expansion of one
// tile straight into the scratchpad or the accumulator, zeros included.
//
// Structure:
//   sdma_cmd_decoder  takes the sparse-config and sparse-mvin instructions and
//                     builds a job (addresses, target, tile position and size)
//   coo_expander      walks the tile, compares each coordinate with the next COO
//                     entry, emits one element write per coordinate
//   coo_reader        prefetches COO entries with tagged word reads and reorders
//                     the responses
//   scratchpad        2048 x 16 x FP32 (128 KB), element writes
//   accumulator       512 x 16 x FP32 (32 KB), element overwrite or FP32 add
//
// The expansion algorithm, the instruction fields and the memory sizes follow the
// design description; the prefetching reader, the memory port (one 32-bit word per
// tagged request, responses in any order), the instruction funct codes and the
// read-back ports are this design's choices.
//
// Timing: after the first entry arrives, one tile element is written per cycle as
// long as the reader keeps ahead; `done` pulses one cycle after the reader has
// drained at the end of a tile. A new sparse-mvin is accepted while one runs and
// starts when the previous one is done.
module sdma_top
  import sdma_pkg::*;
#(
  parameter int unsigned DIM      = 16,    // systolic array dimension = row width
  parameter int unsigned SP_ROWS  = 2048,  // 128 KB scratchpad
  parameter int unsigned ACC_ROWS = 512,   // 32 KB accumulator
  parameter int unsigned PREFETCH = 4,     // COO entries read ahead
  parameter int unsigned TAG_W    = $clog2(PREFETCH) + 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // instruction stream from the host
  input  logic                   cmd_valid,
  output logic                   cmd_ready,
  input  logic [6:0]             cmd_funct,
  input  logic [XLEN-1:0]        cmd_rs1,
  input  logic [XLEN-1:0]        cmd_rs2,
  // main-memory read port
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output logic [XLEN-1:0]        mem_req_addr,
  output logic [TAG_W-1:0]       mem_req_tag,
  input  logic                   mem_resp_valid,
  input  logic [TAG_W-1:0]       mem_resp_tag,
  input  logic [31:0]            mem_resp_data,
  // row read-back of the local memories
  input  logic                   sp_rd_en,
  input  logic [LOCAL_W-1:0]     sp_rd_addr,
  output logic [DIM-1:0][31:0]   sp_rd_data,
  input  logic                   acc_rd_en,
  input  logic [LOCAL_W-1:0]     acc_rd_addr,
  output logic [DIM-1:0][31:0]   acc_rd_data,
  // status
  output logic                   busy,
  output logic                   stall,
  output logic                   done
);

  localparam int unsigned COL_W = $clog2(DIM);

  logic       job_valid, job_ready;
  job_t       job;
  logic       rd_start, rd_stop, rd_busy;
  logic [XLEN-1:0] rd_data_addr, rd_index_addr;
  logic       ent_valid, ent_ready;
  coo_entry_t ent;
  logic       wr_valid, wr_to_acc, wr_accumulate;
  logic [LOCAL_W-1:0] wr_addr;
  logic [COL_W-1:0]   wr_col;
  logic [DATA_W-1:0]  wr_data;
  logic       exp_busy;

  sdma_cmd_decoder u_dec (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_funct, .cmd_rs1, .cmd_rs2,
    .job_valid, .job_ready, .job
  );

  coo_expander #(.DIM(DIM)) u_exp (
    .clk, .rst_n,
    .job_valid, .job_ready, .job,
    .rd_start, .rd_data_addr, .rd_index_addr, .rd_stop, .rd_busy,
    .ent_valid, .ent_ready, .ent,
    .wr_valid, .wr_to_acc, .wr_accumulate, .wr_addr, .wr_col, .wr_data,
    .busy(exp_busy), .stall, .done
  );

  coo_reader #(.ENTRIES(PREFETCH)) u_rd (
    .clk, .rst_n,
    .start(rd_start), .start_data_addr(rd_data_addr), .start_index_addr(rd_index_addr),
    .stop(rd_stop), .busy(rd_busy),
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_req_tag,
    .mem_resp_valid, .mem_resp_tag, .mem_resp_data,
    .ent_valid, .ent_ready, .ent
  );

  scratchpad #(.DIM(DIM), .ROWS(SP_ROWS)) u_sp (
    .clk,
    .wr_en(wr_valid && !wr_to_acc), .wr_addr, .wr_col, .wr_data,
    .rd_en(sp_rd_en), .rd_addr(sp_rd_addr), .rd_data(sp_rd_data)
  );

  accumulator #(.DIM(DIM), .ROWS(ACC_ROWS)) u_acc (
    .clk,
    .wr_en(wr_valid && wr_to_acc), .wr_accumulate, .wr_addr, .wr_col, .wr_data,
    .rd_en(acc_rd_en), .rd_addr(acc_rd_addr), .rd_data(acc_rd_data)
  );

  assign busy = exp_busy || job_valid;

endmodule
