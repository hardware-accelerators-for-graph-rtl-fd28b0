// sdma_pkg: types and constants shared by the sparse-to-dense (COO) DMA.
//
// The sparse DMA expands a matrix stored in COO form in main memory (an array of
// (row, column) index pairs and an array of values) into the dense layout of the
// Gemmini scratchpad or accumulator. Element and index widths follow the FP32
// configuration the design targets: 32-bit values and 32-bit indices. The
// instruction operand layout (bit positions of rows, cols, start coordinates and
// the accumulator flags) follows the documented SPARSEMVINCOO field extraction;
// the funct codes of the two instructions are this design's own choice.
package sdma_pkg;

  localparam int unsigned XLEN     = 64;  // width of an instruction operand register
  localparam int unsigned IDX_W    = 32;  // COO index width (32-bit integers)
  localparam int unsigned DATA_W   = 32;  // element width (FP32)
  localparam int unsigned IND_BYTES  = IDX_W / 8;
  localparam int unsigned DATA_BYTES = DATA_W / 8;
  localparam int unsigned LOCAL_W  = 29;  // scratchpad/accumulator row address (spAddr[28:0])

  // Instruction function codes (RoCC funct field).
  typedef enum logic [6:0] {
    FN_SPARSE_CONFIG   = 7'd20,   // rs1 = dataAddr, rs2 = indexAddr
    FN_MVIN_SPARSE_COO = 7'd21    // rs1 = start coordinates, rs2 = local address and size
  } funct_e;

  // One expansion job, as decoded from the two instructions.
  typedef struct packed {
    logic [XLEN-1:0]    data_addr;   // byte address of the first value
    logic [XLEN-1:0]    index_addr;  // byte address of the first (row, col) index pair
    logic               to_acc;      // write into the accumulator instead of the scratchpad
    logic               accumulate;  // accumulator only: add to the stored value
    logic [LOCAL_W-1:0] base;        // first local row address
    logic [15:0]        rows;        // number of rows of the tile
    logic [15:0]        cols;        // number of columns of the tile
    logic [15:0]        row_start;   // first global row
    logic [15:0]        col_start;   // first global column
  } job_t;

  // One COO entry as read from memory.
  typedef struct packed {
    logic [IDX_W-1:0]  row;
    logic [IDX_W-1:0]  col;
    logic [DATA_W-1:0] value;
  } coo_entry_t;


  // Decode of the mvin operand that carries the local address and the tile size.
  function automatic job_t decode_mvin(input logic [XLEN-1:0] data_addr,
                                       input logic [XLEN-1:0] index_addr,
                                       input logic [XLEN-1:0] rs1,
                                       input logic [XLEN-1:0] rs2);
    job_t j;
    j.data_addr  = data_addr;
    j.index_addr = index_addr;
    j.to_acc     = rs2[31];
    j.accumulate = rs2[30];
    j.base       = rs2[28:0];
    j.cols       = rs2[47:32];
    j.rows       = rs2[63:48];
    j.col_start  = rs1[15:0];
    j.row_start  = rs1[31:16];
    return j;
  endfunction

endpackage
