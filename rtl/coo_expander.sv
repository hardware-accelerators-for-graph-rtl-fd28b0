// coo_expander: the sparse-to-dense expansion loop of the sparse DMA.
//
// For a job it walks the tile row by row, r = 0..rows-1, and within a row column
// by column, c = 0..cols-1. At each position it compares the global coordinate
// (row_start + r, col_start + c) with the next COO entry from the reader. On a
// match the entry's value is written and the entry is consumed; otherwise a zero
// is written and the entry is kept. Every position produces exactly one element
// write, so the whole tile is overwritten (or, with accumulate, added to).
//
// The element of column c goes to local row  base + r + (c / DIM) * DIM  and to
// element c % DIM of that row, which is the block layout of the documented
// algorithm: columns beyond DIM go to the next block of DIM rows. The offsets are
// taken relative to the tile start (see the design notes); DIM must be a power of
// two and a tile should have at most DIM rows, or blocks overlap. As in the
// documented algorithm an entry is consumed only when it matches exactly, so the
// COO arrays must hold the tile's nonzeros, sorted by row and then by column,
// starting at the configured addresses.
//
// Interface: a job arrives on job_valid/job_ready and is taken only when the
// reader is idle; the expander starts the reader, drives wr_* for one cycle per
// element, stops the reader after the last element and pulses `done` when the
// reader has drained. `stall` is high in a cycle where no entry is available.
//
// Timing: one element write per cycle while entries are available; the first
// write comes once the first entry has arrived.
module coo_expander
  import sdma_pkg::*;
#(
  parameter int unsigned DIM   = 16,              // row width of scratchpad/accumulator
  parameter int unsigned COL_W = $clog2(DIM)
) (
  input  logic               clk,
  input  logic               rst_n,
  // job
  input  logic               job_valid,
  output logic               job_ready,
  input  job_t               job,
  // reader control and entries
  output logic               rd_start,
  output logic [XLEN-1:0]    rd_data_addr,
  output logic [XLEN-1:0]    rd_index_addr,
  output logic               rd_stop,
  input  logic               rd_busy,
  input  logic               ent_valid,
  output logic               ent_ready,
  input  coo_entry_t         ent,
  // element writes
  output logic               wr_valid,
  output logic               wr_to_acc,
  output logic               wr_accumulate,
  output logic [LOCAL_W-1:0] wr_addr,
  output logic [COL_W-1:0]   wr_col,
  output logic [DATA_W-1:0]  wr_data,
  // status
  output logic               busy,
  output logic               stall,
  output logic               done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e       state;
  job_t         cur;
  logic [15:0]  r, c;
  logic         match, last_col, last_row;
  logic [IDX_W-1:0] grow, gcol;

  assign job_ready     = (state == S_IDLE) && !rd_busy;
  assign rd_start      = job_valid && job_ready;
  assign rd_data_addr  = job.data_addr;
  assign rd_index_addr = job.index_addr;
  assign rd_stop       = (state == S_DRAIN);

  assign grow     = IDX_W'(cur.row_start) + IDX_W'(r);
  assign gcol     = IDX_W'(cur.col_start) + IDX_W'(c);
  assign match    = (ent.row == grow) && (ent.col == gcol);
  assign last_col = (c == cur.cols - 16'd1);
  assign last_row = (r == cur.rows - 16'd1);

  assign wr_valid      = (state == S_RUN) && ent_valid;
  assign ent_ready     = wr_valid && match;
  assign wr_to_acc     = cur.to_acc;
  assign wr_accumulate = cur.accumulate;
  assign wr_data       = match ? ent.value : '0;
  assign wr_col        = c[COL_W-1:0];
  assign wr_addr       = cur.base + LOCAL_W'(r)
                       + LOCAL_W'({c[15:COL_W], {COL_W{1'b0}}});

  assign busy  = (state != S_IDLE);
  assign stall = (state == S_RUN) && !ent_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur   <= '0;
      r     <= '0;
      c     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (rd_start) begin
          cur   <= job;
          r     <= '0;
          c     <= '0;
          state <= (job.rows == '0 || job.cols == '0) ? S_DRAIN : S_RUN;
        end
        S_RUN: if (wr_valid) begin
          if (last_col) begin
            c <= '0;
            r <= r + 16'd1;
            if (last_row) state <= S_DRAIN;
          end else begin
            c <= c + 16'd1;
          end
        end
        S_DRAIN: if (!rd_busy) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
