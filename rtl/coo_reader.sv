// coo_reader: fetches the COO entries of a sparse matrix from main memory, in order.
//
// Entry k consists of three 32-bit words: its row index at index_addr + 8k, its
// column index at index_addr + 8k + 4 (the index array holds (row, col) pairs one
// after the other, as the documented algorithm walks it) and its value at
// data_addr + 4k. After `start` the reader issues these word reads ahead of use,
// back to back, for up to ENTRIES entries at a time. Each read carries a tag
// {slot, word}; responses may return in any order and are put into their slot of a
// small reorder buffer. The oldest entry is offered on the `ent` stream
// (valid/ready) once all three of its words have arrived, so entries leave in
// array order whatever order the memory answers in.
//
// The reader does not know how many entries the tile has: it keeps prefetching
// until `stop`. After `stop` nothing more is issued or offered, and `busy` falls
// once every outstanding read has returned; `start` must wait for that.
//
// Batched, tagged reads and the response buffer follow the outline the design
// gives for an efficient implementation; the slot count, the tag format and the
// word-per-request memory port are this design's choices.
//
// Timing: one request per cycle when mem_req_ready is high; an entry is offered in
// the cycle after its last word arrives. Responses are always accepted.
module coo_reader
  import sdma_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,                 // prefetch depth in entries (power of two)
  parameter int unsigned SLOT_W  = $clog2(ENTRIES),
  parameter int unsigned TAG_W   = SLOT_W + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [XLEN-1:0]   start_data_addr,
  input  logic [XLEN-1:0]   start_index_addr,
  input  logic              stop,
  output logic              busy,
  // memory read port: one 32-bit word per request
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic [XLEN-1:0]   mem_req_addr,
  output logic [TAG_W-1:0]  mem_req_tag,
  input  logic              mem_resp_valid,
  input  logic [TAG_W-1:0]  mem_resp_tag,
  input  logic [31:0]       mem_resp_data,
  // entry stream
  output logic              ent_valid,
  input  logic              ent_ready,
  output coo_entry_t        ent
);

  localparam int unsigned CNT_W = $clog2(3 * ENTRIES + 1);

  logic                 running;
  logic [XLEN-1:0]      idx_addr, dat_addr;     // addresses of the entry at `tail`
  logic [SLOT_W:0]      head, tail;             // extra bit tells full from empty
  logic [1:0]           word;                   // next word of entry `tail` to request
  logic [CNT_W-1:0]     outstanding;
  logic [2:0]           got   [ENTRIES];
  logic [31:0]          rowv  [ENTRIES];
  logic [31:0]          colv  [ENTRIES];
  logic [31:0]          valv  [ENTRIES];

  logic full, req_fire, pop;
  logic [SLOT_W-1:0] hslot, tslot, rslot;

  assign hslot = head[SLOT_W-1:0];
  assign tslot = tail[SLOT_W-1:0];
  assign rslot = mem_resp_tag[TAG_W-1:2];
  assign full  = (head[SLOT_W] != tail[SLOT_W]) && (hslot == tslot);

  assign mem_req_valid = running && !full;
  assign req_fire      = mem_req_valid && mem_req_ready;
  assign mem_req_tag   = {tslot, word};
  always_comb begin
    unique case (word)
      2'd0:    mem_req_addr = idx_addr;
      2'd1:    mem_req_addr = idx_addr + XLEN'(IND_BYTES);
      default: mem_req_addr = dat_addr;
    endcase
  end

  assign ent_valid = running && (head != tail) && (&got[hslot]);
  assign ent       = '{row: rowv[hslot], col: colv[hslot], value: valv[hslot]};
  assign pop       = ent_valid && ent_ready;
  assign busy      = running || (outstanding != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      idx_addr    <= '0;
      dat_addr    <= '0;
      head        <= '0;
      tail        <= '0;
      word        <= '0;
      outstanding <= '0;
      for (int i = 0; i < int'(ENTRIES); i++) got[i] <= '0;
    end else begin
      outstanding <= outstanding + CNT_W'(req_fire) - CNT_W'(mem_resp_valid);
      if (mem_resp_valid) got[rslot][mem_resp_tag[1:0]] <= 1'b1;
      if (start) begin
        running  <= 1'b1;
        idx_addr <= start_index_addr;
        dat_addr <= start_data_addr;
        head     <= '0;
        tail     <= '0;
        word     <= '0;
        for (int i = 0; i < int'(ENTRIES); i++) got[i] <= '0;
      end else if (stop) begin
        running <= 1'b0;
      end else begin
        if (req_fire) begin
          if (word == 2'd2) begin
            word     <= '0;
            tail     <= tail + 1'b1;
            idx_addr <= idx_addr + XLEN'(2 * IND_BYTES);
            dat_addr <= dat_addr + XLEN'(DATA_BYTES);
          end else begin
            word <= word + 2'd1;
          end
        end
        if (pop) begin
          head       <= head + 1'b1;
          got[hslot] <= '0;
        end
      end
    end
  end

  // Response data lands in its slot; a slot is rewritten only after it was popped.
  always_ff @(posedge clk) begin
    if (mem_resp_valid) begin
      unique case (mem_resp_tag[1:0])
        2'd0:    rowv[rslot] <= mem_resp_data;
        2'd1:    colv[rslot] <= mem_resp_data;
        default: valv[rslot] <= mem_resp_data;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_resp_owed:  assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> outstanding != '0);
  a_ent_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ent_valid && !ent_ready && !stop |=> ent_valid && $stable(ent));

endmodule
