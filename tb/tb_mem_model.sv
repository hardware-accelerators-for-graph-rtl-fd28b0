// tb_mem_model: behavioural model of main memory behind the sparse DMA's read port.
//
// Answers one-word tagged read requests after a random latency of 1..MAX_LAT
// cycles, choosing among the ready requests at random, so responses come back out
// of order. A word that was never written reads as a fixed hash of its address.
// Words are written by the testbench through write_word(). Counts the responses
// that overtook an older request (n_ooo) and the most requests in flight.
module tb_mem_model #(
  parameter int unsigned TAG_W   = 4,
  parameter int unsigned MAX_LAT = 6,
  parameter int unsigned READY_PCT = 80   // chance of accepting a request in a cycle
) (
  input  logic             clk,
  input  logic             rst_n,       // no request is accepted in reset
  input  logic             req_valid,
  output logic             req_ready,
  input  logic [63:0]      req_addr,
  input  logic [TAG_W-1:0] req_tag,
  output logic             resp_valid,
  output logic [TAG_W-1:0] resp_tag,
  output logic [31:0]      resp_data
);

  typedef struct {
    logic [TAG_W-1:0] tag;
    logic [31:0]      data;
    longint unsigned  due;
    longint unsigned  seq;
  } pend_t;

  logic [31:0]     words [logic [63:0]];
  pend_t           pend [$];
  longint unsigned cyc = 0, seq = 0;
  int unsigned     n_ooo = 0, max_inflight = 0, n_req = 0;

  function automatic logic [31:0] hash_word(logic [63:0] a);
    return a[31:0] * 32'h9e37_79b1 ^ 32'h5a5a_1234;
  endfunction

  function automatic logic [31:0] read_word(logic [63:0] a);
    if (words.exists(a)) return words[a];
    return hash_word(a);
  endfunction

  function automatic void write_word(logic [63:0] a, logic [31:0] d);
    words[a] = d;
  endfunction

  initial begin
    req_ready  = 1'b0;
    resp_valid = 1'b0;
    resp_tag   = '0;
    resp_data  = '0;
  end

  always @(posedge clk) begin
    int idx;
    int cand [$];
    cyc++;
    cand.delete();
    // request accepted in the previous cycle
    if (rst_n && req_valid && req_ready) begin
      pend.push_back('{tag: req_tag, data: read_word(req_addr),
                       due: cyc + 64'($urandom_range(MAX_LAT - 1, 0)), seq: seq});
      seq++;
      n_req++;
    end
    if (pend.size() > int'(max_inflight)) max_inflight = pend.size();
    // pick one due response at random
    resp_valid <= 1'b0;
    for (int i = 0; i < pend.size(); i++) if (pend[i].due <= cyc) cand.push_back(i);
    if (cand.size() > 0) begin
      idx = cand[$urandom_range(cand.size() - 1, 0)];
      for (int i = 0; i < pend.size(); i++) if (pend[i].seq < pend[idx].seq) begin
        n_ooo++;
        break;
      end
      resp_valid <= 1'b1;
      resp_tag   <= pend[idx].tag;
      resp_data  <= pend[idx].data;
      pend.delete(idx);
    end
    req_ready <= rst_n && ($urandom_range(99, 0) < READY_PCT);
  end

endmodule
