// tb_coo_reader: self-checking test of the prefetching COO entry reader.
//
// A memory model answers the reader's tagged word reads after random latencies
// and out of order. For a series of starts at random addresses the test consumes
// a random number of entries with a randomly stalling consumer and checks each
// (row, col, value) against the words the memory holds at index_addr + 8k,
// index_addr + 8k + 4 and data_addr + 4k. After each stop it checks that no entry
// is offered and that busy falls only when no read is left in flight. It also
// checks that reads were really answered out of order and never exceeded the
// prefetch window.
module tb_coo_reader;
  import sdma_pkg::*;

  localparam int ENTRIES = 4;
  localparam int TAG_W   = $clog2(ENTRIES) + 2;

  logic             clk = 0, rst_n = 0;
  logic             start = 0, stop = 0, busy;
  logic [63:0]      start_data_addr = 0, start_index_addr = 0;
  logic             mem_req_valid, mem_req_ready;
  logic [63:0]      mem_req_addr;
  logic [TAG_W-1:0] mem_req_tag, mem_resp_tag;
  logic             mem_resp_valid;
  logic [31:0]      mem_resp_data;
  logic             ent_valid, ent_ready = 0;
  coo_entry_t       ent;
  int               checks = 0, failures = 0;

  coo_reader #(.ENTRIES(ENTRIES)) dut (.*);

  tb_mem_model #(.TAG_W(TAG_W), .MAX_LAT(8)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .req_tag(mem_req_tag), .resp_valid(mem_resp_valid), .resp_tag(mem_resp_tag),
    .resp_data(mem_resp_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  // consumer state
  logic [63:0] base_d, base_i;
  int          k = 0, want = 0;
  logic        stopped = 1;
  int          outstanding = 0, max_out = 0;

  always @(posedge clk) #1 ent_ready = (want > k) && ($urandom_range(3, 0) != 0);

  always @(negedge clk) if (rst_n) begin
    if (stopped) chk(!ent_valid, "entry offered while stopped");
    if (ent_valid && ent_ready) begin
      chk(ent.row   == mem.read_word(base_i + 64'(8 * k)),     "row index");
      chk(ent.col   == mem.read_word(base_i + 64'(8 * k + 4)), "col index");
      chk(ent.value == mem.read_word(base_d + 64'(4 * k)),     "value");
      k++;
    end
    // reads in flight as seen at the port
    outstanding += int'(mem_req_valid && mem_req_ready) - int'(mem_resp_valid);
    if (outstanding > max_out) max_out = outstanding;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int run = 0; run < 30; run++) begin
      @(posedge clk);
      #1;
      base_d = {32'h0, $urandom} & ~64'h3;
      base_i = {32'h1, $urandom} & ~64'h3;
      k = 0;
      want = $urandom_range(25, 1);
      start = 1; start_data_addr = base_d; start_index_addr = base_i;
      stopped = 0;
      @(posedge clk);
      #1 start = 0;
      while (k < want) begin @(posedge clk); #1; end
      stop = 1;
      @(posedge clk);
      #1 stop = 0;
      stopped = 1;
      while (busy) begin @(posedge clk); #1; end
      chk(outstanding == 0, "busy fell with reads in flight");
      chk(k == want, "entry count");
    end
    chk(mem.n_ooo > 0, "no out-of-order response happened");
    chk(max_out <= 3 * ENTRIES, "prefetch window exceeded");
    chk(max_out > 3, "reads were never batched");
    $display("responses out of order: %0d, most reads in flight: %0d", mem.n_ooo, max_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
