// Unit test of rd_cache in front of a DRAM model: random reads (with locality)
// must return the memory's words; a repeated read must hit and answer in the
// cycle after acceptance; after the memory changes behind the cache, a flush
// must make the new value visible. Hits and misses must both occur.
//
// How: a 10-unit clock; a read task issues one request at a time and compares
// each answer with the DRAM model's array (latency 5, 20 % stalls). Interface:
// none (top level). Timing: a watchdog ends the run as failed after 200000
// cycles. Source: the method uses a cache but does not give its organisation;
// the direct-mapped read-only cache under test is this design's.
module tb_rd_cache;
  import sgi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic flush = 1'b0, req_valid = 1'b0, req_ready, rsp_valid;
  addr_t req_addr = '0;
  word_t rsp_data;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t m_req;
  word_t m_rsp_data;
  logic [31:0] hits, misses;
  int oob;
  int checks = 0, failures = 0;

  rd_cache #(.LINE_WORDS(4), .LINES(8)) dut (.*);
  ddr_model #(.WORDS(4096), .LAT(5), .STALL_PCT(20)) u_ddr (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data), .oob
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic rd(input int a, output word_t d, output int lat);
    @(posedge clk);
    req_valid <= 1'b1;
    req_addr  <= addr_t'(a);
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    req_valid <= 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      lat++;
    end while (!rsp_valid);
    d = rsp_data;
  endtask

  initial begin
    word_t d;
    int lat, a, h0;
    for (int i = 0; i < 4096; i++) u_ddr.mem[i] = {32'(i), 32'(i * 7 + 3)};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    flush <= 1'b1;
    @(posedge clk);
    flush <= 1'b0;
    a = 100;
    for (int t = 0; t < 400; t++) begin
      a = ($urandom_range(3) == 0) ? $urandom_range(255) : (a + 1) % 256;
      rd(a, d, lat);
      check(d == u_ddr.mem[a], $sformatf("addr %0d read %h", a, d));
    end
    h0 = int'(hits);
    rd(a, d, lat);
    check(int'(hits) == h0 + 1, "repeated read did not hit");
    check(lat == 1, $sformatf("hit latency %0d, expected 1", lat));
    check(hits > 0 && misses > 0, "hits and misses both occur");
    // change memory, flush, read again
    u_ddr.mem[a] = 64'hDEAD_BEEF_0123_4567;
    rd(a, d, lat);
    check(d != u_ddr.mem[a], "stale word expected before flush");
    @(posedge clk);
    flush <= 1'b1;
    @(posedge clk);
    flush <= 1'b0;
    @(posedge clk);
    check(hits == 0 && misses == 0, "flush clears counters");
    rd(a, d, lat);
    check(d == 64'hDEAD_BEEF_0123_4567, "flush makes new data visible");
    check(misses == 1, "read after flush misses");
    $display("hits %0d misses %0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
