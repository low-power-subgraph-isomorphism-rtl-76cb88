// Unit test of pre_filter_count on a random 40-vertex graph and the triangle
// query: after pass 0 every hash-table cell must hold the reference count and
// the Bloom filter region (pre-filled with garbage) must be cleared; pass 1
// must stream exactly the reference kept edges in order, under random
// back-pressure.
//
// How: a 10-unit clock; graph, query and expected counts come from
// sgi_ref_pkg; a clocked sink takes the edge stream with random ready; DRAM
// model with latency 3 and 15 % stalls. Interface: none (top level). Timing: a
// watchdog ends the run as failed after 500000 cycles. Source: discarding
// edges whose labels fit no relation and counting collisions per cell follow
// the method; the two-pass streaming is this design's.
module tb_pre_filter_count;
  import sgi_pkg::*;
  import sgi_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, count_done, go = 1'b0, done;
  query_cfg_t cfg;
  mem_map_t map;
  logic t_valid, t_ready = 1'b0;
  rel_t t_rel;
  vid_t t_x, t_y;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t m_req;
  word_t m_rsp_data;
  logic [31:0] kept;
  int oob;
  int checks = 0, failures = 0;
  int k = 0;

  pre_filter_count dut (.*);
  ddr_model #(.WORDS(32768), .LAT(3), .STALL_PCT(15)) u_ddr (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data), .oob
  );

  initial begin
    repeat (500000) @(posedge clk);
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

  always @(posedge clk) begin
    t_ready <= ($urandom_range(2) != 0);
    if (t_valid && t_ready) begin
      checks++;
      if (k >= kr.size() || int'(t_rel) != kr[k] || int'(t_x) != kx[k] || int'(t_y) != ky[k]) begin
        failures++;
        $display("FAIL: kept edge %0d is (%0d,%0d,%0d)", k, t_rel, t_x, t_y);
      end
      k++;
    end
  end

  initial begin
    int cnt [int];
    #1;  // after the memory model has zeroed itself
    gen_graph(40, 120, 3);
    triangle(2, 2);
    put_graph();
    filter(cnt);
    foreach (img[a]) u_ddr.mem[a] = img[a];
    for (int b = 0; b < (nr << h1); b++) u_ddr.mem[BLOOM_BASE + b] = 64'hFFFF;
    for (int c = 0; c < (nr << (h1 + h2)); c++) u_ddr.mem[TABLE_BASE + c] = 64'h55;
    cfg = sgi_ref_pkg::cfg();
    map = sgi_ref_pkg::map();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (count_done);
    @(posedge clk);
    for (int c = 0; c < (nr << (h1 + h2)); c++)
      check(u_ddr.mem[TABLE_BASE + c] == word_t'(cnt[c]),
            $sformatf("cell %0d count %0d expected %0d", c, u_ddr.mem[TABLE_BASE + c], cnt[c]));
    for (int b = 0; b < (nr << h1); b++)
      check(u_ddr.mem[BLOOM_BASE + b] == '0, "Bloom region not cleared");
    check(int'(kept) == kr.size(), "pass 0 kept count");
    check(k == 0, "no edge streamed during pass 0");
    go <= 1'b1;
    @(posedge clk);
    go <= 1'b0;
    wait (done);
    check(k == kr.size(), $sformatf("streamed %0d edges, expected %0d", k, kr.size()));
    check(int'(kept) == kr.size(), "pass 1 kept count");
    $display("kept %0d", kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
