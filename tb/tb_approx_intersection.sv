// Unit test of approx_intersection with the triangle query over a reference
// memory image served through a cache-port model with random latency. For
// random partial matches of depth 1 and 2 the output filter must be the AND of
// the row filters of every relation ending at the next position, the chosen
// relation the first one with the smallest estimated size, and the partial
// match must pass through unchanged.
//
// How: a 10-unit clock; the main sequence offers one partial match at a time
// and waits for its result; the cache port is a clocked behavioural responder
// with 1 to 4 cycles of random latency, reading the reference image. Interface: none (top
// level). Timing: a watchdog ends the run as failed after 200000 cycles.
// Source: the AND of filters and choice of the smallest estimate follow the
// method; the first-smallest tie rule and the test sizes are this design's.
module tb_approx_intersection;
  import sgi_pkg::*;
  import sgi_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  query_cfg_t cfg;
  addr_t bloom_base = addr_t'(BLOOM_BASE);
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, busy;
  pmatch_t in_pm = '0, out_pm;
  bloom_t out_b;
  rel_t out_rm;
  logic c_req_valid, c_req_ready, c_rsp_valid;
  addr_t c_req_addr;
  word_t c_rsp_data;
  int checks = 0, failures = 0;

  approx_intersection dut (.*);

  // cache port model: accepts when idle, answers after 1..4 cycles
  int    lat_left = 0;
  addr_t pend_addr;
  assign c_req_ready = (lat_left == 0) && !c_rsp_valid;
  always @(posedge clk) begin
    c_rsp_valid <= 1'b0;
    if (c_req_valid && c_req_ready) begin
      lat_left  <= $urandom_range(1, 4);
      pend_addr <= c_req_addr;
    end else if (lat_left == 1) begin
      c_rsp_valid <= 1'b1;
      c_rsp_data  <= rdimg(int'(pend_addr));
      lat_left    <= 0;
    end else if (lat_left > 1) lat_left <= lat_left - 1;
  end

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

  initial begin
    pmatch_t p;
    bloom_t eb, f;
    int erm, best, d;
    c_rsp_valid = 1'b0;
    c_rsp_data  = '0;
    gen_graph(40, 120, 3);
    triangle(2, 2);
    build();
    cfg = sgi_ref_pkg::cfg();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      d = $urandom_range(1, 2);
      p = '0;
      p.depth = QCNT_W'(d);
      for (int j = 0; j < d; j++) p.v[j] = vid_t'($urandom_range(nv - 1));
      // reference
      eb = '1;
      best = 99;
      erm = -1;
      for (int r = 0; r < nr; r++) if (rd[r] == d) begin
        f = bloom_t'(rdimg(BLOOM_BASE + (r << h1) + lowbits(int'(p.v[rs[r]]), h1)));
        eb &= f;
        if ($countones(f) / 2 < best) begin
          best = $countones(f) / 2;
          erm = r;
        end
      end
      @(posedge clk);
      in_valid <= 1'b1;
      in_pm    <= p;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      in_valid <= 1'b0;
      out_ready <= 1'b1;
      @(posedge clk);
      while (!out_valid) @(posedge clk);
      out_ready <= 1'b0;
      check(out_b == eb, $sformatf("t%0d filter %h expected %h", t, out_b, eb));
      check(int'(out_rm) == erm, $sformatf("t%0d relation %0d expected %0d", t, out_rm, erm));
      check(out_pm == p, "partial match changed");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
