// Unit test of valid_extension with the triangle query over a reference
// memory image served through a cache-port model with random latency. Random
// candidates (often true neighbours, sometimes a vertex already mapped) must
// be accepted exactly when they differ from every mapped vertex and are
// adjacent, with the right labels, to the source of every other relation
// ending at their position; accepted ones must leave as a partial match, or as
// a complete match when they fill the last position, with the candidate
// appended. The rejection counters must match.
//
// How: a 10-unit clock; the main sequence offers one candidate at a time,
// clocked random ready signals back-pressure the partial and complete match
// outputs, and the cache port is a clocked behavioural responder over the
// reference image. Interface: none
// (top level). Timing: a watchdog ends the run as failed after 300000 cycles.
// Source: probing the other relations' hash cells follows the method; the
// injectivity check placed here is this design's.
module tb_valid_extension;
  import sgi_pkg::*;
  import sgi_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clr = 1'b0;
  query_cfg_t cfg;
  addr_t table_base = addr_t'(TABLE_BASE), adj_base = addr_t'(ADJ_BASE);
  logic in_valid = 1'b0, in_ready;
  pmatch_t in_pm = '0, out_pm;
  rel_t in_rm = '0;
  vid_t in_w = '0;
  logic pm_valid, pm_ready = 1'b0, match_valid, match_ready = 1'b0, busy;
  logic [31:0] hash_reject, inj_reject;
  logic c_req_valid, c_req_ready, c_rsp_valid;
  addr_t c_req_addr;
  word_t c_rsp_data;
  int checks = 0, failures = 0;
  int got_pm = 0, got_match = 0;
  pmatch_t last_out;

  valid_extension dut (.*);

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

  always @(posedge clk) begin
    pm_ready    <= ($urandom_range(2) != 0);
    match_ready <= ($urandom_range(2) != 0);
    if (pm_valid && match_valid) begin
      failures++;
      $display("FAIL: both outputs valid");
    end
    if (pm_valid && pm_ready) begin
      got_pm++;
      last_out = out_pm;
    end
    if (match_valid && match_ready) begin
      got_match++;
      last_out = out_pm;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
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
    pmatch_t p, e;
    int d, rm, w, src, n_acc, n_hash, n_inj, pm0, m0;
    bit ok, dup;
    c_rsp_valid = 1'b0;
    c_rsp_data  = '0;
    gen_graph(40, 160, 3);
    triangle(2, 2);
    build();
    cfg = sgi_ref_pkg::cfg();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    clr <= 1'b1;
    @(posedge clk);
    clr <= 1'b0;
    n_acc = 0; n_hash = 0; n_inj = 0;
    for (int t = 0; t < 400; t++) begin
      d = $urandom_range(1, 2);
      p = '0;
      p.depth = QCNT_W'(d);
      for (int j = 0; j < d; j++) p.v[j] = vid_t'($urandom_range(nv - 1));
      do rm = $urandom_range(nr - 1); while (rd[rm] != d);
      src = int'(p.v[rs[rm]]);
      // candidate: a neighbour of the rm source with the right label, a
      // mapped vertex, or any vertex
      w = $urandom_range(nv - 1);
      if ($urandom_range(3) == 0) w = int'(p.v[0]);
      else if ($urandom_range(3) != 0)
        for (int k = 0; k < nv; k++)
          if (adj[src][k] && lab[k] == ql[d] && $urandom_range(1) == 1) w = k;
      dup = 1'b0;
      for (int j = 0; j < d; j++) if (int'(p.v[j]) == w) dup = 1'b1;
      ok = !dup;
      for (int r = 0; r < nr; r++)
        if (r != rm && rd[r] == d) begin
          int v;
          v = int'(p.v[rs[r]]);
          if (!(adj[v][w] && lab[v] == ql[rs[r]] && lab[w] == ql[d])) ok = 1'b0;
        end
      if (dup) n_inj++;
      else if (!ok) n_hash++;
      else n_acc++;
      e = p;
      e.v[d] = vid_t'(w);
      e.depth = QCNT_W'(d + 1);
      pm0 = got_pm;
      m0  = got_match;
      @(posedge clk);
      in_valid <= 1'b1;
      in_pm    <= p;
      in_rm    <= rel_t'(rm);
      in_w     <= vid_t'(w);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      in_valid <= 1'b0;
      @(posedge clk);
      while (busy) @(posedge clk);
      @(posedge clk);
      if (ok) begin
        check(d + 1 == qn ? got_match == m0 + 1 : got_pm == pm0 + 1,
              $sformatf("t%0d candidate %0d not accepted on the right output", t, w));
        check(last_out == e, $sformatf("t%0d extended match wrong", t));
      end else
        check(got_pm == pm0 && got_match == m0, $sformatf("t%0d candidate %0d accepted", t, w));
    end
    check(int'(inj_reject) == n_inj, $sformatf("injectivity rejects %0d expected %0d", inj_reject, n_inj));
    check(int'(hash_reject) == n_hash, $sformatf("probe rejects %0d expected %0d", hash_reject, n_hash));
    check(n_acc > 0 && n_hash > 0 && n_inj > 0, "every outcome seen");
    $display("accepted %0d probe-rejected %0d injectivity-rejected %0d", n_acc, n_hash, n_inj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
