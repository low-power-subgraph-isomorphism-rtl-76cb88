// Unit test of propose_filter over a reference memory image in a DRAM model.
// For random partial matches, relations and filters (the real approximate
// intersection, or a random filter) it must emit, in adjacency order, exactly
// the neighbours y of the mapped source vertex in the chosen relation whose
// Bloom bits are all set in the filter, and count the entries it read and
// those the filter dropped.
//
// How: a 10-unit clock; the main sequence offers one request at a time and
// waits until the unit is idle; a clocked sink collects candidates under random back-pressure and compares them with a
// list computed from sgi_ref_pkg; DRAM model with latency 3 and 15 % stalls.
// Interface: none (top level). Timing: a watchdog ends the run as failed
// after 300000 cycles. Source: reading the smallest list and filtering it with
// B follow the method; the x = v check on stored edges is this design's.
module tb_propose_filter;
  import sgi_pkg::*;
  import sgi_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clr = 1'b0;
  query_cfg_t cfg;
  addr_t table_base = addr_t'(TABLE_BASE), adj_base = addr_t'(ADJ_BASE);
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, busy;
  pmatch_t in_pm = '0, out_pm;
  bloom_t in_b = '0;
  rel_t in_rm = '0, out_rm;
  vid_t out_w;
  logic [31:0] scanned, bloom_drop;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t m_req;
  word_t m_rsp_data;
  int oob;
  int checks = 0, failures = 0;
  int exp_w [$];
  pmatch_t cur_pm;
  int tot_scan = 0, tot_drop = 0;

  propose_filter dut (.*);
  ddr_model #(.WORDS(32768), .LAT(3), .STALL_PCT(15)) u_ddr (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data), .oob
  );

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    out_ready <= ($urandom_range(3) != 0);
    if (out_valid && out_ready) begin
      checks++;
      if (exp_w.size() == 0 || int'(out_w) != exp_w[0] || out_pm != cur_pm || out_rm != in_rm) begin
        failures++;
        $display("FAIL: candidate %0d", out_w);
      end
      if (exp_w.size() != 0) void'(exp_w.pop_front());
    end
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
    bloom_t b;
    int d, r, v, s, e, row, nscan, ndrop;
    word_t ent;
    #1;
    gen_graph(40, 120, 3);
    triangle(2, 2);
    build();
    foreach (img[a]) u_ddr.mem[a] = img[a];
    cfg = sgi_ref_pkg::cfg();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      d = $urandom_range(1, 2);
      p = '0;
      p.depth = QCNT_W'(d);
      for (int j = 0; j < d; j++) p.v[j] = vid_t'($urandom_range(nv - 1));
      do r = $urandom_range(nr - 1); while (rd[r] != d);
      v = int'(p.v[rs[r]]);
      row = (r << (h1 + h2)) + (lowbits(v, h1) << h2);
      b = ($urandom_range(1) == 1) ? bloom_t'($urandom)
                                   : bloom_t'(rdimg(BLOOM_BASE + (r << h1) + lowbits(v, h1)));
      s = int'(rdimg(TABLE_BASE + row));
      e = int'(rdimg(TABLE_BASE + row + (1 << h2)));
      nscan = e - s;
      ndrop = 0;
      for (int a = s; a < e; a++) begin
        ent = rdimg(ADJ_BASE + a);
        if (int'(ent[63:32]) == v) begin
          if ((bmask(int'(ent[31:0])) & b) == bmask(int'(ent[31:0]))) exp_w.push_back(int'(ent[31:0]));
          else ndrop++;
        end
      end
      cur_pm = p;
      @(posedge clk);
      clr      <= 1'b1;
      in_valid <= 1'b1;
      in_pm    <= p;
      in_b     <= b;
      in_rm    <= rel_t'(r);
      @(posedge clk);
      clr <= 1'b0;
      while (!in_ready) @(posedge clk);
      in_valid <= 1'b0;
      @(posedge clk);
      while (busy) @(posedge clk);
      @(posedge clk);
      check(exp_w.size() == 0, $sformatf("t%0d: %0d candidates missing", t, exp_w.size()));
      check(int'(scanned) == nscan, $sformatf("t%0d scanned %0d expected %0d", t, scanned, nscan));
      check(int'(bloom_drop) == ndrop, $sformatf("t%0d dropped %0d expected %0d", t, bloom_drop, ndrop));
      exp_w.delete();
      tot_scan += nscan;
      tot_drop += ndrop;
    end
    check(tot_drop > 0, "filter never dropped anything");
    $display("scanned %0d dropped %0d", tot_scan, tot_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
