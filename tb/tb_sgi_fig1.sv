// Directed end-to-end test of sgi_top on the worked example of the method: the
// triangle query with labels A, B, D and the 11-vertex data graph of its first
// figure (labels A=0, B=1, C=2, D=3). The method names exactly two matches,
// (u0, u1, u2) = (v2, v1, v4) and (v10, v8, v6); the test checks that these and
// only these come out, once each, for matching order (u0, u1, u2). It also
// checks the number of roots (the three A vertices) and of kept directed
// edges (3 A->B, 4 A->D, 3 B->D). Edges are listed in both orientations
// across the list so both directions of the label test are exercised.
// Runs the query with three hash sizes, including h1 = h2 = 0 where every edge
// of a relation shares one row and one cell. Ends with the TB_RESULT line.
//
// How: a 10-unit clock; the graph is written into a DRAM model (latency 3,
// 10 % stalls) before reset; a clocked monitor classifies every match.
// Interface: none (top level). Timing: a watchdog ends the run as failed after
// 200000 cycles. Source: query, graph and expected matches are the method's
// example; the hash sizes are this test's.
module tb_sgi_fig1;
  import sgi_pkg::*;

  localparam int NV = 11;
  localparam int NE = 15;
  localparam int LABEL_BASE = 0;
  localparam int EDGE_BASE  = 64;
  localparam int TABLE_BASE = 128;
  localparam int CUR_BASE   = 512;
  localparam int BLOOM_BASE = 1024;
  localparam int ADJ_BASE   = 1536;
  localparam int SPILL_BASE = 2048;

  logic clk, rst_n, start, busy, done, pre_done;
  query_cfg_t cfg;
  mem_map_t map;
  logic match_valid, match_ready;
  pmatch_t match_pm;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t m_req;
  word_t m_rsp_data;
  logic [31:0] n_matches, n_roots, n_kept, n_scanned, n_bloom_drop, n_hash_reject,
               n_inj_reject, n_spilled, n_refilled, n_hit_bloom, n_miss_bloom,
               n_hit_table, n_miss_table;
  int oob;

  sgi_top u_dut (.*);

  ddr_model #(.WORDS(4096), .LAT(3), .STALL_PCT(10)) u_ddr (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data), .oob
  );

  // vertex labels v0..v10 and edges read off the example graph
  int lab [NV] = '{1, 1, 0, 2, 3, 0, 3, 3, 1, 2, 0};
  int ea [NE]  = '{2, 1, 4, 4, 1, 5, 1, 1, 7, 8, 3, 5, 6, 10, 10};
  int eb [NE]  = '{4, 2, 1, 7, 9, 1, 0, 3, 5, 7, 5, 6, 8, 8, 6};

  int checks = 0, failures = 0;
  int got_a, got_b, got_other;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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
    if (busy && match_valid && match_ready) begin
      if (match_pm.depth == 4'd3 && match_pm.v[0] == 2 && match_pm.v[1] == 1 &&
          match_pm.v[2] == 4)
        got_a++;
      else if (match_pm.depth == 4'd3 && match_pm.v[0] == 10 && match_pm.v[1] == 8 &&
               match_pm.v[2] == 6)
        got_b++;
      else
        got_other++;
    end
  end

  task automatic run(input int h1, input int h2);
    cfg = '0;
    cfg.nq        = 4'd3;
    cfg.qlabel[0] = 8'd0;  // u0: A
    cfg.qlabel[1] = 8'd1;  // u1: B
    cfg.qlabel[2] = 8'd3;  // u2: D
    cfg.nrel      = 6'd3;
    cfg.rel_src[0] = 3'd0; cfg.rel_dst[0] = 3'd1;
    cfg.rel_src[1] = 3'd0; cfg.rel_dst[1] = 3'd2;
    cfg.rel_src[2] = 3'd1; cfg.rel_dst[2] = 3'd2;
    cfg.h1 = HBITS_W'(h1);
    cfg.h2 = HBITS_W'(h2);
    got_a = 0;
    got_b = 0;
    got_other = 0;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    check(busy && !pre_done && !done, $sformatf("h%0d/%0d run did not start", h1, h2));
    wait (pre_done);
    check(n_kept == 32'd10, $sformatf("h%0d/%0d kept %0d edges, expected 10", h1, h2, n_kept));
    wait (done);
    @(posedge clk);
    check(n_roots == 32'd3, $sformatf("h%0d/%0d roots %0d, expected 3", h1, h2, n_roots));
    check(n_matches == 32'd2, $sformatf("h%0d/%0d matches %0d, expected 2", h1, h2, n_matches));
    check(got_a == 1, $sformatf("h%0d/%0d match (v2,v1,v4) seen %0d times", h1, h2, got_a));
    check(got_b == 1, $sformatf("h%0d/%0d match (v10,v8,v6) seen %0d times", h1, h2, got_b));
    check(got_other == 0, $sformatf("h%0d/%0d %0d unexpected matches", h1, h2, got_other));
    check(oob == 0, "memory access out of range");
    $display("h1=%0d h2=%0d: matches %0d roots %0d kept %0d scanned %0d hash_rej %0d",
             h1, h2, n_matches, n_roots, n_kept, n_scanned, n_hash_reject);
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    match_ready = 1'b1;
    cfg = '0;
    map = '0;
    map.nv          = vid_t'(NV);
    map.ne          = addr_t'(NE);
    map.label_base  = addr_t'(LABEL_BASE);
    map.edge_base   = addr_t'(EDGE_BASE);
    map.table_base  = addr_t'(TABLE_BASE);
    map.cursor_base = addr_t'(CUR_BASE);
    map.bloom_base  = addr_t'(BLOOM_BASE);
    map.adj_base    = addr_t'(ADJ_BASE);
    map.spill_base  = addr_t'(SPILL_BASE);
    map.spill_cap   = addr_t'(64);
    #1;
    for (int i = 0; i < NV; i++) u_ddr.mem[LABEL_BASE + i] = word_t'(lab[i]);
    for (int i = 0; i < NE; i++) u_ddr.mem[EDGE_BASE + i] = {32'(ea[i]), 32'(eb[i])};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run(2, 2);
    run(0, 0);
    run(1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
