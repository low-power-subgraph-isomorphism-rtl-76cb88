// Test environment for sgi_top: clock, reset, off-chip memory and checker.
//
// Generates a random labelled data graph (NV vertices, NE distinct undirected
// edges, NLAB labels), writes its label and edge arrays into a DRAM model and
// runs a set of queries through the accelerator: a triangle, a 4-cycle whose
// repeated labels make injectivity matter, and a 4-vertex "diamond" with three
// backward neighbours; queries 3 and 4 (selected with QFIRST/QLAST) are a
// 5-vertex "house", an 8-vertex path closed by two chords and a 4-clique, for
// 5-label graphs. After preprocessing it checks the number of edges kept
// per the reference and the table sentinel; after enumeration it checks that
// every reported match is a real, injective embedding, that none repeats, and
// that their number equals a software backtracking count. It also counts how
// often each mechanism happened (spill and refill of the partial-result FIFO,
// cache hits and misses, Bloom filter rejections, hash-collision rejections,
// injectivity rejections, back-pressure on the match output) and counts a
// failure for each that never did, unless told not to expect it.
// Raises `finished` when every query has run; the testbench that instantiates
// it prints the result and owns the watchdog.
//
// Interface: drives every input of sgi_top and observes every output (ports
// named as on sgi_top), plus checks, failures and finished for the enclosing
// testbench. Timing: 10-unit clock, start is a one-cycle pulse, queries run
// back to back. Source: the checked behaviour
// is the method's; graph sizes, queries and the mechanism list are this
// design's.
module sgi_tb_driver
  import sgi_pkg::*;
#(
  parameter int NV           = 40,
  parameter int NE           = 110,
  parameter int NLAB         = 3,
  parameter int H1           = 2,
  parameter int H2           = 2,
  parameter bit EXPECT_SPILL = 1'b1,
  parameter int QFIRST       = 0,
  parameter int QLAST        = 2,
  parameter int SPILL_CAP    = 4096
) (
  output logic        clk,
  output logic        rst_n,
  output logic        start,
  output query_cfg_t  cfg,
  output mem_map_t    map,
  input  logic        busy,
  input  logic        done,
  input  logic        pre_done,
  input  logic        match_valid,
  output logic        match_ready,
  input  pmatch_t     match_pm,
  input  logic        m_req_valid,
  output logic        m_req_ready,
  input  mem_req_t    m_req,
  output logic        m_rsp_valid,
  output word_t       m_rsp_data,
  input  logic [31:0] n_matches,
  input  logic [31:0] n_roots,
  input  logic [31:0] n_kept,
  input  logic [31:0] n_scanned,
  input  logic [31:0] n_bloom_drop,
  input  logic [31:0] n_hash_reject,
  input  logic [31:0] n_inj_reject,
  input  logic [31:0] n_spilled,
  input  logic [31:0] n_refilled,
  input  logic [31:0] n_hit_bloom,
  input  logic [31:0] n_miss_bloom,
  input  logic [31:0] n_hit_table,
  input  logic [31:0] n_miss_table,
  output int          checks,
  output int          failures,
  output logic        finished
);
  localparam int LABEL_BASE = 0;
  localparam int EDGE_BASE  = 1024;
  localparam int TABLE_BASE = 4096;
  localparam int CUR_BASE   = 8192;
  localparam int BLOOM_BASE = 12288;
  localparam int ADJ_BASE   = 16384;
  localparam int SPILL_BASE = 32768;
  localparam int MEM_WORDS  = 65536;

  int oob;
  longint cycles = 0;

  int     lab [NV];
  bit     adj [NV][NV];
  int     qn;
  int     ql [QMAX];
  int     rs [MAX_REL];
  int     rd [MAX_REL];
  int     nr;
  bit     seen [longint];
  int     hw_bad;

  // mechanism tallies over all queries
  longint t_spill = 0, t_refill = 0, t_hit = 0, t_miss = 0, t_bloom = 0,
          t_hash = 0, t_inj = 0, t_bp = 0, t_matches = 0, t_roots = 0;

  ddr_model #(.WORDS(MEM_WORDS), .LAT(4), .STALL_PCT(15)) u_ddr (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data), .oob
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;


  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic bit embeds(input int c[QMAX], input int p);
    if (lab[c[p]] != ql[p]) return 1'b0;
    for (int j = 0; j < p; j++) if (c[j] == c[p]) return 1'b0;
    for (int r = 0; r < nr; r++)
      if (rd[r] == p && !adj[c[rs[r]]][c[p]]) return 1'b0;
    return 1'b1;
  endfunction

  // software reference: iterative backtracking over matching positions
  function automatic int ref_count();
    int c[QMAX];
    int p, n;
    n = 0;
    p = 0;
    c[0] = -1;
    while (p >= 0) begin
      c[p]++;
      if (c[p] >= NV) begin
        p--;
      end else if (embeds(c, p)) begin
        if (p == qn - 1) n++;
        else begin
          p++;
          c[p] = -1;
        end
      end
    end
    return n;
  endfunction

  function automatic int ref_kept();
    int n = 0;
    for (int r = 0; r < nr; r++)
      for (int x = 0; x < NV; x++)
        for (int y = 0; y < NV; y++)
          if (adj[x][y] && lab[x] == ql[rs[r]] && lab[y] == ql[rd[r]]) n++;
    return n;
  endfunction

  task automatic make_graph();
    int n, a, b;
    for (int i = 0; i < NV; i++) begin
      lab[i] = $urandom_range(NLAB - 1);
      for (int j = 0; j < NV; j++) adj[i][j] = 1'b0;
      u_ddr.mem[LABEL_BASE + i] = word_t'(lab[i]);
    end
    n = 0;
    while (n < NE) begin
      a = $urandom_range(NV - 1);
      b = $urandom_range(NV - 1);
      if (a != b && !adj[a][b]) begin
        adj[a][b] = 1'b1;
        adj[b][a] = 1'b1;
        u_ddr.mem[EDGE_BASE + n] = {32'(a), 32'(b)};
        n++;
      end
    end
  endtask

  task automatic set_query(input int id);
    for (int i = 0; i < QMAX; i++) ql[i] = 0;
    unique case (id)
      0: begin // triangle
        qn = 3; ql[0] = 0; ql[1] = 1; ql[2] = 2;
        nr = 3; rs[0] = 0; rd[0] = 1; rs[1] = 0; rd[1] = 2; rs[2] = 1; rd[2] = 2;
      end
      1: begin // 4-cycle, labels repeat
        qn = 4; ql[0] = 0; ql[1] = 1; ql[2] = 0; ql[3] = 1;
        nr = 4; rs[0] = 0; rd[0] = 1; rs[1] = 1; rd[1] = 2; rs[2] = 0; rd[2] = 3;
        rs[3] = 2; rd[3] = 3;
      end
      3: begin // house: 4-cycle 0-1-2-3 with roof vertex 4 on 0 and 1
        qn = 5; ql[0] = 0; ql[1] = 1; ql[2] = 2; ql[3] = 3; ql[4] = 4;
        nr = 6; rs[0] = 0; rd[0] = 1; rs[1] = 1; rd[1] = 2; rs[2] = 2; rd[2] = 3;
        rs[3] = 0; rd[3] = 3; rs[4] = 0; rd[4] = 4; rs[5] = 1; rd[5] = 4;
      end
      4: begin // 8-vertex path 0-1-...-7 with chords 0-2 and 4-6, labels repeat
        qn = 8; ql[0] = 0; ql[1] = 1; ql[2] = 2; ql[3] = 3; ql[4] = 4;
        ql[5] = 0; ql[6] = 1; ql[7] = 2;
        nr = 9;
        for (int r = 0; r < 7; r++) begin
          rs[r] = r;
          rd[r] = r + 1;
        end
        rs[7] = 0; rd[7] = 2; rs[8] = 4; rd[8] = 6;
      end
      5: begin // 4-clique with a repeated label: every position closes on all earlier ones
        qn = 4; ql[0] = 0; ql[1] = 1; ql[2] = 2; ql[3] = 0;
        nr = 6; rs[0] = 0; rd[0] = 1; rs[1] = 0; rd[1] = 2; rs[2] = 1; rd[2] = 2;
        rs[3] = 0; rd[3] = 3; rs[4] = 1; rd[4] = 3; rs[5] = 2; rd[5] = 3;
      end
      default: begin // diamond: 4-cycle plus chord 1-3, position 3 has 3 back edges
        qn = 4; ql[0] = 1; ql[1] = 0; ql[2] = 2; ql[3] = 0;
        nr = 5; rs[0] = 0; rd[0] = 1; rs[1] = 0; rd[1] = 2; rs[2] = 0; rd[2] = 3;
        rs[3] = 1; rd[3] = 3; rs[4] = 2; rd[4] = 3;
      end
    endcase
    cfg = '0;
    cfg.nq   = QCNT_W'(qn);
    cfg.nrel = (REL_W+1)'(nr);
    cfg.h1   = HBITS_W'(H1);
    cfg.h2   = HBITS_W'(H2);
    for (int i = 0; i < QMAX; i++) cfg.qlabel[i] = label_t'(ql[i]);
    for (int r = 0; r < nr; r++) begin
      cfg.rel_src[r] = QPOS_W'(rs[r]);
      cfg.rel_dst[r] = QPOS_W'(rd[r]);
    end
  endtask

  // random back-pressure on the match output; checks every match
  always @(posedge clk) begin
    match_ready <= ($urandom_range(3) != 0);
    if (busy && match_valid && !match_ready) t_bp++;
    if (busy && match_valid && match_ready) begin
      int c[QMAX];
      longint key;
      bit ok;
      ok  = (int'(match_pm.depth) == qn);
      key = 0;
      for (int p = 0; p < QMAX; p++) c[p] = 0;
      for (int p = 0; p < qn; p++) begin
        c[p] = int'(match_pm.v[p]);
        if (c[p] >= NV) ok = 1'b0;
      end
      if (ok) for (int p = 0; p < qn; p++) if (!embeds(c, p)) ok = 1'b0;
      for (int p = qn - 1; p >= 0; p--) key = key * NV + longint'(c[p]);
      if (ok && seen.exists(key)) ok = 1'b0;
      seen[key] = 1'b1;
      if (!ok) hw_bad++;
    end
  end

  task automatic run_query(input int id);
    int exp_n, exp_kept, ncell;
    longint t0, t_pre;
    set_query(id);
    seen.delete();
    hw_bad = 0;
    exp_n    = ref_count();
    exp_kept = ref_kept();
    ncell    = nr << (H1 + H2);
    t0 = cycles;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    check(busy && !pre_done, $sformatf("q%0d did not start", id));
    wait (pre_done);
    t_pre = cycles - t0;
    check(n_kept == 32'(exp_kept), $sformatf("q%0d kept %0d expected %0d", id, n_kept, exp_kept));
    check(u_ddr.mem[TABLE_BASE + ncell] == word_t'(exp_kept),
          $sformatf("q%0d table sentinel %0d expected %0d", id,
                    u_ddr.mem[TABLE_BASE + ncell], exp_kept));
    wait (done);
    @(posedge clk);
    check(n_matches == 32'(exp_n),
          $sformatf("q%0d matches %0d expected %0d", id, n_matches, exp_n));
    check(hw_bad == 0, $sformatf("q%0d %0d bad or repeated matches", id, hw_bad));
    check(oob == 0, "memory access out of range");
    $display("q%0d: %0d matches (ref %0d), kept %0d, roots %0d, pre %0d cycles, total %0d cycles",
             id, n_matches, exp_n, n_kept, n_roots, t_pre, cycles - t0);
    $display("     bloom hit/miss %0d/%0d table hit/miss %0d/%0d scanned %0d bloom_drop %0d hash_rej %0d inj_rej %0d spill %0d refill %0d",
             n_hit_bloom, n_miss_bloom, n_hit_table, n_miss_table, n_scanned, n_bloom_drop,
             n_hash_reject, n_inj_reject, n_spilled, n_refilled);
    t_spill   += n_spilled;
    t_refill  += n_refilled;
    t_hit     += n_hit_bloom + n_hit_table;
    t_miss    += n_miss_bloom + n_miss_table;
    t_bloom   += n_bloom_drop;
    t_hash    += n_hash_reject;
    t_inj     += n_inj_reject;
    t_matches += n_matches;
    t_roots   += n_roots;
  endtask

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
    start = 1'b0;
    rst_n = 1'b0;
    match_ready = 1'b1;
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
    map.spill_cap   = addr_t'(SPILL_CAP);
    set_query(0);
    repeat (3) @(posedge clk);
    make_graph();
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int q = QFIRST; q <= QLAST; q++) run_query(q);
    check(t_matches > 0, "no query had a match");
    check(t_roots > 0, "no root candidates");
    check(t_hit > 0, "cache never hit");
    check(t_miss > 0, "cache never missed");
    check(t_bloom > 0, "Bloom filter never rejected a candidate");
    check(t_hash > 0, "hash-collision check never rejected a candidate");
    check(t_inj > 0, "injectivity check never rejected a candidate");
    check(t_bp > 0, "match output never back-pressured");
    if (EXPECT_SPILL) begin
      check(t_spill > 0, "FIFO never spilled");
      check(t_refill == t_spill, "FIFO refills differ from spills");
    end
    $display("mechanisms: spill %0d refill %0d hit %0d miss %0d bloom %0d hash %0d inj %0d backpressure %0d",
             t_spill, t_refill, t_hit, t_miss, t_bloom, t_hash, t_inj, t_bp);
    finished = 1'b1;
  end

endmodule
