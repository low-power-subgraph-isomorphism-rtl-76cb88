// Subgraph-isomorphism accelerator for small FPGAs: top level.
//
// Finds every embedding of a small labelled query graph in a large labelled
// data graph held in off-chip memory, in two phases that both run in hardware.
//
// Preprocessing turns the edge list into one two-level hash structure per
// query edge ("relation"): pre_filter_count keeps the edges whose end labels
// fit the relation and counts them per hash-table cell [h1(x)][h2(y)];
// pre_data_structures turns the counts into offsets, places the edges in
// partitioned adjacency lists (counting sort) and builds one Bloom filter per
// hash-table row.
//
// Enumeration extends partial matches one query vertex at a time in
// breadth-first order: root_gen seeds the partial-result FIFO (dyn_fifo) with
// every vertex carrying the root's label; approx_intersection ANDs the Bloom
// filters of the sets to intersect and picks the smallest; propose_filter
// reads that set and keeps what passes the filter; valid_extension checks the
// rest exactly against the other relations' hash tables and either reports a
// complete match or pushes the longer partial match back into the FIFO. Two
// read-only caches sit in front of the Bloom filters and the hash tables; the
// FIFO spills to off-chip memory when it grows past its threshold. One
// round-robin arbiter shares the memory port. The split into these units is
// the method's; the single memory port, the one-token-at-a-time units and the
// order of the arbiter's clients are this design's choices.
//
// Interface: `start` pulse with cfg (query in matching order, h1/h2) and map
// (memory layout) held stable until `done`; complete matches leave on a
// valid/ready stream; a memory port as in mem_arbiter (a read's response must
// come at least one cycle after its request is accepted). Counters report
// what each mechanism did.
module sgi_top
  import sgi_pkg::*;
#(
  parameter int unsigned CACHE_LINE_WORDS = 8,
  parameter int unsigned CACHE_LINES      = 256,
  parameter int unsigned FIFO_DEPTH       = 1024,
  parameter int unsigned FIFO_THRESH      = FIFO_DEPTH
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  query_cfg_t  cfg,
  input  mem_map_t    map,
  output logic        busy,
  output logic        done,
  output logic        pre_done,
  // complete matches
  output logic        match_valid,
  input  logic        match_ready,
  output pmatch_t     match_pm,
  // off-chip memory
  output logic        m_req_valid,
  input  logic        m_req_ready,
  output mem_req_t    m_req,
  input  logic        m_rsp_valid,
  input  word_t       m_rsp_data,
  // statistics
  output logic [31:0] n_matches,
  output logic [31:0] n_roots,
  output logic [31:0] n_kept,
  output logic [31:0] n_scanned,
  output logic [31:0] n_bloom_drop,
  output logic [31:0] n_hash_reject,
  output logic [31:0] n_inj_reject,
  output logic [31:0] n_spilled,
  output logic [31:0] n_refilled,
  output logic [31:0] n_hit_bloom,
  output logic [31:0] n_miss_bloom,
  output logic [31:0] n_hit_table,
  output logic [31:0] n_miss_table
);
  localparam int unsigned NCLI = 7;
  localparam int unsigned C_FIFO = 0, C_CB = 1, C_PF = 2, C_CA = 3, C_RG = 4,
                          C_FC = 5, C_DS = 6;

  typedef enum logic [2:0] {P_IDLE, P_PRE, P_FLUSH, P_ENUM, P_DONE} phase_t;
  phase_t phase;

  // arbiter
  logic     [NCLI-1:0] c_req_valid, c_req_ready, c_rsp_valid;
  mem_req_t [NCLI-1:0] c_req;
  word_t               c_rsp_data;

  mem_arbiter #(.N(NCLI)) u_arb (
    .clk, .rst_n,
    .c_req_valid, .c_req_ready, .c_req, .c_rsp_valid, .c_rsp_data,
    .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .m_rsp_data
  );

  // ---------------- preprocessing ----------------
  logic fc_start, fc_count_done, fc_done, ds_start, ds_prefix_done, ds_done;
  logic cd_q;
  logic t_valid, t_ready;
  rel_t t_rel;
  vid_t t_x, t_y;

  pre_filter_count u_fc (
    .clk, .rst_n, .start(fc_start), .cfg, .map,
    .count_done(fc_count_done), .go(ds_prefix_done), .done(fc_done),
    .t_valid, .t_ready, .t_rel, .t_x, .t_y,
    .m_req_valid(c_req_valid[C_FC]), .m_req_ready(c_req_ready[C_FC]), .m_req(c_req[C_FC]),
    .m_rsp_valid(c_rsp_valid[C_FC]), .m_rsp_data(c_rsp_data),
    .kept(n_kept)
  );

  pre_data_structures u_ds (
    .clk, .rst_n, .start(ds_start), .cfg, .map,
    .prefix_done(ds_prefix_done), .fc_done, .done(ds_done),
    .t_valid, .t_ready, .t_rel, .t_x, .t_y,
    .m_req_valid(c_req_valid[C_DS]), .m_req_ready(c_req_ready[C_DS]), .m_req(c_req[C_DS]),
    .m_rsp_valid(c_rsp_valid[C_DS]), .m_rsp_data(c_rsp_data)
  );

  // ---------------- enumeration ----------------
  logic    flush, rg_start, rg_done;
  logic    rg_valid, rg_ready;
  pmatch_t rg_pm;

  root_gen u_rg (
    .clk, .rst_n, .start(rg_start), .root_label(cfg.qlabel[0]), .nv(map.nv),
    .label_base(map.label_base), .done(rg_done),
    .out_valid(rg_valid), .out_ready(rg_ready), .out_pm(rg_pm), .roots(n_roots),
    .m_req_valid(c_req_valid[C_RG]), .m_req_ready(c_req_ready[C_RG]), .m_req(c_req[C_RG]),
    .m_rsp_valid(c_rsp_valid[C_RG]), .m_rsp_data(c_rsp_data)
  );

  // partial-result FIFO; extended matches have priority over new roots
  logic    f_push_valid, f_push_ready, f_pop_valid, f_pop_ready, f_empty;
  pmatch_t f_push_pm, f_pop_pm;
  logic    ve_pm_valid, ve_pm_ready;
  pmatch_t ve_pm;

  assign f_push_valid = ve_pm_valid || rg_valid;
  assign f_push_pm    = ve_pm_valid ? ve_pm : rg_pm;
  assign ve_pm_ready  = f_push_ready;
  assign rg_ready     = f_push_ready && !ve_pm_valid;

  dyn_fifo #(.DEPTH(FIFO_DEPTH), .THRESH(FIFO_THRESH)) u_fifo (
    .clk, .rst_n, .clr(fc_start), .spill_base(map.spill_base), .spill_cap(map.spill_cap),
    .push_valid(f_push_valid), .push_ready(f_push_ready), .push_pm(f_push_pm),
    .pop_valid(f_pop_valid), .pop_ready(f_pop_ready), .pop_pm(f_pop_pm),
    .empty(f_empty), .spilled(n_spilled), .refilled(n_refilled),
    .m_req_valid(c_req_valid[C_FIFO]), .m_req_ready(c_req_ready[C_FIFO]),
    .m_req(c_req[C_FIFO]), .m_rsp_valid(c_rsp_valid[C_FIFO]), .m_rsp_data(c_rsp_data)
  );

  // approximate intersection with its Bloom filter cache
  logic    ca_req_valid, ca_req_ready, ca_rsp_valid;
  addr_t   ca_req_addr;
  word_t   ca_rsp_data;
  logic    ai_valid, ai_ready, ai_busy;
  pmatch_t ai_pm;
  bloom_t  ai_b;
  rel_t    ai_rm;

  approx_intersection u_ai (
    .clk, .rst_n, .cfg, .bloom_base(map.bloom_base),
    .in_valid(f_pop_valid && phase == P_ENUM), .in_ready(f_pop_ready), .in_pm(f_pop_pm),
    .out_valid(ai_valid), .out_ready(ai_ready), .out_pm(ai_pm), .out_b(ai_b), .out_rm(ai_rm),
    .busy(ai_busy),
    .c_req_valid(ca_req_valid), .c_req_ready(ca_req_ready), .c_req_addr(ca_req_addr),
    .c_rsp_valid(ca_rsp_valid), .c_rsp_data(ca_rsp_data)
  );

  rd_cache #(.LINE_WORDS(CACHE_LINE_WORDS), .LINES(CACHE_LINES)) u_cache_bloom (
    .clk, .rst_n, .flush,
    .req_valid(ca_req_valid), .req_ready(ca_req_ready), .req_addr(ca_req_addr),
    .rsp_valid(ca_rsp_valid), .rsp_data(ca_rsp_data),
    .m_req_valid(c_req_valid[C_CA]), .m_req_ready(c_req_ready[C_CA]), .m_req(c_req[C_CA]),
    .m_rsp_valid(c_rsp_valid[C_CA]), .m_rsp_data(c_rsp_data),
    .hits(n_hit_bloom), .misses(n_miss_bloom)
  );

  // propose and filter
  logic    pf_valid, pf_ready, pf_busy;
  pmatch_t pf_pm;
  rel_t    pf_rm;
  vid_t    pf_w;

  propose_filter u_pf (
    .clk, .rst_n, .clr(fc_start), .cfg, .table_base(map.table_base), .adj_base(map.adj_base),
    .in_valid(ai_valid), .in_ready(ai_ready), .in_pm(ai_pm), .in_b(ai_b), .in_rm(ai_rm),
    .out_valid(pf_valid), .out_ready(pf_ready), .out_pm(pf_pm), .out_rm(pf_rm), .out_w(pf_w),
    .busy(pf_busy), .scanned(n_scanned), .bloom_drop(n_bloom_drop),
    .m_req_valid(c_req_valid[C_PF]), .m_req_ready(c_req_ready[C_PF]), .m_req(c_req[C_PF]),
    .m_rsp_valid(c_rsp_valid[C_PF]), .m_rsp_data(c_rsp_data)
  );

  // valid extension with its hash-table cache
  logic    cb_req_valid, cb_req_ready, cb_rsp_valid;
  addr_t   cb_req_addr;
  word_t   cb_rsp_data;
  logic    ve_busy, ve_match_valid;
  pmatch_t ve_out_pm;

  valid_extension u_ve (
    .clk, .rst_n, .clr(fc_start), .cfg, .table_base(map.table_base), .adj_base(map.adj_base),
    .in_valid(pf_valid), .in_ready(pf_ready), .in_pm(pf_pm), .in_rm(pf_rm), .in_w(pf_w),
    .pm_valid(ve_pm_valid), .pm_ready(ve_pm_ready),
    .match_valid(ve_match_valid), .match_ready(match_ready), .out_pm(ve_out_pm),
    .busy(ve_busy), .hash_reject(n_hash_reject), .inj_reject(n_inj_reject),
    .c_req_valid(cb_req_valid), .c_req_ready(cb_req_ready), .c_req_addr(cb_req_addr),
    .c_rsp_valid(cb_rsp_valid), .c_rsp_data(cb_rsp_data)
  );
  assign ve_pm       = ve_out_pm;
  assign match_valid = ve_match_valid;
  assign match_pm    = ve_out_pm;

  rd_cache #(.LINE_WORDS(CACHE_LINE_WORDS), .LINES(CACHE_LINES)) u_cache_table (
    .clk, .rst_n, .flush,
    .req_valid(cb_req_valid), .req_ready(cb_req_ready), .req_addr(cb_req_addr),
    .rsp_valid(cb_rsp_valid), .rsp_data(cb_rsp_data),
    .m_req_valid(c_req_valid[C_CB]), .m_req_ready(c_req_ready[C_CB]), .m_req(c_req[C_CB]),
    .m_rsp_valid(c_rsp_valid[C_CB]), .m_rsp_data(c_rsp_data),
    .hits(n_hit_table), .misses(n_miss_table)
  );

  // ---------------- phase control ----------------
  assign fc_start = (phase == P_IDLE || phase == P_DONE) && start;
  assign ds_start = fc_count_done && !cd_q;
  assign flush    = (phase == P_FLUSH);
  assign rg_start = (phase == P_FLUSH);
  assign busy     = (phase != P_IDLE) && (phase != P_DONE);
  assign done     = (phase == P_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= P_IDLE;
      cd_q      <= 1'b0;
      pre_done  <= 1'b0;
      n_matches <= '0;
    end else begin
      cd_q <= fc_count_done;
      if (match_valid && match_ready) n_matches <= n_matches + 1;
      unique case (phase)
        P_IDLE, P_DONE: if (start) begin
          pre_done  <= 1'b0;
          n_matches <= '0;
          phase     <= P_PRE;
        end
        P_PRE: if (fc_done && ds_done) begin
          pre_done <= 1'b1;
          phase    <= P_FLUSH;
        end
        P_FLUSH: phase <= P_ENUM;
        P_ENUM: if (rg_done && f_empty && !ai_busy && !pf_busy && !ve_busy) phase <= P_DONE;
        default: phase <= P_IDLE;
      endcase
    end
  end

endmodule
