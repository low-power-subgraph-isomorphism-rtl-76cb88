// End-to-end test of sgi_top on larger queries: a 50-vertex, 400-edge data
// graph with 5 random labels (the label count used for the evaluation graphs
// of the method), a 5-vertex "house" query, an 8-vertex query (the largest
// query size the method evaluates) and a 4-clique, with h1 = 3 and h2 = 2.
// The on-chip FIFO is cut to 16 entries with threshold 12 and the caches to
// 16 lines of 4 words so that the partial results spill to off-chip memory
// and the caches both hit and miss; the off-chip ring holds 600 partial
// matches, fewer than the 1300 or so spilled over the queries, so its
// pointers wrap. Stimulus and checks are those of sgi_tb_driver: every match
// must be a real, injective embedding, none may repeat, and the count must
// equal a software backtracking search.
//
// How, interface and timing: the accelerator with reduced parameters next to
// sgi_tb_driver, which supplies the 10-unit clock, reset, DRAM model and
// checks; this module owns a 6000000-cycle watchdog and prints the TB_RESULT
// line when the driver is done. Source: the label count and the largest query
// size follow the method's evaluation; graph size and query shapes are this
// test's.
module tb_sgi_top_large;
  import sgi_pkg::*;

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

  int checks, failures;
  logic finished;

  initial begin
    repeat (6000000) @(posedge clk);
    $display("watchdog expired after 6000000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (finished) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sgi_top #(
    .CACHE_LINE_WORDS(4),
    .CACHE_LINES(16),
    .FIFO_DEPTH(16),
    .FIFO_THRESH(12)
  ) u_dut (.*);

  sgi_tb_driver #(
    .NV(50), .NE(400), .NLAB(5), .H1(3), .H2(2),
    .EXPECT_SPILL(1'b1), .QFIRST(3), .QLAST(5), .SPILL_CAP(600)
  ) u_drv (.*);
endmodule
