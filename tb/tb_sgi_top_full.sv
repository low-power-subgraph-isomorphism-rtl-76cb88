// End-to-end test of sgi_top with every parameter at its default: the same
// graph and queries as tb_sgi_top, with the full-size caches and on-chip FIFO
// (which holds every partial match of these queries, so no spill is expected).
//
// How, interface and timing: instantiates the accelerator with no parameter
// overrides next to sgi_tb_driver, which supplies the 10-unit clock, reset,
// DRAM model, stimulus and checks; this module owns a 3000000-cycle watchdog
// and prints the TB_RESULT line when the driver is done. Source: the
// defaults are those of sgi_top (cache and FIFO sizes are this design's).
module tb_sgi_top_full;
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
    repeat (3000000) @(posedge clk);
    $display("watchdog expired after 3000000 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (finished) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sgi_top u_dut (.*);

  sgi_tb_driver #(.EXPECT_SPILL(1'b0)) u_drv (.*);
endmodule
