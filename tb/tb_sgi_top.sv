// End-to-end test of sgi_top at reduced sizes: an 8-entry on-chip FIFO so the
// partial-result FIFO spills to off-chip memory and refills, and small caches
// so they both hit and miss. sgi_tb_driver generates the graph, runs three
// queries and checks every match against a software reference.
//
// How, interface and timing: the top-level module only instantiates the
// accelerator with reduced parameters and sgi_tb_driver, which supplies the
// 10-unit clock, reset, DRAM model, stimulus and checks; this module owns a
// 3000000-cycle watchdog and prints the TB_RESULT line when the driver is done. Source: the structure under test follows the method; the reduced
// sizes are chosen only to force the corner cases.
module tb_sgi_top;
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

  sgi_top #(.CACHE_LINE_WORDS(4), .CACHE_LINES(16), .FIFO_DEPTH(8), .FIFO_THRESH(6)) u_dut (.*);

  sgi_tb_driver #(.EXPECT_SPILL(1'b1)) u_drv (.*);
endmodule
