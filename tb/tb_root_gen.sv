// Unit test of root_gen: over a random labelling of 60 vertices it must emit,
// in vertex order and under random back-pressure, exactly the vertices whose
// label is the root label, each as a one-vertex partial match.
//
// How: a 10-unit clock; a clocked sink with random ready compares each root
// with the next expected vertex; DRAM model with latency 3 and 15 % stalls.
// Interface: none (top level). Timing: a watchdog ends the run as failed after
// 100000 cycles. Source: root candidates come first in the method; choosing
// them by label in vertex order is this design's.
module tb_root_gen;
  import sgi_pkg::*;
  import sgi_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, done, out_valid, out_ready = 1'b0;
  label_t root_label = label_t'(1);
  vid_t nv;
  addr_t label_base = addr_t'(LABEL_BASE);
  pmatch_t out_pm;
  logic [31:0] roots;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t m_req;
  word_t m_rsp_data;
  int oob;
  int checks = 0, failures = 0;
  int exp_v [$];

  root_gen dut (.*);
  ddr_model #(.WORDS(4096), .LAT(3), .STALL_PCT(15)) u_ddr (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data), .oob
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    out_ready <= ($urandom_range(3) != 0);
    if (out_valid && out_ready) begin
      checks++;
      if (exp_v.size() == 0 || out_pm.depth != QCNT_W'(1) || int'(out_pm.v[0]) != exp_v[0]) begin
        failures++;
        $display("FAIL: root %0d depth %0d", out_pm.v[0], out_pm.depth);
      end
      if (exp_v.size() != 0) void'(exp_v.pop_front());
    end
  end

  initial begin
    int n;
    #1;
    gen_graph(60, 10, 3);
    put_graph();
    foreach (img[a]) u_ddr.mem[a] = img[a];
    nv = vid_t'(60);
    n = 0;
    for (int i = 0; i < 60; i++) if (lab[i] == 1) begin
      exp_v.push_back(i);
      n++;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    wait (done);
    @(posedge clk);
    checks++;
    if (exp_v.size() != 0 || int'(roots) != n) begin
      failures++;
      $display("FAIL: %0d roots, expected %0d", roots, n);
    end
    $display("roots %0d", roots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
