// Unit test of dyn_fifo (8 entries on chip, threshold 6) against a queue
// model. Below the threshold nothing may go off chip; a burst of 100 pushes
// must spill and later refill; random interleaved pushes and pops must keep
// first-in first-out order throughout; at the end every spilled entry must
// have been refilled and the FIFO must report empty.
//
// How: a 10-unit clock; pushes and pops are driven from clocked processes and
// every popped entry is compared with the head of the queue model; the spill
// area lives in a DRAM model (latency 4, 20 % random stalls). Interface: none
// (top level). Timing: a watchdog ends the run as failed after 300000 cycles.
// Source: on-chip use below the threshold, spilling above it with a full
// on-chip buffer, and reverting below it follow the method; the sizes are
// this test's.
module tb_dyn_fifo;
  import sgi_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clr = 1'b0;
  addr_t spill_base = addr_t'(1024), spill_cap = addr_t'(200);
  logic push_valid = 1'b0, push_ready, pop_valid, pop_ready = 1'b0, empty;
  pmatch_t push_pm = '0, pop_pm;
  logic [31:0] spilled, refilled;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t m_req;
  word_t m_rsp_data;
  int oob;
  int checks = 0, failures = 0;
  pmatch_t q [$];
  int serial = 0;
  int npush = 0, npop = 0;
  int push_prob = 50, pop_prob = 50;

  dyn_fifo #(.DEPTH(8), .THRESH(6)) dut (.*);
  ddr_model #(.WORDS(4096), .LAT(4), .STALL_PCT(20)) u_ddr (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data), .oob
  );

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pmatch_t mk(input int n);
    pmatch_t p;
    p.depth = QCNT_W'(n % 8 + 1);
    for (int j = 0; j < QMAX; j++) p.v[j] = vid_t'(n * 16 + j + $urandom_range(3) * 65536);
    return p;
  endfunction

  // driver and checker in one clocked process
  always @(posedge clk) if (rst_n) begin
    if (push_valid && push_ready) begin
      q.push_back(push_pm);
      npush++;
    end
    if (pop_valid && pop_ready) begin
      checks++;
      if (q.size() == 0 || pop_pm != q[0]) begin
        failures++;
        $display("FAIL: pop %0d out of order", npop);
      end
      if (q.size() != 0) void'(q.pop_front());
      npop++;
    end
    if (!push_valid || push_ready) begin
      if ($urandom_range(99) < push_prob) begin
        push_valid <= 1'b1;
        push_pm    <= mk(serial);
        serial     <= serial + 1;
      end else push_valid <= 1'b0;
    end
    pop_ready <= ($urandom_range(99) < pop_prob);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic drain();
    push_prob = 0;
    pop_prob  = 100;
    repeat (5) @(posedge clk);
    while (!empty || push_valid) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: a few entries, well below the threshold
    push_prob = 0; pop_prob = 0;
    repeat (2) @(posedge clk);
    push_prob = 100;
    wait (npush >= 4);
    push_prob = 0;
    drain();
    check(spilled == 0, "spill below threshold");
    check(npop == npush && q.size() == 0, "phase 1 count");
    // phase 2: burst
    push_prob = 100; pop_prob = 0;
    wait (npush >= 104);
    push_prob = 0;
    repeat (20) @(posedge clk);
    check(spilled > 0, "burst did not spill");
    drain();
    check(refilled == spilled, "phase 2 refills");
    // phase 3: random mix
    push_prob = 55; pop_prob = 45;
    repeat (20000) @(posedge clk);
    drain();
    check(npop == npush, $sformatf("pushed %0d popped %0d", npush, npop));
    check(refilled == spilled, "all spilled entries refilled");
    check(empty, "FIFO not empty at end");
    check(oob == 0, "spill outside memory");
    $display("pushed %0d spilled %0d refilled %0d", npush, spilled, refilled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
