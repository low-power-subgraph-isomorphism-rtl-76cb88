// Unit test of mem_arbiter: three clients issue random reads and writes to
// their own address ranges through the arbiter into a DRAM model with random
// stalls. Each read must return the client's last write (a shadow copy is
// kept per client), each client must be served, and no request may be issued
// while a read is outstanding.
//
// How: a 10-unit clock; each client is a clocked process with a random
// request pattern, and a monitor flags a second request while a read is
// outstanding; DRAM model with latency 3 and 30 % stalls. Interface: none
// (top level). Timing: a watchdog ends the run as failed after 200000 cycles.
// Source: the sharing policy under test is this design's own (the method
// does not describe how units share the memory).
module tb_mem_arbiter;
  import sgi_pkg::*;

  localparam int N = 3;
  localparam int OPS = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     [N-1:0] c_req_valid, c_req_ready, c_rsp_valid;
  mem_req_t [N-1:0] c_req;
  word_t            c_rsp_data;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t m_req;
  word_t m_rsp_data;
  int oob;
  int checks = 0, failures = 0;
  int served [N];
  int finished = 0;
  int outstanding = 0;

  mem_arbiter #(.N(N)) dut (.*);
  ddr_model #(.WORDS(4096), .LAT(3), .STALL_PCT(30)) u_ddr (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data), .oob
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // protocol: a single read in flight
  always @(posedge clk) if (rst_n) begin
    if (m_req_valid && m_req_ready) begin
      checks++;
      if (outstanding != 0) begin
        failures++;
        $display("FAIL: request issued with a read outstanding");
      end
      if (!m_req.we) outstanding <= outstanding + 1;
    end
    if (m_rsp_valid) outstanding <= outstanding - 1;
  end

  for (genvar g = 0; g < N; g++) begin : g_cli
    word_t shadow [16];
    initial begin
      int a;
      bit wr;
      c_req_valid[g] = 1'b0;
      c_req[g] = '0;
      for (int i = 0; i < 16; i++) shadow[i] = '0;
      wait (rst_n);
      // first write every word so reads have a known value
      for (int op = 0; op < OPS + 16; op++) begin
        a  = (op < 16) ? op : $urandom_range(15);
        wr = (op < 16) || ($urandom_range(1) == 1);
        @(posedge clk);
        c_req_valid[g]  <= 1'b1;
        c_req[g].we     <= wr;
        c_req[g].addr   <= addr_t'(g * 256 + a);
        c_req[g].wdata  <= {32'(g), 32'($urandom)};
        @(posedge clk);
        while (!c_req_ready[g]) @(posedge clk);
        c_req_valid[g] <= 1'b0;
        served[g]++;
        if (wr) shadow[a] = c_req[g].wdata;
        else begin
          while (!c_rsp_valid[g]) @(posedge clk);
          checks++;
          if (c_rsp_data != shadow[a]) begin
            failures++;
            $display("FAIL: client %0d addr %0d read %h expected %h", g, a, c_rsp_data, shadow[a]);
          end
        end
      end
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished == N);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (served[i] != OPS + 16) begin
        failures++;
        $display("FAIL: client %0d served %0d", i, served[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
