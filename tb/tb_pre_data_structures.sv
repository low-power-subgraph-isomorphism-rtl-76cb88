// Unit test of pre_data_structures: with reference per-cell counts preloaded,
// the prefix pass must write the reference offsets (and the total after the
// last cell) into the table and the cursor table; feeding the reference kept
// edges (with random gaps) must then produce exactly the reference adjacency
// array, final cursors and Bloom filters.
//
// How: a 10-unit clock; the memory image and expected results come from
// sgi_ref_pkg; a clocked source process feeds the kept edges; DRAM model with
// latency 3 and 15 % stalls. Interface: none (top level). Timing: a watchdog
// ends the run as failed after 500000 cycles. Source: counting-sort placement
// and Bloom filters per row follow the method; the exact memory layout checked
// is this design's.
module tb_pre_data_structures;
  import sgi_pkg::*;
  import sgi_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, prefix_done, fc_done = 1'b0, done;
  query_cfg_t cfg;
  mem_map_t map;
  logic t_valid = 1'b0, t_ready;
  rel_t t_rel = '0;
  vid_t t_x = '0, t_y = '0;
  logic m_req_valid, m_req_ready, m_rsp_valid;
  mem_req_t m_req;
  word_t m_rsp_data;
  int oob;
  int checks = 0, failures = 0;

  pre_data_structures dut (.*);
  ddr_model #(.WORDS(32768), .LAT(3), .STALL_PCT(15)) u_ddr (
    .clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .rsp_valid(m_rsp_valid), .rsp_data(m_rsp_data), .oob
  );

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
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

  int acc = 0;
  int nfed = 0;
  bit feeding = 1'b0;

  // kept-edge source with random gaps
  always @(posedge clk) if (feeding && (!t_valid || t_ready)) begin
    if (nfed < kr.size() && $urandom_range(2) != 0) begin
      t_valid <= 1'b1;
      t_rel   <= rel_t'(kr[nfed]);
      t_x     <= vid_t'(kx[nfed]);
      t_y     <= vid_t'(ky[nfed]);
      nfed    <= nfed + 1;
    end else t_valid <= 1'b0;
  end
  always @(posedge clk) if (t_valid && t_ready) acc++;
  initial begin
    int cnt [int];
    int ncell;
    #1;  // after the memory model has zeroed itself
    gen_graph(40, 120, 3);
    triangle(2, 2);
    put_graph();
    build();
    filter(cnt);
    ncell = nr << (h1 + h2);
    for (int c = 0; c < ncell; c++) u_ddr.mem[TABLE_BASE + c] = word_t'(cnt[c]);
    cfg = sgi_ref_pkg::cfg();
    map = sgi_ref_pkg::map();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    wait (prefix_done);
    @(posedge clk);
    for (int c = 0; c <= ncell; c++)
      check(u_ddr.mem[TABLE_BASE + c] == img[TABLE_BASE + c],
            $sformatf("offset %0d is %0d expected %0d", c, u_ddr.mem[TABLE_BASE + c],
                      img[TABLE_BASE + c]));
    for (int c = 0; c < ncell; c++)
      check(u_ddr.mem[CUR_BASE + c] == img[TABLE_BASE + c], "initial cursor");
    feeding = 1'b1;
    wait (nfed == kr.size() && !t_valid);
    fc_done <= 1'b1;
    wait (done);
    @(posedge clk);
    foreach (img[a])
      if (a >= TABLE_BASE)
        check(u_ddr.mem[a] == img[a], $sformatf("word %0d is %h expected %h", a, u_ddr.mem[a], img[a]));
    check(acc == kr.size(), $sformatf("accepted %0d edges", acc));
    $display("kept %0d, words compared %0d", kr.size(), checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
