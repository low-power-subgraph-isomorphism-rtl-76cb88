// Round-robin arbiter that shares the single off-chip memory port among the
// accelerator's units (preprocessing, caches, root generator, FIFO spill).
//
// Each client offers one request at a time with a valid/ready handshake. The
// arbiter forwards the chosen client's request to the memory port in the same
// cycle; the client sees ready when the memory accepts it. A write is finished
// then. For a read the arbiter waits for the memory's response and hands it to
// the owner with a one-cycle c_rsp_valid pulse; no other request is issued
// meanwhile, so responses never need reordering. Priority rotates to the
// client after the last one granted. The source method draws the units'
// connections to the off-chip memory but not how they share it: the
// round-robin policy and one-outstanding-read rule are this design's choice.
module mem_arbiter
  import sgi_pkg::*;
#(
  parameter int unsigned N = 7
) (
  input  logic               clk,
  input  logic               rst_n,
  // clients
  input  logic     [N-1:0]   c_req_valid,
  output logic     [N-1:0]   c_req_ready,
  input  mem_req_t [N-1:0]   c_req,
  output logic     [N-1:0]   c_rsp_valid,
  output word_t              c_rsp_data,
  // memory
  output logic               m_req_valid,
  input  logic               m_req_ready,
  output mem_req_t           m_req,
  input  logic               m_rsp_valid,
  input  word_t              m_rsp_data
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          wait_rsp;
  logic [IW-1:0] owner;
  logic [IW-1:0] last;
  logic [IW-1:0] pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int i = N - 1; i >= 0; i--) begin
      // lowest index after `last` wins: scan in reverse so the first hit stays
      int unsigned idx;
      idx = (int'(last) + 1 + i) % N;
      if (c_req_valid[idx]) begin
        any  = 1'b1;
        pick = IW'(idx);
      end
    end
  end

  always_comb begin
    m_req_valid = any && !wait_rsp;
    m_req       = c_req[pick];
    c_req_ready = '0;
    if (any && !wait_rsp) c_req_ready[pick] = m_req_ready;
    c_rsp_valid = '0;
    if (wait_rsp) c_rsp_valid[owner] = m_rsp_valid;
    c_rsp_data  = m_rsp_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wait_rsp <= 1'b0;
      owner    <= '0;
      last     <= IW'(N - 1);
    end else begin
      if (wait_rsp) begin
        if (m_rsp_valid) wait_rsp <= 1'b0;
      end else if (any && m_req_ready) begin
        last <= pick;
        if (!c_req[pick].we) begin
          wait_rsp <= 1'b1;
          owner    <= pick;
        end
      end
    end
  end

endmodule
