// Root candidate generator (first line of the enumeration loop).
//
// Reads the label of every data vertex 0..nv-1 from off-chip memory and, for
// each vertex whose label equals that of the first query vertex in matching
// order, emits a one-vertex partial match on a valid/ready stream towards the
// partial-result FIFO. The method only says that the candidates of the root
// are taken first; selecting them by label alone, in vertex order, is this
// design's choice (it keeps consecutive partial matches close in id, which
// helps cache reuse).
//
// Interface: start pulse, done level, count of roots emitted. Timing: one
// label read per vertex plus one handshake per root.
module root_gen
  import sgi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  label_t     root_label,
  input  vid_t       nv,
  input  addr_t      label_base,
  output logic       done,
  output logic       out_valid,
  input  logic       out_ready,
  output pmatch_t    out_pm,
  output logic [31:0] roots,
  output logic       m_req_valid,
  input  logic       m_req_ready,
  output mem_req_t   m_req,
  input  logic       m_rsp_valid,
  input  word_t      m_rsp_data
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_EMIT, S_DONE} state_t;
  state_t state;
  logic   pend;
  vid_t   v;

  always_comb begin
    m_req_valid = (state == S_RD) && !pend;
    m_req.we    = 1'b0;
    m_req.addr  = label_base + addr_t'(v);
    m_req.wdata = '0;
    out_valid   = (state == S_EMIT);
    out_pm      = '0;
    out_pm.depth = QCNT_W'(1);
    out_pm.v[0]  = v;
  end
  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pend  <= 1'b0;
      v     <= '0;
      roots <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          v     <= '0;
          roots <= '0;
          state <= (nv != 0) ? S_RD : S_DONE;
        end
        S_RD: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend <= 1'b0;
            if (m_rsp_data[LABEL_W-1:0] == root_label) state <= S_EMIT;
            else if (v + 1'b1 == nv) state <= S_DONE;
            else v <= v + 1'b1;
          end
        end
        S_EMIT: if (out_ready) begin
          roots <= roots + 1;
          if (v + 1'b1 == nv) state <= S_DONE;
          else begin
            v     <= v + 1'b1;
            state <= S_RD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
