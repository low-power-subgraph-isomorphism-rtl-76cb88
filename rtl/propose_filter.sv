// Propose-and-filter unit of the enumeration pipeline.
//
// Takes {partial match, approximate intersection B, smallest relation rm} and
// reads the smallest set: the hash-table row of v = the vertex mapped at
// rel_src[rm]. The row starts at the offset stored in cell [rm][h1(v)][0] and
// ends where the next row starts (the cell 2^h2 words further on; the table
// ends with the total as sentinel). Every adjacency entry {x, y} of the row
// with x = v (dropping entries of other vertices sharing the row) and whose y
// passes the Bloom membership test against B is emitted as a candidate
// extension {partial match, rm, y}. Reading the smallest set and filtering it
// with B follows the method; the exact x = v test is how this design removes
// row collisions early, since its adjacency entries hold both ends of an edge.
// The unit reads memory directly, without a cache, as in the method's block
// diagram.
//
// Interface: valid/ready stream in and out, one memory port, busy level and
// counters of entries read and entries dropped by the Bloom test (zeroed by
// clr).
// Timing: 2 offset reads, then one read per row entry plus one handshake per
// candidate.
module propose_filter
  import sgi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  query_cfg_t cfg,
  input  addr_t      table_base,
  input  addr_t      adj_base,
  input  logic       in_valid,
  output logic       in_ready,
  input  pmatch_t    in_pm,
  input  bloom_t     in_b,
  input  rel_t       in_rm,
  output logic       out_valid,
  input  logic       out_ready,
  output pmatch_t    out_pm,
  output rel_t       out_rm,
  output vid_t       out_w,
  output logic       busy,
  output logic [31:0] scanned,
  output logic [31:0] bloom_drop,
  output logic       m_req_valid,
  input  logic       m_req_ready,
  output mem_req_t   m_req,
  input  logic       m_rsp_valid,
  input  word_t      m_rsp_data
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_END, S_ADJ, S_OUT} state_t;
  state_t state;

  pmatch_t pm;
  bloom_t  b;
  rel_t    rm;
  logic    pend;
  addr_t   a, a_end;
  vid_t    w;
  vid_t    v;
  addr_t   row_cell;
  vid_t    ex, ey;
  logic    member;
  bloom_t  unused_mask;
  logic [$clog2(BLOOM_M+1)-1:0] unused_card;

  assign v        = pm.v[cfg.rel_src[rm]];
  assign row_cell = table_base + ((addr_t'(rm) << (cfg.h1 + cfg.h2))
                                  | (addr_t'(hbits(v, cfg.h1)) << cfg.h2));
  assign ex = m_rsp_data[63:32];
  assign ey = m_rsp_data[31:0];

  bloom_unit u_bloom (
    .v(ey), .filt(b), .mask(unused_mask), .member(member), .card(unused_card)
  );

  always_comb begin
    m_req_valid = 1'b0;
    m_req.we    = 1'b0;
    m_req.wdata = '0;
    m_req.addr  = '0;
    unique case (state)
      S_START: begin m_req_valid = !pend; m_req.addr = row_cell; end
      S_END:   begin m_req_valid = !pend; m_req.addr = row_cell + (addr_t'(1) << cfg.h2); end
      S_ADJ:   begin m_req_valid = !pend; m_req.addr = adj_base + a; end
      default: ;
    endcase
  end

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_OUT);
  assign out_pm    = pm;
  assign out_rm    = rm;
  assign out_w     = w;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      pm         <= '0;
      b          <= '0;
      rm         <= '0;
      pend       <= 1'b0;
      a          <= '0;
      a_end      <= '0;
      w          <= '0;
      scanned    <= '0;
      bloom_drop <= '0;
    end else begin
      if (clr) begin
        scanned    <= '0;
        bloom_drop <= '0;
      end
      unique case (state)
        S_IDLE: if (in_valid) begin
          pm    <= in_pm;
          b     <= in_b;
          rm    <= in_rm;
          state <= S_START;
        end
        S_START: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend  <= 1'b0;
            a     <= addr_t'(m_rsp_data);
            state <= S_END;
          end
        end
        S_END: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend  <= 1'b0;
            a_end <= addr_t'(m_rsp_data);
            state <= (addr_t'(m_rsp_data) == a) ? S_IDLE : S_ADJ;
          end
        end
        S_ADJ: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend    <= 1'b0;
            scanned <= scanned + 1;
            if (ex == v && !member) bloom_drop <= bloom_drop + 1;
            if (ex == v && member) begin
              w     <= ey;
              state <= S_OUT;
            end else if (a + 1'b1 == a_end) state <= S_IDLE;
            else a <= a + 1'b1;
          end
        end
        S_OUT: if (out_ready) begin
          if (a + 1'b1 == a_end) state <= S_IDLE;
          else begin
            a     <= a + 1'b1;
            state <= S_ADJ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
