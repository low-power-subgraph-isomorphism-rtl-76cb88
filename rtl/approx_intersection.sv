// Approximate intersection unit of the enumeration pipeline.
//
// For a partial match with `depth` vertices mapped, the next query vertex is
// the one at matching position `depth`. Its candidates are the common
// neighbours, with the right label, of the already-mapped vertices adjacent to
// it in the query, i.e. the intersection over every relation r with
// rel_dst[r] = depth of the neighbour sets N(v_src). For each such relation the
// unit reads, through its cache, the Bloom filter of the hash-table row of
// v_src, ANDs all of them into the approximate intersection B, and keeps the
// relation whose filter holds the fewest elements (popcount / k; first one on
// a tie). The token {partial match, B, smallest relation} goes on to
// propose_filter. This is the method's scheme; visiting the relations one at a
// time is this design's choice.
//
// Interface: valid/ready stream in and out, one cache read port, busy level.
// Timing: one cycle per relation plus one cache access per backward relation.
module approx_intersection
  import sgi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  query_cfg_t cfg,
  input  addr_t      bloom_base,
  input  logic       in_valid,
  output logic       in_ready,
  input  pmatch_t    in_pm,
  output logic       out_valid,
  input  logic       out_ready,
  output pmatch_t    out_pm,
  output bloom_t     out_b,
  output rel_t       out_rm,
  output logic       busy,
  output logic       c_req_valid,
  input  logic       c_req_ready,
  output addr_t      c_req_addr,
  input  logic       c_rsp_valid,
  input  word_t      c_rsp_data
);
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_RD, S_OUT} state_t;
  state_t state;

  pmatch_t pm;
  rel_t    r;
  logic    pend;
  bloom_t  b;
  rel_t    rm;
  logic    have_min;
  logic [$clog2(BLOOM_M+1)-1:0] min_card, card;
  logic    unused_member;
  bloom_t  unused_mask;
  vid_t    vsrc;

  bloom_unit u_bloom (
    .v(vsrc), .filt(c_rsp_data[BLOOM_M-1:0]), .mask(unused_mask),
    .member(unused_member), .card(card)
  );

  assign vsrc        = pm.v[cfg.rel_src[r]];
  assign in_ready    = (state == S_IDLE);
  assign c_req_valid = (state == S_RD) && !pend;
  assign c_req_addr  = bloom_base + row_index(r, vsrc, cfg.h1);
  assign out_valid   = (state == S_OUT);
  assign out_pm      = pm;
  assign out_b       = b;
  assign out_rm      = rm;
  assign busy        = (state != S_IDLE);

  wire last_r = ({1'b0, r} + 1'b1 >= cfg.nrel);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pm       <= '0;
      r        <= '0;
      pend     <= 1'b0;
      b        <= '0;
      rm       <= '0;
      have_min <= 1'b0;
      min_card <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          pm       <= in_pm;
          r        <= '0;
          b        <= '1;
          have_min <= 1'b0;
          state    <= S_SCAN;
        end
        S_SCAN: begin
          if ({1'b0, cfg.rel_dst[r]} == in_depth_pos(pm.depth)) state <= S_RD;
          else if (last_r) state <= S_OUT;
          else r <= r + 1'b1;
        end
        S_RD: begin
          if (!pend && c_req_ready) pend <= 1'b1;
          if (pend && c_rsp_valid) begin
            pend <= 1'b0;
            b    <= b & c_rsp_data[BLOOM_M-1:0];
            if (!have_min || card < min_card) begin
              have_min <= 1'b1;
              min_card <= card;
              rm       <= r;
            end
            if (last_r) state <= S_OUT;
            else begin
              r     <= r + 1'b1;
              state <= S_SCAN;
            end
          end
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  function automatic logic [QPOS_W:0] in_depth_pos(input logic [QCNT_W-1:0] d);
    return (QPOS_W+1)'(d);
  endfunction

endmodule
