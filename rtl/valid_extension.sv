// Valid-extension unit of the enumeration pipeline.
//
// Takes a candidate {partial match, rm, w} for the query vertex at matching
// position `depth` and turns the approximate intersection into the exact one:
// for every other relation r with rel_dst[r] = depth (rm itself was read
// exactly by propose_filter) it reads, through its cache, the cell
// [r][h1(v)][h2(w)] of r's hash table (v = vertex mapped at rel_src[r]) and its
// end (the next cell's offset), and scans that short segment for the edge
// {v, w}. Because the table maps hash values linearly to addresses, successive
// probes walk memory nearly in order and mostly hit in the cache. A candidate
// also must differ from every vertex already mapped (the match is injective).
// A surviving candidate extends the match: when it completes the query it is
// sent to the match output, otherwise it is pushed back into the partial-result
// FIFO. The probing scheme is the method's; testing injectivity here, and the
// sequential scan of each segment, are this design's choices.
//
// Interface: valid/ready stream in, two valid/ready streams out (partial
// matches, complete matches), one cache read port, busy level and rejection
// counters (zeroed by clr).
// Timing: two cache reads plus one per segment entry for each other relation.
module valid_extension
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
  input  rel_t       in_rm,
  input  vid_t       in_w,
  output logic       pm_valid,
  input  logic       pm_ready,
  output logic       match_valid,
  input  logic       match_ready,
  output pmatch_t    out_pm,
  output logic       busy,
  output logic [31:0] hash_reject,
  output logic [31:0] inj_reject,
  output logic       c_req_valid,
  input  logic       c_req_ready,
  output addr_t      c_req_addr,
  input  logic       c_rsp_valid,
  input  word_t      c_rsp_data
);
  typedef enum logic [2:0] {S_IDLE, S_INJ, S_SCAN, S_ST, S_EN, S_ADJ, S_OUT} state_t;
  state_t state;

  pmatch_t pm;
  rel_t    rm, r;
  vid_t    w, v;
  logic    pend;
  addr_t   a, a_end, cell_a;
  logic    dup;
  logic    last_r;
  logic    complete;

  assign v      = pm.v[cfg.rel_src[r]];
  assign cell_a = table_base + cell_index(r, v, w, cfg.h1, cfg.h2);
  assign last_r = ({1'b0, r} + 1'b1 >= cfg.nrel);

  always_comb begin
    dup = 1'b0;
    for (int j = 0; j < QMAX; j++)
      if (QCNT_W'(j) < pm.depth && pm.v[j] == w) dup = 1'b1;
  end

  always_comb begin
    c_req_valid = !pend && (state inside {S_ST, S_EN, S_ADJ});
    unique case (state)
      S_ST:    c_req_addr = cell_a;
      S_EN:    c_req_addr = cell_a + 1'b1;
      default: c_req_addr = adj_base + a;
    endcase
  end

  always_comb begin
    out_pm = pm;
    for (int j = 0; j < QMAX; j++)
      if (QCNT_W'(j) == pm.depth) out_pm.v[j] = w;
    out_pm.depth = pm.depth + 1'b1;
  end
  assign complete    = (pm.depth + 1'b1 == cfg.nq);
  assign pm_valid    = (state == S_OUT) && !complete;
  assign match_valid = (state == S_OUT) && complete;
  assign in_ready    = (state == S_IDLE);
  assign busy        = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pm          <= '0;
      rm          <= '0;
      r           <= '0;
      w           <= '0;
      pend        <= 1'b0;
      a           <= '0;
      a_end       <= '0;
      hash_reject <= '0;
      inj_reject  <= '0;
    end else begin
      if (clr) begin
        hash_reject <= '0;
        inj_reject  <= '0;
      end
      unique case (state)
        S_IDLE: if (in_valid) begin
          pm    <= in_pm;
          rm    <= in_rm;
          w     <= in_w;
          r     <= '0;
          state <= S_INJ;
        end
        S_INJ: begin
          if (dup) begin
            inj_reject <= inj_reject + 1;
            state      <= S_IDLE;
          end else state <= S_SCAN;
        end
        S_SCAN: begin
          if ({1'b0, cfg.rel_dst[r]} == (QPOS_W+1)'(pm.depth) && r != rm) state <= S_ST;
          else if (last_r) state <= S_OUT;
          else r <= r + 1'b1;
        end
        S_ST: begin
          if (!pend && c_req_ready) pend <= 1'b1;
          if (pend && c_rsp_valid) begin
            pend  <= 1'b0;
            a     <= addr_t'(c_rsp_data);
            state <= S_EN;
          end
        end
        S_EN: begin
          if (!pend && c_req_ready) pend <= 1'b1;
          if (pend && c_rsp_valid) begin
            pend  <= 1'b0;
            a_end <= addr_t'(c_rsp_data);
            if (addr_t'(c_rsp_data) == a) begin
              hash_reject <= hash_reject + 1;
              state       <= S_IDLE;
            end else state <= S_ADJ;
          end
        end
        S_ADJ: begin
          if (!pend && c_req_ready) pend <= 1'b1;
          if (pend && c_rsp_valid) begin
            pend <= 1'b0;
            if (c_rsp_data == {v, w}) begin
              if (last_r) state <= S_OUT;
              else begin
                r     <= r + 1'b1;
                state <= S_SCAN;
              end
            end else if (a + 1'b1 == a_end) begin
              hash_reject <= hash_reject + 1;
              state       <= S_IDLE;
            end else a <= a + 1'b1;
          end
        end
        S_OUT: if ((complete && match_ready) || (!complete && pm_ready)) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
