// Preprocessing stage 2, "data structures": hash tables, partitioned
// adjacency lists and Bloom filters.
//
// When `start` is seen (the counts of pre_filter_count are complete) the unit
// walks every cell of every relation's hash table in order (relation, row
// h1(x), column h2(y)) and replaces the count by the running sum of all counts
// before it, i.e. the offset where that cell's edges will start in the
// adjacency array; a copy of the offset goes to the cursor table, and one
// extra word after the last cell holds the total, so the end of any cell (or
// row) is the start of the next. It then raises `prefix_done` and places each
// kept edge it receives at adj_base + cursor of its cell, bumping the cursor
// (counting sort), and ORs the edge's Bloom mask of y into the filter of its
// hash-table row [r][h1(x)]. The row filter therefore summarises the neighbour
// set returned by a row lookup. Cell sizes follow the data (no fixed bucket
// size), as the method describes. Each adjacency entry stores the whole edge
// {x, y}, so that later lookups can drop the entries that other vertices of
// the same row or cell put there; the method reads "all edges in the subset"
// when it checks an edge, and storing both ends is how this design does it.
//
// Interface: start is a one-cycle pulse; prefix_done, fc_done and done are
// levels; kept-edge stream in;
// one memory port. Timing: 3 accesses per cell, 5 per kept edge.
module pre_data_structures
  import sgi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  query_cfg_t cfg,
  input  mem_map_t   map,
  output logic       prefix_done,
  input  logic       fc_done,
  output logic       done,
  input  logic       t_valid,
  output logic       t_ready,
  input  rel_t       t_rel,
  input  vid_t       t_x,
  input  vid_t       t_y,
  output logic       m_req_valid,
  input  logic       m_req_ready,
  output mem_req_t   m_req,
  input  logic       m_rsp_valid,
  input  word_t      m_rsp_data
);
  typedef enum logic [3:0] {
    S_IDLE, S_P_RD, S_P_WT, S_P_WC, S_P_SENT, S_SCAT, S_C_RD, S_C_WR, S_A_WR,
    S_B_RD, S_B_WR, S_DONE
  } state_t;
  state_t state;

  logic  pend;
  addr_t idx, ncell, cell_a, row;
  word_t cnt, sum, cur, bl;
  rel_t  r;
  vid_t  x, y;
  bloom_t ymask;
  logic   unused_member;
  logic [$clog2(BLOOM_M+1)-1:0] unused_card;

  bloom_unit u_bloom (
    .v(y), .filt(bl[BLOOM_M-1:0]), .mask(ymask), .member(unused_member), .card(unused_card)
  );

  always_comb begin
    ncell = addr_t'(cfg.nrel) << (cfg.h1 + cfg.h2);
    cell_a = cell_index(r, x, y, cfg.h1, cfg.h2);
    row   = row_index(r, x, cfg.h1);
  end

  always_comb begin
    m_req_valid = 1'b0;
    m_req.we    = 1'b0;
    m_req.addr  = '0;
    m_req.wdata = '0;
    unique case (state)
      S_P_RD:   begin m_req_valid = !pend; m_req.addr = map.table_base + idx; end
      S_P_WT:   begin m_req_valid = 1'b1; m_req.we = 1'b1; m_req.addr = map.table_base + idx;
                      m_req.wdata = sum; end
      S_P_WC:   begin m_req_valid = 1'b1; m_req.we = 1'b1; m_req.addr = map.cursor_base + idx;
                      m_req.wdata = sum; end
      S_P_SENT: begin m_req_valid = 1'b1; m_req.we = 1'b1; m_req.addr = map.table_base + ncell;
                      m_req.wdata = sum; end
      S_C_RD:   begin m_req_valid = !pend; m_req.addr = map.cursor_base + cell_a; end
      S_C_WR:   begin m_req_valid = 1'b1; m_req.we = 1'b1; m_req.addr = map.cursor_base + cell_a;
                      m_req.wdata = cur + 1'b1; end
      S_A_WR:   begin m_req_valid = 1'b1; m_req.we = 1'b1; m_req.addr = map.adj_base + addr_t'(cur);
                      m_req.wdata = {x, y}; end
      S_B_RD:   begin m_req_valid = !pend; m_req.addr = map.bloom_base + row; end
      S_B_WR:   begin m_req_valid = 1'b1; m_req.we = 1'b1; m_req.addr = map.bloom_base + row;
                      m_req.wdata = bl | word_t'(ymask); end
      default: ;
    endcase
  end

  assign prefix_done = (state == S_SCAT);
  assign t_ready     = (state == S_SCAT);
  assign done        = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pend  <= 1'b0;
      idx   <= '0;
      cnt   <= '0;
      sum   <= '0;
      cur   <= '0;
      bl    <= '0;
      r     <= '0;
      x     <= '0;
      y     <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          idx   <= '0;
          sum   <= '0;
          state <= S_P_RD;
        end
        S_P_RD: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend  <= 1'b0;
            cnt   <= m_rsp_data;
            state <= S_P_WT;
          end
        end
        S_P_WT: if (m_req_ready) state <= S_P_WC;
        S_P_WC: if (m_req_ready) begin
          sum <= sum + cnt;
          if (idx + 1'b1 == ncell) state <= S_P_SENT;
          else begin
            idx   <= idx + 1'b1;
            state <= S_P_RD;
          end
        end
        S_P_SENT: if (m_req_ready) state <= S_SCAT;
        S_SCAT: begin
          if (t_valid) begin
            r     <= t_rel;
            x     <= t_x;
            y     <= t_y;
            state <= S_C_RD;
          end else if (fc_done) state <= S_DONE;
        end
        S_C_RD: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend  <= 1'b0;
            cur   <= m_rsp_data;
            state <= S_C_WR;
          end
        end
        S_C_WR: if (m_req_ready) state <= S_A_WR;
        S_A_WR: if (m_req_ready) state <= S_B_RD;
        S_B_RD: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend  <= 1'b0;
            bl    <= m_rsp_data;
            state <= S_B_WR;
          end
        end
        S_B_WR: if (m_req_ready) state <= S_SCAT;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
