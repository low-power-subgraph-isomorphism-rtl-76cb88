// Preprocessing stage 1, "filter and count".
//
// The data graph arrives in off-chip memory as a list of undirected edges
// {a, b} and a label per vertex. Every query edge (relation r, from matching
// position rel_src[r] to the later position rel_dst[r]) keeps only the directed
// data edges x -> y with L(x) = label of rel_src[r] and L(y) = label of
// rel_dst[r]; all other edges are dropped, which splits each adjacency list by
// neighbour label. Each undirected edge is tried in both directions against
// every relation.
//
// Pass 0 clears the hash-table region (nrel * 2^(h1+h2) cells) and the Bloom
// filter region (nrel * 2^h1 words), then counts, for every kept edge, one
// entry in the cell [r][h1(x)][h2(y)] by a read-modify-write in memory. It then
// raises count_done and waits for `go` while the next stage turns counts into
// offsets. Pass 1 reads the edges again and streams every kept edge
// (r, x, y) to the next stage over a valid/ready handshake, then raises done.
// Counting per cell, then placing, is the counting sort of the method; doing
// the counts in off-chip memory one edge at a time is this design's choice.
//
// Timing: one memory access at a time; about 3 reads per edge plus one cycle
// per (relation, direction) pair plus 2 accesses per kept edge in pass 0.
module pre_filter_count
  import sgi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  query_cfg_t cfg,
  input  mem_map_t   map,
  output logic       count_done,
  input  logic       go,
  output logic       done,
  // kept-edge stream
  output logic       t_valid,
  input  logic       t_ready,
  output rel_t       t_rel,
  output vid_t       t_x,
  output vid_t       t_y,
  // memory port
  output logic       m_req_valid,
  input  logic       m_req_ready,
  output mem_req_t   m_req,
  input  logic       m_rsp_valid,
  input  word_t      m_rsp_data,
  // statistics
  output logic [31:0] kept
);
  typedef enum logic [3:0] {
    S_IDLE, S_CLR_T, S_CLR_B, S_EDGE, S_LA, S_LB, S_REL, S_CNT_RD, S_CNT_WR,
    S_EMIT, S_WAIT_GO, S_DONE
  } state_t;
  state_t state;

  logic   pass1;
  logic   pend;
  addr_t  idx;
  addr_t  e;
  vid_t   a, b;
  label_t la, lb;
  rel_t   r;
  logic   dir;
  word_t  cnt;

  addr_t ncell, nbloom;
  vid_t  x, y;
  label_t lx, ly;
  logic  match;
  logic  last_pair;

  always_comb begin
    ncell  = addr_t'(cfg.nrel) << (cfg.h1 + cfg.h2);
    nbloom = addr_t'(cfg.nrel) << cfg.h1;
    x  = dir ? b : a;
    y  = dir ? a : b;
    lx = dir ? lb : la;
    ly = dir ? la : lb;
    match = (lx == cfg.qlabel[cfg.rel_src[r]]) && (ly == cfg.qlabel[cfg.rel_dst[r]]);
    last_pair = dir && ({1'b0, r} == cfg.nrel - 1'b1);
  end

  always_comb begin
    m_req_valid = 1'b0;
    m_req.we    = 1'b0;
    m_req.addr  = '0;
    m_req.wdata = '0;
    unique case (state)
      S_CLR_T:  begin m_req_valid = 1'b1; m_req.we = 1'b1; m_req.addr = map.table_base + idx; end
      S_CLR_B:  begin m_req_valid = 1'b1; m_req.we = 1'b1; m_req.addr = map.bloom_base + idx; end
      S_EDGE:   begin m_req_valid = !pend; m_req.addr = map.edge_base + e; end
      S_LA:     begin m_req_valid = !pend; m_req.addr = map.label_base + addr_t'(a); end
      S_LB:     begin m_req_valid = !pend; m_req.addr = map.label_base + addr_t'(b); end
      S_CNT_RD: begin m_req_valid = !pend;
                      m_req.addr = map.table_base + cell_index(r, x, y, cfg.h1, cfg.h2); end
      S_CNT_WR: begin m_req_valid = 1'b1; m_req.we = 1'b1;
                      m_req.addr = map.table_base + cell_index(r, x, y, cfg.h1, cfg.h2);
                      m_req.wdata = cnt + 1'b1; end
      default: ;
    endcase
  end

  assign t_valid    = (state == S_EMIT);
  assign t_rel      = r;
  assign t_x        = x;
  assign t_y        = y;
  assign count_done = (state == S_WAIT_GO);
  assign done       = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    logic adv;
    adv = 1'b0;
    if (!rst_n) begin
      state <= S_IDLE;
      pass1 <= 1'b0;
      pend  <= 1'b0;
      idx   <= '0;
      e     <= '0;
      a     <= '0;
      b     <= '0;
      la    <= '0;
      lb    <= '0;
      r     <= '0;
      dir   <= 1'b0;
      cnt   <= '0;
      kept  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pass1 <= 1'b0;
          idx   <= '0;
          e     <= '0;
          r     <= '0;
          dir   <= 1'b0;
          kept  <= '0;
          state <= (ncell != 0) ? S_CLR_T : S_DONE;
        end
        S_CLR_T: if (m_req_ready) begin
          if (idx + 1'b1 == ncell) begin
            idx   <= '0;
            state <= S_CLR_B;
          end else idx <= idx + 1'b1;
        end
        S_CLR_B: if (m_req_ready) begin
          if (idx + 1'b1 == nbloom) begin
            idx   <= '0;
            state <= (map.ne != 0) ? S_EDGE : S_WAIT_GO;
          end else idx <= idx + 1'b1;
        end
        S_EDGE: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend  <= 1'b0;
            a     <= m_rsp_data[63:32];
            b     <= m_rsp_data[31:0];
            state <= S_LA;
          end
        end
        S_LA: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend  <= 1'b0;
            la    <= m_rsp_data[LABEL_W-1:0];
            state <= S_LB;
          end
        end
        S_LB: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend  <= 1'b0;
            lb    <= m_rsp_data[LABEL_W-1:0];
            state <= S_REL;
          end
        end
        S_REL: begin
          if (match) begin
            kept  <= kept + 1;
            state <= pass1 ? S_EMIT : S_CNT_RD;
          end else adv = 1'b1;
        end
        S_CNT_RD: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend  <= 1'b0;
            cnt   <= m_rsp_data;
            state <= S_CNT_WR;
          end
        end
        S_CNT_WR: if (m_req_ready) adv = 1'b1;
        S_EMIT:   if (t_ready) adv = 1'b1;
        S_WAIT_GO: if (go) begin
          pass1 <= 1'b1;
          e     <= '0;
          kept  <= '0;
          state <= (map.ne != 0) ? S_EDGE : S_DONE;
        end
        S_DONE: if (start) begin
          pass1 <= 1'b0;
          idx   <= '0;
          e     <= '0;
          r     <= '0;
          dir   <= 1'b0;
          kept  <= '0;
          state <= (ncell != 0) ? S_CLR_T : S_DONE;
        end
        default: state <= S_IDLE;
      endcase
      // advance to the next (relation, direction) pair, next edge, or pass end
      if (adv) begin
        if (last_pair) begin
          r   <= '0;
          dir <= 1'b0;
          if (e + 1'b1 == map.ne) begin
            state <= pass1 ? S_DONE : S_WAIT_GO;
          end else begin
            e     <= e + 1'b1;
            state <= S_EDGE;
          end
        end else begin
          if (dir) r <= r + 1'b1;
          dir   <= !dir;
          state <= S_REL;
        end
      end
    end
  end

endmodule
