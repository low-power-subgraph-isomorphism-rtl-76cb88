// Read-only, direct-mapped cache between an enumeration unit and off-chip
// memory.
//
// The enumeration phase only reads the hash tables, adjacency lists and Bloom
// filters, which the preprocessing phase wrote before, so the cache needs no
// write path; `flush` drops every line before enumeration starts. A hit
// answers in the cycle after the request is accepted (data and tag are read
// in the accepting cycle and compared in the next). A
// miss fetches the whole line of LINE_WORDS words from memory, one read at a
// time in address order, then answers. Because the hash tables map hash values
// linearly to addresses, consecutive probes tend to fall into the same line,
// which is the spatial locality the method relies on; reuse between
// consecutive partial matches is its temporal locality. The method uses a
// cache but does not give its organisation: direct mapping, the line size and
// the number of lines are this design's choices.
//
// Interface: client side req_valid/req_ready/req_addr, then one rsp_valid
// pulse with rsp_data; memory side one mem_req_t port as in mem_arbiter.
// hits/misses count lookups since the last flush.
module rd_cache
  import sgi_pkg::*;
#(
  parameter int unsigned LINE_WORDS = 8,
  parameter int unsigned LINES      = 256
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flush,
  input  logic     req_valid,
  output logic     req_ready,
  input  addr_t    req_addr,
  output logic     rsp_valid,
  output word_t    rsp_data,
  output logic     m_req_valid,
  input  logic     m_req_ready,
  output mem_req_t m_req,
  input  logic     m_rsp_valid,
  input  word_t    m_rsp_data,
  output logic [31:0] hits,
  output logic [31:0] misses
);
  localparam int unsigned OW = $clog2(LINE_WORDS);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = ADDR_W - OW - IW;

  typedef enum logic [1:0] {S_IDLE, S_LOOK, S_FILL, S_RESP} state_t;
  state_t state;

  word_t            data_q [LINES*LINE_WORDS];
  logic [TW-1:0]    tag_q  [LINES];
  logic [LINES-1:0] valid_q;

  addr_t         addr_r;
  word_t         rd_r;
  word_t         fill_hit_r;
  logic [OW-1:0] fill_off;
  logic          fill_wait;

  wire [OW-1:0] a_off = addr_r[OW-1:0];
  wire [IW-1:0] a_idx = addr_r[OW +: IW];
  wire [TW-1:0] a_tag = addr_r[ADDR_W-1 -: TW];

  assign req_ready = (state == S_IDLE) && !flush;

  always_comb begin
    m_req_valid = (state == S_FILL) && !fill_wait;
    m_req.we    = 1'b0;
    m_req.addr  = {addr_r[ADDR_W-1:OW], fill_off};
    m_req.wdata = '0;
    rsp_valid   = 1'b0;
    rsp_data    = rd_r;
    if (state == S_LOOK && valid_q[a_idx] && tag_q[a_idx] == a_tag) rsp_valid = 1'b1;
    if (state == S_RESP) begin
      rsp_valid = 1'b1;
      rsp_data  = fill_hit_r;
    end
  end

  // data array: one synchronous read port, one write port
  always_ff @(posedge clk) begin
    if (state == S_IDLE && req_valid && req_ready)
      rd_r <= data_q[{req_addr[OW +: IW], req_addr[OW-1:0]}];
    if (state == S_FILL && fill_wait && m_rsp_valid) begin
      data_q[{a_idx, fill_off}] <= m_rsp_data;
      if (fill_off == a_off) fill_hit_r <= m_rsp_data;
    end
    if (state == S_FILL && fill_wait && m_rsp_valid && fill_off == OW'(LINE_WORDS - 1))
      tag_q[a_idx] <= a_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      valid_q   <= '0;
      addr_r    <= '0;
      fill_off  <= '0;
      fill_wait <= 1'b0;
      hits      <= '0;
      misses    <= '0;
    end else if (flush) begin
      state     <= S_IDLE;
      valid_q   <= '0;
      fill_wait <= 1'b0;
      hits      <= '0;
      misses    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) begin
          addr_r <= req_addr;
          state  <= S_LOOK;
        end
        S_LOOK: begin
          if (valid_q[a_idx] && tag_q[a_idx] == a_tag) begin
            hits  <= hits + 1;
            state <= S_IDLE;
          end else begin
            misses    <= misses + 1;
            fill_off  <= '0;
            fill_wait <= 1'b0;
            state     <= S_FILL;
          end
        end
        S_FILL: begin
          if (!fill_wait) begin
            if (m_req_ready) fill_wait <= 1'b1;
          end else if (m_rsp_valid) begin
            fill_wait <= 1'b0;
            if (fill_off == OW'(LINE_WORDS - 1)) begin
              valid_q[a_idx] <= 1'b1;
              state          <= S_RESP;
            end else begin
              fill_off <= fill_off + 1'b1;
            end
          end
        end
        S_RESP: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
