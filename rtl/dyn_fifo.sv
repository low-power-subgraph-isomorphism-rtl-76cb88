// Dynamic partial-result FIFO.
//
// The breadth-first enumeration can hold far more partial matches than fit on
// chip. This FIFO behaves like an ordinary on-chip FIFO of DEPTH entries while
// it holds fewer than THRESH entries. Once that threshold is reached, new
// entries go to a ring buffer in off-chip memory (spill_base, spill_cap
// entries of PM_WORDS words) instead; whenever the off-chip part is not empty
// and the on-chip buffer has room, the oldest off-chip entry is read back and
// appended on chip, so the on-chip buffer stays full and hides the memory
// latency. New entries keep going off chip until the off-chip part has
// drained and the on-chip count is below THRESH again; then the FIFO is purely
// on chip once more. Every entry leaves in the order it arrived, which keeps
// consecutive partial matches similar and helps cache reuse. This behaviour
// is the method's; the sizes, the ring buffer layout and the alternating
// priority between spilling a new entry and refilling an old one are this
// design's choices. When the ring holds spill_cap entries, push_ready stays
// low until a refill frees a slot; the method assumes the data fits in
// off-chip memory, and there is no overflow flag.
//
// Interface: push and pop valid/ready streams of pmatch_t, one memory port,
// `empty` (nothing on or off chip and no transfer under way), counters of
// entries spilled and refilled (zeroed by clr). Timing: an on-chip push or
// pop takes one cycle; a spill or refill moves PM_WORDS memory words one at a time.
module dyn_fifo
  import sgi_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned THRESH = DEPTH
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  addr_t      spill_base,
  input  addr_t      spill_cap,
  input  logic       push_valid,
  output logic       push_ready,
  input  pmatch_t    push_pm,
  output logic       pop_valid,
  input  logic       pop_ready,
  output pmatch_t    pop_pm,
  output logic       empty,
  output logic [31:0] spilled,
  output logic [31:0] refilled,
  output logic       m_req_valid,
  input  logic       m_req_ready,
  output mem_req_t   m_req,
  input  logic       m_rsp_valid,
  input  word_t      m_rsp_data
);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned WPE = PM_WORDS;
  localparam int unsigned WW  = (WPE > 1) ? $clog2(WPE) : 1;

  typedef enum logic [1:0] {S_IDLE, S_WR, S_RD} state_t;
  state_t state;

  pmatch_t        buf_q [DEPTH];
  logic [AW-1:0]  wr_ptr, rd_ptr;
  logic [AW:0]    count;
  addr_t          ddr_cnt, ddr_head, ddr_tail;
  logic [WW-1:0]  widx;
  logic           pend;
  logic           prio_refill;
  logic [WPE*MEM_W-1:0] hold;

  logic spill_mode, refill_go, push_on, push_off, do_pop, refill_done, wr_en;
  pmatch_t wr_data;

  always_comb begin
    spill_mode  = (ddr_cnt != 0) || (count >= (AW+1)'(THRESH));
    refill_go   = (state == S_IDLE) && (ddr_cnt != 0) && (count < (AW+1)'(DEPTH))
                  && (prio_refill || !push_valid);
    push_ready  = (state == S_IDLE) && !refill_go &&
                  (spill_mode ? (ddr_cnt < spill_cap) : (count < (AW+1)'(DEPTH)));
    push_on     = push_valid && push_ready && !spill_mode;
    push_off    = push_valid && push_ready && spill_mode;
    pop_valid   = (count != 0);
    pop_pm      = buf_q[rd_ptr];
    do_pop      = pop_valid && pop_ready;
    refill_done = (state == S_RD) && pend && m_rsp_valid && (widx == WW'(WPE - 1));
    wr_en       = push_on || refill_done;
    wr_data     = push_on ? push_pm
                          : pmatch_t'({m_rsp_data, hold[WPE*MEM_W-1:MEM_W]});
    empty       = (count == 0) && (ddr_cnt == 0) && (state == S_IDLE);
  end

  always_comb begin
    m_req_valid = 1'b0;
    m_req.we    = 1'b0;
    m_req.addr  = '0;
    m_req.wdata = hold[widx*MEM_W +: MEM_W];
    if (state == S_WR) begin
      m_req_valid = 1'b1;
      m_req.we    = 1'b1;
      m_req.addr  = spill_base + ddr_tail * addr_t'(WPE) + addr_t'(widx);
    end else if (state == S_RD) begin
      m_req_valid = !pend;
      m_req.addr  = spill_base + ddr_head * addr_t'(WPE) + addr_t'(widx);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) buf_q[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      wr_ptr      <= '0;
      rd_ptr      <= '0;
      count       <= '0;
      ddr_cnt     <= '0;
      ddr_head    <= '0;
      ddr_tail    <= '0;
      widx        <= '0;
      pend        <= 1'b0;
      prio_refill <= 1'b0;
      hold        <= '0;
      spilled     <= '0;
      refilled    <= '0;
    end else begin
      if (clr) begin
        spilled  <= '0;
        refilled <= '0;
      end
      if (wr_en) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(wr_en) - (AW+1)'(do_pop);

      unique case (state)
        S_IDLE: begin
          if (refill_go) begin
            widx        <= '0;
            prio_refill <= 1'b0;
            state       <= S_RD;
          end else if (push_off) begin
            hold        <= (WPE*MEM_W)'(push_pm);
            widx        <= '0;
            prio_refill <= 1'b1;
            state       <= S_WR;
          end else if (push_on) begin
            prio_refill <= 1'b1;
          end
        end
        S_WR: if (m_req_ready) begin
          if (widx == WW'(WPE - 1)) begin
            ddr_tail <= (ddr_tail + 1'b1 == spill_cap) ? '0 : ddr_tail + 1'b1;
            ddr_cnt  <= ddr_cnt + 1'b1;
            spilled  <= spilled + 1;
            state    <= S_IDLE;
          end else widx <= widx + 1'b1;
        end
        S_RD: begin
          if (!pend && m_req_ready) pend <= 1'b1;
          if (pend && m_rsp_valid) begin
            pend <= 1'b0;
            hold <= {m_rsp_data, hold[WPE*MEM_W-1:MEM_W]};
            if (widx == WW'(WPE - 1)) begin
              ddr_head <= (ddr_head + 1'b1 == spill_cap) ? '0 : ddr_head + 1'b1;
              ddr_cnt  <= ddr_cnt - 1'b1;
              refilled <= refilled + 1;
              state    <= S_IDLE;
            end else widx <= widx + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
