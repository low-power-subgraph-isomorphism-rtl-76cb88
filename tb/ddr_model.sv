// Behavioural model of the off-chip DRAM behind the accelerator's memory port
// (simulation only, not synthesizable as a DRAM).
//
// Word-addressed array of WORDS 64-bit words. A request is accepted when
// req_ready is high; req_ready drops at random (STALL_PCT percent of cycles)
// and while a read is outstanding. A read returns its word LAT cycles after
// acceptance with a one-cycle rsp_valid pulse; a write takes effect on
// acceptance. Accesses beyond WORDS are counted in `oob` and ignored.
// Testbenches load and inspect `mem` hierarchically.
//
// Source: the method's board has 4 GB of DRAM; its protocol is not described,
// so this request/response model is this design's.
module ddr_model
  import sgi_pkg::*;
#(
  parameter int unsigned WORDS     = 16384,
  parameter int unsigned LAT       = 4,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output word_t    rsp_data,
  output int       oob
);
  word_t mem [WORDS];
  logic  busy;
  int    cnt;
  logic  stall;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  assign req_ready = !busy && !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= 0;
      stall     <= 1'b0;
      rsp_valid <= 1'b0;
      rsp_data  <= '0;
      oob       <= 0;
    end else begin
      stall     <= ($urandom_range(99) < STALL_PCT);
      rsp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        if (req.addr >= addr_t'(WORDS)) oob <= oob + 1;
        if (req.we) begin
          if (req.addr < addr_t'(WORDS)) mem[req.addr] <= req.wdata;
        end else begin
          busy     <= 1'b1;
          cnt      <= int'(LAT);
          rsp_data <= (req.addr < addr_t'(WORDS)) ? mem[req.addr] : '0;
        end
      end
      if (busy) begin
        if (cnt <= 1) begin
          busy      <= 1'b0;
          rsp_valid <= 1'b1;
        end else cnt <= cnt - 1;
      end
    end
  end

endmodule
