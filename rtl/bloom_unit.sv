// Bloom filter arithmetic for one vertex and one filter (combinational).
//
// A set of vertices is summarised by an M-bit filter. Inserting a vertex sets
// K bits, chosen by K hash functions; a vertex may be a member only if all its
// K bits are set (false positives possible, false negatives not). The number
// of set bits divided by K estimates the size of the set, and the bitwise AND
// of two filters is a filter of (a superset of) the intersection. Those rules
// follow the method; the K hash functions are this design's choice: hash j
// takes bit field j (counted from the top) of the multiplicative vertex hash,
// so they do not overlap the low bits used for the hash-table rows and columns.
//
// Interface: v      vertex to insert or test
//            filt   filter to test against / to estimate
//            mask   K-hot insertion mask of v
//            member all bits of mask are set in filt
//            card   popcount(filt) / K
// No clock: all outputs follow the inputs in the same cycle.
module bloom_unit
  import sgi_pkg::*;
#(
  parameter int unsigned M = BLOOM_M,
  parameter int unsigned K = BLOOM_K
) (
  input  vid_t                    v,
  input  logic [M-1:0]            filt,
  output logic [M-1:0]            mask,
  output logic                    member,
  output logic [$clog2(M+1)-1:0]  card
);
  localparam int unsigned IW = $clog2(M);

  logic [31:0] h;
  logic [$clog2(M+1)-1:0] ones;

  always_comb begin
    h    = vhash(v);
    mask = '0;
    for (int j = 0; j < K; j++) begin
      mask[h[31 - j*IW -: IW]] = 1'b1;
    end
    member = ((mask & filt) == mask);
    ones = '0;
    for (int i = 0; i < M; i++) ones += {{($clog2(M+1)-1){1'b0}}, filt[i]};
    card = ones / ($clog2(M+1))'(K);
  end

endmodule
