// Shared types, sizes and helper functions of the subgraph-matching accelerator.
//
// The accelerator keeps its data structures in one off-chip memory addressed in
// 64-bit words. A data vertex is a 32-bit id, a label is 8 bits. A partial match
// holds up to QMAX mapped vertices plus the number of vertices mapped so far.
//
// The vertex hash is this design's own choice (the source method does not name
// one): an odd multiplicative hash. Its low b bits depend only on the low b bits
// of the id and are a permutation of them, so truncating to h1 or h2 bits
// spreads any run of 2^b consecutive ids over all 2^b rows or columns.
// The Bloom filter width m=16 and hash count k=2 are the values of the worked
// Bloom filter example in the method description.
package sgi_pkg;

  localparam int unsigned VID_W    = 32;   // data vertex id width
  localparam int unsigned LABEL_W  = 8;    // vertex label width
  localparam int unsigned MEM_W    = 64;   // off-chip memory word width
  localparam int unsigned ADDR_W   = 29;   // 2^29 words x 8 B = 4 GB
  localparam int unsigned QMAX     = 8;    // largest query, vertices
  localparam int unsigned QPOS_W   = 3;    // position in the matching order
  localparam int unsigned QCNT_W   = 4;    // 0..QMAX
  localparam int unsigned MAX_REL  = 28;   // QMAX*(QMAX-1)/2 query edges
  localparam int unsigned REL_W    = 5;
  localparam int unsigned HBITS_W  = 5;    // width of the h1 / h2 configuration
  localparam int unsigned BLOOM_M  = 16;   // Bloom filter bits
  localparam int unsigned BLOOM_K  = 2;    // Bloom filter hash functions

  typedef logic [VID_W-1:0]   vid_t;
  typedef logic [LABEL_W-1:0] label_t;
  typedef logic [MEM_W-1:0]   word_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [REL_W-1:0]   rel_t;
  typedef logic [BLOOM_M-1:0] bloom_t;

  // A partial match: vertex mapped to each matching-order position, and how
  // many positions are mapped (1..QMAX).
  typedef struct packed {
    logic [QCNT_W-1:0] depth;
    vid_t [QMAX-1:0]   v;
  } pmatch_t;

  localparam int unsigned PM_W  = $bits(pmatch_t);
  localparam int unsigned PM_WORDS = (PM_W + MEM_W - 1) / MEM_W;

  // One request on a memory port. Reads are answered by a later rsp_valid,
  // writes complete when the request is accepted.
  typedef struct packed {
    logic  we;
    addr_t addr;
    word_t wdata;
  } mem_req_t;

  // Query configuration, with query vertices already renumbered into matching
  // order. Relation r is the query edge rel_src[r] -> rel_dst[r], with
  // rel_src[r] < rel_dst[r].
  typedef struct packed {
    logic [QCNT_W-1:0]               nq;
    label_t [QMAX-1:0]               qlabel;
    logic [REL_W:0]                  nrel;
    logic [MAX_REL-1:0][QPOS_W-1:0]  rel_src;
    logic [MAX_REL-1:0][QPOS_W-1:0]  rel_dst;
    logic [HBITS_W-1:0]              h1;
    logic [HBITS_W-1:0]              h2;
  } query_cfg_t;

  // Off-chip memory map (word addresses) and graph size.
  typedef struct packed {
    vid_t  nv;          // data vertices
    addr_t ne;          // undirected data edges
    addr_t label_base;  // one word per vertex, label in the low bits
    addr_t edge_base;   // one word per undirected edge: {a, b}
    addr_t table_base;  // nrel * 2^(h1+h2) + 1 offsets
    addr_t cursor_base; // same size as the table, scatter cursors
    addr_t bloom_base;  // nrel * 2^h1 filters, one per word
    addr_t adj_base;    // partitioned adjacency lists, one {x, y} per word
    addr_t spill_base;  // off-chip part of the partial-result FIFO
    addr_t spill_cap;   // its capacity in partial matches
  } mem_map_t;

  function automatic logic [31:0] vhash(input vid_t v);
    return v * 32'h9E37_79B1;
  endfunction

  // Low `bits` bits of the vertex hash.
  function automatic logic [31:0] hbits(input vid_t v, input logic [HBITS_W-1:0] bits);
    logic [31:0] m;
    m = (32'd1 << bits) - 32'd1;
    return vhash(v) & m;
  endfunction

  // Index of a hash-table cell: relation, row h1(x), column h2(y).
  function automatic addr_t cell_index(input rel_t r, input vid_t x, input vid_t y,
                                       input logic [HBITS_W-1:0] h1,
                                       input logic [HBITS_W-1:0] h2);
    addr_t ra, row, col;
    ra  = addr_t'(r);
    row = addr_t'(hbits(x, h1));
    col = addr_t'(hbits(y, h2));
    return (ra << (h1 + h2)) | (row << h2) | col;
  endfunction

  function automatic addr_t row_index(input rel_t r, input vid_t x,
                                      input logic [HBITS_W-1:0] h1);
    return (addr_t'(r) << h1) | addr_t'(hbits(x, h1));
  endfunction

endpackage
