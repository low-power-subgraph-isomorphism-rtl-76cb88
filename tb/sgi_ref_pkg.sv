// Software reference for the unit testbenches: a random labelled graph, a
// query in matching order, and the memory image that preprocessing should
// produce (hash-table offsets with a final total, cursors after placement,
// adjacency entries {x, y} in placement order, Bloom filter per table row).
// The hash is recomputed here from its definition, not taken from the RTL.
//
// How: plain SystemVerilog functions over queues and associative arrays,
// called by the unit testbenches at time zero. Interface: package functions
// (gen_graph, triangle, cfg, map, put_graph, filter, build, rdimg). Timing:
// not applicable. Source: relations, hash-table offsets, counting-sort
// placement and row Bloom filters follow the method; the memory layout is
// this design's.
package sgi_ref_pkg;
  import sgi_pkg::*;

  localparam int MAXV       = 64;
  localparam int LABEL_BASE = 0;
  localparam int EDGE_BASE  = 1024;
  localparam int TABLE_BASE = 4096;
  localparam int CUR_BASE   = 8192;
  localparam int BLOOM_BASE = 12288;
  localparam int ADJ_BASE   = 16384;

  int nv, ne;
  int lab [MAXV];
  bit adj [MAXV][MAXV];
  int ea [1024];
  int eb [1024];
  int qn, nr, h1, h2;
  int ql [QMAX];
  int rs [MAX_REL];
  int rd [MAX_REL];
  word_t img [int];        // expected memory image, by word address
  // kept-edge stream in hardware order
  int kr [$];
  int kx [$];
  int ky [$];

  function automatic int hsh(input int v);
    logic [31:0] p;
    p = 32'(v) * 32'd2654435761;
    return int'(p);
  endfunction
  function automatic int lowbits(input int v, input int b);
    return hsh(v) & ((1 << b) - 1);
  endfunction
  function automatic logic [15:0] bmask(input int v);
    logic [31:0] p;
    logic [15:0] m;
    p = 32'(hsh(v));
    m = '0;
    m[p[31:28]] = 1'b1;
    m[p[27:24]] = 1'b1;
    return m;
  endfunction
  function automatic int cell_of(input int r, input int x, input int y);
    return (r << (h1 + h2)) + (lowbits(x, h1) << h2) + lowbits(y, h2);
  endfunction

  function automatic void gen_graph(input int n_v, input int n_e, input int n_lab);
    int n, a, b;
    nv = n_v;
    ne = n_e;
    for (int i = 0; i < nv; i++) begin
      lab[i] = $urandom_range(n_lab - 1);
      for (int j = 0; j < nv; j++) adj[i][j] = 1'b0;
    end
    n = 0;
    while (n < ne) begin
      a = $urandom_range(nv - 1);
      b = $urandom_range(nv - 1);
      if (a != b && !adj[a][b]) begin
        adj[a][b] = 1'b1;
        adj[b][a] = 1'b1;
        ea[n] = a;
        eb[n] = b;
        n++;
      end
    end
  endfunction

  // triangle query, labels 0,1,2
  function automatic void triangle(input int hb1, input int hb2);
    qn = 3; nr = 3; h1 = hb1; h2 = hb2;
    for (int i = 0; i < QMAX; i++) ql[i] = 0;
    ql[0] = 0; ql[1] = 1; ql[2] = 2;
    rs[0] = 0; rd[0] = 1; rs[1] = 0; rd[1] = 2; rs[2] = 1; rd[2] = 2;
  endfunction

  function automatic query_cfg_t cfg();
    query_cfg_t c;
    c = '0;
    c.nq   = QCNT_W'(qn);
    c.nrel = (REL_W+1)'(nr);
    c.h1   = HBITS_W'(h1);
    c.h2   = HBITS_W'(h2);
    for (int i = 0; i < QMAX; i++) c.qlabel[i] = label_t'(ql[i]);
    for (int r = 0; r < nr; r++) begin
      c.rel_src[r] = QPOS_W'(rs[r]);
      c.rel_dst[r] = QPOS_W'(rd[r]);
    end
    return c;
  endfunction

  function automatic mem_map_t map();
    mem_map_t m;
    m = '0;
    m.nv = vid_t'(nv);
    m.ne = addr_t'(ne);
    m.label_base  = addr_t'(LABEL_BASE);
    m.edge_base   = addr_t'(EDGE_BASE);
    m.table_base  = addr_t'(TABLE_BASE);
    m.cursor_base = addr_t'(CUR_BASE);
    m.bloom_base  = addr_t'(BLOOM_BASE);
    m.adj_base    = addr_t'(ADJ_BASE);
    return m;
  endfunction

  // input arrays (labels, edges) into img
  function automatic void put_graph();
    img.delete();
    for (int i = 0; i < nv; i++) img[LABEL_BASE + i] = word_t'(lab[i]);
    for (int e = 0; e < ne; e++) img[EDGE_BASE + e] = {32'(ea[e]), 32'(eb[e])};
  endfunction

  // kept-edge stream and per-cell counts, in hardware order
  function automatic void filter(output int cnt [int]);
    int x, y;
    kr.delete(); kx.delete(); ky.delete();
    cnt.delete();
    for (int c = 0; c < (nr << (h1 + h2)); c++) cnt[c] = 0;
    for (int e = 0; e < ne; e++)
      for (int r = 0; r < nr; r++)
        for (int d = 0; d < 2; d++) begin
          x = d ? eb[e] : ea[e];
          y = d ? ea[e] : eb[e];
          if (lab[x] == ql[rs[r]] && lab[y] == ql[rd[r]]) begin
            kr.push_back(r); kx.push_back(x); ky.push_back(y);
            cnt[cell_of(r, x, y)]++;
          end
        end
  endfunction

  // full preprocessing image: table, cursors, adjacency, Bloom filters
  function automatic void build();
    int cnt [int];
    int cur [int];
    int sum, ncell, c;
    filter(cnt);
    ncell = nr << (h1 + h2);
    sum = 0;
    for (c = 0; c < ncell; c++) begin
      img[TABLE_BASE + c] = word_t'(sum);
      cur[c] = sum;
      sum += cnt[c];
    end
    img[TABLE_BASE + ncell] = word_t'(sum);
    for (int b = 0; b < (nr << h1); b++) img[BLOOM_BASE + b] = '0;
    for (int k = 0; k < kr.size(); k++) begin
      c = cell_of(kr[k], kx[k], ky[k]);
      img[ADJ_BASE + cur[c]] = {32'(kx[k]), 32'(ky[k])};
      cur[c]++;
      img[BLOOM_BASE + ((kr[k] << h1) + lowbits(kx[k], h1))] |= word_t'(bmask(ky[k]));
    end
    for (c = 0; c < ncell; c++) img[CUR_BASE + c] = word_t'(cur[c]);
  endfunction

  function automatic word_t rdimg(input int a);
    return img.exists(a) ? img[a] : '0;
  endfunction
endpackage
