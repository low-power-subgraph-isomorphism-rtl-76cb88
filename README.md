# Subgraph matching accelerator for small FPGAs

This RTL finds every copy of a small labelled *query* graph (3 to 8 vertices) inside a large
labelled *data* graph that sits in off-chip DRAM. Mathematically, it lists every injective
mapping of query vertices to data vertices that keeps labels and maps every query edge onto a
data edge. Both phases of the work run in hardware, with no host processor in the loop:

1. **Preprocessing** reorganises the data graph's edge list into hash-addressed adjacency
   structures, one per query edge.
2. **Enumeration** grows partial matches one query vertex at a time, in breadth-first order.
   It uses Bloom filters to skip work and exact hash probes to stay correct.

The design targets a low-power embedded FPGA with little on-chip memory, so it aims to make few
DRAM accesses. Two read-only caches and a FIFO that spills to DRAM help with that. The
organisation follows a published method for low-power subgraph isomorphism on FPGAs. The
sections below say where this RTL makes its own choices.

## Relations: the one idea to understand first

Each query edge between matching positions `j < i` is a **relation** `r` (`rel_src[r] = j`,
`rel_dst[r] = i`). The relation holds every directed data edge `x -> y` with
`label(x) = qlabel[j]` and `label(y) = qlabel[i]`. Every undirected data edge is tried in both
directions. Edges whose labels fit no relation are never stored.

For each relation, preprocessing builds a **two-level hash table** of `2^h1` rows by `2^h2`
columns, using the vertex hash `H(v) = v * 0x9E3779B1 mod 2^32`:

* Row `H(x) mod 2^h1` collects the out-edges of every source vertex `x` that hashes there.
  This is a superset of `x`'s neighbourhood.
* Column `H(y) mod 2^h2` splits that row by the destination's hash.
* Cell `[r][row][col]` holds the word offset where its edges start in one global
  **adjacency array**. Every entry of that array is the whole edge `{x, y}`, one 64-bit word.
* The cells of all relations are laid out consecutively. One extra word after the last cell
  holds the total. So the end of a cell is always the next cell's offset, and the end of a row
  is the cell `2^h2` words further on.

Cell sizes follow the data, with no fixed bucket capacity. Each row `[r][row]` also has a
16-bit **Bloom filter** (`k = 2` hash bits per element) of all destinations `y` in that row.

With these structures, the three questions that enumeration asks become cheap:

| question | how |
|---|---|
| neighbours of `v` in relation `r` | read row `H(v)`: two offsets, then the entries, keeping those with `x = v` |
| is `v -> w` an edge of `r`? | read cell `[H(v)][H(w)]`: two offsets, then usually a handful of entries |
| roughly how big is that neighbour set, and what does it share with others? | the row's Bloom filter: popcount / 2, and bitwise AND |

Larger `h1`/`h2` give fewer collisions but larger tables. The table size is
`nrel * 2^(h1+h2)` words. Both values are run-time inputs, chosen by whoever sets up the run.

## Off-chip memory map

All addresses are 64-bit word addresses (29 bits, 4 GB). Every base is a run-time input
(`mem_map_t`).

| region | size (words) | content |
|---|---|---|
| `label_base` | `nv` | label of vertex `v` in bits 7:0 of word `v` |
| `edge_base` | `ne` | undirected edge `{a[63:32], b[31:0]}` |
| `table_base` | `nrel * 2^(h1+h2) + 1` | counts during preprocessing, then cell offsets and the total |
| `cursor_base` | `nrel * 2^(h1+h2)` | placement cursors (scratch) |
| `bloom_base` | `nrel * 2^h1` | one row filter per word, bits 15:0 |
| `adj_base` | number of kept directed edges | `{x, y}` per entry, grouped by relation, row, column |
| `spill_base` | `spill_cap * 5` | ring buffer of spilled partial matches |

The host writes only the label and edge arrays. The accelerator writes everything else.

## Preprocessing

* **`pre_filter_count`**
  * First it zeroes the table and Bloom regions.
  * For every edge it reads `{a, b}` and both labels. For every relation and direction that
    fits, it increments the cell count in DRAM with a read-modify-write.
  * It then waits while the offsets are computed. After that it reads the edges a second time
    and streams each kept edge `(r, x, y)` to the next unit.
* **`pre_data_structures`**
  * It turns the counts into exclusive prefix sums, in place, and copies them to the cursor
    table. Then it writes the total.
  * For each kept edge it places `{x, y}` at `adj_base + cursor[cell]` and increments the
    cursor. This is a counting sort, so each row ends up ordered by destination hash.
  * It also ORs the Bloom bits of `y` into the row's filter.

Both units make one DRAM access at a time. The cost is roughly 3 reads per edge per pass, plus
2 accesses per kept edge in pass 0, plus 5 per kept edge in pass 1, plus 3 per table cell.

## Enumeration

A partial match (`pmatch_t`, 260 bits) holds the data vertices mapped to matching positions
`0..depth-1`. The units form a ring, connected by valid/ready streams:

```
root_gen --> dyn_fifo --> approx_intersection --> propose_filter --> valid_extension --+--> matches
                ^                                                                      |
                +------------------------------ longer partial match <-----------------+
```

* **`root_gen`** scans the labels and pushes every vertex whose label matches position 0.
  Vertices go in id order.
* **`approx_intersection`** looks at the next position `i = depth`. It reads, through the
  Bloom cache, the row filter of `v_src` for every relation ending at `i`. It ANDs these
  filters into `B`, and picks the relation whose filter has the fewest bits set. That
  relation's neighbour set is the smallest one to intersect.
* **`propose_filter`** reads that smallest row straight from DRAM. It keeps the entries with
  `x = v_src` whose `y` passes the Bloom test against `B`. Each survivor is a candidate.
* **`valid_extension`** first rejects a candidate that is already mapped, because the mapping
  must be injective. It then probes, through the table cache, the exact cell
  `[H(v_src)][H(w)]` of every *other* relation ending at `i`, looking for the edge. A
  candidate that survives becomes `depth + 1`. If that fills the query, it leaves on the match
  port. Otherwise it goes back into the FIFO.
* **`dyn_fifo`** behaves as an on-chip FIFO (`FIFO_DEPTH` entries) until `FIFO_THRESH`
  entries are held.
  * From then on, new entries go to the DRAM ring buffer.
  * Whenever the on-chip part has room, the oldest spilled entry is read back. This keeps the
    on-chip part full, so the consumer never waits on DRAM.
  * Order is preserved throughout, so successive partial matches share vertices, which is what
    makes the caches useful.
  * When the DRAM part has drained and the on-chip count is below the threshold, the FIFO is
    purely on chip again.
  * The ring must be large enough for the widest level of the search. If it fills, the FIFO
    stops accepting, and the enumeration loop, which feeds itself, stalls for good. There is
    no overflow flag: size `spill_cap` with margin.
* **`rd_cache`** (two instances) is direct-mapped and read-only. It fills whole lines and
  answers a hit in the cycle after the request. It is flushed between preprocessing and
  enumeration, because preprocessing has rewritten the tables.

The run ends when every root has been generated, the FIFO is empty (on and off chip) and all
three units are idle. Each unit works on one token at a time.

The Bloom filters never drop a true candidate. Hash collisions put extra entries in rows and
cells, but the `x = v` test and the exact probes remove them. So the reported matches are
exact. The end-to-end test checks this against a software backtracking search.

## Interfaces and timing

`sgi_top` ports (all plain signals or packed structs):

* `start` pulse. `cfg` (`query_cfg_t`) and `map` (`mem_map_t`) must stay stable until `done`.
  `pre_done` rises when preprocessing ends, and `busy` is high during a run.
* `cfg` fields:
  * `nq`: number of query vertices, at least 2.
  * `qlabel[p]`: the label of the vertex at matching position `p`.
  * `nrel`: number of relations.
  * `rel_src[r] < rel_dst[r]`: the two positions of relation `r`.
  * `h1`, `h2`: hash sizes.
* **The query must already be renumbered into matching order**, and every position after the
  first must have an edge to an earlier position, i.e. the order must be connected. The
  intended heuristic is not in the RTL:
  1. Start with the highest-degree query vertex.
  2. Then repeatedly add the vertex with the most already-ordered neighbours, breaking ties by
     degree.
* Match stream: `match_valid/match_ready/match_pm`, where `match_pm.v[p]` is the data vertex
  at position `p`.
* Memory port: `m_req_valid/m_req_ready/m_req{we, addr, wdata}`, then `m_rsp_valid/m_rsp_data`
  for reads.
  * A write completes when it is accepted.
  * Only one read is outstanding at a time, and its response must come at least one cycle
    after acceptance.
  * Seven clients share the port through `mem_arbiter` (round robin).
* Counters (`n_*`) report what each mechanism did in the last run: edges kept, roots,
  adjacency entries scanned, Bloom rejections, probe rejections, injectivity rejections, FIFO
  spills and refills, and cache hits and misses per cache.

`rst_n` is an asynchronous active-low reset. All timing is in clock cycles of one clock.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `sgi_top.CACHE_LINE_WORDS` | 8 | words per cache line |
| `sgi_top.CACHE_LINES` | 256 | lines per cache (16 KB each) |
| `sgi_top.FIFO_DEPTH` | 1024 | on-chip partial-result entries |
| `sgi_top.FIFO_THRESH` | `FIFO_DEPTH` | spill threshold |
| `sgi_pkg.QMAX` / `MAX_REL` | 8 / 28 | largest query: vertices / edges |
| `sgi_pkg.BLOOM_M` / `BLOOM_K` | 16 / 2 | Bloom filter bits / hash functions |
| `sgi_pkg.VID_W`, `LABEL_W`, `MEM_W`, `ADDR_W` | 32, 8, 64, 29 | vertex id, label, memory word, word address |

The method sizes the queries (up to 8 vertices, 26 edges), the 4 GB DRAM and the example Bloom
filter (m = 16, k = 2). The cache and FIFO sizes, the widths and the hash function are this
design's choices.

## Where this RTL departs from, or adds to, the method

* The matching order and `h1`/`h2` arrive as configuration. The method computes them on the
  host: `h1` and `h2` grow linearly with `log |E|`, with empirical coefficients that are not
  published.
* The enumeration units are not pipelined internally. Each handles one token and makes one
  memory access at a time, and the DRAM port allows one outstanding read. The method's
  high-level-synthesis design overlaps more work, so expect lower throughput than its reported
  numbers.
* `propose_filter` reads DRAM uncached, as in the method's block diagram.
* Adjacency entries store both ends of an edge. This is what lets row and cell scans discard
  other vertices' edges exactly.
* The injectivity check sits in `valid_extension`.
* The cache organisation, the arbiter, the FIFO ring-buffer layout and the root selection by
  label only are this design's own.

## Simulating

Every testbench in `tb/` is self-checking and prints `TB_RESULT checks=N failures=M`. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/sgi_pkg.sv tb/tb_sgi_top.sv --top-module tb_sgi_top
./obj_dir/Vtb_sgi_top
```

| testbench | what it shows |
|---|---|
| `tb_sgi_top` | Random 40-vertex, 110-edge, 3-label graph; triangle, 4-cycle and diamond queries. Every match must be a real, unique embedding, and the count must equal a software search. Uses an 8-entry FIFO (threshold 6) and small caches, so spill/refill, hits/misses, Bloom and probe rejections, injectivity rejections and match back-pressure all occur (each is counted, and a failure is counted if one never happens). |
| `tb_sgi_top_full` | The same run with every parameter at its default. |
| `tb_sgi_top_large` | 50 vertices, 400 edges, 5 labels, `h1 = 3`, `h2 = 2`: a 5-vertex "house" query, an 8-vertex query (a path with two chords and repeated labels, about a thousand matches) and a 4-clique, with a 16-entry FIFO that spills heavily into a 600-entry ring, which wraps. |
| `tb_sgi_fig1` | The small textbook example: triangle A-B-D on an 11-vertex graph, which must give exactly the two known matches. Run with three hash sizes, including `h1 = h2 = 0` where every relation is one cell. |
| `tb_bloom_unit`, `tb_mem_arbiter`, `tb_rd_cache`, `tb_dyn_fifo` | Building blocks against reference models: masks and estimates, read-after-write through the arbiter, cache contents/latency/flush, FIFO order through spills. |
| `tb_pre_filter_count`, `tb_pre_data_structures` | Per-cell counts, the kept-edge stream and the exact memory image (offsets, cursors, adjacency array, filters) against `tb/sgi_ref_pkg.sv`. |
| `tb_root_gen`, `tb_approx_intersection`, `tb_propose_filter`, `tb_valid_extension` | Each enumeration unit against the same reference image. |

`tb/ddr_model.sv` is the behavioural DRAM: fixed read latency, random stalls, and
out-of-range accesses counted. `tb/sgi_tb_driver.sv` holds the random-graph stimulus and
checker shared by `tb_sgi_top`, `tb_sgi_top_full` and `tb_sgi_top_large`.

## How far to trust it

* The tests cover correctness on small random graphs, with queries of 3 to 8 vertices and 3 to 9
  relations, and on the mechanisms listed above.
* They do not cover:
  * dense 8-vertex queries with many more edges, up to the 28 relations the package allows;
  * graphs large enough to need wide `h1`/`h2`;
  * timing closure or resource use on any FPGA.
* The data sets the method was evaluated on fit within the address space. The largest has 2.4 M
  vertices and 4.7 M edges. Its worst-case adjacency array is about 2 GB when 26 relations all
  keep every edge, and about 1/25 of that with five random labels.
