# Compressed, cache-coherent triangle lists: a hardware decompression front end

A GPU's geometry stage re-shades a vertex every time it falls out of the small
post-transform vertex cache, and the index list that names the triangles has to
cross the bus before any of that happens. If the triangles of a mesh are
ordered so that each vertex is used by all its triangles while it is still in a
FIFO cache of K entries, two things follow. The cache miss ratio approaches its
floor of about 0.5 misses per triangle. And almost every index can be written
as a short "cache position" instead of a full vertex number, so the triangle
list compresses to a few bits per index.

The reordering and the encoding are done once per model, in software. This RTL
is the hardware side: it takes the compressed list, rebuilds the triangles, and
runs them through the FIFO vertex cache. Two encodings are supported:

* **Per-index Huffman code.** Roughly log2(K)+1 bits per index, and the
  smallest stream.
* **Fixed 16-bit code per triangle.** Slightly larger, but with no variable-length
  parsing: the top three bits pick one of eight simple case decoders.

## The one idea both decoders rest on

The decoder keeps its own copy of the cache. This copy holds only vertex
*indices*, K entries, replaced first-in first-out. It is updated exactly as the
encoder's model of the cache was. So a symbol that says "the vertex in position
j" always means the same vertex for encoder and decoder. Three facts make this
cheap:

* **Numbering by first use.** Vertices are renumbered in the order they first
  appear. A vertex used for the first time is therefore always the next value
  of a running counter `g`, and costs no index bits.
* **Hits leave the order alone.** A FIFO cache does not reorder entries on a
  hit. Only misses (first uses and reloads) change the cache copy.
* **Position numbering.** Position 0 is the **front** of the queue: the oldest
  entry, the next one to be flushed. Position K-1 holds the most recently
  loaded index.

## Per-index Huffman stream (`index_decoder`)

Each index is one of K+2 symbols:

| symbol ID | meaning | index produced | cache copy |
|---|---|---|---|
| 0 .. K-1 | vertex is at position S | `cache[S]` | unchanged |
| K | first use | `g`, then `g++` | `g` loaded |
| K+1 | reload after a flush; followed by ceil(log2(g)) bits | those bits | index loaded |

The decoder handles one symbol per cycle:

1. `bit_buffer` holds the incoming 32-bit words, first bit in the MSB. It shows
   the next HMAX + IDX_W bits.
2. The top HMAX bits address `huff_lut`, a table of 2^HMAX entries. The code is
   prefix free, so each entry holds the symbol ID and the length of the one
   codeword that starts with those bits.
3. The buffer drops only that many bits. For a reload it also drops the
   ceil(log2(g)) bits of the explicit index.
4. The index goes out on a valid/ready port, and `tri_assembler` groups the
   indices three at a time into triangles.

The host must load the table before each mesh, because the code is built per
model. The encoder must limit codeword lengths to HMAX. The default is 5, which
is log2(16)+1. `start` clears `g`, the cache copy and the buffer, and sets the
number of indices to decode, `num_idx`. The decoder stops after that count, so
zero padding at the end of the stream is harmless.

## Fixed 16-bit triangle code (`tri_code_decoder`)

Here each triangle is classed by the kind of its three vertices:

* **F**: first use.
* **C**: already in the cache.
* **R**: reloaded after a flush.

The encoder removes the costly cases before it writes the code:

* Three new vertices (FFF) become a degenerate FCC followed by an FFC.
* Two reloads, or a reload offset too large for its field, become a degenerate
  "reload only" triangle (DDR) first.
* A CCC triangle is postponed until one of its vertices is in position 0 or 1,
  so that one position is implied by the label.

That leaves eight labels. With K = 16 the positions take A = 4 bits. Fields are
listed most significant first, after the 3-bit label:

| label | value | payload (13 bits) | triangle | loads into cache copy |
|---|---|---|---|---|
| FFC  | 0 | c0[4], 9 unused | g, g+1, C[c0] | g, g+1 |
| FFR  | 1 | off[13] | g, g+1, R | g, g+1, R |
| FCC  | 2 | c0[4] c1[4], 5 unused | g, C[c0], C[c1] | g |
| FCR  | 3 | c0[4] off[9] | g, C[c0], R | g, R |
| CCR  | 4 | c0[4] d[3] off[6] | C[c0], C[(c0+d+1) mod K], R | R |
| CCC0 | 5 | a[4] b[4], 5 unused | C[0], C[a], C[b] | — |
| CCC1 | 6 | a[4] b[4], 5 unused | C[1], C[a], C[b] | — |
| DDR  | 7 | off[13] | R, R, R (degenerate) | R |

In this table:

* `R = last_R + sign-extended off`. `last_R` is the previous reload, so a
  reload is coded as a small step from the last one.
* Positions always refer to the cache as it was *before* the triangle.
* The loads happen in the order listed, up to three in one cycle.
* CCR has only 2·log2(K)−1 bits for its two positions. Any two distinct
  positions on a ring of K are at most K/2 apart one way round. So the code
  stores the first position and the distance minus one (3 bits at K = 16), and
  the second position is one small adder away.
* The table is written for K = 16. At other K the position fields are
  log2(K) bits wide, and the offsets take the remaining bits. K up to 64 fits
  in 16 bits. An elaboration check rejects larger K.

Decoded vertices come out in label order (new vertices first, then cached, then
reloaded). The code does not carry the original winding. A renderer that culls
back faces would need the encoder to keep orientation some other way.

## Vertex cache (`vertex_cache`) and the top (`geom_decomp_top`)

`vertex_cache` is the tag half of a K-entry post-transform cache with FIFO
replacement:

* It looks up the three vertices of a triangle, one per cycle.
* On a miss it writes the index into the oldest slot, and pulses
  `miss_idx`/`miss_slot`/`miss_valid` as the request to fetch and shade that
  vertex.
* Each triangle leaves with the slot and hit flag of each vertex.
* It counts lookups and misses, so `misses / triangles` is the cache miss
  ratio.

Vertex fetch and shading are not part of this RTL. The shade request port has
no back-pressure.

The decoders' cache copies have the same size K as the vertex cache. The
method only needs them to match the cache size the encoder assumed. But
coherence and compression are best when that is also the real cache size.

`geom_decomp_top` puts both decoders side by side and uses `mode` to pick
which one feeds the vertex cache. Mode 0 takes the Huffman stream on
`in_word`, and mode 1 takes the triangle codes on `in_code`. A `start` pulse
clears everything for a new mesh. Taps (`idx_fire`/`idx_kind`,
`tri_fire`/`tri_label`, `vertices_seen`) show what each decoder produced.

### Timing

* Both decoders produce one index or triangle per cycle once their input keeps
  up.
* The vertex cache takes three cycles per triangle, and it takes the next
  triangle during the last lookup. It therefore sets the throughput of the top.
* Every block uses valid/ready handshakes and registers its output. The one
  exception is `tri_assembler`, which passes the third index of a triangle
  straight through in the cycle it arrives.
* Reset is asynchronous and active low.

## Files

| file | contents |
|---|---|
| `rtl/gec_pkg.sv` | constants (K = 16, 32-bit index, 16-bit code), label and symbol enums |
| `rtl/bit_buffer.sv` | stream word buffer with bit-granular consume |
| `rtl/huff_lut.sv` | 2^HMAX-entry decode table with load port |
| `rtl/index_fifo_cache.sv` | decoder's FIFO copy of the cache, multi-read/multi-load |
| `rtl/index_decoder.sv` | per-index Huffman decoder |
| `rtl/tri_assembler.sv` | three indices → one triangle |
| `rtl/tri_code_decoder.sv` | fixed-length triangle code decoder |
| `rtl/vertex_cache.sv` | FIFO vertex-cache tag store, miss requests, counters |
| `rtl/geom_decomp_top.sv` | the front end |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_workload_run.sv` and `tb_workloads.sv` for the cache-size sweep |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
    --top-module tb_geom_decomp_top rtl/gec_pkg.sv tb/tb_geom_decomp_top.sv
./obj_dir/Vtb_geom_decomp_top
```

Swap in another `tb_*` name to run another test. Each unit testbench passes
its parameters explicitly, at the default values. `tb_geom_decomp_top` runs
the top exactly as built. `tb_workloads` takes about half a minute; the other
tests take seconds.

### End-to-end test

`tb_geom_decomp_top` plays the software side and then checks the hardware.

**Building and encoding the mesh.**
* It builds a 21 × 20 vertex grid: 420 vertices, 760 triangles.
* It orders the grid like a cache-aware preprocessor would. The columns are
  cut into strips six cells wide, and each strip is walked row by row.
* It encodes the mesh in both formats. For the fixed-length format it also
  inserts the degenerate triangles, and it appends a short tail of random
  triangles so that every label occurs.

**Running and checking.**
* The streams are decoded in mode 0, then mode 1, then mode 0 again, with
  random stalls on every port.
* Every triangle, hit flag, cache slot and shade request is checked against
  reference models.
* The real (non-degenerate) triangles of the fixed-length run must be the mesh.
* The test counts each mechanism: each symbol kind, each label, hits, misses,
  input and output stalls, and mode switches. Each one must occur at least
  once.

On this grid the Huffman stream averages 4.29 bits per index, and the vertex
cache misses 0.632 times per triangle.

### Workload test at four cache sizes

`tb_workloads` runs the same flow at cache sizes 8, 16, 32 and 64, four
instances of `tb_workload_run` side by side.

* **Mesh.** An 81 × 80 grid: 6,480 vertices and 12,640 triangles.
* **Ordering.** Strips are K/2 − 2 cells wide, so that two rows of a strip fit
  in the cache.
* **Huffman code.** Built from the real symbol counts of each run, with
  lengths capped at log2(K)+1.
* **Checks.** Every decoded triangle is checked in both formats.

Results:

| K | misses / triangle | Huffman bits / index | extra triangles in the 16-bit code |
|---|---|---|---|
| 8  | 0.759 | 4.16 | 48 % |
| 16 | 0.595 | 3.91 | 16 % |
| 32 | 0.544 | 4.16 | 6.2 % |
| 64 | 0.525 | 4.56 | 3.5 % |

For comparison, the method's published figures at K = 16 on real scanned and
CAD models are:

* 0.57–0.61 misses per triangle;
* 4.5–4.8 bits per index;
* fewer than 5 % degenerate triangles.

The miss ratio and the bits per index here are close to those. The degenerate
overhead is higher because the test encoder is deliberately minimal:

* it never postpones a CCC triangle until one of its vertices reaches the
  front of the FIFO;
* it falls back to a degenerate reload instead.

The hardware is not the cause: it decodes whatever the encoder emits.

The unit testbenches also check the rates this design promises:

* One index per cycle for `index_decoder`.
* One triangle per cycle for `tri_code_decoder`.
* Three cycles per triangle for `vertex_cache`.

## What is this design's own choice

The symbol set, the decoding steps, the 2^h_max table, the 16-bit code with a
3-bit case field, the eight labels, the field widths for the two positions of
CCR, and K = 16 follow the method. The following are this implementation's
choices, because the method leaves them open:

* the numeric label values and the field order inside the 16-bit code;
* the circular-distance packing of the CCR pair;
* signed reload offsets;
* the load order within a triangle;
* the reload field of the Huffman stream being ceil(log2 g) bits wide;
* the stream word format and the end-of-mesh count;
* the 32-bit vertex index;
* the tag-only vertex cache and its one-lookup-per-cycle timing;
* all handshakes.

One point in the method is ambiguous: whether an FFR triangle counts as three
cache loads. The decoder allows three loads per triangle, so it decodes that
case either way.

Two things are not built:

* **The offline reordering and encoding.** The testbench holds a minimal
  encoder for testing, not the full chain-and-cut ordering.
* **Variable-length coding of whole triangles.** No symbol table or decoding
  rule is defined for it.
