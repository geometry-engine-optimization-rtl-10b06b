// geom_decomp_top: topology decompression front end of a geometry engine.
//
// A mesh is sent to the graphics hardware as a compressed, cache-coherent
// triangle list in one of two formats, chosen per mesh with `mode`:
//   mode 0: per-index Huffman stream. index_decoder turns the bit stream into
//           vertex indices, tri_assembler groups them three at a time.
//   mode 1: one 16-bit code per triangle. tri_code_decoder turns each code
//           into a triangle directly.
// Either way the triangles then go through the post-transform FIFO vertex
// cache (vertex_cache), which reports for every vertex whether its shaded
// result can be reused or must be fetched and shaded again. Vertex fetch and
// shading are outside this block: each miss is brought out as a request
// (miss_*), and the triangles leave with the cache slot of each vertex.
//
// Interface: start (one cycle) clears both decoders and the vertex cache and
// latches num_idx (number of indices, three per triangle, for mode 0). The
// Huffman table is loaded through lut_*; mode 0 reads in_word/in_last with
// valid/ready, mode 1 reads in_code with valid/ready. Triangles leave on
// tri_* with valid/ready. lookups and misses count vertex-cache accesses.
// Timing: the vertex cache takes three cycles per triangle and sets the peak
// rate; both decoders produce one index or triangle per cycle.
//
// The two formats, the decoders and the FIFO vertex cache are the document's;
// the mode input, the port set and the counters are this design's choices.
module geom_decomp_top
  import gec_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned HMAX   = 5,
  parameter int unsigned IDX_W  = IDX_W_DEF,
  parameter int unsigned WORD_W = 32,
  localparam int unsigned SW    = $clog2(K + 2),
  localparam int unsigned LW    = $clog2(HMAX + 1),
  localparam int unsigned SLW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              mode,
  input  logic [IDX_W-1:0]  num_idx,
  // Huffman table load
  input  logic              lut_we,
  input  logic [HMAX-1:0]   lut_addr,
  input  logic [SW-1:0]     lut_sym,
  input  logic [LW-1:0]     lut_len,
  // mode 0: compressed index stream
  input  logic [WORD_W-1:0] in_word,
  input  logic              in_last,
  input  logic              in_valid,
  output logic              in_ready,
  // mode 1: fixed-length triangle codes
  input  logic [CODE_W-1:0] in_code,
  input  logic              code_valid,
  output logic              code_ready,
  // triangles with vertex-cache slots
  output logic [IDX_W-1:0]  tri_v    [3],
  output logic [SLW-1:0]    tri_slot [3],
  output logic [2:0]        tri_hit,
  output logic              tri_valid,
  input  logic              tri_ready,
  // shade requests for vertex-cache misses
  output logic [IDX_W-1:0]  miss_idx,
  output logic [SLW-1:0]    miss_slot,
  output logic              miss_valid,
  // status and per-symbol taps
  output logic              idx_done,
  output logic [IDX_W-1:0]  vertices_seen,  // running counter g of the active decoder
  output logic              idx_fire,       // mode 0: an index left the decoder
  output sym_kind_e         idx_kind,       //   and how it was coded
  output logic              tri_fire,       // mode 1: a triangle left the decoder
  output tri_label_e        tri_label,      //   and its label
  output logic [31:0]       lookups,
  output logic [31:0]       misses
);

  // ---- mode 0: per-index Huffman path ----
  logic [IDX_W-1:0] dec_idx;
  sym_kind_e        dec_kind;
  logic             dec_valid, dec_ready;
  logic [IDX_W-1:0] dec_g;
  logic             in_valid_m, in_ready_dec;

  assign in_valid_m = in_valid && !mode;

  index_decoder #(.K(K), .HMAX(HMAX), .IDX_W(IDX_W), .WORD_W(WORD_W)) u_idx_dec (
    .clk, .rst_n, .start, .num_idx,
    .lut_we, .lut_addr, .lut_sym, .lut_len,
    .in_word, .in_last, .in_valid(in_valid_m), .in_ready(in_ready_dec),
    .out_idx(dec_idx), .out_kind(dec_kind), .out_valid(dec_valid), .out_ready(dec_ready),
    .done(idx_done), .g_count(dec_g)
  );

  assign in_ready = in_ready_dec && !mode;   // stream is only taken in mode 0

  logic [IDX_W-1:0] asm_v [3];
  logic             asm_valid, asm_ready;

  tri_assembler #(.IDX_W(IDX_W)) u_asm (
    .clk, .rst_n, .clear(start),
    .in_idx(dec_idx), .in_valid(dec_valid), .in_ready(dec_ready),
    .tri_v(asm_v), .tri_valid(asm_valid), .tri_ready(asm_ready)
  );

  // ---- mode 1: fixed-length triangle code path ----
  logic [IDX_W-1:0] tc_v [3];
  tri_label_e       tc_label;
  logic             tc_valid, tc_ready, tc_in_ready;
  logic [IDX_W-1:0] tc_g;

  tri_code_decoder #(.K(K), .IDX_W(IDX_W)) u_tri_dec (
    .clk, .rst_n, .start,
    .in_code, .in_valid(code_valid && mode), .in_ready(tc_in_ready),
    .tri_v(tc_v), .tri_label(tc_label), .tri_valid(tc_valid), .tri_ready(tc_ready),
    .g_count(tc_g)
  );
  assign code_ready = tc_in_ready && mode;

  assign vertices_seen = mode ? tc_g : dec_g;
  assign idx_fire      = dec_valid && dec_ready;
  assign idx_kind      = dec_kind;
  assign tri_fire      = tc_valid && tc_ready;
  assign tri_label     = tc_label;

  // ---- mode select into the vertex cache ----
  logic [IDX_W-1:0] vc_in_v [3];
  logic             vc_in_valid, vc_in_ready;

  always_comb begin
    vc_in_v     = mode ? tc_v : asm_v;
    vc_in_valid = mode ? tc_valid : asm_valid;
  end
  assign asm_ready = vc_in_ready && !mode;
  assign tc_ready  = vc_in_ready && mode;

  vertex_cache #(.K(K), .IDX_W(IDX_W)) u_vcache (
    .clk, .rst_n, .clear(start),
    .in_v(vc_in_v), .in_valid(vc_in_valid), .in_ready(vc_in_ready),
    .out_v(tri_v), .out_slot(tri_slot), .out_hit(tri_hit),
    .out_valid(tri_valid), .out_ready(tri_ready),
    .miss_idx, .miss_slot, .miss_valid, .lookups, .misses
  );

  // Handshake rules at the top's ports: a triangle offered on the output stays
  // offered, unchanged, until it is taken; a shade request names a real slot.
  assert property (@(posedge clk) disable iff (!rst_n || start)
                   (tri_valid && !tri_ready) |=> (tri_valid && $stable(tri_v[0]) && $stable(tri_v[1]) && $stable(tri_v[2]) &&
                    $stable(tri_slot[0]) && $stable(tri_slot[1]) && $stable(tri_slot[2])))
    else $error("geom_decomp_top: output triangle changed while stalled");
  assert property (@(posedge clk) disable iff (!rst_n)
                   miss_valid |-> int'(miss_slot) < int'(K))
    else $error("geom_decomp_top: shade request for a slot outside the cache");

endmodule
