// gec_pkg: constants and types shared by the topology decompression blocks.
//
// The vertex cache holds K_DEF = 16 entries, the size for which the mesh
// ordering is tuned and results are quoted. A fixed-length triangle code is
// CODE_W = 16 bits; its three most significant bits are a label that selects
// one of eight case decoders. The label names follow the symbol notation of
// the coding scheme: F = first use of a vertex, C = vertex already in the
// cache, R = vertex reloaded after a flush, D = degenerate filler. The
// numeric value of each label is this design's own choice.
package gec_pkg;

  parameter int K_DEF     = 16;  // vertex cache entries
  parameter int IDX_W_DEF = 32;  // vertex index width
  parameter int CODE_W    = 16;  // fixed-length triangle code width
  parameter int LABEL_W   = 3;   // case label at the top of the code

  typedef enum logic [LABEL_W-1:0] {
    L_FFC  = 3'd0,  // two new vertices, one cached
    L_FFR  = 3'd1,  // two new vertices, one reloaded
    L_FCC  = 3'd2,  // one new vertex, two cached
    L_FCR  = 3'd3,  // one new, one cached, one reloaded
    L_CCR  = 3'd4,  // two cached (packed pair), one reloaded
    L_CCC0 = 3'd5,  // three cached, one of them in FIFO position 0
    L_CCC1 = 3'd6,  // three cached, one of them in FIFO position 1
    L_DDR  = 3'd7   // degenerate triangle that only reloads a vertex
  } tri_label_e;

  // Kind of a decoded index in the per-index Huffman scheme.
  typedef enum logic [1:0] {
    SYM_HIT    = 2'd0,  // read from a cache position
    SYM_FIRST  = 2'd1,  // first use: value of the running counter g
    SYM_RELOAD = 2'd2   // explicit index after a flush
  } sym_kind_e;

  // Number of bits needed to hold values 0..n-1 (0 for n <= 1).
  function automatic int unsigned bits_for(input longint unsigned n);
    int unsigned b = 0;
    while ((longint'(1) << b) < n) b++;
    return b;
  endfunction

endpackage
