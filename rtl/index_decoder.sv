// index_decoder: decompressor for the per-index Huffman coded triangle list.
//
// Each vertex index of the triangle list is coded as one of K+2 symbols:
// symbols 0..K-1 say "the vertex sits in cache position S", symbol K says
// "first use of a new vertex" and symbol K+1 says "a vertex reloaded after a
// flush", followed by its index in ceil(log2(g)) bits. Vertices are numbered in
// the order of their first use, so a first use is simply the running counter g.
// Per symbol the decoder
//   1. looks at the next HMAX stream bits (bit_buffer),
//   2. finds symbol ID and code length in the 2^HMAX-entry table (huff_lut) and
//      drops only the code's own bits,
//   3. S < K: outputs the index held in cache position S,
//   4. S = K: outputs g and increments g,
//   5. S = K+1: outputs the next ceil(log2(g)) bits as the index.
// A first use or a reload is a cache miss and loads the index into the private
// FIFO copy of the cache (index_fifo_cache); a hit leaves the FIFO as it is.
//
// Interface: start clears g, the cache copy and the bit buffer and sets the
// number of indices to decode (num_idx); table write port; stream words with
// valid/ready/last; one decoded index per cycle out with valid/ready, tagged
// with its symbol kind. done is high once num_idx indices have been output.
// Timing: the output is registered; with words arriving fast enough one index
// is decoded every cycle.
//
// Steps 1-5, the table and g follow the document. The start/count control,
// the stream word format and the ceil(log2(g)) width of a reload field (the
// document writes log(g)) are this design's reading.
module index_decoder
  import gec_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned HMAX   = 5,
  parameter int unsigned IDX_W  = IDX_W_DEF,
  parameter int unsigned WORD_W = 32,
  localparam int unsigned SW    = $clog2(K + 2),
  localparam int unsigned LW    = $clog2(HMAX + 1),
  localparam int unsigned PW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned PEEK_W = HMAX + IDX_W,
  localparam int unsigned AW    = $clog2(PEEK_W + WORD_W + 1),
  localparam int unsigned RW    = $clog2(IDX_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W-1:0]  num_idx,
  // code table load
  input  logic              lut_we,
  input  logic [HMAX-1:0]   lut_addr,
  input  logic [SW-1:0]     lut_sym,
  input  logic [LW-1:0]     lut_len,
  // compressed stream
  input  logic [WORD_W-1:0] in_word,
  input  logic              in_last,
  input  logic              in_valid,
  output logic              in_ready,
  // decoded indices
  output logic [IDX_W-1:0]  out_idx,
  output sym_kind_e         out_kind,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              done,
  output logic [IDX_W-1:0]  g_count
);

  logic [PEEK_W-1:0] peek;
  logic [AW-1:0]     avail;
  logic              last_seen;
  logic              consume;
  logic [AW-1:0]     consume_n;

  bit_buffer #(.WORD_W(WORD_W), .PEEK_W(PEEK_W)) u_buf (
    .clk, .rst_n, .clear(start),
    .in_word, .in_last, .in_valid, .in_ready,
    .peek, .avail, .last_seen, .consume, .consume_n
  );

  logic [SW-1:0] sym;
  logic [LW-1:0] len;

  huff_lut #(.K(K), .HMAX(HMAX)) u_lut (
    .clk, .we(lut_we), .waddr(lut_addr), .wsym(lut_sym), .wlen(lut_len),
    .raddr(peek[PEEK_W-1 -: HMAX]), .rsym(sym), .rlen(len)
  );

  logic [PW-1:0]    rd_pos  [1];
  logic [IDX_W-1:0] rd_data [1];
  logic [0:0]       push_cnt;
  logic [IDX_W-1:0] push_data [1];

  index_fifo_cache #(.K(K), .IDX_W(IDX_W), .NRD(1), .NPUSH(1)) u_cache (
    .clk, .rst_n, .clear(start),
    .rd_pos, .rd_data, .push_cnt, .push_data
  );

  logic [IDX_W-1:0] g_q;
  logic [IDX_W-1:0] remaining_q;

  // ceil(log2(g)): width of a reload field
  logic [RW-1:0] rbits;
  always_comb begin
    logic [IDX_W-1:0] gm1;
    gm1   = g_q - 1'b1;
    rbits = '0;
    if (g_q > 1)
      for (int i = 0; i < IDX_W; i++)
        if (gm1[i]) rbits = RW'(i + 1);
  end

  logic              is_hit, is_first, is_reload;
  logic [AW-1:0]     need;
  logic [PEEK_W-1:0] after_code;  // low HMAX bits never hold a reload field
  logic [IDX_W-1:0]  reload_idx;
  logic              can_decode, fire;

  always_comb begin
    is_hit    = int'(sym) < int'(K);
    is_first  = int'(sym) == int'(K);
    is_reload = int'(sym) == int'(K) + 1;
    need      = AW'(len) + (is_reload ? AW'(rbits) : AW'(0));
    after_code = peek << len;
    reload_idx = after_code[PEEK_W-1 -: IDX_W] >> (IDX_W - int'(rbits));
    rd_pos[0]  = sym[PW-1:0];
    can_decode = (remaining_q != '0) && (len != '0) &&
                 (int'(avail) >= int'(HMAX) || last_seen) && (avail >= need);
    fire       = can_decode && (!out_valid || out_ready);
    consume    = fire;
    consume_n  = need;
    push_cnt   = (fire && !is_hit) ? 1'b1 : 1'b0;
    push_data[0] = is_first ? g_q : reload_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_q         <= '0;
      remaining_q <= '0;
      out_valid   <= 1'b0;
      out_idx     <= '0;
      out_kind    <= SYM_HIT;
    end else if (start) begin
      g_q         <= '0;
      remaining_q <= num_idx;
      out_valid   <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        out_valid   <= 1'b1;
        remaining_q <= remaining_q - 1'b1;
        if (is_hit) begin
          out_idx  <= rd_data[0];
          out_kind <= SYM_HIT;
        end else if (is_first) begin
          out_idx  <= g_q;
          out_kind <= SYM_FIRST;
          g_q      <= g_q + 1'b1;
        end else begin
          out_idx  <= reload_idx;
          out_kind <= SYM_RELOAD;
        end
      end
    end
  end

  assign done    = (remaining_q == '0) && !out_valid;
  assign g_count = g_q;

  // Symbol IDs above K+1 do not exist; a reload can only name a vertex already seen.
  assert property (@(posedge clk) disable iff (!rst_n) fire |-> int'(sym) <= int'(K) + 1)
    else $error("index_decoder: invalid symbol ID");
  assert property (@(posedge clk) disable iff (!rst_n) (fire && is_reload) |-> g_q != '0)
    else $error("index_decoder: reload before any vertex was seen");

endmodule
