// huff_lut: decoding table of the per-index Huffman code.
//
// Because a Huffman code is prefix free, the next HMAX bits of the stream
// select exactly one table entry, and every entry whose address starts with a
// codeword of length L holds that codeword's symbol ID and L. The table
// therefore has 2^HMAX entries and decodes one symbol per lookup.
// Symbol IDs: 0..K-1 name a cache position, K a first use, K+1 a reload.
//
// Interface: a synchronous write port (one entry per cycle, loaded by the host
// before a mesh is decoded, since the code is built per model) and one
// combinational read port addressed by the next HMAX stream bits.
// Table size and contents follow the document; the load port is this design's
// own choice.
module huff_lut #(
  parameter int unsigned K    = 16,
  parameter int unsigned HMAX = 5,
  localparam int unsigned SW  = $clog2(K + 2),
  localparam int unsigned LW  = $clog2(HMAX + 1)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [HMAX-1:0] waddr,
  input  logic [SW-1:0]   wsym,
  input  logic [LW-1:0]   wlen,
  input  logic [HMAX-1:0] raddr,
  output logic [SW-1:0]   rsym,
  output logic [LW-1:0]   rlen
);

  typedef struct packed {
    logic [SW-1:0] sym;
    logic [LW-1:0] len;
  } entry_t;

  entry_t table_q [2**HMAX];

  always_ff @(posedge clk) begin
    if (we) table_q[waddr] <= '{sym: wsym, len: wlen};
  end

  assign rsym = table_q[raddr].sym;
  assign rlen = table_q[raddr].len;

endmodule
