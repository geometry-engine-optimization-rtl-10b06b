// bit_buffer: front end of the variable-length decoder.
//
// The compressed stream arrives as WORD_W-bit words, first bit in the most
// significant position. The buffer keeps the not yet used bits left aligned in
// a register and shows the next PEEK_W of them (zero filled past the end).
// The decoder reads a fixed-size window, works out how many bits the symbol
// really used, and drops only those: the remaining bits stay in the buffer,
// which is how "pushing the extra bits back" is done in hardware.
//
// Interface: words in with valid/ready and a last flag; peek, avail (valid bit
// count) and last_seen out; consume/consume_n drop bits in the same cycle as
// a word may be accepted. A word is accepted when it fits after this cycle's
// consumption. clear empties the buffer. The word width and buffer size are
// this design's choices; the document gives only the read-decode-push back
// steps.
module bit_buffer #(
  parameter int unsigned WORD_W = 32,
  parameter int unsigned PEEK_W = 37,
  localparam int unsigned BUF_W = PEEK_W + WORD_W,
  localparam int unsigned AW    = $clog2(BUF_W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [WORD_W-1:0] in_word,
  input  logic              in_last,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [PEEK_W-1:0] peek,
  output logic [AW-1:0]     avail,
  output logic              last_seen,
  input  logic              consume,
  input  logic [AW-1:0]     consume_n
);

  logic [BUF_W-1:0] buf_q;
  logic [AW-1:0]    avail_q;
  logic             last_q;

  logic [BUF_W-1:0] buf_shift;
  logic [AW-1:0]    avail_after;
  logic             take;

  assign peek      = buf_q[BUF_W-1 -: PEEK_W];
  assign avail     = avail_q;
  assign last_seen = last_q;

  always_comb begin
    buf_shift   = consume ? (buf_q << consume_n) : buf_q;
    avail_after = consume ? (avail_q - consume_n) : avail_q;
  end

  assign in_ready = !last_q && (int'(avail_after) + int'(WORD_W) <= int'(BUF_W));
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q   <= '0;
      avail_q <= '0;
      last_q  <= 1'b0;
    end else if (clear) begin
      buf_q   <= '0;
      avail_q <= '0;
      last_q  <= 1'b0;
    end else begin
      if (take) begin
        buf_q   <= buf_shift | (BUF_W'(in_word) << (BUF_W - WORD_W - int'(avail_after)));
        avail_q <= avail_after + AW'(WORD_W);
        last_q  <= in_last;
      end else begin
        buf_q   <= buf_shift;
        avail_q <= avail_after;
      end
    end
  end

  // A decoder may never drop more bits than the buffer holds.
  assert property (@(posedge clk) disable iff (!rst_n) consume |-> consume_n <= avail_q)
    else $error("bit_buffer: consumed more bits than available");

endmodule
