// tb_bit_buffer: self-checking test of the stream bit buffer.
//
// Random 32-bit words are offered with random gaps; each cycle a random number
// of bits (never more than are held, at most the peek width) is consumed. A bit
// queue model gives the expected peek window (zero filled past the end) and
// count. The last word must close the input until the next clear.
module tb_bit_buffer;
  localparam int WORD_W = 32, PEEK_W = 37, BUF_W = PEEK_W + WORD_W;
  localparam int AW = $clog2(BUF_W + 1);
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;

  logic [WORD_W-1:0] in_word;
  logic in_last, in_valid, in_ready, last_seen, consume;
  logic [PEEK_W-1:0] peek;
  logic [AW-1:0] avail, consume_n;

  bit_buffer #(.WORD_W(WORD_W), .PEEK_W(PEEK_W)) dut (.*);

  int checks = 0, failures = 0;
  bit q [$];
  int words_sent = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_word = 0; in_last = 0; in_valid = 0; consume = 0; consume_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      logic [PEEK_W-1:0] exp;
      @(negedge clk);
      // check state
      exp = '0;
      for (int b = 0; b < PEEK_W; b++) if (b < q.size()) exp[PEEK_W-1-b] = q[b];
      checks++;
      if (peek !== exp || int'(avail) != q.size()) begin
        failures++;
        if (failures < 5) $display("it %0d: peek %h exp %h avail %0d exp %0d", it, peek, exp, avail, q.size());
      end
      // drive
      in_valid = ($urandom_range(0, 99) < 60) && words_sent < 1000;
      in_word  = $urandom;
      in_last  = (words_sent == 999);
      consume  = $urandom_range(0, 99) < 70;
      consume_n = AW'($urandom_range(0, (q.size() < PEEK_W) ? q.size() : PEEK_W));
      @(posedge clk);
      #1;
      // update model (ready is computed before the edge, from pre-edge state)
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model update sampled on the clock edge.
  always @(posedge clk) if (rst_n) begin
    automatic bit do_take = in_valid && in_ready;
    if (consume) for (int i = 0; i < consume_n; i++) void'(q.pop_front());
    if (do_take) begin
      for (int b = WORD_W - 1; b >= 0; b--) q.push_back(in_word[b]);
      words_sent++;
      if (in_last) begin
        checks++;
        // in_ready must drop once the last word is in
        fork begin
          @(negedge clk);
          if (in_ready !== 1'b0 || last_seen !== 1'b1) failures++;
        end join_none
      end
    end
  end
endmodule
