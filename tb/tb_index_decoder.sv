// tb_index_decoder: self-checking test of the per-index Huffman decoder.
//
// The testbench plays the encoder. It builds a canonical length-limited
// Huffman code for the K+2 symbols, loads its decoding table, draws a random
// sequence of symbols (cache hits at random positions, first uses, reloads of
// already seen vertices), keeps its own FIFO model of the cache to know which
// index each symbol stands for, and packs the codes MSB first into 32-bit
// words. The decoder's indices and symbol kinds are compared with that model,
// under random input and output stalls, over several meshes (start between
// them). A final unstalled mesh checks the rate of one index per cycle.
module tb_index_decoder;
  import gec_pkg::*;

  localparam int K = 16, HMAX = 5, IDX_W = 32, WORD_W = 32;
  localparam int SW = $clog2(K + 2), LW = $clog2(HMAX + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start;
  logic [IDX_W-1:0]  num_idx;
  logic              lut_we;
  logic [HMAX-1:0]   lut_addr;
  logic [SW-1:0]     lut_sym;
  logic [LW-1:0]     lut_len;
  logic [WORD_W-1:0] in_word;
  logic              in_last, in_valid, in_ready;
  logic [IDX_W-1:0]  out_idx;
  sym_kind_e         out_kind;
  logic              out_valid, out_ready, done;
  logic [IDX_W-1:0]  g_count;

  index_decoder #(.K(K), .HMAX(HMAX), .IDX_W(IDX_W), .WORD_W(WORD_W)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- code: lengths chosen so that sum 2^-len = 1 ----
  int code_len [K+2];
  int code_val [K+2];
  task automatic build_code();
    int c = 0;
    for (int s = 0; s < K + 2; s++)
      code_len[s] = (s == K) ? 2 : (s == K + 1) ? 4 : (s < 6) ? 4 : 5;
    for (int l = 1; l <= HMAX; l++) begin
      for (int s = 0; s < K + 2; s++)
        if (code_len[s] == l) begin code_val[s] = c; c++; end
      c = c << 1;
    end
  endtask

  task automatic load_lut();
    for (int s = 0; s < K + 2; s++)
      for (int t = 0; t < (1 << (HMAX - code_len[s])); t++) begin
        @(negedge clk);
        lut_we   = 1;
        lut_addr = HMAX'((code_val[s] << (HMAX - code_len[s])) + t);
        lut_sym  = SW'(s);
        lut_len  = LW'(code_len[s]);
      end
    @(negedge clk);
    lut_we = 0;
  endtask

  // ---- encoder-side model ----
  bit              bits [$];
  logic [IDX_W-1:0] exp_idx [$];
  sym_kind_e        exp_kind [$];

  function automatic int clog2i(int n);
    int b = 0;
    while ((1 << b) < n) b++;
    return b;
  endfunction

  task automatic put_bits(int val, int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(bit'((val >> i) & 1));
  endtask

  task automatic make_mesh(int n);
    logic [IDX_W-1:0] fifo [K];
    int g = 0;
    bits.delete(); exp_idx.delete(); exp_kind.delete();
    for (int i = 0; i < K; i++) fifo[i] = '0;
    for (int i = 0; i < n; i++) begin
      int r = $urandom_range(0, 99);
      if (r < 30 || g == 0) begin          // first use
        put_bits(code_val[K], code_len[K]);
        exp_idx.push_back(g); exp_kind.push_back(SYM_FIRST);
        for (int j = 0; j < K - 1; j++) fifo[j] = fifo[j+1];
        fifo[K-1] = g; g++;
      end else if (r < 40) begin           // reload
        int v = $urandom_range(0, g - 1);
        put_bits(code_val[K+1], code_len[K+1]);
        put_bits(v, clog2i(g));
        exp_idx.push_back(v); exp_kind.push_back(SYM_RELOAD);
        for (int j = 0; j < K - 1; j++) fifo[j] = fifo[j+1];
        fifo[K-1] = v;
      end else begin                       // hit at position p
        int p = $urandom_range(0, K - 1);
        put_bits(code_val[p], code_len[p]);
        exp_idx.push_back(fifo[p]); exp_kind.push_back(SYM_HIT);
      end
    end
  endtask

  int stall_pct;

  task automatic send_stream();
    int nw = (bits.size() + WORD_W - 1) / WORD_W;
    for (int w = 0; w < nw; w++) begin
      logic [WORD_W-1:0] word = '0;
      for (int b = 0; b < WORD_W; b++)
        if (w * WORD_W + b < bits.size()) word[WORD_W-1-b] = bits[w * WORD_W + b];
      @(negedge clk);
      while ($urandom_range(0, 99) < stall_pct) begin in_valid = 0; @(negedge clk); end
      in_word = word; in_last = (w == nw - 1); in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
  endtask

  int got;
  task automatic collect(int n);
    got = 0;
    while (got < n) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 99) >= stall_pct);
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_idx !== exp_idx[got] || out_kind !== exp_kind[got]) begin
          failures++;
          if (failures < 10)
            $display("mismatch at %0d: got %0d/%s exp %0d/%s", got, out_idx, out_kind.name(),
                     exp_idx[got], exp_kind[got].name());
        end
        got++;
      end
    end
  endtask

  task automatic run_mesh(int n);
    make_mesh(n);
    @(negedge clk);
    start = 1; num_idx = n;
    @(negedge clk);
    start = 0;
    fork
      send_stream();
      collect(n);
    join
    repeat (3) @(posedge clk);
    checks++;
    if (!done || out_valid) begin failures++; $display("done not reached"); end
  endtask

  initial begin
    start = 0; num_idx = 0; lut_we = 0; lut_addr = 0; lut_sym = 0; lut_len = 0;
    in_word = 0; in_last = 0; in_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_code();
    load_lut();
    stall_pct = 30;
    for (int m = 0; m < 4; m++) run_mesh(300 + 100 * m);
    // Rate: no stalls, long enough for the word input to keep up.
    begin
      int t0, t1;
      stall_pct = 0;
      make_mesh(200);
      @(negedge clk);
      start = 1; num_idx = 200;
      @(negedge clk);
      start = 0;
      fork
        send_stream();
        begin
          t0 = cycle;
          collect(200);
          t1 = cycle;
        end
      join
      checks++;
      // Input supplies 32 bits per cycle and a symbol averages under 5 bits,
      // so the decoder must sustain one index per cycle (plus start-up).
      if (t1 - t0 > 200 + 8) begin
        failures++;
        $display("rate: %0d cycles for 200 indices", t1 - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
