// tb_workload_run: one cache-size configuration of the workload test.
//
// It instantiates the decompression front end with a K-entry cache, builds a
// GW x GH grid mesh, orders it in strips of STRIP cells (narrow enough that two
// rows of a strip fit the cache), renumbers the vertices by first use and
// encodes the triangle list twice: per index with a Huffman code built from
// the actual symbol counts (lengths limited to HMAX = log2(K) + 1), and as
// 16-bit triangle codes with the degenerate triangles the fixed-length scheme
// needs. Both streams are decoded; every triangle is compared with the
// expected list and the vertex-cache counters with a FIFO reference. It
// reports bits per index, bits per triangle and vertex-cache misses per
// triangle, and raises `finished` with its check and failure counts.
module tb_workload_run
  import gec_pkg::*;
#(
  parameter int K = 16,
  parameter int GW = 21,
  parameter int GH = 20,
  parameter int STRIP = 6
) (
  output bit finished,
  output int checks,
  output int failures
);
  localparam int HMAX = $clog2(K) + 1, IDX_W = IDX_W_DEF, WORD_W = 32;
  localparam int A = $clog2(K), P = CODE_W - LABEL_W;
  localparam int SW = $clog2(K + 2), LW = $clog2(HMAX + 1), SLW = $clog2(K);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start, mode;
  logic [IDX_W-1:0]  num_idx;
  logic              lut_we;
  logic [HMAX-1:0]   lut_addr;
  logic [SW-1:0]     lut_sym;
  logic [LW-1:0]     lut_len;
  logic [WORD_W-1:0] in_word;
  logic              in_last, in_valid, in_ready;
  logic [CODE_W-1:0] in_code;
  logic              code_valid, code_ready;
  logic [IDX_W-1:0]  tri_v [3];
  logic [SLW-1:0]    tri_slot [3];
  logic [2:0]        tri_hit;
  logic              tri_valid, tri_ready;
  logic [IDX_W-1:0]  miss_idx;
  logic [SLW-1:0]    miss_slot;
  logic              miss_valid, idx_done;
  logic [IDX_W-1:0]  vertices_seen;
  logic              idx_fire, tri_fire;
  sym_kind_e         idx_kind;
  tri_label_e        tri_label;
  logic [31:0]       lookups, misses;

  geom_decomp_top #(.K(K), .HMAX(HMAX)) dut (.*);

  // ---------------- mesh ----------------
  int mesh [$][3];       // renumbered triangles in issue order
  int nverts;

  task automatic build_mesh();
    int ren [GW * GH];
    int g = 0;
    for (int i = 0; i < GW * GH; i++) ren[i] = -1;
    for (int s0 = 0; s0 < GW - 1; s0 += STRIP)
      for (int r = 0; r < GH - 1; r++)
        for (int c = s0; c < s0 + STRIP && c < GW - 1; c++) begin
          int a = r * GW + c, b = a + 1, d = a + GW, e = d + 1;
          int t1 [3] = '{a, d, b};
          int t2 [3] = '{b, d, e};
          for (int j = 0; j < 3; j++) if (ren[t1[j]] < 0) ren[t1[j]] = g++;
          mesh.push_back('{ren[t1[0]], ren[t1[1]], ren[t1[2]]});
          for (int j = 0; j < 3; j++) if (ren[t2[j]] < 0) ren[t2[j]] = g++;
          mesh.push_back('{ren[t2[0]], ren[t2[1]], ren[t2[2]]});
        end
    nverts = g;
  endtask

  // ---------------- per-index Huffman encoding ----------------
  int code_len [K+2], code_val [K+2];
  bit bits [$];

  // Huffman code from the symbol counts, lengths limited to HMAX.
  task automatic build_code(int cnt [K+2]);
    int w [$], grp [$][$];
    int c = 0;
    real kraft;
    for (int s = 0; s < K + 2; s++) begin
      code_len[s] = 0;
      w.push_back(cnt[s] + 1);
      grp.push_back('{s});
    end
    while (w.size() > 1) begin
      int a = 0, b = 1, nw;
      int ng [$];
      if (w[b] < w[a]) begin a = 1; b = 0; end
      for (int i = 2; i < w.size(); i++)
        if (w[i] < w[a]) begin b = a; a = i; end
        else if (w[i] < w[b]) b = i;
      nw = w[a] + w[b];
      ng = {grp[a], grp[b]};
      foreach (ng[i]) code_len[ng[i]]++;
      if (a > b) begin w.delete(a); grp.delete(a); w.delete(b); grp.delete(b); end
      else begin w.delete(b); grp.delete(b); w.delete(a); grp.delete(a); end
      w.push_back(nw); grp.push_back(ng);
    end
    // clamp to HMAX, then lengthen the shortest codes until the Kraft sum fits
    for (int s = 0; s < K + 2; s++) if (code_len[s] > HMAX) code_len[s] = HMAX;
    forever begin
      int best = -1;
      kraft = 0;
      for (int s = 0; s < K + 2; s++) kraft += 1.0 / real'(1 << code_len[s]);
      if (kraft <= 1.0) break;
      for (int s = 0; s < K + 2; s++)
        if (code_len[s] < HMAX && (best < 0 || code_len[s] > code_len[best])) best = s;
      code_len[best]++;
    end
    for (int l = 1; l <= HMAX; l++) begin
      for (int s = 0; s < K + 2; s++)
        if (code_len[s] == l) begin code_val[s] = c; c++; end
      c = c << 1;
    end
  endtask

  task automatic put_bits(int val, int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(bit'((val >> i) & 1));
  endtask

  function automatic int clog2i(int n);
    int b = 0;
    while ((1 << b) < n) b++;
    return b;
  endfunction

  task automatic encode_huffman(bit count_only, ref int cnt [K+2]);
    int fifo [$];
    int g = 0;
    bits.delete();
    for (int s = 0; s < K + 2; s++) cnt[s] = 0;
    for (int i = 0; i < K; i++) fifo.push_back(0);
    foreach (mesh[t]) for (int j = 0; j < 3; j++) begin
      int v = mesh[t][j], pos = -1;
      for (int p = 0; p < K; p++) if (fifo[p] == v && v < g) pos = p;
      if (v == g) begin
        cnt[K]++;
        if (!count_only) put_bits(code_val[K], code_len[K]);
        void'(fifo.pop_front()); fifo.push_back(v); g++;
      end else if (pos >= 0) begin
        cnt[pos]++;
        if (!count_only) put_bits(code_val[pos], code_len[pos]);
      end else begin
        cnt[K+1]++;
        if (!count_only) begin
          put_bits(code_val[K+1], code_len[K+1]);
          put_bits(v, clog2i(g));
        end
        void'(fifo.pop_front()); fifo.push_back(v);
      end
    end
  endtask

  // ---------------- per-triangle fixed-length encoding ----------------
  logic [CODE_W-1:0] codes [$];
  int exp_tris [$][3];     // what the decoder must output (degenerates included)
  bit exp_degen [$];

  int efifo [$];
  int eg, elast;

  function automatic int fpos(int v);
    int pos = -1;
    for (int p = 0; p < K; p++) if (efifo[p] == v) pos = p;
    return pos;
  endfunction

  task automatic eload(int v);
    void'(efifo.pop_front()); efifo.push_back(v);
  endtask

  function automatic bit fits(int off, int w);
    return off >= -(1 << (w - 1)) && off < (1 << (w - 1));
  endfunction

  function automatic logic [P-1:0] offf(int off, int w);
    return P'(off) & P'((1 << w) - 1);
  endfunction

  task automatic emit(tri_label_e l, logic [P-1:0] pay, int a, int b, int c, bit degen);
    codes.push_back({l, pay});
    exp_tris.push_back('{a, b, c});
    exp_degen.push_back(degen);
  endtask

  task automatic emit_ddr(int v);
    emit(L_DDR, offf(v - elast, P), v, v, v, 1);
    elast = v; eload(v);
  endtask

  // pack two distinct positions as (first, circular distance - 1)
  task automatic pack_pair(int p0, int p1, output int first, output int second, output int d);
    if (((p1 - p0 + K) % K) <= K / 2) begin first = p0; second = p1; end
    else begin first = p1; second = p0; end
    d = (second - first + K) % K - 1;
  endtask

  task automatic encode_triangle(int tv [3]);
    forever begin
      int fs [$], cs [$], rs [$];
      for (int j = 0; j < 3; j++) begin
        int v = tv[j];
        if (v >= eg) fs.push_back(v);                 // first use (v == eg, eg+1, ...)
        else if (fpos(v) >= 0) cs.push_back(v);
        else rs.push_back(v);
      end
      fs.sort();
      if (rs.size() >= 2 || (rs.size() == 1 && fs.size() + cs.size() == 0)) begin
        emit_ddr(rs[0]);                              // {D,D,R}: turn one R into C
        continue;
      end
      if (fs.size() == 3) begin                       // {F,F,F} -> degenerate FCC, then FFC
        int p = K - 1;
        emit(L_FCC, {A'(p), A'(p), (P-2*A)'(0)}, eg, efifo[p], efifo[p], 1);
        eload(eg); eg++;
        continue;
      end
      if (fs.size() == 2 && cs.size() == 1) begin
        int p = fpos(cs[0]);
        emit(L_FFC, {A'(p), (P-A)'(0)}, fs[0], fs[1], cs[0], 0);
        eload(fs[0]); eload(fs[1]); eg += 2;
      end else if (fs.size() == 2) begin              // FFR
        int off = rs[0] - elast;
        emit(L_FFR, offf(off, P), fs[0], fs[1], rs[0], 0);
        eload(fs[0]); eload(fs[1]); eload(rs[0]); eg += 2; elast = rs[0];
      end else if (fs.size() == 1 && cs.size() == 2) begin
        int p0 = fpos(cs[0]), p1 = fpos(cs[1]);
        emit(L_FCC, {A'(p0), A'(p1), (P-2*A)'(0)}, fs[0], cs[0], cs[1], 0);
        eload(fs[0]); eg++;
      end else if (fs.size() == 1) begin              // FCR
        int off = rs[0] - elast;
        if (!fits(off, P - A)) begin emit_ddr(rs[0]); continue; end
        begin
          logic [P-1:0] pay = offf(off, P - A);
          pay[P-1 -: A] = A'(fpos(cs[0]));
          emit(L_FCR, pay, fs[0], cs[0], rs[0], 0);
        end
        eload(fs[0]); eload(rs[0]); eg++; elast = rs[0];
      end else if (cs.size() == 2) begin              // CCR
        int off = rs[0] - elast, first, second, d;
        if (!fits(off, P - 2 * A + 1)) begin emit_ddr(rs[0]); continue; end
        pack_pair(fpos(cs[0]), fpos(cs[1]), first, second, d);
        begin
          logic [P-1:0] pay = offf(off, P - 2 * A + 1);
          pay[P-1 -: A] = A'(first);
          pay[P-1-A -: A-1] = (A-1)'(d);
          emit(L_CCR, pay, efifo[first], efifo[second], rs[0], 0);
        end
        eload(rs[0]); elast = rs[0];
      end else begin                                  // CCC
        int ps [3];
        int front = -1;
        for (int j = 0; j < 3; j++) begin
          ps[j] = fpos(cs[j]);
          if (ps[j] <= 1 && (front < 0 || ps[j] < ps[front])) front = j;
        end
        if (front >= 0) begin
          int o1 = (front + 1) % 3, o2 = (front + 2) % 3;
          emit(ps[front] == 0 ? L_CCC0 : L_CCC1, {A'(ps[o1]), A'(ps[o2]), (P-2*A)'(0)},
               cs[front], cs[o1], cs[o2], 0);
        end else begin
          // none at the front: code the third vertex as a reload
          int off = cs[2] - elast, first, second, d;
          if (!fits(off, P - 2 * A + 1)) begin emit_ddr(cs[2]); off = 0; end
          pack_pair(fpos(cs[0]), fpos(cs[1]), first, second, d);
          begin
            logic [P-1:0] pay = offf(off, P - 2 * A + 1);
            pay[P-1 -: A] = A'(first);
            pay[P-1-A -: A-1] = (A-1)'(d);
            emit(L_CCR, pay, efifo[first], efifo[second], cs[2], 0);
          end
          eload(cs[2]); elast = cs[2];
        end
      end
      break;
    end
  endtask

  int nverts_fixed;

  task automatic encode_fixed();
    codes.delete(); exp_tris.delete(); exp_degen.delete();
    efifo.delete();
    for (int i = 0; i < K; i++) efifo.push_back(0);
    eg = 0; elast = 0;
    foreach (mesh[t]) encode_triangle(mesh[t]);
    nverts_fixed = eg;
  endtask


  // FIFO reference for the vertex cache miss count
  function automatic int ref_misses(int list [$][3]);
    int tag [K];
    bit vld [K];
    int nx = 0, n = 0;
    for (int i = 0; i < K; i++) vld[i] = 0;
    foreach (list[t]) for (int j = 0; j < 3; j++) begin
      int found = -1;
      for (int i = 0; i < K; i++) if (vld[i] && tag[i] == list[t][j]) found = i;
      if (found < 0) begin tag[nx] = list[t][j]; vld[nx] = 1; nx = (nx + 1) % K; n++; end
    end
    return n;
  endfunction

  task automatic restart(bit m, int nidx);
    @(negedge clk);
    mode = m; start = 1; num_idx = nidx;
    @(negedge clk);
    start = 0;
  endtask

  task automatic send_words();
    int nw = (bits.size() + WORD_W - 1) / WORD_W;
    for (int w = 0; w < nw; w++) begin
      logic [WORD_W-1:0] word = '0;
      for (int b = 0; b < WORD_W; b++)
        if (w * WORD_W + b < bits.size()) word[WORD_W-1-b] = bits[w * WORD_W + b];
      @(negedge clk);
      in_word = word; in_last = (w == nw - 1); in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 0; in_last = 0;
    end
  endtask

  task automatic send_codes();
    foreach (codes[i]) begin
      @(negedge clk);
      in_code = codes[i]; code_valid = 1;
      @(posedge clk);
      while (!code_ready) @(posedge clk);
      #1 code_valid = 0;
    end
  endtask

  task automatic collect(int expect_list [$][3]);
    int got = 0;
    while (got < expect_list.size()) begin
      @(posedge clk);
      if (tri_valid && tri_ready) begin
        int tv [3];
        for (int j = 0; j < 3; j++) tv[j] = int'(tri_v[j]);
        checks++;
        if (tv != expect_list[got]) failures++;
        got++;
      end
    end
  endtask

  initial begin
    int cnt [K+2];
    int exp_m;
    finished = 0; checks = 0; failures = 0;
    start = 0; mode = 0; num_idx = 0; lut_we = 0; lut_addr = 0; lut_sym = 0; lut_len = 0;
    in_word = 0; in_last = 0; in_valid = 0; in_code = 0; code_valid = 0; tri_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_mesh();
    encode_huffman(1, cnt);
    build_code(cnt);
    encode_huffman(0, cnt);
    encode_fixed();
    for (int s = 0; s < K + 2; s++)
      for (int t = 0; t < (1 << (HMAX - code_len[s])); t++) begin
        @(negedge clk);
        lut_we = 1;
        lut_addr = HMAX'((code_val[s] << (HMAX - code_len[s])) + t);
        lut_sym = SW'(s); lut_len = LW'(code_len[s]);
      end
    @(negedge clk);
    lut_we = 0;
    // per-index Huffman stream
    restart(0, 3 * mesh.size());
    fork send_words(); collect(mesh); join
    repeat (6) @(posedge clk);
    exp_m = ref_misses(mesh);
    checks++;
    if (misses != 32'(exp_m) || vertices_seen != IDX_W'(nverts)) failures++;
    $display("K=%0d grid %0dx%0d: %0d vertices, %0d triangles; misses/triangle %.3f; Huffman %.3f bits/index (%.2f bits/triangle)",
             K, GW, GH, nverts, mesh.size(), real'(misses) / mesh.size(),
             real'(bits.size()) / (3.0 * mesh.size()), real'(bits.size()) / mesh.size());
    // fixed-length codes
    restart(1, 0);
    fork send_codes(); collect(exp_tris); join
    repeat (6) @(posedge clk);
    checks++;
    if (misses != 32'(ref_misses(exp_tris)) || vertices_seen != IDX_W'(nverts_fixed)) failures++;
    $display("K=%0d fixed-length: %0d codes (%0d degenerate added, %.1f%%), %.2f bits/triangle",
             K, codes.size(), codes.size() - mesh.size(),
             100.0 * (codes.size() - mesh.size()) / mesh.size(), 16.0 * codes.size() / mesh.size());
    finished = 1;
  end
endmodule
