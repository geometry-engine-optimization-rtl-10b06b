// tb_geom_decomp_top: end-to-end test of the topology decompression front end.
//
// The testbench builds a regular grid mesh (GW x GH vertices, two triangles per
// cell) and orders it the way a cache-aware preprocessor would: the columns are
// cut into strips of STRIP cells, each strip is walked row by row, and the
// vertices are renumbered in order of first use. Vertices on a strip border
// are needed again by the next strip and have to be reloaded.
// It then encodes the triangle list twice:
//   - per index, with a canonical Huffman code (hit position / first / reload),
//   - per triangle, with the 16-bit fixed-length code, inserting degenerate
//     triangles where a case cannot be coded directly (three new vertices,
//     two reloads, an offset that does not fit, three cached vertices none of
//     which is at the front of the FIFO).
// Both streams are decoded by the top (mode 0, then mode 1, then mode 0 again
// after a restart) with random stalls on every handshake. Each triangle leaving
// the top is checked against the expected list, its vertex-cache hit flags and
// slots against a FIFO reference model, and every shade request against the
// expected misses. The non-degenerate triangles of the fixed-length run must be
// exactly the mesh. A short tail of random triangles of every label follows the
// mesh in the fixed-length stream, so that rare labels occur too. Each mechanism (each symbol kind, each label, hits, misses,
// stalls, mode switch) is counted and must have happened at least once.
// The top runs at its default parameters.
module tb_geom_decomp_top;
  import gec_pkg::*;

  localparam int K = K_DEF, HMAX = 5, IDX_W = IDX_W_DEF, WORD_W = 32;
  localparam int A = $clog2(K), P = CODE_W - LABEL_W;
  localparam int SW = $clog2(K + 2), LW = $clog2(HMAX + 1), SLW = $clog2(K);
  localparam int GW = 21, GH = 20, STRIP = 6;    // 420 vertices, 760 triangles

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

  geom_decomp_top dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
  int hits_sym [3];   // expected count per symbol kind

  task automatic build_code();
    int c = 0;
    for (int s = 0; s < K + 2; s++)
      code_len[s] = (s == K) ? 2 : (s == K + 1) ? 4 : (s >= K - 6) ? 4 : 5;
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

  task automatic encode_huffman();
    int fifo [$];
    int g = 0;
    bits.delete();
    for (int i = 0; i < K; i++) fifo.push_back(0);
    foreach (mesh[t]) for (int j = 0; j < 3; j++) begin
      int v = mesh[t][j], pos = -1;
      for (int p = 0; p < K; p++) if (fifo[p] == v && v < g) pos = p;
      if (v == g) begin
        put_bits(code_val[K], code_len[K]);
        void'(fifo.pop_front()); fifo.push_back(v); g++;
      end else if (pos >= 0) begin
        put_bits(code_val[pos], code_len[pos]);
      end else begin
        put_bits(code_val[K+1], code_len[K+1]);
        put_bits(v, clog2i(g));
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

  // A reload of a random vertex already seen whose offset fits w bits.
  function automatic int pick_reload(int w, output int off);
    int v = $urandom_range(0, eg - 1);
    off = v - elast;
    if (!fits(off, w)) begin
      off = $urandom_range(0, (1 << (w - 1)) - 1);
      if (elast + off >= eg) off = -off;
      v = elast + off;
    end
    return v;
  endfunction

  // Random triangles of every label, continuing the encoder state (not part of the mesh).
  task automatic encode_tail(int n);
    for (int i = 0; i < n; i++) begin
      tri_label_e l = tri_label_e'(i % 8);
      int c0 = $urandom_range(0, K - 1), c1 = $urandom_range(0, K - 1), d = $urandom_range(0, K / 2 - 1);
      int off, r;
      logic [P-1:0] pay = '0;
      case (l)
        L_FFC: begin
          emit(l, {A'(c0), (P-A)'(0)}, eg, eg + 1, efifo[c0], 1);
          eload(eg); eload(eg + 1); eg += 2;
        end
        L_FFR: begin
          r = pick_reload(P, off);
          emit(l, offf(off, P), eg, eg + 1, r, 1);
          eload(eg); eload(eg + 1); eload(r); eg += 2; elast = r;
        end
        L_FCC: begin
          emit(l, {A'(c0), A'(c1), (P-2*A)'(0)}, eg, efifo[c0], efifo[c1], 1);
          eload(eg); eg++;
        end
        L_FCR: begin
          r = pick_reload(P - A, off);
          pay = offf(off, P - A); pay[P-1 -: A] = A'(c0);
          emit(l, pay, eg, efifo[c0], r, 1);
          eload(eg); eload(r); eg++; elast = r;
        end
        L_CCR: begin
          r = pick_reload(P - 2 * A + 1, off);
          pay = offf(off, P - 2 * A + 1); pay[P-1 -: A] = A'(c0); pay[P-1-A -: A-1] = (A-1)'(d);
          emit(l, pay, efifo[c0], efifo[(c0 + d + 1) % K], r, 1);
          eload(r); elast = r;
        end
        L_CCC0, L_CCC1: begin
          emit(l, {A'(c0), A'(c1), (P-2*A)'(0)}, efifo[l == L_CCC1 ? 1 : 0], efifo[c0], efifo[c1], 1);
        end
        default: begin
          r = pick_reload(P, off);
          emit_ddr(r);
        end
      endcase
    end
  endtask

  int nverts_fixed;

  task automatic encode_fixed();
    codes.delete(); exp_tris.delete(); exp_degen.delete();
    efifo.delete();
    for (int i = 0; i < K; i++) efifo.push_back(0);
    eg = 0; elast = 0;
    foreach (mesh[t]) encode_triangle(mesh[t]);
    encode_tail(48);
    nverts_fixed = eg;
  endtask

  // ---------------- vertex cache reference ----------------
  int vtag [K];
  bit vvld [K];
  int vnext, vlook, vmiss;
  int miss_q [$];

  task automatic vc_reset();
    for (int i = 0; i < K; i++) vvld[i] = 0;
    vnext = 0; vlook = 0; vmiss = 0;
    miss_q.delete();
  endtask

  task automatic vc_check(int tv [3], logic [2:0] hit, logic [SLW-1:0] slot [3]);
    for (int j = 0; j < 3; j++) begin
      int found = -1;
      for (int i = 0; i < K; i++) if (vvld[i] && vtag[i] == tv[j]) found = i;
      vlook++;
      checks++;
      if (found >= 0) begin
        if (!hit[j] || slot[j] != SLW'(found)) failures++;
      end else begin
        if (hit[j] || slot[j] != SLW'(vnext)) failures++;
        vtag[vnext] = tv[j]; vvld[vnext] = 1; vnext = (vnext + 1) % K; vmiss++;
      end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_kind [3];
  int n_label [8];
  int n_vc_hit, n_vc_miss, n_out_stall, n_in_stall, n_code_stall, n_switch;

  always @(posedge clk) if (rst_n) begin
    if (idx_fire) n_kind[idx_kind]++;
    if (tri_fire) n_label[tri_label]++;
    if (miss_valid) begin
      checks++;
      if (miss_q.size() == 0 || miss_idx != IDX_W'(miss_q[0])) failures++;
      if (miss_q.size() > 0) void'(miss_q.pop_front());
    end
    if (tri_valid && !tri_ready) n_out_stall++;
    if (in_valid && !in_ready && !mode) n_in_stall++;
    if (code_valid && !code_ready && mode) n_code_stall++;
  end

  // ---------------- drivers ----------------
  int stall_pct = 25;

  task automatic restart(bit m, int nidx);
    @(negedge clk);
    if (mode != m) n_switch++;
    mode = m; start = 1; num_idx = nidx;
    @(negedge clk);
    start = 0;
    vc_reset();
  endtask

  task automatic send_words();
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
      #1 in_valid = 0; in_last = 0;
    end
  endtask

  task automatic send_codes();
    foreach (codes[i]) begin
      @(negedge clk);
      while ($urandom_range(0, 99) < stall_pct) begin code_valid = 0; @(negedge clk); end
      in_code = codes[i]; code_valid = 1;
      @(posedge clk);
      while (!code_ready) @(posedge clk);
      #1 code_valid = 0;
    end
  endtask

  // Collect n triangles and compare with the expected list.
  int got_tris [$][3];
  task automatic collect(int expect_list [$][3]);
    int got = 0;
    got_tris.delete();
    while (got < expect_list.size()) begin
      @(negedge clk);
      tri_ready = $urandom_range(0, 99) >= stall_pct;
      @(posedge clk);
      if (tri_valid && tri_ready) begin
        int tv [3];
        for (int j = 0; j < 3; j++) tv[j] = int'(tri_v[j]);
        checks++;
        if (tv != expect_list[got]) begin
          failures++;
          if (failures < 8)
            $display("triangle %0d: got %0d %0d %0d exp %0d %0d %0d", got, tv[0], tv[1], tv[2],
                     expect_list[got][0], expect_list[got][1], expect_list[got][2]);
        end
        vc_check(tv, tri_hit, tri_slot);
        got_tris.push_back(tv);
        got++;
      end
    end
  endtask

  // Expected shade requests follow from the reference model; precompute them.
  task automatic precompute_misses(int list [$][3]);
    int tag [K];
    bit vld [K];
    int nx = 0;
    for (int i = 0; i < K; i++) vld[i] = 0;
    miss_q.delete();
    foreach (list[t]) for (int j = 0; j < 3; j++) begin
      int found = -1;
      for (int i = 0; i < K; i++) if (vld[i] && tag[i] == list[t][j]) found = i;
      if (found < 0) begin
        miss_q.push_back(list[t][j]);
        tag[nx] = list[t][j]; vld[nx] = 1; nx = (nx + 1) % K;
      end
    end
  endtask

  task automatic run_huffman();
    restart(0, 3 * mesh.size());
    precompute_misses(mesh);
    fork
      send_words();
      collect(mesh);
    join
    repeat (4) @(posedge clk);
    checks++;
    if (!idx_done || vertices_seen != IDX_W'(nverts)) begin
      failures++; $display("mode 0: done %b, %0d vertices", idx_done, vertices_seen);
    end
    checks++;
    if (lookups != 32'(vlook) || misses != 32'(vmiss)) begin
      failures++; $display("mode 0 counters %0d/%0d exp %0d/%0d", lookups, misses, vlook, vmiss);
    end
    n_vc_hit += vlook - vmiss; n_vc_miss += vmiss;
    $display("mode 0: %0d triangles, %0d bits (%.2f bits/index), vertex-cache misses per triangle %.3f",
             mesh.size(), bits.size(), real'(bits.size()) / (3.0 * mesh.size()),
             real'(vmiss) / mesh.size());
  endtask

  task automatic run_fixed();
    int nd = 0;
    restart(1, 0);
    precompute_misses(exp_tris);
    fork
      send_codes();
      collect(exp_tris);
    join
    repeat (4) @(posedge clk);
    checks++;
    if (vertices_seen != IDX_W'(nverts_fixed)) begin failures++; $display("mode 1: %0d vertices", vertices_seen); end
    checks++;
    if (lookups != 32'(vlook) || misses != 32'(vmiss)) begin failures++; $display("mode 1 counters"); end
    // the real triangles, as vertex sets, must be the mesh in order
    begin
      int k = 0;
      foreach (got_tris[i]) begin
        if (exp_degen[i]) begin nd++; continue; end
        begin
          int a [3] = got_tris[i];
          int b [3] = mesh[k];
          a.sort(); b.sort();
          checks++;
          if (a != b) failures++;
        end
        k++;
      end
      checks++;
      if (k != mesh.size()) failures++;
    end
    n_vc_hit += vlook - vmiss; n_vc_miss += vmiss;
    $display("mode 1: %0d codes for %0d triangles (%0d degenerate or random tail)",
             codes.size(), mesh.size(), nd);
  endtask

  initial begin
    start = 0; mode = 0; num_idx = 0; lut_we = 0; lut_addr = 0; lut_sym = 0; lut_len = 0;
    in_word = 0; in_last = 0; in_valid = 0; in_code = 0; code_valid = 0; tri_ready = 0;
    n_vc_hit = 0; n_vc_miss = 0; n_out_stall = 0; n_in_stall = 0; n_code_stall = 0; n_switch = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    build_mesh();
    build_code();
    for (int s = 0; s < K + 2; s++)
      for (int t = 0; t < (1 << (HMAX - code_len[s])); t++) begin
        @(negedge clk);
        lut_we = 1;
        lut_addr = HMAX'((code_val[s] << (HMAX - code_len[s])) + t);
        lut_sym = SW'(s); lut_len = LW'(code_len[s]);
      end
    @(negedge clk);
    lut_we = 0;
    encode_huffman();
    encode_fixed();
    $display("mesh: %0d vertices, %0d triangles", nverts, mesh.size());
    run_huffman();
    run_fixed();
    stall_pct = 0;
    run_huffman();
    // every mechanism must have happened
    begin
      string names [$] = '{"hit symbol", "first-use symbol", "reload symbol"};
      for (int i = 0; i < 3; i++) begin
        checks++;
        $display("  %-18s %0d", names[i], n_kind[i]);
        if (n_kind[i] == 0) failures++;
      end
    end
    for (int l = 0; l < 8; l++) begin
      checks++;
      $display("  label %-10s %0d", tri_label_e'(l), n_label[l]);
      if (n_label[l] == 0) failures++;
    end
    $display("  vertex-cache hits %0d misses %0d, output stalls %0d, stream stalls %0d, code stalls %0d, mode switches %0d",
             n_vc_hit, n_vc_miss, n_out_stall, n_in_stall, n_code_stall, n_switch);
    checks += 6;
    if (n_vc_hit == 0) failures++;
    if (n_vc_miss == 0) failures++;
    if (n_out_stall == 0) failures++;
    if (n_in_stall == 0) failures++;
    if (n_code_stall == 0) failures++;
    if (n_switch < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
