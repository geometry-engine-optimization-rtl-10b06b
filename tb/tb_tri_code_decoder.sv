// tb_tri_code_decoder: self-checking test of the fixed-length triangle decoder.
//
// The testbench encodes random triangles of all eight labels: it draws the
// label and the cache positions / reload offsets, packs them into the 16-bit
// layout, and works out the expected vertices from its own FIFO model of the
// cache, its own first-use counter g and last reload index. Codes are sent
// with random gaps and the output is stalled at random. A start in the middle
// must reset g, the last reload index and the cache. Every label must occur,
// and an unstalled run must give one triangle per cycle.
module tb_tri_code_decoder;
  import gec_pkg::*;
  localparam int K = 16, IDX_W = 32, A = 4, P = CODE_W - LABEL_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start;
  logic [CODE_W-1:0] in_code;
  logic in_valid, in_ready, tri_valid, tri_ready;
  logic [IDX_W-1:0] tri_v [3];
  tri_label_e tri_label;
  logic [IDX_W-1:0] g_count;

  tri_code_decoder #(.K(K), .IDX_W(IDX_W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int label_seen [8];
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- encoder model ----
  logic [IDX_W-1:0] fifo [$];
  logic [IDX_W-1:0] g, last_r;
  logic [CODE_W-1:0] codes [$];
  logic [IDX_W-1:0]  exp_v [$][3];
  tri_label_e        exp_l [$];

  task automatic model_reset();
    fifo.delete();
    for (int i = 0; i < K; i++) fifo.push_back('0);
    g = 0; last_r = 0;
  endtask

  task automatic load(logic [IDX_W-1:0] v);
    void'(fifo.pop_front());
    fifo.push_back(v);
  endtask

  // random signed offset of w bits: returns field bits and updates r
  function automatic logic [P-1:0] offset(int w, output logic [IDX_W-1:0] r);
    int o = $urandom_range(0, (1 << w) - 1) - (1 << (w - 1));
    r = last_r + IDX_W'(o);
    return P'(o) & P'((1 << w) - 1);
  endfunction

  task automatic make_tri(tri_label_e l);
    logic [P-1:0] pay = '0;
    logic [IDX_W-1:0] v [3];
    logic [IDX_W-1:0] r;
    int c0 = $urandom_range(0, K - 1), c1 = $urandom_range(0, K - 1);
    int d = $urandom_range(0, K / 2 - 1);
    case (l)
      L_FFC: begin
        pay[P-1 -: A] = A'(c0);
        v = '{g, g + 1, fifo[c0]};
        load(g); load(g + 1); g += 2;
      end
      L_FFR: begin
        pay = offset(P, r);
        v = '{g, g + 1, r};
        load(g); load(g + 1); load(r); g += 2; last_r = r;
      end
      L_FCC: begin
        pay[P-1 -: A] = A'(c0); pay[P-1-A -: A] = A'(c1);
        v = '{g, fifo[c0], fifo[c1]};
        load(g); g += 1;
      end
      L_FCR: begin
        pay = offset(P - A, r);
        pay[P-1 -: A] = A'(c0);
        v = '{g, fifo[c0], r};
        load(g); load(r); g += 1; last_r = r;
      end
      L_CCR: begin
        pay = offset(P - 2 * A + 1, r);
        pay[P-1 -: A] = A'(c0); pay[P-1-A -: A-1] = (A-1)'(d);
        v = '{fifo[c0], fifo[(c0 + d + 1) % K], r};
        load(r); last_r = r;
      end
      L_CCC0, L_CCC1: begin
        pay[P-1 -: A] = A'(c0); pay[P-1-A -: A] = A'(c1);
        v = '{fifo[(l == L_CCC1) ? 1 : 0], fifo[c0], fifo[c1]};
      end
      L_DDR: begin
        pay = offset(P, r);
        v = '{r, r, r};
        load(r); last_r = r;
      end
      default: ;
    endcase
    codes.push_back({l, pay});
    exp_v.push_back(v);
    exp_l.push_back(l);
  endtask

  int stall_pct;

  task automatic run(int n);
    int got = 0;
    codes.delete(); exp_v.delete(); exp_l.delete();
    for (int i = 0; i < n; i++) make_tri(tri_label_e'($urandom_range(0, 7)));
    fork
      foreach (codes[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 99) < stall_pct) begin in_valid = 0; @(negedge clk); end
        in_code = codes[i]; in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
      end
      while (got < n) begin
        @(negedge clk);
        tri_ready = $urandom_range(0, 99) >= stall_pct;
        @(posedge clk);
        if (tri_valid && tri_ready) begin
          checks++;
          label_seen[tri_label]++;
          if (tri_v[0] !== exp_v[got][0] || tri_v[1] !== exp_v[got][1] ||
              tri_v[2] !== exp_v[got][2] || tri_label !== exp_l[got]) begin
            failures++;
            if (failures < 8)
              $display("tri %0d %s: got %0d %0d %0d exp %0d %0d %0d", got, exp_l[got].name(),
                       tri_v[0], tri_v[1], tri_v[2], exp_v[got][0], exp_v[got][1], exp_v[got][2]);
          end
          got++;
        end
      end
    join
  endtask

  initial begin
    start = 0; in_code = 0; in_valid = 0; tri_ready = 0;
    model_reset();
    repeat (2) @(posedge clk);
    rst_n = 1;
    stall_pct = 30;
    run(1500);
    checks++;
    if (g_count !== g) begin failures++; $display("g %0d exp %0d", g_count, g); end
    // restart
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    model_reset();
    run(1500);
    // rate: one triangle per cycle without stalls
    begin
      int t0;
      stall_pct = 0;
      t0 = cycle;
      run(200);
      checks++;
      if (cycle - t0 > 200 + 4) begin failures++; $display("rate: %0d cycles", cycle - t0); end
    end
    for (int l = 0; l < 8; l++) begin
      checks++;
      if (label_seen[l] == 0) begin failures++; $display("label %0d never seen", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
