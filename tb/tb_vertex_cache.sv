// tb_vertex_cache: self-checking test of the FIFO vertex-cache tag store.
//
// Triangles drawn from a small sliding window of vertex indices (so that both
// hits and misses occur) are pushed through with random stalls. A reference
// model with the same FIFO policy (hits do not refresh an entry) predicts the
// hit flag and slot of every vertex, every shade request, and the final
// lookup and miss counts. After a clear the same indices are used again: the
// stale tags must not hit. Without stalls a triangle must take three cycles.
module tb_vertex_cache;
  localparam int K = 16, IDX_W = 32, SLW = 4;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;
  logic [IDX_W-1:0] in_v [3], out_v [3], miss_idx;
  logic [SLW-1:0] out_slot [3], miss_slot;
  logic [2:0] out_hit;
  logic in_valid, in_ready, out_valid, out_ready, miss_valid;
  logic [31:0] lookups, misses;

  vertex_cache #(.K(K), .IDX_W(IDX_W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  logic [IDX_W-1:0] mtag [K];
  bit mvld [K];
  int mnext = 0, mlook = 0, mmiss = 0;
  logic [IDX_W-1:0] exp_v [$][3];
  logic [SLW-1:0]   exp_s [$][3];
  logic [2:0]       exp_h [$];
  logic [IDX_W-1:0] exp_miss [$];
  logic [SLW-1:0]   exp_mslot [$];

  task automatic model_tri(logic [IDX_W-1:0] v [3]);
    logic [SLW-1:0] s [3];
    logic [2:0] h;
    for (int j = 0; j < 3; j++) begin
      int found = -1;
      for (int i = 0; i < K; i++) if (mvld[i] && mtag[i] == v[j]) found = i;
      mlook++;
      if (found >= 0) begin h[j] = 1; s[j] = SLW'(found); end
      else begin
        h[j] = 0; s[j] = SLW'(mnext);
        exp_miss.push_back(v[j]); exp_mslot.push_back(SLW'(mnext));
        mtag[mnext] = v[j]; mvld[mnext] = 1; mnext = (mnext + 1) % K; mmiss++;
      end
    end
    exp_v.push_back(v); exp_s.push_back(s); exp_h.push_back(h);
  endtask

  // miss request monitor
  always @(posedge clk) if (rst_n && miss_valid) begin
    checks++;
    if (exp_miss.size() == 0 || miss_idx !== exp_miss[0] || miss_slot !== exp_mslot[0]) begin
      failures++;
      if (failures < 5) $display("bad miss request %0d/%0d", miss_idx, miss_slot);
    end
    if (exp_miss.size() > 0) begin void'(exp_miss.pop_front()); void'(exp_mslot.pop_front()); end
  end

  int stall_pct;
  int base = 1;   // indices are drawn from base..base+20; base carries over a clear
  task automatic run(int n);
    logic [IDX_W-1:0] tris [$][3];
    int got = 0;
    for (int t = 0; t < n; t++) begin
      logic [IDX_W-1:0] v [3];
      for (int j = 0; j < 3; j++) v[j] = base + $urandom_range(0, 20);
      if ($urandom_range(0, 3) == 0) base++;
      tris.push_back(v);
      model_tri(v);
    end
    fork
      foreach (tris[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 99) < stall_pct) begin in_valid = 0; @(negedge clk); end
        in_v = tris[i]; in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1 in_valid = 0;
      end
      while (got < n) begin
        @(negedge clk);
        out_ready = $urandom_range(0, 99) >= stall_pct;
        @(posedge clk);
        if (out_valid && out_ready) begin
          checks++;
          if (out_hit !== exp_h[0] || out_v !== exp_v[0] || out_slot !== exp_s[0]) begin
            failures++;
            if (failures < 5) $display("tri %0d: hit %b exp %b", got, out_hit, exp_h[0]);
          end
          void'(exp_v.pop_front()); void'(exp_s.pop_front()); void'(exp_h.pop_front());
          got++;
        end
      end
    join
  endtask

  initial begin
    in_valid = 0; out_ready = 0;
    for (int j = 0; j < 3; j++) in_v[j] = 0;
    for (int i = 0; i < K; i++) mvld[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    stall_pct = 30;
    // Index 0 equals the reset value of the tags: it must still miss.
    begin
      logic [IDX_W-1:0] v0 [3] = '{7, 0, 9};
      model_tri(v0);
      @(negedge clk); in_v = v0; in_valid = 1; out_ready = 1;
      @(posedge clk); #1 in_valid = 0;
      wait (out_valid); @(posedge clk); #1;
      checks++;
      if (out_hit !== exp_h[0]) begin failures++; $display("index 0 hit after reset"); end
      void'(exp_v.pop_front()); void'(exp_s.pop_front()); void'(exp_h.pop_front());
    end
    run(1000);
    repeat (2) @(posedge clk);
    checks++;
    if (lookups != mlook || misses != mmiss) begin
      failures++; $display("counts %0d/%0d exp %0d/%0d", lookups, misses, mlook, mmiss);
    end
    checks++;
    if (mmiss == 0 || mmiss == mlook) begin failures++; $display("no mix of hits and misses"); end
    // rate
    begin
      int t0;
      t0 = cycle;
      stall_pct = 0;
      run(100);
      checks++;
      if (cycle - t0 > 3 * 100 + 6) begin failures++; $display("rate: %0d cycles", cycle - t0); end
    end
    // clear empties the cache
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < K; i++) mvld[i] = 0;
    mnext = 0; mlook = 0; mmiss = 0;
    run(50);
    repeat (2) @(posedge clk);
    checks++;
    if (lookups != mlook || misses != mmiss) begin failures++; $display("counts after clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
