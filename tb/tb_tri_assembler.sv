// tb_tri_assembler: self-checking test of the triangle assembler.
//
// A random index stream with random input gaps and output stalls is fed in;
// every three consecutive indices must leave as one triangle, in order. A
// clear after a partial triangle must drop the held indices.
module tb_tri_assembler;
  localparam int IDX_W = 32;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;
  logic [IDX_W-1:0] in_idx;
  logic in_valid, in_ready, tri_valid, tri_ready;
  logic [IDX_W-1:0] tri_v [3];

  tri_assembler #(.IDX_W(IDX_W)) dut (.*);

  int checks = 0, failures = 0;
  logic [IDX_W-1:0] sent [$];
  int nout = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready && !clear) sent.push_back(in_idx);
    if (tri_valid && tri_ready && !clear) begin
      checks++;
      if (sent.size() < 3 || tri_v[0] !== sent[0] || tri_v[1] !== sent[1] || tri_v[2] !== sent[2]) begin
        failures++;
        if (failures < 5) $display("triangle %0d wrong", nout);
      end
      repeat (3) if (sent.size() > 0) void'(sent.pop_front());
      nout++;
    end
  end

  initial begin
    in_idx = 0; in_valid = 0; tri_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // two indices, then clear: they must be dropped
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); in_valid = 1; tri_ready = 1; in_idx = 1000 + i;
    end
    @(negedge clk); in_valid = 0; clear = 1;
    @(negedge clk); clear = 0; sent.delete();
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      in_valid  = $urandom_range(0, 99) < 70;
      in_idx    = $urandom;
      tri_ready = $urandom_range(0, 99) < 60;
    end
    @(negedge clk); in_valid = 0;
    checks++;
    if (nout < 300) begin failures++; $display("too few triangles %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
