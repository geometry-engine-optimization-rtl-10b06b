// tb_huff_lut: self-checking test of the Huffman decoding table.
//
// Every entry is written with a random symbol and length, then all entries are
// read back; a second pass overwrites half of them and checks that only those
// changed.
module tb_huff_lut;
  localparam int K = 16, HMAX = 5;
  localparam int SW = $clog2(K + 2), LW = $clog2(HMAX + 1);
  logic clk = 0, we = 0;
  always #5 clk = ~clk;
  logic [HMAX-1:0] waddr, raddr;
  logic [SW-1:0]   wsym, rsym;
  logic [LW-1:0]   wlen, rlen;

  huff_lut #(.K(K), .HMAX(HMAX)) dut (.*);

  int checks = 0, failures = 0;
  logic [SW-1:0] msym [2**HMAX];
  logic [LW-1:0] mlen [2**HMAX];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < 2**HMAX; a++) begin
      @(negedge clk);
      raddr = HMAX'(a);
      #1;
      checks++;
      if (rsym !== msym[a] || rlen !== mlen[a]) begin
        failures++;
        $display("entry %0d: got %0d/%0d exp %0d/%0d", a, rsym, rlen, msym[a], mlen[a]);
      end
    end
  endtask

  initial begin
    waddr = 0; raddr = 0; wsym = 0; wlen = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < 2**HMAX; a++) begin
        if (pass == 1 && (a % 2 == 0)) continue;
        @(negedge clk);
        we = 1; waddr = HMAX'(a);
        wsym = SW'($urandom_range(0, K + 1));
        wlen = LW'($urandom_range(1, HMAX));
        msym[a] = wsym; mlen[a] = wlen;
      end
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
