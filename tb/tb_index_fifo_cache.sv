// tb_index_fifo_cache: self-checking test of the decompressor's FIFO cache copy.
//
// Random reads on three ports and random loads of 0..3 indices per cycle are
// applied; a queue model (front = position 0, oldest) gives the expected index
// at every position. A clear in the middle must empty the cache to zeros.
module tb_index_fifo_cache;
  localparam int K = 16, IDX_W = 32;
  logic clk = 0, rst_n = 0, clear = 0;
  always #5 clk = ~clk;

  logic [3:0]       rd_pos [3];
  logic [IDX_W-1:0] rd_data [3];
  logic [1:0]       push_cnt;
  logic [IDX_W-1:0] push_data [3];

  index_fifo_cache #(.K(K), .IDX_W(IDX_W), .NRD(3), .NPUSH(3)) dut (.*);

  int checks = 0, failures = 0;
  logic [IDX_W-1:0] model [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_clear();
    model.delete();
    for (int i = 0; i < K; i++) model.push_back('0);
  endtask

  initial begin
    push_cnt = 0;
    for (int i = 0; i < 3; i++) begin rd_pos[i] = 0; push_data[i] = 0; end
    model_clear();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      if (it == 1000) begin
        clear = 1; @(negedge clk); clear = 0; model_clear();
      end
      for (int i = 0; i < 3; i++) begin
        rd_pos[i]    = 4'($urandom_range(0, K - 1));
        push_data[i] = $urandom;
      end
      push_cnt = 2'($urandom_range(0, 3));
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (rd_data[i] !== model[rd_pos[i]]) begin
          failures++;
          if (failures < 5) $display("it %0d pos %0d got %h exp %h", it, rd_pos[i], rd_data[i], model[rd_pos[i]]);
        end
      end
      @(posedge clk);
      for (int p = 0; p < push_cnt; p++) begin
        void'(model.pop_front());
        model.push_back(push_data[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
