// tb_workloads: the front end on a mid-sized mesh at four cache sizes.
//
// Runs tb_workload_run on an 81 x 80 vertex grid (6,480 vertices, 12,640
// triangles, about the size of the smaller models the method was evaluated
// on) with vertex caches of 8, 16, 32 and 64 entries, each ordered with strips
// of K/2 - 2 cells. Each run checks every decoded triangle in both formats and
// prints bits per index, degenerate-triangle overhead and misses per triangle.
module tb_workloads;
  localparam int NRUN = 4;
  bit fin [NRUN];
  int chk [NRUN], fail [NRUN];

  tb_workload_run #(.K(8),  .GW(81), .GH(80), .STRIP(2))  r8  (.finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  tb_workload_run #(.K(16), .GW(81), .GH(80), .STRIP(6))  r16 (.finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  tb_workload_run #(.K(32), .GW(81), .GH(80), .STRIP(14)) r32 (.finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  tb_workload_run #(.K(64), .GW(81), .GH(80), .STRIP(30)) r64 (.finished(fin[3]), .checks(chk[3]), .failures(fail[3]));

  int checks, failures;

  initial begin
    fork
      begin
        wait (fin[0] && fin[1] && fin[2] && fin[3]);
      end
      begin
        #20ms;
        $display("watchdog expired");
      end
    join_any
    checks = 0; failures = 0;
    for (int i = 0; i < NRUN; i++) begin
      checks += chk[i];
      failures += fail[i] + (fin[i] ? 0 : 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
