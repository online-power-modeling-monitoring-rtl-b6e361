// tb_cap_sweep: power-capping quality over the evaluated configurations.
//
// Two systems run side by side, each through tb_cap_harness:
//   * 4 cores, global set points 100, 200, 300 and 400 mW, 1 to 4 running
//     applications;
//   * 8 cores, global set points 200, 400, 600 and 800 mW, 1, 2, 4 and 8
//     running applications.
// For every combination the harness prints the mean total power, the
// segmented overflow above the set point and the budget efficiency, and
// counts a failure when the overflow exceeds 10 mW or the efficiency falls
// below 85%. The configurations are those of the capping evaluation; the
// 4-core system uses the top's defaults and the 8-core one sets NCPU = 8.
// A watchdog ends the run if the sweeps do not finish.
module tb_cap_sweep;
  logic clk = 1'b0;
  logic start = 1'b0;
  logic done4, done8;
  int   checks4, failures4, checks8, failures8;
  int   checks, failures;

  always #5 clk = ~clk;

  tb_cap_harness #(.NCPU(4)) u_quad (
    .clk(clk), .start(start), .done(done4), .checks(checks4), .failures(failures4)
  );

  tb_cap_harness #(
    .NCPU(8), .SP_LIST('{200, 400, 600, 800}), .APPS_LIST('{1, 2, 4, 8})
  ) u_octa (
    .clk(clk), .start(start), .done(done8), .checks(checks8), .failures(failures8)
  );

  initial begin
    repeat (3) @(posedge clk);
    start = 1'b1;
    wait (done4 && done8);
    checks   = checks4 + checks8;
    failures = failures4 + failures8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8 + 1);
    $finish;
  end
endmodule
