// tb_pwr_adder: self-checking test of the power adder.
// Applies random contributions and signs, computes CONST + sum(+/-c_i)
// clamped to 0..4095 independently, and checks the registered estimate
// one cycle after in_valid; covers clamping at both ends.
module tb_pwr_adder;
  localparam int unsigned N = 5;
  localparam int CONST = 37;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [N-1:0][9:0] contrib = '0;
  logic [N-1:0] sign = '0;
  logic [11:0] pwr_est;
  logic est_valid;
  int checks = 0, failures = 0, lo_clamp = 0, hi_clamp = 0;

  pwr_adder #(.N(N), .CONST(CONST)) dut (.clk, .rst, .in_valid, .contrib, .sign, .pwr_est, .est_valid);

  always #5 clk = ~clk;

  task automatic apply(int mode);
    int s = CONST;
    for (int i = 0; i < N; i++) begin
      contrib[i] = (mode == 1) ? 10'(700 + $urandom % 324) : 10'($urandom % 1024);
      case (mode)
        0: sign[i] = 1'($urandom);
        1: sign[i] = 1'b0;
        default: sign[i] = 1'b1;
      endcase
      s += sign[i] ? -int'(contrib[i]) : int'(contrib[i]);
    end
    if (s < 0) begin s = 0; lo_clamp++; end
    if (s > 4095) begin s = 4095; hi_clamp++; end
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!est_valid || pwr_est != 12'(s)) begin
      failures++;
      $display("FAIL: est=%0d valid=%0b expected %0d", pwr_est, est_valid, s);
    end
    @(negedge clk);
    checks++;
    if (est_valid) begin failures++; $display("FAIL: est_valid held"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int k = 0; k < 200; k++) apply(k % 3);
    checks++;
    if (lo_clamp == 0 || hi_clamp == 0) begin
      failures++; $display("FAIL: clamping not exercised (%0d, %0d)", lo_clamp, hi_clamp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
