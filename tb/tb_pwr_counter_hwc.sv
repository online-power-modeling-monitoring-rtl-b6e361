// tb_pwr_counter_hwc: self-checking test of the HWC power counter.
// Drives random values on the probed signal (with random repeats), counts
// independently the toggled bits (Hamming distance of consecutive values)
// within each window
// and checks pwr = min(count * COEFF >> FRAC, 1023) at every window end,
// including the saturation case and a model_rst in mid-window.
module tb_pwr_counter_hwc;
  localparam int unsigned SIG_W = 16;
  localparam int unsigned T     = 50;
  localparam int unsigned FRAC  = 16;
  localparam logic [23:0] COEFF = 24'h030000;  // 3 mW per toggled bit
  logic clk = 0, rst = 1, model_rst = 0, win_end;
  logic [$clog2(T+1)-1:0] cyc;
  logic [SIG_W-1:0] sig = '0;
  logic [9:0] pwr;
  logic pwr_valid;
  int checks = 0, failures = 0;
  int windows = 0, saturated = 0;

  pwr_window_timer #(.T(T)) u_t (.clk, .rst, .model_rst, .win_end, .cyc);
  pwr_counter_hwc #(.SIG_W(SIG_W), .T(T), .COEFF_FRAC(FRAC), .COEFF(COEFF)) dut (
    .clk, .rst, .model_rst, .win_end, .sig, .pwr, .pwr_valid);

  always #5 clk = ~clk;

  int count = 0;        // toggled bits in the current window
  int expected = -1;
  logic [SIG_W-1:0] prev;
  bit primed = 0;
  int density = 50;     // percent of cycles with a change

  // Reference model, evaluated on the sampled values before each edge.
  always @(posedge clk) begin
    if (rst) begin
      count <= 0; primed <= 0;
    end else begin
      automatic int c = count + (primed ? $countones(sig ^ prev) : 0);
      primed <= 1;
      if (model_rst) count <= 0;
      else if (win_end) begin
        automatic longint p = (longint'(c) * COEFF) >> FRAC;
        expected <= (p > 1023) ? 1023 : int'(p);
        count <= 0;
      end else count <= c;
    end
    prev <= sig;
  end

  always @(negedge clk) begin
    if (!rst) begin
      if (pwr_valid) begin
        checks++; windows++;
        if (expected == 1023) saturated++;
        if (pwr != expected[9:0]) begin
          failures++; $display("FAIL: window %0d pwr=%0d expected %0d", windows, pwr, expected);
        end
      end
      if (($urandom % 100) < density) sig <= sig ^ SIG_W'(($urandom % 65535) + 1);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (4 * T) @(posedge clk);
    density = 100;            // about 8 bits * 50 * 3 mW saturates
    repeat (3 * T) @(posedge clk);
    density = 5;
    repeat (2 * T) @(posedge clk);
    // restart the window in the middle
    @(negedge clk); model_rst = 1; @(negedge clk); model_rst = 0;
    repeat (3 * T) @(posedge clk);
    density = 100;
    repeat (10) @(posedge clk);
    check_count();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_count();
    checks++;
    if (windows < 10) begin failures++; $display("FAIL: only %0d windows", windows); end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL: saturation never exercised"); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
