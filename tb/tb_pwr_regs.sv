// tb_pwr_regs: test of the memory-mapped register bank.
// Writes and reads back the global set point and the per-core theta
// requests, reads every read-only register against the values driven on
// its inputs, checks that reads of unmapped addresses return zero, that
// writes to read-only registers change nothing, and that ack follows req
// by one cycle.
module tb_pwr_regs;
  localparam int unsigned NCPU = 4;
  logic clk = 0, rst = 1;
  logic req = 0, we = 0;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic ack;
  logic [15:0] total_power = 16'd543;
  logic [11:0] total_budget = 12'd612;
  logic signed [12:0] slack = -13'sd77;
  logic [NCPU-1:0] core_active = 4'b1011;
  pwr_pkg::core_class_e [NCPU-1:0] core_class;
  logic [NCPU-1:0][6:0] act;
  logic [NCPU-1:0][11:0] core_power, core_sp;
  logic [NCPU-1:0][10:0] theta;
  logic [15:0] global_sp;
  logic [NCPU-1:0] force_en;
  logic [NCPU-1:0][10:0] force_theta;
  int checks = 0, failures = 0;

  pwr_regs #(.NCPU(NCPU)) dut (.clk, .rst, .req, .we, .addr, .wdata, .rdata, .ack,
    .total_power, .total_budget, .slack, .core_active, .core_class, .act, .core_power,
    .core_sp, .theta, .global_sp, .force_en, .force_theta);

  always #5 clk = ~clk;

  task automatic access(bit w, logic [7:0] a, logic [31:0] d, output logic [31:0] r);
    req = 1; we = w; addr = a; wdata = d;
    @(negedge clk);
    req = 0; we = 0;
    checks++;
    if (!ack) begin failures++; $display("FAIL: no ack at %h", a); end
    r = rdata;
    @(negedge clk);
    checks++;
    if (ack) begin failures++; $display("FAIL: ack without req"); end
  endtask

  task automatic expect_rd(logic [7:0] a, logic [31:0] e);
    logic [31:0] r;
    access(0, a, 0, r);
    checks++;
    if (r !== e) begin failures++; $display("FAIL: read %h = %h expected %h", a, r, e); end
  endtask

  logic [31:0] r;
  initial begin
    for (int i = 0; i < NCPU; i++) begin
      core_class[i] = pwr_pkg::core_class_e'(i);
      act[i] = 7'(10 * i + 3);
      core_power[i] = 12'(100 + i);
      core_sp[i] = 12'(200 + i);
      theta[i] = 11'(256 + i);
    end
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    expect_rd(8'h00, 32'd400);                 // reset value of the set point
    access(1, 8'h00, 32'h0000_0123, r);
    checks++;
    if (global_sp != 16'h0123) begin failures++; $display("FAIL: global_sp output"); end
    expect_rd(8'h00, 32'h0000_0123);
    expect_rd(8'h04, 32'd543);
    expect_rd(8'h08, 32'd612);
    expect_rd(8'h0C, 32'hFFFF_FFB3);           // -77
    for (int i = 0; i < NCPU; i++) begin
      logic [7:0] b;
      b = 8'(16 + 16 * i);
      expect_rd(b, {17'd0, act[i], 2'd0, 2'(i), 3'd0, core_active[i]});
      expect_rd(b + 4, 32'(100 + i));
      expect_rd(b + 8, 32'(200 + i));
      expect_rd(b + 12, {1'b0, 4'd0, 11'(256 + i), 5'd0, 11'd0});
    end
    // theta request of core 2
    access(1, 8'h3C, 32'h8000_0064, r);
    checks += 2;
    if (force_en != 4'b0100) begin failures++; $display("FAIL: force_en %b", force_en); end
    if (force_theta[2] != 11'd100) begin failures++; $display("FAIL: force_theta"); end
    expect_rd(8'h3C, {1'b1, 4'd0, 11'(258), 5'd0, 11'd100});
    access(1, 8'h3C, 32'h0000_0064, r);
    checks++;
    if (force_en != 4'b0000) begin failures++; $display("FAIL: force release"); end
    // writes to read-only registers and unmapped space change nothing
    access(1, 8'h04, 32'hFFFF_FFFF, r);
    access(1, 8'h14, 32'hFFFF_FFFF, r);
    access(1, 8'hF0, 32'hFFFF_FFFF, r);
    expect_rd(8'h04, 32'd543);
    expect_rd(8'h00, 32'h0000_0123);
    expect_rd(8'hF0, 32'd0);
    expect_rd(8'h50, 32'd0);
    checks++;
    if (force_en != '0) begin failures++; $display("FAIL: unmapped write changed force_en"); end
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
