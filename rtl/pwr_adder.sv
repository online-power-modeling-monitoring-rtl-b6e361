// pwr_adder: power adder of the global power monitor.
//
// Adds the N power-counter contributions, each with its own sign from the
// model (sign[i] = 1 subtracts contribution i), to the model's constant
// term CONST (static power and intercept, mW). The result is clamped to
// 0..2^OUT_W-1 and registered on pwr_est when in_valid is high; est_valid
// then pulses for one cycle.
//
// Interface: clk, rst (synchronous), in_valid, contrib (N packed IN_W-bit
// unsigned values), sign (N bits); pwr_est (OUT_W-bit, mW) and est_valid.
// Timing: one register stage, pwr_est valid the cycle after in_valid.
// The parameters (number of inputs, input and output widths, constant
// term), the sign input and the 10-bit inputs / 12-bit output follow the
// monitor description. The document describes the adder both as a
// combinational block and as a module with clock and reset inputs; this
// design registers its output. Clamping instead of wrapping is this
// design's choice.
module pwr_adder #(
  parameter int unsigned N     = 3,
  parameter int unsigned IN_W  = pwr_pkg::CNT_OUT_W,
  parameter int unsigned OUT_W = pwr_pkg::PWR_W,
  parameter int          CONST = 0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [N-1:0][IN_W-1:0] contrib,
  input  logic [N-1:0]          sign,
  output logic [OUT_W-1:0]      pwr_est,
  output logic                  est_valid
);

  // Wide enough for CONST plus N full-scale inputs of either sign.
  localparam int unsigned SW = 34 + $clog2(N + 1);

  logic signed [SW-1:0] sum;
  logic [OUT_W-1:0]     clamped;

  always_comb begin
    sum = SW'(CONST);
    for (int i = 0; i < N; i++) begin
      if (sign[i]) sum = sum - $signed(SW'(contrib[i]));
      else         sum = sum + $signed(SW'(contrib[i]));
    end
    if (sum < 0) begin
      clamped = '0;
    end else if (sum > $signed(SW'((1 << OUT_W) - 1))) begin
      clamped = '1;
    end else begin
      clamped = sum[OUT_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pwr_est   <= '0;
      est_valid <= 1'b0;
    end else begin
      est_valid <= in_valid;
      if (in_valid) pwr_est <= clamped;
    end
  end

endmodule
