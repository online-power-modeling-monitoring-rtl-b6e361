// budget_split: single-input multiple-output budget distribution.
//
// Splits the corrected total budget B among the NCPU local controllers:
//     P_SP_i = theta_i * B
// with theta_i >= 0 and sum(theta_i) = 1 maintained by the supervisor.
// Theta is unsigned fixed point with THETA_FRAC fractional bits. The
// products are truncated, so the set points add up to B or slightly less.
//
// Interface: clk, rst (synchronous), valid with budget (mW) and theta
// (NCPU packed weights); p_sp (NCPU packed set points, mW) and out_valid.
// Timing: registered one cycle after valid.
// The split rule follows the description of the SIMO block; the number
// format is this design's choice.
module budget_split #(
  parameter int unsigned NCPU       = 4,
  parameter int unsigned B_W        = pwr_pkg::PWR_W,
  parameter int unsigned THETA_FRAC = pwr_pkg::THETA_FRAC,
  parameter int unsigned THETA_W    = pwr_pkg::THETA_W
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           valid,
  input  logic [B_W-1:0]                 budget,
  input  logic [NCPU-1:0][THETA_W-1:0]   theta,
  output logic [NCPU-1:0][B_W-1:0]       p_sp,
  output logic                           out_valid
);

  localparam int unsigned PW = B_W + THETA_W;

  logic [NCPU-1:0][PW-1:0] prod;

  always_comb begin
    for (int i = 0; i < NCPU; i++) begin
      prod[i] = (PW'(budget) * PW'(theta[i])) >> THETA_FRAC;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p_sp      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= valid;
      if (valid) begin
        for (int i = 0; i < NCPU; i++) begin
          p_sp[i] <= (prod[i] > PW'((1 << B_W) - 1)) ? '1 : prod[i][B_W-1:0];
        end
      end
    end
  end

endmodule
