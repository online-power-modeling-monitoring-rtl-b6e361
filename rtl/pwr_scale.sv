// pwr_scale: coefficient multiplier of a power counter.
//
// Turns the switching activity accumulated over one window into a power
// contribution: out = min((act * coeff) >> COEFF_FRAC, 2^OUT_W - 1). The
// coefficient is unsigned fixed point with COEFF_FRAC fractional bits, in
// mW per counted toggle; the fixed-point format (rather than floating
// point) follows the monitor description, the widths are this design's
// choice. Purely combinational; the caller registers the result.
module pwr_scale #(
  parameter int unsigned ACT_W      = 12,
  parameter int unsigned COEFF_W    = 24,
  parameter int unsigned COEFF_FRAC = 16,
  parameter int unsigned OUT_W      = 10
) (
  input  logic [ACT_W-1:0]   act,
  input  logic [COEFF_W-1:0] coeff,
  output logic [OUT_W-1:0]   pwr
);

  localparam int unsigned PW = ACT_W + COEFF_W;

  logic [PW-1:0] prod;
  logic [PW-1:0] shifted;

  always_comb begin
    prod    = PW'(act) * PW'(coeff);
    shifted = prod >> COEFF_FRAC;
    if (shifted > PW'((1 << OUT_W) - 1)) begin
      pwr = '1;
    end else begin
      pwr = shifted[OUT_W-1:0];
    end
  end

endmodule
