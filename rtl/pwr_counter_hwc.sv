// pwr_counter_hwc: Hamming Weight Count (HWC) power counter.
//
// Monitors one SIG_W-bit data signal. A sampling register keeps the value
// of the previous cycle; the XOR with the current value marks the toggled
// bits and an adder accumulates their number (the Hamming distance between
// consecutive samples) into the switching-activity register (FF_sa). The
// signal is sampled once per clock, so each bit counts at most one toggle
// per cycle and glitches are not counted. In the last cycle of a window
// (win_end) the activity, including that cycle, is multiplied by the
// coefficient register and the 10-bit result is registered on pwr, with
// pwr_valid high for one cycle; the activity register restarts from zero.
// model_rst clears the activity without producing an output.
//
// Interface: clk, rst (synchronous), model_rst, win_end from the window
// timer, sig (probed signal); pwr (mW, 0..1023) and pwr_valid.
// Timing: pwr/pwr_valid update on the clock edge that ends the window.
// The HWC structure (sampling, XOR, bit-count adder, accumulate,
// coefficient) follows the counter architecture; the activity register is
// sized for T * SIG_W toggles so it never wraps, and the first cycle after
// reset is not counted (both this design's choices).
module pwr_counter_hwc #(
  parameter int unsigned SIG_W      = 32,
  parameter int unsigned T          = 2000,
  parameter int unsigned COEFF_W    = 24,
  parameter int unsigned COEFF_FRAC = 16,
  parameter logic [COEFF_W-1:0] COEFF = 24'h000200   // 1/128 mW per toggled bit
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         model_rst,
  input  logic                         win_end,
  input  logic [SIG_W-1:0]             sig,
  output logic [pwr_pkg::CNT_OUT_W-1:0] pwr,
  output logic                         pwr_valid
);

  localparam int unsigned ACT_W = $clog2(T * SIG_W + 1);
  localparam int unsigned HW_W  = $clog2(SIG_W + 1);

  logic [SIG_W-1:0]   sample_q;
  logic               primed_q;
  logic [ACT_W-1:0]   sa_q;
  logic [COEFF_W-1:0] coeff_q;
  logic [SIG_W-1:0]   flips;
  logic [HW_W-1:0]    weight;
  logic [ACT_W-1:0]   sa_total;
  logic [pwr_pkg::CNT_OUT_W-1:0] pwr_next;

  // Number of toggled bits in this cycle.
  always_comb begin
    flips  = primed_q ? (sig ^ sample_q) : '0;
    weight = '0;
    for (int i = 0; i < SIG_W; i++) begin
      weight = weight + HW_W'(flips[i]);
    end
  end

  assign sa_total = sa_q + ACT_W'(weight);

  pwr_scale #(
    .ACT_W(ACT_W), .COEFF_W(COEFF_W), .COEFF_FRAC(COEFF_FRAC),
    .OUT_W(pwr_pkg::CNT_OUT_W)
  ) u_scale (
    .act(sa_total), .coeff(coeff_q), .pwr(pwr_next)
  );

  always_ff @(posedge clk) begin
    sample_q <= sig;
    if (rst) begin
      primed_q  <= 1'b0;
      sa_q      <= '0;
      coeff_q   <= COEFF;
      pwr       <= '0;
      pwr_valid <= 1'b0;
    end else begin
      primed_q  <= 1'b1;
      pwr_valid <= 1'b0;
      if (model_rst) begin
        sa_q <= '0;
      end else if (win_end) begin
        sa_q      <= '0;
        pwr       <= pwr_next;
        pwr_valid <= 1'b1;
      end else begin
        sa_q <= sa_total;
      end
    end
  end

endmodule
