// pwr_counter_svc: Single Variation Count (SVC) power counter.
//
// Monitors one SIG_W-bit signal. A sampling register keeps the value of the
// previous cycle; the bitwise XOR with the current value shows which bits
// toggled, and their OR tells whether the signal changed at all. Each
// changed cycle adds 1 to the switching-activity register (FF_sa). Because
// the signal is sampled once per clock, glitches are not counted: one
// change per cycle at most. In the last cycle of a window (win_end) the
// activity, including that cycle, is multiplied by the coefficient register
// and the 10-bit result is registered on pwr, with pwr_valid high for one
// cycle; the activity register restarts from zero (rst_sa). model_rst
// clears the activity without producing an output.
//
// Interface: clk, rst (synchronous), model_rst, win_end from the window
// timer, sig (probed signal); pwr (mW, 0..1023) and pwr_valid.
// Timing: pwr/pwr_valid update on the clock edge that ends the window.
// The SVC structure (sampling, XOR, OR, accumulate, coefficient) follows
// the counter architecture; the first cycle after reset is not counted, as
// the sampling register holds no previous value yet (this design's choice).
module pwr_counter_svc #(
  parameter int unsigned SIG_W      = 8,
  parameter int unsigned T          = 2000,
  parameter int unsigned COEFF_W    = 24,
  parameter int unsigned COEFF_FRAC = 16,
  parameter logic [COEFF_W-1:0] COEFF = 24'h004000   // 0.25 mW per toggling cycle
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         model_rst,
  input  logic                         win_end,
  input  logic [SIG_W-1:0]             sig,
  output logic [pwr_pkg::CNT_OUT_W-1:0] pwr,
  output logic                         pwr_valid
);

  localparam int unsigned ACT_W = $clog2(T + 1);

  logic [SIG_W-1:0]   sample_q;
  logic               primed_q;
  logic [ACT_W-1:0]   sa_q;
  logic [COEFF_W-1:0] coeff_q;
  logic               toggled;
  logic [ACT_W-1:0]   sa_total;
  logic [pwr_pkg::CNT_OUT_W-1:0] pwr_next;

  assign toggled  = primed_q && (|(sig ^ sample_q));
  assign sa_total = sa_q + ACT_W'(toggled);

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
