// clk_gate: glitch-free clock gate (latch plus AND).
//
// The enable is captured by a latch that is transparent while the clock is
// low, so it can only change while the clock is low and the gated clock
// never shows a shortened pulse. This is the usual integrated clock-gating
// cell; on an FPGA it maps to a global clock buffer with enable, in an ASIC
// flow to the library's gating cell. The latch is intentional: it is the
// function of the cell.
//
// Interface: clk, en; gclk = clk while en was high at the preceding low
// phase. Timing: a change of en takes effect from the next rising edge.
module clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
