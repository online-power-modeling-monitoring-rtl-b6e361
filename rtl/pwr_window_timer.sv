// pwr_window_timer: sampling-window timer of the power monitor.
//
// The monitor reports one power estimate per temporal resolution of T clock
// cycles. This timer counts the cycles of the current window and raises
// win_end during its last cycle; the power counters use win_end to latch
// their contribution and to clear their accumulated switching activity
// (the rst_sa of the counter architecture). model_rst, an input of the
// monitored design's top, restarts the window at cycle 0 so that the
// estimates can be aligned with an external trace; while it is high no
// window ends.
//
// Interface: clk, rst (synchronous, active high), model_rst; outputs
// win_end (one cycle every T cycles) and cyc (position inside the window).
// Timing: after reset or model_rst the first win_end comes T cycles later.
// The window length as a cycle count and the restart behaviour follow the
// monitor description; the synchronous active-high reset is this design's
// choice.
module pwr_window_timer #(
  parameter int unsigned T = 2000   // 20 us at 100 MHz
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      model_rst,
  output logic                      win_end,
  output logic [$clog2(T+1)-1:0]    cyc
);

  localparam int unsigned CW = $clog2(T + 1);
  localparam logic [CW-1:0] LAST = CW'(T - 1);

  always_ff @(posedge clk) begin
    if (rst || model_rst) begin
      cyc <= '0;
    end else if (cyc == LAST) begin
      cyc <= '0;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end

  assign win_end = (cyc == LAST) && !model_rst;

  initial begin
    assert (T >= 2) else $error("pwr_window_timer: T must be at least 2");
  end

endmodule
