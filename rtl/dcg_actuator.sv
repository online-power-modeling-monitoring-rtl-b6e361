// dcg_actuator: dynamic clock gating actuator of one core.
//
// The control action A (0..TP-1) says how many of the TP clock cycles of
// an epoch the core must lose. The actuator keeps the latest action
// received and masks the last A cycles of every epoch: clk_en is low while
// the epoch cycle counter cyc is at or above TP - A. clk_en feeds a
// latch-based clock gate, whose output gclk clocks the core; clk_en itself
// is also brought out for logic that prefers a clock enable. When a new
// action arrives during the masked part of an epoch it applies at once to
// the rest of that epoch.
//
// Interface: clk, rst (synchronous), cyc (position in the epoch, from the
// epoch timer), act_valid and act (new control action); clk_en, gclk and
// gated_cycles (cycles masked in the epoch that just ended).
// Timing: clk_en is decoded from registers (the epoch counter and the
// stored action), so exactly A cycles are masked in an epoch whose action
// was known before its masked part began; gclk drops from the first
// rising edge of that part. A new action takes effect one cycle after
// act_valid, within the few cycles allowed for stopping the core clock.
// In the top the action arrives in cycle 3 of the epoch, so cycles 0..3
// still follow the previous action: an action of 97 or more masks those
// early cycles only when the previous action did too.
// Masking a fraction of each epoch follows the DCG description; placing
// the masked cycles at the end of the epoch is this design's choice, made
// so that the action computed from an epoch's estimate, which arrives a
// few cycles into the next epoch, is applied to that epoch.
module dcg_actuator #(
  parameter int unsigned TP = pwr_pkg::TP
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [$clog2(TP+1)-1:0]   cyc,
  input  logic                      act_valid,
  input  logic [$clog2(TP)-1:0]     act,
  output logic                      clk_en,
  output logic                      gclk,
  output logic [$clog2(TP)-1:0]     gated_cycles
);

  localparam int unsigned AW = $clog2(TP);
  localparam int unsigned CW = $clog2(TP + 1);

  logic [AW-1:0] a_q;
  logic [AW-1:0] cnt_q;
  logic [AW-1:0] cnt_n;

  // Masked part of the epoch: cycles TP - A .. TP - 1.
  assign clk_en = !((a_q != '0) && (cyc >= CW'(TP) - CW'(a_q)));
  assign cnt_n  = cnt_q + AW'(!clk_en);

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q          <= '0;
      cnt_q        <= '0;
      gated_cycles <= '0;
    end else begin
      if (act_valid) a_q <= act;
      if (cyc == CW'(TP - 1)) begin
        gated_cycles <= cnt_n;
        cnt_q        <= '0;
      end else begin
        cnt_q <= cnt_n;
      end
    end
  end

  clk_gate u_gate (.clk(clk), .en(clk_en), .gclk(gclk));

endmodule
