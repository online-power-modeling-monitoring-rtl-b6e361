// utility_calc: per-core utility, the performance proxy of the supervisor.
//
// Every cycle the core may commit one instruction, tagged with its class.
// Over an epoch the committed instructions are summed, each weighted by its
// nominal latency: 1 for ALU and other instructions, 8 for loads/stores, 16
// for FPU instructions (uCalc_k). At the end of the epoch the utility is
// smoothed as u_k = 0.5 * u_(k-1) + 0.5 * uCalc_k.
//
// Interface: clk, rst (synchronous), commit (instruction class of the
// instruction written back this cycle, INSTR_NONE if none), epoch_end
// (last cycle of the epoch); util (u_k), ucalc (uCalc_k), util_valid.
// Timing: util, ucalc and util_valid are registered on the edge that ends
// the epoch, counting the commit of that last cycle.
// Weights and smoothing follow the utility definition; truncating the
// halving is this design's choice.
module utility_calc #(
  parameter int unsigned TP     = pwr_pkg::TP,
  parameter int unsigned UTIL_W = $clog2(16 * TP + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  pwr_pkg::instr_class_e commit,
  input  logic                  epoch_end,
  output logic [UTIL_W-1:0]     util,
  output logic [UTIL_W-1:0]     ucalc,
  output logic                  util_valid
);

  logic [UTIL_W-1:0] acc_q, w, acc_n;

  always_comb begin
    unique case (commit)
      pwr_pkg::INSTR_ALU:  w = UTIL_W'(pwr_pkg::W_ALU);
      pwr_pkg::INSTR_LDST: w = UTIL_W'(pwr_pkg::W_LDST);
      pwr_pkg::INSTR_FPU:  w = UTIL_W'(pwr_pkg::W_FPU);
      default:             w = '0;
    endcase
    acc_n = acc_q + w;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q      <= '0;
      util       <= '0;
      ucalc      <= '0;
      util_valid <= 1'b0;
    end else begin
      util_valid <= epoch_end;
      if (epoch_end) begin
        acc_q <= '0;
        ucalc <= acc_n;
        util  <= UTIL_W'(({1'b0, util} + {1'b0, acc_n}) >> 1);
      end else begin
        acc_q <= acc_n;
      end
    end
  end

endmodule
