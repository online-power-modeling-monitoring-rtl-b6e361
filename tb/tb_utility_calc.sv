// tb_utility_calc: test of the utility unit.
// Drives random commit streams (ALU, load/store, FPU, none) over 100-cycle
// epochs with different instruction mixes and checks uCalc (weights 1, 8,
// 16) and the smoothed utility u = (u_prev + uCalc) / 2 at every epoch end.
module tb_utility_calc;
  localparam int unsigned TP = 100;
  logic clk = 0, rst = 1, epoch_end = 0;
  pwr_pkg::instr_class_e commit = pwr_pkg::INSTR_NONE;
  logic [10:0] util, ucalc;
  logic util_valid;
  int checks = 0, failures = 0;

  utility_calc #(.TP(TP)) dut (.clk, .rst, .commit, .epoch_end, .util, .ucalc, .util_valid);

  always #5 clk = ~clk;

  int u_ref = 0;
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int ep = 0; ep < 40; ep++) begin
      int acc;
      acc = 0;
      for (int c = 0; c < TP; c++) begin
        int r, mix;
        r = $urandom % 100;
        mix = ep % 4;   // 0 mostly ALU, 1 mostly ld/st, 2 mostly FPU, 3 idle
        if (mix == 3)                     commit = pwr_pkg::INSTR_NONE;
        else if (r < 20)                  commit = pwr_pkg::INSTR_NONE;
        else if (r < 50 + 40 * (mix == 0 ? 1 : 0)) commit = pwr_pkg::INSTR_ALU;
        else if (mix == 1 || r < 70)      commit = pwr_pkg::INSTR_LDST;
        else                              commit = pwr_pkg::INSTR_FPU;
        case (commit)
          pwr_pkg::INSTR_ALU:  acc += 1;
          pwr_pkg::INSTR_LDST: acc += 8;
          pwr_pkg::INSTR_FPU:  acc += 16;
          default: ;
        endcase
        epoch_end = (c == TP - 1);
        @(negedge clk);
      end
      epoch_end = 0;
      commit = pwr_pkg::INSTR_NONE;
      u_ref = (u_ref + acc) / 2;
      checks += 2;
      if (!util_valid || int'(ucalc) != acc) begin
        failures++; $display("FAIL: epoch %0d ucalc=%0d expected %0d", ep, ucalc, acc);
      end
      if (int'(util) != u_ref) begin
        failures++; $display("FAIL: epoch %0d util=%0d expected %0d", ep, util, u_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
