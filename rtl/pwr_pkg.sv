// pwr_pkg: types and constants shared by the power monitor and the power
// management controllers.
//
// Power values are unsigned integers in mW. A power counter delivers a
// 10-bit contribution (0..1023 mW) and the power adder a 12-bit estimate
// (0..4095 mW); both widths follow the monitor architecture. The control
// scheme works on epochs of TP = 100 clock cycles (2 us at 50 MHz). Theta
// weights of the budget split are unsigned fixed point with THETA_FRAC
// fractional bits (THETA_ONE stands for 1.0); that format is this design's
// choice. Instruction classes and their utility weights (1, 8, 16) follow
// the utility definition of the supervisor.
package pwr_pkg;

  // Widths of the power estimate path.
  localparam int unsigned CNT_OUT_W = 10;  // power counter output, mW
  localparam int unsigned PWR_W     = 12;  // power adder output, mW

  // Maximum value of each.
  localparam int unsigned CNT_OUT_MAX = (1 << CNT_OUT_W) - 1;
  localparam int unsigned PWR_MAX     = (1 << PWR_W) - 1;

  // Control epoch: clock cycles per time window k.
  localparam int unsigned TP = 100;

  // Width of a control action (number of gated cycles, 0..TP-1).
  localparam int unsigned ACT_W = $clog2(TP);

  // Theta fixed point format.
  localparam int unsigned THETA_FRAC = 10;
  localparam int unsigned THETA_W    = THETA_FRAC + 1;
  localparam int unsigned THETA_ONE  = 1 << THETA_FRAC;

  // Utility width: at most one commit per cycle, weight up to 16.
  localparam int unsigned UTIL_W = $clog2(16 * TP + 1);

  // Switching activity counting mode of a power counter.
  typedef enum logic {
    SACM_SVC = 1'b0,   // single variation count: 1 per cycle with any toggle
    SACM_HWC = 1'b1    // hamming weight count: number of toggled bits
  } sacm_e;

  // Class of a committed instruction.
  typedef enum logic [1:0] {
    INSTR_ALU  = 2'd0,  // ALU and every other single-cycle instruction
    INSTR_LDST = 2'd1,  // load / store
    INSTR_FPU  = 2'd2,  // floating point
    INSTR_NONE = 2'd3   // no commit this cycle
  } instr_class_e;

  // Utility weight of each class (latency in cycles).
  localparam int unsigned W_ALU  = 1;
  localparam int unsigned W_LDST = 8;
  localparam int unsigned W_FPU  = 16;

  // Supervisor classification of a core.
  typedef enum logic [1:0] {
    CORE_IDLE       = 2'd0,
    CORE_BALANCED   = 2'd1,
    CORE_UNBALANCED = 2'd2,
    CORE_FORCED     = 2'd3   // theta imposed by the OS
  } core_class_e;

endpackage
