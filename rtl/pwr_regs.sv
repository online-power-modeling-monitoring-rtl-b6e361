// pwr_regs: memory-mapped registers of the power management system.
//
// This is the functional interface between the controllers and the OS or
// resource manager: software can neither observe nor control the cores'
// power directly, only read their status and power and assign budgets
// here. Word-addressed, 32-bit registers (byte addresses):
//   0x00  GLOBAL_SP     RW  [15:0] global power set point, mW
//   0x04  TOTAL_POWER   RO  [15:0] total consumed power of the last epoch
//   0x08  TOTAL_BUDGET  RO  [11:0] corrected total budget
//   0x0C  SLACK         RO  signed correction of the global controller
//   0x10 + 16*i, for core i:
//     +0x0  STATUS        RO  [0] active, [5:4] supervisor class,
//                             [14:8] control action of the last epoch
//     +0x4  ACTUAL_POWER  RO  [11:0] power of the last epoch, mW
//     +0x8  POWER_BUDGET  RO  [11:0] local set point, mW
//     +0xC  THETA         RW  write: [31] force, [10:0] imposed theta;
//                             read: [31] force, [26:16] current theta,
//                             [10:0] imposed theta
// Other addresses read as zero and ignore writes.
//
// Bus: req, we, addr, wdata; rdata and ack one cycle after req (every
// access completes in one cycle). rst (synchronous) sets GLOBAL_SP to
// SP_RESET and clears the theta requests.
// The set of registers (status, actual power, power budget) and the OS
// controls (global set point, imposed theta) follow the controller
// description; the address map and bus protocol are this design's choice.
module pwr_regs #(
  parameter int unsigned NCPU     = 4,
  parameter int unsigned ADDR_W   = 8,
  parameter int unsigned ACT_W    = pwr_pkg::ACT_W,
  parameter int unsigned THETA_W  = pwr_pkg::THETA_W,
  parameter int unsigned SP_RESET = 400   // mW
) (
  input  logic                              clk,
  input  logic                              rst,
  // bus
  input  logic                              req,
  input  logic                              we,
  input  logic [ADDR_W-1:0]                 addr,
  input  logic [31:0]                       wdata,
  output logic [31:0]                       rdata,
  output logic                              ack,
  // observed values
  input  logic [15:0]                       total_power,
  input  logic [pwr_pkg::PWR_W-1:0]         total_budget,
  input  logic signed [pwr_pkg::PWR_W:0]    slack,
  input  logic [NCPU-1:0]                   core_active,
  input  pwr_pkg::core_class_e [NCPU-1:0]   core_class,
  input  logic [NCPU-1:0][ACT_W-1:0]        act,
  input  logic [NCPU-1:0][pwr_pkg::PWR_W-1:0] core_power,
  input  logic [NCPU-1:0][pwr_pkg::PWR_W-1:0] core_sp,
  input  logic [NCPU-1:0][THETA_W-1:0]      theta,
  // controls
  output logic [15:0]                       global_sp,
  output logic [NCPU-1:0]                   force_en,
  output logic [NCPU-1:0][THETA_W-1:0]      force_theta
);

  localparam int unsigned CORE_BASE = 16;

  logic [31:0] rd_n;
  logic [ADDR_W-1:0] off;
  int unsigned core;

  always_comb begin
    rd_n = '0;
    off  = '0;
    core = 0;
    if (addr < ADDR_W'(CORE_BASE)) begin
      unique case (addr[3:2])
        2'd0: rd_n = {16'd0, global_sp};
        2'd1: rd_n = {16'd0, total_power};
        2'd2: rd_n = 32'(total_budget);
        default: rd_n = 32'(signed'(slack));
      endcase
    end else begin
      off  = addr - ADDR_W'(CORE_BASE);
      core = int'(32'(off) >> 4);
      if (core < NCPU) begin
        unique case (off[3:2])
          2'd0: rd_n = {17'd0, 7'(act[core]), 2'd0, 2'(core_class[core]), 3'd0, core_active[core]};
          2'd1: rd_n = 32'(core_power[core]);
          2'd2: rd_n = 32'(core_sp[core]);
          default: rd_n = {force_en[core], 4'd0, 11'(theta[core]), 5'd0, 11'(force_theta[core])};
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      global_sp   <= 16'(SP_RESET);
      force_en    <= '0;
      force_theta <= '0;
      rdata       <= '0;
      ack         <= 1'b0;
    end else begin
      ack   <= req;
      rdata <= req ? rd_n : '0;
      if (req && we) begin
        if (addr == ADDR_W'(0)) begin
          global_sp <= wdata[15:0];
        end else if (addr >= ADDR_W'(CORE_BASE) && core < NCPU && off[3:2] == 2'd3) begin
          force_en[core]    <= wdata[31];
          force_theta[core] <= THETA_W'(wdata[10:0]);
        end
      end
    end
  end

  // Only word-aligned accesses are defined.
  assert property (@(posedge clk) disable iff (rst) req |-> addr[1:0] == 2'b00);

endmodule
