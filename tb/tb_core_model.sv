// tb_core_model: behavioural stand-in for one processor core, for tests.
//
// Not a processor: it only produces what the power management system
// observes of a core. On every rising edge of its (gated) clock, while an
// application runs (active), it toggles each bit of a 32-bit data bus with
// probability intensity/100, changes an 8-bit control field and a 1-bit
// flag with probability intensity/100 and intensity/200, and commits one
// instruction whose class follows the application's mix. When the clock
// is gated or no application runs nothing toggles and nothing commits.
// probes = {flag, control, data}, matching the default three-term model.
// The probes are clocked by the gated clock gclk; the commit report is
// clocked by the free clock clk and reports no instruction (class 3) for
// any cycle whose edge the gate held back, so the two views agree.
module tb_core_model (
  input  logic        clk,
  input  logic        clk_en,
  input  logic        gclk,
  input  logic        active,
  input  int unsigned intensity,   // 0..100
  input  int unsigned mix,         // 0 ALU, 1 load/store, 2 FPU heavy
  output logic [40:0] probes,
  output logic [1:0]  commit
);
  logic [31:0] data = '0;
  logic [7:0]  ctrl = '0;
  logic        flag = 1'b0;

  assign probes = {flag, ctrl, data};

  initial commit = 2'd3;

  always @(posedge gclk) begin
    if (active) begin
      logic [31:0] m;
      m = '0;
      for (int b = 0; b < 32; b++) if (($urandom % 100) < intensity) m[b] = 1'b1;
      data <= data ^ m;
      if (($urandom % 100) < intensity) ctrl <= ctrl + 8'd1 + 8'($urandom % 7);
      if (($urandom % 200) < intensity) flag <= ~flag;
    end
  end

  always @(posedge clk) begin
    if (active && clk_en) begin
      int r;
      r = int'($urandom % 100);
      if (r >= intensity) commit <= 2'd3;                       // stall
      else case (mix)
        1:       commit <= (r % 2 == 0) ? 2'd1 : 2'd0;          // load/store heavy
        2:       commit <= (r % 3 == 0) ? 2'd2 : 2'd0;          // FPU heavy
        default: commit <= 2'd0;                                // ALU
      endcase
    end else begin
      commit <= 2'd3;
    end
  end
endmodule
