`timescale 1ns/1fs
// Behavioural model (not synthesizable) of the digitally-controlled delay
// line (DCDL) that places the sampling clocks S_PRE and S_POST of the MPC
// calibrators.
//
// The real part has NAND-based coarse cells, each step two NAND delays, and
// a fine cell that loads its node with MOS capacitors switched by an 8-bit
// P_ctrl and a 64-bit N_ctrl thermometer word. N_ctrl gives the fine
// resolution; each P_ctrl unit is a larger step that extends N_ctrl's narrow
// range. The model delays both edges of din by
//   T_INTR + coarse * T_COARSE + ones(p_ctrl) * T_P + ones(n_ctrl) * T_N.
// T_N = 150 fs is chosen close to the measured fine resolution (about
// 184 fs at a 0.92 V supply); T_INTR, T_COARSE and T_P are this design's
// choices, with T_P below the 64 * T_N span of N_ctrl so the fine range has
// no gaps.
// Timing: transport delay; the delay used is the one at the input edge.
// Lint note: as a behavioural model it uses real-valued delays computed at
// run time and blocking assignments to its own time-keeping variables in
// edge-triggered processes; a linter reports these, and they are intended.
module dcdl
  import rocg_pkg::*;
#(
  parameter real T_INTR   = 0.040,
  parameter real T_COARSE = 0.020,
  parameter real T_P      = 0.008,
  parameter real T_N      = 0.00015
) (
  input  logic               din,
  input  logic [2:0]         coarse,
  input  logic [PCTRL_W-1:0] p_ctrl,
  input  logic [NCTRL_W-1:0] n_ctrl,
  output logic               dout
);
  real d_ns;
  always_comb begin
    int np;
    np = 0;
    for (int i = 0; i < PCTRL_W; i++) np += int'(p_ctrl[i]);
    d_ns = T_INTR + real'(coarse) * T_COARSE + real'(np) * T_P
         + real'(therm_count64(n_ctrl)) * T_N;
  end

  initial dout = 1'b0;
  always @(din) dout <= #(d_ns) din;

endmodule
