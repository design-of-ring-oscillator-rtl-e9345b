`timescale 1ns/1fs
// Shared types and constants of the two ring-oscillator clock generators.
//
// The SNC AD-PLL (DDR5 RCD clock buffer, 3 GHz) and the MPC injection-locked
// clock multiplier (300 MHz x 16 = 4.8 GHz) both steer a ring oscillator with
// a 10-bit digital word; the MPC calibration loops exchange bang-bang up/down
// decisions. Widths that the source design gives (10-bit oscillator words,
// 8-bit P_ctrl, 64-bit N_ctrl, 4-bit injection strength, N = 16) are fixed
// here; everything else is a parameter of the module that uses it.
// Lint note: linted on its own, without the delay-line modules that use
// them, PCTRL_W and NCTRL_W are reported as unused.
package rocg_pkg;

  // 10-bit oscillator control words (SNC-DCO FTC count, ILO DCR code)
  localparam int unsigned OSC_CODE_W = 10;
  typedef logic [OSC_CODE_W-1:0] osc_code_t;

  // Fine-tuning DCDL control: 8-bit P_ctrl and 64-bit N_ctrl thermometers
  localparam int unsigned PCTRL_W = 8;
  localparam int unsigned NCTRL_W = 64;

  // Bang-bang decision of a calibration loop
  typedef enum logic [1:0] {
    BB_HOLD = 2'b00,
    BB_UP   = 2'b01,
    BB_DN   = 2'b10
  } bb_dec_t;

  // Saturating signed add onto an unsigned range [0, max]
  function automatic int sat_range(input int value, input int max);
    if (value < 0) return 0;
    if (value > max) return max;
    return value;
  endfunction

  // Count of ones in a thermometer word
  function automatic int unsigned therm_count64(input logic [63:0] t);
    int unsigned n = 0;
    for (int i = 0; i < 64; i++) n += int'(t[i]);
    return n;
  endfunction

endpackage
