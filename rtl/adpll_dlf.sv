`timescale 1ns/1fs
// Digital loop filter of the SNC AD-PLL.
//
// The TDC-PFD reports the phase error as a 5-bit thermometer word from its
// five Vernier steps (three narrow steps around the lock point, two broad
// steps further out) plus the dead-zone PFD frequency error F_err (up/down).
// Each cycle of the retiming clock s_cdc (the reference clock after the
// TDC-PFD's retiming delay) this block
//   * decodes the thermometer word into a signed level -3..+3 and maps it to
//     a non-linear weight (broad steps weigh more, giving the larger gain
//     far from lock),
//   * forwards the weighted phase and frequency errors directly to the DCO
//     word (proportional path, full rate, gain KP),
//   * deserializes the same errors over DES cycles and adds their sum, scaled
//     by ALPHA1, to the integral code C_I once per DES cycles,
//   * adds the one-shot A-FTL correction (alpha2) to C_I when ftl_en pulses.
// The DCO word is C_I (integer part) plus the proportional term, saturated to
// 10 bits. Both paths steer the same unit cells of the DCO, so their gain
// ratio does not depend on PVT, as in the source design.
// The direct proportional path, the deserialized integral path, the alpha1 /
// alpha2 split and the 10-bit DCO word follow the source design. The level
// weights, KP, ALPHA1, DES, the number of fractional bits of C_I and the
// reset value of C_I (lowest code, i.e. the DCO starts at its minimum
// frequency) are this design's choices.
// Timing: dco_code is registered; a TDC result moves dco_code one s_cdc
// cycle later. ci_upd pulses for one cycle each time C_I is updated by the
// deserialized path.
module adpll_dlf
  import rocg_pkg::*;
#(
  parameter int unsigned DES    = 8,   // deserialization ratio of the integral path
  parameter int unsigned FRAC   = 4,   // fractional bits of C_I
  parameter int unsigned KP     = 1,   // proportional gain (DCO codes per weight unit)
  parameter int unsigned ALPHA1 = 1,   // integral gain (C_I LSBs per weight unit)
  parameter int unsigned W_FINE = 1,   // weight of a narrow-step level (+-1)
  parameter int unsigned W_MID  = 2,   // weight of level +-2
  parameter int unsigned W_FAR  = 4,   // weight of level +-3
  parameter int unsigned W_FERR = 8    // weight of the DZ-PFD frequency error
) (
  input  logic             clk,       // s_cdc
  input  logic             rst_n,
  input  logic [4:0]       tdc_th,    // thermometer: bit i set when phase error above threshold i
  input  logic             f_up,
  input  logic             f_dn,
  input  logic             ftl_en,    // one-shot alpha2 correction from the A-FTL
  input  logic signed [15:0] ftl_step,// alpha2 correction in DCO codes
  output osc_code_t        dco_code,
  output osc_code_t        ci_int,    // integer part of the integral code
  output logic             ci_upd
);
  localparam int CI_W   = OSC_CODE_W + FRAC + 2;
  localparam int CI_MAX = ((1 << OSC_CODE_W) - 1) << FRAC;

  logic signed [CI_W-1:0] ci_q;
  logic signed [15:0]     des_sum_q;
  logic [$clog2(DES)-1:0] des_cnt_q;

  // thermometer decode and non-linear weighting
  logic signed [7:0] err_w;
  always_comb begin
    int ones;
    int w;
    ones = 0;
    for (int i = 0; i < 5; i++) ones += int'(tdc_th[i]);
    case (ones)
      0: w = -int'(W_FAR);
      1: w = -int'(W_MID);
      2: w = -int'(W_FINE);
      3: w = int'(W_FINE);
      4: w = int'(W_MID);
      default: w = int'(W_FAR);
    endcase
    if (f_up && !f_dn) w += int'(W_FERR);
    if (f_dn && !f_up) w -= int'(W_FERR);
    err_w = 8'(w);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ci_q      <= '0;
      des_sum_q <= '0;
      des_cnt_q <= '0;
      ci_upd    <= 1'b0;
      dco_code  <= '0;
    end else begin
      int ci_n;
      ci_n   = int'(ci_q);
      ci_upd <= 1'b0;
      if (des_cnt_q == $clog2(DES)'(DES - 1)) begin
        ci_n      += (int'(des_sum_q) + int'(err_w)) * int'(ALPHA1);
        des_sum_q <= '0;
        des_cnt_q <= '0;
        ci_upd    <= 1'b1;
      end else begin
        des_sum_q <= des_sum_q + 16'(err_w);
        des_cnt_q <= des_cnt_q + 1'b1;
      end
      if (ftl_en) ci_n += int'(ftl_step) * (1 << FRAC);
      ci_n = sat_range(ci_n, CI_MAX);
      ci_q <= CI_W'(ci_n);
      dco_code <= OSC_CODE_W'(sat_range((ci_n >>> FRAC) + int'(err_w) * int'(KP),
                                        (1 << OSC_CODE_W) - 1));
    end
  end

  assign ci_int = OSC_CODE_W'(ci_q >>> FRAC);

endmodule
