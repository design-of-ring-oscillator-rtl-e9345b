`timescale 1ns/1fs
// Frequency control of the ILO in the MPC clock multiplier: a bang-bang PLL
// for the initial lock, then the integral path of the FE calibrator.
//
// BB-PLL mode (ilcm_mode = 0): a divide-by-N counter on phi_0 (N = 16,
// 4.8 GHz from 300 MHz) makes the feedback clock; a bang-bang phase detector
// samples it at the rising edge of S_REF (1 = feedback early = too fast).
// Each reference cycle the DCR word becomes the integral code plus a
// proportional kick of +-KP_BB codes, and the integral code moves by
// +-KI_BB LSBs.
// ILCM mode (ilcm_mode = 1): the divider stops, the proportional kick is
// dropped and the integral code, kept from the BB-PLL, moves by +-K_I LSBs
// for each FE-calibrator decision. Integral codes carry FRAC fractional
// bits; a first-order delta-sigma modulator (dsm1) turns them into a carry
// that is added to the integer part, so the DCR word dithers between two
// adjacent codes and its average carries the fractional resolution.
// The BB-PLL for the initial lock and the integral gain K_I of the FE
// calibrator follow the source design; the gains, the fractional width, the
// hand-over of the integral code and the direction (a larger DCR word gives
// a higher frequency) are this design's choices.
// Timing: clk is the falling edge of S_REF; dcr is registered there.
module freq_ctrl
  import rocg_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned FRAC   = 6,
  parameter int unsigned KP_BB  = 2,    // codes
  parameter int unsigned KI_BB  = 16,   // LSBs of the integral code
  parameter int unsigned K_I    = 4,    // LSBs of the integral code
  parameter int unsigned DCR_INIT = 512
) (
  input  logic      clk,        // inverted S_REF
  input  logic      rst_n,
  input  logic      s_ref,
  input  logic      phi0,       // ILO phi_0
  input  logic      ilcm_mode,
  input  bb_dec_t   fe_dec,
  output osc_code_t dcr,
  output logic      bbpd
);
  localparam int IW   = OSC_CODE_W + FRAC;
  localparam int IMAX = (1 << IW) - 1;

  // ---- divide-by-N feedback divider in the phi_0 domain
  logic [$clog2(N)-1:0] div_q;
  logic [1:0]           mode_sync_q;
  logic                 fb_clk;
  always_ff @(posedge phi0 or negedge rst_n) begin
    if (!rst_n) begin
      div_q       <= '0;
      mode_sync_q <= '0;
    end else begin
      mode_sync_q <= {mode_sync_q[0], ilcm_mode};
      if (!mode_sync_q[1]) div_q <= (div_q == $clog2(N)'(N - 1)) ? '0 : div_q + 1'b1;
    end
  end
  assign fb_clk = (int'(div_q) < int'(N / 2));

  // ---- bang-bang phase detector
  always_ff @(posedge s_ref or negedge rst_n)
    if (!rst_n) bbpd <= 1'b0;
    else        bbpd <= fb_clk;

  // ---- loop filter
  logic [IW-1:0] int_q;
  logic          dsm_carry;

  dsm1 #(.W(FRAC)) u_dsm (
    .clk (clk), .rst_n (rst_n), .frac (int_q[FRAC-1:0]), .carry (dsm_carry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_q <= IW'(DCR_INIT << FRAC);
      dcr   <= OSC_CODE_W'(DCR_INIT);
    end else begin
      int i_n, c_n;
      i_n = int'(int_q);
      c_n = 0;
      if (!ilcm_mode) begin
        i_n += bbpd ? -int'(KI_BB) : int'(KI_BB);
        c_n  = bbpd ? -int'(KP_BB) : int'(KP_BB);
      end else if (fe_dec == BB_UP) begin
        i_n += int'(K_I);
      end else if (fe_dec == BB_DN) begin
        i_n -= int'(K_I);
      end
      i_n   = sat_range(i_n, IMAX);
      int_q <= IW'(i_n);
      dcr   <= OSC_CODE_W'(sat_range((i_n >> FRAC) + c_n + int'(dsm_carry), (1 << OSC_CODE_W) - 1));
    end
  end

endmodule
