`timescale 1ns/1fs
// Ring-oscillator injection-locked clock multiplier (ILCM) with
// multi-phase-based calibration (MPC): 300 MHz in, N = 16, 4.8 GHz out.
//
// The reference S_REF, gated by gating_ctrl, is the injection pulse S_INJ,
// which realigns phi_0/phi_180 of the ILO every reference cycle and so
// removes the ring's accumulated jitter. To keep the realignment small, the
// ring's free-running frequency must equal N * f_REF (frequency error, FE)
// and the calibrator's own sampling point must match the injection point
// (path offset, PO). MPC uses the ring's own multiphase outputs:
//   * FE calibrator: S_PRE = S_REF delayed by DCDL_PRE samples phi_315 just
//     before the injection; the accumulated phase error tells the sign of
//     the FE and freq_ctrl integrates it into the DCR word (every injected
//     cycle, so the FE loop keeps full injection strength and bandwidth).
//   * Narrow-range DLL: S_POST = S_REF delayed by DCDL_POST samples phi_45
//     just after the injection and keeps S_POST on the realigned edge.
//   * PO calibrator: in a gated cycle (no injection) the same phi_45 sample
//     shows whether the injection would have pushed or pulled the phase,
//     i.e. the FE that remains; it moves DCDL_PRE until none remains.
// phi_0 sampled by S_POST (PD_INJ) says whether S_INJ meets a rising or a
// falling phi_0 edge. Before ILCM mode a bang-bang PLL (divide by N) brings
// the ring near the target; ilcm_mode then enables injection and MPC.
// The structure is the source design's; the ILO and DCDLs are behavioural
// models, and the mode switch is an input (the source design does not say
// what triggers it).
// Interface: coarse_pre / coarse_post set the NAND coarse cells; inj_sw is
// the 4-bit injection switch size; grcw the gating rate; s_pre is brought
// out, as on the source chip, to observe DCDL_PRE.
// The source design adds 20-bit delta-sigma modulators to each calibration
// loop for finer frequency and delay steps. Here the FE loop has one (a
// first-order modulator inside freq_ctrl, dithering the DCR word); the two
// DCDL words move in whole N_ctrl units without one.
// Lint note: bbpd, pd_pre, pd_post and pd_inj are named internal nets kept
// for observation in simulation; nothing inside reads them, so a linter
// reports them as unused.
module mpc_ilcm
  import rocg_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter int unsigned K_I    = 4,
  parameter int unsigned K_PRE  = 1,
  parameter int unsigned K_POST = 1
) (
  input  logic       rst_n,
  input  logic       s_ref,
  input  logic       ilcm_mode,
  input  logic [7:0] grcw,
  input  logic [3:0] inj_sw,
  input  logic [2:0] coarse_pre,
  input  logic [2:0] coarse_post,
  output logic [7:0] phase,
  output logic       s_pre,
  output osc_code_t  dcr,
  output logic [6:0] pre_n,
  output logic [3:0] pre_p,
  output logic [6:0] post_n,
  output logic [3:0] post_p,
  output logic       s_en_gating,
  output logic       p_step
);
  logic    clk_n, s_post, s_inj, inj_en, bbpd;
  logic    pd_pre, pd_post, pd_inj, pre_pstep, post_pstep;
  bb_dec_t fe_dec, dll_dec, po_dec;
  logic [NCTRL_W-1:0] pre_nctrl, post_nctrl;
  logic [PCTRL_W-1:0] pre_pctrl, post_pctrl;

  assign clk_n = ~s_ref;
  assign s_inj = s_ref & inj_en;     // injection pulse gate
  assign p_step = pre_pstep | post_pstep;

  gating_ctrl u_gating (
    .clk (clk_n), .rst_n (rst_n), .ilcm_mode (ilcm_mode), .grcw (grcw),
    .s_en_gating (s_en_gating), .inj_en (inj_en)
  );

  ilo u_ilo (.dcr (dcr), .inj_sw (inj_sw), .s_inj (s_inj), .phase (phase));

  dcdl u_dcdl_pre (
    .din (s_ref), .coarse (coarse_pre), .p_ctrl (pre_pctrl), .n_ctrl (pre_nctrl), .dout (s_pre)
  );
  dcdl u_dcdl_post (
    .din (s_ref), .coarse (coarse_post), .p_ctrl (post_pctrl), .n_ctrl (post_nctrl), .dout (s_post)
  );

  mpc_decision u_dec (
    .clk (clk_n), .rst_n (rst_n), .s_pre (s_pre), .s_post (s_post),
    .phi_pre (phase[7]), .phi_post (phase[1]), .phi_inj (phase[0]),
    .ilcm_mode (ilcm_mode), .gated (s_en_gating),
    .fe_dec (fe_dec), .dll_dec (dll_dec), .po_dec (po_dec),
    .pd_pre (pd_pre), .pd_post (pd_post), .pd_inj (pd_inj)
  );

  freq_ctrl #(.N(N), .K_I(K_I)) u_freq (
    .clk (clk_n), .rst_n (rst_n), .s_ref (s_ref), .phi0 (phase[0]),
    .ilcm_mode (ilcm_mode), .fe_dec (fe_dec), .dcr (dcr), .bbpd (bbpd)
  );

  dcw_ctrl #(.K(K_PRE)) u_dcw_pre (
    .clk (clk_n), .rst_n (rst_n), .dec (po_dec),
    .n_ctrl (pre_nctrl), .p_ctrl (pre_pctrl), .n_cnt (pre_n), .p_cnt (pre_p), .p_step (pre_pstep)
  );
  dcw_ctrl #(.K(K_POST)) u_dcw_post (
    .clk (clk_n), .rst_n (rst_n), .dec (dll_dec),
    .n_ctrl (post_nctrl), .p_ctrl (post_pctrl), .n_cnt (post_n), .p_cnt (post_p), .p_step (post_pstep)
  );

endmodule
