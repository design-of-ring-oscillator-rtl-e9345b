`timescale 1ns/1fs
// Ring-oscillator clock generators with calibration: top level.
//
// Two independent clock generators stand side by side, each with its own
// ports:
//   * adpll_*: the supply-noise-compensated all-digital PLL used as the
//     DDR5 RCD clock buffer (3 GHz in, 3 GHz out), followed by the RCD
//     clock-stop control on its output;
//   * ilcm_*: the injection-locked clock multiplier with multi-phase-based
//     calibration (300 MHz in, 4.8 GHz out, eight phases).
// The two were separate prototypes; placing them in one top is only for
// simulation and synthesis of the whole set. Each generator includes
// behavioural models of its analog parts (ring oscillators, TDC-PFD, delay
// lines), so this top is simulatable but only its digital blocks are
// synthesizable.
module ro_clkgen_top
  import rocg_pkg::*;
(
  // SNC AD-PLL
  input  logic              adpll_rst_n,
  input  logic              adpll_ref,
  input  logic [1:0]        adpll_band,
  input  logic              adpll_pdn,
  input  logic signed [15:0] adpll_vdd_dev_mv,
  input  logic              adpll_clk_stop,
  output logic              adpll_clk_out,
  output logic              adpll_stopped,
  output osc_code_t         adpll_dco_code,
  output osc_code_t         adpll_ci,
  output logic              adpll_ftl_active,
  output logic              adpll_lock,
  // MPC ILCM
  input  logic              ilcm_rst_n,
  input  logic              ilcm_ref,
  input  logic              ilcm_mode,
  input  logic [7:0]        ilcm_grcw,
  input  logic [3:0]        ilcm_inj_sw,
  input  logic [2:0]        ilcm_coarse_pre,
  input  logic [2:0]        ilcm_coarse_post,
  output logic [7:0]        ilcm_phase,
  output logic              ilcm_s_pre,
  output osc_code_t         ilcm_dcr,
  output logic [6:0]        ilcm_pre_n,
  output logic [3:0]        ilcm_pre_p,
  output logic [6:0]        ilcm_post_n,
  output logic [3:0]        ilcm_post_p,
  output logic              ilcm_s_en_gating,
  output logic              ilcm_p_step
);
  logic adpll_s_out;

  snc_adpll u_adpll (
    .rst_n      (adpll_rst_n),
    .s_ref      (adpll_ref),
    .s_band     (adpll_band),
    .s_pdn      (adpll_pdn),
    .vdd_dev_mv (adpll_vdd_dev_mv),
    .s_out      (adpll_s_out),
    .dco_code   (adpll_dco_code),
    .ci         (adpll_ci),
    .ftl_active (adpll_ftl_active),
    .lock       (adpll_lock)
  );

  clk_stop_ctrl u_clk_stop (
    .clk_in     (adpll_s_out),
    .rst_n      (adpll_rst_n),
    .s_clk_stop (adpll_clk_stop),
    .clk_out    (adpll_clk_out),
    .stopped    (adpll_stopped)
  );

  mpc_ilcm u_ilcm (
    .rst_n       (ilcm_rst_n),
    .s_ref       (ilcm_ref),
    .ilcm_mode   (ilcm_mode),
    .grcw        (ilcm_grcw),
    .inj_sw      (ilcm_inj_sw),
    .coarse_pre  (ilcm_coarse_pre),
    .coarse_post (ilcm_coarse_post),
    .phase       (ilcm_phase),
    .s_pre       (ilcm_s_pre),
    .dcr         (ilcm_dcr),
    .pre_n       (ilcm_pre_n),
    .pre_p       (ilcm_pre_p),
    .post_n      (ilcm_post_n),
    .post_p      (ilcm_post_p),
    .s_en_gating (ilcm_s_en_gating),
    .p_step      (ilcm_p_step)
  );

endmodule
