`timescale 1ns/1fs
// Sub-sampling bang-bang phase detectors and decision tables of the
// multi-phase-based calibration (MPC).
//
// Three SS-BBPDs sample ring phases once per reference cycle:
//   PD_PRE  = phi_315 (pre-injection phase) at the rising edge of S_PRE,
//   PD_POST = phi_45  (post-injection phase) at the rising edge of S_POST,
//   PD_INJ  = phi_0   (injected phase)       at the rising edge of S_POST.
// PD_INJ tells whether the injection hit a rising or a falling edge of
// phi_0, so every decision is taken relative to it. Once per reference
// cycle, on clk (the falling edge of the reference, after both sampling
// clocks), the tables of the source design give:
//   injection applied (gated = 0):
//     FE calibrator  freq  UP when PD_INJ xor PD_PRE,  else DN
//     DLL            t_POST UP when PD_INJ xor PD_POST, else DN
//   injection gated (gated = 1):
//     PO calibrator  t_PRE UP when PD_INJ xnor PD_POST, else DN
// (+1/-1 of the source tables are 1/0 here). Outside the ILCM mode all three
// decisions are HOLD.
// The sampled phases, the tables and the split between the applied and the
// gated events follow the source design; sampling on the reference's
// falling edge and the 1/0 encoding are this design's choices.
// Timing: decisions are registered on clk and valid for one cycle.
module mpc_decision
  import rocg_pkg::*;
(
  input  logic    clk,       // falling edge of S_REF (connect inverted S_REF)
  input  logic    rst_n,
  input  logic    s_pre,
  input  logic    s_post,
  input  logic    phi_pre,   // phi_315
  input  logic    phi_post,  // phi_45
  input  logic    phi_inj,   // phi_0
  input  logic    ilcm_mode,
  input  logic    gated,     // S_EN,gating for the injection of this cycle
  output bb_dec_t fe_dec,
  output bb_dec_t dll_dec,
  output bb_dec_t po_dec,
  output logic    pd_pre,
  output logic    pd_post,
  output logic    pd_inj
);
  always_ff @(posedge s_pre or negedge rst_n)
    if (!rst_n) pd_pre <= 1'b0;
    else        pd_pre <= phi_pre;

  always_ff @(posedge s_post or negedge rst_n)
    if (!rst_n) begin
      pd_post <= 1'b0;
      pd_inj  <= 1'b0;
    end else begin
      pd_post <= phi_post;
      pd_inj  <= phi_inj;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fe_dec  <= BB_HOLD;
      dll_dec <= BB_HOLD;
      po_dec  <= BB_HOLD;
    end else begin
      fe_dec  <= BB_HOLD;
      dll_dec <= BB_HOLD;
      po_dec  <= BB_HOLD;
      if (ilcm_mode && !gated) begin
        fe_dec  <= (pd_inj ^ pd_pre)  ? BB_UP : BB_DN;
        dll_dec <= (pd_inj ^ pd_post) ? BB_UP : BB_DN;
      end else if (ilcm_mode && gated) begin
        po_dec  <= (pd_inj ^ pd_post) ? BB_DN : BB_UP;
      end
    end
  end

endmodule
