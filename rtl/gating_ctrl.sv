`timescale 1ns/1fs
// Injection gating control of the MPC clock multiplier.
//
// In ILCM mode it counts reference cycles and raises S_EN,gating for one
// cycle out of every GRCW (gating-rate control word), i.e. 1/GR_INJ = GRCW:
// that cycle's injection pulse is suppressed and the PO calibrator runs
// instead of the FE calibrator and the DLL. inj_en is the enable of the
// injection pulse gate (AND with the reference); it is low outside ILCM mode
// and during a gated cycle. GRCW = 0 disables gating.
// GRCW = 100 (one gated pulse in 100, the rate the source design uses in its
// measurements) is the default; the 8-bit width of GRCW is this design's
// choice.
// Timing: clocked on the falling edge of the reference (clk = inverted
// S_REF), so inj_en and s_en_gating are stable across the next rising edge.
module gating_ctrl #(
  parameter int unsigned GRCW_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ilcm_mode,
  input  logic [GRCW_W-1:0] grcw,
  output logic              s_en_gating,
  output logic              inj_en
);
  logic [GRCW_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q       <= '0;
      s_en_gating <= 1'b0;
      inj_en      <= 1'b0;
    end else if (!ilcm_mode) begin
      cnt_q       <= '0;
      s_en_gating <= 1'b0;
      inj_en      <= 1'b0;
    end else begin
      if (grcw != 0 && cnt_q >= grcw - 1'b1) begin
        cnt_q       <= '0;
        s_en_gating <= 1'b1;
        inj_en      <= 1'b0;
      end else begin
        cnt_q       <= cnt_q + 1'b1;
        s_en_gating <= 1'b0;
        inj_en      <= 1'b1;
      end
    end
  end

endmodule
