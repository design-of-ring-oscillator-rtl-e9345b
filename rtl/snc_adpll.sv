`timescale 1ns/1fs
// All-digital PLL with a supply-noise-compensated ring DCO, used as the
// zero-delay clock buffer of a DDR5 registering clock driver (RCD).
//
// The reference and output run at the same frequency (3 GHz in the main
// configuration, divide ratio 1). The TDC-PFD compares s_ref with the DCO
// output and reports a 5-step phase error and a dead-zone frequency error,
// both retimed by s_cdc. The loop filter forwards them straight to the DCO
// word (proportional path, full rate) and deserializes them into the
// integral code C_I. The A-FTL counts reference and DCO edges and, while the
// frequency is far off, adds large one-shot corrections to C_I; the lock
// detector watches C_I. Supply noise is handled in the DCO itself (open-loop
// SNC), so nothing in the loop depends on it.
// The structure follows the source design; the analog parts (DCO, TDC-PFD)
// are behavioural models, and the digital blocks are clocked by s_cdc,
// which is this design's reading of how the retimed errors reach the loop
// filter. CLK_DIG (the clock the A-FTL counts) is the DCO output itself.
// Interface: rst_n resets the digital loop; s_band and s_pdn go to the DCO;
// vdd_dev_mv is the DCO supply deviation; dco_code, ci and lock are
// observation outputs.
// Lint note: the A-FTL's s_rst (ftl_rst) is only used inside the A-FTL;
// it is wired out to a named net for observation and reported as unused.
module snc_adpll
  import rocg_pkg::*;
#(
  parameter int unsigned DES      = 8,
  parameter int unsigned FTL_F0_CODES = 97,  // A-FTL: lowest DCO frequency in codes
  parameter int unsigned FTL_SAT  = 1023,
  parameter int unsigned LD_WIN   = 4,
  parameter int unsigned LD_CNT   = 64
) (
  input  logic              rst_n,
  input  logic              s_ref,
  input  logic [1:0]        s_band,
  input  logic              s_pdn,
  input  logic signed [15:0] vdd_dev_mv,
  output logic              s_out,
  output osc_code_t         dco_code,
  output osc_code_t         ci,
  output logic              ftl_active,
  output logic              lock
);
  logic              s_cdc, f_up, f_dn, ftl_en, ftl_rst, ci_upd;
  logic [4:0]        tdc_th;
  logic signed [15:0] ftl_step;

  tdc_pfd u_tdc_pfd (
    .s_ref  (s_ref),
    .s_fb   (s_out),
    .s_cdc  (s_cdc),
    .tdc_th (tdc_th),
    .f_up   (f_up),
    .f_dn   (f_dn)
  );

  adpll_dlf #(.DES(DES)) u_dlf (
    .clk      (s_cdc),
    .rst_n    (rst_n),
    .tdc_th   (tdc_th),
    .f_up     (f_up),
    .f_dn     (f_dn),
    .ftl_en   (ftl_en),
    .ftl_step (ftl_step),
    .dco_code (dco_code),
    .ci_int   (ci),
    .ci_upd   (ci_upd)
  );

  // present DCO word for the A-FTL step: integral code plus 256 codes per
  // band step (the DCO model's default band size)
  logic [11:0] ftl_code;
  assign ftl_code = 12'(ci) + {2'b00, s_band, 8'd0};

  a_ftl #(.F0_CODES(FTL_F0_CODES), .SAT(FTL_SAT)) u_a_ftl (
    .clk_ref  (s_cdc),
    .clk_dig  (s_out),
    .rst_n    (rst_n),
    .code     (ftl_code),
    .s_en_ftl (ftl_en),
    .ftl_step (ftl_step),
    .s_rst    (ftl_rst)
  );
  assign ftl_active = ftl_en;

  lock_detector #(.WIN(LD_WIN), .CNT(LD_CNT)) u_ld (
    .clk    (s_cdc),
    .rst_n  (rst_n),
    .ci_upd (ci_upd),
    .ci     (ci),
    .lock   (lock)
  );

  snc_dco u_dco (
    .code       (dco_code),
    .s_band     (s_band),
    .s_pdn      (s_pdn),
    .vdd_dev_mv (vdd_dev_mv),
    .s_out      (s_out)
  );

endmodule
