`timescale 1ns/1fs
// Behavioural model (not synthesizable) of the TDC-PFD of the AD-PLL.
//
// The real part is a timing circuit: a phase-frequency detector whose UP/DN
// pulses drive a five-step Vernier TDC and a dead-zone PFD, retimed by S_CDC,
// a copy of the reference delayed by T_CDC_NS. This model measures the
// time difference dt between matched rising edges of s_ref and s_fb with a
// tri-state PFD (dt > 0 when the feedback lags) and, at each rising edge of
// s_cdc, updates:
//   tdc_th[i] = (dt > threshold[i]) with thresholds
//               {-TAU2, -TAU1, 0, +TAU1, +TAU2}: three narrow steps around
//               lock for low jitter, two broad steps for fast locking;
//   f_up / f_dn = dead-zone PFD: dt > TAU_UP / dt < -TAU_DN.
// An edge still unmatched at s_cdc for longer than TAU_UP (TAU_DN) counts as
// that large an error, so a large frequency difference keeps F_err active.
// TAU1 = 6 ps is the source design's narrow step; TAU2, TAU_UP = TAU_DN and
// T_CDC are this design's choices (the source design requires
// t_UP + t_c2q + t_setup < t_CDC < t_CK + t_c2q + t_hold, which 0.2 ns meets
// at 3 GHz).
// Timing: outputs change right after the rising edge of s_cdc, so a loop
// filter clocked by s_cdc uses them one cycle later.
// Lint note: as a behavioural model it uses real-valued delays computed at
// run time and blocking assignments to its own time-keeping variables in
// edge-triggered processes; a linter reports these, and they are intended.
module tdc_pfd #(
  parameter real TAU1_PS  = 6.0,
  parameter real TAU2_PS  = 20.0,
  parameter real TAU_UP_PS = 40.0,
  parameter real T_CDC_NS = 0.2
) (
  input  logic       s_ref,
  input  logic       s_fb,
  output logic       s_cdc,
  output logic [4:0] tdc_th,
  output logic       f_up,
  output logic       f_dn
);
  real t_ref_p, t_fb_p, dt_ps;
  bit  ref_pend, fb_pend;

  initial begin
    s_cdc = 1'b0; tdc_th = 5'b00111; f_up = 1'b0; f_dn = 1'b0;
    ref_pend = 1'b0; fb_pend = 1'b0; dt_ps = 0.0; t_ref_p = 0.0; t_fb_p = 0.0;
  end

  always @(s_ref) s_cdc <= #(T_CDC_NS) s_ref;

  always @(posedge s_ref) begin
    if (fb_pend) begin
      dt_ps   = (t_fb_p - $realtime) * 1000.0;
      fb_pend = 1'b0;
    end else if (!ref_pend) begin
      ref_pend = 1'b1;
      t_ref_p  = $realtime;
    end
  end

  always @(posedge s_fb) begin
    if (ref_pend) begin
      dt_ps    = ($realtime - t_ref_p) * 1000.0;
      ref_pend = 1'b0;
    end else if (!fb_pend) begin
      fb_pend = 1'b1;
      t_fb_p  = $realtime;
    end
  end

  always @(posedge s_cdc) begin
    real d;
    d = dt_ps;
    if (ref_pend && ($realtime - t_ref_p) * 1000.0 > TAU_UP_PS) d = ($realtime - t_ref_p) * 1000.0;
    if (fb_pend && ($realtime - t_fb_p) * 1000.0 > TAU_UP_PS) d = -($realtime - t_fb_p) * 1000.0;
    tdc_th <= {d > TAU2_PS, d > TAU1_PS, d > 0.0, d > -TAU1_PS, d > -TAU2_PS};
    f_up   <= d > TAU_UP_PS;
    f_dn   <= d < -TAU_UP_PS;
  end

endmodule
