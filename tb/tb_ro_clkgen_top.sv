`timescale 1ns/1fs
// End-to-end test of the whole top at its default parameters: both clock
// generators run at once.
//
// SNC AD-PLL (3 GHz): acquisition from 290 MHz with the A-FTL, lock within
// the 3.5 us stabilization budget, output at the reference frequency, lock
// kept through a -40 mV supply step, and the clock-stop request honoured
// only after at least 16 more output cycles.
// MPC ILCM (300 MHz x 16): BB-PLL initial lock, mode switch, then the three
// calibration loops; the output must be locked to 16x the reference, the DCR
// word within one code of the free-running 4.8 GHz value, and S_PRE / S_POST
// within 2 ps of T_OSC/8 before / after the injection instant. Expected
// values come from the behavioural-model constants, not from the design.
// Each mechanism (A-FTL step, dead-zone F_err, lock, clock stop, BB-PLL,
// mode switch, gated injection, FE up/down, DLL, PO, P_ctrl step) is counted
// and must occur at least once.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: frequencies, the 3.5 us budget and the 16-cycle clock stop come from the
// source design; tolerances and the -40 mV step are this test's.
module tb_ro_clkgen_top;
  import rocg_pkg::*;
  localparam real TREF_A = 1.0 / 3.0;
  localparam real TREF_I = 1.0e3 / 300.0;
  localparam real TOSC_I = 1.0 / 4.8;
  localparam real TPATH  = 0.1;
  localparam real DCR_IDEAL = (4.8e9 - 3.7763e9) / 2.0e6;

  logic a_rst_n = 1'b1, a_ref = 1'b0, a_stop = 1'b0;
  logic signed [15:0] a_vdd = '0;
  logic a_clk, a_stopped, a_ftl, a_lock;
  osc_code_t a_code, a_ci;
  logic i_rst_n = 1'b1, i_ref = 1'b0, i_mode = 1'b0;
  logic [7:0] i_phase;
  logic i_s_pre, i_gating, i_pstep;
  osc_code_t i_dcr;
  logic [6:0] i_pre_n, i_post_n;
  logic [3:0] i_pre_p, i_post_p;

  int checks = 0, failures = 0;
  int n_ftl = 0, n_ferr = 0, n_gated = 0, n_fe_up = 0, n_fe_dn = 0;
  int n_dll = 0, n_po = 0, n_pstep = 0, n_bb = 0;
  real t_lock = -1.0;
  longint dcr_sum = 0;
  int dcr_n = 0;
  bit dcr_avg_on = 1'b0;

  ro_clkgen_top dut (
    .adpll_rst_n(a_rst_n), .adpll_ref(a_ref), .adpll_band(2'd0), .adpll_pdn(1'b1),
    .adpll_vdd_dev_mv(a_vdd), .adpll_clk_stop(a_stop), .adpll_clk_out(a_clk),
    .adpll_stopped(a_stopped), .adpll_dco_code(a_code), .adpll_ci(a_ci),
    .adpll_ftl_active(a_ftl), .adpll_lock(a_lock),
    .ilcm_rst_n(i_rst_n), .ilcm_ref(i_ref), .ilcm_mode(i_mode), .ilcm_grcw(8'd100),
    .ilcm_inj_sw(4'd13), .ilcm_coarse_pre(3'd0), .ilcm_coarse_post(3'd2),
    .ilcm_phase(i_phase), .ilcm_s_pre(i_s_pre), .ilcm_dcr(i_dcr),
    .ilcm_pre_n(i_pre_n), .ilcm_pre_p(i_pre_p), .ilcm_post_n(i_post_n), .ilcm_post_p(i_post_p),
    .ilcm_s_en_gating(i_gating), .ilcm_p_step(i_pstep)
  );

  always #(TREF_A / 2.0) a_ref = ~a_ref;
  always #(TREF_I / 2.0) i_ref = ~i_ref;

  always @(posedge dut.u_adpll.s_cdc) begin
    if (a_ftl) n_ftl++;
    if (dut.u_adpll.f_up || dut.u_adpll.f_dn) n_ferr++;
    if (a_lock && t_lock < 0.0) t_lock = $realtime;
  end

  always @(negedge i_ref) begin
    if (!i_mode && i_rst_n) n_bb++;
    if (i_gating) n_gated++;
    if (dut.u_ilcm.fe_dec == BB_UP) n_fe_up++;
    if (dut.u_ilcm.fe_dec == BB_DN) n_fe_dn++;
    if (dut.u_ilcm.dll_dec != BB_HOLD) n_dll++;
    if (dut.u_ilcm.po_dec != BB_HOLD) n_po++;
    if (i_pstep) n_pstep++;
    if (dcr_avg_on) begin
      dcr_sum += longint'(i_dcr);
      dcr_n++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic freq_a(output real f_hz);
    int n = 0;
    real t0, t1;
    @(posedge a_clk); t0 = $realtime; t1 = t0;
    while (t1 - t0 < 200.0) begin @(posedge a_clk); n++; t1 = $realtime; end
    f_hz = real'(n) / ((t1 - t0) * 1.0e-9);
  endtask

  task automatic freq_i(input real win, output real f_hz);
    int n = 0;
    real t0, t1;
    @(posedge i_phase[0]); t0 = $realtime; t1 = t0;
    while (t1 - t0 < win) begin @(posedge i_phase[0]); n++; t1 = $realtime; end
    f_hz = real'(n) / ((t1 - t0) * 1.0e-9);
  endtask

  function automatic real dcdl_ns(input int coarse, input int p, input int n);
    return 0.040 + coarse * 0.020 + p * 0.008 + n * 0.00015;
  endfunction

  // ---------------- AD-PLL sequence
  // falling reset edges at 10 ps, so the asynchronous resets are applied
  initial #0.01 a_rst_n = 1'b0;
  initial #0.01 i_rst_n = 1'b0;

  initial begin
    real f;
    int n_after;
    #5 a_rst_n = 1'b1;
    #3600;
    check(t_lock > 0.0 && t_lock < 3505.0, $sformatf("AD-PLL lock time %f ns", t_lock - 5.0));
    freq_a(f);
    $display("AD-PLL: %f MHz, lock at %f ns", f / 1e6, t_lock - 5.0);
    check(f > 2.994e9 && f < 3.006e9, $sformatf("AD-PLL frequency %f MHz", f / 1e6));
    a_vdd = -16'sd40;
    #500;
    freq_a(f);
    check(a_lock && f > 2.994e9 && f < 3.006e9, $sformatf("AD-PLL after supply step %f MHz", f / 1e6));
    // clock stop: count output edges after the request
    @(posedge a_clk); #0.01 a_stop = 1'b1;
    n_after = 0;
    fork
      begin : cnt
        forever begin @(posedge a_clk); n_after++; end
      end
      begin #20; end
    join_any
    disable cnt;
    $display("clock stop: %0d cycles after request", n_after);
    check(a_stopped, "clock not stopped");
    check(n_after >= 16 && n_after <= 24, $sformatf("cycles after stop request: %0d", n_after));
  end

  // ---------------- ILCM sequence
  initial begin
    real f, d_pre, d_post, dcr_avg;
    #10 i_rst_n = 1'b1;
    #2000;
    freq_i(500.0, f);
    check(f > 4.7952e9 && f < 4.8048e9, $sformatf("BB-PLL frequency %f MHz", f / 1e6));
    @(posedge i_ref); #1 i_mode = 1'b1;
    #38000;
    dcr_avg_on = 1'b1;
    #2000;
    dcr_avg_on = 1'b0;
    dcr_avg = real'(dcr_sum) / real'(dcr_n);
    freq_i(1000.0, f);
    d_pre  = dcdl_ns(0, int'(i_pre_p), int'(i_pre_n));
    d_post = dcdl_ns(2, int'(i_post_p), int'(i_post_n));
    $display("ILCM: %f MHz dcr avg %f, S_PRE %f ps, S_POST %f ps", f / 1e6, dcr_avg, d_pre * 1e3, d_post * 1e3);
    check(f > 4.79995e9 && f < 4.80005e9, $sformatf("ILCM frequency %f MHz", f / 1e6));
    check(dcr_avg - DCR_IDEAL < 1.0 && DCR_IDEAL - dcr_avg < 1.0, $sformatf("average DCR %f", dcr_avg));
    check(d_post - (TPATH + TOSC_I / 8.0) < 0.002 && (TPATH + TOSC_I / 8.0) - d_post < 0.002,
          $sformatf("S_POST delay %f ps", d_post * 1e3));
    check(d_pre - (TPATH - TOSC_I / 8.0) < 0.002 && (TPATH - TOSC_I / 8.0) - d_pre < 0.002,
          $sformatf("S_PRE delay %f ps", d_pre * 1e3));
    // mechanisms
    $display("mechanisms: ftl=%0d ferr=%0d bb=%0d gated=%0d fe_up=%0d fe_dn=%0d dll=%0d po=%0d pstep=%0d",
             n_ftl, n_ferr, n_bb, n_gated, n_fe_up, n_fe_dn, n_dll, n_po, n_pstep);
    check(n_ftl > 0, "A-FTL never fired");
    check(n_ferr > 0, "dead-zone F_err never seen");
    check(n_bb > 0, "BB-PLL mode never ran");
    check(n_gated > 0, "no gated injection");
    check(n_fe_up > 0 && n_fe_dn > 0, "FE calibrator did not move both ways");
    check(n_dll > 0, "DLL never ran");
    check(n_po > 0, "PO calibrator never ran");
    check(n_pstep > 0, "P_ctrl never stepped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
