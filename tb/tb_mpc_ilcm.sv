`timescale 1ns/1fs
// Closed-loop test of the MPC injection-locked clock multiplier
// (300 MHz x 16 = 4.8 GHz) with its default parameters.
//
// Phase 1: BB-PLL mode for 2 us; the average ring frequency must come within
// 0.1 % of 4.8 GHz. Phase 2: ILCM mode with one gated injection in 100; after
// the calibration loops settle, the output must be locked to exactly 16x the
// reference, the average DCR word (free-running frequency) must be within one
// code of the 4.8 GHz value (FE calibration), S_POST must sit T_OSC/8 after
// the injection instant (DLL) and S_PRE T_OSC/8 before it (PO calibrator),
// within 2 ps. Expected delays are worked
// out from the model parameters (injection path 100 ps, T_OSC = 208.3 ps),
// not read from the design. Every mechanism (mode switch, gated cycles, FE
// up and down, DLL and PO decisions, a P_ctrl step) must occur.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: 300 MHz x 16 and GRCW = 100 are the source design's; the tolerances and
// model constants are this design's.
module tb_mpc_ilcm;
  import rocg_pkg::*;
  localparam real TREF  = 1.0e3 / 300.0;     // ns
  localparam real TOSC  = 1.0 / 4.8;         // ns
  localparam real TPATH = 0.1;               // ns, ILO injection path

  logic rst_n = 1'b1, s_ref = 1'b0, ilcm_mode = 1'b0;
  logic [7:0] phase;
  logic s_pre, s_en_gating, p_step;
  osc_code_t dcr;
  logic [6:0] pre_n, post_n;
  logic [3:0] pre_p, post_p;
  int checks = 0, failures = 0;
  longint dcr_sum = 0;
  int dcr_n = 0;
  bit dcr_avg_on = 1'b0;
  // DCR word that makes the free-running ring run at 4.8 GHz in the ILO
  // model: (4.8 GHz - 3.7763 GHz) / 2 MHz
  localparam real DCR_IDEAL = (4.8e9 - 3.7763e9) / 2.0e6;
  int n_gated = 0, n_fe_up = 0, n_fe_dn = 0, n_dll = 0, n_po = 0, n_pstep = 0;

  mpc_ilcm dut (
    .rst_n(rst_n), .s_ref(s_ref), .ilcm_mode(ilcm_mode), .grcw(8'd100), .inj_sw(4'd13),
    .coarse_pre(3'd0), .coarse_post(3'd2), .phase(phase), .s_pre(s_pre), .dcr(dcr),
    .pre_n(pre_n), .pre_p(pre_p), .post_n(post_n), .post_p(post_p),
    .s_en_gating(s_en_gating), .p_step(p_step)
  );

  always #(TREF / 2.0) s_ref = ~s_ref;

  always @(negedge s_ref) begin
    if (s_en_gating) n_gated++;
    if (dut.fe_dec == BB_UP) n_fe_up++;
    if (dut.fe_dec == BB_DN) n_fe_dn++;
    if (dut.dll_dec != BB_HOLD) n_dll++;
    if (dut.po_dec != BB_HOLD) n_po++;
    if (p_step) n_pstep++;
    if (dcr_avg_on) begin
      dcr_sum += longint'(dcr);
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

  task automatic measure(input real win_ns, output real f_hz);
    int n = 0;
    real t0, t1;
    @(posedge phase[0]); t0 = $realtime; t1 = t0;
    while (t1 - t0 < win_ns) begin
      @(posedge phase[0]); n++; t1 = $realtime;
    end
    f_hz = real'(n) / ((t1 - t0) * 1.0e-9);
  endtask

  // DCDL delay from its control words, using the DCDL model constants
  function automatic real dcdl_ns(input int coarse, input int p, input int n);
    return 0.040 + coarse * 0.020 + p * 0.008 + n * 0.00015;
  endfunction

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    real f, d_pre, d_post, dcr_avg;
    #10 rst_n = 1'b1;
    #2000;
    measure(500.0, f);
    $display("BB-PLL: %f MHz dcr=%0d", f / 1e6, dcr);
    check(f > 4.7952e9 && f < 4.8048e9, $sformatf("BB-PLL frequency %f MHz", f / 1e6));
    @(posedge s_ref); #1 ilcm_mode = 1'b1;
    #38000;
    dcr_sum = 0; dcr_n = 0; dcr_avg_on = 1'b1;
    #2000;
    dcr_avg_on = 1'b0;
    dcr_avg = real'(dcr_sum) / real'(dcr_n);
    measure(1000.0, f);
    d_pre  = dcdl_ns(0, int'(pre_p), int'(pre_n));
    d_post = dcdl_ns(2, int'(post_p), int'(post_n));
    $display("ILCM: %f MHz dcr avg=%f pre=%0d/%0d (%f ps) post=%0d/%0d (%f ps)", f / 1e6, dcr_avg,
             pre_p, pre_n, d_pre * 1e3, post_p, post_n, d_post * 1e3);
    $display("events: gated=%0d fe_up=%0d fe_dn=%0d dll=%0d po=%0d pstep=%0d",
             n_gated, n_fe_up, n_fe_dn, n_dll, n_po, n_pstep);
    check(f > 4.79995e9 && f < 4.80005e9, $sformatf("ILCM frequency %f MHz", f / 1e6));
    check(dcr_avg - DCR_IDEAL < 1.0 && DCR_IDEAL - dcr_avg < 1.0,
          $sformatf("FE calibration: average DCR %f, ideal %f", dcr_avg, DCR_IDEAL));
    check(d_post - (TPATH + TOSC / 8.0) < 0.002 && (TPATH + TOSC / 8.0) - d_post < 0.002,
          $sformatf("S_POST delay %f ps", d_post * 1e3));
    check(d_pre - (TPATH - TOSC / 8.0) < 0.002 && (TPATH - TOSC / 8.0) - d_pre < 0.002,
          $sformatf("S_PRE delay %f ps", d_pre * 1e3));
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
