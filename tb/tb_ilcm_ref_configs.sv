`timescale 1ns/1fs
// Workload test of the MPC injection-locked clock multiplier at reference
// frequencies other than its 300 MHz design point: two copies at default
// parameters (N = 16) run at once with 298 MHz and 302 MHz references, so
// the ring must run at 4.768 GHz and 4.832 GHz. Each copy gets a random
// start phase. The offsets stay inside the pull-in range of the start-up
// bang-bang PLL: its detector sees phase only, so from the 4.8 GHz reset
// word it cannot acquire offsets of more than roughly 30 MHz at the output
// (a 290 MHz reference fails). After the BB-PLL start-up and the switch to ILCM mode, each output
// must be locked to exactly 16x its reference, the average DCR word must sit
// within one code of the value that puts the free-running ring on target
// (FE calibration), and S_POST / S_PRE must sit T_OSC/8 after / before the
// injection instant within 2 ps (DLL and PO calibration). The expected
// values come from the behavioural-model constants, worked out per copy.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: N = 16, GRCW = 100 and the MPC structure are the
// source design's; the two reference frequencies, the model constants and
// the tolerances are this test's.
module tb_ilcm_ref_configs;
  import rocg_pkg::*;
  localparam int NCFG = 2;
  localparam real F_REF_MHZ [NCFG] = '{298.0, 302.0};
  localparam real TPATH = 0.1;               // ns, ILO injection path

  logic rst_n = 1'b1, ilcm_mode = 1'b0;
  logic [NCFG-1:0] s_ref = '0;
  logic [NCFG-1:0] phi0;
  int checks = 0, failures = 0;
  bit dcr_avg_on = 1'b0;
  longint dcr_sum [NCFG] = '{default: 0};
  int     dcr_n   [NCFG] = '{default: 0};
  int     pre_p_v [NCFG] = '{default: 0};
  int     pre_n_v [NCFG] = '{default: 0};
  int     post_p_v[NCFG] = '{default: 0};
  int     post_n_v[NCFG] = '{default: 0};
  int     n_edges [NCFG] = '{default: 0};
  bit     count_on = 1'b0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic [7:0] phase;
    logic s_pre, s_en_gating, p_step;
    osc_code_t dcr;
    logic [6:0] pre_n, post_n;
    logic [3:0] pre_p, post_p;
    mpc_ilcm dut (
      .rst_n(rst_n), .s_ref(s_ref[c]), .ilcm_mode(ilcm_mode), .grcw(8'd100), .inj_sw(4'd13),
      .coarse_pre(3'd0), .coarse_post(3'd2), .phase(phase), .s_pre(s_pre), .dcr(dcr),
      .pre_n(pre_n), .pre_p(pre_p), .post_n(post_n), .post_p(post_p),
      .s_en_gating(s_en_gating), .p_step(p_step)
    );
    assign phi0[c] = phase[0];
    initial begin
      #(real'($urandom_range(1000, 0)) * 1.0e-3);
      forever #(500.0 / F_REF_MHZ[c]) s_ref[c] = ~s_ref[c];
    end
    always @(negedge s_ref[c]) begin
      if (dcr_avg_on) begin
        dcr_sum[c] += longint'(dcr);
        dcr_n[c]++;
      end
      pre_p_v[c] = int'(pre_p); pre_n_v[c] = int'(pre_n);
      post_p_v[c] = int'(post_p); post_n_v[c] = int'(post_n);
    end
    always @(posedge phase[0]) if (count_on) n_edges[c]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // DCDL delay from its control words, using the DCDL model constants
  function automatic real dcdl_ns(input int coarse, input int p, input int n);
    return 0.040 + coarse * 0.020 + p * 0.008 + n * 0.00015;
  endfunction

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    real f, f_tgt, tosc, dcr_ideal, dcr_avg, d_pre, d_post;
    #10 rst_n = 1'b1;
    #2000;
    #1 ilcm_mode = 1'b1;
    #38000;
    dcr_avg_on = 1'b1;
    #2000;
    dcr_avg_on = 1'b0;
    // count output edges in a common 1 us window: 16 x f_ref x 1 us when
    // locked
    count_on = 1'b1;
    #1000;
    count_on = 1'b0;
    for (int c = 0; c < NCFG; c++) begin
      f_tgt     = 16.0 * F_REF_MHZ[c] * 1.0e6;
      tosc      = 1.0e9 / f_tgt;
      dcr_ideal = (f_tgt - 3.7763e9) / 2.0e6;
      dcr_avg   = real'(dcr_sum[c]) / real'(dcr_n[c]);
      f         = real'(n_edges[c]) / 1.0e-6;
      d_pre     = dcdl_ns(0, pre_p_v[c], pre_n_v[c]);
      d_post    = dcdl_ns(2, post_p_v[c], post_n_v[c]);
      $display("ref %f MHz: out %f MHz, dcr avg %f (ideal %f), S_PRE %f ps, S_POST %f ps",
               F_REF_MHZ[c], f / 1e6, dcr_avg, dcr_ideal, d_pre * 1e3, d_post * 1e3);
      check(f > f_tgt - 2.0e6 && f < f_tgt + 2.0e6, $sformatf("output %f MHz", f / 1e6));
      check(dcr_avg - dcr_ideal < 1.0 && dcr_ideal - dcr_avg < 1.0,
            $sformatf("average DCR %f, ideal %f", dcr_avg, dcr_ideal));
      check(d_post - (TPATH + tosc / 8.0) < 0.002 && (TPATH + tosc / 8.0) - d_post < 0.002,
            $sformatf("S_POST delay %f ps", d_post * 1e3));
      check(d_pre - (TPATH - tosc / 8.0) < 0.002 && (TPATH - tosc / 8.0) - d_pre < 0.002,
            $sformatf("S_PRE delay %f ps", d_pre * 1e3));
    end
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
