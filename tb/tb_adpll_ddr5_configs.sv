`timescale 1ns/1fs
// Workload test of the SNC AD-PLL across DDR5 configurations: three copies
// of the loop at default parameters run at once with references of 1.6 GHz
// (DDR5-3200), 2.4 GHz (DDR5-4800) and 3.2 GHz (DDR5-6400). Each starts from
// the 290 MHz minimum DCO frequency and must lock within the 3.5 us
// stabilization budget of the RCD, with the A-FTL doing at least one
// correction, and then run at its reference frequency within 0.2 %.
// Each reference starts at a random phase.
// No parameter is changed between the three: the A-FTL step scales with
// the present DCO word, so one setting serves every speed grade.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: DDR5-3200 and the 3.5 us budget come from the source
// design; the DDR5-4800 and DDR5-6400 clock rates are the standard DDR5 speed
// grades; the tolerances are this test's.
module tb_adpll_ddr5_configs;
  import rocg_pkg::*;
  localparam int NCFG = 3;
  localparam real F_GHZ [NCFG] = '{1.6, 2.4, 3.2};

  logic rst_n = 1'b1;
  logic [NCFG-1:0] s_ref = '0, s_out, ftl_active, lock;
  int checks = 0, failures = 0;
  int  n_ftl  [NCFG] = '{default: 0};
  real t_lock [NCFG] = '{default: -1.0};
  int  n_out  [NCFG] = '{default: 0};

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    osc_code_t dco_code, ci;
    snc_adpll dut (
      .rst_n(rst_n), .s_ref(s_ref[c]), .s_band(2'd0), .s_pdn(1'b1), .vdd_dev_mv(16'sd0),
      .s_out(s_out[c]), .dco_code(dco_code), .ci(ci), .ftl_active(ftl_active[c]), .lock(lock[c])
    );
    initial begin
      // random start phase of each reference
      #(real'($urandom_range(300, 0)) * 1.0e-3);
      forever #(0.5 / F_GHZ[c]) s_ref[c] = ~s_ref[c];
    end
    always @(posedge s_ref[c]) begin
      if (ftl_active[c]) n_ftl[c]++;
      if (lock[c] && t_lock[c] < 0.0) t_lock[c] = $realtime;
    end
    always @(posedge s_out[c]) n_out[c]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    int n0 [NCFG];
    real f;
    #5 rst_n = 1'b1;
    #3600;
    foreach (n0[c]) n0[c] = n_out[c];
    #400;
    for (int c = 0; c < NCFG; c++) begin
      f = real'(n_out[c] - n0[c]) / 400.0;
      $display("%0.1f GHz: lock at %0.1f ns, %0d A-FTL steps, output %0.4f GHz",
               F_GHZ[c], t_lock[c] - 5.0, n_ftl[c], f);
      check(n_ftl[c] >= 1, $sformatf("%0.1f GHz: no A-FTL correction", F_GHZ[c]));
      check(t_lock[c] > 0.0 && t_lock[c] - 5.0 < 3500.0, $sformatf("%0.1f GHz: lock time %0.1f ns", F_GHZ[c], t_lock[c] - 5.0));
      check(lock[c], $sformatf("%0.1f GHz: not locked at the end", F_GHZ[c]));
      check(f > F_GHZ[c] * 0.998 && f < F_GHZ[c] * 1.002, $sformatf("%0.1f GHz: output %0.4f GHz", F_GHZ[c], f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
