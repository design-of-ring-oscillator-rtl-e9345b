`timescale 1ns/1fs
// Closed-loop test of the SNC AD-PLL at its 3 GHz main configuration.
//
// Starts the DCO at its lowest frequency (290 MHz), releases reset and checks
// that the A-FTL fires (staircase acquisition), that the dead-zone frequency
// error appears while far off, that the lock detector asserts within the
// 3.5 us stabilization budget of the DDR5 RCD, and that the average output
// frequency then matches the reference within 0.2 %. A supply step of
// -40 mV is then applied; with the SNC model the output must stay locked.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: 3 GHz, the 290 MHz start and the 3.5 us budget come from the source
// design; the tolerances are this test's.
module tb_snc_adpll;
  import rocg_pkg::*;
  localparam real TREF = 1.0 / 3.0;   // ns, 3 GHz

  logic rst_n = 1'b1, s_ref = 1'b0;
  logic signed [15:0] vdd_dev_mv = '0;
  logic s_out, ftl_active, lock;
  osc_code_t dco_code, ci;
  int checks = 0, failures = 0;
  int n_ftl = 0, n_ferr = 0;
  real t_lock = -1.0;

  snc_adpll dut (
    .rst_n(rst_n), .s_ref(s_ref), .s_band(2'd0), .s_pdn(1'b1), .vdd_dev_mv(vdd_dev_mv),
    .s_out(s_out), .dco_code(dco_code), .ci(ci), .ftl_active(ftl_active), .lock(lock)
  );

  always #(TREF / 2.0) s_ref = ~s_ref;

  always @(posedge dut.s_cdc) begin
    if (ftl_active) n_ftl++;
    if (dut.f_up || dut.f_dn) n_ferr++;
    if (lock && t_lock < 0.0) t_lock = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // average output frequency over a window, in Hz
  task automatic measure(input real win_ns, output real f_hz);
    int n = 0;
    real t0, t1;
    @(posedge s_out); t0 = $realtime;
    t1 = t0;
    while (t1 - t0 < win_ns) begin
      @(posedge s_out); n++; t1 = $realtime;
    end
    f_hz = real'(n) / ((t1 - t0) * 1.0e-9);
  endtask

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    real f;
    #5 rst_n = 1'b1;
    #4000;
    check(n_ftl >= 2, $sformatf("A-FTL corrections: %0d", n_ftl));
    check(n_ferr > 0, "dead-zone frequency error never seen");
    check(t_lock > 0.0 && t_lock < 3505.0, $sformatf("lock time %f ns", t_lock - 5.0));
    measure(200.0, f);
    $display("locked freq %f MHz, lock at %f ns, ftl=%0d ferr=%0d code=%0d", f / 1e6, t_lock, n_ftl, n_ferr, dco_code);
    check(f > 2.994e9 && f < 3.006e9, $sformatf("frequency %f MHz", f / 1e6));
    vdd_dev_mv = -16'sd40;
    #500;
    measure(200.0, f);
    check(lock, "lost lock after supply step");
    check(f > 2.994e9 && f < 3.006e9, $sformatf("frequency after supply step %f MHz", f / 1e6));
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
