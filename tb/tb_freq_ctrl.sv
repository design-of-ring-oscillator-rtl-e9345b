`timescale 1ns/1fs
// Unit test of the ILO frequency control against a reference model.
// S_REF runs at 300 MHz; phi_0 alternates between 5.0 and 4.6 GHz every 50
// reference cycles, so the divided feedback slips and the BBPD decision
// changes. In BB-PLL mode every cycle
// must add -+KI_BB to the integral path and -+KP_BB proportionally per the
// BBPD sample; in ILCM mode only the FE decision moves the integral by K_I,
// and the divider stops. The DCR word includes the carry of the first-order
// delta-sigma modulator on the fractional bits; with the integral code held,
// 64 consecutive DCR words must sum to it exactly (average = code / 64).
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: BB-PLL start-up then FE-driven DCR follows the source design; the gains
// checked are this design's defaults.
module tb_freq_ctrl;
  import rocg_pkg::*;
  logic s_ref = 1'b0, phi0 = 1'b0, rst_n = 1'b1, mode = 1'b0, bbpd;
  bb_dec_t fe = BB_HOLD;
  osc_code_t dcr;
  int checks = 0, failures = 0;
  real tphi = 1.0 / 4.8;

  freq_ctrl dut (.clk(~s_ref), .rst_n(rst_n), .s_ref(s_ref), .phi0(phi0), .ilcm_mode(mode),
                 .fe_dec(fe), .dcr(dcr), .bbpd(bbpd));

  always #(1.0 / 0.6) s_ref = ~s_ref;
  initial forever #(tphi / 2.0) phi0 = ~phi0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    int mi, mi_old, macc = 0, mcar = 0, n_up = 0, n_dn = 0, div_hold, sum;
    mi = 512 << 6;
    @(negedge s_ref); #0.1 rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      if (i == 300) mode = 1'b1;
      tphi = 1.0 / (4.8 + ((i / 50) % 2 == 0 ? 0.2 : -0.2));
      @(posedge s_ref); #0.01;
      fe = bb_dec_t'($urandom_range(2));
      @(negedge s_ref); #0.01;
      mi_old = mi;
      if (!mode) begin
        mi += bbpd ? -16 : 16;
        if (bbpd) n_up++; else n_dn++;
        check(int'(dcr) == (mi >> 6) + (bbpd ? -2 : 2) + mcar, $sformatf("BB cycle %0d: dcr %0d model %0d", i, dcr, (mi >> 6) + (bbpd ? -2 : 2) + mcar));
      end else begin
        if (fe == BB_UP) mi += 4;
        else if (fe == BB_DN) mi -= 4;
        check(int'(dcr) == (mi >> 6) + mcar, $sformatf("ILCM cycle %0d: dcr %0d model %0d", i, dcr, (mi >> 6) + mcar));
      end
      // first-order delta-sigma on the 6 fractional bits
      macc += mi_old & 63;
      mcar = macc >> 6;
      macc &= 63;
      if (i == 310) div_hold = int'(dut.div_q);
      if (i > 310) check(int'(dut.div_q) == div_hold, "divider runs in ILCM mode");
    end
    check(n_up > 0 && n_dn > 0, "BBPD never changed");
    // with the integral code frozen, 64 DCR words must average to it exactly
    fe = BB_HOLD;
    repeat (3) @(negedge s_ref);
    sum = 0;
    repeat (64) begin @(negedge s_ref); #0.01; sum += int'(dcr); end
    check(sum == mi, $sformatf("DCR sum over 64 cycles %0d, integral code %0d", sum, mi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
