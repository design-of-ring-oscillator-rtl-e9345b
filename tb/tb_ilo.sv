`timescale 1ns/1fs
// Unit test of the injection-locked ring oscillator model.
// 1. Free-running frequency follows F_MIN + DCR * K for random DCR codes
//    (period of phi_0 measured over 64 cycles, 0.05 % tolerance).
// 2. The eight phases are spaced T/8 apart (rising edge of phi_45k follows
//    phi_0 by k*T/8, 0.2 ps tolerance).
// 3. An injection that becomes effective 10 ps before an expected phi_0
//    rising edge pulls that edge earlier by beta * 10 ps, with
//    beta = 13/17 for the 13W switch and 0 for a disabled switch.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: the 10-bit DCR, 8 phases and switch-dependent beta follow the source
// design; F_MIN, 2 MHz per code and beta = sw/(sw+4) are this model's.
module tb_ilo;
  localparam real F_MIN = 3.7763e9, K = 2.0e6, T_PATH = 0.1;
  logic [9:0] dcr = 10'd512;
  logic [3:0] sw = 4'd13;
  logic       s_inj = 1'b0;
  logic [7:0] phase;
  int checks = 0, failures = 0;
  real t_rise [8];

  ilo dut (.dcr(dcr), .inj_sw(sw), .s_inj(s_inj), .phase(phase));

  for (genvar k = 0; k < 8; k++) begin : g_mon
    always @(posedge phase[k]) t_rise[k] = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic inject_test(input int swv, input real beta);
    real t0, t1, tper, t_e, got;
    sw = 4'(swv);
    @(posedge phase[0]); t0 = $realtime;
    @(posedge phase[0]); t1 = $realtime;
    tper = t1 - t0;
    t_e = t1 + 4.0 * tper;
    #(t_e - 0.010 - T_PATH - $realtime);
    s_inj = 1'b1;
    #0.05 s_inj = 1'b0;
    @(posedge phase[0]);
    got = t_e - $realtime;
    check(got > beta * 0.010 - 0.0005 && got < beta * 0.010 + 0.0005,
          $sformatf("sw %0d: edge moved %0.4f ps, expected %0.4f", swv, got * 1e3, beta * 10.0));
  endtask

  initial begin
    real t0, tper, f_exp;
    #1;
    for (int i = 0; i < 6; i++) begin
      dcr = 10'($urandom_range(1023));
      repeat (3) @(posedge phase[0]);
      t0 = $realtime;
      repeat (64) @(posedge phase[0]);
      tper = ($realtime - t0) / 64.0;
      f_exp = F_MIN + real'(dcr) * K;
      check((1.0 / tper) * 1e9 / f_exp > 0.9995 && (1.0 / tper) * 1e9 / f_exp < 1.0005,
            $sformatf("dcr %0d: f %0.4f GHz expected %0.4f", dcr, 1.0 / tper, f_exp * 1e-9));
      @(posedge phase[7]);
      for (int k = 1; k < 8; k++) begin
        real dt;
        dt = t_rise[k] - t_rise[0];
        if (dt < 0.0) dt += tper;
        check(dt > real'(k) * tper / 8.0 - 0.0002 && dt < real'(k) * tper / 8.0 + 0.0002,
              $sformatf("phase %0d spacing %0.4f", k, dt));
      end
    end
    dcr = 10'd512;
    inject_test(13, 13.0 / 17.0);
    #5;
    inject_test(0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
