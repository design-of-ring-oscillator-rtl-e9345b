`timescale 1ns/1fs
// Unit test of the DCDL model: for random coarse, P_ctrl and N_ctrl codes
// the delay of both edges must equal the intrinsic delay plus 20 ps per
// coarse step, 8 ps per P unit and 0.15 ps per N unit (0.01 ps tolerance).
// A second sweep checks that the delay grows monotonically with N_ctrl.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: the P/N/coarse structure follows the source design; the unit delays
// checked are this design's model values.
module tb_dcdl;
  import rocg_pkg::*;
  logic din = 1'b0, dout;
  logic [2:0] coarse = '0;
  logic [PCTRL_W-1:0] p = '0;
  logic [NCTRL_W-1:0] n = '0;
  int checks = 0, failures = 0;

  dcdl dut (.din(din), .coarse(coarse), .p_ctrl(p), .n_ctrl(n), .dout(dout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [NCTRL_W-1:0] therm_n(input int c);
    for (int i = 0; i < NCTRL_W; i++) therm_n[i] = (i < c);
  endfunction

  task automatic measure(output real d_r, output real d_f);
    real t;
    #1 din = 1'b1; t = $realtime; @(posedge dout); d_r = $realtime - t;
    #1 din = 1'b0; t = $realtime; @(negedge dout); d_f = $realtime - t;
  endtask

  initial begin
    real dr, df, exp_d, last;
    for (int i = 0; i < 40; i++) begin
      int c, np, nn;
      c  = $urandom_range(7);
      np = $urandom_range(PCTRL_W);
      nn = $urandom_range(NCTRL_W);
      coarse = 3'(c);
      p = '0;
      for (int k = 0; k < np; k++) p[k] = 1'b1;
      n = therm_n(nn);
      measure(dr, df);
      exp_d = 0.040 + 0.020 * c + 0.008 * np + 0.00015 * nn;
      check(dr > exp_d - 1e-5 && dr < exp_d + 1e-5, $sformatf("rise delay %0.5f expected %0.5f", dr, exp_d));
      check(df > exp_d - 1e-5 && df < exp_d + 1e-5, $sformatf("fall delay %0.5f expected %0.5f", df, exp_d));
    end
    coarse = '0; p = '0; last = 0.0;
    for (int nn = 0; nn <= NCTRL_W; nn += 8) begin
      n = therm_n(nn);
      measure(dr, df);
      check(dr > last, $sformatf("delay not monotonic at N=%0d", nn));
      last = dr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
