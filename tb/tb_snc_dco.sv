`timescale 1ns/1fs
// Unit test of the SNC-DCO model: frequency against code and band (290 MHz
// + 3 MHz per active tuning cell, 256 cells per band step), frequency pushing
// of 60.8 MHz/V under a supply step, and the active-low power-down.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: 290 MHz and 60.8 MHz/V come from the source design; 3 MHz per cell and
// 256 cells per band are this model's.
module tb_snc_dco;
  logic [9:0] code = '0;
  logic [1:0] band = '0;
  logic pdn = 1'b1;
  logic signed [15:0] vdd = '0;
  logic clk;
  int checks = 0, failures = 0;

  snc_dco dut (.code(code), .s_band(band), .s_pdn(pdn), .vdd_dev_mv(vdd), .s_out(clk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic measure(output real f_hz);
    real t0, t1;
    @(posedge clk); @(posedge clk); t0 = $realtime;
    repeat (100) @(posedge clk);
    t1 = $realtime;
    f_hz = 100.0 / ((t1 - t0) * 1.0e-9);
  endtask

  task automatic expect_f(input real f_exp, input string what);
    real f;
    measure(f);
    check(f > f_exp * 0.999 && f < f_exp * 1.001, $sformatf("%s: %f MHz, expected %f", what, f / 1e6, f_exp / 1e6));
  endtask

  initial begin
    int n;
    expect_f(290.0e6, "code 0");
    code = 10'd300;  expect_f(290.0e6 + 300.0 * 3.0e6, "code 300");
    code = 10'd900;  expect_f(290.0e6 + 900.0 * 3.0e6, "code 900");
    band = 2'd1; code = 10'd100; expect_f(290.0e6 + 356.0 * 3.0e6, "band 1 code 100");
    band = 2'd0; code = 10'd900; vdd = -16'sd100;
    expect_f(290.0e6 + 900.0 * 3.0e6 - 0.1 * 60.8e6, "supply -100 mV");
    vdd = '0;
    pdn = 1'b0;
    #5;
    n = 0;
    fork
      begin : cnt forever begin @(posedge clk); n++; end end
      #20;
    join_any
    disable cnt;
    check(n == 0 && clk == 1'b0, "power-down does not stop the clock");
    pdn = 1'b1;
    expect_f(290.0e6 + 900.0 * 3.0e6, "after power-down");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
