`timescale 1ns/1fs
// Unit test of the TDC-PFD model: feedback edges at fixed offsets from the
// 3 GHz reference must give the thermometer word of thresholds
// {-20, -6, 0, +6, +20} ps and the dead-zone frequency error beyond +-40 ps.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: +-6 ps for the narrow steps comes from the source design; +-20 ps and the
// +-40 ps dead zone are this model's.
module tb_tdc_pfd;
  localparam real T = 1.0 / 3.0;
  logic s_ref = 1'b0, s_fb = 1'b0;
  logic s_cdc, f_up, f_dn;
  logic [4:0] th;
  real off_ns = 0.0;
  int checks = 0, failures = 0;

  tdc_pfd dut (.s_ref(s_ref), .s_fb(s_fb), .s_cdc(s_cdc), .tdc_th(th), .f_up(f_up), .f_dn(f_dn));

  initial forever begin #(T / 2.0) s_ref = ~s_ref; end
  // feedback: a pulse of half a period, one period plus the offset after
  // each reference rising edge
  always @(posedge s_ref) begin
    automatic real d = T + off_ns;
    fork
      begin
        #(d) s_fb = 1'b1;
        #(T / 2.0) s_fb = 1'b0;
      end
    join_none
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic try(input real off_ps, input logic [4:0] th_exp, input bit up_exp, input bit dn_exp);
    off_ns = off_ps * 1.0e-3;
    repeat (8) @(posedge s_cdc);
    #0.01;
    check(th == th_exp && f_up == up_exp && f_dn == dn_exp,
          $sformatf("offset %f ps: th=%b up=%b dn=%b, expected %b %b %b", off_ps, th, f_up, f_dn, th_exp, up_exp, dn_exp));
  endtask

  initial begin
    #2;
    try(  3.0, 5'b00111, 1'b0, 1'b0);
    try( 10.0, 5'b01111, 1'b0, 1'b0);
    try( 30.0, 5'b11111, 1'b0, 1'b0);
    try( 60.0, 5'b11111, 1'b1, 1'b0);
    try( -3.0, 5'b00011, 1'b0, 1'b0);
    try(-10.0, 5'b00001, 1'b0, 1'b0);
    try(-30.0, 5'b00000, 1'b0, 1'b0);
    try(-60.0, 5'b00000, 1'b0, 1'b1);
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
