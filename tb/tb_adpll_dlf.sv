`timescale 1ns/1fs
// Unit test of the AD-PLL loop filter against an independent model: random
// TDC words, F_err and A-FTL steps; checks the DCO word every cycle and the
// integral code at each deserialized update (every 8 cycles).
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: the split into direct proportional and deserialized integral paths follows
// the source design; the weights and gains checked are this design's defaults.
module tb_adpll_dlf;
  import rocg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [4:0] th = 5'b00111;
  logic f_up = 1'b0, f_dn = 1'b0, ftl_en = 1'b0;
  logic signed [15:0] ftl_step = '0;
  osc_code_t dco_code, ci_int;
  logic ci_upd;
  int checks = 0, failures = 0, n_upd = 0;

  adpll_dlf dut (.clk(clk), .rst_n(rst_n), .tdc_th(th), .f_up(f_up), .f_dn(f_dn),
                 .ftl_en(ftl_en), .ftl_step(ftl_step), .dco_code(dco_code), .ci_int(ci_int), .ci_upd(ci_upd));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int weight(input logic [4:0] t, input bit up, input bit dn);
    int w;
    case ($countones(t))
      0: w = -4; 1: w = -2; 2: w = -1; 3: w = 1; 4: w = 2; default: w = 4;
    endcase
    if (up && !dn) w += 8;
    if (dn && !up) w -= 8;
    return w;
  endfunction

  function automatic int clampi(input int v, input int hi);
    return v < 0 ? 0 : (v > hi ? hi : v);
  endfunction

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    int ci = 0, acc = 0, cnt = 0, w;
    logic [4:0] therm [6] = '{5'b00000, 5'b00001, 5'b00011, 5'b00111, 5'b01111, 5'b11111};
    @(negedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      th = therm[$urandom_range(5)];
      f_up = ($urandom_range(9) == 0);
      f_dn = !f_up && ($urandom_range(9) == 0);
      if (k < 300) begin f_up = 1'b1; f_dn = 1'b0; end
      ftl_en = ($urandom_range(99) == 0);
      ftl_step = 16'($signed($urandom_range(200)) - 100);
      // model of the next state
      w = weight(th, f_up, f_dn);
      if (cnt == 7) begin ci += (acc + w); acc = 0; cnt = 0; end
      else begin acc += w; cnt++; end
      if (ftl_en) ci += int'(ftl_step) * 16;
      ci = clampi(ci, 1023 * 16);
      @(posedge clk); #0.1;
      check(int'(dco_code) == clampi(ci / 16 + w, 1023), $sformatf("cycle %0d dco %0d expected %0d", k, dco_code, clampi(ci / 16 + w, 1023)));
      check(int'(ci_int) == ci / 16, $sformatf("cycle %0d ci %0d expected %0d", k, ci_int, ci / 16));
      if (ci_upd) n_upd++;
      @(negedge clk);
    end
    check(n_upd == 3000 / 8, $sformatf("integral updates %0d expected %0d", n_upd, 3000 / 8));
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
