`timescale 1ns/1fs
// Unit test of the A-FTL: reference at 3 GHz, digital clock first at
// 1.5 GHz (too slow: a positive alpha2 step near (f_ref - f_dig) / K_DCO =
// 500 codes), then at 4 GHz (negative step, ideally -333;
// the measurement stops as soon as the counts differ by 3, so with a
// +-1 count quantisation the fast case is only checked to lie in -200..-1000),
// then at exactly 3 GHz (no correction: the counter saturates and restarts).
// After each correction s_rst must stay high for 8 cycles. The code input is
// set to the DCO word that matches each test clock with the default 290 MHz
// offset and 3 MHz per code ((f_dig - 290 MHz) / 3 MHz).
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: the 'more than two' trigger and the reset hold follow the source
// design; the 1.5/4 GHz test clocks, the step formula and the tolerances are
// this design's.
module tb_a_ftl;
  localparam real TREF = 1.0 / 3.0;
  logic clk_ref = 1'b0, clk_dig = 1'b0, rst_n = 1'b1;
  logic en, s_rst;
  logic [11:0] code = 12'd403;
  logic signed [15:0] step;
  real tdig = 1.0 / 1.5;
  int checks = 0, failures = 0;
  int n_en = 0, last_step = 0, rst_run = 0, min_rst_run = 1000;
  bit counting_rst = 1'b0;

  a_ftl dut (.clk_ref(clk_ref), .clk_dig(clk_dig), .rst_n(rst_n), .code(code), .s_en_ftl(en), .ftl_step(step), .s_rst(s_rst));

  always #(TREF / 2.0) clk_ref = ~clk_ref;
  initial forever begin #(tdig / 2.0) clk_dig = ~clk_dig; end

  always @(negedge clk_ref) begin
    if (en) begin
      n_en++;
      last_step = int'(step);
      counting_rst = 1'b1;
      rst_run = 0;
    end else if (counting_rst) begin
      if (s_rst) rst_run++;
      else begin
        counting_rst = 1'b0;
        if (rst_run < min_rst_run) min_rst_run = rst_run;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    #2 rst_n = 1'b1;
    @(posedge en); @(posedge clk_ref);
    $display("slow: step %0d", last_step);
    check(last_step >= 300 && last_step <= 700, $sformatf("slow clock step %0d", last_step));
    tdig = 1.0 / 4.0;
    code = 12'd1237;
    #10;
    @(posedge en); @(posedge clk_ref);
    $display("fast: step %0d", last_step);
    check(last_step <= -200 && last_step >= -1000, $sformatf("fast clock step %0d", last_step));
    check(min_rst_run >= 7, $sformatf("reset hold %0d cycles", min_rst_run));
    tdig = TREF;
    code = 12'd903;
    #20;
    n_en = 0;
    #2000;    // 6000 reference cycles: several saturation restarts
    check(n_en == 0, $sformatf("%0d corrections with equal clocks", n_en));
    check(!s_rst, "s_rst stuck");
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
