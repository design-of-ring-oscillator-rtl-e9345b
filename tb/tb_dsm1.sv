`timescale 1ns/1fs
// Unit test of the first-order delta-sigma modulator at its default width
// (20 bits). For random fractional inputs the carry density over a window
// must match frac / 2^20 within one carry, and the output must follow a
// reference accumulator cycle by cycle. Input 0 gives no carry.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: the 20-bit width comes from the source design; the
// first-order structure and the window lengths are this design's.
module tb_dsm1;
  localparam int W = 20;
  localparam longint ONE = longint'(1) << W;
  logic clk = 1'b0, rst_n = 1'b1, carry;
  logic [W-1:0] frac = '0;
  int checks = 0, failures = 0;

  dsm1 dut (.clk(clk), .rst_n(rst_n), .frac(frac), .carry(carry));
  always #1 clk = ~clk;

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint macc, n_car;
    int mcar;
    @(negedge clk) rst_n = 1'b1;
    macc = 0; mcar = 0;
    for (int r = 0; r < 8; r++) begin
      frac = (r == 0) ? '0 : W'($urandom);
      n_car = 0;
      for (int i = 0; i < 4096; i++) begin
        @(posedge clk); #0.1;
        macc += longint'(frac);
        mcar = int'(macc >> W);
        macc &= ONE - 1;
        if (carry != mcar[0]) begin
          check(1'b0, $sformatf("cycle %0d of run %0d: carry %b model %0d", i, r, carry, mcar));
        end
        n_car += longint'(carry);
        @(negedge clk);
      end
      check(n_car * ONE <= 4096 * longint'(frac) + ONE &&
            n_car * ONE >= 4096 * longint'(frac) - ONE,
            $sformatf("run %0d: %0d carries for frac %0d", r, n_car, frac));
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
