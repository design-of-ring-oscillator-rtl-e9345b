`timescale 1ns/1fs
// Unit test of the clock-stop control: after a stop request at a random
// point, clk_out must keep toggling for at least 16 (at most 25) cycles and then stay low;
// after release it must restart within 26 cycles; every high pulse of
// clk_out must be a full input high phase (no glitches).
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: the 16-cycle guarantee is the source design's requirement; the stop times
// and the 25-cycle upper bound come from this design's divider.
module tb_clk_stop_ctrl;
  logic clk = 1'b0, rst_n = 1'b1, stop = 1'b0;
  logic clk_out, stopped;
  int checks = 0, failures = 0, n_out = 0;
  real t_rise = 0.0;

  clk_stop_ctrl dut (.clk_in(clk), .rst_n(rst_n), .s_clk_stop(stop), .clk_out(clk_out), .stopped(stopped));
  always #0.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk_out) begin n_out++; t_rise = $realtime; end
  always @(negedge clk_out) if ($realtime > 1.0) check($realtime - t_rise > 0.499, $sformatf("glitch on clk_out at %0t", $realtime));

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    int n0;
    #2.2 rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      repeat (20 + $urandom_range(13)) @(posedge clk);
      #0.2 stop = 1'b1;
      n0 = n_out;
      repeat (40) @(posedge clk);
      check(n_out - n0 >= 16 && n_out - n0 <= 25, $sformatf("cycles after stop %0d", n_out - n0));
      check(stopped && clk_out == 1'b0, "not stopped");
      n0 = n_out;
      repeat (10) @(posedge clk);
      check(n_out == n0, "clock runs while stopped");
      #0.2 stop = 1'b0;
      repeat (26) @(posedge clk);
      check(!stopped && n_out > n0, "clock did not restart");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
