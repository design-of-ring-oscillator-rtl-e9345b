`timescale 1ns/1fs
// Unit test of the lock detector (window +-4 codes, 64 updates): lock must
// rise exactly on the 64th in-window update, drop at once when the code
// leaves the window, and updates without ci_upd must not count.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: watching the integral code follows the source design; the window and
// count are this design's.
module tb_lock_detector;
  import rocg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, upd = 1'b0, lock;
  osc_code_t ci = 10'd500;
  int checks = 0, failures = 0;

  lock_detector dut (.clk(clk), .rst_n(rst_n), .ci_upd(upd), .ci(ci), .lock(lock));
  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic update(input int code);
    @(negedge clk); ci = osc_code_t'(code); upd = 1'b1;
    @(negedge clk); upd = 1'b0;
  endtask

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    int base;
    @(negedge clk) rst_n = 1'b1;
    update(500);                  // leaves window of reset value 0: re-centre
    base = 500;
    for (int i = 1; i <= 64; i++) begin
      update(base + $urandom_range(8) - 4);
      check(lock == (i >= 64), $sformatf("update %0d lock %b", i, lock));
    end
    repeat (20) @(negedge clk);
    check(lock, "lock dropped without updates");
    update(base + 9);
    check(!lock, "lock kept after leaving window");
    for (int i = 1; i <= 70; i++) update(base + 9);
    check(lock, "no relock");
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
