`timescale 1ns/1fs
// Unit test of the DCDL control-word logic against a reference model:
// random UP/DOWN/HOLD decisions with long one-sided runs so N_ctrl hits
// both ends. Checks every cycle: N and P counts, the thermometer outputs,
// the P step pulse, P moving only while N is stuck at an end and never
// twice within the hold-off.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: the N-then-P stepping follows the source design; the 4-decision hold-off
// is this design's addition and is checked as such.
module tb_dcw_ctrl;
  import rocg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, p_step;
  bb_dec_t dec = BB_HOLD;
  logic [NCTRL_W-1:0] n_ctrl;
  logic [PCTRL_W-1:0] p_ctrl;
  logic [6:0] n_cnt;
  logic [3:0] p_cnt;
  int checks = 0, failures = 0, p_moves = 0;

  dcw_ctrl dut (.clk(clk), .rst_n(rst_n), .dec(dec), .n_ctrl(n_ctrl), .p_ctrl(p_ctrl),
                .n_cnt(n_cnt), .p_cnt(p_cnt), .p_step(p_step));
  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    int mn = 32, mp = 4, mh = 0, run = 0;
    bit mstep, mok;
    bb_dec_t d = BB_HOLD;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      if (run == 0) begin
        d = bb_dec_t'($urandom_range(2));
        run = ($urandom_range(3) == 0) ? 100 : $urandom_range(5) + 1;
      end
      run--;
      dec = ($urandom_range(4) == 0) ? bb_dec_t'($urandom_range(2)) : d;
      // reference model
      mstep = 1'b0;
      mok = (mh == 0);
      if (mh > 0) mh--;
      if (dec == BB_UP) begin
        if (mn < NCTRL_W) mn++;
        else if (mp < PCTRL_W && mok) begin mp++; mstep = 1'b1; mh = 4; end
      end else if (dec == BB_DN) begin
        if (mn > 0) mn--;
        else if (mp > 0 && mok) begin mp--; mstep = 1'b1; mh = 4; end
      end
      @(posedge clk); #0.1;
      check(int'(n_cnt) == mn && int'(p_cnt) == mp && p_step == mstep,
            $sformatf("cycle %0d: N %0d/%0d P %0d/%0d step %b/%b", i, n_cnt, mn, p_cnt, mp, p_step, mstep));
      check($countones(n_ctrl) == mn && n_ctrl == NCTRL_W'((65'd1 << mn) - 1) &&
            p_ctrl == PCTRL_W'((9'd1 << mp) - 1), "thermometer code");
      if (mstep) p_moves++;
      @(negedge clk);
    end
    check(p_moves > 10, $sformatf("P moved only %0d times", p_moves));
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
