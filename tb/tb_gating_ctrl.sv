`timescale 1ns/1fs
// Unit test of the gating control: outside ILCM mode nothing is injected or
// gated; in ILCM mode with a random gating-ratio control word GRCW exactly
// one cycle in GRCW is gated (S_EN,gating high, injection disabled) and all
// others inject; GRCW = 0 injects every cycle.
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: gating one pulse in GRCW follows the source design; GRCW = 100 matches
// its 'about 1/100', the other ratios are random.
module tb_gating_ctrl;
  logic clk = 1'b0, rst_n = 1'b1, mode = 1'b0;
  logic [7:0] grcw = 8'd100;
  logic gate, inj;
  int checks = 0, failures = 0;

  gating_ctrl dut (.clk(clk), .rst_n(rst_n), .ilcm_mode(mode), .grcw(grcw), .s_en_gating(gate), .inj_en(inj));
  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    int ng, ni, last, gaps_ok;
    @(negedge clk) rst_n = 1'b1;
    repeat (20) @(negedge clk) check(!gate && !inj, "active outside ILCM mode");
    for (int r = 0; r < 6; r++) begin
      grcw = (r == 0) ? 8'd100 : (r == 5) ? 8'd0 : 8'($urandom_range(255, 1));
      mode = 1'b1;
      ng = 0; ni = 0; last = -1; gaps_ok = 1;
      repeat (3) @(negedge clk);
      for (int i = 0; i < 1000; i++) begin
        @(negedge clk);
        check(gate != inj, "gate and inject both high or both low");
        if (gate) begin
          if (last >= 0 && i - last != int'(grcw)) gaps_ok = 0;
          last = i; ng++;
        end
        if (inj) ni++;
      end
      if (grcw == 0) check(ng == 0, "gated with GRCW=0");
      else begin
        check(gaps_ok == 1, $sformatf("gating period not %0d", grcw));
        check(ng >= 1000 / int'(grcw) && ng <= 1000 / int'(grcw) + 1, $sformatf("%0d gated cycles", ng));
      end
      mode = 1'b0;
      repeat (2) @(negedge clk);
      check(!gate && !inj, "not cleared by mode off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
