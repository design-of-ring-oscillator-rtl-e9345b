`timescale 1ns/1fs
// Unit test of the MPC decision logic: for random levels of phi_315,
// phi_45 and phi_0, sampled by S_PRE and S_POST pulses, and random mode and
// gating, the decisions after the next clock edge must match the three
// tables (FE: UP when INJ != PRE; DLL: UP when INJ != POST; PO on gated
// cycles only: UP when INJ == POST; all HOLD outside ILCM mode).
// Self-checking: prints one TB_RESULT line and stops; a watchdog ends a
// hung run with a failure.
// Source versus choice: which phases are sampled and on which cycles follows the source design;
// the table signs are this design's, chosen for convergence.
module tb_mpc_decision;
  import rocg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, s_pre = 1'b0, s_post = 1'b0;
  logic phi_pre = 1'b0, phi_post = 1'b0, phi_inj = 1'b0, mode = 1'b0, gated = 1'b0;
  bb_dec_t fe, dll, po;
  logic pd_pre, pd_post, pd_inj;
  int checks = 0, failures = 0;
  int seen [8];

  mpc_decision dut (.clk(clk), .rst_n(rst_n), .s_pre(s_pre), .s_post(s_post), .phi_pre(phi_pre),
                    .phi_post(phi_post), .phi_inj(phi_inj), .ilcm_mode(mode), .gated(gated),
                    .fe_dec(fe), .dll_dec(dll), .po_dec(po), .pd_pre(pd_pre), .pd_post(pd_post),
                    .pd_inj(pd_inj));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bb_dec_t ud(input bit up);
    return up ? BB_UP : BB_DN;
  endfunction

  // falling reset edge at 10 ps, so the asynchronous reset is applied
  initial #0.01 rst_n = 1'b0;

  initial begin
    bit a, b, c;
    bb_dec_t efe, edll, epo;
    #1 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom); b = 1'($urandom); c = 1'($urandom);
      mode = ($urandom_range(4) != 0); gated = 1'($urandom);
      phi_pre = a; #0.1 s_pre = 1'b1; #0.1 s_pre = 1'b0; phi_pre = ~a;
      phi_post = b; phi_inj = c; #0.1 s_post = 1'b1; #0.1 s_post = 1'b0;
      phi_post = ~b; phi_inj = ~c;
      #0.1 clk = 1'b1; #0.1 clk = 1'b0;
      efe = BB_HOLD; edll = BB_HOLD; epo = BB_HOLD;
      if (mode && !gated) begin efe = ud(c ^ a); edll = ud(c ^ b); end
      if (mode && gated) epo = ud(!(c ^ b));
      if (mode) seen[{gated, c, b}]++;
      check(pd_pre == a && pd_post == b && pd_inj == c, "phase detector samples");
      check(fe == efe && dll == edll && po == epo,
            $sformatf("PRE %b POST %b INJ %b mode %b gated %b: fe %s dll %s po %s", a, b, c, mode, gated,
                      fe.name(), dll.name(), po.name()));
    end
    foreach (seen[k]) check(seen[k] > 0, $sformatf("combination %0d never tested", k));
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
