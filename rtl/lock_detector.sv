`timescale 1ns/1fs
// Lock detector of the SNC AD-PLL.
//
// The loop is declared locked when the integral code C_I stays within +-WIN
// codes of a reference value for CNT consecutive integral updates (ci_upd
// strobes). Whenever C_I leaves the window, the reference value is moved to
// the present C_I, the run count restarts and lock drops.
// Watching C_I follows the source design; WIN, CNT and the
// re-centering scheme are this design's choices.
// Timing: lock is registered and rises on the CNT-th in-window update.
module lock_detector
  import rocg_pkg::*;
#(
  parameter int unsigned WIN = 4,
  parameter int unsigned CNT = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ci_upd,
  input  osc_code_t ci,
  output logic      lock
);
  osc_code_t ref_q;
  logic [$clog2(CNT+1)-1:0] run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q <= '0;
      run_q <= '0;
      lock  <= 1'b0;
    end else if (ci_upd) begin
      if (int'(ci) - int'(ref_q) <= int'(WIN) && int'(ref_q) - int'(ci) <= int'(WIN)) begin
        if (run_q != $clog2(CNT+1)'(CNT)) run_q <= run_q + 1'b1;
        if (run_q >= $clog2(CNT+1)'(CNT - 1)) lock <= 1'b1;
      end else begin
        ref_q <= ci;
        run_q <= '0;
        lock  <= 1'b0;
      end
    end
  end

endmodule
