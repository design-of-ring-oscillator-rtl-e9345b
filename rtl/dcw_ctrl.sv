`timescale 1ns/1fs
// Delay-control-word controller of one DCDL (used for DCDL_PRE by the PO
// calibrator and for DCDL_POST by the narrow-range DLL).
//
// Each enabled up/down decision moves the 64-bit N_ctrl thermometer word by
// K units (up = more delay). When N_ctrl is stuck at its maximum and another
// up arrives, one more P_ctrl unit is switched on instead; when it is stuck
// at zero and a down arrives, one P_ctrl unit is switched off. The N_ctrl
// count stays put and the loop walks N_ctrl back, so P_ctrl moves one unit at
// a time, as the source design describes for its fine-tuning DCDL.
// After a P_ctrl step, further P_ctrl steps wait P_HOLD cycles so that the
// step reaches the delay line and the phase detector before the next one;
// without this, the decision latency of the loop lets P_ctrl run two units
// (more than the N_ctrl span) and the loop hunts.
// K, P_HOLD, the reset values (N_ctrl mid-scale, half of P_ctrl on) and the
// saturation at the ends of P_ctrl are this design's choices.
// Timing: one update per clk cycle with dec valid; outputs are registered.
module dcw_ctrl
  import rocg_pkg::*;
#(
  parameter int unsigned K      = 1,
  parameter int unsigned N_INIT = 32,
  parameter int unsigned P_INIT = 4,
  parameter int unsigned P_HOLD = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bb_dec_t            dec,
  output logic [NCTRL_W-1:0] n_ctrl,
  output logic [PCTRL_W-1:0] p_ctrl,
  output logic [6:0]         n_cnt,
  output logic [3:0]         p_cnt,
  output logic               p_step    // pulses when P_ctrl moved
);
  logic [$clog2(P_HOLD+1)-1:0] hold_q;
  logic                        p_ok;
  assign p_ok = (hold_q == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_cnt  <= 7'(N_INIT);
      p_cnt  <= 4'(P_INIT);
      p_step <= 1'b0;
      hold_q <= '0;
    end else begin
      p_step <= 1'b0;
      if (hold_q != 0) hold_q <= hold_q - 1'b1;
      unique case (dec)
        BB_UP: begin
          if (int'(n_cnt) + int'(K) <= NCTRL_W) n_cnt <= n_cnt + 7'(K);
          else if (int'(p_cnt) < PCTRL_W && p_ok) begin
            p_cnt  <= p_cnt + 1'b1;
            p_step <= 1'b1;
            hold_q <= $clog2(P_HOLD+1)'(P_HOLD);
          end
        end
        BB_DN: begin
          if (int'(n_cnt) >= int'(K)) n_cnt <= n_cnt - 7'(K);
          else if (p_cnt != 0 && p_ok) begin
            p_cnt  <= p_cnt - 1'b1;
            p_step <= 1'b1;
            hold_q <= $clog2(P_HOLD+1)'(P_HOLD);
          end
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < NCTRL_W; i++) n_ctrl[i] = (i < int'(n_cnt));
    for (int i = 0; i < PCTRL_W; i++) p_ctrl[i] = (i < int'(p_cnt));
  end

endmodule
