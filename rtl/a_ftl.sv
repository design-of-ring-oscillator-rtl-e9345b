`timescale 1ns/1fs
// Auxiliary frequency-tracking loop (A-FTL) of the SNC AD-PLL.
//
// A counter-based frequency detector: it counts edges of the reference clock
// (clk_ref) and of the digital copy of the DCO clock (clk_dig) from a common
// start. When the two counts differ by more than two, it raises s_en_ftl for
// one cycle with a one-shot integral correction (alpha2) for the loop filter,
// then holds its counters in reset (s_rst) for HOLD cycles so the correction
// reaches the DCO before the next measurement. If the DCO count reaches SAT
// first, the frequencies are close enough; the counters restart without a
// correction and the TDC-PFD finishes the lock. This gives the staircase
// acquisition of the source design: large, early corrections when far off,
// smaller and rarer ones near the target.
// The alpha2 step is computed from the measurement. With n_dig DCO edges
// and diff = n_ref - n_dig, the reference is f_ref = f_dco * n_ref / n_dig,
// so the frequency error is f_dco * diff / n_dig. The DCO frequency is
// K_DCO * (F0_CODES + code), where F0_CODES = F0 / K_DCO is the offset of
// the DCO's lowest frequency in codes and code is its present control word,
// so the step in DCO codes is
//   alpha2 = (F0_CODES + code) * diff / n_dig.
// This needs no knowledge of the reference frequency, so the same gain works
// for every DDR5 configuration. The source design says that alpha2 depends
// on K_DCO, the counted number of S_CLK,DIG and the reference frequency; the
// exact formula, HOLD, SAT and the clock-crossing scheme are this design's
// choices.
// Clock crossing: clk_dig drives a free-running Gray counter, which is
// synchronized into the clk_ref domain with two flip-flops; the clk_ref side
// works on differences to a captured base value, so the clk_dig side needs
// no reset crossing.
// Timing: s_en_ftl and ftl_step are registered in the clk_ref domain.
// Lint note: rst_dig_q is a two-flop reset synchronizer in the clk_dig
// domain; its output is the asynchronous reset of the Gray counter while
// the synchronizer itself is clocked, which a linter reports as a signal
// flopped both synchronously and asynchronously. That is the intended
// circuit (asynchronous assertion, synchronous release).
module a_ftl #(
  parameter int unsigned F0_CODES = 97, // lowest DCO frequency / K_DCO = 290 MHz / 3 MHz
  parameter int unsigned SAT  = 1023,  // DCO count at which the detector gives up
  parameter int unsigned HOLD = 8,     // clk_ref cycles of s_rst after a correction
  parameter int unsigned CW   = 12     // counter width
) (
  input  logic               clk_ref,
  input  logic               clk_dig,
  input  logic               rst_n,
  input  logic [11:0]        code,      // present DCO word, band steps included
  output logic               s_en_ftl,
  output logic signed [15:0] ftl_step,
  output logic               s_rst
);
  // ---- clk_dig domain: free-running Gray counter
  logic [CW-1:0] dig_bin_q, dig_gray_q;
  logic [1:0]    rst_dig_q;
  logic          rst_dig_n;    // reset released synchronously to clk_dig
  always_ff @(posedge clk_dig or negedge rst_n) begin
    if (!rst_n) rst_dig_q <= '0;
    else        rst_dig_q <= {rst_dig_q[0], 1'b1};
  end
  assign rst_dig_n = rst_dig_q[1];
  always_ff @(posedge clk_dig or negedge rst_dig_n) begin
    if (!rst_dig_n) begin
      dig_bin_q  <= '0;
      dig_gray_q <= '0;
    end else begin
      dig_bin_q  <= dig_bin_q + 1'b1;
      dig_gray_q <= (dig_bin_q + 1'b1) ^ ((dig_bin_q + 1'b1) >> 1);
    end
  end

  // ---- clk_ref domain
  logic [CW-1:0] sync1_q, sync2_q, dig_now, base_q, ref_cnt_q;
  logic [$clog2(HOLD+1)-1:0] hold_q;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      sync1_q <= '0;
      sync2_q <= '0;
    end else begin
      sync1_q <= dig_gray_q;
      sync2_q <= sync1_q;
    end
  end

  always_comb begin
    dig_now[CW-1] = sync2_q[CW-1];
    for (int i = CW - 2; i >= 0; i--) dig_now[i] = dig_now[i+1] ^ sync2_q[i];
  end

  logic [CW-1:0] dig_rel;
  int            diff;
  assign dig_rel = dig_now - base_q;
  assign diff    = int'(ref_cnt_q) - int'(dig_rel);

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      base_q    <= '0;
      ref_cnt_q <= '0;
      hold_q    <= $clog2(HOLD+1)'(HOLD);
      s_en_ftl  <= 1'b0;
      ftl_step  <= '0;
      s_rst     <= 1'b1;
    end else begin
      s_en_ftl <= 1'b0;
      if (hold_q != 0) begin
        hold_q    <= hold_q - 1'b1;
        s_rst     <= 1'b1;
        base_q    <= dig_now;
        ref_cnt_q <= '0;
      end else if (diff > 2 || diff < -2) begin
        s_en_ftl <= 1'b1;
        ftl_step <= 16'(((int'(F0_CODES) + int'(code)) * diff)
                        / ((dig_rel == '0) ? 1 : int'(dig_rel)));
        hold_q   <= $clog2(HOLD+1)'(HOLD);
        s_rst    <= 1'b1;
      end else if (int'(dig_rel) >= int'(SAT)) begin
        // counted number saturated: frequency close enough, restart
        base_q    <= dig_now;
        ref_cnt_q <= '0;
        s_rst     <= 1'b0;
      end else begin
        ref_cnt_q <= ref_cnt_q + 1'b1;
        s_rst     <= 1'b0;
      end
    end
  end

endmodule
