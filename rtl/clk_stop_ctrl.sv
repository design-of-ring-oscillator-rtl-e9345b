`timescale 1ns/1fs
// Clock-stop control of the RCD output clock.
//
// A stop request s_clk_stop (asynchronous, active high) is sampled twice
// with the output clock divided by 8: the divider is a 3-bit counter on
// clk_in and the two samples are taken at its wrap, one every 8 cycles. The
// first sample can fall anywhere from 1 to 8 cycles after the request, so
// the clock enable is updated from the second sample at the following wrap:
// clk_out keeps toggling for 17 to 24 cycles after the request arrives, which
// meets the guarantee of at least 16. Releasing the
// request restarts the clock the same way. The enable is retimed on the
// falling edge of clk_in and ANDed with clk_in, so clk_out has no glitches
// (the gate a standard-cell integrated clock gate would give).
// Sampling twice with the divided-by-8 clock and the 16-cycle guarantee
// follow the source design; the extra divided-clock stage for the enable,
// the counter form of the divider, the
// falling-edge retiming and the reset value (clock running) are this
// design's choices.
module clk_stop_ctrl (
  input  logic clk_in,
  input  logic rst_n,
  input  logic s_clk_stop,
  output logic clk_out,
  output logic stopped
);
  logic [2:0] div_q;
  logic [1:0] smp_q;
  logic       en_q, en_neg_q;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= '0;
      smp_q <= '0;
      en_q  <= 1'b1;
    end else begin
      div_q <= div_q + 1'b1;
      if (div_q == 3'd7) begin
        smp_q <= {smp_q[0], s_clk_stop};
        en_q  <= ~smp_q[1];
      end
    end
  end

  always_ff @(negedge clk_in or negedge rst_n) begin
    if (!rst_n) en_neg_q <= 1'b1;
    else        en_neg_q <= en_q;
  end

  assign clk_out = clk_in & en_neg_q;
  assign stopped = ~en_neg_q;

endmodule
