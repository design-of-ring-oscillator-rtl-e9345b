`timescale 1ns/1fs
// First-order delta-sigma modulator (error-feedback accumulator) for the
// fractional part of a digital oscillator control word.
//
// Each clock the W-bit fractional input is added to a W-bit accumulator; the
// carry out of the addition is the 1-bit output. The carry density equals
// frac / 2^W, so a word "integer + carry" averages to integer + frac / 2^W:
// the oscillator sees its control word dithered between two adjacent codes
// with the right duty cycle, which gives a frequency resolution finer than
// one code. The quantisation error is first-order high-pass shaped.
// The source design uses 20-bit delta-sigma modulators in its calibration
// loops to improve frequency and delay resolution; W = 20 is the default
// here. The modulator order (first order) is this design's choice, and in
// the clock multiplier it is instantiated on the DCR word only, with the
// width of that loop's fractional bits.
// Interface: frac is sampled at each rising clk edge; carry is registered
// and is valid for the whole following cycle.
module dsm1 #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] frac,
  output logic         carry
);
  logic [W-1:0] acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      carry <= 1'b0;
    end else begin
      {carry, acc_q} <= {1'b0, acc_q} + {1'b0, frac};
    end
  end

endmodule
