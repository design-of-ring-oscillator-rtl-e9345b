`timescale 1ns/1fs
// Behavioural model (not synthesizable) of the self-biased
// supply-noise-compensated ring DCO (SNC-DCO) of the AD-PLL.
//
// The real part is analog: a bias-voltage generator built as a Nagata
// (peaking) current source, 10-bit frequency-tuning cells (FTCs) of two
// current sources each, and a 4-stage differential ring. One current source
// of each FTC rises and the other falls with the supply, so the ring current,
// and with it the frequency, is nearly independent of the supply near its
// nominal 1.1 V. This model keeps only what the loop sees:
//   f = F0_HZ + (code + s_band * BAND_CODES) * KDCO_HZ + FP * dV
// with FP = FP_SNC_HZ_PER_V (60.8 MHz/V, measured) when SNC = 1 and
// FP_FREE_HZ_PER_V (3300 MHz/V, the uncompensated ring) when SNC = 0.
// s_band adds always-on current sources (band select). s_pdn is active low,
// as in the source design: at 0 the bias nodes are pulled high, all FTCs turn
// off and the output stays low.
// F0_HZ (290 MHz, the lowest frequency the source design starts from) and
// the two FP values are the source design's; KDCO_HZ and BAND_CODES are
// this design's choices. The supply deviation is an input in millivolts.
// Timing: each half period is computed from the inputs at its start.
// Lint note: as a behavioural model it uses real-valued delays computed at
// run time and blocking assignments to its own time-keeping variables in
// edge-triggered processes; a linter reports these, and they are intended.
module snc_dco #(
  parameter real         F0_HZ            = 290.0e6,
  parameter real         KDCO_HZ          = 3.0e6,
  parameter int unsigned BAND_CODES       = 256,
  parameter real         FP_SNC_HZ_PER_V  = 60.8e6,
  parameter real         FP_FREE_HZ_PER_V = 3300.0e6,
  parameter bit          SNC              = 1'b1
) (
  input  logic [9:0]        code,        // number of activated FTCs
  input  logic [1:0]        s_band,
  input  logic              s_pdn,       // active-low power-down
  input  logic signed [15:0] vdd_dev_mv, // supply deviation from nominal
  output logic              s_out
);
  real f_hz;
  real half_ns;

  always_comb begin
    f_hz = F0_HZ + real'(int'(code) + int'(s_band) * int'(BAND_CODES)) * KDCO_HZ
         + (SNC ? FP_SNC_HZ_PER_V : FP_FREE_HZ_PER_V) * real'(vdd_dev_mv) * 1.0e-3;
    if (f_hz < 1.0e6) f_hz = 1.0e6;
  end

  initial begin
    s_out = 1'b0;
    forever begin
      if (!s_pdn) begin
        s_out = 1'b0;
        wait (s_pdn);
      end
      half_ns = 0.5e9 / f_hz;
      #(half_ns);
      s_out = s_pdn ? ~s_out : 1'b0;
    end
  end

endmodule
