`timescale 1ns/1fs
// Behavioural model (not synthesizable) of the injection-locked ring
// oscillator (ILO) of the MPC injection-locked clock multiplier.
//
// The real part is a 4-stage differential ring whose frequency is set by a
// 10-bit digitally-controlled resistor (DCR), plus four injection switches
// across the differential nodes of which only the one at phi_0/phi_180 is
// driven by the injection pulse (the others are dummies). The switch is
// built from 4-bit binary-weighted units of width W; its size sets the
// injection strength beta.
// Model: a phase accumulator ph (in oscillator cycles) advances at
//   f = F_MIN_HZ + dcr * K_HZ.
// Output phase[k] is phi_(45*k) and is high while frac(ph - k/8) < 0.5, so the
// eight outputs are spaced T_OSC/8 apart. An injection (rising edge of s_inj,
// delayed by the injection-path delay T_PATH_NS) shorts phi_0 and phi_180 and
// pulls the nearest phi_0 crossing (rising or falling) toward the injection
// instant by the fraction beta of the error, the linear phase-domain-response
// behaviour the source design describes inside the capture range:
//   e = ph - round(2 ph)/2,   ph <- ph - beta * e,
//   beta = BETA_MAX * sw / (sw + SW_HALF)
// which rises with switch size and saturates, as the source design measured.
// BETA_MAX, SW_HALF, K_HZ, F_MIN_HZ (a free-running offset so that no DCR
// code hits 4.8 GHz exactly) and T_PATH_NS are this design's choices.
// Timing: outputs change at multiples of T_OSC/16 of the accumulated phase
// and immediately after an injection. A DCR change takes effect at the next
// such step (within T_OSC/16). T_PATH_NS must exceed T_OSC/16.
// Lint note: as a behavioural model it uses real-valued delays computed at
// run time and blocking assignments to its own time-keeping variables in
// edge-triggered processes, and gives a flag an initial value before its
// process assigns it; a linter reports these, and they are intended.
module ilo #(
  parameter real F_MIN_HZ  = 3.7763e9,
  parameter real K_HZ      = 2.0e6,
  parameter real BETA_MAX  = 1.0,
  parameter real SW_HALF   = 4.0,
  parameter real T_PATH_NS = 0.1
) (
  input  logic [9:0] dcr,
  input  logic [3:0] inj_sw,    // injection switch size in units of W
  input  logic       s_inj,     // injection pulse (rising edge injects)
  output logic [7:0] phase      // phase[k] = phi_(45 k)
);
  real  ph, t_last, t_osc, beta, t_inj;
  bit   inj_pend = 1'b0;

  // The injection takes effect T_PATH_NS after the rising edge of s_inj.
  // T_PATH_NS is longer than one step of the phase loop below (T_OSC/16),
  // so the loop always learns of a pending injection before it is due and
  // can wake up exactly at it.
  always @(posedge s_inj) begin
    t_inj    = $realtime + T_PATH_NS;
    inj_pend = 1'b1;
  end

  function automatic real frac(input real x);
    return x - $floor(x);
  endfunction

  initial begin
    real dt;
    ph = 0.0; t_last = 0.0; t_osc = 1.0e9 / F_MIN_HZ;
    phase = 8'b0000_1111;
    forever begin
      ph     = frac(ph + ($realtime - t_last) / t_osc);
      t_last = $realtime;
      t_osc  = 1.0e9 / (F_MIN_HZ + real'(dcr) * K_HZ);
      if (inj_pend && t_inj <= $realtime + 1.0e-7) begin
        inj_pend = 1'b0;
        beta = BETA_MAX * real'(inj_sw) / (real'(inj_sw) + SW_HALF);
        ph   = frac(ph - beta * (ph - $floor(2.0 * ph + 0.5) / 2.0) + 1.0);
      end
      for (int k = 0; k < 8; k++)
        phase[k] = frac(ph + 1.0e-4 - real'(k) / 8.0) < 0.5;
      dt = (($floor(ph * 16.0 + 1.0e-3) + 1.0) / 16.0 - ph) * t_osc;
      if (inj_pend && t_inj - $realtime < dt) dt = t_inj - $realtime;
      if (dt < 1.0e-6) dt = 1.0e-6;
      #(dt);
    end
  end

endmodule
