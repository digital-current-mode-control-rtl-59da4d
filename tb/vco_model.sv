// vco_model: behavioural model of the voltage-to-frequency converter (a
// TLC2933A-type VCO) used in front of each counter. Not synthesizable.
// The output is a square wave of frequency f = F0 + SLOPE * u, clamped to
// [F0, FMAX]; u is the VCO input voltage in volts, sampled at every
// half-period. The defaults are the straight line through 23 MHz at 0 V and
// 140 MHz at 3 V of the measured characteristic, saturating at 150 MHz.
// `en` low stops the oscillator (the inhibit input of the real part).
`timescale 1ns/1ps
module vco_model #(
  parameter real F0    = 23.0e6,
  parameter real SLOPE = 39.0e6,
  parameter real FMAX  = 150.0e6
) (
  input  real  u,
  input  logic en,
  output logic out
);
  real f;

  initial out = 1'b0;

  always begin
    f = F0 + SLOPE * u;
    if (f < F0)   f = F0;
    if (f > FMAX) f = FMAX;
    #(0.5e9 / f);
    out = en ? ~out : 1'b0;
  end
endmodule
