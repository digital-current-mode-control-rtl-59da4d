// dcm_buck_controller: FPGA part of a cascade-controlled buck converter with
// digital current-mode control based on average inductor current measured
// with voltage-controlled oscillators instead of A/D converters.
//
// Two VCOs outside this module turn the conditioned inductor current and the
// divided output voltage into pulse trains whose frequency follows the
// signal. Counting those pulses integrates the signal, so a count over a
// switching period is its average:
//
//   cl_oscillator      system clock -> 25 kHz period pulse cl (+ max-duty)
//   voltage_counter    counts the voltage VCO per period -> U0(dig)
//   voltage_controller PI on U_ref - U0(dig) -> current reference i_ref,
//                      limited to 1.5 A
//   current_modulator  Z_off/Z_on counters on the current VCO, adder,
//                      digital comparator against i_ref and the PWM
//                      flip-flop (set by cl, reset when the average current
//                      count reaches i_ref) -> pwm (transistor gate)
//
// Interface: clk (system clock, 50 MHz by default), rst_n (asynchronous,
// active low), en (run), vco_i / vco_u (pulse trains of the current and
// voltage VCOs, each used as a clock), u_ref (voltage set point in counts
// per period, U_REF_COUNT = 5 V by default). pwm is produced in the current
// VCO's clock domain; the remaining outputs are for monitoring and carry the
// domain they are produced in: i_ref, u0_dig, u0_valid, cl and limited in
// clk; il_dig
// (average current count of the last window), z_il and the one-cycle event
// pulses trip / dmax_cut / skip in vco_i. The oscillator phase is unused
// outside the oscillator.
//
// Timing: one voltage sample and one i_ref update per switching period; the
// new i_ref reaches the comparator a few VCO cycles after the cl that closed
// the voltage window, i.e. early in the same period's on time.
module dcm_buck_controller
  import dcm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   vco_i,
  input  logic   vco_u,
  input  count_t u_ref,
  output logic   pwm,
  output count_t i_ref,
  output count_t u0_dig,
  output logic   u0_valid,  // u0_dig updated (clk domain)
  output logic [CNT_W:0] il_dig,
  output logic   cl,        // period start (clk domain)
  output logic   limited,   // i_ref at the 1.5 A limit (clk domain)
  output logic   trip,      // comparator ended the on time (vco_i domain)
  output logic   dmax_cut,  // maximum duty ended the on time (vco_i domain)
  output logic   skip,      // on pulse skipped (vco_i domain)
  output logic [CNT_W:0] z_il  // live average-current count (vco_i domain)
);
  logic dmax, iref_load;
  logic [$clog2(PERIOD_CLKS)-1:0] phase;

  cl_oscillator u_osc (
    .clk, .rst_n, .en, .cl, .dmax, .phase
  );

  voltage_counter u_vcnt (
    .clk, .rst_n, .cl, .vclk(vco_u), .u0_dig, .u0_valid
  );

  voltage_controller u_vctl (
    .clk, .rst_n, .u_ref, .u0_dig, .u0_valid, .i_ref, .iref_load, .limited
  );

  current_modulator u_mod (
    .clk, .rst_n, .cl, .dmax, .iref_load, .i_ref, .vclk(vco_i),
    .pwm, .z_il, .il_dig, .trip, .dmax_cut, .skip
  );
endmodule
