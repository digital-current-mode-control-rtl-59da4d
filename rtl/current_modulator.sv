// current_modulator: digital current-mode PWM generator.
//
// This is the inner current loop. It replaces the analog comparator and
// sensed current ramp of classic peak-current control by a digital
// comparison of the counted average current against a 16-bit reference:
//
//   * `cl` (period start) sets the PWM flip-flop: transistor on.
//   * The digital comparator resets it as soon as Z(iL) = Z_off + Z_on
//     reaches i_ref: transistor off. This is the end of the measurement
//     window, so both counters are cleared and the next window starts with
//     the new Toff interval.
//   * `dmax` (maximum duty) resets it as well if the comparator has not,
//     and also restarts the window.
//   * If the count has already reached i_ref when `cl` arrives, the on pulse
//     of that period is skipped and the window restarts at that point.
// The reset of the flip-flop takes priority over the set.
//
// Clocking: the counters, comparator and flip-flop all run on the current
// VCO's pulses (vclk), as in the design description, so the PWM edge is
// resolved to one VCO period. cl, dmax and i_ref come from the system clock
// domain and are resynchronised here (2-3 vclk edges of latency). The
// comparator looks at the registered counter state, so the switch-off edge
// of `pwm` follows the VCO edge that made the count reach i_ref by one vclk
// edge. Until the first i_ref arrives the reference reads 0, which keeps the
// transistor off.
//
// Outputs: pwm (delta, the transistor gate command, vclk domain),
// il_dig (the adder value at the last window end, vclk domain) and
// event pulses trip / dmax_cut / skip for observation.
module current_modulator
  import dcm_pkg::*;
(
  input  logic   clk,        // system clock
  input  logic   rst_n,      // system reset, active low, asynchronous
  input  logic   cl,         // period start pulse (clk domain)
  input  logic   dmax,       // maximum-duty pulse (clk domain)
  input  logic   iref_load,  // new current reference (clk domain)
  input  count_t i_ref,
  input  logic   vclk,       // current VCO output
  output logic   pwm,
  output logic [CNT_W:0] z_il,     // live adder output
  output logic [CNT_W:0] il_dig,   // adder value captured at window end
  output logic   trip,             // comparator switched the transistor off
  output logic   dmax_cut,         // maximum duty switched it off
  output logic   skip              // period skipped, count already above i_ref
);
  logic   vrst_n;
  logic   cl_v, dmax_v;
  count_t iref_v;
  logic   reach, win_end;
  count_t z_off, z_on;

  reset_sync u_rst (.clk(vclk), .arst_n(rst_n), .rst_n(vrst_n));

  toggle_sync u_cl (
    .src_clk(clk), .src_rst_n(rst_n), .src_pulse(cl),
    .dst_clk(vclk), .dst_rst_n(vrst_n), .dst_pulse(cl_v)
  );
  toggle_sync u_dmax (
    .src_clk(clk), .src_rst_n(rst_n), .src_pulse(dmax),
    .dst_clk(vclk), .dst_rst_n(vrst_n), .dst_pulse(dmax_v)
  );
  word_sync #(.W(CNT_W)) u_iref (
    .src_clk(clk), .src_rst_n(rst_n), .src_load(iref_load), .src_data(i_ref),
    .dst_clk(vclk), .dst_rst_n(vrst_n), .dst_valid(), .dst_data(iref_v)
  );

  current_counters u_cnt (
    .vclk, .rst_n(vrst_n), .clr(win_end), .on(pwm),
    .z_off, .z_on, .z_sum(z_il)
  );

  // Digital comparator
  assign reach    = z_il >= {1'b0, iref_v};
  assign trip     = pwm & reach;
  assign dmax_cut = pwm & ~reach & dmax_v;
  assign skip     = ~pwm & cl_v & reach;
  assign win_end  = trip | dmax_cut | skip;

  // PWM flip-flop: reset (window end) dominates set (cl)
  always_ff @(posedge vclk or negedge vrst_n) begin
    if (!vrst_n) begin
      pwm    <= 1'b0;
      il_dig <= '0;
    end else begin
      if (win_end)   pwm <= 1'b0;
      else if (cl_v) pwm <= 1'b1;
      if (win_end)   il_dig <= z_il;
    end
  end

  // The transistor only turns off at a window end and only turns on after cl.
  assert property (@(posedge vclk) disable iff (!vrst_n)
                   $fell(pwm) |-> $past(win_end));
  assert property (@(posedge vclk) disable iff (!vrst_n)
                   $rose(pwm) |-> $past(cl_v));
endmodule
