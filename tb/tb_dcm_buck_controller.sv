// tb_dcm_buck_controller: closed-loop test of the whole controller at its
// default parameters (50 MHz system clock, 25 kHz switching, 5 V set point,
// 1.5 A current limit) driving a simulated buck converter.
//
// Plant: ud = 12 V, L = 270 uH, C = 100 uF, resistive load, 0.25 ohm in
// series with the inductor (0.1 ohm shunt plus winding and switch), a diode
// with 0.4 V drop (inductor current cannot go negative), integrated with a
// 5 ns forward-Euler step. Current acquisition: u(iL) = 0.683 V + 1.1585 V/A * iL
// (0..2 A -> 0.683..3 V); voltage acquisition: 0.683 V + u0 * 1k/3.2k. Two
// vco_model instances turn these into the pulse trains for the controller.
//
// Scenario: start-up into 6.8 ohm, load step to 3.4 ohm at 2.0 ms and back
// to 6.8 ohm at 3.0 ms, end at 4.0 ms. Checks:
//   * every measurement window: the count il_dig the controller captured
//     equals the integral of the VCO frequency over that window, worked out
//     from the analog model (+-1 % and 3 counts),
//   * the average inductor current over the first 400 us of start-up stays
//     below 1.6 A (limit 1.5 A),
//   * the 400 us average of u0 lies in 4.75..5.25 V at 6.8 ohm and in
//     4.5..5.25 V at 3.4 ohm, where the load (1.47 A) sits right at the
//     current limit,
//   * u0 stays within 3.5..6.5 V after each load step,
//   * each mechanism occurs: comparator switch-off, maximum-duty
//     switch-off, skipped period, current limit, and the per-period voltage
//     update.
// The tolerances are wide on purpose: the inner loop does not settle to a
// fixed duty cycle but keeps oscillating around the commanded average
// (see the README).
`timescale 1ns/1ps
module tb_dcm_buck_controller;
  import dcm_pkg::*;

  localparam real UD = 12.0, L = 270.0e-6, C = 100.0e-6;
  localparam real DT = 5.0e-9;
  localparam real UOFF = 0.683, GI = 1.1585, GU = 1.0 / 3.2;
  localparam real RL = 0.25;   // 0.1 ohm shunt + 0.15 ohm winding/switch
  localparam real VD = 0.4;    // diode forward drop

  logic   clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic   vco_i, vco_u;
  count_t u_ref = count_t'(U_REF_COUNT);
  logic   pwm, cl, limited, trip, dmax_cut, skip, u0_valid;
  count_t i_ref, u0_dig;
  logic [CNT_W:0] il_dig, z_il;

  real il = 0.0, u0 = 0.0, rload = 6.8;
  real u_il, u_u;
  int checks = 0, failures = 0;
  int n_trip = 0, n_dmax = 0, n_skip = 0, n_lim = 0, n_cl = 0, n_upd = 0;

  dcm_buck_controller dut (.*);

  vco_model u_vco_i (.u(u_il), .en(1'b1), .out(vco_i));
  vco_model u_vco_u (.u(u_u),  .en(1'b1), .out(vco_u));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Buck converter power stage and analog conditioning
  initial begin
    u_il = UOFF;
    u_u  = UOFF;
    forever begin
      #5;
      if (pwm)            il = il + (UD - u0 - RL * il) / L * DT;
      else if (il > 0.0)  il = il - (u0 + VD + RL * il) / L * DT;
      if (il < 0.0) il = 0.0;
      u0 = u0 + (il - u0 / rload) / C * DT;
      u_il = UOFF + GI * il;
      u_u  = UOFF + GU * u0;
    end
  end

  // Per-period averages, taken between the controller's own cl pulses
  real  il_acc = 0.0, u_acc = 0.0, il_avg = 0.0, u_avg = 0.0;
  int   n_acc = 0;
  always #5 begin
    il_acc += il;
    u_acc  += u0;
    n_acc++;
  end
  always @(posedge clk) if (cl) begin
    if (n_acc > 0) begin
      il_avg = il_acc / n_acc;
      u_avg  = u_acc / n_acc;
    end
    il_acc = 0.0; u_acc = 0.0; n_acc = 0;
    n_cl++;
  end

  // Every measurement window (switch-off to switch-off, or restart at a
  // skipped period): the expected count is the integral of the VCO
  // frequency over the window, computed from the analog model.
  real  w_cnt = 0.0, pend_exp = 0.0;
  logic w_valid = 1'b0, pend = 1'b0;
  int   n_win = 0;
  always #5 begin
    real f;
    f = 23.0e6 + 39.0e6 * u_il;
    w_cnt += (f > 150.0e6 ? 150.0e6 : f) * DT;
  end

  always @(posedge vco_i) begin
    if (pend) begin
      check(real'(il_dig) > 0.99 * pend_exp - 3.0 && real'(il_dig) < 1.01 * pend_exp + 3.0,
            $sformatf("il_dig=%0d, window integral %f", il_dig, pend_exp));
      pend = 1'b0;
      n_win++;
    end
    if (trip || dmax_cut || skip) begin
      if (w_valid) begin
        pend     = 1'b1;
        pend_exp = w_cnt;
      end
      w_cnt   = 0.0;
      w_valid = en && $realtime > 50_000;
    end
  end

  always @(posedge vco_i) begin
    if (trip)     n_trip++;
    if (dmax_cut) n_dmax++;
    if (skip)     n_skip++;
  end
  always @(posedge clk) begin
    if (limited && cl) n_lim++;
    if (u0_valid) n_upd++;
  end

  // Long-term averages over `span` (the inner loop does not hold the
  // inductor current constant from period to period, see the README)
  real m_u, m_i;
  task automatic measure(input realtime span);
    realtime t0 = $realtime;
    real su = 0.0, si = 0.0;
    int  n = 0;
    while ($realtime - t0 < span) begin
      #20;
      su += u0; si += il; n++;
    end
    m_u = su / n;
    m_i = si / n;
  endtask

  task automatic steady_check(input string tag, input real r, input real umin_ok);
    measure(400_000);
    check(m_u > umin_ok && m_u < 5.25, $sformatf("%s: u0 average %f V", tag, m_u));
    $display("%s: over 400 us u0 %0.3f V, iL %0.3f A; i_ref %0d, u0_dig %0d",
             tag, m_u, m_i, i_ref, u0_dig);
  endtask

  real umin, umax;
  task automatic watch_step(input realtime span);
    realtime t0 = $realtime;
    umin = 100.0; umax = -100.0;
    while ($realtime - t0 < span) begin
      #100;
      if (u0 < umin) umin = u0;
      if (u0 > umax) umax = u0;
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #100 en = 1'b1;
    measure(400_000);
    $display("start-up, first 400 us: u0 %0.3f V, iL %0.3f A", m_u, m_i);
    check(m_i < 1.6, "average current during start-up above the 1.5 A limit");
    #(1_400_000 - $realtime);
    steady_check("6.8 ohm", 6.8, 4.75);
    #(2_000_000 - $realtime);
    rload = 3.4;
    watch_step(500_000);
    $display("step 6.8 -> 3.4 ohm: u0 %0.3f .. %0.3f V", umin, umax);
    check(umin > 3.5, "dynamic error after load increase");
    steady_check("3.4 ohm", 3.4, 4.5);
    #(3_000_000 - $realtime);
    rload = 6.8;
    watch_step(500_000);
    $display("step 3.4 -> 6.8 ohm: u0 %0.3f .. %0.3f V", umin, umax);
    check(umax < 6.5, "dynamic error after load decrease");
    steady_check("back to 6.8 ohm", 6.8, 4.75);
    $display("events: cl=%0d updates=%0d trip=%0d dmax=%0d skip=%0d limit=%0d windows=%0d",
             n_cl, n_upd, n_trip, n_dmax, n_skip, n_lim, n_win);
    check(n_trip > 0, "comparator switch-off never happened");
    check(n_dmax > 0, "maximum-duty switch-off never happened");
    check(n_lim > 0, "current limit never reached");
    check(n_skip > 0, "skipped period never happened");
    check(n_upd > 90, "voltage updates");
    check(n_win > 80, "measurement windows compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #6_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
