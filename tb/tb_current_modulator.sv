// tb_current_modulator: self-checking test of the digital current modulator
// (counters, adder, digital comparator, PWM flip-flop, clock-domain
// crossings).
//
// The testbench stands in for the converter: its VCO runs at 125 MHz while
// pwm is high (current rising) and at 62.5 MHz while it is low, so the count
// of a window depends on the duty cycle as it does on real hardware. A short
// period (400 system clocks = 8 us, max duty at 90 %) keeps the run small.
// The testbench counts VCO edges itself and checks that
//   * every switch-off by the comparator happens on exactly the edge after
//     the window count reached i_ref, and il_dig then holds i_ref,
//   * every other switch-off comes within ten VCO edges of a dmax pulse,
//   * pwm rises only within ten VCO edges of a cl pulse,
//   * a skipped period happens only with the count already at i_ref.
// Four references exercise steady switching, the maximum-duty cut, skipped
// periods, and recovery; each kind of event must be seen.
`timescale 1ns/1ps
module tb_current_modulator;
  import dcm_pkg::*;

  localparam int unsigned PERIOD = 400;
  localparam int unsigned DMAX   = 360;

  logic   clk = 1'b0, rst_n = 1'b0, vclk = 1'b0;
  logic   cl = 1'b0, dmax = 1'b0, iref_load = 1'b0;
  count_t i_ref = '0;
  logic   pwm, trip, dmax_cut, skip;
  logic [CNT_W:0] z_il, il_dig;

  int checks = 0, failures = 0;
  int k = 0;                       // VCO edges in the current window
  int since_cl = 1000, since_dmax = 1000;  // VCO edges since those pulses
  int iref_m = 0;                  // reference as the model sees it
  int settle = 0;                  // periods to skip checks after a change
  int n_trip = 0, n_dmax = 0, n_skip = 0, n_rise = 0;
  logic pwm_q = 1'b0, check_ildig = 1'b0;
  int   ildig_exp = 0;

  current_modulator dut (.*);

  always #10 clk = ~clk;
  always #(pwm ? 4 : 8) vclk = ~vclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s (k=%0d iref=%0d)", $time, what, k, iref_m);
    end
  endtask

  // Period generator in the system clock domain
  int phase = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cl   <= (phase == 0);
      dmax <= (phase == DMAX);
      if (phase == 0 && settle > 0) settle <= settle - 1;
      phase <= (phase == PERIOD - 1) ? 0 : phase + 1;
    end
  end

  always @(posedge cl)   since_cl = 0;
  always @(posedge dmax) since_dmax = 0;

  always @(posedge vclk) begin
    k++;
    since_cl++;
    since_dmax++;
  end

  always @(negedge vclk) if (rst_n) begin
    if (check_ildig) begin
      check(int'(il_dig) == ildig_exp, "il_dig holds the window count");
      check_ildig = 1'b0;
    end
    if (pwm_q && !pwm) begin               // switch-off
      if (k == iref_m + 1) begin
        n_trip++;
        if (settle == 0) begin
          check_ildig = 1'b1;
          ildig_exp   = iref_m;
        end
      end else begin
        if (settle == 0) check(since_dmax <= 10 && k < iref_m + 1,
                               "switch-off neither at i_ref nor at dmax");
        if (since_dmax <= 10) n_dmax++;
      end
      k = 0;
    end
    if (!pwm_q && pwm) begin               // switch-on
      n_rise++;
      check(since_cl <= 10, "switch-on without cl");
    end
    if (skip) begin                        // window restart without on time
      if (settle == 0) check(k >= iref_m, "skip below i_ref");
      n_skip++;
      k = -1;
    end
    if (settle == 0 && pwm)
      check(k <= iref_m + 1, "count passed i_ref with the transistor on");
    pwm_q = pwm;
  end

  task automatic set_ref(input int v);
    @(posedge clk);
    i_ref     <= count_t'(v);
    iref_load <= 1'b1;
    @(posedge clk);
    iref_load <= 1'b0;
    repeat (4) @(posedge vclk);
    iref_m = v;
    settle = 2;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    set_ref(700);   repeat (PERIOD * 12) @(posedge clk);
    check(n_trip > 5, "comparator switch-offs at i_ref = 700");
    set_ref(1100);  repeat (PERIOD * 8) @(posedge clk);
    check(n_dmax > 4, "maximum-duty switch-offs at i_ref = 1100");
    set_ref(450);   repeat (PERIOD * 8) @(posedge clk);
    check(n_skip > 4, "skipped periods at i_ref = 450");
    n_trip = 0;
    set_ref(700);   repeat (PERIOD * 8) @(posedge clk);
    check(n_trip > 4, "recovery at i_ref = 700");
    check(n_rise > 20, "number of on pulses");
    $display("events: trip=%0d dmax=%0d skip=%0d rise=%0d", n_trip, n_dmax,
             n_skip, n_rise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
