// tb_voltage_controller: self-checking test of the PI voltage controller at
// its default gains and limits. Sequences of output-voltage counts are
// applied once every 20 clock cycles: small random errors around the set
// point, long runs of large positive error (drives i_ref to the 1.5 A limit
// and the integrator to its ceiling) and of large negative error (drives it
// to the zero-current floor). After each sample the testbench checks i_ref,
// the one-cycle iref_load strobe (the edge after u0_valid is sampled) and the
// `limited` flag against a model written with real arithmetic.
`timescale 1ns/1ps
module tb_voltage_controller;
  import dcm_pkg::*;

  localparam real KP = 588.0 / 256.0;
  localparam real KI = 30.0 / 256.0;

  logic   clk = 1'b0, rst_n = 1'b1, u0_valid = 1'b0;
  count_t u_ref = count_t'(U_REF_COUNT), u0_dig = '0;
  count_t i_ref;
  logic   iref_load, limited;
  int checks = 0, failures = 0;
  real integ_m = 0.0;              // integrator, in counts
  int  n_lim = 0, n_floor = 0;

  voltage_controller dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic sample(input int u0);
    real e, t, o;
    int exp_i;
    bit exp_lim;
    e = real'(int'(u_ref) - u0);
    integ_m = integ_m + KI * e;
    if (integ_m < 0.0) integ_m = 0.0;
    if (integ_m > real'(I_LIMIT_COUNT - I_ZERO_COUNT))
      integ_m = real'(I_LIMIT_COUNT - I_ZERO_COUNT);
    t = real'(I_ZERO_COUNT) + $floor(KP * e + integ_m);
    exp_lim = (t >= real'(I_LIMIT_COUNT));
    o = t;
    if (o < real'(I_ZERO_COUNT))  o = real'(I_ZERO_COUNT);
    if (o > real'(I_LIMIT_COUNT)) o = real'(I_LIMIT_COUNT);
    exp_i = int'(o);
    @(negedge clk) begin u0_dig = count_t'(u0); u0_valid = 1'b1; end
    @(negedge clk) begin
      u0_valid = 1'b0;
      check(iref_load === 1'b1, "iref_load one cycle after u0_valid");
      check(int'(i_ref) == exp_i, $sformatf("i_ref=%0d expected %0d", i_ref, exp_i));
      check(limited == exp_lim, "limited flag");
    end
    @(negedge clk);
    check(iref_load === 1'b0, "iref_load lasts one cycle");
    if (exp_lim) n_lim++;
    if (exp_i == int'(I_ZERO_COUNT)) n_floor++;
    repeat (16) @(negedge clk);
    check(iref_load === 1'b0 && int'(i_ref) == exp_i, "i_ref held between samples");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #30 rst_n = 1'b1;
    @(negedge clk);
    check(int'(i_ref) == int'(I_ZERO_COUNT), "reset value");
    for (int i = 0; i < 200; i++)
      sample(int'(U_REF_COUNT) + $urandom_range(0, 80) - 40);
    for (int i = 0; i < 120; i++)           // output far too low: start-up
      sample(int'(U_REF_COUNT) - 600 + $urandom_range(0, 100));
    for (int i = 0; i < 60; i++)            // output far too high
      sample(int'(U_REF_COUNT) + 500 + $urandom_range(0, 100));
    for (int i = 0; i < 100; i++)
      sample(int'(U_REF_COUNT) + $urandom_range(0, 20) - 10);
    check(n_lim > 10, "current limit reached");
    check(n_floor > 10, "zero-current floor reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
