// tb_voltage_counter: self-checking test of the output-voltage pulse counter.
// The VCO period changes at random from one switching period to the next
// (7..20 ns); a short switching period of 200 system clocks (4 us) is used.
// The testbench counts VCO edges between its own cl pulses and checks that
//   * each U0(dig) matches that period's edge count within 3 (the window is
//     shifted by the synchroniser, a few VCO edges),
//   * no edge is lost or counted twice: the sum of all U0(dig) equals the
//     edges between the first and last cl within 3,
//   * exactly one u0_valid arrives per period, within 12 clk cycles of cl.
`timescale 1ns/1ps
module tb_voltage_counter;
  import dcm_pkg::*;

  localparam int unsigned PERIOD = 200;
  localparam int unsigned NPER   = 40;

  logic   clk = 1'b0, rst_n = 1'b1, vclk = 1'b0, cl = 1'b0;
  count_t u0_dig;
  logic   u0_valid;
  realtime vhalf = 5.0;
  int checks = 0, failures = 0;
  int edges = 0, e_at_cl[$];
  int n_valid = 0, clk_since_cl = 0, sum_dig = 0, n_cl = 0;

  voltage_counter dut (.*);

  always #10 clk = ~clk;
  always #(vhalf) vclk = ~vclk;
  always @(posedge vclk) edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Period generator; VCO frequency changes at each cl
  int phase = 0;
  always @(posedge clk) if (rst_n) begin
    cl <= (phase == 0);
    phase <= (phase == PERIOD - 1) ? 0 : phase + 1;
    clk_since_cl <= cl ? 1 : clk_since_cl + 1;
  end

  always @(posedge cl) begin
    e_at_cl.push_back(edges);
    n_cl++;
    vhalf = 3.5 + 0.25 * $urandom_range(0, 26);
  end

  always @(posedge clk) if (u0_valid) begin
    n_valid++;
    check(clk_since_cl <= 12, "u0_valid too long after cl");
    if (n_valid >= 2) begin
      automatic int exp = e_at_cl[n_valid - 1] - e_at_cl[n_valid - 2];
      check(int'(u0_dig) >= exp - 3 && int'(u0_dig) <= exp + 3,
            $sformatf("U0(dig)=%0d, expected %0d", u0_dig, exp));
      sum_dig += int'(u0_dig);
    end
  end

  initial begin
    #1 rst_n = 1'b0;
    #40 rst_n = 1'b1;
    wait (n_cl == NPER);
    repeat (20) @(posedge clk);
    check(n_valid == NPER, $sformatf("%0d valid strobes", n_valid));
    begin
      automatic int exp = e_at_cl[NPER - 1] - e_at_cl[0];
      check(sum_dig >= exp - 3 && sum_dig <= exp + 3,
            $sformatf("sum %0d, expected %0d", sum_dig, exp));
    end
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
