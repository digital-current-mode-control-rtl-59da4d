// tb_cl_oscillator: self-checking test of the switching-period oscillator.
// Runs a short period (PERIOD = 20, DMAX = 15) and checks, against counters
// kept in the testbench, that cl comes exactly every PERIOD cycles, that
// dmax comes DMAX cycles after each cl, and that nothing is produced while
// en is low.
`timescale 1ns/1ps
module tb_cl_oscillator;
  localparam int unsigned PERIOD = 20;
  localparam int unsigned DMAX   = 15;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic cl, dmax;
  logic [$clog2(PERIOD)-1:0] phase;
  int checks = 0, failures = 0;
  int cyc = 0, last_cl = -1, n_cl = 0, n_dmax = 0;
  logic en_d = 1'b0;

  cl_oscillator #(.PERIOD(PERIOD), .DMAX(DMAX)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    en_d <= en;
    if (rst_n && !en && !en_d) check(!cl && !dmax, "pulse while disabled");
    if (rst_n && cl) begin
      if (last_cl >= 0) check(cyc - last_cl == PERIOD, "cl spacing");
      last_cl <= cyc;
      n_cl++;
    end
    if (rst_n && dmax) begin
      check(last_cl >= 0 && cyc - last_cl == DMAX, "dmax position");
      n_dmax++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    en = 1'b1;
    repeat (PERIOD * 10) @(posedge clk);
    check(n_cl == 10, "number of cl pulses");
    check(n_dmax == 10, "number of dmax pulses");
    @(negedge clk) en = 1'b0;
    repeat (2 * PERIOD) @(posedge clk);
    // restart: first cl one cycle after enable, then regular
    @(negedge clk) begin en = 1'b1; last_cl = -1; end
    repeat (PERIOD * 3 + 2) @(posedge clk);
    check(n_cl == 14, "restart after enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
