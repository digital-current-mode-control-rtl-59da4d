// tb_current_counters: self-checking test of the Z_off / Z_on counters and
// their adder. The counter clock is driven with random gaps, `on` and `clr`
// change at random between edges, and after every edge the outputs are
// compared with two counts kept in the testbench. A second phase forces the
// Z_on counter to saturation.
`timescale 1ns/1ps
module tb_current_counters;
  import dcm_pkg::*;

  logic vclk = 1'b0, rst_n = 1'b1, clr = 1'b0, on = 1'b0;
  count_t z_off, z_on;
  logic [CNT_W:0] z_sum;
  int checks = 0, failures = 0;
  int unsigned m_off = 0, m_on = 0;

  current_counters dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (z_off=%0d/%0d z_on=%0d/%0d sum=%0d)", what,
               z_off, m_off, z_on, m_on, z_sum);
    end
  endtask

  task automatic edge_(input logic c, input logic o);
    clr = c; on = o;
    #(1 + $urandom_range(0, 6)) vclk = 1'b1;
    if (c) begin m_off = 0; m_on = 0; end
    else if (o) begin if (m_on < 65535) m_on++; end
    else begin if (m_off < 65535) m_off++; end
    #1;
    check(z_off == count_t'(m_off) && z_on == count_t'(m_on), "counter value");
    check(z_sum == (CNT_W+1)'(m_off + m_on), "adder");
    #(1 + $urandom_range(0, 6)) vclk = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #4 rst_n = 1'b1;
    #5;
    check(z_off == 0 && z_on == 0, "reset");
    for (int w = 0; w < 50; w++) begin
      int unsigned n_off = $urandom_range(0, 120), n_on = $urandom_range(0, 80);
      for (int i = 0; i < n_off; i++) edge_(1'b0, 1'b0);
      for (int i = 0; i < n_on; i++)  edge_(1'b0, 1'b1);
      edge_(1'b1, $urandom_range(0, 1));
    end
    // saturation of Z_on
    for (int i = 0; i < 65540; i++) edge_(1'b0, 1'b1);
    check(z_on == 16'hFFFF, "saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
