// current_counters: average inductor current measurement by pulse counting.
//
// The current VCO's output is used directly as the clock of two counters.
// Z_off counts VCO pulses while the transistor is off (on = 0) and Z_on while
// it is on (on = 1). Because the VCO frequency is a linear function of the
// inductor current, each count is the integral of the current over its
// interval, and the adder output z_sum = Z_off + Z_on is proportional to the
// average inductor current over the window times the window length
// (I_L = z_sum * K1 / Ts, K1 = 1/5600 at full scale).
//
// `clr` (synchronous to the VCO clock) zeroes both counters; it is raised at
// every switch-off instant so that a window always covers one Toff followed
// by one Ton. The counters saturate at all-ones instead of wrapping, so a
// window that runs long cannot wrap around to a small count. All outputs are
// the registered state of the counters, i.e. they reflect edges up to the
// previous one.
module current_counters
  import dcm_pkg::*;
(
  input  logic   vclk,     // current VCO output used as clock
  input  logic   rst_n,    // reset, synchronous-deassert in vclk domain
  input  logic   clr,      // start a new measurement window
  input  logic   on,       // transistor state: 1 = Ton, 0 = Toff
  output count_t z_off,
  output count_t z_on,
  output logic [CNT_W:0] z_sum  // adder output, one bit wider than a counter
);
  always_ff @(posedge vclk or negedge rst_n) begin
    if (!rst_n) begin
      z_off <= '0;
      z_on  <= '0;
    end else if (clr) begin
      z_off <= '0;
      z_on  <= '0;
    end else if (on) begin
      if (z_on != '1)  z_on  <= z_on + 1'b1;
    end else begin
      if (z_off != '1) z_off <= z_off + 1'b1;
    end
  end

  assign z_sum = {1'b0, z_off} + {1'b0, z_on};
endmodule
