// voltage_counter: average output-voltage measurement by pulse counting.
//
// The output-voltage VCO clocks a single counter. Because the output voltage
// is nearly flat, one counter over the whole period is enough: at every
// period start `cl` the count of the finished period is captured as U0(dig)
// and the counter restarts, so U0(dig) is proportional to the average of u0
// over the last period (U0 = U0(dig) * K2 / Ts).
//
// The counter runs in the VCO's clock domain. `cl` is brought in through a
// toggle synchroniser, and the captured count is handed back to the system
// clock domain with a word synchroniser; u0_valid pulses for one clk cycle
// when a new u0_dig is there, about 2-3 VCO edges plus 3 clk edges after cl.
// Each VCO edge is counted in exactly one period: the edge that sees the
// synchronised cl is the last edge of the old period. The counter saturates
// at all-ones.
//
// The capture point follows the timing diagram of the voltage measurement
// (window from one cl pulse to the next), not the alternative of starting
// it at the end of the on pulse; the two differ only in phase.
module voltage_counter
  import dcm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   cl,        // period start (clk domain)
  input  logic   vclk,      // output-voltage VCO output
  output count_t u0_dig,    // pulses counted in the last period (clk domain)
  output logic   u0_valid   // one clk cycle when u0_dig is updated
);
  logic   vrst_n, cl_v, cap_v;
  count_t cnt, cap;

  reset_sync u_rst (.clk(vclk), .arst_n(rst_n), .rst_n(vrst_n));

  toggle_sync u_cl (
    .src_clk(clk), .src_rst_n(rst_n), .src_pulse(cl),
    .dst_clk(vclk), .dst_rst_n(vrst_n), .dst_pulse(cl_v)
  );

  always_ff @(posedge vclk or negedge vrst_n) begin
    if (!vrst_n) begin
      cnt   <= '0;
      cap   <= '0;
      cap_v <= 1'b0;
    end else begin
      cap_v <= cl_v;
      if (cl_v) begin
        cap <= (cnt == '1) ? cnt : cnt + 1'b1;
        cnt <= '0;
      end else if (cnt != '1) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  word_sync #(.W(CNT_W)) u_out (
    .src_clk(vclk), .src_rst_n(vrst_n), .src_load(cap_v), .src_data(cap),
    .dst_clk(clk), .dst_rst_n(rst_n), .dst_valid(u0_valid), .dst_data(u0_dig)
  );
endmodule
