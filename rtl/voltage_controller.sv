// voltage_controller: outer voltage loop, a discrete PI controller.
//
// Once per switching period, when a new output-voltage count u0_dig arrives
// (u0_valid), it forms the error e = u_ref - u0_dig in VCO counts and
// updates
//     integ  <= clamp(integ + KI*e, 0, (I_MAX - I_MIN) << FRAC)
//     i_ref  <= clamp(I_MIN + (KP*e + integ_new) >>> FRAC, I_MIN, I_MAX)
// KP and KI are fixed-point gains with FRAC fractional bits. I_MIN is the
// count the current channel reads at zero current (the VCO offset), so the
// integrator holds "current above zero"; I_MAX is the count of the 1.5 A
// average-current limit. Clamping the integrator to the same span is the
// anti-windup. i_ref and the one-cycle iref_load strobe are registered and
// appear one clk cycle after u0_valid; `limited` flags that the last update
// hit I_MAX.
//
// The design description gives the controller type (PI), the current limit
// and the 5 V set point, not the gains or number formats: KP = 588/256 and
// KI = 30/256 (counts per count) are this design's choice, set for a loop
// crossover near 1 kHz with the 100 uF output capacitor.
module voltage_controller
  import dcm_pkg::*;
#(
  parameter int unsigned KP    = 588,
  parameter int unsigned KI    = 30,
  parameter int unsigned FRAC  = 8,
  parameter int unsigned I_MIN = I_ZERO_COUNT,
  parameter int unsigned I_MAX = I_LIMIT_COUNT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  count_t u_ref,      // voltage set point in VCO counts per period
  input  count_t u0_dig,     // measured output voltage, counts per period
  input  logic   u0_valid,
  output count_t i_ref,      // current reference for the current modulator
  output logic   iref_load,
  output logic   limited
);
  typedef logic signed [47:0] acc_t;

  localparam acc_t INT_MAX = (acc_t'(I_MAX) - acc_t'(I_MIN)) <<< FRAC;

  acc_t err, prop, integ, integ_sum, integ_nx, total, out;

  always_comb begin
    err       = acc_t'(u_ref) - acc_t'(u0_dig);
    prop      = acc_t'(KP) * err;
    integ_sum = integ + acc_t'(KI) * err;
    if (integ_sum < 0)            integ_nx = '0;
    else if (integ_sum > INT_MAX) integ_nx = INT_MAX;
    else                          integ_nx = integ_sum;
    total = acc_t'(I_MIN) + ((prop + integ_nx) >>> FRAC);
    if (total < acc_t'(I_MIN))      out = acc_t'(I_MIN);
    else if (total > acc_t'(I_MAX)) out = acc_t'(I_MAX);
    else                            out = total;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      i_ref     <= count_t'(I_MIN);
      iref_load <= 1'b0;
      limited   <= 1'b0;
    end else begin
      iref_load <= u0_valid;
      if (u0_valid) begin
        integ   <= integ_nx;
        i_ref   <= out[CNT_W-1:0];
        limited <= (total >= acc_t'(I_MAX));
      end
    end
  end

  initial assert (I_MIN < I_MAX && I_MAX < 2**CNT_W)
    else $error("current limits out of range");
endmodule
