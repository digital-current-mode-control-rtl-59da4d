// dcm_pkg: shared widths, types and default constants of the digital
// current-mode buck controller.
//
// Every measurement in this controller is a number of VCO pulses counted over
// one switching period Ts. The helper vco_counts() turns a VCO input voltage
// into that count, so the default current limit and voltage set point below
// are written in the same units the counters produce.
//
// Numbers that follow the design description: 16-bit counters and reference,
// switching frequency 25 kHz (Ts = 40 us), VCO offset frequency 23 MHz, a
// VCO full-scale of about 140 MHz at 3 V input (5600 pulses per period), the
// current acquisition range 0..2 A -> 0..3 V, a current limit of 1.5 A and an
// output set point of 5 V. The VCO slope of 39 MHz/V is the straight line
// through 23 MHz at 0 V and 140 MHz at 3 V of the measured VCO
// characteristic; the 0.683 V offset and the 1 k / 3.2 k output divider are
// the resistor values of the acquisition circuits. The 50 MHz system clock
// and the 90 % maximum duty cycle are this design's own choices.
package dcm_pkg;

  localparam int unsigned CNT_W = 16;            // counter / reference width
  typedef logic [CNT_W-1:0] count_t;

  // Timing
  localparam int unsigned F_CLK_HZ    = 50_000_000;              // assumed
  localparam int unsigned F_SW_HZ     = 25_000;                  // fs
  localparam int unsigned PERIOD_CLKS = F_CLK_HZ / F_SW_HZ;      // 2000
  localparam int unsigned DMAX_CLKS   = (PERIOD_CLKS * 9) / 10;  // 1800
  localparam int unsigned TS_NS       = 1_000_000_000 / F_SW_HZ; // 40000

  // VCO transfer f = F0 + SLOPE * u
  localparam int unsigned VCO_F0_KHZ       = 23_000;
  localparam int unsigned VCO_SLOPE_KHZ_PV = 39_000;

  // Analog conditioning (resistor values of the acquisition circuits)
  localparam int unsigned U_OFFSET_MV   = 683;   // 5 V * 680 / (4.3k + 680)
  localparam int unsigned IL_MV_PER_A   = 1158;  // (3000 - 683) mV / 2 A
  localparam int unsigned DIV_DEN_X10   = 32;    // u0 divider 1k/(2.2k+1k) = 10/32

  // Number of VCO pulses in one period Ts for a VCO input of mv millivolts:
  //   N = Ts * (F0 + SLOPE * u)
  function automatic int unsigned vco_counts(input int unsigned mv);
    longint unsigned f_hz;
    f_hz = longint'(VCO_F0_KHZ) * 1000 + longint'(VCO_SLOPE_KHZ_PV) * mv;
    return int'((f_hz * TS_NS) / 64'd1_000_000_000);
  endfunction

  // VCO input (mV) for an inductor current given in mA
  function automatic int unsigned il_to_mv(input int unsigned ma);
    return U_OFFSET_MV + (IL_MV_PER_A * ma) / 1000;
  endfunction

  // VCO input (mV) for an output voltage given in mV
  function automatic int unsigned u0_to_mv(input int unsigned mv);
    return U_OFFSET_MV + (mv * 10) / DIV_DEN_X10;
  endfunction

  localparam int unsigned I_ZERO_COUNT  = vco_counts(il_to_mv(0));     // 0 A
  localparam int unsigned I_LIMIT_COUNT = vco_counts(il_to_mv(1500));  // 1.5 A
  localparam int unsigned U_REF_COUNT   = vco_counts(u0_to_mv(5000));  // 5 V

endpackage
