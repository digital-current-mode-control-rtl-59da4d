// cl_oscillator: switching-period clock of the current-mode controller.
//
// A free-running counter in the system clock domain divides the system clock
// down to the switching frequency (default 50 MHz / 2000 = 25 kHz, Ts =
// 40 us). At phase 0 it emits the one-cycle pulse `cl`, which sets the PWM
// flip-flop (transistor on) and closes the output-voltage measurement window.
// At phase DMAX_CLKS it emits `dmax`, which forces the transistor off if the
// current comparator has not done so by then; this maximum-duty limit is the
// D_max source of the reference simulation model, its 90 % value is this
// design's choice. While `en` is low the counter is held at 0 and no pulses
// are produced. Outputs are registered; the first `cl` appears one cycle
// after `en` is seen high.
module cl_oscillator
  import dcm_pkg::*;
#(
  parameter int unsigned PERIOD = PERIOD_CLKS,
  parameter int unsigned DMAX   = DMAX_CLKS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic cl,
  output logic dmax,
  output logic [$clog2(PERIOD)-1:0] phase
);
  localparam int unsigned PW = $clog2(PERIOD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      cl    <= 1'b0;
      dmax  <= 1'b0;
    end else if (!en) begin
      phase <= '0;
      cl    <= 1'b0;
      dmax  <= 1'b0;
    end else begin
      cl    <= (phase == '0);
      dmax  <= (phase == PW'(DMAX));
      phase <= (phase == PW'(PERIOD - 1)) ? '0 : phase + 1'b1;
    end
  end

  initial begin
    assert (PERIOD >= 8)     else $error("PERIOD too small");
    assert (DMAX < PERIOD)   else $error("DMAX must lie inside the period");
  end
endmodule
