// reset_sync: asynchronous-assert, synchronous-deassert reset for one clock
// domain. The VCO pulse trains are used as clocks, so each VCO domain gets its
// own copy of the system reset released on its own edge after STAGES edges.
// Interface: clk, arst_n (async, active low) in; rst_n (active low) out.
// Lint notes that the last stage is flopped here and used as an asynchronous
// reset downstream; that is the purpose of this module.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic [STAGES-1:0] sh;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sh <= '0;
    else         sh <= {sh[STAGES-2:0], 1'b1};
  end

  assign rst_n = sh[STAGES-1];
endmodule
