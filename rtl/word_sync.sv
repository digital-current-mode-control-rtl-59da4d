// word_sync: moves a data word with its valid strobe between clock domains.
// On src_load the word is frozen in a holding register and an event is sent
// through toggle_sync; when the event arrives the destination copies the
// (by then stable) holding register and pulses dst_valid for one cycle.
// Loads must be spaced by more than four destination cycles; in this design
// a word is moved once per switching period. dst_data resets to RST_VAL.
module word_sync #(
  parameter int unsigned    W       = 16,
  parameter logic [W-1:0]   RST_VAL = '0
) (
  input  logic         src_clk,
  input  logic         src_rst_n,
  input  logic         src_load,
  input  logic [W-1:0] src_data,
  input  logic         dst_clk,
  input  logic         dst_rst_n,
  output logic         dst_valid,
  output logic [W-1:0] dst_data
);
  logic [W-1:0] hold;
  logic         arrive;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)    hold <= RST_VAL;
    else if (src_load) hold <= src_data;
  end

  toggle_sync u_evt (
    .src_clk, .src_rst_n, .src_pulse(src_load),
    .dst_clk, .dst_rst_n, .dst_pulse(arrive)
  );

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      dst_data  <= RST_VAL;
      dst_valid <= 1'b0;
    end else begin
      dst_valid <= arrive;
      if (arrive) dst_data <= hold;
    end
  end
endmodule
