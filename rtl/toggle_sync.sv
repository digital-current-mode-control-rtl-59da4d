// toggle_sync: carries single-cycle event pulses from one clock domain to
// another. Each source pulse flips a toggle flop; the destination passes the
// toggle through a two-flop synchroniser and emits a one-cycle pulse on every
// change. Events must be at least three destination cycles apart, which holds
// here by a wide margin (events come once per 40 us switching period).
// Latency: 2 to 3 destination clock edges.
module toggle_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic       tgl;
  logic [2:0] sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tgl <= 1'b0;
    else if (src_pulse) tgl <= ~tgl;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) sync <= '0;
    else            sync <= {sync[1:0], tgl};
  end

  assign dst_pulse = sync[2] ^ sync[1];
endmodule
