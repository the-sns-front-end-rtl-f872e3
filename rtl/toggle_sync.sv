// toggle_sync: carries single-cycle events from a source clock domain to a
// destination clock domain.
//
// Each source pulse flips a toggle register; the toggle passes two
// destination flip-flops, and every change seen on the far side becomes one
// destination pulse. Events must be at least three destination clocks apart.
// Used between the 40 MHz signal-processing domain and the 25 MHz host-bus
// domain for the interrupt, handshake and coefficient-reload events.
// Latency: two to three destination clocks.
module toggle_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic tog_q;
  logic [2:0] sync_q;

  always_ff @(posedge src_clk) begin
    if (src_rst)        tog_q <= 1'b0;
    else if (src_pulse) tog_q <= ~tog_q;
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) sync_q <= '0;
    else         sync_q <= {sync_q[1:0], tog_q};
  end

  assign dst_pulse = sync_q[2] ^ sync_q[1];
endmodule
