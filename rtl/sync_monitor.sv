// sync_monitor: I/Q phase generator and 10 MHz synchronisation check.
//
// The 40 MS/s samples of a 50 MHz IF form the repeating sequence I, Q, -I,
// -Q; a 10 MHz reference marks where that sequence starts. This block
// samples the 10 MHz square wave with the 40 MHz clock, runs a free 2-bit
// phase counter (0 = I, 1 = Q, 2 = -I, 3 = -Q) and realigns it on each
// rising sync edge. A rising edge that arrives when the counter does not
// expect one, or no edge within 8 clocks, pulses `sync_err` for one cycle.
//
// Timing: `sync` is registered twice; `phase` refers to the ADC sample
// presented in the same cycle, with the sync edge offset absorbed by the
// `align` input (the phase assigned to the sample in the cycle after the
// edge is seen). The check is this design's own; the original system description only says
// that missing or erratic synchronisation pulses are detected.
module sync_monitor (
  input  logic       clk,
  input  logic       rst,
  input  logic       sync,
  input  logic [1:0] align,
  output logic [1:0] phase,
  output logic       locked,
  output logic       sync_err
);
  logic [2:0] s_q;         // s_q[0], s_q[1]: synchroniser; s_q[2]: edge detect
  logic [1:0] ph_q;
  logic [3:0] since_q;     // clocks since the last rising edge
  logic       edge_w;

  assign edge_w = s_q[1] & ~s_q[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      s_q      <= '0;
      ph_q     <= '0;
      since_q  <= '0;
      locked   <= 1'b0;
      sync_err <= 1'b0;
    end else begin
      s_q      <= {s_q[1:0], sync};
      sync_err <= 1'b0;
      if (edge_w) begin
        ph_q    <= align;
        since_q <= '0;
        locked  <= 1'b1;
        if (locked && ph_q != align - 2'd1) sync_err <= 1'b1;
      end else begin
        ph_q <= ph_q + 2'd1;
        if (since_q != 4'd15) since_q <= since_q + 4'd1;
        if (since_q == 4'd7) begin
          sync_err <= locked;
          locked   <= 1'b0;
        end
      end
    end
  end

  assign phase = ph_q;
endmodule
