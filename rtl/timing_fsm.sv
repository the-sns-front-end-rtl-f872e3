// timing_fsm: pulse sequencer of the LLRF controller, triggered by the
// external RF gate.
//
// States: IDLE (waiting; the ADC offset may be tracked), PULSE (RF gate
// high: feedback, integrator and feed-forward run) and TAIL (`tail_len`
// clocks after the gate drops, so recorders still see the cavity decay).
// At the end of TAIL the end-of-pulse interrupt `irq` rises; the host
// software exchanges its data and then acknowledges with `hs_ack`, which
// drops `irq`. A trigger that arrives while `irq` is still high means the
// software missed the gap between pulses: `handshake_err` pulses. A gate
// that stays high longer than MAX_PULSE clocks pulses `gate_err` and ends
// the pulse.
//
// ADC power saving: with `wake` != 0 the ADCs are put to sleep (`adc_pdn`)
// when the interrupt is raised and woken `wake` x 64 clocks after the last
// trigger (the converters need about 40 us to wake up, so `wake` is set that
// much before the next expected trigger). `wake` = 0 keeps them on.
//
// Trigger check: `trig_err` pulses when no trigger has come for
// `trig_max` x 64 clocks since the last one (0 disables this; it counts only
// once a first trigger has been seen), and when the gate rises while the
// previous pulse is still in its tail (that trigger is ignored).
//
// Timing: `rf_gate` passes a two-flop synchroniser, so `pulse_start` comes
// 3 clocks after the gate rises; the states are registered and all outputs
// are decoded from them. The use of the RF gate as trigger, the interrupt at
// the end of the pulse and the handshake check follow the original system; the
// states, the tail, the limits and the sleep timing are this design's own.
module timing_fsm #(
  parameter int MAX_PULSE = 65535
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        rf_gate,
  input  logic [15:0] tail_len,
  input  logic [15:0] wake,
  input  logic [15:0] trig_max,
  input  logic        hs_ack,
  output logic        pulse_start,
  output logic        in_pulse,
  output logic        quiet,
  output logic        irq,
  output logic        adc_pdn,
  output logic        handshake_err,
  output logic        gate_err,
  output logic        trig_err,
  output logic [15:0] pulse_count
);
  typedef enum logic [1:0] {S_IDLE, S_PULSE, S_TAIL} state_t;
  state_t      st_q;
  logic [2:0]  g_q;
  logic [16:0] len_q;
  logic [15:0] tail_q;
  logic [22:0] since_q;      // clocks since the last trigger, saturating
  logic        sleep_q;
  logic        trig;

  assign trig = run && g_q[1] && !g_q[2] && st_q == S_IDLE;

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q          <= S_IDLE;
      g_q           <= '0;
      len_q         <= '0;
      tail_q        <= '0;
      since_q       <= '1;
      sleep_q       <= 1'b0;
      irq           <= 1'b0;
      pulse_start   <= 1'b0;
      handshake_err <= 1'b0;
      gate_err      <= 1'b0;
      trig_err      <= 1'b0;
      pulse_count   <= '0;
    end else begin
      g_q           <= {g_q[1:0], rf_gate};
      pulse_start   <= 1'b0;
      handshake_err <= 1'b0;
      gate_err      <= 1'b0;
      trig_err      <= run && ((trig_max != 16'd0 && since_q == {1'b0, trig_max, 6'd0}) ||
                               (g_q[1] && !g_q[2] && st_q == S_TAIL));
      if (since_q != '1) since_q <= since_q + 23'd1;
      if (hs_ack) irq <= 1'b0;
      if (sleep_q && since_q >= {1'b0, wake, 6'd0}) sleep_q <= 1'b0;

      unique case (st_q)
        S_IDLE: if (trig) begin
          st_q        <= S_PULSE;
          pulse_start <= 1'b1;
          len_q       <= '0;
          since_q     <= '0;
          sleep_q     <= 1'b0;
          pulse_count <= pulse_count + 16'd1;
          if (irq && !hs_ack) handshake_err <= 1'b1;
        end
        S_PULSE: begin
          len_q <= len_q + 17'd1;
          if (!g_q[1] || len_q == 17'(MAX_PULSE)) begin
            st_q   <= S_TAIL;
            tail_q <= tail_len;
            if (g_q[1]) gate_err <= 1'b1;
          end
        end
        S_TAIL: begin
          if (tail_q == 16'd0) begin
            st_q    <= S_IDLE;
            irq     <= 1'b1;
            if (wake != 16'd0) sleep_q <= 1'b1;
          end else begin
            tail_q <= tail_q - 16'd1;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign in_pulse = (st_q == S_PULSE);
  assign quiet    = (st_q == S_IDLE) && !sleep_q;
  assign adc_pdn  = sleep_q;
endmodule
