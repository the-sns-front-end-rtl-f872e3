// llrf_top: FPGA of the LLRF digital board that regulates the field of one
// RF cavity, pulse by pulse.
//
// Four 12-bit ADCs sample the 50 MHz IF of the cavity probe (channel 0),
// forward and reflected power (channels 1, 2) and a spare input (channel 3)
// at 40 MS/s. Channel 0 runs through the feedback data path
// (llrf_datapath), whose output, split into I and Q by dac_interface, drives
// the two DAC channels of the vector modulator at 20 MS/s each. The 10 MHz
// reference gives the I/Q/-I/-Q phase (sync_monitor). The RF gate triggers
// the pulse sequencer (timing_fsm), which clears the integrator, plays the
// feed-forward table, starts the four trace recorders and, after the pulse,
// interrupts the host. The host computer reaches everything through a
// 64K x 16 register window clocked by its own 25 MHz bus clock
// (host_interface); single-bit events cross between the two clocks with
// toggle synchronisers, and the configuration registers, written only
// between pulses, are used directly. clock_monitor watches the 40 MHz clock.
//
// Ports: `clk` 40 MHz sample clock with `rst`; `h_clk` host bus clock with
// `h_rst`; `sync10` 10 MHz reference, `rf_gate` external RF gate (both
// asynchronous); `adc` four signed samples per clock; `dac_i`, `dac_q`,
// `dac_wr` to the dual DAC; `adc_pdn` puts the ADCs to sleep; `irq`
// end-of-pulse interrupt to the host; `h_*` host bus (see host_interface).
//
// Proportional latency, ADC word to DAC register: 5 or 6 clocks (data path
// 4, I/Q pairing 1-2). SYNC_ALIGN is the phase of the sample presented in
// the clock after the sync edge is detected; it depends on board cabling.
// Which ADC feeds the loop, the spare channel's use and the gating of the
// controls by the pulse state are this design's choices.
module llrf_top
  import llrf_pkg::*;
#(
  parameter int TRACE_DEPTH = 512,
  parameter int FF_DEPTH    = 512,
  parameter int N_ADC       = 4,
  parameter logic [1:0] SYNC_ALIGN = 2'd0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     sync10,
  input  logic                     rf_gate,
  input  logic signed [ADC_W-1:0]  adc [N_ADC],
  output logic                     adc_pdn,
  output logic signed [DAC_W-1:0]  dac_i,
  output logic signed [DAC_W-1:0]  dac_q,
  output logic                     dac_wr,
  output logic                     irq,
  input  logic                     h_clk,
  input  logic                     h_rst,
  input  logic [HA-1:0]            h_addr,
  input  logic                     h_wr,
  input  logic                     h_rd,
  input  logic [HW-1:0]            h_wdata,
  output logic [HW-1:0]            h_rdata
);
  initial begin
    if (N_ADC != 4) $error("llrf_top: the host map has room for exactly 4 trace buffers");
    if (TRACE_DEPTH != 512 || FF_DEPTH != 512) $error("llrf_top: the host map assumes 512-word buffers");
  end

  // ---------------- host side ----------------
  ctrl_t                    ctrl;
  logic signed [ADC_W-1:0]  iset, qset;
  logic signed [COEF_W-1:0] kpa, kpb, ki;
  logic                     wr_kpa, wr_kpb, wr_ki, hs_done;
  logic [15:0]              ff_dwell, tr_decim, tr_delay, tail_len, wake, trig_max, pulse_count;
  logic [8:0]               mem_addr;
  logic [15:0]              tr_rdata [4];
  logic                     ff_we;
  logic [7:0]               ff_wdata, ff_rdata;
  logic                     ev_hs, ev_gate, ev_sync, ev_clk, ev_sat, ev_trig;
  logic [1:0]               irq_s, busy_s, lock_s, pdn_s;

  // ---------------- 40 MHz side ----------------
  logic [1:0]               phase;
  logic                     locked, sync_err;
  logic                     pulse_start, in_pulse, quiet;
  logic                     handshake_err, gate_err, trig_err, hs_ack;
  logic                     load_kpa, load_kpb, load_ki, kcm_busy;
  logic                     ff_parity, sat_flag, sat_seen_q;
  logic signed [FF_W-1:0]   ff;
  logic signed [ADC_W-1:0]  samp0;
  logic signed [ADC_W-1:0]  latch_q [N_ADC];
  logic signed [DAC_W-1:0]  dout;
  logic                     dout_parity;

  host_interface u_host (
    .clk(h_clk), .rst(h_rst), .h_addr, .h_wr, .h_rd, .h_wdata, .h_rdata,
    .ctrl, .iset, .qset, .kpa, .kpb, .ki, .wr_kpa, .wr_kpb, .wr_ki,
    .ff_dwell, .tr_decim, .tr_delay, .tail_len, .wake, .trig_max, .hs_done,
    .irq(irq_s[1]), .kcm_busy(busy_s[1]), .locked(lock_s[1]), .adc_pdn(pdn_s[1]),
    .pulse_count, .ev_handshake(ev_hs), .ev_gate, .ev_sync, .ev_clk, .ev_sat, .ev_trig,
    .mem_addr, .tr_rdata, .ff_we, .ff_wdata, .ff_rdata);

  // status levels into the host clock domain
  always_ff @(posedge h_clk) begin
    if (h_rst) begin
      irq_s <= '0; busy_s <= '0; lock_s <= '0; pdn_s <= '0;
    end else begin
      irq_s  <= {irq_s[0], irq};
      busy_s <= {busy_s[0], kcm_busy};
      lock_s <= {lock_s[0], locked};
      pdn_s  <= {pdn_s[0], adc_pdn};
    end
  end

  // events between the clock domains
  toggle_sync u_ts_kpa (.src_clk(h_clk), .src_rst(h_rst), .src_pulse(wr_kpa),
                        .dst_clk(clk), .dst_rst(rst), .dst_pulse(load_kpa));
  toggle_sync u_ts_kpb (.src_clk(h_clk), .src_rst(h_rst), .src_pulse(wr_kpb),
                        .dst_clk(clk), .dst_rst(rst), .dst_pulse(load_kpb));
  toggle_sync u_ts_ki  (.src_clk(h_clk), .src_rst(h_rst), .src_pulse(wr_ki),
                        .dst_clk(clk), .dst_rst(rst), .dst_pulse(load_ki));
  toggle_sync u_ts_hs  (.src_clk(h_clk), .src_rst(h_rst), .src_pulse(hs_done),
                        .dst_clk(clk), .dst_rst(rst), .dst_pulse(hs_ack));
  toggle_sync u_ts_he  (.src_clk(clk), .src_rst(rst), .src_pulse(handshake_err),
                        .dst_clk(h_clk), .dst_rst(h_rst), .dst_pulse(ev_hs));
  toggle_sync u_ts_ge  (.src_clk(clk), .src_rst(rst), .src_pulse(gate_err),
                        .dst_clk(h_clk), .dst_rst(h_rst), .dst_pulse(ev_gate));
  toggle_sync u_ts_te  (.src_clk(clk), .src_rst(rst), .src_pulse(trig_err),
                        .dst_clk(h_clk), .dst_rst(h_rst), .dst_pulse(ev_trig));
  toggle_sync u_ts_se  (.src_clk(clk), .src_rst(rst), .src_pulse(sync_err),
                        .dst_clk(h_clk), .dst_rst(h_rst), .dst_pulse(ev_sync));
  toggle_sync u_ts_sat (.src_clk(clk), .src_rst(rst), .src_pulse(sat_flag && !sat_seen_q),
                        .dst_clk(h_clk), .dst_rst(h_rst), .dst_pulse(ev_sat));

  clock_monitor u_clkmon (.mon_clk(clk), .mon_rst(rst), .host_clk(h_clk),
                          .host_rst(h_rst), .clk_err(ev_clk));

  // integrator saturation is reported once per pulse
  always_ff @(posedge clk) begin
    if (rst || pulse_start) sat_seen_q <= 1'b0;
    else if (sat_flag)      sat_seen_q <= 1'b1;
  end

  sync_monitor u_sync (.clk, .rst, .sync(sync10), .align(SYNC_ALIGN),
                       .phase, .locked, .sync_err);

  timing_fsm u_fsm (.clk, .rst, .run(ctrl.run), .rf_gate, .tail_len, .wake, .trig_max,
                    .hs_ack, .pulse_start, .in_pulse, .quiet, .irq,
                    .adc_pdn, .handshake_err, .gate_err, .trig_err, .pulse_count);

  llrf_datapath u_dp (
    .clk, .rst, .adc(adc[0]), .ph_in(phase),
    .fb_en(ctrl.fb_en && in_pulse), .int_en(ctrl.int_en && in_pulse),
    .loop_sign(ctrl.loop_sign), .offset_en(ctrl.offset_en && quiet),
    .int_clear(!in_pulse), .iset, .qset,
    .load_kpa, .load_kpb, .load_ki, .kpa, .kpb, .ki, .kcm_busy,
    .ff_parity, .ff, .samp(samp0), .dout, .dout_parity, .sat_flag);

  ff_buffer #(.DEPTH(FF_DEPTH), .WIDTH(FF_W)) u_ff (
    .clk, .rst, .start(pulse_start), .run(ctrl.ff_en && in_pulse),
    .parity(ff_parity), .dwell(ff_dwell), .ff,
    .h_clk, .h_we(ff_we), .h_addr(mem_addr), .h_wdata(ff_wdata), .h_rdata(ff_rdata));

  dac_interface #(.DAC_W(DAC_W)) u_dac (
    .clk, .rst, .din(dout), .parity(dout_parity), .dac_i, .dac_q, .dac_wr);

  // input latches of the recording-only channels; channel 0 uses the
  // data path's own latch
  always_ff @(posedge clk) begin
    if (rst) for (int k = 0; k < N_ADC; k++) latch_q[k] <= '0;
    else     for (int k = 0; k < N_ADC; k++) latch_q[k] <= adc[k];
  end

  for (genvar k = 0; k < N_ADC; k++) begin : g_trace
    logic done_unused;
    trace_buffer #(.DEPTH(TRACE_DEPTH), .WIDTH(16), .IN_W(ADC_W)) u_tr (
      .clk, .rst, .start(pulse_start), .delay(tr_delay), .decim(tr_decim),
      .sample(k == 0 ? samp0 : latch_q[k]), .done(done_unused),
      .rd_clk(h_clk), .rd_addr(mem_addr), .rd_data(tr_rdata[k]));
  end

endmodule
