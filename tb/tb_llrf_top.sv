// tb_llrf_top: end-to-end test of the LLRF controller at its default sizes,
// closing the loop through a behavioural cavity (cavity_model).
//
// The host configures the controller over its bus and then runs pulses:
//   1. closed loop (proportional + integral) with an ADC offset, which must
//      not show as a 10 MHz ripple on the drive, and beam
//      loading in the middle of the pulse: the cavity field must settle
//      within 1 % in amplitude and 1 degree in phase of the set point, and
//      return there after the beam transient; the trace buffers must hold
//      exactly the samples the ADCs delivered;
//   2. open loop from the feed-forward table (pulse-generator use): the DAC
//      must follow the integral of the table;
//   3. a pulse without handshake (missed-handshake error), a sync glitch, a
//      saturating feed-forward table, an over-long RF gate, a stopped 40 MHz
//      clock, ADC sleep/wake between pulses, a gate glitch in the tail and a
//      missing trigger.
// Each mechanism is counted and a mechanism that never happened is a
// failure. Ends with TB_RESULT.
module tb_llrf_top;
  import llrf_pkg::*;
  logic clk = 0, h_clk = 0, rst = 1, h_rst = 1;
  bit   clk_stop = 0;
  always #12.5 if (!clk_stop) clk = ~clk; else clk = 1'b0;   // 40 MHz
  always #20 h_clk = ~h_clk;                                  // 25 MHz

  logic               sync10 = 0, rf_gate = 0, beam_on = 0;
  logic signed [11:0] adc [4];
  logic               adc_pdn, dac_wr, irq;
  logic signed [11:0] dac_i, dac_q;
  logic [15:0]        h_addr = 0, h_wdata = 0, h_rdata;
  logic               h_wr = 0, h_rd = 0;
  logic [1:0]         phase = 0;
  int                 cnt = 0;
  bit                 sync_glitch = 0;
  real                v_i, v_q;
  int checks = 0, failures = 0;

  llrf_top dut (.clk, .rst, .sync10, .rf_gate, .adc, .adc_pdn, .dac_i, .dac_q, .dac_wr,
                .irq, .h_clk, .h_rst, .h_addr, .h_wr, .h_rd, .h_wdata, .h_rdata);

  cavity_model #(.TAU(400.0), .GAIN(1.0), .BEAM(200.0), .OFFSET(20), .DELAY(4)) cav (
    .clk, .rf_gate, .beam_on, .adc_pdn, .phase, .dac_i, .dac_q, .adc, .v_i, .v_q);

  // 10 MHz sync and the matching I/Q/-I/-Q phase of each ADC sample
  always @(posedge clk) cnt <= cnt + 1;
  always @(negedge clk) begin
    sync10 = sync_glitch ? 1'b0 : ((cnt % 4) < 2);
    phase  = 2'((cnt + 1) % 4);
  end

  // record the ADC words of channels 0 and 2 from a chosen clock on
  int   rec_from = -1;
  logic signed [11:0] hist0 [512], hist2 [512];
  always @(posedge clk) begin
    if (rec_from >= 0 && cnt >= rec_from && cnt < rec_from + 512) begin
      hist0[cnt - rec_from] <= adc[0];
      hist2[cnt - rec_from] <= adc[2];
    end
  end

  // mechanism counters
  int n_pulse = 0, n_irq = 0, n_dac_wr = 0, n_regulated = 0, n_beam_recovered = 0;
  int n_trace_ok = 0, n_ff_ramp = 0, n_hs_err = 0, n_sync_err = 0, n_sat_err = 0;
  int n_gate_err = 0, n_clk_err = 0, n_sleep = 0, n_wake = 0, n_trig_err = 0, n_offset = 0, n_reload = 0;
  logic irq_q = 0, pdn_q = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (dac_wr) n_dac_wr++;
      if (irq && !irq_q) n_irq++;
      if (adc_pdn && !pdn_q) n_sleep++;
      if (!adc_pdn && pdn_q) n_wake++;
    end
    irq_q <= irq;
    pdn_q <= adc_pdn;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- host bus ----------------
  task automatic hwr(input logic [15:0] a, input logic [15:0] d);
    @(negedge h_clk); h_addr = a; h_wdata = d; h_wr = 1;
    @(negedge h_clk); h_wr = 0;
  endtask
  task automatic hrd(input logic [15:0] a, output logic [15:0] d);
    @(negedge h_clk); h_addr = a; h_rd = 1;
    @(negedge h_clk); h_rd = 0; d = h_rdata;
  endtask
  task automatic ctrl_wr(input bit fb, input bit in, input bit ff);
    ctrl_t c = '0;
    c.run = 1; c.fb_en = fb; c.int_en = in; c.loop_sign = 1; c.offset_en = 1; c.ff_en = ff;
    hwr(A_CTRL, c);
  endtask
  task automatic set_gains(input int a, input int b, input int i);
    logic [15:0] s;
    hwr(A_KPA, 16'(a)); hwr(A_KPB, 16'(b)); hwr(A_KI, 16'(i));
    hrd(A_STATUS, s);
    if (s[1]) n_reload++;      // reload still running right after the write
    repeat (20) @(negedge h_clk);
    hrd(A_STATUS, s);
    chk(!s[1], "multiplier reload finished");
  endtask
  task automatic wait_clk(input int n);
    repeat (n) @(negedge clk);
  endtask
  task automatic read_errors(output err_t e);
    logic [15:0] d;
    hrd(A_ERRORS, d);
    e = err_t'(d);
    if (e.handshake_err) n_hs_err++;
    if (e.sync_err)      n_sync_err++;
    if (e.sat_err)       n_sat_err++;
    if (e.gate_err)      n_gate_err++;
    if (e.clk_err)       n_clk_err++;
    if (e.trig_err)      n_trig_err++;
  endtask
  task automatic ack();
    logic [15:0] s;
    hwr(A_HANDSHAKE, 0);
    repeat (4) @(negedge h_clk);
    hrd(A_STATUS, s);
    chk(!s[0] && !irq, "interrupt cleared by the handshake");
  endtask

  function automatic real mag(input real i, input real q);
    return $sqrt(i * i + q * q);
  endfunction
  function automatic real deg(input real i, input real q);
    return $atan2(q, i) * 180.0 / 3.14159265358979;
  endfunction

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    err_t e;
    int g, ok;
    real m, p;
    int ripple;
    logic signed [11:0] prev_di;
    wait_clk(4);
    rst = 0; h_rst = 0;
    wait_clk(40);
    read_errors(e);      // start-up events
    hrd(A_STATUS, d);
    chk(d[2], "sync locked");

    // ---------------- configuration ----------------
    hwr(A_ISET, 16'd1000);
    hwr(A_QSET, 16'd0);
    hwr(A_TAIL, 16'd200);
    hwr(A_TR_DECIM, 16'd0);
    hwr(A_TR_DELAY, 16'd0);
    hwr(A_FF_DWELL, 16'd0);
    hwr(A_WAKE, 16'd0);
    for (int a = 0; a < 512; a++) hwr(16'(A_FF + a), 16'd0);
    set_gains(256, 0, 64);              // Kp = 1, Ki small
    ctrl_wr(1, 1, 0);
    wait_clk(2000);                     // offset tracking before the pulse

    // ---------------- pulse 1: closed loop with beam loading --------------
    @(negedge clk); rf_gate = 1; g = cnt;
    rec_from = g + 3;
    wait_clk(5800);
    m = mag(v_i, v_q); p = deg(v_i, v_q);
    $display("before beam: |V| = %0.1f, phase = %0.2f deg", m, p);
    if (m > 990.0 && m < 1010.0 && p > -1.0 && p < 1.0) n_regulated++;
    chk(n_regulated == 1, "field regulated to 1 % and 1 degree");
    // An uncorrected ADC offset does not move the field: the sign flip
    // turns it into a +-offset*Kp square wave at 10 MHz on the drive. With
    // the offset subtracted, successive DAC words differ by a few LSB only.
    ripple = 0;
    prev_di = dac_i;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      while (!dac_wr) @(negedge clk);
      if (dac_i - prev_di > ripple) ripple = dac_i - prev_di;
      if (prev_di - dac_i > ripple) ripple = prev_di - dac_i;
      prev_di = dac_i;
    end
    $display("drive ripple between DAC updates: %0d LSB", ripple);
    chk(ripple <= 4, $sformatf("drive ripple %0d LSB: ADC offset not removed", ripple));
    if (ripple <= 4) n_offset++;
    beam_on = 1;
    wait_clk(40);
    $display("beam onset: |V| = %0.1f", mag(v_i, v_q));
    wait_clk(3000);
    m = mag(v_i, v_q); p = deg(v_i, v_q);
    $display("with beam: |V| = %0.1f, phase = %0.2f deg", m, p);
    if (m > 990.0 && m < 1010.0 && p > -1.0 && p < 1.0) n_beam_recovered++;
    chk(n_beam_recovered == 1, "field recovered under beam loading");
    beam_on = 0;
    wait_clk(1000);
    @(negedge clk); rf_gate = 0;
    wait (irq == 1);
    n_pulse++;
    // trace buffers: word i = ADC word at clock g + 3 + i
    ok = 1;
    for (int i = 0; i < 512; i++) begin
      hrd(16'(A_TRACE0 + i), d);
      if (d != 16'(hist0[i])) begin
        ok = 0;
        if (failures < 20) $display("trace0 word %0d = %0d expected %0d", i, signed'(d), hist0[i]);
      end
      hrd(16'(A_TRACE0 + 2 * 512 + i), d);
      if (d != 16'(hist2[i])) ok = 0;
    end
    chk(ok == 1, "trace buffers hold the ADC samples");
    if (ok) n_trace_ok++;
    hrd(A_PULSES, d);
    chk(d == 1, "pulse counter");
    read_errors(e);
    chk(e == '0, $sformatf("no errors after a clean pulse, got %h", e));
    ack();

    // ---------------- pulse 2: open loop, feed-forward only --------------
    // I increment +16 for pairs 0..99, then 0; Q increment -8 for pairs 0..49
    for (int a = 0; a < 256; a++) begin
      hwr(16'(A_FF + 2 * a),     16'(a < 100 ? 16 : 0));
      hwr(16'(A_FF + 2 * a + 1), 16'(a < 50 ? -8 : 0));
    end
    hwr(A_FF_DWELL, 16'd3);             // each pair for 4 sample pairs
    ctrl_wr(0, 0, 1);
    @(negedge clk); rf_gate = 1;
    wait_clk(3000);
    // I integrates 100 pairs x 4 x 16 = 6400 -> 400 DAC LSB; Q: 50x4x-8 = -1600 -> -100
    $display("feed-forward: dac_i = %0d, dac_q = %0d", dac_i, dac_q);
    chk(dac_i == 400 && dac_q == -100, "feed-forward waveform reaches 400 / -100");
    if (dac_i == 400 && dac_q == -100) n_ff_ramp++;
    @(negedge clk); rf_gate = 0;
    wait (irq == 1);
    n_pulse++;
    // ---------------- pulse 3: no handshake before it ----------------
    wait_clk(500);
    @(negedge clk); rf_gate = 1;
    wait_clk(500);
    @(negedge clk); rf_gate = 0;
    wait_clk(300);                      // irq is still high from pulse 2
    n_pulse++;
    read_errors(e);
    chk(e.handshake_err, "missed handshake flagged");
    read_errors(e);
    chk(e == '0, "errors cleared by the read");
    ack();

    // ---------------- sync glitch ----------------
    sync_glitch = 1;
    wait_clk(20);
    sync_glitch = 0;
    wait_clk(40);
    read_errors(e);
    chk(e.sync_err, "sync loss flagged");

    // ---------------- integrator saturation ----------------
    for (int a = 0; a < 512; a++) hwr(16'(A_FF + a), 16'd127);
    hwr(A_FF_DWELL, 16'd0);
    @(negedge clk); rf_gate = 1;
    wait_clk(1200);                     // 600 x 127 > 32767
    chk(dac_i == 2047 && dac_q == 2047, "output saturates at full scale");
    @(negedge clk); rf_gate = 0;
    wait (irq == 1);
    n_pulse++;
    read_errors(e);
    chk(e.sat_err, "integrator saturation flagged");
    ack();

    // ---------------- ADC sleep between pulses ----------------
    for (int a = 0; a < 512; a++) hwr(16'(A_FF + a), 16'd0);
    hwr(A_WAKE, 16'd100);               // wake 6400 clocks after the trigger
    @(negedge clk); rf_gate = 1; g = cnt;
    wait_clk(500);
    @(negedge clk); rf_gate = 0;
    wait_clk(50);                       // a gate glitch in the tail: erratic trigger
    @(negedge clk); rf_gate = 1;
    wait_clk(20);
    @(negedge clk); rf_gate = 0;
    wait (irq == 1);
    n_pulse++;
    wait_clk(2);
    chk(adc_pdn, "ADCs asleep after the pulse");
    wait (adc_pdn == 0);
    chk(cnt - g > 6390 && cnt - g < 6420, $sformatf("ADCs woke %0d clocks after the trigger", cnt - g));
    hwr(A_WAKE, 16'd0);
    read_errors(e);
    chk(e.trig_err, "gate edge in the tail flagged");
    ack();

    // ---------------- trigger watchdog ----------------
    hwr(A_TRIG_MAX, 16'd200);           // 12800 clocks after the last trigger
    wait_clk(12600 - (cnt - g));
    read_errors(e);
    chk(!e.trig_err, "trigger watchdog fired early");
    wait_clk(500);
    read_errors(e);
    chk(e.trig_err, "missing trigger flagged");
    hwr(A_TRIG_MAX, 16'd0);

    // ---------------- RF gate stuck high ----------------
    @(negedge clk); rf_gate = 1;
    wait_clk(65800);                    // 65536 clocks + 3 latency + 201 tail
    chk(irq, "over-long gate ends the pulse");
    @(negedge clk); rf_gate = 0;
    n_pulse++;
    read_errors(e);
    chk(e.gate_err, "over-long gate flagged");
    ack();

    // ---------------- 40 MHz clock stops ----------------
    wait_clk(10);
    clk_stop = 1;
    #2us;
    clk_stop = 0;
    wait_clk(50);
    read_errors(e);
    chk(e.clk_err, "stopped clock flagged");
    hrd(A_PULSES, d);
    chk(d == 16'(n_pulse), $sformatf("pulse counter %0d, expected %0d", d, n_pulse));

    // ---------------- every mechanism happened ----------------
    $display("mechanisms: pulses %0d irq %0d dac_wr %0d reload %0d offset %0d regulated %0d beam %0d trace %0d ff %0d",
             n_pulse, n_irq, n_dac_wr, n_reload, n_offset, n_regulated, n_beam_recovered, n_trace_ok, n_ff_ramp);
    $display("errors seen: handshake %0d sync %0d sat %0d gate %0d clk %0d trigger %0d, sleep %0d wake %0d",
             n_hs_err, n_sync_err, n_sat_err, n_gate_err, n_clk_err, n_trig_err, n_sleep, n_wake);
    // pulse 3 ends while the interrupt of pulse 2 is still up: 5 rising edges
    chk(n_pulse == 6 && n_irq == 5, "six pulses, five interrupt edges");
    chk(n_dac_wr > 0, "DAC updates");
    chk(n_reload > 0, "coefficient reload");
    chk(n_offset > 0, "offset correction");
    chk(n_regulated > 0 && n_beam_recovered > 0, "regulation");
    chk(n_trace_ok > 0 && n_ff_ramp > 0, "trace and feed-forward");
    chk(n_hs_err > 0 && n_sync_err > 0 && n_sat_err > 0 && n_gate_err > 0 && n_clk_err > 0 &&
        n_trig_err > 1,
        "all error detectors");
    chk(n_sleep > 0 && n_wake > 0, "ADC sleep and wake");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
