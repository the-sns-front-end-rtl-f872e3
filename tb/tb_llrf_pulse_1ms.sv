// tb_llrf_pulse_1ms: the controller through whole 1 ms macro pulses at its
// default sizes, the operating point of the accelerator it was built for.
//
// Pulse 1 is closed loop (proportional + integral gain) with a chopped beam:
// 650 ns of beam in every 950 ns (26 of 38 clocks; the chopping period is an
// assumed ring revolution time) from 100 us to the end of the pulse. The
// cavity field is sampled every 50 clocks from 50 us to 1 ms, leaving out
// the 50 us settling time after the beam comes on, and must stay within 1 %
// in amplitude and 1 degree in phase of the set point. The trace
// buffers run with TR_DECIM = 78, so their 512 words cover the whole pulse
// (one word every 79 samples); channels 0 and 1 are compared word for word
// with the ADC samples at those clocks.
//
// Pulse 2 is open loop from the feed-forward table with FF_DWELL = 78: every
// I entry of pairs 0..254 is +1 and the last pair is 0, so the I drive is a
// ramp of 1/16 LSB per sample pair that runs for 255 x 79 sample pairs
// (about 1 ms) and then holds at 255 x 79 / 16 = 1259 LSB. The DAC words
// are checked against that ramp along the pulse.
module tb_llrf_pulse_1ms;
  import llrf_pkg::*;
  logic clk = 0, h_clk = 0, rst = 1, h_rst = 1;
  always #12.5 clk = ~clk;           // 40 MHz
  always #20 h_clk = ~h_clk;         // 25 MHz

  logic               sync10 = 0, rf_gate = 0, beam_on = 0;
  logic signed [11:0] adc [4];
  logic               adc_pdn, dac_wr, irq;
  logic signed [11:0] dac_i, dac_q;
  logic [15:0]        h_addr = 0, h_wdata = 0, h_rdata;
  logic               h_wr = 0, h_rd = 0;
  logic [1:0]         phase = 0;
  int                 cnt = 0;
  real                v_i, v_q;
  int checks = 0, failures = 0;

  localparam int PULSE = 40000;      // 1 ms at 40 MHz
  localparam int DECIM = 78;

  llrf_top dut (.clk, .rst, .sync10, .rf_gate, .adc, .adc_pdn, .dac_i, .dac_q, .dac_wr,
                .irq, .h_clk, .h_rst, .h_addr, .h_wr, .h_rd, .h_wdata, .h_rdata);

  cavity_model #(.TAU(400.0), .GAIN(1.0), .BEAM(200.0), .OFFSET(20), .DELAY(4)) cav (
    .clk, .rf_gate, .beam_on, .adc_pdn, .phase, .dac_i, .dac_q, .adc, .v_i, .v_q);

  always @(posedge clk) cnt <= cnt + 1;
  always @(negedge clk) begin
    sync10 = (cnt % 4) < 2;
    phase  = 2'((cnt + 1) % 4);
  end

  // the ADC words the decimated trace must hold: every 79th from rec_from
  int   rec_from = -1;
  logic signed [11:0] hist0 [512], hist1 [512];
  always @(posedge clk) begin
    if (rec_from >= 0 && cnt >= rec_from && (cnt - rec_from) % (DECIM + 1) == 0 &&
        (cnt - rec_from) / (DECIM + 1) < 512) begin
      hist0[(cnt - rec_from) / (DECIM + 1)] <= adc[0];
      hist1[(cnt - rec_from) / (DECIM + 1)] <= adc[1];
    end
  end

  // chopped beam: on for 26 of every 38 clocks while `beam_gate` is set
  bit beam_gate = 0;
  int n_beam_on = 0;
  always @(negedge clk) begin
    beam_on = beam_gate && (cnt % 38) < 26;
    if (beam_on) n_beam_on++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask
  task automatic hwr(input logic [15:0] a, input logic [15:0] d);
    @(negedge h_clk); h_addr = a; h_wdata = d; h_wr = 1;
    @(negedge h_clk); h_wr = 0;
  endtask
  task automatic hrd(input logic [15:0] a, output logic [15:0] d);
    @(negedge h_clk); h_addr = a; h_rd = 1;
    @(negedge h_clk); h_rd = 0; d = h_rdata;
  endtask
  task automatic wait_clk(input int n);
    repeat (n) @(negedge clk);
  endtask
  task automatic ctrl_wr(input bit fb, input bit in, input bit ff);
    ctrl_t c = '0;
    c.run = 1; c.fb_en = fb; c.int_en = in; c.loop_sign = 1; c.offset_en = 1; c.ff_en = ff;
    hwr(A_CTRL, c);
  endtask
  task automatic ack();
    hwr(A_HANDSHAKE, 0);
    repeat (4) @(negedge h_clk);
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    int g, ok, n_samp, exp_i, last_i;
    real m, p, worst_m, worst_p;
    wait_clk(4);
    rst = 0; h_rst = 0;
    wait_clk(40);
    hrd(A_ERRORS, d);                  // start-up events

    hwr(A_ISET, 16'd1000);
    hwr(A_QSET, 16'd0);
    hwr(A_TAIL, 16'd600);              // the last trace words land after the gate
    hwr(A_TR_DECIM, 16'(DECIM));
    hwr(A_TR_DELAY, 16'd0);
    hwr(A_FF_DWELL, 16'(DECIM));
    hwr(A_WAKE, 16'd0);
    for (int a = 0; a < 512; a++) hwr(16'(A_FF + a), 16'd0);
    hwr(A_KPA, 16'd256); hwr(A_KPB, 16'd0); hwr(A_KI, 16'd64);
    ctrl_wr(1, 1, 0);
    wait_clk(2000);

    // ---------------- pulse 1: 1 ms closed loop, chopped beam ----------------
    @(negedge clk); rf_gate = 1; g = cnt;
    rec_from = g + 3;
    worst_m = 0.0; worst_p = 0.0; n_samp = 0;
    for (int t = 1; t <= PULSE; t++) begin
      @(negedge clk);
      if (t == 4000) beam_gate = 1;
      // regulation is judged outside the 50 us after the beam is switched on
      if (t >= 2000 && !(t >= 4000 && t < 6000) && t % 50 == 0) begin
        m = (v_i * v_i + v_q * v_q) ** 0.5 / 1000.0 - 1.0;
        p = $atan2(v_q, v_i) * 180.0 / 3.14159265358979;
        if (m < 0.0) m = -m;
        if (p < 0.0) p = -p;
        if (m > worst_m) worst_m = m;
        if (p > worst_p) worst_p = p;
        n_samp++;
      end
    end
    rf_gate = 0; beam_gate = 0;
    $display("1 ms pulse: %0d field samples, worst amplitude error %0.3f %%, worst phase error %0.3f deg",
             n_samp, worst_m * 100.0, worst_p);
    chk(n_samp == 721, "field sampled along the whole pulse");
    chk(n_beam_on > 20000, $sformatf("beam on for %0d clocks", n_beam_on));
    chk(worst_m < 0.01, "amplitude within 1 % over the pulse");
    chk(worst_p < 1.0, "phase within 1 degree over the pulse");
    wait (irq == 1);
    chk(cnt - g > PULSE + 600 && cnt - g < PULSE + 620, $sformatf("interrupt %0d clocks after the trigger", cnt - g));
    // whole-pulse trace: word i = ADC word at clock g + 3 + 79 i
    ok = 1;
    for (int i = 0; i < 512; i++) begin
      hrd(16'(A_TRACE0 + i), d);
      if (d != 16'(hist0[i])) begin
        ok = 0;
        if (failures < 20) $display("trace0 word %0d = %0d expected %0d", i, signed'(d), hist0[i]);
      end
      hrd(16'(A_TRACE0 + 512 + i), d);
      if (d != 16'(hist1[i])) ok = 0;
    end
    chk(ok == 1, "decimated traces hold every 79th ADC sample of the pulse");
    chk(3 + 511 * (DECIM + 1) >= PULSE, "trace spans the 1 ms pulse");
    hrd(A_ERRORS, d);
    chk(d == 16'h0000, $sformatf("no errors after the 1 ms pulse, got %h", d));
    ack();

    // ---------------- pulse 2: 1 ms feed-forward ramp, open loop ----------------
    for (int a = 0; a < 255; a++) hwr(16'(A_FF + 2 * a), 16'd1);
    ctrl_wr(0, 0, 1);
    wait_clk(200);
    @(negedge clk); rf_gate = 1; g = cnt;
    ok = 1;
    for (int t = 1; t <= PULSE + 800; t++) begin
      @(negedge clk);
      if (t == PULSE + 700) rf_gate = 0;
      if (t == PULSE + 600) last_i = dac_i;
      if (t % 1000 == 0 && t <= PULSE + 600) begin
        // I plays once per sample pair from the 4th clock after the gate
        // rises; pair k of the table is used for 79 of them
        exp_i = (t - 4) / 2;
        if (exp_i > 255 * (DECIM + 1)) exp_i = 255 * (DECIM + 1);
        exp_i = exp_i / 16;
        if (dac_i < exp_i - 2 || dac_i > exp_i + 2 || dac_q != 0) begin
          ok = 0;
          if (failures < 20) $display("t=%0d dac_i %0d expected about %0d, dac_q %0d", t, dac_i, exp_i, dac_q);
        end
      end
    end
    $display("feed-forward ramp ends at dac_i = %0d", last_i);
    chk(ok == 1, "feed-forward ramp follows the table over 1 ms");
    chk(last_i > 1250 && last_i < 1265, "ramp holds at 255 x 79 / 16 after the table ends");
    wait (irq == 1);
    hrd(A_PULSES, d);
    chk(d == 16'd2, "two pulses counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
