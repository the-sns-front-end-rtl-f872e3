// tb_timing_fsm: drives RF gate pulses and checks the sequencer: trigger
// latency (3 clocks), pulse length equal to the gate length, tail length,
// interrupt and handshake, the missed-handshake error, the over-long gate
// error, the pulse counter, the quiet window, the ADC sleep/wake timing and
// the trigger watchdog (missing trigger, trigger during the tail).
module tb_timing_fsm;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;

  logic        run = 0, rf_gate = 0, hs_ack = 0;
  logic [15:0] tail_len = 0, wake = 0, trig_max = 0;
  logic        pulse_start, in_pulse, quiet, irq, adc_pdn, handshake_err, gate_err, trig_err;
  logic [15:0] pulse_count;
  int checks = 0, failures = 0;
  int n_hs = 0, n_gate = 0, n_trig = 0, t_trig = -1, clk_n = 0;

  timing_fsm #(.MAX_PULSE(300)) dut (.clk, .rst, .run, .rf_gate, .tail_len, .wake, .trig_max, .hs_ack,
    .pulse_start, .in_pulse, .quiet, .irq, .adc_pdn, .handshake_err, .gate_err, .trig_err, .pulse_count);

  always @(posedge clk) begin
    if (handshake_err) n_hs++;
    if (gate_err) n_gate++;
    if (trig_err) begin n_trig++; t_trig = clk_n; end
    clk_n++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one gate pulse of `len` clocks; returns the measured times
  task automatic gate(input int len, output int t_start, output int plen, output int t_irq);
    int t = 0;
    bit irq_prev;
    t_start = -1; plen = 0; t_irq = -1;
    @(negedge clk); rf_gate = 1;
    irq_prev = irq;
    for (t = 1; t < 2000; t++) begin
      @(negedge clk);
      if (t == len) rf_gate = 0;
      if (pulse_start) begin
        chk(t_start < 0, "second pulse_start");
        t_start = t;
      end
      if (in_pulse) plen++;
      if (irq && !irq_prev && t_irq < 0) t_irq = t;
      irq_prev = irq;
      if (t_irq >= 0 && t > t_irq + 2 && t > len) break;
    end
  endtask

  initial begin
    int ts, pl, ti, tp;
    repeat (3) @(negedge clk);
    rst = 0;
    // not running: a gate does nothing
    gate(20, ts, pl, ti);
    chk(ts < 0 && pl == 0 && ti < 0, "gate accepted while stopped");
    run = 1; tail_len = 10;
    gate(40, ts, pl, ti);
    chk(ts == 3, $sformatf("trigger latency %0d, expected 3", ts));
    chk(pl == 40, $sformatf("pulse length %0d, expected 40", pl));
    chk(ti == ts + 40 + 11, $sformatf("irq at %0d, expected %0d", ti, ts + 51));
    chk(pulse_count == 1, "pulse count 1");
    chk(quiet, "quiet after the pulse");
    // acknowledge
    @(negedge clk); hs_ack = 1; @(negedge clk); hs_ack = 0;
    chk(!irq, "irq cleared by handshake");
    chk(n_hs == 0, "no handshake error yet");
    // next pulse without acknowledge -> error on the one after
    gate(25, ts, pl, ti);
    chk(n_hs == 0, "handshake error too early");
    gate(25, ts, pl, ti);
    chk(n_hs == 1, $sformatf("missed handshake: %0d errors, expected 1", n_hs));
    chk(pulse_count == 3, "pulse count 3");
    @(negedge clk); hs_ack = 1; @(negedge clk); hs_ack = 0;
    // over-long gate
    gate(500, ts, pl, ti);
    $display("long gate: start %0d len %0d irq %0d count %0d", ts, pl, ti, pulse_count);
    chk(n_gate == 1, $sformatf("long gate: %0d errors", n_gate));
    chk(pl == 301, $sformatf("long gate cut after %0d clocks, expected 301", pl));
    @(negedge clk); hs_ack = 1; @(negedge clk); hs_ack = 0;
    repeat (600) @(negedge clk);
    // ADC sleep: wake 2 x 64 clocks after the trigger
    wake = 16'd2; tail_len = 5;
    @(negedge clk); rf_gate = 1;
    tp = -1;
    for (int t = 1; t < 400; t++) begin
      @(negedge clk);
      if (t == 20) rf_gate = 0;
      if (t == 3) chk(pulse_start, "pulse_start at 3");
      if (t == 20) chk(!adc_pdn, "ADCs awake during pulse");
      if (t == 3 + 20 + 6 + 1) chk(adc_pdn && irq && !quiet, "ADCs asleep after the pulse");
      if (tp < 0 && t > 30 && !adc_pdn) tp = t;
    end
    chk(tp == 3 + 129, $sformatf("ADCs woke at %0d, expected %0d", tp, 3 + 129));
    chk(quiet, "quiet after wake-up");
    chk(n_trig == 0, "no trigger error so far");
    @(negedge clk); hs_ack = 1; @(negedge clk); hs_ack = 0;
    wake = 0;
    // a second gate edge during the tail is reported and ignored
    tail_len = 50;
    begin
      logic [15:0] pc0;
      pc0 = pulse_count;
      @(negedge clk); rf_gate = 1;
      repeat (20) @(negedge clk); rf_gate = 0;
      repeat (10) @(negedge clk); rf_gate = 1;
      repeat (5) @(negedge clk); rf_gate = 0;
      repeat (100) @(negedge clk);
      chk(n_trig == 1, $sformatf("gate in the tail: %0d trigger errors, expected 1", n_trig));
      chk(pulse_count == pc0 + 16'd1, "gate in the tail started no pulse");
    end
    @(negedge clk); hs_ack = 1; @(negedge clk); hs_ack = 0;
    // missing trigger: 3 x 64 clocks after the last trigger
    trig_max = 3; tail_len = 5;
    begin
      int t0;
      @(negedge clk); rf_gate = 1; t0 = clk_n;
      repeat (10) @(negedge clk); rf_gate = 0;
      repeat (150) @(negedge clk);
      chk(n_trig == 1, "watchdog fired too early");
      repeat (400) @(negedge clk);
      chk(n_trig == 2, $sformatf("missing trigger: %0d errors, expected 2", n_trig));
      // the counter starts with pulse_start (3 clocks after the gate rises),
      // reaches 192 clocks later and the error is registered one clock after
      chk(t_trig - t0 == 3 + 192 + 1, $sformatf("watchdog after %0d clocks, expected %0d", t_trig - t0, 3 + 192 + 1));
    end
    trig_max = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
