// tb_llrf_datapath: checks the feedback data path three ways.
//  1. A clock-by-clock reference model written with ordinary arithmetic
//     (multiplications instead of look-up tables) must match `dout`, `samp`
//     and `sat_flag` every clock, with random samples, set points, gains and
//     control changes, including saturation of the error, the proportional
//     sum, the integrator and the output.
//  2. Behaviour: with an ADC offset and a set point equal to the input
//     phasor, the auto-offset makes the error vanish; with a constant phasor
//     and complex gain kA + j*kB the DAC pair equals the complex product;
//     with gains zero and a constant feed-forward pair the I and Q
//     integrators ramp separately.
//  3. Timing: an input step reaches `dout` after 4 clocks.
module tb_llrf_datapath;
  import llrf_pkg::*;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;

  logic signed [11:0] adc = 0, iset = 0, qset = 0;
  logic [1:0]         ph_in = 0;
  logic fb_en = 0, int_en = 0, loop_sign = 0, offset_en = 0, int_clear = 1;
  logic load_kpa = 0, load_kpb = 0, load_ki = 0;
  logic signed [9:0]  kpa = 0, kpb = 0, ki = 0;
  logic               kcm_busy, ff_parity, dout_parity, sat_flag;
  logic signed [7:0]  ff = 0;
  logic signed [11:0] samp, dout;
  int checks = 0, failures = 0;

  llrf_datapath dut (.*);

  // ---------------- reference model ----------------
  longint m_samp, m_cum, m_avg, m_e1, m_e2, m_e3, m_i1, m_i2, m_dout;
  int     m_ph_s, m_ph_1, m_par3, m_dpar;
  bit     m_sat;
  int     m_busy;
  longint m_ka, m_kb, m_ki;   // coefficients the tables currently hold     // clocks left of a table reload (all three reload together)

  function automatic longint satn(longint v, int w);
    longint hi = (64'sd1 <<< (w - 1)) - 1, lo = -(64'sd1 <<< (w - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction
  function automatic longint kmul(longint k, longint x, int sh, int w);
    return satn((k * x) >>> sh, w);
  endfunction

  task automatic model_reset();
    m_samp = 0; m_cum = 0; m_avg = 0; m_e1 = 0; m_e2 = 0; m_e3 = 0;
    m_i1 = 0; m_i2 = 0; m_dout = 0; m_ph_s = 0; m_ph_1 = 0; m_par3 = 0; m_dpar = 0; m_sat = 0; m_busy = 0;
    m_ka = 0; m_kb = 0; m_ki = 0;
  endtask

  // advance the model by one clock edge with the inputs of this cycle
  task automatic model_step(input longint ffv);
    longint setp, n_samp, n_cum, n_avg, n_e1, n_e2, n_e3, n_i1, n_i2, n_dout, ps, pg, kiv, s;
    bit flip;
    case (m_ph_s)
      0: setp = iset; 1: setp = qset; 2: setp = -longint'(iset); default: setp = -longint'(qset);
    endcase
    n_samp = adc;
    n_avg = m_avg;
    if (m_ph_s == 0) begin n_cum = m_samp; if (offset_en) n_avg = m_cum >>> 2; end
    else n_cum = m_cum + m_samp;
    n_e1 = satn(m_samp - (setp + m_avg), 10);
    n_e2 = m_e1;
    ps = (m_busy > 0) ? 0 : kmul(m_ka, m_e1, 8, 11) + kmul(m_kb, m_e2, 8, 11);
    pg = satn(ps, 10);
    flip = m_ph_1[1] ^ loop_sign;
    n_e3 = fb_en ? (flip ? -pg - 1 : pg) : 0;
    kiv = (m_busy > 0) ? 0 : kmul(m_ki, m_e3, 8, 16);
    if (load_kpa) begin m_busy = 16; m_ka = kpa; m_kb = kpb; m_ki = ki; end
    else if (m_busy > 0) m_busy--;
    n_i1 = m_i2 + (int_en ? kiv : 0);
    s = m_i1 + ffv;
    n_i2 = int_clear ? 0 : satn(s, 16);
    m_sat = !int_clear && (satn(s, 16) != s);
    n_dout = satn(m_e3 + (m_i2 >>> 4), 12);
    m_dpar = m_par3;
    m_par3 = m_ph_1 & 1;
    m_ph_1 = m_ph_s;
    m_ph_s = ph_in;
    m_samp = n_samp; m_cum = n_cum; m_avg = n_avg; m_e1 = n_e1; m_e2 = n_e2; m_e3 = n_e3;
    m_i1 = n_i1; m_i2 = n_i2; m_dout = n_dout;
  endtask

  always @(posedge clk) begin
    if (rst) model_reset();
    else     model_step(longint'(ff));
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  task automatic load_gains(input logic signed [9:0] a, b, i);
    @(negedge clk);
    kpa = a; kpb = b; ki = i; load_kpa = 1; load_kpb = 1; load_ki = 1;
    @(negedge clk);
    load_kpa = 0; load_kpb = 0; load_ki = 0;
    repeat (17) @(negedge clk);
    chk(!kcm_busy, "multipliers still busy after 17 clocks");
  endtask

  // random stimulus, compared with the model every clock
  task automatic random_run(input int n, input int amp);
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      adc = 12'($urandom_range(0, 2 * amp) - amp);
      ph_in = ph_in + 2'd1;
      if ($urandom_range(0, 200) == 0) fb_en = !fb_en;
      if ($urandom_range(0, 200) == 0) int_en = !int_en;
      if ($urandom_range(0, 300) == 0) loop_sign = !loop_sign;
      if ($urandom_range(0, 100) == 0) offset_en = !offset_en;
      int_clear = ($urandom_range(0, 400) == 0);
      ff = 8'($urandom);
      @(posedge clk);
      #1;
      chk(dout == 12'(m_dout) && samp == 12'(m_samp) && dout_parity == m_dpar[0]
          && sat_flag == m_sat,
          $sformatf("clock %0d dout %0d model %0d sat %0d/%0d", c, dout, m_dout, sat_flag, m_sat));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit req_par = 0;
    int lat, ii, qq, acc_i, acc_q, di, dq;
    longint ei, eq;
    logic signed [11:0] prev_i, prev_q;
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- 1. model comparison ----
    load_gains(10'sd300, -10'sd200, 10'sd50);
    iset = 12'sd100; qset = -12'sd300;
    random_run(3000, 400);
    load_gains(10'sd511, 10'sd511, 10'sd511);
    random_run(3000, 2047);
    load_gains(-10'sd512, 10'sd37, -10'sd512);
    iset = -12'sd2048; qset = 12'sd2047;
    random_run(3000, 2047);
    load_gains(10'sd64, 10'sd0, 10'sd3);
    iset = 12'sd20; qset = 12'sd40;
    random_run(3000, 100);

    // ---- 2a. auto-offset: adc = offset + (I, Q, -I, -Q), set point = (I, Q)
    //      seen at the output through a unit proportional gain
    load_gains(10'sd256, 10'sd0, 10'sd0);
    fb_en = 1; int_en = 0; int_clear = 1; ff = 0; loop_sign = 0;
    iset = 12'sd500; qset = -12'sd250; offset_en = 1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      ph_in = 2'(c);
      case (ph_in) 0: adc = 37 + 500; 1: adc = 37 - 250; 2: adc = 37 - 500; default: adc = 37 + 250; endcase
      if (c > 20) chk(dout == 0 || dout == -1, $sformatf("offset not cancelled: dout = %0d", dout));
    end
    // and without the offset tracking the offset shows
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    load_gains(10'sd256, 10'sd0, 10'sd0);
    offset_en = 0;
    for (int c = 0; c < 40; c++) begin
      @(negedge clk);
      ph_in = 2'(c);
      case (ph_in) 0: adc = 37 + 500; 1: adc = 37 - 250; 2: adc = 37 - 500; default: adc = 37 + 250; endcase
      if (c > 20) chk(dout == 37 || dout == -38, $sformatf("offset: dout = %0d, expected +-37", dout));
    end

    // ---- 2b. complex gain: set point 0, offset 0, phasor (I, Q) = (200, 100)
    iset = 0; qset = 0; adc = 0;
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    load_gains(10'sd128, 10'sd64, 10'sd0);   // 0.5 + j0.25
    fb_en = 1;
    ii = 200; qq = 100;
    ei = (128 * ii - 64 * qq) >>> 8;        // Re{(a + jb)(I + jQ)} = 75
    eq = (128 * qq + 64 * ii) >>> 8;        // Im{...} = 100
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      ph_in = 2'(c);
      case (ph_in) 0: adc = 12'(ii); 1: adc = 12'(qq); 2: adc = 12'(-ii); default: adc = 12'(-qq); endcase
      // flipped samples are one's complements: allow 1 LSB
      if (c > 10) begin
        if (dout_parity == 0) chk(dout == ei || dout == ei - 1,
                                  $sformatf("I' = %0d, expected %0d", dout, ei));
        else                  chk(dout == eq || dout == eq - 1,
                                  $sformatf("Q' = %0d, expected %0d", dout, eq));
      end
    end

    // ---- 3. latency of a step through the proportional path
    load_gains(10'sd256, 10'sd0, 10'sd0);   // gain 1
    adc = 0;
    repeat (10) @(negedge clk);
    lat = -1;
    @(negedge clk); adc = 12'sd300; ph_in = 2'd0;
    for (int c = 1; c < 10; c++) begin
      @(negedge clk);
      adc = 0;
      ph_in = 2'(c);
      if (lat < 0 && dout > 10) lat = c;   // flipped zeros read -1
    end
    chk(lat == 4, $sformatf("step latency %0d clocks, expected 4", lat));

    // ---- 2c. feed-forward ramps, I and Q separate
    fb_en = 0; int_en = 0; int_clear = 0;
    acc_i = 0; acc_q = 0;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      ph_in = 2'(c);
      // the buffer answers one clock after the request: use last clock's parity
      ff = req_par ? 8'sd5 : -8'sd3;     // I ramps down, Q up
      req_par = ff_parity;
    end
    prev_i = 0; prev_q = 0;
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      ph_in = ph_in + 2'd1;
      ff = req_par ? 8'sd5 : -8'sd3;
      req_par = ff_parity;
      if (dout_parity) begin di = dout - prev_q; prev_q = dout; end
      else             begin dq = dout - prev_i; prev_i = dout; end
    end
    // 16 increments of the integrator per output LSB: over 400 clocks
    // (200 per channel) I = -600/16, Q = +1000/16
    chk(prev_i < -30 && prev_i > -50, $sformatf("I ramp %0d", prev_i));
    chk(prev_q > 55 && prev_q < 75, $sformatf("Q ramp %0d", prev_q));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
