// tb_host_interface: exercises the host register map: write and read back
// every configuration register, the one-clock reload and handshake strobes,
// status bits, read-and-clear of latched errors (an event during the clear
// must survive), and reads of the trace and feed-forward windows through
// simple memory models with a one-clock read.
module tb_host_interface;
  import llrf_pkg::*;
  logic clk = 0, rst = 1;
  always #20 clk = ~clk;

  logic [15:0] h_addr = 0, h_wdata = 0, h_rdata;
  logic        h_wr = 0, h_rd = 0;
  ctrl_t       ctrl;
  logic signed [11:0] iset, qset;
  logic signed [9:0]  kpa, kpb, ki;
  logic wr_kpa, wr_kpb, wr_ki, hs_done;
  logic [15:0] ff_dwell, tr_decim, tr_delay, tail_len, wake, trig_max;
  logic irq = 0, kcm_busy = 0, locked = 0, adc_pdn = 0;
  logic [15:0] pulse_count = 16'h1234;
  logic ev_handshake = 0, ev_gate = 0, ev_sync = 0, ev_clk = 0, ev_sat = 0, ev_trig = 0;
  logic [8:0]  mem_addr;
  logic [15:0] tr_rdata [4];
  logic        ff_we;
  logic [7:0]  ff_wdata, ff_rdata;
  logic [7:0]  ffmem [512];
  int checks = 0, failures = 0;
  int n_kpa = 0, n_kpb = 0, n_ki = 0, n_hs = 0;

  host_interface dut (.clk, .rst, .h_addr, .h_wr, .h_rd, .h_wdata, .h_rdata,
    .ctrl, .iset, .qset, .kpa, .kpb, .ki, .wr_kpa, .wr_kpb, .wr_ki,
    .ff_dwell, .tr_decim, .tr_delay, .tail_len, .wake, .trig_max, .hs_done,
    .irq, .kcm_busy, .locked, .adc_pdn, .pulse_count,
    .ev_handshake, .ev_gate, .ev_sync, .ev_clk, .ev_sat, .ev_trig,
    .mem_addr, .tr_rdata, .ff_we, .ff_wdata, .ff_rdata);

  // memory models: trace word = {k, addr} pattern, feed-forward RAM
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) tr_rdata[k] <= 16'(k * 16'h1000 + 16'(mem_addr) * 3);
    if (ff_we) ffmem[mem_addr] <= ff_wdata;
    ff_rdata <= ffmem[mem_addr];
    if (!rst) begin
      if (wr_kpa) n_kpa++;
      if (wr_kpb) n_kpb++;
      if (wr_ki)  n_ki++;
      if (hs_done) n_hs++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] sext(input logic [15:0] v, input int w);
    logic [15:0] r = v;
    for (int b = w; b < 16; b++) r[b] = v[w-1];
    return r;
  endfunction

  task automatic wr(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); h_addr = a; h_wdata = d; h_wr = 1;
    @(negedge clk); h_wr = 0;
  endtask
  task automatic rd(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); h_addr = a; h_rd = 1;
    @(negedge clk); h_rd = 0; d = h_rdata;
  endtask
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] d, v;
    logic [15:0] addrs [12] = '{A_CTRL, A_ISET, A_QSET, A_KPA, A_KPB, A_KI,
                                A_FF_DWELL, A_TR_DECIM, A_TR_DELAY, A_TAIL, A_WAKE, A_TRIG_MAX};
    int widths [12] = '{16, 12, 12, 10, 10, 10, 16, 16, 16, 16, 16, 16};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 12; i++) begin
        v = 16'($urandom);
        wr(addrs[i], v);
        rd(addrs[i], d);
        // narrower registers read back sign-extended
        chk(d == sext(v, widths[i]),
            $sformatf("reg %h wrote %h read %h", addrs[i], v, d));
      end
    end
    wr(A_CTRL, 16'h0015);
    chk(ctrl.run && ctrl.int_en && ctrl.offset_en && !ctrl.fb_en && !ctrl.loop_sign,
        "ctrl bits");
    wr(A_ISET, 16'hF800); chk(iset == -12'sd2048, "iset value");
    chk(n_kpa == 3 && n_kpb == 3 && n_ki == 3,
        $sformatf("reload strobes %0d %0d %0d", n_kpa, n_kpb, n_ki));
    wr(A_HANDSHAKE, 0); wr(A_HANDSHAKE, 0); @(negedge clk);
    chk(n_hs == 2, "handshake strobes");
    // status
    irq = 1; locked = 1; adc_pdn = 1;
    rd(A_STATUS, d); chk(d == 16'h000D, $sformatf("status %h", d));
    irq = 0; kcm_busy = 1; locked = 0; adc_pdn = 0;
    rd(A_STATUS, d); chk(d == 16'h0002, $sformatf("status %h", d));
    rd(A_PULSES, d); chk(d == 16'h1234, "pulse count");
    // latched errors
    rd(A_ERRORS, d); chk(d == 0, "errors clear at start");
    @(negedge clk); ev_gate = 1; @(negedge clk); ev_gate = 0; ev_sync = 1;
    @(negedge clk); ev_sync = 0;
    rd(A_ERRORS, d); chk(d == 16'h000C, $sformatf("errors %h, expected 000c", d));
    rd(A_ERRORS, d); chk(d == 0, "errors cleared by read");
    // an event in the clock of the clearing read is kept
    @(negedge clk); h_addr = A_ERRORS; h_rd = 1; ev_clk = 1; ev_sat = 1;
    @(negedge clk); h_rd = 0; ev_clk = 0; ev_sat = 0;
    rd(A_ERRORS, d); chk(d == 16'h0011, $sformatf("event during clear: %h", d));
    ev_handshake = 1; @(negedge clk); ev_handshake = 0;
    rd(A_ERRORS, d); chk(d == 16'h0002, "handshake error bit");
    ev_trig = 1; @(negedge clk); ev_trig = 0;
    rd(A_ERRORS, d); chk(d == 16'h0020, $sformatf("trigger error bit: %h", d));
    // trace windows
    for (int k = 0; k < 4; k++)
      for (int a = 0; a < 512; a += 37) begin
        rd(16'(A_TRACE0 + k * 512 + a), d);
        chk(d == 16'(k * 16'h1000 + a * 3), $sformatf("trace %0d word %0d = %h", k, a, d));
      end
    // feed-forward window, sign-extended on read
    for (int a = 0; a < 512; a++) wr(16'(A_FF + a), 16'(a * 5));
    for (int a = 0; a < 512; a += 11) begin
      rd(16'(A_FF + a), d);
      chk(d == 16'(signed'(8'(a * 5))), $sformatf("ff word %0d = %h", a, d));
    end
    // unmapped address reads 0, writes there change nothing
    wr(16'h4000, 16'hFFFF); rd(16'h4000, d); chk(d == 0, "unmapped");
    rd(A_CTRL, d); chk(d == 16'h0015, "ctrl unchanged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
