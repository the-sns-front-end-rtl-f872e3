// tb_ff_buffer: the host writes a random table and reads it back; then the
// table is played with several dwell settings while the parity alternates,
// and each output is compared with the entry a reference pointer selects
// (one clock after the request, 0 while not running, last pair held).
module tb_ff_buffer;
  logic clk = 0, hclk = 0, rst = 1;
  always #12.5 clk = ~clk;
  always #20   hclk = ~hclk;

  localparam int DEPTH = 512;
  logic              start = 0, run = 0, parity = 0;
  logic [15:0]       dwell = 0;
  logic signed [7:0] ff;
  logic              h_we = 0;
  logic [8:0]        h_addr = 0;
  logic [7:0]        h_wdata = 0, h_rdata;
  logic [7:0]        tbl [DEPTH];
  int checks = 0, failures = 0;

  ff_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst, .start, .run, .parity, .dwell, .ff,
    .h_clk(hclk), .h_we, .h_addr, .h_wdata, .h_rdata);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic play(input int dw, input int n, input bit qfirst);
    int ptr = 0, cnt = 0;
    bit act = 0;
    logic [7:0] expv;
    bit was_run;
    @(negedge clk);
    dwell = 16'(dw); start = 1; run = 0; parity = 0;
    @(negedge clk);
    start = 0;
    for (int c = 0; c < n; c++) begin
      run = (c % 97) != 50;            // drop run now and then
      parity = c[0] ^ qfirst;
      was_run = run;
      expv = (was_run && (act || !parity)) ? tbl[{ptr[7:0], parity}] : 8'd0;
      if (run && !parity) act = 1;
      else if (run && parity && act) begin
        if (cnt >= dw) begin cnt = 0; if (ptr != 255) ptr++; end
        else cnt++;
      end
      @(negedge clk);
      chk(ff == expv, $sformatf("dwell %0d clock %0d ff=%h expected %h", dw, c, ff, expv));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < DEPTH; i++) begin
      tbl[i] = 8'($urandom);
      @(negedge hclk); h_we = 1; h_addr = 9'(i); h_wdata = tbl[i];
    end
    @(negedge hclk); h_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge hclk); h_addr = 9'(i);
      @(negedge hclk);
      chk(h_rdata == tbl[i], $sformatf("host read %0d", i));
    end
    play(0, 1200, 0);
    play(3, 3000, 1);
    play(1, 600, 0);
    play(2, 900, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
