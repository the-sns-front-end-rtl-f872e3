// tb_dac_interface: feeds an alternating I, Q stream and checks that both
// DAC channels load the right pair one clock after the Q word, with one
// write strobe per pair (20 MS/s per channel at a 40 MHz clock).
module tb_dac_interface;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;

  logic signed [11:0] din = 0, dac_i, dac_q;
  logic               parity = 0, dac_wr;
  logic signed [11:0] last_i;
  int checks = 0, failures = 0, strobes = 0;

  dac_interface dut (.clk, .rst, .din, .parity, .dac_i, .dac_q, .dac_wr);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [11:0] qv;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 2000; c++) begin
      parity = c[0];
      din = 12'($urandom);
      if (!parity) last_i = din;
      qv = din;
      @(negedge clk);
      checks++;
      if (dac_wr != parity) begin failures++; $display("FAIL strobe at clock %0d", c); end
      if (parity) begin
        strobes++;
        checks++;
        if (dac_i != last_i || dac_q != qv) begin
          failures++;
          if (failures < 10) $display("FAIL pair %h %h expected %h %h", dac_i, dac_q, last_i, qv);
        end
      end
    end
    checks++;
    if (strobes != 1000) begin failures++; $display("FAIL %0d strobes for 2000 words", strobes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
