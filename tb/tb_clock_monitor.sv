// tb_clock_monitor: 40 MHz monitored clock, 25 MHz host clock. A clean
// clock must give no error; a stopped clock, a clock at half rate and a
// clock at double rate must each be flagged.
module tb_clock_monitor;
  logic hclk = 0, rst = 1;
  always #20 hclk = ~hclk;           // 25 MHz
  real  half = 12.5;                 // monitored clock half period, ns
  bit   stop = 0;
  logic mclk = 0;
  always begin
    #(half);
    if (!stop) mclk = ~mclk;
  end

  logic clk_err;
  int checks = 0, failures = 0, errs = 0;

  clock_monitor dut (.mon_clk(mclk), .mon_rst(rst), .host_clk(hclk),
                     .host_rst(rst), .clk_err);

  always @(posedge hclk) if (!rst && clk_err) errs++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_err(input bit want, input string what);
    checks++;
    if ((errs != 0) != want) begin
      failures++;
      $display("FAIL %s: %0d errors", what, errs);
    end
  endtask

  initial begin
    repeat (4) @(posedge hclk);
    rst = 0;
    repeat (50) @(posedge hclk);
    errs = 0;
    repeat (500) @(posedge hclk);
    expect_err(0, "clean 40 MHz");
    // 41 MHz and 39 MHz are still fine
    half = 12.2; repeat (300) @(posedge hclk); errs = 0;
    repeat (300) @(posedge hclk); expect_err(0, "41 MHz");
    half = 12.8; repeat (300) @(posedge hclk); errs = 0;
    repeat (300) @(posedge hclk); expect_err(0, "39 MHz");
    half = 12.5; repeat (100) @(posedge hclk); errs = 0;
    stop = 1;
    repeat (100) @(posedge hclk); expect_err(1, "stopped clock");
    stop = 0; repeat (100) @(posedge hclk); errs = 0;
    half = 25.0; repeat (200) @(posedge hclk); expect_err(1, "20 MHz clock");
    half = 12.5; repeat (100) @(posedge hclk); errs = 0;
    half = 6.25; repeat (200) @(posedge hclk); expect_err(1, "80 MHz clock");
    half = 12.5; repeat (100) @(posedge hclk); errs = 0;
    repeat (300) @(posedge hclk); expect_err(0, "clean again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
