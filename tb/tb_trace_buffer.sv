// tb_trace_buffer: records a known sample sequence with several delay and
// decimation settings, reads all 512 words back on the host clock and
// compares each with the sample that should have been taken (word i = the
// sample at clock 1 + delay + i*(decim+1) after start); also checks when
// `done` rises.
module tb_trace_buffer;
  logic clk = 0, hclk = 0, rst = 1;
  always #12.5 clk = ~clk;
  always #20   hclk = ~hclk;

  localparam int DEPTH = 512;
  logic               start = 0;
  logic [15:0]        delay = 0, decim = 0;
  logic signed [11:0] sample = 0;
  logic               done;
  logic [8:0]         rd_addr = 0;
  logic [15:0]        rd_data;
  int checks = 0, failures = 0;
  int cyc;

  trace_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst, .start, .delay, .decim, .sample,
    .done, .rd_clk(hclk), .rd_addr, .rd_data);

  function automatic logic signed [11:0] val(input int k);
    return 12'(k * 37 + 5 - (k % 7) * 600);
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int d, input int m);
    int done_at;
    @(negedge clk);
    delay = 16'(d); decim = 16'(m);
    start = 1; cyc = 0; sample = val(0);
    done_at = -1;
    @(negedge clk);
    start = 0;
    while (done_at < 0 && cyc < 200000) begin
      cyc++;
      sample = val(cyc);
      @(negedge clk);
      if (done && done_at < 0) done_at = cyc;
    end
    checks++;
    if (done_at != 1 + d + (DEPTH - 1) * (m + 1)) begin
      failures++;
      $display("FAIL d=%0d m=%0d done after %0d clocks, expected %0d", d, m, done_at,
               1 + d + (DEPTH - 1) * (m + 1));
    end
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge hclk); rd_addr = 9'(i);
      @(negedge hclk);
      checks++;
      if (rd_data != 16'(val(1 + d + i * (m + 1)))) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d m=%0d word %0d = %h expected %h", d, m, i,
                                    rd_data, 16'(val(1 + d + i * (m + 1))));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run_one(0, 0);
    run_one(5, 3);
    run_one(100, 0);
    run_one(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
