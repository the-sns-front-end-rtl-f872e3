// tb_sync_monitor: drives a 10 MHz sync (2 clocks high, 2 low) and checks
// the phase count against the sync edges (phase `align` two clocks after
// the edge is sampled), then removes the sync and shifts it by one clock;
// each fault must pulse sync_err, a clean sync must never.
module tb_sync_monitor;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;

  logic       sync = 0;
  logic [1:0] align = 2'd1;
  logic [1:0] phase;
  logic       locked, sync_err;
  int checks = 0, failures = 0, errs = 0;
  int since_edge = -100;   // clocks since the sync input last rose

  sync_monitor dut (.clk, .rst, .sync, .align, .phase, .locked, .sync_err);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst && sync_err) errs++;

  // drive n sync periods starting at phase offset `skew` clocks
  task automatic run_sync(input int periods, input bit check_phase);
    for (int p = 0; p < periods; p++) begin
      for (int c = 0; c < 4; c++) begin
        @(negedge clk);
        sync = (c < 2);
        if (c == 0) since_edge = 0; else since_edge++;
        #1;
        if (check_phase && p > 2) begin
          // sample rose before this posedge; the counter takes align three clocks after the input rises
          checks++;
          if (phase != 2'(align + since_edge - 3)) begin
            failures++;
            if (failures < 10) $display("FAIL phase %0d expected %0d", phase, 2'(align + since_edge - 3));
          end
        end
      end
    end
  endtask

  initial begin
    int e0;
    repeat (3) @(negedge clk);
    rst = 0;
    run_sync(50, 1);
    checks++; if (!locked) begin failures++; $display("FAIL not locked"); end
    checks++; if (errs != 0) begin failures++; $display("FAIL %0d errors on a clean sync", errs); end
    // missing sync
    e0 = errs;
    @(negedge clk); sync = 0;
    repeat (12) @(negedge clk);
    checks++; if (errs == e0) begin failures++; $display("FAIL missing sync not flagged"); end
    checks++; if (locked) begin failures++; $display("FAIL still locked without sync"); end
    run_sync(10, 0);
    e0 = errs;
    run_sync(10, 1);
    checks++; if (errs != e0) begin failures++; $display("FAIL error after relock"); end
    // one clock shift: edge after 5 clocks instead of 4
    e0 = errs;
    @(negedge clk); sync = 0;
    run_sync(10, 0);
    checks++; if (errs != e0 + 1) begin failures++; $display("FAIL shifted sync gave %0d errors", errs - e0); end
    align = 2'd3;
    run_sync(3, 0);
    run_sync(10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
