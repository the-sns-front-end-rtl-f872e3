// tb_toggle_sync: sends events from a 40 MHz domain to a 25 MHz domain and
// back, spaced at least three destination clocks apart, and checks that
// every event arrives exactly once within three destination clocks.
module tb_toggle_sync;
  logic fclk = 0, sclk = 0, rst = 1;
  always #12.5 fclk = ~fclk;   // 40 MHz
  always #20   sclk = ~sclk;   // 25 MHz

  logic f2s_in = 0, s2f_in = 0, f2s_out, s2f_out;
  int checks = 0, failures = 0;
  int sent_fs = 0, got_fs = 0, sent_sf = 0, got_sf = 0;
  int lat_bad = 0;

  toggle_sync dut_fs (.src_clk(fclk), .src_rst(rst), .src_pulse(f2s_in),
                      .dst_clk(sclk), .dst_rst(rst), .dst_pulse(f2s_out));
  toggle_sync dut_sf (.src_clk(sclk), .src_rst(rst), .src_pulse(s2f_in),
                      .dst_clk(fclk), .dst_rst(rst), .dst_pulse(s2f_out));

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge sclk) if (!rst && f2s_out) got_fs++;
  always @(posedge fclk) if (!rst && s2f_out) got_sf++;

  initial begin
    repeat (4) @(posedge sclk);
    rst = 0;
    fork
      begin : fast_side
        for (int i = 0; i < 200; i++) begin
          @(negedge fclk); f2s_in = 1; sent_fs++;
          @(negedge fclk); f2s_in = 0;
          repeat (6 + $urandom_range(0, 10)) @(negedge fclk);
        end
      end
      begin : slow_side
        for (int i = 0; i < 200; i++) begin
          int n0;
          @(negedge sclk); s2f_in = 1; sent_sf++; n0 = got_sf;
          @(negedge sclk); s2f_in = 0;
          // the event must show up within 3 fast clocks of the toggle
          repeat (4) @(negedge fclk);
          checks++;
          if (got_sf != n0 + 1) begin failures++; lat_bad++; end
          repeat (2 + $urandom_range(0, 5)) @(negedge sclk);
        end
      end
    join
    repeat (10) @(posedge sclk);
    checks++; if (got_fs != sent_fs) begin failures++; $display("FAIL fast->slow sent %0d got %0d", sent_fs, got_fs); end
    checks++; if (got_sf != sent_sf) begin failures++; $display("FAIL slow->fast sent %0d got %0d", sent_sf, got_sf); end
    if (lat_bad) $display("FAIL %0d slow->fast events late or lost", lat_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
