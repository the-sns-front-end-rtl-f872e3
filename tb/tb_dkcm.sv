// tb_dkcm: checks the loadable constant-coefficient multiplier against a
// plain multiply: random coefficients (including the extremes), random and
// corner inputs, two output widths, the 16-cycle reload time and the zero
// output while the tables are rebuilt.
module tb_dkcm;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic               load;
  logic signed [9:0]  coef, x;
  logic               busy_a, busy_b;
  logic signed [10:0] ya;
  logic signed [15:0] yb;
  int checks = 0, failures = 0;

  dkcm #(.IN_W(10), .COEF_W(10), .OUT_W(11), .SHIFT(8)) dut_a (
    .clk, .rst, .load, .coef, .busy(busy_a), .x, .y(ya));
  dkcm #(.IN_W(10), .COEF_W(10), .OUT_W(16), .SHIFT(4)) dut_b (
    .clk, .rst, .load, .coef, .busy(busy_b), .x, .y(yb));

  function automatic longint ref_mul(longint k, longint v, int sh, int w);
    longint p = (k * v) >>> sh;
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    longint lo = -(64'sd1 <<< (w - 1));
    if (p > hi) return hi;
    if (p < lo) return lo;
    return p;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic signed [9:0] ks [6] = '{10'sd0, 10'sd1, -10'sd1, 10'sd511, -10'sd512, 10'sd100};
    load = 0; coef = 0; x = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      coef = (t < 6) ? ks[t] : 10'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      n = 0;
      while (busy_a) begin
        x = 10'($urandom);
        chk(ya == 0 && yb == 0, "output not zero during reload");
        n++;
        @(negedge clk);
      end
      chk(n == 16, $sformatf("reload took %0d cycles, expected 16", n));
      for (int i = 0; i < 200; i++) begin
        x = (i == 0) ? -10'sd512 : (i == 1) ? 10'sd511 : (i == 2) ? 10'sd0 : 10'($urandom);
        #1;
        chk(ya == 11'(ref_mul(coef, x, 8, 11)),
            $sformatf("A k=%0d x=%0d y=%0d exp=%0d", coef, x, ya, ref_mul(coef, x, 8, 11)));
        chk(yb == 16'(ref_mul(coef, x, 4, 16)),
            $sformatf("B k=%0d x=%0d y=%0d exp=%0d", coef, x, yb, ref_mul(coef, x, 4, 16)));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
