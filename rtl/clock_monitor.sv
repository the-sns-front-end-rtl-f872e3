// clock_monitor: detects a missing or erratic 40 MHz sample clock, seen from
// the 25 MHz host-bus clock domain.
//
// In the monitored domain a counter divides the clock by 2^(DIV_LOG2+1) and
// its top bit is brought across; the host side measures, in host clocks, the
// time between changes of that bit. At 40 MHz and 25 MHz with DIV_LOG2 = 4
// one change occurs every 16 fast clocks = 10 host clocks. A gap shorter
// than MIN_GAP or longer than MAX_GAP host clocks pulses `clk_err` (a
// stopped clock keeps producing an error every MAX_GAP clocks).
// The method and limits are this design's choice; the original system description only says
// that self-check logic detects missing or erratic clocks.
module clock_monitor #(
  parameter int DIV_LOG2 = 4,
  parameter int MIN_GAP  = 7,
  parameter int MAX_GAP  = 13
) (
  input  logic mon_clk,
  input  logic mon_rst,
  input  logic host_clk,
  input  logic host_rst,
  output logic clk_err
);
  logic [DIV_LOG2:0] div_q;
  always_ff @(posedge mon_clk) begin
    if (mon_rst) div_q <= '0;
    else         div_q <= div_q + 1'b1;
  end

  logic [2:0] s_q;
  logic [7:0] gap_q;
  logic       seen_q;   // first change seen since reset
  always_ff @(posedge host_clk) begin
    if (host_rst) begin
      s_q     <= '0;
      gap_q   <= '0;
      seen_q  <= 1'b0;
      clk_err <= 1'b0;
    end else begin
      s_q     <= {s_q[1:0], div_q[DIV_LOG2]};
      clk_err <= 1'b0;
      if (s_q[2] != s_q[1]) begin
        if (seen_q && gap_q < 8'(MIN_GAP - 1)) clk_err <= 1'b1;
        seen_q <= 1'b1;
        gap_q  <= '0;
      end else if (gap_q == 8'(MAX_GAP)) begin
        clk_err <= 1'b1;
        gap_q   <= '0;
      end else begin
        gap_q <= gap_q + 8'd1;
      end
    end
  end
endmodule
