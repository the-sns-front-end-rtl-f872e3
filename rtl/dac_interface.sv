// dac_interface: splits the interleaved I, Q, I, Q output stream into the
// two channels of the dual 12-bit DAC that drives the vector modulator.
//
// The data path delivers one 12-bit word per 40 MHz clock together with its
// parity (0 = I, 1 = Q). An I word is held; when the following Q word
// arrives both channel registers are loaded together and `dac_wr` pulses,
// so each channel updates at 20 MS/s. Latency: the DAC registers change on
// the clock after the Q word is presented. Loading both channels together
// is this design's choice.
module dac_interface #(
  parameter int DAC_W = 12
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [DAC_W-1:0] din,
  input  logic                    parity,
  output logic signed [DAC_W-1:0] dac_i,
  output logic signed [DAC_W-1:0] dac_q,
  output logic                    dac_wr
);
  logic signed [DAC_W-1:0] i_hold_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      i_hold_q <= '0;
      dac_i    <= '0;
      dac_q    <= '0;
      dac_wr   <= 1'b0;
    end else begin
      dac_wr <= 1'b0;
      if (!parity) begin
        i_hold_q <= din;
      end else begin
        dac_i  <= i_hold_q;
        dac_q  <= din;
        dac_wr <= 1'b1;
      end
    end
  end
endmodule
