// cavity_model: behavioural model (not synthesizable) of everything outside
// the FPGA in the control loop: DAC, vector modulator, RF gate switch,
// amplifier, a single-pole cavity, the IF down-conversion and the ADCs.
//
// The complex drive is the DAC pair (dac_i, dac_q) times GAIN, switched off
// while `rf_gate` is low. The cavity voltage follows the drive with time
// constant TAU clocks; beam loading subtracts BEAM from the drive while
// `beam_on` is high. After DELAY clocks of cable and converter delay each
// quantity is sampled as a 50 MHz IF at 40 MS/s, i.e. as the sequence
// I, Q, -I, -Q selected by `phase`: ADC 0 the cavity probe (plus the
// constant ADC offset OFFSET), ADC 1 the forward wave (the drive), ADC 2 the
// reflected wave (drive - cavity), ADC 3 a constant. Samples are rounded
// and saturated to 12 bits, and read 0 while `adc_pdn` is high.
module cavity_model #(
  parameter real TAU    = 400.0,
  parameter real GAIN   = 1.0,
  parameter real BEAM   = 200.0,
  parameter int  OFFSET = 20,
  parameter int  DELAY  = 4
) (
  input  logic               clk,
  input  logic               rf_gate,
  input  logic               beam_on,
  input  logic               adc_pdn,
  input  logic [1:0]         phase,
  input  logic signed [11:0] dac_i,
  input  logic signed [11:0] dac_q,
  output logic signed [11:0] adc [4],
  output real                v_i,
  output real                v_q
);
  real di, dq;
  real pipe_vi [DELAY], pipe_vq [DELAY], pipe_di [DELAY], pipe_dq [DELAY];

  initial begin
    v_i = 0.0; v_q = 0.0;
    for (int k = 0; k < DELAY; k++) begin
      pipe_vi[k] = 0.0; pipe_vq[k] = 0.0; pipe_di[k] = 0.0; pipe_dq[k] = 0.0;
    end
    for (int k = 0; k < 4; k++) adc[k] = '0;
  end

  function automatic logic signed [11:0] q12(input real x);
    int r = $rtoi(x < 0.0 ? x - 0.5 : x + 0.5);
    if (r > 2047) r = 2047;
    if (r < -2048) r = -2048;
    return 12'(r);
  endfunction

  function automatic real pick(input logic [1:0] ph, input real i, input real q);
    case (ph)
      2'd0: return i;
      2'd1: return q;
      2'd2: return -i;
      default: return -q;
    endcase
  endfunction

  always @(posedge clk) begin
    di = rf_gate ? GAIN * real'(dac_i) : 0.0;
    dq = rf_gate ? GAIN * real'(dac_q) : 0.0;
    v_i = v_i + ((di - (beam_on ? BEAM : 0.0)) - v_i) / TAU;
    v_q = v_q + (dq - v_q) / TAU;
    for (int k = DELAY - 1; k > 0; k--) begin
      pipe_vi[k] = pipe_vi[k-1]; pipe_vq[k] = pipe_vq[k-1];
      pipe_di[k] = pipe_di[k-1]; pipe_dq[k] = pipe_dq[k-1];
    end
    pipe_vi[0] = v_i; pipe_vq[0] = v_q; pipe_di[0] = di; pipe_dq[0] = dq;
  end

  // ADC words change on the falling edge, for the next rising edge
  always @(negedge clk) begin
    if (adc_pdn) begin
      for (int k = 0; k < 4; k++) adc[k] = '0;
    end else begin
      adc[0] = q12(real'(OFFSET) + pick(phase, pipe_vi[DELAY-1], pipe_vq[DELAY-1]));
      adc[1] = q12(pick(phase, pipe_di[DELAY-1], pipe_dq[DELAY-1]));
      adc[2] = q12(pick(phase, pipe_di[DELAY-1] - pipe_vi[DELAY-1],
                               pipe_dq[DELAY-1] - pipe_vq[DELAY-1]));
      adc[3] = 12'sd100;
    end
  end
endmodule
