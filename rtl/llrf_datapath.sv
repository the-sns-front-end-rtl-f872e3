// llrf_datapath: the 40 MS/s cavity-field feedback path of the LLRF
// controller.
//
// The 50 MHz IF sampled at 40 MS/s arrives as the repeating sequence
// I, Q, -I, -Q (`ph_in` gives the phase of each sample, 0 = I .. 3 = -Q).
// I and Q are never separated; every stage works on the interleaved stream:
//
//   samp   input latch of the ADC word
//   cum    sum of four consecutive samples, restarted at phase 0; over one
//          I, Q, -I, -Q period the signal cancels and 4x the ADC offset
//          remains. When `offset_en` is high, `avg` = cum/4 is reloaded every
//          4 clocks; it is subtracted from each sample (auto-offset).
//          Left in, an offset would pass the sign flip as a 10 MHz square
//          wave on the drive rather than as a field error.
//   setp   set point, the host's I or Q value with the sign of the phase,
//          so it follows the same I, Q, -I, -Q pattern as the samples.
//   err1   saturate_10(samp - (setp + avg))
//   err2   err1 delayed one clock (the neighbouring sample)
//   err3   feedback_enable ? (kA*err1 + kB*err2, saturated to 10 bits) xor
//          flip : 0. kA*e(n) + kB*e(n-1) is a complex gain kA + j*kB on the
//          interleaved stream, and the xor with the 10 MHz flip (phases 2, 3,
//          optionally inverted by `loop_sign`) turns I, Q, -I, -Q into
//          I, Q, I, Q. The xor is a one's complement: a flipped value v
//          becomes -v-1.
//   int1   int2 + (int_en ? kI*err3 : 0)
//   int2   clear ? 0 : saturate_16(int1 + ff)
//          Two registers in the loop, so the I and Q integrators are
//          interleaved and never mix. `ff` is the feed-forward table entry
//          (an increment), so the integrator also builds the feed-forward
//          waveform.
//   dout   saturate_12(err3 + int2 >>> INT_SHIFT), to the DAC interface
//
// The three multipliers are loadable constant-coefficient multipliers
// (dkcm), reloaded with `load_*` between pulses (16 clocks each).
//
// Timing: a sample on `adc` in cycle t reaches `dout` at the clock edge that
// ends cycle t+3 (registers samp, err1, err3, dout): 4 clocks, 100 ns at
// 40 MHz, for the proportional path. `ff_parity` asks the feed-forward
// buffer for the entry (I = 0, Q = 1) that must be on `ff` in the next
// cycle. `sat_flag` pulses when the integrator saturates.
//
// Register structure, the 10/11/16-bit widths, the sign flip and the place
// of each gain, enable and the clear follow the original system's data-path
// drawing. The cum/4 scaling, the coefficient scaling, the saturation of the
// proportional sum and the weight of int2 at the output (INT_SHIFT) are this
// design's choices.
module llrf_datapath
  import llrf_pkg::*;
#(
  parameter int INT_SHIFT = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [ADC_W-1:0]  adc,
  input  logic [1:0]               ph_in,
  // controls
  input  logic                     fb_en,
  input  logic                     int_en,
  input  logic                     loop_sign,
  input  logic                     offset_en,
  input  logic                     int_clear,
  input  logic signed [ADC_W-1:0]  iset,
  input  logic signed [ADC_W-1:0]  qset,
  // coefficient reload
  input  logic                     load_kpa,
  input  logic                     load_kpb,
  input  logic                     load_ki,
  input  logic signed [COEF_W-1:0] kpa,
  input  logic signed [COEF_W-1:0] kpb,
  input  logic signed [COEF_W-1:0] ki,
  output logic                     kcm_busy,
  // feed-forward
  output logic                     ff_parity,
  input  logic signed [FF_W-1:0]   ff,
  // outputs
  output logic signed [ADC_W-1:0]  samp,
  output logic signed [DAC_W-1:0]  dout,
  output logic                     dout_parity,
  output logic                     sat_flag
);
  // ---------------- input latch, offset, set point, error ----------------
  logic [1:0]              ph_s, ph_1;
  logic                    par_3;        // I/Q parity of err3
  logic signed [ADC_W+1:0] cum_q;        // sum of 4 samples
  logic signed [ADC_W-1:0] avg_q;
  logic signed [ADC_W:0]   setp;
  logic signed [ADC_W+2:0] diff;
  logic signed [ERR_W-1:0] err1_q, err2_q, err3_q;

  always_comb begin
    unique case (iq_phase_t'(ph_s))
      PH_I:    setp =  (ADC_W+1)'(iset);
      PH_Q:    setp =  (ADC_W+1)'(qset);
      PH_NI:   setp = -(ADC_W+1)'(iset);
      default: setp = -(ADC_W+1)'(qset);
    endcase
    diff = (ADC_W+3)'(samp) - ((ADC_W+3)'(setp) + (ADC_W+3)'(avg_q));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      samp   <= '0;
      ph_s   <= '0;
      cum_q  <= '0;
      avg_q  <= '0;
      err1_q <= '0;
      err2_q <= '0;
      ph_1   <= '0;
    end else begin
      samp <= adc;
      ph_s <= ph_in;
      if (ph_s == 2'd0) begin          // restart 4-cycle accumulate
        cum_q <= (ADC_W+2)'(samp);
        if (offset_en) avg_q <= ADC_W'(cum_q >>> 2);
      end else begin
        cum_q <= cum_q + (ADC_W+2)'(samp);
      end
      err1_q <= ERR_W'(sat(32'(diff), ERR_W));
      err2_q <= err1_q;
      ph_1   <= ph_s;
    end
  end

  // ---------------- complex proportional gain and sign flip --------------
  logic signed [KP_W-1:0] pa, pb;
  logic                   busy_a, busy_b, busy_i;
  logic signed [KP_W:0]   psum;
  logic signed [ERR_W-1:0] pgain, flipped;
  logic                   flip;

  dkcm #(.IN_W(ERR_W), .COEF_W(COEF_W), .OUT_W(KP_W), .SHIFT(8)) u_kcm_a (
    .clk, .rst, .load(load_kpa), .coef(kpa), .busy(busy_a), .x(err1_q), .y(pa));
  dkcm #(.IN_W(ERR_W), .COEF_W(COEF_W), .OUT_W(KP_W), .SHIFT(8)) u_kcm_b (
    .clk, .rst, .load(load_kpb), .coef(kpb), .busy(busy_b), .x(err2_q), .y(pb));

  always_comb begin
    psum    = (KP_W+1)'(pa) + (KP_W+1)'(pb);
    pgain   = ERR_W'(sat(32'(psum), ERR_W));
    flip    = ph_1[1] ^ loop_sign;
    flipped = fb_en ? (pgain ^ {ERR_W{flip}}) : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      err3_q <= '0;
      par_3  <= 1'b0;
    end else begin
      err3_q <= flipped;
      par_3  <= ph_1[0];
    end
  end

  // ---------------- integral gain, feed-forward, integrator ---------------
  logic signed [INT_W-1:0] kiv;
  logic signed [INT_W:0]   int1_q;
  logic signed [INT_W-1:0] int2_q;
  logic signed [INT_W+1:0] int_sum;

  dkcm #(.IN_W(ERR_W), .COEF_W(COEF_W), .OUT_W(INT_W), .SHIFT(8)) u_kcm_i (
    .clk, .rst, .load(load_ki), .coef(ki), .busy(busy_i), .x(err3_q), .y(kiv));

  assign int_sum = (INT_W+2)'(int1_q) + (INT_W+2)'(ff);

  always_ff @(posedge clk) begin
    if (rst) begin
      int1_q   <= '0;
      int2_q   <= '0;
      sat_flag <= 1'b0;
    end else begin
      int1_q   <= (INT_W+1)'(int2_q) + (int_en ? (INT_W+1)'(kiv) : '0);
      int2_q   <= int_clear ? '0 : INT_W'(sat(32'(int_sum), INT_W));
      sat_flag <= !int_clear && (sat(32'(int_sum), INT_W) != 32'(int_sum));
    end
  end

  // ---------------- output adder -------------------------------------------
  logic signed [INT_W:0] osum;
  assign osum = (INT_W+1)'(err3_q) + (INT_W+1)'(int2_q >>> INT_SHIFT);

  always_ff @(posedge clk) begin
    if (rst) begin
      dout        <= '0;
      dout_parity <= 1'b0;
    end else begin
      dout        <= DAC_W'(sat(32'(osum), DAC_W));
      dout_parity <= par_3;
    end
  end

  assign ff_parity = par_3;
  assign kcm_busy  = busy_a | busy_b | busy_i;

endmodule
