// trace_buffer: records raw ADC samples during an RF pulse for the host.
//
// A DEPTH x WIDTH memory (512 x 16 by default) written at 40 MS/s and read
// by the host bus after the pulse. `start` (one cycle, from the pulse
// sequencer at the trigger) arms the recorder: after `delay` samples it
// stores every (decim+1)-th sample, sign-extended to WIDTH bits, until the
// memory is full, then raises `done` until the next `start`. With decim = 0
// the 512 words cover the first 12.8 us after the delay, enough for a
// leading-edge waveform; larger decim spreads them over a whole pulse.
//
// The write port runs on `clk` (40 MHz), the read port on `rd_clk` (host
// bus) with the data registered one `rd_clk` after the address. The host
// reads only between pulses, so the two ports never need to agree on time.
// The size comes from the original system's data-path diagram; delay, decimation
// and stop-when-full are this design's choices.
module trace_buffer #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 16,
  parameter int IN_W  = 12,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [15:0]            delay,
  input  logic [15:0]            decim,
  input  logic signed [IN_W-1:0] sample,
  output logic                   done,
  input  logic                   rd_clk,
  input  logic [AW-1:0]          rd_addr,
  output logic [WIDTH-1:0]       rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  typedef enum logic [1:0] {T_IDLE, T_DELAY, T_REC} tstate_t;
  tstate_t    st_q;
  logic [15:0] cnt_q;     // delay count, then decimation count
  logic [AW:0] wa_q;      // write address, DEPTH = full

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q  <= T_IDLE;
      cnt_q <= '0;
      wa_q  <= '0;
      done  <= 1'b0;
    end else if (start) begin
      st_q  <= (delay == 16'd0) ? T_REC : T_DELAY;
      cnt_q <= (delay == 16'd0) ? 16'd0 : delay - 16'd1;
      wa_q  <= '0;
      done  <= 1'b0;
    end else begin
      unique case (st_q)
        T_IDLE: ;
        T_DELAY: begin
          if (cnt_q == 16'd0) st_q <= T_REC;
          else                cnt_q <= cnt_q - 16'd1;
        end
        T_REC: begin
          if (cnt_q == 16'd0) begin
            mem[wa_q[AW-1:0]] <= WIDTH'(sample);
            cnt_q <= decim;
            if (wa_q == (AW+1)'(DEPTH - 1)) begin
              st_q <= T_IDLE;
              done <= 1'b1;
            end
            wa_q <= wa_q + 1'b1;
          end else begin
            cnt_q <= cnt_q - 16'd1;
          end
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

  always_ff @(posedge rd_clk) rd_data <= mem[rd_addr];
endmodule
