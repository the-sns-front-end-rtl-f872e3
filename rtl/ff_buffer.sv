// ff_buffer: feed-forward table (512 x 8 by default) played into the
// integrator during an RF pulse.
//
// The host writes and reads the table through its own clock port between
// pulses. During a pulse the table is read once per 40 MHz cycle: the entry
// at {pair pointer, parity} where `parity` (0 = I, 1 = Q) is the channel
// the data path is about to integrate; the entry appears on `ff` one clock
// later. Entries are signed increments, so a constant pair produces a ramp
// and the integrator turns the table into the drive waveform. The pair
// pointer starts at 0 on `start`, advances after every (dwell+1) Q reads
// while `run` is high, and stays on the last pair at the end of the table.
// Playback always begins with an I entry: a Q request before the first I
// request after `start` reads 0, so both channels see every pair the same
// number of times wherever the pulse starts in the I/Q sequence. With `run`
// low, and in the `start` cycle, the output is 0.
//
// Size and entry width follow the original system's data-path diagram; the pair
// layout, the dwell counter and the hold-at-end rule are this design's own.
module ff_buffer #(
  parameter int DEPTH = 512,
  parameter int WIDTH = 8,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic                    run,
  input  logic                    parity,
  input  logic [15:0]             dwell,
  output logic signed [WIDTH-1:0] ff,
  input  logic                    h_clk,
  input  logic                    h_we,
  input  logic [AW-1:0]           h_addr,
  input  logic [WIDTH-1:0]        h_wdata,
  output logic [WIDTH-1:0]        h_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge h_clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    h_rdata <= mem[h_addr];
  end

  logic [AW-2:0] ptr_q;
  logic [15:0]   dw_q;
  logic          act_q;    // an I entry has been played since start

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr_q <= '0;
      dw_q  <= '0;
      act_q <= 1'b0;
      ff    <= '0;
    end else begin
      ff <= (run && !start && (act_q || !parity)) ? signed'(mem[{ptr_q, parity}]) : '0;
      if (start) begin
        ptr_q <= '0;
        dw_q  <= '0;
        act_q <= 1'b0;
      end else if (run && !parity) begin
        act_q <= 1'b1;
      end else if (run && parity && act_q) begin
        if (dw_q >= dwell) begin
          dw_q <= '0;
          if (ptr_q != '1) ptr_q <= ptr_q + 1'b1;
        end else begin
          dw_q <= dw_q + 16'd1;
        end
      end
    end
  end
endmodule
