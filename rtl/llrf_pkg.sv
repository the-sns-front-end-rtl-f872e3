// llrf_pkg: shared widths, register addresses and helper functions of the
// LLRF controller FPGA.
//
// The data widths follow the controller's data-path drawing: 12-bit ADC
// samples, a 10-bit error signal, 11-bit proportional products, a 16-bit
// integrator, 8-bit feed-forward entries and 12-bit DAC words. The register
// addresses inside the 64K x 16 host window are this design's own choice.
package llrf_pkg;

  localparam int ADC_W  = 12;   // ADC sample width
  localparam int ERR_W  = 10;   // error signal after "saturate to 10 bits"
  localparam int KP_W   = 11;   // proportional DKCM output width
  localparam int INT_W  = 16;   // integrator width
  localparam int FF_W   = 8;    // feed-forward table entry width
  localparam int DAC_W  = 12;   // DAC word width
  localparam int COEF_W = 10;   // DKCM coefficient width (own choice)
  localparam int HW     = 16;   // host bus data width
  localparam int HA     = 16;   // host bus address width (64K words)

  // I/Q/-I/-Q phase of a sample at 40 MS/s (10 MHz sync period = 4 samples)
  typedef enum logic [1:0] {PH_I = 2'd0, PH_Q = 2'd1, PH_NI = 2'd2, PH_NQ = 2'd3} iq_phase_t;

  // Host register addresses (word addresses)
  localparam logic [HA-1:0] A_CTRL      = 16'h0000;
  localparam logic [HA-1:0] A_ISET      = 16'h0001;
  localparam logic [HA-1:0] A_QSET      = 16'h0002;
  localparam logic [HA-1:0] A_KPA       = 16'h0003;
  localparam logic [HA-1:0] A_KPB       = 16'h0004;
  localparam logic [HA-1:0] A_KI        = 16'h0005;
  localparam logic [HA-1:0] A_FF_DWELL  = 16'h0006;
  localparam logic [HA-1:0] A_TR_DECIM  = 16'h0007;
  localparam logic [HA-1:0] A_TR_DELAY  = 16'h0008;
  localparam logic [HA-1:0] A_TAIL      = 16'h0009;
  localparam logic [HA-1:0] A_WAKE      = 16'h000A;
  localparam logic [HA-1:0] A_TRIG_MAX  = 16'h000B;  // trigger watchdog
  localparam logic [HA-1:0] A_STATUS    = 16'h0010;
  localparam logic [HA-1:0] A_ERRORS    = 16'h0011;  // read-and-clear
  localparam logic [HA-1:0] A_HANDSHAKE = 16'h0012;  // write: software done
  localparam logic [HA-1:0] A_PULSES    = 16'h0013;  // pulse counter
  localparam logic [HA-1:0] A_TRACE0    = 16'h1000;  // 4 x 512 words, read
  localparam logic [HA-1:0] A_FF        = 16'h2000;  // 512 words, write/read

  // CTRL register bits
  typedef struct packed {
    logic [9:0] unused;
    logic       ff_en;       // play the feed-forward table during the pulse
    logic       offset_en;   // track the ADC offset (auto-offset subtraction)
    logic       loop_sign;   // inverts the 10 MHz sign flip
    logic       int_en;      // integrate enable
    logic       fb_en;       // feedback enable
    logic       run;         // respond to RF gate triggers
  } ctrl_t;

  // Latched error bits (read-and-clear)
  typedef struct packed {
    logic [9:0]  unused;
    logic        trig_err;      // trigger missing or erratic
    logic        clk_err;       // 40 MHz clock missing or erratic
    logic        sync_err;      // 10 MHz sync missing or misplaced
    logic        gate_err;      // RF gate longer than allowed
    logic        handshake_err; // new pulse before software finished
    logic        sat_err;       // integrator reached its limit
  } err_t;

  // Saturate a signed value of width IN to the range of OUT bits.
  function automatic logic signed [31:0] sat(input logic signed [31:0] v, input int out_w);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (out_w - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (out_w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
