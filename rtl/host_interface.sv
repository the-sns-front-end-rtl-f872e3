// host_interface: register map seen by the embedded host computer over its
// expansion bus (16-bit data, 64K-word address space), in the host-bus
// clock domain (25 MHz).
//
// Bus: one-clock strobes. `h_wr` writes `h_wdata` to `h_addr`; `h_rd`
// requests a read and `h_rdata` holds the word during the following clock.
//
//   0x0000 CTRL      run, feedback enable, integrate enable, loop sign,
//                    offset tracking, feed-forward enable (llrf_pkg::ctrl_t)
//   0x0001 ISET      0x0002 QSET     set point, signed 12 bit
//   0x0003 KPA       0x0004 KPB      complex proportional gain kA + j*kB
//   0x0005 KI        integral gain   (signed 10 bit; a write reloads the
//                                     multiplier tables)
//   0x0006 FF_DWELL  0x0007 TR_DECIM 0x0008 TR_DELAY 0x0009 TAIL 0x000A WAKE
//   0x000B TRIG_MAX  trigger watchdog in 64-clock units, 0 = off
//   0x0010 STATUS    read: irq, multiplier reload busy, sync locked, ADC asleep
//   0x0011 ERRORS    read-and-clear latched errors (llrf_pkg::err_t)
//   0x0012 HANDSHAKE write: software has finished with this pulse
//   0x0013 PULSES    read: pulses since reset
//   0x1000-0x17FF    four 512-word trace buffers, read only
//   0x2000-0x21FF    feed-forward table, read/write
//
// Registers are read back at their own address. Configuration registers
// are used by the 40 MHz domain without synchronisation: the host changes
// them only between pulses. Event inputs (`ev_*`) are single host-clock
// pulses already brought into this domain; the latched error word gathers
// them until the software reads it, so each error is counted once. The
// register map is this design's; the 64K x 16 window, the read-and-clear
// errors and the handshake flag follow the original system.
module host_interface
  import llrf_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic [HA-1:0]            h_addr,
  input  logic                     h_wr,
  input  logic                     h_rd,
  input  logic [HW-1:0]            h_wdata,
  output logic [HW-1:0]            h_rdata,
  // configuration
  output ctrl_t                    ctrl,
  output logic signed [ADC_W-1:0]  iset,
  output logic signed [ADC_W-1:0]  qset,
  output logic signed [COEF_W-1:0] kpa,
  output logic signed [COEF_W-1:0] kpb,
  output logic signed [COEF_W-1:0] ki,
  output logic                     wr_kpa,
  output logic                     wr_kpb,
  output logic                     wr_ki,
  output logic [15:0]              ff_dwell,
  output logic [15:0]              tr_decim,
  output logic [15:0]              tr_delay,
  output logic [15:0]              tail_len,
  output logic [15:0]              wake,
  output logic [15:0]              trig_max,
  output logic                     hs_done,
  // status and events
  input  logic                     irq,
  input  logic                     kcm_busy,
  input  logic                     locked,
  input  logic                     adc_pdn,
  input  logic [15:0]              pulse_count,
  input  logic                     ev_handshake,
  input  logic                     ev_gate,
  input  logic                     ev_sync,
  input  logic                     ev_clk,
  input  logic                     ev_sat,
  input  logic                     ev_trig,
  // buffers
  output logic [8:0]               mem_addr,
  input  logic [15:0]              tr_rdata [4],
  output logic                     ff_we,
  output logic [7:0]               ff_wdata,
  input  logic [7:0]               ff_rdata
);
  typedef enum logic [1:0] {R_REG, R_TRACE, R_FF} rsel_t;

  err_t            err_q;
  logic [HW-1:0]   reg_rd_q;
  rsel_t           rsel_q;
  logic [1:0]      tsel_q;
  logic [HW-1:0]   regmux;
  logic            is_trace, is_ff;

  assign mem_addr = h_addr[8:0];
  assign is_trace = (h_addr[15:11] == 5'b00010);   // 0x1000-0x17FF
  assign is_ff    = (h_addr[15:9]  == 7'b0010000); // 0x2000-0x21FF
  assign ff_we    = h_wr && is_ff;
  assign ff_wdata = h_wdata[7:0];

  always_comb begin
    unique case (h_addr)
      A_CTRL:     regmux = ctrl;
      A_ISET:     regmux = HW'(iset);
      A_QSET:     regmux = HW'(qset);
      A_KPA:      regmux = HW'(kpa);
      A_KPB:      regmux = HW'(kpb);
      A_KI:       regmux = HW'(ki);
      A_FF_DWELL: regmux = ff_dwell;
      A_TR_DECIM: regmux = tr_decim;
      A_TR_DELAY: regmux = tr_delay;
      A_TAIL:     regmux = tail_len;
      A_WAKE:     regmux = wake;
      A_TRIG_MAX: regmux = trig_max;
      A_STATUS:   regmux = {12'd0, adc_pdn, locked, kcm_busy, irq};
      A_ERRORS:   regmux = err_q;
      A_PULSES:   regmux = pulse_count;
      default:    regmux = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl     <= '0;
      iset     <= '0;
      qset     <= '0;
      kpa      <= '0;
      kpb      <= '0;
      ki       <= '0;
      ff_dwell <= '0;
      tr_decim <= '0;
      tr_delay <= '0;
      tail_len <= '0;
      wake     <= '0;
      trig_max <= '0;
      wr_kpa   <= 1'b0;
      wr_kpb   <= 1'b0;
      wr_ki    <= 1'b0;
      hs_done  <= 1'b0;
      err_q    <= '0;
      reg_rd_q <= '0;
      rsel_q   <= R_REG;
      tsel_q   <= '0;
    end else begin
      wr_kpa  <= 1'b0;
      wr_kpb  <= 1'b0;
      wr_ki   <= 1'b0;
      hs_done <= 1'b0;
      if (h_wr) begin
        unique case (h_addr)
          A_CTRL:      ctrl     <= h_wdata;
          A_ISET:      iset     <= ADC_W'(h_wdata);
          A_QSET:      qset     <= ADC_W'(h_wdata);
          A_KPA:       begin kpa <= COEF_W'(h_wdata); wr_kpa <= 1'b1; end
          A_KPB:       begin kpb <= COEF_W'(h_wdata); wr_kpb <= 1'b1; end
          A_KI:        begin ki  <= COEF_W'(h_wdata); wr_ki  <= 1'b1; end
          A_FF_DWELL:  ff_dwell <= h_wdata;
          A_TR_DECIM:  tr_decim <= h_wdata;
          A_TR_DELAY:  tr_delay <= h_wdata;
          A_TAIL:      tail_len <= h_wdata;
          A_WAKE:      wake     <= h_wdata;
          A_TRIG_MAX:  trig_max <= h_wdata;
          A_HANDSHAKE: hs_done  <= 1'b1;
          default: ;
        endcase
      end
      // latched errors: new events set bits, a read of ERRORS clears the
      // bits it returned
      if (h_rd && h_addr == A_ERRORS) err_q <= '0;
      if (ev_sat)       err_q.sat_err       <= 1'b1;
      if (ev_handshake) err_q.handshake_err <= 1'b1;
      if (ev_gate)      err_q.gate_err      <= 1'b1;
      if (ev_sync)      err_q.sync_err      <= 1'b1;
      if (ev_clk)       err_q.clk_err       <= 1'b1;
      if (ev_trig)      err_q.trig_err      <= 1'b1;
      if (h_rd) begin
        reg_rd_q <= regmux;
        rsel_q   <= is_trace ? R_TRACE : (is_ff ? R_FF : R_REG);
        tsel_q   <= h_addr[10:9];
      end
    end
  end

  always_comb begin
    unique case (rsel_q)
      R_TRACE: h_rdata = tr_rdata[tsel_q];
      R_FF:    h_rdata = {{8{ff_rdata[7]}}, ff_rdata};
      default: h_rdata = reg_rd_q;
    endcase
  end
endmodule
