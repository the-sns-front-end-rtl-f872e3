// dkcm: dynamic constant-coefficient multiplier ("loadable KCM").
//
// Multiplies a signed sample by a coefficient without a hardware multiplier:
// the coefficient lives in a 16-entry table of its multiples 0*k .. 15*k,
// and the product is the sum of three table look-ups (input bits [3:0],
// [7:4] and the remaining top bits, shifted by 0, 4 and 8) minus a
// correction for the sign bit. Reloading the coefficient rewrites the table,
// one entry per clock, by repeated addition; this is the FPGA trick of a
// constant-coefficient multiplier whose look-up cells are writable, so the
// coefficient can change between beam pulses.
//
// Interface: pulse `load` for one cycle with the new coefficient on `coef`;
// `busy` is high for the 16 cycles of the rebuild and the output reads 0
// meanwhile. `y` = saturate((x * k) >>> SHIFT) to OUT_W bits, combinational
// from `x` (the look-up is a logic-cell read, no register).
//
// The table organisation, the coefficient width, the scaling and the
// behaviour during a reload are this design's choices; the widths 10 in and
// 11 out are those of the proportional multipliers of the data path.
module dkcm #(
  parameter int IN_W   = 10,
  parameter int COEF_W = 10,
  parameter int OUT_W  = 11,
  parameter int SHIFT  = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     load,
  input  logic signed [COEF_W-1:0] coef,
  output logic                     busy,
  input  logic signed [IN_W-1:0]   x,
  output logic signed [OUT_W-1:0]  y
);
  localparam int TW = COEF_W + 4;            // table entry width
  localparam int PW = COEF_W + IN_W + 1;     // full product width

  logic signed [TW-1:0]     table_q [16];
  logic signed [COEF_W-1:0] k_q;             // coefficient being loaded/held
  logic [4:0]               idx_q;           // rebuild index, 16 = idle
  logic signed [TW-1:0]     acc_q;           // running multiple idx*k

  initial begin
    if (IN_W <= 8 || IN_W > 12) $error("dkcm: IN_W must be 9..12");
  end

  assign busy = (idx_q != 5'd16);

  always_ff @(posedge clk) begin
    if (rst) begin
      idx_q <= 5'd16;
      acc_q <= '0;
      k_q   <= '0;
      for (int i = 0; i < 16; i++) table_q[i] <= '0;
    end else if (load) begin
      k_q   <= coef;
      idx_q <= 5'd0;
      acc_q <= '0;
    end else if (busy) begin
      table_q[idx_q[3:0]] <= acc_q;
      acc_q <= acc_q + TW'(k_q);
      idx_q <= idx_q + 5'd1;
    end
  end

  // three look-ups of the shared table (one copy per nibble in hardware)
  logic signed [TW-1:0] p0, p1, p2;
  logic signed [PW-1:0] prod;
  always_comb begin
    p0 = table_q[x[3:0]];
    p1 = table_q[x[7:4]];
    p2 = table_q[4'(unsigned'(x[IN_W-1:8]))];
    prod = PW'(p0) + (PW'(p1) <<< 4) + (PW'(p2) <<< 8);
    // top bit has weight -2^(IN_W-1) in two's complement, not +2^(IN_W-1)
    if (x[IN_W-1]) prod = prod - (PW'(table_q[1]) <<< IN_W);
  end

  assign y = busy ? '0 : OUT_W'(llrf_pkg::sat(32'(prod >>> SHIFT), OUT_W));

endmodule
