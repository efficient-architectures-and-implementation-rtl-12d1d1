// sc_unit_exp2x -- stochastic function unit for e^-2x.
//
// In segments 0-3 the ratio |a_i|/b_i exceeds 1, so it is halved: LUT-A holds
// |a_i|/(2 b_i) there, an AND gate forms p = (|a_i|/(2 b_i)) x, a one-bit delay
// (a flip-flop) decorrelates a copy of p, and an XOR of p with its delayed copy
// forms path X1, the stochastic subtraction the architecture uses for
// 1 - 2p. For independent streams an XOR yields 2p(1-p), so X1 only
// approximates 1 - 2p; the gate is built as specified. In segments 4-7 LUT-A
// holds |a_i|/b_i and a NAND forms X2 = 1 - (|a_i|/b_i) x. A 2:1 multiplexer
// driven by the MSB of x (MSB=0 -> X1, this implementation's reading of the
// select polarity) feeds the counter. The delay flip-flop is cleared at each
// start and only moves on stream cycles. Random sources, sequencing and
// saturation are this implementation's choices.
//
// SEGS sets the number of segments: 8 (default; printed coefficients) or 16
// (coefficients fitted at elaboration, see sc_pkg). The segment index is the
// log2(SEGS) MSBs of x; segment numbers above are for the default of 8, and in
// general the lower and upper halves of the segments are meant.
//
// Interface/timing: pulse `start` with x valid; `done` rises STREAM_LEN+1
// cycles later with y = ones in the output stream (saturated), held until the
// next start.
module sc_unit_exp2x
  import sc_pkg::*;
#(
  parameter int unsigned W    = 10,
  parameter int unsigned SEGS = NSEG
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] x,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] y
);

  localparam func_e FN = FN_EXP2;

  logic         load, en;
  logic [W-1:0] x_q, lut_a;
  logic         sx, sa, s_prod, s_prod_d, s_x1, s_x2, s_out;

  sc_seq #(.STREAM_LEN(1 << W)) u_seq (
    .clk, .rst_n, .start, .load, .en, .busy, .done
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    x_q <= '0;
    else if (load) x_q <= x;
  end

  sc_coef_lut #(.FN(FN), .SEL(LUT_A), .W(W), .SEGS(SEGS)) u_lut_a (
    .seg (x_q[W-1 -: $clog2(SEGS)]), .coef (lut_a)
  );

  sc_sng #(.W(W), .TAPS(W'(10'h240)), .SEED(W'(10'h001))) u_sng_x (
    .clk, .rst_n, .load, .en, .b (x_q), .bit_o (sx)
  );

  sc_sng #(.W(W), .TAPS(W'(10'h204)), .SEED(W'(10'h001))) u_sng_a (
    .clk, .rst_n, .load, .en, .b (lut_a), .bit_o (sa)
  );

  assign s_prod = sx & sa;

  // One-bit delay element.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s_prod_d <= 1'b0;
    else if (load) s_prod_d <= 1'b0;
    else if (en)   s_prod_d <= s_prod;
  end

  assign s_x1  = s_prod ^ s_prod_d;
  assign s_x2  = ~(sx & sa);
  assign s_out = x_q[W-1] ? s_x2 : s_x1;

  sc_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clr (load), .en, .bit_i (s_out), .count (y)
  );

endmodule
