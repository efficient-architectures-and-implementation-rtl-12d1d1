// sc_unit_2nand -- two-NAND stochastic function unit, for ln(1+x), tanh(x),
// sigmoid(x) and sin(x).
//
// For these functions a_i and b_i are both in [0,1]. With c_i = 1 - b_i the
// segment line becomes f(x) = 1 - c_i (1 - (a_i/c_i) x): the inner NAND gives
// 1 - (a_i/c_i) x and the outer NAND with a c_i stream gives f(x), with no
// adder. LUT-A holds a_i/c_i, LUT-B holds c_i, both addressed by the three MSBs
// of x; three SNGs with mutually different feedback polynomials keep the three
// streams uncorrelated. The structure (3 SNGs, 2 LUTs, 2 NANDs, counter)
// follows the architecture it implements; random sources, sequencing and
// counter saturation are this implementation's choices.
//
// SEGS sets the number of segments: 8 (default; printed coefficients) or 16
// (coefficients fitted at elaboration, see sc_pkg). The segment index is the
// log2(SEGS) MSBs of x; segment numbers above are for the default of 8, and in
// general the lower and upper halves of the segments are meant.
//
// Interface/timing: pulse `start` with x valid; `done` rises STREAM_LEN+1
// cycles later with y = ones in the output stream (saturated), held until the
// next start.
module sc_unit_2nand
  import sc_pkg::*;
#(
  parameter func_e       FN = FN_SIGMOID,
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

  logic         load, en;
  logic [W-1:0] x_q, lut_a, lut_b;
  logic         sx, sa, sb, s_inner, s_out;

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

  sc_coef_lut #(.FN(FN), .SEL(LUT_B), .W(W), .SEGS(SEGS)) u_lut_b (
    .seg (x_q[W-1 -: $clog2(SEGS)]), .coef (lut_b)
  );

  sc_sng #(.W(W), .TAPS(W'(10'h240)), .SEED(W'(10'h001))) u_sng_x (
    .clk, .rst_n, .load, .en, .b (x_q), .bit_o (sx)
  );

  sc_sng #(.W(W), .TAPS(W'(10'h204)), .SEED(W'(10'h001))) u_sng_a (
    .clk, .rst_n, .load, .en, .b (lut_a), .bit_o (sa)
  );

  sc_sng #(.W(W), .TAPS(W'(10'h390)), .SEED(W'(10'h001))) u_sng_b (
    .clk, .rst_n, .load, .en, .b (lut_b), .bit_o (sb)
  );

  assign s_inner = ~(sx & sa);        // 1 - (a_i/c_i) x
  assign s_out   = ~(s_inner & sb);   // 1 - c_i (1 - (a_i/c_i) x)

  sc_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clr (load), .en, .bit_i (s_out), .count (y)
  );

endmodule
