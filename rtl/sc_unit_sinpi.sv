// sc_unit_sinpi -- stochastic function unit for sin(pi x)/pi.
//
// The slopes a_i are positive in segments 0-3 and negative in segments 4-7, so
// the unit holds both forms and a 2:1 multiplexer driven by the MSB of x picks
// one:
//   X1 (segments 0-3): 1 - c_i (1 - (a_i/c_i) x), two cascaded NANDs, c_i = 1-b_i
//   X2 (segments 4-7): 1 - (|a_i|/b_i) x, one NAND
// LUT-A holds a_i/c_i in its lower half and |a_i|/b_i in its upper half; LUT-B
// holds c_i in its lower half and zeros in its upper half. Both are addressed
// by the three MSBs of x. As with the e^-x/cos unit, X2 is the segment line only
// up to the factor b_i; the circuit is built as described. Select polarity
// (MSB=0 -> X1) is this implementation's reading; random sources, sequencing and
// saturation are its own choices.
//
// SEGS sets the number of segments: 8 (default; printed coefficients) or 16
// (coefficients fitted at elaboration, see sc_pkg). The segment index is the
// log2(SEGS) MSBs of x; segment numbers above are for the default of 8, and in
// general the lower and upper halves of the segments are meant.
//
// Interface/timing: pulse `start` with x valid; `done` rises STREAM_LEN+1
// cycles later with y = ones in the output stream (saturated), held until the
// next start.
module sc_unit_sinpi
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

  localparam func_e FN = FN_SINPI;

  logic         load, en;
  logic [W-1:0] x_q, lut_a, lut_b;
  logic         sx, sa, sb, s_inner, s_x1, s_x2, s_out;

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

  assign s_inner = ~(sx & sa);          // 1 - (a_i/c_i) x
  assign s_x1    = ~(s_inner & sb);     // segments 0-3
  assign s_x2    = ~(sx & sa);          // segments 4-7: 1 - (|a_i|/b_i) x
  assign s_out   = x_q[W-1] ? s_x2 : s_x1;

  sc_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clr (load), .en, .bit_i (s_out), .count (y)
  );

endmodule
