// sc_unit_nand -- one-NAND stochastic function unit, for e^-x and cos(x).
//
// For these functions every slope a_i is negative, so the segment line is
// rewritten as f(x) = 1 - (|a_i|/b_i) x, a product of two probabilities followed
// by a complement: a single NAND gate. LUT-A (addressed by the three MSBs of x)
// holds |a_i|/b_i; one SNG turns x into a stream, a second SNG turns the LUT
// word into a stream, the NAND combines them and a counter turns the result
// back into binary. Note that 1 - (|a_i|/b_i) x equals the segment line b_i -
// |a_i| x only up to the factor b_i; the circuit computes the former, as in the
// architecture it follows. Structure (SNG, LUT-A, NAND, counter) follows that
// architecture; the SNG random sources, sequencing and saturation are this
// implementation's choices.
//
// SEGS sets the number of segments: 8 (default; printed coefficients) or 16
// (coefficients fitted at elaboration, see sc_pkg). The segment index is the
// log2(SEGS) MSBs of x; segment numbers above are for the default of 8, and in
// general the lower and upper halves of the segments are meant.
//
// Interface/timing: pulse `start` with x valid; `done` rises STREAM_LEN+1
// cycles later with y = number of ones in the STREAM_LEN-bit output stream
// (saturated to 2^W-1) and stays until the next start.
module sc_unit_nand
  import sc_pkg::*;
#(
  parameter func_e       FN = FN_EXP1,
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
  logic [W-1:0] x_q, lut_a;
  logic         sx, sa, s_out;

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

  assign s_out = ~(sx & sa);

  sc_counter #(.W(W)) u_cnt (
    .clk, .rst_n, .clr (load), .en, .bit_i (s_out), .count (y)
  );

endmodule
