// sc_func_top -- the eight stochastic arithmetic function units side by side.
//
// One input x in [0,1) (10-bit, value x/1024) and one start pulse drive all
// eight units; each evaluates its own function with 1024-bit stochastic streams
// and delivers its result as a 10-bit count (value/1024):
//   y[FN_LN1P]  ln(1+x)       two-NAND unit
//   y[FN_TANH]  tanh(x)       two-NAND unit
//   y[FN_SIGMOID] sigmoid(x)  two-NAND unit
//   y[FN_SIN]   sin(x)        two-NAND unit
//   y[FN_EXP2]  e^-2x         AND/delay/XOR + NAND unit with MSB multiplexer
//   y[FN_COS]   cos(x)        one-NAND unit
//   y[FN_EXP1]  e^-x          one-NAND unit
//   y[FN_SINPI] sin(pi x)/pi  two-NAND + NAND unit with MSB multiplexer
// The units are independent circuits (each its own SNGs, LUTs and counter), as
// each function is a separate implementation; putting them under one start and
// one x is this implementation's packaging. All units share the same timing, so
// `busy` is their OR and `done` their AND: the results are valid STREAM_LEN+1
// = 1025 cycles after the start cycle. SEGS (8 by default, or 16) is passed to
// every unit and selects the number of approximation segments.
module sc_func_top
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
  output logic [W-1:0] y [NFUNC]
);

  logic [NFUNC-1:0] busy_v, done_v;

  sc_unit_2nand #(.FN(FN_LN1P), .W(W), .SEGS(SEGS)) u_ln1p (
    .clk, .rst_n, .start, .x, .busy (busy_v[FN_LN1P]), .done (done_v[FN_LN1P]), .y (y[FN_LN1P])
  );
  sc_unit_2nand #(.FN(FN_TANH), .W(W), .SEGS(SEGS)) u_tanh (
    .clk, .rst_n, .start, .x, .busy (busy_v[FN_TANH]), .done (done_v[FN_TANH]), .y (y[FN_TANH])
  );
  sc_unit_2nand #(.FN(FN_SIGMOID), .W(W), .SEGS(SEGS)) u_sigmoid (
    .clk, .rst_n, .start, .x, .busy (busy_v[FN_SIGMOID]), .done (done_v[FN_SIGMOID]), .y (y[FN_SIGMOID])
  );
  sc_unit_2nand #(.FN(FN_SIN), .W(W), .SEGS(SEGS)) u_sin (
    .clk, .rst_n, .start, .x, .busy (busy_v[FN_SIN]), .done (done_v[FN_SIN]), .y (y[FN_SIN])
  );
  sc_unit_exp2x #(.W(W), .SEGS(SEGS)) u_exp2 (
    .clk, .rst_n, .start, .x, .busy (busy_v[FN_EXP2]), .done (done_v[FN_EXP2]), .y (y[FN_EXP2])
  );
  sc_unit_nand #(.FN(FN_COS), .W(W), .SEGS(SEGS)) u_cos (
    .clk, .rst_n, .start, .x, .busy (busy_v[FN_COS]), .done (done_v[FN_COS]), .y (y[FN_COS])
  );
  sc_unit_nand #(.FN(FN_EXP1), .W(W), .SEGS(SEGS)) u_exp1 (
    .clk, .rst_n, .start, .x, .busy (busy_v[FN_EXP1]), .done (done_v[FN_EXP1]), .y (y[FN_EXP1])
  );
  sc_unit_sinpi #(.W(W), .SEGS(SEGS)) u_sinpi (
    .clk, .rst_n, .start, .x, .busy (busy_v[FN_SINPI]), .done (done_v[FN_SINPI]), .y (y[FN_SINPI])
  );

  assign busy = |busy_v;
  assign done = &done_v;

endmodule
