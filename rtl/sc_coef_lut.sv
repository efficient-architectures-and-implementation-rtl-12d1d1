// sc_coef_lut -- coefficient look-up table (LUT-A or LUT-B of one function).
//
// A SEGS-entry (8 by default), W-bit read-only table addressed by the segment
// index, i.e. the log2(SEGS) MSBs of the input x. The word read out is the probability (value/2^W)
// that the following SNG turns into a stochastic stream. Contents are computed
// at elaboration from the piecewise-linear coefficients in sc_pkg:
//   LUT-A: |a_i|/b_i, a_i/(1-b_i) or |a_i|/(2 b_i), depending on the function
//          and the half of the input range (see sc_pkg::lut_value);
//   LUT-B: c_i = 1-b_i where the two-NAND form is used, zeros elsewhere.
// Which ratio each function stores follows the architecture description; the
// rounding to W bits is this implementation's choice.
//
// Timing: purely combinational.
module sc_coef_lut
  import sc_pkg::*;
#(
  parameter func_e       FN  = FN_SIGMOID,
  parameter lut_sel_e    SEL = LUT_A,
  parameter int unsigned W   = 10,
  parameter int unsigned SEGS = NSEG,
  localparam int unsigned SB = $clog2(SEGS)
) (
  input  logic [SB-1:0] seg,
  output logic [W-1:0]  coef
);

  logic [W-1:0] rom [SEGS];

  for (genvar i = 0; i < SEGS; i++) begin : g_rom
    assign rom[i] = W'(lut_value(FN, SEL, i, SEGS));
  end

  assign coef = rom[seg];

endmodule
