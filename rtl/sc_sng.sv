// sc_sng -- stochastic number generator (binary-to-stochastic converter).
//
// Each enabled cycle it compares the binary input b with a fresh pseudo-random
// number r from sc_lfsr and emits bit_o = (r < b). With the de Bruijn random
// source every value 0..2^W-1 appears once per 2^W cycles, so after a reload a
// 2^W-bit stream holds exactly b ones: P(1) = b/2^W, as the unipolar format
// requires. The comparator structure is the generic SNG described for
// stochastic computing; the random source is this implementation's choice.
// Different SNGs feeding one gate must be uncorrelated, so each instance is
// given its own feedback polynomial (TAPS) and/or seed.
//
// Timing: bit_o is combinational from the current random state and b; `load`
// restarts the sequence at SEED, `en` moves to the next random number.
module sc_sng #(
  parameter int unsigned W    = 10,
  parameter logic [W-1:0] TAPS = 10'h240,
  parameter logic [W-1:0] SEED = 10'h001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  input  logic [W-1:0] b,
  output logic         bit_o
);

  logic [W-1:0] rnd;

  sc_lfsr #(.W(W), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load),
    .en    (en),
    .rnd   (rnd)
  );

  assign bit_o = (rnd < b);

endmodule
