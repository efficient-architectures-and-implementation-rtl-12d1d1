// sc_lfsr -- W-bit pseudo-random number source for a stochastic number generator.
//
// A Fibonacci LFSR (shift towards the MSB, feedback into bit 0) whose feedback
// is additionally inverted when the low W-1 bits are all zero. That extra term
// splices the all-zero state into the maximal-length cycle, so with a primitive
// feedback polynomial the register walks through all 2^W values exactly once
// per 2^W cycles (a de Bruijn counter). A stream of 2^W bits therefore holds
// each random number exactly once. The random source, its polynomial and the
// de Bruijn extension are choices of this implementation; the underlying
// description only says that an SNG compares the value with a random number.
//
// Interface: `load` puts SEED into the register (priority over `en`); `en`
// advances it by one step. `rnd` is the current state. One step per clock.
module sc_lfsr #(
  parameter int unsigned W    = 10,
  parameter logic [W-1:0] TAPS = 10'h240,  // x^10 + x^7 + 1
  parameter logic [W-1:0] SEED = 10'h001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] rnd
);

  logic fb;

  always_comb begin
    fb = (^(rnd & TAPS)) ^ (rnd[W-2:0] == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rnd <= SEED;
    end else if (load) begin
      rnd <= SEED;
    end else if (en) begin
      rnd <= {rnd[W-2:0], fb};
    end
  end

endmodule
