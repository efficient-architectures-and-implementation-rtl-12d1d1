// sc_counter -- stochastic-to-binary converter.
//
// Counts the ones of the output bit stream over one conversion window. With a
// 2^W-bit window and a W-bit result the count 2^W (an all-ones stream) does not
// fit, so the counter saturates at 2^W-1; the saturation is this
// implementation's choice, the W-bit output width is the documented one.
//
// Interface: `clr` zeroes the count (priority over `en`); when `en` is high the
// count is incremented if bit_i is 1. `count` is the registered value.
module sc_counter #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         bit_i,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (clr) begin
      count <= '0;
    end else if (en && bit_i && (count != '1)) begin
      count <= count + 1'b1;
    end
  end

endmodule
