// operand_adder: unsigned W-bit adder with carry out (Adder 1 and Adder 2).
//
// The operator sums its two excitatory operands (A+B) in one instance and its two
// inhibitory operands (C+D) in another. The result is W+1 bits wide: the carry out
// becomes the top bit, exactly as the COUT pin of the schematic becomes S8 of the
// 9-bit sum S(8..0). Each input carries weight one, so the sum is the plain
// arithmetic sum of the two operand words.
//
// Interface: a, b (W bits, unsigned) in; sum (W+1 bits) out.
// Timing: purely combinational, no clock.
// The width (8) and the carry-out-as-MSB layout follow the schematic. The internal
// adder structure (ripple, carry-lookahead, ...) is left to synthesis.
module operand_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum
);

  always_comb begin
    sum = {1'b0, a} + {1'b0, b};
  end

endmodule
