// functor_pkg: widths shared by the blocks of the generalized logical operator.
//
// The operator of the original PLD schematic takes four 8-bit operands. Two are
// excitatory (A, B) and two are inhibitory (C, D). Each pair is summed into 9 bits.
// The difference of the two sums is a 10-bit two's-complement word R(9..0). R is
// compared with a 10-bit threshold M(9..0). All of these widths come from the
// pin names of that schematic. The package holds only constants; it has no logic.
package functor_pkg;

  // Width of one operand: A(7..0), B(7..0), C(7..0), D(7..0).
  localparam int unsigned IN_W  = 8;
  // Width of a pair sum: S(8..0)a and S(8..0)b (8-bit adder plus carry out).
  localparam int unsigned SUM_W = IN_W + 1;
  // Width of the difference R(9..0): one more bit than a sum, so it holds the sign.
  localparam int unsigned R_W   = SUM_W + 1;
  // Width of the threshold M(9..0); it matches R so the comparator is square.
  localparam int unsigned M_W   = R_W;

endpackage
