// generalized_operator: the time-dependent generalized logical operator (a
// McCulloch-Pitts threshold neuron built from adders, a subtractor, a register
// and a comparator).
//
// Two excitatory 8-bit operands A, B are added into S_a (9 bits) and two
// inhibitory operands C, D into S_b. The subtractor forms R = S_a - S_b as a
// 10-bit two's-complement word. A 10-bit D register samples R on each rising clock
// edge. A comparator then sets the output "Salida" to 1 when the registered R is
// at least the threshold M, taken as unsigned 10-bit numbers:
//
//   salida(t+1) = ( R(t) >= M ),   R(t) = (A+B) - (C+D) mod 2^10
//
// By choosing M (and holding M over time, or sweeping it) the same circuit acts as
// AND, OR, NOR, NOT, implication and the other threshold connectives.
//
// Interface: clk, clrn (active-low async clear of the register); a, b, c, d
// (IN_W bits each); m (threshold, IN_W+2 bits). Outputs: s_a, s_b (pair sums),
// r (unregistered difference, the R(9..0) probe of the schematic), r_q (the
// registered difference the comparator sees), salida.
// Timing: one register stage. A change on a..d shows on salida after the next
// rising edge of clk. m is not registered: salida follows m combinationally.
// The datapath structure and widths follow the original schematic; the unsigned
// compare follows its recorded waveforms. Register reset value is this design's.
module generalized_operator #(
  parameter int unsigned IN_W = functor_pkg::IN_W
) (
  input  logic            clk,
  input  logic            clrn,
  input  logic [IN_W-1:0] a,
  input  logic [IN_W-1:0] b,
  input  logic [IN_W-1:0] c,
  input  logic [IN_W-1:0] d,
  input  logic [IN_W+1:0] m,
  output logic [IN_W:0]   s_a,
  output logic [IN_W:0]   s_b,
  output logic [IN_W+1:0] r,
  output logic [IN_W+1:0] r_q,
  output logic            salida
);

  // Adder 1: excitatory inputs.
  operand_adder #(.W(IN_W)) u_adder_exc (.a(a), .b(b), .sum(s_a));

  // Adder 2: inhibitory inputs.
  operand_adder #(.W(IN_W)) u_adder_inh (.a(c), .b(d), .sum(s_b));

  // Subtractor: R = S_a - S_b, two's complement, one bit wider than a sum.
  difference_subtractor #(.W(IN_W + 1)) u_sub (
    .minuend   (s_a),
    .subtrahend(s_b),
    .diff      (r)
  );

  // Flip-Flop D: the unit delay of the operator.
  result_register #(.W(IN_W + 2)) u_reg (
    .clk (clk),
    .clrn(clrn),
    .d   (r),
    .q   (r_q)
  );

  // Comparator and output gates: fire when R >= M.
  magnitude_comparator #(.W(IN_W + 2)) u_cmp (
    .a (r_q),
    .b (m),
    .gt(),
    .eq(),
    .ge(salida)
  );

endmodule
