// magnitude_comparator: W-bit unsigned comparator with its output gate (fire function).
//
// It compares the registered difference R (operand a) with the threshold M
// (operand b), both taken as unsigned W-bit numbers. It gives two flags, a > b and
// a == b, and the fire output ge = (a > b) | (a == b), i.e. a >= b. In the
// original schematic the comparator drives two outputs (S1, S0) into a small AND/OR
// gate pair that produces "Salida"; the function of that pair, as the recorded
// waveforms show it, is "fire when R >= M", and that is what ge implements.
//
// Because the compare is unsigned, a negative difference (inhibition stronger than
// excitation) reads as a large number and fires for every threshold below it.
// That matches the recorded behaviour (R = 0x3FE fires against M = 0xB2).
//
// Interface: a, b (W bits) in; gt, eq, ge out.
// Timing: purely combinational.
// The names gt/eq for S1/S0 are this design's choice.
module magnitude_comparator #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         gt,
  output logic         eq,
  output logic         ge
);

  always_comb begin
    gt = (a > b);
    eq = (a == b);
    ge = gt | eq;
  end

endmodule
