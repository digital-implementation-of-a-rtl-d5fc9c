// difference_subtractor: excitatory sum minus inhibitory sum (the Subtractor).
//
// Both operands are unsigned W-bit sums. The result is a (W+1)-bit two's-complement
// word: operands are zero-extended by one bit and subtracted modulo 2^(W+1). With
// W = 9 this gives R(9..0). A positive difference (excitation wins) appears as a
// small positive number. A negative difference (inhibition wins) wraps to a large
// unsigned value, e.g. 0x117 - 0x119 = 0x3FE and 0x080 - 0x129 = 0x357.
//
// Interface: minuend, subtrahend (W bits) in; diff (W+1 bits) out.
// Timing: purely combinational.
// The widths and the wrap-around encoding follow the recorded waveforms of the
// original circuit; the subtractor's gate structure is left to synthesis.
module difference_subtractor #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] minuend,
  input  logic [W-1:0] subtrahend,
  output logic [W:0]   diff
);

  always_comb begin
    diff = {1'b0, minuend} - {1'b0, subtrahend};
  end

endmodule
