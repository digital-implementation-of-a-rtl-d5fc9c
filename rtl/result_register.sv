// result_register: W-bit D flip-flop bank with active-low asynchronous clear.
//
// It samples the subtractor output R on each rising edge of the operator clock and
// holds it for the comparator. This register is what gives the operator its unit
// delay: a change of the inputs reaches the output "Salida" only at the next rising
// clock edge (the t -> t+1 step of the fire rule).
//
// Interface: clk, clrn (active low, asynchronous), d (W bits) in; q (W bits) out.
// Timing: q <= d on posedge clk; q = 0 while clrn is low.
// Width 10 and the CLRN pin follow the schematic (where CLRN is tied high). The
// reset value zero is this design's choice.
module result_register #(
  parameter int unsigned W = 10
) (
  input  logic         clk,
  input  logic         clrn,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) q <= '0;
    else       q <= d;
  end

endmodule
