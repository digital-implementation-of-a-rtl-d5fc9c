// threshold_ramp: periodic descending-ramp threshold generator h(t).
//
// A W-bit down counter that starts at its maximum (255 for W = 8), steps down by
// one every STEP_CYCLES clock cycles, and after 0 wraps back to the maximum, so it
// repeats as a sawtooth. Its value, zero-extended to OUT_W bits, is the
// time-varying threshold M(9..0) of the generalized operator: as M sweeps, the
// operator moves through different Boolean connectives for the same inputs.
//
// Interface: clk, rst_n (active-low async), en (count enable) in; m (OUT_W bits)
// and wrap (one-cycle pulse on the step from 0 back to the maximum) out.
// Timing: m changes only on a rising clk edge, once every STEP_CYCLES enabled
// cycles. After reset m = maximum. Bits OUT_W-1..W of m are constant zero by
// design: the threshold word is wider than the ramp.
// The ramp shape (255 down to 0, one step every 2 ms with a 1 kHz clock, i.e.
// every 2 cycles, upper bits M(9..8) = 0) follows the recorded test; the enable,
// the wrap pulse and the reset value are this design's choices.
module threshold_ramp #(
  parameter int unsigned W           = 8,
  parameter int unsigned OUT_W       = 10,
  parameter int unsigned STEP_CYCLES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [OUT_W-1:0] m,
  output logic             wrap
);

  localparam int unsigned PW = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;

  logic [W-1:0]  level;
  logic [PW-1:0] presc;
  logic          step;

  always_comb begin
    step = en && (presc == PW'(STEP_CYCLES - 1));
    wrap = step && (level == '0);
    m    = OUT_W'(level);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level <= '1;
      presc <= '0;
    end else if (en) begin
      if (step) begin
        presc <= '0;
        level <= level - 1'b1;   // 0 - 1 wraps to all ones
      end else begin
        presc <= presc + 1'b1;
      end
    end
  end

endmodule
