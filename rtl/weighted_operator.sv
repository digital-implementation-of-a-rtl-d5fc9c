// weighted_operator: generalized operator with single-bit weighted inputs.
//
// M_EXC excitatory and N_INH inhibitory one-bit inputs, each with a fixed integer
// weight. The operator fires one clock later when
//
//   sum_i EXC_WEIGHT[i]*x_exc[i]  -  sum_j INH_WEIGHT[j]*x_inh[j]  >=  h
//
// with the difference taken as a signed number (so inhibition can drive it below
// zero and then nothing fires for h >= 0). With binary weights 8,4,2,1 on inputs
// A,B,C,D the weighted sum is the 4-bit number ABCD, so threshold 11 realises
// F = A(B + CD) and threshold 13 realises F = AB(C + D); only h changes between
// the two functions. With unit weights it gives "at least h of m" (AND, OR),
// "at most h of n" (NOT, NOR) and implication.
//
// Interface: clk, rst_n (active-low async), x_exc[M_EXC-1:0], x_inh[N_INH-1:0],
// h (H_W bits, unsigned) in; y (registered fire output) and net (the signed
// weighted difference, combinational) out.
// Timing: y(t+1) = fire(t); one register stage; y = 0 after reset.
// Excitatory weights 8,4,2,1 and the two thresholds follow the worked example of
// the original; inhibitory weights of one, the widths and reset are this
// design's choices.
module weighted_operator #(
  parameter int unsigned M_EXC = 4,
  parameter int unsigned N_INH = 4,
  parameter int unsigned H_W   = 4,
  parameter int unsigned NET_W = 8,
  parameter int unsigned EXC_WEIGHT [M_EXC] = '{8, 4, 2, 1},
  parameter int unsigned INH_WEIGHT [N_INH] = '{1, 1, 1, 1}
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [M_EXC-1:0]        x_exc,
  input  logic [N_INH-1:0]        x_inh,
  input  logic [H_W-1:0]          h,
  output logic signed [NET_W-1:0] net,
  output logic                    y
);

  logic fire;

  // x_exc[M_EXC-1] is the first listed input (A in the worked example), so it
  // takes EXC_WEIGHT[0]; likewise for the inhibitory inputs.
  always_comb begin
    net = '0;
    for (int i = 0; i < int'(M_EXC); i++) begin
      if (x_exc[M_EXC-1-i]) net = net + NET_W'(EXC_WEIGHT[i]);
    end
    for (int j = 0; j < int'(N_INH); j++) begin
      if (x_inh[N_INH-1-j]) net = net - NET_W'(INH_WEIGHT[j]);
    end
    fire = (net >= $signed(NET_W'(h)));   // h zero-extended, NET_W > H_W
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= 1'b0;
    else        y <= fire;
  end

endmodule
