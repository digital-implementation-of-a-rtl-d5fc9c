// logical_functor_top: the generalized logical operator with its threshold source,
// and the weighted single-bit form of the operator beside it.
//
// Part 1 is the 8-bit operator: A+B (excitatory) minus C+D (inhibitory), registered,
// compared with a threshold M; salida = 1 when R >= M. The threshold is either the
// external word m_ext (thr_sel = 0) or the built-in periodic descending ramp
// 255..0 (thr_sel = 1), which makes the operator sweep through different Boolean
// connectives over time while the data inputs stay fixed.
//
// Part 2 is the weighted operator with four excitatory and four inhibitory one-bit
// inputs (weights 8,4,2,1 and 1,1,1,1) and a 4-bit threshold w_h, e.g. w_h = 11
// for F = A(B + CD) and w_h = 13 for F = AB(C + D). It has its own ports.
//
// Interface: clk, rst_n (active low, asynchronous, clears the difference register,
// the ramp and w_y). Part 1: a, b, c, d (8 bits), m_ext (10 bits), thr_sel, ramp_en
// in; s_a, s_b (9 bits), r, r_q, m (threshold in use, 10 bits), ramp_wrap, salida
// out. Part 2: w_exc, w_inh (4 bits, bit 3 = first input), w_h in; w_net, w_y out.
// Timing: salida reflects the inputs one rising edge later; a change of m (from
// m_ext or from the ramp) acts on salida at once. w_y is registered likewise.
// The datapath, widths and ramp follow the original design. The threshold
// selector, the ramp enable and the pairing of both operators in one top are this
// design's choices.
module logical_functor_top
  import functor_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // 8-bit generalized operator
  input  logic [IN_W-1:0]    a,
  input  logic [IN_W-1:0]    b,
  input  logic [IN_W-1:0]    c,
  input  logic [IN_W-1:0]    d,
  input  logic [M_W-1:0]     m_ext,
  input  logic               thr_sel,
  input  logic               ramp_en,
  output logic [SUM_W-1:0]   s_a,
  output logic [SUM_W-1:0]   s_b,
  output logic [R_W-1:0]     r,
  output logic [R_W-1:0]     r_q,
  output logic [M_W-1:0]     m,
  output logic               ramp_wrap,
  output logic               salida,
  // weighted single-bit operator
  input  logic [3:0]         w_exc,
  input  logic [3:0]         w_inh,
  input  logic [3:0]         w_h,
  output logic signed [7:0]  w_net,
  output logic               w_y
);

  logic [M_W-1:0] m_ramp;

  threshold_ramp #(
    .W          (IN_W),
    .OUT_W      (M_W),
    .STEP_CYCLES(2)
  ) u_ramp (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (ramp_en),
    .m    (m_ramp),
    .wrap (ramp_wrap)
  );

  always_comb m = thr_sel ? m_ramp : m_ext;

  generalized_operator #(.IN_W(IN_W)) u_op (
    .clk   (clk),
    .clrn  (rst_n),
    .a     (a),
    .b     (b),
    .c     (c),
    .d     (d),
    .m     (m),
    .s_a   (s_a),
    .s_b   (s_b),
    .r     (r),
    .r_q   (r_q),
    .salida(salida)
  );

  weighted_operator #(
    .M_EXC(4),
    .N_INH(4),
    .H_W  (4),
    .NET_W(8)
  ) u_wop (
    .clk  (clk),
    .rst_n(rst_n),
    .x_exc(w_exc),
    .x_inh(w_inh),
    .h    (w_h),
    .net  (w_net),
    .y    (w_y)
  );

endmodule
