// tb_logical_functor_top: end-to-end test of the whole design at its default sizes.
//
// Phase 1 repeats the recorded ramp experiment on the 8-bit operator. The
// threshold comes from the built-in ramp (255 down to 0, one step every two
// clocks). The data inputs are four counters that change on the falling clock
// edge: A = 255 - t/2, B = 255 - t, C = 255 - t/3, D = t/2 (t = clock count,
// integer division, modulo 256). These reproduce the operand values recorded for
// the original circuit, e.g. at t = 256 A = 7F, B = FF, C = AA, D = 80. Two full
// ramp periods (1024 clocks) are run.
// Phase 2 switches to an external threshold with random data, stops the ramp with
// its enable, and applies a reset in the middle of operation.
// Throughout, the weighted one-bit operator runs beside it with thresholds 11 and
// 13 and random inhibition.
//
// A reference model in the testbench (ramp counter, difference register, unsigned
// compare, weighted sum) predicts every output on every clock. The testbench also
// counts how often each mechanism occurred, and a mechanism that never occurred
// counts as a failure: fire by excitation, fire by wrapped inhibition, fire on
// R = M exactly, no fire, ramp wrap, ramp hold, threshold source switch, register
// clear, weighted fire and no fire, each of the two example Boolean functions, and
// the recorded compare points (R = 3FE vs M = B2 fires, R = 054 vs M = 7F does not).
module tb_logical_functor_top;
  logic              clk = 1'b0, rst_n;
  logic [7:0]        a, b, c, d;
  logic [9:0]        m_ext;
  logic              thr_sel, ramp_en;
  logic [8:0]        s_a, s_b;
  logic [9:0]        r, r_q, m;
  logic              ramp_wrap, salida;
  logic [3:0]        w_exc, w_inh, w_h;
  logic signed [7:0] w_net;
  logic              w_y;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_fire_exc = 0, n_fire_inh = 0, n_fire_eq = 0, n_nofire = 0;
  int n_wrap = 0, n_hold = 0, n_switch = 0, n_clear = 0;
  int n_wfire = 0, n_wnofire = 0, n_f11 = 0, n_f13 = 0;
  int n_pt_3fe = 0, n_pt_054 = 0;

  logical_functor_top dut (
    .clk(clk), .rst_n(rst_n),
    .a(a), .b(b), .c(c), .d(d), .m_ext(m_ext), .thr_sel(thr_sel), .ramp_en(ramp_en),
    .s_a(s_a), .s_b(s_b), .r(r), .r_q(r_q), .m(m), .ramp_wrap(ramp_wrap), .salida(salida),
    .w_exc(w_exc), .w_inh(w_inh), .w_h(w_h), .w_net(w_net), .w_y(w_y)
  );

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  int         ref_steps;      // enabled ramp clocks since reset
  logic [9:0] ref_rq;
  logic       ref_wy;

  function automatic logic [9:0] diff_of(input logic [7:0] xa, xb, xc, xd);
    int v;
    v = (int'(xa) + int'(xb)) - (int'(xc) + int'(xd));
    if (v < 0) v += 1024;
    return v[9:0];
  endfunction

  function automatic logic [9:0] ramp_of(input int steps);
    return 10'(255 - ((steps / 2) % 256));
  endfunction

  function automatic logic wfire(input logic [3:0] e, input logic [3:0] i, input logic [3:0] hh);
    return (int'(e) - $countones(i)) >= int'(hh);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_steps <= 0;
      ref_rq    <= '0;
      ref_wy    <= 1'b0;
    end else begin
      if (ramp_en) ref_steps <= ref_steps + 1;
      ref_rq <= diff_of(a, b, c, d);
      ref_wy <= wfire(w_exc, w_inh, w_h);
    end
  end

  // ---------------- checking ----------------
  task automatic expect_eq(input int got, input int e, input string what);
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, e);
    end
  endtask

  // Check all outputs just before a rising edge, when inputs are settled.
  task automatic check_outputs();
    logic [9:0] exp_m;
    logic       exp_fire;
    exp_m    = thr_sel ? ramp_of(ref_steps) : m_ext;
    exp_fire = (ref_rq >= exp_m);
    expect_eq(s_a, int'(a) + int'(b), "S_a");
    expect_eq(s_b, int'(c) + int'(d), "S_b");
    expect_eq(r, diff_of(a, b, c, d), "R (unregistered)");
    expect_eq(r_q, ref_rq, "R (registered)");
    expect_eq(m, exp_m, "threshold in use");
    expect_eq(salida, exp_fire, "Salida");
    expect_eq(w_net, int'(w_exc) - $countones(w_inh), "weighted net");
    expect_eq(w_y, ref_wy, "weighted output");
    expect_eq(ramp_wrap, (ramp_en && ref_steps % 512 == 511) ? 1 : 0, "ramp wrap pulse");
    // Mechanism counts.
    if (salida && !r_q[9]) n_fire_exc++;
    if (salida &&  r_q[9]) n_fire_inh++;
    if (salida && r_q == m) n_fire_eq++;
    if (!salida) n_nofire++;
    if (ramp_wrap) n_wrap++;
    if (w_y) n_wfire++; else n_wnofire++;
    if (r_q == 10'h3FE && m == 10'h0B2) begin
      n_pt_3fe++;
      expect_eq(salida, 1, "R = 3FE against M = B2 fires");
    end
    if (r_q == 10'h054 && m == 10'h07F) begin
      n_pt_054++;
      expect_eq(salida, 0, "R = 054 against M = 7F does not fire");
    end
  endtask

  // Weighted operator stimulus for the next cycle; checks the Boolean examples
  // on the output of the previous cycle's stimulus.
  logic [3:0] w_exc_prev, w_inh_prev, w_h_prev;
  task automatic drive_weighted(input int t);
    if (w_inh_prev == 4'h0 && w_h_prev == 4'd11) begin
      expect_eq(w_y, w_exc_prev[3] & (w_exc_prev[2] | (w_exc_prev[1] & w_exc_prev[0])),
                "F = A(B + CD)");
      n_f11++;
    end
    if (w_inh_prev == 4'h0 && w_h_prev == 4'd13) begin
      expect_eq(w_y, w_exc_prev[3] & w_exc_prev[2] & (w_exc_prev[0] | w_exc_prev[1]),
                "F = AB(D + C)");
      n_f13++;
    end
    w_exc = 4'($urandom);
    w_inh = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'h0;
    w_h   = (t % 64 < 32) ? 4'd11 : 4'd13;
    w_exc_prev = w_exc; w_inh_prev = w_inh; w_h_prev = w_h;
  endtask

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] held;
    rst_n = 1'b0; thr_sel = 1'b1; ramp_en = 1'b0; m_ext = '0;
    a = 8'hFF; b = 8'hFF; c = 8'hFF; d = 8'h00;
    w_exc = '0; w_inh = '0; w_h = 4'd11;
    w_exc_prev = '0; w_inh_prev = 4'hF; w_h_prev = '0;
    #12;
    expect_eq(r_q, 0, "difference register cleared");
    expect_eq(m, 10'h0FF, "ramp starts at 0FF");
    rst_n = 1'b1;

    // Phase 1: the ramp experiment, two full periods.
    for (int t = 0; t < 1024; t++) begin
      @(negedge clk);
      a = 8'(255 - t / 2);
      b = 8'(255 - t);
      c = 8'(255 - t / 3);
      d = 8'(t / 2);
      if (t == 0) ramp_en = 1'b1;   // ramp step k lines up with data step k
      drive_weighted(t);
    end

    // Phase 2: external threshold, random data, ramp held, reset in the middle.
    @(negedge clk);
    thr_sel = 1'b0;
    n_switch++;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      m_ext = ($urandom_range(0, 3) == 0) ? r_q : 10'($urandom_range(0, 300));
      drive_weighted(t);
      if (t == 100) begin
        ramp_en = 1'b0;
        held = dut.u_ramp.m;
      end
      if (t > 100 && t < 300) begin
        expect_eq(dut.u_ramp.m, held, "ramp held while disabled");
        n_hold++;
      end
      if (t == 300) ramp_en = 1'b1;
      if (t == 400) begin
        thr_sel = 1'b1;
        n_switch++;
      end
      if (t == 500) begin
        #1 rst_n = 1'b0;
        #1;
        expect_eq(r_q, 0, "asynchronous clear of R");
        expect_eq(salida, m == 0, "Salida after clear");
        n_clear++;
        #1 rst_n = 1'b1;
      end
    end

    $display("Mechanisms seen:");
    need(n_fire_exc, "fire, excitation stronger");
    need(n_fire_inh, "fire, inhibition wraps R");
    need(n_fire_eq,  "fire on R = M");
    need(n_nofire,   "no fire");
    need(n_wrap,     "ramp wrap");
    need(n_hold,     "ramp hold");
    need(n_switch,   "threshold source switch");
    need(n_clear,    "register clear");
    need(n_wfire,    "weighted fire");
    need(n_wnofire,  "weighted no fire");
    need(n_f11,      "F = A(B + CD) at h = 11");
    need(n_f13,      "F = AB(D + C) at h = 13");
    need(n_pt_3fe,   "point R = 3FE, M = B2");
    need(n_pt_054,   "point R = 054, M = 7F");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Outputs are checked every cycle just before the rising edge.
  always @(negedge clk) begin
    if (rst_n) begin
      #4;
      check_outputs();
    end
  end
endmodule
