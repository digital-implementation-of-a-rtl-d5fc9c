// tb_workload_connectives: the application examples run on the full design.
//
// 1. Two one-bit signals (as a converter front end would deliver them: level 0 or
//    1 on bit 0 of A and of B, C = D = 0) with the threshold fixed at 1 must give
//    OR, and with the threshold fixed at 2 must give AND. Each input pattern of a
//    pseudo-random square-wave sequence is held for several clocks.
// 2. Four one-bit inputs a, b, c, d placed on the 8-bit operator with binary
//    weights (A = 8a + 4b, B = 2c + d, C = D = 0). With the threshold at 11 the
//    output must equal F = a(b + cd); with it moved to 13, without any other
//    change, F = ab(d + c). The same two functions are checked on the weighted
//    one-bit operator.
// 3. The unit connectives of the threshold operator on single bits through the
//    inhibitory inputs: NOT (no excitatory input, one inhibitory, "at most 0 of
//    1") and NOR ("at most 0 of 2") need a signed compare and are checked on the
//    weighted operator with its inhibitory inputs; implication (one excitatory,
//    one inhibitory, threshold 0) likewise.
// Expected values are the Boolean expressions themselves.
module tb_workload_connectives;
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

  logical_functor_top dut (
    .clk(clk), .rst_n(rst_n),
    .a(a), .b(b), .c(c), .d(d), .m_ext(m_ext), .thr_sel(thr_sel), .ramp_en(ramp_en),
    .s_a(s_a), .s_b(s_b), .r(r), .r_q(r_q), .m(m), .ramp_wrap(ramp_wrap), .salida(salida),
    .w_exc(w_exc), .w_inh(w_inh), .w_h(w_h), .w_net(w_net), .w_y(w_y)
  );

  always #5 clk = ~clk;

  task automatic expect_bit(input logic got, input logic e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %b expected %b (a=%h b=%h m=%h)", what, got, e, a, b, m);
    end
  endtask

  // Apply on the falling edge, look after the next rising edge.
  task automatic settle();
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v1, v2;
    rst_n = 1'b0; thr_sel = 1'b0; ramp_en = 1'b0; m_ext = 10'd1;
    a = '0; b = '0; c = '0; d = '0; w_exc = '0; w_inh = '0; w_h = '0;
    #12 rst_n = 1'b1;

    // 1. OR (threshold 1) and AND (threshold 2) on two one-bit signals.
    for (int th = 1; th <= 2; th++) begin
      for (int k = 0; k < 40; k++) begin
        @(negedge clk);
        v1 = k[0] ^ k[2];
        v2 = k[1];
        a = {7'b0, v1}; b = {7'b0, v2}; c = '0; d = '0; m_ext = 10'(th);
        repeat (3) settle();
        if (th == 1) expect_bit(salida, v1 | v2, "OR: at least 1 of 2");
        else         expect_bit(salida, v1 & v2, "AND: at least 2 of 2");
      end
    end

    // 2. F = a(b + cd) at threshold 11, F = ab(d + c) at threshold 13.
    for (int th = 11; th <= 13; th += 2) begin
      for (int p = 0; p < 16; p++) begin
        logic fa, fb, fc, fd;
        {fa, fb, fc, fd} = 4'(p);
        @(negedge clk);
        a = 8'(8 * fa + 4 * fb); b = 8'(2 * fc + fd); c = '0; d = '0;
        m_ext = 10'(th);
        w_exc = 4'(p); w_inh = '0; w_h = 4'(th);
        settle();
        if (th == 11) begin
          expect_bit(salida, fa & (fb | (fc & fd)), "8-bit operator, F = A(B + CD)");
          expect_bit(w_y,    fa & (fb | (fc & fd)), "weighted operator, F = A(B + CD)");
        end else begin
          expect_bit(salida, fa & fb & (fd | fc), "8-bit operator, F = AB(D + C)");
          expect_bit(w_y,    fa & fb & (fd | fc), "weighted operator, F = AB(D + C)");
        end
      end
    end

    // 3. NOT, NOR and implication on the weighted operator's inhibitory inputs.
    for (int p = 0; p < 4; p++) begin
      logic x, y;
      {x, y} = 2'(p);
      @(negedge clk);
      w_exc = '0; w_inh = {x, 3'b000}; w_h = 4'd0;
      settle();
      expect_bit(w_y, ~x, "NOT: at most 0 of 1");
      @(negedge clk);
      w_exc = '0; w_inh = {x, y, 2'b00}; w_h = 4'd0;
      settle();
      expect_bit(w_y, ~(x | y), "NOR: at most 0 of 2");
      @(negedge clk);
      // Excitatory input with weight 1 is the last one (D position).
      w_exc = {3'b000, y}; w_inh = {x, 3'b000}; w_h = 4'd0;
      settle();
      expect_bit(w_y, ~x | y, "implication x -> y");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
