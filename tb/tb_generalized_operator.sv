// tb_generalized_operator: self-checking test of the 8-bit generalized operator.
//
// Inputs change on the falling clock edge, as in the recorded runs of the
// original circuit (where the data is sampled half a clock period after it
// changes). A reference model in the testbench registers R = (A+B)-(C+D) mod 1024
// on each rising edge and expects salida = (R >= M) unsigned.
//
// Checked: the five compare points recorded for the original circuit; the one-clock
// latency (salida must not react before the rising edge, and must react right
// after it); the register clear; 3000 random cycles with random thresholds; and the
// classic connectives on single-bit data (OR = at least 1 of 2, AND = at least 2 of
// 2, with C = D = 0).
module tb_generalized_operator;
  logic       clk = 1'b0, clrn;
  logic [7:0] a, b, c, d;
  logic [9:0] m;
  logic [8:0] s_a, s_b;
  logic [9:0] r, r_q;
  logic       salida;
  logic [9:0] ref_r;
  int checks = 0, failures = 0;

  generalized_operator #(.IN_W(8)) dut (
    .clk(clk), .clrn(clrn), .a(a), .b(b), .c(c), .d(d), .m(m),
    .s_a(s_a), .s_b(s_b), .r(r), .r_q(r_q), .salida(salida)
  );

  always #5 clk = ~clk;

  function automatic logic [9:0] diff_of(input logic [7:0] xa, xb, xc, xd);
    int v;
    v = (int'(xa) + int'(xb)) - (int'(xc) + int'(xd));
    if (v < 0) v += 1024;
    return v[9:0];
  endfunction

  always_ff @(posedge clk or negedge clrn) begin
    if (!clrn) ref_r <= '0;
    else       ref_r <= diff_of(a, b, c, d);
  end

  task automatic expect_bit(input logic got, input logic e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %b expected %b (a=%h b=%h c=%h d=%h m=%h r_q=%h)",
               what, got, e, a, b, c, d, m, r_q);
    end
  endtask

  task automatic expect_word(input logic [9:0] got, input logic [9:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, e);
    end
  endtask

  // Apply one operand set on the falling edge, then check the latency around the
  // next rising edge and the fire value after it.
  task automatic step(input logic [7:0] xa, xb, xc, xd, input logic [9:0] xm);
    logic old_fire;
    @(negedge clk);
    a = xa; b = xb; c = xc; d = xd; m = xm;
    #1;
    old_fire = (ref_r >= m);
    expect_bit(salida, old_fire, "no change before rising edge");
    @(posedge clk); #1;
    expect_word(r_q, diff_of(xa, xb, xc, xd), "registered difference");
    expect_bit(salida, diff_of(xa, xb, xc, xd) >= xm, "fire after rising edge");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clrn = 1'b0; a = 8'hFF; b = 8'hFF; c = 8'h00; d = 8'h00; m = 10'h001;
    @(posedge clk); #1;
    expect_word(r_q, '0, "register cleared");
    expect_bit(salida, 1'b0, "no fire while cleared with M = 1");
    clrn = 1'b1;

    // Compare points recorded for the original circuit.
    step(8'hFF, 8'hFF, 8'hFF, 8'h00, 10'h0FF);
    expect_word(s_a, 10'h1FE, "S_a = 1FE");
    expect_word(s_b, 10'h0FF, "S_b = 0FF");
    expect_word(r_q, 10'h0FF, "R = 0FF");
    expect_bit(salida, 1'b1, "R = 0FF, M = FF fires");
    step(8'hFF, 8'hFE, 8'hFF, 8'h00, 10'h0FF);
    expect_word(r_q, 10'h0FE, "R = 0FE");
    expect_bit(salida, 1'b0, "R = 0FE, M = FF does not fire");
    step(8'hB2, 8'h65, 8'hCC, 8'h4D, 10'h0B2);
    expect_word(r_q, 10'h3FE, "R = 3FE");
    expect_bit(salida, 1'b1, "R = 3FE, M = B2 fires (inhibition wraps)");
    step(8'h80, 8'h00, 8'hAA, 8'h7F, 10'h07F);
    expect_word(r_q, 10'h357, "R = 357");
    expect_bit(salida, 1'b1, "R = 357, M = 7F fires");
    step(8'h7F, 8'hFF, 8'hAA, 8'h80, 10'h07F);
    expect_word(r_q, 10'h054, "R = 054");
    expect_bit(salida, 1'b0, "R = 054, M = 7F does not fire");

    // Connectives on one-bit data, no inhibition.
    for (int x = 0; x < 4; x++) begin
      step(8'(x >> 1), 8'(x & 1), 8'h00, 8'h00, 10'd1);
      expect_bit(salida, ((x >> 1) | (x & 1)) != 0, "OR: at least 1 of 2");
      step(8'(x >> 1), 8'(x & 1), 8'h00, 8'h00, 10'd2);
      expect_bit(salida, ((x >> 1) & (x & 1)) != 0, "AND: at least 2 of 2");
    end

    // Random operands and thresholds.
    for (int i = 0; i < 3000; i++) begin
      logic [9:0] rm;
      rm = ($urandom_range(0, 1) == 1) ? diff_of(a, b, c, d) : 10'($urandom);
      step(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom),
           ($urandom_range(0, 3) == 0) ? rm : 10'($urandom_range(0, 255)));
    end

    // M acts without a clock edge.
    @(negedge clk);
    m = r_q; #1;
    expect_bit(salida, 1'b1, "M = R fires at once");
    m = r_q + 10'd1; #1;
    expect_bit(salida, r_q == 10'h3FF, "M = R+1 does not fire at once");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
