// tb_magnitude_comparator: self-checking test of the 10-bit unsigned comparator
// and its fire output. Checks the compare points of the recorded operator runs
// (0FF vs FF fires, 0FE vs FF does not, 3FE vs B2 fires, 054 vs 7F does not,
// 357 vs 7F fires), the extremes, and 3000 random pairs against integer compares.
module tb_magnitude_comparator;
  logic [9:0] a, b;
  logic       gt, eq, ge;
  int checks = 0, failures = 0;

  magnitude_comparator #(.W(10)) dut (.a(a), .b(b), .gt(gt), .eq(eq), .ge(ge));

  task automatic check(input int unsigned x, input int unsigned y);
    a = x[9:0]; b = y[9:0];
    #1;
    checks++;
    if (gt !== (x > y) || eq !== (x == y) || ge !== (x >= y)) begin
      failures++;
      $display("FAIL a=%h b=%h: gt=%b eq=%b ge=%b", x, y, gt, eq, ge);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('h0FF, 'h0FF); check('h0FE, 'h0FF); check('h3FE, 'h0B2);
    check('h054, 'h07F); check('h357, 'h07F); check('h001, 'h0B2);
    check(0, 0); check('h3FF, 'h3FF); check(0, 'h3FF); check('h3FF, 0);
    check('h200, 'h1FF); check('h1FF, 'h200);
    for (int i = 0; i < 3000; i++) begin
      int unsigned x, y;
      x = $urandom_range(0, 1023);
      y = ($urandom_range(0, 3) == 0) ? x : $urandom_range(0, 1023);
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
