// tb_operand_adder: self-checking test of the 8-bit adder with carry out.
// Drives the corner cases (0+0, FF+FF, FF+01) and the sums seen in the recorded
// operator runs (FF+FF = 1FE, FF+00 = 0FF, CC+4D = 119), then 2000 random pairs.
// The expected sum is computed in 32-bit integer arithmetic in the testbench.
module tb_operand_adder;
  logic [7:0] a, b;
  logic [8:0] sum;
  int checks = 0, failures = 0;

  operand_adder #(.W(8)) dut (.a(a), .b(b), .sum(sum));

  task automatic check(input int unsigned x, input int unsigned y);
    int unsigned expv;
    a = x[7:0]; b = y[7:0];
    #1;
    expv = x + y;
    checks++;
    if (sum !== expv[8:0]) begin
      failures++;
      $display("FAIL %h + %h: got %h expected %h", x, y, sum, expv[8:0]);
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
    check(0, 0); check(8'hFF, 8'hFF); check(8'hFF, 8'h01); check(8'hFF, 8'h00);
    check(8'hCC, 8'h4D); check(8'h80, 8'h80); check(8'h7F, 8'hFF);
    for (int i = 0; i < 2000; i++) check($urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
