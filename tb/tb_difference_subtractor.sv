// tb_difference_subtractor: self-checking test of the 9-bit subtractor.
// Checks the differences seen in the recorded operator runs (1FE-0FF = 0FF,
// 117-119 = 3FE, 080-129 = 357, 17E-12A = 054), the extremes (1FF-0 and 0-1FF) and
// 2000 random pairs. The expected 10-bit result is the signed integer difference
// taken modulo 1024.
module tb_difference_subtractor;
  logic [8:0] x, y;
  logic [9:0] diff;
  int checks = 0, failures = 0;

  difference_subtractor #(.W(9)) dut (.minuend(x), .subtrahend(y), .diff(diff));

  task automatic check(input int xv, input int yv);
    int d;
    x = xv[8:0]; y = yv[8:0];
    #1;
    d = xv - yv;
    if (d < 0) d += 1024;
    checks++;
    if (diff !== d[9:0]) begin
      failures++;
      $display("FAIL %h - %h: got %h expected %h", xv, yv, diff, d[9:0]);
    end
  endtask

  task automatic check_fixed(input int xv, input int yv, input logic [9:0] expv);
    x = xv[8:0]; y = yv[8:0];
    #1;
    checks++;
    if (diff !== expv) begin
      failures++;
      $display("FAIL %h - %h: got %h expected %h", xv, yv, diff, expv);
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
    check_fixed('h1FE, 'h0FF, 10'h0FF);
    check_fixed('h1FD, 'h0FF, 10'h0FE);
    check_fixed('h117, 'h119, 10'h3FE);
    check_fixed('h080, 'h129, 10'h357);
    check_fixed('h17E, 'h12A, 10'h054);
    check_fixed('h1FF, 'h000, 10'h1FF);
    check_fixed('h000, 'h1FF, 10'h201);
    for (int i = 0; i < 2000; i++) check($urandom_range(0, 511), $urandom_range(0, 511));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
