// tb_weighted_operator: self-checking test of the weighted one-bit operator.
//
// Exhaustive over all 16 x 16 excitatory/inhibitory input patterns and all 16
// thresholds. The expectation is computed independently: the excitatory pattern
// read as a 4-bit binary number (weights 8,4,2,1) minus the count of active
// inhibitory inputs, compared with h as signed integers. On top of that, with no
// inhibition, threshold 11 must give F = A(B + CD) and threshold 13 must give
// F = AB(C + D), written as Boolean expressions. The output must appear exactly
// one clock after the inputs.
module tb_weighted_operator;
  logic              clk = 1'b0, rst_n;
  logic [3:0]        x_exc, x_inh, h;
  logic signed [7:0] net;
  logic              y;
  int checks = 0, failures = 0;

  weighted_operator #(.M_EXC(4), .N_INH(4), .H_W(4), .NET_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .x_exc(x_exc), .x_inh(x_inh), .h(h), .net(net), .y(y)
  );

  always #5 clk = ~clk;

  task automatic expect_bit(input logic got, input logic e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: exc=%b inh=%b h=%0d y=%b expected %b", what, x_exc, x_inh, h, got, e);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_y;
    int   v;
    logic fa, fb, fc, fd;
    rst_n = 1'b0; x_exc = 4'hF; x_inh = 4'h0; h = 4'h0;
    #12;
    expect_bit(y, 1'b0, "cleared by reset");
    rst_n = 1'b1;
    for (int hv = 0; hv < 16; hv++) begin
      for (int e = 0; e < 16; e++) begin
        for (int i = 0; i < 16; i++) begin
          @(negedge clk);
          prev_y = y;
          x_exc = 4'(e); x_inh = 4'(i); h = 4'(hv);
          #1;
          checks++;
          v = e - $countones(4'(i));
          if (int'(net) != v) begin
            failures++;
            $display("FAIL net: exc=%b inh=%b net=%0d expected %0d", x_exc, x_inh, net, v);
          end
          expect_bit(y, prev_y, "output waits for the clock");
          @(posedge clk); #1;
          expect_bit(y, v >= hv, "weighted fire rule");
          if (i == 0 && (hv == 11 || hv == 13)) begin
            fa = e[3]; fb = e[2]; fc = e[1]; fd = e[0];
            if (hv == 11) expect_bit(y, fa & (fb | (fc & fd)), "F = A(B + CD) at h = 11");
            else          expect_bit(y, fa & fb & (fd | fc),   "F = AB(D + C) at h = 13");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
