// tb_threshold_ramp: self-checking test of the descending ramp threshold.
// After reset the ramp must read 0x0FF. It must then step down by one every two
// enabled clocks, reach 0, wrap back to 0x0FF with a one-cycle wrap pulse, and hold
// while the enable is low. Two full periods (2 x 512 cycles) are compared cycle by
// cycle against a counter model kept in the testbench.
module tb_threshold_ramp;
  logic       clk = 1'b0, rst_n, en;
  logic [9:0] m;
  logic       wrap;
  int checks = 0, failures = 0;
  int wraps = 0;

  threshold_ramp #(.W(8), .OUT_W(10), .STEP_CYCLES(2)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .m(m), .wrap(wrap)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int e, input string what);
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, e);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    rst_n = 1'b0; en = 1'b0;
    #12;
    expect_eq(m, 'h0FF, "reset value");
    rst_n = 1'b1;
    @(negedge clk);
    en = 1'b1;
    // Enabled cycle t (t = 0 first): m shows 255 - floor(t / 2) mod 256.
    for (t = 0; t < 1024; t++) begin
      expect_eq(m, 255 - ((t / 2) % 256), "ramp level");
      expect_eq(wrap, ((t % 512) == 511) ? 1 : 0, "wrap pulse");
      if (wrap) wraps++;
      @(negedge clk);
    end
    expect_eq(m, 'h0FF, "back at the top after two periods");
    expect_eq(wraps, 2, "two wraps in two periods");
    // Hold with enable low.
    @(negedge clk);
    en = 1'b0;
    t = m;
    repeat (10) @(negedge clk);
    expect_eq(m, t, "hold while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
