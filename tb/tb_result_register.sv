// tb_result_register: self-checking test of the 10-bit D register with
// asynchronous active-low clear. Checks that q is 0 during clear (including a
// clear asserted between clock edges), that q takes d on a rising edge and holds
// it until the next one, over 500 random words.
module tb_result_register;
  logic       clk = 1'b0, clrn;
  logic [9:0] d, q;
  logic [9:0] prev;
  int checks = 0, failures = 0;

  result_register #(.W(10)) dut (.clk(clk), .clrn(clrn), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic expect_q(input logic [9:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, e);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clrn = 1'b0; d = 10'h3FF;
    @(posedge clk); #1;
    expect_q('0, "held in clear across a clock edge");
    clrn = 1'b1;
    @(negedge clk);
    expect_q('0, "after clear release, before an edge");
    for (int i = 0; i < 500; i++) begin
      d = 10'($urandom);
      @(posedge clk); #1;
      expect_q(d, "sampled on rising edge");
      prev = d;
      d = ~d;
      #2;
      expect_q(prev, "held between edges");
      @(negedge clk);
    end
    // Asynchronous clear between edges.
    d = 10'h155;
    @(posedge clk); #1;
    expect_q(10'h155, "load before async clear");
    #1 clrn = 1'b0; #1;
    expect_q('0, "asynchronous clear");
    clrn = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
