// tb_bfd_dff: self-checking test of the beat detector flip-flop.
//
// Drives d with random values that change away from the clock edge and
// checks, after every rising clock edge, that q equals the value d had just
// before that edge. Also checks the asynchronous reset, and that q does not
// move on a falling clock edge.
`timescale 1ns / 1ps
module tb_bfd_dff;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic d   = 1'b0;
  logic q;
  int   checks   = 0;
  int   failures = 0;

  bfd_dff dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic expect_q;
    logic q_before;
    #12;
    check(q == 1'b0, "q low in reset");
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      // change d in the low phase, then let it sit across the edge
      @(negedge clk);
      #(1 + $urandom_range(2));
      d = 1'($urandom);
      expect_q = d;
      @(posedge clk);
      #1;
      check(q == expect_q, $sformatf("cycle %0d: q=%0b expected %0b", i, q, expect_q));
      // a change of d in the high phase must not reach q before the next edge
      d = ~d;
      q_before = q;
      @(negedge clk);
      #1;
      check(q == q_before, "q changed on a falling edge");
    end
    // asynchronous reset, away from any clock edge
    @(posedge clk);
    #2;
    d = 1'b1;
    @(posedge clk);
    #2;
    rst = 1'b1;
    #1;
    check(q == 1'b0, "asynchronous reset clears q");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
