// tb_beat_counter: self-checking test of the beat counter.
//
// Drives q with rising edges separated by random intervals L (in clock
// cycles) with random high times, and checks that each count_max equals the
// interval that preceded it, that the first (partial) interval is not
// reported, and that count_valid appears exactly two clock edges after the
// edge at which q was driven high. A second instance with a 4-bit counter
// checks saturation at 15.
`timescale 1ns / 1ps
module tb_beat_counter;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        q   = 1'b0;
  logic [15:0] count_max;
  logic        count_valid;
  logic [3:0]  count_max_s;
  logic        count_valid_s;
  int          checks   = 0;
  int          failures = 0;
  int          cycle    = 0;

  beat_counter dut (.clk(clk), .rst(rst), .q(q), .count_max(count_max), .count_valid(count_valid));
  beat_counter #(.COUNT_W(4)) dut_s (.clk(clk), .rst(rst), .q(q),
                                     .count_max(count_max_s), .count_valid(count_valid_s));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int exp_len[$];   // expected counts, in order
  int exp_at[$];    // cycle at which each count_valid is expected

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Monitor: compare every count_valid with the expectation.
  int seen = 0;
  always @(posedge clk) begin
    if (!rst && count_valid) begin
      int l;
      int at;
      if (exp_len.size() == 0) begin
        check(1'b0, "unexpected count_valid");
      end else begin
        l  = exp_len.pop_front();
        at = exp_at.pop_front();
        check(count_max == 16'(l), $sformatf("count_max=%0d expected %0d", count_max, l));
        check(cycle == at, $sformatf("count_valid at cycle %0d expected %0d", cycle, at));
        check(count_valid_s && count_max_s == 4'((l > 15) ? 15 : l),
              $sformatf("saturating counter gave %0d for %0d", count_max_s, l));
        seen++;
      end
    end
  end

  initial begin
    int n_rise = 0;
    int len;
    int high;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      len  = (k % 7 == 3) ? 2 + $urandom_range(40) : 2 + $urandom_range(20);
      high = 1 + $urandom_range(len - 2);
      // q goes high right after a rising edge (cycle c); the counter sees it
      // at edge c+1 and count_valid is sampled high at edge c+2.
      @(posedge clk);
      #1 q = 1'b1;
      if (n_rise > 0) begin
        exp_at.push_back(cycle + 1);
      end
      n_rise++;
      repeat (high) @(posedge clk);
      #1 q = 1'b0;
      repeat (len - high - 1) @(posedge clk);
      if (k < 299) exp_len.push_back(len);
    end
    repeat (5) @(posedge clk);
    check(exp_len.size() == 0, $sformatf("%0d counts never reported", exp_len.size()));
    check(seen == 299, $sformatf("saw %0d counts, expected 299", seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
