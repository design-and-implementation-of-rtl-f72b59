// tb_post_processing: self-checking test of the post-processing unit.
//
// Feeds random count values with random gaps and checks every output word
// against words built independently in the testbench: with 3 bits per count
// and 16-bit words, each word is the concatenation of the 3 LSBs of six
// counts, oldest first, truncated to its 16 least significant bits. Checks
// that rnd_valid follows the sixth count by exactly one clock. A second
// instance with 4 bits per count checks the exact-fill case (four counts per
// word, nothing dropped).
`timescale 1ns / 1ps
module tb_post_processing;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic [15:0] count_max = '0;
  logic        count_valid = 1'b0;
  logic [15:0] rnd, rnd4;
  logic        rnd_valid, rnd4_valid;
  int          checks   = 0;
  int          failures = 0;
  int          cycle    = 0;

  post_processing dut (.clk(clk), .rst(rst), .count_max(count_max), .count_valid(count_valid),
                       .rnd(rnd), .rnd_valid(rnd_valid));
  post_processing #(.LSB_BITS(4)) dut4 (.clk(clk), .rst(rst), .count_max(count_max),
                                        .count_valid(count_valid), .rnd(rnd4), .rnd_valid(rnd4_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [15:0] exp3[$];
  int          exp3_at[$];
  logic [15:0] exp4[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int words3 = 0;
  int words4 = 0;
  always @(posedge clk) begin
    if (!rst && rnd_valid) begin
      if (exp3.size() == 0) check(1'b0, "unexpected word (3-bit)");
      else begin
        logic [15:0] w;
        int at;
        w  = exp3.pop_front();
        at = exp3_at.pop_front();
        check(rnd == w, $sformatf("word %h expected %h", rnd, w));
        check(cycle == at, $sformatf("word at cycle %0d expected %0d", cycle, at));
        words3++;
      end
    end
    if (!rst && rnd4_valid) begin
      if (exp4.size() == 0) check(1'b0, "unexpected word (4-bit)");
      else begin
        logic [15:0] w;
        w = exp4.pop_front();
        check(rnd4 == w, $sformatf("4-bit word %h expected %h", rnd4, w));
        words4++;
      end
    end
  end

  initial begin
    logic [2:0] g3[6];
    logic [3:0] g4[4];
    int n3 = 0;
    int n4 = 0;
    logic [15:0] v;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 600; k++) begin
      repeat ($urandom_range(3)) @(negedge clk);
      v = 16'($urandom);
      count_max   = v;
      count_valid = 1'b1;
      g3[n3] = v[2:0];
      n3++;
      if (n3 == 6) begin
        logic [17:0] all;
        all = {g3[0], g3[1], g3[2], g3[3], g3[4], g3[5]};
        exp3.push_back(all[15:0]);
        // the count is sampled at the next rising edge; the word is seen
        // one edge after that
        exp3_at.push_back(cycle + 1);
        n3 = 0;
      end
      g4[n4] = v[3:0];
      n4++;
      if (n4 == 4) begin
        exp4.push_back({g4[0], g4[1], g4[2], g4[3]});
        n4 = 0;
      end
      @(negedge clk);
      count_valid = 1'b0;
      count_max   = 16'($urandom);   // ignored while count_valid is low
    end
    repeat (4) @(negedge clk);
    check(words3 == 100, $sformatf("%0d 3-bit words, expected 100", words3));
    check(words4 == 150, $sformatf("%0d 4-bit words, expected 150", words4));
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
