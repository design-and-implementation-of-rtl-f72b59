// tb_drp_control: self-checking test of the DRP controller.
//
// Two DRP responders in the testbench answer every strobe with drdy after a
// random 1..4 cycles (drdy in the cycle after den at the earliest) and log each write. The test steps through requests and
// checks: nothing is written while drp is low or when the requested setting
// equals the applied one; a retune writes DCM-A first and DCM-B only after
// DCM-A's drdy, each exactly once, to register 0x50 with data {M-1, D-1}
// where DCM-A has M = N+1, D = N and DCM-B has M = N+2, D = N+1; requests
// outside 1..30 are clamped; applied_n and busy follow; and a retune with
// one-cycle responders takes 4 clock cycles.
`timescale 1ns / 1ps
module tb_drp_control
  import trng_pkg::*;
;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       drp = 1'b0;
  logic [5:0] add = '0;
  drp_req_t   a_req, b_req;
  drp_rsp_t   a_rsp, b_rsp;
  logic       busy;
  logic [7:0] applied_n;
  int         checks   = 0;
  int         failures = 0;
  int         cycle    = 0;
  int         max_lat  = 4;

  drp_control dut (.clk(clk), .rst(rst), .drp(drp), .add(add),
                   .drp_a_req(a_req), .drp_a_rsp(a_rsp), .drp_b_req(b_req), .drp_b_rsp(b_rsp),
                   .busy(busy), .applied_n(applied_n));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Responders and write logs.
  int        a_wait = -1, b_wait = -1;
  logic [15:0] a_log[$], b_log[$];
  int        a_time[$], b_time[$];
  bit        a_pending = 0;
  always @(posedge clk) begin
    automatic int lat;
    a_rsp.drdy <= 1'b0;
    b_rsp.drdy <= 1'b0;
    a_rsp.dout <= '0;
    b_rsp.dout <= '0;
    if (a_wait == 0) begin a_rsp.drdy <= 1'b1; a_pending <= 0; end
    if (b_wait == 0) b_rsp.drdy <= 1'b1;
    if (a_wait >= 0) a_wait <= a_wait - 1;
    if (b_wait >= 0) b_wait <= b_wait - 1;
    if (!rst && a_req.den) begin
      check(a_req.dwe && a_req.daddr == 7'h50, "DCM-A access is a write to 0x50");
      check(a_wait < 0, "DCM-A strobe while busy");
      a_log.push_back(a_req.di);
      a_time.push_back(cycle);
      lat = $urandom_range(max_lat - 1);
      if (lat == 0) begin a_rsp.drdy <= 1'b1; a_pending <= 0; end
      else begin a_wait <= lat - 1; a_pending <= 1; end
    end
    if (!rst && b_req.den) begin
      check(b_req.dwe && b_req.daddr == 7'h50, "DCM-B access is a write to 0x50");
      check(!a_pending && a_wait < 0, "DCM-B written before DCM-A answered");
      b_log.push_back(b_req.di);
      b_time.push_back(cycle);
      lat = $urandom_range(max_lat - 1);
      if (lat == 0) b_rsp.drdy <= 1'b1;
      else b_wait <= lat - 1;
    end
  end

  // Wait for the controller to go idle, then check what was written.
  task automatic expect_retune(input int n, input bit happens, input string what);
    int t0;
    int exp_n;
    t0 = cycle;
    @(negedge clk);
    @(negedge clk);
    while (busy) @(negedge clk);
    @(negedge clk);
    if (happens) begin
      check(a_log.size() == 1 && b_log.size() == 1,
            $sformatf("%s: %0d/%0d writes, expected 1/1", what, a_log.size(), b_log.size()));
      if (a_log.size() == 1 && b_log.size() == 1) begin
        check(a_log[0] == {8'(n), 8'(n - 1)}, $sformatf("%s: DCM-A data %h", what, a_log[0]));
        check(b_log[0] == {8'(n + 1), 8'(n)}, $sformatf("%s: DCM-B data %h", what, b_log[0]));
        check(b_time[0] > a_time[0], $sformatf("%s: order of writes", what));
      end
      exp_n = n;
    end else begin
      check(a_log.size() == 0 && b_log.size() == 0, $sformatf("%s: unexpected write", what));
      exp_n = applied_n;
    end
    check(applied_n == 8'(exp_n), $sformatf("%s: applied_n=%0d expected %0d", what, applied_n, exp_n));
    a_log.delete(); b_log.delete(); a_time.delete(); b_time.delete();
  endtask

  initial begin
    int t_start;
    int retunes = 0;
    repeat (3) @(negedge clk);
    check(applied_n == 8'd30 && !busy, "reset state");
    rst = 1'b0;
    add = 6'd5;
    repeat (20) @(negedge clk);
    expect_retune(5, 0, "drp low");
    drp = 1'b1;
    expect_retune(5, 1, "N=5");
    retunes++;
    repeat (10) @(negedge clk);
    expect_retune(5, 0, "same setting held");
    add = 6'd0;
    expect_retune(1, 1, "add=0 clamps to N=1");
    retunes++;
    add = 6'd63;
    expect_retune(30, 1, "add=63 clamps to N=30");
    retunes++;
    add = 6'd31;
    expect_retune(30, 0, "add=31 is N=30 again");
    // random settings
    for (int i = 0; i < 40; i++) begin
      int n;
      int prev;
      n    = 1 + $urandom_range(29);
      prev = applied_n;
      add  = 6'(n);
      expect_retune(n, n != prev, $sformatf("random N=%0d", n));
    end
    // retune time with one-cycle responders
    max_lat = 1;
    add = 6'd7;
    expect_retune(7, applied_n != 8'd7, "N=7");
    add = 6'd9;
    t_start = cycle;
    @(negedge clk);
    while (busy) @(negedge clk);
    check(cycle - t_start == 5, $sformatf("retune took %0d cycles including request, expected 5", cycle - t_start));
    check(applied_n == 8'd9, "applied_n after timed retune");
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
