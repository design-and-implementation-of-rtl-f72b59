// tb_dcm_model: self-checking test of the clock manager model.
//
// With a 100 MHz input clock the test checks: clkfx stays low and locked low
// in reset; locked rises LOCK_CYCLES input cycles after reset; the number of
// clkfx cycles over a long window matches clkin*M/D for the power-up factors
// (M=31, D=30) and, after a DRP write, for M=4, D=2; every clkfx period lies
// within the ideal period +-2*JITTER_PS and the periods do vary; DRP reads of
// the M/D register return {M-1, D-1}, other addresses read 0; drdy comes one
// clock after each strobe; and locked drops on reconfiguration and returns.
`timescale 1ns / 1ps
module tb_dcm_model
  import trng_pkg::*;
;

  logic     clkin = 1'b0;
  logic     rst   = 1'b1;
  drp_req_t req   = '0;
  drp_rsp_t rsp;
  logic     clkfx;
  logic     locked;
  int       checks   = 0;
  int       failures = 0;

  dcm_model #(.M_INIT(31), .D_INIT(30), .JITTER_PS(150), .LOCK_CYCLES(16)) dut (
    .clkin(clkin), .rst(rst), .dclk(clkin), .drp_req(req), .drp_rsp(rsp),
    .clkfx(clkfx), .locked(locked));

  always #5 clkin = ~clkin;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // clkfx edge counter and period statistics
  int  fx_edges = 0;
  real t_prev = -1.0;
  real p_min = 1.0e9, p_max = 0.0;
  bit  measure = 0;
  always @(posedge clkfx) begin
    fx_edges++;
    if (measure && t_prev >= 0.0) begin
      if ($realtime - t_prev < p_min) p_min = $realtime - t_prev;
      if ($realtime - t_prev > p_max) p_max = $realtime - t_prev;
    end
    t_prev = $realtime;
  end

  task automatic drp_access(input bit we, input logic [6:0] a, input logic [15:0] d,
                            output logic [15:0] rd);
    @(negedge clkin);
    req.den = 1'b1; req.dwe = we; req.daddr = a; req.di = d;
    @(negedge clkin);
    req = '0;
    check(rsp.drdy == 1'b1, "drdy one clock after den");
    rd = rsp.dout;
    @(negedge clkin);
    check(rsp.drdy == 1'b0, "drdy is a single pulse");
  endtask

  task automatic freq_window(input int m, input int d, input int in_cycles);
    int e0;
    int got;
    int expv;
    e0 = fx_edges;
    repeat (in_cycles) @(posedge clkin);
    got  = fx_edges - e0;
    expv = in_cycles * m / d;
    check(got >= expv - 2 && got <= expv + 2,
          $sformatf("M=%0d D=%0d: %0d clkfx cycles in %0d clkin cycles, expected %0d",
                    m, d, got, in_cycles, expv));
  endtask

  initial begin
    logic [15:0] rd;
    int e0;
    int t;
    real ideal;
    repeat (20) @(posedge clkin);
    check(fx_edges == 0 && !locked, "no clock and no lock in reset");
    @(negedge clkin);
    rst = 1'b0;
    t = 0;
    while (!locked && t < 100) begin @(posedge clkin); t++; end
    check(t >= 15 && t <= 17, $sformatf("locked after %0d clkin cycles, expected 16", t));
    // power-up factors
    drp_access(1'b0, 7'h50, 16'h0, rd);
    check(rd == {8'd30, 8'd29}, $sformatf("read of 0x50 = %h", rd));
    drp_access(1'b0, 7'h11, 16'h0, rd);
    check(rd == 16'h0, "other address reads 0");
    repeat (10) @(posedge clkin);
    measure = 1; p_min = 1.0e9; p_max = 0.0; t_prev = -1.0;
    freq_window(31, 30, 3000);
    measure = 0;
    ideal = 10.0 * 30.0 / 31.0;
    check(p_min >= ideal - 0.301 && p_max <= ideal + 0.301,
          $sformatf("period range %f..%f around %f", p_min, p_max, ideal));
    check(p_max - p_min > 0.1, $sformatf("period does not vary: %f..%f", p_min, p_max));
    // reconfigure to M=4, D=2 (200 MHz)
    drp_access(1'b1, 7'h50, {8'd3, 8'd1}, rd);
    @(posedge clkin);
    check(!locked, "locked drops after reconfiguration");
    t = 0;
    while (!locked && t < 100) begin @(posedge clkin); t++; end
    check(locked, "relocks after reconfiguration");
    drp_access(1'b0, 7'h50, 16'h0, rd);
    check(rd == {8'd3, 8'd1}, $sformatf("read back after write = %h", rd));
    repeat (4) @(posedge clkin);
    freq_window(4, 2, 1000);
    // a write elsewhere changes nothing
    drp_access(1'b1, 7'h22, 16'hffff, rd);
    repeat (4) @(posedge clkin);
    check(locked, "write to another address keeps lock");
    freq_window(4, 2, 500);
    // reset stops the clock
    rst = 1'b1;
    repeat (3) @(posedge clkin);
    e0 = fx_edges;
    repeat (50) @(posedge clkin);
    check(fx_edges == e0 && !locked, "clock stopped in reset");
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
