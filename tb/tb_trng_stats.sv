// tb_trng_stats: statistical workload on the TRNG output bit stream.
//
// Runs the generator at its default parameters (setting N=30, 100 MHz
// reference) and collects NBITS = 2^20 output bits, most significant bit of
// each word first. Three tests of the NIST SP 800-22 suite are computed at
// the 1 % significance level, deciding on the test statistic rather than the
// p-value:
//   frequency (monobit): |sum(2b-1)| / sqrt(n) < 2.5758
//   block frequency (M=128): chi2 = 4M * sum((pi_i - 1/2)^2) below the 99 %
//     point of chi-square with n/M degrees of freedom (Wilson-Hilferty)
//   runs: |V - 2n*pi*(1-pi)| / (2*sqrt(2n)*pi*(1-pi)) < 1.8214, after the
//     prerequisite |pi - 1/2| < 2/sqrt(n)
// Their outcome is printed, not counted: it measures the jitter assumed in
// the clock manager model (+-150 ps, independent per edge) more than the
// logic. With that model the raw stream passes the block frequency test and
// fails the frequency and runs tests: near each crossing of the clock edges
// the detector sets many times within a few cycles, and the short counts
// this gives make neighbouring bits anticorrelated and slightly biased.
// Counted checks: all bits arrive; the word rate lies between one word per
// 12 clock-B cycles (6 counts of at least 2 cycles) and one per two beats
// (6 counts of at most 960 cycles of 9.69 ns); the ones fraction lies within
// 0.45..0.55 (the stream is not stuck).
`timescale 1ns / 1ps
module tb_trng_stats;

  localparam int NBITS = 1 << 20;
  localparam int M     = 128;

  logic        clk   = 1'b0;
  logic        reset = 1'b0;
  logic        en    = 1'b0;
  logic        drp   = 1'b0;
  logic [5:0]  add   = '0;
  logic [15:0] out;
  logic        out_valid;
  int          checks   = 0;
  int          failures = 0;

  trng dut (.clk(clk), .reset(reset), .en(en), .drp(drp), .add(add),
            .out(out), .out_valid(out_valid));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit bits[NBITS];
  int nb = 0;
  always @(posedge clk_b_mon) begin
    if (out_valid) begin
      for (int i = 15; i >= 0; i--) begin
        if (nb < NBITS) begin
          bits[nb] = out[i];
          nb++;
        end
      end
    end
  end
  wire clk_b_mon = dut.clk_b;

  initial begin
    int    ones;
    int    s;
    real   n;
    real   pi;
    real   stat;
    real   chi2;
    real   k;
    real   crit;
    int    v;
    real   t0;
    real   dt_per_word;
    #1 reset = 1'b1;
    repeat (5) @(posedge clk);
    reset = 1'b0;
    en    = 1'b1;
    wait (nb >= 16);
    t0 = $realtime;
    wait (nb >= NBITS);
    check(nb == NBITS, "all bits collected");
    dt_per_word = ($realtime - t0) / real'((NBITS - 16) / 16);
    n = real'(NBITS);
    $display("mean time per word: %f ns", dt_per_word);
    check(dt_per_word > 12.0 * 9.6875 && dt_per_word < 2.0 * 960.0 * 9.6875, "word rate");
    // frequency (monobit)
    ones = 0;
    for (int i = 0; i < NBITS; i++) ones += bits[i];
    s    = 2 * ones - NBITS;
    stat = ((s < 0) ? -real'(s) : real'(s)) / $sqrt(n);
    pi   = real'(ones) / n;
    check(pi > 0.45 && pi < 0.55, $sformatf("ones fraction %f", pi));
    $display("ones fraction %f, frequency statistic %f (limit 2.5758): %s", pi, stat,
             (stat < 2.5758) ? "passed" : "not passed");
    // block frequency
    k    = real'(NBITS / M);
    chi2 = 0.0;
    for (int b = 0; b < NBITS / M; b++) begin
      int c;
      real p;
      c = 0;
      for (int j = 0; j < M; j++) c += bits[b * M + j];
      p = real'(c) / real'(M);
      chi2 += (p - 0.5) * (p - 0.5);
    end
    chi2 = 4.0 * real'(M) * chi2;
    crit = k * (1.0 - 2.0 / (9.0 * k) + 2.3263 * $sqrt(2.0 / (9.0 * k))) ** 3;
    $display("block frequency chi2 %f (limit %f): %s", chi2, crit,
             (chi2 < crit) ? "passed" : "not passed");
    // runs
    v = 1;
    for (int i = 1; i < NBITS; i++) if (bits[i] != bits[i-1]) v++;
    stat = (real'(v) - 2.0 * n * pi * (1.0 - pi));
    if (stat < 0.0) stat = -stat;
    stat = stat / (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi));
    $display("runs V=%0d, statistic %f (limit 1.8214): %s", v, stat,
             (((pi > 0.5) ? pi - 0.5 : 0.5 - pi) < 2.0 / $sqrt(n) && stat < 1.8214) ?
             "passed" : "not passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
