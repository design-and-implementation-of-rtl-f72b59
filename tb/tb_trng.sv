// tb_trng: end-to-end test of the TRNG at its default parameters.
//
// Runs the generator from a 100 MHz clock through four phases: power-up
// setting N=30, a retune to N=4, a retune to N=2, then en low and high again.
// A reference model in the testbench watches the detector flip-flop output
// and the clock-B domain reset, measures the beat intervals itself, packs
// their three LSBs six at a time into 16-bit words and checks every out word
// and its timing (out_valid two clock-B edges after the interval that
// completes the word). Per setting it checks that the longest interval lies
// within 40..110 % of the nominal beat N*(N+2) clock-B cycles, which ties the
// clock frequencies programmed through the DRP to the setting (the lower
// bound is below half a beat because, when the jitter spans many clock-B
// cycles, both the rising and the falling edge of clock A produce a cluster
// of detector sets per beat). It also checks that the output stops while en
// is low and that at the power-up setting most consecutive words differ.
// Each mechanism must occur at least once: DRP retune, relock, beat,
// jitter-induced short interval (several detector sets within one beat),
// word output, and the enable gap.
`timescale 1ns / 1ps
module tb_trng;

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

  // ------------------------------------------------------ reference model
  int          bcycle = 0;          // clock-B edge index
  bit          m_qprev, m_primed;
  int          m_cnt;
  logic [2:0]  m_grp[6];
  int          m_n = 0;
  logic [15:0] exp_w[$];
  int          exp_at[$];
  int          beats = 0, short_beats = 0, words = 0, word_checks = 0;
  int          max_interval = 0;
  int          distinct = 0;
  logic [15:0] last_word = '0;

  always @(posedge dut.rst_b) begin
    m_qprev = 0; m_primed = 0; m_cnt = 0; m_n = 0;
  end

  int nominal = 960;
  always @(posedge dut.clk_b) begin
    bcycle++;
    if (dut.rst_b) begin
      m_qprev = 0; m_primed = 0; m_cnt = 0; m_n = 0;
    end else begin
      if (dut.q && !m_qprev) begin
        if (m_primed) begin
          beats++;
          if (m_cnt > max_interval) max_interval = m_cnt;
          if (m_cnt < nominal / 8) short_beats++;
          m_grp[m_n] = 3'(m_cnt);
          m_n++;
          if (m_n == 6) begin
            logic [17:0] all;
            all = {m_grp[0], m_grp[1], m_grp[2], m_grp[3], m_grp[4], m_grp[5]};
            exp_w.push_back(all[15:0]);
            exp_at.push_back(bcycle + 2);
            m_n = 0;
          end
        end
        m_primed = 1;
        m_cnt    = 1;
      end else begin
        m_cnt++;
      end
      m_qprev = dut.q;
      if (out_valid) begin
        if (exp_w.size() == 0) begin
          check(1'b0, "word without a reference word");
        end else begin
          logic [15:0] w;
          int at;
          w  = exp_w.pop_front();
          at = exp_at.pop_front();
          check(out == w, $sformatf("out=%h expected %h", out, w));
          check(bcycle == at, $sformatf("word at clock-B edge %0d expected %0d", bcycle, at));
          word_checks++;
        end
        words++;
        if (out != last_word) distinct++;
        last_word = out;
      end
    end
  end

  // relock and retune events
  int relocks = 0, retunes = 0;
  always @(negedge dut.locked_b) if (!reset && en) relocks++;
  always @(posedge clk) if (dut.u_drp_control.busy && dut.drp_b_rsp.drdy) retunes++;

  // run until the given number of words has come out, or a cycle limit
  task automatic run_words(input int n_words, input int max_clk);
    int w0;
    int t;
    w0 = words;
    t = 0;
    while (words - w0 < n_words && t < max_clk) begin @(posedge clk); t++; end
    check(words - w0 >= n_words, $sformatf("only %0d of %0d words", words - w0, n_words));
  endtask

  task automatic setting(input int n, input int n_words, input int max_clk);
    int b0;
    int sb0;
    int w0;
    int d0;
    nominal = n * (n + 2);
    if (drp) begin
      add = 6'(n);
      repeat (10) @(posedge clk);
      while (dut.u_drp_control.busy) @(posedge clk);
      check(dut.u_drp_control.applied_n == 8'(n), $sformatf("setting N=%0d applied", n));
    end
    while (!(dut.locked_a && dut.locked_b)) @(posedge clk);
    repeat (20) @(posedge clk);
    max_interval = 0;
    b0  = beats;
    sb0 = short_beats;
    w0  = words;
    d0  = distinct;
    run_words(n_words, max_clk);
    check(max_interval * 100 >= nominal * 40 && max_interval * 100 <= nominal * 110,
          $sformatf("N=%0d: longest interval %0d, nominal beat %0d", n, max_interval, nominal));
    $display("N=%0d: %0d intervals, %0d short, longest %0d (nominal %0d), %0d of %0d words changed",
             n, beats - b0, short_beats - sb0, max_interval, nominal, distinct - d0, words - w0);
    if (n == 30)
      check((distinct - d0) * 4 > (words - w0) * 3,
            $sformatf("N=30: only %0d of %0d words changed", distinct - d0, words - w0));
  endtask

  initial begin
    int w0;
    #1 reset = 1'b1;   // an edge, so the asynchronous resets act before the first clock
    repeat (5) @(posedge clk);
    reset = 1'b0;
    en    = 1'b1;
    // phase 1: power-up setting N = 30
    setting(30, 16, 1000000);
    // phase 2: retune to N = 4
    drp = 1'b1;
    setting(4, 60, 200000);
    // phase 3: retune to N = 2
    setting(2, 60, 200000);
    // phase 4: enable low stops the output, enable high restarts it
    en = 1'b0;
    repeat (20) @(posedge clk);
    w0 = words;
    repeat (2000) @(posedge clk);
    check(words == w0, "no output while en is low");
    en = 1'b1;
    setting(2, 20, 200000);
    // summary of mechanisms
    check(retunes >= 2, $sformatf("DRP retunes: %0d", retunes));
    check(relocks >= 2, $sformatf("relocks: %0d", relocks));
    check(beats > 0, $sformatf("beats: %0d", beats));
    check(short_beats > 0, $sformatf("jitter-induced short intervals: %0d", short_beats));
    check(words > 0 && word_checks == words, $sformatf("words %0d, checked %0d", words, word_checks));
    $display("retunes=%0d relocks=%0d beats=%0d short=%0d words=%0d", retunes, relocks, beats,
             short_beats, words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
