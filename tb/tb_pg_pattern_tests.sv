// tb_pg_pattern_tests: the short pattern tests a user would run to compare
// the generator with a bench pulse generator, plus the memory generator's
// error-tolerance and repeated-LOAD cases and the buffer generator's
// identity test. All blocks run at their default sizes.
//
// A memory-based generator fed over EPP (for a short run) and a buffer-based
// generator are driven by host models. For each memory-generator pattern the
// host sends CLEAR, SETCLOCK d, LOAD n with the vectors, RUN, and STOP at the
// end. The expected pin activity is worked out from the vector list alone:
// every change of the pins must carry the next differing vector, and the
// time between two changes must be (vectors in between) x d x 20 ns.
// Patterns: square wave 0,1,0; pulse 0,0,1,1 repeated; burst/data
// 0,5,5,5,0,0,0 repeated; arbitrary data 9,7,7,3,5; full-width switching
// 0,FFFFFFFF,0 at 50 and 25 MHz; 0,55,0 at 25 MHz; the sequence 1,2,5 at a
// 10 MHz rate with a one-clock glitch vector between values ("pseudo
// noise"); a 16-point sine wave in sign/magnitude form computed here. Error tolerance: LOAD 4 with only three
// vectors followed by RUN: the RUN word becomes the fourth vector, the
// generator stays idle, STOP is harmless and a later RUN plays 1,2,3,3.
// Repeated LOADs: LOAD 4, RUN, STOP, LOAD 2, RUN, STOP plays both sets. The
// buffer generator gets 1,2,3,4 and then 9,8,7,6 and 100 random vectors and
// must show each on its pins in order. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_pg_pattern_tests;
  import pg_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  logic  m_n_write = 1'b1, m_n_dstrobe = 1'b1, m_wait;
  byte_t m_data = '0;
  logic  b_n_write = 1'b1, b_n_dstrobe = 1'b1, b_wait;
  byte_t b_data = '0;
  word_t m_pins, b_pins;
  logic  m_running, m_loading, m_overflow, m_ferr;
  logic  b_empty, b_full;

  int checks = 0, failures = 0;

  pg_memory #(.USE_EPP(1'b1)) u_mem (
    .clk, .rst, .rxd(1'b1), .epp_n_write(m_n_write), .epp_n_dstrobe(m_n_dstrobe),
    .epp_data(m_data), .epp_wait(m_wait), .pinout(m_pins), .running(m_running),
    .loading(m_loading), .overflow(m_overflow), .frame_error(m_ferr));

  pg_buffer u_buf (
    .clk, .rst, .epp_n_write(b_n_write), .epp_n_dstrobe(b_n_dstrobe), .epp_data(b_data),
    .epp_wait(b_wait), .pinout(b_pins), .fifo_empty(b_empty), .fifo_full(b_full));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- EPP host models, one per generator ----
  task automatic m_byte(input byte_t b);
    @(negedge clk);
    m_n_write = 1'b0; m_data = b;
    #5 m_n_dstrobe = 1'b0;
    wait (m_wait);
    #40 m_n_dstrobe = 1'b1; m_n_write = 1'b1;
    wait (!m_wait);
    #100;
  endtask

  task automatic m_word(input word_t w);
    for (int k = 3; k >= 0; k--) m_byte(w[8*k +: 8]);
  endtask

  task automatic b_byte(input byte_t b);
    @(negedge clk);
    b_n_write = 1'b0; b_data = b;
    #5 b_n_dstrobe = 1'b0;
    wait (b_wait);
    #40 b_n_dstrobe = 1'b1; b_n_write = 1'b1;
    wait (!b_wait);
    #100;
  endtask

  // ---- pin monitors ----
  word_t   m_q = '0, b_q = '0;
  word_t   m_v[$], b_v[$];
  realtime m_t[$];
  always @(posedge clk) if (!rst) begin
    if (m_pins != m_q) begin m_v.push_back(m_pins); m_t.push_back($realtime); end
    if (b_pins != b_q) b_v.push_back(b_pins);
    m_q <= m_pins;
    b_q <= b_pins;
  end

  // Compare the recorded pin changes with those implied by the vector list,
  // starting from pins = start.
  task automatic expect_changes(input string name, input word_t v[$], input int unsigned div,
                                input word_t start);
    word_t exp_v[$];
    int    exp_k[$];
    word_t prev;
    prev = start;
    foreach (v[k]) if (v[k] != prev) begin
      exp_v.push_back(v[k]);
      exp_k.push_back(k);
      prev = v[k];
    end
    check(m_v.size() == exp_v.size(),
          $sformatf("%s: %0d pin changes, expected %0d", name, m_v.size(), exp_v.size()));
    foreach (exp_v[i]) if (i < m_v.size()) begin
      check(m_v[i] == exp_v[i], $sformatf("%s: change %0d %08h expected %08h", name, i, m_v[i], exp_v[i]));
      if (i > 0)
        check(m_t[i] - m_t[i-1] == 20.0 * div * (exp_k[i] - exp_k[i-1]),
              $sformatf("%s: change %0d after %0t", name, i, m_t[i] - m_t[i-1]));
    end
  endtask

  task automatic run_pattern(input string name, input word_t v[$], input int unsigned div);
    m_word(32'h0);                                  // CLEAR
    m_word({29'(div), 3'b001});                     // SETCLOCK
    m_word(32'h2);                                  // LOAD
    m_word(word_t'(v.size()));
    foreach (v[i]) m_word(v[i]);
    check(!m_loading, {name, ": still loading"});
    m_v.delete(); m_t.delete();
    m_word(32'h3);                                  // RUN
    repeat (div * v.size() + 20) @(posedge clk);
    check(m_running, {name, ": not running"});
    expect_changes(name, v, div, '0);
    m_word(32'h4);                                  // STOP
    check(!m_running, {name, ": STOP ignored"});
  endtask

  task automatic memory_tests();
    word_t v[$];
    word_t sine[$];
    real   s;

    run_pattern("square 50MHz", '{32'h0, 32'h1, 32'h0}, 1);
    run_pattern("square 25MHz", '{32'h0, 32'h1, 32'h0}, 2);
    v.delete();
    repeat (3) begin v.push_back(0); v.push_back(0); v.push_back(1); v.push_back(1); end
    run_pattern("pulse", v, 1);
    v = '{32'h0, 32'h5, 32'h5, 32'h5, 32'h0, 32'h0, 32'h0, 32'h5, 32'h5, 32'h5, 32'h0, 32'h0, 32'h0};
    run_pattern("burst", v, 1);
    run_pattern("burst 25MHz", v, 2);
    run_pattern("data", '{32'h9, 32'h7, 32'h7, 32'h3, 32'h5}, 1);
    run_pattern("sso 32 bit 50MHz", '{32'h0, 32'hFFFF_FFFF, 32'h0}, 1);
    run_pattern("sso 32 bit 25MHz", '{32'h0, 32'hFFFF_FFFF, 32'h0}, 2);
    run_pattern("sso 4 bit 25MHz", '{32'h0, 32'h55, 32'h0}, 2);
    // 1, 2, 5 at a 10 MHz rate, each period led by a one-clock "noise" vector
    v = '{32'h1, 32'h1, 32'h1, 32'h1, 32'h1, 32'h0, 32'h2, 32'h2, 32'h2, 32'h2,
          32'h7, 32'h5, 32'h5, 32'h5, 32'h5};
    run_pattern("pseudo noise", v, 1);

    // 16-point sine: bit 31 is the sign, bits 30:0 the magnitude scaled by 2^31
    for (int k = 0; k < 16; k++) begin
      s = $sin(2.0 * 3.141592653589793 * k / 16.0);
      sine.push_back({s < 0.0, 31'($rtoi((s < 0.0 ? -s : s) * 2147483647.0))});
    end
    run_pattern("sine", sine, 1);

    // error tolerance: LOAD 4 with three vectors, then RUN
    m_word(32'h0);
    m_word(32'h2); m_word(32'h4);
    m_word(32'h1); m_word(32'h2); m_word(32'h3);
    check(m_loading, "short LOAD: left data mode early");
    m_word(32'h3);                                  // taken as the 4th vector
    check(!m_loading && !m_running, "short LOAD: RUN word not taken as data");
    m_word(32'h4); m_word(32'h4);                   // STOPs while idle
    m_v.delete(); m_t.delete();
    m_word(32'h3);
    #400;
    expect_changes("short LOAD", '{32'h1, 32'h2, 32'h3, 32'h3}, 1, '0);
    m_word(32'h4);

    // repeated LOADs
    m_word(32'h0);
    m_word(32'h2); m_word(32'h4);
    m_word(32'h1); m_word(32'h2); m_word(32'h3); m_word(32'h4);
    m_v.delete(); m_t.delete();
    m_word(32'h3);
    #400;
    expect_changes("LOAD 4", '{32'h1, 32'h2, 32'h3, 32'h4}, 1, '0);
    m_word(32'h4);
    m_word(32'h2); m_word(32'h2);
    m_word(32'h9); m_word(32'h8);
    m_v.delete(); m_t.delete();
    m_word(32'h3);
    #400;
    expect_changes("LOAD 2", '{32'h9, 32'h8}, 1, 32'h4);
    m_word(32'h4);
    check(!m_running, "repeated LOADs: STOP ignored");
  endtask

  task automatic buffer_tests();
    word_t sent[$];
    word_t w;
    sent = '{32'h1, 32'h2, 32'h3, 32'h4, 32'h9, 32'h8, 32'h7, 32'h6};
    for (int i = 0; i < 100; i++) begin
      do w = $urandom; while (w == sent[sent.size()-1]);
      sent.push_back(w);
    end
    foreach (sent[i]) for (int k = 3; k >= 0; k--) b_byte(sent[i][8*k +: 8]);
    repeat (10) @(negedge clk);
    check(b_v.size() == sent.size(), $sformatf("buffer: %0d vectors shown, %0d sent", b_v.size(), sent.size()));
    foreach (sent[i]) if (i < b_v.size())
      check(b_v[i] == sent[i], $sformatf("buffer: vector %0d %08h expected %08h", i, b_v[i], sent[i]));
    check(b_empty && !b_full, "buffer: FIFO not empty at the end");
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    fork
      memory_tests();
      buffer_tests();
    join
    check(!m_overflow && !m_ferr, "unexpected status flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
