// tb_pattern_generator_top: end-to-end test of the whole chip at its default
// parameters (50 MHz clock, 19200 baud serial link, 1024-word RAM,
// 1024-word FIFO).
//
// The memory-based generator is programmed over RS-232 exactly as a host
// would, words sent most significant byte first:
//  A. the 28-byte stream LOAD 4: 1, 2, 4, 8, RUN; then STOP
//  B. the adder application test: SETCLOCK 2 (word 0x11, 25 MHz), LOAD 16
//     vectors in which each operand pair appears twice, RUN. Pins 3:0 and
//     7:4 drive the adder; its output must step through 3, 0, 7, 0, 1E, 0,
//     9, 0, each value held 80 ns (two vectors of two clocks); STOP; CLEAR
//  C. a 1025-word LOAD into the 1024-word RAM (one word dropped and
//     flagged), then RUN at full speed: all 1024 vectors appear in order,
//     one per clock; STOP
//  D. a frame with a bad stop bit, which is flagged and ignored
// The buffer-based generator receives 64 vectors over EPP and must show each
// on its pins. Each mechanism (LOAD, RUN, STOP, SETCLOCK, CLEAR, RAM
// overflow, serial frame error, EPP handshake, FIFO pass-through, adder) is
// counted, and one that never happened counts as a failure. A watchdog ends
// a hung run.
`timescale 1ns/1ps
module tb_pattern_generator_top;
  import pg_pkg::*;

  localparam real BIT_NS = 1.0e9 / 19_200;

  logic       clk = 1'b0, rst = 1'b1;
  logic       rs232_rxd = 1'b1;
  word_t      mem_pinout, buf_pinout;
  logic       mem_running, mem_loading, mem_overflow, mem_frame_error;
  logic       epp_n_write = 1'b1, epp_n_dstrobe = 1'b1, epp_wait, buf_empty, buf_full;
  byte_t      epp_data = '0;
  logic [4:0] adder_c;

  int checks = 0, failures = 0;

  pattern_generator_top dut (
    .clk, .rst, .rs232_rxd, .mem_pinout, .mem_running, .mem_loading, .mem_overflow,
    .mem_frame_error, .epp_n_write, .epp_n_dstrobe, .epp_data, .epp_wait, .buf_pinout,
    .buf_empty, .buf_full,
    .adder_a(mem_pinout[3:0]), .adder_b(mem_pinout[7:4]), .adder_c);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters ----
  int n_load = 0, n_run = 0, n_stop = 0, n_setclock = 0, n_clear = 0;
  int n_overflow = 0, n_frame_error = 0, n_epp = 0, n_fifo = 0, n_adder = 0;

  // ---- serial host ----
  task automatic uart_byte(input byte_t b, input bit stop_ok = 1'b1);
    rs232_rxd = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rs232_rxd = b[i]; #(BIT_NS); end
    rs232_rxd = stop_ok; #(BIT_NS);
    rs232_rxd = 1'b1; #(BIT_NS);
  endtask

  task automatic send_word(input word_t w);
    for (int k = 3; k >= 0; k--) uart_byte(w[8*k +: 8]);
    unique case (w[2:0])
      3'b000: n_clear++;
      3'b001: n_setclock++;
      3'b010: n_load++;
      3'b011: n_run++;
      3'b100: n_stop++;
      default: ;
    endcase
  endtask

  // data words are sent without counting them as instructions
  task automatic send_data(input word_t w);
    for (int k = 3; k >= 0; k--) uart_byte(w[8*k +: 8]);
  endtask

  // ---- EPP host ----
  task automatic epp_byte(input byte_t b);
    @(negedge clk);
    epp_n_write = 1'b0; epp_data = b;
    #5 epp_n_dstrobe = 1'b0;
    wait (epp_wait);
    #40 epp_n_dstrobe = 1'b1; epp_n_write = 1'b1;
    wait (!epp_wait);
    n_epp++;
    #546;
  endtask

  // ---- monitors ----
  word_t      mem_q = '0, buf_q = '0;
  logic [4:0] add_q = '0;
  word_t      mem_v[$], buf_v[$];
  realtime    mem_t[$];
  logic [4:0] add_v[$];
  realtime    add_t[$];
  always @(posedge clk) if (!rst) begin
    if (mem_pinout != mem_q) begin mem_v.push_back(mem_pinout); mem_t.push_back($realtime); end
    if (buf_pinout != buf_q) begin buf_v.push_back(buf_pinout); n_fifo++; end
    if (adder_c != add_q) begin add_v.push_back(adder_c); add_t.push_back($realtime); n_adder++; end
    mem_q <= mem_pinout;
    buf_q <= buf_pinout;
    add_q <= adder_c;
    if (mem_overflow) n_overflow++;
    if (mem_frame_error) n_frame_error++;
  end

  task automatic load_vectors(input word_t v[$]);
    send_word(32'h2);
    send_data(word_t'(v.size()));
    foreach (v[i]) send_data(v[i]);
  endtask

  task automatic check_run(input string name, input word_t v[$], input int unsigned period);
    check(mem_v.size() == v.size(), $sformatf("%s: %0d pin changes, expected %0d", name, mem_v.size(), v.size()));
    foreach (v[i]) if (i < mem_v.size()) begin
      check(mem_v[i] == v[i], $sformatf("%s: vector %0d %08h expected %08h", name, i, mem_v[i], v[i]));
      if (i > 0) check(mem_t[i] - mem_t[i-1] == 20.0 * period,
                       $sformatf("%s: vector %0d after %0t", name, i, mem_t[i] - mem_t[i-1]));
    end
  endtask

  // ---- memory-based generator sequence ----
  task automatic memory_sequence();
    word_t v[$];
    logic [4:0] sums[8] = '{5'h03, 5'h00, 5'h07, 5'h00, 5'h1E, 5'h00, 5'h09, 5'h00};
    word_t      pairs[8] = '{32'h12, 32'h00, 32'h34, 32'h00, 32'hFF, 32'h00, 32'h45, 32'h00};

    // A. LOAD 4: 1, 2, 4, 8, RUN
    v = '{32'h1, 32'h2, 32'h4, 32'h8};
    load_vectors(v);
    check(!mem_loading, "A: still in data mode");
    mem_v.delete(); mem_t.delete();
    send_word(32'h3);
    #1000;
    check(mem_running, "A: not running");
    check_run("A", v, 1);
    send_word(32'h4);
    check(!mem_running, "A: STOP ignored");

    // B. adder application test at 25 MHz, each vector twice
    send_word(32'h11);
    v.delete();
    foreach (pairs[i]) begin v.push_back(pairs[i]); v.push_back(pairs[i]); end
    load_vectors(v);
    add_v.delete(); add_t.delete();
    send_word(32'h3);
    #2000;
    check(add_v.size() == 8, $sformatf("B: %0d adder output changes, expected 8", add_v.size()));
    foreach (sums[i]) if (i < add_v.size()) begin
      check(add_v[i] == sums[i], $sformatf("B: adder output %0d = %02h expected %02h", i, add_v[i], sums[i]));
      if (i > 0) check(add_t[i] - add_t[i-1] == 80.0, $sformatf("B: adder step %0d after %0t", i, add_t[i] - add_t[i-1]));
    end
    send_word(32'h4);
    send_word(32'h0);   // CLEAR: divider back to 1, pins to 0
    #200;
    check(mem_pinout == '0, "B: CLEAR did not clear the pins");

    // C. 1025 words into the 1024-word RAM, then a full-speed run
    v.delete();
    for (int i = 0; i < 1025; i++) v.push_back(word_t'(i + 1) * 32'h0001_0003);
    load_vectors(v);
    check(n_overflow == 1, $sformatf("C: %0d overflow flags, expected 1", n_overflow));
    v = v[0:1023];
    mem_v.delete(); mem_t.delete();
    send_word(32'h3);
    #30000;
    check_run("C", v, 1);
    send_word(32'h4);

    // D. bad stop bit
    uart_byte(8'hC3, 1'b0);
    #(4 * BIT_NS);
    check(n_frame_error == 1, $sformatf("D: %0d frame errors, expected 1", n_frame_error));
    check(!mem_running && !mem_loading, "D: bad frame changed the mode");
  endtask

  // ---- buffer-based generator sequence ----
  task automatic buffer_sequence();
    word_t sent[$];
    for (int i = 0; i < 64; i++) begin
      word_t w;
      w = 32'hA000_0000 | word_t'(i * 7 + 1);
      sent.push_back(w);
      for (int k = 3; k >= 0; k--) epp_byte(w[8*k +: 8]);
    end
    repeat (10) @(negedge clk);
    check(buf_v.size() == 64, $sformatf("buffer: %0d vectors shown, expected 64", buf_v.size()));
    foreach (sent[i]) if (i < buf_v.size())
      check(buf_v[i] == sent[i], $sformatf("buffer: vector %0d %08h expected %08h", i, buf_v[i], sent[i]));
    check(buf_empty && !buf_full, "buffer: FIFO not empty at the end");
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 1'b0;
    #(3 * BIT_NS);
    fork
      memory_sequence();
      buffer_sequence();
    join
    check(n_load > 0,        "mechanism LOAD never happened");
    check(n_run > 0,         "mechanism RUN never happened");
    check(n_stop > 0,        "mechanism STOP never happened");
    check(n_setclock > 0,    "mechanism SETCLOCK never happened");
    check(n_clear > 0,       "mechanism CLEAR never happened");
    check(n_overflow > 0,    "mechanism RAM overflow never happened");
    check(n_frame_error > 0, "mechanism frame error never happened");
    check(n_epp > 0,         "mechanism EPP handshake never happened");
    check(n_fifo > 0,        "mechanism FIFO pass-through never happened");
    check(n_adder > 0,       "mechanism adder never happened");
    $display("mechanisms: LOAD %0d RUN %0d STOP %0d SETCLOCK %0d CLEAR %0d overflow %0d frame_error %0d EPP %0d FIFO %0d adder %0d",
             n_load, n_run, n_stop, n_setclock, n_clear, n_overflow, n_frame_error, n_epp, n_fifo, n_adder);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
