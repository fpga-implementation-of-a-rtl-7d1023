// tb_pg_memory: self-checking end-to-end test of the memory-based pattern
// generator, in both receiver variants.
//
// Two generators run side by side: one fed over RS-232 (with the bit rate
// raised to 1.5625 Mbaud so the test stays short; the receiver logic is the
// same) and one fed over EPP. Both receive the same host programs, sent as
// 32-bit words most significant byte first:
//  1. LOAD 4 vectors 1, 2, 4, 8 and RUN at the default divider 1: the pins
//     step through the vectors one per 20 ns clock.
//  2. STOP, SETCLOCK 16 (word 0x81), LOAD the 8 vectors of the original design's
//     clock-divider test, RUN: each vector stays 320 ns on the pins.
//  3. STOP, CLEAR: pins back to 0.
// Every change of the pins is recorded with its time and compared with the
// expected vectors and spacing. The serial generator also gets a frame with
// a bad stop bit, which must be flagged and ignored. A watchdog ends a hung
// run.
`timescale 1ns/1ps
module tb_pg_memory;
  import pg_pkg::*;

  localparam int unsigned BAUD   = 1_562_500;
  localparam real         BIT_NS = 1.0e9 / BAUD;

  logic  clk = 1'b0, rst = 1'b1;
  logic  rxd = 1'b1;
  logic  n_write = 1'b1, n_dstrobe = 1'b1;
  byte_t epp_data = '0;
  logic  epp_wait, epp_wait_ser;
  word_t pins_ser, pins_epp;
  logic  run_ser, run_epp, load_ser, load_epp, ovf_ser, ovf_epp, ferr_ser, ferr_epp;

  int checks = 0, failures = 0;

  pg_memory #(.BAUD(BAUD), .USE_EPP(1'b0)) u_ser (
    .clk, .rst, .rxd, .epp_n_write(1'b1), .epp_n_dstrobe(1'b1), .epp_data(8'h00),
    .epp_wait(epp_wait_ser), .pinout(pins_ser), .running(run_ser), .loading(load_ser),
    .overflow(ovf_ser), .frame_error(ferr_ser));

  pg_memory #(.USE_EPP(1'b1)) u_epp (
    .clk, .rst, .rxd(1'b1), .epp_n_write(n_write), .epp_n_dstrobe(n_dstrobe), .epp_data,
    .epp_wait, .pinout(pins_epp), .running(run_epp), .loading(load_epp),
    .overflow(ovf_epp), .frame_error(ferr_epp));

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- host models ----
  task automatic uart_byte(input byte_t b, input bit stop_ok = 1'b1);
    rxd = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(BIT_NS); end
    rxd = stop_ok; #(BIT_NS);
    rxd = 1'b1; #(BIT_NS);
  endtask

  task automatic epp_byte(input byte_t b);
    @(negedge clk);
    n_write = 1'b0; epp_data = b;
    #5 n_dstrobe = 1'b0;
    wait (epp_wait);
    #40 n_dstrobe = 1'b1; n_write = 1'b1;
    wait (!epp_wait);
    #100;
  endtask

  task automatic send_word(input word_t w);
    fork
      for (int k = 3; k >= 0; k--) uart_byte(w[8*k +: 8]);
      for (int k = 3; k >= 0; k--) epp_byte(w[8*k +: 8]);
    join
  endtask

  // ---- pin monitors ----
  realtime ser_t[$], epp_t[$];
  word_t   ser_v[$], epp_v[$];
  word_t   ser_q = '0, epp_q = '0;
  int      frame_errs = 0;
  always @(posedge clk) if (!rst) begin
    if (pins_ser != ser_q) begin ser_t.push_back($realtime); ser_v.push_back(pins_ser); end
    if (pins_epp != epp_q) begin epp_t.push_back($realtime); epp_v.push_back(pins_epp); end
    ser_q <= pins_ser;
    epp_q <= pins_epp;
    if (ferr_ser) frame_errs++;
  end

  task automatic clear_log();
    ser_t.delete(); ser_v.delete(); epp_t.delete(); epp_v.delete();
  endtask

  task automatic check_log(input string name, input word_t v[$], input realtime t[$],
                           input word_t exp_v[$], input int unsigned period_clk);
    check(v.size() == exp_v.size(), $sformatf("%s: %0d pin changes, expected %0d", name, v.size(), exp_v.size()));
    foreach (exp_v[i]) if (i < v.size()) begin
      check(v[i] == exp_v[i], $sformatf("%s: vector %0d %08h expected %08h", name, i, v[i], exp_v[i]));
      if (i > 0) check(t[i] - t[i-1] == 20.0 * period_clk,
                       $sformatf("%s: vector %0d after %0t ns, expected %0d ns", name, i, t[i] - t[i-1], 20 * period_clk));
    end
  endtask

  task automatic load_vectors(input word_t v[$]);
    send_word(32'h2);                 // LOAD
    send_word(word_t'(v.size()));
    foreach (v[i]) send_word(v[i]);
  endtask

  initial begin
    word_t v[$];
    repeat (4) @(negedge clk);
    rst = 1'b0;
    #(3 * BIT_NS);

    // 1. LOAD 4: 1, 2, 4, 8; RUN at divider 1
    v = '{32'h1, 32'h2, 32'h4, 32'h8};
    load_vectors(v);
    check(!load_ser && !load_epp, "still in data mode after the vectors");
    clear_log();
    send_word(32'h3);
    #2000;
    check(run_ser && run_epp, "not running after RUN");
    check_log("serial", ser_v, ser_t, v, 1);
    check_log("epp", epp_v, epp_t, v, 1);
    send_word(32'h4);
    check(!run_ser && !run_epp, "STOP did not end the run");

    // 2. SETCLOCK 16, the original design's 8-vector clock divider test
    send_word(32'h81);
    v = '{32'h16, 32'h17, 32'hFF, 32'h08, 32'h21, 32'h00, 32'h78, 32'h77};
    load_vectors(v);
    clear_log();
    send_word(32'h3);
    #5000;
    check_log("serial", ser_v, ser_t, v, 16);
    check_log("epp", epp_v, epp_t, v, 16);
    check(pins_ser == 32'h77 && pins_epp == 32'h77, "last vector not held");
    send_word(32'h4);

    // 3. CLEAR
    send_word(32'h0);
    #200;
    check(pins_ser == '0 && pins_epp == '0, "CLEAR did not clear the pins");

    // bad stop bit on the serial link: flagged and ignored
    uart_byte(8'h5A, 1'b0);
    #(4 * BIT_NS);
    check(frame_errs == 1, $sformatf("%0d frame errors, expected 1", frame_errs));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
