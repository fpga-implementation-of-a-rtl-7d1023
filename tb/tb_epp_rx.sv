// tb_epp_rx: self-checking test of the EPP data-write receiver.
//
// A host model performs IEEE 1284 EPP data writes: nWrite low, data on the
// bus, nDataStrobe low, wait for Wait high, release after 40 ns, wait for
// Wait low. Checked: each byte appears on data_out with a single-cycle
// byte_ready, exactly three clocks after the strobe falls; Wait follows the
// strobe two clocks late; a read cycle (nWrite high) is acknowledged but
// delivers no byte. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_epp_rx;
  import pg_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  logic  n_write = 1'b1, n_dstrobe = 1'b1;
  byte_t epp_data = '0;
  logic  epp_wait, byte_ready;
  byte_t data_out;

  int checks = 0, failures = 0;
  int got = 0;
  int cyc = 0;
  byte_t expected[$];
  int words[7] = '{2, 4, 1, 2, 4, 8, 3};
  realtime strobe_t;

  epp_rx dut (.clk, .rst, .n_write, .n_dstrobe, .epp_data, .epp_wait, .byte_ready, .data_out);

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic epp_cycle(input byte_t b, input bit write);
    int t0;
    @(negedge clk);
    n_write  = !write;
    epp_data = b;
    #5;
    n_dstrobe  = 1'b0;
    strobe_t = $realtime;
    t0 = cyc;
    while (!epp_wait && cyc - t0 < 50) @(posedge clk);
    check(epp_wait, "Wait never rose");
    check($realtime - strobe_t >= 25 && $realtime - strobe_t <= 45,
          $sformatf("Wait seen %0t ns after strobe", $realtime - strobe_t));
    #40;
    n_dstrobe = 1'b1;
    n_write   = 1'b1;
    t0 = cyc;
    while (epp_wait && cyc - t0 < 50) @(posedge clk);
    check(!epp_wait, "Wait never fell");
    #546;
  endtask

  always @(posedge clk) begin
    if (byte_ready && !rst) begin
      got++;
      check(expected.size() > 0, "byte_ready with no write outstanding");
      if (expected.size() > 0) begin
        byte_t e;
        e = expected.pop_front();
        check(data_out == e, $sformatf("got %02h expected %02h", data_out, e));
      end
      // strobe falls 5 ns after a falling clock edge: the third rising edge
      // after it sets byte_ready, seen at the fourth, 65 ns after the strobe
      check($realtime - strobe_t == 65, $sformatf("byte_ready seen %0t ns after strobe", $realtime - strobe_t));
    end
  end

  logic br_q = 1'b0;
  always @(posedge clk) begin
    br_q <= byte_ready;
    if (br_q && byte_ready && !rst) check(1'b0, "byte_ready longer than one cycle");
  end

  initial begin
    byte_t b;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (4) @(posedge clk);
    // the original design's 28-byte stream LOAD 4, 1, 2, 4, 8, RUN, then random
    for (int w = 0; w < 7; w++) begin
      for (int k = 0; k < 4; k++) begin
        b = (k == 3) ? byte_t'(words[w]) : 8'h00;
        expected.push_back(b);
        epp_cycle(b, 1'b1);
      end
    end
    for (int i = 0; i < 20; i++) begin
      b = byte_t'($urandom);
      expected.push_back(b);
      epp_cycle(b, 1'b1);
    end
    repeat (5) @(posedge clk);
    check(got == 48 && expected.size() == 0, $sformatf("received %0d of 48 bytes", got));
    // read cycle: handshake completes, no byte
    epp_cycle(8'hEE, 1'b0);
    repeat (5) @(posedge clk);
    check(got == 48, "read cycle produced a byte");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
