// tb_pg_buffer: self-checking end-to-end test of the buffer-based pattern
// generator.
//
// An EPP host model sends 300 random 32-bit vectors, most significant byte
// first, with the full four-phase handshake. Checked: every vector appears on
// the pins, in order, and only once all four of its bytes have arrived; each
// appears at the sixth rising clock edge after the data strobe of its fourth
// byte, as seen by a monitor sampling at rising clock edges; the output rate
// therefore equals the byte rate divided by four; the FIFO is empty again
// between vectors and never fills. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_pg_buffer;
  import pg_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  logic  n_write = 1'b1, n_dstrobe = 1'b1;
  byte_t epp_data = '0;
  logic  epp_wait, fifo_empty, fifo_full;
  word_t pinout;

  int checks = 0, failures = 0;

  pg_buffer dut (.clk, .rst, .epp_n_write(n_write), .epp_n_dstrobe(n_dstrobe), .epp_data,
                 .epp_wait, .pinout, .fifo_empty, .fifo_full);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  realtime strobe_t;
  task automatic epp_byte(input byte_t b);
    @(negedge clk);
    n_write = 1'b0; epp_data = b;
    #5 n_dstrobe = 1'b0;
    strobe_t = $realtime;
    wait (epp_wait);
    #40 n_dstrobe = 1'b1; n_write = 1'b1;
    wait (!epp_wait);
    #300;
  endtask

  word_t   pins_q = '0;
  word_t   seen_v[$];
  realtime seen_dt[$];
  int      full_seen = 0;
  always @(posedge clk) if (!rst) begin
    if (pinout != pins_q) begin
      seen_v.push_back(pinout);
      seen_dt.push_back($realtime - strobe_t);
    end
    pins_q <= pinout;
    if (fifo_full) full_seen++;
  end

  initial begin
    word_t sent[$];
    word_t w;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    check(fifo_empty, "FIFO not empty after reset");
    for (int i = 0; i < 300; i++) begin
      do w = $urandom; while (i > 0 && w == sent[i-1]);
      sent.push_back(w);
      for (int k = 3; k >= 0; k--) begin
        epp_byte(w[8*k +: 8]);
        if (k > 0) check(seen_v.size() == i, $sformatf("vector %0d shown before its last byte", i));
      end
      check(fifo_empty, "FIFO not drained after a vector");
    end
    repeat (10) @(negedge clk);
    check(seen_v.size() == sent.size(), $sformatf("%0d vectors on the pins, %0d sent", seen_v.size(), sent.size()));
    foreach (sent[i]) if (i < seen_v.size()) begin
      check(seen_v[i] == sent[i], $sformatf("vector %0d: %08h expected %08h", i, seen_v[i], sent[i]));
      check(seen_dt[i] == 125.0, $sformatf("vector %0d seen %0t ns after its last strobe", i, seen_dt[i]));
    end
    check(full_seen == 0, "FIFO full while being drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
