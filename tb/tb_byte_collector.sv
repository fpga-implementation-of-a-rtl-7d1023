// tb_byte_collector: self-checking test of the byte-to-word packer.
//
// Bytes are offered with byte_ready pulses of random length (1 to 5 clocks)
// and random gaps. Checked: each group of four bytes comes out as one word
// with the first byte in bits 31:24; word_ready is high for exactly one
// clock, in the clock after the fourth byte's rising edge; no word appears
// for fewer than four bytes; reset discards a partial word. A watchdog ends
// a hung run.
`timescale 1ns/1ps
module tb_byte_collector;
  import pg_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  byte_t byte_in = '0;
  logic  byte_ready = 1'b0;
  word_t word_out;
  logic  word_ready;

  int checks = 0, failures = 0;
  int words_seen = 0;
  realtime last_edge;
  word_t expected[$];

  byte_collector dut (.clk, .rst, .byte_in, .byte_ready, .word_out, .word_ready);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic offer(input byte_t b);
    @(negedge clk);
    byte_in    = b;
    byte_ready = 1'b1;
    @(posedge clk);
    last_edge = $realtime;  // edge at which the byte is first seen
    repeat ($urandom_range(0, 4)) @(posedge clk);
    @(negedge clk);
    byte_ready = 1'b0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (word_ready && !rst) begin
      words_seen++;
      check(expected.size() > 0, "word_ready with no word expected");
      if (expected.size() > 0) begin
        word_t e;
        e = expected.pop_front();
        check(word_out == e, $sformatf("word %08h expected %08h", word_out, e));
      end
      check($realtime - last_edge == 20, $sformatf("word_ready seen %0t ns after 4th byte", $realtime - last_edge));
    end
  end

  logic wr_q = 1'b0;
  always @(posedge clk) begin
    wr_q <= word_ready;
    if (wr_q && word_ready && !rst) check(1'b0, "word_ready longer than one cycle");
  end

  initial begin
    word_t w;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // figure example: bytes 01 00 F0 0F make 0x0100F00F
    expected.push_back(32'h0100_F00F);
    offer(8'h01); offer(8'h00); offer(8'hF0); offer(8'h0F);
    for (int i = 0; i < 40; i++) begin
      w = $urandom;
      expected.push_back(w);
      for (int k = 3; k >= 0; k--) offer(w[8*k +: 8]);
    end
    repeat (4) @(posedge clk);
    check(words_seen == 41 && expected.size() == 0, $sformatf("%0d of 41 words", words_seen));
    // three bytes only: no word
    offer(8'h11); offer(8'h22); offer(8'h33);
    repeat (6) @(posedge clk);
    check(words_seen == 41, "word out after three bytes");
    // reset drops the partial word
    @(negedge clk) rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    expected.push_back(32'hDEAD_BEEF);
    offer(8'hDE); offer(8'hAD); offer(8'hBE); offer(8'hEF);
    repeat (4) @(posedge clk);
    check(words_seen == 42 && expected.size() == 0, "word after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
