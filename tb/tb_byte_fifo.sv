// tb_byte_fifo: self-checking test of the 8-in/32-out FIFO at its full
// 1024-word depth.
//
// A reference queue of words is kept next to the FIFO. Checked: the byte
// order of the figure example (01 00 F0 0F gives 0x0100F00F); empty while
// fewer than four bytes are stored; random interleaved writes and reads
// come out in order, across pointer wrap-around; full after 1024 words;
// bytes written while full are dropped without touching the stored words
// (4096 bytes fill it, the next 8 are lost); draining returns every stored
// word and then empty. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_byte_fifo;
  import pg_pkg::*;

  localparam int unsigned DEPTH = 1024;

  logic  clk = 1'b0, rst = 1'b1;
  byte_t din = '0;
  logic  wr_en = 1'b0, rd_en = 1'b0;
  word_t dout;
  logic  empty, full;

  int checks = 0, failures = 0;
  word_t model[$];
  byte_t pend[$];

  byte_fifo dut (.clk, .rst, .din, .wr_en, .rd_en, .dout, .empty, .full);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One clock: optionally write a byte and/or read a word.
  task automatic step(input bit do_wr, input byte_t b, input bit do_rd);
    bit will_pop, will_push_ok;
    @(negedge clk);
    will_pop     = do_rd && !empty;
    will_push_ok = do_wr && !full;
    wr_en = do_wr; din = b; rd_en = do_rd;
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0;
    if (will_push_ok) begin
      pend.push_back(b);
      if (pend.size() == 4) begin
        model.push_back({pend[0], pend[1], pend[2], pend[3]});
        pend.delete();
      end
    end
    if (will_pop) begin
      word_t e;
      e = model.pop_front();
      check(dout == e, $sformatf("read %08h expected %08h", dout, e));
    end
  endtask

  initial begin
    int dropped_before;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(empty && !full, "not empty after reset");
    step(1, 8'h01, 0); step(1, 8'h00, 0); step(1, 8'hF0, 0);
    check(empty, "word visible after three bytes");
    step(1, 8'h0F, 0);
    check(!empty, "empty after four bytes");
    step(0, 0, 1);
    check(dout == 32'h0100_F00F, $sformatf("figure example read %08h", dout));
    check(empty, "not empty after reading the only word");
    // random traffic, enough to wrap the pointers several times
    for (int i = 0; i < 20000; i++) step($urandom_range(0, 99) < 75, byte_t'($urandom), $urandom_range(0, 99) < 20);
    // drain
    while (!empty) step(0, 0, 1);
    check(model.size() == 0, $sformatf("%0d words left in model", model.size()));
    // fill completely (leftover partial bytes first)
    while (!full) step(1, byte_t'($urandom), 0);
    check(model.size() == DEPTH, $sformatf("full at %0d words", model.size()));
    dropped_before = model.size();
    for (int i = 0; i < 8; i++) step(1, 8'hAA, 0);
    check(model.size() == dropped_before && full, "write while full was not dropped");
    while (!empty) step(0, 0, 1);
    check(model.size() == 0, "drain after full");
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
