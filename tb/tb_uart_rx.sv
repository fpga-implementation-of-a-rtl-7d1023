// tb_uart_rx: self-checking test of the RS-232 receiver at its default
// 50 MHz / 19200 baud / 8x setting.
//
// A host model sends 8N1 frames LSB first. Checked: every byte arrives
// intact and in order; byte_ready is a single-cycle pulse; it rises between
// 9 and 10.5 bit times after the start edge; a frame with a low stop bit is
// dropped and flagged; a short low glitch on the idle line is filtered out;
// the receiver still works after both. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_uart_rx;
  import pg_pkg::*;

  localparam int unsigned BAUD   = 19_200;
  localparam real         BIT_NS = 1.0e9 / BAUD;

  logic  clk = 1'b0, rst = 1'b1, rxd = 1'b1;
  logic  byte_ready, frame_error;
  byte_t data_out;

  int checks = 0, failures = 0;
  byte_t expected[$];
  int    got = 0, frame_errs = 0;
  realtime start_t;

  uart_rx dut (.clk, .rst, .rxd, .byte_ready, .data_out, .frame_error);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input byte_t b, input bit stop_ok = 1'b1);
    start_t = $realtime;
    rxd = 1'b0; #(BIT_NS);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(BIT_NS); end
    rxd = stop_ok; #(BIT_NS);
    rxd = 1'b1; #(BIT_NS);
  endtask

  // Receive monitor.
  always @(posedge clk) begin
    if (byte_ready && !rst) begin
      real dt;
      got++;
      dt = ($realtime - start_t) / BIT_NS;
      check(expected.size() > 0, "byte_ready with no byte outstanding");
      if (expected.size() > 0) begin
        byte_t e;
        e = expected.pop_front();
        check(data_out == e, $sformatf("byte %0d: got %02h expected %02h", got, data_out, e));
      end
      check(dt > 9.0 && dt < 10.5, $sformatf("byte_ready at %f bit times", dt));
    end
    if (frame_error && !rst) frame_errs++;
  end

  // byte_ready must be a single-cycle pulse.
  logic br_q = 1'b0;
  always @(posedge clk) begin
    br_q <= byte_ready;
    if (br_q && byte_ready && !rst) check(1'b0, "byte_ready longer than one cycle");
  end

  initial begin
    byte_t b;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    #(2 * BIT_NS);
    // bytes of the original design's test stream, then random bytes
    for (int i = 0; i < 24; i++) begin
      unique case (i)
        0: b = 8'h55;
        1: b = 8'hFF;
        2: b = 8'h00;
        3: b = 8'h02;
        default: b = byte_t'($urandom);
      endcase
      expected.push_back(b);
      send(b);
    end
    #(2 * BIT_NS);
    check(got == 24 && expected.size() == 0, $sformatf("received %0d of 24 bytes", got));

    // framing error: dropped and flagged
    send(8'hA5, 1'b0);
    #(3 * BIT_NS);
    check(got == 24, "byte with bad stop bit was delivered");
    check(frame_errs == 1, $sformatf("frame_error count %0d, expected 1", frame_errs));

    // glitch of about one sample period on the idle line
    rxd = 1'b0; #(BIT_NS / 8.0); rxd = 1'b1;
    #(12 * BIT_NS);
    check(got == 24 && frame_errs == 1, "glitch was taken as a start bit");

    // still alive
    expected.push_back(8'h3C);
    send(8'h3C);
    #(2 * BIT_NS);
    check(got == 25, "receiver dead after error and glitch");

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
