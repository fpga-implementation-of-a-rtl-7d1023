// tb_block_ram: self-checking test of the 1024 x 32 single-port RAM.
//
// Fills every address with a value derived from the address, reads them all
// back in random order against a reference array, and checks: one-clock
// read latency, the written word echoed on dout during a write, dout held
// while en is low, and no write while en is low. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_block_ram;

  localparam int unsigned WIDTH = 32, DEPTH = 1024, ADDR_W = 10;

  logic              clk = 1'b0, rst = 1'b1, en = 1'b0, we = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  logic [WIDTH-1:0]  din = '0, dout;
  logic [WIDTH-1:0]  ref_mem [DEPTH];

  int checks = 0, failures = 0;

  block_ram dut (.clk, .rst, .en, .we, .addr, .din, .dout);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [WIDTH-1:0] pattern(input int unsigned a);
    return (a * 32'h9E37_79B9) ^ 32'h0F0F_1234;
  endfunction

  initial begin
    int unsigned a;
    logic [WIDTH-1:0] held;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = ADDR_W'(i); din = pattern(i);
      ref_mem[i] = din;
      @(negedge clk);
      check(dout == ref_mem[i], $sformatf("write echo at %0d", i));
      en = 1'b0; we = 1'b0;
    end
    for (int i = 0; i < 3000; i++) begin
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      en = 1'b1; we = 1'b0; addr = ADDR_W'(a);
      @(negedge clk);
      en = 1'b0;
      check(dout == ref_mem[a], $sformatf("read %0d: %08h expected %08h", a, dout, ref_mem[a]));
    end
    // en low: no write, dout held
    held = dout;
    @(negedge clk);
    en = 1'b0; we = 1'b1; addr = 10'd5; din = 32'hFFFF_FFFF;
    @(negedge clk);
    we = 1'b0;
    check(dout == held, "dout changed while en low");
    en = 1'b1; addr = 10'd5;
    @(negedge clk);
    en = 1'b0;
    check(dout == ref_mem[5], "write happened while en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
