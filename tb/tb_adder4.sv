// tb_adder4: exhaustive self-checking test of the 4-bit test adder.
//
// All 256 operand pairs are applied; the 5-bit sum must appear one clock
// later. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_adder4;

  logic       clk = 1'b0;
  logic [3:0] a = '0, b = '0;
  logic [4:0] c;

  int checks = 0, failures = 0;

  adder4 dut (.clk, .a, .b, .c);

  always #10 clk = ~clk;

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        a = 4'(i); b = 4'(j);
        @(negedge clk);
        checks++;
        if (c != 5'(i + j)) begin
          failures++;
          $display("FAIL: %0d + %0d gave %0d", i, j, c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
