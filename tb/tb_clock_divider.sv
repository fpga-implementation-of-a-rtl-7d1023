// tb_clock_divider: self-checking test of the test-frequency clock enable.
//
// For the dividers of the frequency table (1, 2, 4, 8, 10, 16) and a few
// others (0, 3, 1000) the distance between ce pulses is measured and must
// equal the divider (1 for 0). After restart, ce must be high in the very
// next clock. With div = 16 the period at 50 MHz is checked to be 320 ns.
// A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_clock_divider;

  localparam int unsigned DIV_W = 29;

  logic             clk = 1'b0, rst = 1'b1, restart = 1'b0;
  logic [DIV_W-1:0] div = 1;
  logic             ce;

  int checks = 0, failures = 0;
  int unsigned ds[9] = '{1, 2, 4, 8, 10, 16, 0, 3, 1000};

  clock_divider #(.DIV_W(DIV_W)) dut (.clk, .rst, .restart, .div, .ce);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input int unsigned d);
    int unsigned expect_p, n;
    realtime t_prev;
    expect_p = (d == 0) ? 1 : d;
    @(negedge clk);
    div     = DIV_W'(d);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    check(ce, $sformatf("div %0d: ce not high right after restart", d));
    t_prev = $realtime;
    for (int k = 0; k < 5; k++) begin
      n = 0;
      do begin
        @(negedge clk);
        n++;
      end while (!ce && n < 5000);
      check(n == expect_p, $sformatf("div %0d: ce period %0d", d, n));
      if (d == 16) check($realtime - t_prev == 320.0, $sformatf("div 16: %0t ns period", $realtime - t_prev));
      t_prev = $realtime;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    foreach (ds[i]) measure(ds[i]);
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
