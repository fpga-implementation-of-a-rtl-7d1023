// clock_divider: clock enable that sets the test frequency.
//
// The generator never divides the clock itself; it produces a clock enable
// for the logic that steps through the test vectors. A counter runs from 0 to
// div-1 and is compared with the divider value set by the SETCLOCK
// instruction; ce is high whenever the counter is 0, i.e. once every div
// clocks, so the test frequency is f_clk / div (50 MHz / 16 = 3.125 MHz, a
// 320 ns vector period). A divider of 0 or 1 gives ce in every clock.
// restart puts the counter back to 0 so that ce is high in the very next
// clock; the controller uses it to start a run on a clean period boundary.
//
// Counter, divider register and comparator follow the design; the divider
// register itself lives in the controller, which passes its value in on div.
// The restart input and the treatment of 0 are this implementation's choices.
module clock_divider #(
  parameter int unsigned DIV_W = 29   // width of the SETCLOCK argument
) (
  input  logic             clk,
  input  logic             rst,       // synchronous, active high
  input  logic             restart,   // counter to 0: ce high next clock
  input  logic [DIV_W-1:0] div,       // divide ratio
  output logic             ce         // one clock in every div
);

  logic [DIV_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || restart)                        count <= '0;
    else if (div <= 1 || count >= div - 1'b1)  count <= '0;
    else                                       count <= count + 1'b1;
  end

  assign ce = (count == '0);

endmodule
