// adder4: the device under test of the application test.
//
// A 4-bit adder with a registered 5-bit sum, built on a second FPGA and
// driven by the pattern generator: in the test set-up A comes from pins 3:0
// and B from pins 7:4 of the generator, so a test vector 0x..BA adds its
// two lowest hex digits. The sum appears one clock after the operands.
// The function and the registered output follow the design; the module has
// no reset (its only state is the output register).
module adder4 (
  input  logic       clk,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [4:0] c
);

  always_ff @(posedge clk) c <= {1'b0, a} + {1'b0, b};

endmodule
