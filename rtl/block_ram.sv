// block_ram: single-port synchronous RAM holding the test vectors.
//
// DEPTH words of WIDTH bits (1024 x 32 = 32 Kbit, eight 4-Kbit block RAMs of
// the original FPGA). One address port serves both writes and reads. With en
// high, a write (we high) stores din and also puts din on dout ("write
// first": the written data is echoed on the output); a read (we low) puts the
// addressed word on dout at the next clock edge. With en low, dout keeps its
// value.
//
// Size, ports and the echo on write follow the design; the echo is why the
// pin register that follows only loads on reads. The zero reset value of dout
// is this implementation's choice; the array itself is not reset.
//
// Timing: read latency one clock.
module block_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,    // clears dout only
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  din,
  output logic [WIDTH-1:0]  dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && we) mem[addr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst)          dout <= '0;
    else if (en) begin
      if (we)         dout <= din;
      else            dout <= mem[addr];
    end
  end

endmodule
