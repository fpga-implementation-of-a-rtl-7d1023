// epp_rx: EPP (IEEE 1284 enhanced parallel port) data-write receiver.
//
// The host starts a write cycle by pulling nWrite low, driving the data bus
// and pulling nDataStrobe low. The strobe (inverted to active high) passes a
// three-stage synchroniser; the second stage drives Wait, so Wait rises two
// clocks after the strobe is seen and falls two clocks after the host
// releases it, which completes the four-phase handshake. On the rising edge
// of the synchronised strobe, if the cycle is a write, the data bus is
// captured into data_out and byte_ready is high for one clock.
//
// The synchroniser depth, Wait taken from the synchroniser and the capture on
// the strobe edge follow the design. This implementation's own choices: the
// write qualifier is taken from nWrite through two flip-flops rather than
// raw, the address strobe and read cycles are not handled (the generator only
// receives data, so the data bus is an input here), and a synchronous reset
// is added.
//
// Timing: byte_ready is high in the third clock after nDataStrobe falls;
// data_out keeps the byte until the next write.
module epp_rx
  import pg_pkg::*;
(
  input  logic  clk,
  input  logic  rst,          // synchronous, active high
  input  logic  n_write,      // EPP nWrite, low = write cycle
  input  logic  n_dstrobe,    // EPP nDataStrobe, low = data cycle
  input  byte_t epp_data,     // EPP data bus, driven by the host
  output logic  epp_wait,     // EPP Wait, high = cycle acknowledged
  output logic  byte_ready,   // one-cycle pulse: data_out holds a new byte
  output byte_t data_out
);

  logic [2:0] strobe_sync;
  logic [1:0] write_sync;
  logic       strobe_rise;

  always_ff @(posedge clk) begin
    if (rst) begin
      strobe_sync <= '0;
      write_sync  <= '0;
    end else begin
      strobe_sync <= {strobe_sync[1:0], ~n_dstrobe};
      write_sync  <= {write_sync[0], ~n_write};
    end
  end

  assign strobe_rise = (strobe_sync[2:1] == 2'b01);
  assign epp_wait    = strobe_sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      byte_ready <= 1'b0;
      data_out   <= '0;
    end else begin
      byte_ready <= 1'b0;
      if (strobe_rise && write_sync[1]) begin
        byte_ready <= 1'b1;
        data_out   <= epp_data;
      end
    end
  end

  // byte_ready is a single-clock strobe.
  a_ready_pulse: assert property (@(posedge clk) disable iff (rst) byte_ready |=> !byte_ready);

endmodule
