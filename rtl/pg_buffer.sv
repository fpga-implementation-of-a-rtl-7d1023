// pg_buffer: buffer-based pattern generator.
//
// Instead of storing a test and replaying it, this generator forwards the
// host's data to the pins as it arrives, so the length of a test is
// unlimited but its vector rate is bounded by the host link (one 32-bit
// vector per four bytes). Bytes from the EPP receiver are written into an
// 8-in/32-out FIFO on the rising edge of byte_ready (detected after a
// two-flip-flop stage) as long as the FIFO is not full; the FIFO is read
// whenever it is not empty, and its output register drives the pins
// directly. There is no instruction set and no flow control towards the
// host: bytes that arrive while the FIFO is full are lost.
//
// Structure (receiver, edge detector gated by not-full, read enable = not
// empty, FIFO output on the pins) follows the design. The reset and the
// status outputs are this implementation's additions.
//
// Timing: the pins change three clocks after byte_ready rises for the last
// byte of a vector, and hold it until the next complete vector.
module pg_buffer
  import pg_pkg::*;
#(
  parameter int unsigned DEPTH = 1024   // FIFO depth in 32-bit words
) (
  input  logic  clk,
  input  logic  rst,            // synchronous, active high
  input  logic  epp_n_write,
  input  logic  epp_n_dstrobe,
  input  byte_t epp_data,
  output logic  epp_wait,
  output word_t pinout,
  output logic  fifo_empty,
  output logic  fifo_full
);

  byte_t      rx_byte;
  logic       rx_ready;
  logic [1:0] ready_sync;
  logic       wr_en, rd_en;

  epp_rx u_rx (
    .clk        (clk),
    .rst        (rst),
    .n_write    (epp_n_write),
    .n_dstrobe  (epp_n_dstrobe),
    .epp_data   (epp_data),
    .epp_wait   (epp_wait),
    .byte_ready (rx_ready),
    .data_out   (rx_byte)
  );

  // Edge detector on byte_ready.
  always_ff @(posedge clk) begin
    if (rst) ready_sync <= '0;
    else     ready_sync <= {ready_sync[0], rx_ready};
  end

  assign wr_en = (ready_sync == 2'b01) && !fifo_full;
  assign rd_en = !fifo_empty;

  byte_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk   (clk),
    .rst   (rst),
    .din   (rx_byte),
    .wr_en (wr_en),
    .rd_en (rd_en),
    .dout  (pinout),
    .empty (fifo_empty),
    .full  (fifo_full)
  );

endmodule
