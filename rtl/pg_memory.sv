// pg_memory: memory-based pattern generator.
//
// The host first downloads up to DEPTH 32-bit test vectors into an on-chip
// RAM, then starts a run; the vectors are replayed on the 32 output pins at
// a test frequency of f_clk / div, independent of the speed of the host link.
// Data path:
//
//   receiver --byte/byte_ready--> byte_collector --word/word_ready-->
//   pg_controller --en/we/addr/din--> block_ram --dout--> pin register
//
// The receiver is the RS-232 receiver (USE_EPP = 0) or the EPP parallel-port
// receiver (USE_EPP = 1); both deliver bytes with a byte_ready strobe, so
// nothing after them changes. Host words are sent most significant byte
// first. The pin register loads the RAM output only when the controller
// signals a completed read, so the echo the RAM gives while being written
// never reaches the pins; CLEAR sets the pins to 0.
//
// Instruction set, blocks and their connections follow the design; the
// instance of the unused receiver is not built. Its inputs are then left
// unconnected on purpose (lint reports them as unused) and its outputs are
// held low: epp_wait with USE_EPP = 0, frame_error with USE_EPP = 1.
//
// Timing: vector k of a run reaches the pins 3 + k*div clocks after the
// word_ready of the RUN word, i.e. after the last byte of RUN is received.
module pg_memory
  import pg_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned BAUD    = 19_200,
  parameter int unsigned DEPTH   = 1024,
  parameter bit          USE_EPP = 1'b0
) (
  input  logic  clk,
  input  logic  rst,            // synchronous, active high
  // RS-232 link (USE_EPP = 0)
  input  logic  rxd,
  // EPP link (USE_EPP = 1)
  input  logic  epp_n_write,
  input  logic  epp_n_dstrobe,
  input  byte_t epp_data,
  output logic  epp_wait,
  // test vector pins
  output word_t pinout,
  // status
  output logic  running,
  output logic  loading,
  output logic  overflow,
  output logic  frame_error
);

  localparam int unsigned ADDR_W = $clog2(DEPTH);

  byte_t             rx_byte;
  logic              rx_ready;
  word_t             word;
  logic              word_ready;
  logic              mem_en, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  word_t             mem_din, mem_dout;
  logic              out_load, out_clear;

  if (USE_EPP) begin : g_epp
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
    assign frame_error = 1'b0;
  end else begin : g_serial
    uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
      .clk         (clk),
      .rst         (rst),
      .rxd         (rxd),
      .byte_ready  (rx_ready),
      .data_out    (rx_byte),
      .frame_error (frame_error)
    );
    assign epp_wait = 1'b0;
  end

  byte_collector u_collect (
    .clk        (clk),
    .rst        (rst),
    .byte_in    (rx_byte),
    .byte_ready (rx_ready),
    .word_out   (word),
    .word_ready (word_ready)
  );

  pg_controller #(.DEPTH(DEPTH)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .word_in    (word),
    .word_ready (word_ready),
    .mem_en     (mem_en),
    .mem_we     (mem_we),
    .mem_addr   (mem_addr),
    .mem_din    (mem_din),
    .out_load   (out_load),
    .out_clear  (out_clear),
    .running    (running),
    .loading    (loading),
    .overflow   (overflow)
  );

  block_ram #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_ram (
    .clk  (clk),
    .rst  (rst),
    .en   (mem_en),
    .we   (mem_we),
    .addr (mem_addr),
    .din  (mem_din),
    .dout (mem_dout)
  );

  // Output pin register.
  always_ff @(posedge clk) begin
    if (rst || out_clear) pinout <= '0;
    else if (out_load)    pinout <= mem_dout;
  end

endmodule
