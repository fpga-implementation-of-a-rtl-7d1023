// pattern_generator_top: the pattern generator chip and its test adder.
//
// Three independent designs stand side by side, each with its own pins:
//  - the memory-based generator (pg_memory), loaded over RS-232, which
//    stores up to 1024 vectors and replays them at 50 MHz / div;
//  - the buffer-based generator (pg_buffer), fed over the EPP parallel
//    port, which forwards every four received bytes to its pins as one
//    vector;
//  - the 4-bit adder (adder4) that served as the device under test; on a
//    board it sits on a second FPGA, wired to generator pins 3:0 (A) and
//    7:4 (B).
// All share one clock and one synchronous, active-high reset. The design
// builds the two generators as separate FPGA configurations; putting both in
// one top is only a way to deliver them together.
module pattern_generator_top
  import pg_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic       clk,
  input  logic       rst,
  // memory-based generator
  input  logic       rs232_rxd,
  output word_t      mem_pinout,
  output logic       mem_running,
  output logic       mem_loading,
  output logic       mem_overflow,     // a LOAD word beyond the RAM was dropped
  output logic       mem_frame_error,  // a serial frame had a low stop bit
  // buffer-based generator
  input  logic       epp_n_write,
  input  logic       epp_n_dstrobe,
  input  byte_t      epp_data,
  output logic       epp_wait,
  output word_t      buf_pinout,
  output logic       buf_empty,
  output logic       buf_full,
  // test adder
  input  logic [3:0] adder_a,
  input  logic [3:0] adder_b,
  output logic [4:0] adder_c
);

  logic mem_epp_wait_unused;  // the serial variant has no EPP handshake

  pg_memory #(.CLK_HZ(CLK_HZ), .USE_EPP(1'b0)) u_pg_memory (
    .clk           (clk),
    .rst           (rst),
    .rxd           (rs232_rxd),
    .epp_n_write   (1'b1),
    .epp_n_dstrobe (1'b1),
    .epp_data      ('0),
    .epp_wait      (mem_epp_wait_unused),
    .pinout        (mem_pinout),
    .running       (mem_running),
    .loading       (mem_loading),
    .overflow      (mem_overflow),
    .frame_error   (mem_frame_error)
  );

  pg_buffer u_pg_buffer (
    .clk           (clk),
    .rst           (rst),
    .epp_n_write   (epp_n_write),
    .epp_n_dstrobe (epp_n_dstrobe),
    .epp_data      (epp_data),
    .epp_wait      (epp_wait),
    .pinout        (buf_pinout),
    .fifo_empty    (buf_empty),
    .fifo_full     (buf_full)
  );

  adder4 u_adder (
    .clk (clk),
    .a   (adder_a),
    .b   (adder_b),
    .c   (adder_c)
  );

endmodule
