// uart_rx: RS-232 receiver for the memory-based pattern generator.
//
// Receives 8N1 frames (one start bit, eight data bits LSB first, one stop
// bit) at BAUD. A sample tick is made every CLK_HZ/(BAUD*OVERSAMPLE) system
// clocks (326 at 50 MHz, 19200 baud, 8x). On every tick the line passes a
// two-stage synchroniser and a 2-bit saturating up/down counter that only
// changes the filtered bit when the counter reaches 0 or 3, which removes
// short glitches. A low filtered bit in IDLE starts a frame; the bits are then
// sampled once every OVERSAMPLE ticks and shifted in from the top, so the
// first bit received ends in bit 0. If the stop bit reads high, data_out is
// loaded and byte_ready is high for exactly one system clock; otherwise the
// frame is dropped, frame_error pulses, and the receiver waits for the line
// to go high again.
//
// Oversampling factor, the synchroniser, the counter filter and the stop-bit
// check follow the design. This implementation's own choices: a clock enable
// instead of a derived sample clock, the first data sample taken
// 1.5 bit times after the start bit is seen (mid-bit), a one-cycle byte_ready
// pulse, the frame_error output and the synchronous reset.
//
// Timing: byte_ready rises about 10.2 bit times after the start edge (the
// middle of the stop bit plus about six samples of synchroniser and filter
// delay).
module uart_rx
  import pg_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 19_200,
  parameter int unsigned OVERSAMPLE = 8
) (
  input  logic  clk,
  input  logic  rst,         // synchronous, active high
  input  logic  rxd,         // serial line, idle high
  output logic  byte_ready,  // one-cycle pulse: data_out holds a new byte
  output byte_t data_out,
  output logic  frame_error  // one-cycle pulse: stop bit was low
);

  localparam int unsigned TICK_DIV = (CLK_HZ + (BAUD * OVERSAMPLE) / 2) / (BAUD * OVERSAMPLE);
  localparam int unsigned TICK_W   = $clog2(TICK_DIV + 1);
  localparam int unsigned SPACE_W  = $clog2(2 * OVERSAMPLE);
  // Ticks from seeing the start bit to the middle of data bit 0.
  localparam int unsigned FIRST_WAIT = OVERSAMPLE + OVERSAMPLE / 2;

  typedef enum logic [1:0] {S_IDLE, S_DATA, S_STOP, S_BREAK} state_t;

  logic [TICK_W-1:0]  tick_cnt;
  logic               tick;
  logic [1:0]         sync;
  logic [1:0]         filt_cnt;
  logic               rx_bit;
  state_t             state;
  logic [SPACE_W-1:0] spacing;
  logic [2:0]         bit_idx;
  byte_t              shreg;

  // Oversampling clock enable.
  always_ff @(posedge clk) begin
    if (rst || tick_cnt == TICK_W'(TICK_DIV - 1)) tick_cnt <= '0;
    else                                          tick_cnt <= tick_cnt + 1'b1;
  end
  assign tick = (tick_cnt == TICK_W'(TICK_DIV - 1));

  // Synchroniser and glitch filter.
  always_ff @(posedge clk) begin
    if (rst) begin
      sync     <= 2'b11;
      filt_cnt <= 2'b11;
      rx_bit   <= 1'b1;
    end else if (tick) begin
      sync <= {sync[0], rxd};
      if (sync[1] && filt_cnt != 2'b11)       filt_cnt <= filt_cnt + 1'b1;
      else if (!sync[1] && filt_cnt != 2'b00) filt_cnt <= filt_cnt - 1'b1;
      if (filt_cnt == 2'b00)      rx_bit <= 1'b0;
      else if (filt_cnt == 2'b11) rx_bit <= 1'b1;
    end
  end

  // Frame state machine.
  always_ff @(posedge clk) begin
    byte_ready  <= 1'b0;
    frame_error <= 1'b0;
    if (rst) begin
      state    <= S_IDLE;
      spacing  <= '0;
      bit_idx  <= '0;
      shreg    <= '0;
      data_out <= '0;
    end else if (tick) begin
      unique case (state)
        S_IDLE: begin
          if (!rx_bit) begin
            state   <= S_DATA;
            spacing <= SPACE_W'(FIRST_WAIT - 1);
            bit_idx <= '0;
          end
        end
        S_DATA: begin
          if (spacing == '0) begin
            shreg   <= {rx_bit, shreg[7:1]};
            spacing <= SPACE_W'(OVERSAMPLE - 1);
            bit_idx <= bit_idx + 1'b1;
            if (bit_idx == 3'd7) state <= S_STOP;
          end else begin
            spacing <= spacing - 1'b1;
          end
        end
        S_STOP: begin
          if (spacing == '0) begin
            if (rx_bit) begin
              data_out   <= shreg;
              byte_ready <= 1'b1;
              state      <= S_IDLE;
            end else begin
              frame_error <= 1'b1;
              state       <= S_BREAK;
            end
          end else begin
            spacing <= spacing - 1'b1;
          end
        end
        S_BREAK: if (rx_bit) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A frame ends either in a byte or in a frame error, never both.
  a_one_outcome: assert property (@(posedge clk) disable iff (rst) !(byte_ready && frame_error));

endmodule
