// byte_collector: packs four received bytes into one 32-bit word.
//
// The receiver's byte_ready is edge-detected (its previous value is kept in a
// flip-flop), so a ready signal that stays high for several clocks still
// counts as one byte. On each rising edge the byte is shifted into a 32-bit
// register from the right, so the first byte of a word ends up in bits 31:24
// (the host sends words most significant byte first). A 2-bit counter counts
// the bytes; on the fourth, the finished word is put on word_out and
// word_ready is high for one clock.
//
// Edge detection, the shift direction and the one-cycle word_ready follow the
// design. This implementation's own choices: word_out is a register that
// holds the last word until the next one, and a synchronous reset clears the
// byte count (the design has no way to re-align a word stream otherwise).
//
// Timing: word_ready is high in the clock after the rising edge of the
// fourth byte_ready.
module byte_collector
  import pg_pkg::*;
(
  input  logic  clk,
  input  logic  rst,          // synchronous, active high
  input  byte_t byte_in,
  input  logic  byte_ready,
  output word_t word_out,
  output logic  word_ready    // one-cycle pulse: word_out holds a new word
);

  logic       ready_q;
  logic [1:0] byte_count;
  logic [23:0] partial;       // the first three bytes of the word
  logic       byte_edge;

  assign byte_edge = byte_ready && !ready_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ready_q    <= 1'b0;
      byte_count <= '0;
      partial    <= '0;
      word_out   <= '0;
      word_ready <= 1'b0;
    end else begin
      ready_q    <= byte_ready;
      word_ready <= 1'b0;
      if (byte_edge) begin
        partial    <= {partial[15:0], byte_in};
        byte_count <= byte_count + 1'b1;
        if (byte_count == 2'd3) begin
          word_out   <= {partial, byte_in};
          word_ready <= 1'b1;
        end
      end
    end
  end

  // word_ready is a single-clock strobe.
  a_word_pulse: assert property (@(posedge clk) disable iff (rst) word_ready |=> !word_ready);

endmodule
