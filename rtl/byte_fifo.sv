// byte_fifo: first-in first-out buffer with an 8-bit write port and a 32-bit
// read port, for the buffer-based pattern generator.
//
// Bytes written with wr_en are packed four at a time, the first byte into
// bits 31:24 and the fourth into bits 7:0; each completed word enters a
// circular buffer of DEPTH words. empty is high while no complete word is
// stored. A read (rd_en while not empty) puts the oldest word on dout at the
// next clock edge; dout then holds it until the next read (standard, not
// first-word-fall-through, read timing). full is high when DEPTH words are
// stored; a byte written while full is dropped and the stored data is not
// disturbed.
//
// The 8-to-32 conversion with the first byte most significant, the
// 1024-word depth, the empty/full flags and the non-destructive overflow
// follow the design. This implementation's own choices: one clock for both
// ports (the generator clocks both ports from the same 50 MHz clock), full
// asserted on a full word buffer even if the packing register has room, and
// reset values.
module byte_fifo
  import pg_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,          // depth in 32-bit words
  parameter int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic  clk,
  input  logic  rst,       // synchronous, active high; empties the FIFO
  input  byte_t din,
  input  logic  wr_en,
  input  logic  rd_en,
  output word_t dout,
  output logic  empty,
  output logic  full
);

  word_t            mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;
  logic [1:0]       byte_idx;
  logic [23:0]      partial;
  logic             push, pop, wr_ok;

  assign empty = (count == '0);
  assign full  = (count == (PTR_W+1)'(DEPTH));
  assign wr_ok = wr_en && !full;
  assign push  = wr_ok && (byte_idx == 2'd3);
  assign pop   = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= {partial, din};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      byte_idx <= '0;
      partial  <= '0;
      dout     <= '0;
    end else begin
      if (wr_ok) begin
        partial  <= {partial[15:0], din};
        byte_idx <= byte_idx + 1'b1;
      end
      if (push) wr_ptr <= (wr_ptr == PTR_W'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop) begin
        dout   <= mem[rd_ptr];
        rd_ptr <= (rd_ptr == PTR_W'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      end
      unique case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // The flags never claim both states, and the count stays in range.
  a_flags: assert property (@(posedge clk) disable iff (rst) !(full && empty));
  a_count: assert property (@(posedge clk) disable iff (rst) count <= (PTR_W+1)'(DEPTH));

endmodule
