// pg_pkg: types and constants shared by the pattern generator blocks.
//
// The memory-based generator is driven by 32-bit words. In instruction mode
// the three low bits of a word select the instruction and bits 31:3 carry its
// argument (iData); the opcode values are those of the instruction table of
// the design. Opcodes 101..111 are not defined and are ignored by the
// controller (a choice of this implementation).
package pg_pkg;

  localparam int unsigned WORD_W  = 32;  // test vector and instruction width
  localparam int unsigned BYTE_W  = 8;   // width of one received byte
  localparam int unsigned IDATA_W = 29;  // instruction argument, word[31:3]

  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [BYTE_W-1:0]  byte_t;
  typedef logic [IDATA_W-1:0] idata_t;

  typedef enum logic [2:0] {
    OP_CLEAR    = 3'b000,  // reset the generator
    OP_SETCLOCK = 3'b001,  // test clock = system clock / iData
    OP_LOAD     = 3'b010,  // next word is a length N, then N vectors
    OP_RUN      = 3'b011,  // play the loaded vectors
    OP_STOP     = 3'b100   // stop playing
  } opcode_t;

endpackage
