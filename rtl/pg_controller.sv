// pg_controller: instruction decoder and memory sequencer of the
// memory-based pattern generator.
//
// Words arrive from the byte collector with a one-cycle word_ready. The
// controller starts in instruction mode (IDLE). A word received there is
// held and decoded in DECODE, one clock later:
//   CLEAR    divider back to 1, loaded length to 0, output pins to 0
//   SETCLOCK divider register <= word[31:3]
//   LOAD     enter data mode: the next word is the vector count N
//            (COLLECT_LEN), then N words are written to addresses 0..N-1
//            (WRITE), after which the FSM returns to IDLE
//   RUN      enter RUNNING: restart the clock divider and read one vector per
//            clock enable, from address 0 up to the last one loaded; the
//            last vector then stays on the pins
//   STOP     no effect outside RUNNING
// In RUNNING the controller only listens for STOP; any other word is ignored.
// Undefined opcodes are ignored.
//
// Memory side: mem_en/mem_we/mem_addr/mem_din drive a single-port RAM with
// one clock read latency. out_load is high in the clock in which the RAM
// output holds a vector just read, so a pin register loading on out_load
// changes every div clocks during a run. out_clear asks for the pins to be
// cleared (CLEAR).
//
// The five states, the opcodes, the divider taken from word[31:3], the
// separation into a state register, next-state logic, output logic and a
// clocked address block, and the one-pass read from address 0 follow the
// design. This implementation's own choices: a LOAD longer than the RAM keeps
// consuming its N words (so the word stream stays aligned) but drops those
// beyond DEPTH and flags each with overflow; a length of 0 returns straight
// to IDLE; RUN restarts the divider; what CLEAR resets. As in the design,
// a LOAD that receives fewer than N words waits for the rest indefinitely.
//
// Timing: vector k (k = 0, 1, ...) of a run is read 2 + k*div clocks after
// the RUN word's word_ready, and appears on the pins one clock after that.
module pg_controller
  import pg_pkg::*;
#(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,         // synchronous, active high
  input  word_t             word_in,
  input  logic              word_ready,
  // RAM port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output word_t             mem_din,
  // pin register control
  output logic              out_load,
  output logic              out_clear,
  // status
  output logic              running,
  output logic              loading,     // data mode (COLLECT_LEN or WRITE)
  output logic              overflow     // a LOAD word beyond DEPTH was dropped
);

  typedef enum logic [2:0] {
    IDLE, DECODE, RUNNING, COLLECT_LEN, WRITE
  } state_t;

  state_t            state, next_state;
  word_t             instr;        // word being decoded
  idata_t            div_reg;      // SETCLOCK divider
  word_t             load_len;     // N of the current LOAD
  word_t             wr_count;     // words of the current LOAD received
  logic [ADDR_W:0]   run_len;      // vectors held in the RAM
  logic [ADDR_W:0]   rd_idx;       // next vector to read
  logic              ce;
  logic              restart;
  logic              rd_fire;
  logic              wr_fire;
  opcode_t           op;

  assign op = opcode_t'(instr[2:0]);

  // Clock enable for the test frequency.
  assign restart = (state == DECODE) && (op == OP_RUN);

  clock_divider #(.DIV_W(IDATA_W)) u_div (
    .clk     (clk),
    .rst     (rst),
    .restart (restart),
    .div     (div_reg),
    .ce      (ce)
  );

  // State register.
  always_ff @(posedge clk) begin
    if (rst) state <= IDLE;
    else     state <= next_state;
  end

  // Next-state function.
  always_comb begin
    next_state = state;
    unique case (state)
      IDLE:    if (word_ready) next_state = DECODE;
      DECODE: begin
        unique case (op)
          OP_LOAD: next_state = COLLECT_LEN;
          OP_RUN:  next_state = RUNNING;
          default: next_state = IDLE;
        endcase
      end
      RUNNING: if (word_ready && opcode_t'(word_in[2:0]) == OP_STOP) next_state = IDLE;
      COLLECT_LEN: if (word_ready) next_state = (word_in == '0) ? IDLE : WRITE;
      WRITE:   if (word_ready && wr_count == load_len - 1'b1) next_state = IDLE;
      default: next_state = IDLE;
    endcase
  end

  // Output function: RAM port.
  assign wr_fire = (state == WRITE) && word_ready && (wr_count < word_t'(DEPTH));
  assign rd_fire = (state == RUNNING) && ce && (rd_idx < run_len);

  always_comb begin
    mem_en   = 1'b0;
    mem_we   = 1'b0;
    mem_addr = '0;
    mem_din  = '0;
    if (wr_fire) begin
      mem_en   = 1'b1;
      mem_we   = 1'b1;
      mem_addr = wr_count[ADDR_W-1:0];
      mem_din  = word_in;
    end else if (rd_fire) begin
      mem_en   = 1'b1;
      mem_addr = rd_idx[ADDR_W-1:0];
    end
  end

  assign running = (state == RUNNING);
  assign loading = (state == COLLECT_LEN) || (state == WRITE);

  // Clocked part: instruction latch, registers set by instructions and the
  // read/write address counters.
  always_ff @(posedge clk) begin
    out_load  <= rd_fire;
    out_clear <= 1'b0;
    overflow  <= 1'b0;
    if (rst) begin
      instr    <= '0;
      div_reg  <= idata_t'(1);
      load_len <= '0;
      wr_count <= '0;
      run_len  <= '0;
      rd_idx   <= '0;
      out_load <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (word_ready) instr <= word_in;
        DECODE: begin
          unique case (op)
            OP_CLEAR: begin
              div_reg   <= idata_t'(1);
              run_len   <= '0;
              out_clear <= 1'b1;
            end
            OP_SETCLOCK: div_reg <= instr[WORD_W-1:3];
            OP_RUN:      rd_idx  <= '0;
            default: ;
          endcase
        end
        COLLECT_LEN: begin
          if (word_ready) begin
            load_len <= word_in;
            wr_count <= '0;
            run_len  <= (word_in > word_t'(DEPTH)) ? (ADDR_W+1)'(DEPTH)
                                                   : word_in[ADDR_W:0];
          end
        end
        WRITE: begin
          if (word_ready) begin
            wr_count <= wr_count + 1'b1;
            if (!wr_fire) overflow <= 1'b1;
          end
        end
        RUNNING: if (rd_fire) rd_idx <= rd_idx + 1'b1;
        default: ;
      endcase
    end
  end

  // Rules of the RAM port: a write is always enabled, and a cycle never both
  // writes and reads.
  a_we_needs_en: assert property (@(posedge clk) disable iff (rst) mem_we |-> mem_en);
  a_one_access:  assert property (@(posedge clk) disable iff (rst) !(wr_fire && rd_fire));

endmodule
