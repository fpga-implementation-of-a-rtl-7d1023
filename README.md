# 32-bit FPGA pattern generator

A pattern generator drives the inputs of a circuit under test with a
sequence of digital words ("test vectors") chosen by the user, at a known
rate, while a logic analyser watches the outputs. This repository holds
synthesizable SystemVerilog for a small pattern generator that fits in a
low-cost FPGA clocked at 50 MHz, with 32 output pins, fed with vectors
from a PC.

Two generators are built, because they make opposite trade-offs:

* **Memory-based generator** (`pg_memory`). The PC first loads up to 1024
  vectors into on-chip RAM over a slow link, then tells the generator to
  play them. Playback is independent of the link, so the vectors come out
  at up to the full 50 MHz clock rate, or at 50 MHz / N for any N up to
  2^29 - 1. The test length is limited by the RAM.
* **Buffer-based generator** (`pg_buffer`). Vectors go through a FIFO
  straight to the pins as they arrive from the PC over an EPP parallel
  port. The test length is unlimited, but the vector rate is whatever the
  host can send: four bytes per vector.

A registered 4-bit adder (`adder4`) is included as a sample circuit under
test. The top module `pattern_generator_top` places the three side by side,
each with its own pins.

## Data path of the memory-based generator

```
rxd ──► uart_rx ──byte──► byte_collector ──word──► pg_controller ──addr/we/en──► block_ram ──► pin register ──► pinout[31:0]
        (or epp_rx)                                  └─ clock_divider (ce)                       ▲ out_load / out_clear
```

1. **Receiver.** `uart_rx` receives 8N1 frames at 19200 baud. It samples
   the line eight times per bit, using a clock enable every 326 clocks
   (50 MHz / 153 600 Hz, rounded). The line passes through a two-flip-flop
   synchroniser and a small glitch filter. Each data bit is sampled in the
   middle of its bit time. A frame whose stop bit is low is dropped and
   reported on `frame_error`. Setting `USE_EPP = 1` on `pg_memory` swaps
   in the EPP receiver `epp_rx` instead; the rest of the generator does
   not change.
2. **Byte collector.** This block packs four bytes into a 32-bit word. The
   **first byte received becomes bits 31:24**, so a host sends every word
   most significant byte first. `word_ready` pulses for one clock per
   word.
3. **Controller.** `pg_controller` reads each word either as an
   instruction or as data (see below). It writes data words to RAM
   addresses 0, 1, 2, ... During a run it reads the RAM once per
   clock-divider period.
4. **RAM.** `block_ram` is a 1024 × 32 single-port RAM with one clock of
   read latency and write-first behaviour: during a write the output shows
   the data being written.
5. **Pin register.** This register loads the RAM output only in the clock
   after a playback read (`out_load`). Because of that, data echoed by the
   RAM while words are being written never reaches the pins. CLEAR sets
   the pins to zero.

## Instruction protocol

A host talks to the memory-based generator in 32-bit words. Bits 2:0 of an
instruction word are the opcode. Bits 31:3 (29 bits) are its argument.

| word[2:0] | name     | effect |
|-----------|----------|--------|
| `000`     | CLEAR    | divider ← 1, loaded length ← 0, pins ← 0. RAM contents are kept. |
| `001`     | SETCLOCK | divider ← word[31:3]. One vector lasts `divider` clocks: 1 gives 50 MHz, 2 gives 25 MHz, 16 gives 320 ns per vector. 0 acts as 1. |
| `010`     | LOAD     | The next word is the number of vectors *n*. The *n* words after it are vectors, stored from address 0. |
| `011`     | RUN      | Play vectors 0 … *n*-1 once. The pins then hold the last vector. |
| `100`     | STOP     | End the run and return to instruction mode. |

Example: the stream `00000002 00000004 00000001 00000002 00000004
00000008 00000003` loads the four vectors 1, 2, 4, 8 and plays them. Over
RS-232 that is 28 bytes, about 14.6 ms at 19200 baud.

Behaviour worth knowing:

* **Data mode.** After LOAD, every word is taken as data until *n* words
  have arrived, even if it looks like an instruction. A host that
  promises four vectors and sends three loses its next instruction: that
  word becomes the fourth vector. No timeout gets the generator out of
  this state. Sending more words does.
* **Too many vectors.** Vectors past the 1024th are read but not stored.
  Each one raises `overflow` for one clock, so the word stream stays in
  step.
* **During a run** only STOP is acted on. All other words are ignored.
* **LOAD 0** returns straight to instruction mode.
* Opcodes `101`–`111` are ignored.

## Timing

* **Playback.** Let the RUN word's `word_ready` pulse be clock 0. Vector
  *k* reaches the pins at clock 3 + *k*·`divider`. RUN restarts the clock
  divider, so the first period is never short.
* **Serial link.** One bit lasts 8 × 326 clocks = 52.16 µs. That is
  19 172 baud, 0.15 % slow, which is well inside the tolerance of an 8N1
  frame. `byte_ready` comes about 10.2 bit times after the falling edge
  of the start bit: the middle of the stop bit (9.5 bit times) plus about
  six samples of synchroniser and filter delay.
* **EPP link.** This is a write-only EPP data cycle. The host lowers
  nWrite and nDataStrobe. The receiver raises Wait about three clocks
  after it sees the strobe go low, and latches the byte about three
  clocks after the strobe goes high again. A byte takes about 120 ns at
  minimum. A real PC port needs several microseconds per byte.
* **Buffer generator.** Its pins change 125 ns (six clock edges) after the
  data strobe of the last byte of a vector. The FIFO is read as soon as
  it holds a full word. Bytes that arrive while it is full are dropped,
  and there is no flow control back to the host.

## Where this design departs from, or adds to, its source description

This RTL follows a published student design, built for a Spartan-II class
FPGA with a 50 MHz oscillator. The points below are where it differs from
that design or fills a gap in it.

* **Divider period.** Divider *N* gives exactly *N* clocks per vector
  (16 → 320 ns, the measured value). A counter-compare described
  alongside it would give *N*+1.
* **Table value not followed.** A reference table lists divider 10 as
  10 MHz. Its own rule gives 5 MHz, and 5 MHz is what this design
  produces.
* **Maximum rate.** The source recommends at most 25 MHz (divider 2) on
  real pins, because of ground bounce when all 32 outputs switch at
  once. The logic here still allows divider 1 (50 MHz).
* **Serial sampling point.** The receiver samples 1.5 bit times after
  the detected start edge. That point is the bit centre once the
  synchroniser and filter delay are counted.
* **Additions.** `frame_error`, `overflow`, `running`, `loading`, the FIFO
  flags and a synchronous active-high reset are added. The original
  has no reset pin; CLEAR is its only reset.
* **Vendor cores replaced.** The vendor RAM core is replaced by an
  inferred array. The vendor FIFO core (8 bits in, 32 bits out) is
  replaced by `byte_fifo`, a single-clock packing FIFO of 1024 words. In
  the original both FIFO clocks were the same 50 MHz clock anyway.
* **EPP scope.** Only the EPP *data write* cycle is implemented: no
  address strobe, no reads. The data bus is an input.
* **Serial byte_ready.** The serial receiver's `byte_ready` is a
  one-clock pulse. The source's serial receiver held it for half a byte
  time. The byte collector detects the rising edge, so either works.
* **Not built:**
  * the 8-bit first version of this generator, which had 8-bit
    instructions and a 5-bit divider and which the 32-bit design
    supersedes;
  * the PC software that turns a text list of vectors into the word
    stream;
  * the logic analyser used on the bench.
* **Size.** Generic synthesis (yosys) reports these flip-flop counts. The
  original vendor report counted 180 registers for the memory generator
  and 46 for the buffer generator.

  | module     | flip-flop bits | RAM bits |
  |------------|----------------|----------|
  | `pg_memory` | 319 | 32 768 |
  | `pg_buffer` | 73  | 32 768 |

  Most of the memory generator's flip-flops sit in wide registers:

  * the 32-bit pin register;
  * the 24-bit partial word of the byte collector;
  * the 32-bit instruction, LOAD-length and word-count registers;
  * the 29-bit divider and its counter.

## Modules (`rtl/`)

| file | role |
|------|------|
| `pg_pkg.sv` | word/byte widths, `word_t`, `byte_t`, `idata_t`, opcode enum |
| `uart_rx.sv` | 8N1 serial receiver, 8× oversampling, frame error |
| `epp_rx.sv` | EPP data-write receiver with Wait handshake |
| `byte_collector.sv` | four bytes → one word, first byte most significant |
| `clock_divider.sv` | clock enable once every `div` clocks, restartable |
| `block_ram.sv` | 1024 × 32 single-port write-first RAM |
| `byte_fifo.sv` | 8-bit-in, 32-bit-out FIFO, 1024 words, non-destructive on overflow |
| `pg_controller.sv` | instruction decoder / loader / player FSM |
| `pg_memory.sv` | memory-based generator (receiver selectable) |
| `pg_buffer.sv` | buffer-based generator (EPP → FIFO → pins) |
| `adder4.sv` | registered 4-bit adder used as a device under test |
| `pattern_generator_top.sv` | both generators and the adder side by side |

The parameter defaults are the original numbers:

* `CLK_HZ = 50_000_000`
* `BAUD = 19200`
* `OVERSAMPLE = 8`
* `DEPTH = 1024`
* `DIV_W = 29`

## Testbenches (`tb/`)

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. Testbenches of note:

* **`tb_pattern_generator_top`** runs the whole chip at its default
  parameters, including the real 19200 baud link. It takes about a
  minute.
  * It loads and plays four vectors.
  * It runs the adder test: 16 vectors at 25 MHz. The adder must output
    3, 0, 7, 0, 1E, 0, 9, 0 with 80 ns per value.
  * It sends 1025 vectors into the 1024-word RAM and plays them back at
    50 MHz.
  * It sends a frame with a bad stop bit.
  * It streams 64 vectors through the buffer generator.
  * It counts each mechanism (LOAD, RUN, STOP, SETCLOCK, CLEAR, overflow,
    frame error, EPP handshake, FIFO, adder) and fails if one never
    happened.
* **`tb_pg_memory`** runs both receiver variants. The serial one runs at a
  raised bit rate to keep the run short. It includes the SETCLOCK 16 test
  with 320 ns per vector.
* **`tb_pg_pattern_tests`** runs the short bench patterns and the loading
  edge cases:
  * square wave, pulse, burst and data patterns;
  * all-bits switching at 50 and 25 MHz;
  * a 16-point sine wave;
  * LOAD with too few vectors, and repeated LOADs;
  * the buffer generator's identity test.

To simulate with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_pattern_generator_top \
    -y rtl -y tb +libext+.sv rtl/pg_pkg.sv tb/tb_pattern_generator_top.sv
./obj_dir/Vtb_pattern_generator_top
```

Some rules are also written as concurrent assertions in the RTL. They
are checked whenever a simulator runs with assertions enabled:

* the receivers' and the byte collector's strobes last one clock;
* a frame never ends in both a byte and an error;
* a RAM write is always enabled, and no cycle both writes and reads;
* the FIFO flags are never both set, and its count stays in range.

Replace the module name to run another testbench. Verilator has no X
state. Every control register therefore has a synchronous reset. Only
the RAM and FIFO arrays start undefined, and they are never read before
they are written.
