// tb_pg_controller: self-checking test of the instruction decoder and
// memory sequencer, at its full 1024-word depth.
//
// Words are fed directly with one-cycle word_ready pulses. The testbench
// holds its own RAM model (one-clock read) and pin register, and checks:
//  - LOAD N writes the N following words to addresses 0..N-1, in data mode
//  - RUN plays them in order, one vector every div clocks, with vector k
//    loaded into the pins 3 + k*div clocks after the RUN word, and holds
//    the last one; other words during a run are ignored; STOP ends it
//  - SETCLOCK sets div from word[31:3]; CLEAR returns div to 1 and clears
//    the pins; a second RUN replays from address 0
//  - a LOAD of 1030 words keeps 1024, flags 6 overflows and plays 1024
//  - LOAD 0 returns to instruction mode; undefined opcodes are ignored
// A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_pg_controller;
  import pg_pkg::*;

  localparam int unsigned DEPTH = 1024, ADDR_W = 10;

  logic              clk = 1'b0, rst = 1'b1;
  word_t             word_in = '0;
  logic              word_ready = 1'b0;
  logic              mem_en, mem_we, out_load, out_clear, running, loading, overflow;
  logic [ADDR_W-1:0] mem_addr;
  word_t             mem_din;

  int checks = 0, failures = 0;

  pg_controller dut (.clk, .rst, .word_in, .word_ready, .mem_en, .mem_we, .mem_addr,
                     .mem_din, .out_load, .out_clear, .running, .loading, .overflow);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // RAM model and pin register
  word_t ram [DEPTH];
  word_t rdata = '0, pins = '0;
  always @(posedge clk) begin
    if (mem_en && mem_we) ram[mem_addr] <= mem_din;
    if (mem_en && !mem_we) rdata <= ram[mem_addr];
    if (out_clear) pins <= '0;
    else if (out_load) pins <= rdata;
  end

  // Monitors: writes, overflow flags and pin loads with their times.
  int      writes = 0, overflows = 0, loads = 0;
  word_t   written[$];
  int      write_addr[$];
  realtime load_t[$];
  word_t   load_v[$];
  realtime word_t_last;
  always @(posedge clk) if (!rst) begin
    if (word_ready) word_t_last = $realtime;
    if (mem_en && mem_we) begin
      writes++;
      written.push_back(mem_din);
      write_addr.push_back(int'(mem_addr));
    end
    if (overflow) overflows++;
    if (out_load) begin
      loads++;
      load_t.push_back($realtime);
      load_v.push_back(rdata);
    end
  end

  task automatic send(input word_t w);
    @(negedge clk);
    word_in = w; word_ready = 1'b1;
    @(negedge clk);
    word_ready = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  localparam word_t W_CLEAR = 32'h0, W_LOAD = 32'h2, W_RUN = 32'h3, W_STOP = 32'h4;
  function automatic word_t setclock(input int unsigned d);
    return {29'(d), 3'b001};
  endfunction

  // Load a list of vectors and check the writes.
  task automatic load(input word_t v[$]);
    writes = 0; written.delete(); write_addr.delete();
    send(W_LOAD);
    check(loading, "not in data mode after LOAD");
    send(word_t'(v.size()));
    foreach (v[i]) send(v[i]);
    check(!loading, "still in data mode after the last vector");
    check(writes == v.size(), $sformatf("%0d writes for %0d vectors", writes, v.size()));
    foreach (v[i]) if (i < written.size())
      check(written[i] == v[i] && write_addr[i] == i, $sformatf("write %0d: %08h at %0d", i, written[i], write_addr[i]));
  endtask

  // Run and check order and timing of the first n vectors.
  task automatic run_check(input word_t v[$], input int unsigned div);
    realtime t_run;
    loads = 0; load_t.delete(); load_v.delete();
    send(W_RUN);
    t_run = word_t_last;
    check(running, "not running after RUN");
    repeat (div * v.size() + 10) @(negedge clk);
    check(loads == v.size(), $sformatf("%0d loads for %0d vectors", loads, v.size()));
    foreach (v[i]) if (i < load_v.size()) begin
      check(load_v[i] == v[i], $sformatf("vector %0d: %08h expected %08h", i, load_v[i], v[i]));
      check(load_t[i] - t_run == 20.0 * (3 + i * div),
            $sformatf("vector %0d loaded %0t ns after RUN, div %0d", i, load_t[i] - t_run, div));
    end
    check(pins == v[v.size()-1], "last vector not held on the pins");
  endtask

  initial begin
    word_t v[$];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(!running && !loading, "not in instruction mode after reset");

    // SETCLOCK 3, LOAD 5 vectors, RUN
    send(setclock(3));
    v = '{32'h0000_0001, 32'h0000_0002, 32'h0000_0004, 32'h0000_0008, 32'hFFFF_FFFF};
    load(v);
    run_check(v, 3);
    send(W_CLEAR);        // ignored while running
    check(running, "CLEAR stopped a run");
    send(W_STOP);
    check(!running, "STOP did not end the run");
    run_check(v, 3);      // replay from address 0
    send(W_STOP);

    // CLEAR: divider back to 1, pins cleared
    send(W_CLEAR);
    check(pins == '0, "CLEAR did not clear the pins");
    v = '{32'h0000_0016, 32'h0000_0017, 32'h0000_00FF};
    load(v);
    run_check(v, 1);
    send(W_STOP);

    // divider 16 (the clock divider test of the original design)
    send(setclock(16));
    v = '{32'h16, 32'h17, 32'hFF, 32'h08, 32'h21, 32'h00, 32'h78, 32'h77};
    load(v);
    run_check(v, 16);
    send(W_STOP);

    // LOAD beyond the RAM: 1030 words, the last 6 dropped
    send(setclock(1));
    overflows = 0;
    v.delete();
    for (int i = 0; i < 1030; i++) v.push_back(word_t'($urandom));
    writes = 0; written.delete(); write_addr.delete();
    send(W_LOAD);
    send(word_t'(1030));
    foreach (v[i]) send(v[i]);
    check(!loading, "data mode after overlong LOAD");
    check(writes == DEPTH, $sformatf("%0d writes, expected %0d", writes, DEPTH));
    check(overflows == 6, $sformatf("%0d overflow flags, expected 6", overflows));
    v = v[0:DEPTH-1];
    run_check(v, 1);
    send(W_STOP);

    // LOAD 0 and an undefined opcode
    send(W_LOAD);
    send(32'h0);
    check(!loading && !running, "LOAD 0 did not return to instruction mode");
    send(32'h7);
    check(!loading && !running, "undefined opcode changed the mode");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
