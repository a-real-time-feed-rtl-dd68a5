// tb_ttl_sequencer: the sequence controller against stand-ins for the TDC
// FIFOs, the engine (done 9 clocks after start) and the feedback interface
// (busy 3 clocks after a request). Checks the length of the init, entangle
// and window phases, the failure report and retry on BC_ENTANGLE, loading of
// only the heralding channels' timestamps into R0..R3, the engine start
// address and count, the phase request fields, pause until the global
// trigger, shot_done, a photon caught in the drain period, and restart on
// BC_INIT from the middle of a shot.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_ttl_sequencer;
  import ff_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [3:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  bcast_t bcast = '0;
  logic win_open, ts_flush, eng_ts_we, eng_start, eng_done = 0, send_phase, send_fail, fb_busy;
  logic [3:0] ts_empty, ts_pop;
  logic [31:0] ts_data [4];
  logic [1:0] eng_ts_idx;
  logic [31:0] eng_ts_data;
  logic [7:0] eng_start_addr;
  logic [8:0] eng_count;
  logic [3:0] result_reg, state_o;
  logic [5:0] target_chan;
  logic [15:0] jump_offset;
  logic photon_seen, shot_done;
  always #2 clk = ~clk;

  ttl_sequencer dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .bcast, .win_open, .ts_flush,
    .ts_empty, .ts_data, .ts_pop, .eng_ts_we, .eng_ts_idx, .eng_ts_data, .eng_start,
    .eng_start_addr, .eng_count, .eng_done, .send_phase, .send_fail, .result_reg, .target_chan,
    .jump_offset, .fb_busy, .photon_seen, .shot_done, .state_o);

  // FIFO stand-ins
  logic [31:0] fq [4][$];
  always_comb for (int c = 0; c < 4; c++) begin
    ts_empty[c] = (fq[c].size() == 0);
    ts_data[c]  = (fq[c].size() > 0) ? fq[c][0] : 32'hdead_beef;
  end
  always @(posedge clk) begin
    for (int c = 0; c < 4; c++) begin
      if (ts_flush) fq[c].delete();
      else if (ts_pop[c] && fq[c].size() > 0) void'(fq[c].pop_front());
    end
  end
  // engine stand-in
  int eng_cnt = -1;
  always @(posedge clk) begin
    eng_done <= 0;
    if (eng_start) eng_cnt <= 8;
    else if (eng_cnt > 0) eng_cnt <= eng_cnt - 1;
    else if (eng_cnt == 0) begin eng_done <= 1; eng_cnt <= -1; end
  end
  // feedback stand-in
  int fb_cnt = 0;
  assign fb_busy = (fb_cnt > 0);
  always @(posedge clk) if (send_phase || send_fail) fb_cnt <= 3; else if (fb_cnt > 0) fb_cnt <= fb_cnt - 1;
  // monitors
  int win_cycles = 0, flush_cycles = 0, fails = 0, phases = 0, loads = 0, dones = 0;
  logic [31:0] loaded [4];
  always @(posedge clk) begin
    if (win_open) win_cycles++;
    if (ts_flush) flush_cycles++;
    if (send_fail) fails++;
    if (send_phase) phases++;
    if (eng_ts_we) begin loads++; loaded[eng_ts_idx] = eng_ts_data; end
    if (shot_done) dones++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  task automatic cfg(int a, int v);
    @(negedge clk); cfg_we = 1; cfg_addr = 4'(a); cfg_wdata = v;
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic bc(bcast_kind_e k);
    @(negedge clk); bcast = '0; bcast.valid = 1; bcast.kind = k;
    @(negedge clk); bcast = '0;
  endtask
  task automatic clear_mon();
    win_cycles = 0; flush_cycles = 0; fails = 0; phases = 0; loads = 0; dones = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    cfg(0, 5); cfg(1, 7); cfg(2, 20); cfg(3, 6); cfg(4, 4);
    cfg(5, 17); cfg(6, 4); cfg(7, 8); cfg(8, 3); cfg(9, 16'h0badd); cfg(10, 4'b0101);
    // ---- no photon: failure report, retry ----
    clear_mon();
    bc(BC_INIT);
    repeat (5 + 7 + 20 + 6 + 4) @(negedge clk);
    `CHECK(flush_cycles == 5, "init lasts init_len clocks")
    `CHECK(win_cycles == 20, "window lasts win_len clocks")
    `CHECK(fails == 1 && phases == 0, "one failure report")
    `CHECK(state_o == 4'd11, "waiting for the TCM")
    repeat (10) @(negedge clk);
    `CHECK(fails == 1 && win_cycles == 20, "no further action without a TCM command")
    bc(BC_ENTANGLE);
    repeat (7 + 20 + 6 + 5) @(negedge clk);
    `CHECK(win_cycles == 40 && fails == 2 && flush_cycles == 5, "BC_ENTANGLE retries without init")
    // ---- photon in the window ----
    clear_mon();
    bc(BC_ENTANGLE);
    repeat (7 + 5) @(negedge clk);
    `CHECK(win_open, "window open")
    fq[0].push_back(32'h1111); fq[1].push_back(32'h2222); fq[2].push_back(32'h3333);
    repeat (3) @(negedge clk);
    `CHECK(loads == 2 && loaded[0] == 32'h1111 && loaded[2] == 32'h3333, "heralding channels loaded into R0 and R2")
    `CHECK(fq[0].size() == 0 && fq[2].size() == 0 && fq[1].size() == 1, "only masked channels popped")
    `CHECK(!win_open, "window closed after the photon")
    repeat (15) @(negedge clk);
    `CHECK(phases == 1 && fails == 0, "phase sent after the engine finished")
    `CHECK(result_reg == 8 && target_chan == 3 && jump_offset == 16'h0badd, "request fields")
    repeat (20) @(negedge clk);
    `CHECK(state_o == 4'd8 && dones == 0, "paused until the global trigger")
    bc(BC_TRIGGER);
    repeat (6) @(negedge clk);
    `CHECK(dones == 1 && state_o == 4'd0, "shot done after continue")
    // ---- photon in the drain period ----
    clear_mon();
    fq[1].delete();
    bc(BC_INIT);
    repeat (5 + 7 + 20 + 2) @(negedge clk);
    fq[2].push_back(32'h4444);
    repeat (30) @(negedge clk);
    `CHECK(loads == 1 && loaded[2] == 32'h4444 && phases == 1 && fails == 0, "photon in drain period accepted")
    // ---- engine start address and count ----
    `CHECK(eng_start_addr == 17 && eng_count == 4, "engine program address and count")
    // ---- init from the middle of a window ----
    clear_mon();
    bc(BC_INIT);
    repeat (5 + 7 + 4) @(negedge clk);
    bc(BC_INIT);
    `CHECK(ts_flush && !win_open, "BC_INIT restarts from initialisation")
    `REPORT
  end
endmodule
