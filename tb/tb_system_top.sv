// tb_system_top: end-to-end test of the feedforward system at its default
// size (4 TDC channels of 400 taps, 2 DDS channels, retry limit 50).
//
// The host side is played by this testbench: it writes the calibration
// tables (middle of each code bin, known here from the chain model's tap
// delays), the microcode programs, the engine constants and the sequence
// configuration, then runs shots with host_reset. Photon pulses are fired on
// hit[0] at random picosecond times inside the detection window.
//
//   1. 180-degree demonstration: the program yields phase 0x8000 for DDS
//      channel 1; after the shot channel 1 runs 180 degrees from channel 0,
//      which ignored the broadcast.
//   2. Timestamp-dependent feedforward: phase = C - K*t with K for a
//      1.203 GHz frequency difference; the phase loaded into the DDS must match
//      the value computed from the true photon time within the TDC error.
//      The latency from photon to DDS update is measured on every shot and
//      must be the same (within the one-clock quantisation of the photon
//      arrival) and below 800 ns.
//   3. No photon: failure reports make the TCM retry; the 50th consecutive
//      failure re-initialises; a photon after that completes the shot.
//   4. A hit outside the window leaves no timestamp.
// Each mechanism is counted and a mechanism that never happened is a failure.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_system_top;
  import ff_pkg::*;
  localparam int NTAPS = 400, N_TDC = 4, N_DDS = 2;
  localparam real TAP_PS = 5.102;
  int checks = 0, failures = 0;

  logic clk_sys = 0, clk_tdc = 0, rst_n = 0;
  logic [N_TDC-1:0] hit = '0;
  logic host_we = 0, host_reset = 0, host_trigger = 0;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0;
  logic [N_TDC-1:0] raw_valid, tdc_overflow;
  logic [CODE_W-1:0] raw_code [N_TDC];
  logic [PHASE_W-1:0] dds_phase [N_DDS], dds_pow [N_DDS];
  logic signed [11:0] dds_sample [N_DDS];
  logic [N_DDS-1:0] dds_updated;
  logic [15:0] dds_jump;
  bcast_t bcast_o;
  logic [7:0] attempts;
  logic reinit, photon_seen, shot_done;
  logic [3:0] seq_state;

  always #1 clk_tdc = ~clk_tdc;
  always #2 clk_sys = ~clk_sys;

  system_top dut (.clk_sys, .clk_tdc, .rst_n, .hit, .host_we, .host_addr, .host_wdata,
    .host_reset, .host_trigger, .raw_valid, .raw_code, .dds_phase, .dds_pow, .dds_sample,
    .dds_updated, .dds_jump, .bcast_o, .attempts, .reinit, .photon_seen, .shot_done,
    .seq_state, .tdc_overflow);

  // ---------------- mechanism counters ----------------
  int n_raw = 0, n_retry = 0, n_reinit = 0, n_photon = 0, n_update = 0, n_update_ch0 = 0;
  int n_done = 0, n_phase_bc = 0, n_trigger = 0, n_init = 0;
  always @(posedge clk_sys) if (rst_n) begin
    for (int c = 0; c < N_TDC; c++) if (raw_valid[c]) n_raw++;
    if (bcast_o.valid && bcast_o.kind == BC_ENTANGLE) n_retry++;
    if (bcast_o.valid && bcast_o.kind == BC_PHASE) n_phase_bc++;
    if (bcast_o.valid && bcast_o.kind == BC_TRIGGER) n_trigger++;
    if (bcast_o.valid && bcast_o.kind == BC_INIT) n_init++;
    if (reinit) n_reinit++;
    if (photon_seen) n_photon++;
    if (dds_updated[1]) n_update++;
    if (dds_updated[0]) n_update_ch0++;
    if (shot_done) n_done++;
  end

  // wait at most n system clocks for cond; if it does not come, fail and stop
  `define WAIT_OR_STOP(cond, n, msg) \
    begin \
      for (int wi = 0; wi < (n) && !(cond); wi++) @(posedge clk_sys); \
      if (!(cond)) begin \
        failures++; \
        $display("FAIL timeout: %s", msg); \
        `REPORT \
      end \
    end

  initial begin
    #(2ms);
    $display("watchdog"); failures++;
    `REPORT
  end

  // ---------------- host helpers ----------------
  task automatic hw(int a, int v);
    @(negedge clk_sys); host_we = 1; host_addr = 16'(a); host_wdata = 32'(v);
    @(negedge clk_sys); host_we = 0;
  endtask
  function automatic int instr(uop_e op, int rd, int rs1, int rs2, int imm);
    uinstr_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.imm = 16'(imm);
    return int'(32'(i));
  endfunction
  function automatic int tap_ps(int k);
    int unsigned h;
    h = (k + 1) * 32'd2654435761;
    h = h ^ (h >> 15);
    return int'($floor(TAP_PS * (0.25 + 1.5 * real'(h % 1000) / 1000.0) + 0.5));
  endfunction

  // fire one photon on channel 0 at off_ps after the TDC window opens;
  // returns the true time in timestamp units and the photon time
  realtime t_open;
  task automatic photon(int off_ps, output longint ts_true, output realtime t_hit);
    // exact opening time, bounded so that a window that never opens fails
    fork
      wait (dut.g_tdc[0].tdc_rst_n == 1'b1);
      #(8us);
    join_any
    disable fork;
    if (dut.g_tdc[0].tdc_rst_n !== 1'b1) begin
      failures++;
      $display("FAIL timeout: detection window opens");
      `REPORT
    end
    t_open = $realtime;
    #(real'(off_ps) * 1ps);
    t_hit = $realtime;
    hit[0] = 1;
    ts_true = longint'((t_hit - t_open) * 1000.0 * 4096.0 / 2000.0 + 0.5);
    #(6ns) hit[0] = 0;
  endtask

  task automatic start_shot();
    @(negedge clk_sys) host_reset = 1;
    @(negedge clk_sys) host_reset = 0;
  endtask

  localparam int K_BA_RB = 2522800;   // 1.203 GHz * (2 ns / 4096) * 2^32

  initial begin
    int cum [NTAPS + 1];
    longint ts_true;
    realtime t_hit, lat, lat_min, lat_max;
    int nshots;
    cum[0] = 0;
    for (int k = 0; k < NTAPS; k++) cum[k+1] = cum[k] + tap_ps(k);
    #10 rst_n = 1;
    // calibration tables of channels 0 and 1
    for (int ch = 0; ch < 2; ch++)
      for (int c = 0; c < 512; c++) begin
        automatic int mid = (c < NTAPS) ? (cum[c] + cum[c+1]) / 2 : cum[NTAPS];
        automatic int v = (mid * 4096 + 1000) / 2000;
        hw(16'h3000 + ch * 16'h1000 + c, v > 4095 ? 4095 : v);
      end
    // microcode: program A at 0 (constant phase), program B at 8 (C - K*t)
    hw(16'h1000, instr(OP_MUL, 5, 0, 4, 0));            // R5 = t * K   (K = R4 = 0 for A)
    hw(16'h1001, instr(OP_SUB, 6, 7, 5, 0));            // R6 = C - R5
    hw(16'h1002, instr(OP_SHIFT, 8, 6, 0, 16'h8010));   // R8 = R6 >>> 16
    hw(16'h1008, instr(OP_MUL, 5, 0, 9, 0));            // R5 = t * K   (K in R9)
    hw(16'h1009, instr(OP_SUB, 6, 10, 5, 0));           // R6 = C - R5  (C in R10)
    hw(16'h100a, instr(OP_SHIFT, 8, 6, 0, 16'h8010));
    hw(16'h2004, 0);                                    // R4: K = 0
    hw(16'h2007, 32'h8000_0000);                        // R7: 180 degrees
    hw(16'h2009, K_BA_RB);
    hw(16'h200a, 32'h1234_0000);
    // sequence: init 4, entangle 8, window 100, drain 8, continue 4, program A
    hw(16'h0000, 4); hw(16'h0001, 8); hw(16'h0002, 100); hw(16'h0003, 8); hw(16'h0004, 4);
    hw(16'h0005, 0); hw(16'h0006, 3); hw(16'h0007, 8); hw(16'h0008, 1); hw(16'h0009, 16'h55);
    hw(16'h000a, 4'b0001);
    // DDS: both channels 50 MHz
    hw(16'h8000, 858993459); hw(16'h8010, 858993459);

    // ---- 4. hit while no window is open ----
    hit[0] = 1; #(10ns); hit[0] = 0; #(100ns);
    `CHECK(n_raw == 0 && dut.ts_empty[0], "no timestamp outside the window")

    // ---- 1. 180-degree demonstration ----
    start_shot();
    photon($urandom_range(100000, 1000), ts_true, t_hit);
    `WAIT_OR_STOP(n_done == 1, 2000, "first shot completes")
    `CHECK(dds_pow[1] == 16'h8000 && dds_pow[0] == 16'h0000, "controlled channel at 180 degrees, reference unchanged")
    repeat (4) @(negedge clk_sys);
    `CHECK(16'(dds_phase[1] - dds_phase[0]) == 16'h8000, "output phase difference 180 degrees")
    `CHECK(dds_sample[0] + dds_sample[1] >= -2 && dds_sample[0] + dds_sample[1] <= 2, "output samples mirror each other")
    `CHECK(dds_jump == 16'h55, "jump offset delivered with the global trigger")

    // ---- 2. timestamp-dependent feedforward, latency ----
    hw(16'h0005, 8);
    lat_min = 1e9; lat_max = 0; nshots = 0;
    for (int s = 0; s < 12; s++) begin
      automatic longint expv, err;
      start_shot();
      photon($urandom_range(300000, 500), ts_true, t_hit);
      `WAIT_OR_STOP(dds_updated[1], 2000, "DDS channel 1 updated")
      lat = $realtime - t_hit;
      if (lat < lat_min) lat_min = lat;
      if (lat > lat_max) lat_max = lat;
      expv = ((longint'(32'h1234_0000) - ts_true * K_BA_RB) >>> 16) & 16'hffff;
      err = (longint'(dds_pow[1]) - expv) & 16'hffff;
      if (err > 32768) err = 65536 - err;
      `CHECK(err <= 1100, "feedforward phase matches the true photon time")
      if (err > 1100) $display("phase %h expected %h", dds_pow[1], expv);
      `WAIT_OR_STOP(n_done == 2 + s, 2000, "shot completes")
      nshots++;
    end
    $display("latency photon -> DDS update: %0.1f .. %0.1f ns", lat_min, lat_max);
    `CHECK(lat_max - lat_min <= 4.0, "deterministic latency (within one clock)")
    `CHECK(lat_max < 800.0, "latency below 800 ns")

    // ---- 3. no photon: retries and re-initialisation ----
    hw(16'h0002, 10);
    begin
      automatic int retry0 = n_retry;
      start_shot();
      `WAIT_OR_STOP(n_reinit == 1, 20000, "re-initialisation after 50 failures")
      `CHECK(n_retry - retry0 == 49, "49 retries before re-initialisation")
      `CHECK(attempts == 0, "attempt counter cleared")
      // after re-initialisation a photon completes the shot
      photon(3000, ts_true, t_hit);
      `WAIT_OR_STOP(n_done == 14, 2000, "shot after re-initialisation completes")
      `CHECK(n_reinit == 1, "single re-initialisation")
    end

    // ---- host trigger passes through ----
    begin
      automatic int trig0 = n_trigger;
      @(negedge clk_sys) host_trigger = 1;
      @(negedge clk_sys) host_trigger = 0;
      @(negedge clk_sys);
      `CHECK(n_trigger == trig0 + 1, "host trigger broadcast")
    end

    // ---- mechanism coverage ----
    $display("raw=%0d photons=%0d updates=%0d retries=%0d reinit=%0d phase_bc=%0d done=%0d",
             n_raw, n_photon, n_update, n_retry, n_reinit, n_phase_bc, n_done);
    `CHECK(n_raw == 14, "every photon on the raw calibration stream")
    `CHECK(n_photon == 14, "heralded photons accepted")
    `CHECK(n_update == 14 && n_update_ch0 == 0, "phase updates only on the target channel")
    `CHECK(n_phase_bc == 14, "phase broadcasts")
    `CHECK(n_retry >= 49, "retry path exercised")
    `CHECK(n_reinit == 1, "re-initialisation path exercised")
    `CHECK(tdc_overflow == '0, "no FIFO overflow")
    `REPORT
  end
endmodule
