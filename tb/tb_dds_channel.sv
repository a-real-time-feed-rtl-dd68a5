// tb_dds_channel: two channels (IDs 0 and 1) start in phase after BC_INIT.
// A BC_PHASE of 0x8000 for channel 1 must change nothing until the global
// trigger; after it channel 1's phase is 180 degrees from channel 0 (samples
// of opposite sign) and `updated` pulses once; channel 0 ignores it. The
// accumulator must advance by the tuning word each clock.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_dds_channel;
  import ff_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic ftw_we = 0, pow_we = 0;
  logic [31:0] ftw_wdata = '0;
  logic [15:0] pow_wdata = '0;
  bcast_t bcast = '0;
  logic [15:0] pow0, pow1, ph0, ph1, jump0, jump1;
  logic signed [11:0] s0, s1;
  logic up0, up1;
  always #2 clk = ~clk;

  dds_channel #(.CH_ID(6'd0)) d0 (.clk, .rst_n, .ftw_we, .ftw_wdata, .pow_we, .pow_wdata, .bcast,
    .pow(pow0), .phase_o(ph0), .sample(s0), .updated(up0), .jump(jump0));
  dds_channel #(.CH_ID(6'd1)) d1 (.clk, .rst_n, .ftw_we, .ftw_wdata, .pow_we, .pow_wdata, .bcast,
    .pow(pow1), .phase_o(ph1), .sample(s1), .updated(up1), .jump(jump1));

  int ups = 0;
  always @(posedge clk) if (up1) ups++;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  task automatic bc(bcast_kind_e k, int ch, int d);
    @(negedge clk); bcast = '0; bcast.valid = 1; bcast.kind = k; bcast.chan = CHAN_W'(ch); bcast.data = 16'(d);
    @(negedge clk); bcast = '0;
  endtask

  initial begin
    logic [15:0] p_prev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 50 MHz at 250 MHz clock: ftw = 2^32 / 5
    @(negedge clk); ftw_we = 1; ftw_wdata = 32'd858993459;
    @(negedge clk); ftw_we = 0;
    bc(BC_INIT, 0, 0);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      p_prev = ph0;
      @(negedge clk);
      `CHECK(ph0 == ph1, "channels in phase after init")
      `CHECK(16'(ph0 - p_prev) inside {16'd13107, 16'd13108}, "phase steps by ftw/2^16")
    end
    bc(BC_PHASE, 1, 16'h8000);
    repeat (5) @(negedge clk);
    `CHECK(ph0 == ph1 && pow1 == 0, "phase not applied before the trigger")
    bc(BC_PHASE, 7, 16'h4000);      // another channel's phase: ignored
    bc(BC_TRIGGER, 0, 16'h0042);
    `CHECK(pow1 == 16'h8000 && pow0 == 16'h0000, "trigger applies pending phase to channel 1 only")
    repeat (3) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      `CHECK(16'(ph1 - ph0) == 16'h8000, "180 degree phase difference")
      `CHECK((s0 > 100 && s1 < -100) || (s0 < -100 && s1 > 100) || (s0 >= -100 && s0 <= 100), "samples of opposite sign")
      `CHECK(s0 + s1 >= -2 && s0 + s1 <= 2, "samples mirror each other")
    end
    `CHECK(ups == 1 && jump1 == 16'h0042, "one update pulse, jump offset kept")
    bc(BC_TRIGGER, 0, 0);
    `CHECK(ups == 1, "no update without a pending phase")
    // init reloads the host-set phase
    @(negedge clk); pow_we = 1; pow_wdata = 16'h1000;
    @(negedge clk); pow_we = 0;
    bc(BC_INIT, 0, 0);
    `CHECK(pow0 == 16'h1000 && pow1 == 16'h1000, "init reloads initial phase")
    `REPORT
  end
endmodule
