// tb_cable_delay: calibration and precision workload for two timestamp
// channels, each a carry-chain model feeding a tdc_channel.
//
// Phase 1, code density: one pulse source is split into two, the second copy
// delayed by a fixed "cable" delay, and fired 2000 times. Consecutive pulses
// are 22.001 ns apart, so the pulse moves 1 ps further along the 2 ns sampling
// period each time and the 2000 pulses cover every picosecond of it once: an
// evenly spread set of arrival times, free of the counting noise a random set
// of the same size would have. The codes are read from each channel's raw host
// stream into a histogram, and the share of hits in a code is that code's bin
// width.
// From the histogram the testbench builds each channel's correction table, as
// the host does: the entry for code c is the cumulative width of all bins below
// c plus half of bin c, in units of 2 ns / 4096. The table has no absolute
// offset (the delay before the first tap is unknown to the host), but it is
// the same for both channels and cancels in a difference.
//
// Phase 2, cable delay: further split pulses are timestamped with the
// calibrated channels, and the difference between channel 1 and channel 0 is
// compared with the cable delay. The mean must be within 5 ps of it and the
// RMS spread must not exceed 11.5 ps, the precision reached by the source
// design's hardware. The model chain has no jitter, so the spread here comes
// from the bin widths and the finite histogram only. DNL and INL of channel 0
// (largest bin width relative to the mean, largest deviation of the
// calibrated bin centre from the ideal linear code) are printed.
//
// Both channels use the same chain model, so their tap delays are identical;
// the cable delay is not a multiple of the mean bin, so the two channels see
// different codes for the same pulse.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_cable_delay;
  import ff_pkg::*;
  localparam int  NTAPS    = 400;
  localparam int  N_CAL    = 2000;      // hits for the code-density histogram, 1 ps apart in phase
  localparam int  N_MEAS   = 400;       // pulse pairs for the cable-delay measurement
  localparam real CABLE_NS = 3.217;     // extra delay of the longer cable

  int checks = 0, failures = 0;
  logic clk_tdc = 0, clk_sys = 0, rst_n = 0;
  logic hit0 = 0, hit1 = 0;
  logic win_open = 0, flush = 0;
  logic [1:0] pop = '0;
  logic lut_we [2];
  logic [CODE_W-1:0] lut_addr [2];
  logic [FINE_W-1:0] lut_wdata [2];
  logic [NTAPS-1:0] taps [2];
  logic [1:0] tdc_rst_n, ts_empty, raw_valid, overflow;
  logic [TS_W-1:0] ts_data [2];
  logic [CODE_W-1:0] raw_code [2];

  always #1 clk_tdc = ~clk_tdc;
  always #2 clk_sys = ~clk_sys;

  // the longer cable: a pure transport delay
  always @(hit0) hit1 <= #(CABLE_NS) hit0;

  tdc_carry_chain #(.NTAPS(NTAPS)) u_chain0 (.hit(hit0), .tdc_rst_n(tdc_rst_n[0]), .taps(taps[0]));
  tdc_carry_chain #(.NTAPS(NTAPS)) u_chain1 (.hit(hit1), .tdc_rst_n(tdc_rst_n[1]), .taps(taps[1]));

  for (genvar c = 0; c < 2; c++) begin : g_ch
    tdc_channel #(.NTAPS(NTAPS)) u_ch (.clk_tdc, .clk_sys, .rst_n, .taps(taps[c]),
      .tdc_rst_n(tdc_rst_n[c]), .win_open, .flush, .pop(pop[c]), .ts_data(ts_data[c]),
      .ts_empty(ts_empty[c]), .lut_we(lut_we[c]), .lut_addr(lut_addr[c]),
      .lut_wdata(lut_wdata[c]), .raw_valid(raw_valid[c]), .raw_code(raw_code[c]),
      .overflow(overflow[c]));
  end

  // code-density histograms, filled from the raw host streams
  int hist [2][512];
  int n_raw [2];
  bit collect = 0;
  always @(posedge clk_sys) if (rst_n && collect)
    for (int c = 0; c < 2; c++)
      if (raw_valid[c]) begin
        hist[c][raw_code[c]]++;
        n_raw[c]++;
      end

  initial begin
    #(1ms);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum, sum2, mean, rms, d, dnl_max, inl_max, w, mid, lsb_ps;
    int lo, hi;
    for (int c = 0; c < 2; c++) begin
      lut_we[c] = 0; lut_addr[c] = '0; lut_wdata[c] = '0; n_raw[c] = 0;
      for (int k = 0; k < 512; k++) hist[c][k] = 0;
    end
    #10 rst_n = 1;
    @(negedge clk_sys) win_open = 1; flush = 1;
    @(posedge tdc_rst_n[1]);
    #(20ns);

    // phase 1: uniformly distributed hits
    collect = 1;
    for (int i = 0; i < N_CAL; i++) begin
      hit0 = 1; #(5ns) hit0 = 0;
      #(17.001ns);
    end
    #(40ns);
    collect = 0;
    `CHECK(n_raw[0] == N_CAL && n_raw[1] == N_CAL, "every calibration hit seen once per channel")

    // correction tables from the histograms
    for (int c = 0; c < 2; c++) begin
      automatic int cum = 0;
      for (int k = 0; k < 512; k++) begin
        automatic int v = ((2 * cum + hist[c][k]) * 4096 + N_CAL) / (2 * N_CAL);
        @(negedge clk_sys);
        lut_we[c] = 1; lut_addr[c] = CODE_W'(k);
        lut_wdata[c] = FINE_W'(v > 4095 ? 4095 : v);
        cum += hist[c][k];
      end
      @(negedge clk_sys) lut_we[c] = 0;
    end

    // DNL / INL of channel 0 against the mean bin of the used code range
    lo = 511; hi = 0;
    for (int k = 0; k < 512; k++) if (hist[0][k] != 0) begin
      if (k < lo) lo = k;
      if (k > hi) hi = k;
    end
    lsb_ps = 2000.0 / real'(hi - lo + 1);
    dnl_max = 0.0; inl_max = 0.0; sum = 0.0;
    for (int k = lo; k <= hi; k++) begin
      w = 2000.0 * real'(hist[0][k]) / real'(N_CAL);
      mid = sum + w / 2.0;
      sum += w;
      d = (w - lsb_ps) / lsb_ps;
      if (d < 0) d = -d;
      if (d > dnl_max) dnl_max = d;
      d = (mid - (real'(k - lo) + 0.5) * lsb_ps) / lsb_ps;
      if (d < 0) d = -d;
      if (d > inl_max) inl_max = d;
    end
    $display("channel 0: codes %0d..%0d, mean bin %0.2f ps, max |DNL| %0.2f LSB, max |INL| %0.2f LSB",
             lo, hi, lsb_ps, dnl_max, inl_max);
    `CHECK(hi - lo + 1 > 350 && hi - lo + 1 < 450, "about 2 ns / 5.1 ps codes in use")

    // phase 2: cable-delay measurement with the calibrated channels
    @(negedge clk_sys) flush = 0;
    sum = 0.0; sum2 = 0.0;
    for (int i = 0; i < N_MEAS; i++) begin
      #(real'($urandom_range(26000, 20000)) * 1ps);
      hit0 = 1; #(5ns) hit0 = 0;
      while (ts_empty[0] || ts_empty[1]) @(posedge clk_sys);
      d = (real'(longint'(ts_data[1]) - longint'(ts_data[0]))) * 2000.0 / 4096.0;
      sum += d; sum2 += d * d;
      @(negedge clk_sys) pop = 2'b11;
      @(negedge clk_sys) pop = 2'b00;
    end
    mean = sum / N_MEAS;
    rms = $sqrt(sum2 / N_MEAS - mean * mean);
    $display("cable delay %0.1f ps: measured mean %0.2f ps, RMS %0.2f ps over %0d pairs",
             CABLE_NS * 1000.0, mean, rms, N_MEAS);
    `CHECK(mean > CABLE_NS * 1000.0 - 5.0 && mean < CABLE_NS * 1000.0 + 5.0,
           "mean difference equals the cable delay within 5 ps")
    `CHECK(rms <= 11.5, "RMS spread within 11.5 ps")
    `CHECK(rms > 0.0, "spread is not zero: channels really quantise")
    `CHECK(overflow == 2'b00, "no FIFO overflow")
    `REPORT
  end
endmodule
