// tb_tdc_channel: one complete timestamp channel with the carry-chain model.
// The testbench calibrates the channel the way the host would, writing for
// each code the middle of its time bin (known here from the model's tap
// delays), then fires hits at random picosecond offsets inside a measurement
// window. Every timestamp read from the aggregation FIFO must equal the true
// hit time after the window-opening clock edge within 12 ps. Hits outside the
// window must give nothing, each hit must show once on the raw host stream,
// and flush must empty the FIFO.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_tdc_channel;
  import ff_pkg::*;
  localparam int NTAPS = 400;
  localparam real TAP_PS = 5.102;
  int checks = 0, failures = 0;
  logic clk_tdc = 0, clk_sys = 0, rst_n = 0;
  logic hit = 0;
  logic [NTAPS-1:0] taps;
  logic tdc_rst_n, win_open = 0, flush = 0, pop = 0, ts_empty, raw_valid, overflow;
  logic [TS_W-1:0] ts_data;
  logic lut_we = 0;
  logic [CODE_W-1:0] lut_addr = '0, raw_code;
  logic [FINE_W-1:0] lut_wdata = '0;

  always #1 clk_tdc = ~clk_tdc;
  always #2 clk_sys = ~clk_sys;

  tdc_carry_chain #(.NTAPS(NTAPS)) u_chain (.hit, .tdc_rst_n, .taps);
  tdc_channel #(.NTAPS(NTAPS)) dut (.clk_tdc, .clk_sys, .rst_n, .taps, .tdc_rst_n, .win_open,
    .flush, .pop, .ts_data, .ts_empty, .lut_we, .lut_addr, .lut_wdata, .raw_valid, .raw_code,
    .overflow);

  // the model's tap delays in ps, rounded to the 1 ps simulation precision
  function automatic int tap_ps(int k);
    int unsigned h;
    h = (k + 1) * 32'd2654435761;
    h = h ^ (h >> 15);
    return int'($floor(TAP_PS * (0.25 + 1.5 * real'(h % 1000) / 1000.0) + 0.5));
  endfunction

  realtime t_open;
  int raw_seen = 0;
  always @(posedge clk_sys) if (rst_n && raw_valid) raw_seen++;

  initial begin
    #(200us);
    $display("watchdog"); failures++;
    `REPORT
  end

  initial begin
    int cum [NTAPS + 2];
    int hits = 0, max_err = 0;
    cum[0] = 0;
    for (int k = 0; k <= NTAPS; k++) cum[k+1] = cum[k] + (k < NTAPS ? tap_ps(k) : 2000);
    #10 rst_n = 1;
    // calibration table: middle of bin c, in units of 2 ns / 4096
    for (int c = 0; c < 512; c++) begin
      automatic int mid_ps = (c < NTAPS) ? (cum[c] + cum[c+1]) / 2 : cum[NTAPS];
      @(negedge clk_sys);
      lut_we = 1; lut_addr = CODE_W'(c);
      lut_wdata = FINE_W'((mid_ps * 4096 + 1000) / 2000 > 4095 ? 4095 : (mid_ps * 4096 + 1000) / 2000);
    end
    @(negedge clk_sys) lut_we = 0;

    // a hit while the window is closed is ignored
    #(3ns) hit = 1; #(5ns) hit = 0; #(100ns);
    `CHECK(ts_empty && raw_seen == 0, "no timestamp while window closed")

    for (int w = 0; w < 8; w++) begin
      @(negedge clk_sys) win_open = 1;
      @(posedge tdc_rst_n);
      t_open = $realtime;
      for (int h = 0; h < 10; h++) begin
        automatic int off_ps = $urandom_range(9000, 200) + 100000 * h;
        automatic realtime th;
        automatic longint exp_ts, err;
        #(real'(off_ps) * 1ps - ($realtime - t_open));
        th = $realtime;
        hit = 1; #(6ns) hit = 0;
        // wait for the timestamp
        while (ts_empty) @(posedge clk_sys);
        exp_ts = longint'(((th - t_open) * 1000.0) * 4096.0 / 2000.0 + 0.5);
        err = longint'(ts_data) - exp_ts;
        if (err < 0) err = -err;
        if (err > max_err) max_err = int'(err);
        `CHECK(err <= 25, "timestamp within 12 ps of true hit time")
        @(negedge clk_sys) pop = 1;
        @(negedge clk_sys) pop = 0;
        hits++;
        #(10ns);
      end
      @(negedge clk_sys) win_open = 0;
      #(50ns);
    end
    $display("max timestamp error %0d units (%0.1f ps)", max_err, max_err * 2000.0 / 4096.0);
    `CHECK(raw_seen == hits, "each hit once on the raw host stream")
    `CHECK(ts_empty, "FIFO empty after reading all")
    // flush: leave two timestamps, then flush
    @(negedge clk_sys) win_open = 1;
    @(posedge tdc_rst_n);
    #(10.3ns) hit = 1; #(5ns) hit = 0; #(20.7ns) hit = 1; #(5ns) hit = 0;
    #(60ns);
    `CHECK(!ts_empty, "timestamps present before flush")
    @(negedge clk_sys) flush = 1;
    @(negedge clk_sys) flush = 0;
    `CHECK(ts_empty, "flush empties the FIFO")
    `CHECK(!overflow, "no overflow")
    `REPORT
  end
endmodule
