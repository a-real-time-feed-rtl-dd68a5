// tb_tdc_carry_chain: checks the behavioural carry-chain model.
// A hit edge must appear on the taps as a growing run of ones from tap 0
// (a thermometer code), take about NTAPS * 5.102 ps to cross the chain, and
// be blocked entirely while tdc_rst_n is low.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_tdc_carry_chain;
  localparam int NTAPS = 400;
  int checks = 0, failures = 0;
  logic hit = 0, tdc_rst_n = 0;
  logic [NTAPS-1:0] taps;

  tdc_carry_chain #(.NTAPS(NTAPS)) dut (.hit, .tdc_rst_n, .taps);

  function automatic bit is_thermo(logic [NTAPS-1:0] v);
    for (int k = 1; k < NTAPS; k++) if (v[k] && !v[k-1]) return 0;
    return 1;
  endfunction

  initial begin
    #(5000ns);
    $display("watchdog");
    failures++;
    `REPORT
  end

  initial begin
    realtime t0, t_full;
    int prev;
    // window closed: the hit must not enter
    #(1ns); hit = 1; #(3ns);
    `CHECK(taps == '0, "chain gated while tdc_rst_n low")
    hit = 0; #(3ns);
    tdc_rst_n = 1; #(1ns);
    `CHECK(taps == '0, "chain empty before hit")
    // rising edge: sample every 100 ps
    hit = 1; t0 = $realtime;
    prev = 0;
    t_full = 0;
    for (int i = 0; i < 30; i++) begin
      #(0.1ns);
      `CHECK(is_thermo(taps), "thermometer pattern while edge propagates")
      `CHECK($countones(taps) >= prev, "ones count never decreases")
      prev = $countones(taps);
      if (t_full == 0 && taps[NTAPS-1]) t_full = $realtime - t0;
    end
    `CHECK(taps == '1, "chain full 3 ns after hit")
    $display("chain delay about %0.3f ns", t_full);
    // mean tap 5.102 ps: total 2.04 ns, allow +-6 % for the spread
    `CHECK(t_full > 1.91 && t_full < 2.17, "total chain delay near NTAPS*5.102 ps")
    // mid-way check: after 1.0 ns roughly half the taps are set
    hit = 0; #(3ns);
    `CHECK(taps == '0, "chain drains after the pulse")
    hit = 1; #(1.0ns);
    `CHECK($countones(taps) > 150 && $countones(taps) < 250, "about half the chain after 1 ns")
    // closing the window clears the chain
    tdc_rst_n = 0; #(3ns);
    `CHECK(taps == '0, "closing the window empties the chain")
    `REPORT
  end
endmodule
