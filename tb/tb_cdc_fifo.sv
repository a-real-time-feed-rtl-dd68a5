// tb_cdc_fifo: writes a numbered stream from a 500 MHz clock and reads it on a
// 250 MHz clock (phase-aligned, as in the system) and then on an unrelated
// 3.7 ns clock. Every word must arrive once and in order; a burst that fills
// the FIFO must raise full and, if written on, the sticky overflow flag.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_cdc_fifo;
  localparam int W = 29, DEPTH = 16;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic we = 0, re = 0, full, empty, overflow;
  logic [W-1:0] wdata = '0, rdata;
  realtime rhalf = 2.0;
  always #1 wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;

  cdc_fifo #(.W(W), .DEPTH(DEPTH)) dut (.wclk, .wrst_n(rst_n), .we, .wdata, .full, .overflow,
    .rclk, .rrst_n(rst_n), .re, .rdata, .empty);

  int wn = 0, rn = 0;
  bit reading = 1, writing = 0;
  int wprob = 30;

  initial begin
    #(100us);
    $display("watchdog"); failures++;
    `REPORT
  end

  // writer: random writes when not full
  bit filling = 0;
  always @(negedge wclk) begin
    we <= 0;
    if (filling) begin
      we <= 1; wdata <= W'(wn * 7 + 3);
      if (!full) wn++;
    end else if (writing && !full && $urandom_range(99, 0) < wprob) begin
      we <= 1; wdata <= W'(wn * 7 + 3); wn++;
    end
  end
  // reader: pops whenever data is present, checks order
  always @(posedge rclk) begin
    if (re && !empty) begin
      `CHECK(rdata == W'(rn * 7 + 3), "in-order data across clock domains")
      rn++;
    end
  end
  always @(negedge rclk) re <= reading && ($urandom_range(3, 0) != 0);

  initial begin
    #10 rst_n = 1;
    #10 writing = 1;
    wait (wn >= 1000);
    writing = 0;
    #200;
    `CHECK(rn == wn && empty, "all words delivered (aligned clocks)")
    rhalf = 1.85;
    wprob = 60;
    #20 writing = 1;
    wait (wn >= 2500);
    writing = 0;
    #200;
    `CHECK(rn == wn && empty, "all words delivered (unrelated clocks)")
    // fill: stop reading, write until full
    reading = 0;
    #20;
    filling = 1;
    repeat (DEPTH + 4) @(posedge wclk);
    filling = 0;
    #20;
    `CHECK(full, "full after DEPTH writes without reads")
    `CHECK(overflow, "overflow flag after write on full")
    reading = 1;
    #300;
    `CHECK(rn == wn && empty, "FIFO contents intact after overflow attempt")
    `REPORT
  end
endmodule
