// tb_sync_fifo: random push/pop against a queue model; checks data, empty,
// full, count, overflow and flush.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_sync_fifo;
  localparam int W = 32, DEPTH = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flush = 0, push = 0, pop = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full, overflow;
  logic [4:0] count;
  always #2 clk = ~clk;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .flush, .push, .wdata, .pop, .rdata,
    .empty, .full, .overflow, .count);

  logic [W-1:0] q[$];
  bit ovf_m = 0;
  int fills = 0;

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      `CHECK(count == 5'(q.size()), "count")
      if (failures < 2 && count != 5'(q.size())) $display("count %0d model %0d", count, q.size());
      `CHECK(empty == (q.size() == 0), "empty")
      `CHECK(full == (q.size() == DEPTH), "full")
      `CHECK(overflow == ovf_m, "overflow flag")
      if (q.size() > 0) `CHECK(rdata == q[0], "head data")
      if (full) fills++;
      flush = ($urandom_range(199, 0) == 0);
      push  = ($urandom_range(99, 0) < ((i / 500) % 2 ? 70 : 40));
      pop   = ($urandom_range(99, 0) < ((i / 500) % 2 ? 30 : 60));
      wdata = $urandom;
      @(posedge clk);
      #0.1;
      if (flush) begin
        q.delete(); ovf_m = 0;
      end else begin
        automatic bit was_empty = (q.size() == 0);
        automatic bit was_full  = (q.size() == DEPTH);
        if (pop && !was_empty) void'(q.pop_front());
        if (push && !was_full) q.push_back(wdata);
        if (push && was_full) ovf_m = 1;
      end
    end
    `CHECK(fills > 0, "FIFO reached full at least once")
    `REPORT
  end
endmodule
