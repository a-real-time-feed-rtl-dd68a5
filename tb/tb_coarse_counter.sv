// tb_coarse_counter: the counter holds zero while clear is high, counts clock
// periods after clear falls, and its output is the count of DELAY clocks ago.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_coarse_counter;
  localparam int DELAY = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 1;
  logic [19:0] count;
  always #1 clk = ~clk;

  coarse_counter #(.COARSE_W(20), .DELAY(DELAY)) dut (.clk, .rst_n, .clear, .count);

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  // reference: count value seen at each edge, delayed
  int ref_cnt = 0;
  int hist[$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      clear = 1;
      repeat (10) @(posedge clk);
      @(negedge clk) clear = 0;
      for (int i = 0; i < 200 * (run + 1); i++) begin
        @(negedge clk);
        // after i+1 edges with clear low, DELAY edges of pipeline
        if (i + 1 >= DELAY) begin
          `CHECK(count == 20'(i + 1 - DELAY), "count delayed by DELAY clocks")
        end
      end
    end
    `REPORT
  end
endmodule
