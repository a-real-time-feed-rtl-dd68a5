// tb_tdc_valid_logic: a code stream with empty chains, first samples of a
// rising edge, full chains and draining chains. valid must be raised one clock
// later exactly for a non-zero, non-full code that follows a zero code, with
// the code and coarse value passed along.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_tdc_valid_logic;
  localparam int NTAPS = 400;
  int checks = 0, failures = 0, hits = 0;
  logic clk = 0, rst_n = 0;
  logic [8:0] code_i, code_o;
  logic [19:0] coarse_i, coarse_o;
  logic valid_o;
  always #1 clk = ~clk;

  tdc_valid_logic #(.NTAPS(NTAPS)) dut (.clk, .rst_n, .code_i, .coarse_i, .valid_o, .code_o, .coarse_o);

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  initial begin
    logic [8:0] prev, cur;
    logic [19:0] cc;
    int sel;
    code_i = 0; coarse_i = 0; prev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // pulse shapes: idle, edge, full, drain
      sel = $urandom_range(3, 0);
      unique case (sel)
        0: cur = 0;
        1: cur = 9'($urandom_range(NTAPS - 1, 1));
        2: cur = 9'(NTAPS);
        default: cur = 9'($urandom_range(NTAPS, 0));
      endcase
      cc = 20'($urandom);
      code_i = cur; coarse_i = cc;
      @(negedge clk);
      `CHECK(valid_o == (prev == 0 && cur != 0 && cur != NTAPS), "valid rule")
      `CHECK(code_o == cur && coarse_o == cc, "code and coarse carried")
      if (valid_o) hits++;
      prev = cur;
      // hold the same code one more clock: never valid on a repeat
      @(negedge clk);
      `CHECK(!(valid_o && cur != 0), "no second valid for a held code")
      prev = cur;
    end
    `CHECK(hits > 100, "enough valid hits exercised")
    `REPORT
  end
endmodule
