// tb_tdc_encoder: random tap vectors (thermometer codes, codes with bubbles and
// arbitrary patterns) are applied every clock; the code must equal the number
// of ones of the vector applied LAT = 5 clocks earlier.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_tdc_encoder;
  localparam int NTAPS = 400, LAT = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NTAPS-1:0] taps;
  logic [8:0] code;
  always #1 clk = ~clk;

  tdc_encoder #(.NTAPS(NTAPS)) dut (.clk, .rst_n, .taps, .code);

  int exp_q[$];

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  function automatic logic [NTAPS-1:0] gen(int kind);
    logic [NTAPS-1:0] v;
    int n;
    n = $urandom_range(NTAPS, 0);
    v = '0;
    for (int k = 0; k < NTAPS; k++) v[k] = (k < n);
    if (kind == 1) begin                       // bubbles near the edge
      for (int b = 0; b < 3; b++) begin
        int p = n + $urandom_range(4, 0) - 2;
        if (p >= 0 && p < NTAPS) v[p] = ~v[p];
      end
    end else if (kind == 2) begin
      for (int k = 0; k < NTAPS; k++) v[k] = 1'($urandom);
    end
    return v;
  endfunction

  initial begin
    taps = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000 + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        `CHECK(code == 9'(exp_q.pop_front()), "ones count")
      end
      taps = (i == 0) ? '1 : (i == 1) ? '0 : gen(i % 3);
      exp_q.push_back($countones(taps));
    end
    `REPORT
  end
endmodule
