// tb_nl_correction: the table first gives the linear default
// fine(c) = c*2674/256; after the host writes a table, each code maps to the
// written value one clock later, with the tag carried along.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_nl_correction;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic lut_we = 0, in_valid = 0, out_valid;
  logic [8:0] lut_addr = '0, in_code = '0;
  logic [11:0] lut_wdata = '0, out_fine;
  logic [19:0] in_tag = '0, out_tag;
  always #2 clk = ~clk;

  nl_correction dut (.clk, .rst_n, .lut_we, .lut_addr, .lut_wdata, .in_valid, .in_code, .in_tag,
    .out_valid, .out_fine, .out_tag);

  logic [11:0] table_m [512];

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  task automatic lookup(input logic [8:0] c, input logic [11:0] expv);
    logic [19:0] tg;
    tg = 20'($urandom);
    @(negedge clk); in_valid = 1; in_code = c; in_tag = tg;
    @(negedge clk); in_valid = 0;
    `CHECK(out_valid && out_fine == expv && out_tag == tg, "table lookup")
    if (failures < 3 && !(out_valid && out_fine == expv)) $display("c=%0d got %0d exp %0d v=%0b", c, out_fine, expv, out_valid);
    @(negedge clk);
    `CHECK(!out_valid, "valid is a single pulse")
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 400; c += 13) begin
      automatic int v = (c * 2674) / 256;
      lookup(9'(c), 12'(v > 4095 ? 4095 : v));
    end
    // host table: a cumulative table with uneven bins
    begin
      int acc = 0;
      for (int c = 0; c < 512; c++) begin
        table_m[c] = 12'(acc > 4095 ? 4095 : acc);
        acc += 3 + (c * 37) % 17;
      end
    end
    for (int c = 0; c < 512; c++) begin
      @(negedge clk); lut_we = 1; lut_addr = 9'(c); lut_wdata = table_m[c];
    end
    @(negedge clk); lut_we = 0;
    for (int i = 0; i < 300; i++) begin
      automatic logic [8:0] c = 9'($urandom_range(511, 0));
      lookup(c, table_m[c]);
    end
    `REPORT
  end
endmodule
