// sync_fifo: single-clock FIFO used as the timestamp aggregation buffer.
//
// Calibrated timestamps are pushed here by the TDC channel and popped by the
// sequence controller when it hands them to the arithmetic engine. Register
// array storage with first-word fall-through (rdata shows the oldest entry
// whenever empty is low). `flush` empties the FIFO in one clock; the sequence
// controller uses it when a new attempt is initialised so that stale
// timestamps are never used. A push while full is dropped and sets the sticky
// `overflow` flag. Depth (16) and flush are this design's choices; the source
// gives the FIFO and its role only.
`timescale 1ns / 1ps
module sync_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic         overflow,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;

  logic do_push, do_pop;
  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else if (flush) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && full) overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push && !flush) mem[wp] <= wdata;
  end

  initial assert ((DEPTH & (DEPTH - 1)) == 0) else $error("sync_fifo DEPTH must be a power of two");
endmodule
