// cdc_fifo: asynchronous FIFO carrying TDC samples from the 500 MHz TDC clock
// domain to the 250 MHz system clock domain.
//
// Classic dual-clock FIFO: binary read/write pointers with one extra wrap bit,
// converted to Gray code and passed to the other domain through two-flop
// synchronizers. The writer compares its pointer with the synchronized read
// pointer to produce `full`; the reader compares with the synchronized write
// pointer to produce `empty`. Storage is a DEPTH-entry register array written
// in the write domain and read combinationally at the read pointer (first-word
// fall-through: rdata is valid whenever empty is low).
//
// The source places a clock-domain-crossing FIFO between the two domains; the
// Gray-pointer structure, the depth (16) and the fall-through read port are
// this design's choices. A write while full is dropped and counted in
// `overflow` (sticky).
`timescale 1ns / 1ps
module cdc_fifo #(
  parameter int W     = 29,
  parameter int DEPTH = 16
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic         full,
  output logic         overflow,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         re,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] wbin_n;
  assign wbin_n = wbin + 1'b1;
  assign full   = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (we && !full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
      if (we && full) overflow <= 1'b1;
    end
  end

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  // ---------------- read domain ----------------
  logic [AW:0] rbin_n;
  assign rbin_n = rbin + 1'b1;
  assign empty  = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (re && !empty) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("cdc_fifo DEPTH must be a power of two >= 4");

endmodule
