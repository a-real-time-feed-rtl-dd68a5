// nl_correction: non-linearity correction of raw TDC codes.
//
// A lookup table indexed by the raw code returns the calibrated fine time, in
// units of 1/4096 of the 2 ns TDC clock period. The table is computed offline
// by the host from a code-density histogram (fine(c) = 4096 * (hits in codes
// below c + half the hits in code c) / all hits) and written through the host
// port before a run. Until it is written it holds the uncalibrated linear map
// fine(c) = c * LIN_NUM / 256 (LIN_NUM = 2674 for a 5.102 ps mean bin).
//
// The correction of DNL/INL by a host-loaded code-density table follows the
// source; the fine-time unit, the linear default and the one-clock registered
// read are this design's choices.
//
// Timing: in_valid/in_code/in_tag at clock n give out_valid/out_fine/out_tag
// at clock n+1. in_tag is carried alongside (the coarse count).
`timescale 1ns / 1ps
module nl_correction #(
  parameter int CODE_W  = 9,
  parameter int FINE_W  = 12,
  parameter int TAG_W   = 20,
  parameter int LIN_NUM = 2674
) (
  input  logic              clk,
  input  logic              rst_n,
  // host table write
  input  logic              lut_we,
  input  logic [CODE_W-1:0] lut_addr,
  input  logic [FINE_W-1:0] lut_wdata,
  // code stream
  input  logic              in_valid,
  input  logic [CODE_W-1:0] in_code,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [FINE_W-1:0] out_fine,
  output logic [TAG_W-1:0]  out_tag
);
  localparam int N = 1 << CODE_W;
  logic [FINE_W-1:0] lut [N];

  initial begin
    for (int c = 0; c < N; c++) begin
      int unsigned v;
      v = (c * LIN_NUM) / 256;
      lut[c] = (v >= (1 << FINE_W)) ? FINE_W'((1 << FINE_W) - 1) : FINE_W'(v);
    end
  end

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= lut_wdata;
    out_fine <= lut[in_code];
    out_tag  <= in_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
