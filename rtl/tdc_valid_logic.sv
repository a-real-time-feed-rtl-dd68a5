// tdc_valid_logic: decides whether a raw TDC code marks a real hit.
//
// A hit edge that entered the chain shortly before a sampling clock edge gives
// a non-zero ones count at that edge, while the previous sample was an empty
// chain (code 0). Later samples of the same pulse see a full (or draining)
// chain and must not count again. The block therefore flags `valid` when the
// current code is non-zero, the previous code was zero and the code is below
// NTAPS (a full chain in the first sample would mean the edge is older than
// the chain covers). The source names this check ("whether a valid rising-edge
// transition exists"); the exact rule is this design's choice.
//
// Timing: one register stage; code_o/valid_o follow code_i by one clock, and
// a coarse value presented with code_i is carried along unchanged.
`timescale 1ns / 1ps
module tdc_valid_logic #(
  parameter int NTAPS    = 400,
  parameter int CODE_W   = 9,
  parameter int COARSE_W = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [CODE_W-1:0]   code_i,
  input  logic [COARSE_W-1:0] coarse_i,
  output logic                valid_o,
  output logic [CODE_W-1:0]   code_o,
  output logic [COARSE_W-1:0] coarse_o
);
  logic [CODE_W-1:0] prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev     <= '0;
      valid_o  <= 1'b0;
      code_o   <= '0;
      coarse_o <= '0;
    end else begin
      prev     <= code_i;
      valid_o  <= (prev == '0) && (code_i != '0) && (code_i < CODE_W'(NTAPS));
      code_o   <= code_i;
      coarse_o <= coarse_i;
    end
  end
endmodule
