// tdc_encoder: samples the carry-chain taps and encodes them as a ones count.
//
// Each tdc clock (500 MHz) the tap vector is captured by a flip-flop bank and
// re-registered once more against metastability. The sampled thermometer-like
// pattern is then decomposed into groups of GROUP (=4) taps; each group is
// encoded independently into its number of ones (the LUT4 encoders), and the
// group counts are summed in three registered adder stages: stage 0 adds
// S0_IN group counts, stage 1 adds S1_IN stage-0 sums, stage 2 adds all
// stage-1 sums. A ones count is insensitive to bubbles in the sampled code.
//
// The capture bank, grouping into LUT4 encoders and three adder stages follow
// the source design. The second capture register, the fan-in of each adder
// stage (10 and 5, giving two stage-1 adders as drawn) and the bubble-tolerant
// ones-count encoding are this design's choices.
//
// Timing: the code for the taps sampled at clock edge n appears on `code`
// after LATENCY = 5 clock edges (2 capture + 3 adder stages).
`timescale 1ns / 1ps
module tdc_encoder #(
  parameter int NTAPS  = 400,
  parameter int GROUP  = 4,
  parameter int S0_IN  = 10,
  parameter int S1_IN  = 5,
  parameter int CODE_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NTAPS-1:0]  taps,
  output logic [CODE_W-1:0] code
);
  localparam int NG  = (NTAPS + GROUP - 1) / GROUP;   // LUT4 encoders
  localparam int N0  = (NG + S0_IN - 1) / S0_IN;      // stage-0 adders
  localparam int N1  = (N0 + S1_IN - 1) / S1_IN;      // stage-1 adders
  localparam int GW  = $clog2(GROUP + 1);

  logic [NTAPS-1:0] cap0, cap1;
  always_ff @(posedge clk) begin
    cap0 <= taps;
    cap1 <= cap0;
  end

  // Decomposition + LUT4 encoders (combinational ones count per group)
  logic [GW-1:0] grp [NG];
  always_comb begin
    for (int g = 0; g < NG; g++) begin
      grp[g] = '0;
      for (int b = 0; b < GROUP; b++)
        if (g * GROUP + b < NTAPS)
          grp[g] = grp[g] + GW'(cap1[g * GROUP + b]);
    end
  end

  logic [CODE_W-1:0] s0 [N0];
  logic [CODE_W-1:0] s1 [N1];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N0; i++) s0[i] <= '0;
      for (int i = 0; i < N1; i++) s1[i] <= '0;
      code <= '0;
    end else begin
      for (int i = 0; i < N0; i++) begin
        logic [CODE_W-1:0] acc;
        acc = '0;
        for (int j = 0; j < S0_IN; j++)
          if (i * S0_IN + j < NG) acc = acc + CODE_W'(grp[i * S0_IN + j]);
        s0[i] <= acc;
      end
      for (int i = 0; i < N1; i++) begin
        logic [CODE_W-1:0] acc;
        acc = '0;
        for (int j = 0; j < S1_IN; j++)
          if (i * S1_IN + j < N0) acc = acc + s0[i * S1_IN + j];
        s1[i] <= acc;
      end
      begin
        logic [CODE_W-1:0] acc;
        acc = '0;
        for (int i = 0; i < N1; i++) acc = acc + s1[i];
        code <= acc;
      end
    end
  end

  initial assert (NTAPS < (1 << CODE_W)) else $error("CODE_W too narrow for NTAPS");

endmodule
