// dds_channel: one DDS output channel with feedforward phase update.
//
// Two parts:
//   * phase receive: the channel watches the TCM broadcast. A BC_PHASE whose
//     channel ID equals CH_ID is held as the pending phase; the next global
//     trigger (BC_TRIGGER) copies it into the phase-offset register (the
//     "DDS update") and pulses `updated`. IDs of other channels are ignored.
//     BC_INIT reloads the host-set initial phase offset, drops any pending
//     phase and restarts the phase accumulator, so channels initialised
//     together run phase-aligned. The jump offset carried by the trigger is
//     kept in `jump`.
//   * signal output: a 32-bit phase accumulator advanced by the frequency
//     tuning word each clock (f_out = ftw / 2^32 * f_clk), plus the 16-bit
//     phase offset (2^16 = 360 degrees); the top 10 bits of the phase address
//     a 1024-entry sine table of 12-bit signed samples computed at
//     elaboration time.
//
// Channel-ID matching, holding the phase until the global trigger and the
// offset register follow the source; the accumulator width, table size, the
// replacement (not accumulation) of the offset and the reload on BC_INIT are
// this design's choices. The DAC and analog output are outside this module.
//
// Timing: `phase_o`/`sample` are registered; a trigger on clock n changes the
// offset on clock n+1 and the sample one clock later.
`timescale 1ns / 1ps
module dds_channel
  import ff_pkg::*;
#(
  parameter logic [CHAN_W-1:0] CH_ID = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ftw_we,
  input  logic [31:0]        ftw_wdata,
  input  logic               pow_we,
  input  logic [PHASE_W-1:0] pow_wdata,
  input  bcast_t             bcast,
  output logic [PHASE_W-1:0] pow,
  output logic [PHASE_W-1:0] phase_o,
  output logic signed [11:0] sample,
  output logic               updated,
  output logic [15:0]        jump
);
  logic [31:0]        ftw, acc;
  logic [PHASE_W-1:0] pow_init, pend_val;
  logic               pend;

  logic signed [11:0] sine_rom [1024];
  initial begin
    for (int i = 0; i < 1024; i++)
      sine_rom[i] = 12'($rtoi($floor(2047.0 * $sin(2.0 * 3.14159265358979 * i / 1024.0) + 0.5)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ftw <= '0; acc <= '0; pow <= '0; pow_init <= '0;
      pend <= 1'b0; pend_val <= '0; updated <= 1'b0; jump <= '0;
      phase_o <= '0;
    end else begin
      updated <= 1'b0;
      if (ftw_we) ftw <= ftw_wdata;
      if (pow_we) pow_init <= pow_wdata;
      acc <= acc + ftw;
      if (bcast.valid) begin
        unique case (bcast.kind)
          BC_INIT: begin
            pow  <= pow_init;
            pend <= 1'b0;
            acc  <= '0;
          end
          BC_PHASE: if (bcast.chan == CH_ID) begin
            pend     <= 1'b1;
            pend_val <= bcast.data;
          end
          BC_TRIGGER: begin
            jump <= bcast.data;
            if (pend) begin
              pow     <= pend_val;
              pend    <= 1'b0;
              updated <= 1'b1;
            end
          end
          default: ;
        endcase
      end
      phase_o <= acc[31:16] + pow;
    end
  end

  always_ff @(posedge clk) sample <= sine_rom[phase_o[15:6]];

endmodule
