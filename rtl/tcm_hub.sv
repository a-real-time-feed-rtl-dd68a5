// tcm_hub: synchronization hub of the Trigger and Clock Module (TCM).
//
// Every board shares the TCM clock, and every command the boards act on comes
// from this block's broadcast output, so all boards see the same command on
// the same clock edge. Its sources are:
//   * command generator: host_reset broadcasts BC_INIT (and clears the attempt
//     counter), host_trigger broadcasts a plain BC_TRIGGER;
//   * phase frame decoder: an FR_PHASE frame from the TTL board is
//     re-broadcast as BC_PHASE with its channel ID and phase word for the
//     DDS boards;
//   * branch handling: an FR_BRANCH success frame is broadcast as the global
//     trigger BC_TRIGGER carrying the jump offset (the DDS boards apply the
//     received phase on it, the TTL board continues); a failure frame counts
//     one failed attempt. Fewer than MAX_ATTEMPTS consecutive failures give
//     BC_ENTANGLE (try again); the MAX_ATTEMPTS-th gives BC_INIT (restart
//     from initialisation) and clears the count.
//
// Timing: a frame accepted on clock n is broadcast on clock n+1 (registered
// output). Host commands take precedence; while one is present frame_ready
// is low, so no frame is lost.
//
// The retry limit of 50, the broadcast of phase, trigger and branch to all
// modules and the command generator follow the source; the one-clock
// broadcast bus and its encoding are this design's choices.
`timescale 1ns / 1ps
module tcm_hub
  import ff_pkg::*;
#(
  parameter int MAX_ATTEMPTS = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       host_reset,
  input  logic       host_trigger,
  input  logic       frame_valid,
  input  fb_frame_t  frame_i,
  output logic       frame_ready,
  output bcast_t     bcast,
  output logic [7:0] attempts,
  output logic       reinit        // pulse: retry limit reached
);
  assign frame_ready = !(host_reset || host_trigger);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcast    <= '0;
      attempts <= '0;
      reinit   <= 1'b0;
    end else begin
      bcast  <= '0;
      reinit <= 1'b0;
      if (host_reset) begin
        bcast.valid <= 1'b1;
        bcast.kind  <= BC_INIT;
        attempts    <= '0;
      end else if (host_trigger) begin
        bcast.valid <= 1'b1;
        bcast.kind  <= BC_TRIGGER;
      end else if (frame_valid) begin
        unique case (frame_i.kind)
          FR_PHASE: begin
            bcast.valid <= 1'b1;
            bcast.kind  <= BC_PHASE;
            bcast.chan  <= frame_i.chan;
            bcast.data  <= frame_i.payload;
          end
          FR_BRANCH: begin
            bcast.valid <= 1'b1;
            if (frame_i.success) begin
              bcast.kind <= BC_TRIGGER;
              bcast.data <= frame_i.payload;
              attempts   <= '0;
            end else if (attempts + 1'b1 >= 8'(MAX_ATTEMPTS)) begin
              bcast.kind <= BC_INIT;
              attempts   <= '0;
              reinit     <= 1'b1;
            end else begin
              bcast.kind <= BC_ENTANGLE;
              attempts   <= attempts + 1'b1;
            end
          end
          default: ;
        endcase
      end
    end
  end

  initial assert (MAX_ATTEMPTS > 0 && MAX_ATTEMPTS < 256) else $error("MAX_ATTEMPTS out of range");
endmodule
