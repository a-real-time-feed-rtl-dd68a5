// feedback_if: synchronized feedback interface of the TTL board.
//
// Packs the outcome of a shot into frames for the TCM:
//   * result retrieval: on send_phase the phase word (low 16 bits of engine
//     register result_reg, read through rd_addr/rd_data) is latched;
//   * frame builder: an FR_PHASE frame carries the phase word and the target
//     DDS channel ID; an FR_BRANCH frame carries success/failure and the jump
//     offset of the sequence;
//   * data-pack arbitration: pending frames leave one per accepted transfer,
//     phase before branch, so the TCM always has the phase in hand before the
//     success branch that makes it broadcast the global trigger. A failure
//     report (send_fail) produces a single FR_BRANCH frame with success = 0.
//
// Frame transfer uses valid/ready: frame_o is held stable while frame_valid is
// high and frame_ready low. `busy` is high while any frame is pending, and
// new requests are accepted only when it is low.
//
// The three functions (retrieval, frame builder, arbitration) follow the
// source; the frame layout, phase-before-branch priority and handshake are
// this design's choices.
`timescale 1ns / 1ps
module feedback_if
  import ff_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                send_phase,
  input  logic                send_fail,
  input  logic [REG_AW-1:0]   result_reg,
  input  logic [CHAN_W-1:0]   target_chan,
  input  logic [15:0]         jump_offset,
  output logic [REG_AW-1:0]   rd_addr,
  input  logic [DATA_W-1:0]   rd_data,
  output logic                busy,
  output logic                frame_valid,
  output fb_frame_t           frame_o,
  input  logic                frame_ready
);
  logic              ph_pend, br_pend, br_ok;
  logic [15:0]       ph_val, br_jump;
  logic [CHAN_W-1:0] ph_chan;

  assign rd_addr = result_reg;
  assign busy    = ph_pend | br_pend | frame_valid;

  logic load_out;
  assign load_out = !frame_valid || frame_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_pend <= 1'b0; br_pend <= 1'b0; br_ok <= 1'b0;
      ph_val <= '0; br_jump <= '0; ph_chan <= '0;
      frame_valid <= 1'b0;
      frame_o <= '0;
    end else begin
      if (frame_valid && frame_ready) frame_valid <= 1'b0;
      if (load_out) begin
        if (ph_pend) begin
          frame_valid     <= 1'b1;
          frame_o         <= '0;
          frame_o.kind    <= FR_PHASE;
          frame_o.chan    <= ph_chan;
          frame_o.payload <= ph_val;
          ph_pend         <= 1'b0;
        end else if (br_pend) begin
          frame_valid     <= 1'b1;
          frame_o         <= '0;
          frame_o.kind    <= FR_BRANCH;
          frame_o.success <= br_ok;
          frame_o.payload <= br_jump;
          br_pend         <= 1'b0;
        end
      end
      if (!busy) begin
        if (send_phase) begin
          ph_pend <= 1'b1;
          ph_val  <= rd_data[15:0];
          ph_chan <= target_chan;
          br_pend <= 1'b1;
          br_ok   <= 1'b1;
          br_jump <= jump_offset;
        end else if (send_fail) begin
          br_pend <= 1'b1;
          br_ok   <= 1'b0;
          br_jump <= '0;
        end
      end
    end
  end

  // a frame must not change while it waits to be accepted
  property p_hold;
    @(posedge clk) disable iff (!rst_n) frame_valid && !frame_ready |=> frame_valid && $stable(frame_o);
  endproperty
  assert property (p_hold);

endmodule
