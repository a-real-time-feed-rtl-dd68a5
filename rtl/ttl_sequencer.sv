// ttl_sequencer: sequence control of the TTL board's feedforward engine.
//
// On the board this role is played by firmware on an embedded RISC-V core;
// here the same control flow is a hardware state machine with host-set
// configuration registers. It runs one heralded-entanglement shot:
//
//   INIT      on a BC_INIT broadcast: TDC windows closed, timestamp FIFOs
//             flushed, for cfg init_len clocks
//   ENTANGLE  the entanglement sequence runs for ent_len clocks
//   WINDOW    photon-detection window: the TDCs are enabled for win_len clocks
//   DRAIN     window closed; drain_len clocks for hits still in the pipeline
//   (photon)  as soon as a channel in herald_mask has a timestamp, all masked
//             non-empty FIFOs are popped into engine registers R0..R3, and
//   CALC      the microcode engine runs ucode_count instructions from
//             ucode_start
//   SEND      the feedback interface is asked to send the phase (engine
//             register result_reg, DDS channel target_chan) and a success
//             branch frame carrying jump_offset
//   PAUSE     waits for the TCM global trigger, then
//   CONTINUE  the rest of the sequence, cont_len clocks, then IDLE (shot_done)
//   (no photon) after DRAIN a failure branch frame is sent and the controller
//             waits in WAIT_TCM for the TCM's decision: BC_ENTANGLE starts
//             another attempt, BC_INIT re-initialises.
//
// A BC_INIT broadcast restarts the shot from any state. Configuration
// registers (cfg_we/cfg_addr/cfg_wdata): 0 init_len, 1 ent_len, 2 win_len,
// 3 drain_len, 4 cont_len, 5 ucode_start, 6 ucode_count, 7 result_reg,
// 8 target_chan, 9 jump_offset, 10 herald_mask.
//
// The states and branches follow the workflow of the source (initialize,
// entanglement, detection, phase calculation, send message, pause, continue;
// failure reported to the TCM which decides on retry or re-initialisation).
// Durations as clock counts, the drain period, the register map and the
// choice of a state machine instead of processor firmware are this design's.
`timescale 1ns / 1ps
module ttl_sequencer
  import ff_pkg::*;
#(
  parameter int N_TDC = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host configuration
  input  logic                 cfg_we,
  input  logic [3:0]           cfg_addr,
  input  logic [31:0]          cfg_wdata,
  // TCM broadcast
  input  bcast_t               bcast,
  // TDC channels
  output logic                 win_open,
  output logic                 ts_flush,
  input  logic [N_TDC-1:0]     ts_empty,
  input  logic [TS_W-1:0]      ts_data [N_TDC],
  output logic [N_TDC-1:0]     ts_pop,
  // microcode engine
  output logic                 eng_ts_we,
  output logic [1:0]           eng_ts_idx,
  output logic [DATA_W-1:0]    eng_ts_data,
  output logic                 eng_start,
  output logic [7:0]           eng_start_addr,
  output logic [8:0]           eng_count,
  input  logic                 eng_done,
  // feedback interface
  output logic                 send_phase,    // phase + success branch
  output logic                 send_fail,     // failure branch
  output logic [REG_AW-1:0]    result_reg,
  output logic [CHAN_W-1:0]    target_chan,
  output logic [15:0]          jump_offset,
  input  logic                 fb_busy,
  // status
  output logic                 photon_seen,   // pulse: heralded event accepted
  output logic                 shot_done,     // pulse: shot completed
  output logic [3:0]           state_o
);
  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_ENT, S_WIN, S_DRAIN, S_LOAD, S_CALC, S_SEND,
    S_PAUSE, S_CONT, S_FAIL, S_WAIT_TCM
  } seq_state_e;

  // ---------------- configuration ----------------
  logic [31:0] init_len, ent_len, win_len, drain_len, cont_len;
  logic [7:0]  ucode_start;
  logic [8:0]  ucode_count;
  logic [N_TDC-1:0] herald_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_len <= 32'd4;  ent_len <= 32'd4;  win_len <= 32'd16;
      drain_len <= 32'd16; cont_len <= 32'd4;
      ucode_start <= '0;  ucode_count <= '0; result_reg <= REG_AW'(4);
      target_chan <= '0;  jump_offset <= '0; herald_mask <= '1;
    end else if (cfg_we) begin
      unique case (cfg_addr)
        4'd0:  init_len    <= cfg_wdata;
        4'd1:  ent_len     <= cfg_wdata;
        4'd2:  win_len     <= cfg_wdata;
        4'd3:  drain_len   <= cfg_wdata;
        4'd4:  cont_len    <= cfg_wdata;
        4'd5:  ucode_start <= cfg_wdata[7:0];
        4'd6:  ucode_count <= cfg_wdata[8:0];
        4'd7:  result_reg  <= cfg_wdata[REG_AW-1:0];
        4'd8:  target_chan <= cfg_wdata[CHAN_W-1:0];
        4'd9:  jump_offset <= cfg_wdata[15:0];
        4'd10: herald_mask <= cfg_wdata[N_TDC-1:0];
        default: ;
      endcase
    end
  end

  // ---------------- state machine ----------------
  seq_state_e        st;
  logic [31:0]       cnt;
  logic [N_TDC-1:0]  load_pend;     // channels still to be copied into R0..R3
  logic              photon;
  assign photon = |(~ts_empty & herald_mask);

  // lowest channel still pending a load
  logic [1:0] load_idx;
  always_comb begin
    load_idx = '0;
    for (int c = N_TDC - 1; c >= 0; c--)
      if (load_pend[c]) load_idx = 2'(c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      cnt <= '0;
      load_pend <= '0;
    end else if (bcast.valid && bcast.kind == BC_INIT) begin
      st  <= S_INIT;
      cnt <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      unique case (st)
        S_IDLE: cnt <= '0;
        S_INIT:  if (cnt + 1 >= init_len) begin st <= S_ENT; cnt <= '0; end
        S_ENT:   if (cnt + 1 >= ent_len)  begin st <= S_WIN; cnt <= '0; end
        S_WIN, S_DRAIN: begin
          if (photon) begin
            st <= S_LOAD;
            load_pend <= ~ts_empty & herald_mask;
          end else if (st == S_WIN && cnt + 1 >= win_len) begin
            st <= S_DRAIN; cnt <= '0;
          end else if (st == S_DRAIN && cnt + 1 >= drain_len) begin
            st <= S_FAIL;
          end
        end
        S_LOAD: begin
          load_pend[load_idx] <= 1'b0;
          if ((load_pend & ~(N_TDC'(1) << load_idx)) == '0) st <= S_CALC;
        end
        S_CALC:  if (eng_done) st <= S_SEND;
        S_SEND:  if (!fb_busy) st <= S_PAUSE;
        S_PAUSE: if (bcast.valid && bcast.kind == BC_TRIGGER) begin st <= S_CONT; cnt <= '0; end
        S_CONT:  if (cnt + 1 >= cont_len) st <= S_IDLE;
        S_FAIL:  if (!fb_busy) st <= S_WAIT_TCM;
        S_WAIT_TCM: if (bcast.valid && bcast.kind == BC_ENTANGLE) begin st <= S_ENT; cnt <= '0; end
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------- outputs ----------------
  assign win_open   = (st == S_WIN);
  assign ts_flush   = (st == S_INIT);
  assign eng_ts_we  = (st == S_LOAD);
  assign eng_ts_idx = load_idx;
  assign eng_ts_data = ts_data[load_idx];
  always_comb begin
    ts_pop = '0;
    if (st == S_LOAD) ts_pop[load_idx] = 1'b1;
  end
  // the engine is started on the clock that leaves S_LOAD
  assign eng_start      = (st == S_LOAD) && ((load_pend & ~(N_TDC'(1) << load_idx)) == '0)
                          && !(bcast.valid && bcast.kind == BC_INIT);
  assign eng_start_addr = ucode_start;
  assign eng_count      = ucode_count;
  assign send_phase     = (st == S_SEND) && !fb_busy;
  assign send_fail      = (st == S_FAIL) && !fb_busy;
  assign photon_seen    = eng_start;
  assign shot_done      = (st == S_CONT) && (cnt + 1 >= cont_len) && !(bcast.valid && bcast.kind == BC_INIT);
  assign state_o        = st;

endmodule
