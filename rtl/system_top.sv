// system_top: real-time phase feedforward system for heralded entanglement.
//
// A photon detected at a random time t0 heralds an entangled state whose phase
// depends on t0; the system timestamps the photon, computes the correcting
// phase and loads it into a DDS channel before the next operation, all in
// hardware with a fixed latency. Three boards share one clock and the TCM
// broadcast:
//
//   TTL board   N_TDC carry-chain TDC channels (tdc_carry_chain + tdc_channel),
//               the sequence controller (ttl_sequencer), the microcode
//               arithmetic engine (ucode_engine) and the synchronized feedback
//               interface (feedback_if), which sends frames to the TCM;
//   TCM         tcm_hub: host command generator, frame decoder, retry counter
//               and the broadcast to all boards;
//   DDS board   N_DDS dds_channel instances with channel IDs 0..N_DDS-1.
//
// One shot: host_reset -> BC_INIT -> entanglement -> detection window ->
// photon timestamp -> microcode phase calculation -> FR_PHASE + FR_BRANCH
// frames -> BC_PHASE to the DDS channels -> BC_TRIGGER -> DDS phase update.
// Without a photon a failure frame goes to the TCM, which orders another
// attempt, or a re-initialisation after MAX_ATTEMPTS consecutive failures.
//
// Host register writes (host_we/host_addr/host_wdata), host_addr[15:12]:
//   0      sequence configuration, index host_addr[3:0] (see ttl_sequencer)
//   1      microcode instruction RAM, word host_addr[7:0]
//   2      engine general register host_addr[3:0]
//   3..6   calibration table of TDC channel (host_addr[15:12]-3), code [8:0]
//   8      DDS channel host_addr[7:4]: host_addr[0]=0 frequency tuning word,
//          host_addr[0]=1 initial phase offset
// The PCIe/XDMA link that carries these writes, the host and the clock
// fan-out are not part of this RTL: the host bus and both clocks are ports.
//
// Clocks: clk_sys 250 MHz for everything except the TDC front ends, clk_tdc
// 500 MHz, both from the TCM clock and phase-aligned. rst_n is asynchronous,
// released synchronously to both clocks by the environment.
//
// The partitioning into boards and blocks follows the source design; the
// register map, the single-clock broadcast bus and the frame formats are this
// design's choices. The carry chains are behavioural models of FPGA carry
// primitives and are the only non-synthesizable part.
`timescale 1ns / 1ps
module system_top
  import ff_pkg::*;
#(
  parameter int N_TDC        = 4,
  parameter int N_DDS        = 2,
  parameter int NTAPS        = 400,
  parameter int MAX_ATTEMPTS = 50
) (
  input  logic               clk_sys,
  input  logic               clk_tdc,
  input  logic               rst_n,
  input  logic [N_TDC-1:0]   hit,
  // host
  input  logic               host_we,
  input  logic [15:0]        host_addr,
  input  logic [31:0]        host_wdata,
  input  logic               host_reset,
  input  logic               host_trigger,
  output logic [N_TDC-1:0]   raw_valid,
  output logic [CODE_W-1:0]  raw_code [N_TDC],
  // DDS outputs
  output logic [PHASE_W-1:0] dds_phase  [N_DDS],
  output logic [PHASE_W-1:0] dds_pow    [N_DDS],
  output logic signed [11:0] dds_sample [N_DDS],
  output logic [N_DDS-1:0]   dds_updated,
  output logic [15:0]        dds_jump,
  // status
  output bcast_t             bcast_o,
  output logic [7:0]         attempts,
  output logic               reinit,
  output logic               photon_seen,
  output logic               shot_done,
  output logic [3:0]         seq_state,
  output logic [N_TDC-1:0]   tdc_overflow
);
  initial assert (N_TDC <= NTS_REGS) else $error("at most %0d TDC channels map onto R0..R3", NTS_REGS);

  // ---------------- host decode ----------------
  logic [3:0] sel;
  assign sel = host_addr[15:12];

  // ---------------- TDC channels ----------------
  logic [N_TDC-1:0] ts_empty, ts_pop;
  logic [TS_W-1:0]  ts_data [N_TDC];
  logic             win_open, ts_flush;

  for (genvar c = 0; c < N_TDC; c++) begin : g_tdc
    logic [NTAPS-1:0] taps;
    logic             tdc_rst_n;

    tdc_carry_chain #(.NTAPS(NTAPS)) u_chain (
      .hit(hit[c]), .tdc_rst_n, .taps);

    tdc_channel #(.NTAPS(NTAPS)) u_ch (
      .clk_tdc, .clk_sys, .rst_n, .taps, .tdc_rst_n,
      .win_open, .flush(ts_flush), .pop(ts_pop[c]),
      .ts_data(ts_data[c]), .ts_empty(ts_empty[c]),
      .lut_we(host_we && sel == 4'(3 + c)), .lut_addr(host_addr[CODE_W-1:0]),
      .lut_wdata(host_wdata[FINE_W-1:0]),
      .raw_valid(raw_valid[c]), .raw_code(raw_code[c]),
      .overflow(tdc_overflow[c]));
  end

  // ---------------- TTL board: sequence control, engine, feedback ----------------
  bcast_t bcast;
  assign bcast_o = bcast;

  logic              eng_ts_we, eng_start, eng_done, eng_busy;
  logic [1:0]        eng_ts_idx;
  logic [DATA_W-1:0] eng_ts_data, eng_rd_data;
  logic [7:0]        eng_start_addr;
  logic [8:0]        eng_count;
  logic [REG_AW-1:0] result_reg, eng_rd_addr;
  logic [CHAN_W-1:0] target_chan;
  logic [15:0]       jump_offset;
  logic              send_phase, send_fail, fb_busy;

  // the sequencer sees one timestamp port per channel; unused engine slots stay idle
  ttl_sequencer #(.N_TDC(N_TDC)) u_seq (
    .clk(clk_sys), .rst_n,
    .cfg_we(host_we && sel == 4'd0), .cfg_addr(host_addr[3:0]), .cfg_wdata(host_wdata),
    .bcast,
    .win_open, .ts_flush, .ts_empty, .ts_data, .ts_pop,
    .eng_ts_we, .eng_ts_idx, .eng_ts_data, .eng_start, .eng_start_addr, .eng_count,
    .eng_done,
    .send_phase, .send_fail, .result_reg, .target_chan, .jump_offset, .fb_busy,
    .photon_seen, .shot_done, .state_o(seq_state));

  ucode_engine #(.IRAM_DEPTH(256)) u_eng (
    .clk(clk_sys), .rst_n,
    .iram_we(host_we && sel == 4'd1), .iram_addr(host_addr[7:0]), .iram_wdata(host_wdata),
    .reg_we(host_we && sel == 4'd2), .reg_waddr(host_addr[REG_AW-1:0]), .reg_wdata(host_wdata),
    .ts_we(eng_ts_we), .ts_idx(eng_ts_idx), .ts_data(eng_ts_data),
    .start(eng_start), .start_addr(eng_start_addr), .count(eng_count),
    .busy(eng_busy), .done(eng_done),
    .rd_addr(eng_rd_addr), .rd_data(eng_rd_data));

  logic      fr_valid, fr_ready;
  fb_frame_t frame;

  feedback_if u_fb (
    .clk(clk_sys), .rst_n,
    .send_phase, .send_fail, .result_reg, .target_chan, .jump_offset,
    .rd_addr(eng_rd_addr), .rd_data(eng_rd_data), .busy(fb_busy),
    .frame_valid(fr_valid), .frame_o(frame), .frame_ready(fr_ready));

  // ---------------- TCM ----------------
  tcm_hub #(.MAX_ATTEMPTS(MAX_ATTEMPTS)) u_tcm (
    .clk(clk_sys), .rst_n, .host_reset, .host_trigger,
    .frame_valid(fr_valid), .frame_i(frame), .frame_ready(fr_ready),
    .bcast, .attempts, .reinit);

  // ---------------- DDS board ----------------
  logic [15:0] jump_v [N_DDS];
  for (genvar d = 0; d < N_DDS; d++) begin : g_dds
    dds_channel #(.CH_ID(CHAN_W'(d))) u_dds (
      .clk(clk_sys), .rst_n,
      .ftw_we(host_we && sel == 4'd8 && host_addr[7:4] == 4'(d) && !host_addr[0]),
      .ftw_wdata(host_wdata),
      .pow_we(host_we && sel == 4'd8 && host_addr[7:4] == 4'(d) && host_addr[0]),
      .pow_wdata(host_wdata[PHASE_W-1:0]),
      .bcast,
      .pow(dds_pow[d]), .phase_o(dds_phase[d]), .sample(dds_sample[d]),
      .updated(dds_updated[d]), .jump(jump_v[d]));
  end
  assign dds_jump = jump_v[0];

endmodule
