// tdc_channel: one photon-timestamp acquisition channel.
//
// Chain of the timestamp path, in order:
//   * window gate: the measurement window request `win_open` (system domain,
//     driven by the running sequence) is synchronized into the TDC domain and
//     drives tdc_rst_n of the carry chain, so hits are seen only while the
//     window is open. The same signal clears the coarse counter, so the
//     timestamp counts from the TDC clock edge at which the window opened.
//   * tdc_encoder: captures the taps every 2 ns and produces the ones count.
//   * coarse_counter: 2 ns counter aligned with the encoder latency.
//   * tdc_valid_logic: keeps only the first sample of a rising edge.
//   * cdc_fifo: {coarse, raw code} into the 250 MHz system domain.
//   * raw path: every sample leaving the CDC FIFO is also presented on
//     raw_valid/raw_code for the host's code-density calibration.
//   * nl_correction: raw code -> calibrated fine time (host-loaded table).
//   * timestamp = (coarse + 1) * 4096 - fine, in units of 2 ns / 4096, i.e.
//     the hit time after the window-opening TDC clock edge; it is pushed into
//     the aggregation FIFO (sync_fifo), read by the sequence controller.
//
// The order of these stages follows the source's timestamp acquisition chain;
// the window synchronizer, the timestamp arithmetic and the FIFO depths are
// this design's choices. The carry chain itself is outside this module
// (taps in, tdc_rst_n out) because it is an FPGA primitive.
//
// Timing: a hit sampled at TDC edge n is in the aggregation FIFO a fixed
// number of system clocks later (about 8 with synchronous 500/250 MHz clocks).
`timescale 1ns / 1ps
module tdc_channel
  import ff_pkg::*;
#(
  parameter int NTAPS     = 400,
  parameter int CDC_DEPTH = 16,
  parameter int TS_DEPTH  = 16
) (
  input  logic              clk_tdc,
  input  logic              clk_sys,
  input  logic              rst_n,
  // carry chain
  input  logic [NTAPS-1:0]  taps,
  output logic              tdc_rst_n,
  // control (system domain)
  input  logic              win_open,
  input  logic              flush,
  input  logic              pop,
  output logic [TS_W-1:0]   ts_data,
  output logic              ts_empty,
  // calibration table write (system domain)
  input  logic              lut_we,
  input  logic [CODE_W-1:0] lut_addr,
  input  logic [FINE_W-1:0] lut_wdata,
  // raw code stream to the host
  output logic              raw_valid,
  output logic [CODE_W-1:0] raw_code,
  // status
  output logic              overflow
);
  // ---------------- TDC domain ----------------
  logic win_s1, win_s2;
  always_ff @(posedge clk_tdc or negedge rst_n) begin
    if (!rst_n) begin
      win_s1 <= 1'b0;
      win_s2 <= 1'b0;
    end else begin
      win_s1 <= win_open;
      win_s2 <= win_s1;
    end
  end
  assign tdc_rst_n = win_s2;

  logic [CODE_W-1:0]   enc_code, v_code;
  logic [COARSE_W-1:0] coarse, v_coarse;
  logic                v_valid;

  tdc_encoder #(.NTAPS(NTAPS), .CODE_W(CODE_W)) u_enc (
    .clk(clk_tdc), .rst_n, .taps, .code(enc_code));

  coarse_counter #(.COARSE_W(COARSE_W), .DELAY(5)) u_coarse (
    .clk(clk_tdc), .rst_n, .clear(!win_s2), .count(coarse));

  tdc_valid_logic #(.NTAPS(NTAPS), .CODE_W(CODE_W), .COARSE_W(COARSE_W)) u_valid (
    .clk(clk_tdc), .rst_n, .code_i(enc_code), .coarse_i(coarse),
    .valid_o(v_valid), .code_o(v_code), .coarse_o(v_coarse));

  logic cdc_full, cdc_ovf, cdc_empty;
  logic [COARSE_W+CODE_W-1:0] cdc_rdata;

  cdc_fifo #(.W(COARSE_W + CODE_W), .DEPTH(CDC_DEPTH)) u_cdc (
    .wclk(clk_tdc), .wrst_n(rst_n), .we(v_valid), .wdata({v_coarse, v_code}),
    .full(cdc_full), .overflow(cdc_ovf),
    .rclk(clk_sys), .rrst_n(rst_n), .re(!cdc_empty), .rdata(cdc_rdata), .empty(cdc_empty));

  // ---------------- system domain ----------------
  logic [COARSE_W-1:0] s_coarse;
  logic [CODE_W-1:0]   s_code;
  assign {s_coarse, s_code} = cdc_rdata;

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      raw_valid <= 1'b0;
      raw_code  <= '0;
    end else begin
      raw_valid <= !cdc_empty;
      raw_code  <= s_code;
    end
  end

  logic                nl_valid;
  logic [FINE_W-1:0]   nl_fine;
  logic [COARSE_W-1:0] nl_coarse;

  nl_correction #(.CODE_W(CODE_W), .FINE_W(FINE_W), .TAG_W(COARSE_W)) u_nl (
    .clk(clk_sys), .rst_n, .lut_we, .lut_addr, .lut_wdata,
    .in_valid(!cdc_empty), .in_code(s_code), .in_tag(s_coarse),
    .out_valid(nl_valid), .out_fine(nl_fine), .out_tag(nl_coarse));

  logic [TS_W-1:0] ts_new;
  assign ts_new = {nl_coarse + 1'b1, {FINE_W{1'b0}}} - TS_W'(nl_fine);

  logic ts_full, ts_ovf;
  logic [$clog2(TS_DEPTH):0] ts_count;

  sync_fifo #(.W(TS_W), .DEPTH(TS_DEPTH)) u_agg (
    .clk(clk_sys), .rst_n, .flush, .push(nl_valid), .wdata(ts_new),
    .pop, .rdata(ts_data), .empty(ts_empty), .full(ts_full), .overflow(ts_ovf),
    .count(ts_count));

  // CDC overflow is a TDC-domain flag; it is sampled by a two-flop synchronizer.
  logic ovf_s1, ovf_s2;
  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      ovf_s1 <= 1'b0;
      ovf_s2 <= 1'b0;
    end else begin
      ovf_s1 <= cdc_ovf;
      ovf_s2 <= ovf_s1;
    end
  end
  assign overflow = ovf_s2 | ts_ovf;

endmodule
