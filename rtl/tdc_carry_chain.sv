// tdc_carry_chain: behavioural model of the FPGA carry-chain delay line.
//
// BEHAVIOURAL MODEL, not synthesizable logic. On the FPGA the delay line is a
// cascade of CARRY8 primitives (MUXCY cells); its timing comes from the silicon
// and cannot be written as RTL. This model reproduces what the encoder sees.
//
// The first stage multiplexes the input pulse with tdc_rst_n as select, so the
// chain is held at zero while tdc_rst_n is low and the input edge enters it only
// while the measurement window is open. Every following stage passes its
// neighbour's output on after one tap delay, as a transport delay, so a pulse
// shorter than the chain travels along it intact. taps[k] therefore rises k+1
// tap delays after the gated input rises. The chain starts empty (all zero) at
// time zero, as the real line is once its input has been low for 2 ns.
//
// Tap delays are unequal, as they are on silicon: tap k gets
// TAP_PS * (0.25 + 1.5 * f(k)), f(k) a fixed hash in [0,1), so the mean is
// TAP_PS and the code-density histogram is uneven. The mean bin of 5.102 ps
// follows the measured LSB of the source design; the tap count (400, just over
// the 2 ns sampling period / 5.102 ps = 392) and the delay spread are this
// model's choices.
//
// Interface: hit (pulse from the comparator), tdc_rst_n (window gate),
// taps[NTAPS-1:0] (unsampled chain outputs, sampled by tdc_encoder).
`timescale 1ns / 1ps
module tdc_carry_chain #(
  parameter int  NTAPS  = 400,
  parameter real TAP_PS = 5.102
) (
  input  logic             hit,
  input  logic             tdc_rst_n,
  output logic [NTAPS-1:0] taps
);

  // Delay of tap k in nanoseconds (hash-based spread, mean TAP_PS).
  function automatic real tap_delay_ns(int k);
    int unsigned h;
    h = (k + 1) * 32'd2654435761;
    h = h ^ (h >> 15);
    return TAP_PS * 1.0e-3 * (0.25 + 1.5 * real'(h % 1000) / 1000.0);
  endfunction

  logic             gated;
  logic [NTAPS-1:0] chain = '0;   // an empty chain at power-up
  assign gated = tdc_rst_n ? hit : 1'b0;
  assign taps  = chain;

  // each stage follows its input after its own delay (transport delay)
  localparam real D0 = tap_delay_ns(0);
  always @(gated) chain[0] <= #(D0) gated;
  for (genvar k = 1; k < NTAPS; k++) begin : g_tap
    localparam real DK = tap_delay_ns(k);
    always @(chain[k-1]) chain[k] <= #(DK) chain[k-1];
  end

endmodule
