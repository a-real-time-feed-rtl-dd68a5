// coarse_counter: synchronous coarse-time counter of a TDC channel.
//
// Counts TDC clock periods (2 ns at 500 MHz) from the opening of the
// measurement window: it is held at zero while `clear` is high (window closed)
// and increments once per clock while it is low. The value is delayed by DELAY
// clocks so that it lines up with the raw code of the taps sampled on the same
// clock edge, which leaves the encoder DELAY clocks later. The timestamp is
// then coarse * 2 ns minus the calibrated fine time.
//
// The source gives a synchronous coarse counter whose value is combined with
// the fine time; counting in the TDC clock domain, clearing at window start and
// the alignment delay are this design's choices.
`timescale 1ns / 1ps
module coarse_counter #(
  parameter int COARSE_W = 20,
  parameter int DELAY    = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  output logic [COARSE_W-1:0] count
);
  logic [COARSE_W-1:0] cnt;
  logic [COARSE_W-1:0] dly [DELAY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DELAY; i++) dly[i] <= '0;
    end else begin
      cnt <= clear ? '0 : cnt + 1'b1;
      // dly[0] holds the count present at the last capture edge
      dly[0] <= cnt;
      for (int i = 1; i < DELAY; i++) dly[i] <= dly[i-1];
    end
  end
  assign count = dly[DELAY-1];
endmodule
