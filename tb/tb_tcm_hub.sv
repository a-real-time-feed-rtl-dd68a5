// tb_tcm_hub: host commands, phase frames and branch frames go in; the
// broadcast one clock later is compared with the expected command. Failure
// frames must give BC_ENTANGLE 49 times and BC_INIT (with reinit) on the 50th
// consecutive failure; a success clears the count; host commands hold off
// frames through frame_ready.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_tcm_hub;
  import ff_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, host_reset = 0, host_trigger = 0, frame_valid = 0, frame_ready, reinit;
  fb_frame_t frame_i = '0;
  bcast_t bcast;
  logic [7:0] attempts;
  always #2 clk = ~clk;

  tcm_hub #(.MAX_ATTEMPTS(50)) dut (.clk, .rst_n, .host_reset, .host_trigger, .frame_valid,
    .frame_i, .frame_ready, .bcast, .attempts, .reinit);

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  task automatic send(fb_frame_t f);
    @(negedge clk); frame_valid = 1; frame_i = f;
    @(negedge clk); frame_valid = 0;
  endtask
  function automatic fb_frame_t fr(frame_kind_e k, bit ok, int ch, int pl);
    fb_frame_t f = '0;
    f.kind = k; f.success = ok; f.chan = CHAN_W'(ch); f.payload = 16'(pl);
    return f;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) host_reset = 1;
    #0.1 `CHECK(!frame_ready, "frames held off during a host command")
    @(negedge clk) host_reset = 0;
    `CHECK(bcast.valid && bcast.kind == BC_INIT, "host reset -> BC_INIT")
    @(negedge clk);
    `CHECK(!bcast.valid, "broadcast lasts one clock")
    @(negedge clk) host_trigger = 1;
    @(negedge clk) host_trigger = 0;
    `CHECK(bcast.valid && bcast.kind == BC_TRIGGER, "host trigger -> BC_TRIGGER")
    // phase frame
    send(fr(FR_PHASE, 0, 5, 16'h8000));
    `CHECK(bcast.valid && bcast.kind == BC_PHASE && bcast.chan == 5 && bcast.data == 16'h8000, "phase frame re-broadcast")
    // failures
    for (int round = 0; round < 2; round++) begin
      for (int i = 1; i <= 50; i++) begin
        send(fr(FR_BRANCH, 0, 0, 0));
        if (i < 50) begin
          `CHECK(bcast.valid && bcast.kind == BC_ENTANGLE && !reinit, "failure -> BC_ENTANGLE")
          `CHECK(attempts == 8'(i), "attempt count")
        end else begin
          `CHECK(bcast.valid && bcast.kind == BC_INIT && reinit, "50th failure -> BC_INIT")
          `CHECK(attempts == 0, "count cleared on re-init")
        end
      end
    end
    // success clears the count and broadcasts the trigger with the jump offset
    repeat (7) send(fr(FR_BRANCH, 0, 0, 0));
    `CHECK(attempts == 7, "seven failures counted")
    send(fr(FR_BRANCH, 1, 0, 16'h0123));
    `CHECK(bcast.valid && bcast.kind == BC_TRIGGER && bcast.data == 16'h0123, "success -> global trigger with jump offset")
    `CHECK(attempts == 0, "success clears the count")
    `REPORT
  end
endmodule
