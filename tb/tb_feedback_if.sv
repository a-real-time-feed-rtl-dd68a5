// tb_feedback_if: a send_phase request must yield an FR_PHASE frame (low 16
// bits of the selected result register, target channel) followed by an
// FR_BRANCH success frame with the jump offset; send_fail yields one failure
// frame. Frames must stay stable while the receiver is not ready.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_feedback_if;
  import ff_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, send_phase = 0, send_fail = 0, busy, frame_valid, frame_ready = 1;
  logic [3:0] result_reg = '0, rd_addr;
  logic [5:0] target_chan = '0;
  logic [15:0] jump_offset = '0;
  logic [31:0] rd_data;
  fb_frame_t frame_o;
  logic [31:0] regs [16];
  always #2 clk = ~clk;
  assign rd_data = regs[rd_addr];

  feedback_if dut (.clk, .rst_n, .send_phase, .send_fail, .result_reg, .target_chan, .jump_offset,
    .rd_addr, .rd_data, .busy, .frame_valid, .frame_o, .frame_ready);

  fb_frame_t got[$];
  always @(posedge clk) if (frame_valid && frame_ready) got.push_back(frame_o);

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  initial begin
    for (int r = 0; r < 16; r++) regs[r] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic bit ok = $urandom_range(1, 0);
      automatic int r = $urandom_range(15, 4);
      automatic int ch = $urandom_range(63, 0);
      automatic int j = $urandom_range(65535, 0);
      got.delete();
      @(negedge clk);
      result_reg = 4'(r); target_chan = 6'(ch); jump_offset = 16'(j);
      if (ok) send_phase = 1; else send_fail = 1;
      @(negedge clk); send_phase = 0; send_fail = 0;
      // random back-pressure
      for (int c = 0; c < 12; c++) begin
        automatic fb_frame_t held = frame_o;
        automatic bit was;
        frame_ready = ($urandom_range(2, 0) != 0);
        was = frame_valid && !frame_ready;
        @(negedge clk);
        if (was) `CHECK(frame_valid && frame_o == held, "frame held while not ready")
      end
      frame_ready = 1;
      repeat (3) @(negedge clk);
      `CHECK(!busy, "idle after sending")
      if (ok) begin
        `CHECK(got.size() == 2, "two frames for a success")
        if (got.size() == 2) begin
          `CHECK(got[0].kind == FR_PHASE && got[0].chan == 6'(ch) && got[0].payload == regs[r][15:0], "phase frame contents")
          `CHECK(got[1].kind == FR_BRANCH && got[1].success && got[1].payload == 16'(j), "success branch frame")
        end
      end else begin
        `CHECK(got.size() == 1 && got[0].kind == FR_BRANCH && !got[0].success, "single failure frame")
      end
    end
    `REPORT
  end
endmodule
