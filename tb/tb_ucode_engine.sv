// tb_ucode_engine: random microcode programs of ADD, SUB, MUL and SHIFT over
// random register contents are run and compared, register by register, with
// a model written here. done must come exactly 2N+1 clocks after start for an
// N-instruction program. Also runs the phase program used in the system:
// phase = ((R1 - R0) * K + C) >> 16.
`timescale 1ns / 1ps
`include "tb_check.svh"
module tb_ucode_engine;
  import ff_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic iram_we = 0, reg_we = 0, ts_we = 0, start = 0, busy, done;
  logic [7:0] iram_addr = '0, start_addr = '0;
  logic [31:0] iram_wdata = '0, reg_wdata = '0, ts_data = '0, rd_data;
  logic [3:0] reg_waddr = '0, rd_addr = '0;
  logic [1:0] ts_idx = '0;
  logic [8:0] count = '0;
  always #2 clk = ~clk;

  ucode_engine dut (.clk, .rst_n, .iram_we, .iram_addr, .iram_wdata, .reg_we, .reg_waddr,
    .reg_wdata, .ts_we, .ts_idx, .ts_data, .start, .start_addr, .count, .busy, .done,
    .rd_addr, .rd_data);

  logic [31:0] m_rf [16];

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog"); failures++;
    `REPORT
  end

  function automatic logic [31:0] enc(uop_e op, int rd, int rs1, int rs2, int imm);
    uinstr_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.imm = 16'(imm);
    return 32'(i);
  endfunction

  task automatic wr_instr(int a, logic [31:0] w);
    @(negedge clk); iram_we = 1; iram_addr = 8'(a); iram_wdata = w;
    @(negedge clk); iram_we = 0;
  endtask
  task automatic wr_reg(int r, logic [31:0] v);
    @(negedge clk); reg_we = 1; reg_waddr = 4'(r); reg_wdata = v;
    @(negedge clk); reg_we = 0;
    m_rf[r] = v;
  endtask
  task automatic ld_ts(int c, logic [31:0] v);
    @(negedge clk); ts_we = 1; ts_idx = 2'(c); ts_data = v;
    @(negedge clk); ts_we = 0;
    m_rf[c] = v;
  endtask
  task automatic run(int a, int n);
    int cyc = 0;
    @(negedge clk); start = 1; start_addr = 8'(a); count = 9'(n);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    // done is high in the clock period 2N+1 periods after the one holding start
    `CHECK(cyc == 2 * n + 1, "fixed latency 2N+1 clocks")
    @(negedge clk);
    `CHECK(!busy, "idle after done")
  endtask
  function automatic logic [31:0] exec(logic [31:0] w, logic [31:0] a, logic [31:0] b);
    uinstr_t i = uinstr_t'(w);
    case (i.op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_MUL: return 32'(longint'(a) * longint'(b));
      OP_SHIFT: return i.imm[15] ? 32'($signed(a) >>> i.imm[5:0]) : a << i.imm[5:0];
      default: return a;
    endcase
  endfunction

  initial begin
    logic [31:0] prog [256];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 16; r++) m_rf[r] = 0;
    for (int t = 0; t < 40; t++) begin
      automatic int n = $urandom_range(12, 1);
      automatic int a = $urandom_range(200, 0);
      for (int r = 0; r < 16; r++) if (r < 4) ld_ts(r, $urandom); else wr_reg(r, $urandom);
      for (int k = 0; k < n; k++) begin
        automatic uop_e op = uop_e'($urandom_range(3, 0));
        automatic int imm = (op == OP_SHIFT) ? (($urandom_range(1, 0) << 15) | $urandom_range(31, 0)) : $urandom;
        prog[k] = enc(op, $urandom_range(15, 4), $urandom_range(15, 0), $urandom_range(15, 0), imm);
        wr_instr(a + k, prog[k]);
      end
      run(a, n);
      for (int k = 0; k < n; k++) begin
        automatic uinstr_t i = uinstr_t'(prog[k]);
        m_rf[i.rd] = exec(prog[k], m_rf[i.rs1], m_rf[i.rs2]);
      end
      for (int r = 0; r < 16; r++) begin
        @(negedge clk) rd_addr = 4'(r);
        #0.1 `CHECK(rd_data == m_rf[r], "register file after program")
      end
    end
    // phase program at address 240: R5 = R1 - R0; R6 = R5 * R4; R6 = R6 + R7; R8 = R6 >>> 16
    wr_instr(240, enc(OP_SUB, 5, 1, 0, 0));
    wr_instr(241, enc(OP_MUL, 6, 5, 4, 0));
    wr_instr(242, enc(OP_ADD, 6, 6, 7, 0));
    wr_instr(243, enc(OP_SHIFT, 8, 6, 0, 16'h8010));
    ld_ts(0, 32'd1000); ld_ts(1, 32'd5096);
    wr_reg(4, 32'd1048576);       // K: 2^20 per unit
    wr_reg(7, 32'h4000_0000);     // C: 90 degrees
    run(240, 4);
    @(negedge clk) rd_addr = 4'd8;
    #0.1 `CHECK(rd_data[15:0] == 16'(((32'd4096 * 32'd1048576) + 32'h4000_0000) >> 16), "phase program result")
    `REPORT
  end
endmodule
