// ucode_engine: microcode arithmetic engine of the feedforward path.
//
// The phase calculation is not run on the sequence controller; it is a short
// program of microcode instructions, written by the host into the instruction
// RAM, that this engine executes on request. The register file has 16 words:
// R0..R3 receive the timestamps of TDC channels 0..3 (loaded by the sequence
// controller through ts_we/ts_idx), R4..R15 are general registers that the
// host may preload with constants (frequency difference, offsets) and that
// the program uses for intermediate values and the result. The arithmetic
// unit does ADD, SUB, MUL (low 32 bits of the product) and SHIFT.
//
// Instruction word (ff_pkg::uinstr_t, 32 bits):
//   [31:28] op  [27:24] rd  [23:20] rs1  [19:16] rs2  [15:0] imm
//   SHIFT: imm[15] = 1 shifts right arithmetically, 0 shifts left,
//          by imm[5:0] bits.
//
// Operation: start with start_addr = i and count = N runs the N instructions
// at i .. i+N-1 in order. Each instruction takes two clocks (instruction RAM
// read, then execute and write back), so a program of N instructions raises
// `done` (one-clock pulse) exactly 2N+1 clocks after start: a fixed latency
// independent of the data. `busy` is high in between. The result is read
// combinationally through rd_addr/rd_data by the feedback interface.
//
// Register-file layout, the four operations and start-address/count control
// follow the source; the instruction encoding, the timing and the host
// register preload are this design's choices. Host writes to the register
// file and instruction RAM are meant for idle time; a host register write
// during a run is ignored.
`timescale 1ns / 1ps
module ucode_engine
  import ff_pkg::*;
#(
  parameter int IRAM_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host: instruction RAM and general registers
  input  logic                          iram_we,
  input  logic [$clog2(IRAM_DEPTH)-1:0] iram_addr,
  input  logic [31:0]                   iram_wdata,
  input  logic                          reg_we,
  input  logic [REG_AW-1:0]             reg_waddr,
  input  logic [DATA_W-1:0]             reg_wdata,
  // timestamp load from the TDC channels
  input  logic                          ts_we,
  input  logic [1:0]                    ts_idx,
  input  logic [DATA_W-1:0]             ts_data,
  // run control
  input  logic                          start,
  input  logic [$clog2(IRAM_DEPTH)-1:0] start_addr,
  input  logic [$clog2(IRAM_DEPTH):0]   count,
  output logic                          busy,
  output logic                          done,
  // result read
  input  logic [REG_AW-1:0]             rd_addr,
  output logic [DATA_W-1:0]             rd_data
);
  localparam int AW = $clog2(IRAM_DEPTH);

  logic [31:0]       iram [IRAM_DEPTH];
  logic [DATA_W-1:0] rf   [NREGS];

  typedef enum logic [1:0] {E_IDLE, E_FETCH, E_EXEC} estate_e;
  estate_e             st;
  logic [AW-1:0]       pc;
  logic [AW:0]         left;
  uinstr_t             ir;

  always_ff @(posedge clk) begin
    if (iram_we) iram[iram_addr] <= iram_wdata;
    if (st == E_FETCH) ir <= uinstr_t'(iram[pc]);
  end

  // arithmetic unit
  logic [DATA_W-1:0] a, b, res;
  assign a = rf[ir.rs1];
  assign b = rf[ir.rs2];
  always_comb begin
    unique case (ir.op)
      OP_ADD:   res = a + b;
      OP_SUB:   res = a - b;
      OP_MUL:   res = a * b;
      OP_SHIFT: res = ir.imm[15] ? DATA_W'($signed(a) >>> ir.imm[5:0])
                                 : (a << ir.imm[5:0]);
      default:  res = a;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= E_IDLE;
      pc   <= '0;
      left <= '0;
      done <= 1'b0;
      for (int r = 0; r < NREGS; r++) rf[r] <= '0;
    end else begin
      done <= 1'b0;
      if (ts_we) rf[REG_AW'(ts_idx)] <= ts_data;
      unique case (st)
        E_IDLE: begin
          if (reg_we) rf[reg_waddr] <= reg_wdata;
          if (start) begin
            pc   <= start_addr;
            left <= count;
            if (count == '0) done <= 1'b1;
            else             st   <= E_FETCH;
          end
        end
        E_FETCH: st <= E_EXEC;
        E_EXEC: begin
          rf[ir.rd] <= res;
          pc   <= pc + 1'b1;
          left <= left - 1'b1;
          if (left == (AW+1)'(1)) begin
            st   <= E_IDLE;
            done <= 1'b1;
          end else begin
            st <= E_FETCH;
          end
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  assign busy    = (st != E_IDLE);
  assign rd_data = rf[rd_addr];

endmodule
