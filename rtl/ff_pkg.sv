// ff_pkg: types and constants shared by the feedforward system.
//
// The system timestamps a heralding photon with a carry-chain TDC, turns the
// timestamp into a DDS phase word with a small microcode engine, and sends the
// phase to the DDS boards through the trigger-and-clock hub (TCM). This package
// holds the formats that cross block boundaries: timestamp widths, microcode
// instruction fields, the TTL-to-TCM feedback frame and the TCM broadcast.
// All encodings here are this design's own choices; the source describes the
// contents of the messages (phase + channel ID, branch/jump offset) but not
// their bit layout.
`timescale 1ns / 1ps
package ff_pkg;

  // ---------------- timestamps ----------------
  // Fine time is expressed in 1/4096 of a 2 ns TDC clock period (~0.488 ps).
  localparam int unsigned FINE_W    = 12;
  localparam int unsigned COARSE_W  = 20;            // 2 ns units, ~2 ms range
  localparam int unsigned TS_W      = 32;            // timestamp word
  localparam int unsigned CODE_W    = 9;             // raw TDC code (0..NTAPS)

  // ---------------- microcode engine ----------------
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned NREGS     = 16;            // R0..R15
  localparam int unsigned REG_AW    = 4;
  localparam int unsigned NTS_REGS  = 4;             // R0..R3 hold TDC0..TDC3

  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,   // rd = rs1 + rs2
    OP_SUB   = 4'd1,   // rd = rs1 - rs2
    OP_MUL   = 4'd2,   // rd = low DATA_W bits of rs1 * rs2
    OP_SHIFT = 4'd3    // rd = imm[15] ? rs1 >>> imm[5:0] : rs1 << imm[5:0]
  } uop_e;

  typedef struct packed {
    uop_e              op;
    logic [REG_AW-1:0] rd;
    logic [REG_AW-1:0] rs1;
    logic [REG_AW-1:0] rs2;
    logic [15:0]       imm;
  } uinstr_t;                                       // 32 bits

  // ---------------- DDS phase ----------------
  localparam int unsigned PHASE_W   = 16;            // phase offset word
  localparam int unsigned CHAN_W    = 6;             // DDS channel identifier

  // ---------------- TTL -> TCM feedback frame ----------------
  typedef enum logic [1:0] {
    FR_PHASE  = 2'd1,  // phase correction for one DDS channel
    FR_BRANCH = 2'd2   // branch decision: success (with jump offset) or failure
  } frame_kind_e;

  typedef struct packed {
    frame_kind_e        kind;
    logic [CHAN_W-1:0]  chan;     // FR_PHASE: destination DDS channel
    logic               success;  // FR_BRANCH: 1 = photon heralded
    logic [6:0]         rsvd;
    logic [15:0]        payload;  // FR_PHASE: phase word, FR_BRANCH: jump offset
  } fb_frame_t;                                     // 32 bits

  // ---------------- TCM broadcast ----------------
  typedef enum logic [1:0] {
    BC_INIT     = 2'd0,  // (re)initialise: TDC/counter reset, DDS reload
    BC_ENTANGLE = 2'd1,  // start another entanglement attempt
    BC_PHASE    = 2'd2,  // phase word for channel `chan`
    BC_TRIGGER  = 2'd3   // global trigger, carries the jump offset
  } bcast_kind_e;

  typedef struct packed {
    logic               valid;
    bcast_kind_e        kind;
    logic [CHAN_W-1:0]  chan;
    logic [15:0]        data;
  } bcast_t;

endpackage
