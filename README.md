# Real-time phase feedforward for heralded entanglement

In a heralded entanglement experiment two remote qubits are entangled when a
single photon from either of them is detected behind a beam splitter. The
entangled state carries a relative phase `Φ(t0) = Δω·t0 + Φ0` that depends on
the random detection time `t0`, where `Δω` is the frequency difference between
the two emitters. Averaged over many shots that phase washes out the coherence.
To get a fixed Bell state, the phase must be undone on every shot: timestamp
the photon to a few picoseconds, compute `Φff = −Δω·t0 − Φ0`, and load it into
the DDS that drives the next qubit operation. All of this must happen well
within the qubit coherence time, and with a latency that does not vary from
shot to shot. A latency that varies adds its own phase error, `Δω·δT`.

This repository holds SystemVerilog for the digital part of such a system.
The design follows a published FPGA control platform: a TTL board with a
carry-chain TDC, a trigger-and-clock module (TCM), and DDS boards. Every
decision is taken in hardware, and the host computer is not in the loop
during a shot. For a 1.203 GHz frequency difference (a Ba⁺/Rb pair), a Bell
fidelity of 0.95 needs a timing error below about 59 ps.

## The three boards and what flows between them

```
            host (configuration only)
               |  register writes, host_reset / host_trigger
               v
  hit[3:0] ┌──────────────────── TTL board ─────────────────────┐
 ─────────►│ tdc_carry_chain ─► tdc_channel ×4 ─► ttl_sequencer  │
           │                                   │  ▲              │
           │                                   ▼  │ done         │
           │                              ucode_engine           │
           │                                   │ result          │
           │                              feedback_if ───────────┼──► frames
           └─────────────────────────────────────────────────────┘      │
                                                                        ▼
                                           TCM: tcm_hub (retry counter, broadcast)
                                                                        │
                                    broadcast (every board, same clock) │
           ┌──────────── DDS board ─────────────┐                       │
           │ dds_channel #0, dds_channel #1 ... │◄──────────────────────┤
           └────────────────────────────────────┘   (also back to the TTL board)
```

`system_top` contains all three boards in one module. They share the TCM clock
(`clk_sys`, 250 MHz). The TDC front ends run on `clk_tdc` (500 MHz), which is
phase-aligned with it. The board-to-board links are modelled as single-clock
parallel buses:

* **TTL → TCM frame** (`ff_pkg::fb_frame_t`, 32 bits, valid/ready). An
  `FR_PHASE` frame carries a 6-bit DDS channel ID and a 16-bit phase word. An
  `FR_BRANCH` frame carries success/failure and a 16-bit jump offset.
* **TCM → all broadcast** (`ff_pkg::bcast_t`, valid for one clock). The four
  commands are `BC_INIT`, `BC_ENTANGLE`, `BC_PHASE` (channel, phase) and
  `BC_TRIGGER` (jump offset). Every board acts on a command in the same clock,
  which keeps the boards in step.

## One shot

1. `host_reset` makes the TCM broadcast `BC_INIT`. The TTL board flushes its
   timestamp FIFOs and keeps the TDC windows closed. Each DDS channel reloads
   its initial phase and restarts its accumulator, so channels start in phase.
2. The entanglement sequence runs for `ent_len` clocks. The detection window
   then opens for `win_len` clocks. During the window the carry chains are
   enabled (`tdc_rst_n` high) and the coarse counters run.
3. **Photon.** When a channel selected by `herald_mask` has a timestamp, the
   window closes. The timestamps of the masked channels are copied into
   engine registers R0..R3, and the microcode routine (`ucode_start`,
   `ucode_count`) runs. The feedback interface then sends the `FR_PHASE`
   frame, taken from engine register `result_reg` for DDS channel
   `target_chan`, followed by an `FR_BRANCH` success frame. The TCM
   re-broadcasts the phase, and on the success frame it broadcasts the global
   trigger. The DDS channel with the matching ID loads the phase when it sees
   that trigger. The TTL board leaves its pause state and finishes the shot
   (`shot_done`).
4. **No photon.** `drain_len` clocks after the window closes, the TTL board
   reports a failure. The TCM counts consecutive failures. It answers with
   `BC_ENTANGLE` (try again) until the 50th failure in a row, and then sends
   `BC_INIT`, which restarts from initialisation.

The drain period after the window covers hits still travelling through the
TDC pipeline. A photon that arrives in it is still accepted.

## The timestamp path (`tdc_channel`)

This is the part that sets the precision.

**Delay line.** The photon pulse enters a chain of carry cells, 400 taps on
the FPGA's CARRY8 primitives, at about 5.1 ps per tap. The first cell takes
the pulse only while `tdc_rst_n` is high, so the running sequence decides when
hits can be seen. `tdc_carry_chain` is a behavioural model of this chain with
deliberately unequal tap delays. It is the only non-synthesizable module.

**Encoder.** Every 2 ns the 400 taps are captured and registered once more.
`tdc_encoder` splits them into 100 groups of 4. Each group's number of ones
comes from a 4-input lookup, and three registered adder stages sum the groups
(10 adders, then 2, then 1). The result is the raw code: the number of taps the
edge has passed at the sampling edge. A ones count tolerates bubbles in the
sampled pattern. Latency: 5 TDC clocks.

**Valid rule.** A pulse is seen in several samples: first partly, then as a
full chain, then as a draining chain. `tdc_valid_logic` accepts only a sample
whose code is non-zero and below 400, and whose previous code was zero.

**Coarse + fine.** `coarse_counter` counts 2 ns periods from the TDC edge at
which the window opened. It is delayed by 5 clocks so that it lines up with
the code from the same sampling edge. `{coarse, code}` crosses into the
250 MHz domain through `cdc_fifo`, an asynchronous FIFO with Gray-coded
pointers. From there it goes to two places:

* the host, as the `raw_valid`/`raw_code` stream, for calibration;
* `nl_correction`, a 512-entry table that turns the raw code into a fine time
  `fine` in units of 2 ns / 4096 (0.488 ps).

The timestamp is

```
ts = (coarse + 1) * 4096 - fine        (32 bits, unit 2 ns / 4096)
```

It is the photon time after the window-opening clock edge. The fine time is
measured back from the sampling edge, hence the subtraction. The timestamp is
pushed into a 16-entry aggregation FIFO (`sync_fifo`).

**Calibration.** The carry cells are unequal, so the raw code is not linear in
time. The host gathers a code-density histogram `n[c]` of uniformly random
hits from the raw stream and writes

```
fine(c) = 4096 * (n[0] + ... + n[c-1] + n[c]/2) / (n[0] + ... + n[N-1])
```

into the table: the centre of code `c`'s time bin. Until it is written the
table holds the linear map `fine(c) = c·2674/256` (5.102 ps per code).

The table carries no absolute offset: the delay before the first tap is not
in the histogram. It is the same in every channel, so it cancels in a time
difference. A single timestamp is therefore off by a fixed amount of a few
picoseconds.

## The phase calculation (`ucode_engine`)

The controller does not multiply. The phase is computed by a small
programmable engine that the host loads before a run:

* register file R0..R15 (32 bits). R0..R3 are filled with the TDC timestamps
  of channels 0..3; R4..R15 are general registers that the host may preload
  with constants;
* four operations: `ADD`, `SUB`, `MUL` (low 32 bits) and `SHIFT`;
* instruction word `[31:28] op | [27:24] rd | [23:20] rs1 | [19:16] rs2 | [15:0] imm`.
  For `SHIFT`, `imm[15]=1` shifts right arithmetically and `imm[15]=0` shifts
  left, by `imm[5:0]` bits;
* a run executes `count` instructions from `start_addr`, two clocks each;
  `done` comes 2N+1 clocks after `start`, independent of the data.

Phase is fixed-point in turns, so wrap-around in 32-bit arithmetic is exactly
modulo 360°. With the timestamp unit `u = 2 ns/4096`, a constant
`K = Δf · u · 2^32` turns a timestamp into phase in 2^-32 turns. For
Δf = 1.203 GHz, `K = 2,522,800`. The feedforward `−Δω·t0 − Φ0` is then:

```
MUL   R5, R0, R9        ; R5 = t0 * K
SUB   R6, R10, R5       ; R6 = C - t0*K      (C = -Φ0 in 2^-32 turns)
SHIFT R8, R6, >>>16     ; phase word in R8[15:0] (2^16 = 360°)
```

The feedback interface sends the low 16 bits of `result_reg` as the phase
word. With K = 0 and C = 0x8000_0000 the same program gives a constant 180°
shift. The same form covers a Ramsey correction `φ2 = δ·τ̂(Δt) + φcal + c`.

## The DDS channel (`dds_channel`)

Each channel has a fixed ID. It holds a `BC_PHASE` addressed to that ID as
pending, and on the next `BC_TRIGGER` it copies the pending value into its
16-bit phase-offset register and pulses `updated`. Phases for other IDs are
ignored. The received value replaces the offset rather than adding to it,
because the computed feedforward phase is absolute. The output side is a
basic NCO: a 32-bit accumulator stepped by the tuning word
(`f = ftw/2^32 · 250 MHz`), plus the offset, and a 1024 × 12-bit sine table
built at elaboration. The DAC and analog stage are not part of this RTL.

## Host register map (`system_top`)

| `host_addr[15:12]` | target | index |
|---|---|---|
| 0 | sequence configuration: 0 init_len, 1 ent_len, 2 win_len, 3 drain_len, 4 cont_len, 5 ucode_start, 6 ucode_count, 7 result_reg, 8 target_chan, 9 jump_offset, 10 herald_mask | `[3:0]` |
| 1 | instruction RAM (256 words) | `[7:0]` |
| 2 | engine register | `[3:0]` |
| 3–6 | calibration table of TDC channel 0–3 | `[8:0]` (code) |
| 8 | DDS channel `[7:4]`: `[0]=0` tuning word, `[0]=1` initial phase | |

The lengths are in 250 MHz clocks. The host link itself (PXIe/PCIe with an
XDMA-style decoder) is outside this RTL: the top exposes a plain write bus.

## Timing

Measured in simulation at the default size, with the 3-instruction program
above:

* photon edge → DDS phase-register update: **86–89 ns**. The 3 ns spread is
  only where the photon falls within a 4 ns clock period; the path itself is
  a fixed number of clocks. The published system measures about 800 ns from
  trigger to analog DDS output, which also includes the DDS device, the DAC
  and the cabling.
* timestamp error against the true photon time, with a calibrated table:
  at most 4.4 ps. This number comes from the delay-line model, not from
  silicon.
* engine: 2N+1 clocks for N instructions. TCM: one clock from frame to
  broadcast.

## What follows the published design and what is this design's own

Taken from the published design:

* the board partitioning and the TCM-centred broadcast of phase, trigger and
  branch;
* the TDC chain: carry-chain delay line gated by the sequence, 500 MHz
  sampling, group encoders summed in three adder stages, valid-edge check,
  CDC FIFO to 250 MHz, host code-density calibration loaded into a
  correction table, and coarse counter plus aggregation FIFO;
* the engine: 16-register file with the TDC results in the low registers,
  ADD/SUB/MUL/SHIFT, and start address plus count;
* the feedback interface: result retrieval, phase + channel-ID frames, and
  arbitration with the branch message;
* the retry limit of 50 and the DDS channel-ID matching.

Chosen here, because the published description does not give them:

* all widths and encodings: timestamp format and unit, instruction word,
  frames, broadcast, 16-bit phase;
* the valid-edge rule, the FIFO depths and the second capture register;
* the ones-count encoding and the adder fan-ins;
* two clocks per instruction;
* the phase-before-branch ordering;
* applying the phase on the global trigger;
* the DDS NCO details;
* the register map.

The 50-attempt rule is read as "re-initialise after the 50th consecutive
failure". A figure of the published design writes the test as "> 50".

Departures and parts not built:

* **Sequence controller.** The TTL board's controller is an embedded RISC-V
  core running compiled sequences. Here its control flow is a state machine
  with configuration registers (`ttl_sequencer`). Arbitrary sequence programs
  and the "jump offset" as a real program-counter jump are not modelled. The
  jump offset is carried to all boards and exposed on `dds_jump`.
* **Not built.** The 32 TTL outputs and their I/O control, the comparators,
  the clock fan-out, the PCIe link, the host, and the DDS board's waveform
  engine beyond the phase path and a basic NCO.
* **Carry chain.** The chain is a model. On the FPGA it must be placed as
  CARRY8 cells, and the sampling flip-flops must sit next to the chain.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. It ends by
printing `TB_RESULT checks=N failures=M`. The shared macros are in
`tb/tb_check.svh`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ff_pkg.sv tb/tb_system_top.sv --top-module tb_system_top -o sim
./obj_dir/sim
```

Substitute any other testbench name. `tb_system_top` runs the whole system at
its default parameters: 4 channels, 400 taps, 2 DDS channels, retry limit 50.
It covers a 180° demonstration, 12 shots of timestamp-dependent feedforward
with latency measurement, a run of 50 failed attempts ending in
re-initialisation, and host triggers. It takes about a minute, most of it
compile time. `tb_tdc_channel` checks calibrated timestamps against the true
photon time. `tb_ucode_engine` compares random microcode programs with a
reference model. `tb_cable_delay` runs the full calibration procedure on two
channels:
1. It splits one pulse into two, the second copy delayed by 3.217 ns.
2. It sweeps 2000 pulses in 1 ps phase steps across the sampling period.
3. It builds both tables from the raw-stream histograms, using the formula
   above.
4. It measures 400 further pulse pairs.

The measured difference averages 3217.0 ps, with a spread of 2.6 ps RMS. The
spread is small because the chain model has no jitter. It takes about 2.5
minutes.

All modules take `timescale 1ns/1ps`. The carry-chain model needs
picosecond delays.

## Files

* `rtl/ff_pkg.sv`: shared widths, instruction, frame and broadcast types.
* TDC: `tdc_carry_chain`, `tdc_encoder`, `tdc_valid_logic`,
  `coarse_counter`, `cdc_fifo`, `nl_correction`, `sync_fifo`, `tdc_channel`.
* Feedforward engine: `ttl_sequencer`, `ucode_engine`, `feedback_if`.
* TCM: `tcm_hub`.
* DDS: `dds_channel`.
* Top: `system_top`.
