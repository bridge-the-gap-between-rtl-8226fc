# Unified quantum control processor

Quantum computers are built from very different qubit technologies.
Superconducting qubits are driven by microwave pulses. Neutral atoms must first be imaged,
detected and rearranged by optical tweezers. Trapped ions need yet other hardware.
Each technology usually gets its own control stack, which makes it hard to attach
them to one HPC system.

This design is a single control processor that serves several technologies.
Most of it is shared:
- a hybrid classical/quantum instruction set;
- a classical control unit;
- a timed quantum operation pipeline with per-qubit output channels;
- measurement feedback;
- an onboard histogram that reduces thousands of shots to their most frequent outcomes.

A *switch control* register selects the technology and enables that technology's
special hardware. The neutral-atom special hardware is included: image
acquisition, atom detection, atom sorting and tweezer movements, running from a
camera pixel stream to AWG commands.

The processor is written in synthesizable SystemVerilog (IEEE 1800-2017). It
builds in Verilator and in yosys with the slang front end. The default
configuration has 96 qubit channels.

## Contents

- [Block structure](#block-structure)
- [Instruction set and encoding](#instruction-set-and-encoding)
- [Timing model: how operations reach the qubits on time](#timing-model-how-operations-reach-the-qubits-on-time)
- [Qubit addressing: S and T registers](#qubit-addressing-s-and-t-registers)
- [Measurement, feedforward and the histogram](#measurement-feedforward-and-the-histogram)
- [Neutral-atom chain](#neutral-atom-chain)
- [Top-level interface](#top-level-interface)
- [Parameters](#parameters)
- [Simulating](#simulating)
- [Relation to the reference architecture, and limits](#relation-to-the-reference-architecture-and-limits)

## Block structure

```
 host (processing system)
   | program, gate table, mode, start          ^ done/END, data memory, histogram results
   v                                           |
 instr_mem --> instr_dispatcher --+--> classical_core (ALU, CMP/BR/FBR, LD/ST, FMR)
                                  |          ^ FMR result / pending
                                  v          |
                          quantum_control:   |
                            quantum_decoder -+-> time_manager (now, issue_time)
                              |  |  |        +-> gate_op_lut (op -> kind, codewords)
                              |  |  |        +-> offset_control -> qreg_file (S/T regs)
                              |  |  |                              -> qreg_decoder x2
                              |  |  +-> op buffer 1 / op buffer 2 (sync_fifo)
                              |  |          -> qop_dispatcher -> channel_ctrl x NQ -> mc_valid/mc_cw (DACs)
                              |  +-> qmeas_reg <------------------------------------- ro_valid/ro_result (ADCs)
                              +-> histogram (SRA / FHR) -> result memory -> host
                              +-> switch_control -> na_special_hw:
                                   image_acquisition -> atom_detection -> atom_sorting -> atom_movements -> AWG
```

| File | Role |
|---|---|
| `rtl/uqcp_pkg.sv` | Constants, opcodes, flags, gate-table entry type, modes |
| `rtl/uqcp_top.sv` | Top level: wires everything together and holds the status counters |
| `rtl/instr_mem.sv` | Program memory, 1024 x 32-bit words, written by the host |
| `rtl/instr_dispatcher.sv` | Fetch, long-instruction assembly, classical/quantum split, END handling |
| `rtl/classical_core.sv` | Classical instructions, 32 x 32-bit registers, data memory, FMR stall |
| `rtl/quantum_control.sv` | The quantum path: decoder, timeline, tables, registers, buffers, channels |
| `rtl/quantum_decoder.sv` | Decodes all quantum instructions and decides when each can be accepted |
| `rtl/time_manager.sv` | Real-time counter `now` and program timing point `issue_time` |
| `rtl/gate_op_lut.sv` | 256-entry table mapping an operation code to kind and micro-codes |
| `rtl/offset_control.sv` | Sliding-mask and offset arithmetic for SMSO(L)/SITO(L) |
| `rtl/qreg_file.sv` | 16 single-qubit mask registers S and 16 pair registers T |
| `rtl/qreg_decoder.sv` | S/T register to source and target qubit masks |
| `rtl/sync_fifo.sv` | First-word-fall-through FIFO (operation buffers, channel FIFOs) |
| `rtl/qop_dispatcher.sv` | Timestamp-ordered merge of the two op buffers into the channels |
| `rtl/channel_ctrl.sv` | Per-qubit FIFO plus time control: releases micro-codes on time |
| `rtl/qmeas_reg.sv` | Latest result and pending flag per qubit |
| `rtl/histogram.sv` | State counting over shots, top-M dump into a result memory |
| `rtl/switch_control.sv` | Modality register (superconducting, neutral atom, trapped ion) |
| `rtl/na_special_hw.sv` | Neutral-atom chain wrapper |
| `rtl/image_acquisition.sv` | Frame store for one camera image |
| `rtl/atom_detection.sv` | Region-sum threshold: occupancy map |
| `rtl/atom_sorting.sv` | Row-compaction rearrangement planner |
| `rtl/atom_movements.sv` | Pick / step / drop tweezer command generator |

## Instruction set and encoding

The instruction set has two lengths:
- **standard** instructions are 32 bits;
- **long** instructions are 128 bits: one opcode word followed by three 32-bit payload words.

The instruction list is given below. All bit positions are this design's own
choice; `rtl/uqcp_pkg.sv` is the reference, and `tb/uqcp_asm_pkg.sv` has encoder
functions for each instruction.

| Class | Instructions |
|---|---|
| Classical control | `CMP Rs,Rt` (sets 8 flags: always, never, eq, ne, lt, ge, ltu, geu), `BR flag,off`, `J off`, `END` |
| Data transfer | `FBR flag,Rd`, `LD`/`ST Rd, off(Rs)`, `LDI Rd,imm`, `FMR Rd,Qi` |
| ALU | `AND OR XOR ADD SUB Rd,Rs,Rt` |
| Quantum timing | `QWAIT imm`, `QWAITR Rs` |
| Quantum bundle | `[PI,] op0 reg0 [, op1 reg1]`: up to two operations |
| Target registers | `SMSO Sd,off,list` (15-bit list), `SMSOL` (96-bit list, long), `SITO Td,off,src,tgt`, `SITOL` (up to 7 pairs, long), `QSET reg,bit,val` |
| Histogram | `SRA`, `FHR Rt` |
| Neutral atoms | `IIF` (image fetch), `IAD` (detect), `IAS` (sort), `IAM` (move) |

Word 0 layout:

```
bundle : [31:29]=111  [28:26] PI  [25:18] op0  [17:13] reg0  [12:5] op1  [4:0] reg1
         reg field: bit 4 = 1 selects T register, bits 3:0 the index
other  : [31:26] opcode, rd [25:21], rs [20:16], rt [15:11]
```

Every opcode from 0x10 upward is quantum, and so are all bundles. The
dispatcher sends these to the quantum decoder and all others to the classical
core. Branch and jump offsets are in words and relative to the branch
instruction itself.

Instruction timing:
- When nothing stalls, a standard instruction takes two cycles: a fetch cycle and an issue cycle.
- A long instruction takes five cycles.
- `END` waits until every queued operation has left its channel, and until the histogram and the neutral-atom units are idle. It then raises `done` and pulses `end_pulse`.

## Timing model: how operations reach the qubits on time

This is the central idea of the quantum path. It separates *when the program
runs* from *when the qubits see the operations*.

`time_manager` keeps two 32-bit counters:

- `now`: real time. `start` clears it, and it then increments every cycle.
- `issue_time`: the point in time the program has reached.
  - `QWAIT n` / `QWAITR Rs` add to it.
  - A bundle with pre-interval `PI` adds PI and takes the result as its timestamp.

A bundle therefore does not execute when it is decoded. The decoder does three
things:
1. It looks up each operation in the gate table. An entry gives the kind (single-qubit, two-qubit or measurement) and one or two 8-bit micro-codes.
2. It expands the target register into qubit masks.
3. It writes `{timestamp, codewords, masks}` into *op buffer 1* (slot 0) or *op buffer 2* (slot 1).

`qop_dispatcher` merges the two buffers in timestamp order. Each operation
lands in the FIFO of every qubit it touches. Two rules apply when the timestamps
are equal:
- If the two heads touch disjoint qubits, both go out in the same cycle.
- If they touch the same qubit, that is a **conflict**. Buffer 1 goes first and the other follows one cycle later; the top counts this in `cnt_conflict`.

An entry leaves only when every FIFO it writes has room. A full channel
therefore stalls the merge (**backpressure**, counted in `cnt_stall`). The
operation buffers then fill up, and the decoder stops accepting bundles.

Each `channel_ctrl` compares its FIFO head with `now`. In the first cycle in
which `now >= timestamp`, it pops the entry and drives `mc_valid`/`mc_cw` for one
cycle. The output is registered, so the micro-code appears on the pins at cycle
`timestamp + 1` after start. Releases are therefore spaced exactly as
programmed, as long as the program keeps ahead of the timeline.

If the program falls behind, the entry is already overdue when it reaches the
head. It is then released at once with `late`, which is counted in `cnt_late`.
Long classical stretches, or an `FMR` waiting for a measurement, cause this. The
fix is a larger `QWAIT` after the measurement.

The comparison uses the signed difference `now - timestamp`, so the timeline may
wrap around.

## Qubit addressing: S and T registers

Gates do not carry qubit numbers. They name a register:

- **S registers** (16, NQ bits each) hold a mask for single-qubit operations and measurements.
  - `SMSO` takes a 15-bit list and shifts it left by a 7-bit offset: a *sliding mask* over the qubit array.
  - `SMSOL` takes a 96-bit list from its payload.
- **T registers** (16) hold up to seven (source, target) pairs for two-qubit gates, each with a valid bit.
  - `SITO` writes one pair, with 7-bit relative source and target fields, so one pair can span the whole array.
  - `SITOL` writes up to seven pairs. Pair k sits in payload bits `[12k+11:12k]` as `{src[5:0], tgt[5:0]}` (6-bit relative indices), and the pair count is in word 0 bits `[14:12]`.
  - Indices are relative to the offset, so the absolute qubit is `offset + rel`.
  - A pair whose qubits fall outside NQ, or whose source equals its target, is stored as invalid.
- **`QSET`** sets or clears one bit:
  - for an S register, the mask bit of a qubit;
  - for a T register, the valid bit of a pair.

  This allows cheap small edits of a large register.

Kind checks:
- A two-qubit gate applied to an S register is dropped, and so is a single-qubit gate applied to a T register.
- A dropped operation pulses `illegal`, counted in `cnt_illegal`.
- A two-qubit gate sends `cw_a` to every source qubit and `cw_b` to every target qubit.

## Measurement, feedforward and the histogram

A measurement operation marks its qubits *pending* in `qmeas_reg` when it is
decoded. A result on `ro_valid[q]`/`ro_result[q]` stores the bit and clears the
pending flag.

- **`FMR Rd, Qi`** stalls the instruction stream while qubit i is pending. This is classical feedforward: a program can measure, `FMR`, `BR` on the value and conditionally apply a correction. The top counts stall cycles in `cnt_fmr_wait`.
- **`SRA`** waits until no measurement is pending. It then hands the full NQ-bit result vector to the histogram as one shot.
- **The histogram** has 16 bins, each holding a state and a 16-bit saturating count.
  - A shot increments the bin that holds its state, or claims a free bin.
  - When all bins are taken, new states are counted in `hist_overflow`.
- **`FHR Rt`** writes the top M = 4 bins, highest count first, into the result memory at entries `Rt, Rt+1, ...`, one per cycle.
  - Each entry is `{count[15:0], state[NQ-1:0]}`; a zero count marks an empty slot.
  - Ties go to the lower bin number.
  - The host reads the entries with `res_raddr`/`res_rdata`, and clears the histogram with `hist_clear`.

The point of the histogram is that the host receives M entries instead of one
vector per shot.

## Neutral-atom chain

The processing system first selects `MODE_NA` (`mode_we`/`mode_wdata`).
`switch_control` then turns each of the four neutral-atom instructions into a
start pulse for its unit. In any other mode the instruction is refused and
counted in `cnt_blocked`.

The decoder holds back a following neutral-atom instruction while any unit is
busy, so a program can simply issue `IIF; IAD; IAS; IAM`.

1. **IIF: image acquisition.** The unit arms itself. On `cam_frame_start` it stores the next 32 x 32 pixels (8 bits each) from `cam_pix_valid`/`cam_pix_data`.
2. **IAD: atom detection.**
   - The frame is split into 8 x 8 trap sites of 4 x 4 pixels.
   - The unit sums each region, one pixel per cycle, and marks a site occupied when the sum is at least `na_threshold`.
   - A full scan takes `8*8*16 + 1` cycles. The result, `na_occ`, is the binarized image.
3. **IAS: atom sorting.**
   - The unit scans the occupancy map one site per cycle (65 cycles).
   - It compacts each row to the left and emits a move `(row, from, to)` for each atom that is not already in place.
   - `na_sorted` is the resulting map. `na_success` is high when every row fills the 4 target columns.
4. **IAM: atom movements.**
   - For each move the unit emits a pick (`awg_on=1` at the source), one command per column step, and a drop (`awg_on=0` at the destination).
   - Commands go out on `awg_valid`/`awg_row`/`awg_col`, STEP_CYCLES = 4 cycles apart.
   - A move of d columns takes `(d+2)*4` cycles.

Moves in a row go left to right, and only leftward. A move therefore never passes
over an atom that has not yet been moved.

## Top-level interface

Module `uqcp_top` has a single clock `clk` and an active-low synchronous reset
`rst_n`.

**Loading and control (host)**
- `imem_we/waddr/wdata`: write the program.
- `lut_we/waddr/wdata`: fill the gate table. An entry is `{kind, cw_a, cw_b}`.
- `mode_we/mode_wdata`: select the modality. `mode` shows the current one.
- `start`: a one-cycle pulse. It clears the timeline, buffers, channels and pending flags, then runs from address 0.
- `running`, `done` and `end_pulse` report progress.

**Results**
- `dmem_raddr/dmem_rdata`: the classical data memory, written by `ST`.
- `res_raddr/res_rdata`, `hist_shots`, `hist_overflow`, `hist_clear`: the histogram.

**Qubit side**
- `mc_valid[NQ]`, `mc_cw[NQ]`: an 8-bit micro-code per qubit, to the pulse generators.
- `ro_valid[NQ]`, `ro_result[NQ]`: measurement results from the readout.

**Neutral atoms**
- `na_threshold`: the detection threshold.
- `cam_frame_start`, `cam_pix_valid`, `cam_pix_data`: the camera pixel stream.
- `awg_valid`, `awg_row`, `awg_col`, `awg_on`: the tweezer commands.
- `na_occ`, `na_sorted`, `na_success`: the detection and sorting results.

**Status**

`cnt_illegal`, `cnt_conflict`, `cnt_stall`, `cnt_late`, `cnt_fmr_wait` and
`cnt_blocked` are 16-bit saturating counters, cleared only by reset.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `NQ` | 96 | Qubit channels (largest configuration of the reference hardware) |
| `IMEM_WORDS` | 1024 | Program words (4 KiB) |
| `DMEM_WORDS` | 256 | Classical data memory words |
| `OB_DEPTH` | 8 | Depth of each operation buffer |
| `CH_DEPTH` | 4 | Depth of each per-qubit channel FIFO |
| `HIST_BINS` / `HIST_TOP_M` / `RES_ENTRIES` | 16 / 4 / 16 | Histogram bins, entries per FHR, result memory size |
| `SITES_X`, `SITES_Y`, `ROI` | 8, 8, 4 | Trap array and pixels per site side (frame = 32 x 32) |
| `TARGET_COLS` | 4 | Columns of the defect-free target |
| `STEP_CYCLES` | 4 | Cycles between tweezer commands |

Only `NQ = 96` is a number from the reference hardware. The other sizes are
this design's own choices.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.
`tb/uqcp_asm_pkg.sv` is a small assembler (encoder functions) that the
processor-level tests use.

The full-system test is `tb_uqcp_top`. It runs the top at its default
parameters and covers the following:
- Bell-state shots (H, CNOT, measure both qubits) with a readout model, including a feedforward `FMR`/`BR` that conditionally applies an X gate.
- The histogram, with the top-M results checked.
- `SMSOL`, `SITOL` and `QSET`.
- A same-qubit conflict, an illegal operation, a late release and backpressure stalls.
- A refused neutral-atom command.
- A complete neutral-atom run: a frame, then detection, sorting and the AWG command stream, all checked against a model.

It counts how often each of these mechanisms occurs and fails if one never
occurs.

`tb_uqcp_workloads` runs the two benchmark circuit families on the same
full-size top:
- **Synthetic layered circuits.** Layers of H, X, Y/Z and neighbour CNOTs, repeated five times, at 10 %, 50 % and 100 % gate density.
- **The Grover operator.** H and X layers around a chain of CNOTs, all targeting qubit 0.

Each family runs at 8, 16, 32, 64 and 96 qubits. The testbench builds each
program together with a timing model. It then checks every micro-code for
qubit, codeword and exact release cycle, checks that nothing is released late,
and checks the histogram result after a two-shot loop. It prints the program
size of each circuit:

| Circuit | 8 | 16 | 32 | 64 | 96 qubits |
|---|---|---|---|---|---|
| Grover operator | 168 B | 244 B | 372 B | 628 B | 884 B |
| Synthetic, 50 % density | 296 B | 308 B | 348 B | 396 B | 412 B |

These sizes are for this design's own encoding and include the shot loop.

With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/uqcp_pkg.sv tb/uqcp_asm_pkg.sv $(ls rtl/*.sv | grep -v uqcp_pkg) \
  tb/tb_uqcp_top.sv --top-module tb_uqcp_top -o sim
./obj_dir/sim
```

Replace `tb_uqcp_top` with any other testbench name to test one block. Keep the
package files first on the command line.

The testbenches use only `$urandom`, so a two-state simulator with random
initial values is fine. Everything that is read is reset.

## Relation to the reference architecture, and limits

What follows the reference architecture:
- the set of blocks and how they connect;
- the instruction names and their meaning;
- the two instruction lengths;
- the two-operation bundle with a pre-interval;
- the seven-pair long T register;
- the histogram instructions;
- the four neutral-atom commands;
- switch control;
- 96 qubits as the largest configuration.

This design's own choices:
- all binary encodings;
- the two-counter timing scheme;
- the merge rule and its conflict handling;
- the FIFO depths;
- the histogram organisation;
- every neutral-atom algorithm and size.

Known departures and gaps:

- **Classical core.** The reference places a small RISC-V core here. This design
  instead executes the listed classical instructions (CMP, BR, FBR, LD/ST, FMR,
  ALU, J, END, plus LDI), one per cycle, in its own encoding. RISC-V code does not
  run on it. `LD`/`ST` move whole 32-bit words only; there are no byte or halfword
  forms.
- **Where the offset is applied.** The reference block diagram places offset
  control between the register file and the register decoder. This design
  applies the offset when a register is written and stores absolute masks and
  indices. Read-out is then a plain decode, and the result is the same.
- **Binary format.** Programs produced by the reference tool flow use a different
  binary format. They would need re-encoding for this processor.
- **Trapped ions.** `MODE_TI` can be selected, but no trapped-ion hardware is
  built. Its function is not specified.
- **Outside the chip.** The DACs/AWGs, the readout ADCs and discrimination, the
  camera interface and the host CPU are not part of the RTL. They appear as the
  ports listed above.
- **Histogram capacity.** The histogram holds 16 distinct states. Experiments with
  more distinct outcomes lose the excess, which `hist_overflow` reports.
- **Benchmarks at 100 qubits.** Circuits evaluated at 100 qubits need a build with
  `NQ >= 100`; the default of 96 channels is too small for them. Their programs
  (up to about 1 KB) fit in the 4 KiB instruction memory. The 7-bit offset shifts
  both the short and the long qubit lists, so the encoding itself can address up
  to qubit 127.
- **Timing of classical work.** Classical instructions do not advance the quantum
  timeline. A program that spends longer in classical code than its `QWAIT`
  allows gets late releases rather than a stalled timeline.
