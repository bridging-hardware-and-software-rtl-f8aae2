# Runtime-reconfigurable RISC-V ISA extensions with a hardware-managed software fallback

A small RISC-V microcontroller can get custom instructions whose hardware is not
always there. The accelerators are reconfigurable modules (RMs) that are loaded
into reconfigurable partitions (RPs) of an FPGA by dynamic partial
reconfiguration (DPR) while the program runs. The program is compiled once and
always uses the custom instruction. When the RM is in an RP, the instruction
runs in hardware (a *hit*). When it is not, the hardware catches the
instruction, runs a software function that computes the same result, and
retires the instruction with that result (a *miss*). The program sees the same
registers and the same control flow either way. It only runs slower.

Some accelerators keep internal state between calls, for example a cipher's
sponge state. That state moves with the accelerator. When an RM is removed, its
state is copied to an image in memory. The software fallback then works on that
image. When the RM is loaded again, the image is copied back into it.

This repository holds the static side of such a system in synthesizable
SystemVerilog: dispatch, the miss path, the command interface, RP bookkeeping,
the automatic reconfiguration policy, the state handover engine, the
AXI4-Lite memory system and two accelerators (ROL, a hardware loop, and
ASCON-128 encryption). The CPU core and the vendor DFX (partial
reconfiguration) controller are not included; they connect through ports.

## Instruction encoding

| opcode | use | funct3 | funct7 |
|---|---|---|---|
| custom-2 (`1011011`) | call an accelerator | RM identifier (8 RMs) | operation inside the RM |
| custom-3 (`1111011`) | command manager | unused | command code |

Both are R-type: two source registers and one destination register. In this
build, ROL is RM 4 and ASCON is RM 5 (`rtl/rrisax_pkg.sv`).

## The core interface (ISAX ports)

The core is expected to expose one port per custom opcode in its
operand-read stage (`isax_req_t` / `isax_rsp_t` in `rrisax_pkg`):

* The core drives `valid`, `instr`, `rs1`, `rs2` and `pc` while the
  instruction sits in that stage.
* The subsystem holds the instruction there by asserting `stall`.
* In the first cycle with `valid && !stall`, the instruction leaves the
  stage. In that same cycle the core captures:
  * `wr_rd`/`rd`, the register write-back;
  * `wr_pc`/`pc`, a PC redirect;
  * `flush`, which drops younger instructions and accompanies every PC write.

This is a simplified, single-stage view. A real core integration layer splits
these signals over pipeline stages. Reading operands in one stage and writing
results in a later one fits inside this view.

## The miss path, step by step

This is the least obvious part of the design. Three units take part:
`fallback_selector`, `sw_fallback_manager` and `command_manager`.

1. A custom-2 instruction arrives and no RP in state Present holds its RM.
   The fallback selector gives it to the software fallback manager.
2. The fallback manager stores `rs1`, `rs2`, the PC, `funct3` and `funct7`.
   In the same cycle it answers: no register write, PC = `0x18`, flush.
   The instruction leaves the pipeline. The core continues at the fallback
   stub at address `0x18`.
3. The stub saves the registers and calls a C function for the missing RM.
   That function reads the stored fields with custom-3 commands `FB_RMID`,
   `FB_RS1`, `FB_RS2`, `FB_PC` and `FB_FUNCT7`. It computes the result in
   software. A stateful RM's state comes from its memory image.
4. The function hands back its outputs:
   * `FB_SET_RES` sets the result.
   * `FB_SET_NPC` optionally sets the next PC, when the accelerator would
     have changed the control flow.
5. The stub restores the registers and issues `FB_RETURN`. The command
   manager answers with PC = the stored PC, plus a flush. The fallback
   manager switches to replay.
6. The core fetches the faulting custom-2 instruction again. This time the
   fallback manager answers it: rd = the stored result, and the PC override
   if one was set. The instruction retires like a hardware execution, and the
   fallback manager returns to idle.

While the fallback is active (between steps 2 and 6), a further custom-2
instruction is stalled. The RM being emulated is also *locked*: the partition
manager starts no state handover for it, because the software may be using
its image.

## Partitions and reconfiguration

The `partition_manager` keeps one state per RP:

| state | meaning |
|---|---|
| Present | the RP holds a usable RM; instructions hit |
| Cleanup | the RM's state is being saved to memory before eviction |
| Empty | nothing usable; ready for reconfiguration |
| Waiting | a reconfiguration is pending, but the DFX controller is busy with another RP |
| Trigger | the hardware trigger to the DFX controller is raised |
| Reconfig | DPR in progress (decouple high, then the RM reset pulse) |
| Prepare | the new RM's state is being loaded from memory |

Rules:

* The DFX controller reconfigures one RP at a time. When several RPs want it,
  the lowest-numbered one wins; the others wait.
* An RM sits in at most one RP. A request for an RM that is already hosted,
  or already on its way into an RP, is refused.
* A request is accepted only if the RM has a bitstream (`RM_AVAIL`) and the
  RP is Present or Empty with nothing pending.
* An eviction waits while the RP is executing an instruction.
* Cleanup and Prepare wait while the RM is locked by the fallback.
* Stateless RMs skip Cleanup and Prepare.

Requests come from the `DPR_REQ` command or from `auto_reconfig`. When enabled,
`auto_reconfig` reacts to each miss: it asks for the missing RM to be loaded
into the least recently used RP. A hit on an RP, or a reconfiguration accepted
for it, counts as a use. A request that is refused is dropped, and the next
miss asks again. Software can enable the policy and name the RP for the next
request (`AUTO_CFG`). Correctness never depends on the policy: a miss is always
served by the fallback at once, and DPR runs in the background.

`reconfigurable_partition` models an RP:

* It contains one instance of each RM design it can host, and activates only
  the one the partition manager reports as configured.
* While decouple is high, the RP takes no requests and drives zeros.
* The DFX controller's RM reset, which follows reconfiguration, resets the RMs.

## State handover and the valid-state rule

At any time exactly one copy of an RM's state is valid:

* the RM's registers, while the RM is in an RP;
* its image in the state RAM, while the RM is absent.

Only the fallback function touches the image, and only while the RM is absent.

`mem_handover_manager` moves the state over AXI4-Lite. Each RM has a word count
and a base address; word *i* lives at `base + 4*i`.

* **Cleanup** (RM to memory): for each word, the manager pulses `read` with
  `cnt = i` on the RM's handover port. It registers the word the RM drives,
  writes it to memory and waits for the write response.
* **Prepare** (memory to RM): for each word, the manager reads memory and
  pulses `write` with `cnt = i` and the data.

While a handover runs, custom-2 instructions for that RM stall (`ho_stall_o`).
Other RMs are not affected.

Default images:

| RM | words | base | layout |
|---|---|---|---|
| ROL | 2 | `0x1000_0000` | 0 counter, 1 loop-entry PC |
| ASCON | 16 | `0x1000_0040` | 0..9 x0..x4 (high word first), 10..13 key, 14 buffered ciphertext word, 15 flags (bit 0: domain separation done) |

## Command manager (custom-3)

Every command completes in one cycle. The codes are in `rrisax_pkg::cmd_e`.

| funct7 | name | action |
|---|---|---|
| 0x00-0x04 | FB_RMID, FB_RS1, FB_RS2, FB_PC, FB_FUNCT7 | rd = stored field of the last miss |
| 0x05 | FB_SET_NPC | PC override for the replay = rs1 |
| 0x06 | FB_SET_RES | replay result = rs1 |
| 0x07 | FB_RETURN | jump to the faulting instruction; fallback manager goes to replay |
| 0x10 | RP_STATUS | rd = {state, RM} of RP rs1 |
| 0x11 | DPR_REQ | load RM rs2 into RP rs1; rd = 1 if accepted |
| 0x12 | AUTO_CFG | rs1[0] = enable; rs1[1] = use rs2 as the next RP; rd = previous enable |
| 0x13 | FORCE_FB | rs1[7:0] = mask of RMs always sent to the fallback path |
| 0x14 / 0x15 | HO_SET_BASE / HO_SET_WORDS | image base / word count of RM rs1 = rs2 |
| 0x16 / 0x17 | HO_GET_BASE / HO_GET_WORDS | read them back |
| 0x18 / 0x19 | CNT_HIT / CNT_MISS | number of hits / misses |

## The accelerators

**ROL** (`rol_rm`) turns an incrementing for-loop into two instructions:

* `funct7 = 1`, init, placed before the body: counter = rs1; the loop entry
  is recorded as PC + 4; rd = rs1.
* `funct7 = 2`, step, placed after the body: counter += rs1; rd = counter.
  If counter < rs2 (unsigned), the PC jumps back to the loop entry.

Both complete in one cycle. The example start 2, step 2, bound 10, with
`result = 5` accumulated in the body, gives 25.

**ASCON** (`ascon_rm`, `ascon_round`) computes ASCON-128 authenticated
encryption through a series of calls. Two operands per call are one 64-bit
big-endian block:

| funct7 | step | cycles |
|---|---|---|
| 1, 2 | key high / low | 1 |
| 3 | nonce high | 1 |
| 4 | nonce low, initialisation p^12 | 14 |
| 5 | associated-data block, p^6 | 8 |
| 6 | plaintext block; rd = ciphertext high word (the low word is kept) | 1 |
| 7 | rd = kept low word; rs1[0] = last block; p^6 unless last | 8 (1 if last) |
| 8 | tag word rs1[1:0]; word 0 first runs the finalisation p^12 | 14 (1 for words 1-3) |

The permutation runs one round per cycle. Software pads the last plaintext
block.

## Memory system

`axi_lite_interconnect` is the hub of the microcontroller's bus. It has three
kinds of managers:

* the core's port(s);
* the handover manager;
* the DFX controller, which reads partial bitstreams.

Its subordinates:

| address | size | use |
|---|---|---|
| `0x0000_0000` | 32 kB | program and data (`axi_bram`) |
| `0x1000_0000` | 8 kB | RM state images (`axi_bram`) |
| `0x8000_0000` and up | - | external port `ext_axi_*`: DDR and SPI flash controllers (bitstreams), UART, GPIO |

Arbitration is round-robin, with one transaction in flight. An unmapped
address gets DECERR. `CPU_PORTS = 2` gives a core with separate instruction and
data ports. The external region is set by `EXT_BASE`/`EXT_MASK`.

In the original prototype, the bitstream of RM *k* (0-based) lies in DDR:

* for RP 0, at `0x8000_0000 + k*0x6_0000` (360,011 bytes);
* for RP 1, at `0x8030_0000 + k*0x6_0000` (359,203 bytes).

The testbench's DFX controller model uses these addresses.

## Where this departs from the original system

* The CPU core with its generated ISAX layer, the DFX controller, the ICAP,
  the DDR, SPI, UART and GPIO controllers, and the board's 7-segment display
  are not included. They connect through top ports: the ISAX and core bus
  ports; DFX trigger, decouple, reset and bus-manager ports; and one
  external subordinate port.
* An RP holds every RM design at once and enables one; on the FPGA the
  partition's logic is replaced. Resource use per RP is therefore not
  representative.
* The original system has up to eight RM bitstreams per RP. Only ROL and ASCON
  are designed here; the other RM identifiers have no bitstream
  (`RM_AVAIL = 8'b0011_0000`), and requests for them are refused.
* The original uses the AEAD-128 reference code. This ASCON RM implements
  ASCON-128 (IV `0x80400c0600000000`), which can be checked against the
  published test vector.
* The ISAX timing is the one-stage view described above, not the per-stage
  timing of a particular core.
* Command codes, RM identifier 5 for ASCON, state layouts, the address map,
  arbitration and all state-machine transition conditions are this design's
  own choices.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_rrisax_top` runs the whole subsystem at its default parameters. A task
  library plays the core and the fallback software; `dfx_ctrl_model` plays the
  DFX controller, with bitstream addresses and sizes of the original prototype.
  The model reads the first bitstream word through the interconnect, from an
  external memory model. To keep the run short, the rest of the streaming is
  sped up to 512 bytes per cycle. The test:
  * runs the ROL example and ASCON on 48 bytes, first fully in software and
    then in hardware, with cycle checks;
  * encrypts 124 bytes with the RM evicted in mid-message: Cleanup, fallback
    on the saved image, automatic reload into the other RP with a Waiting
    phase, Prepare, and hits again;
  * runs the ROL loop from 0 to 0x40 in hardware;
  * forces ROL to the fallback path;
  * compares the hit and miss counters.

  It counts every mechanism (hit, miss, replay, PC override from hardware and
  from software, multi-cycle stall, handover stall, Cleanup, Prepare, DPR,
  Waiting, automatic request, forced fallback, refused request, bitstream
  fetch) and fails if
  any of them never happened.
* `ascon_ref_pkg` is an independent table-driven ASCON model, used by the
  ASCON tests.

Simulate with Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/rrisax_pkg.sv tb/ascon_ref_pkg.sv rtl/*.sv tb/dfx_ctrl_model.sv tb/tb_rrisax_top.sv \
  --top-module tb_rrisax_top -o sim && ./obj_dir/sim
```

For a unit test, replace the testbench file and the `--top-module`; the
package files come first.
