# Segmented low-power bus for an 8-bit micro-controller

On a precharged (dynamic) bus every transfer first charges the whole bus and
then lets the sender discharge it. When the bus spans the whole chip, its wire
capacitance is a large part of the chip's power. This design splits the
internal 8-bit bus of an 8051-class micro-controller into a tree of short
**bus segments**. Neighbouring segments are joined by **bus segmentation cells
(BSCs)**, which are pass switches. For each transfer, only the BSCs on the tree
path from sender to receiver conduct. Every other segment stays isolated and
does not switch. Blocks that talk to each other often are placed on the same
segment or on neighbouring ones, so most transfers switch only one or two
segments.

The scheme follows the segmented-bus method of W.-B. Jone, J. S. Wang, H.-I. Lu,
I. P. Hsu and J.-Y. Chen, "Design Theory and Implementation for Low-Power
Segmented Bus Systems" (ACM TODAES, 2003). That paper chooses the tree with a
Gomory-Hu cut tree of the measured communication frequencies, then merges
segments where that saves power. It applies the method to an 80C51-compatible
controller. This repository holds RTL for that controller's segmented-bus
datapath: the bus, its BSC control, its timing, and the bus devices. The
instruction decoder is not included (see "What is not here").

## The bus tree

```
  PORT0 --BSC0--+                                          +--BSC6-- IR
  PORT1 --BSC1--+                                          |
  PORT2 --BSC2--+-- ALU seg --BSC4-- RAM seg --BSC5-- ROM seg
  PORT3 --BSC3--+  ACC B TMP1 ALU    RAM  RAR          ROM |
                                                           +--BSC7-- PC (PCL, PCH)
```

There are nine segments and eight BSCs. The ALU segment is the root of the
tree. The port segments of PORT0, PORT1 and PORT2 are called IB10, IB11 and
IB12. A transfer switches `n` segments, where `n` is one more than the number
of conducting BSCs. The published cost of one transfer is `k1*(n-1) + k2`
capacitance units. For example, ACC to RAM needs only BSC4, and all other BSCs
stay off. A ROM to IR opcode fetch needs only BSC6.

The tree is held in `sbus_pkg`:

- `BSC_CHILD` / `BSC_PARENT` give the two segments joined by each BSC.
- `EP_SEG` gives the segment of each endpoint.

`path_mask(a, b)` returns the BSCs between two segments. It is the XOR of
the two segments' paths to the root, and those paths are computed once at
elaboration. To build a different tree, edit these three tables. `seg_bus`
accepts any tree with `NSEG` segments and `NBSC = NSEG-1` BSCs.

**Bus endpoints.** Each register that can send or receive on the bus is one
endpoint (`ep_e`):

| endpoint | block | direction |
|---|---|---|
| `EP_P0`..`EP_P3` | `io_port` | write: output latch; read: pins |
| `EP_ACC`, `EP_B` | `alu_block` | both |
| `EP_TMP1` | `alu_block` | receive (second ALU operand) |
| `EP_ALU` | `alu_block` | send (ALU result of `op(ACC, TMP1)`) |
| `EP_RAR` | `data_ram` | receive (RAM address) |
| `EP_RAM` | `data_ram` | both (word at RAR) |
| `EP_ROM` | `prog_rom` | send (byte at PC; the PC then advances) |
| `EP_IR` | `ir_reg` | receive |
| `EP_PCH`, `EP_PCL` | `pc_unit` | both; receiving PCL completes a jump |

## How one transfer happens

Timing (`timing_gen`):

- An instruction takes 1, 2 or 4 machine cycles.
- A machine cycle has six stages, S1 to S6.
- A stage has two phases, with one clock per phase. A machine cycle is
  therefore 12 clocks. The published chip runs at 25 MHz.

Phase 1 of each stage is the **precharge** phase. Each segment has its own
precharge device, so every segment charges high and all BSCs are off. Phase 2
is the **evaluation** phase, and at most one transfer takes place in it:

1. The decoder presents `xfer = {valid, src, dst, alu_op}`.
2. `bsc_ctrl` turns on the BSCs on the path from `src` to `dst`.
3. The sender enables its pull-down, called Control, on its own segment. Each
   data bit that is 1 discharges its bus line. This is the DataOut input of
   the pull-down pair.
4. `seg_bus` spreads each discharge across the conducting BSCs. A receiver
   reads the complement of its segment's level, so the data arrives true.
5. The receiver latches at the clock edge that ends the evaluation phase.

A bit that has been discharged stays low until the next precharge, as on a real
dynamic bus. If a receiver's segment is not joined to the sender, `xfer_err`
is set and an assertion fires.

`seg_active` marks the segments switched in the current evaluation phase. Its
population count is the `n` of the cost formula. The testbenches add it up to
compare the activity of different control schemes and of an unsegmented bus.

## BSC control: two schemes

`bsc_ctrl` produces the BSC signals in two ways:

- **Per stage (the default).** The BSCs follow instruction, machine cycle,
  stage and phase through the transfer of the current stage. Only the path
  needed in that evaluation phase conducts.
- **Rarely used instructions (`rare = 1`).** The published design also offers
  leaving stage and phase out of the BSC logic for instructions that are
  rarely used, which it defines as below 1% static utilization. This makes the
  control logic smaller. In exchange, it switches segments that a given stage
  does not need. Here the decoder lists the endpoints that such an instruction
  touches in `rare_eps`. The BSCs of the smallest subtree that joins them then
  conduct for the whole instruction, in both phases. The path of the current
  stage is ORed in, so a transfer missing from the list still arrives.

Which instructions count as rare is the decoder's choice.

## The decoder interface

The instruction decoder and sequencer of the 80C51 are outside `sbus_mcu_top`.
Its connections are the top's ports:

| port | dir | meaning |
|---|---|---|
| `xfer` | in | transfer of the current stage (`xfer_t`) |
| `len_ld`, `len` | in | instruction length (`LEN1/LEN2/LEN4`), loaded once while in the first machine cycle |
| `rare`, `rare_eps` | in | rarely used instruction, and the endpoints it touches |
| `ir`, `ir_fresh` | out | opcode, and a flag in the clock after a new opcode arrived |
| `rar` | out | RAM address register, for decoding special-register addresses |
| `acc_zero`, `cy` | out | flags for branch decisions |
| `stage`, `eval`, `mcycle`, `instr_start`, `instr_last` | out | timing |

Every instruction must start with the opcode fetch ROM to IR in S1 of its first
machine cycle. The decoder can load the length from the next clock on; until
then the instruction counts as one cycle long.

`tb/uc_decoder_model.sv` is a behavioural decoder for eight 8051 instructions:
`MOV A,#d`, `MOV dir,A`, `MOV A,dir`, `XRL A,#d`, `XRL A,dir`, `INC A`,
`MUL AB` and `LJMP`. Its header gives the transfer schedule of each one. It
shows how a full decoder drives the interface.

## Blocks

| file | block |
|---|---|
| `rtl/sbus_pkg.sv` | widths, enums, `xfer_t`, bus tree, path computation |
| `rtl/sbus_mcu_top.sv` | top: wires timing, BSC control, bus and devices |
| `rtl/seg_bus.sv` | segments, precharge, BSC switching, `seg_active` |
| `rtl/bsc_ctrl.sv` | BSC signals, per-stage and rare-instruction schemes |
| `rtl/timing_gen.sv` | stages, phases, machine cycles, 1/2/4-cycle instructions |
| `rtl/alu_block.sv` | ACC, B, TMP1, ALU (ADD SUB AND OR XOR INC DEC CPL PASS MUL), carry |
| `rtl/data_ram.sv` | 128 x 8 data RAM with RAR |
| `rtl/prog_rom.sv` | 2K x 8 program ROM, loaded from a hex file |
| `rtl/pc_unit.sv` | 16-bit PC; the high byte is staged so a jump loads atomically |
| `rtl/ir_reg.sv` | instruction register |
| `rtl/io_port.sv` | one 8-bit port; the latch resets to FFh and a read returns the pins |
| `rtl/ap1_memtest.hex` | default ROM content: a short RAM test program |

The default ROM content is an example program written for this design in 8051
encoding. It is not one of the programs measured in the paper, which are not
published. It writes three RAM words, reads them back and XORs them with the
expected values, writing 00h to P1 for each good word. It then uses a port
read, `MUL AB` and all four ports. Finally it writes A5h to P1 and loops on a
jump to itself.

## What follows the paper and what is this design's own

These parts follow the paper:

- the bus tree and its BSC numbering;
- the device set;
- the 8-bit width;
- the 128 x 8 RAM and the 2K x 8 ROM;
- 1/2/4-cycle instructions, six stages and two phases;
- precharge and evaluation, with sender Control/DataOut pull-downs and a
  receiver latch;
- both BSC control schemes.

These are this design's own choices:

- one clock per phase, with phase 1 as precharge;
- one transfer per stage;
- bit polarity: DataOut 1 discharges the line, and the receiver inverts;
- the split into endpoints and all encodings;
- the ALU operation set and the carry flag;
- TMP2 folded into the ALU input (ACC feeds the ALU directly);
- the PC advancing on each ROM read, and the staged PCH;
- the length-load handshake;
- the subtree rule for rare instructions.

A BSC is modelled as an ideal switch. Charge sharing, delay, and the sizing
and placement of the full-custom cells are not modelled. Those decide the
real power and speed.

## What is not here

- **Instruction decoder, controller, conditional branch logic.** The 80C51
  instruction set and its per-stage transfer schedule come from the 8051, and
  the paper does not give them. The paper's "unused instruction removal"
  variant is an optimisation of this decoder.
- **Timer/event counter and interrupt controller.** The timer appears in the
  paper's block diagram but on no bus segment. The paper left the interrupt
  controller out.
- **Bus-tree construction.** The Gomory-Hu cut tree and tree clustering are a
  design-time software step. Their result is the fixed tree in `sbus_pkg`.
- **BSC transistor cells, precharge transistors, pads.** These are analog or
  layout parts. Their logical effect is inside `seg_bus`.
- **Power numbers in mA.** These need a post-layout circuit simulation. The
  RTL reports switched segments instead.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | checks |
|---|---|
| `tb_seg_bus` | random BSC settings and senders, against a flood fill over the published tree; precharge; retention of discharged bits |
| `tb_bsc_ctrl` | every sender/receiver pair against a hand-written path table (ACC/RAM needs BSC4 only); rare-instruction subtrees |
| `tb_timing_gen` | stage, phase, cycle and start/last flags for 1/2/4-cycle instructions, and their 12/24/48 clocks |
| `tb_alu_block`, `tb_data_ram`, `tb_prog_rom`, `tb_pc_unit`, `tb_ir_reg`, `tb_io_port` | each device against a reference model |
| `tb_sbus_mcu_top` | end to end at default parameters, with the example program (details below) |
| `tb_ap1_workload` | a 128-word RAM test on two copies of the datapath (details below) |
| `tb_seg_bus_fig2` | `seg_bus` on another tree (details below) |

`tb_sbus_mcu_top` checks:

- the port and RAM results and the clock of the done mark;
- that every transfer uses exactly its path's BSCs;
- that every BSC, both control schemes, and 1-, 2- and 4-cycle instructions
  each occur.

With the example program, the segmented bus switches 22% of the segment
capacitance that a single bus would.

`tb_ap1_workload` runs the RAM test on every word, from `tb/ap1_full_ramtest.hex`.
One copy uses per-stage BSC control and the other uses the rare-instruction
scheme. The two copies must give the same results. The test compares their
switched segments with each other and with a single bus.

`tb_seg_bus_fig2` gives `seg_bus` the paper's seven-device example tree
through its parameters. It sends transfers in proportion to that example's
communication weights. It then checks that the sum of `n-1` over all transfers
equals the tree's linear-arrangement cost of 6.7 (scaled by ten). This is the
quantity the tree construction minimises.

Run one testbench with plain Verilator from the repository root. The ROM file
paths are relative to it.

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
          --top-module tb_sbus_mcu_top rtl/sbus_pkg.sv tb/tb_sbus_mcu_top.sv
./obj_dir/Vtb_sbus_mcu_top
```

Replace the two `tb_sbus_mcu_top` names to run another testbench. All of them
finish in well under a second.
