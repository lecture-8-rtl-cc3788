# CPU183: a 12-bit, four-stage pipelined RISC microcontroller

CPU183 is a small teaching processor: 12-bit data words, eight
general-purpose registers, 16-bit three-operand instructions, register-indirect
loads and stores, and a four-stage pipeline (I, R, E, W) that completes one
instruction per clock with no stalls. It was defined for a university FPGA lab
(EE183, "Lab 3: pipelined processor") as the controller of a small
system-on-chip. It drives a VGA frame buffer through memory-mapped I/O and
paces itself with a free-running counter that it can test as a jump
condition. This repository holds synthesizable SystemVerilog for the core and
that system, with self-checking testbenches.

The instruction set, the four-stage split, the placement of the units in the
stages, forwarding, and the I/O scheme come from the lab definition. Encodings
it left open, reset, memory sizes and a few pipeline details are this
implementation's choices. They are listed in
[Where this implementation decides](#where-this-implementation-decides).

## Instruction set

Every instruction is 16 bits. Bits 15:14 select the format:

| 15:14 | class   | fields                                                        |
|-------|---------|---------------------------------------------------------------|
| `00`  | jump    | `[13:12]` OP, `[11:8]` COND, `[7:0]` absolute target          |
| `01`  | ALU     | `[13:11]` C, `[10:6]` OP, `[5:3]` A, `[2:0]` B                 |
| `10`  | literal | `[13:11]` C, `[10:0]` literal, zero-extended to 12 bits       |
| `11`  | memory  | as ALU; OP `08` = `LOAD C,A` (C = Mem[A]), OP `10` = `STORE A,B` (Mem[A] = B) |

**ALU operations** (OP in hex):

| OP    | operation     | OP | operation  | OP | operation  | OP | operation |
|-------|---------------|----|------------|----|------------|----|-----------|
| 00 | ADD  A+B         | 08 | LSL A      | 10 | ZEROS      | 18 | NOR       |
| 01 | ADDINC A+B+1     | 09 | ASR A      | 11 | AND        | 19 | XNOR      |
| 02 | PASSA A          |    |            | 12 | ANDNOTA A'B| 1A | PASSNOTA  |
| 03 | INCA A+1         |    |            | 13 | PASSB      | 1B | ORNOTA A'+B |
| 04 | SUBDEC A-B-1     |    |            | 14 | ANDNOTB AB'| 1C | PASSNOTB  |
| 05 | SUB A-B          |    |            | 15 | PASSA      | 1D | ORNOTB A+B' |
| 06 | DECA A-1         |    |            | 16 | XOR        | 1E | NAND      |
| 07 | PASSA A          |    |            | 17 | OR         | 1F | ONES      |

The table has more regularity than it first shows, and the ALU uses it:

* **00–07** are one adder, `A + Bsel + cin`. `op[0]` is the carry in and
  `op[2:1]` picks `Bsel` from B, 0, ~B or all ones (`arith_unit`).
* **08/09** shift by one bit. `op[0]` picks the direction (`shift_unit`).
  08/09 repeat through 0A–0F.
* **10–1F**: the low four opcode bits are the truth table of a two-input
  function, applied bit by bit: `y[i] = op[{~b[i], ~a[i]}]` (`boolean_unit`).

**Jumps.** OP `00` = JF (jump if the condition is false), `01` = JT (jump if
true), `10` = J (always). Conditions: `0000` TRUE, `0100` NEG, `0101` ZERO,
`0110` CARRY, `0111` NEG or ZERO, `1xxx` external condition `xxx` (`1000` =
`.EXT`). Only ALU instructions set the flags. NEG is result bit 11 and ZERO
means a zero result. CARRY is the adder's carry out (1 = no borrow on
subtraction), or the bit shifted out, or 0 after a Boolean operation. The NOP
is `0x0000`, which decodes as `JF.TRUE 0` and never jumps.

Example: `ADD R0,R0,R1` = `0x4001`, `DECA R1,R1` = `0x4988`,
`LOADLIT R1,16` = `0x8810`, `JF.NEGZERO 02` = `0x0702`. The package
`cpu183_pkg` has encoder functions (`enc_alu`, `enc_lit`, `enc_jmp`,
`enc_load`, `enc_store`) that the testbenches use in place of an assembler.

## The pipeline

```
         I            R                     E                          W
  PC --> IROM ==> CNTRL (decode, jump) ==> FWD muxes -> ALU  ==> result mux --> REG FILE write
   ^     (sync     REG FILE read            |       \            (ALU / literal /
   |      read)         |                   |        data memory  load data)
   +---- take/target ---+   <-- E-stage ALU flags   (addr=A, data=B)
```

`==>` marks a pipeline register. The instruction memory's own output register
is the I/R register, because a block RAM reads synchronously.

| stage | what happens (module)                                                                    |
|-------|------------------------------------------------------------------------------------------|
| I     | PC addresses the instruction memory (`pc_unit`, `irom`)                                   |
| R     | decode and jump resolution (`cntrl`); register file read of A and B (`regfile`)           |
| E     | operand forwarding (`fwd_unit`); ALU (`alu`); flags into the condition-code register; a LOAD/STORE presents address A and data B to the data memory |
| W     | pick ALU result, literal or load data; write register C at the end of the cycle           |

The first instruction after reset writes its result at the fourth clock edge.
After that, one instruction completes every clock.

### Forwarding

The register file is read in R and written at the end of W. An instruction in
E can therefore be missing two results: that of the instruction now in W
(not written yet) and that of the instruction that left W one cycle ago. That
value was written at the same clock edge at which the operands were latched,
and the register file has no write-through. Each E-stage operand has a
three-input mux: register-file value, W result, or previous write-back
(`p_data`). `fwd_unit` compares source register numbers with the two
destinations; the newer result wins. W's result is taken after the W-stage
result mux. A LOAD's data, which arrives from the synchronous RAM during W, is
therefore forwarded too, and a loaded value can be used by the very next
instruction. No data hazard needs a stall or a NOP.

### Jumps, the delay slot and the flag bypass

This is the least obvious part of the design.

* **Jumps resolve in R.** `cntrl` computes `take` and `target` from the
  instruction in R, and the PC loads the target at the end of that cycle. The
  target is fetched in the cycle after the jump is in R. For the sequence
  `ADD; JT.ZERO t; SUB; ...`, the instruction at `t` is fetched in cycle 4.
* **One delay slot (default, `DELAY_SLOT = 1`).** The instruction fetched
  while the jump is in R is the one right after the jump. It is already in
  the pipe and it executes, whether or not the jump is taken. Put a useful
  independent instruction or a NOP there.
* **Squash option (`DELAY_SLOT = 0`).** The instruction behind a *taken* jump
  becomes a bubble instead. This costs one cycle per taken jump and hides the
  slot from the programmer.
* **Flag bypass.** A conditional jump in R must test the flags of the
  instruction right before it, which is in E in that same cycle. The core
  therefore feeds `cntrl` the ALU's combinational flags when the E-stage
  instruction is an ALU instruction, and the condition-code register
  otherwise. A jump thus always sees the flags of the most recent earlier ALU
  instruction. `DECA R1,R1; JF.NEGZERO loop` works with no NOP in between.
  This path (ALU, then flags, then jump decision, then PC) is the longest
  path in the design.

The lab's assembled sample program ends its loop with
`JF.NEGZERO loop` followed directly by `JT.TRUE spin`. It behaves as a
summing loop only with `DELAY_SLOT = 0`. With the delay slot, the `JT.TRUE`
executes in the slot and the loop is left after one pass.
`tb/tb_sample_program.sv` runs it both ways and shows the two results. The
lab material's branch-timing example supports a delay slot, and its sample
program supports squashing. The default follows the timing example.

## Memory map and I/O

Data addresses are 12 bits (a register value). `mem_map` decodes them:

| address       | LOAD returns                   | STORE does                                   |
|---------------|--------------------------------|----------------------------------------------|
| `FFF`         | frame buffer word at the VGA address register | writes the frame buffer at the VGA address register |
| `FFE`         | the VGA address register       | sets the VGA address register                |
| `FFD`         | data memory (aliased)          | clears the free-running counter              |
| anything else | data memory, `addr[DAW-1:0]`   | data memory                                  |

Frame-buffer access is a two-step pattern: `STORE FFE, x` picks the location,
then `LOAD r, FFF` or `STORE FFF, r` reads or writes it. The frame buffer
belongs to a VGA display controller outside this design. The `vga_*` ports of
`cpu183_soc` connect to it and expect a synchronous RAM port with a one-clock
read latency.

`ext_counter` is a free-running 24-bit counter. Its bits `TAP..TAP+7` are the
eight external jump conditions, so `ext[0]` is counter bit 20 by default. At
25 MHz that bit toggles every 42 ms. A timing loop spins on it:

```
wait_hi:  JF.EXT wait_hi   ; (delay slot: NOP)
          ...              ; body
wait_lo:  JT.EXT wait_lo
```

A store to `FFD` restarts the count, so a program can align itself to the
counter.

## Files

| file (`rtl/`)      | contents                                                        |
|--------------------|-----------------------------------------------------------------|
| `cpu183_pkg.sv`    | widths, opcode/condition constants, `ctl_t` control word, `dreq_t` data request, instruction encoders |
| `arith_unit.sv`, `shift_unit.sv`, `boolean_unit.sv`, `alu.sv` | the ALU and its three units |
| `regfile.sv`       | 8 x 12 register file, 2 read ports, 1 write port                |
| `irom.sv`          | 256 x 16 instruction memory, synchronous read, program-load port, optional `$readmemh` file |
| `pc_unit.sv`       | program counter                                                 |
| `cntrl.sv`         | R-stage decoder and jump resolution                             |
| `fwd_unit.sv`      | forwarding selects                                              |
| `dram.sv`          | 256 x 12 data memory, synchronous read                          |
| `mem_map.sv`       | address decode, VGA address register, counter clear             |
| `ext_counter.sv`   | free-running counter for the external conditions                |
| `cpu183_core.sv`   | the pipeline                                                    |
| `cpu183_soc.sv`    | top level: core, memories, memory map, counter                  |

Top-level parameters (`cpu183_soc`): `DELAY_SLOT` (1), `DAW` data-memory
address bits (8), `CNT_W` counter width (24), `CNT_TAP` first counter bit used
(20). Programs are loaded through `prog_we/prog_addr/prog_data` while `rst`
is high. Alternatively, set `irom`'s `INIT_FILE` to a hex file with one 16-bit
word per line. `pc` and `wb_we/wb_wc/wb_data` (each register write) are
outputs for observation.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cpu183_pkg.sv tb/cpu183_ref_pkg.sv tb/tb_cpu183_soc.sv \
    --top-module tb_cpu183_soc -o sim && ./obj_dir/sim
```

Use the same command with another `tb_*.sv` and its name as top module.
`tb/cpu183_ref_pkg.sv` holds `cpu183_iss`, an instruction-level reference
model. It steps one instruction at a time in program order, applying the
delay-slot or squash rule. The core testbenches compare every register write
of the RTL against it, in value, order and clock cycle.

| testbench            | what it shows                                                                 |
|----------------------|-------------------------------------------------------------------------------|
| `tb_cpu183_soc`      | whole system at default parameters: address arithmetic, summing loop, data-memory store/load with use of the loaded value, frame-buffer write and read-back, counter clear and one EXT timing loop (2**21 cycles, about 1.5 s of simulation). It counts every mechanism (forwarding from W and from the previous write-back, taken and not-taken jumps, flag bypass, each kind of memory access, counter clear, EXT spin, literal) and fails if one never happens. |
| `tb_cpu183_core`     | summing loop, 4-stage latency, one instruction per clock; 40 random programs (ALU, literal, load, store, conditional jumps) against the reference model |
| `tb_sample_program`  | the lab's assembled sample program on a delay-slot core and a squashing core, then 30 random programs on both against the reference model |
| `tb_vga_square`      | the "flash a square" exercise: a program draws a 4 x 4 square through the frame-buffer port, waits one EXT period and redraws it inverted; checks every pixel write, the alternating colours and the pass spacing (counter tap lowered to bit 8) |
| `tb_alu`, `tb_arith_unit`, `tb_shift_unit`, `tb_boolean_unit` | every opcode against its table entry, with edge and random operands |
| `tb_cntrl`           | decode of the sample program's words; every jump OP x COND x flag combination |
| `tb_fwd_unit`        | all 2**14 input combinations                                                  |
| `tb_regfile`, `tb_irom`, `tb_dram`, `tb_pc_unit`, `tb_ext_counter`, `tb_mem_map` | each block against a shadow model |

## Where this implementation decides

* **Memory instruction class.** The lab's tables give LOAD and STORE the
  opcodes 08 and 10, the same as LSL and ZEROS, and show the ALU's `01`
  prefix. The two cannot share a class, so memory instructions use prefix
  `11`. Code assembled for a different split needs re-encoding.
* **Delay slot** by default, with squashing as a parameter (see above).
* **Flag bypass to R** and the **three forwarding sources** are one reading of
  a block diagram that shows the units and muxes but not every wire.
* **Literal** is zero-extended (values 0..2047). The older 8-bit literal
  format (bits 10:8 zero) is a subset of this one.
* **Unlisted encodings**: ALU OP 0A–0F act as LSL/ASR, jump OP `11` and COND
  `0001`–`0011` never jump, and memory OPs other than 08/10 do nothing.
* **Sizes**: data memory 256 words (one block RAM), aliased over the address
  space outside the three I/O addresses. Instruction memory is 256 words,
  which the 8-bit jump target implies.
* **Reset**: synchronous and active high. It clears the PC (to 0), the
  registers, the condition codes, the pipeline control and the I/O registers.
  Memory contents are not cleared by reset.
* **I/O addresses** `FFD`–`FFF` and the counter width and tap.
* **Program-load port** on the instruction memory (the lab initialised the
  block RAM from the assembler's output file).

Not included: the VGA display controller and its frame buffer (a separate
design; only its port is provided), the assembler, and PC-relative jumps
(mentioned in the lab only as an optional extension). The lab's jump example
uses register R8, which the 3-bit register fields cannot name. The 25 MHz
clock target has not been checked on an FPGA.
