# A byte-serial associative processor (ASC) in SystemVerilog

An associative processor finds data by content, not by address. Each record
sits in the local memory of its own processing element (PE). One instruction
stream drives every PE in lock step. A search such as "model is Focus and
state is Ohio" runs in every PE at once. Each PE then sets a one-bit
*responder* flag when its record matches. Later instructions can act on all
the responders together, as masked instructions. They can also walk through
the responders one at a time, or pick the largest or smallest value among
them.

This RTL implements a small prototype of that machine:

- an instruction stream control unit (ISCU) with a 32-bit instruction memory,
  a byte-wide data memory and 16 8-bit common registers;
- an array of 4 PEs (parameter `N_PE`), each with a 256-byte local memory;
- two array-wide circuits: *responder resolution* and a *MAX/MIN* search
  circuit that uses the Falkoff algorithm.

The datapath is byte-serial. Every PE has an 8-bit ALU, so wider numbers are
handled one byte per instruction, with a carry kept between instructions.

```
             +--------------------- asc_top ----------------------+
             |  iscu: fetch / decode / execute, common registers  |
 host ports  |   instr_mem (32-bit)   sp_ram (ISCU data memory)   |
 ----------->|                     | pe_cmd_t broadcast           |
             |  pe_array           v                              |
             |   PE cell 0..3: pe + sp_ram (local memory)          |
             |   resp_resolver: R[i] -> V[i] (before me), any      |
             |   maxmin_unit:   GPR[i], R[i] -> MM[i]              |
             +----------------------------------------------------+
```

## Inside a PE

Each PE (`pe.sv`) holds the following:

- **16 8-bit general purpose registers** (`regfile`).
- **An 8-bit ALU** (`alu8`): ADD, SUB, AND, OR, XOR, NOT, SLL, SRL. Each
  operand passes through a multiplexer. The multiplexer takes either a GPR or
  a common register that the ISCU broadcasts with the instruction. This is how
  a search key such as "Focus" reaches all PEs. A **CarryOut** register keeps
  the carry of ADD and SUB. When an instruction asks for it, the carry is fed
  back in, so a 16-bit add takes two ADDs.
- **A comparator** (`comparator`): SLE, SGT, SGE, SEQ, SNE, SLT. The result is
  one bit.
- **16 one-bit logical registers** and **a one-bit ALU** (`logic_alu`). They
  combine comparison results, for example LR1 AND LR2.
- **The responder register** (`responder_reg`).
- **A 16-deep, one-bit mask stack** (`mask_stack`). Its top decides whether
  the PE takes part in masked instructions.
- **The Find/Step/ResolveFirst unit** (`fsr_unit`).

### Masked and unmasked instructions

An unmasked instruction runs in every PE. A masked instruction (M bit set)
changes a PE's registers or memory only when that PE's mask top is '1'.

The mask stack keeps up to 16 nested selections. A typical search runs as
follows:

1. `SETMSK`: set every top to 1.
2. Compare two fields into logical registers.
3. AND the two registers into the responder register.
4. `PUSHMSKTHEM`: push responder AND top onto the stack. The same value is
   also written into the responder.
5. Run masked instructions. They affect only the matching records.
6. `POPMSK`: return to the outer selection.

Mask stack instructions, as this design defines them:

| instruction  | effect in every PE |
|--------------|--------------------|
| SETMSK       | top <= 1 |
| TOPMSK       | responder <= top |
| POPMSK       | pop (a 1 enters at the bottom) |
| POPTHEM      | responder <= top, then pop |
| RPCMSK       | top <= responder |
| PUSHMSK      | push a copy of top |
| PUSHTHEM     | push responder |
| PUSHMSKTHEM  | v = responder & top; push v; responder <= v |
| STKTOMEM a   | memory[a] <= stack[7:0], memory[a+1] <= stack[15:8] (bit 0 is the top) |
| MEMTOSTK a   | the reverse |

## Responders: resolution and selection

`resp_resolver` takes the responder bits R0..R3. It returns
*Responder_Before_Me* V[i] = R0 | ... | R[i-1] to each PE, with V0 = 0. It
also returns *At_Least_One_Responder* = any R to the ISCU, which uses it for
the branches `BNR` (branch if no responder) and `BRS` (branch if responders).

A PE with R = 1 and V = 0 is the *first responder*, the lowest-numbered one.
The three selection instructions all write "I am the first responder" into
the mask top. They differ in what they do to the responder bits:

- **FIND** keeps every responder. This selects one PE while the others stay
  identifiable.
- **STEP** clears the selected PE's responder bit. Repeating
  `BNR end; ...; STEP; J loop` therefore visits every responder once: a for
  loop over the matches.
- **RESFST** clears every other responder bit. Only the first responder stays,
  for example to break a tie left by MAX.

`LDRRSPD rs` copies GPR `rs` of the first responder into common register
`rd`. This is how the sequential part of a program reads a value out of the
array.

## MAX/MIN with the Falkoff algorithm

`maxmin_unit` finds the largest or smallest value among the participating PEs
in 8 clocks, one bit slice per clock, most significant bit first. Each PE has
an 8-bit shift register and an MM bit. MM = 1 means "still a candidate".

1. `SETMXMI`: MM[i] <= responder[i]. Only responders take part.
2. `LDMXMI rs`: shift register i <= GPR `rs` of PE i.
3. `MAX` or `MIN`: 8 steps. In each step, every PE ANDs its current bit with
   its MM bit. For MIN the bit is complemented first. If at least one AND
   result is 1, every MM bit takes its AND result. Otherwise nothing changes.
   The shift registers then move one place.
4. `STMXMI`: responder <= MM. Several bits left set mean a tie.

Example with rebates 170, 160, 190 and 180 in PE0..PE3. The MM bits are
written PE3..PE0, after each bit slice:

| after | start | 7    | 6    | 5    | 4    | 3    | 2    | 1    | 0    |
|-------|-------|------|------|------|------|------|------|------|------|
| MM    | 1111  | 1111 | 1111 | 1111 | 1100 | 0100 | 0100 | 0100 | 0100 |

Bit 6 is 0 in every value, so MM does not change at that step. Only PE2 (190)
is left at the end. `tb_maxmin_unit` checks this sequence clock by clock.

## Instruction format

All instructions are 32 bits wide (`asc_pkg::instr_t`):

| bits  | field | meaning |
|-------|-------|---------|
| 31:26 | op    | opcode (`asc_pkg::opcode_e`) |
| 25    | P     | parallel: the PEs execute the data instruction; when clear, the ISCU executes it on common registers |
| 24    | M     | masked |
| 23/22 | S1C/S2C | operand 1/2 is the common register rs1/rs2, broadcast to the PEs |
| 21    | L     | AND/OR/XOR/NOT work on the one-bit logical registers |
| 20    | DR    | a logical op or compare writes the responder register instead of logical register rd |
| 19:16 | rs1   | |
| 15:12 | rs2   | |
| 11:8  | rd    | |
| 7:0   | imm   | immediate, memory address or branch target; for ADD/SUB, imm[0] = 1 adds the stored carry |

Instruction groups:

- Data transfer: LD, LDI, LDRR, LDRRSPD, ST.
- Arithmetic and logic: ADD, SUB, AND, OR, XOR, NOT, SLL, SRL, SLE, SGT, SGE,
  SEQ, SNE, SLT.
- Mask stack and responders: see the tables above.
- Search: SETMXMI, LDMXMI, STMXMI, MAX, MIN.
- Branches: BNR, BRS, J.
- This design adds NOP and HALT.

`tb/asc_asm_pkg.sv` has an `ins()` function that packs these fields. It is the
easiest way to write programs.

## Timing

The ISCU is a simple multi-cycle sequencer with three states:

- FETCH: the instruction memory is addressed.
- DECODE: the instruction word is latched.
- EXEC: one or more clocks.

During EXEC the ISCU broadcasts `pe_cmd_t`, and `cmd.phase` counts the
clocks. Instructions take these numbers of clocks:

| instructions | clocks |
|--------------|--------|
| most | 3 |
| LD, STKTOMEM | 4 |
| MEMTOSTK | 5 |
| MAX, MIN | 10 |

All memories have a registered read: the data appear one clock after the
address, as in FPGA block RAM. The responder-based branches see the
responder bits as they stand after the previous instruction.

## Using the top level

`asc_top` has the following ports:

- `clk` and `rst_n` (asynchronous, active low).
- `start`: a pulse runs the program from address 0. `busy` is high while it
  runs. `halted` goes high at HALT.
- While the processor is not busy, three host ports are available:
  - `imem_*` writes the program;
  - `dmem_*` reads and writes the ISCU data memory;
  - `pmem_*` reads and writes the local memory of the PE chosen by `pmem_pe`.
  Read data appear one clock after the address.
- Status outputs: `any_resp`, `resp`, `mask_top`, `mm` and `pc`.

Parameters: `N_PE` (default 4) and `MEM_DEPTH` (default 256 bytes per PE).

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/asc_pkg.sv tb/asc_asm_pkg.sv tb/tb_asc_top.sv --top-module tb_asc_top
./obj_dir/Vtb_asc_top
```

`tb_asc_top` runs the whole processor at its default size. It uses a car
database with one record per PE: model, state and rebate. The program:

1. finds the Focus cars in Ohio;
2. raises their rebate by 10 with masked instructions;
3. saves the mask stack to memory and restores it;
4. steps through the matches, counting them and summing their rebates;
5. finds the maximum and the minimum rebate;
6. picks the first Ohio car with RESFST;
7. does a 16-bit add in every PE;
8. halts.

It runs this program on the 4-car example fleet and on 12 random fleets, and
checks every result against a model. It also counts how often each mechanism
ran: masked skip, push, pop, FIND, STEP, RESFST, MAX, MIN, branches taken and
not taken, LDRRSPD, stack save and restore, and carry use. The test fails if
any mechanism never ran.

## What follows the original design and what is this design's own

Taken from the original prototype:

- the block structure (ISCU, PE array, MAX/MIN and responder resolution);
- 4 PEs;
- the register counts and widths (16 8-bit GPRs, 16 one-bit logical
  registers, 16 8-bit common registers, 32-bit instructions);
- the 16-deep mask stack and its masking rule;
- the list of instruction mnemonics;
- the Responder_Before_Me / At_Least_One_Responder circuit;
- the structure of the Falkoff MAX/MIN circuit and its update rule;
- the meaning of FIND, STEP and RESFST.

Choices made here, because the prototype does not specify them:

- the binary instruction encoding, the ISCU sequencing and the cycle counts;
- the exact effect of each mask stack instruction beyond its name
  (PUSHMSKTHEM is fully specified, SETMSK partly);
- the operand of LDRRSPD and its destination register;
- how STKTOMEM and MEMTOSTK lay out the stack in memory;
- the carry convention, shift amounts and unsigned compares;
- reset values (mask stack all 1, responders and registers 0);
- memory depths (256 x 8 per PE, which is one 2-kbit FPGA embedded memory
  block);
- the host load ports, and the NOP and HALT instructions.

The source texts disagree on one point. One says a mask top of '1' means
"masked", another says masked instructions run in the PEs whose top is '1'.
This RTL follows the second: a '1' on top means the PE takes part.

Not included:

- **The cell interconnection network** of the general ASC model. The
  prototype does not build it and its structure is not defined.
- **Multiple instruction streams** (MASC).

The original FPGA results (logic use and the ISCU at about 10 MHz, the 4-PE
array at about 14 MHz) come from a vendor flow and are not reproduced here.

## Files

| file | contents |
|------|----------|
| `rtl/asc_pkg.sv` | instruction format, opcodes, broadcast command type |
| `rtl/asc_top.sv` | the processor |
| `rtl/iscu.sv`, `rtl/instr_mem.sv`, `rtl/sp_ram.sv`, `rtl/regfile.sv` | control unit, memories, register files |
| `rtl/pe_array.sv`, `rtl/pe.sv` | array and PE |
| `rtl/alu8.sv`, `rtl/comparator.sv`, `rtl/logic_alu.sv` | PE arithmetic |
| `rtl/mask_stack.sv`, `rtl/responder_reg.sv`, `rtl/fsr_unit.sv` | PE association state |
| `rtl/resp_resolver.sv`, `rtl/maxmin_unit.sv` | array-wide circuits |
| `tb/tb_*.sv`, `tb/asc_asm_pkg.sv` | testbenches and the instruction builder |
