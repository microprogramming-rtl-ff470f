# A microcoded MIPS on a single bus

This is a small MIPS-like processor whose control is a microprogram, not a
hardwired state machine. The datapath is minimal: one 32-bit bus and a few
registers around it. It can do exactly one register-to-register transfer per
clock cycle, for example "A <- Reg[rs]" or "PC <- A + 4". A controller steps
through a control store. Each word of the store names one transfer and says
how to find the next word. Every machine instruction runs as a short sequence
of such words:

- a common fetch sequence;
- a dispatch on the opcode;
- the sequence belonging to that opcode's group.

A complex instruction costs only more words in the store, not more hardware.
The memory-to-memory ALU instruction `M[rd] <- M[rs] op M[rt]` runs on the same
datapath as `add`, and so do its register-memory relatives.

The organisation follows the "MIPS Controller V2" of the MIT 6.823 lecture on
microprogramming (J. Emer). Two ideas keep the control store small:

- **Input encoding.** The store is addressed by the microprogram counter (uPC)
  alone, not by uPC + opcode + status bits. A small table maps each opcode to
  the first word of its group.
- **Next-state encoding.** A word does not hold a full next address. It holds
  a 3-bit jump type: next, spin, fetch, dispatch, feqz or fnez.

The whole microprogram fits in 62 words of 21 bits.

## Block diagram

```
           opcode, zero?, busy
   +-------------------------------------------+
   |                                           |
   v                                           |
 ucontroller  ---- 18 control signals ---->  datapath  <---- bus / MA ---->  mem_module
 (uPC, ucode_rom,                            (IR, A, B, MA, reg_file,        (slow RAM,
  jump_logic, op_dispatch)                    alu, alu_control, imm_ext)      busy flag)
```

`mips_ucoded` is the top. It instantiates the three parts. Its parameter
`CONTROLLER` chooses among four controllers for the same datapath:

- `CTL_UCODE` (default): `ucontroller`, the encoded microcode described
  below;
- `CTL_NANO`: `nano_controller`, the same microprogram in a two-level store;
- `CTL_ROM`: `rom_controller`, the unencoded controller that the encoded
  one was derived from;
- `CTL_WCS`: `wcs_controller`, the encoded controller with its store in a
  RAM that is loaded through the `wcs_*` ports.

Each alternative has its own section below.

## The bus datapath (`datapath`)

Four sources can drive the bus. The testbench-visible assertion
`a_one_driver` checks that at most one drives it in any cycle:

| source | enabled by | value |
|---|---|---|
| register file | `enReg` and not `RegWrt` | register chosen by `RegSel` |
| ALU | `enALU` | `f(A, B)`, with f chosen by `OpSel` |
| immediate extender | `enImm` | chosen by `ExtSel` from IR |
| memory | `enMem` and not `MemWrt` | word at address MA |

Five destinations can load it at the rising edge:

- IR (`ldIR`), A (`ldA`), B (`ldB`) and MA (`ldMA`);
- the register file (`enReg` and `RegWrt`);
- the memory (`enMem` and `MemWrt`).

The register file holds 32 GPRs plus the PC, which is register 32. `RegSel`
(3 bits) picks its address: PC, 31 (link), or the rd, rt or rs field of IR.
Register 0 reads as zero.

The tri-state bus of the original drawing is built as an OR of the gated
sources. An undriven bus reads 0.

The control word (`ucode_pkg::ctrl_t`) has these fields, in order:

| field | bits | field | bits |
|---|---|---|---|
| ldIR | 1 | enReg | 1 |
| OpSel | 3 | ldMA | 1 |
| ldA | 1 | MemWrt | 1 |
| ldB | 1 | enMem | 1 |
| RegSel | 3 | ExtSel | 2 |
| RegWrt | 1 | enImm | 1 |
| | | enALU | 1 |

That is 18 bits.

The lecture counts 17 control signals with a 2-bit OpSel. Here OpSel has
3 bits. Besides the two operations taken from the instruction (func field,
opcode), the microprogram needs five fixed ALU operations: A+B, A+4, the jump
target, pass A and pass B. Seven choices do not fit in 2 bits.

`ExtSel` values:

- sign-extended 16-bit immediate;
- zero-extended 16-bit immediate;
- sign-extended immediate times 4 (branch offset);
- the whole IR.

The last one is this design's route for `B <- IR` before a jump-target
computation. The drawing has no other path from IR to the bus.

`zero?` is `A == 0`. `JumpTarg(A,B) = {A[31:28], B[25:0], 2'b00}`.

## The controller (`ucontroller`)

`uPC` addresses `ucode_rom`. The word read drives the datapath directly, so
control is combinational from the uPC register. `jump_logic` turns the word's
jump type and the status inputs into the source of the next uPC:

| jump type | next uPC |
|---|---|
| next | uPC + 1 |
| spin | busy ? uPC : uPC + 1 |
| fetch | absolute |
| dispatch | op-group of the opcode (`op_dispatch`) |
| feqz | zero? ? absolute : uPC + 1 |
| fnez | zero? ? uPC + 1 : absolute |

Every absolute target in the microprogram is the first fetch word. The
absolute address is therefore a parameter (`ABSOLUTE`, default 0), not a
field of the word.

The controller runs one microinstruction per clock. Reset (synchronous,
active high) puts the uPC at fetch0.

## The microprogram (`ucode_rom`)

Each line below is one clock cycle. The jump type is in brackets; words
without one use "next". Addresses are the word numbers in the store.

| addr | group | transfers |
|---|---|---|
| 0-3 | fetch | MA<-PC; IR<-Mem [spin]; A<-PC; PC<-A+4 [dispatch] |
| 4-6 | ALU | A<-Reg[rs]; B<-Reg[rt]; Reg[rd]<-func(A,B) [fetch] |
| 7-9 | ALUi | A<-Reg[rs]; B<-sExt(Imm); Reg[rt]<-Op(A,B) [fetch] |
| 10-12 | ALUiU | A<-Reg[rs]; B<-uExt(Imm); Reg[rt]<-Op(A,B) [fetch] |
| 13-17 | LW | A<-Reg[rs]; B<-sExt(Imm); MA<-A+B; Reg[rt]<-Mem [spin]; - [fetch] |
| 18-22 | SW | A<-Reg[rs]; B<-sExt(Imm); MA<-A+B; Mem<-Reg[rt] [spin]; - [fetch] |
| 23-27 | BEQZ | A<-Reg[rs]; - [fnez]; A<-PC; B<-sExt(Imm)*4; PC<-A+B [fetch] |
| 28-32 | BNEZ | same as BEQZ, with [feqz] |
| 33-35 | J | A<-PC; B<-IR; PC<-JumpTarg(A,B) [fetch] |
| 36-37 | JR | A<-Reg[rs]; PC<-A [fetch] |
| 38-41 | JAL | A<-PC; Reg[31]<-A; B<-IR; PC<-JumpTarg(A,B) [fetch] |
| 42-45 | JALR | A<-PC; B<-Reg[rs]; Reg[31]<-A; PC<-B [fetch] |
| 46-52 | ALUMM | MA<-Reg[rs]; A<-Mem [spin]; MA<-Reg[rt]; B<-Mem [spin]; MA<-Reg[rd]; Mem<-func(A,B) [spin]; - [fetch] |
| 53-56 | ALUMS | MA<-Reg[rs]; A<-Mem [spin]; B<-Reg[rt]; Reg[rd]<-func(A,B) [fetch] |
| 57-61 | ALUMD | A<-Reg[rs]; B<-Reg[rt]; MA<-Reg[rd]; Mem<-func(A,B) [spin]; - [fetch] |

Words 62 and 63 are no-operations that jump to fetch. An opcode without a group
also dispatches to fetch, so it acts as a no-operation.

Note the branch form. BEQZ tests in its second word with fnez: if A is not
zero it returns to fetch; otherwise it falls through into the taken path.

Immediate ALU results go to rt, as the instruction format says. The lecture's
controller table writes `Reg[rd]` there; rt is taken as the intended meaning.

The lecture's table has one immediate group using sign extension. Its
earlier, unencoded ROM picks sign or zero extension by opcode. This design
keeps two groups:

- ALUi, sign-extended: ADDI, ADDIU, SLTI, SLTIU;
- ALUiU, zero-extended: ANDI, ORI, XORI, LUI.

**Timing.** Let L be the memory's busy cycles per access (default 10). Each
spin word lasts L + 1 cycles. Cycles per instruction:

- fetch: 4 + L
- then, by group:
  - ALU, ALUi: 3
  - LW, SW: 5 + L
  - BEQZ/BNEZ: 2 not taken, 5 taken
  - J: 3; JR: 2
  - JAL, JALR: 4
  - ALUMM: 7 + 3L; ALUMS: 4 + L; ALUMD: 5 + L

With L = 10 an ALU instruction takes 17 cycles and a load 29. The end-to-end
test checks these numbers, summed over its program.

## Memory and the spin handshake (`mem_module`)

The memory is slower than a register transfer. Its controls follow the
memory-module drawing:

- `Enable` (= `enMem`);
- `Write(1)/Read(0)` (= `MemWrt`);
- write enable = Enable AND Write;
- bus drive = Enable AND NOT Write.

Behaviour of one access:

- When Enable rises, `busy` stays high for `LATENCY` cycles.
- In the cycle where busy is low, read data is valid. A write takes effect at
  the clock edge that ends that cycle.
- The controller's spin word repeats its transfer every cycle until busy
  falls. The last repetition therefore moves the valid word.

Two requirements, both met by the microprogram:

- Enable must drop for at least one cycle between accesses. Every spin word
  is followed by a non-memory word.
- MA must not change during an access. The assertion `a_addr_stable` checks
  this.

Memory details:

- word-addressed, 1024 words by default (the low two address bits are
  ignored);
- a second port (`host_we`, `host_addr` as a word index, `host_wdata`,
  `host_rdata`) loads and inspects memory, normally while `rst` is held.

## Instruction encoding

The field layouts are the MIPS ones:

- R-type: `op 6 | rs 5 | rt 5 | rd 5 | 0 5 | func 6`
- I-type: `op | rs | rt | imm16`
- J-type: `op | offset26`

Numeric codes are this design's choice (`ucode_pkg`):

| opcode | instruction | opcode | instruction |
|---|---|---|---|
| 00 | R-type ALU | 0C-0F | ANDI ORI XORI LUI |
| 02 | J | 12 | JR |
| 03 | JAL | 13 | JALR |
| 04 | BEQZ | 23 | LW |
| 05 | BNEZ | 2B | SW |
| 08-0B | ADDI ADDIU SLTI SLTIU | 3C | ALUMM |
| | | 3D | ALUMS |
| | | 3E | ALUMD |

Further details:

- func codes (MIPS values): ADD/ADDU, SUB/SUBU, AND, OR, XOR, NOR, SLT,
  SLTU, SLLV, SRLV, SRAV. There are no overflow traps.
- The three memory ALU instructions use the R-type layout:
  - ALUMM: `M[rd] <- M[rs] func M[rt]`;
  - ALUMS (memory source): `rd <- M[rs] func rt`;
  - ALUMD (memory destination): `M[rd] <- rs func rt`.
- The branch target is PC+4 + 4*sExt(imm).
- JAL and JALR write PC+4 to r31.
- JR and JALR have their own opcodes, not R-type func codes.

## Nanocoded variant (`nano_controller`, `CTL_NANO`)

The same transfers recur across groups; `A <- Reg[rs]` alone opens nine of
them. The nanocoded controller therefore stores the microprogram in two
levels:

- `nano_urom`: 64 words of 8 bits, each a 5-bit nanoaddress plus the 3-bit
  jump type;
- `nano_rom`: 28 distinct 18-bit control words.

Storage is 1088 bits instead of 1344. Behaviour and timing are identical to
the one-level controller: the same program gives the same memory image in
the same number of cycles. In hardware the control path is one ROM deeper.

## Unencoded controller (`rom_controller`, `CTL_ROM`)

This is the straightforward way to build the controller, and it shows what
the encoded one saves. It is a state machine whose whole behaviour is one
table:

- address: opcode (6 bits), zero? (1), busy (1) and the present state
  (6), 14 bits in all;
- word: the 18 control signals and the next state (6 bits), 24 bits in all.

No sequencer is involved. Each step is a separate table entry:

- waiting for memory is a state whose busy = 1 entries point to itself;
- a branch is a state whose entries differ in zero?;
- the opcode dispatch is the last fetch state, whose entries differ in the
  opcode.

The machine needs 49 states, so the table has 2^14 words of 24 bits: 48 KB,
against 168 bytes for the encoded store. That size is why the encoded
controller exists. The table is written as a function of its address, so
synthesis reduces it to logic.

Sequences are the same transfers as the encoded microprogram, with three
differences that come from having the inputs in the address:

- ALUi is one group. Its second state picks sign or zero extension from the
  opcode.
- BEQZ and BNEZ share states. A taken branch does `A <- PC` in the same
  state that tests zero?, so it takes 4 cycles instead of 5.
- A memory state goes straight to the next state, or back to fetch, when
  busy is low. LW, SW, ALUMS and ALUMD take 4 + L cycles, and ALUMM 6 + 3L.

While busy, a read state asserts only the memory enable and loads nothing.
A write state repeats its word.

With `CTL_ROM` the top's `upc` port shows the state and `jump` always reads
"next", since there are no jump types.

## Writable control store (`wcs_controller`, `CTL_WCS`)

The sequencer is the one of `ucontroller`; only the store changes. It is a
64 x 21-bit RAM instead of a ROM, so the microprogram can be loaded at
start-up and patched later without changing the hardware.

- The store has no reset contents. While `rst` is high, a loader writes all
  64 words through `wcs_we`, `wcs_addr` and `wcs_wdata`, one word per rising
  clock edge.
- Reading is combinational at the uPC, as with the ROM, so timing is
  unchanged.
- A write to the word being executed takes effect from the next cycle.
- The other controllers ignore the `wcs_*` ports; tie them to zero.

Loaded with the standard microprogram, the machine behaves exactly like the
default one. A patch changes what an instruction does. For example,
rewriting word 6 (the last ALU word) to use the fixed A+B operation makes
every R-type ALU instruction add.

## Simulating

All files are SystemVerilog 2017. `rtl/ucode_pkg.sv` must be read first.
`-y rtl` lets verilator find the other modules by name. Example, the
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/ucode_pkg.sv \
    tb/tb_mips_ucoded.sv --top-module tb_mips_ucoded
./obj_dir/Vtb_mips_ucoded
```

Each testbench ends with one line, `TB_RESULT checks=N failures=M`. Each has
a watchdog that counts a failure and stops the run if it hangs.

| testbench | what it checks |
|---|---|
| `tb_mips_ucoded` | Whole machine at default parameters. A program using every group (both branch outcomes, calls and returns, an unknown opcode) runs against an instruction-level model in the testbench. Checks every memory word and the total cycle count, and that each mechanism occurred: spin while busy, dispatch to each group, fetch, feqz/fnez both ways. |
| `tb_mips_nanocoded` | Same program with `CONTROLLER = CTL_NANO`. |
| `tb_mips_romctl` | Same program with `CONTROLLER = CTL_ROM`, against a model with that controller's cycle counts. It also counts busy waits, entries into each group, both extensions and both outcomes of each branch. |
| `tb_ucontroller`, `tb_nano_controller` | uPC sequences and cycle counts per group, with and without busy cycles. The nanocoded one also checks every control word against a hand-written microprogram table. |
| `tb_rom_controller` | Every transfer of every group, and its cycle count, against a hand-written list, at three busy lengths. |
| `tb_mips_wcs` | `CONTROLLER = CTL_WCS`. Boots the store from the ROM image and runs the same program with the same results and cycle count. Then patches the ALU group so that a SUB must store a sum. |
| `tb_wcs_controller` | 4000 cycles of random inputs and random writes into the store, against a reference sequencer and a copy of the store. |
| `tb_ucode_rom` | All 64 words against the same table. |
| `tb_datapath` | Transfer by transfer: fetch, random register ALU operations, jump target, link. |
| `tb_alu`, `tb_alu_control`, `tb_imm_ext`, `tb_op_dispatch`, `tb_jump_logic`, `tb_reg_file`, `tb_mem_module` | Each unit against its own reference. The memory test also checks the busy length. |

To change the microprogram:

1. Edit `ucode_rom` and, if it is used, `nano_urom`/`nano_rom`.
2. Keep the entry addresses in `ucode_pkg` in step.
3. Adjust the expected tables in `tb_ucode_rom` and `tb_nano_controller`.

## Choices and departures

Follows the lecture:

- the datapath units and control signal names;
- the controller structure (uPC, ROM, +1, four-way next-address multiplexer,
  jump logic, opcode-to-group table);
- the jump types;
- the microprogram sequences;
- the instruction formats;
- the memory's Enable/Write gating and busy-based waiting;
- the nanocoding scheme;
- the control store held in a RAM, so microcode can be loaded and
  patched;
- the unencoded controller's table organisation (opcode, zero?, busy and
  state as address; 6 state bits) and its worksheet sequences.

This design's own choices:

- OpSel is 3 bits, so the control word has 18 signals rather than 17.
- ExtSel's fourth value passes IR to the bus.
- The absolute address is a constant.
- The zero-extended ALUi group is separate.
- Immediate results go to rt.
- Opcode and func values, including those of the three memory ALU
  instructions.
- The microcode of ALUMS and ALUMD. The lecture defines these instructions
  but gives no sequences for them.
- The ALU's operation list.
- r0 = 0.
- Reset values.
- The bus as a multiplexer.
- The memory's busy protocol details, latency (10) and depth (1024 words),
  and the host port.
- The writable store's write port and its timing.
- Unknown opcodes act as no-operations.

Not built:

- pipelined microcode execution, which is shown only as a box diagram;
- string instructions (`M[rd..rd+rc] <- M[rs..] op M[rt..]`): the count rc
  has no field or register, and the jump types cannot form a loop;
- the historical machines mentioned for comparison (Wilkes' diode-matrix
  unit, IBM 360, VAX 11/780, MC68000).
