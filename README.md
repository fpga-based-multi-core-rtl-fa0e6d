# A five-stage MIPS pipeline with SIMD lanes

This is a 32-bit MIPS processor in which a single instruction stream drives
one scalar datapath plus `SIZE` identical SIMD lanes (4 by default). Ordinary
MIPS instructions run on the scalar datapath. The eleven SIMD instructions
(`MADDIU`, `MADDU`, `MMUL`, `MAND`, `MANDI`, `MOR`, `MORI`, `MXOR`, `MXORI`,
`MLW`, `MSW`) run in every lane at once. Each lane has its own register bank,
ALU, multiplier and data memory. All the lanes share the fetch stage, the
decoder, the hazard logic and the data-memory address.

The main point of the design is that SIMD costs nothing in control. A SIMD
instruction takes the same path through the pipeline as a scalar one and
takes the same number of cycles. The only difference is that the decoder
raises a separate set of write and memory enables (`MREGWRITE`, `MMEMTOREG`,
`MMEMWRITE`). Those enables go to the lanes instead of to the scalar
datapath. With four lanes, one instruction handles 128 bits of data where a
scalar instruction handles 32.

The design is a faithful reading of a published FPGA design rather than a
copy of it. Each point where this RTL had to choose for itself is listed
under [Departures and choices](#departures-and-choices).

## Top level

```
module processor #(
  int    SIZE       = 4,      // number of SIMD lanes
  int    IMEM_DEPTH = 1024,   // instruction ROM, 32-bit words
  int    DMEM_DEPTH = 1024,   // each data RAM, 32-bit words
  string IMEM_INIT  = "",     // optional $readmemh file for the program
  string DMEM_INIT  = ""      // optional $readmemh file for every data RAM
) (
  input  logic        CLK,
  input  logic        RSET,          // synchronous, active low
  input  logic        RELEASE,       // lets a BREAK in decode continue
  output logic [31:0] PC_OUT,        // fetch address
  output logic [31:0] CURRENT_INSTR  // instruction now in decode
);
```

The module has 67 port bits in all. `DATASIZE = SIZE*32-1` is the top bit of
the lane write-back bus, which is the concatenation of every lane's
write-back value.

Reset (`RSET` low at a clock edge) does the following:

- sets the PC to 0;
- fills the pipeline with bubbles;
- clears the scalar register bank and every lane register bank.

Memory contents survive reset. A program is loaded either through
`IMEM_INIT`/`DMEM_INIT`, one hex word per line, or by writing the memory
arrays hierarchically from a testbench. In the testbench, the arrays are
`u_imem.mem`, `u_dmem.mem` and `g_lane[i].u_lane.u_dmem.mem`.

## Instruction set

Scalar instructions use the standard MIPS32 encodings:

| group | instructions |
|---|---|
| register ALU | `ADDU SUBU AND OR XOR SLT SLTU` (opcode 0) |
| shifts | `SLL SRL SRA` (opcode 0, shift amount in `shamt`) |
| immediate ALU | `ADDIU SLTI SLTIU ANDI ORI XORI LUI` |
| multiply | `MUL rd, rs, rt` (opcode 0x1C, funct 0x02) |
| memory | `LW SW` |
| branches | `BEQ BNE BLTZ BGEZ` |
| jumps | `J JAL JR` |
| breakpoint | `BREAK` (opcode 0, funct 0x0D) |

`ANDI`, `ORI` and `XORI` zero-extend their immediate. All other immediates
are sign-extended. `MUL` multiplies the low 16 bits of both operands as
signed numbers and returns the full 32-bit product. Nothing traps: there is
no overflow, address or illegal-instruction exception. An unknown encoding
executes as a NOP.

The SIMD instructions have no standard encoding. This design uses the
following:

| instruction | opcode | funct | operands |
|---|---|---|---|
| `MADDU / MAND / MOR / MXOR vd, vs, vt` | 0x1E | 0x21 / 0x24 / 0x25 / 0x26 | lane registers |
| `MMUL vd, vs, vt` | 0x1E | 0x18 | lane registers, 16x16 signed |
| `MADDIU vt, vs, imm` | 0x19 | – | sign-extended immediate |
| `MANDI / MORI / MXORI vt, vs, imm` | 0x1A / 0x1B / 0x1D | – | zero-extended immediate |
| `MLW vt, off(rs)` | 0x33 | – | `rs` is a **scalar** register |
| `MSW vt, off(rs)` | 0x3B | – | `rs` is a **scalar** register |

Vector registers and scalar registers are separate files that share the
numbers 0–31. Vector register 0 reads as zero in every lane.

`MLW` and `MSW` form their address from a scalar base register plus the
offset. Every lane then reads or writes the same word of its own memory. A
program therefore gives each lane different data by placing it at the same
address in the different lane memories. No instruction moves data between
the scalar registers and the lanes.

Data memories are addressed by words. The byte address bits `[11:2]` select
the word. There are no byte or halfword accesses.

## Pipeline

| stage | scalar datapath | each lane |
|---|---|---|
| IF | PC register. The instruction ROM is read synchronously, and its output register is the IF/ID instruction. | – |
| ID | Decode. Register read with write-through from WB. Forwarding multiplexers. Branch test, next-PC. Hazard unit. | register read, forwarding multiplexers |
| EX | ALU control, ALU, shifter, comparator, multiplier, result multiplexer (MSEL) | ALU, multiplier |
| MEM | data RAM | its own data RAM, same address |
| WB | load data or result into the scalar bank | load data or result into the lane bank |

`PC_OUT` shows the address being fetched. `CURRENT_INSTR` shows the
instruction in decode. When the pipeline is full it completes one
instruction per clock.

## Hazards

Most of the design's subtlety is here. Data dependences are resolved in
decode, because that is where operands are read and branches are decided.
The hazard unit compares each source register of the instruction in
decode against the destinations of the two instructions ahead of it. A
source only matches a destination in the same register space, scalar or
vector. Register 0 never matches.

### Forwarding into decode

Take a producer P and the instructions that follow it:

| distance from P | where P is when the consumer decodes | value used |
|---|---|---|
| 1 | EX | P's EX result, forwarded combinationally (`FWD_EX`) |
| 2 | MEM | the EX/MEM result register (`FWD_MEM`) |
| 3 | WB | the register bank itself, which passes a same-cycle write straight to its read port |

The sequence `SUBU $2,$1,$3 / AND $12,$2,$5 / OR $13,$6,$2 / ADDU $14,$2,$2`
uses all three paths in turn and runs without a stall. The lanes contain the
same multiplexers and share the same select signals.

### Loads

A load's data leaves the synchronous data RAM during the load's WB cycle.
An instruction that needs the value right after the load cannot wait for
it in decode. The pipeline handles it as follows:

1. **Load in EX, consumer in ID.** The hazard unit stalls for one cycle.
   The PC and IF/ID hold, and a bubble enters EX.
2. **Load in MEM, consumer in ID.** The consumer moves on to EX with a
   "late" flag set on that operand. In its EX cycle the load is in WB. The
   RAM output is then multiplexed straight into the EX operand.
3. **Load in WB, consumer in ID.** The ordinary write-through covers it.

So `LW $2,0($3)` followed by three users of `$2` costs exactly one cycle.
An instruction two behind the load uses path 2 with no stall at all.

Branches and `JR` need their operand in decode, so path 2 is too late for
them. A branch on a register loaded by the instruction in EX stalls for 2
cycles. One loaded by the instruction in MEM stalls for 1 cycle.

### Branches and jumps

Branches compare and jumps compute their targets in decode, using the
forwarded operands. The instruction after a branch or jump (the delay slot)
always executes. Nothing is flushed, so a taken branch costs no cycles.
Targets are computed as follows:

- branch target: (branch address + 4) + (sign-extended offset × 4);
- `J` and `JAL`: the 26-bit target field replaces bits 27:2 of the
  delay-slot address;
- `JAL` writes the return address (its own address + 8) into `$31` through
  the normal EX result path, so it forwards like any ALU result;
- `JR` jumps to the forwarded `rs`.

### Breakpoint

While a `BREAK` sits in decode and `RELEASE` is low, the pipeline front end
holds. The fetch stage and IF/ID keep their values, and bubbles flow into
EX. The instructions already ahead of it drain and finish. When `RELEASE`
is high the `BREAK` moves on as a NOP. Holding `RELEASE` high therefore
turns every `BREAK` into a NOP.

### No structural or WAW/WAR hazards

Instructions and data live in separate memories. Every write happens in WB,
in program order, and every read happens in ID. So no write-after-write or
write-after-read hazard can occur, and none is checked.

## SIMD lanes

`simd_lane` holds only data. It contains:

- a register bank;
- the two forwarding multiplexers;
- the data halves of the ID/EX, EX/MEM and MEM/WB registers;
- an ALU and a multiplier;
- a data RAM;
- the write-back multiplexer.

Every control signal comes from the scalar pipeline registers, at the stage
that matches the lane's data:

- forwarding selects in ID;
- ALU function, operand source and late-load flags in EX;
- RAM address and write enable in MEM;
- register write enable, destination and load select in WB.

Lanes have no shifter or comparator, because no SIMD instruction shifts or
compares.

The scalar EX stage computes the `MLW`/`MSW` address from a scalar register,
and the lanes take it from the EX/MEM register. The hazard unit therefore
sees a two-space dependence in these instructions: `rs` is scalar, while
`vt` is vector. A scalar load followed by an `MLW` that uses the loaded
register as its base stalls like any scalar load-use. A lane's result never
reaches a top-level port. To observe the lanes, simulate, or bring the
write-back bus out.

## Module map

| file | block |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, functs, control-word struct, enums for ALUOP/FSEL/MSEL/forward selects |
| `rtl/processor.sv` | top: pipeline registers, stage wiring, lane array, assertions |
| `rtl/fetch_unit.sv` | PC register, +4 adder, redirect and stall selection |
| `rtl/instr_mem.sv` | synchronous instruction ROM with read enable (low during a stall) |
| `rtl/control_unit.sv` | main decoder, scalar and SIMD controls |
| `rtl/register_bank.sv` | 32 x 32 bank, two read ports, one write port, write-through, `$0` = 0 |
| `rtl/hazard_unit.sv` | forwarding selects, late-load flags, stalls, breakpoint hold |
| `rtl/branch_unit.sv` | BEQ/BNE/BLTZ/BGEZ condition |
| `rtl/next_pc.sv` | branch, jump and register-jump targets, redirect |
| `rtl/extend_unit.sv` | sign or zero extension of the 16-bit immediate, LUI placement |
| `rtl/alu_control.sv` | ALUOP + funct → FSEL, MSEL, SHDIR, SHEXTMODE, SIGNEDCOMP |
| `rtl/alu.sv` | add, subtract, and, or, xor, LUI pass-through |
| `rtl/shifter.sv` | logical/arithmetic shifts by `shamt` |
| `rtl/comparator.sv` | signed/unsigned less-than |
| `rtl/multiplier.sv` | signed 16 x 16 → 32, combinational |
| `rtl/data_mem.sv` | synchronous single-port RAM, read-first, read enable |
| `rtl/simd_lane.sv` | one SIMD lane |

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. All of them pass. To run the
whole-processor test with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb \
  rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/tb_processor.sv \
  --top-module tb_processor -o sim
./obj_dir/sim
```

`--assert` enables the immediate assertions in `processor`. They check
that an instruction writes at most one register space, that `JAL` links into
`$31`, and that the breakpoint hold and data stalls occur only where they
should.

Any unit test runs the same way, with `tb/tb_<block>.sv` and
`--top-module tb_<block>`. `tb/mips_asm_pkg.sv` is a small assembler made of
functions such as `a_addiu(rt, rs, imm)`, `a_beq(rs, rt, off)`,
`a_mlw(vt, off, rs)`, which return instruction words. It is handy for
writing new programs.

`tb_processor` runs the processor at its default size: 4 lanes and
1024-word memories. It compares every scalar register, every lane register
and every memory word after each program with an instruction-level
reference model that has one delay slot. The programs are:

- the arithmetic, logic and memory programs, scalar and SIMD;
- the forwarding sequence, which must need 0 stalls;
- the load-use sequence, which must need exactly 1 stall;
- a branch/loop/call/return/breakpoint program;
- 40 random 150-instruction programs dense in register dependences.

It also checks that a SIMD program takes exactly as many cycles as its
scalar twin. On every cycle it checks that `CURRENT_INSTR` is the word
fetched at the previous `PC_OUT`, and that both ports hold during a stall. It counts these mechanisms, and fails if any of them never
occurs:

- forwarding from EX, from MEM, and through write-through;
- late load forwarding;
- load stalls, branch stalls and breakpoint holds;
- taken branches and jumps, `JAL` and `JR`;
- lane forwarding, lane writes, lane loads and lane stores;
- multiplies.

It takes well under a second.

`tb_processor_lanes` builds the processor twice, with 8 lanes and with 1
lane. It loads the program `tb/lanes_prog.hex` and the data
`tb/lanes_data.hex` through `IMEM_INIT`/`DMEM_INIT`, so it is also an
example of file-based program loading. It checks every lane's result. It
also checks that both sizes fetch the same address on every cycle. Paths
to the files are relative to the directory that holds `tb/`.

The unit testbenches compare each block against values computed
independently. `tb_simd_lane` runs a lane inside a small pipeline driven by
the testbench.

## Departures and choices

- **Vendor cores.** The block RAMs and the multiplier core of the original
  are written here as an inferred RAM array and a combinational `*`. This
  gives the multiplier zero latency, so that `MUL` fits the single EX cycle.
- **SIMD encodings** are this design's own (table above).
- **Forwarding points.** The second forwarding source is taken from the
  EX/MEM register, one stage earlier than a literal reading of the original
  description. Together with the write-through register bank, this covers
  every distance without a stall.
- **Multiplier result.** It is selected in EX by the MSEL multiplexer, along
  with the shifter, comparator and link value. In the original it is chosen
  in the write-back multiplexer. Choosing it in EX lets a `MUL` result
  forward like any other.
- **`ISJAL`** selects `$31` as the destination. The hazard unit needs no
  special case for it, because the link value travels as an ordinary
  result.
- **Delay slot.** Nothing is killed. The original also mentions replacing a
  killed instruction with a NOP. With branches resolved in decode and one
  delay slot there is nothing to kill, so no kill path exists.
- **Branch on a loaded value** stalls, as described above. The original
  does not say how this case is handled.
- **`RELEASE` and reset clearing of the register banks** are this design's
  behaviour.
- **Data memory read enable.** It is driven by `MEMTOREG` (`MMEMTOREG` in
  the lanes). The output holds when the enable is low. A read and a write
  in the same cycle return the old word, but no instruction both loads and
  stores.

## Size and synthesis

At the defaults the design has 6 memories of 1024 x 32 bits: the
instruction ROM, the scalar data RAM and the 4 lane RAMs. The top has 67
port bits. The original FPGA implementation reports the same two counts: 6
block RAMs and 67 bonded IOBs. Its slice, clock-rate and power figures come
from a vendor flow and are not reproduced here.

Since no lane result reaches a port, a synthesis tool may remove the lanes
entirely. It may also remove an instruction ROM that has no initial contents.
A real build needs both of the following:

- a program in `IMEM_INIT`;
- the lane write-back bus, or some memory-mapped output, brought out to
  ports.
