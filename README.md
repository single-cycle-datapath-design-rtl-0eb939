# A 32-bit single-cycle processor for a six-instruction ISA

This is a small 32-bit processor that completes every instruction in one
clock period. It has no pipeline, no hazards and no stalls. Its instruction set has six
instructions: two register-register operations, a load, a store, a
branch-if-equal and a load-immediate. Program and data share one
word-addressable **dual-port memory**. Port 1 fetches the instruction while port 2
serves the load or store of that same instruction. The datapath is assembled
from small, separately tested parts: a clock module, the memory, an
instruction-fetch unit, a register file, an ALU and a control unit.

The interesting part of the design is the schedule inside one clock period,
which uses **both clock edges**. Most of what follows explains that
schedule and the choices behind it.

## Instruction set

All instructions are 32 bits wide. The opcode is in bits 31:26. Register
fields are 5 bits wide, because there are 32 registers.

| Instr | 31:26    | 25:21 | 20:16 | 15:11 | 10:6   | 5:0    | Effect |
|-------|----------|-------|-------|-------|--------|--------|--------|
| ADD   | `100000` | RS    | RT    | RD    | 0      | 0      | RS ← RT + RD |
| SUB   | `100001` | RS    | RT    | RD    | 0      | 0      | RS ← RT − RD |
| LW    | `100010` | RS    | RT    | 0     | IDX    | 0      | RS ← MEM[RT + IDX] |
| SW    | `100011` | RS    | RT    | 0     | IDX    | 0      | MEM[RT + IDX] ← RS |
| BEQ   | `100100` | RS    | RT    | 0     | BR     | 0      | if RS = RT: PC ← PC + BR |
| LI    | `100101` | RS    | IMM (bits 20:0)                   ||||  RS ← IMM |

Note that RS is the *destination* of ADD, SUB, LW and LI, and the *stored
value* of SW. This is unlike MIPS.

Constants and addresses work as follows:
- IDX is zero-extended, so it is an unsigned word offset of 0 to 31.
- IMM is zero-extended from 21 bits.
- BR is sign-extended, so a branch reaches −16 to +15 words.
- BR is added to the address of the BEQ itself, not to the address after it.
  `BEQ r0, r0, 0` is therefore a branch to itself, which makes a convenient halt.
- Memory is addressed in words. Consecutive instructions are at PC, PC + 1, and so on.
- All 32 registers are ordinary storage. There is no hard-wired zero register.
  Reset clears all of them to 0.

Any other opcode is a no-operation: the PC advances and nothing is written.

## One instruction, one clock period

An instruction needs two dependent memory accesses in the same cycle: the fetch, then the load. It also
needs a register write at the end of that cycle. The design therefore gives
each clock edge one job, and it makes reads combinational:

```
          falling            rising             falling
  clk  ‾‾‾‾‾‾\________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______
             |   low half      |    high half     |
  PC         X  new PC ---------------------------X next PC
  fetch      |  MEM[PC] on port 1 (combinational)
  decode     |  control word, register reads (RT; RD or RS)
  ALU        |  RT+RD / RT-RD / RT+IDX / RT==RS, branch target PC+BR
  store      |                 * SW writes MEM[RT+IDX] on port 2
  load       |                 |  LW data from port 2 (combinational)
  write-back |                                    * RS written, PC loaded
```

1. **Falling edge (start of the cycle).** The PC register loads its new
   value. The register written by the previous instruction takes its value on
   this same edge.
2. **Low half.** The PC drives port 1, and the instruction appears
   combinationally. The control unit decodes it. The register file reads two
   registers. Port A always reads RT. Port B reads RD for ADD and SUB, and RS
   for SW and BEQ. The ALU then works, and the fetch unit's second adder
   forms PC + BR.
3. **Rising edge.** A store is committed to memory. Its address and data have
   had the whole low half to settle.
4. **High half.** The data of a load arrives combinationally from port 2.
5. **Falling edge (end of the cycle).** RS is written from one of three
   sources: the ALU, the loaded word or the immediate. The PC loads PC + 1,
   or PC + BR for a taken BEQ. The next cycle begins on this edge.

So the PC and the register file are clocked on the falling edge, and the
memory is written on the rising edge. Both memory ports and both register-file
read ports are combinational. Reset (`rst`, active high) is sampled on falling
edges. It clears the PC and the registers and blocks stores. Release it shortly
after a falling edge. The first instruction, at address 0, then completes on
the next falling edge.

**Restriction.** The store lands in mid-cycle in the memory that also holds
the program. A store that overwrites *its own* instruction word therefore
changes that instruction during the high half. The register write and the PC
update would then follow the new word. Programs must not do this. Other
self-modifying code is fine: the new word is used the next time it is
fetched.

**Departure from a fully edge-triggered memory and register file.** The
specification this design follows asks for memory reads and writes on the
rising edge, and for register-file reads on the rising edge. With
registered reads, one clock period can hold only one of the two dependent
memory reads. A load would then take two cycles, or the machine would need
pipelining and hazard handling. This design keeps the single-cycle property
and makes the reads combinational. Writes stay on the edges the
specification gives: rising for memory, falling for registers and PC.

## The parts

| Module | Role |
|--------|------|
| `sc_system` | Top: clock module, `sc_core`, one `dual_port_mem` (port 1 = instructions, port 2 = data, chip select tied on). |
| `sc_core` | The processor: fetch unit, control, register file, ALU, operand and write-back multiplexers, constant extension. |
| `clock_gen` | Behavioural square-wave source, 50 % duty cycle, `HALF_PERIOD` = 5 time units, starts low. For simulation only. |
| `dual_port_mem` | Two identical ports (ADDR, WE, OE, DATA in/out) and a global chip select CS. Combinational read when CS & OE & !WE, otherwise the output is 0. Write on the rising edge when CS & WE. If both ports write one word on one edge, port 2 wins. |
| `if_unit` | PC register, adder PC + 1, adder PC + offset, 2:1 mux selected by PCSrc. Drives ADDR1/OE1 and passes the fetched word through. |
| `pc_reg` | Falling-edge PC register with synchronous reset to 0. |
| `reg_file` | 32 × 32 bits, two combinational read ports, one falling-edge write port. |
| `alu` | A decoder turns the 2-bit ALU code (0 add, 1 subtract, 2 compare) into one enable per unit. The adder and subtractor outputs are ORed; a unit that is not enabled outputs 0. Z = 1 when the inputs are equal and the comparator is selected. Chip select 0 turns everything off. |
| `control_unit` | Opcode → `ctrl_t` control word (register write, port-B source, ALU source, ALU chip select and code, memory read/write, branch, write-back source) and a `valid` flag. |
| `adder32`, `subtractor32`, `comparator32`, `mux2` | Leaf units, parameterised in width. |
| `sc_pkg` | Widths, opcode and ALU-code enums, and the `ctrl_t` struct. |

The PC advances by **1**, not by 4, because the memory is word-addressed. A
taken branch is `PC ← PC + sext(BR)`, and the branch adder takes the PC register directly.
BEQ compares RT with RS on the ALU's comparator. PCSrc is `branch & Z`.

### Memory size

The memory has 32-bit address ports, and the full design has 2³² words. The
storage depth is the parameter `MEM_AW`, which defaults to **28**
(2²⁸ words, 1 GiB). Only the low `MEM_AW` address bits select a word, so higher
addresses wrap around. 28 is the largest size that the tools accept:
- Verilator refuses arrays of 2²⁹ words or more.
- The slang front end refuses objects over 2³¹ bytes.
- At 2³², Verilator silently sizes the array wrongly.

Set `MEM_AW` lower for faster simulation. The memory testbench uses 6.
Synthesis of the full 2²⁸-word array needs tens of GiB in yosys. A real
implementation would use a memory macro or an external RAM behind this
interface.

## Interface of the top (`sc_system`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `rst` | in | 1 | reset, sampled on falling edges |
| `clk` | out | 1 | clock generated inside |
| `pc`, `instr` | out | 32 | instruction being executed |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | 1, 5, 32 | register write committed at the end of this cycle |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | out | 1, 32, 32 | store committed at the rising edge of this cycle |

There is no program-load port. Place the program in `u_mem.mem[]` before
releasing reset, either with hierarchical assignments from a testbench (as
`tb_sc_system` does) or with `$readmemh` on that array.

## Verification

Every block has a self-checking testbench `tb/tb_<module>.sv`. The exceptions are
`subtractor32` and `comparator32`, which are tested through `tb_alu`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_clock_gen`: measures 20 high and low intervals. Each must be 5 units long.
- `tb_dual_port_mem`: uses 64 words. For port 1, then port 2, it writes
  `1010…10` to every location, waits 20 units and reads the word back. It
  repeats this with a distinct value per address to catch aliasing. It also
  checks cross-port reads, OE and CS gating, write-on-rising-edge timing,
  simultaneous writes and address wrap.
- `tb_mem_full_size`: the same write, wait and read-back procedure on the
  memory at its default 2²⁸-word size. It covers both ends of the address
  range, every address line and 20 000 random addresses on each port. A sweep
  of all 2²⁸ words would take hours.
- `tb_reg_file`, `tb_pc_reg`, `tb_if_unit`: compare against a software model.
  They check that writes happen on the falling edge and never on the rising
  edge. `tb_if_unit` also checks forward and backward branches.
- `tb_alu`, `tb_control_unit`, `tb_adder32`, `tb_mux2`: check against values
  computed in the testbench, over all codes and random operands.
- `tb_sc_core`: the core plus a 1024-word memory, run in lockstep with an
  instruction-set model (`tb/tb_sc_pkg.sv`). At each falling edge it compares
  the PC, the instruction, the register write and the store. It first runs a
  directed program, which must reach its final instruction in exactly 30
  cycles (one instruction per cycle), and checks the computed values. It then
  runs 20 random programs that fill memory with random instructions and data.
  It counts every instruction kind, taken, not-taken and backward branches,
  and no-ops, and fails if any of them never occurred.
- `tb_sc_system`: the same checks, with 4 random programs, end to end on the top with **all
  parameters at their defaults** (2²⁸-word memory). It runs in a few seconds.

Run one with plain Verilator, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/sc_pkg.sv tb/tb_sc_pkg.sv tb/tb_sc_system.sv --top-module tb_sc_system
./obj_dir/Vtb_sc_system
```

For block testbenches that do not use `tb_sc_pkg`, leave that file out.

## Where the design made its own choices

These points are not fixed by the instruction-set definition and were
decided here:
- Combinational memory and register-file reads (see above).
- The extension of each constant: IDX zero, IMM zero, BR sign.
- The branch base is the BEQ's own address.
- The PC steps by 1 per instruction, because the memory is word-addressed.
- Undefined opcodes act as no-ops.
- There is no zero register.
- Reset is synchronous on the falling edge, and the PC resets to 0.
- Data ports are split into separate input and output buses instead of
  bidirectional buses.
- When both ports write one word on one edge, port 2 wins.
- A port that is not reading outputs 0.
- How the register read ports are routed (RT always on port A).
- How the control word is encoded.
- `MEM_AW` = 28 instead of the full 2³² words.
