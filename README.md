# Single-cycle Y86-64 processors

A single-cycle processor finishes one instruction per clock cycle. The rising
edge loads a new PC. Everything else then happens combinationally before the
next edge: the instruction is fetched, registers are read, the ALU computes,
and data memory is read. Every write (the PC, the registers, the condition
codes, a memory store) happens together at that next edge. So the only state
is a few clocked elements, and each instruction is just a setting of the
multiplexers between them.

This RTL builds that idea for the Y86-64 instruction set as a series of
machines. Each one adds a little to the one before:

| module        | executes                                     | state it uses                         |
|---------------|----------------------------------------------|---------------------------------------|
| `counter`     | no instructions: an add-1 unit feeding a register | count register                   |
| `nop_cpu`     | every byte as `nop`; never stops             | PC, instruction memory                |
| `nophalt_cpu` | `nop`, `halt`                                | + status register                     |
| `nopjmp_cpu`  | `nop`, `jmp`, `halt`                         | same                                  |
| `add_cpu`     | every instruction as `add rA, rB`            | + register file, ALU                  |
| `mov_cpu`     | `rrmovq`, `irmovq`, `rmmovq`, `mrmovq`, `halt` | + data memory                       |
| `seq_cpu`     | the full Y86-64 set                          | + condition codes (ZF, SF)            |

`y86_seq_top` puts all seven side by side. They share only the clock and the
reset. Each machine has its own memories, its own program-load port, and its
own PC and status outputs.

## Instruction encoding and fetch

Instructions are 1 to 10 bytes long. The instruction memory always returns
the ten bytes at the PC as one 80-bit little-endian number, `i10bytes`. Bit 0
of that number is the least significant bit of the byte at the PC. Shorter
instructions just ignore the upper bits. The fields are:

| bits of `i10bytes` | field | meaning                                        |
|--------------------|-------|------------------------------------------------|
| 7:4                | icode | instruction (0 halt, 1 nop, 2 rrmovq/cmovXX, 3 irmovq, 4 rmmovq, 5 mrmovq, 6 OPq, 7 jXX, 8 call, 9 ret, A pushq, B popq) |
| 3:0                | ifun  | ALU function of OPq, or condition of jXX/cmovXX |
| 15:12              | rA    | first register (byte 1, high nibble)           |
| 11:8               | rB    | second register (byte 1, low nibble)           |
| 79:16              | V / D | constant or displacement of irmovq, rmmovq, mrmovq |
| 71:8               | Dest  | target of jXX and call                         |

Register number 0xF means "no register". For example,
`irmovq $0x1234, %r8` is `30 F8 34 12 00 00 00 00 00 00`, and
`rmmovq %r8, 0x1234(%r9)` is `40 89 34 12 00 00 00 00 00 00`.
`y86_pkg::decode()` splits a fetched word into these fields.

The instruction lengths are: 1 byte for halt, nop and ret; 2 bytes for
rrmovq, OPq, pushq and popq; 9 bytes for jXX and call; 10 bytes for irmovq,
rmmovq and mrmovq.

## The SEQ datapath (`seq_cpu`)

This is the most complete machine, and the one most worth reading. Within one
cycle:

1. **Fetch.** Decode `i10bytes` at the PC. `valP` is the PC plus the length
   of the instruction.
2. **Decode.** Read two registers. `srcA` is rA, or `%rsp` for popq and ret.
   `srcB` is rB, or `%rsp` for pushq, popq, call and ret. The values are
   `valA` and `valB`.
3. **Execute.** The ALU computes `valE = aluB op aluA`. The op is the ifun of
   OPq, and add for every other instruction. The condition `cnd` is evaluated
   from the ZF and SF flags.
4. **Memory.** At most one 64-bit access. Its address is `valE`, except that
   popq and ret read at `valA` (the old `%rsp`). Its result is `valM`.
5. **PC.** Select the next PC.

The six multiplexers that make one instruction different from another:

| MUX      | selects                                                              |
|----------|----------------------------------------------------------------------|
| `PC`     | `valP`; `valC` for call and for a taken jXX; `valM` for ret          |
| `dstE`   | rB for rrmovq (only if `cnd`), irmovq and OPq; `%rsp` for pushq, popq, call and ret |
| `dstM`   | rA for mrmovq and popq                                               |
| `aluA`   | `valA` for rrmovq and OPq; `valC` for irmovq, rmmovq and mrmovq; −8 for pushq and call; +8 for popq and ret |
| `aluB`   | `valB` for OPq, rmmovq, mrmovq, pushq, popq, call and ret; 0 otherwise |
| `dmemIn` | `valA` for rmmovq and pushq; `valP` for call                         |

Three cases show how the MUXes work:

- `addq %r8, %r9`: aluA = R[r8], aluB = R[r9], dstE = r9, PC = valP. No
  memory access.
- `rmmovq rA, D(rB)`: aluA = D, aluB = R[rB], memory address = valE,
  dmemIn = R[rA]. No register is written.
- `call Dest`: aluA = −8, aluB = R[%rsp], dstE = %rsp, memory address = valE,
  dmemIn = valP (the return address), PC = Dest.

**Condition codes.** There are only two: ZF and SF, held in a two-bit
register bank. Only OPq sets them. There is no overflow flag. The conditions
(ifun 0 to 6) are:

- 0: always
- 1 `le`: SF | ZF
- 2 `l`: SF
- 3 `e`: ZF
- 4 `ne`: !ZF
- 5 `ge`: !SF
- 6 `g`: !SF & !ZF

Because there is no overflow flag, `l` and `g` are wrong when a subtraction
overflows. After reset, ZF = 1 and SF = 0.

**popq %rsp.** Both write ports name `%rsp`. The register file lets the M
port win, so `%rsp` ends up holding the value that was popped.

## The smaller machines

- **`nop_cpu`** is a PC register with an add-1 feedback path, driving the
  instruction memory. Its status is always AOK, so it never stops.
  `i10bytes` is brought out as a port.
- **`nophalt_cpu`** reads the icode to set the status. `nop` continues,
  `halt` stops, and any other code is invalid.
- **`nopjmp_cpu`** selects the next PC: PC + 1 for nop, Dest for icode 7, and
  the marker value `0xBADBADBAD` otherwise. The jump condition is ignored.
  Run on the example program below, it halts after exactly 7 cycles:

  ```
  0x000: 10                     nop
  0x001: 70 13 00 00 00 00 00 00 00      jmp C
  0x00a: 70 1c 00 00 00 00 00 00 00   B: jmp D
  0x013: 70 0a 00 00 00 00 00 00 00   C: jmp B
  0x01c: 10                  D: nop
  0x01d: 10                     nop
  0x01e: 00                     halt
  ```
- **`add_cpu`** treats every instruction as two bytes. It adds R[rA] to
  R[rB], writes the sum to rB through the E port, and advances the PC by 2.
  Only icode 6 counts as valid; halt stops it. It cannot load a constant, so
  its registers keep their reset value of zero unless something else sets
  them. The testbenches seed them directly.
- **`mov_cpu`** uses the ALU only as an address adder (D + R[rB]).
  `rrmovq` writes R[rA] to rB through the E port. `irmovq` writes V to rB.
  `mrmovq` writes the loaded word to rA through the M port. `rmmovq` stores
  R[rA]. It also accepts `halt` so that a program can end.

## State elements and timing

| block       | read                                  | write                                   |
|-------------|---------------------------------------|-----------------------------------------|
| `reg_bank`  | `q` at any time                       | `q <= d` at the rising edge when `en`; sync reset to `INIT` |
| `reg_file`  | `reg_outputA/B = R[reg_srcA/B]`, combinational; number 15 reads 0 | `R[reg_dstE] <= reg_inputE` and `R[reg_dstM] <= reg_inputM` at the edge; number 15 is ignored; M wins a tie |
| `instr_mem` | `i10bytes` = bytes pc..pc+9, combinational | only through the load port         |
| `data_mem`  | `mem_output` = 8 bytes at `mem_addr`, in the same cycle, if `mem_readbit`; otherwise 0 | 8 bytes at the edge when `mem_writebit` |
| `stat_reg`  | `stat_q`, `running`                   | latches `stat_in` while still AOK       |

All words are 64 bits and little-endian. The registers, the PC and the flags
reset to their initial values. The memories are not reset, so a program
loader must write every byte a program can reach.

## Status and stopping

Every machine works out a status each cycle:

| code | name       | meaning                        |
|------|------------|--------------------------------|
| 1    | `STAT_AOK` | keep going                     |
| 2    | `STAT_HLT` | stopped normally by `halt`     |
| 3    | `STAT_ADR` | address out of range (`seq_cpu` only) |
| 4    | `STAT_INS` | invalid instruction            |

`stat_reg` latches the first status that is not AOK and then holds it until
reset. An instruction commits its writes only while the machine is running
*and* its own status is AOK. So the halting or faulting instruction writes
nothing, and the PC stays at it.

In `seq_cpu`, STAT_INS also covers an unknown function code (OPq above 3,
jXX or cmovXX above 6, nonzero ifun elsewhere). STAT_ADR is raised when a
fetch or a data access would go past the end of memory.

## Loading a program

Each machine has a `mem_load_t` port (`en`, 64-bit `addr`, 8-bit `data`).
Hold `rst` high, write one byte per clock into the port, then release `rst`.
Each loaded byte goes into both the instruction memory and the data memory,
so a program can also read its own constants. A store by the program changes
only the data memory; there is no self-modifying code. Execution starts at
address 0. Addresses at or past `MEM_BYTES` read as 0 and ignore writes.

## Choices made in this design

These points are this design's own choices, not part of the instruction-set
description:

- The memory size: `MEM_BYTES = 8192` in every machine. This is large enough
  that an access at displacement 0x1234 from a zero base register is inside
  memory.
- The load port.
- The synchronous reset, and resetting the registers to zero.
- The hardware stop on a non-AOK status.
- The M-over-E priority in the register file.
- The ALU function numbers (add 0, sub 1, and 2, xor 3) and the operand order
  of sub (aluB − aluA).
- The status rule of `add_cpu`.
- Accepting `halt` in `mov_cpu`.
- The STAT_ADR rule.
- In `seq_cpu`, the exact MUX settings. They follow the standard Y86-64 SEQ
  organisation.

The stall and bubble controls of register banks, which a pipelined design
would need, are not built. In every format, byte 1 holds rA in its high nibble
and rB in its low nibble. So `mrmovq 0x1234(%r9), %r8` is `50 89 34 12 ...`.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/y86_pkg.sv tb/tb_seq_cpu.sv --top-module tb_seq_cpu
./obj_dir/Vtb_seq_cpu
```

- **`tb_seq_cpu`** compares the machine, cycle by cycle, with a reference
  interpreter written in the testbench. It runs three kinds of program:
  - an array sum in a subroutine: call, ret, a loop, push and pop, cmov, and
    popq %rsp;
  - 60 random instructions with forward conditional jumps;
  - directed cases that must end in STAT_INS and STAT_ADR.
- **`tb_mov_cpu`** checks `mov_cpu` the same way, with a program built from
  the example encodings and a random program.
- **`tb_seq_mux_exercises`** checks, for `addq %r8, %r9`, `rmmovq` and
  `call`, the values that the six MUXes select, against the three cases
  listed in the SEQ datapath section.
- **`tb_y86_seq_top`** runs every machine at the top's default parameters.
  Each machine gets its own program, and the test checks final registers,
  memory, PCs, statuses and cycle counts against values worked out by hand.
  It also counts how often each mechanism happened: taken and untaken jumps
  and cmovs, call, ret, push, pop, memory reads and writes, halt stops and
  invalid-instruction stops. A mechanism that never happens counts as a
  failure.

Verilator has two states only, so the testbenches write every memory
byte before starting a program.
