# Single-cycle Y86-64 processors in SystemVerilog

Y86-64 is a small 64-bit teaching instruction set modelled on x86-64. It has
15 registers, three condition flags, and twelve instruction kinds: moves,
four ALU operations, jumps, conditional moves, call/ret and push/pop. This RTL
implements **SEQ**, the sequential Y86-64 processor. SEQ executes one whole
instruction per clock cycle. Between the state elements, all logic is
combinational:

- the PC register;
- the register file;
- the condition-code register;
- the status register;
- memory.

An instruction's effects are computed during the cycle. They all land at the
rising edge that ends it.

SEQ is the last of a series of processors, each a little larger than the one
before. Four earlier steps are included as working processors of their own:

| module        | runs                                                 | idea it adds                                   |
|---------------|------------------------------------------------------|------------------------------------------------|
| `nophalt_cpu` | `nop`, `halt`                                        | PC register + incrementer, status register      |
| `addq_cpu`    | `addq`                                               | register file: read in the cycle, write at its end |
| `addnop_cpu`  | `addq`, `nop`                                        | multiplexers chosen by the opcode               |
| `mov_cpu`     | `rrmovq`, `irmovq`, `rmmovq`, `mrmovq` (+ nop, halt) | data memory, multiplexers on write inputs       |
| `seq_cpu`     | the whole Y86-64 instruction set                     | six stages, control multiplexers by `icode`     |

The top module `y86_cpus` holds one of each, side by side. They share only the
clock and reset.

## Instruction encoding

The first byte is `icode:ifun`, with `icode` in the upper nibble. If a register
byte follows, it is `rA:rB`, with `rA` in the upper nibble. An 8-byte
little-endian constant may follow after that. Register number `0xF` means "no
register".

| icode | instruction        | bytes | layout                     |
|-------|--------------------|-------|----------------------------|
| 0     | `halt`             | 1     | `00`                       |
| 1     | `nop`              | 1     | `10`                       |
| 2     | `rrmovq`/`cmovXX`  | 2     | `2 fn rA rB`               |
| 3     | `irmovq V, rB`     | 10    | `3 0 F rB V`               |
| 4     | `rmmovq rA, D(rB)` | 10    | `4 0 rA rB D`              |
| 5     | `mrmovq D(rB), rA` | 10    | `5 0 rA rB D`              |
| 6     | `OPq rA, rB`       | 2     | `6 fn rA rB` (add, sub, and, xor) |
| 7     | `jXX Dest`         | 9     | `7 fn Dest`                |
| 8     | `call Dest`        | 9     | `80 Dest`                  |
| 9     | `ret`              | 1     | `90`                       |
| A     | `pushq rA`         | 2     | `A 0 rA F`                 |
| B     | `popq rA`          | 2     | `B 0 rA F`                 |

Condition codes (`fn` of `jXX` and `cmovXX`): 0 always, 1 le, 2 l, 3 e, 4 ne,
5 ge, 6 g. `%rsp` is register 4. The encoding is the standard Y86-64 one, so
machine code from the usual Y86-64 assembler runs unchanged.

## One SEQ cycle

The instruction moves through six conceptual stages. Each stage is only a
group of combinational logic, and each produces a few named values.

| stage      | what happens                                                        | produces       | module |
|------------|---------------------------------------------------------------------|----------------|--------|
| fetch      | read 10 bytes at PC; split them; compute the length                 | `icode ifun rA rB valC valP` | `seq_fetch` |
| decode     | read two registers                                                  | `valA valB`    | `seq_decode`, `y86_regfile` |
| execute    | ALU operation; OPq sets new condition codes; evaluate the condition | `valE Cnd`     | `seq_execute` (`y86_alu`, `y86_cond`) |
| memory     | read or write data memory                                           | `valM`         | `seq_memctl`, `y86_memory` |
| write back | `R[dstE] <- valE`, `R[dstM] <- valM`                                 |                | `seq_decode`, `y86_regfile` |
| PC update  | choose the next PC                                                  | `new_pc`       | `seq_pc_update` |

`valP` is PC plus the instruction length. `valC` is the constant. It starts at
byte 2 when there is a register byte, and at byte 1 otherwise.

Take `pushq %rax` as an example. The instruction is read at the start of the
cycle. At the rising edge that ends the cycle, three things change together:

- memory at `%rsp-8` gets `%rax`;
- `%rsp` becomes `%rsp-8`;
- the PC becomes `valP`.

No stage "happens first" in the state. Only the combinational values settle in
stage order.

## The control multiplexers

Almost all of SEQ's design work is choosing, per instruction, what feeds each
unit. These choices are what the reader most needs in order to change the
processor. Each choice is a multiplexer controlled by `icode`.

**Register numbers** (`seq_decode`). Reading `rA`/`rB` always does not work for
the stack instructions, which need `%rsp`.

| instruction        | srcA | srcB | dstE            | dstM |
|--------------------|------|------|-----------------|------|
| halt, nop, jXX     | –    | –    | –               | –    |
| irmovq             | –    | –    | rB              | –    |
| rrmovq / cmovXX    | rA   | –    | rB if Cnd, else – | –  |
| mrmovq             | –    | rB   | –               | rA   |
| rmmovq             | rA   | rB   | –               | –    |
| OPq                | rA   | rB   | rB              | –    |
| call, ret          | –    | %rsp | %rsp            | –    |
| pushq              | rA   | %rsp | %rsp            | –    |
| popq               | rA   | %rsp | %rsp            | rA   |

"–" is register `0xF`. It reads as 0, and writing it does nothing. A
conditional move that fails turns itself into a no-op by setting `dstE` to
`0xF`. popq is the one instruction that uses both write ports. When `dstE ==
dstM` (`popq %rsp`), port M wins, so `%rsp` ends up holding the popped value.

**ALU inputs** (`seq_execute`). The ALU computes `aluB OP aluA`.

| instruction     | aluA | aluB | op   |
|-----------------|------|------|------|
| rrmovq/cmovXX   | valA | 0    | add  |
| irmovq          | valC | 0    | add  |
| rmmovq, mrmovq  | valC | valB | add  |
| OPq             | valA | valB | ifun |
| call, pushq     | −8   | valB | add  |
| ret, popq       | +8   | valB | add  |

**Memory** (`seq_memctl`):

- Reads: mrmovq, popq, ret.
- Writes: rmmovq, pushq, call.
- The address is `valE`, except for popq and ret. These read at the old stack
  pointer, `valB`.
- The write data is `valA`, except for call. call writes its return address,
  `valP`.

**Next PC** (`seq_pc_update`):

- call: `valC`.
- jXX: `valC` if `Cnd` holds, else `valP`.
- ret: `valM`.
- Every other instruction: `valP`.

## Conditions

`y86_cond` picks one test of the flags (ZF, SF, OF) according to `ifun`. The
signed tests use `SF ^ OF`:

- le is `(SF ^ OF) | ZF`;
- l is `SF ^ OF`;
- e is `ZF`, ne is `!ZF`, ge is `!(SF ^ OF)`, g is `!(SF ^ OF) & !ZF`.

Simplified presentations write le as `SF | ZF`, which leaves out overflow.
With that version, `subq` of two values whose difference overflows would give
the wrong answer. This design uses the full Y86-64 definition. Only OPq writes
the condition codes, and it writes all three. OF is set only by add and sub
that overflow.

## Memory

Conceptually there is an instruction memory and a data memory. But in Y86-64,
as in most real machines, a write to data address X changes what is later
fetched from X. So `y86_memory` is one byte array with two ports:

- an instruction port that reads 10 bytes combinationally;
- a data port that reads 8 bytes combinationally and writes 8 bytes at the
  clock edge.

Both are little-endian. A store is therefore seen by the very next fetch of
those bytes, and the testbenches check this. The size is `MEM_BYTES` (default
8192). Memory is not reset.

## Status and stopping

`seq_stat` classifies each instruction, in this order of priority:

1. **ADR**: the 10 instruction bytes, or the data word, fall outside memory.
2. **INS**: unknown `icode`, or an `ifun` that the `icode` does not have.
3. **HLT**: a `halt` instruction.
4. **AOK**: anything else.

The status register starts at AOK. It takes the status of each executed
instruction until it leaves AOK, and then it keeps that value. The signal
`run` means "status register AOK and this instruction AOK". `run` gates every
state write: PC, registers, condition codes, and the memory write (via
`dcommit`). So the instruction that stops the processor changes nothing, and
the PC stays pointing at it. Only `rst` restarts the processor.

Encodings: AOK=1, HLT=2, ADR=3, INS=4.

## Timing, reset and interfaces

- **Clock and reset.** There is one clock. All state changes at its rising
  edge. `rst` is synchronous and active high. It sets the PC and registers to
  0, the condition codes to Z=1 S=0 O=0, and the status to AOK.
- **Throughput.** Each processor completes exactly one instruction per cycle
  while running. `retire` is high in each such cycle.
- **Outputs.** The processors bring out their architectural state: `pc`,
  `stat`, `cc`, and `regs` (an unpacked array of 15 words).
- **Loading programs.** Programs are loaded by writing the memory array through
  the hierarchy, for example `dut.u_seq.u_mem.mem[i] = byte;`. There is no
  loader port.
- **Critical path.** The longest combinational path runs from the PC through
  the memory, fetch, register read, ALU, data-memory read and PC multiplexer.
  This is SEQ's known weakness, and the reason pipelined designs exist.

## The smaller processors

- **`nophalt_cpu`.** Every instruction it knows is one byte, so the PC always
  adds 1. The opcode selects AOK, HLT or INS as the next status value. Once the
  status is not AOK, the PC and status freeze. This stands in for the
  simulator stopping the clock.
- **`addq_cpu`.** Every instruction is taken to be `addq rA, rB`, so the PC
  adds 2. `R[rB] <- R[rA] + R[rB]`. It has no status register and no opcode
  check, and it runs until stopped from outside. Since registers reset to 0, it
  only does something useful after registers have been preloaded.
- **`addnop_cpu`.** This is the addq processor plus `nop`. It needs exactly
  two multiplexers, both chosen by the opcode. The PC input takes PC + 1 for
  nop and PC + 2 for addq. The write register number is `0xF` for nop, so a
  nop writes nothing. Any opcode other than nop runs as addq.
- **`mov_cpu`.** The four moves all place `rA`, `rB` and the constant in the
  same bytes. So the register file always reads `R[rA]` and `R[rB]`, and
  multiplexers pick:
  - which register is written: `rB` for irmovq/rrmovq, `rA` for mrmovq;
  - which value is written: `R[rA]`, `V`, or memory;
  - the instruction length.

  One adder forms `R[rB] + D`. nop, halt and the status logic were added so that
  programs can end.

## Departures and choices

These points are choices made in this design, beyond the Y86-64 instruction
set itself:

- **Memory.** Memory size is 8192 bytes. Memory is shared by fetch and data
  access. A fetch needs all 10 bytes in range, even for a short instruction
  near the end of memory.
- **Stopping.** A stopping instruction has no effect, and the PC stays on it.
- **Fetch errors.** On an instruction-fetch error, fetch substitutes a
  one-byte nop so that nothing downstream acts on the bytes.
- **Register 0xF.** It reads as 0.
- **Conditions.** The le/l conditions include OF, as explained above.
- **Stop in the small processors.** The nop/halt and mov processors freeze on
  a stop.
- **mov processor.** Its datapath is this design's own. Only its instruction
  layouts are given in the series.

## Files

```
rtl/y86_pkg.sv        types and codes: icode_t, alufun_t, cond_t, stat_t, cc_t
rtl/y86_cpus.sv       top: the five processors side by side
rtl/seq_cpu.sv        SEQ processor
rtl/seq_fetch.sv      fetch: split, length, valC, valP, validity
rtl/seq_decode.sv     srcA/srcB/dstE/dstM selection
rtl/y86_regfile.sv    15 x 64-bit register file, 2 read + 2 write
rtl/seq_execute.sv    ALU input selection, CC register, Cnd
rtl/y86_alu.sv        add/sub/and/xor with flags
rtl/y86_cond.sv       condition evaluation
rtl/seq_memctl.sv     data memory control
rtl/seq_pc_update.sv  next-PC selection
rtl/seq_stat.sv       status classification, status register, run enable
rtl/y86_memory.sv     shared byte memory, instruction and data ports
rtl/nophalt_cpu.sv    nop/halt processor
rtl/addq_cpu.sv       addq processor
rtl/addnop_cpu.sv     addq + nop processor
rtl/mov_cpu.sv        mov processor
tb/tb_<module>.sv     one self-checking testbench per module
tb/y86_model.svh      assembler, instruction-level reference model, test programs
```

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
For example, the end-to-end test of the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/y86_pkg.sv tb/tb_y86_cpus.sv --top-module tb_y86_cpus -o sim
./obj_dir/sim
```

Replace `tb_y86_cpus` with any other `tb_<module>` to test that module. The
package must be listed first. The tests finish in well under a second.

To run your own program on SEQ, assemble it into `img` using the `a_*`
functions in `tb/y86_model.svh`, or write bytes directly into
`u_mem.mem`. Then release reset and wait for `stat` to leave AOK.

## How it is verified

- **`tb_seq_cpu` and `tb_y86_cpus`.** These compare the SEQ processor, cycle by
  cycle, against an independent instruction-level interpreter (`y86_model.svh`).
  Every cycle they compare PC, all registers, condition codes and status. At
  the end they compare all of memory and check that cycles equal instructions.
  The test programs are:
  - a directed program that uses every instruction, every condition in both
    outcomes, call/ret, a store into the instruction stream, and `popq %rsp`;
  - programs that stop on INS, on a data ADR and on a fetch ADR;
  - random programs.

  A mechanism that never occurs counts as a failure. `tb_y86_cpus` runs all
  five processors at their default sizes.
- **Unit testbenches.** Each module has one. It checks the module against
  values computed independently in the testbench: tables of lengths and
  register choices, 65-bit reference arithmetic for the ALU flags, a shadow
  register file and a shadow memory.
- **Fault checks.** Each testbench has been run against a deliberately broken
  copy of its module and fails on it. Examples of the breaks: subtraction
  operands swapped, le without OF, port E winning a write collision, jumps
  always taken.

The reference interpreter follows the same choices as the RTL for the cases
Y86-64 leaves open: where the PC stops, and the 10-byte fetch rule. It is
therefore not an independent check of those choices.
