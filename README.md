# Hazard handling in a five-stage Y86-64 pipeline

A pipelined processor overlaps instructions: while one writes back its
result, the next four are in memory, execute, decode and fetch. That works
until an instruction needs something that an older instruction has not
produced yet: a register value (data hazard), or the address of the next
instruction (control hazard). This RTL implements the classic answers to
these hazards on a 5-stage Y86-64 processor:

| hazard | remedy | cost |
|---|---|---|
| ALU result needed by a later instruction | forwarding into decode | none |
| loaded value needed by the very next instruction (`mrmovq`/`popq` + use) | stall one cycle, then forward | 1 cycle |
| conditional jump (`jXX`) | predict taken, check in execute, squash the two wrong instructions | 2 cycles on a misprediction |
| `ret` | stop fetching until the return address has been read from memory | 3 cycles |

Apart from these penalties, one instruction completes every cycle.

The design also contains a second, much smaller pipeline: it runs only
`addq rA, rB` and shows forwarding on its own. The two pipelines sit side
by side in the top module `pipe_hazards_top` and share only the clock and
reset.

## The building block: a register with three modes

Every pipeline register, from the PC register to the writeback register, is
an instance of `pipe_reg`. On each clock edge it does one of three things:

* **normal**: it loads the value the stage in front of it computed;
* **stall** (`stall=1`): it keeps its old value, so the instruction in it
  stays where it is;
* **bubble** (`bubble=1`): it loads a fixed default value that means "no
  instruction". For the decode register this is `icode = NOP`,
  `rA = rB = 0xF`, where register number `0xF` means "no register".

Reset also loads the default, so a reset pipeline holds only bubbles. All
hazard handling below is expressed as stall and bubble signals for these
registers. Setting both signals on one register is a control error: an
assertion reports it, and stall wins.

Example: take an 8-bit register with default `0xFF`, fed the values 0x01,
0x02, … in successive cycles. With stall in cycles 1, 6 and 7 and bubble in
cycle 3, it holds 0xFF, 0x01, 0x01, 0x03, 0xFF, 0x05, 0x06, 0x06, 0x06.
`tb_pipe_reg` checks exactly this sequence.

## The five-stage processor (`pipe_cpu`)

```
      F            D              E              M              W
  [predPC] -> fetch -> [D] -> decode -> [E] -> execute -> [M] -> memory -> [W] -> writeback
               imem          regfile read      ALU, CC          dmem          regfile write
                             forwarding MUXes
```

| register | holds (struct in `y86_pkg`) |
|---|---|
| F | predicted PC |
| D | stat, icode, ifun, rA, rB, valC (constant), valP (address of next instruction) |
| E | stat, icode, ifun, valC, valA, valB, dstE, dstM, srcA, srcB |
| M | stat, icode, Cnd (condition held), valE (ALU result), valA, dstE, dstM |
| W | stat, icode, valE, valM (loaded value), dstE, dstM |

`stat` is `AOK` for a real instruction, `BUB` for a bubble, and `HLT` or
`INS` for a halt or an invalid instruction. The stages are combinational
modules (`fetch_stage`, `decode_stage`, `execute_stage`, `memory_stage`).
`hazard_unit` computes every stall and bubble signal. The state is in the
five pipeline registers, the register file (`regfile`), the condition codes
(in `execute_stage`), and separate instruction and data memories (`imem`,
`dmem`).

### Forwarding

The register file is written at the clock edge that ends writeback, and it
is read in decode. Without help, an instruction would see a register's new
value only three cycles after the instruction that produces it. But by the
time a value is needed it usually exists somewhere in the pipeline already.
`decode_stage` therefore puts a MUX in front of each operand of the E
register. The MUX compares the operand's source register with the
destinations of the instructions further ahead. The youngest match wins:

1. `e_valE`: the ALU result being computed in execute right now;
2. `m_valM`: the value being read from memory right now;
3. `M_valE`: an ALU result in the memory register;
4. `W_valM`: a loaded value in the writeback register;
5. `W_valE`: an ALU result in the writeback register;
6. otherwise, the register-file output.

For `call` and `jXX`, operand A is `valP` instead: the return address, or
the fall-through address kept for recovery from a wrong prediction. A source
of `0xF` never matches. The order matters. In `addq %r10,%r8; addq %r11,%r8;
addq %r12,%r8`, the third instruction must take `%r8` from the second
instruction (in execute), not from the first (in memory).

A loaded value exists only at the end of the memory stage. The instruction
right behind a load would need it during its own decode, which is one cycle
too early. That case is handled as a load/use stall, described below.

### Load/use stall (1 cycle)

If execute holds an `mrmovq` or `popq` whose destination (`E_dstM`) is a
source of the instruction in decode, then:

* the F and D registers stall, so the dependent instruction is decoded again;
* E receives a bubble.

One cycle later the load is in memory and its value `m_valM` is forwarded.

### Conditional jumps: predict taken, squash on a miss (2 cycles)

Fetch always assumes that a `jXX` is taken and continues at its target. The
condition is evaluated in execute, using the flags that earlier `OPq`
instructions set there. If the jump turns out not taken
(`E_icode == JXX && !e_Cnd`), then:

* D and E receive bubbles, which discards the two target-path instructions
  that were fetched in the meantime;
* in the next cycle the jump is in memory, and fetch takes its fall-through
  address (`M_valA`) instead of the predicted PC.

A squashed instruction never reaches execute, so it cannot change the
condition codes or write anything. Timeline for
`subq %r8,%r8; jne L; xorq …` with `L: addq …; rmmovq …`:

| cycle | fetch | decode | execute | memory | writeback |
|---|---|---|---|---|---|
| 1 | subq | | | | |
| 2 | jne | subq | | | |
| 3 | addq (guess) | jne | subq sets ZF | | |
| 4 | rmmovq (guess) | addq (guess) | jne reads ZF: not taken | subq | |
| 5 | xorq | bubble | bubble | jne | subq |

### ret (3 cycles)

`ret` reads its return address from the stack in the memory stage, so
nothing useful can be fetched until the `ret` has left memory. Two
conditions, straight from the design's control equations, handle this:

```
need_ret_stall  = icode_from_imem == RET || D_icode == RET || E_icode == RET   -> stall F
need_ret_bubble = D_icode == RET || E_icode == RET || M_icode == RET           -> bubble D
```

While the `ret` is in decode, execute and memory, three bubbles enter
decode. When it reaches writeback, fetch takes the return address from
`W_valM`:

| cycle | fetch | decode | execute | memory | writeback |
|---|---|---|---|---|---|
| 0 | call | | | | |
| 1 | ret | call | | | |
| 2 | (waits) | ret | call | | |
| 3 | (waits) | bubble | ret | call stores | |
| 4 | (waits) | bubble | bubble | ret loads | call |
| 5 | addq | bubble | bubble | bubble | ret |

### When hazards coincide

* **Load/use and a `ret` in decode** (a load into `%rsp` right before
  `ret`): the stall of D takes priority over the ret bubble, otherwise the
  `ret` would be lost. The two penalties add up to 1 + 3 cycles.
* **A `ret` fetched or decoded on a mispredicted path**: it stalls the PC
  register and bubbles D. This is harmless, because the squash removes it
  and fetch is redirected from the memory stage anyway.
* **halt**: a `halt` (or an invalid instruction) predicts its own address,
  so fetch keeps returning halts behind it. When it reaches writeback, every
  register stalls and `halted` rises. Data-memory writes are also blocked
  from then on.

The testbenches check the whole cost model. Between the first and the last
retirement of a program, the cycle count must equal
`instructions + 3·rets + 2·not-taken jXX + load/use pairs`.

## The addq-only pipeline (`addq_pipe`)

This pipeline executes nothing but `addq rA, rB` (2 bytes,
`R[rB] <- R[rA] + R[rB]`). It has four registers:

| register | holds | stage behind it |
|---|---|---|
| `xF` | pc | fetch: pc + 2, split rA/rB |
| `fD` | rA, rB | decode: read R[rA], R[rB], dstE = rB |
| `dE` | valA, valB, dstE | execute: valE = valA + valB |
| `eW` | valE, dstE | writeback: R[dstE] <- valE |

Preset `R[i] = 100·i` and run `addq %r8,%r9; addq %r9,%r8; addq %r10,%r9`.
The second instruction reads `%r9` while the first one's sum (1700) is still
being computed in execute. The third instruction reads `%r9` while that sum
is in the writeback register and not yet in the register file. Two forwarding
MUXes take `e_valE` or `W_valE`, in that order of priority, and the results
are R9 = 1700, R8 = 2500, R9 = 2700. Nothing ever stalls. The register
file's load port is tied to `0xF` (unused).

## Instruction encoding

The Y86-64 encoding is used throughout:

* byte 0 holds `icode` (high nibble) and `ifun` (low nibble);
* byte 1, when present, holds `rA` (high nibble) and `rB` (low nibble);
* constants are 8-byte little-endian words.

`imem` returns ten bytes at once as `i10bytes`, with the byte at the PC in
bits 7:0, so `rA = i10bytes[15:12]` and `rB = i10bytes[11:8]`. These are the
supported instructions:

| icode | instruction | bytes |
|---|---|---|
| 0 | halt | 1 |
| 1 | nop | 1 |
| 2 | rrmovq / cmovXX | 2 |
| 3 | irmovq | 10 |
| 4 | rmmovq | 10 |
| 5 | mrmovq | 10 |
| 6 | addq, subq, andq, xorq | 2 |
| 7 | jmp / jXX | 9 |
| 8 | call | 9 |
| 9 | ret | 1 |
| A | pushq | 2 |
| B | popq | 2 |

Conditions are encoded as `ifun` 0 = always, 1 le, 2 l, 3 e, 4 ne, 5 ge,
6 g. Registers 0–14 are `%rax %rcx %rdx %rbx %rsp %rbp %rsi %rdi %r8`–`%r14`.

## Interfaces and timing

All logic is clocked on the rising edge. Reset is synchronous and active
high.

**`pipe_cpu`**

* `imem_we/imem_waddr/imem_wdata`: write one program byte per clock. Load
  the program while reset is held.
* After reset is released, fetch starts at address 0 and the first
  instruction retires four cycles later.
* `retire`: pulses for each completed instruction, the final halt included.
* `halted`, `status`: report the stop.
* `dbg_reg`/`dbg_val`: read any register combinationally.
* The data memory is not reset.

**`addq_pipe`**

* It has the same program port.
* It adds `reg_init_*`, which writes one register per clock. The register
  file of this pipeline is not cleared by reset, so preset it while reset
  is held.
* `fwd_count` shows which operands were forwarded in the current cycle.

**`pipe_hazards_top`**

* It brings out both sets of ports, prefixed `cpu_` and `addq_`.
* `IMEM_BYTES` and `DMEM_BYTES` set the memory sizes (default 1024 each).
  Addresses wrap modulo the size.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. A
testbench that uses the Y86-64 helpers needs `tb/y86_tb_pkg.sv`. For
example:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/y86_pkg.sv tb/y86_tb_pkg.sv rtl/*.sv tb/tb_pipe_hazards_top.sv \
  --top-module tb_pipe_hazards_top -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_pipe_hazards_top` | whole design at default sizes. One program with a call/ret, a mispredicted jne, a load/use pair, every forwarding source and a loop, next to the addq forwarding example. It checks registers and the exact cycle count, and requires each mechanism to occur. |
| `tb_pipe_cpu` | the processor on the hazard examples (ret after call, mispredicted jne, forwarding chains, load/use, push/pop including `popq %rsp`, a loop) and 30 random programs. Each is checked against an instruction-level reference model (`y86_tb_pkg`) for final registers, retired count and cycle count. |
| `tb_addq_pipe` | the 1700/2500/2700 example, checked in the cycle each value is written, plus 500-instruction random programs |
| `tb_pipe_reg`, `tb_regfile`, `tb_imem`, `tb_dmem`, `tb_fetch_stage`, `tb_decode_stage`, `tb_execute_stage`, `tb_memory_stage`, `tb_hazard_unit` | each unit against directed cases and an independent model |

To write programs for the processor, use the `emit_*` functions in
`tb/y86_tb_pkg.sv`. `ref_run` gives the expected final state.

## What follows the original design and what was chosen here

Taken from the original lecture design:

* the five stages and their pipeline registers, and the normal/stall/bubble
  register model with no-op defaults;
* the contents of the addq pipeline's registers;
* the forwarding MUX in front of the decode/execute register, and its first
  conditions (`e_dstE → e_valE`, then the memory stage);
* taken-branch prediction, and squashing by bubbling D and E when execute
  finds a misprediction;
* the `ret` stall and bubble equations;
* the load/use rule;
* the penalties of 1, 2 and 3 cycles.

Chosen here:

* **Instruction encodings** other than the addq register fields, and the
  operand, flag and condition rules. These are standard Y86-64.
* **The full forwarding list and its priority**: the original gives only
  the first entries explicitly.
* **Writeback timing**: register-file writes happen at the end of
  writeback, which makes the writeback forwarding paths necessary.
* **`halt`/invalid handling and the freeze at halt.** The original does not
  cover these.
* **Memory organisation**: separate instruction and data memories of 1024
  bytes each, with combinational reads and wrap-around addressing. No
  memory-address exceptions are raised.
* **Priority of the load/use stall over the ret bubble.**
* **Register-file behaviour**: reset clears it, the dstM write wins a
  collision, and the preset/debug ports exist for testing.
* **A figure/equation mismatch at the end of a `ret` stall.** A figure of the
  `ret` timeline marks the PC register as loading normally in the cycle
  where the `ret` is in memory. The `need_ret_stall` equation, which is
  implemented, stalls it there if fetch is still reading the `ret`. Either
  way fetch takes the return address from writeback in the next cycle, so
  the timing is identical.
