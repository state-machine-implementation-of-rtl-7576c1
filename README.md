# ARC CPU with a state-machine control unit

The ARC is a small SPARC-like teaching processor. Its datapath has 32-bit
registers on three buses (A, B, C), an ALU and a memory. Every clock the
control unit must hand the datapath 24 control bits. This design builds that
control unit as an ordinary synchronous state machine. Each state stands for
one register-transfer step (for example `ir <- M[pc]`). Its outputs are fixed
for the state, apart from register numbers that may come from fields of the
instruction register. No microcode store is involved. The next state depends
on the present state and on a few decoded instruction fields.

The control unit here covers the load/store part of the instruction set: `ld`
and `st`, each with a register + immediate address or a register + register
address. All other instructions are fetched and skipped: only `pc` moves on.
The datapath, ALU and memory are complete and can take more states. Adding
branches, `call`, `sethi` and the ALU instructions means adding states to
`control_unit`.

## The control word

| bits   | field | meaning |
|--------|-------|---------|
| 23..18 | A     | register number put on the A bus (also the memory address) |
| 17..12 | B     | register number put on the B bus (also the memory write data) |
| 11..6  | C     | register number written from the C bus at the clock edge |
| 5..2   | ALU   | ALU function code |
| 1      | RD    | memory read: the C bus takes memory data instead of the ALU result |
| 0      | WR    | memory write of the B bus at the address on the A bus |

This is `arc_pkg::ctrl_word_t`. Each 6-bit register number goes through a
6-to-64 one-hot decoder (`decoder`). On A and B the decoder selects a
register onto the bus. On C it is the write enable of one register.

Register numbers: `%r0`..`%r31` are 0..31, `pc` is 32, `temp0` is 33,
`temp1`..`temp3` are 34..36 and `ir` is 37. `%r0` always reads zero. Writing
to it is how a state discards a result: every state writes some register, so
a state with nothing to store names `%r0` as C. Numbers 38..63 behave the
same way.

States follow two conventions:

* A memory state uses ALU function ADD and puts `%r0` on any bus it does not
  need. A read (`RD`) sends memory data onto the C bus. A write (`WR`) writes
  C to `%r0`.
* An ALU state that ignores the B operand puts `%r0` (number 0) on B.

## The state machine (`control_unit`)

The states keep the numbers of the state table this design was built from:
0 to 6 and 99. The state register holds that number in binary (7 bits). A
7-to-128 decoder turns it into one wire per state (`state_0`, `state_1`, ...),
just as a one-hot machine would have. The next-state logic and output logic
are sums of those wires. rs1 = IR[18:14], rs2 = IR[4:0], rd = IR[29:25] and
i = IR[13] are the usual SPARC format-3 fields.

| state | transfer | A | B | C | ALU | RD | WR | next |
|------:|----------|---|---|---|-----|----|----|------|
| 0 (fetch) | `ir <- M[pc]` | pc | r0 | ir | ADD | 1 | 0 | `mem_op` → 1, else → 99 |
| 1 | `temp0 <- sext13(ir)` | ir | r0 | temp0 | SEXT13 | 0 | 0 | i → 2, ¬i → 3 |
| 2 | no register written | temp0 | r0 | r0 | ADD | 0 | 0 | 4 |
| 3 | `temp0 <- rs2 + r0` | rs2 | r0 | temp0 | ADD | 0 | 0 | 2 |
| 4 (address) | `temp0 <- rs1 + temp0` | rs1 | temp0 | temp0 | ADD | 0 | 0 | `ld` → 5, `st` → 6, else → 99 |
| 5 (ld) | `rd <- M[temp0]` | temp0 | r0 | rd | ADD | 1 | 0 | 99 |
| 6 (st) | `M[temp0] <- rd` | temp0 | rd | r0 | ADD | 0 | 1 | 99 |
| 99 | `pc <- pc + 4` | pc | r0 | pc | INCPC | 0 | 0 | 0 |

Clocks per instruction are therefore:

* `ld`/`st` with an immediate offset: 6 (0 1 2 4 5|6 99).
* `ld`/`st` with a register offset: 7 (0 1 3 2 4 5|6 99).
* Another memory-format instruction: 5 or 6.
* Any other format: 2 (0 99).

Three points need care.

**Deciding in the fetch state.** State 0 chooses its successor with `mem_op`,
but in that same clock the instruction is still on its way from memory into
`ir`. So in state 0 the instruction decoders look at the memory read data
(`fetch_word`, which is the word being loaded into `ir`). In every other state
they look at `ir`. The decoders feed only the next-state logic, never the
outputs. This keeps the path memory → decoders → state register free of
combinational loops.

**State 2.** The source table gives states 2 and 4 the same transfer,
`temp0 <- rs1 + temp0`. Done twice, that would add rs1 to the address twice.
State 4 is the address computation, so here state 2 writes nothing. It only
joins the immediate path (1 → 2) and the register path (1 → 3 → 2). The
address is rs1 + sign-extended simm13, or rs1 + rs2, as SPARC defines it.

**Instructions without states.** Formats other than memory go from state 0
straight to 99. Memory instructions other than `ld`/`st` (for example `ldub`)
go through the address states and then to 99. Both only advance `pc`. The
condition codes are an input of the machine, but no implemented state
branches on them.

## Instruction decoders (`ir_decoders`)

The decoders are one-hot and work on the fields of the instruction:

| decoder | field | named outputs |
|---------|-------|---------------|
| format | IR[31:30] | `set_br_op` (00), `call_op` (01), `alu_op` (10), `mem_op` (11) |
| op2 | IR[24:22] | `branch` (010), `sethi` (100) |
| op3 | IR[24:19] | `ld` (000000), `st` (000100), `addcc` (010000) |
| condition | IR[28:25] | (16 outputs, for branches) |

The full one-hot vectors come out too. The present state machine uses only
`mem_op`, `ld` and `st`.

## Datapath (`arc_datapath`, `register_file`, `alu`)

* **Register file:** 38 × 32 bits; `%r0` is a constant zero. Both reads are
  combinational and the write happens at the rising edge.
* **C bus:** carries the memory read data when RD is set, otherwise the ALU
  result.
* **Condition codes:** n, z, v, c. They load only on the four `*CC`
  functions, and never during a memory read.

ALU functions. ADD = 0101, ADDCC = 0011 and SEXT13 = 1100 are the codes the
control words use. The other codes follow the common ARC function table,
except that AND sits at 1000, because ADD holds 0101 here.

| code | function | code | function |
|------|----------|------|----------|
| 0000 | ANDCC a & b | 1000 | AND a & b |
| 0001 | ORCC a \| b | 1001 | LSHIFT2 a << 2 |
| 0010 | NORCC ~(a \| b) | 1010 | LSHIFT10 a << 10 |
| 0011 | ADDCC a + b | 1011 | SIMM13 zero-extended a[12:0] |
| 0100 | SRL a >> b[4:0] | 1100 | SEXT13 sign-extended a[12:0] |
| 0101 | ADD a + b | 1101 | INC a + 1 |
| 0110 | OR a \| b | 1110 | INCPC a + 4 |
| 0111 | NOR ~(a \| b) | 1111 | RSHIFT5 a >>> 5 (arithmetic) |

ADDCC sets v on signed overflow and c on carry out. The logical `*CC`
functions clear v and c.

## Memory (`arc_memory`)

* **Size:** `WORDS` 32-bit words, 4096 by default (16 KiB).
* **Addressing:** the address is a byte address taken from the A bus. Bits
  [log2(WORDS)+1:2] select the word. The two low bits are ignored, and higher
  bits wrap around.
* **Read:** combinational, so a state can load the data into a register at the
  end of the same clock. `dout` is zero while RD is low.
* **Write:** takes place at the rising edge.
* **Timing:** every access takes exactly one clock. There is no wait or
  acknowledge handshake.
* **Asserted rules:** RD and WR are never both set. The control unit is always
  in one of its eight named states.

## Top level (`arc_cpu`)

The top connects the control unit, the datapath and the memory.

Ports:

* `clk` and `rst` (synchronous, active high). Reset clears all registers,
  including `pc`, and the condition codes, and puts the machine in state 0.
  Execution then starts at address 0.
* Observation outputs: the present `state`, the control word `ctrl`, the
  condition codes `cc` and `ir`.

Programs are placed in memory from outside. The testbench writes
`u_mem.mem[]` hierarchically before releasing reset.

## Where this design goes beyond its source, or departs from it

Its source gives the control words, the decoders and the ld/st state sequence.
The following are this design's own choices:

* State 0 decides using the word being fetched.
* State 2 writes nothing.
* Instructions without states are skipped.
* Unused state codes return to state 0.
* The ALU codes other than ADD, ADDCC and SEXT13, and AND moved to 1000.
* There are 38 registers, and numbers 38..63 hold nothing.
* The memory size, byte addressing with wrap-around, and one-clock access.
* The reset behaviour, and the observation ports of the top.

The source gives an example control word for `rd <- addcc(rs1, rs2)`
(A = rs1, B = rs2, C = rd, ALU = 0011), but no state that uses it. The
control unit therefore has no ALU-instruction states. The datapath would
execute that word as given.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_decoder` | all 64 codes of the bus decoder |
| `tb_ir_decoders` | directed and 2000 random instruction words against the field values |
| `tb_register_file` | reset, every register number, 5000 random read/write cycles against a model |
| `tb_alu` | all 16 codes by number, corner cases of carry and overflow, random operands against an independent reference |
| `tb_arc_memory` | fill and read back, random mixed traffic, wrap-around, zero output when idle |
| `tb_arc_datapath` | 6000 random control words: buses, C-bus source, `%r0`, condition-code rules |
| `tb_control_unit` | 3000+ instructions: state sequence, full control word in every state, clocks per instruction |
| `tb_arc_cpu` | whole CPU at default size (see below) |

`tb_arc_cpu` runs a hand-checked program and then a random stream of about
600 instructions (loads, stores, other memory instructions, other formats).
A reference model inside the bench executes the same program.

* At every fetch, the bench checks `pc` and the clocks the last instruction
  took.
* After the directed part, it checks the register and memory values worked
  out by hand.
* At the end, it compares all 32 registers and all 4096 memory words.
* It counts how often each mechanism occurred: fetch, the immediate path, the
  register path, ld, st, another format skipped, another memory instruction
  skipped, and a load into `%r0` discarded. It fails if any of them never
  occurred.

## Simulating

Plain Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/arc_pkg.sv tb/tb_arc_cpu.sv --top-module tb_arc_cpu
./obj_dir/Vtb_arc_cpu
```

Replace `tb_arc_cpu` with any other testbench name to run that one. Lint a
module with:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/arc_pkg.sv rtl/arc_cpu.sv
```

The remaining lint warnings are about unused signals. They are decoder
outputs that the implemented states do not need yet, and the address bits
above the memory size.

To add an instruction:

1. Add its states to `cu_state_e` in `arc_pkg`.
2. Add a `state_N` wire and its control word to `control_unit`.
3. Branch to the new states from state 0 or state 4 with the decoder output
   it needs.
