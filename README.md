# Single-cycle MIPS processor with a reversible-logic control unit

This is a 32-bit MIPS processor that runs each instruction in a single clock
cycle. Its control unit uses only *reversible* gates. A reversible gate maps its
inputs one-to-one onto its outputs, so no information is lost. The low-power
argument for reversible logic rests on that: irreversible gates lose
information, and that loss is what turns into heat. Every AND, OR and inverter
in the control unit is made from two cells, the 1x1 NOT gate and the 3x3 Toffoli
gate. The datapath around the control unit is the classic single-cycle MIPS
datapath, built from ordinary RTL.

The processor runs the R-format instructions `add`, `sub`, `and`, `or` and
`slt`, plus `lw`, `sw` and `beq`.

## The reversible cells

| module | function | lines out |
|---|---|---|
| `toffoli_gate` | P = A, Q = B, R = A·B ⊕ C | 3 |
| `rev_not_gate` | P = ¬A | 1 |
| `rev_and_gate` | Toffoli gate with C = 0, so R = A·B | A, B (garbage), A·B |
| `rev_or_gate`  | ¬A and ¬B drive a Toffoli gate with C = 1, so R = ¬A·¬B ⊕ 1 = A + B | ¬A, ¬B (garbage), A + B |
| `rev_and_n`    | N-input AND: a chain of N−1 reversible ANDs, each on a fresh 0 ancilla line; inputs marked 0 in `POLARITY` pass through a NOT gate first | result |

A Toffoli gate applied twice returns its inputs; `tb_toffoli_gate` checks this.
"Garbage" outputs are the extra lines that keep each gate one-to-one. They come
out as ports on the two-input gates. Users that do not need them leave them
open, and the lint tool's `PINCONNECTEMPTY` warnings mark those spots. In the
RTL the gates are ordinary Boolean assignments. Reversibility is a property of
how the logic is built from these cells. It is not something a simulator or a
CMOS synthesis flow can see.

## Control unit (`control_unit`)

The control unit has two levels.

**Main decoder (`main_control`).** Each of the four opcodes is recognised by a
6-input reversible AND (`rev_and_n`, 5 Toffoli gates):

| group | opcode | RegDst | ALUSrc | MemtoReg | RegWrite | MemRead | MemWrite | Branch | ALUOp |
|---|---|---|---|---|---|---|---|---|---|
| R-format | 000000 | 1 | 0 | 0 | 1 | 0 | 0 | 0 | 10 |
| lw  | 100011 | 0 | 1 | 1 | 1 | 1 | 0 | 0 | 00 |
| sw  | 101011 | 0 | 1 | 0 | 0 | 0 | 1 | 0 | 00 |
| beq | 000100 | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 01 |

ALUSrc = lw + sw and RegWrite = R + lw are reversible OR gates. Every other
output is one decode line. The usual MIPS table leaves RegDst and MemtoReg as
don't-cares for sw and beq; here they are 0. An opcode outside the four groups
gives an all-zero control word, so it runs as a no-operation.

**ALU decoder (`alu_control`).**

| ALUOp | function F3..F0 | operation |
|---|---|---|
| 00 | any | 010 (add) |
| x1 | any | 110 (subtract) |
| 1x | 0000 | 010 (add) |
| 1x | 0010 | 110 (subtract) |
| 1x | 0100 | 000 (and) |
| 1x | 0101 | 001 (or) |
| 1x | 1010 | 111 (set on less than) |

F5 and F4 are don't-cares. Using the table's don't-cares, this reduces to three
equations, each built from reversible gates:

    Operation2 = ALUOp0 + ALUOp1·F1
    Operation1 = ¬ALUOp1 + ¬F2
    Operation0 = ALUOp1·(F3 + F0)

ALUOp = 11 never occurs; for it these equations give 110 or 111.

## Datapath (`mips_top`)

All of the work happens in one clock cycle:

1. `instruction_memory` is read asynchronously at `pc`. `adder` forms PC+4.
2. `control_unit` decodes `instr[31:26]` and `instr[5:0]`.
3. `register_file` reads rs (`instr[25:21]`) and rt (`instr[20:16]`).
   `sign_extend` widens `instr[15:0]`.
4. A `mux2` (ALUSrc) selects operand B: rt, or the immediate. `alu` computes the
   result and the Zero flag.
5. `data_memory` is addressed by the ALU result. It reads asynchronously (gated
   by MemRead) and writes on the clock edge (MemWrite).
6. A `mux2` (MemtoReg) selects the ALU result or the loaded word. A `mux2`
   (RegDst) selects rd or rt as the destination. The register file writes on the
   clock edge.
7. The branch target is PC+4 + (immediate << 2), from `shift_left2` and a second
   `adder`. Branch AND Zero is a reversible AND gate. Its output drives the
   next-PC `mux2`, and `program_counter` loads the next PC on the clock edge.

The clock period therefore has to cover the slowest path, `lw`: instruction
fetch, register read, ALU, data memory read and register write-back setup. CPI
is exactly 1.

ALU codes: 000 and, 001 or, 010 add, 110 subtract, 111 signed set-on-less-than.
Any other code gives 0. Overflow is not detected.

### Ports of `mips_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active low; holds PC at 0 |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, log2(IMEM_WORDS), 32 | instruction memory write port; load the program while `rst_n` is low |
| `pc`, `instr` | out | 32, 32 | PC and the instruction executing this cycle |
| `ctrl` | out | `ctrl_t` | control word of this instruction (see `mips_pkg`) |
| `alu_result` | out | 32 | ALU result of this instruction |

Parameters: `XLEN` = 32, `IMEM_WORDS` = 256, `DMEM_WORDS` = 256. Memories are
word-organised. Address bits [1:0] are ignored and the upper bits wrap. The
register file and data memory are not reset. Register 0 always reads 0.

## What is this design's own choice

The instruction set, the two control tables, the reversible gate constructions
and the single-cycle datapath structure are taken as given. The following were
chosen here:

- Instruction and data memories are separate, as in the classic single-cycle
  datapath. They are not one shared memory.
- The machine is single-cycle, not pipelined. No pipeline registers, hazard
  detection or forwarding exist.
- A Booth multiplier, a barrel shifter and an accumulator are sometimes listed
  as parts of this kind of processor. They are not built: no instruction or
  control signal here would use them.
- Memory depths (256 words each), the program-load port, the reset, register 0
  hard-wired to zero and word-only memory access.
- Widening the 3x3 Toffoli gate to 6-input ANDs by cascading gates, with one
  ancilla line per stage.
- Don't-care control outputs driven to 0. Unknown opcodes run as no-operations.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. It prints
`TB_RESULT checks=N failures=M` and exits. Example with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        rtl/mips_pkg.sv tb/tb_mips_top.sv --top-module tb_mips_top
    ./obj_dir/Vtb_mips_top

`tb_mips_top` runs the full processor at its default parameters. It loads a
program into the instruction memory: a countdown loop (a backward taken branch,
a forward branch taken on exit, and load/store of the running sum), then about
250 random instructions and a few unrecognised opcodes. The testbench keeps its
own instruction-level model of the processor. It checks PC and instruction
every cycle, all registers after every cycle, and the whole data memory at the
end. It also counts each mechanism (every ALU function, load, store, branch
taken and not taken, no-operation) and fails if any of them never occurred.

## Changing the design

- Memory sizes: the `IMEM_WORDS` and `DMEM_WORDS` parameters of `mips_top`.
- New opcode: add a `rev_and_n` recogniser in `main_control` with the opcode as
  `POLARITY`, then OR its line into the controls it sets.
- New ALU function: extend the table in `alu_control`, re-derive the three
  equations, and add the operation to `alu`. The `alu_op_e` encoding in
  `mips_pkg` is shared by both.
