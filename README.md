# A 16-bit multi-cycle teaching CPU

This is a small 16-bit processor built to show how a CPU divides into a
**datapath** and a **control unit**. The datapath holds four general
registers, an operand multiplexer, an ALU and a program counter. The
control unit holds an instruction register and a five-state machine:
Initial, Fetch, Decode, Execute, Write back. The state machine drives the
datapath through plain control wires. The datapath reports back when the
ALU has finished and whether its last result was zero.

The CPU runs one instruction at a time, with no pipelining, and needs
several clock cycles for each. It fetches instructions from an external
instruction RAM over a simple request/response interface. It has no data
memory: an instruction either computes into a register or conditionally
changes the program counter.

The structure, the module and signal names, the widths, the state order
and the meaning of five opcodes come from a published description of the
design, which includes a worked eight-instruction program. The text below
calls it "the source". The source gives no opcode table, no jump condition
and no cycle timing. Those parts are this design's own choices, and each is
marked as such below and in the comment at the top of each file.

## Instruction format and instruction set

```
 15      12 11  10 9    8 7             0
+----------+------+------+---------------+
|  opcode  |  rd  |  rs  |   imm / target |
+----------+------+------+---------------+
```

`rd` names the destination register and is also ALU operand A. `rs` names
the source register. `imm` is an 8-bit immediate, zero-extended to 16 bits.
For jumps, `imm` is an absolute target address.

| opcode | mnemonic | effect                          | origin |
|--------|----------|---------------------------------|--------|
| 0x0    | LDI      | rd = imm                        | source example |
| 0x1    | ADD      | rd = rd + rs                    | chosen |
| 0x2    | ADDI     | rd = rd + imm                   | source example |
| 0x3    | AND      | rd = rd & rs                    | chosen |
| 0x4    | ANDI     | rd = rd & imm                   | chosen |
| 0x5    | SUB      | rd = rd - rs                    | source example |
| 0x6    | SUBI     | rd = rd - imm                   | chosen |
| 0x8    | ORI      | rd = rd \| imm                  | chosen |
| 0x9    | OR       | rd = rd \| rs                   | source example |
| 0xA    | JNZ      | if last ALU result != 0: pc = imm | opcode from source example, condition chosen |
| 0x7, 0xB-0xF | -  | no operation                    | chosen |

The source names addition, subtraction, bitwise AND, bitwise OR and
conditional jumps as the instruction set. It fixes the bit layout and the
opcodes marked "source example" only through its worked program (see
"Demonstration program" below). The codes that fill the rest of the table
are arbitrary. If you have other binaries to run, change them in
`cpu_pkg.sv` and `instr_decoder.sv`.

Arithmetic wraps modulo 2^16. There are no carry or overflow flags. The
only flag is `zero`. The ALU updates it on every ALU instruction,
including LDI, and jumps leave it unchanged. A JNZ to its own address
after a non-zero result is therefore an endless loop, which serves as
"halt".

ALU function codes (`alu_func`): 0 pass B, 1 add, 2 subtract (A - B),
3 AND, 4 OR. Codes 5 to 7 give 0. Codes 0, 1, 2 and 4 match the values the
source shows while its example runs. Code 3 is chosen.

## The instruction cycle

The central mechanism is the way the state machine and the datapath pass
control between them. The datapath is a chain of three registered stages.
Each stage is started by a one-cycle enable pulse and passes a pulse on to
the next stage one cycle later:

```
 en_group ──► reg_group ──en_out──► alu_mux ──en_out──► alu ──en_out──► alu_end
              rd_q=R[rd]            alu_a=rd_q           alu_out=f(a,b)
              rs_q=R[rs]            alu_b=rs_q | imm     zero=(alu_out==0)
                 ▲                                          │
                 └──────────── d_in (written when reg_en) ◄─┘
```

The state machine fires `en_group` once and then waits for `alu_end`. It
never counts the datapath latency itself, so a stage can be added inside
the datapath without changing the controller.

Cycle by cycle, with the default `FETCH_CYCLES = 2`:

| state | cycles | what happens |
|-------|--------|--------------|
| Initial | 1, only after reset | - |
| Fetch | 2 | cycle 1: `en_ram_in` requests `mem[pc]`, and the PC increments. Cycle 2: the RAM output is valid and the instruction register loads it. |
| Decode | 1 | ALU instruction: `en_group` pulses. No-operation: back to Fetch. |
| Execute | 3 (ALU) or 1 (jump) | ALU: `alu_in_sel` and `alu_func` are driven while the mux and ALU sample them. The state waits for `alu_end`. Jump: `en_pc` with `pc_ctrl = jump` if `zero` is clear. Then Fetch. |
| Write back | 1 | `reg_en` sets the bit of `rd` and the register loads `alu_out`. Then Fetch. |

This gives **7 cycles per ALU instruction, 4 per jump and 3 per
no-operation**. The source does not give these numbers. They follow from
the registered stages its schematics show plus the chosen fetch timing.
The source's state diagram draws only the forward arrows
Initial → Fetch → Decode → Execute → Write back. The return to Fetch, and
the early exits for jumps and no-operations, are this design's choices.

The source contradicts itself on when the PC advances: once after
execution, once in the fetch state. This design increments it in Fetch,
so during Decode and later `pc_out` already points to the next
instruction.

## Instruction RAM interface

The RAM is not part of the CPU. The top module `cpu` brings out its
interface:

| port | dir | meaning |
|------|-----|---------|
| `addr[15:0]` | out | fetch address (the PC) |
| `en_ram_in` | out | one-cycle read request |
| `ins[15:0]` | in | instruction word. Expected one cycle after the request and held until the next request. |
| `en_ram_out` | in | RAM output valid. The instruction register loads `ins` on every edge where it is high. |

The state machine has no ready input, so the RAM must answer in exactly
one cycle. To support a slower RAM, raise `FETCH_CYCLES`: each extra cycle
lets the RAM take one cycle longer. `tb/ins_ram.sv` is a behavioural model
of such a RAM: 256 words, with addresses wrapping at 256. The PC is 16 bits
wide, but a jump can only reach addresses 0 to 255.

Reset `rst` is **active low** and asynchronous. After reset the PC and all
registers are 0 and the first fetch is from address 0.

## Modules

| file | role |
|------|------|
| `rtl/cpu_pkg.sv` | widths, opcode / ALU / PC-control / state enums, instruction struct |
| `rtl/cpu.sv` | top: control unit + datapath |
| `rtl/control_unit.sv` | instruction register + state machine |
| `rtl/ir.sv` | instruction register |
| `rtl/state_transition.sv` | the five-state controller. An assertion checks that `alu_end` only arrives while an ALU instruction waits in Execute. |
| `rtl/instr_decoder.sv` | opcode → alu_func, alu_in_sel, instruction class |
| `rtl/datapath.sv` | register group, ALU mux, ALU and PC |
| `rtl/reg_group.sv` | four 16-bit registers with registered rd / rs read ports and one-hot write enables. An assertion checks that `reg_en` is one-hot. |
| `rtl/alu_mux.sv` | registers ALU operands. B is `rs` or the immediate. |
| `rtl/alu.sv` | registered ALU with zero flag |
| `rtl/pc.sv` | program counter: hold / increment / jump |

Beyond the RAM interface, `cpu` also brings out the four registers (`q`),
the instruction register (`ir_out`) and the state, for observation.

Parameters and their defaults: data width 16, four registers, 8-bit
immediate and 16-bit PC, all as in the source. `FETCH_CYCLES = 2` is
chosen.

## Demonstration program

The source runs this program and shows the register contents as it
executes:

```
0: 0000  LDI  R0, 0        4: 5102  SUB  R0, R1   ; 8 - 3 = 5
1: 0008  LDI  R0, 8        5: 9102  OR   R0, R1   ; 5 | 3 = 7
2: 0402  LDI  R1, 2        6: 2102  ADDI R0, 2    ; 9
3: 2401  ADDI R1, 1        7: A007  JNZ  7        ; stay here
```

R0 passes through 0, 8, 5, 7, 9 and R1 through 2, 3, while R2 and R3 stay
0. These values fix the field layout and the five opcodes above.
`tb/tb_cpu_fig6.sv` runs the program and checks every one of these values.
It also checks that the CPU keeps fetching address 7, and that it reaches
the first re-fetch of address 7 after 1 + 7×7 + 4 = 54 cycles.

## How far it can be trusted

What the source gives and this RTL follows:
* the block structure and the port names of every block
* 16-bit data and four registers
* one-hot register write enables
* the registered, enable-chained datapath stages
* the five states
* the behaviour of the example program

What is this design's own:
* the opcode table beyond the five example opcodes
* the JNZ condition and the zero flag. The source mentions "conditional
  flags" but its control unit has no flag input.
* the absolute jump target
* the `alu_in_sel` polarity
* zero extension of the immediate
* the RAM timing
* all cycle counts
* active-low reset

Where the source says the ALU result may go "to a register bank or
program counter", this design follows its schematic instead: `alu_out`
goes only to the registers, and the PC jumps to the instruction
immediate.

Lint gives two warnings about unused instruction fields (in `cpu` and
`control_unit`) and some about unused package constants. None is a
circuit problem.

## Simulating

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/cpu_pkg.sv tb/tb_cpu.sv --top-module tb_cpu -Mdir obj_cpu
./obj_cpu/Vtb_cpu
```

To run another bench, replace `tb_cpu` with its name (`tb_alu`, `tb_pc`,
`tb_reg_group`, `tb_alu_mux`, `tb_ir`, `tb_instr_decoder`,
`tb_state_transition`, `tb_control_unit`, `tb_datapath`, `tb_cpu_fig6`).

`tb_cpu` runs the whole CPU at its default parameters. It loads 12 random
programs into the RAM model and runs 200 instructions of each. An
instruction-level reference model of the table above steps in lockstep
with the CPU. After every retired instruction the bench compares all
registers, the next fetch address and the cycle count (7 / 4 / 3). Each
program starts with a countdown loop, so backward jumps are taken and then
fall through. The bench counts every mechanism it relies on and fails if
one never occurs:
* each ALU function
* register and immediate operands
* zero results
* forward and backward taken jumps
* jumps not taken
* no-operations

## Changing it

* **New ALU operation:** add a code to `alu_func_e` and a case in
  `alu.sv`, then give it an opcode in `opcode_e` and `instr_decoder.sv`.
  The state machine needs no change.
* **Other jump conditions:** `state_transition.sv`, Execute state.
  Feed it whatever flags the ALU keeps.
* **Slower RAM:** raise `FETCH_CYCLES`.
* **More registers:** widen `NREGS` and `RADDR_W`. You then have to
  re-pack the instruction fields in `instr_t`, since 16 bits are already
  fully used.
