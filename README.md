# An 8-bit RISC processor: three stages, pipelined or not

This is a small RISC processor in the MIPS style, without memory-access instructions. It has an 8-bit data path, eight registers (`r0` always reads zero), and 19-bit instructions. It runs register-register and register-immediate arithmetic, logic and shift operations. Every instruction passes through three steps:

1. **Instruction fetch (IF).** A 12-bit program counter reads a 36-word instruction memory.
2. **Instruction decode (ID).** The word is split into control signals.
3. **Execution (EX).** The operands are read, the shifter or ALU produces a result, and the result is clocked into a result register, `EXE_REG_OUT`.

One parameter, `PIPELINED`, chooses between two builds of the same hardware:

- **Pipelined (`PIPELINED = 1`, the default).** An instruction register sits between IF and ID, and a decode register between ID and EX. The three steps then work on three different instructions at once, and one instruction completes per (short) clock.
- **Non-pipelined (`PIPELINED = 0`).** Those two registers become wires. Each instruction goes from the PC to `EXE_REG_OUT` in one long clock.

Both modes compute exactly the same results. Only the clock period and the start-up latency differ.

The design is a reconstruction from a published description of this processor. That description gives the block diagram, the two instruction formats, the bus widths and the memory size. The section "Where this design makes its own choices" lists what had to be chosen here.

## Instruction set

Instruction words are 19 bits, most significant bit first:

| bits | 18:17 | 16:14 | 13:11 | 10:8 | 7:5 | 4:0 |
|---|---|---|---|---|---|---|
| register format | `00` | fn | rd | r1 | r2 | unused, except shifts |
| immediate format | `01` | fn | rd | r1 | const[7:5] | const[4:0] |

- In the register format, the operation is `rd = r1 op r2`.
- In the immediate format, it is `rd = r1 op const`, where `const` is the 8-bit value in bits 7:0.
- Format codes `10` and `11` are reserved. The decoder turns them into bubbles (no-ops).

| fn | operation | Z | C |
|---|---|---|---|
| 0 | add | written | carry out |
| 1 | add with carry (`+ C`) | written | carry out |
| 2 | subtract | written | borrow (1 when r1 < operand) |
| 3 | subtract with borrow (`- C`) | written | borrow |
| 4 | and | written | kept |
| 5 | or | written | kept |
| 6 | xor | written | kept |
| 7 | logical shift of r1 | written | kept |

Shift instructions work the same way in both formats:

- Bits 2:0 of the word give the shift amount (0 to 7).
- Bit 3 gives the direction: 1 shifts left, 0 shifts right.
- Zeros are shifted in.

Z is set when the 8-bit result is zero. Writes to `r0` are dropped, but the flags are still updated, so `r0` can serve as a compare target. The all-zero word is `r0 = r0 + r0`. It changes nothing except the flags (Z = 1, C = 0), and it is also what the memory returns for addresses beyond its 36 words.

There are no load/store, branch or jump instructions. The program counter only counts upward, or jumps to the interrupt vector.

`mips8_pkg` provides `enc_reg()` and `enc_imm()` to assemble words. For example:

```systemverilog
enc_imm(FN_ADD, 3'd1, 3'd0, 8'h05)          // r1 = r0 + 5
enc_reg(FN_ADC, 3'd2, 3'd1, 3'd1)           // r2 = r1 + r1 + C
enc_imm(FN_SHIFT, 3'd3, 3'd2, 8'b0000_1010) // r3 = r2 << 2
```

## How an instruction flows, and why there is a bypass

The hardest part to follow is the timing of the write-back. `EXE_REG_OUT` is a register: the result of an instruction in EX is clocked into it at the end of that cycle. It is then written into the register file on the *next* clock edge. That second write happens while the following instruction is already in EX, reading its operands from the register file, which still holds the old value.

So the execution stage compares both source register numbers with the destination held in `EXE_REG_OUT`. On a match, it takes the operand from `EXE_REG_OUT` instead of the register file. This is the feedback path from `EXE_REG_OUT` to the operand multiplexers. Because of it, the processor never stalls: any instruction may use the result of the one just before it.

Pipelined timing, after reset is released (edge 1 is the first rising edge):

| cycle (before edge) | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|
| IF (PC) | i0 | i1 | i2 | i3 | i4 |
| ID (instruction register) | - | i0 | i1 | i2 | i3 |
| EX (decode register) | - | - | i0 | i1 | i2 |
| `EXE_REG_OUT` holds | - | - | - | i0 | i1 |
| register file written with | - | - | - | - | i0 |

- **Pipelined:** the result of the first instruction is in `EXE_REG_OUT` after edge 3. After that, one instruction completes per clock.
- **Non-pipelined:** IF, ID and EX happen in the same cycle. The result of the first instruction is in `EXE_REG_OUT` after edge 1.

The Z and C flags are written on the same edge as `EXE_REG_OUT`. An add-with-carry right after an add therefore sees the new carry without any bypass.

## Interrupt entry

A single `irq` input reaches the decoder. An interrupt is taken when all of these hold:

- `irq` is high;
- the IF (interrupt) flag is clear;
- a real instruction is being decoded.

When it is taken, in the same cycle:

- That instruction is squashed (turned into a bubble). In pipelined mode, the word being fetched behind it is also dropped. Entry therefore costs two bubbles when pipelined and one otherwise.
- The PC is loaded with `IRQ_VECTOR` (default 32). With the default 36-word memory, that leaves four words, 32 to 35, for a handler.
- The interrupt register keeps the squashed instruction's address (`irq_ret_pc`). It also keeps the Z and C values that include the instruction completing in that cycle (`irq_saved_z`, `irq_saved_c`).
- IF is set. It clears once `irq` has gone low again, so one assertion of `irq` is taken once, however long it is held.

The instruction set has no return-from-interrupt instruction. The saved address and flags are outputs for the system around the core. Continuing the interrupted program requires an external reset or a later extension.

## Blocks

| module | role |
|---|---|
| `mips8_pkg` | widths, field and fn encodings, the decode-register record `ctrl_t`, assembler functions |
| `pc_unit` | 12-bit program counter: +1 each clock, or the interrupt vector |
| `instr_mem` | 36 x 19-bit instruction memory, loaded through a write port. Followed by the instruction register when `REGISTERED = 1`, combinational otherwise |
| `decoder` | field extraction, reserved-format bubbles, interrupt entry, decode register (`REGISTERED`) |
| `regfile` | 8 x 8-bit registers with two read ports, one write port and a debug read port. `r0` is zero |
| `execute` | bypass and operand multiplexers, shifter, ALU, result multiplexer, `EXE_REG_OUT`, flag update signals |
| `shifter` | logical left/right shift by 0 to 7 |
| `alu` | add, add with carry, subtract, subtract with borrow, and, or, xor. The arithmetic is 9 bits wide, and the ninth bit is the carry or borrow |
| `status_unit` | Z, C, IF and the interrupt register |
| `mips8_cpu` | top level: wires the above together |

The top's `ev_complete`, `ev_bypass` and `ev_irq` outputs pulse when an instruction completes, when the bypass is used, and when an interrupt is taken. `dbg_addr`/`dbg_data` read any register.

With default parameters, coarse synthesis gives 164 flip-flops (the register file among them) plus the 684-bit (36 x 19) instruction memory.

## Using it

The program is written through `imem_ld_en` / `imem_ld_addr` / `imem_ld_data`, one word per clock, while `rst_n` is held low. After `rst_n` rises, execution starts at address 0. Memory contents are not reset, so load every word the program can reach. Reset is asynchronous and active low. It clears the PC, the pipeline registers, the registers and the flags.

Parameters of `mips8_cpu`:

- `PIPELINED` (default 1);
- `IMEM_DEPTH` (default 36 words);
- `IRQ_VECTOR` (default 32).

The PC is 12 bits wide, so the memory can grow to 4096 words without other changes.

## Simulation

Each testbench checks itself and ends by printing `TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```sh
verilator --binary --timing -y rtl -y tb rtl/mips8_pkg.sv tb/mips8_ref_pkg.sv \
          tb/tb_mips8_cpu.sv --top-module tb_mips8_cpu
./obj_dir/Vtb_mips8_cpu
```

Unit testbenches need only `rtl/mips8_pkg.sv` before the testbench file. `tb_execute` also needs `tb/mips8_ref_pkg.sv`.

- `tb_mips8_cpu` (default parameters) and `tb_mips8_cpu_np` (non-pipelined) each run 40 random 36-word programs. Half of them get an interrupt at a random moment. The testbenches compare against an instruction-level model (`tb/mips8_ref_pkg.sv`), checking:
  - every write-back in order;
  - the final registers and flags;
  - the number of completed instructions;
  - the latency of the first result (3 edges pipelined, 1 non-pipelined);
  - the return address and saved flags.

  They count bypasses, interrupts, carry-in use, immediates, both shift directions, writes to `r0` and reserved words, and fail if any of these never happened.
- `tb_mips8_program` runs a short hand-written program: a 16-bit addition with add and add-with-carry, then xor, both shifts, subtract, subtract-with-borrow, and, a compare into `r0`, and or. It checks each result against hand-computed values, and checks the clock edge on which it appears.
- `mips8_cpu` carries three assertions, active when simulating with assertions enabled (`--assert`):
  - no interrupt is taken while one is in service;
  - no write-back to `r0` is ever scheduled;
  - the interrupt register captures the address of the squashed instruction.
- Each block also has its own testbench:
  - `tb_alu`, `tb_shifter` (exhaustive), `tb_regfile`, `tb_pc_unit` and `tb_status_unit`;
  - `tb_instr_mem` and `tb_decoder`, which test both the registered and the combinational build;
  - `tb_execute`, which acts as the register file itself so that the bypass is exercised.

## Where this design makes its own choices

The description this design follows fixes a number of points:

- the block structure of the datapath;
- the 8-bit data path and the registers `r0..r7`, with `r0` hard-wired to zero;
- the 19-bit instruction word with its `00`/`01` register and immediate formats and their field order;
- the 12-bit PC and the 36 x 19 instruction memory;
- the 3-bit shift amount and the Z, C and IF flags;
- the two modes, with a three-step (IF/ID/EX) pipeline.

These points were chosen here:

- **fn encoding and operation set.** Add/adc/sub/sbb/and/or/xor/shift, matching the adders with and without carry/borrow-in and the logical shifters of the reference implementation. Only logical left and right shifts are provided.
- **Shift operands.** Where a shift takes its amount and direction from.
- **Flags.** C means borrow after a subtraction. Logic operations leave C alone.
- **Reserved formats.** Format codes `10`/`11` are executed as no-ops. The original mentions four instruction types, but it defines only two.
- **Word addressing.** The PC counts in words, not bytes.
- **Bypass on both operands.** The `EXE_REG_OUT` feedback is read as a bypass and applied to both ALU operands.
- **Interrupt behaviour.** All of it: the vector, what is saved, when IF clears, and the squashing rule.
- **Support logic.** The program load port, the debug port and the reset values.

Not included:

- **The five-stage datapath.** The description also presents the textbook five-stage MIPS datapath, with a data memory, a branch adder and sign extension, as background. The processor that was actually built and measured has three stages and no data memory, and only that processor is implemented here.
- **Branches.** There are no branches, no loads and stores, and no return from interrupt, because none of them has a defined encoding.
