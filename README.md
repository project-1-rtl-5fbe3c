# WIMP51 with accumulator bit set/clear

WIMP51 is a small teaching processor that executes a subset of the Intel 8051
instruction set. It has one accumulator, eight working registers and an
8-bit program counter. Every instruction takes the same three clock cycles.
This RTL adds two 2-byte instructions. They force one chosen bit of the
accumulator to 0 or to 1 and leave the other seven bits unchanged:

| Mnemonic     | Bytes     | Effect                      |
|--------------|-----------|-----------------------------|
| `CLRB A,#b`  | `C2`, `b` | `ACC[b] <- 0` (b = 0..7)    |
| `SETB A,#b`  | `D2`, `b` | `ACC[b] <- 1`               |

The two op-codes differ only in bit 4 (`1100_0010` and `1101_0010`). Most of
the logic therefore treats them as one instruction. Op-code bit 4 is the
value written into the chosen bit.

## Instructions executed

| Op-code   | Instruction   | Bytes | Effect                                  |
|-----------|---------------|-------|-----------------------------------------|
| `74 dd`   | `MOV A,#dd`   | 2     | `ACC <- dd`                             |
| `38`-`3F` | `ADDC A,Rn`   | 1     | `{CY,ACC} <- ACC + Rn + CY`             |
| `F8`-`FF` | `MOV Rn,A`    | 1     | `Rn <- ACC`                             |
| `C4`      | `SWAP A`      | 1     | swap the two nibbles of ACC             |
| `80 rel`  | `SJMP rel`    | 2     | `PC <- address after SJMP + rel` (signed) |
| `C2 b`    | `CLRB A,#b`   | 2     | `ACC[b] <- 0`                           |
| `D2 b`    | `SETB A,#b`   | 2     | `ACC[b] <- 1`                           |

These are the instructions used by the three test programs the design was
validated with. Other WIMP51 instructions, such as conditional jumps, are not
implemented. Any op-code not in the table acts as a 1-byte no-operation: it
writes nothing and PC moves to the next byte.

## The three-cycle instruction

A two-bit counter `Q1:Q0` (`cycle_counter`) steps through three cycles:
fetch (`00`), decode (`01`) and execute (`10`). A register changes only in the
cycles where its write enable is on:

| Register | fetch      | decode          | execute                                           |
|----------|------------|-----------------|---------------------------------------------------|
| IR       | op-code    | held            | held                                              |
| AUX      | held       | byte at PC+1    | held                                              |
| PC       | held       | PC+1            | PC+1 (`74`, `C2`, `D2`) or PC+1+rel (`80`); else held |
| ACC      | held       | held            | ALU result (`74`, `38`-`3F`, `C4`, `C2`, `D2`)    |
| Rn       | held       | held            | ACC (`F8`-`FF`)                                   |
| CY       | held       | held            | adder carry (`38`-`3F`)                           |

So after decode, PC points at the second byte of the instruction. A 2-byte
instruction steps PC again in execute, which leaves PC on the next op-code.
An instruction therefore takes three clocks, so a program's timing can be
read straight from its listing.

### Program memory address

In the decode cycle, AUX must capture the byte at PC+1 in the same clock edge
that writes PC+1 into PC. To make that work, program memory is not addressed
by the PC register. It is addressed by the PC_ALU output, which is the value
PC will hold after the current cycle. The read is combinational.

| Cycle   | PC_ALU output | Byte read  | Stored in |
|---------|---------------|------------|-----------|
| fetch   | PC (hold)     | the op-code | IR       |
| decode  | PC+1          | the operand | AUX      |
| execute | not used      | not used    | nothing  |

This is the one timing detail that the rest of the design depends on. If the
memory were addressed by PC, AUX would capture the op-code again.

### Next PC (`pc_alu`)

`pc_alu` computes the next PC with one 8-bit adder:

    pc_next = PC + B + CI

A priority choice sets B and CI:

| Request   | When                              | B   | CI | Result     |
|-----------|-----------------------------------|-----|----|------------|
| branch    | execute of `80`                   | AUX | 1  | PC+1+rel   |
| increment | decode, or execute of `74`/`C2`/`D2` | 0 | 1 | PC+1       |
| hold      | anything else                     | 0   | 0  | PC         |

Branch wins over increment, and increment wins over hold. In the execute
cycle of SJMP, PC holds the address of the `rel` byte. The target PC+1+rel is
therefore measured from the end of the 2-byte instruction, as in the 8051.
For example, `80 FE` jumps to itself.

## Bit set/clear datapath

The new instructions are executed by the ALU (`alu`). The ALU has two parts.

The original part uses op-code bits 7..4 to pick one result:

- `7x`: the immediate byte (AUX)
- `3x`: the sum ACC + Rn + CY
- `Cx`: ACC with its two nibbles swapped
- anything else: ACC unchanged

The added part works in three steps:

1. `set_clr_pass_acc` computes an enable: `IR7 IR6 !IR5 !IR3 !IR2 IR1 !IR0`.
   This is true for `C2` and `D2` only.
2. A 3-to-8 decoder (`dec3to8`) turns AUX bits 2..0 into a one-hot select.
   AUX holds the instruction's second byte. When the enable is false, all
   eight select lines are 0.
3. Eight 1-bit 2-to-1 muxes (`mux2`, `Z = A·!S0 + B·S0`) produce the result.
   Each mux passes its accumulator bit unless its select line is 1. The
   selected mux outputs op-code bit 4 instead.

An 8-bit `mux2` at the ALU output then chooses between the two parts. It is
steered by `log_setba_clrba`, which decodes the same `C2`/`D2` pattern. This
output mux is needed because `C2` lies in the `Cx` group. Without the mux,
`CLRB` would perform a nibble swap.

Only the low three bits of the second byte are used. `CLRB A,#0Dh`, for
example, acts on bit 5.

## Write enables (`we_logic`)

    IR_WE  = fetch
    AUX_WE = decode & ( !(IR7..5 == 110) | op is C2/D2 )
    PC_WE  = decode | execute & (op is 74, 80, C2 or D2)
    ACC_WE = execute & (op is 74, 38-3F, C4, C2 or D2)
    REG_WE = execute & (op is F8-FF)
    CY_WE  = execute & (op is 38-3F)

The AUX_WE term deserves a note. The base enable leaves AUX unwritten in
decode for op-codes `C0`-`DF`. The new instructions fall in that group, so
they are added back explicitly. Otherwise AUX would not capture the bit
number.

## How far to trust it

Taken from the design description:

- the three-cycle pattern
- which registers each cycle writes
- the C2/D2 additions to AUX_WE, PC_WE and ACC_WE
- the enable equation and the decoder/mux structure of the bit unit
- the output mux and its select decode in the ALU
- the three test programs

Choices made here, where the description gives no detail:

- **Instruction set.** Limited to the instructions listed above.
- **Original ALU.** Its internals are not described. Its result groups were
  chosen to cover the listed instructions.
- **Decoding style.** PC_WE and ACC_WE are positive decodes of the listed
  op-codes, not the original processor's full decode.
- **Carry flag.** ADDC needs one, so a 1-bit register was added. It clears
  at reset.
- **Memory addressing.** Program memory is read combinationally and is
  addressed by the next PC.
- **Reset.** Synchronous and active low. It clears PC, IR, AUX, ACC, CY and
  R0..R7, and starts the counter at fetch.
- **Memory size.** 256 bytes, the full range of the 8-bit PC.

Verification:

- Every block has a self-checking testbench. Most are exhaustive over their
  inputs or randomised against a reference model.
- The processor testbench runs all three test programs and checks ACC and PC
  after every instruction. That check covers the three-clock timing.

In synthesis, `prog_rom` relies on `$readmemh` in an initial block. A flow
that ignores that call turns the memory into constant zeros.

## Files

| File | Contents |
|------|----------|
| `rtl/wimp51_pkg.sv` | cycle and next-PC enums, op-code constants |
| `rtl/wimp51.sv` | top level: registers, memory, control and datapath |
| `rtl/cycle_counter.sv` | fetch/decode/execute counter |
| `rtl/we_logic.sv` | write-enable logic |
| `rtl/pc_alu.sv` | next-PC adder and priority choice |
| `rtl/alu.sv` | ALU with bit set/clear path |
| `rtl/set_clr_pass_acc.sv` | enable, decoder and eight muxes of the bit unit |
| `rtl/log_setba_clrba.sv` | C2/D2 detector for the ALU output mux |
| `rtl/dec3to8.sv` | 3-to-8 decoder with enable |
| `rtl/mux2.sv` | W-bit 2-to-1 mux |
| `rtl/we_reg.sv` | register with write enable (IR, AUX, PC, ACC, CY) |
| `rtl/reg_top.sv` | R0..R7 |
| `rtl/prog_rom.sv` | 256-byte program memory, preloaded from a hex file |
| `rtl/prog_clrb.hex` | default image: the CLRB test |
| `tb/prog_setb.hex` | the SETB test |
| `tb/prog_mixed.hex` | the mixed test |
| `tb/tb_*.sv` | one testbench per module |

`tb_wimp51` runs all three programs and counts every mechanism. The
mechanisms are each instruction type, AUX capturing a bit number, the
execute-cycle PC increment and the taken branch. `tb_wimp51_full` runs the
processor with its default parameters.

## Test programs

In all three programs, ACC is checked after every instruction, that is,
every third clock.

- **CLRB test** (`rtl/prog_clrb.hex`): loads `FF`, then clears bits 0..7 in
  turn. ACC reads `FE FC F8 F0 E0 C0 80 00`. The program then loops on
  `80 FE` at address `12h`.
- **SETB test** (`tb/prog_setb.hex`): loads `00`, then sets bits 0..7. ACC
  reads `01 03 07 ... FF`.
- **Mixed test** (`tb/prog_mixed.hex`): runs `MOV A,#01`, `MOV R0,A`,
  `ADDC A,R0` (02), `SETB A,#3` (0A), `MOV R1,A`, `SWAP A` (A0),
  `CLRB A,#5` (80), `MOV R2,A`, `SJMP $`. It ends with R0=01, R1=0A and
  R2=80.

Each program fits easily in the 256-byte memory. The first two take 20
bytes and the third takes 13.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. The hex
files are opened by paths relative to the project root, so run the commands
from there:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/wimp51_pkg.sv tb/tb_wimp51.sv --top-module tb_wimp51
    ./obj_dir/Vtb_wimp51

Use the same command for any other testbench, with its name in place of
`tb_wimp51`. To run your own program:

1. Write a hex file with one byte per line.
2. Pass it to the top as `wimp51 #(.INIT_FILE("path/to/prog.hex"))`.
