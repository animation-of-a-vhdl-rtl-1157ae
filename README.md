# WIMP51: a three-cycle 8051 subset processor

WIMP51 is a teaching processor that runs a small subset of the 8051
instruction set, bit for bit. It has no internal data memory, no special
function registers, no interrupts and no peripherals. What remains is small
enough to read in one sitting:

- eight 8-bit registers R0-R7;
- an accumulator and a carry flag;
- an 8-bit program counter;
- thirteen instructions, each taking exactly three clock cycles.

Because the machine code is the real 8051 encoding, programs can be built
with any stock 8051 assembler. The processor's only outputs are the program
memory interface and the accumulator value.

## Instruction set

| Instruction     | Opcode  | Bytes | Operation                          |
|-----------------|---------|-------|------------------------------------|
| `MOV A,#data`   | 74h     | 2     | A = data                           |
| `MOV A,Rn`      | E8h+n   | 1     | A = Rn                             |
| `MOV Rn,A`      | F8h+n   | 1     | Rn = A                             |
| `ADDC A,#data`  | 34h     | 2     | C,A = A + data + C                 |
| `ADDC A,Rn`     | 38h+n   | 1     | C,A = A + Rn + C                   |
| `XRL A,Rn`      | 68h+n   | 1     | A = A xor Rn                       |
| `ANL A,Rn`      | 58h+n   | 1     | A = A and Rn                       |
| `ORL A,Rn`      | 48h+n   | 1     | A = A or Rn                        |
| `SWAP A`        | C4h     | 1     | exchange the two nibbles of A      |
| `SETB C`        | D3h     | 1     | C = 1                              |
| `CLR C`         | C3h     | 1     | C = 0                              |
| `SJMP rel`      | 80h     | 2     | PC = PC + rel                      |
| `JZ rel`        | 60h     | 2     | PC = PC + rel if A = 0             |

`rel` is a signed byte, and `PC` in a jump is the address after the jump
instruction, exactly as on the 8051. Only `ADDC`, `SETB C` and `CLR C` change
C. Any other opcode byte is a one-byte no-operation. That is this
implementation's choice: a real 8051 would execute something else there.

## The three-cycle instruction

Every instruction takes Fetch, Decode and Execute, one clock each. The
control unit (`wimp51_cu`) is a three-state counter. For each state it
decodes the instruction register into a control word, the `ctrl_t` struct in
`wimp51_pkg`. Registers change only at rising clock edges.

| Cycle   | Program memory                       | What is written at the end of the cycle |
|---------|--------------------------------------|-----------------------------------------|
| Fetch   | read at PC (`psen_n` = 0)            | IR = opcode byte, PC = PC + 1 |
| Decode  | read at PC for two-byte instructions | two-byte instructions: AUX = second byte, PC = PC + 1; register-source instructions: AUX = Rn; others: nothing |
| Execute | not read (`psen_n` = 1)              | ACC = ALU result, or Rn = ACC (`MOV Rn,A`), or C, or PC = PC + AUX (`SJMP`, or `JZ` when A = 0) |

Some consequences that are easy to miss:

- **AUX is the single operand path.** The second instruction byte reaches
  the ALU through AUX, and so does a register value. So does a jump offset,
  which goes to the PC adder. The ALU therefore always computes
  `ACC op AUX`, and `MOV A,...` is simply "pass AUX".
- **The jump base is the following instruction.** By Execute, the PC has
  already been incremented twice, once in Fetch and once in Decode. Adding
  the offset therefore gives an address relative to the next instruction,
  which is what 8051 assemblers emit. The PC adder is an 8-bit adder, so
  adding the offset byte modulo 256 is the same as a signed add.
- **`JZ` tests the accumulator directly.** The `z` output of the ALU is
  `ACC == 0`, worked out combinationally. There is no zero flag register.
  So `JZ` sees the accumulator left by the previous instruction.
- **Register write data is ACC, not the ALU result.** `MOV Rn,A` stores
  the accumulator output into the register file.
- **The register number is in the opcode.** Bits 2:0 of IR select Rn for
  both the read port and the write port of the register file.

Example: `ADDC A,#09h` stored at 02h, with A = 37h and C = 0.

| Cycle   | `addr` | `data` | `psen_n` | Result                        |
|---------|--------|--------|----------|-------------------------------|
| Fetch   | 02h    | 34h    | 0        | IR = 34h                      |
| Decode  | 03h    | 09h    | 0        | AUX = 09h                     |
| Execute | 04h    | -      | 1        | A = 40h, C = 0; the next Fetch is at 04h |

## Datapath

```
 data ──┬──────────────► IR ──► control unit (state, ctrl word)
        │
        └──► AUX ◄── R0..R7 ◄──────────────┐ (MOV Rn,A)
              │                            │
              ├──► ALU (ACC op AUX, C, z) ─► ACC ──┴──► acc
              │     ▲                      │
              │     └──────────────────────┘
              └──► PCALU (PC+1 | PC+AUX) ─► PC ──► addr
                     ▲                      │
                     └──────────────────────┘
```

| Module           | Role |
|------------------|------|
| `wimp51`         | Top level. Wires the blocks below together. |
| `wimp51_cu`      | Control unit. Runs Fetch/Decode/Execute, decodes the instruction and drives the control word. |
| `wimp51_alu`     | ALU for pass, ADDC, ANL, ORL, XRL and SWAP. Holds the carry register C and produces `z`. |
| `wimp51_pcalu`   | PC adder/incrementer: PC+1 or PC+AUX. Combinational. |
| `wimp51_regfile` | R0-R7. One combinational read port and one write port. Parameter `NREGS` = 8. |
| `wimp51_aux`     | AUX register. `ctl` selects hold (00), the data bus (01) or the register file (10). |
| `wimp51_reg`     | 8-bit register with write enable. Used for IR, ACC and PC. |
| `wimp51_pkg`     | Opcodes, state enum, operation enums and the control-word struct. |

The control word holds these signals:

- write enables: `ir_we`, `reg_we`, `acc_we`, `c_we` and `pc_we`;
- AUX source select: `aux_ctl`;
- operation selects: `alu_op` and `pcalu_op`;
- the memory strobe `psen_n`.

All of them are decoded combinationally from the state and IR. In Fetch they
do not depend on IR.

## Bus interface and timing

| Port     | Dir | Width | Meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1     | clock; everything changes on the rising edge |
| `rst`    | in  | 1     | synchronous, active high; clears all registers and C, and restarts at Fetch, address 00h |
| `data`   | in  | 8     | program memory data; sampled at the rising edge ending Fetch, and ending Decode of a two-byte instruction |
| `addr`   | out | 8     | always the PC |
| `acc`    | out | 8     | accumulator, for observing a running program |
| `psen_n` | out | 1     | program memory read strobe, active low; low in Fetch and in two-byte Decode cycles |

The memory has to return the byte at `addr` within the same clock cycle. In
other words, it must have an asynchronous read. Assertions in the control
unit check two things:

- the state stays in its three legal values;
- `psen_n` is never low in Execute.

The program space is 256 bytes, the full range of the 8-bit PC. The PC wraps
from FFh to 00h.

## What is choice rather than specification

The following are not fixed by the processor's definition and can be
changed freely:

- synchronous active-high reset, to zero;
- opcode bytes outside the thirteen instructions act as no-ops;
- `z` is computed from the accumulator rather than kept in a register;
- the AUX select code and the ALU and PC adder operation codes;
- the added carry enable `c_we`;
- `psen_n` timing: low exactly in the cycles that read a byte;
- asynchronous-read memory.

Neither the carry nor the state is a port. To watch them, probe
`u_alu.c` and `u_cu.state` hierarchically.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_wimp51` is the system test. It runs the processor together with
  `wimp51_progmem`, a 256-byte behavioural ROM whose bus reads FFh while
  `psen_n` is high. It also includes its own instruction-set reference
  model. For every instruction it checks:
  - the fetch address, which proves the three-cycle timing;
  - `psen_n` in all three cycles;
  - ACC, C and R0-R7.

  It runs a directed program first, containing the `ADDC A,#09h` example
  above. Then it runs 40 random 256-byte programs of 300 instructions each.
  It counts every instruction, taken and untaken `JZ`, backward jumps and
  carry-out, and fails if any of them never happened. The top level has no
  parameters, so this is also the full-size test.
- `tb_wimp51_cu` checks the control word for all 256 opcodes, with `z` both
  low and high, in all three states.
- `tb_wimp51_pcalu` tests the PC adder exhaustively over PC × offset.
- `tb_wimp51_alu`, `tb_wimp51_regfile`, `tb_wimp51_aux` and `tb_wimp51_reg`
  each compare the block against a reference model under random stimulus.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/wimp51_pkg.sv tb/tb_wimp51.sv --top-module tb_wimp51 -o sim
./obj_dir/sim
```

To run a unit test, replace `tb_wimp51` with that test's name. To run your
own program, write its bytes into `u_mem.mem[]` before reset is released.
`tb_wimp51` shows how to do this.
