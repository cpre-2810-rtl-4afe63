# i281: a single-cycle 8-bit teaching CPU

The i281 is a small processor that finishes one whole instruction in every
clock cycle. It has four 8-bit registers (A, B, C, D), an ALU that can shift
left, shift right, add and subtract, four flags (carry, overflow, negative,
zero), a 6-bit program counter over a 64-word code memory of 16-bit
instructions, and a byte-wide data memory. There is no pipeline, no stall and
no multi-cycle state. Eighteen control lines, c1 to c18, are decoded from the
instruction currently under the program counter. They steer a handful of
2-to-1 multiplexers so that every instruction uses the same datapath.

This RTL follows the gate-level description of the i281 in the CprE 2810
lecture notes on the ALU and the program counter. It covers the ALU and its
parts, the flags register, the program counter and its update logic, the
branch-condition logic, and the control table. It also covers the parts those
notes name but do not draw: the register file, the memories and the
instruction decoder.

## Instruction format

```
 15    12 11  10 9    8 7              0
+--------+------+------+----------------+
| opcode |  X   |  Y   | immediate /    |
|        |      | /sub | address/offset |
+--------+------+------+----------------+
```

Registers are coded A = 00, B = 01, C = 10, D = 11.

| opcode | instructions          | bits 9:8 (sub-opcode)                      |
|--------|-----------------------|--------------------------------------------|
| 0000   | NOOP                  |                                            |
| 0001   | INPUTC, INPUTCF, INPUTD, INPUTDF | 00, 01, 10, 11                  |
| 0010   | MOVE X, Y             | Y = source register                        |
| 0011   | LOADI / LOADP X, imm  |                                            |
| 0100   | ADD X, Y              |                                            |
| 0101   | ADDI X, imm           |                                            |
| 0110   | SUB X, Y              |                                            |
| 0111   | SUBI X, imm           |                                            |
| 1000   | LOAD X, [imm]         |                                            |
| 1001   | LOADF X, [Y + imm]    |                                            |
| 1010   | STORE [imm], X        |                                            |
| 1011   | STOREF [Y + imm], X   |                                            |
| 1100   | SHIFTL X / SHIFTR X   | bit 8: 0 left, 1 right                     |
| 1101   | CMP X, Y              |                                            |
| 1110   | JUMP offset           |                                            |
| 1111   | BRE/BRZ, BRNE/BRNZ, BRG, BRGE | 00, 01, 10, 11                     |

The source gives the encodings of MOVE, LOADI, ADD, ADDI, LOAD, STORE, CMP,
JUMP and BRG (sub-opcode 10) through its example program. The other opcodes
are numbered in the order of the control table. The sub-opcodes of the INPUT
group, of the two shifts and of BRE, BRNE and BRGE are this design's own
assignment. If you need binary compatibility with another i281
implementation, `rtl/i281_pkg.sv` and `rtl/control_unit.sv` are the only
places to change.

## The datapath and its multiplexers

The datapath is hard to follow because a few buses serve many purposes. In
one cycle:

1. The code memory is read combinationally at `pc`. The low byte of the
   instruction is `imm`.
2. Register read port 0 (selected by c4 c5) always feeds the ALU's first
   operand.
3. **ALU source mux (c11).** The second operand is register port 1 (c6 c7)
   when c11 = 0, and `imm` when c11 = 1.
4. **ALU result mux (c15).** It passes the ALU result when c15 = 0, and `imm`
   unchanged when c15 = 1. Its output has three uses:
   - the value written back to a register;
   - the data memory address;
   - the code memory write address.

   So LOAD, STORE and INPUTD use `imm` as an address. LOADF, STOREF and
   INPUTDF use register + `imm`, computed by the ALU as an addition.
5. **Data memory input mux (c16).** It writes register port 1 (STORE,
   STOREF) or the external `data_switches` (INPUTD, INPUTDF).
6. **Write-back mux (c18).** It writes the ALU-result-mux output or the byte
   read from data memory (LOAD, LOADF) into the register chosen by c8 c9,
   when c10 = 1.
7. **PC mux (c2).** It chooses PC+1 or PC+1+offset. The PC loads on every
   edge, because c3 is always 1.

Three consequences:

- **MOVE is an addition.** MOVE X, Y computes Y + imm, and the encoded
  immediate is 0.
- **CMP is a SUB without write-back.** It only changes the flags.
- **The ALU never idles.** Every instruction that does not use the ALU leaves
  c12 = c13 = 0, so the ALU computes a left shift and the result is ignored.

Only seven opcodes write the flags (c14 = 1): ADD, ADDI, SUB, SUBI, SHIFTL,
SHIFTR and CMP.

| row     | c1 | c2 | c4c5 | c6c7 | c8c9 | c10 | c11 | c12c13 | c14 | c15 | c16 | c17 | c18 |
|---------|----|----|------|------|------|-----|-----|--------|-----|-----|-----|-----|-----|
| INPUTC  | 1  |    |      |      |      |     |     |        |     | 1   |     |     |     |
| INPUTCF | 1  |    | X    |      |      |     | 1   | 10     |     |     |     |     |     |
| INPUTD  |    |    |      |      |      |     |     |        |     | 1   | 1   | 1   |     |
| INPUTDF |    |    | X    |      |      |     | 1   | 10     |     |     | 1   | 1   |     |
| MOVE    |    |    | Y    |      | X    | 1   | 1   | 10     |     |     |     |     |     |
| LOADI   |    |    |      |      | X    | 1   |     |        |     | 1   |     |     |     |
| ADD     |    |    | X    | Y    | X    | 1   |     | 10     | 1   |     |     |     |     |
| ADDI    |    |    | X    |      | X    | 1   | 1   | 10     | 1   |     |     |     |     |
| SUB     |    |    | X    | Y    | X    | 1   |     | 11     | 1   |     |     |     |     |
| SUBI    |    |    | X    |      | X    | 1   | 1   | 11     | 1   |     |     |     |     |
| LOAD    |    |    |      |      | X    | 1   |     |        |     | 1   |     |     | 1   |
| LOADF   |    |    | Y    |      | X    | 1   | 1   | 10     |     |     |     |     | 1   |
| STORE   |    |    |      | X    |      |     |     |        |     | 1   |     | 1   |     |
| STOREF  |    |    | Y    | X    |      |     | 1   | 10     |     |     |     | 1   |     |
| SHIFTL  |    |    | X    |      | X    | 1   |     | 00     | 1   |     |     |     |     |
| SHIFTR  |    |    | X    |      | X    | 1   |     | 01     | 1   |     |     |     |     |
| CMP     |    |    | X    | Y    |      |     |     | 11     | 1   |     |     |     |     |
| JUMP    |    | 1  |      |      |      |     |     |        |     |     |     |     |     |
| BRxx    |    | B  |      |      |      |     |     |        |     |     |     |     |     |

c3 is 1 in every row. NOOP has only c3. Blank cells are 0. The packed struct
`ctrl_t` in `i281_pkg` holds c1..c18 from its top bit down, so the decoder
output can be read straight against this table.

## ALU

`alu` joins three blocks, wired as in the source's figures:

- **Shifter.** It moves the operand one place. Its L/R pin is ALU_SELECT0.
  The vacated bit is filled with 0, and the bit pushed out goes to the carry
  flag. The zero fill, which makes SHIFTR logical rather than arithmetic, is
  this design's choice.
- **Ripple-carry adder/subtractor.** It has eight full adders. ALU_SELECT0 is
  also its add/sub pin: it inverts Y through XOR gates and drives the
  carry-in, so subtraction computes X + ~Y + 1. The carry is c8 and the
  overflow is c8 XOR c7. After a subtraction the carry means "no borrow".
- **Bus multiplexer.** ALU_SELECT1 picks the shifter (0) or the adder (1). The
  same select chooses the carry source (shift-out or adder carry) and forces
  overflow to 0 for shifts.

Zero is the NOR of the result bits and negative is bit 7.

## Branches

The condition lines apply to the flags left by the last flag-writing
instruction, normally a CMP X, Y:

| branch    | taken when (signed X vs Y)           |
|-----------|--------------------------------------|
| BRE/BRZ   | ZF                                   |
| BRNE/BRNZ | not ZF                               |
| BRG       | not ZF and (NF XNOR OF)              |
| BRGE      | NF XNOR OF                           |

c2 = JUMP + BRE·B1 + BRNE·B2 + BRG·B3 + BRGE·B4 (`branch_logic`). The carry
flag is stored but no branch reads it. The CPU has no unsigned comparisons.

## Program counter

The PC has 6 bits, and reset loads 100000 (address 32). `pc_update_logic`
has two adders that only add, each with its carry-in tied to 0:

- the first forms PC + 1;
- the second adds the low six bits of the instruction's second byte to that
  sum.

A branch offset is therefore relative to the following instruction and spans
-32..+31. The example's `BRG End` at 100100 with offset 3 reaches 101000, and
`JUMP Loop` at 100111 with offset 11111011 (-5) reaches 100011. Carries are
dropped, so the PC wraps from 111111 to 000000.

## Memories, reset and the outside world

- **Code memory.** 64 × 16 bits, read combinationally, written by INPUTC and
  INPUTCF (c1) with the word on the `code_switches` port.
- **Data memory.** `DMEM_DEPTH` bytes (16), read combinationally, written by
  c17. Addresses are 8 bits wide, and only the low four bits are used.
- **Reset.** Reset is synchronous and active low (`rst_n`). It sets the PC to
  `PC_RESET`, and clears the registers and flags. It also loads both memories
  from the parameter images `CODE_INIT` and `DATA_INIT`.
- **Default images.** By default the images hold the example program that
  adds 1 to 5. Code is at 100000..101000 and N = 5 is at data address 0. The
  program leaves 15 at data address 2 after 31 clocks.

The memory sizes, the reset and the loading of images at reset are this
design's choices. The source gives the 64-word code memory, but says nothing
about reset, the data memory size or how memory contents get there. The
switches that INPUTC/INPUTD read are plain input ports.

Outputs `pc`, `instr`, `flags`, `regs[4]` and `dmem[16]` show the state
between clock edges.

## Files

| file                       | contents                                        |
|----------------------------|-------------------------------------------------|
| `rtl/i281_pkg.sv`          | widths, opcode enum, `ctrl_t`, `flags_t`, example images |
| `rtl/i281_cpu.sv`          | top level                                       |
| `rtl/control_unit.sv`      | instruction decoder (c1..c18)                   |
| `rtl/branch_logic.sv`      | c2                                              |
| `rtl/alu.sv`               | ALU                                             |
| `rtl/shifter.sv`, `rtl/add_sub.sv`, `rtl/full_adder.sv`, `rtl/flag_calc.sv`, `rtl/bus_mux2.sv` | ALU parts and the bus multiplexer |
| `rtl/flags_register.sv`, `rtl/pc_register.sv` | the two parallel-access registers |
| `rtl/pc_update_logic.sv`   | PC+1 and PC+1+offset                            |
| `rtl/register_file.sv`, `rtl/code_memory.sv`, `rtl/data_memory.sv` | storage |
| `tb/tb_<module>.sv`        | self-checking testbench of each module          |
| `tb/tb_i281_cpu.sv`        | CPU against an instruction-set model, directed and random programs |
| `tb/tb_i281_sum.sv`        | CPU at its defaults running the sum-of-1-to-5 example |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5 (the package goes first, and only once):

```
verilator --binary --timing -Irtl --top-module tb_i281_cpu \
    rtl/i281_pkg.sv $(ls rtl/*.sv | grep -v _pkg) tb/tb_i281_cpu.sv -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_i281_cpu` with its name. Each testbench
checks its block in this way:

- **ALU, adder/subtractor, shifter, flag calculator, PC update logic.**
  Exhaustive checks against integer arithmetic.
- **Decoder.** Checked row by row against the control table above.
- **Branch logic.** Checked against signed comparisons of random operand
  pairs.
- **Registers and memories.** Random traffic against simple models.
- **CPU (`tb_i281_cpu`).**
  - Five CPUs run side by side for 600 clocks each. One runs a directed
    program; four run pseudo-random code images.
  - After every clock, each CPU's PC, flags, registers and data memory must
    equal those of an independent instruction-level model.
  - The testbench counts how often each mechanism happens and fails if one
    never does:
    - every control-table row;
    - each branch, both taken and not taken;
    - flag writes and flag holds;
    - PC wrap-around;
    - shift carry and arithmetic overflow;
    - executing code that INPUTC wrote.
- **Example program (`tb_i281_sum`).** Runs with every CPU parameter at its
  default.

To load your own program, override `CODE_INIT` and `DATA_INIT` on `i281_cpu`
with images built like `sum_1_to_5_code()` in the package.

## Limits

- The shifter's fill bit and the missing opcode numbers are choices, not
  taken from the source (see above).
- No unsigned branches. The carry flag is only observable.
- The memories load at reset from parameters. A loader program that fills
  code memory from the switches with INPUTC works, but none is provided.
