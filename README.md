# MIPS-lite single-cycle CPU

A 32-bit processor that executes every instruction in exactly one clock
cycle. In each cycle the instruction at the program counter is fetched, its
two source registers are read, the ALU computes, and at the clock edge that
ends the cycle the PC, the register file and the data memory are all updated
at once. Nothing is pipelined, so there are no hazards, stalls or bypasses:
the price is that the clock period must cover the longest path (a load:
instruction memory, register file, ALU, data memory, back to the register
file).

The machine implements six instructions of the MIPS instruction set, enough
for arithmetic, constants, memory access and loops:

| instruction          | effect                                                      |
|----------------------|-------------------------------------------------------------|
| `addu rd, rs, rt`    | R[rd] = R[rs] + R[rt]                                       |
| `subu rd, rs, rt`    | R[rd] = R[rs] - R[rt]                                       |
| `ori  rt, rs, imm16` | R[rt] = R[rs] OR zero-extended imm16                        |
| `lw   rt, imm16(rs)` | R[rt] = MEM[R[rs] + sign-extended imm16]                    |
| `sw   rt, imm16(rs)` | MEM[R[rs] + sign-extended imm16] = R[rt]                    |
| `beq  rs, rt, imm16` | if R[rs] == R[rt]: PC = PC + 4 + (sign-extended imm16 << 2) |

Every instruction that is not a branch also does PC = PC + 4. ADDU and SUBU
ignore overflow.

## Instruction formats

All instructions are 32 bits. Two of the three MIPS formats are used (the
J-type format, 6-bit opcode plus 26-bit target, has no instruction here):

```
R-type  | op 31:26 | rs 25:21 | rt 20:16 | rd 15:11 | shamt 10:6 | funct 5:0 |
I-type  | op 31:26 | rs 25:21 | rt 20:16 |        imm16 15:0                 |
```

The encodings are the standard MIPS ones: R-type is `op = 0x00` with
`funct = 0x21` (ADDU) or `0x23` (SUBU); ORI is `op = 0x0D`, LW `0x23`,
SW `0x2B`, BEQ `0x04`. Any other encoding is executed as a no-op: nothing is
written and the PC advances by 4. The `shamt` field is ignored.

## How one cycle flows through the datapath

```
            +------------------- next address logic <------------+
            |                   (PC+4 or branch target)           |
            v                                                     | Branch & zero
          [PC] --> instruction memory --> instr                   |
                                            |                     |
           rs -> Ra ---+                    |                     |
           rt -> Rb ---+-- register file -- busA ---------> ALU --+--> zero
  rt/rd (RegDst) -> Rw +                  busB --+               |
                       ^                         +-- ALUSrc mux -+   (B input)
                       |   imm16 -> extender ----+                |
                       |                                          v result
                       +--- MemtoReg mux <-- data memory <--- address
                                   ^                       (write data = busB)
                                   +------------- ALU result
```

1. **Fetch.** The PC addresses the instruction memory; the 32-bit word comes
   out combinationally.
2. **Operand read.** `rs` drives read port A and `rt` read port B of the
   register file. Reads are combinational, so busA and busB settle in the
   same cycle.
3. **Execute.** The ALU B operand is either busB (ADDU, SUBU, BEQ) or the
   extended immediate (ORI, LW, SW). The extender sign-extends for LW, SW and
   BEQ and zero-extends for ORI.
4. **Memory.** The ALU result is the data memory address; busB (R[rt]) is the
   store data. The read is combinational, so a load's data is available in
   the same cycle.
5. **Write back.** busW is the ALU result, or the memory output for LW. The
   destination is `rd` for R-type and `rt` for ORI and LW.
6. **Next PC.** A separate incrementer forms PC + 4 and a second adder forms
   PC + 4 + (imm16 << 2). BEQ subtracts its operands in the ALU; the ALU's
   zero output is the equality test that chooses between the two.

At the rising clock edge the PC register, the register file (if RegWr) and
the data memory (if MemWr) capture their new values together. Because the
register file is read combinationally and written only at the edge, one
instruction can read two registers and write a third in the same cycle, even
when the written register is also a source: the source reads the old value.

## Control

The control is a purely combinational decoder from `op` and `funct` to eight
control points, bundled in the packed struct `ctrl_t`:

| instr | RegWr | RegDst | ExtOp | ALUSrc | ALUctr | MemWr | MemtoReg | Branch |
|-------|:-----:|:------:|:-----:|:------:|:------:|:-----:|:--------:|:------:|
| ADDU  | 1     | rd     | -     | busB   | ADD    | 0     | ALU      | 0      |
| SUBU  | 1     | rd     | -     | busB   | SUB    | 0     | ALU      | 0      |
| ORI   | 1     | rt     | zero  | imm    | OR     | 0     | ALU      | 0      |
| LW    | 1     | rt     | sign  | imm    | ADD    | 0     | memory   | 0      |
| SW    | 0     | -      | sign  | imm    | ADD    | 1     | -        | 0      |
| BEQ   | 0     | -      | sign  | busB   | SUB    | 0     | -        | 1      |

Each row is the register transfer of that instruction written as multiplexer
settings. `-` means the value does not matter. The decoder drives 0 there and
ALUctr = ADD for unknown encodings.

The ALU also implements AND and signed set-less-than (result 1 if A < B),
the two further operations a full MIPS ALU needs. No MIPS-lite instruction
selects them, but they are tested. Add, subtract and set-less-than share one
adder (subtraction is A + ~B + 1). The zero output is valid for every
operation.

## Storage elements and clocking

All state changes on the rising edge of the single clock `clk`. Reset `rst`
is asynchronous and active high.

- **PC**: a 32-bit register with write enable, enabled every cycle. Reset
  sets it to 0.
- **Register file**: 32 x 32 bits, two read ports and one write port.
  Register 0 always reads 0 and ignores writes. Reset clears all registers.
- **Memories**: the instruction memory and the data memory are two instances
  of one "idealized" memory. It has one address, one data-in bus and one
  data-out bus. The read is combinational, and the clock matters only for
  writes. Addresses are byte addresses. Only word accesses exist, so address
  bits [1:0] are ignored. The next log2(WORDS) bits select the word, and
  higher bits are ignored, so addresses wrap around the memory. The contents
  are not reset.

### Loading a program

The instruction memory has a load port on the top level: `imem_load_we`,
`imem_load_addr` (a byte address) and `imem_load_data`. Hold `rst` high,
write one word per clock, then release `rst`; the first instruction executed
is the one at address 0. While `rst` is high the data memory is not written.
The data memory has no external port. A testbench initialises it, or a
program builds its data with ORI and SW.

## Top-level interface (`mips_lite_cpu`)

| port             | dir | width | meaning                                       |
|------------------|-----|-------|-----------------------------------------------|
| `clk`            | in  | 1     | clock, rising edge                            |
| `rst`            | in  | 1     | asynchronous reset: PC = 0, registers = 0     |
| `imem_load_we`   | in  | 1     | write `imem_load_data` into instruction memory |
| `imem_load_addr` | in  | 32    | byte address of the word to load              |
| `imem_load_data` | in  | 32    | instruction word                              |
| `pc`             | out | 32    | address of the instruction in execution       |
| `instr`          | out | 32    | the instruction in execution                  |
| `dmem_we`        | out | 1     | this cycle is a store                          |
| `dmem_addr`      | out | 32    | data memory address (ALU result)              |
| `dmem_wdata`     | out | 32    | store data                                    |

Parameters: `IMEM_WORDS = 256` and `DMEM_WORDS = 256` (words, powers of two).
Register count and data width are fixed at 32 in `mips_lite_pkg`.

## Module hierarchy

```
mips_lite_cpu
  control                 op/funct -> ctrl_t
  datapath
    ifetch
      register            PC
      next_address_logic  extender, 2 x adder, mux2
      ideal_memory        instruction memory
    mux2                  RegDst
    regfile
    extender
    mux2                  ALUSrc
    alu                   adder inside
    mux2                  MemtoReg
  ideal_memory            data memory
```

`mips_lite_pkg` holds the opcode/funct enums, the ALU operation enum, the
instruction field structs and `ctrl_t`.

## Where this design makes its own choices

The source lecture fixes the instruction subset, the register transfers, the
building blocks (adder, multiplexer, ALU with a zero test, register with
write enable, 32 x 32 register file with two combinational read ports,
idealized memory) and the shape of the fetch unit. It does not cover the
control logic. The following are this design's own decisions:

- the opcode/funct encodings (standard MIPS) and the handling of unknown
  instructions as no-ops;
- the control decoder itself, and the control point names other than RegWr
  and ALUctr;
- separate instruction and data memories of 256 words each, byte-addressed,
  with wrap-around;
- the rising clock edge, the asynchronous reset, PC reset value 0, and a
  register 0 that is fixed at zero;
- a dedicated incrementer and branch adder for the next PC, rather than
  reusing the main ALU;
- AND and set-less-than in the ALU (SLT signed), and the 3-bit ALUctr
  encoding;
- the instruction memory load port.

Not modelled: input and output devices, and any instruction outside the six
above (no jump, no shifts, no byte or halfword loads).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs.

- `tb_adder`, `tb_mux2`, `tb_extender`, `tb_alu`: corner cases plus random
  operands against arithmetic computed in the testbench. The extender is
  swept over every 7th immediate, both modes.
- `tb_control`: each instruction's row of the table above, and a sweep of
  other opcode/funct values that must decode to a no-op.
- `tb_register`, `tb_regfile`, `tb_ideal_memory`: random traffic against
  array models. They check that reads are combinational, that writes land
  only at the clock edge and only when enabled, and that register 0 stays 0.
- `tb_next_address_logic`, `tb_ifetch`: random PCs, offsets and branch
  decisions against a model PC, one new PC per cycle.
- `tb_datapath`: the datapath with a decoder and data memory written in the
  testbench, running a random program. An instruction-set simulator
  (`tb/mips_lite_ref_pkg.sv`) runs the same program, and the PC, the fetched
  word, every store and all 32 registers are compared every cycle.
- `tb_mips_lite_cpu`: the whole CPU at its default sizes. First a loop sums
  ten words of data memory and stores the result. It must reach its final
  instruction after exactly 67 cycles (67 instructions, one per cycle).
  Then a 3000-cycle random program runs against the instruction-set
  simulator, with the same per-cycle comparisons plus the full data memory
  at the end. It counts ADDU, SUBU, ORI, LW, SW, taken and untaken BEQ, no-op
  encodings and writes aimed at register 0, and fails if any of them never
  occurred.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mips_lite_pkg.sv tb/mips_lite_ref_pkg.sv tb/tb_mips_lite_cpu.sv \
    --top-module tb_mips_lite_cpu -o sim
./obj_dir/sim
```

Any other testbench works the same way: replace the testbench file and the
`--top-module` name. Verilator finds the remaining modules in `rtl/` by file
name. The whole CPU test takes well under a second.

To run your own program, encode it with the functions in `mips_lite_ref_pkg`
(`addu(rd, rs, rt)`, `ori(rt, rs, imm)`, `lw(rt, imm, rs)`,
`beq(rs, rt, offset_in_words)`, ...). Load it through the load port as
`tb_mips_lite_cpu` does. A `beq $0, $0, -1` makes a convenient halt loop.

## Changing it

- Memory depth: set `IMEM_WORDS` / `DMEM_WORDS` on `mips_lite_cpu`. Keep
  them powers of two.
- New instruction: add its opcode or funct to `mips_lite_pkg` and a row to
  `control`. If it needs a new datapath path, add a control point to
  `ctrl_t` and a multiplexer in `datapath`. Teach `mips_lite_iss` the
  instruction so that the end-to-end tests keep comparing.
- New ALU operation: extend `alu_op_e` and the case statement in `alu`.
