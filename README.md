# A 16-bit control-word pipeline and a serial multiply-accumulate accelerator

This repository holds two small designs that are meant to be compared with each other:

1. **A four-stage, 16-bit pipelined CPU.** It has no instruction memory and no decoder.
   Every clock it takes one *control word*: a ready-made bundle of register selects, unit
   enables and multiplexer selects. An off-chip assembler produces these words and also
   spaces out instructions that depend on each other. The CPU has eight registers,
   AND/OR/adder-MIN/shifter/5-bit-multiplier units and a 512-bit data memory.
2. **A "BNN" accelerator.** It computes `y = Σ x_i · w_i` over five pairs of 5-bit
   two's-complement inputs `x_i` and weights `w_i`. (BNN stands for Bayesian neural
   network: the weights are Gaussian samples drawn off-chip.) It reuses one multiplier and
   one adder, and takes one pair per clock.

The point of the comparison: the same five-term dot product takes 26 cycles as a CPU
program and 7 cycles on the accelerator, a speed-up of 3.7.

## Files

| file | what it is |
|---|---|
| `rtl/cpu_pkg.sv` | widths, the control-word struct `ctrl_word_t`, stage-register records, `dest_sel_e` |
| `rtl/reg_file.sv` | 8 × 16 register file, built from the three blocks below |
| `rtl/reg16.sv` | one 16-bit register with a load enable (the gated clock) |
| `rtl/decoder3to8.sv` | 3-to-8 write decoder with an enable |
| `rtl/mux8to1.sv` | 16-bit 8-to-1 read multiplexer (one per read port) |
| `rtl/and_unit.sv`, `rtl/or_unit.sv` | 16-bit AND / OR, which evaluate only when enabled |
| `rtl/adder_min16.sv` | 16-bit ripple-carry adder/subtractor; MIN built on the subtractor |
| `rtl/shifter16.sv` | 16-bit logarithmic shifter (1/2/4/8 ranks), left or right |
| `rtl/mul5.sv` | 5 × 5 signed multiplier, sign-extended output |
| `rtl/sram512.sv` | 32 × 16 data memory in two 16-word banks, registered read |
| `rtl/stage_reg.sv` | generic stage register (type parameter), used for ID/EX, EX/MEM, MEM/WB |
| `rtl/cpu_core.sv` | the CPU |
| `rtl/bnn_mac.sv` | the accelerator |
| `rtl/ee577a_top.sv` | both designs side by side (they share only the clock) |
| `tb/cpu_asm_pkg.sv` | test-side assembler (instruction → control word), hazard check, reference model |
| `tb/*_tb.sv` | one self-checking testbench per module; `ee577a_top_tb` is the end-to-end test |

## The CPU

### The control word is the instruction

`ctrl_word_t` (47 bits) holds these fields:

| field | width | role |
|---|---|---|
| `value` | 16 | immediate / external value |
| `addr` | 5 | data-memory word address |
| `dest_reg`, `read_sel1`, `read_sel2` | 3 each | destination and source registers |
| `vr_select` | 1 | operand B = `value` (1) or register `read_sel2` (0) |
| `and_en`, `or_en`, `add_en`, `sub_en`, `mul_en`, `shift_en` | 1 each | unit enables |
| `shift_dir` | 1 | 0 = left, 1 = right |
| `dest_value` | 3 | result select: AND 0, ADD 1, MIN 2, MUL 3, SHIFT 4, OR 5 |
| `data_in` | 1 | store data = `value` (1) or register `read_sel1` (0) |
| `write_en`, `read_en` | 1 each | memory write / read |
| `value_select` | 1 | write back `value` (LOADI) |
| `mem_select` | 1 | write back the memory read data (LOAD) |
| `reg_write` | 1 | write the register file |

Each instruction of the assembly language sets these fields as follows.
`encode()` in `tb/cpu_asm_pkg.sv` implements the table.

| instruction | set fields |
|---|---|
| `STOREI addr #v` | `data_in`, `write_en` |
| `STORE addr $s` | `write_en`, store data from `read_sel1` = s |
| `LOADI $d #v` | `value_select`, `reg_write` |
| `LOAD $d addr` | `read_en`, `mem_select`, `reg_write` |
| `AND/OR/ADD/MUL/MIN $d $a $b` | unit enable (`sub_en` for MIN), `dest_value`, `reg_write` |
| `ANDI/ORI/ADDI/MULI/MINI $d $a #v` | as above plus `vr_select` |
| `SFL/SFR $d $a #n` | `shift_en`, `shift_dir` (1 for SFR), `vr_select`, `dest_value`=4 |
| `NOP` | nothing |

A burst store such as `STOREI 2 10H #000B #00EE` is split by the assembler into one
`STOREI` per word.

### Pipeline and the three-slot rule

```
        ID                    EX                         MEM                       WB
ctrl ─► reg_file read ─┬► [ID/EX] ─► VRselect mux ─► units ─► Destvalue mux ─► [EX/MEM]
                       │                                                           │
                       │        Data_in mux ─► sram512 (write / registered read)   │
                       │        Value_select mux ───────────────────► [MEM/WB] ─► Mem_select mux ─► reg_file write
```

* **ID** reads both source registers. The ID/EX register carries both reads and the whole
  control word.
* **EX** picks operand B (register or `value`). Five units then work in parallel. Each unit
  sees zeros unless it is enabled, so idle units do not switch. `dest_value` picks the
  result.
* **MEM** writes the memory with register `read_sel1` or `value`, or reads it. It also
  chooses the non-memory write-back value: `value` for LOADI, otherwise the unit result.
* **WB** picks between the memory read data and that value, and writes register
  `dest_reg` at the end of the cycle.

**Timing.** Suppose a control word is applied in cycle *n*:

* its register write completes at the end of cycle *n + 3*;
* its memory write completes at the end of cycle *n + 2*.

There is no interlock, no forwarding and no same-cycle write-through in the register file.
An instruction that reads a register must therefore be applied no earlier than cycle
*n + 4*: three slots after the writer. The assembler fills those slots with independent
instructions, or with NOPs when it has none. `hazard()` in `tb/cpu_asm_pkg.sv` is that
rule. Memory operations need no spacing because they happen in program order in one stage.

### Arithmetic details

* **ADD / ADDI** wrap modulo 2¹⁶.
* **MIN / MINI** compute `A − B` on the adder as `A + ~B + 1` and look at the carry out of
  the 16th full adder. The carry is 1 when A ≥ B, and the unit then outputs B. The result
  is the **unsigned** minimum: `MIN(0x0181, 0x92FF) = 0x0181`.
* **MUL / MULI** multiply the **low five bits** of each operand as two's-complement numbers.
  The 10-bit product is sign-extended to 16 bits. For example, `0x002F × 0x0004` uses 15 × 4
  and gives `0x003C`. An ISA-level model that multiplies the low five bits as unsigned
  numbers agrees with this one only while bit 4 of both operands is 0.
* **SFL / SFR** are logical shifts by the low four bits of operand B, with zero fill.
* **AND / OR** are plain bitwise operations. In the original circuit they are dynamic gates;
  here a disabled unit outputs 0.

### Memory

The memory `sram512` has 32 words of 16 bits in two banks of 16 words. Address bit 4
selects the bank. A write takes effect on the clock edge. A read loads the output register
on the edge, so the data comes out in the next stage (WB). The array has no reset, so a
program should write a word before it reads it. The circuit precharges its bitlines at the
start of each access; that phase has no RTL counterpart.

### Reference result

The CPU test program is:

```
STOREI 0AH #002f ; STOREI 0BH #0004 ; STOREI 2 10H #000B #00EE
LOAD $1 0AH ; LOAD $2 0BH ; LOAD $3 10H ; LOAD $4 11H
MUL $5 $1 $2 ; MUL $6 $3 $4 ; STORE 00H $5 ; STORE 01H $6
SFL $5 $3 #0003 ; OR $6 $5 $4 ; ANDI $6 $6 #00AA ; ADD $6 $6 $4
STORE 02H $5 ; STORE 03H $6
LOAD $1 00H ; LOAD $2 01H ; LOAD $3 02H ; LOAD $4 03H
```

It must leave `r0..r7 = 0000 003c 009a 0058 0198 0058 0198 0000`, and it does.

The second reference is the accelerator's dot product written as a CPU program, run from
reset:

```
LOADI $1 #5 ; LOADI $2 #8 ; LOADI $3 #3 ; LOADI $4 #0 ; LOADI $5 #1      weights
MULI $1 $1 #2 ; MULI $2 $2 #11 ; MULI $3 $3 #7 ; MULI $4 $4 #14 ; MULI $5 $5 #4
ADD $0 $1 $2 ; ADD $1 $0 $3 ; ADD $1 $1 $4 ; ADD $0 $1 $5
```

It must leave `r0..r7 = 007b 0077 0058 0015 0000 0004 0000 0000`: the sum 123, the partial
sum 119 and the products. The last three ADDs each wait three slots for the one before, so
the program needs 23 issue slots. Its final write-back lands 26 cycles after the first
LOADI. The accelerator takes 7 cycles for the same work.

## The accelerator (`bnn_mac`)

```
x,w ─► [x,w regs] ─► mul5 (10-bit) ─► [product reg] ─► 10-bit adder ─► [accumulator] ─► s
                                                              ▲              │
                                                              └──────────────┘
```

One pair enters per clock and there are three register stages. A pair applied in cycle *n*
is included in `s` from cycle *n + 3*. With pairs in cycles 0–4, `s` holds the full sum
from cycle 7. At a 5 ns clock that is 35 ns. For the reference data
`w = (5, 8, 3, 0, 1)`, `x = (2, 11, 7, 14, 4)`, the running sum steps through
0, 10, 98, 119, 119, 123.

* `r` resets the whole pipeline. `r_final` clears only the accumulator, ready for the next
  dot product. Both are asynchronous and active high.
* `in_valid`, the pair counter and `done` are additions of this design. The accumulator
  stops after `N_PAIRS` products, so inputs that stay on the port after the last pair are
  ignored. `done` stays high until the next clear.
* Products and sums are 10 bits wide and wrap. Five products of 5-bit signed numbers can
  reach ±1280, which does not fit. The caller must keep inputs in range (the reference
  data sums to 123).
* Weights are computed off-chip as `w = ε·μ + σ`. ε comes from a Wallace-method Gaussian
  generator, which is not part of the hardware.

## Where this RTL departs from the original circuit

* **Memory controls.** In the original test vectors, the memory address and read/write
  enables are applied straight to the memory two cycles after the instruction. Here they
  travel with the instruction through ID/EX and EX/MEM, so one control word describes one
  instruction completely.
* **Multiplier signedness.** The multiplier is signed, following the circuit description.
  The original instruction-level reference model used unsigned 5-bit operands. The two
  agree on every program in the test suite except random operands with bit 4 set.
* **MIN.** MIN compares through the subtractor's carry out, which makes it unsigned. This
  matches the circuit's worked example and the instruction-level reference.
* **Circuit techniques.** Clock gating, dynamic logic, transmission-gate flip-flops and
  bitline precharge are circuit techniques. They appear only as enables and operand
  isolation.
* **Resets.** The stage registers, the register file and the memory output register reset
  to zero (active low). The memory array does not reset.
* **Accelerator handshake.** `in_valid` and `done` on the accelerator are additions.
* **Accelerator latency.** The original reports the accelerator result after about 43 ns
  at a 5 ns clock. This pipeline delivers it after 7 cycles.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. For example,
with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module ee577a_top_tb \
    rtl/cpu_pkg.sv tb/cpu_asm_pkg.sv rtl/*.sv tb/ee577a_top_tb.sv
./obj_dir/Vee577a_top_tb
```

For a unit test, put the package first and list the module and its testbench, e.g.
`rtl/cpu_pkg.sv rtl/adder_min16.sv tb/adder_min16_tb.sv --top-module adder_min16_tb`.
`cpu_core_tb` and `ee577a_top_tb` also need `tb/cpu_asm_pkg.sv`.

What the tests check:

* **`cpu_core_tb`** runs the reference program and then 3000 random instructions of all 17
  kinds. Every register write-back is compared in value and in cycle (issue + 3) against
  the reference model.
* **`ee577a_top_tb`** runs the reference program, MIN/SFR, and the dot product both as a
  CPU program and on the accelerator. It prints the cycle counts of each. It also counts
  each mechanism and fails if any never occurs: every unit, both shift directions,
  immediates, both kinds of store, loads, LOADI, hazard NOPs, accumulation, `done`, the
  clear, and pairs ignored after `done`.
* **The unit testbenches** check each block exhaustively or with random operands against
  independent arithmetic.

To change the design, start from `cpu_pkg.sv`: the widths, the field list of the control
word and the `dest_value` codes all live there. The assembler and reference model in
`tb/cpu_asm_pkg.sv` must follow any change to the encoding.
