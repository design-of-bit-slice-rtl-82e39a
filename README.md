# RAP-CLA bit-slice processor

A carry look-ahead adder spends most of its logic on the long carry terms:
the carry into bit *i+1* depends on every generate signal below it and on
the carry-in. In error-tolerant work (signal and image processing), most of
those long terms almost never matter. A **reconfigurable approximate carry
look-ahead adder (RAP-CLA)** splits every carry into two parts:

* the **approximate part**: only the generate terms of the *W* bits just
  below the carry (a sliding window);
* the **augmenting part**: everything else, that is the generate terms
  further down and the carry-in term.

A 2:1 multiplexer on each carry picks either the approximate part alone
(approximate mode) or the OR of both parts (exact mode). One adder therefore
serves both exact and error-tolerant operations, and the mode can change from
one operation to the next. In approximate mode the augmenting logic is idle
and could be switched off.

This repository holds SystemVerilog for such an adder and for a small
**bit-slice processor** built around it. The processor has four 4-bit ALU
slices that share a RAP-CLA carry unit, giving a 16-bit ALU with a 32-bit
result. A micro-sequencer and a control ROM drive the ALU.

```
            prog_we/addr/data
                   |
   start,instr  +--v---------+  uinstr   +-----------------------------------+
 -------------->| control_rom|---------->|        bitslice_alu (16 bit)      |
   +----------->| + micro_   | op,approx | slice3 slice2 slice1 slice0 (4b)  |
   |            | sequencer  | src_acc   |   |g,p   |      |      |  ^ c    |
   |            +------------+           |   v      v      v      v  |      |
   |                                     |   rapcla_carry (shared, window W) |
 a,b --> a_reg,b_reg -----[A mux]------->|   rapcla_multiplier (16x16)       |
                            ^            |   result select P1..P8            |
                            |            +----------------+------------------+
                            +-- acc[15:0] <---- acc (32) <-+ alu_out
                                   |
                                result
```

## How a RAP-CLA carry is formed

Bit *k* has generate `G(k) = A(k) & B(k)` and propagate `P(k) = A(k) ^ B(k)`.
The sum bit is `S(k) = P(k) ^ C(k)`. The exact carry into bit *i+1* is

```
C(i+1) = OR_{j=0..i} G(j)·P(j+1)···P(i)   |   Cin·P(0)···P(i)
```

RAP-CLA cuts this sum of products at the window boundary:

```
Capx(i+1) = OR_{j=max(0,i-W+1)..i} G(j)·P(j+1)···P(i)
Caug(i+1) = OR_{j=0..i-W}          G(j)·P(j+1)···P(i)  |  Cin·P(0)···P(i)
C(i+1)    = approx ? Capx(i+1) : Capx(i+1) | Caug(i+1)
```

`rtl/rapcla_carry.sv` builds `Capx` literally, as a window of at most *W*
product terms per carry. It does not write `Caug` term by term. Instead it uses the
identity `Caug(i+1) = Cexact(i-W+1) · P(i-W+1)···P(i)`: the OR of all terms
below the window is the exact carry into the window, and that carry must
travel across the whole window. `Cexact` comes from an ordinary exact
look-ahead. In approximate mode the inputs of the augmenting logic of the
reconfigurable carries (`G`, `P`, `Cin`) are forced to zero. This operand isolation is the logic
counterpart of the supply-gating header transistor that a full-custom
implementation would use.

Consequences worth knowing:

* **When approximate mode errs.** An approximate sum is wrong exactly when
  the exact addition has a carry chain that travels more than *W* positions:
  a generate followed by at least *W* propagates. Shorter chains are
  computed correctly. Example with *W* = 4: `FFFF + 0001` gives `0FFE0`.
  The carry from bit 0 reaches bits 1-4 and dies there.
* **Cin in approximate mode.** The carry-in belongs to the augmenting part,
  so no computed carry sees it. Sum bit 0 still uses it directly. As a
  result, approximate subtraction (`A + ~B + 1`) gets the `+1` only in
  bit 0.
* **Partitioning.** `APX_BITS` makes only carries `C(1)..C(APX_BITS)`
  reconfigurable. The carries above it are always exact, which trades
  idle logic for accuracy. The default is the whole width.
* `W >= N` makes the adder exact in both modes, except for the carry-in.

Error of an 8-bit RAP-CLA in approximate mode, measured over all 65,536
operand pairs with carry-in 0 (`tb/tb_error_analysis.sv`):

* MED is the mean error distance; NMED is MED / 510, the largest sum.
* MRED is the mean relative error distance.
* AR is the mean accuracy, 1 - |error| / exact sum.
* P(accept) is the share of pairs whose accuracy is at least 0.95.

| W | error rate | MED  | NMED   | MRED   | AR     | P(accept) |
|---|-----------:|-----:|-------:|-------:|-------:|----------:|
| 2 | 35.2 %     | 31.5 | 0.0618 | 0.1266 | 0.8734 | 0.7074 |
| 3 | 15.5 %     | 15.5 | 0.0304 | 0.0646 | 0.9354 | 0.8542 |
| 4 | 6.25 %     | 7.5  | 0.0147 | 0.0317 | 0.9683 | 0.9375 |
| 6 | 0.78 %     | 1.5  | 0.0029 | 0.0062 | 0.9938 | 0.9922 |

## The bit-slice ALU

`bitslice_alu` puts `SLICES` identical 4-bit `alu_slice` modules side by
side. Their control lines are wired in parallel: invert B, slice function
(sum, XOR, AND, OR) and invert output. A slice does not ripple carries to
its neighbour. Each slice exports per-bit `G` and `P` to one shared
`rapcla_carry` across the full word and gets back the carry into each of
its bits. This mirrors a classic ALU-slice plus look-ahead-generator chip
set. As a result, the approximation window slides across slice boundaries
just as it would in a monolithic adder.

The 3-bit select code chooses one of eight results, P1..P8:

| sel | result | `alu_out` (32 bits)                       | uses the adder mode |
|-----|--------|-------------------------------------------|---------------------|
| 000 | P1 add | `{15'b0, cout, A+B}`                       | yes |
| 001 | P2 sub | `A-B` sign-extended (`A + ~B + 1`)         | yes |
| 010 | P3 mul | `A*B`, 32 bits                             | yes |
| 011 | P4 xor | `{16'b0, A^B}`                             | no  |
| 100 | P5 and | `{16'b0, A&B}`                             | no  |
| 101 | P6 or  | `{16'b0, A|B}`                             | no  |
| 110 | P7 nand| `{16'b0, ~(A&B)}`                          | no  |
| 111 | P8     | zero (unused)                              | no  |

Add = 000 and XOR = 011 come from the published ALU waveforms, which also
show subtract, multiply and NAND results. The position of AND, OR and the
unused code is this design's assignment. Reference values, all reproduced by
the testbenches:

* A = 93FF, B = 198F: difference 7A70, product 0EC69271, NAND EE70.
* A = 29C5, B = 81A5: XOR A860, product 152730F9.

**Multiplier.** `rapcla_multiplier` is an unsigned row-by-row array
multiplier. Row 0 is `A & B[0]`. Each later row adds `A & B[i]` to the upper
16 bits of the running sum with a 16-bit `rapcla_adder`. The low bit drops
out as product bit *i* and the carry-out becomes the new top bit. All 15 row
adders follow the ALU's mode, so approximate mode yields an approximate
product. The multiplier is combinational, like the rest of the ALU.

## Micro-sequenced control

A micro-instruction (`rapcla_pkg::uinstr_t`, 6 bits) is
`{last, approx, src_acc, op[2:0]}`:

* `op`: the ALU select code.
* `approx`: the adder mode for this step.
* `src_acc`: operand A comes from the accumulator's low half instead of
  the latched `a` input.
* `last`: this word ends the program.

`control_rom` holds 16 words with asynchronous read. Reset loads a default
program in which word `{approx, sel}` is the one-step program "operation
`sel` in mode `approx`". With these contents, the 4-bit `instr` input of the
processor acts as a plain mode + opcode field. The write port
(`prog_we/prog_addr/prog_data`) replaces words, for example to load a
multi-step program. The example below multiplies, then adds B approximately,
then subtracts B exactly:

```
addr 4: {last 0, approx 0, src_acc 0, MUL}
addr 5: {last 0, approx 1, src_acc 1, ADD}
addr 6: {last 1, approx 0, src_acc 1, SUB}
```

`micro_sequencer` is a two-state machine (IDLE, RUN) with a program
counter. Timing of `bitslice_processor`:

```
clk edge        0            1            ...      K
start   ____/‾‾‾‾\____                                   (sampled at edge 0)
a,b     ====X valid X=====                               (latched at edge 0)
busy    ______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______
step            word 0       word 1   ...  word K-1
acc                     w0 result ...            final
done    ___________________________________/‾‾‾‾\____  (after edge K)
```

A K-word program raises `done` for one cycle, K edges after the edge that
samples `start`. At that point `result` (the accumulator) holds the final
value. A single operation from the default ROM takes one cycle. A `start`
pulse while `busy` is ignored.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `bitslice_processor`, `bitslice_alu` | `SLICES` | 4 | number of 4-bit slices (word = 4·SLICES bits) |
| all adder users | `W` | 4 | approximation window, in bits |
| all adder users | `APX_BITS` | word width | number of low-order carries that are reconfigurable |
| `bitslice_processor`, `control_rom` | `ROM_DEPTH` / `DEPTH` | 16 | control store words |
| `rapcla_adder`, `rapcla_carry`, `rapcla_multiplier` | `N` | 16 | operand width |

The `instr`, `prog_addr` and ROM address widths follow `$clog2(ROM_DEPTH)`.
The default ROM contents assume a depth of at least 16.

## What follows the published design and what does not

The following come from the published description:

* the two-part carry split and the mode multiplexer on each carry;
* gating of the augmenting part in approximate mode (here as operand
  isolation, since a power switch is not logic);
* the partitioning option;
* 4-bit slices with parallel control lines, four of them forming a 16-bit ALU;
* 16-bit operands, a 3-bit select and 32-bit results P1..P8;
* add = 000, XOR = 011, and the subtract, multiply and NAND results;
* a micro-sequencer with a control ROM supplying the slice controls.

The following are this design's own choices:

* the window width W = 4 (no value is published);
* the shared carry unit across slices;
* the slice's internal encoding;
* the codes of AND, OR and the unused eighth result;
* the output formatting of add and subtract;
* the structure of the multiplier;
* the micro-instruction format, ROM size, default contents and write port;
* the accumulator and the `src_acc` feedback path;
* the start/busy/done handshake;
* an asynchronous active-low reset.

Not modelled:

* the supply-gating transistor itself;
* the error-reduction circuitry of earlier approximate adders, which the
  design is only compared with;
* the FPGA resource, power and delay figures of the original implementation.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`. Expected values come from
`tb/rapcla_ref_pkg.sv`, which computes approximate carries by scanning
(walk down from the carry, stop on a generate or a kill, give up after W
bits). That is a formulation independent of the RTL's sums of products.

| testbench | what it covers |
|---|---|
| `tb_rapcla_carry` | every carry, N = 8 W = 3, all inputs in both modes; N = 16 random; augmenting part zero in approximate mode |
| `tb_rapcla_adder` | 16-bit adder, random and corner cases, exact = `A+B+Cin`, approximate errors occur; partitioned instance (`APX_BITS` = 8) |
| `tb_alu_slice` | all operand, carry and control combinations |
| `tb_rapcla_multiplier` | exact = `A*B`, approximate against a row-by-row reference |
| `tb_bitslice_alu` | every select code in both modes, the published operand pairs; a two-slice (8-bit) instance |
| `tb_control_rom` | reset contents, write timing, reset restore |
| `tb_micro_sequencer` | address sequence, program length to `done`, `start` ignored while busy |
| `tb_bitslice_processor` | end to end at default parameters: all operations in both modes, multi-step programs with accumulator feedback and a mode switch between steps, cycle count per program; counts each mechanism and fails if one never happened |
| `tb_error_analysis` | exhaustive 8-bit error statistics for W = 2, 3, 4, 6; the error count must equal the number of carry chains longer than W |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/rapcla_pkg.sv tb/rapcla_ref_pkg.sv tb/tb_bitslice_processor.sv \
    --top-module tb_bitslice_processor
./obj_dir/Vtb_bitslice_processor
```

Replace the testbench name to run another one. All testbenches finish in
well under a second.

Lint notes: `micro_sequencer` and `bitslice_processor` draw a SYNCASYNCNET
warning. This is because the `done` single-pulse assertion samples the
asynchronous reset in its `disable iff`. The carry unit's two observation
outputs, `c_apx` and `c_aug`, are left unconnected where only the carries
are needed.

## Files

* `rtl/rapcla_pkg.sv`: operation codes, slice functions, micro-instruction type.
* `rtl/rapcla_carry.sv`: the RAP-CLA carry generator.
* `rtl/rapcla_adder.sv`: the N-bit RAP-CLA adder.
* `rtl/alu_slice.sv`: one 4-bit slice.
* `rtl/rapcla_multiplier.sv`: the array multiplier.
* `rtl/bitslice_alu.sv`: the 16-bit ALU.
* `rtl/control_rom.sv`: the control store.
* `rtl/micro_sequencer.sv`: the sequencer.
* `rtl/bitslice_processor.sv`: the top level.
* `tb/`: the testbenches and `rapcla_ref_pkg.sv`, the reference models.
