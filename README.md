# Eight-digit BCD add-subtract unit built from reversible gates

This unit adds and subtracts unsigned decimal numbers held in binary-coded
decimal (BCD): every decimal digit sits in its own 4-bit field, coded 0..9.
Decimal arithmetic avoids the rounding surprises of binary fractions. That
matters in financial and commercial code. The catch is that a plain binary
adder gives the wrong digit whenever a digit sum goes past 9, so each digit
needs a correction step.

The datapath follows a published reversible-logic design. Its primitives are
reversible gates: Feynman (controlled-NOT) and Toffoli (controlled-controlled-NOT)
gates, whose outputs fix their inputs uniquely. From them the unit builds a
4-bit binary adder, a decimal-correction network and a nine's-complement
circuit. Eight digit cells are chained into a 32-bit BCD adder. A 32-bit BCD
subtractor is built next to it. Both work on the same operands in parallel,
inside a two-stage pipeline that takes one operation per clock.

The RTL is ordinary synthesizable SystemVerilog. The reversible gates are
modules, and their structure shows in the netlist. Fan-out and a few OR terms
are used freely, though, so the netlist as a whole is not a strictly
reversible circuit. The garbage outputs of the gates (copies of their control
inputs) are left unconnected.

## Interface of the top, `bcd_addsub_unit`

| port | dir | width (DIGITS=8) | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active-low; clears the valid bits and the pipeline registers |
| `in_valid` | in | 1 | `a`, `b`, `cin` carry an operation this cycle |
| `a`, `b` | in | 32 | BCD operands, digit *i* in bits `[4i+3:4i]` |
| `cin` | in | 1 | decimal carry into the adder's lowest digit |
| `out_valid` | out | 1 | the outputs hold the result of the operation presented two clocks earlier |
| `sum` | out | 33 | `a + b + cin`: bit 32 is the decimal carry out, bits 31:0 are the digits |
| `df` | out | 32 | `|a - b|` in BCD |
| `br` | out | 1 | borrow: 1 when `a < b` (then `df = b - a`); 0 when `a >= b` |

`DIGITS` (default 8) sets the word size. All ports scale with it
(`4*DIGITS` bits per operand).

Timing: the latency is two clocks and the throughput is one operation per
clock. Idle cycles (`in_valid = 0`) simply travel down the pipeline as bubbles.
There is no back-pressure.

```
cycle       0                     1                         2
            a,b,cin,in_valid      ---                       out_valid=1
comb        adder ripple          subtractor correction
            subtractor stage 1
edge            -> stage register            -> output register
```

Operands must be valid BCD. An assertion in the top reports a digit above 9
while `in_valid` is high. For non-BCD digits the outputs are deterministic
but meaningless.

## One digit of addition (`bcd_digit_adder`)

1. **Binary add.** `rev_cpa4` adds the two digits and the incoming carry as a
   4-bit ripple-carry adder. The result is `{c4, s_bin}`, a value from 0 to 19.
   Each of its full adders (`rev_full_adder`) takes four gates. Two Feynman
   gates give `s = a ^ b ^ cin`. Two Toffoli gates give
   `cout = ab ^ cin(a ^ b)`, which equals the majority function.
2. **Detect.** The binary sum must be corrected when it exceeds 9, that is
   when `c4 | s3·s2 | s3·s1`. `bcd_corr_mux4` computes this as a 4:1
   multiplexer selected by `{s3, s2}`:

   | `{s3,s2}` | output |
   |---|---|
   | 00 | `c4` |
   | 01 | `c4` |
   | 10 | `c4 \| s1` |
   | 11 | 1 |

   A Toffoli gate gates each data input with its decoded select line.
3. **Correct.** `bcd_error_corr` adds 0110 (six) with a second `rev_cpa4`
   whenever the flag is set. This skips the six unused codes 10..15. The
   flag is also the decimal carry to the next digit.

`bcd_adder` chains `DIGITS` of these cells. The carry ripples from the lowest
digit to the highest, and the final carry becomes `sum[4*DIGITS]`. The adder
has no registers: its delay is eight digit stages, each with two 4-bit
ripples.

## Subtraction by nine's complement (`bcd_subtractor`)

This is the least obvious part of the unit. It subtracts without a decimal
borrow chain: it adds the nine's complement instead. The nine's complement of
a digit `d` is `9 - d`. `nines_comp` forms it with
`n0 = ~d0, n1 = d1, n2 = d2 ^ d1, n3 = ~(d3 | d2 | d1)`.

**Stage 1.** `bcd_digit_sub` complements each digit of `b` and adds it to the
matching digit of `a` with the ordinary digit adder. Eight of them are
chained, with carry in 0:

    sm = a + (99999999 - b) = (a - b) + 99999999

The carry out of the top digit, `pos`, is 1 exactly when `a > b`.

**Correction** (`bcd_sub_corr`, one per digit):

* `pos = 1`. `sm` is one less than `a - b` (modulo 10^8), so the carry is fed
  back in as an *end-around carry*. A second chain of digit adders adds
  `sm + 1`. The lowest digit gets carry in 1, and carries ripple upward.
  Result: `df = a - b`, `br = 0`.
* `pos = 0`. `sm = 99999999 - (b - a)`, so taking its nine's complement digit
  by digit gives `b - a` with no arithmetic at all. Result: `df = b - a`,
  `br = 1`.
* `a = b`. `sm` is all nines and `pos = 0`, so `df = 0`. `br` is forced to 0
  here, so zero is never flagged as negative.

Example with two digits: `a = 23`, `b = 58`. Stage 1 gives `23 + 41 = 64` with
no carry, so the result is negative. The nine's complement of 64 is 35, so
`df = 35` and `br = 1`. The other way round, `a = 58`, `b = 23`: stage 1 gives
`58 + 76 = 134`, which carries. `34 + 1 = 35`, so `df = 35` and `br = 0`.

`PIPE_STAGES` (0 or 1, default 0) puts a register between stage 1 and the
correction. The stand-alone subtractor is purely combinational by default.
The top sets it to 1, and the `sm` port always shows the unregistered
stage-1 sum.

## The pipeline (`bcd_addsub_unit`)

The adder and the subtractor see the same `a` and `b` every cycle. The only
register inside the subtractor sits where the datapath splits naturally: the
stage-1 sum and its carry are registered, and the correction runs in the
second cycle. The adder's sum is registered alongside, so both results line
up. A final register stage drives all the outputs. A valid bit travels with
the data.

## Where this RTL departs from, or fills in, the published design

* **Word size.** The unit is described both as "64-bit" and as a cascade of
  eight 4-bit digit cells with 32-bit operands and a 33-bit sum. The
  eight-digit (32-bit) reading is the default here. `DIGITS = 16` gives the
  64-bit variant, and a testbench runs it.
* **Gates.** The published design names URG, TNOR, SBV and COG gates but does
  not define them. Their functions are built instead from Feynman and Toffoli
  gates and plain logic:
  - the full adder (instead of Feynman + URG);
  - the correction multiplexer (instead of Toffoli + TNOR);
  - the nine's complement (instead of SBV);
  - the conditional select of the subtraction correction (instead of COG).

  Gate counts and garbage-output counts therefore differ from the published
  figures.
* **Subtraction correction rule.** The published wording puts the nine's
  complement on the carry = 1 branch. Taken literally, that gives wrong
  differences. The standard end-around-carry rule above is used instead.
  Other parts of this section are also choices of this design: the second
  adder chain for the end-around carry, the `a = b` borrow rule, and the
  `br` polarity.
* **Carry inputs.** The adder takes a carry input `cin`. The subtractor has
  no carry/borrow input: its stage-1 carry in is 0.
* **Pipelining.** The design is called pipelined, but its reported FPGA
  implementation uses no flip-flops. Here the building blocks are
  combinational, and the top adds the two-stage pipeline. Also this design's
  choice: the register placement, the valid bit, running both operations
  every cycle instead of selecting one, and the reset behaviour.
* **Not reproduced.** Reported FPGA results (LUT counts, I/O counts,
  17.42 ns critical path, garbage-output counts) are not reproduced. The
  adder's port count (98 bits) does match the reported I/O count. The
  subtractor here also brings out its stage-1 sum.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
outputs with integer decimal arithmetic and ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it covers |
|---|---|
| `tb_feynman_gate`, `tb_toffoli_gate` | exhaustive truth tables; each gate is its own inverse |
| `tb_rev_cpa4` | all 512 input combinations |
| `tb_bcd_corr_mux4`, `tb_bcd_error_corr` | all 32 binary digit sums |
| `tb_bcd_digit_adder`, `tb_bcd_digit_sub`, `tb_nines_comp`, `tb_bcd_sub_corr` | every BCD input combination |
| `tb_bcd_adder` | corner cases (all nines, full carry ripple) and 2000 random 8-digit pairs |
| `tb_bcd_subtractor` | both `PIPE_STAGES` settings; `a>b`, `a<b`, `a=b`; 2200 random and near-equal pairs |
| `tb_bcd_addsub_unit` | default size, 5000 operations streamed with random bubbles and a reset mid-stream |
| `tb_bcd_addsub_unit_16digit` | the same as `tb_bcd_addsub_unit`, at 16 digits (64-bit operands) |

The two top-level testbenches also check that each result arrives exactly
two clocks after its operands. They count how often each mechanism occurs
and fail if one never does. The mechanisms are:

- digit correction;
- adder carry out;
- end-around carry;
- nine's-complement correction;
- equal operands;
- back-to-back issue;
- bubbles;
- reset.

Every testbench also has a watchdog timeout.

Running one with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bcd_pkg.sv tb/tb_bcd_addsub_unit.sv --top-module tb_bcd_addsub_unit
./obj_dir/Vtb_bcd_addsub_unit
```

## Files

* `rtl/bcd_pkg.sv`: default digit count, digit type, the correction constant 6.
* `rtl/feynman_gate.sv`, `rtl/toffoli_gate.sv`: reversible primitives.
* `rtl/rev_full_adder.sv`, `rtl/rev_cpa4.sv`: reversible full adder and 4-bit ripple adder.
* `rtl/bcd_corr_mux4.sv`, `rtl/bcd_error_corr.sv`, `rtl/bcd_digit_adder.sv`: one decimal digit of addition.
* `rtl/bcd_adder.sv`: the multi-digit adder.
* `rtl/nines_comp.sv`, `rtl/bcd_digit_sub.sv`, `rtl/bcd_sub_corr.sv`, `rtl/bcd_subtractor.sv`: the subtractor.
* `rtl/bcd_addsub_unit.sv`: the pipelined top.

After coarse synthesis the top has about 940 word-level cells and 134
flip-flop bits. The adder alone is about 310 cells, and the subtractor
about 640.
