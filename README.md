# 64-bit error-tolerant adder (ETA)

A conventional adder is slow and power-hungry mainly because of its carry
chain: in the worst case a carry generated at bit 0 must ripple all the way
to the most significant bit, and the glitches it causes along the way burn
dynamic power. Many signal-processing workloads (image, audio, video) do
not need an exact sum, only one that is close enough. The error-tolerant
adder exploits that: it cuts the operands into an **accurate upper part**,
added exactly, and an **inaccurate lower part**, added without any carry at
all. No carry ever crosses between the two parts, so the longest carry path
is only as long as the upper part, and the lower part settles in roughly
one gate delay plus one pass down a simple control chain.

The RTL here is a 64-bit adder split in the middle: bits 63..32 go through
a 32-bit ripple carry adder, bits 31..0 through the carry-free part. It is
purely combinational: no clock, no reset, no pipeline.

```
          a[63:32] b[63:32]              a[31:0] b[31:0]
               |      |                      |      |
         +-----v------v-----+        +-------v------v--------+
 cout <--| ripple carry     |<-- 0   | control block (CTL)   |
         | adder (32 bits)  |        |        | ctl[31:0]    |
         +--------+---------+        | carry-free addition   |
                  |                  | (32 modified XORs)    |
                  v                  +-----------+-----------+
              sum[63:32]                         v
                                             sum[31:0]
```

## The carry-free addition rule

The lower part looks at its bit positions from the top (bit 31) downwards:

1. While the two operand bits at a position are `0/0` or differ, the sum
   bit is their XOR: an ordinary one-bit addition whose carry is dropped.
2. At the first position `k` where both bits are `1`, the scan stops.
   Sum bit `k` and **every bit below it** are set to `1`.

Example at 8 bits (4 accurate + 4 inaccurate):

```
a       = 1010 0010
b       = 1010 0010
upper   : 1010 + 1010 = 1 0100          -> cout = 1, sum[7:4] = 0100
lower   : bit 3: 0/0 -> 0
          bit 2: 0/0 -> 0
          bit 1: 1/1 -> stop, bits 1..0 forced to 1
          -> sum[3:0] = 0011
result  = 1 0100 0011 = 323    (exact sum: 324)
```

### How large the error is

Above position `k` no position has both bits set, so there the XOR *is*
the exact sum as a value, with no carry. The exact value of bits `k..0` is
`a[k:0] + b[k:0]`, which lies between `2^(k+1)` and `2^(k+2) - 2` because
both bit-`k` operands are 1; the adder outputs `2^(k+1) - 1` for them
instead. Hence:

* if no position of the lower part has both bits set, the result is exact;
* otherwise the result is **never too large**, and too small by at least 1
  and at most `2^(k+1) - 1`, so always by less than `2^32` for this 64-bit
  configuration.

Forcing the low bits to all ones is what keeps the error this small: it is
the largest value those bits can take without a carry out. For operands
whose sum reaches into the upper half the relative error is therefore
small (below `2^32 / Rc`); it matters only when both operands are small
enough to live mostly in the lower half.

The quality of such an adder is usually described by:

* overall error `OE = Rc - Re` (correct minus obtained result);
* accuracy `ACC = 1 - |OE| / Rc`, between 0 and 100 %;
* a minimum acceptable accuracy (MAA), a system-dependent threshold;
* acceptance probability (AP), the probability that `ACC` exceeds the MAA.

The end-to-end testbench reports the smallest `ACC` it observed.

## Blocks

| Module | Role |
|---|---|
| `eta_adder` | Top. Splits the operands at `INACC_WIDTH`, ties the accurate part's carry in to 0. |
| `ripple_carry_adder` | Accurate part: `WIDTH` chained full adders. |
| `full_adder` | One-bit full adder (`sum = a^b^cin`, `cout` = majority). |
| `eta_inaccurate_part` | Inaccurate part: control block plus carry-free addition block. |
| `control_block` | `ctl[i] = (a[i] & b[i]) OR ctl[i+1]`, top input tied to 0: CTL is high from the first 1/1 pair down to bit 0. |
| `carry_free_addition` | One `modified_xor` per bit, bit `i` steered by `ctl[i]`. |
| `modified_xor` | `sum = ctl ? 1 : a ^ b`. |
| `eta_pkg` | Default sizes: `ETA_WIDTH = 64`, `ETA_INACC_WIDTH = 32`. |

### Timing

Everything is combinational. The critical path is the carry of the
32-bit ripple carry adder (bit 32 to `cout`), about half that of a 64-bit
ripple carry adder. The lower part's longest path is the CTL chain from
bit 31 to bit 0 through one AND-OR per bit and then one modified XOR; the
chain is made of simple gates with no XOR in the loop.

Register the inputs and outputs outside the adder if it is used in a
clocked datapath; it holds no state of its own.

### The modified XOR cell

In a transistor-level implementation the modified XOR is an XOR gate with
its supply and ground switched off by `CTL` and a pull-up that drives the
output high when `CTL` is active, so the XOR does not toggle in the forced
region (which also saves power). The RTL models only the logic function;
the power gating is a circuit-level detail a synthesis tool cannot express.

## Parameters

`eta_adder #(WIDTH, INACC_WIDTH)`:

* `WIDTH` (default 64) is the operand width.
* `INACC_WIDTH` (default 32) is the number of low bits added carry-free.
  It must be at least 1 and less than `WIDTH`.

Moving the split point trades accuracy for speed and power: a wider
inaccurate part shortens the carry chain but lets the error grow as
`2^INACC_WIDTH`. The half-and-half split is reproduced by the reference
results available for 4-, 8- and 16-bit versions of this adder (checked in
`eta_adder_widths_tb`). Other descriptions of the same scheme use an
uneven split (for example 20 inaccurate bits), so treat the default as a
starting point to tune for the application's acceptable accuracy.

## Where this RTL departs from, or goes beyond, its source description

* **Split point.** The split is not given as a number. Half of the width
  is chosen because it is the only split consistent with the reference
  simulation vectors at 8 and 16 bits. A drawing of the carry-free block
  numbers its cells 0 to 19, which would be a different split.
* **Cells are logic, not transistors.** The full adder and the modified
  XOR are specified as transistor schematics; only their logic functions
  are written.
* **No carry input.** The adder has no `cin`; the ripple carry adder
  module keeps one for reuse, tied to 0 in the top.
* **Accurate part.** Only the ripple-carry accurate part is built. A
  variant whose accurate part is a carry-look-ahead adder is mentioned
  only in comparisons and is not part of this RTL, nor are the
  conventional adders it was compared with.
* **Power, delay and cell counts** of the original standard-cell
  synthesis depend on a library and flow that are not specified; they are
  not reproduced here.

## Simulating

Every testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/eta_pkg.sv tb/eta_adder_tb.sv --top-module eta_adder_tb
./obj_dir/Veta_adder_tb
```

Replace `eta_adder_tb` by any other testbench name to run it.

| Testbench | What it checks |
|---|---|
| `eta_adder_tb` | Full 64-bit adder at default parameters: ~5000 random and corner-case operand pairs against a bit-level reference model, plus the error bound (never too large, short by less than `2^32`). Counts and requires at least one case each of: control chain fired, lower half exact, carry out, inexact result, exact result. |
| `eta_adder_widths_tb` | 4-, 8-, 16- and 32-bit instances (half split): the reference waveform vectors for 4, 8 and 16 bits, then random operands against the reference model at every width. |
| `eta_inaccurate_part_tb` | Carry-free lower part: bit-exact against the scan rule, and the error bound `< 2^(k+1)`. |
| `control_block_tb` | CTL vector for a single 1/1 pair at every position and random dense/sparse operands. |
| `carry_free_addition_tb` | Row of modified XORs with `ctl` driven independently of `a`, `b`. |
| `ripple_carry_adder_tb` | 32-bit ripple carry adder against `a + b + cin`, including a full-length ripple. |
| `full_adder_tb`, `modified_xor_tb` | Exhaustive truth tables. |

Every testbench also has a time-based watchdog that ends the run with a
failure if it ever hangs. All of them finish in well under a second.

## Changing the design

* To retune the accuracy/speed trade-off, change `INACC_WIDTH` (or
  `ETA_INACC_WIDTH` in `eta_pkg`). The testbenches compute their reference
  from the same rule and would need their `L`/split constants updated.
* To use a faster exact adder in the upper part, replace the
  `ripple_carry_adder` instance in `eta_adder`; the inaccurate part does
  not depend on it.
