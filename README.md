# 8-bit approximate multipliers with internal self-healing

An approximate multiplier gives up exactness in a few input cases to save
area or power. With *internal self-healing* (ISH), a larger multiplier is built
recursively from smaller ones, and a different approximate multiplier goes
into each position. Some positions are chosen to err upwards and others
downwards, so their errors partly cancel. The quantity that is minimised is
the **signed** mean error over the expected input distribution, not the error
magnitude. An ISH multiplier can be wrong quite often and still be unbiased
on average, which is what accumulating workloads such as filters or neural
networks care about.

This RTL implements the recursive construction for FPGA-oriented 8-bit
unsigned multipliers:

```
2x2 multipliers M1..M5  ->  4x4 recursive R_abcd  ->  8x8 ISH multiplier
                            4x4 exact (SMA4)      ->
                            4x4 external cell     ->
```

The top, `ish_mult8_top`, holds ten proposed 8-bit designs on one pair of
operands. Five are the Pareto front for power and five the Pareto front for
area.

## The recursive construction

Split each 2n-bit operand into a high half `H` and a low half `L`. Then

```
A x B = 2^(2n) * (A_H x B_H) + 2^n * (A_H x B_L) + 2^n * (A_L x B_H) + (A_L x B_L)
```

For n = 2 (a 4x4 from four 2x2 multipliers), the weights are 16, 4, 4 and 1.
For n = 4 (an 8x8 from four 4x4 multipliers), they are 256, 16, 16 and 1.
When any of the four sub-products is approximate, so is the whole product.

**Naming and slot order.** `R_abcd` is a 4x4 multiplier made of the 2x2
multipliers `Ma Mb Mc Md`. The four letters are listed from the most
significant sub-multiplier (MSM) to the least significant one (LSM). For
example, `R4335` has M4 in the high x high position and the exact M5 in
low x low. The two middle letters are taken here as `A_H x B_L` and then
`A_L x B_H`. An 8-bit design is written the same way, as four 4x4 names from
MSM to LSM.

The middle order is a convention of this design. For operands that are independent and identically distributed, the
mean error does not depend on it. For a given operand pair it does matter.
Swap the middle parameters if your convention differs.

## The 2x2 multipliers (`mult2_approx`)

Each approximate kind is wrong for one or three of the 16 input pairs:

| kind | differs from exact        | error |
|------|---------------------------|-------|
| M1   | 3x3 = 7                   | -2    |
| M2   | 1x1 = 0, 1x3 = 3x1 = 2    | -1 each |
| M3   | 3x3 = 11                  | +2    |
| M4   | 3x3 = 5                   | -4    |
| M5   | exact                     | 0     |

M3 is the only kind that errs upwards. This is why it appears next to M1
(which errs downwards) in the low-bias designs. For example, R1311 combines a
-32 error in its high position with +8 in a middle one. The gate equations in
`mult2_approx.sv` were derived from these truth tables. Each output bit needs
at most four inputs, so each fits a single LUT.

## 4x4 building blocks

* **`mult4_recursive`** builds an `R_abcd` from four `mult2_approx` instances.
  The parameters are `HH`, `HL`, `LH` and `LL`, and the default is R4335.
  The output is 9 bits wide. With M3 in every position the sum can reach 275
  (for 15x15), so 8 bits would wrap. For the eight R_abcd used by the design
  the maximum is 255.
* **`mult4_accurate`** is the exact 4x4 used in the area designs (`SMA4`). It
  adds two 4x2 partial-product rows. The library it stands in for fixes the
  LUT contents by hand. Here, mapping is left to synthesis, so LUT counts
  will not match that library exactly.
* **External slot.** The area designs also use two approximate 4x4
  multipliers from the SMApproxLib library, Approx2 (`SMA2`) and Approx3
  (`SMA3`). Their logic is not part of this RTL. A slot configured
  `SLOT_EXTERNAL` takes its product from a port instead. Connect an
  Approx2/Approx3 cell there, fed with the slot's operand nibbles.
* **`mult4_slot`** picks one of the three options above at elaboration,
  according to a `mult4_cfg_t` value. It is an internal helper.

## The 8-bit multiplier (`mult8_ish`)

There are four `mult4_slot` instances, followed by the weighted sum
256/16/16/1. A `mult4_cfg_t` parameter sets each slot. Named configurations
are in `ish_pkg`: `R1311`, `R1315`, `R4335`, `R1555`, `R5421`, `R3511`,
`R3311`, `R5155`, `SMA4`, `SMA2` and `SMA3`. To build your own, write a
struct literal:

```systemverilog
mult8_ish #(.CFG_HH(R4335), .CFG_HL(R1315), .CFG_LH(R1315), .CFG_LL(R1315))
  u_mul (.a(x), .b(y), .ext_p('0), .p(prod));
```

The default is R4335 R1315 R1315 R1315, the most accurate power design. The
product is 17 bits wide so that approximate slots above 255 cannot wrap. For
the power designs bit 16 is always 0. `ext_p[SUB_HH..SUB_LL]` carries the
products of external slots and is ignored for the other slots.

## The designs in the top (`ish_mult8_top`)

| output       | HH   | HL   | LH    | LL   | selected for | published NAME |
|--------------|------|------|-------|------|--------------|------|
| `p_power[0]` | R1311 | R1311 | R1311 | R1311 | power | 7.2e-4 |
| `p_power[1]` | R1315 | R1311 | R1311 | R1311 | power | 1.2e-4 |
| `p_power[2]` | R4335 | R1315 | R1311 | R1311 | power | 3.5e-5 |
| `p_power[3]` | R4335 | R1315 | R1315 | R1311 | power | 2.5e-6 |
| `p_power[4]` | R4335 | R1315 | R1315 | R1315 | power | 5.7e-7 |
| `p_area[0]`  | SMA2 | SMA2 | SMA2  | SMA2 | area, ~37 LUT | 3.8e-2 |
| `p_area[1]`  | SMA4 | SMA2 | SMA2  | SMA2 | area, ~42 LUT | 4.9e-3 |
| `p_area[2]`  | SMA4 | SMA2 | SMA4  | SMA3 | area, ~47 LUT | 2.5e-3 |
| `p_area[3]`  | SMA4 | SMA4 | SMA4  | SMA3 | area, ~52 LUT | 1.6e-4 |
| `p_area[4]`  | SMA4 | SMA4 | R3311 | SMA3 | area, ~55 LUT | 5.8e-5 |

The NAME column holds the published error (defined in the next section),
measured on random samples of behavioural models. The LUT counts come from a
Kintex-7 implementation that includes the hand-mapped SMA cells. Each SMA2/SMA3 entry in the area rows is an input:
`ext_p_area[design][slot]`, where slot 0..3 = HH, HL, LH, LL. There are 12
such inputs; the other 8 entries of that array are unused.

All multipliers are combinational. There are no clock, registers or reset,
and the products are valid one propagation delay after `a` and `b` change.
If you need timing closure at speed, register around the instance.

## Error metric and how the designs were chosen

```
NAME = | sum_i (y_i - x_i) / N | / 2^(2n)
```

Here `y_i` is the approximate product, `x_i` the exact product and `n` the
operand width. The mean is taken over operands drawn from a normal
distribution: mu = 8, sigma = 1.5 for 4-bit, and mu = 128, sigma = 22.5 for
8-bit. Because the error is signed before averaging, errors of opposite sign
cancel. The 8-bit candidates were every combination of a small preselected
set of 4x4 multipliers. Area and power were estimated as the sum over the
four slots, and the Pareto front was kept. If your operands are not
distributed like this, for example if they are uniform or centred elsewhere,
the bias of every design changes. Re-evaluate with `tb_name_workload`
(below) adapted to your distribution.

## Verification

Each testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line. The reference models live in
`tb/ish_ref_pkg.sv`. They are built from the 2x2 truth tables and the
weighting formula, independently of the RTL gate equations.

| testbench | what it covers |
|-----------|----------------|
| `tb_mult2_approx` | all 16 inputs of M1..M5 |
| `tb_mult4_accurate` | all 256 inputs against `a*b` |
| `tb_mult4_recursive` | all 256 inputs of the default and the eight R_abcd in the design |
| `tb_mult8_ish` | all 65536 inputs of the default design, and of a mixed design with exact, external, R3311 and R5421 slots (random external products); the 17th product bit |
| `tb_ish_mult8_top` | all 65536 inputs of all ten designs in the top, at default parameters. External slots are driven with random values. It counts how often the M1, M3 and M4 approximations fire and how often slot errors of opposite sign meet, and fails if any of these never happens |
| `tb_name_workload` | computes NAME on the RTL for the eight 4-bit R_abcd and the five power designs, using exact probability weights instead of a random sample, and compares with the published figures |

Reproduced NAME of the power designs, against the published sample
estimates:

| design | this RTL (exact expectation) | published (100 000 samples) |
|---|---|---|
| 0 | 7.07e-4 | 7.19e-4 |
| 1 | 1.10e-4 | 1.18e-4 |
| 2 | 3.57e-5 | 3.47e-5 |
| 3 | 1.99e-6 | 2.47e-6 |
| 4 | 8.6e-8  | 5.74e-7 |

The last value is below what a 100 000-sample estimate can resolve. The 4-bit
figures were published from 1000-pair samples and agree within a factor of
two wherever the expected NAME is above 4e-5. Below that, a sample of 1000
pairs rarely contains the few erroneous inputs.

To run a testbench with plain Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ish_pkg.sv tb/ish_ref_pkg.sv tb/tb_ish_mult8_top.sv --top-module tb_ish_mult8_top
./obj_dir/Vtb_ish_mult8_top
```

Each run takes well under a second once built.

## What is not here, and where to be careful

* **SMApproxLib Approx2 and Approx3 4x4 cells.** Their partial-product
  grouping is defined by that library, not here. Every area design contains at
  least one such slot: SMA2 in the first three, SMA3 in the last three. Their
  outputs mean nothing until those cells are connected to `ext_p_area`.
* **Power and LUT figures** come from a specific FPGA flow with hand-mapped
  cells. The portable RTL here is not guaranteed to reproduce them. The power
  figures were only ever estimates, formed as the sum of the four 4x4 slots.
* **Middle-slot order** of `R_abcd` and of the 8-bit designs is a convention
  chosen here (see above).
* **Signedness.** All operands are unsigned.
* The SMApproxLib 8-bit Approx3 multiplier, which appears on the final area
  Pareto front alongside these designs, is a separate library design and is
  not included.
