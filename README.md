# Single-precision ln(x) and e^x on hard floating-point DSP blocks

This RTL implements two fully pipelined IEEE-754 single-precision (binary32)
elementary-function cores, the natural logarithm and the exponential. Each accepts one
operand per clock. They follow the architectures in *Single Precision Logarithm and
Exponential Architectures for Hard Floating-Point Enabled FPGAs*, written for FPGAs
whose DSP blocks can do floating-point add, multiply and multiply-add in hardware
(Arria 10, Stratix 10).

The main idea is to do almost all of the arithmetic in floating point, on such DSP
blocks. Soft logic then does only bit selection, small shifts, masks and table
lookups. The difficulty is accuracy. Floating point rounds after every operation, and
both functions contain a subtraction that can cancel many leading bits. Each core
therefore uses one trick that keeps the cancelling subtraction exact:

* **log** forms the reduced argument `y = m*r - 1` from an unrounded fixed-point
  product. The product is split into overlapping floating-point pieces, so `y` is
  rounded only once.
* **exp** stores `K' = E'*ln 2` as an unevaluated sum of two binary32 numbers
  (`K'high + K'low`). The subtraction `x - K'` then keeps about 48 bits of `K'`.

Both cores flush subnormal inputs and outputs to zero, as the DSP blocks do. This is
allowed for single precision under OpenCL. A strided sweep covered the whole input
domain: about 8.4 million operands for log and 8.7 million for exp. The worst errors
seen were 1.46 ulp for log and 2.23 ulp for exp. About 23% of log results and 4% of
exp results are not correctly rounded.
The OpenCL bound for both functions is 3 ulp.

## Top level

`hfp_log_exp` places the two cores side by side. They share only the clock and reset.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset, which clears only the valid pipelines |
| `log_in_valid`, `log_x` | in | 1, 32 | operand of ln |
| `log_out_valid`, `log_r` | out | 1, 32 | ln(x), 25 cycles later |
| `exp_in_valid`, `exp_x` | in | 1, 32 | operand of exp |
| `exp_out_valid`, `exp_r` | out | 1, 32 | e^x, 25 cycles later (24 with `EXP_ARCH = 3`) |

There is no back-pressure. A result leaves exactly *latency* cycles after its operand
entered, and `*_out_valid` marks it. The datapaths themselves have no reset and no
enable: data flows every cycle, and only the valid bits are reset.

## The logarithm (`fp_log`)

For `x = 2^e * 1.f`:

```
ln(x) = E*ln2 + ln(m)
   f[22] = 0:  E = e,     m = 1.f        m in [1, 1.5)
   f[22] = 1:  E = e + 1, m = 1.f / 2    m in [0.75, 1)
```

Splitting at 1.5 rather than at 1 keeps the two terms from cancelling when x is just
below 1. The exact point would be sqrt(2); 1.5 is used because it needs only the
fraction MSB. `m` is the 25-bit string `{1,f,0}` or `{0,1,f}`, read as 1 integer bit
and 24 fraction bits.

**Range reduction.** `ln(m)` is still too wide-ranging for a short series. A reciprocal
`r` of the top bits of `m` is looked up and applied:

```
ln(m) = ln(1 + y) - ln(r),   y = m*r - 1,   0 <= y < 2^-9
```

* `log_rinv_rom` holds `r` for each value of `f[22:14]` (512 entries). Each `r` is a
  36-bit fixed-point value with 1 integer bit and 35 fraction bits. It is rounded up,
  so `m*r >= 1`.
* `log_lnr_rom` holds `ln(r)` of the *stored* `r` in binary32. The identity above
  therefore holds exactly for the `r` the hardware uses.

**Computing y without a rounding error.** This is the subtle part. `fxp_mult` forms
the exact 61-bit product `P = m*r`. `P` has the form `1.000000000xxxx...` with 9 zeros
after the point. Subtracting 1 would cancel about ten bits. If `P` were rounded first,
that rounding error would grow by 2^10 relative to `y`. Instead, `P` is written as a sum
of floating-point numbers:

```
j = P[59:36]              as binary32 1.P[58:36] * 2^0     (top 24 bits)
i = {1, P[35:13]}         as binary32 1.P[35:13] * 2^-23   (a 1 injected at j's LSB weight)
k = 2^-23                 (removes the injected 1)
P ~= j + i - k            (error below 2^-46)
y  = (j - (1 + 2^-23)) + i
```

The injected 1 makes `i` already normalized, so no leading-zero counter is needed.
The two constants 1 and `k` combine into the single binary32 `0x3F800001` ("1 + ulp").
The subtraction `j - (1+ulp)` is exact because both operands lie in [1, 2). Only the
final `+ i` rounds.

**The close-to-1 path.** When `f[22:14]` is all zeros or all ones, `m` is within 2^-9
of 1. There `ln(1+y)` and `ln(r)` would nearly cancel. The `close` signal switches the
datapath instead:

* the subtracter takes `m` itself and the constant 1;
* the adder adds 0;
* the `ln(r)` term is forced to 0.

This gives `y = m - 1` exactly.

**Series and sum.** `ln(1+y) ~ y*(1 + y*(-1/2 + y/3))` uses three multiply-add
blocks. The third one also subtracts `ln(r)`. A last adder adds `E*ln2`, which comes
from `log_elog2_rom`: 256 binary32 entries addressed by `e + f[22]`.

**Pipeline (cycle at which each value is ready):**

| cycle | value |
|---|---|
| 2 | table outputs (`r`, `ln r`, `E ln2`) |
| 4 | `P = m*r` |
| 7 | `j - (1+ulp)`, or `m - 1` when close |
| 10 | `y` |
| 14 | `t1 = y/3 - 1/2` |
| 18 | `t2 = y*t1 + 1` |
| 22 | `y*t2 - ln r` |
| 25 | result |

Exceptions are decided beside the datapath and override the result at the output:

| input | result |
|---|---|
| NaN | quiet NaN |
| negative | quiet NaN |
| ±0 or subnormal | -inf |
| +inf | +inf |

Resources: 6 floating-point DSP blocks (3 adders, 3 multiply-adds), one 36x34
fixed-point multiplier and 3 tables.

## The exponential (`fp_exp`)

```
x = E'*ln2 + y',   e^x = 2^E' * e^y'
```

**Finding E' cheaply.** `x_fxpRed` is a reduced fixed-point copy of `x`: a sign plus
`floor(|x|*2)` on 8 bits (7 integer bits and 1 fraction bit). Because it is truncated,
`E' = round(x_fxpRed / ln2)` can be one off the ideal integer. Then `y'` lies in about
(-0.85, 0.85) rather than (-0.35, 0.35). That costs nothing later.

`exp_k_rom` returns three values for each `x_fxpRed`:

* `E'`, as a 9-bit signed number;
* `K'high = round(E'*ln2)`;
* `K'low = round(E'*ln2 - K'high)`.

The table fuses the two constant multiplications by 1/ln2 and by ln2. Two ways to
address it are provided:

| `ARCH` | address | how it is formed | latency |
|---|---|---|---|
| 1 (default) and 2 | `x_fxpRed`, 9 bits | `exp_xred_shift`, an 8-bit, 8-position shifter over `{1, f[22:16]}`; only exponents -1..6 can reach the window | 25 |
| 3 | `{s, e[2:0], f[22:16]}`, 11 bits, taken straight from `x` | the table itself decodes the exponent bits | 24 |

When `|x| < 1/2`, `K'` and `E'` are masked to zero by clearing the exponent fields; a
zero exponent reads as zero on the DSP blocks. In the 11-bit form those addresses
alias other entries, so the mask is required there.

**y' in floating point.** `y' = (x - K'high) - K'low` uses two subtracter blocks.
Because `K'` carries about 48 bits, the cancellation in `x - K'` leaves enough correct
bits.

**Splitting y' = A + B** (`exp_find_a`). `A` is `y'` with every bit of weight below
2^-8 cleared. It is made in two forms:

* **Floating point:** an 8-bit mask, chosen by the 4 exponent LSBs of `y'`, is ANDed
  onto the top 8 fraction bits, and the fraction bits below them are cleared. For
  exponents 0, -1, ..., -8 the mask is `11111111`, `11111110`, ..., `00000000`. When
  `y' < 2^-8`, A is 0.
* **Fixed point:** a sign plus a 1.8-bit magnitude from a 9-bit right shift. This
  addresses `exp_ea_rom`, the table of `e^A` (1024 binary32 entries).

`ARCH = 2` replaces the shifter and the 1024-entry table with `exp_ea12_rom`. This
is a 4096-entry table addressed straight from `y'`:

* the address is `{sign, e[3:0], 7 fraction bits}`;
* the four exponent LSBs tell apart the nine exponents -8..0 that `A` can have;
* the fraction bits go through the same mask as above, so each entry's `A` equals the
  `A` that is subtracted to form `B`.

It trades a 4x larger table for one less shifter. The latency stays 25, because
`e^A` is not on the critical path.

`B = y' - A` is below 2^-8 in magnitude. Then:

* `e^B = 1 + B*(1 + B/2)` uses two multiply-add blocks;
* `e^y' = e^A * e^B` uses a multiplier block;
* the result exponent is the exponent of `e^y'` plus `E'`.

`e^y'` lies in (0.35, 2.83). Adding `E'` to its exponent covers all four
normalization cases, so no shifter is needed.

Exceptions:

| input or result | output |
|---|---|
| NaN | quiet NaN |
| `|x| >= 128` or ±inf | +inf when x > 0, +0 when x < 0 |
| result exponent above the range | +inf |
| result exponent below the range | +0 (subnormals flushed) |
| zero or subnormal x | 1.0, through the normal datapath |

Resources: 6 floating-point DSP blocks (3 adders, 2 multiply-adds, 1 multiplier) and
2 tables.

## The DSP block model (`hfp_dsp`)

The cores instantiate `hfp_dsp` wherever the FPGA's hard floating-point block would
be used. It is a synthesizable model of that block's floating-point mode:

| `MODE` | result | latency |
|---|---|---|
| `HFP_MULADD` | `x*y ± z` | 4 (input, multiplier, adder-input and output registers) |
| `HFP_ADD` | `y ± z` | 3 |
| `HFP_MUL` | `x*y` | 3 |

* The multiply-add is not fused: the product is rounded before the add.
* Rounding is to nearest-even, and subnormals are flushed to zero.
* The arithmetic is in `fp_add` and `fp_mul`, which are combinational.

On a real Arria 10 or Stratix 10 these instances would be replaced by the vendor's
DSP primitive. Elsewhere they synthesize into ordinary logic.

## How the tables are made

No table is stored as data. The `fp_pkg` functions compute every entry while the
design elaborates. They use integer arithmetic on 128-bit values with 62 fraction
bits:

* `fix_ln` uses `ln v = 2*atanh((v-1)/(v+1))`;
* `fix_exp` uses the Taylor series;
* `fix_to_fp` rounds to nearest-even binary32.

Each ROM module builds its array from these functions in a generate loop and reads it
with a registered address and a registered output. That is two cycles, like an FPGA
block RAM. To change a table, change its formula.

## Where this design departs from, or fills in, the paper

* **Latency of exp.** This pipeline takes 25 cycles for Arch1 and Arch2 and 24 for
  Arch3; the paper reports 34, 34 and 31 on Arria 10. The paper does not give its register
  placement. Here the register split is the minimum that keeps every hard-block
  stage: tables 2 cycles, adders and the multiplier 3, multiply-adds 4. The log
  latency of 25 matches the paper.
* **Reciprocal table address.** The paper describes it both as "the branch bit plus
  the top 9 fraction bits" and as "the leading 10 bits of m". Since the branch bit is
  `f[22]`, this design uses `f[22:14]`: 512 entries, no redundant bit.
* **Arch3 address.** `{s, e[2:0], f[22:16]}`, which is the 11 bits the paper counts.
* **Arch2 address.** The paper gives only "12 bits, from exponent and fraction bits
  of y'". The bit choice described above is this design's own.
* **Choices the paper does not give:**
  * the reciprocal is rounded up, and `ln(r)` is taken of the stored reciprocal;
  * the width of each table word;
  * exception handling beyond "negative input gives NaN" and the exp overflow and
    underflow limits;
  * the valid/reset interface.
* **Not built.**
  * The piecewise-polynomial logarithm is a reference design the paper only compares
    against.
  * Accumulate mode and the cascade chain of the DSP block are not used by the cores.
  * Stratix 10 HyperFlex retiming registers belong to the device's routing and have
    no RTL counterpart.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
finishes. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -Wno-fatal \
    rtl/fp_pkg.sv tb/tb_fp_pkg.sv tb/tb_hfp_log_exp.sv --top-module tb_hfp_log_exp
./obj_dir/Vtb_hfp_log_exp
```

Verilator finds the other modules by file name (`-Irtl -Itb`).

`tb_fp_pkg` converts between binary32 and the simulator's double-precision reals, and
the testbenches use it to check against `$ln` and `$exp`. All testbenches use
`$urandom` for stimulus.

| testbench | what it checks |
|---|---|
| `tb_hfp_log_exp` | Both cores together at the default parameters, with gaps in the valid signals. Checks every result and both latencies. Counts each mechanism and fails if one never happened: the close path, each branch, exceptions, the K' mask, A = 0, each of the four e^y' ranges, overflow, underflow, out-of-range operands. |
| `tb_accuracy_sweep` | Both cores through the top, at the default parameters, one operand per cycle. Every 255th binary32 encoding of the log domain (positive normals) and of the exp domain ([-87.33, 88.72]). 3 ulp bound and latency; prints the worst error. |
| `tb_fp_log` | 20,000 random and directed operands, 3 ulp bound, latency 25. |
| `tb_fp_exp` | Arch1, Arch2 and Arch3 side by side: 3 ulp bound, latencies 25, 25 and 24, bit-identical results. |
| `tb_hfp_dsp` | All three modes against a double-precision reference, bit for bit, including zeros, subnormals, infinities, NaNs and exact cancellation. |
| `tb_fxp_mult`, `tb_*_rom`, `tb_exp_xred_shift`, `tb_exp_find_a` | Each table entry and helper against an independent calculation. |

## Files

```
rtl/fp_pkg.sv          types, constants, elaboration-time math for the tables
rtl/hfp_log_exp.sv     top level
rtl/fp_log.sv          logarithm core
rtl/fp_exp.sv          exponential core (ARCH 1, 2 or 3)
rtl/hfp_dsp.sv         floating-point DSP block model; fp_add.sv, fp_mul.sv inside it
rtl/fxp_mult.sv        36x34 fixed-point multiplier
rtl/log_elog2_rom.sv   E*ln2 table
rtl/log_rinv_rom.sv    reciprocal table
rtl/log_lnr_rom.sv     ln(reciprocal) table
rtl/exp_xred_shift.sv  x_fxpRed shifter
rtl/exp_k_rom.sv       E', K'high, K'low table
rtl/exp_find_a.sv      A/B split: mask table and shifter
rtl/exp_ea_rom.sv      e^A table
rtl/exp_ea12_rom.sv    e^A table addressed by y' bits (ARCH 2)
rtl/pipe_delay.sv      alignment register chains
tb/                    one testbench per module, plus tb_fp_pkg.sv
```
