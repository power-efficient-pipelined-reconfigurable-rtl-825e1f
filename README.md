# Reconfigurable fixed-width Baugh-Wooley multiplier, pipelined and clock-gated

A DSP datapath often needs several kinds of product: a full-word product rounded back to one
word (a *fixed-width* product), two half-word products of that kind, or small exact products.
The usual reconfigurable multipliers start from a full-precision array. This one starts from the
cheaper **fixed-width** n x n Baugh-Wooley array. The array is cut into three blocks, MUL1, MUL2
and MUL3, and a few partial-product cells are flipped or forced by five configuration bits. The
same hardware then gives four configuration modes (CM):

| `op` | mode | `p` (n bits) |
|------|------|--------------|
| `00` | CM1: one n x n fixed-width product | `P[2n-1:n]` of `X*Y`, with rounding compensation |
| `01` | CM2: two n/2 x n/2 fixed-width products | `{ X[n/2-1:0]*Y[n-1:n/2] , X[n-1:n/2]*Y[n/2-1:0] }` |
| `10` | CM3: one n/2 x n/2 full-precision product | `X[n-1:n/2]*Y[n-1:n/2]` (exact, n bits) |
| `11` | CM4: two n/4 x n/4 full-precision products | `{ X[n-1:3n/4]*Y[n-1:3n/4] , X[3n/4-1:n/2]*Y[3n/4-1:n/2] }` (exact) |

All operands are two's complement. In CM2 the operands cross over: the upper result pairs the
*low* half of X with the *high* half of Y. Each half-word fixed-width result is the upper n/2 bits
of that n/2 x n/2 product. In CM3 and CM4 only the upper half of each operand is used.

Blocks that a mode leaves idle have their input registers clock-gated. In CM1 a block is also
gated when one of its operand halves is zero. This is what makes the design power-efficient.

The default word length is n = 8 (`N = 8`). The RTL is parameterised for any n that is a multiple
of 4 and at least 8. It has been simulated at n = 8, 16, 24 and 32.

## How the n x n array is cut

A Baugh-Wooley product of two n-bit two's-complement numbers sums these terms:

* the partial products `x_i*y_j` at weight `i+j`;
* the terms of the sign row (`j = n-1`) and sign column (`i = n-1`), complemented, except
  `x_{n-1}y_{n-1}`;
* two constant ones, at weights `n` and `2n-1`.

The sum is `X*Y + 2^(2n)`, so its low 2n bits are the product. The fixed-width array keeps the
columns of weight n-1 and up. Column n-2 is not added. The OR of its terms drives the
rounding compensation (next section). Everything below weight n-2 is dropped.

The kept triangle is split into three blocks:

| block | rows (Y bits) | columns (X bits) | output bits (weights) |
|-------|---------------|------------------|------------------------|
| MUL1 | `y_0 .. y_{n/2-1}` | `x_{n/2-1} .. x_{n-1}` | `M1`, weights n-1 .. n+n/2 (n=8: `M1[12:7]`) |
| MUL2 | `y_{n/2} .. y_{n-1}` | `x_0 .. x_{n/2-1}` | `M2`, weights n-1 .. n+n/2 (n=8: `M2[12:7]`) |
| MUL3 | `y_{n/2} .. y_{n-1}` | `x_{n/2} .. x_{n-1}` | `M3`, weights n .. 2n-1 (n=8: `M3[15:8]`) |

MUL1 is the product `X[n-1:n/2] x Y[n/2-1:0]` plus one extra column x_{n/2-1}. MUL2 is
`X[n/2-1:0] x Y[n-1:n/2]`. MUL3 is `X[n-1:n/2] x Y[n-1:n/2]`. Each of these is already the
array of a half-word product, except for its sign terms and constants. Reconfiguring a mode
means fixing exactly those. The one-hot control word `t[3:0]` comes from `op` (t3 = CM1,
t2 = CM2, t1 = CM3, t0 = CM4) and drives the configuration bits CP0..CP4 and a few cells:

| where | CM1 | CM2 (t2) | CM3 (t1) | CM4 (t0) |
|-------|-----|----------|----------|----------|
| MUL1 row `y_{n/2-1}`, columns `x_{n/2}..x_{n-2}` | plain | complemented | – | – |
| MUL1 `x_{n-1}y_{n/2-1}` | complemented | plain | – | – |
| MUL1 `x_{n/2-1}y_{n/2-1}` (column n-2) | used | forced 0 | – | – |
| MUL2 column `x_{n/2-1}`, rows `y_{n/2}..y_{n-2}` | plain | complemented | – | – |
| MUL2 `x_{n/2-1}y_{n-1}` | complemented | plain | – | – |
| CP0 (MUL1, weight 3n/2-1), CP1 (MUL2, weight n), CP2 (MUL2, weight 3n/2-1) | 0 | 1 | – | – |
| CP3 (MUL3, weight 3n/2) | 0 | – | 1 | 0 |
| CP4 (MUL3, weight 3n/2+n/4) | 0 | – | 0 | 1 |
| MUL3 terms mixing the two n/4 quarters | as CM1 | – | as CM1 | forced 0 |
| MUL3 low-quarter sign row/column | plain | – | plain | complemented, constants 1 at weights n+n/4 and n+n/2-1 |

CP0/CP1/CP2 are the two Baugh-Wooley constants of each n/2 x n/2 product. CP3 supplies the missing
constant of the n/2 x n/2 product in MUL3. CP4 and the two forced ones do the same for the two
n/4 x n/4 products.

## Rounding compensation: K_m1, K_m2, SCC1 and SCC2

This is the subtle part of the design. With the columns below weight n-1 thrown away, the result
is biased low. The compensation works at the level of column n-2:

* MUL1 ORs its column n-2 terms (`x_{n-2}y_0, x_{n-3}y_1, ..., x_{n/2-1}y_{n/2-1}`). It adds that
  OR as a one at weight n-1. `K_m1` is the NOR of the same terms.
* MUL2 does the same with its own column n-2 terms (`x_{n/2-2}y_{n/2}, ..., x_0y_{n-2}`) and
  produces `K_m2`.
* A rounding constant of half an output LSB (a one at weight n-1) must also be added when all
  column n-2 terms are zero. In CM1 there are two half-arrays, so this must happen *once*.
  SCC1 adds it in MUL1 when `K_m1 & K_m2`, and SCC2 adds nothing. In CM2 each half is its own
  multiplier, so SCC1 = `K_m1` and SCC2 = `K_m2`.

The results, in output LSBs, are as follows:

* **CM1**: `p = floor((X*Y + 2^(2n) - D + c*2^(n-1)) / 2^n) mod 2^n`. D is the sum of the dropped
  terms of weight <= n-2. c = OR1 + OR2, or 1 when both ORs are 0.
* **CM2**: each half-word result has this form with word length n/2, with c = 1 always. The OR and
  the NOR of a block add up to 1.

Measured against the exact product with uniform random operands, at 100,000 vectors per size:

| n | mean error | largest error |
|---|------------|---------------|
| 8 | -0.30 LSB | 2.50 LSB |
| 16 | -1.11 LSB | 5.38 LSB |
| 24 | -2.04 LSB | 7.69 LSB |
| 32 | -3.01 LSB | 8.75 LSB |

The compensation uses a single column (the w = 1 prototype). The truncated part grows with n
but the compensation does not, so the bias grows with n. Larger word lengths would want a richer
compensation, which this design does not define.

## Pipeline and timing

There are four register bands and three stages, and a new operation is accepted every clock.
The mode may change from one operation to the next.

```
 op,x,y ─► [band 0] ─► decoder: t[3:0], g_M1..g_M3 ─► [band 1: control reg, x_{n/2-1}&y_{n/2-1} reg,
                                                       gated input regs of MUL1, MUL2, MUL3]
        ─► MUL1, MUL2 (+CU/L on K_m2), MUL3 ─► substitute muxes ─► t2 mux: MUL3 or {M2[n/2..1],M1[n/2..1]}
        ─► [band 2: product word reg; ADD1 input reg gated by t3]
        ─► ADD1 ─► ADD2 (product word AND t3) ─► t3 mux ─► [band 3] ─► p
```

* **Latency**: the result of the operands captured at rising edge k is on `p` after edge k+3. In
  the testbenches an operation is driven before edge k, and its result is read just after edge
  k+3.
* **ADD1** adds M1 and M2 (both starting at weight n-1) and keeps the carry-out and the bits
  from weight n upward. For n = 8, `{carry, C[5:1]}` of `A[5:0]+B[5:0]`.
* **ADD2** adds the ADD1 result to the stage-2 word, which in CM1 is M3. The sum is the CM1
  product.
* The final mux takes ADD2 in CM1. In the other modes it takes the stage-2 word directly.
* Reset is asynchronous and active low, and clears every register, so `p` reads 0 until the
  first result arrives. There is no valid signal: `p` is a result 4 edges after a valid input.

## Power schemes

**Gated input registers.** MUL1, MUL2 and MUL3 each have their own input register. They are
enabled as follows:

| mode | MUL1 | MUL2 | MUL3 | ADD1 register |
|------|------|------|------|---------------|
| CM1 | unless `X[n-1:n/2]=0` or `Y[n/2-1:0]=0` | unless `X[n/2-1:0]=0` or `Y[n-1:n/2]=0` | unless `X[n-1:n/2]=0` or `Y[n-1:n/2]=0` | on |
| CM2 | on | on | off | off |
| CM3, CM4 | off | off | on | off |

The operand halves the blocks share are registered separately for each block, so that gating one
block does not starve another. MUL1 takes `X[n-1:n/2-1]`, MUL2 takes `X[n/2-1:0]`, and both
MUL1 and MUL3 take `X[n-1:n/2]`.

**Substitute values.** A block gated in CM1 still has a known, non-zero output for a zero
operand, because of its complemented terms. A mux puts that value in place of the stale output:

* MUL3: `2^n - 2^(n/2)` (n = 8: `11110000`).
* MUL2: `2^(n/2) - 1` (n = 8: `001111`).
* MUL1: `2^(n/2) + 1 + v`, with `v = x_{n/2-1}y_{n/2-1} | K_m2` (n = 8: `{0100, v, ~v}`). The
  `x_{n/2-1}y_{n/2-1}` bit is carried in its own small register.

**CU and L.** A gated MUL2 has a stale `K_m2`. The control unit (CU) then presents 1, the value
a MUL2 with a zero operand would give. The latch L between CU and MUL1 is transparent while MUL1
is enabled and holds while MUL1 is gated, so MUL1's inputs do not toggle. L is a real
level-sensitive latch (`always_latch`). Synthesis reports one latch bit for it, and that is
intended.

**Zero input.** Outside CM1, the ADD1 input register holds (it is gated by t3). The stage-2 word
is ANDed with t3 before ADD2, so ADD2 sees constant inputs while modes other than CM1 run.

Clock gating is written as a register enable (`rfw_gated_reg`). A synthesis flow maps it onto
integrated clock-gating cells.

With uniform random operands, a zero half-operand is rare, so CM1 gating saves little: 12 % of
block loads at n = 8 and under 1 % at n = 16. In CM2, CM3 and CM4 one or two of the three blocks
never load. That is where most of the saving lies.

## Where this RTL departs from, or adds to, the original description

* **Carry cut in CM4 (correction).** The published CM4 settings place the low n/4 x n/4 product's
  constants inside MUL3's shared adder array. That Baugh-Wooley sum equals `P_low + 2^(n/2)`, so
  it carries a one into the high product whenever `P_low >= 0`, and the high result comes out
  one too large. `rfw_mul3` cuts the carry from weight 3n/2-1 into weight 3n/2 in CM4. Both
  products are then exact, as the mode intends.
* **Word length.** The cell-level description exists for n = 8 only. The term rules, constants,
  substitute values and adder widths are generalised to any n divisible by 4 (n >= 8), and
  `N = 8` is the default.
* **Adder arrays.** Each MUL block is written as rows of carry-save adders, one row per
  multiplier bit: each sum bit stays at its weight and each carry moves one weight up. A
  carry-propagate row follows. The configurable terms and the CP bits are the original ones. Two
  things differ from the original cell layout. The constants and compensation bits enter as one
  extra carry-save row rather than at the particular cells where the original feeds them. The
  gate-level make-up of each cell is left to synthesis.
* **Clock gating** is a register enable (see above). The zero detection for the gated registers
  sits in the decoder. The enables are active high (1 = load).
* **Reset, no handshake**: own choices, as described under timing.

## Files

`rtl/` (one module or package per file):

| file | content |
|------|---------|
| `rfw_pkg.sv` | mode enum `cm_e`, control word `ctl_t`, enables `gate_t`, substitute-value functions |
| `rfw_mul_top.sv` | the whole pipeline (top) |
| `rfw_decoder.sv` | op -> t[3:0], gated-register enables |
| `rfw_gated_reg.sv` | enable (clock-gated) register |
| `rfw_mul1.sv`, `rfw_mul2.sv`, `rfw_mul3.sv` | the three configurable array blocks |
| `rfw_scc1.sv`, `rfw_scc2.sv` | subcalibration circuits |
| `rfw_km2_ctrl.sv` | CU and latch L on K_m2 |
| `rfw_add1.sv`, `rfw_add2.sv` | third-stage adders (ADD2 with zero input) |

`tb/`: `rfw_ref_pkg.sv` holds the reference arithmetic, written from the Baugh-Wooley equations
rather than from the RTL. `tb_rfw_mul_chk.sv` is the shared stimulus/checker for the whole
multiplier. There is one self-checking testbench per module, plus these:

* `tb_rfw_mul_top`: n = 8 with default parameters, 200,000 back-to-back operations in random
  modes. Operand halves are often zero. Each result is checked at the 4-edge latency. Each
  mechanism (each mode, mode changes, each block gated, CU override, latch hold, SCC1 firing,
  zero input, the MUL1 substitute bit) is counted and must occur.
* `tb_rfw_mul_sizes`: the same at n = 16, 24, 32.
* `tb_rfw_mul_table5`: n = 8, 16, 24, 32 side by side, 100,000 uniform random vectors in each
  mode. It prints the CM1 error and the per-mode load counts of the gated registers.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -y rtl -y tb \
  rtl/rfw_pkg.sv tb/rfw_ref_pkg.sv tb/tb_rfw_mul_top.sv \
  --top-module tb_rfw_mul_top -o sim
./obj_dir/sim
```

For another testbench, swap the last file and the `--top-module` name; `-y` lets Verilator find
the modules each bench uses. Every bench builds with no warnings under the default settings.
To lint the design with all warnings on:
`verilator --lint-only -Wall -Irtl rtl/rfw_pkg.sv rtl/rfw_mul_top.sv --top-module rfw_mul_top`.
The remaining lint warnings are unused bits: the dropped low sum bit in ADD1, the low bits of
the internal sums of MUL1, MUL2 and MUL3 that lie outside the kept columns, and `K_m1` at the top, which only feeds SCC1 inside MUL1.

To change the word length, set `N` on `rfw_mul_top`. It must be a multiple of 4 and at least 8;
otherwise elaboration stops with an error.
