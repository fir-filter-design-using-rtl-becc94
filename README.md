# Block FIR filter with multiple constant multiplication and a modified ripple carry adder

An N-tap FIR filter normally needs N multiplications per output sample. When the
coefficients are fixed, each multiplication is a multiplication by a *constant*,
which can be done with shifts (free wires) and a few additions. If one sample is
multiplied by many constants at once, the constants can also share partial
results. That is the multiple constant multiplication (MCM) problem. This design
applies MCM to a **block** FIR filter. The filter takes L = 4 samples per clock
cycle and returns L = 4 outputs in the same cycle. Every input sample feeds one
MCM block that forms all the products that sample takes part in. The products
are summed into inner products, and the inner products are accumulated in
transpose form by a pipelined adder unit. The adders of that unit are
*modified ripple carry adders*: ripple adders with a spare full-adder cell per
4-bit slice, plus multiplexers that can route the carry chain around any one
cell.

The same block filter is also provided in a multiplier-based form, with a
coefficient ROM, inner product cells and real multipliers. The top level
`fir_top` holds both filters side by side. With the same input they give the
same output.

Defaults: block size L = 4, length N = 16, so there are M = N/L = 4 coefficient
groups. Samples and coefficients are 8-bit signed, and outputs are 20-bit
signed.

## The block formulation

The filter computes y(n) = Σ_{i=0}^{N-1} h(i)·x(n−i). Block k covers the outputs
y(kL), y(kL−1), …, y(kL−L+1). Split the taps into M groups
c_m = {h(mL), …, h(mL+L−1)}. Then

    y(kL−l) = Σ_{m=0}^{M-1} r_{k−m}^m[l],   r_k^m[l] = Σ_{i=0}^{L-1} h(mL+i)·x(kL−l−i)

so the filter needs two things:

1. For the current block, the L×M inner products r_k^m[l]. Across all l and i
   they use only the 2L−1 samples x(kL) … x(kL−2L+2): the L new ones and L−1
   kept from the previous block.
2. The sum of r^0 from this block, r^1 from the previous block, r^2 from two
   blocks back, and so on. This is a transpose-form delay line that runs one
   block per step:
   `y_k = r_k^0 + z^-1(r_k^1 + z^-1(r_k^2 + z^-1 r_k^3))`.

### Which sample meets which coefficients

Sample x(kL−j) enters r^m[l] with coefficient h(mL+i) whenever j = l+i. For
L = 4:

| sample     | coefficient positions i used | constants per MCM block |
|------------|------------------------------|-------------------------|
| x(4k)      | 0                            | 4  (h0 h4 h8 h12)       |
| x(4k−1)    | 0, 1                         | 8                       |
| x(4k−2)    | 0, 1, 2                      | 12                      |
| x(4k−3)    | 0, 1, 2, 3                   | 16 (all)                |
| x(4k−4)    | 1, 2, 3                      | 12                      |
| x(4k−5)    | 2, 3                         | 8                       |
| x(4k−6)    | 3                            | 4  (h3 h7 h11 h15)      |

That is 7 (= 2L−1) MCM blocks, 64 (= LN) products in all. Product h(mL+i)·x(kL−j)
goes to lane l = j − i of group m.

## Datapath of the MCM filter (`mcm_fir`)

```
 x_k[0..3] ─► register_unit ─► win[0..6] ─► mcm_block J=0..6 ─► adder_network ─► r[m][l]
                (3 regs)        x(kL-j)      (shift-add)          (L-1 adders     │
                                                                   per r)          ▼
                                                         pipelined_adder_unit ─► y_k[0..3]
                                                         (12 mrca adders, 12 regs)
```

* **register_unit**: holds x(kL), x(kL−1), x(kL−2) of the previous block in
  L−1 = 3 registers of B bits. It outputs the window `win[j] = x(kL−j)`,
  j = 0..6, and also the L overlapping vectors `xs[l][i] = x(kL−l−i)` that the
  multiplier form needs.
* **mcm_block** (one per window position J): each coefficient is split at
  elaboration time as h = ±f·2^s, with f odd (the "fundamental"). Each distinct
  fundamental of the block is built once from x as a sum of shifted copies in
  canonic signed digit form. For example, 23·x = 32x − 8x − x. Every product is
  then a shared fundamental, shifted by wiring and negated if needed. So the
  two equal halves of the symmetric coefficient set cost one adder chain, and
  so do h = 10, h = −10 and h = 5. No multipliers are used.
* **adder_network**: r[m][l] = Σ_i p[m][l][i]. This is a balanced tree of three
  adders per inner product (two, then one), sign-extended to 20 bits.
* **pipelined_adder_unit**: transpose accumulation with L(M−1) = 12 adders and
  12 registers of 20 bits. `s[3] <= r[3]`, `s[m] <= r[m] + s[m+1]`, and
  `y = r[0] + s[1]`. Every adder is an `mrca_adder`.

## The modified ripple carry adder (`mrca_adder`, `mrca_slice`)

The adder is a chain of 4-bit slices. Each slice has **five** full-adder
cells, not four. Cells 0–3 form the normal ripple chain and cell 4 is a spare.
A 3-bit `skip` code per slice names one cell to leave out:

* **Operand multiplexers** (`sel[2:0]`, M10–M15). Cells above the skipped one
  take operand bits a[j−1], b[j−1] instead of a[j], b[j], so they move up one
  position.
* **Carry multiplexers** (`sel2[3:0]`, M6–M9). The carry into cell j comes
  from cell j−1, or, if cell j−1 is the skipped one, from that cell's own
  carry-in.
* **Output multiplexers** (`sel1[4:0]`, M1–M5). Sum[i] is taken from cell i+1
  instead of cell i at and above the skipped position. Cout comes from the
  spare cell when the spare is in use.

`skip = 4` leaves the spare idle, which gives a plain ripple carry adder. Every
skip value gives the same sum, a + b + cin. So the selects change which cells
carry the addition, never the result. Codes above 4 are treated as 4. The
20-bit adders of the pipelined adder unit use five slices. A filter's
`rca_skip` input, five 3-bit codes, is shared by all 12 of its adders.

The cell count, the multiplexer and select names, and the operand pairings
(a[j] against a[j−1]) follow the original adder description. The original
does not say how the selects are driven. The spare-cell routing above, decoded
from one skip code per slice, is the interpretation used here, so treat the
exact multiplexer wiring as a reconstruction. The arithmetic is verified
exhaustively for a slice, for every skip value.

## The multiplier-based form (`mult_fir`)

* **coeff_storage_unit**: a 16-word ROM of the coefficients and a 4-bit
  address counter. After reset, or a pulse on `coef_reload`, it sends one word
  per cycle, h(0) first, into 16 coefficient registers. `done` rises after the
  16th word.
* **inner_product_unit** ×M: group m's coefficient vector c_m is broadcast to
  L **inner_product_cell**s. Cell l multiplies c_m by `xs[l]` (4 multipliers)
  and adds the products in a 2+1 adder tree. That gives LN = 64 multipliers and L(N−1) = 60 adders: 48 in the cells
  and 12 in the pipelined adder unit.
* The register unit and the pipelined adder unit are the same modules as in
  the MCM filter.

## Interfaces and timing

Both filters have the same interface. Each cycle, they take one block when
`in_valid` is high:

| signal       | width     | meaning |
|--------------|-----------|---------|
| `x_k[i]`     | 8 × 4     | x(kL−i): `x_k[0]` is the newest sample, `x_k[3]` the oldest |
| `y_k[l]`     | 20 × 4    | y(kL−l): `y_k[0]` is the newest output |
| `in_valid`   | 1         | block present; registers advance only then |
| `out_valid`  | 1         | `y_k` is valid (same cycle as the accepted input block) |
| `rca_skip[s]`| 3 × 5     | bypassed cell per adder slice (4 = none) |

The outputs are combinational from `x_k` and the registers. A block goes in
and its outputs come out in the same cycle, and the filter takes one block
per cycle, with no stall. The critical path is: register unit → MCM or
multiplier → three-adder inner product → one ripple adder. `mult_fir`
also has `coef_reload` and `in_ready`. `in_ready` is low for the 16 cycles of a
coefficient load. A block offered while it is low is not taken, and the
filter state holds. `out_valid = in_valid && in_ready`. Reset is asynchronous
and active-low. It clears all sample and accumulator registers, so the filter
starts from an all-zero history.

`fir_top` brings out the ports of both filters, with prefixes `mcm_` and
`mul_`. They share only `clk` and `rst_n`.

## Sizes, coefficients and choices made here

* L = 4 and N = 16 come from the design. The 8-bit sample and coefficient
  widths are choices made here.
* The coefficients are a symmetric 16-tap low-pass set chosen for this RTL.
  They live in `fir_pkg::H_DEFAULT`:
  −1 −3 −4 2 10 23 35 42 42 35 23 10 2 −4 −3 −1.
  Pass another set through the `H` parameter of `mcm_fir` or `mult_fir`. The
  MCM hardware is regenerated from it at elaboration.
* The accumulation width is B + BH + log2 N = 20 bits. The original
  description sizes the pipeline registers at B + BH bits, which can overflow
  for a sum of N products. 20 bits never overflows.
* The `in_valid`/`out_valid`/`in_ready` handshake, the reset behaviour and the
  coefficient-load protocol are choices made here.
* The common-subexpression sharing is limited to shared fundamentals (see
  `mcm_block`). No search across different fundamentals is attempted.
* The register unit is built from registers only. No adders are involved.
* The comparison baseline, the same filter with carry look-ahead adders, is
  not included. Neither is a direct-form block filter.

## Files

`rtl/`: `fir_pkg` (constants and CSD helper functions), `full_adder`,
`mrca_slice`, `mrca_adder`, `adder_tree`, `register_unit`, `mcm_block`,
`adder_network`, `pipelined_adder_unit`, `mcm_fir`, `coeff_storage_unit`,
`inner_product_cell`, `inner_product_unit`, `mult_fir`, `fir_top`.

`tb/`: one self-checking testbench per block, `tb_<module>.sv`. Each compares
against values computed in the testbench: integer sums, integer products, or a
direct convolution from the sample history. Each ends with a
`TB_RESULT checks=… failures=…` line. `tb_fir_top` runs both filters at the
default parameters over about 2000 blocks. It counts the mechanisms it
exercised and fails if any was missed: idle cycles, refused blocks during a
coefficient load, mid-stream reloads, impulse and full-scale blocks, and every
bypass position of the modified adder. `tb_fir_sizes` (with its helper
`fir_size_check`) builds both forms at L = 2, N = 8 and at L = 8, N = 32, with
other coefficient sets including −128 and 0, and checks them the same way. The
MCM hardware and the widths follow the parameters. `mult_fir` needs L and N to
be powers of two.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top
./obj_dir/Vtb_fir_top
```

Replace `fir_top` with any block name to run that block's testbench. The
package file must be listed first, and `-Irtl` lets Verilator find the other
modules. All testbenches finish in well under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/fir_pkg.sv rtl/fir_top.sv`. The remaining
warnings are deliberately unconnected outputs: unused adder carry-outs, and the
register-unit view that the other form uses.
