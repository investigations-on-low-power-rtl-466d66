# Low-power 3-parallel linear-phase FIR filter (fast FIR + symmetric folding + Booth/CSA arithmetic)

This filter computes

    y(n) = sum_{k=0}^{M-1} h(k) x(n-k),      h(k) = h(M-1-k)   (linear phase)

three samples per clock. Its aim is to use few multipliers. Multipliers cost far more power and area than adders, so the design moves work from multipliers to adders ("arithmetic strength reduction") in three places:

1. **Fast FIR algorithm (FFA).** The 3-parallel filter is split into polyphase branches. Its nine cross products are replaced by six sub-filters plus pre- and post-adders.
2. **Coefficient symmetry.** Some sub-filters have symmetric or antisymmetric coefficient sets. These pre-add the two samples that share a coefficient, so they need half the multipliers. A sum/difference "butterfly" creates two more such sets.
3. **Cheap multiplier arithmetic.** Each product comes from a radix-4 Booth multiplier. Its partial products are reduced in carry-save form and finished by a modified carry-save adder. In that adder, full adders with a constant-zero input become half adders.

The default build is 27 taps, 4-bit signed samples, 8-bit signed coefficients and exact 24-bit outputs. It uses 41 multipliers; a plain 3-parallel direct form would need 81.

## 1. The block arithmetic

Write a sample stream in blocks of three, `Xj(m) = x(3m+j)`, and do the same for the outputs, `Yj(m) = y(3m+j)`. The response splits into three polyphase components, `Hj[i] = h(3i+j)`, each `K = M/3` taps long. Products such as `H0X1` denote sub-filter convolutions over the block index m, and `w` is one block delay (one clock). The 3-parallel filter is then

    Y0 = H0X0 + w (H1X2 + H2X1)
    Y1 = H0X1 + H1X0 + w H2X2
    Y2 = H0X2 + H1X1 + H2X0

The design names the six terms `A = H0X0`, `B = H2X2`, `C = H0X2 + H2X0`, `D = H1X1`, `E = H0X1 + H1X0` and `F = H1X2 + H2X1`. Then

    Y0 = A + w F        Y1 = E + w B        Y2 = C + D

Symmetry of h gives two facts that the design relies on:

* `H2` is `H0` reversed, so `H0+H2` is symmetric and `H0-H2` is antisymmetric.
* `H1` is symmetric by itself.

Six sub-filters are built (K = 9 at the default):

| sub-filter | coefficients | input      | folding        | multipliers (K = 9) |
|------------|--------------|------------|----------------|---------------------|
| S          | H0 + H2      | X0 + X2    | symmetric      | 5 |
| T          | H0 - H2      | X0 - X2    | antisymmetric  | 4 (centre tap is 0) |
| D          | H1           | X1         | symmetric      | 5 |
| A          | H0           | X0         | none           | 9 |
| M1         | H0 + H1      | X0 + X1    | none           | 9 |
| M2         | H1 + H2      | X1 + X2    | none           | 9 |

The butterfly (`sym_combine`) turns S and T into

    (S + T)/2 = H0X0 + H2X2 = A + B
    (S - T)/2 = H0X2 + H2X0 = C

The halving is exact because `S+T` and `S-T` are always even. It is done after the addition so that the coefficients stay integers. The post-adders then finish the job: `B = (A+B) - A`, `E = M1 - A - D` and `F = M2 - D - B`. Two registers hold F and B for one block. This is the same idea as the well-known 2-parallel form, `Y0 = ½[(H0+H1)(X0+X1) + (H0-H1)(X0-X1)] - H1X1 + w H1X1` and `Y1 = ½[(H0+H1)(X0+X1) - (H0-H1)(X0-X1)]`, applied to the outer pair of three branches.

Multiplier count: `4K + ceil(K/2)` (S and T together need K, D needs ceil(K/2), the three plain sub-filters 3K). That is 41 at 27 taps, 122 at 81 taps and 221 at 147 taps. The source publication reports 24, 72 and 102 for its own 3-parallel arrangement, which it does not spell out; this arrangement is therefore this design's own (see section 6).

## 2. Sub-filters (`sym_subfilter`)

Each sub-filter is a direct-form FIR. A register delay line `r[0..K-1]` shifts on every clock. Each tap, or each folded tap pair, has one Booth multiplier. All products go into one carry-save tree, and a modified carry-save adder makes the final sum. The `FOLD` parameter sets the folding:

* `FOLD_NONE`: K multipliers, `y = sum h[i]·r[i]`.
* `FOLD_SYM`: `h[i] = h[K-1-i]`. The operand is `r[i] + r[K-1-i]`, and an odd K adds a centre tap; ceil(K/2) multipliers.
* `FOLD_ANTI`: `h[i] = -h[K-1-i]`. The operand is `r[i] - r[K-1-i]`, and the centre coefficient is zero; floor(K/2) multipliers.

When folded, only the first half of the `h` array is read. The output `y` is combinational from the registers. It belongs to the sample taken at the last clock edge and the K-1 samples before it.

## 3. Multiplier and adders

**`booth_mult`** multiplies a signed sample (the multiplicand, up to 6 bits after two pre-additions) by a signed coefficient (the multiplier, padded to 10 bits). The result is a 16-bit product, which is always exact at these widths. The pieces are:

* `booth_pp_select`, partial-product selection. It recodes the coefficient into radix-4 digits in {-2..+2}. Digit j reads coefficient bits 2j+1, 2j and 2j-1 and is encoded as `{neg, two, one}` (the `booth_digit_t` type of `fir_pkg`).
* `booth_pp_gen`, partial-product generation. It forms `±M` or `±2M`, shifted by 2j. A negative row is given in one's complement, with its +1 as a separate correction bit.
* `csa_tree`. It reduces the rows plus the correction word with levels of 3:2 counters to a sum and a carry word.
* `novel_csa`. It adds the sum and carry words.

**`novel_csa`**, the modified carry-save adder, is a two-operand adder laid out for low switching activity. At 16 bits:

    row 1:  bit 0 full adder (a0, b0, cin) -> s0 ;  bits 1..15 half adders -> p[i], g[i]
    row 2:  bits 1..4   H F F F           (ripple)      -> s1..s4, group carry c4
            bits 5..7   H F F             (carry-in 0)  -> x5..x7,  c7
            bits 8..10  H F F                           -> x8..x10, c10
            bits 11..13 H F F                           -> x11..x13, c13
            bits 14..16 H F H                           -> x14..x16
    row 3:  each group adds the carry of the group below (half-adder increment chain)

Row 2 combines `p[i]` with `g[i-1]`. The first cell of each upper group is a half adder because its carry-in is taken as zero. Rows 1 and 2 hold 21 half adders and 11 full adders. Row 3 resolves the deferred group carries: a group's carry-out is either its own row-2 carry or the carry of its increment, and never both. The published layout stops at the group carries, so row 3 is this design's completion. The module is parameterised: the first group covers bits 0-4, the later groups are 3 bits wide, and a top half adder sits at bit WIDTH. The filter uses it at 16 bits in the multipliers, at 24 bits in the sub-filters and at 25 bits in the butterfly. There the subtraction runs as `p + ~q + 1` through `cin`.

**`coef_precompute`** expands the 14 input coefficients h(0..13) to the full symmetric response. It forms the six coefficient sets of the table in section 1; the sums and differences are 9 bits wide.

## 4. Interface and timing of `fast_fir3_sym`

| port    | dir | width        | meaning |
|---------|-----|--------------|---------|
| clk     | in  | 1            | clock; one block of three samples per rising edge |
| rst     | in  | 1            | synchronous, active high; clears all delay lines, block delays and outputs |
| coef    | in  | 14 × 8       | h(0..13), signed; h(14..26) mirror them; hold constant while filtering |
| x_in    | in  | 3 × 4        | x(3m), x(3m+1), x(3m+2), signed |
| y_out   | out | 3 × 24       | y(3m), y(3m+1), y(3m+2), signed, exact |

The block applied before clock edge t enters the delay lines at edge t. Its results are on `y_out` right after edge t+1, a latency of two clocks. Throughput is three samples per clock, with no stalls. A change of `coef` acts at once on all taps. Reset the filter after a change if old samples must not be mixed with new coefficients.

Parameters (in `fir_pkg` and on the top): `NTAPS` = 27 (must be a multiple of 3), `DW` = 4, `CW` = 8, `ACC_W` = 24. The parallel level is fixed at 3. `ACC_W` = 24 is exact for every NTAPS up to 147 with 4-bit samples and 8-bit coefficients. Wider samples or coefficients need a larger `ACC_W`. They also need a larger product width `PW`, which is 16 by default and limits `|sample sum| × |coefficient sum|` to 15 bits plus sign.

## 5. Simulating

Every module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/fir_pkg.sv tb/tb_fast_fir3_sym.sv --top-module tb_fast_fir3_sym
    ./obj_dir/Vtb_fast_fir3_sym

| testbench | what it shows |
|-----------|---------------|
| tb_fast_fir3_sym | full 27-tap filter against a direct convolution: impulse responses, constant input -3, random and extreme samples, mid-stream reset, seven coefficient sets; checks the two-clock latency; counts that the antisymmetric branch, butterfly, both block delays and negative Booth digits are exercised |
| tb_fir3_taps (+ fir3_tap_check) | the same filter built with NTAPS = 81 and 147 |
| tb_sym_subfilter | all folding modes, odd and even K, reset |
| tb_booth_mult | all 6 × 10-bit operand pairs |
| tb_booth_pp_select, tb_booth_pp_gen | exhaustive recoding and row generation |
| tb_novel_csa, tb_csa_tree, tb_sym_combine, tb_coef_precompute | random and corner-case arithmetic checks |

The reference coefficient set used in the top testbench is h(0..13) = 02 F7 2B 0C 35 ED 29 0E 39 02 F7 2B 0C 35 (hex, 8-bit), mirrored to 27 taps.

## 6. How far this follows the published design

Taken from the source:

* the 3-parallel, 27-tap configuration;
* 4-bit samples and 8-bit coefficients;
* the sum/difference butterfly with exact halving;
* folding of symmetric coefficient sets;
* Booth multipliers built from selection, generation and a signed-digit adder;
* carry-save reduction;
* the cell layout and 16-bit width of the modified carry-save adder.

This design's own choices:

* **The 3-parallel arrangement.** The source works the equations out only for two branches. Its reported multiplier counts (24 / 72 / 102 for 27 / 81 / 147 taps) are not reached here (41 / 122 / 221), and the arrangement that reaches them is unknown.
* **Timing.** One register stage at the input (the delay lines) and one at the output. Nothing is pipelined inside the multipliers.
* **Output width.** The source's simulation shows an 8-bit output without saying how it is scaled, so the outputs here are exact.
* **Coefficients as an input bus.** The chip's pin-out is not described.
* **Row 3 of the modified carry-save adder.** The published layout stops at the group carries.
* **Synchronous active-high reset.**

Not modelled: the physical implementation (I/O pad ring, power rings, floorplan), the 2-parallel variant and the parallel levels other than three, and any power or timing figure. The RTL is written for function and clarity, not tuned for a cell library.

## 7. Files

`rtl/fir_pkg.sv` holds the shared defaults, `booth_digit_t` and `fold_t`. Top: `rtl/fast_fir3_sym.sv`. Blocks: `coef_precompute`, `sym_subfilter`, `sym_combine`, `booth_mult`, `booth_pp_select`, `booth_pp_gen`, `csa_tree`, `novel_csa`, with cells `half_adder` and `full_adder`. Each file opens with a description of its function, interface and timing.
