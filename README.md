# Arbitrary boundary packed arithmetic unit

Media instruction sets split a wide register into 8-, 16- or 32-bit lanes. Real media data often
comes in other widths: 9-bit MPEG values, 12-bit medical images and IDCT coefficients, 20-bit
audio. Fitting these into fixed lanes wastes bits and cuts parallelism. This unit lets software
split an N-bit word (N = 32 by default) into **sub-datatypes of any widths, in any mix**. It does
packed addition and packed multiplication on such words.

The split is held in a mask register `M`. `M[i] = 1` marks bit `i` as the least significant bit
of a sub-datatype. For example, a 32-bit word holding fields of 9, 4, 4, 3 and 12 bits (counted
from bit 0) has `M = 32'h0012_2201`. Bit 0 always starts a sub-datatype, whatever `M[0]` says.

## Files

| file | module | role |
|---|---|---|
| `rtl/abp_pkg.sv` | package | op codes, the multiplier piece width, helpers for the Wallace tree |
| `rtl/abp_unit.sv` | `abp_unit` | top level: ties the blocks below together |
| `rtl/abp_mask_unit.sv` | `abp_mask_unit` | mask register; an N-clock fill of the mask array and the carry product terms |
| `rtl/abp_packed_cla.sv` | `abp_packed_cla` | carry-lookahead adder with its carries cut at boundaries |
| `rtl/abp_carry_bubble.sv` | `abp_carry_bubble` | the `C'` register of sub-datatype carries |
| `rtl/abp_packed_mul.sv` | `abp_packed_mul` | N x N packed Wallace-tree multiplier |
| `rtl/abp_mul4x4_masked.sv` | `abp_mul4x4_masked` | 4x4 array multiplier whose bit products can be masked off |
| `rtl/abp_full_adder.sv` | `abp_full_adder` | full-adder cell |
| `tb/abp_ref_pkg.sv` | package | reference model that works field by field |
| `tb/tb_*.sv` | | one self-checking testbench per module |

## Packed addition and the carry register `C'`

### Cutting the carry chain

The adder is a normal carry-lookahead adder, `P_i = A_i ^ B_i` and `G_i = A_i & B_i`, with one
change: at a boundary bit the carry from the bit below is replaced.

    carry into bit i  =  M_i ? C'_i : C_(i-1)
    S_i = P_i ^ (carry into bit i)
    C_i = G_i | P_i & (carry into bit i)

`abp_packed_cla` moves the boundary into the generate/propagate pair:

- `G*_i = G_i | P_i & M_i & C'_i`
- `P*_i = P_i & ~M_i`

This masked propagate stops every carry at a boundary. The recurrence `C_i = G*_i | P*_i & C_(i-1)`
then has no special cases. A Kogge-Stone parallel prefix solves it in `log2(N)` levels. `C_i` at
the top bit of a sub-datatype is that sub-datatype's carry-out.

### Moving the carry down: `C'`

Each sub-datatype's carry-out is kept for the next addition of the same sub-datatype. That
addition needs it at the sub-datatype's *lowest* bit, so the carry is copied to every bit of its
sub-datatype:

    C'_i = C_i & M_(i+1)  |  C'_(i+1) & ~M_(i+1)        (M_N = 1)

Evaluated bit by bit, this recursion is a chain of N gates. `abp_carry_bubble` evaluates the
unrolled form instead:

    C'_i = OR over j >= i of  C_j & T_ij,     T_ij = M_(j+1) & ~M_(i+1) & ... & ~M_j

`T_ij` is 1 exactly when `j` is the top bit of the sub-datatype that holds `i`. `T_ij` depends only
on the mask, so it is computed once when the mask is loaded. That leaves one AND-OR level per bit
for each addition.

`C'` is an N-bit register, and all bits of a sub-datatype hold the same value. This is the hook
for saturation logic or a branch on overflow. Neither is designed here, because the scheme gives
no rule for them.

### Operations

- `OP_ADD`: a packed add with zero carry into every sub-datatype.
- `OP_ADC`: takes each sub-datatype's carry-in from `C'`. It chains wider arithmetic through
  repeated adds.

Both ops write `C'`. `carry_clr` clears it, and so does loading a new mask.

## Packed multiplication

### Killing bit products

A product is the sum of the bit products `a_i b_j` with weight `2^(i+j)`. For packed operands, only
the bit products with `i` and `j` in the **same** sub-datatype belong to a result. The mask array
is an N x N bit array with `marr[i][j] = 1` exactly for those pairs. Each bit product is formed by
a 3-input AND, `a_i & b_j & marr[i][j]`, so every other bit product is zero.

Take a sub-datatype at bits `lo..hi`. Its surviving bit products have weights `2^(2lo)` to
`2^(2hi)`, and its product fits in `2(hi-lo+1)` bits. So if the surviving bit products are simply
added with their full weights, **each sub-product lands in bits `2lo .. 2hi+1` of the 2N-bit
result**, and no carry reaches the next field. No boundary logic is needed after the AND gates.
Example: with three 3-bit fields in a 9-bit word (`M = 9'b001_001_001`), the products appear in
bits 0-5, 6-11 and 12-17 of the 18-bit result. With the mask array all ones the unit is a plain
N x N multiplier.

### Structure

- `abp_mul4x4_masked` is a 4x4 carry-save array multiplier with twelve full adders. The first
  three rows of three adders each add in one bit of `b`. A final row of three adders ripples the
  remaining carries. Every bit product enters through a masked AND.
- `abp_packed_mul` cuts both operands into `ceil(N/4)` 4-bit pieces, padding the top piece with
  zeros. It multiplies every pair of pieces with its own masked 4x4 multiplier, which gets the
  matching 4x4 window of the mask array. N = 32 needs 64 multipliers.
- The 64 weighted partial products (weight `2^(4(pa+pb))`) go into a Wallace tree: 3:2
  carry-save levels applied greedily to whole words, then one final adder. The tree depth is
  computed at elaboration time by functions in `abp_pkg`.

## The mask unit

`abp_mask_unit` holds `M` and the two tables derived from it: the mask array (`marr`) and the
carry product terms (`cterm`, the `T_ij` above). Both are N x N bits. After a load, a walker visits
one bit per clock from bit 0 upwards and collects the bits of the current sub-datatype. When it
reaches a sub-datatype's top bit, it writes that sub-datatype's rows of both tables. A fill takes
exactly N clocks. `busy` is high for those N clocks, and loads that arrive meanwhile are ignored.
At reset, the tables describe a single N-bit sub-datatype.

## Top level: `abp_unit`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `mask_load`, `mask_in` | in | 1, N | load a new mask (taken when `mask_busy` is low) |
| `mask_busy` | out | 1 | high for N clocks while the tables fill |
| `mask` | out | N | current mask register |
| `in_valid`, `in_ready` | in/out | 1 | operation handshake; `in_ready = !mask_busy` |
| `op` | in | 2 | `OP_ADD`, `OP_ADC`, `OP_MUL` (`abp_pkg::abp_op_e`) |
| `a`, `b` | in | N | packed operands |
| `carry_clr` | in | 1 | zero `C'` |
| `out_valid`, `out_op` | out | 1, 2 | result valid one clock after acceptance, with its op code |
| `result` | out | 2N | packed sum (zero-extended) or packed product |
| `cprime` | out | N | `C'` after the latest addition |

Timing:

- One operation is accepted per clock when `in_valid && in_ready`.
- The adder and multiplier are combinational. Their result is registered, so `out_valid` and
  `result` follow one clock after acceptance.
- `C'` is updated on the same clock edge.
- An operation offered in the same cycle as a mask load still uses the old mask.
- An assertion checks that nothing is accepted while the tables fill.

## What follows the scheme and what is a design choice

These parts follow the published scheme:

- the mask register and its meaning
- the masked propagate and the boundary carry-in from `C'`
- the `C'` recursion and its unrolled form with precomputed product terms
- the N-clock sequential fill of the mask array
- the 3-input masked AND gates
- the 4x4 array multiplier with 12 full adders
- splitting the operands into 4-bit pieces that are added with their bit weights

These parts are this design's own:

- The instruction interface, the op codes, the zero-carry `OP_ADD`, and the single output
  register.
- Clearing `C'` on a mask load, and refusing operations during a fill.
- The Kogge-Stone form of the lookahead.
- Filling the product-term table in the same walk as the mask array.
- The shape of the Wallace tree.
- The 2N-bit result layout. It follows from keeping full bit weights, but the scheme does not
  state it.

Departures and limits:

- **Carry equation.** The published carry equation for the packed CLA keeps the unmasked
  recurrence `C_i = G_i + P_i C_(i-1)`, while its sum equation and the earlier masked-propagate
  form cut the chain at boundaries. This design cuts it, so `C_i` at a top bit really is the
  sub-datatype's carry-out.
- **Two-term `C'` form.** A two-term form of the `C'` recursion, chosen per bit by `M_(i+1)`,
  was still under study in the scheme. It is not built; the precomputed unrolled form is used.
- **Signedness.** Sub-datatypes are unsigned. Signed packed multiplication is not covered.
- **No multiply-accumulate path.** Multiply and add are separate operations. A packed MAC would
  add each product into a double-width accumulator whose mask has a 1 at bit `2lo` for each
  sub-datatype. That datapath is not described in enough detail to build here.
- **No saturation or branch logic.** Only the carries that such logic would use are provided.

## Verification

Each testbench compares the RTL with `tb/abp_ref_pkg.sv`. That model extracts every field and uses
ordinary integer `+` and `*`, so it shares no logic with the bit-level RTL.

| testbench | what it checks |
|---|---|
| `tb_abp_mul4x4_masked` | all 256 operand pairs against 8 mask windows |
| `tb_abp_packed_mul` | N = 32 and N = 9, fixed packings (1 x 32, 4 x 8, 9/4/4/3/12, 32 x 1, 3 x 3) and random ones |
| `tb_abp_packed_cla` | sums and sub-datatype carry-outs at N = 32 and N = 9, with random carry-ins |
| `tb_abp_carry_bubble` | update, hold and clear of `C'`; a 9-bit field carry reaching bit 0 |
| `tb_abp_mask_unit` | busy lasting exactly N clocks, a load during a fill being ignored, both tables bit for bit |
| `tb_abp_unit` | the full N = 32 unit under random traffic, checked every cycle |
| `tb_abp_examples` | hand-worked cases on the full unit: a 9-bit field's carry moved to bit 0 and used by the next `OP_ADC`, 4 x 8-bit add and multiply, three 3-bit products, two nibbles that must not carry into each other |

`tb_abp_unit` runs at the default parameters. It counts every mechanism and fails if any never
happens:

- a mask fill
- an operation refused during a fill
- a sub-datatype carry-out
- a carry used through `C'`
- a `C'` clear
- `C'` cleared by a mask load
- a multi-field multiply

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>`. To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/abp_pkg.sv tb/abp_ref_pkg.sv tb/tb_abp_unit.sv --top-module tb_abp_unit
    ./obj_dir/Vtb_abp_unit

Every module takes the word width as the parameter `N` (default 32). The multiplier and the
testbenches also work for widths that are not multiples of 4.
