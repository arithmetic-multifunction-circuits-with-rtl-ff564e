# Recursive arithmetic multifunction circuits

Lead-digit detection, magnitude comparison, incrementing and carry generation look like
different problems, but each output depends on every input bit in the same way: what
matters is the most (or least) significant position where something happens. All of them
can be computed by one **dyadic tree**: a 2-input "foundation block" per bit pair, and at
every level above a node that joins two half-width subtrees with an OR gate and a few
2:1 multiplexers. The tree is self-similar, so one parameter `H` scales it to `2**H`
inputs with `H` stages of logic, fan-in 2 everywhere and equal depth for all outputs.

This repository holds that family of circuits in synthesizable SystemVerilog, ending in a
**four-way multifunction circuit** (`mf4_unit`) in which a single tree, steered by four
control bits, does lead/trail digit detection, comparison, increment/decrement and
addition. All circuits are purely combinational; there is no clock and no state.

## The basic tree: lead-digit detection

`ldd` finds the most significant 1 of a `2**H`-bit word. A 2-bit block gives
`P = I1`, `E = I1 | I0`. A level joins an upper and a lower subtree:

```
E        = E_hi | E_lo
P[H-1]   = E_hi
P[H-2:0] = E_hi ? P_hi : P_lo
```

So the E outputs form an OR tree and each position bit is a chain of multiplexers hanging
off it. `cmp` is the same tree over the two operands interlaced bit by bit
(`A_k` on bit `2k+1`, `B_k` on bit `2k`) with an XOR as foundation: it finds the most
significant bit where A and B differ, and only `P0` (is that bit on an odd, i.e. A,
position?) and `E` (do they differ at all?) are kept: `gt = A > B`, `ne = A != B`.

## Flip and invert: the generalized comparator / LDD

`clddg` merges the two: its foundation block (`clddg_fb`) inverts both bits when `Inv=1`,
and uses `C/L` to choose between `a|b` (detector) and `a^b` (comparator, made as `a|b`
forced to 0 by `a&b&C/L`). `F` flips the priority from the most to the least
significant end. The eight modes:

| F | Inv | C/L | function |
|---|-----|-----|----------|
| 0 | 0 | 0 | leading one |
| 0 | 0 | 1 | compare: `p[0]=1` if A > B, `e=0` if A = B |
| 0 | 1 | 0 | leading zero |
| 0 | 1 | 1 | inverted compare: `p[0]=1` if A < B (e.g. two negative two's-complement numbers) |
| 1 | 0 | 0 | trailing one |
| 1 | 0 | 1 | least significant differing bit |
| 1 | 1 | 0 | trailing zero |
| 1 | 1 | 1 | least significant differing bit, inverted |

`p` is always the true bit index of the digit found. In flip mode the level select is
the *complement* of the lower subtree's E (take the lower half whenever it holds a
candidate). A consequence used below: when nothing is found in flip mode, every select is 1
and `p` is all ones. In non-flip modes `p` is then 0 (detector) or carries no meaning.

## Increment / decrement

Adding one inverts the trailing ones and the first zero; subtracting one inverts the
trailing zeros and the first one. `incdec` therefore runs `clddg` with `F=1, C/L=0,
Inv=inc` to find that trailing zero/one, and `incpp` inverts bits `0..p`. The mask
`v[k] = (k <= p)` comes from `incmg`, itself recursive: the mask for `p` is
`{p_msb & m, p_msb | m}` with `m` the half-width mask of the lower bits, and the first
stage is `{p0, 1}`. `nov` (the detector's E) is 0 when the operand is all ones (inc) or
zero (dec): the overflow flag. Because `p` is then all ones, the result wraps to 0 or to
all ones.

## Carry generation with the Delta' operator

Carry trees usually combine (generate, propagate) pairs. Here the propagate is kept
inverted, `np = XNOR(A,B)`, because that is what the foundation block naturally makes, and
the prefix operator becomes a multiplexer plus an OR:

```
(g, np) = (g_a, np_a) D' (g_b, np_b):   g  = np_a ? g_a : g_b
                                        np = np_a | np_b        (a = more significant)
```

`cg` (`arith_pkg::delta_p`) places D' nodes between the two branches of the dyadic tree:
every bit of the upper half is combined with the top bit of the lower half. That is a
Sklansky prefix tree: `H-1` levels for `2**(H-1)` bits, but the last level has a fan-out of
half the width. `g[k]` is the carry out of bits `0..k` (no carry in); no sum stage is
included.

## The four-way multifunction circuit

`mf4_unit` (`2**H` inputs, default `H=5`) adds the adder to the generalized
comparator/LDD with little extra logic, because the pieces coincide:

* The foundation block `mf1_fb` yields, per pair, `E` or the not-propagate (an extra XOR
  with `Add`), and `P` or the generate `a&b&C/L` (a multiplexer on `Add`).
* In the tree `mf1`, E and the top not-propagate are the **same OR gate**, and the
  top-generate multiplexer is the **same multiplexer** as position bit `P0` (its select,
  the upper E, is the upper not-propagate when `F=0`). The remaining generate /
  not-propagate bits simply pass up from the subtrees. The tree thus delivers, at each
  bit `k`, the group of `2**t` bits ending at `k` (`t` = trailing ones of `k`): the first
  half (up-sweep) of a **Brent–Kung** adder. Positions `2**j - 1` are already complete
  prefixes.
* `bkutr`, the adder post-processing, is the second Brent–Kung tree growing back down: it
  recurses on the lower half, and hands the upper half to `bkutl` with the lower half's
  top as incoming prefix; `bkutl` spends one D' cell to combine its middle position with
  the incoming prefix and recurses on both halves. Fan-out stays bounded and `H-2`
  levels are added (for 16 bits: 4 + 2 levels).
* A multiplexer on `C/L` picks either `(i, mask)` from `incmg` (C/L = 0) or
  `(propagate, carry)` from the adder (C/L = 1), and one XOR per bit forms the result `y`.
  The adder buses are `2**(H-1)` wide and are padded to `2**H`: the propagate `A_k^B_k`
  with zeros, the carry shifted up one place with 0 carried into bit 0. So
  `y = A + B` with the carry out in `y[2**(H-1)]`.

Control word `mf_ctrl_t` = `{add, f, inv, cl}`:

| add f inv cl | function | outputs |
|---|---|---|
| 0 x x x | the eight modes of the table above | `p`, `e` |
| 0 1 1 0 | increment `i` | `y = i+1`, `e = 0` on overflow |
| 0 1 0 0 | decrement `i` | `y = i-1`, `e = 0` on underflow |
| 1 0 0 1 | add `A` (odd bits) and `B` (even bits) | `y = A+B` |

Other codes with `add=1` are not meaningful. In the detection and comparison modes `y`
carries no meaning.

Logic depth (gate stages, roughly): detection/comparison `H+1`; inc/dec `H+1` plus
`H-1` in the mask generator and one XOR; addition `H` (up-sweep) plus `H-2` (down-sweep)
plus one XOR.

## Files and hierarchy

```
arith_mf_top           all circuits side by side, each with its own ports
├─ mf4_unit            four-way multifunction circuit (main design), H=5
│  ├─ mf1              recursive shared tree ── mf1_fb (foundation)
│  ├─ incmg            inc/dec mask generator
│  └─ bkutr            Brent–Kung down-sweep ── bkutl
├─ ldd                 leading-one detector, H=4 (16 bits)
├─ cmp                 comparator, H=4 (8-bit operands)
├─ clddg               generalized comparator / LDD, H=4 ── clddg_fb
├─ incdec              incrementer/decrementer, H=4 ── clddg, incpp ── incmg
└─ cg                  Sklansky carry generator, H=5 (16 bits)
arith_pkg              mf_ctrl_t, gp_t and the D' operator
```

The recursive modules instantiate themselves with `H-1` inside a generate `if`; the
recursion ends at `H=1` (one bit pair). Every size parameter can be changed; `H` of
`mf4_unit` must be at least 2.

## Simulation

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`), comparing against
reference models in `tb/tb_ref_pkg.sv` written from plain arithmetic (bit scans, `+`,
`-`, `<`). Most are exhaustive at their default size. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/arith_pkg.sv tb/tb_ref_pkg.sv tb/tb_arith_mf_top.sv --top-module tb_arith_mf_top
./obj_dir/Vtb_arith_mf_top
```

`tb_arith_mf_top` runs the whole design at its default sizes. It checks every function
and counts how often each event happens: each of the eight modes, equal operands,
nothing found, increment, decrement, overflow, underflow, addition with carry out, and a
carry rippling over the full width. Any event that never occurred counts as a failure.

Verilator's lint, run on one of the self-instantiating modules as its own top, reports
the sub-tree nets as undriven. It does not elaborate the child copies in that case. The
warning does not appear when the module is instantiated from a parent.

## Where this implementation makes its own choices

* **Flip mode.** The source circuit selects, with F, which subtree's E drives a level's
  multiplexers. Here the lower subtree's E is complemented. As a result `p` is the true
  index of the trailing digit, which is what the mask generator needs. The foundation's
  position output in flip mode is the complement of the even bit.
* **Which position bit shares the top generate multiplexer.** Worked through the
  recursion, it is `P0`. The other position bits have their own multiplexers in `mf1`.
* **Adder sum.** The final XOR needs the bitwise propagate `A_k ^ B_k`. It is taken
  directly from the operand bits, and the two adder buses are padded as described above.
  There is no carry input.
* **Overflow.** On overflow, increment and decrement wrap around. The source only says
  the operation is impossible then.
* **Sizes.** The stand-alone circuits default to the sizes of the worked examples: a
  16-bit detector, an 8-bit comparator and a 16-bit carry generator. The multifunction
  circuit's width is not specified. `H=5` is used so that its adder is 16 bits, the size
  of the Brent–Kung example.

## Not included

* The alternative mask-generator structure. It gates the position bits before the
  sub-generators instead of gating the sub-masks. It computes the same mask; only the
  recursive AND/OR form is built.
* Switching off unused parts of the multifunction circuit to save power. It is mentioned
  as a benefit, but no mechanism is described.
* Timing and area. Only gate-level depth arguments are given above; nothing was
  characterised on a cell library.
