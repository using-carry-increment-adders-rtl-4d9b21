# Spanning-tree adder with carry-increment branches

A 64-bit combinational adder meant to use less power and area than a
carry-select spanning-tree adder, at a similar delay. The adder is built as a
*spanning tree*: the operands are cut into 8-bit branches, and each branch
works out its own carries with a short lookahead. The only signal passed
between branches is one carry-out, and it only flows forward. Inside each
branch the sum bits are not chosen between two precomputed results, as a
carry-select adder does. Instead they are formed once with a carry-in of 0
and then *incremented* by the carry the lookahead delivers. This is carry
increment. It needs one set of small adders per bit pair instead of two, plus
a multiplexer, which is where the savings come from.

```
 a[63:0], b[63:0], cin
   |
   +-- branch 0 (bits 7:0)   --c8-->  branch 1 (15:8) --c16--> ... --c56--> branch 7 (63:56) --c64--> cout
```

Ports of the top module `st_ci_adder64`:

| port      | dir | width     | meaning                                              |
|-----------|-----|-----------|------------------------------------------------------|
| `a`, `b`  | in  | WIDTH     | operands                                             |
| `cin`     | in  | 1         | carry-in                                             |
| `sum`     | out | WIDTH     | `(a + b + cin) mod 2^WIDTH`                          |
| `cout`    | out | 1         | carry out of the top bit (c64)                       |
| `carries` | out | WIDTH/2   | `carries[i]` is the carry into bit `2i+2`: c2, c4, ..., c64 |

The adder is purely combinational. It has no clock, registers or reset, and
its result is valid one propagation delay after the inputs settle. `WIDTH`
defaults to 64 and may be any positive multiple of 8. Each extra 8 bits adds
one more branch to the chain.

## Notation

For each bit, *generate* is `g = a & b` and *propagate* is `p = a | b`. For a
range of bits `i:j`, `g(i:j)` says the range produces a carry on its own, and
`p(i:j)` says it passes on an incoming carry. Two adjacent ranges merge as

```
g(i:j) = g(i:k+1) | p(i:k+1) & g(k:j)
p(i:j) = p(i:k+1) & p(k:j)
```

The carry into bit `k+1` of a branch with carry-in `cin` is then
`c(k+1) = g(k:0) | p(k:0) & cin`. Propagate is the inclusive OR. That is
enough for carries, because a bit that generates also "propagates" without
changing the result. The sum path uses XOR on its own.

## Inside one 8-bit branch (`st_ci_branch8`)

A branch has two halves that start together from `a` and `b`.

**Lookahead half: carries c2, c4, c6, c8.**

1. `pg_group2`, four times: the bitwise g/p of each bit pair, merged at once
   into a 2-bit group: (1:0), (3:2), (5:4), (7:6). This is plain static logic.
2. `manchester_chain4`: one Manchester carry chain per branch. It turns the
   2-bit groups into *full* groups that start at bit 0:
   `(3:0) = (3:2)∘(1:0)`, `(5:0) = (5:4)∘(3:0)`, `(7:0) = (7:6)∘(5:0)`.
   The chain is made of three `manchester_cell`s in series and only works
   forward. The group (1:0) is already a full group, so it skips the chain.
3. `carry_gen`: `c2, c4, c6, c8 = g(full) | p(full) & cin`. Here c8 is the
   branch carry-out and becomes the next branch's `cin`.

**Sum half: intermediate sums, then increment.**

4. `rca2`, four times: a 2-bit ripple-carry adder on each bit pair with its
   carry-in tied to 0. It gives the intermediate sum `s0 = (a + b) mod 4`. Its
   carry-out is deliberately not formed. The lookahead already counts it, so
   adding it again would count that carry twice.
5. `ha_incr2`, four times: two chained half adders that add the pair's
   incoming carry (`cin`, c2, c4 or c6) to `s0`. This gives
   `s[0] = s0[0] ^ c` and `s[1] = s0[1] ^ (s0[0] & c)`. The carry out of the
   second half adder is dropped, because the lookahead has already produced
   the next carry.

So the lookahead forms a carry only at every second bit. The carry at the odd
bit in between comes from the first half adder of the incrementer. That is
the point of using 2-bit pairs: the incrementer stays one half adder deep per
bit, and the lookahead needs only four outputs per branch.

### A worked pair

Take bits 3:2 with `a = 11`, `b = 01`, and carry into bit 2 equal to `c2 = 1`.

- `rca2` gives `s0 = (3 + 1) mod 4 = 00`. Its overflow is discarded.
- The lookahead sees `g(3:2) = 1` and sets `c4 = 1` by itself.
- `ha_incr2` gives `s = 00 + 1 = 01`.

The pair's total, `3 + 1 + 1 = 5 = 1·4 + 01`, matches sum bits `01` with a
carry of 1 into bit 4.

## Between branches

The branch carry-outs form the spanning tree's forward carry path:

```
c8  = g(7:0)   | p(7:0)   & cin
c16 = g(15:8)  | p(15:8)  & c8
...
c64 = g(63:56) | p(63:56) & c56
```

Every branch forms its full groups from its own operand bits. That work runs
in parallel with the other branches. An incoming carry then reaches each
carry output through a single AND-OR. The critical path runs from `cin`, or
from the lowest branch's groups, through one AND-OR per branch to c64, and
then through the top branch's incrementer.

## How far this RTL matches the described design

These parts follow the design as described:

- eight 8-bit branches linked only by c8 ... c56;
- four 2-bit carry-increment pairs per branch;
- static 2-bit grouping;
- one four-group Manchester chain per branch, with c2 taken straight from
  the (1:0) group;
- 2-bit ripple adders with the carry-in at 0 and no carry-out;
- 2-bit half-adder incrementers whose final carry is dropped.

These are the design's own choices:

- **Circuit style.** The described branch builds its Manchester chain from
  pass-transistor logic. RTL can only give the chain's logic function. Each
  `manchester_cell` is written as the g/p merge, and the circuit style is
  left to the synthesis library or a custom cell. The module structure
  (one chain per branch, three cells in series) is kept, so such a cell can
  be swapped in.
- **`carries` output.** The every-other-bit carries that the tree forms
  anyway are brought out on `carries` (and on `c` of each branch). They are
  offered for other logic that needs them.
- **g/p bundles.** Generate and propagate travel together as the struct
  `pg_t` of `st_ci_pkg`.
- **Width.** `WIDTH` is a parameter, with the described 64 as default.

The design's reported implementation results are not reproduced here. They
depend on the standard-cell library. For a 45 nm SOI library optimised for
minimum delay, the reported figures are:

- 1099 cells;
- about 1601 µm² of area;
- about 146 ps delay;
- about 0.84 mW of power.

That is about 7 % slower than a carry-select spanning-tree adder synthesised
the same way, with 16 % less power and 19 % less area. Generic synthesis of
this RTL gives about 550 word-level cells for the 64-bit top. That number is
not comparable with the figures above.

## Files

| file                     | content                                             |
|--------------------------|-----------------------------------------------------|
| `rtl/st_ci_pkg.sv`       | `pg_t`, `pg_merge`, branch width constants          |
| `rtl/pg_group2.sv`       | bitwise g/p and 2-bit grouping                      |
| `rtl/manchester_cell.sv` | one forward g/p merge cell                          |
| `rtl/manchester_chain4.sv` | chain of three cells, full groups of a branch     |
| `rtl/carry_gen.sv`       | c2, c4, c6, c8 from full groups and `cin`           |
| `rtl/rca2.sv`            | 2-bit ripple adder, carry-in 0                      |
| `rtl/ha_incr2.sv`        | 2-bit half-adder incrementer                        |
| `rtl/st_ci_branch8.sv`   | one 8-bit branch                                    |
| `rtl/st_ci_adder64.sv`   | top: WIDTH/8 branches in a forward carry chain      |
| `tb/*_tb.sv`             | one self-checking testbench per module above        |

## Verification

Every testbench compares the module with a reference computed separately,
usually plain integer addition. At the end it prints
`TB_RESULT checks=N failures=M`. A watchdog ends the run with a failure if
it hangs.

- `pg_group2`, `rca2` and `ha_incr2` are checked over every input.
  `manchester_chain4` (256 vectors) and `carry_gen` (512 vectors) are too.
- `st_ci_branch8` is checked over all 2^17 combinations of `a`, `b` and
  `cin`. Each check covers the sum and each of c2, c4, c6, c8.
- `st_ci_adder64_tb` runs the 64-bit top at its default size. It checks
  directed corner cases and 200,000 random vectors. The random vectors come
  in three kinds: uniform operands, `b` close to `~a` for long propagate
  runs across branches, and sparse operands.
  - Each vector checks the sum, `cout` and all 32 `carries` against 65-bit
    arithmetic.
  - The testbench counts, from the operands alone, how often each mechanism
    was exercised. It fails if any count is zero. The mechanisms are:
    - a branch generating its own carry-out;
    - a branch passing an incoming carry through all 8 bits;
    - `cin` rippling through all 64 bits;
    - an incrementer receiving a carry;
    - an incrementer wrapping from 3;
    - a discarded ripple-adder overflow;
    - carry-out set.

All testbenches pass. Each one was also run against a copy of its module
with one deliberate bug, such as a dropped propagate term or a carry taken
from the wrong pair, and each copy failed.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/st_ci_pkg.sv \
    tb/st_ci_adder64_tb.sv --top-module st_ci_adder64_tb -o sim
./obj_dir/sim
```

Replace `st_ci_adder64` with any other module name to run its testbench. The
full 64-bit test finishes in well under a second. To try another width, set
`WIDTH` on `st_ci_adder64`, using a multiple of 8. The top testbench is
written for 64 bits, so change its `W` and its 64-bit random helper to match.
