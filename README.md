# Segmented parallel prefix with shortcuts

A *segmented prefix* computation takes values `x[0..N-1]` and segment bits
`s[0..N-1]` and produces, for every position `i`,

    y[i] = x[k] ⊗ x[k+1] ⊗ ... ⊗ x[i]      k = last position <= i with s[k] = 1

for an associative operator `⊗`. With addition:

    x = 12  4  7  3 | 2  1 | 5 | 4  4 | 1  1 | 1  1 | 1  1 | 1
    y = 12 16 23 26 | 2  3 | 5 | 4  8 | 1  2 | 1  2 | 1  2 | 1

Carry look-ahead is an example. A segment starts at every bit where the two
operands agree, and the carry inside a segment is decided at its first bit.
Much of the scheduling logic of an out-of-order processor can be written the
same way.

The usual circuit is a binary tree, with `O(log N)` operator delays and, laid
out as an H-tree, `O(sqrt N)` wire delay. That is the worst case, and it is
also what every output pays when its segment happens to straddle a large
subtree boundary. Two leaves can sit next to each other in the input order
but under different halves of the tree. The value between them then travels
up to the root and back down, even though the segment is two elements long.

This design adds **shortcuts** to the tree. Take any two subtrees of the same
height that are neighbours in input order but have different parents. The
root of the left one gets a wire to the root of the right one. If the left
subtree holds a segment start, the right subtree takes its value over this
wire instead of waiting for it to come down from the common ancestor. The
results do not change; only the path that carries them does. A segment of
length `S` is then finished by a data path that climbs only about `log2 S`
levels, however it is aligned to the tree. With a suitable layout, that path
also covers only `O(sqrt S)` distance. For random additions the longest carry
segment is about `log2 N`, so most additions would settle after
`O(log log N)` operator delays.

The RTL is purely combinational. It gives the same results as any correct
segmented-prefix circuit. Its speed advantage is in which gates a result
passes through, and the testbenches observe that directly (see
"Verification").

## Signals in the tree

Every tree edge carries three signals:

| signal   | direction   | meaning |
|----------|-------------|---------|
| `up_val` | to the root | `⊗` of the subtree's inputs from its last segment start to its end, or of all its inputs if it has no start |
| `up_seg` | to the root | some segment bit inside the subtree is 1 |
| `dn_val` | to the leaves | `⊗` of the segment part that ends just before the subtree's first leaf, which is `y` of the position just before it |

An internal node (`prefix_node`) has two MUXs, two operators and an OR gate:

    up_val = r_seg ? r_val : l_val ⊗ r_val
    up_seg = l_seg | r_seg
    l_dn   = in
    r_dn   = l_seg ? l_val : in ⊗ l_val

Here `in` is normally the parent's `dn_val`. A leaf (`prefix_leaf`) sends
`x[i]` and `s[i]` up. It receives `y[i-1]` and finishes with one more MUX and
operator, the same cell as in the simple linear ripple chain:

    y[i] = s[i] ? x[i] : y[i-1] ⊗ x[i]

The root is given the all-zero word as the value "before position 0". Zero is
the identity of addition. `s[0]` should therefore be 1. If it is 0, the
leading positions are summed from position 0.

## Shortcuts

The tree is numbered like a heap: node 1 is the root, node `h` has children
`2h` and `2h+1`, and leaf `i` is node `N+i`. All nodes of one depth are
consecutive numbers in left-to-right order. So the same-depth left neighbour
of node `h` is node `h-1`, unless `h` is a power of two (leftmost at its
depth).

The neighbours `h-1` and `h` share a parent exactly when `h` is odd. So every
internal node with an even number that is not a power of two gets a shortcut
from node `h-1` (`segprefix_pkg::has_shortcut`). It carries that node's
`up_val` and `up_seg`. An extra MUX inside the node (`HAS_SHORTCUT = 1`)
chooses the incoming value:

    in = sc_seg ? sc_val : p_in

This is correct because of what the signals mean. `p_in` is `y` of the
position just before the subtree. When the left neighbour holds a segment
start, its `up_val` is that same `y`, computed entirely inside the neighbour.

For 64 leaves, 26 of the 63 nodes have a shortcut. By default leaves get
none. A pair of leaves with different parents is then served by the shortcut
between their parent nodes, one level up, which costs one extra level.
`LEAF_SHORTCUTS = 1` applies the same rule at the finest level. Leaf `2m`
gets a MUX (`prefix_leaf`, `HAS_SHORTCUT = 1`) that takes `x[2m-1]`
directly when `s[2m-1]` is set.

How a value reaches output `j`: walk up from leaf `j`. Stop at the first level
where the subtree immediately to the left of `j`'s ancestor holds a segment
start. That subtree is either the ancestor's sibling or, through a shortcut,
its cousin. The value then comes down from that subtree's root. If the
segment starts at `k`, the level reached is at most `floor(log2(j-k)) + 1`.
With leaf shortcuts the bound is 0 for `j-k = 1` and `floor(log2(j-k-1)) + 1`
otherwise. In a tree without shortcuts the level can be the full tree height
even for `j-k = 1`.

## Cyclic variant

With `CYCLIC = 1` the inputs form a ring. Positions before the first segment
start continue the segment that starts last in the input and runs past
position `N-1`. The root feeds its own `up_val` back in as its `dn_val`
whenever `up_seg` is set. This is not a combinational loop, because upward
values depend only on `x` and `s`. The leftmost node of each depth, below the
root's children, gets a wrap-around shortcut from the rightmost node of that
depth (node `2h-1`). With leaf shortcuts, leaf 0 also gets one from leaf
`N-1`. With no segment bit set, the variant falls back to
summing from position 0. The default is the linear (non-cyclic) circuit.

## Files

| file | contents |
|------|----------|
| `rtl/segprefix_pkg.sv`  | default sizes (`N = 64`, `W = 32`), shortcut placement functions |
| `rtl/prefix_op.sv`      | the operator `⊗`: addition modulo 2^W, plain or carry-save |
| `rtl/prefix_leaf.sv`    | leaf cell, with or without the leaf shortcut MUX |
| `rtl/prefix_node.sv`    | internal node, with or without the shortcut MUX |
| `rtl/segprefix_tree.sv` | top: N leaves, N-1 nodes, shortcuts; parameters `N`, `W`, `CYCLIC`, `LEAF_SHORTCUTS`, `CARRY_SAVE` |

Top-level ports of `segprefix_tree`: `x[N]` (W bits each), `s` (N bits), and
the outputs `y[N]`, `root_val` and `root_seg`. `root_val` and `root_seg` are
the root's upward signals: the value of the input's last segment part, and
whether any segment bit is set. There is no clock. `N` must be a power of two
(an assertion at simulation start checks this).

## Changing the operator

The tree uses `⊗` only through `prefix_op` (ports `a`, `b` → `y = a ⊗ b`,
where `a` holds the earlier positions). Any associative operator can replace
the adder. The identity fed to the root is the all-zero word (in
`segprefix_tree`), so change it too if zero is not the new operator's
identity.

With a plain adder, each operator has its own carry chain. `CARRY_SAVE = 1`
(on `segprefix_tree`, passed down to every node, leaf and operator) keeps
each operator to a constant number of gate levels. Values then travel as a
pair of W-bit words, sum and carry, whose value is their sum. `⊗` becomes a
4:2 compressor, made of two rows of full adders with no carry propagation.
An input enters with a zero carry word. Each output, and `root_val`, is
resolved by one ordinary W-bit adder at the edge of the tree. The tree
doubles in width, and the results are identical to the default.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_prefix_op`           | corner and random sums against a wider reference, for both the plain and the carry-save form |
| `tb_prefix_leaf`         | leaf output, shortcut MUX and pass-through for random inputs |
| `tb_prefix_node`         | node equations with and without the shortcut MUX |
| `tb_segprefix_tree`      | default size (64 × 32 bits). Runs the worked example above, all-starts, a single segment, `s[0]` clear, and 4000 random segmentations against a sequential reference. Counts shortcut selections, segments crossing the middle, and segment starts and joins. Each must occur. |
| `tb_segprefix_carrysave` | the same vectors and checks as `tb_segprefix_tree`, on a tree built with `CARRY_SAVE = 1` |
| `tb_segprefix_example16` | the worked example on a 16-leaf tree. Checks that `y[8]`, whose pair 8-9 follows pair 6-7 across a half boundary, is served by the shortcut rather than by the root. |
| `tb_segprefix_locality`  | default size. For every output it follows the data path, using the tree's own segment flags and shortcut-MUX selects, and checks the height bound `floor(log2(j-k))+1`. A second tree, built with leaf shortcuts, is checked against its tighter bound. It also runs 2000 random 64-bit additions as carry look-ahead and checks the sums. |
| `tb_segprefix_cyclic`    | the wrap-around variant, with and without leaf shortcuts, against a ring reference |

Results from `tb_segprefix_locality`:

- In the random additions, the longest carry segment averages 6.3 bits.
- The highest path reached is level 4 of 6 with shortcuts and level 5 without.
- Over the random segmentations, a tree without shortcuts would break the
  height bound for about 37,000 outputs.

To run a testbench with Verilator 5, from the folder holding `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/segprefix_pkg.sv \
        tb/tb_segprefix_tree.sv --top-module tb_segprefix_tree -Mdir obj -o sim
    obj/sim

Each testbench runs in well under a second.

## What is not in the RTL

- **Layout.** The delay claim rests on a special H-tree placement. There are
  two recursive square layouts, "inner" and "outer", which keep consecutive
  leaves physically close. Channels are widened for the shortcut wires, which
  keeps the side length `O(sqrt N)`. Placement has no logic function and
  nothing in these files constrains it. A netlist from this RTL has the
  shortcut connectivity, but gets the wire-length benefit only if it is placed
  that way.
- **Timing scheme.** The outputs of short segments settle early, but a
  globally clocked design must still wait for the worst case. Gaining from
  early settling needs self-timed completion detection, which is not
  designed here.
- **Gate-level delay.** Verilator has no gate delays. Locality is checked as
  path height in the tree, not as time.

## Design choices to be aware of

- The value width `W = 32` is a choice of this design. The operator is
  addition modulo 2^W, as in the worked example. The construction works for
  any width and any associative operator.
- In carry-save form every output passes through one carry-propagate adder
  after the tree. The operators inside the tree are constant-depth, but that
  final adder is not.
- The last MUX and operator of each output sit in its leaf, and the tree
  delivers `y[i-1]`. Having the tree deliver `y[i]` directly would be an
  equivalent arrangement.
- Leaf-to-leaf shortcuts are off by default (see "Shortcuts"). The drawn
  64-leaf layout has shortcuts only between internal nodes, while the
  distance argument for the bound assumes neighbouring leaves are linked
  too. `LEAF_SHORTCUTS = 1` gives the second reading.
- The shortcut MUX selects on the left neighbour's upward segment flag.
- The cyclic variant's logic (the root feedback and the wrap-around
  shortcuts) is this design's reading of a layout property, not a given
  circuit.
- `sc_taken` in each node is the select of its shortcut MUX. The tree reads it
  only to expose it to testbenches, so lint reports it unused there.
