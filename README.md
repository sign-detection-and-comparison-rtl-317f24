# Low-transition sign detection and comparison networks

Deciding the sign of a sum x + y of two two's-complement fractions, or
comparing two numbers by the sign of their difference, is a one-bit result
that in practice depends almost only on the top few bits. The carry out of the
fraction, c0, is decided by the *most significant* carry-propagate run. With
uniformly random operands that run is one bit long on average. A ripple-carry
or carry-lookahead network still computes every carry in the word, and in
static CMOS every changed carry costs switching energy, including the glitches
a ripple chain makes. The networks in this repository compute only the part of
the carry logic that can matter. They inhibit the rest, so the number of
switching gates per operation stays small: a constant for the iterative
network, and roughly `k + n/2^(k-1)` gate-pair transitions for a tree of
k-input modules.

Notation used throughout:

* `x = x0.x1 x2 ... xn`, `y = y0.y1 ... yn`, so that `x = -x0 + sum x_i 2^-i`.
* `p_i = x_i xor y_i` (propagate), `g_i = x_i y_i` (generate).
* `sign(x + y) = x0 xor y0 xor c0`, where c0 is the carry out of bit 1.
* In the RTL the fraction bits are a descending vector `x_frac[N-1:0]`. Bit
  x1 (weight 1/2) is `x_frac[N-1]`, and x_i is `x_frac[N-i]`. Bits are grouped
  into k-bit "bytes". Byte 1 is the most significant one, `x_frac[N-1 -: K]`.

## The three networks

`sd_top` places the three networks side by side. Each has its own operand
ports (`it_*`, `tr_*`, `sm_*`). They compute the same function, so they are
alternatives and are not connected to each other.

| network | module | default size | delay | switching (uniform operands) |
|---|---|---|---|---|
| iterative with chain signal | `sd_iter_lt` | N = 53 | ~N gate pairs | ~4.5 gate transitions, independent of N |
| tree with leftmost-group inhibit | `sd_tree_lt` | N = 64, K = 4 | 2 pg/PG levels + log_K tree | ~`(7/8 + (3+2^(1-K))/(2K)) (K + 2^(1-K) N)` |
| tree for small operands | `sd_small_cmp` | N = 64, K = 4 | as above | as above, also when the top bytes are zero |

### Iterative network: follow only the top chain (`sd_iter_lt`)

A chain signal h runs from the MSB downwards. It is not a carry:

```
h_0 = 1 (input h0)
h_i = h_{i-1} x_i y_i' + h_{i-1} x_i' y_i      h_i = 1: bits 1..i all propagate
q_1 = x_1 y_1,   q_i = h_{i-1} x_i y_i          the bit where the top run ends
c0  = q_1 + q_2 + ... + q_n                      at most one q is 1
```

The chain stops at the first bit that does not propagate. That bit decides c0
(its g), and every h and q below it stays at 0. The work is proportional to
the length m of the top run, which is 1 on average (P(m) = 2^-(m+1)).

The chain has to be *cleared* between operations. If an h were left at 1 from
the previous operand, the new operand would ripple through it. The `h0` input
does this: drive it to 1 to operate and to 0 for a clear step. Every h then
falls to 0. The clear step switches about as many gates as the operation did.
Counting the two gates of each h_i (the active AND term and the OR), an
operation plus its clear costs about 4.5 transitions for any N.
`tb_transitions` measures about 4.7 at both N = 53 and N = 16 (zero-delay
count).
The module keeps no state: sequencing operate and clear steps is up to the
user.

### Tree network: inhibit everything below a non-propagating top group (`sd_tree_lt`)

The fraction is split into M = N/K groups. Each group has a `pg_gen` (bit p,
g) and a `pg_node`. The `pg_node` is the k-input carry-lookahead module:

```
P = P_1 P_2 ... P_k
G = G_1 + P_1 G_2 + ... + P_1 ... P_{k-1} G_k     (pair 1 most significant)
```

A `pg_tree` of such modules (root: `g_node`, G only) reduces the group pairs
to the carry out.

The leftmost group is always active and gives (P_l, G_l). If P_l = 0, the
carry is decided inside that group, so c0 = G_l. P_l is therefore the enable
of every other group's `pg_gen`. While it is 0, those groups hold p = g = 0
and the tree below them keeps still. The result is

```
c0 = P_l' G_l + P_l G        (G: carry out of groups 2..M from the tree)
```

P_l = 1 has probability 2^-K, so with K = 4 the rest of the network switches
in about 1 operation out of 16. `tb_sd_tree_lt` measures 0.063.
`tb_transitions` measures 9.3 settled p/g transitions per operation, against
56 for the same bits without the inhibit. The price in delay is one more pg/PG
level in series before the rest of the tree can start.

### Comparing small numbers: control register R (`sd_small_cmp`)

When the operands of a run of comparisons are small integers, their top bytes
are zero. In x - y those bytes all propagate (x byte 0000, -y byte 1111). The
leftmost group then always has P = 1, and the plain tree inhibits nothing. The
fix is to move the always-active group down to the first byte that can be
nonzero.

* `r_register` holds **R**, one bit per byte. R_i = 1 promises that byte i of
  both compared numbers is zero. R must be a run of ones from byte 1 (an
  assertion checks every load). It is loaded, rarely, when the size of the
  numbers in a sequence is known. Reset clears R to 0, which is the plain tree.
* For each byte, `small_enable` forms (with R_0 = 1):

  ```
  first live byte j:  R_{j-1} R_j' = 1
  Q_i  = P_i R_{i-1} R_i'                    the live byte propagates
  E_i  = R_{i-1} R_i' + Q_1 + ... + Q_{i-1}  enable of byte i's pg_gen
  P*_i = P_i + R_i                           a known-zero byte acts as a propagate
  ```

  The OR of the Q's is handed from byte to byte, so no cell depends on a byte
  below it and there is no combinational loop.
* Byte 1 gives P_l = P*_1 and G_l = G_1. Bytes 2..M feed (P*, G) into a
  `pg_tree`, and c0 and the sign are formed as in the tree network.

So normally one byte switches: the most significant live one. The bytes below
it switch only when that byte propagates.

**To compare a with b**, apply x = a and y = -b (two's complement, N+1 bits
with the sign in `y0`). Then `sign = 1` means a < b. The network adds the two
operands it is given and does not form -b itself. A worked case at N = 16,
K = 4:

```
R  = 1 1 0 0      a = 0.0000 0000 0011 1011   -b = 1.1111 1111 1101 1001
E  = 0 0 1 0      P* = 1 1 0 0   G = 0 0 1 0   P_l = 1, G = 1 -> c0 = 1, sign 0 (a > b)
```

## Module map

```
sd_top
├── sd_iter_lt                       iterative network (no submodules)
├── sd_tree_lt
│   ├── pg_gen, pg_node  (leftmost group, always enabled)
│   ├── pg_gen, pg_node  x (M-1)     enabled by P_l
│   └── pg_tree ── pg_node ... g_node
└── sd_small_cmp
    ├── r_register                   control register R (only clocked part)
    ├── small_enable, pg_gen, pg_node  x M
    └── pg_tree
sd_pkg: pair type, tree-size functions (ceil_div, tree_levels, level_width)
```

`pg_tree` works for any number of groups. Each level takes the pairs K at a
time from the most significant end. A module with missing inputs is padded at
the bottom with (P, G) = (1, 0), which leaves G unchanged. For 15 groups and
K = 4 this gives levels of 4 and then 1 module.

## Timing and interface conventions

* All three datapaths are combinational from operands to `sign` and `c0`.
  There are no pipeline registers and no handshake. The only flip-flops are
  the M bits of R, loaded on the rising `clk` edge when `sm_r_load` is 1.
  `rst_n` resets R asynchronously.
* Extra outputs let a user or a testbench see the inhibit at work: `tr_p_l`
  and `sm_p_l` (is the rest of the tree active?), and `sm_e` (the byte
  enables, byte 1 at the MSB) and `sm_r`.
* N must be a multiple of K (checked by an assertion). `sd_small_cmp` needs
  at least two bytes.
* Assertions state the invariants the schemes rely on. In the iterative
  network at most one q_i is 1, so a wired OR is enough. In the trees an
  inhibited group presents P = G = 0. In R, every loaded value is a prefix
  of ones.

## What follows the underlying design and what is added here

Taken from the design: the equations for h, q, c0, P, G, Q, E and P*; the gate
structure of the iterative cell (two AND terms and an OR per h, an AND per q);
the tree organisation; the leftmost-group inhibit and the c0 selection; the
meaning of R; and the default sizes (53 bits iterative, 64 bits in groups of
4 for the trees, 4-bit bytes for the comparison).

Choices made here, where the design leaves the point open:

* An inhibited `pg_gen` outputs p = g = 0 (both outputs are ANDed with the
  enable).
* The clear of the iterative chain is done through the `h0` input. Its
  drawing ties h_0 to 1.
* In the iterative network, q_i is gated by h_{i-1}. A shorthand
  `q_i = g_i h_i` that also appears for this network cannot be right, since
  p_i g_i = 0 makes it always 0. The algorithm's own form is used.
* The low-transition tree covers groups 2..M only. The leftmost group's pair
  enters only through the final selection.
* Tree padding for sizes that are not powers of K. Generate-only root.
* R: a load-enabled register with reset to 0 and a prefix-of-ones check.
* The Q terms are chained byte to byte instead of drawn as a bus. This gives
  the same function.
* The default size of the small-operand network (64 bits) is chosen to match
  the tree network.
* Negating the subtrahend for comparisons is left outside the network.

Not built: the conventional ripple-carry and non-inhibited tree networks.
They are only the reference point the low-transition networks improve on.
The testbenches compute their results arithmetically instead. Other
applications of the same idea, such as the sign of a signed-digit number,
leading-one detection and pattern detection, are only named by the design,
without a network, and are not built.

The switching figures are properties of a gate-level implementation with
real delays. RTL simulation cannot show glitches. `tb_transitions` counts
settled-value changes only, which confirms the scaling (constant for the
iterative network, a small fraction of the bits for the tree) but not the
exact glitch counts. Whether synthesis keeps the inhibit structure (it may
restructure the AND-gated p/g logic) needs checking on the netlist.

## Testbenches

Each file in `tb/` is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pg_gen` | p/g per bit vs half-adder truth table, inhibit forces 0 (K = 4, 1) |
| `tb_pg_node` | all 256 inputs at K = 4 and K = 2 vs a carry-chain scan |
| `tb_pg_tree` | 15, 16, 7 (K = 2) and 1 groups, propagate-heavy random pairs |
| `tb_small_enable` | full truth table of the per-byte enable cell |
| `tb_r_register` | reset value, load, hold |
| `tb_sd_iter_lt` | worked example (run of 4 ended by a generate), sign vs integer sum, h chain vs top run length, clear, mean run ≈ 1 |
| `tb_sd_tree_lt` | sign, P_l, inhibit of groups 2..M whenever P_l = 0, activity ≈ 1/16, depth of log_K N + 1 PG levels |
| `tb_sd_small_cmp` | worked example above; 10 000 small-integer comparisons over random R; enables vs rule; inhibited bytes; R = 0 uniform operands |
| `tb_sd_top` | all three networks at default sizes, with every mechanism counted (chain clear, long chain, tree inhibit/active, R reload, bytes disabled by R, Q enable, both comparison outcomes) |
| `tb_transitions` | settled switching per operation: iterative ≈ 4.5 at N = 53 and 16; tree p/g switching at least 3x below the non-inhibited count |

To run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/sd_pkg.sv tb/tb_sd_top.sv --top-module tb_sd_top -o sim
./obj_dir/sim
```

Each testbench finishes in seconds. `tb_sd_top` runs the top at its default
parameters.
