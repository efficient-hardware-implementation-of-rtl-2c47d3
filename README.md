# LEDAkem Q-decoder in SystemVerilog

LEDAcrypt's key encapsulation (LEDAkem) is a code-based, post-quantum
scheme. Decryption is the expensive part: it has to find a sparse error
vector `e` (a few hundred ones among tens of thousands of bits) from a
ciphertext. The secret key is a quasi-cyclic low-density parity-check code
given as the product `L = H·Q` of two very sparse block-circulant matrices.
The decoder is a bit-flipping decoder that exploits this structure, the
*Q-decoder*. It never builds `L` as a dense matrix. It works on dense
vectors `p` bits long, word by word, and on the sparse matrices as short
lists of one-positions.

This repository is a synthesizable, parameterised RTL implementation of that
decoder. It contains the syndrome computation and the full iteration loop:
counters, threshold, flipping and syndrome update. Every unit takes a fixed,
known number of clock cycles, so the total decoding time follows from the
code parameters and the number of flips. The testbenches check this cycle
by cycle.

Default configuration (the 128-bit security instance with two blocks):

| parameter | default | meaning |
|---|---|---|
| `P` | 14939 | circulant size p (prime) |
| `N0` | 2 | number of circulant blocks n0 (up to 4) |
| `DH` | 11 | weight d_H of each block of H |
| `WQ` | '{4, 3, 0, 0} | first row of the Q weight matrix; m = sum = 7 |
| `NB` | 32 | word size n_b (power of two, 8 .. 256) |
| `ITMAX` | 10 | iteration limit |
| `VMAX` | 256 | flip positions kept per block and iteration |
| `NLUT` | 8 | entries of the threshold table |
| `VER` | 2 | decoder version: 2 allows the dense syndrome update at `NB ≥ 64`, 1 never uses it |

The code parameters come from the LEDAkem parameter sets. The others are
implementation choices. `ITMAX`, `VMAX` and `NLUT` in particular are choices
of this design, not values specified elsewhere.

## The algorithm as built

With `h = ceil(p/n_b)` words per vector, the decoder runs:

```
syndrome:   for i in 0..n0-1:  t   = Q_{i,n0-1} · x          (binary)
                               s  ^= H_i · t                 (binary)
loop:       w = weight(s)
            if w == 0: success                    if It == ITMAX: failure
            b = threshold(w)                 (table lookup)
            for i:      sigma_i  = s ⋆ H_i^T                 (integer)
            for j, i:   rho_j   += sigma_i ⋆ Q_{i,j}^T       (integer)
            for j:      F_j = { k : rho_j[k] > b };  e_j ^= F_j
                        if |F_j| > VMAX: failure (overflow)
            for j:      s ^= L_j · F_j                       (sparse × sparse)
            It = It + 1
```

Here `x` is the ciphertext, so `s = L_{n0-1}·x`. `rho` is the vector of
unsatisfied-parity-check counters, computed in two sparse steps:
`rho = (s ⋆ H) ⋆ Q`. This replaces one product with the `m·d_H`-weight
matrix `L` by two products with weights `d_H` and `m`. The syndrome update
applies only the positions flipped in this iteration, using
`L_j = Σ_i H_i Q_{i,j}` (weight `m·d_H`, no cancellations). That gives the
same syndrome as recomputing it from scratch.

The threshold table holds pairs `(w_i, b_i)`. The threshold is the `b_i` of
the largest `w_i` that is strictly below the current syndrome weight. The
entries must be loaded in increasing `w_i` order. If none matches,
`b = m·d_H`, and then nothing can flip.

## Data representation

This is the part to understand before changing anything.

**Dense vectors.** A vector of `p` entries is stored as `h` words of `n_b`
entries. Entry `k` sits in word `k / n_b`, element `k % n_b`, with element 0
in the least significant bits. Because `p` is prime, the last word holds
only `p - (h-1)·n_b` entries. Its remaining elements are always zero, and
every unit keeps them zero. The integer vectors `sigma` and `rho` use
`EW = ceil(log2(m·d_H + 1))`-bit elements (7 bits by default), so a word is
`n_b·EW` bits wide.

**Sparse circulants.** A circulant block is stored as the list of the
one-positions of its first row, each `ceil(log2 p)` bits wide. The upper
bits select a word and the low `log2(n_b)` bits an element within it. All
lists live in one key memory with this layout (the `key_*` functions in
`ledadec_pkg`):

| region | lists | length of each | contents |
|---|---|---|---|
| HS | n0 | d_H | `(p - k) mod p` for each position k of H_i |
| QS | n0·n0 | WQmax slots | `(p - k) mod p` for each position k of Q_{i,j} |
| HC | n0 | d_H | positions k of H_i |
| QC | n0·n0 | WQmax slots | positions k of Q_{i,j} |
| L | n0 | m·d_H | positions of L_j = Σ_i H_i Q_{i,j} |

The orientation matters. The VbSC multiplier (below) computes
`r_q = Σ_{k∈S} v_{(q+k) mod p}`, which is a correlation. The integer steps
need exactly that, so they get the positions themselves (HC, QC). The binary
syndrome products are polynomial products `r_q = Σ_k v_{(q-k) mod p}`, so
they get the negated positions (HS, QS). The SVbSC unit toggles bit
`(k_v + k_L) mod p`, which is the polynomial product again, and gets the
plain positions of `L_j`. `Q_{i,j}` has weight `w_{(j-i) mod n0}`. The loader
(whoever holds the key) must fill all five regions consistently. The
end-to-end testbenches show how.

## Vector by Sparse Circulant (`vbsc`)

`vbsc` computes `r = Σ_{k∈S} rot(v, k)` for a dense `v` and a position list
`S`. It works in binary (xor) or integer (add) mode, set by parameter `ADD`.
Each rotated copy is a *partial product*, built one output word at a time.
Output word `j` of rotation `k` starts at input entry `(k + j·n_b) mod p`.
The unit reads the input row holding that entry and the next row on two
read ports, which gives a window of `2·n_b` elements. The collapse unit then
cuts out the `n_b` elements at the column offset. The unit then reads the
stored output word, xors or adds, and writes it back. Per position this
costs one cycle to read the position, one to read row 0, and three per
output word. In total:

    N_VbSC = LEN · (3h + 2)  cycles.

Because `p` is not a multiple of `n_b`, a plain "row r and row r+1 modulo h"
window is wrong near the end of the vector. Row `h-1` is short, and the
entries that follow it are entries 0, 1, … of row 0. The unit therefore
keeps a copy of the part of row 0 it can need, read once per partial product
in the "row 0" cycle. For windows starting in rows `h-2` and `h-1` it splices
that copy in at the right element. The start index is carried modulo `p`
from word to word. This keeps the rotation exact for any prime `p`.

**Collapse unit** (`collapse_unit`). A logarithmic funnel shifter of
`log2(n_b)+1` levels of two-input multiplexers. Level `l` keeps either the
low or the high part of its input, shifting by `n_b/2^(l+1)` elements. The
width shrinks from `2n_b` through `n_b + n_b/2`, `n_b + n_b/4`, … to
`n_b + 1`. A last level shifts by 0 or 1. Offsets `0 .. n_b` are reachable.
It is purely combinational.

The decoder has two instances. A 1-bit one computes the syndrome, and an
`EW`-bit integer one computes `sigma` and `rho`. In the `sigma` step its
1-bit input (the syndrome) is widened to `EW` bits.

## Sparse Vector by Sparse Circulant (`svbsc`)

`svbsc` applies `s ^= L_j · F_j` in place. For every pair
(position of `L_j`, flipped position) it toggles bit `(a + v) mod p` of the
syndrome memory. First it copies the `d_v` flip positions into a register
buffer, one per cycle. Then, for each of the `d_A` positions of `L_j`, one
cycle reads the position, followed by six cycles per flip: select, add,
subtract `p`, choose the reduced sum (the modulo takes two cycles), read the
syndrome word, write it back with one bit toggled:

    N_SVbSC = d_v + d_A + 6·d_A·d_v  cycles.

An empty flip list costs one cycle. The cost grows with the number of
flips, and at a large word size the dense products get cheaper. That is why
there is a second way to update the syndrome (next section).

## Version 2: dense syndrome update

With `VER = 2` (the default) and `n_b ≥ 64`, iterations 0 and 1 do not
apply `L_j` to the new flips. Instead they recompute the whole syndrome from
the whole estimate `e`, with the syndrome VbSC:

    s = s0 ⊕ Σ_i H_i · (Σ_j Q_{i,j} · e_j)

Here `s0` is the syndrome of the ciphertext. For each `i`, `n0` jobs build
`t = Σ_j Q_{i,j} e_j` in M_t (the first one overwrites, the others
accumulate), and one job adds `H_i t` onto M_s. The cost is the same in
every iteration, however many bits flip:

    N_dense = Σ_i [ N_VbSC(d_H) + 1 + Σ_j (N_VbSC(w(Q_ij)) + 1) ]
            = n0 · (m + d_H) · (3h + 2) + n0·(n0 + 1)   cycles.

Before the first `H_i t` job, M_s must hold `s0` again. A copy of the
syndrome goes into M_s0 while it is first computed. A small copy engine
writes M_s0 back into M_s, one word per cycle. It runs during the first
`Q e` job, which leaves M_s idle and always lasts longer than `h` cycles;
an assertion checks that the copy is over before M_s is used. M_s0 and the
copy engine are only built when `VER ≥ 2` and `n_b ≥ 64`. With `VER = 1`,
or at any `n_b < 64` including the default 32, every iteration uses SVbSC
and the schedule is that of version 1. This follows the published rule:
SVbSC whenever `n_b < 64`, or from iteration 2 on. The published
weight bound on `e` behind that rule is not evaluated in hardware.

## Error position search (`errpos_unit`)

The search walks all `n0·h` counter words of `rho` with the threshold `b`:

* one cycle reads the `rho` word and the matching word of `e`, and one
  compares all `n_b` counters with `b` (`rho > b`);
* if nothing matches it moves to the next word. Otherwise it spends `n_b`
  cycles walking the word, appending the position of each matching element
  to the list of its block. One more cycle writes the `e` word back with the
  matching bits flipped.

Cycles: `2·n0·h + (n_b + 1) · (words with a match)`. The published estimate
is `2h + (n_b+1)·w_e`, with `w_e` the number of flips. This design counts
the `2h` term per block and the second term per matching word; the two agree
when no two flips share a word. Each block's list holds `VMAX` positions.
If more bits flip, the `ovf` flag is set and the decoder stops with failure.
The dense `e` is still updated for all of them.

## Syndrome weight and threshold (`synw_unit`, `threshold_lut`)

The weight unit alternates a read cycle and a count cycle per syndrome word,
`2h` cycles in all. The table compares every `w_i` with the weight in
parallel in one cycle and selects the last match in the next, so
`weight + threshold = 2h + 2` cycles. The table is written through the
`lut_*` port. Unused entries reset to `w = all ones` and never match.

## Control and schedule (`ledadec_ctrl`)

The controller runs one *job* at a time. For each job it presents the list
base and length, the input and output offsets and an *init* flag. The init
flag makes the first partial product overwrite the output instead of
accumulating onto it. The controller then pulses `launch` for one cycle and
waits for the unit's one-cycle `done`. The top routes the memory ports by
the controller's `phase`. Only one unit is ever active, which an assertion
checks. Each job costs its unit's cycles plus one launch cycle, so a whole
decoding takes:

    N = Σ_i [N_VbSC(w_{n0-1-i}) + N_VbSC(d_H) + 2]                 (syndrome)
      + Σ_It [ (2h+1) + 3
              + Σ_i (N_VbSC(d_H) + 1) + Σ_{i,j} (N_VbSC(w(Q_ij)) + 1)
              + 2·n0·h + (n_b+1)·rows + 1
              + Σ_j (N_SVbSC(m·d_H, |F_j|) + 1) ]     (or N_dense, version 2)
      + (2h+1)                                                      (final weight)

The syndrome weight is computed at the start of every iteration and once
after the last update. The published schedule computes it after the
correlation instead. The result is the same, and no correlation is spent
once the syndrome is already zero.

Measured at the defaults (p = 14939, n_b = 32): one correlation pass
(sigma and rho) takes 50,514 cycles. A ciphertext with 136 errors decoded
in 2 iterations and 217,439 cycles. All measured runs:

| code | n_b | errors | iterations | cycles |
|---|---|---|---|---|
| p = 14939, n0 = 2 (default) | 32 | 136 | 2 | 217,439 |
| p = 14939, n0 = 2, version 2 | 128 | 136 | 2 | 75,646 |
| p = 8269, n0 = 3, d_H = 9, w_Q = [4,3,2] | 8 | 86 | 3 | about 700,000 |
| p = 7547, n0 = 4, d_H = 13, w_Q = [2,2,2,1] | 32 | 69 | 3 | about 265,000 |

The iteration counts depend on the threshold table, which each testbench
chooses by hand.

## Memories

All memories are plain arrays with one cycle of read latency and no reset.
`ram_1w2r` has one write port and two read ports, for everything a VbSC
reads as a window. `ram_1w1r` has one of each.

| memory | words × bits (defaults) | content |
|---|---|---|
| M_x | h × n_b (467 × 32) | ciphertext |
| M_t | h × n_b | temporary `Q_{i,n0-1}·x` |
| M_s | h × n_b | syndrome |
| M_s0 | h × n_b | initial syndrome (version 2 at `n_b ≥ 64` only) |
| M_sig | n0·h × n_b·EW (934 × 224) | `sigma_i` at offset `i·h` |
| M_rho | n0·h × n_b·EW | `rho_j` at offset `j·h` |
| M_e | n0·h × n_b | error estimate, block `j` at offset `j·h` |
| M_ep | n0·VMAX × ceil(log2 p) | flip positions, block `j` at `j·VMAX` |
| M_key | key layout above (230 × 14) | position lists |

That is about 507 kbit at the defaults, including the SVbSC buffer. The two
integer memories are over 80 % of it. M_e is cleared by a counter while the
syndrome is computed, which always takes longer.

## Using the decoder (`ledadec_top`)

1. With the decoder idle, write the key lists (`key_we`, `key_addr`,
   `key_data`) in the layout above, the threshold pairs (`lut_we`,
   `lut_addr`, `lut_w`, `lut_b`), and the `h` ciphertext words (`x_we`,
   `x_addr`, `x_data`, last word zero-padded).
2. Pulse `start` for one cycle. `busy` rises on the next cycle.
3. At the end `done` pulses for one cycle. `success`, `overflow`, `iter` and
   `synd_weight` then hold the outcome until the next start.
4. Read the error estimate word by word: block `j`, word `w` at
   `e_raddr = j·h + w`, data on `e_rdata` one cycle later.

The key and table may stay loaded across decodings. Only the ciphertext
must be rewritten.

## Where this departs from the published architecture

* Version 2 uses the fixed rule (dense update in iterations 0 and 1 when
  `n_b ≥ 64`). The weight bound it was derived from is not checked at run
  time. Restoring M_s from M_s0 with a copy engine is this design's own.
* The row-0 splice in VbSC, which makes the rotation exact for a prime `p`,
  is this design's own. So is the exact split of the SVbSC cycles.
* The error search counts `2h` per block, and `n_b + 1` per matching word
  rather than per flip (see above).
* The syndrome weight is computed at the start of each iteration (see
  above).
* The published pseudo-code keeps `e·Q^T` and recomputes the syndrome from
  the initial one. Version 1 here, like the published cost model, applies
  `L_j` to the new flips only. Version 2 recomputes from `s0`, but
  evaluates `Q e` from `e` in each update rather than keeping it.
* Flip-list overflow as a failure condition, the clearing of M_e, the shared
  key memory with pre-oriented lists, and all handshakes (launch/done) are
  this design's own.
* Sizes of `ITMAX`, `VMAX` and `NLUT` are assumed. How the threshold table
  is derived for a code is outside this design: the table is an input.
* No timing, area or FPGA results are reproduced. The RTL has not been
  through place and route. Memories are inferred arrays, to be mapped to
  block RAM or SRAM macros by the synthesis flow.

## Verification

Every unit has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_collapse_unit` | every offset 0..n_b against plain indexing (n_b = 4 and 32) |
| `tb_vbsc` | binary and integer products against a direct sum, for p = 37, 61, 131 and n_b = 4, 8, 32, including a one-element last word; busy = LEN·(3h+2) |
| `tb_svbsc` | toggled syndrome against a model; busy = d_v + d_A + 6·d_A·d_v, empty lists |
| `tb_synw_unit`, `tb_threshold_lut` | weights and table selection, cycle counts |
| `tb_errpos_unit` | flipped e, position lists, counts, overflow, cycle count |
| `tb_ledadec_ctrl` | job sequence, offsets and init flags against a schedule model, with stub units, at n_b = 64 so that both the dense and the sparse update jobs occur; success, iteration limit, overflow |
| `tb_ram_1w2r` | both read ports, read-before-write |
| `tb_ledadec_top` | whole decoder at p = 1031, n_b = 8: zero ciphertext, decodable ciphertexts, no-flip run to ITMAX, overflow; counts each mechanism and fails if one never happened |
| `tb_ledadec_full` | one full decoding at the default parameters (136 errors) |
| `tb_ledadec_n0_3` | three-block code p = 8269 at n_b = 8, two decodings |
| `tb_ledadec_n0_4` | four-block code p = 7547, d_H = 13, w_Q = [2,2,2,1] at n_b = 32, two decodings |
| `tb_ledadec_v2` | the scenarios of `tb_ledadec_top` at n_b = 64 (version 2); fails unless both dense and sparse updates happened |
| `tb_ledadec_nb128` | one full-size decoding at n_b = 128 (version 2) |

The decoder testbenches generate a random key (regenerated until no `L_j`
has cancellations) and an error of weight `t` confined to the last block,
so that `x = e_{n0-1}` is a valid ciphertext. They compare success,
iteration count, overflow, every bit of `e` and the exact busy-cycle count
with a bit-level reference decoder. That reference computes the counters
directly from `L_j`, independently of the two-step hardware path.

To run one with Verilator (version 5):

    verilator --binary --timing --assert -Wall -Wno-fatal \
      --top-module tb_ledadec_top -y rtl -y tb +libext+.sv -Irtl \
      rtl/ledadec_pkg.sv tb/tb_ledadec_top.sv -o sim
    ./obj_dir/sim

The full-size decoding simulates in well under a minute.
