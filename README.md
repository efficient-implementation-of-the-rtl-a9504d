# Sum-of-residues modular multiplier over the 2^n−1 moduli set

This RTL multiplies two elements of a 256-bit prime field, Z = X·Y mod p,
entirely in a residue number system (RNS). A number is held as its
remainders modulo eight pairwise co-prime moduli. Every arithmetic step then
works on short, independent channels instead of one 512-bit datapath. The
modular reduction by p uses the *sum of residues* (SOR) method, which builds
the result out of precomputed multiples of p. It never forms the full
product in binary.

All eight moduli have the form 2^n−1:

| channel i | 0    | 1    | 2    | 3    | 4    | 5    | 6    | 7    |
|-----------|------|------|------|------|------|------|------|------|
| m_i       | 2^73−1 | 2^71−1 | 2^67−1 | 2^65−1 | 2^64−1 | 2^63−1 | 2^61−1 | 2^59−1 |

This is the family {2^(d+6)−1, 2^(d+4)−1, 2^d−1, 2^(d−2)−1, 2^(d−3)−1,
2^(d−4)−1, 2^(d−6)−1, 2^(d−8)−1} with d = 6b+1 and b = 11. The dynamic
range M = ∏ m_i has 523 bits, enough for the 512-bit product of two field
elements. Because 2^n ≡ 1 (mod 2^n−1), reducing a value modulo a channel
takes no division: you cut it into n-bit pieces and add the pieces with an
end-around carry. That is why every channel operation here is an adder or
a multiplier followed by one adder.

The default prime is p = 2^256 − 2^32 − 977 (secp256k1). It is a parameter:
all constants are computed from it when the design is elaborated.

## The arithmetic

### Channel adder (`rns_add`)

(A + B) mod (2^n−1) is computed by two n-bit adders working in parallel,
one with carry-in 0 and one with carry-in 1. If A+B+1 carries out of n bits,
the carry-in-1 sum (truncated to n bits) is the answer. Otherwise A+B is the
answer. The select is that carry-out. For operands below 2^n−1 the result is
canonical. An operand equal to 2^n−1 (the second code for zero) is also
accepted.

### Channel multiplier (`rns_mul`)

The 2n-bit product S is split into a high half S2 and a low half S1, and
then S2 + S1 is taken with `rns_add`. With `PIPE = 1` a register holds S
between the multiplier and the adder. The pipelined organisations use this.

### Folding (`rns_fold`)

Folding reduces any wide value modulo 2^n−1 by summing its n-bit pieces with
a chain of `rns_add`, then mapping the all-ones code to 0. The multiplier
uses it in two places:

- to bring a residue of one channel (γ_j, up to 73 bits) into a narrower channel;
- to bring the 76-bit correction factor k into every channel.

### Reduction algorithm (`sor_modmul`)

M_i = M/m_i. Residues x_i, y_i enter, and residues z_i leave.

1. xy_i = ⟨x_i·y_i⟩_{m_i}
2. γ_i = ⟨xy_i · ⟨M_i⁻¹⟩_{m_i}⟩_{m_i}. By the CRT, X·Y = Σ γ_i M_i − αM.
3. sum_i = ⟨Σ_j γ_j · ⟨⟨M_j⟩_p⟩_{m_i}⟩_{m_i}. This is the residue in channel i of
   S = Σ_j γ_j ⟨M_j⟩_p, an integer congruent to X·Y + αM modulo p.
4. The two correction factors:
   - **α** = ⌊(Σ_i ⌊γ_i / 2^(n_i−q)⌋ + 2^q·Δ) / 2^q⌋, with q = 8 and Δ = 1/16 (`sor_alpha`). This is the number of times M was overshot.
   - **k** = ⌊Σ_i γ_i·⌊⟨M_i⟩_p / 2^(256−T)⌋ / 2^T⌋, with T = 72 (`sor_k`). This is an under-estimate of S/p.
5. kp_i = ⟨k·⟨−p⟩_{m_i}⟩_{m_i}, and a_i = ⟨α·⟨−M⟩_p⟩_{m_i} from a table.
6. z_i = ⟨sum_i + a_i + kp_i⟩_{m_i}

The output therefore represents the integer

    V = Σ_j γ_j ⟨M_j⟩_p + α·⟨−M⟩_p − k·p,   with V ≡ X·Y (mod p).

**V is not fully reduced.** k never exceeds S/p, so V ≥ 0. The estimation
error of k and the α term leave V at a few multiples of p. In simulation it
was always below 6p. That is small enough to feed V straight back as an operand,
because a square of such values is still far below (1−Δ)·M. A chain of
eight squarings is tested this way. If a canonical value below p is needed,
reduce it after converting back to binary.

**Input condition.** The α estimate is exact as long as X·Y < (1−Δ)·M. An
assertion fires if α ever reaches N. Each of the eight truncations costs
less than 2^−q, so the total error is below N/2^q = 1/32 < Δ.

### Per-channel scaling of γ_i in α

The formula this design derives from scales every γ_i by 2^(n−q) with one
common n = 73, the width of the largest modulus. That is correct only when
all moduli have the same width. Here they range from 59 to 73 bits, so the
common scaling underestimates γ_i/m_i badly for the narrow channels.

For the operands X = 2^256−2^35−977 and Y = 2^256−2^37−977, the exact α is
3, but the common-width formula gives 0. The result then differs from X·Y
by 3·⟨M⟩_p modulo p. `sor_alpha` uses each channel's own width n_i, which
returns the exact α. The unit testbench checks this against α computed by
exact CRT arithmetic.

### Constants (`sor_pkg`)

The five tables are built at elaboration time by constant functions:

| table        | contents |
|--------------|----------|
| `inv_tab()`  | ⟨M_i⁻¹⟩_{m_i}, by the extended Euclidean algorithm |
| `negp_tab(p)` | ⟨−p⟩_{m_i} |
| `mip_tab(p)` | ⟨M_i⟩_p, 256 bits each; `sor_k` uses the top T bits |
| `cm_tab(p)`  | [j][i] = ⟨⟨M_j⟩_p⟩_{m_i} |
| `atab(p)`    | [a][i] = ⟨a·⟨−M⟩_p⟩_{m_i} for a = 0 … 7 |

Changing `P` on `sor_modmul` retargets the whole design to another 256-bit
prime. The moduli set is fixed by `B` in the package.

## Organisation and timing

An "RNS multiplier" is eight channel multipliers, one per modulus. All
steps share the `NMUL` RNS multipliers that `sor_modmul` instantiates:

- steps 1, 2 and 5 each take one issue on multiplier 0;
- step 3 takes N/NMUL issues, with multiplier u handling term j = r·NMUL + u in round r.

The results of a step-3 round are accumulated into sum_i through a chain of
modular adders. α and k are computed combinationally from the γ registers
and latched in the first step-3 cycle, so they cost no extra time. With
`PIPE = 1` the controller waits one cycle after each step whose results the
next step needs.

| NMUL | PIPE | organisation | done after start (clock edges) |
|------|------|--------------|--------------------------------|
| 1 | 0 | one RNS multiplier, not pipelined | 12 |
| 1 | 1 | one RNS multiplier, pipelined | 15 |
| 2 | 1 | two parallel pipelined RNS multipliers (**default**) | 11 |

In general the latency is 4 + N/NMUL + 3·PIPE. The pipelined versions trade
extra cycles for a shorter critical path: multiplier and adder sit in
different cycles.

The published FPGA latencies these organisations come from are about
197 ns, 133 ns and 106 ns on a Virtex-7. They imply clock periods that this
RTL does not claim to meet. No synthesis timing was done here.

### Interface of `sor_modmul`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | when idle, captures `x`, `y` and starts; ignored while busy |
| `x`, `y` | in | `rvec_t` (8 × 73) | operand residues, channel 0 (2^73−1) first; unused upper bits of narrow channels are ignored |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-cycle pulse; `z`, `alpha`, `k` are valid from then until the next `done` |
| `z` | out | `rvec_t` | result residues; unused upper bits are 0 |
| `alpha`, `k` | out | 4, 76 | correction factors of the last operation, for inspection |

A new `start` may be given in the same cycle as `done`. Operands must be
canonical residues (below m_i), with X·Y < (15/16)·M. In practice that means
any X, Y below a few times p.

Binary-to-RNS and RNS-to-binary converters are not included. Operands enter
and results leave as residues, as they would inside a longer chain of RNS
operations.

## Files

| file | content |
|------|---------|
| `rtl/sor_pkg.sv` | moduli, types (`res_t`, `rvec_t`, `rmat_t`), constant functions for the tables |
| `rtl/rns_add.sv` | modulo 2^n−1 adder |
| `rtl/rns_mul.sv` | modulo 2^n−1 multiplier, optional pipeline register |
| `rtl/rns_fold.sv` | wide value modulo 2^n−1 |
| `rtl/sor_alpha.sv`, `rtl/sor_k.sv` | correction factors |
| `rtl/sor_modmul.sv` | top: controller and shared datapath |
| `tb/sor_tb_pkg.sv` | reference arithmetic for the testbenches (wide integers, exact CRT) |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_sor_modmul_full` |

## Verification

Each testbench compares against values computed independently with
wide-integer division and remainder. None of them reuses the RTL's
structure. Each one prints `TB_RESULT checks=N failures=M`.

- **`tb_rns_add`, `tb_rns_mul`, `tb_rns_fold`**: random and corner operands
  at the widest (73) and narrowest (59) widths. They also check the one-cycle
  latency of the pipelined multiplier and the all-ones corner of the fold.
- **`tb_sor_pkg`**: every table against its definition, plus published
  reference numbers for p = 2^256−2^32−977:
  - the eight inverses ⟨M_i⁻¹⟩_{m_i};
  - k·⟨−p⟩_{m_i} for the published k;
  - several γ_j·⟨⟨M_j⟩_p⟩_{m_i} products.
- **`tb_sor_alpha`**: α against the exact CRT overflow for real γ vectors.
  These come from random products and from the example above, whose α is 3.
- **`tb_sor_k`**: k against its formula, and the bound 0 ≤ S − k·p < 16p.
  The example γ vector must give k = 1846402278694734677477.
- **`tb_sor_modmul`**: all three organisations side by side on 24 operand
  pairs, including the example, 0, and p−1. For each result it checks:
  - that z represents X·Y mod p plus a small multiple of p;
  - that α is exact;
  - the latency.

  It also makes sure that α = 0, α > 0, a start ignored while busy and a
  back-to-back start each occur.
- **`tb_sor_modmul_full`**: the default configuration (no parameter
  overrides). It runs the example, 30 random products, and an eight-step
  square chain that feeds z back as the next operands.

To run one with plain Verilator from the repository root:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/sor_pkg.sv tb/sor_tb_pkg.sv rtl/rns_add.sv rtl/rns_mul.sv \
      rtl/rns_fold.sv rtl/sor_alpha.sv rtl/sor_k.sv rtl/sor_modmul.sv \
      tb/tb_sor_modmul_full.sv --top-module tb_sor_modmul_full
    ./obj_dir/Vtb_sor_modmul_full

Each simulation finishes in well under a second.

## Where this design departs from its source, or fills gaps

- **α uses per-channel widths** (see above). This fixes an error in the
  source formula.
- **z is reduced modulo m_i in step 6.** The source algorithm adds the three
  terms without a modulus.
- **Fully reduced results are not produced.** The result is congruent to
  X·Y mod p and below a few multiples of p, which is what the algorithm
  yields. The source describes it as the exact X·Y mod p.
- **Step-3 products are reduced before they are summed.** The products
  γ_j·⟨⟨M_j⟩_p⟩_{m_i} are never formed at full width: γ_j is folded into
  channel i and multiplied there.
- **The three organisations are only named in the source.** The schedule,
  the position of the pipeline register, the start/busy/done handshake, the
  reset and the fold units are this design's choices.
- **The tables are computed, not stored,** so the prime is a parameter.
