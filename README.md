# Low-latency masked Keccak-f[200] at any protection order

This is a side-channel-protected Keccak-f[200] permutation (25 lanes of 8 bits, 18 rounds).
It uses Boolean masking with the minimum of d+1 shares for security at order d, and it finishes
one round per clock cycle: the same latency as an unprotected round-based core. The order is a
single parameter, `D`, and the latency stays at 18 cycles for every order.

Domain-oriented masking (DOM) normally needs two register stages per round. The non-linear step
chi multiplies shares of different domains, and its partial products must be stored in a
register before they are compressed back to d+1 shares. Otherwise, glitches could combine several
shares of one secret. This design keeps the partial products apart for longer and uses a single
register per round:

* chi expands the d+1 input shares to (d+1)^2 output shares. Every output share is built from
  **one share of each input bit only**.
* theta of the next round is a linear map, so it is applied to each of the (d+1)^2 shares on
  its own. Because of the property above, theta never brings two shares of one input together.
* The (d+1)^2 shares are stored in the state register. They are then compressed back to d+1
  shares, and rho, pi and the next chi follow.

The price is (d+1)^2 copies of theta and a (d+1)^2 × 200-bit state register, where the
two-stage DOM design needs d+1 copies of theta.

## Round datapath

```
            din (d+1 shares, zero-padded to (d+1)^2)
                 |
             +-------+     +-------------+     +-------+     +-------+
 chi out --->| Mux.1 |---->| theta x     |---->| Mux.2 |---->| state |---+
 (feedback)  +-------+     | (d+1)^2     |     +-------+     | reg   |   |
                 ^         +-------------+         ^         +-------+   |
                 |                                 | chi out             |
                 |                                 | (last round)        v
                 |   +---------------+   +----------------+   +---------------+
                 +---| chi + iota    |<--| rho/pi x (d+1) |<--| compression   |--> dout
                     | d+1 -> (d+1)^2|   +----------------+   | (d+1)^2 -> d+1|
                     +---------------+                        +---------------+
                          ^ 100·D·(D+1) fresh mask bits per cycle
```

| module | role |
|---|---|
| `keccak_pkg` | sizes, bit indexing, round constants and rho offsets (computed by constant functions) |
| `keccak_theta` | theta on one share |
| `keccak_rho_pi` | rho and pi on one share |
| `dom_chi_row` | masked chi of one 5-bit row, d+1 → (d+1)^2 shares |
| `dom_chi_iota` | 40 `dom_chi_row`s plus the round constant |
| `share_compress` | (d+1)^2 → d+1 shares, including the rearrangement of the x = 3 lanes |
| `input_pad_mux` | Mux.1: padded input in the load cycle, feedback otherwise |
| `bypass_mux` | Mux.2: theta output, or chi output in the last round |
| `state_reg` | the one register stage, (d+1)^2 × 200 bits |
| `round_ctrl` | load cycle, round counter, mux selects, busy/valid |
| `ll_dom_keccak` | the masked core; fresh masks come in on a port |
| `lfsr_prng` | one 31-bit LFSR (x^31 + x^28 + 1) per mask bit |
| `ll_dom_keccak_top` | core plus PRNG, the top level |

### Cycle by cycle

1. **Load cycle.** `start` is high while the core is idle. Mux.1 places input share i at
   padded position i·(D+1)+i and zeroes the other positions. All (d+1)^2 shares pass through
   theta, and the register stores theta of the first round.
2. **Round r = 0…16.** The register is compressed to d+1 shares, then rho/pi and masked
   chi + iota(r) run. The result goes through Mux.1 (feedback) and theta of round r+1, and is
   stored. Each cycle of this kind finishes one round and starts the next.
3. **Round 17.** Mux.2 bypasses theta. The register now holds the final state in (d+1)^2
   shares.
4. `valid` rises after that edge, 18 clock edges after the load edge, whatever `D` is. `dout` is
   always the compression of the register, so it is the result while `valid` is high.

A `start` that arrives while `busy` is high is ignored. A new `start` may come in the same cycle
that `valid` is high.

## The masked chi (`dom_chi_row`)

For a row ⟨a,b,c,d,e⟩ (bit x = 0…4 of a row), chi is `a' = a ⊕ ¬b·c` and the same for each
rotation. Let s = D+1. Output share k = i·s + j, for 0 ≤ i, j < s, uses only these input
shares:

| input | share used by output share (i, j) |
|---|---|
| a | (i + j) mod s |
| b, d | i |
| c, e | j |

Adjacent columns of this index configuration cover every pair of share indices. So every
partial product `b_i c_j`, `c_j d_i`, `d_i e_j`, `e_j a_α`, `a_α b_i` (α = (i+j) mod s) appears
exactly once across the s² output shares. The complement (the "1 ⊕" of chi) and the linear term
each go to one chosen share. The code writes all five output bits as one rule:

```
a'_k = (i==0 ? ~b_i : b_i) & c_j         ^ (j==0 ? a_α : 0) ^ r0{i,j}
b'_k = (j==0 ? ~c_j : c_j) & d_i         ^ (j==0 ? b_i : 0) ^ r1{i,j}
c'_k = (i==0 ? ~d_i : d_i) & e_j         ^ (i==0 ? c_j : 0) ^ r2{i,j}
d'_k = (j==0 ? ~e_j : e_j) & a_α         ^ (j==0 ? d_i : 0) ^ r3{α,j}
e'_k = (α==0 ? ~a_α : a_α) & b_i         ^ (i==0 ? e_j : 0) ^ r4{α,i}
```

`rm{p,q}` is a fresh mask bit. It is zero when p = q, because products inside one domain are not
refreshed. When p ≠ q it is shared by the pair (p,q) and (q,p), so every mask bit enters exactly
two output shares and cancels when they are summed. Each row needs 5·D·(D+1)/2 mask bits and the
state needs 40 times that: 200, 600, 1200, 2000 and 3000 bits per cycle for D = 1…5.

## Compression and input padding (`share_compress`, `input_pad_mux`)

Compressed share i is the XOR of shares i·s … i·s+s−1. Those are the shares built from
b_i, d_i, and the grouping keeps each domain on its own side for bits a', b', c' and e'. Bit d'
is different: its shares (i, j) mix e_j with a_(i+j). For the lanes that hold d' (x = 3), the
shares are therefore regrouped before the XOR. Share i·s+j of such a lane is taken from position
j·s+i. Any regrouping of shares leaves the total XOR unchanged, so correctness never depends on
it. Only the security argument does.

The padded input must respect both groupings: after the first theta and compression, each
compressed share must see only one input share. Putting input share i at position i·s+i (the
"diagonal") places it in group i under both groupings.

## Fresh randomness (`lfsr_prng`)

The top feeds the core from N = 100·D·(D+1) independent 31-bit Fibonacci LFSRs with feedback
polynomial x^31 + x^28 + 1. Each LFSR gives one bit per cycle (its bit 30). Reset loads fixed
non-zero values. For real seeds, hold `seed_load` high for N·31 cycles and shift random bits in
on `seed_in`. During that time the LFSRs form one long chain: the first bit shifted in ends up in
LFSR N−1. An all-zero seed locks an LFSR at zero. An LFSR bank is a practical stand-in for a
proper randomness source, not a cryptographic one. Users of `ll_dom_keccak` can supply masks
from any source on `rnd`.

## Interface (`ll_dom_keccak_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | synchronous active-low reset (clears state and control) |
| `seed_load`, `seed_in` | in | 1, 1 | serial PRNG seeding |
| `start` | in | 1 | load `din` and start (ignored while `busy`) |
| `din` | in | (D+1) × 200 | input sharing, share i in `din[i]` |
| `busy` | out | 1 | rounds in progress |
| `valid` | out | 1 | `dout` is the result; stays high until the next `start` |
| `dout` | out | (D+1) × 200 | output sharing |

Bit (x, y, z) of a 200-bit state is bit `8·(x+5y)+z`, so byte n of the usual Keccak byte string
is `state[8n+7:8n]`. The core `ll_dom_keccak` has the same ports without the seed pins, plus
`rnd` (100·D·(D+1) bits, which must be fresh in every cycle).

## Cost by order

| D | shares in/out | register bits | theta copies | mask bits per cycle |
|---|---|---|---|---|
| 1 | 2 | 800 | 4 | 200 |
| 2 | 3 | 1800 | 9 | 600 |
| 3 | 4 | 3200 | 16 | 1200 |
| 4 | 5 | 5000 | 25 | 2000 |
| 5 | 6 | 7200 | 36 | 3000 |

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. They all use `tb/keccak_ref_pkg.sv`, an
unmasked lane-based model with the round constants and rotation offsets written out as tables.
That model also carries two known-answer vectors of Keccak-f[200] (the all-zero state, and bytes
0, 1, …, 24), which were produced by an independent software model that had itself been checked
against SHA3-256.

* `tb_dom_chi_row` (orders 1–3) checks three things. First, correctness, over all inputs for
  d = 1. Second, share separation: flipping any input share that output share k may not use
  leaves k unchanged. Third, refreshing: one mask bit changes exactly two output bits.
* `tb_ll_dom_keccak` (orders 1 and 2) compares the recombined register with the reference in
  every cycle of every permutation. Right after the load, compressed share i must be exactly
  theta of input share i, which checks the padding against both compression groupings. It also
  checks the 18-cycle latency, an ignored `start`,
  back-to-back starts, and that the same input with new masks gives other shares but the same
  value.
* `tb_ll_dom_keccak_top` runs the top at its default parameters: full serial seeding, then ten
  permutations with masks from the LFSRs.
* `tb_orders` runs orders 1, 2 and 3 side by side, and `tb_order4` runs order 4 (its
  simulator build alone takes about 2.5 minutes). Order 5 passes lint but was not simulated,
  because its simulator build takes too long.

To run one test with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/keccak_pkg.sv tb/keccak_ref_pkg.sv tb/tb_ll_dom_keccak_top.sv \
  --top-module tb_ll_dom_keccak_top
./obj_dir/Vtb_ll_dom_keccak_top
```

To change the order, override `D` on `ll_dom_keccak_top` or `ll_dom_keccak`.

## What is and is not established

* **Functional behaviour** is verified by the tests above, at orders 1–4 in simulation.
* **Security** (probing security with glitches) is not verified here. It rests on the
  construction: the share separation of chi, theta before compression, the grouping of the
  x = 3 lanes, and diagonal input padding. `tb_dom_chi_row` checks the share-separation
  property structurally. No formal glitch-extended probing check and no leakage measurement have
  been run on this RTL.
* **Synthesis must keep the module boundaries** of `dom_chi_row`, `keccak_theta` and
  `share_compress` (no ungrouping or cross-boundary optimisation). Otherwise the tool may
  re-associate XORs and merge shares ahead of the register.
* **Design choices not fixed by the construction**, and which can be changed freely:
  * the start/busy/valid handshake and synchronous reset
  * the diagonal padding position
  * putting the round constant on share 0
  * the order of mask bits on `rnd`
  * placing the x = 3 regrouping after the register rather than before it
  * the LFSR output tap, serial seeding and reset values
* Extra costs of this RTL compared with a minimal layout: the theta bypass uses a full
  (d+1)^2 × 200-bit multiplexer (Mux.2), as in the reference architecture. Mux.1 with zero
  padding reduces to AND gates for the non-diagonal positions.
