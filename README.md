# Reversible-gate modular adders for a three-moduli RNS

A residue number system (RNS) stores an integer as its remainders with respect to
a few pairwise co-prime moduli. Additions then split into independent, narrow
channels with no carry passing between them, and the only wide operations left
are the conversions into and out of the residue form. Both the channels and the
converters are built almost entirely from *modular adders*: carry-save adders
(CSAs) with an end-around carry, closed by a modulo carry-propagate adder.

This RTL builds those adders from **reversible gates**, gates whose input can
always be recovered from their output (a bijection on their bits). Every full
adder is an HNG gate, every half adder a Peres gate and every fan-out a
Feynman gate. Using these adders, it builds a forward converter, a reverse
converter and a complete RNS adder for the moduli set

    { 2^N - 1,  2^(N+K),  2^N + 1 }      M = (2^N-1) * 2^(N+K) * (2^N+1)

The defaults are N = 8 and K = 2: moduli 255, 1024 and 257, M = 67 107 840, and
26-bit binary operands. Everything is combinational: there is no clock, no
reset and no handshake.

## The three reversible gates

| gate | inputs | outputs | role here |
|---|---|---|---|
| Feynman (`feynman_gate`) | a, b | p = a, q = a ^ b | with b = 0: copies a onto two wires |
| Peres (`peres_gate`) | a, b, c | p = a, q = a ^ b, r = ab ^ c | with c = 0: half adder (q sum, r carry) |
| HNG (`hng_gate`) | a, b, c, d | p = a, q = b, r = a ^ b ^ c, s = (a ^ b)c ^ ab ^ d | with d = 0: full adder (r sum, s carry) |

A reversible netlist may not branch a wire, so outputs that are only there to
keep the mapping invertible stay unconnected. These are the "garbage" outputs
(`g_*` signals). Lint reports them as unused signals. This is expected, and
those are the only warnings the RTL produces.

## Arithmetic modulo 2^W - 1: end-around carry

Modulo 2^W − 1 the weight 2^W equals 1. A carry leaving the top bit can
therefore re-enter at bit 0.

* **`rev_csa_eac`**, the CSA with end-around carry: a row of W independent HNG
  full adders turns three operands into a sum vector `s` and a carry vector `cv`.
  The carry vector is the per-bit carries rotated left by one, so the top carry
  lands in `cv[0]`. Then `s + cv ≡ a + b + c (mod 2^W−1)`, with the delay of a
  single full adder.
* **`rev_mod_adder`**, the modulo 2^W − 1 adder, has two rows. A ripple row of
  HNG full adders (`rev_ripple_adder`) forms `a + b` and a carry out. A ripple
  row of Peres half adders (`rev_ha_incrementer`) then adds that carry back at
  bit 0. The second row can never overflow, and an assertion checks this.

Zero has two codes modulo 2^W − 1: 0 and all ones. The adder returns all ones
when `a + b = 2^W − 1`, and it accepts either code on its inputs. The reverse
converter is the one place where this matters, because its result is an
ordinary binary number. It maps all ones to 0 there.

## Arithmetic modulo 2^W + 1: complemented end-around carry

Modulo 2^W + 1 the weight 2^W equals −1. A carry c leaving the top bit is worth
−c = (1 − c) − 1. So it re-enters bit 0 *inverted*, and it leaves a constant
−1 behind.

* **`rev_csa_ceac`**: the same HNG row with the wrapped carry inverted, so
  `s + cv − 1 ≡ a + b + c (mod 2^W+1)`.
* **`rev_modp1_adder`** computes `(a + b + 1) mod (2^W+1)`. The +1 cancels the
  −1 of the CSA in front of it, so the CSA's `s` and `cv` go straight in. It
  has the same two rows as the 2^W − 1 adder, but the Peres row adds the
  *complement* of the HNG row's carry out:
  * carry 1: the result is `a + b − 2^W`, which equals `a + b + 1 − (2^W+1)`;
  * carry 0: the result is `a + b + 1`. If that value is exactly 2^W, the Peres
    row's own carry out becomes bit W of the result.

  The result is therefore W + 1 bits wide and lies in 0 … 2^W. Residues of the
  2^N + 1 channel are N + 1 bits everywhere in the design.
* **`rev_modp1_channel_adder`** (helper) adds two such (N+1)-bit residues. Bit N
  is set only for the value 2^N = −1, so a residue is its low N bits minus its
  bit N. One CEAC CSA adds the two low parts and the constant `~t`, where
  t = a[N] + b[N]; modulo 2^N + 1 the constant `~t` equals −2 − t. The +1
  adder then closes the sum.

## Forward converter (`rns_forward_converter`)

The input x has 3N + K bits. It is cut into four N-bit chunks c0 … c3, with c3
holding the top bits zero-extended. Then:

    x1 = c0 + c1 + c2 + c3                       (mod 2^N − 1)
    x2 = x[N+K−1:0]                              (mod 2^(N+K): wiring only)
    x3 = c0 − c1 + c2 − c3
       = c0 + ~c1 + c2 + ~c3 + 4                 (mod 2^N + 1, with −c = ~c + 2)

* **Channel 1** reduces its four operands with two EAC CSAs and `rev_mod_adder`.
* **Channel 3** has five operand slots: the four chunks and a correction
  constant. They go through three CEAC CSAs and `rev_modp1_adder`. The three
  CSAs contribute −3 and the adder +1, so the tree as a whole adds 4. That is
  exactly the +4 the two negations need, so the constant operand is zero. It is
  kept as an explicit input of the third CSA, so the tree keeps the shape of
  the published block diagram, and a different adder convention only means
  changing `KCONST`.

Every input bit reaches its two or three destinations through Feynman gates.
The output x1 may be 2^N − 1 where the residue is 0.

## Reverse converter (`rns_reverse_converter`)

This is the least obvious part of the design. The low N + K bits of the number
*are* x2. So only the upper part Y, of 2N bits, has to be computed, and
x = {Y, x2}. Write M' = 2^(2N) − 1 = (2^N − 1)(2^N + 1). The Chinese remainder
theorem on the two odd moduli gives

    Z = x mod M' = 2^(N−1)(2^N+1)·x1 + 2^(N−1)(2^N−1)·x3     (mod M')
    Y = 2^−(N+K) · (Z − x2)                                   (mod M')

Two facts make this cheap modulo M':

* multiplying by 2^−j is a rotation right by j bits;
* negation is a bit-wise complement.

Expanding the products gives four 2N-bit operands, built from wiring and
inverters only:

    ror_{K+1}( {x1, x1} )            (2^N+1)·x1
    ror_{K+1}( x3 · 2^N )            bit N of x3 wraps to bit 0
    ror_{K+1}( ~x3 )                 −x3
    ror_{N+K}( ~x2 )                 −x2

Two EAC CSAs and a 2N-bit `rev_mod_adder` sum these operands. For any valid
residue triple Y < 2^(2N) − 1, so an all-ones adder result can only mean 0 and
is replaced by 0. The input x1 may use either code for zero.

## RNS adder (`rns_rev_top`, the top level)

    a ─ forward ─┬─ x1 ─ rev_mod_adder (mod 2^N−1) ───────────┐
    b ─ forward ─┼─ x2 ─ HNG ripple adder, carry dropped ─────┼─ reverse ─ sum
                 └─ x3 ─ rev_modp1_channel_adder (mod 2^N+1) ─┘

The top computes `sum = (a + b) mod M` for any two 3N+K-bit inputs. It also
brings out the residues of both operands and of the sum. The channel adders
are independent of each other, and this independence is the parallelism that
RNS offers.

Ports, with widths in terms of N and K: `a`, `b`, `sum` [3N+K]; `*_r1` [N];
`*_r2` [N+K]; `*_r3` [N+1].

### Timing

All paths are combinational. The longest path runs:

* through a forward converter: Feynman fan-out, two or three CSA levels, and two
  N-bit ripples;
* through a channel adder: for channel 3, one CSA level and two N-bit ripples;
* through the reverse converter: two CSA levels and two 2N-bit ripples.

The ripple adders dominate. Register the ports outside this block if a clock
is needed.

## Parameters and limits

| parameter | default | meaning |
|---|---|---|
| `N` | 8 | channel width; moduli 2^N−1 and 2^N+1 |
| `K` | 2 | the middle modulus is 2^(N+K) |
| `WIDTH` | 8 | width of an individual adder or CSA |

The converters require N ≥ 2 and −1 ≤ K ≤ N. Other values stop elaboration
with an error. The source gives neither N nor K. The 8-bit default matches the
8-bit operands it uses for the reversible modulo adder, and K = 2 is an
arbitrary choice.

## What comes from the published design and what is this design's own

Taken from the published design:

* the three gate equations;
* the use of HNG gates as full adders and Peres gates (third input 0) as half
  adders;
* the CSA with end-around carry as a row of HNG gates;
* the modulo 2^n − 1 adder as an HNG full-adder row followed by a Peres
  half-adder row that adds the end-around carry;
* the block structure of both converters: operand counts, the kinds of CSA,
  the final adders, and the output formed as {Y, x2}.

This design's own:

* the contents of both "operand preparation" stages, meaning the chunk and
  rotation equations above;
* the gate-level form of the CEAC CSA and of the modulo 2^n + 1 adder, which
  the source only names;
* the (N+1)-bit representation of the 2^N + 1 residues;
* mapping the all-ones code to 0 in the reverse converter;
* Feynman gates as fan-out;
* tying the first carry of the modulo adders to 0;
* the channel-2 and channel-3 adders;
* the choice of addition as the channel operation in the top level;
* all default sizes.

Not included:

* the universal-gate (ordinary full adder) modulo adders and the Brent–Kung
  modulo 2^n − 1 prefix adder, which serve only as comparison points for the
  reversible adders;
* reversible carry-look-ahead, Kogge–Stone and Han–Carlson modular adders, and
  channel multipliers, which the source mentions without describing them.

On an FPGA the source reports the reversible-gate modulo adder as larger than
its universal-gate counterpart (245 LUTs against 59). It reports it as
slightly faster (12.47 ns against 12.596 ns) and as using less than half the
power. No such measurement was made for this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench compares
against integer arithmetic written independently of the RTL, and ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it covers |
|---|---|
| `tb_feynman_gate`, `tb_peres_gate`, `tb_hng_gate` | full truth tables, reversibility (outputs form a permutation), adder behaviour |
| `tb_rev_ripple_rows` | the HNG full-adder row and the Peres incrementer row, width 8 exhaustive |
| `tb_rev_csa_eac`, `tb_rev_csa_ceac` | width 4 exhaustive, width 8 random; `s = a^b^c` and the modular identity |
| `tb_rev_mod_adder` | width 8 exhaustive (exact output, including the all-ones zero), width 16 random |
| `tb_rev_modp1_adder`, `tb_rev_modp1_channel_adder` | exhaustive at widths 8 and 3 |
| `tb_rns_forward_converter`, `tb_rns_reverse_converter` | N,K = 2,−1, 3,1 and 4,4 exhaustive; the defaults on 30 000 random values |
| `tb_rns_rev_top` | the top at its defaults, end to end, 42 000 operand pairs; it also counts each mechanism (end-around carry, second zero code, channel-2 wrap, channel-3 carry and 2^N result, reverse-converter zero mapping) and fails any that never fires |
| `tb_rns_small_sets` | the top at N=2, K=−1 (moduli 3, 2, 5): all operand pairs, and the worked example 29 → residues 2, 1, 4 → 29; N=4, K=4 on random pairs |

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl tb/tb_rns_rev_top.sv \
              --top-module tb_rns_rev_top -Mdir obj && obj/Vtb_rns_rev_top

Each run finishes in well under a second.

## Files

`rtl/`: `feynman_gate`, `peres_gate`, `hng_gate` (gates);
`rev_ripple_adder`, `rev_ha_incrementer` (HNG and Peres rows);
`rev_csa_eac`, `rev_csa_ceac`, `rev_mod_adder`, `rev_modp1_adder`,
`rev_modp1_channel_adder` (modular adders); `rns_forward_converter`,
`rns_reverse_converter`, `rns_rev_top`. One module per file.
