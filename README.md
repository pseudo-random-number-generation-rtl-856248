# Pseudo random integers from linear recurrences modulo 2^S

A linear feedback shift register (LFSR) gives good pseudo random *bits*, but
gluing consecutive bits into numbers destroys their uniform distribution. This
design takes the LFSR recurrence and evaluates it on S-bit integers rather than
on bits:

    u[n+d] = a[d-1]·u[n+d-1] + … + a[1]·u[n+1] + a[0]·u[n]   (mod 2^S)

Reduced modulo 2, this is an ordinary LFSR. Suppose the characteristic polynomial
`P(x) = x^d − a[d-1]x^(d-1) − … − a[0]` factors modulo 2 as `(x+1)^2·Q(x)`, with
`Q` irreducible of degree k. Then exactly one of the four polynomials
`P`, `P−2`, `P−2x` and `P−2x−2` gives a sequence that is uniformly distributed
modulo 2^s for every s. Every group of low bits of the words then takes all its
values equally often, so the S-bit words are pseudo random integers. The period
of the low s bits is of the order of 2^s·(2^(k+1)−2), so a large k gives an
astronomically long period (k = 1000 already gives more than 10^300).

The RTL builds this generator in the hardware forms that trade speed against
area. It comes with an example recurrence that is small enough to check by hand.

## The example recurrence

The defaults throughout use the order-6 recurrence

    u[n+6] = u[n+4] + u[n+3] + u[n+2] + u[n+1] + u[n]

Its polynomial `x^6 − x^4 − x^3 − x^2 − x − 1` is `(x^2+1)(x^4+x+1)` modulo 2, so
k = 4.

* **Modulo 2** it is a 6-register LFSR with 4 XOR gates. Seeded with the
  *impulse response* (IR) start 0,0,0,0,0,1, it gives
  `000001 011011 100111 110100 100011` and then repeats with period
  30 = 2^5 − 2. Every 30 consecutive bits hold 15 ones.
* **Modulo 2^S** the plain polynomial (`P_1`, coefficients a5..a0 = 0,1,1,1,1,1)
  is the uniformly distributed variant. Over one period of the IR sequence,
  each 4-bit value occurs exactly 15 times in the low 4 bits; the same holds
  for 6 and 8 bits. The period of the low s bits is 2^(s−1)·30.

Coefficients are parameters `COEF`, a packed array with `COEF[i] = a[i]` of
`CW = 2` bits each. Two bits are enough for the values 0..3 that the four
variants produce. Choosing the coefficients happens offline:

1. Find Q.
2. Form the four candidate polynomials.
3. Test which one is uniformly distributed, for example with the companion-matrix
   test `M^(2(2^k−1)) ≡ E (mod 4)` or by counting residues.

No hardware is provided for that search. Because the coefficients are constants,
synthesis removes the terms of zero coefficients and turns multiplications by 1, 2
and 3 into wiring and one adder. A sparse recurrence is therefore cheap.

## Four ways to compute the next member

### External form: `lrs_external` and `lfsr_external`

The direct reading of the recurrence uses D S-bit registers. They hold
u[n] … u[n+D−1], and the output end is r[0] = u[n]. A constant multiplier
forms each term a[i]·r[i], the terms are added, and the sum is shifted in at the
input end. `NET` selects the summing structure:

* `NET_CHAIN`: a serial chain of D−1 adders. The critical path grows linearly
  with D.
* `NET_TREE`: the same adders regrouped into a balanced tree
  (`lrs_sum_tree`). Modular addition is associative and commutative, so the
  result is identical. The depth is ceil(log2 D) adders, and the adder count
  does not grow; only the wiring is less regular.

`lfsr_external` is the 1-bit special case with an XOR chain. It is kept as a
module of its own because it is the reference structure of the example.

### Internal form: `lrs_internal`

The registers hold *partial sums* instead of past members:

    v[i] = a[0]·u[n−1−i] + a[1]·u[n−i] + … + a[i]·u[n−1]

The last one, v[D−1], equals u[n], which is the output. Advancing one step is

    v[0] ← a[0]·u[n]
    v[i] ← v[i−1] + a[i]·u[n]        for i = 1 … D−1

To see this, substitute the definition of v[i−1] and shift n by one. Between
any two registers there is one constant multiplier and at most one adder,
whatever the order D. The generator makes one new member per clock at a clock
rate that does not depend on D. With `S = 1` the module is the internal
(Galois) LFSR, and the top uses it that way.

**Seeding and the output offset.** Past members are not stored, so the
initial values u[0..D−1] cannot simply be loaded. Instead, while `load_i` is
high the feedback is switched off and the registers form a shift chain that
`din_i` enters at v[0]. Shifting in a 1 followed by D−1 zeros leaves v[D−1] = 1
and all other partial sums 0. That is exactly the state of the IR sequence at
member u[D−1], since every earlier member is 0. The internal form therefore
outputs u[D−1], u[D], …, the external form's stream without its D−1 leading
zeros. Other loaded words are partial sums, not sequence members.

### Segmented internal form: `lrs_internal_seg`

For 1024-bit words, D full-width adders are too large. This form processes
each word one `SEG`-bit segment per clock, low segment first. By default that is
16 segments of 64 bits.

* Each v[i] is a shift register of S/SEG segments. It moves down one segment
  per clock, and its new segment enters at the high end. In clock j of a round,
  the low segment of every register is its old segment j.
* Adder i computes `v[i−1].seg[j] + a[i]·u.seg[j] + carry[i]`, which is
  SEG+CW+1 bits wide. Here u.seg[j] is the low segment of v[D−1]. The low SEG
  bits become the new segment j. The upper bits are the carry into segment j+1.
  One carry covers both the multiplier and the adder, and CW+1 bits are enough
  for it.
* After the last segment the carry is dropped, which gives arithmetic modulo
  2^S. After S/SEG clocks every register holds its next value.

The rate is one S-bit member per S/SEG enabled clocks, with D adders of
SEG+CW+1 bits. `word_valid_o` marks the first clock of a round. In that clock
`u_o` holds the whole current member. `u_seg_o` always shows the segment being
processed and `seg_o` its index.

`load_i` is sampled only at segment 0. A round that starts with it high is a
seeding round: `din_seg_i` supplies the segments of one word, which is shifted
into v[0]. Seeding the IR sequence takes D rounds (the word 1, then D−1 zero
words). The output offset is the same as in `lrs_internal`.

## The top: `prng_top`

`prng_top` runs every form side by side on one clock and seeds them together:

| output | generator | first member after seeding |
|---|---|---|
| `lfsr_ext_o` | `lfsr_external`, 1 bit | u[0] mod 2 |
| `lfsr_int_o` | `lrs_internal` at S = 1 | u[5] mod 2 |
| `ext_chain_o` | `lrs_external`, adder chain | u[0] |
| `ext_tree_o` | `lrs_external`, adder tree | u[0] |
| `int_o` | `lrs_internal` | u[5] |
| `u_seg_o`, `seg_part_o` | `lrs_internal_seg` | u[5], one member per 16 clocks |

A one-clock pulse on `start_i` starts two small sequencers:

* The one-member-per-clock generators are seeded in D = 6 clocks. The external
  forms get 0,0,0,0,0,1 and the internal forms get 1,0,0,0,0,0. Then
  `words_ready_o` rises.
* The segmented generator is seeded in D rounds (96 clocks), after which
  `seg_ready_o` rises. `seg_valid_o` marks clocks in which `u_seg_o` is a
  complete member.

A restart that arrives in the middle of a segmented round first lets that
round finish. Seeding then always begins at segment 0, and `seg_ready_o` is low
meanwhile. Once the generators are ready they advance while `run_i` is high;
`run_i` low stalls them.

Parameters of the top, and of every generator:

| parameter | default | meaning |
|---|---|---|
| `S` | 1024 | word width: the generators produce integers modulo 2^S |
| `SEG` | 64 | segment width of the segmented generator (must divide S) |
| `D` | 6 | order of the recurrence |
| `CW` | 2 | bits per coefficient |
| `COEF` | a5..a0 = 0,1,1,1,1,1 | the recurrence (`prng_pkg::EX_COEF`) |
| `NET` | `NET_CHAIN` | `lrs_external` only: chain or tree |

Shared constants and the `net_e` type are in `rtl/prng_pkg.sv`. To generate a
different recurrence, override `D`, `CW` and `COEF` together. For example,
`COEF = '{0,1,1,1,3,3}` gives the P−2x−2 variant of the example.

All registers use an asynchronous active-low reset, `rst_n`, and reset to zero.
The all-zero state is a fixed point, so every generator must be seeded before
use.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compute
their expected values from the recurrence directly, with no shared code, and
end by printing `TB_RESULT checks=… failures=…`.

* `tb_lfsr_external` checks the LFSR against the 36 listed bits of the example
  sequence, the period of 30 and the 15 ones per period. It also checks random
  seeds and a stall.
* `tb_lrs_sum_tree` compares the tree with a running sum for 6×1024-bit,
  5×8-bit and 1×16-bit inputs, including wrapping sums.
* `tb_lrs_external` runs 2000 members of the chain and tree forms at 1024 bits
  for P_1 and P−2x−2, past the first wrap modulo 2^1024. It checks the uniform
  distribution of the low 4 bits over one period and the return to the seed
  after 240 members, plus random seeds and stalls.
* `tb_lrs_internal` runs the 1024-bit internal form for both coefficient sets,
  and the 1-bit internal LFSR against the listed bits.
* `tb_lrs_internal_seg` runs the default generator (1024/64) and a 64/8
  generator with coefficients up to 3, with random stalls inside rounds. It
  checks every member, the round length of S/SEG clocks and the segment
  stream.
* `tb_prng_top` is the end-to-end test at the default parameters. It runs
  40,000 clocks with random stalls and restarts both at a segment boundary and
  inside a round. All six outputs are checked against the reference, and it
  confirms that words wrap modulo 2^1024 in both the one-per-clock and the
  segmented generators.
* `tb_prng_order9` builds the top for a second recurrence of order 9, at
  16-bit words and 4-bit segments. The recurrence is
  P = (x^2+1)(x^7+x+1), coefficients a8..a0 = 0,1,0,0,0,1,1,1,1. The test
  checks every output against the recurrence, the LFSR period of 254 with 127
  ones, and that each 4-bit value occurs exactly 127 times in the first 2032
  members.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wall -Wno-fatal \
        rtl/prng_pkg.sv rtl/lfsr_external.sv rtl/lrs_sum_tree.sv \
        rtl/lrs_external.sv rtl/lrs_internal.sv rtl/lrs_internal_seg.sv \
        rtl/prng_top.sv tb/tb_prng_top.sv --top-module tb_prng_top
    ./obj_dir/Vtb_prng_top

Replace the testbench file and top module name to run the others. Each
testbench finishes in under a second of simulation. Building the 1024-bit ones
takes a minute or two.

## Choices made here, and limits

The recurrence algebra, the example recurrence, and the four structures
(external form with an adder chain, operation network, internal form, and
segment-at-a-time addition) follow the published construction. This design
chose the following:

* which of the four variants of the example is used (P_1, found by counting
  residues);
* the seeding schemes, the seeding sequencers and the run/stall control;
* the reset behaviour and the 64-bit segment width;
* the shape of the adder tree and the carry organisation of the segmented adders;
* the side-by-side arrangement in the top.

The specific points:

* **Pipelining.** The one-member-per-clock generators have no pipeline
  registers. The external form's critical path is one multiplier plus the
  adder chain or tree. The internal form's path is one multiplier and one
  adder.
* **Coefficients are fixed at elaboration.** There is no run-time coefficient
  port.
* **No coefficient search hardware.** Testing a candidate recurrence for
  uniform distribution involves powers of a k×k matrix modulo 4. It is a large
  computation, done once per recurrence, and is not part of this RTL. Neither
  is the search for Q.
* **Speed-ups are not demonstrated.** Gains over a software implementation
  depend on the FPGA and its clock. The RTL fixes only the cycle counts: one
  member per clock, or one per S/SEG clocks.
* **Large orders.** Every module is parameterized in D. The default holds
  only the order-6 example. A recurrence of order 10,000 on 1024-bit words
  would need 10.24 Mbit of register state per generator, which calls for a
  memory-based rather than register-based organisation. That organisation is
  not provided.
