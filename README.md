# Espresso keystream generators: Galois, Fibonacci and LFSR-filter forms

Espresso is a 128-bit-key stream cipher built around one 256-bit nonlinear
feedback shift register (NFSR) and a 20-input output filter. The same cipher
can be organised in hardware in very different ways:

* as the original **Galois** register, where 14 bits each have their own small
  feedback function;
* as **Fibonacci** registers, where all nonlinear feedback is collected at the
  top of two shift registers (Espresso-F);
* as a purely **linear** feedback shift register (LFSR) whose nonlinearity has
  been moved completely into a larger output filter (Espresso-L).

These forms trade area against clock rate, and they differ in how many
keystream bits can be produced per clock. This repository holds
synthesizable SystemVerilog for all three. Each has a serial mode (one bit
per clock, with a state register that FPGA tools can pack into
shift-register LUTs) and a parallel "hybrid" mode. The hybrid mode
initialises one round per clock and then produces W bits per clock. The
three generators sit side by side in one top level, `espresso_top`.

Galois Espresso and Espresso-L produce the same keystream. Espresso-F is a
related but different cipher. It uses the same filter on a different state,
so its keystream is different.

## The cipher in brief

State `x[255:0]`. The Galois form updates the state every round as follows.
Bit `a` in the update set U = {193, 197, 201, 205, 209, 213, 217, 231, 235, 239,
243, 247, 251, 255} takes `f_a(x)`. Every other bit takes the bit above it.

```
f255 = x0   ^ x41 x70                 f217 = x218 ^ x3 x32
f251 = x252 ^ x42 x83 ^ x8            f213 = x214 ^ x4 x45
f247 = x248 ^ x44 x102 ^ x40          f209 = x210 ^ x6 x64
f243 = x244 ^ x43 x118 ^ x103         f205 = x206 ^ x5 x80
f239 = x240 ^ x46 x141 ^ x117         f201 = x202 ^ x8 x103
f235 = x236 ^ x67 x90 x110 x137       f197 = x198 ^ x29 x52 x72 x99
f231 = x232 ^ x50 x159 ^ x189         f193 = x194 ^ x12 x121
```

The filter is

```
h = x80 ^ x99 ^ x137 ^ x227 ^ x222 ^ x187 ^ x243 x217 ^ x247 x231 ^ x213 x235
  ^ x255 x251 ^ x181 x239 ^ x174 x44 ^ x164 x29 ^ x255 x247 x243 x213 x181 x174
```

The cipher runs in three steps:

1. **Start.** The state is set to `x[127:0]` = key and `x[223:128]` = IV. Bits
   224 to 254 are set to one and bit 255 to zero.
2. **Initialisation.** The register is clocked 256 times with `h` XORed into
   `f255` and `f217`.
3. **Keystream.** From then on, `z_t = h(x)` of round `256 + t`.

## Three register organisations

### Galois (`espresso_galois`)

The Galois form is the direct form above. Its feedback logic is split into
14 small functions, so the logic depth is shallow and the clock rate high.
On LUT-based FPGAs this costs area: each small function takes a LUT of its
own.

### Fibonacci, Espresso-F (`espresso_fib`)

A monomial `m` can be moved from `f_a` to a higher function `f_b` by raising
each of its variable indices by `b - a`. The monomial then enters at the top
`b - a` rounds earlier, on the bits that will have shifted down by then.
Moving everything from `f251..f231` into `f255`, and everything from
`f213..f193` into `f217`, leaves two Fibonacci registers. Bits 0..217 are fed at
bit 217, and bits 218..255 are fed at bit 255:

```
f255 = x0 ^ x12 ^ x48 ^ x115 ^ x133 ^ x213
     ^ x41 x70 ^ x46 x87 ^ x52 x110 ^ x55 x130 ^ x62 x157 ^ x74 x183 ^ x87 x110 x130 x157
f217 = x218 ^ x3 x32 ^ x8 x49 ^ x14 x72 ^ x17 x92 ^ x24 x119 ^ x36 x145 ^ x49 x72 x92 x119
```

Espresso-F applies the unchanged filter `h` to this state and uses the same
loading and initialisation feedback. Because the filter reads a different
state, the keystream differs from Galois Espresso. Only two bits are written
by logic, so long runs of plain shift bits remain. That is what makes this
form the smallest on FPGAs.

### LFSR filter generator, Espresso-L (`espresso_lfsr`, `espresso_comp`)

This is the hardest part of the design to follow. Look again at the
Fibonacci `f255`: its nonlinear part is exactly the nonlinear part of `f217`
with every index raised by 38. When both registers are joined into a single
256-bit shift register, `f217` reduces to a plain shift. Its monomials then
travel on to bit 255, where they cancel the nonlinear part of `f255`. What
remains is a linear feedback:

```
x255' = x0 ^ x12 ^ x48 ^ x115 ^ x133 ^ x213
```

The nonlinearity does not disappear. It moves into the relationship between
the LFSR state `x` and the Galois state `x^`.

Consider a monomial `m` of `f_a` that has been moved to the top. An LFSR bit
`p > a` already contains the copy of `m` that the Galois register will only
add when that value reaches bit `a`, `p - a - 1` rounds later. Undoing this
gives the **compensation list** of bit `p`:

```
C[p] = XOR over a in U, a < p, a != 255, of m_a with all indices raised by p-a-1
x^   = x ^ C(x)          (C is empty for p <= 193)
```

Here `m_a` runs over every term of `f_a` except the shift input `x[a+1]`,
including the linear ones. All variables of `C` are LFSR bits below 213,
which shift exactly. So `x^` computed this way equals the Galois state round
for round (`tb_espresso_comp` checks this property on random states). The
filter of Espresso-L is `h(x^)`. Counting distinct LFSR bits, it reads 121 of
them.

Two things need care:

* **Loading (the SET cycle).** The key and IV arrive as a Galois state `g`,
  but the register must hold an LFSR state `l` with `l ^ C(l) = g`. `C` reads
  bits 194..212, which are themselves compensated. Those bits' own
  compensation, however, only reads bits below 194. The exact inverse is
  therefore `l = g ^ C(g ^ C(g))`. It is computed by two compensation
  networks in one extra controller state, SET, between LOAD and INIT.
  Applying `C` only once gives a wrong keystream.
* **Initialisation feedback.** To track the Galois initialisation, `h(x^)`
  is XORed into LFSR bits 255 and 217 during INIT. No compensation term
  reads bit 217, so the relation `x^ = x ^ C(x)` still holds.

The register cannot use shift-register LUTs, because SET rewrites every bit.
Together with the large filter, this makes Espresso-L the largest and
slowest of the three.

## Several rounds per clock

In WORK, each generator advances W rounds per clock and emits a W-bit word.
`ks[0]` is the oldest bit of the word. Initialisation always runs serially,
one round per clock, because the filter output feeds back into the state.

* **Galois, first update then filter.** Each updated bit `a` has W copies
  `f_a^j`. In copy `j`, every variable index is raised by `j`, and the copy
  writes bit `a-(W-1-j)`. All other bits take `x[i+W]`. This is exact only
  while no copy reads a bit that another function writes in the same cycle.
  The updated bits are 4 apart, so W is limited to 4.

  The filter cannot look ahead, because four of its taps (255, 247, 243 and
  213) are updated bits. Instead, the generator filters backwards on the new
  state: `h^-k` is `h` with every index lowered by `k`, which gives the
  filter output of `k` rounds ago. A word therefore holds the W rounds that
  end at the current state.

  As a result, the first WORK cycle has no complete word. From the second
  cycle on, words carry `z_1..z_W`, `z_(W+1)..z_2W`, and so on: the serial
  bit `z_0` is not delivered when W > 1. With W = 1 the output starts at `z_0`
  in the first WORK cycle.
* **Espresso-F, first filter then update.** The W filter copies read the
  states of the next W rounds directly, and W copies of each feedback
  function produce the next top bits. For W ≥ 6, copy `f255^5` needs `x218`
  of round 5, which `f217^0` computes in the same cycle. The two functions
  are therefore chained. The RTL evaluates W serial rounds as one
  combinational chain, which is the same logic. The first word, `z_0..z_(W-1)`,
  is valid in the first WORK cycle.
* **Espresso-L.** The register is linear, so it filters first and then
  updates, as Espresso-F does. Its W compensation networks and filters each
  read one of the next W LFSR states. The stream starts at `z_0` in the first
  WORK cycle.

## Controller and interface timing (`espresso_ctrl`)

Every generator has the same pins:

| pin | dir | meaning |
|---|---|---|
| `clk` | in | clock |
| `rst` | in | synchronous, active high; returns to IDLE |
| `din` | in | serial key/IV bit, sampled in every LOAD cycle |
| `ks[W-1:0]` | out | keystream word, `ks[0]` oldest; zero while not valid |
| `ks_valid` | out | `ks` holds keystream |
| `load` | out | high during LOAD |
| `work` | out | high during WORK |

The phases are sequenced by a 9-bit counter:

| phase | cycles | counter | what happens |
|---|---|---|---|
| IDLE | 1 | 0 | after reset |
| LOAD | 256 | 0..255 | the bit for cycle `c` is shifted into bit 255; after 256 cycles it sits in `x[c]` |
| SET (Espresso-L only) | 1 | 256 | LFSR state computed from the loaded state |
| INIT | 256 | 256..511 (257..511, 0 with SET) | one round per cycle with `h` fed back |
| WORK | until reset | held | W rounds per cycle |

LOAD ends when the counter reaches 256, and INIT ends when it wraps to 0 (to
1 with SET).

During LOAD, `din` must carry key bits 0..127 in cycles 0..127 and IV bits
0..95 in cycles 128..223. Cycles 224..255 are padding that the generator
inserts itself, and `din` is ignored then.

Measured from the first LOAD cycle, the first valid word appears:

| generator | first valid word |
|---|---|
| Galois, W = 1 | 512 cycles later |
| Galois, W > 1 | 513 cycles later |
| Espresso-F | 512 cycles later |
| Espresso-L | 513 cycles later |

The top level, `espresso_top`, has parameters `GW` (4), `FW` (16) and `LW` (16).
It prefixes each generator's pins with `g_`, `f_` or `l_`. The three
generators share only `clk` and `rst`.

## Shift-register LUT mapping (`fsr_reg`, `srl_fragment`)

On Xilinx FPGAs, a LUT can act as a 16-bit (4-input LUT) or 32-bit (6-input
LUT) shift register. The state bits of a serial generator fall into two
groups:

* **Terminal bits** are written by a feedback function or read by the
  feedback or the filter. They must stay flip-flops.
* **The remaining bits** form runs `R(a,b)` between two terminal bits, which
  only ever shift. The lowest bit of a run may still be read, since it is the
  run's output pin.

`fsr_reg` builds the state register accordingly. Terminal bits are
flip-flops. Each run of at least `SRL_MIN` bits becomes `srl_fragment`
instances: plain shift registers without reset, at most `SRL_MAX` bits long,
that carry a `shreg_extract` hint. Shorter runs stay flip-flops.

The terminal masks give 40 runs for the Galois register (longest 17 bits,
`R(141,159)`) and 41 for Espresso-F (longest 25 bits, `R(187,213)`). Three
FPGA families are covered by the parameters:

* 6-input-LUT FPGAs (Virtex-7): the defaults are `SRL_MIN = 4` for Galois and
  3 for Espresso-F, the smallest settings there.
* 4-input-LUT FPGAs (Spartan-3): use `SRL_MIN = 2` and `SRL_MAX = 16`.

The mapping applies to the serial generators (W = 1) only. A parallel
register loads every bit from W positions above, so it is always built from
flip-flops. `fsr_reg` asserts that its caller really only shifts the bits
it places in SRLs.

## Files

| file | content |
|---|---|
| `rtl/espresso_pkg.sv` | states, Galois term table, filter taps, terminal masks, load pattern |
| `rtl/espresso_ctrl.sv` | phase controller |
| `rtl/espresso_filter.sv` | filter `h` |
| `rtl/espresso_comp.sv` | Espresso-L compensation `x^ = x ^ C(x)` |
| `rtl/srl_fragment.sv`, `rtl/fsr_reg.sv` | state register with SRL fragments |
| `rtl/espresso_galois.sv`, `rtl/espresso_fib.sv`, `rtl/espresso_lfsr.sv` | the three generators |
| `rtl/espresso_top.sv` | the three side by side |
| `tb/espresso_ref_pkg.sv` | bit-level reference models (serial Galois, Fibonacci, LFSR rounds, `h`) |
| `tb/tb_ks_check.sv` | keystream and timing checker shared by the generator testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
To build and run one, for example the top level at its default widths:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_espresso_top rtl/espresso_pkg.sv tb/espresso_ref_pkg.sv \
    tb/tb_espresso_top.sv -o sim
./obj_dir/sim
```

To use a different width, override the generator's `W` parameter, or the
top's `GW`, `FW` and `LW`. `espresso_galois` accepts W = 1..4, and the other
two accept W = 1..64.

## What has been verified

Each generator is compared cycle by cycle with a serial reference model.
The reference is written separately from the RTL tables, straight from the
feedback equations. The comparison covers the keystream bits, the 256-cycle
load window and the latency to the first word. It runs with several keys,
including an all-zero key with an all-one IV. The widths covered are:

| generator | widths tested |
|---|---|
| Galois | 1 (with and without SRL mapping), 2, 4 |
| Espresso-F | 1 (with and without SRL mapping), 4, 5, 6, 8, 16 |
| Espresso-L | 1, 4, 8, 16 |

Espresso-L is checked against the Galois model and agrees bit for bit.
`tb_espresso_workloads` runs the ten configurations compared in the study
side by side: Espresso x1/x4, Espresso-F x1/x4/x8/x16 and Espresso-L
x1/x4/x8/x16. On top of the keystream checks, it verifies that each
configuration delivers W bits in every clock once its first word has come. The
top-level testbench runs all three generators at the default widths and
compares the Galois and Espresso-L streams with each other. It also restarts
the design with a reset in the middle of initialisation.

No official Espresso test vectors were available. The keystream is
therefore checked against an independent model of the equations above, not
against published vectors.

## Where this RTL departs from, or goes beyond, its source description

* **Espresso-L correction.** The SET cycle applies the compensation twice
  (`l = g ^ C(g ^ C(g))`). The source describes a single XOR with `C`, which
  is not exact for this register.
* **Espresso-L initialisation.** Espresso-L feeds `h` into bit 217 as well as
  bit 255 during initialisation. The source shows only the shift there, but
  Galois initialisation needs both injections.
* **Espresso-L filter size.** The compensated filter reads 121 state bits.
  The source quotes 104 and does not say how that count is reached.
* **Galois hybrid first bit.** The source states that the first hybrid
  word, sampled at the second WORK clock, is `z_0..z_(W-1)`. Its own
  update-then-filter construction, however, yields `z_1..z_W`. This RTL
  implements the construction, so the hybrid Galois stream omits `z_0`. See
  "Several rounds per clock".
* **No output pipeline.** The three-stage output pipeline of the original
  cipher's ASIC form is not used: on FPGAs the filter fits in two LUT levels.
* **Over-long runs.** A run longer than `SRL_MAX` is cut into `SRL_MAX`-bit
  pieces from its low end, and a remainder shorter than `SRL_MIN` stays in
  flip-flops. For the 17-bit Galois run this gives the same result as the
  source: one flip-flop plus one 16-bit SRL. With `SRL_MAX = 16`, the 25-bit
  Espresso-F run `R(187,213)` becomes a 16-bit and a 9-bit SRL. The source
  instead keeps bit 204 as a flip-flop and uses a 16-bit and an 8-bit SRL.
  In the Galois run `R(217,222)`, the source also keeps one extra flip-flop
  next to the updated bit 217 to save a logic level. Here the whole run is
  one SRL.
* **FPGA results not reproduced.** The RTL only expresses the SRL choice
  through structure and attributes. The final LUT/FF split, slice count and
  clock rate depend on the FPGA tool.
* **Choices of this design.** The reset style (synchronous, active high), the
  automatic IDLE→LOAD start, the internally generated padding, the
  `ks_valid` pin and the zeroing of `ks` outside valid cycles are not taken
  from the source.
