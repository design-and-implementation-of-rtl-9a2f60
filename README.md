# Complex multiplier / digital mixer with Booth–Wallace multipliers

A digital receiver moves a signal down to baseband by multiplying each
complex input sample `I + jQ` by the conjugate of a local oscillator phasor,
`cos − j·sin`, supplied by a numerically controlled oscillator (NCO):

```
(I + jQ)(cos − j·sin) = (I·cos + Q·sin) + j(Q·cos − I·sin)
```

This RTL computes that product with four parallel multipliers, one adder and
one subtractor. Each multiplier combines radix-4 Booth recoding (half as many
partial products) with a Wallace tree of carry-save adders (a logarithmic
number of adder layers), so that the product is formed in few logic levels.
The whole datapath is combinational and exact. Its width is one parameter,
`N`. The intended resolutions are 4, 8, 16, 32 and 64 bits, and the default
is 32.

## Top level: `mixer`

| port      | dir | width  | meaning                                             |
|-----------|-----|--------|-----------------------------------------------------|
| `i_in`    | in  | N      | in-phase data sample, two's complement              |
| `q_in`    | in  | N      | quadrature data sample                              |
| `cos_in`  | in  | N      | NCO cosine                                          |
| `sin_in`  | in  | N      | NCO sine                                            |
| `mode`    | in  | 2      | `mixer_pkg::mix_mode_e`, see below                  |
| `real_in` | in  | 1      | 1: real input, the Q data path is forced to 0       |
| `i_out`   | out | 2N+1   | `I·cos + Q·sin`, exact, two's complement            |
| `q_out`   | out | 2N+1   | `Q·cos − I·sin`, exact, two's complement            |

There is no clock, reset or register. The outputs follow the inputs after the
combinational delay of one multiplier plus one adder. If you need pipelining,
add registers around the instance. The NCO is not part of this RTL: drive
`cos_in`/`sin_in` from your own oscillator.

Each output is one bit wider than a product. The sum of two 2N-bit signed
products can need 2N+1 bits, for example when all four operands are −2^(N−1).
No rounding or truncation is done; take the upper bits you need.

### Modes

| `mode`           | multiplier operands                    | outputs                          |
|------------------|----------------------------------------|----------------------------------|
| `MIX_NORMAL` (0) | data and NCO as given                  | the mixed product                |
| `MIX_DIS_OSC` (1)| cos ← all ones, sin ← 0                | `i_out = −I`, `q_out = −Q`       |
| `MIX_DIS_DATA` (2)| I ← all ones, Q ← 0                   | `i_out = −cos`, `q_out = +sin`   |
| 3                | treated as `MIX_NORMAL`                |                                  |

`real_in` forces Q to 0 in any mode. The result is then `I·(cos − j·sin)`.

**The bypass modes pass the signal through sign-inverted.** They work by
replacing one operand pair with a constant "one" and zero. The constant is
all ones, the 16-bit `0xFFFF` pattern generalised to N bits. In two's
complement, all ones is −1. So the bypassed signal reaches the output exactly,
at full precision, but negated. The constant is the `BYPASS_ONE` parameter of
`mixer` (passed to `mode_sel`). You can change it, for example to `2^(N−1)−1` for a Q1.(N−1)
"almost one", which gives a scaled, non-inverted pass-through.

## Inside the multiplier (`wbm`)

`wbm` forms the 2N-bit signed product of two N-bit signed operands in three
combinational stages:

1. **Booth recoding (`booth_pp`).** The multiplier `b` gets a 0 appended below
   its LSB and is read in N/2 overlapping three-bit groups
   `{b[2g+1], b[2g], b[2g−1]}`. Each group becomes one digit in {−2, −1, 0,
   +1, +2}:

   | group     | digit | partial product |
   |-----------|-------|-----------------|
   | 000, 111  | 0     | 0               |
   | 001, 010  | +1    | +A              |
   | 011       | +2    | +2A             |
   | 100       | −2    | −2A             |
   | 101, 110  | −1    | −A              |

   A run of ones in `b` therefore costs one subtraction where it starts and
   one addition past its end. That is why only N/2 partial products are
   needed, instead of N. `−A` is computed once by the two's complement unit
   (`twos_comp`), at N+1 bits so that −(−2^(N−1)) still fits. Every partial
   product is sign-extended to the full 2N bits and shifted left by 2g.
2. **Wallace tree (`wallace_tree`, `csa`).** A carry-save adder takes three
   vectors of the same weight. It returns a sum vector and a carry vector: the
   carries are not passed along the row but collected and shifted one place
   left. Each tree layer groups its vectors in threes. Leftover vectors (count
   mod 3) go to the next layer unchanged. Layers repeat until two vectors
   remain, so for N = 32 the 16 partial products are reduced
   16 → 11 → 8 → 6 → 4 → 3 → 2 in six full-adder delays. The layer sizes are
   computed at elaboration by functions in `mixer_pkg`.
3. **Final adder (`add_sub` in add mode).** A ripple-carry adder turns the
   sum and carry vectors into the product.

All vectors in the tree are 2N bits wide, and carries out of the top bit are
dropped. This is exact because the true product always fits in 2N bits, and
two's complement addition is correct modulo 2^2N.

## Other blocks

* `add_sub`: a W-bit ripple-carry adder/subtractor. `sub = 1` inverts `b` and
  sets the carry in. Besides the W-bit result `s` and the carry out `cout`, it
  gives `s_ext`, the exact W+1-bit signed result. The top bit of `s_ext` is
  `a[W−1] ^ b'[W−1] ^ cout`. The mixer takes its 2N+1-bit outputs from
  `s_ext`.
* `twos_comp`: `y = −x` by inversion and an incrementer chain.
* `mode_sel`: the operand multiplexer for the modes and for `real_in`.
* `mixer_pkg`: the mode enum and the Wallace-tree layer functions.

Hierarchy:

```
mixer
├── mode_sel
├── wbm ×4  (I·cos, Q·sin, Q·cos, I·sin)
│   ├── booth_pp ── twos_comp (N+1 bits)
│   ├── wallace_tree ── csa × (N/2 − 2)
│   └── add_sub (2N bits, add)
├── add_sub (2N bits, add)       → i_out
└── add_sub (2N bits, subtract)  → q_out
```

## Parameters

| module         | parameter    | default | notes                                         |
|----------------|--------------|---------|-----------------------------------------------|
| `mixer`        | `N`          | 32      | data width; even, ≥ 4; 4/8/16/32/64 intended  |
| `mixer`, `mode_sel` | `BYPASS_ONE` | all ones | constant used as "one" by the bypass modes |
| `wbm`, `booth_pp` | `N`       | 32      | operand width, even, ≥ 4                      |
| `wallace_tree` | `W`, `M`     | 64, 16  | vector width, number of input vectors         |
| `add_sub`      | `W`          | 64      |                                               |
| `twos_comp`    | `W`          | 32      |                                               |
| `csa`          | `W`          | 64      |                                               |

## Where this RTL goes beyond, or departs from, the published design

The equations, the four-multiplier/adder/subtractor structure, the three
modes, real input, the Booth + Wallace-tree multiplier with a final adder,
the separate two's complement and add/subtract units, and the 2N+1-bit
outputs all follow the published design. The following are choices made
here:

* **Number format.** All data are two's complement signed.
* **Booth radix.** Radix-4 (modified) Booth, with fully sign-extended
  partial products. The published tree example is an unsigned 8×8 multiply
  without Booth, with partial products 8 to 15 bits wide. This tree uses
  uniform 2N-bit vectors instead.
* **Tree pairing.** The 3:2 layering is a regular one. The layer count for
  eight inputs (four CSA layers) matches the published example, but the
  exact grouping of vectors does not.
* **Adders.** Ripple carry, for both the final adder and the add/subtract
  unit. For large N the ripple final adder dominates the delay of each
  multiplier. A faster carry-propagate adder, such as a prefix adder, can replace
  `add_sub` there without changing anything else.
* **Placement of the two's complement unit.** It forms the Booth negative
  multiple inside each multiplier. The subtraction `Q·cos − I·sin` is done
  by `add_sub` in subtract mode.
* **Mode encoding and bypass sign.** Both are described above.
* **No registers.** The published material reports combinational delays and
  shows the outputs of its waveform test changing together with the inputs.
  This RTL is likewise combinational.
* **Reference values.** The published 32-bit waveform test shows partial
  products whose upper halves differ from exact multiplication. This RTL is
  exact instead. The testbench applies the same operands and checks the
  exact result.
* **Not built.** The NCO and the "overturned-stairs" tree, a more regularly
  routed variant of the Wallace tree, are only named in the source, and the
  FPGA I/O buffers are vendor primitives.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench              | what it checks                                                   |
|------------------------|------------------------------------------------------------------|
| `tb_csa`               | `s = x^y^z` and `s + c = x + y + z`, random and corners, 64 bits |
| `tb_add_sub`           | add/sub, carry, exact signed result; 64-bit random, 4-bit exhaustive |
| `tb_twos_comp`         | `y = −x`; 32-bit random/corners, 8-bit exhaustive                |
| `tb_booth_pp`          | each partial product against its Booth digit; sum = a·b; 8-bit exhaustive, 32-bit random |
| `tb_wallace_tree`      | sum + carry = sum of inputs, for 16×64, 8×16 and 3×8 trees       |
| `tb_wbm`               | products: 4- and 8-bit exhaustive, 32- and 64-bit random/corners |
| `tb_mode_sel`          | operand selection for every mode and `real_in`                   |
| `tb_mixer`             | the default 32-bit mixer end to end (see below)                  |
| `tb_mixer_resolutions` | the mixer built at N = 4 (exhaustive), 8, 16 and 64              |

`tb_mixer` runs the top at its default parameters. It uses the operand set
of the published 32-bit test, 4-, 8- and 16-bit data sign-extended into the
32-bit datapath, extreme values, and random operands in every mode. It counts
each mechanism: normal mix, both bypass modes, real input, a negative result,
and a result that needs the (2N+1)-th bit. It fails if any of them never
occurs.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl \
    --top-module tb_mixer rtl/mixer_pkg.sv tb/tb_mixer.sv
./obj_dir/Vtb_mixer
```

Replace `tb_mixer` with any testbench name. Every testbench completes in
seconds. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/mixer_pkg.sv rtl/mixer.sv`. The
remaining lint warnings are unused signals: the carry outputs and 2N-bit
results of adders whose exact W+1-bit result (or nothing beyond the W-bit sum)
is used.
