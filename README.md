# Reconfigurable multiplier-less FIR filters (CSM, PSM and 2-parallel FFA)

An FIR filter `y(n) = sum_k h[k] x(n-k)` is dominated by its coefficient
multipliers. When the coefficients are fixed, each multiplier can be replaced
by a few shifts and adders. Once the coefficients must be programmable
(a multi-standard radio, say), that trick seems lost. This design keeps most of it.

In a transposed-form filter every tap multiplies the *same* sample `x(n)`.
So the small multiples of `x` that any coefficient is made of are computed
once, in one shared **shift-and-add unit**. Each tap then only *selects* and
*shifts* those multiples, under control of its stored coefficient, and
adds them up. Two ways of doing this are built:

* **CSM (constant shift method).** The coefficient is stored as it is. Its
  3-bit groups drive multiplexers, and the shifts between groups are fixed
  wiring. Short critical path, nothing to precompute.
* **PSM (programmable shift method).** The coefficient is first rewritten
  offline into at most five "binary common subexpression" operands. Each
  operand is a short bit pattern plus a position. The tap adds only those
  operands, through programmable shifters. Zero runs in the coefficient cost
  nothing, and 16-bit sign-magnitude coefficients fit in two 18-bit words.

A third filter, **ffa2_fir**, applies the 2-parallel fast FIR algorithm (FFA).
It takes two samples per clock and needs three half-length sub-filters instead
of four. Its sub-filters are CSM filters.

All three filters can be reprogrammed one coefficient word per clock while
data keeps flowing.

## Block map

```
fir_top
├── csm_fir      (N_TAPS taps, 8-bit unsigned coefficients)
│   ├── coef_lut         coefficient register array, write port
│   ├── shift_add_unit   0..7 times x, three adders, shared by all taps
│   ├── csm_pe  x N      muxes + hardwired shifts + adder, one per tap
│   └── tap_chain        transposed-form register/adder chain
├── psm_fir      (N_TAPS taps, 16-bit sign-magnitude coefficients as 2 x 18-bit rows)
│   ├── coef_lut (2*N_TAPS rows of 18 bits)
│   ├── shift_add_unit
│   ├── psm_pe  x N      5 x (mux + programmable shifter), adder, sign
│   └── tap_chain
└── ffa2_fir     (N_TAPS taps, 2 samples per clock)
    ├── pre-adder x(2k)+x(2k+1)
    ├── csm_fir H0 (N/2 taps), csm_fir H0+H1 (N/2 taps, 9-bit), csm_fir H1 (N/2 taps)
    └── delay D on H1, three post-adders
fir_pkg          LUT row types, BCS codes, reference coefficient encoder
```

`fir_top` only places the three filters side by side. They share clock and
reset, and each has its own ports (prefixes `csm_`, `psm_`, `ffa_`).

## Shared shift-and-add unit

`shift_add_unit` outputs `bcs[k] = k*x` for `k = 0..7`, each signed and
`DATA_W+3` bits wide. Only three adders are needed:
`3x = x+2x`, `5x = x+4x`, `7x = 3x+4x`. The other multiples are wiring:
`2x`, `4x`, `6x = 3x<<1` and `0`. A naive unit needs five adders. One unit
serves every tap of a filter, so its cost is shared.

## CSM tap (`csm_pe`)

The coefficient is cut into 3-bit groups from the MSB. Each group selects one
of `bcs[0..7]`. For 8 bits:

```
prod = (bcs[c[7:5]] << 5) + (bcs[c[4:2]] << 2) + bcs[c[1:0]]
        8:1 mux              8:1 mux              4:1 mux
```

The shifts never depend on the coefficient, so they are wires. Written for a
fractional coefficient `0.c7...c0`, this is `h*x = 2^-1 (A + 2^-3 B + 2^-6 C)`,
with `A`, `B`, `C` the selected group values. The RTL keeps everything as
integers (scaled by 2^8), so the product `DATA_W+COEF_W` bits wide is exact.
Any `COEF_W` works. The last group may have 1 to 3 bits, which gives a 2:1,
4:1 or 8:1 mux.

## PSM coefficient format and tap (`psm_pe`)

This is the least obvious part of the design. A coefficient is stored as
two LUT rows (types `psm_row0_t` and `psm_row1_t` in `fir_pkg`):

```
row 0 (18 bits):  S | D1 D1 D1 D1 X1 X1 | D2 D2 D2 D2 X2 X2 | M M M M L
row 1 (18 bits):  D3 D3 D3 D3 X3 X3 | D4 D4 D4 D4 X4 X4 | D5 D5 D5 D5 X5 X5
```

* `S` is the sign. The coefficient is sign-magnitude, with a 15-bit
  magnitude `M`: `h = S ? -M : M`.
* Each operand `i` has a 2-bit code `Xi` naming a 3-bit pattern, written with
  its leading `x` at the top:

  | `XX` | term            | pattern |
  |------|-----------------|---------|
  | `01` | x               | `100`   |
  | `10` | x + x>>1        | `110`   |
  | `11` | x + x>>2        | `101`   |
  | `00` | x + x>>1 + x>>2 | `111`   |

* `Di` (0..15) is how far the pattern's leading bit lies below bit 14 of the
  magnitude. Operand `i` contributes `pattern * 2^(12 - Di) * x`.
* `MMMML` holds one enable bit per operand: bit 4 enables operand 1 and
  so on, down to bit 0 (`L`) for operand 5. A disabled operand's mux outputs
  zero. A coefficient with fewer than five operands therefore causes no adder
  activity in the unused branches.

Example: `h = 5` is magnitude `000000000000101`. The only `1` run starts at
bit 2 with pattern `101`, so `D1 = 12`, `X1 = 11`, and the mask is `10000`.

Each `psm_pe` has five branches. In each branch a 4:1 mux picks `4x`, `6x`,
`5x` or `7x` from the shared unit, and a programmable right shifter applies
`Di`. The shifter works on `x` scaled by 2^15, so no bit is lost. The sum is
scaled back by 2^-3 and then negated if `S` is set. The product is
`DATA_W+19` bits wide, wide enough for any row contents. It is exact whenever
every operand lies inside the 15-bit magnitude.

**Producing the rows.** The rows come from an offline pre-analysis step,
which is not hardware. `fir_pkg::bcse_encode(h)` is a reference encoder for
`|h| < 2^15`. It scans the magnitude from the MSB. At each `1` it takes that
bit and the two bits below it as one operand, then jumps three bits. Fifteen
bits never need more than five operands. Other encoders are fine as long as
they produce the same operand meaning.

## Filter structure, coefficient loading and timing

`csm_fir` and `psm_fir` are transposed-form filters (`tap_chain`):

```
z[0] <= prod[0];   z[j] <= z[j-1] + prod[j];   data_out = z[N_TAPS-1]
```

Tap `j` holds `h[N_TAPS-1-j]`.

* **Loading.** When `program_en` is high at a rising edge, the word
  `filter_coeff` is written to `mult_address`. Address `a` holds
  `h[N_TAPS-1-a]`: write the *last* coefficient first at address 0.
  `psm_fir` takes one 18-bit row per write, with
  `mult_address = {coefficient index, row}`.
* **Data.** One signed sample per clock on `data_in`. `data_out` is
  registered: after the rising edge that samples `x(n)`, it shows `y(n)`.
  Latency is one clock, throughput one sample per clock.
* **Reconfiguration.** A new coefficient acts from the next clock. The chain
  still holds partial sums made with the old coefficients, so the output is
  a mix of old and new filters for `N_TAPS-1` clocks. A PSM coefficient is
  only consistent once both of its rows have been written.
* **Reset.** `rst` is synchronous and active high. It clears the chain and
  the LUT, which leaves an all-zero filter.
* **Widths.** Defaults are `N_TAPS = 72`, `DATA_W = 8` and `COEF_W = 8`.
  The CSM output has `DATA_W+COEF_W+clog2(N_TAPS)` bits (23 at the
  defaults). The PSM output has `DATA_W+19+clog2(N_TAPS)` bits. Neither
  filter can overflow.

## Two-parallel fast FIR (`ffa2_fir`)

The coefficients are split into even taps `H0` and odd taps `H1`, and the
samples into `X0 = x(2k)` and `X1 = x(2k+1)`. Then:

```
y(2k)   = H0*X0 + D(H1*X1)
y(2k+1) = (H0+H1)*(X0+X1) - H0*X0 - H1*X1
```

`D` is one clock, which is two sample periods. The hardware is one pre-adder,
three `N_TAPS/2`-tap CSM sub-filters, one register and three post-adders. The
middle sub-filter gets 9-bit samples (`x0+x1`) and 9-bit coefficients
(`h(2k)+h(2k+1)`).

* **Loading.** A write stores the pair `filter_coeff = {h(2k+1), h(2k)}` for
  sub-filter tap `k = mult_address`. The sum coefficient comes from one adder
  at write time.
* **Timing.** One pair `(x0, x1)` per clock. Outputs `(y0, y1)` for that pair
  appear after the second rising edge (two clocks of latency).
* **Widths.** The outputs are `DATA_W+COEF_W+2+clog2(N_TAPS/2)` bits wide.
  `N_TAPS` must be even.

## Where this RTL departs from, or fills in, the original description

* **Number format.** Samples are signed two's complement. CSM and FFA
  coefficients are unsigned. PSM coefficients are 16-bit sign-magnitude.
* **Output register.** The last adder of the chain is registered.
* **Reset.** A synchronous reset is added.
* **Write ports and address order.** The `{index, row}` addressing of the PSM
  LUT and the pair-write port of the FFA are this design's own. The address
  order `a -> h[N_TAPS-1-a]` reproduces the published 8-tap and 4-tap examples.
* **PSM operand count.** A block diagram of the PSM tap shows four
  mux/shifter branches. The text's worst case of five operands for a 16-bit
  coefficient is built instead (`N_OPS = 5`; fewer can be set).
* **Meaning of the PSM fields.** The bit reference of `DDDD` and the
  per-operand meaning of `MMMML` are interpretations (see above).
* **Resource figures.** The published synthesis counts imply an 8-bit
  coefficient port for the PSM filter too. This design uses the 18-bit
  two-row format described for it instead.
* **FFA equations.** The FFA uses the correct polyphase identity
  `Y1 = H0 X1 + H1 X0`. The sub-filters are CSM filters. The middle sub-filter
  is not made symmetric, because coefficients are programmable.
* **Not built.** There is no 6-parallel 72-tap FFA and no larger NxN
  cascade. The conventional multiplier-based FIR is not built either; it only
  serves as a comparison baseline.
* **Out of scope.** No BCSE pre-analysis hardware is built. It is a
  design-time step; `bcse_encode` is a stand-in.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block's outputs with plain integer arithmetic and prints
`TB_RESULT checks=N failures=M`.

| testbench           | what it checks |
|---------------------|----------------|
| `tb_shift_add_unit` | `k*x` for every 8-bit `x` |
| `tb_coef_lut`       | random writes with `we` low or high and out-of-range addresses, and reset |
| `tb_csm_pe`         | every 8-bit and 9-bit coefficient against random and extreme samples |
| `tb_psm_pe`         | random signed 16-bit coefficients through `bcse_encode`, five-operand worst cases, and removal of single operands by mask bits |
| `tb_csm_fir`        | the published 8-tap example (coefficients 7,6,8,5,7,2,2,1 at addresses 0..7; samples 1,12,...,71 give 1,14,47,104,234,410,669,984,1355), then random coefficient sets reloaded while data flows; one-clock latency |
| `tb_psm_fir`        | the published 4-tap example (coefficients 4,6,8,5; samples 1,3,8,5,5,5,5 give 5,23,70,111,125,127,115), then random signed coefficient sets |
| `tb_ffa2_fir`       | 8-tap FFA against a full-rate convolution, two-clock latency, all-255 coefficient sets |
| `tb_fir_top`        | all three filters at the default 72 taps at once; reprogramming, negative, five-operand and masked PSM coefficients, and FFA sum coefficients that need the 9th bit. Each of these must occur. |

Two further testbenches run workloads rather than blocks:

| testbench               | what it runs |
|-------------------------|--------------|
| `tb_table1_sizes`       | CSM and PSM filters built at 8, 16, 24, 48 and 72 taps, with random coefficient sets (uses the driver `size_run`) |
| `tb_published_examples` | the 8-tap and 4-tap examples above on the default 72-tap `fir_top`, with unused taps left at 0. The FFA filter runs the same 8-tap filter two samples per clock and must give the same nine outputs. |

Each testbench has a watchdog. After reconfiguration, the filter testbenches
skip comparisons until the chain has flushed. The transient mix of old and
new coefficients is therefore not checked value by value.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top -Mdir obj_top
./obj_top/Vtb_fir_top
```

Replace `tb_fir_top` with any other testbench name. The 72-tap end-to-end
test builds and runs in about ten seconds.

To change sizes, override the `fir_top` parameters `N_TAPS`, `DATA_W` and
`COEF_W`. All port widths follow from them. The PSM row format is fixed at
18 bits (`fir_pkg::PSM_ROW_W`).
