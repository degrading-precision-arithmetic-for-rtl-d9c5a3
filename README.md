# Degrading-precision arithmetic for low-power DSP

Many signal-processing systems still produce a usable signal when their
arithmetic is slightly wrong. That slack can be spent on power. This RTL
implements two ways of doing so, after the methods of Petricca, Cardarilli,
Nannarelli, Re and Albicocco, "Degrading Precision Arithmetic for Low Power
Signal Processing":

* **DPA-I: disabled low-order logic.** A FIR filter can switch off the
  least-significant bits of its registers at run time. A disabled bit stops
  toggling, and the logic it feeds stops toggling too. A bit can be disabled in
  two ways. It can be *frozen*: its clock is gated, so it keeps its last value.
  Or it can be *forced to zero*: it is held in asynchronous clear.
* **DPA-II: lowered supply on a split carry chain.** A 20-bit adder is built from
  two cascaded 10-bit carry-propagate adders. It keeps its nominal clock
  (350 ps per addition) while its supply is lowered. At the lower supply the
  longest carries no longer arrive in time. Because of the split, they are
  mostly the carry from the low stage into the high stage. The error therefore
  lands at a known weight, 2^10 and a few bits above, and not at random in the
  top bits.

The two schemes are independent circuits. `dpa_top` holds them side by side.
They share only the clock and the reset.

## Hierarchy

```
dpa_top
├── dpa1_fir                 16-tap transposed FIR, degradable (DPA-I)
│   ├── dpa1_ctrl            level k + method -> per-bit gate/clear controls
│   ├── dpa1_coef_bank       16 coefficients, write port, force-to-0 mask
│   ├── dpa1_lsb_reg         input register x(t)
│   └── dpa1_tap  x16        a_j * x + z_{j+1} -> delay-line register
│       └── dpa1_lsb_reg     delay-line register z_j
└── dpa2_vos_model           registered CPA2x10b at a chosen supply (behavioural)
    └── dpa2_cpa2x           20-bit adder = two cascaded 10-bit stages
        └── dpa2_cpa  x2     10-bit carry-propagate adder (CPA10b)
dpa_pkg                      enums (method, supply), default sizes, delay table
```

Everything except `dpa2_vos_model` is ordinary synthesisable logic.
`dpa2_vos_model` is a behavioural model of circuit timing. It is written as
plain logic too, but its result only means something as a model.

## DPA-I: the degradable FIR filter

### Datapath

The filter computes y(t) = Σ a_j·x(t−j) over 16 taps. Samples x and
coefficients a_j are 10-bit two's complement; the delay line and the output are
20 bits. It uses the transposed form. The input register drives all 16
multipliers at once. Each tap adds its product to the partial sum of the tap
after it and stores the result:

```
z_15 <= a_15·x
z_j  <= a_j·x + z_{j+1}      j = 14 … 0
y     = z_0
```

The multipliers and adders are exact. Precision is lost only in the
registers: the input register `x(t)`, the 16 delay-line registers `z_j`, and the
coefficients as the multipliers see them.

### The level k and the two methods

`dpa1_ctrl` holds a level k (4 bits, 0 = exact) and a method. It turns them into
per-bit controls with a fixed granularity. x and a_j lose their k low bits. The
delay line loses its 2k low bits, because it carries products of two k-degraded
operands.

| register        | FREEZE (clock gating)      | FORCE0 (asynchronous clear)       |
|-----------------|----------------------------|-----------------------------------|
| input x         | k LSBs hold their value    | k LSBs cleared                    |
| coefficients    | untouched (they never change while filtering) | k LSBs masked to 0 |
| delay line z_j  | 2k LSBs hold their value   | 2k LSBs cleared                   |

Every bit of `dpa1_lsb_reg` is its own flip-flop. The control `hold[i]` becomes
a clock enable, which synthesis maps onto clock-gating cells. The control
`clr[i]` is ORed into that flip-flop's asynchronous reset. All controls come
straight from the flip-flops in `dpa1_ctrl`, so the asynchronous clears cannot
glitch. Forcing to zero acts at once; freezing acts from the next clock edge.

The coefficients are forced to zero by AND gates at the output of the
coefficient store, not by clearing the stored bits. As a result the stored
filter survives a stretch of degraded operation, and full precision returns as
soon as k is lowered, with no reload.

What the two methods do to the numbers:

* **Forcing to zero is truncation.** For an n-bit addition with k bits cleared
  in both operands, the worst error is 2(2^k − 1). For an 8-bit add with k = 4
  that is 30. For a multiplication it is (2^k − 1)(2(2^n − 1) − (2^k − 1)). For
  a 4×4 multiply with k = 2 that is 81: 15×15 = 225 becomes 12×12 = 144.
* **Freezing keeps stale low bits.** The error depends on the history of the
  signal, not only on the current value. For example, if x was 15 when its two
  low bits froze, a later x = 4 reaches the multiplier as 7, and 4×15 comes out
  as 105. With a smooth signal the stale bits are close to the true ones, so
  freezing gives a smaller mean error than forcing for the same k.

`tb_dpa1_fir` measures the mean |error| against the exact filter. It runs the
full-size filter, a 16-tap windowed-sinc low-pass and a two-tone input with
noise. The output full scale is 2^19.

| k | freezing | forcing-to-0 |
|---|---------:|-------------:|
| 1 | 279   | 1 052   |
| 2 | 787   | 2 935   |
| 3 | 679   | 10 703  |
| 4 | 2 076 | 20 528  |
| 5 | 3 271 | 30 594  |
| 6 | 7 439 | 63 344  |
| 7 | 23 214| 178 050 |

The exact numbers depend on the coefficients and the signal, which are this
testbench's own. The trends are what to expect from the two methods: freezing
is several times more accurate, and forcing loses a factor of two to three per
extra bit. The power saved is not modelled here. The published
characterisation of a similar filter reports about 3 % at k = 1, rising to
about 37–39 % at k = 7, with the two methods within 2 % of each other.

### Interface and timing (`dpa1_fir`)

* `x_vld`/`x`: a sample is taken into the input register on the clock edge
  where `x_vld` is high.
* The taps advance on the next edge, and `y_vld` marks the new `y` one cycle
  after that. The latency is two cycles; at most one sample per clock;
  samples may come with gaps.
* `coef_we`/`coef_addr`/`coef_data` write one coefficient per clock.
  Writing while the filter runs is allowed: for up to 16 outputs the result
  mixes the old and new filters, as in any transposed FIR.
* `cfg_we`/`cfg_k`/`cfg_method` set the level. It takes effect on the next
  edge. `k`/`method` read it back. After a change, outputs settle within
  16 samples: frozen or cleared bits are still in the delay line until then.
* The 20-bit sum wraps in two's complement. Size the coefficients so that
  Σ|a_j|·2^9 < 2^19 (for example, a filter with DC gain 1 in Q0.9 format).
* `rst_n` is an asynchronous, active-low reset of all registers. After reset,
  k = 0 and the coefficients are 0.

## DPA-II: the split adder at a lowered supply

### Why split the carry chain

A carry-propagate adder is clocked as fast as its longest carry path allows.
When the supply drops, every path slows down, and the additions whose carries
travel furthest come out wrong. In a single 20-bit adder built for speed, the
paths that fail first end in the top bits, so the first errors are huge (2^19).

The alternative is two identical 10-bit adders (`dpa2_cpa`, the CPA10b), the
low one's carry-out `c_mid` (c10) feeding the high one's carry-in
(`dpa2_cpa2x`, the CPA2x10b). With a clock period of about two stage delays,
lowering the supply until one stage alone fills the period makes the design
act as if `c_mid` were cut. Each stage still adds correctly, and the result
is short by exactly 2^10 when c10 = 1. The error now has a known weight.

### The timing model (`dpa2_vos_model`)

Gate delays cannot be expressed in RTL. This model captures what the output
register would hold one clock period (350 ps) after the operands are launched.
It uses these worst-case delays, in ps, from a SPICE characterisation of a
90 nm standard-cell implementation:

| supply | CPA10b stage | whole CPA2x10b |
|-------:|-------------:|---------------:|
| 1.0 V  | 195 | 350 |
| 0.9 V  | 245 | 435 |
| 0.8 V  | 300 | 540 |
| 0.7 V  | 400 | 725 |

The model follows each carry from the bit that generates it up through the
bits that propagate it. It adds a delay for every bit it passes:

* a bit of the low stage costs t_stage/10;
* a bit of the high stage costs (t_total − t_stage)/10 for a carry that came
  in through `c_mid`, and t_stage/10 for a carry born inside the high stage.

So the longest path, bit 0 to the carry-out, takes exactly t_total. A carry
whose arrival time is over 350 ps is captured as 0; the sum bit it feeds keeps
its half-sum value. This is the "cut carry" behaviour. The consequences:

* **1.0 V:** every path fits in 350 ps, so the adder is exact.
* **0.9 V:** c10 arrives after at most 245 ps. It then has 105 ps and gets
  5 bits into the high stage. Only carries that ripple beyond bit 15 are lost.
* **0.8 V:** c10 arrives at up to 300 ps. It gets 2 bits further (to bit 12).
* **0.7 V:** a single stage needs 400 ps. Carries of 9 bits or more are lost
  inside either stage, and c10 itself can be lost.

Examples, also checked in `tb_dpa2_vos_model`:
0x0FFFF + 1 = 0x10000 at 1.0 V, 0x00000 at 0.9 V, 0x0E000 at 0.8 V and 0x0FE00
at 0.7 V. 0x003FF + 1 keeps c10 at 0.8 V and loses it at 0.7 V (0x00200).

Two flags expose what happened: `late` (some carry was lost, so the sum is
wrong) and `mid_lost` (c10 was one of them).

**How far to trust the model.** It places errors where the split is meant to
put them. It does not reproduce how often they happen. With 1,000 random
operand pairs it gives 0, 0, 1 and 6 wrong sums at 1.0, 0.9, 0.8 and 0.7 V. The
characterisation reports 0, 131, 427 and 952. The gate-level adders were
synthesised for speed, so their delays do not grow in proportion to the
carry-chain length the way this per-bit model assumes. Flip-flops that miss a
carry also hold the previous operation's value, not 0. Use the model to reason
about where errors can appear, not about error rates or power. The power
figures themselves (about 0.83× at 0.9 V, 0.63× at 0.8 V and 0.46× at 0.7 V,
roughly V_DD²) are outside the RTL.

### Interface and timing (`dpa2_vos_model`, `dpa_top` ports `add_*`)

* `a`, `b` and `vdd_sel` are registered when `in_vld` is high.
* The result `s`/`cout`/`late`/`mid_lost` is captured one clock later.
* `s_vld` is high two clocks after `in_vld`. One addition per clock.
* `vdd_sel` (`dpa_vdd_e`: `VDD_1V0`, `VDD_0V9`, `VDD_0V8`, `VDD_0V7`) stands
  for the supply regulator. The regulator is not part of this logic.

## Top level (`dpa_top`)

The ports are the filter's, prefixed `fir_`, and the adder's, prefixed `add_`,
plus `clk` and `rst_n`. The parameters are `TAPS`, `XW`, `AW`, `YW`, `KW` and
`AddW`. Their defaults are the published sizes (16, 10, 10, 20; `KW` = 4; 20).

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_dpa1_lsb_reg`   | bit-level freeze / clear behaviour, including the clear acting between clock edges |
| `tb_dpa1_ctrl`      | the masks for k = 0…12 under both methods; the controls change only on a write |
| `tb_dpa1_coef_bank` | writes, and the force-to-0 mask applied without losing the stored values |
| `tb_dpa1_tap`       | the worked examples (225/144/105); the worst-case errors 30 and 81 over all operands; random gating against a bit-level reference |
| `tb_dpa1_fir`       | full-size filter against a register-level reference model and against exact convolution at k = 0; the two-cycle latency; the mean-error table above, with freezing required to beat forcing at every k |
| `tb_dpa2_cpa`, `tb_dpa2_cpa2x` | sums and carries against integer arithmetic |
| `tb_dpa2_vos_model` | captured sums against an independent carry-arrival calculation; exact at 1.0 V; the 1,000-vector experiment at each supply |
| `tb_dpa_top`        | both schemes end to end at default parameters (see below) |

Two assertions in the RTL are checked whenever a simulation runs with
`--assert`. `a_one_method` (in `dpa1_ctrl`) requires that no bit is frozen and
cleared at once. `a_latency` (in `dpa1_fir`) requires that every output comes
exactly two cycles after its sample.

`tb_dpa_top` runs the whole design with no parameter overrides. The filter
goes from exact, to freezing at k = 3, to forcing at k = 3 (switched while
samples flow), to forcing at k = 5, then through a coefficient reload, and
back to exact. Exact outputs must equal the convolution. Degraded outputs
must stay within the analytical bound
Σ_j(|a_j| + 2^9)(2^k − 1) + 16(2^(2k) − 1).
Meanwhile the adder runs at all four supplies. The testbench counts each
mechanism: exact filtering, freezing, forcing, the method switch, the reload,
sample gaps, exact additions, carries lost in the high stage, and c10 lost. A
mechanism that never occurs is a failure.

### Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/dpa_pkg.sv tb/tb_dpa_top.sv --top-module tb_dpa_top
./obj_dir/Vtb_dpa_top
```

To run another testbench, replace `tb_dpa_top`. `dpa_pkg.sv` must come first;
the other files are found by module name through `-y`. Every testbench runs
in well under a minute.

## Design choices

These follow the published method:
* the transposed form;
* 16 taps, 10-bit x and a_k, 20-bit output;
* granularity k / 2k;
* clock gating for freezing and asynchronous clears for forcing;
* no gating on the coefficients when freezing;
* two identical 10-bit stages with c10 between them;
* the 350 ps clock and the delay table.

These are this design's own:
* the signed two's-complement number format (the source describes numbers
  "normalised in [0, 1)" in two's complement);
* the valid strobes and the latencies;
* the write ports for the coefficients and the level;
* the level register and its 4-bit width;
* masking the coefficients at the store's output;
* wrap-around, not saturation, in the delay line;
* the asynchronous active-low reset;
* everything in the per-bit delay model of `dpa2_vos_model`.

Not included:
* the single-stage fast 20-bit adder the split adder is compared with;
* forcing disabled bits to one (only forcing to zero is built);
* any power model;
* the generation of the lowered supply.

The published work suggests adders whose carry chains can be reconfigured
for the available slack, as future work; that is not attempted here.
