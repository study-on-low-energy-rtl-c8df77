# Latch-based TRNG with VN_8W von Neumann post-processing

A true random number generator has two parts here:

- **An entropy core.** Four small latches are each forced to resolve from
  near their metastable point. Their outputs are XORed into a raw bit,
  XOR-OUT.
- **A post-processor, VN_8W.** It removes whatever bias is left. It is an
  8-bit von Neumann extractor with a *waiting* strategy, so it reaches
  62.21 % extraction efficiency (ExE) on unbiased input. ExE is output bits
  per raw bit, and 62.21 % is about 2.5 times the 25 % of the classic 2-bit
  von Neumann scheme.

The waiting strategy works like this. An N-bit block whose Hamming-weight
class has a member count that is not a power of two cannot be mapped fully
onto output bits. The leftover choice is kept as a small *waiting flag*,
here a digit in base 7. Two such flags together give 49 cases, and those
are turned into 5 or 4 more output bits.

The post-processor is ordinary synthesizable logic. The entropy core is
analog in silicon. Here it is a behavioural model that reproduces its
statistics, so the complete chain can be simulated end to end.

```
 CLK1, CLK2 ──► 4 × [clock driver → ES latch → sense latch] ──► XOR ──► XOR-OUT
                                                                          │
 CLK1 ───────────────────────────────────────────────────────────────► VN_8W ──► DOUT/DVALID,
                                                                               DOUT_WAIT/DVALID_WAIT
```

| File | Module | Role |
|---|---|---|
| `rtl/trng_top.sv` | `trng_top` | core + VN_8W |
| `rtl/trng_core.sv` | `trng_core` | four entropy sources + XOR |
| `rtl/es_clock_driver.sv` | `es_clock_driver` | switch signals from CLK1/CLK2 |
| `rtl/es_latch.sv` | `es_latch` | behavioural entropy-source latch |
| `rtl/sense_latch.sv` | `sense_latch` | behavioural strong-arm read-out |
| `rtl/es_xor.sv` | `es_xor` | N-input XOR |
| `rtl/vn8w.sv` | `vn8w` | VN_8W post-processor |
| `rtl/vn8w_pkg.sv` | `vn8w_pkg` | shared types and widths |
| `rtl/vn_sipo8.sv` | `vn_sipo8` | 8-bit serial-in/parallel-out, frame strobe |
| `rtl/vn_4bit_logic.sv` | `vn_4bit_logic` | per-nibble N, D, W |
| `rtl/vn_8bit_logic.sv` | `vn_8bit_logic` | 5×5 Hamming-weight table |
| `rtl/vn_wait_flag.sv` | `vn_wait_flag` | stores one flag, pairs it with the next |
| `rtl/vn_wait_logic.sv` | `vn_wait_logic` | 49 flag pairs → 5/4/0 bits |

## VN_8W: von Neumann over eight bits

### Bit budget

There are 256 bytes. They fall into nine classes g0..g8 by Hamming weight
k. Class k has C(8,k) members, all equally likely whatever the bias of the
source. An output is unbiased exactly when each class is mapped one-to-one
onto output codes.

| class | members | output |
|---|---|---|
| g0, g8 | 1 | nothing |
| g1, g7 | 8 = 2³ | 3 bits |
| g2, g6 | 28 = 2² × 7 | 2 bits + base-7 flag |
| g3, g5 | 56 = 2³ × 7 | 3 bits + base-7 flag |
| g4 | 70 = 2⁶ + 2² + 2¹ | 6, 2 or 1 bits |

Across all 256 bytes this gives 890 direct bits and 168 flags. A pair of
flags gives 49 cases = 32 + 16 + 1, worth (32·5 + 16·4)/49 = 32/7 bits.
Each flag is therefore worth 16/7 bits. In total that is
(890 + 168·16/7) / (256·8) = 1274/2048 = 62.21 %.

For g4, the thesis considers a base-35 flag, or one or two base-7 flags. It
prefers plain 6/2/1-bit outputs, which cost almost no efficiency and need no
waiting hardware. This design does the same.

### Hamming-weight hierarchy

A 256-entry table is not built. The byte is split instead:

- The even bits go to one *4 Bits Logic* (A) and the odd bits to the other
  (B).
- Splitting adjacent bits apart also weakens lag-1 correlation in the raw
  stream.

Each 4 Bits Logic (`vn_4bit_logic`) emits three things for its nibble
X3..X0:

- `N`, the Hamming weight (0..4).
- `D = (X1 == X0) ? {X2,X2} : {X1,X0}`. These are two bits taken straight
  from the input symbols, as in the 4-bit von Neumann code assignment.
- `W = (X3 == X2) ? 0 : {X3,X2}`. This is a base-3 value (0, 1, 2) that
  tells members of a weight-2 nibble apart beyond `D`.

The *8 Bits Logic* (`vn_8bit_logic`) then only has to look at the pair
(NA, NB). That is a 5×5 table whose cells are wiring patterns of DA, DB, WA
and WB. For example, weight 1 has 4 members, so D enumerates them.
Weight-2 nibbles have 6 members, so D plus part of W is needed.

**DVALID** (rows NB, columns NA = 0..4; bit 5 on the left):

| NB \ NA | 0 | 1 | 2 | 3 | 4 |
|---|---|---|---|---|---|
| 0 | 000000 | 111000 | 001001 | 111000 | 000001 |
| 1 | 100110 | 011000 | 100110 | 111111 | 100110 |
| 2 | 000011 | 111000 | 111111 / 001010 | 111000 | 000011 |
| 3 | 100110 | 111111 | 100110 | 011000 | 100110 |
| 4 | 000001 | 111000 | 001001 | 111000 | 000000 |

**DWAIT**, the base-7 flag (valid only when NA + NB is 2, 3, 5 or 6):

- NB = 1 or 3 → `{0, DB}`
- NB = 2 → `{1, WB}`
- NB = 0 or 4 → `{1, WA}` if NA = 2, else `{0, DA}`

Values 0–3 and 4–6 are used, so each flag has 7 values.

**DOUT bit values are this design's own.** The valid masks and the flag
table above follow the thesis. The bit values at the valid positions are
chosen here. They are given in `rtl/vn_8bit_logic.sv` and follow three
rules:

1. Every cell uses input symbols only: DA, DB, WA bits, or a constant
   that tells apart the two cells of a class sharing a mask.
2. Within every class, each member gets a distinct (DOUT, DWAIT) pair.
3. The number of members per code is 1 for flagless classes and 7 for
   flagged ones. For flagged classes this means all 7 flag values occur
   with every code.

The centre cell (NA = NB = 2) has 36 members and is the only cell that
had to be split:

- **Two output bits.** The 4 members with WA = WB = 2 emit 2 bits
  (DA0, DB0).
- **Six output bits.** The other 32 emit `{1, c2, DA0, c1, DB0, c0}`. Here
  c indexes the eight remaining (WA, WB) pairs.

Together with the (1,3)/(3,1) cells (32 members, 6 bits each) and the
(0,4)/(4,0) cells (2 members, 1 bit), this realises g4 = 64 + 4 + 2.

### Waiting flags

`vn_wait_flag` holds one valid flag and raises **VF**. The next valid flag
completes the pair, and VF clears. `vn_wait_logic` maps the pair with two
patterns. DWAIT_1 is the older, stored flag; DWAIT_2 is the new one, and
treating the older flag as DWAIT_1 is this design's choice. The patterns
themselves follow the thesis's tables:

- **DWAIT_2 ≠ 6.** `DOUT_WAIT = {DWAIT_2[1:0], DWAIT_1}`. This is 5 bits,
  or 4 bits when DWAIT_2[2] = 1 (the top bit is then dropped).
- **DWAIT_2 = 6.** `DOUT_WAIT = {DWAIT_1[1:0], DWAIT_2[2]×3}`. This is 5
  or 4 bits depending on DWAIT_1[2], and 0 bits when DWAIT_1 = 6 as well.

That is exactly 32 five-bit codes, 16 four-bit codes and 1 empty case, each
code used once.

### Interface and timing (`vn8w`)

- **Input.** One raw bit per clock on `din`.
- **Framing.** `vn_sipo8` shifts the bits in (`word[7]` is the oldest) and
  raises a one-clock strobe every eighth clock. In silicon, the mapping
  logic runs from a gated clock, CLK7, for power. In this RTL that clock is
  an enable on the output registers.
- **Output timing.** Two clocks after the eighth bit of a frame,
  `dstb` pulses for one clock. `dout/dvalid` (6 bits) and
  `dout_wait/dvalid_wait` (5 bits) then hold that frame's results for
  8 clocks. `dvalid_wait` is non-zero only in the frame that completes a
  flag pair.
- **Read order.** Read the valid bits of `dout` from bit 5 down, then those
  of `dout_wait` from bit 4 down.
- **Reset.** `rst_n` is asynchronous and active low. It clears the frame
  counter, VF and all outputs.

## Entropy core

### ES latch and its phases

Each entropy source is a cross-coupled latch with three additions in each
inverter's feedback path:

- a gate capacitor C_G;
- a resistor R, built as a long transmission gate;
- three switches, S1–S3.

One conversion runs through four phases:

| phase | S1 | S3 | S2 | what happens |
|---|---|---|---|---|
| LR (equalization, low R) | on | on | off | each inverter is shorted to its own trip point; the offset is stored on C_G |
| HR (equalization, high R) | on | off | off | R in the loop makes a damped oscillation that amplifies thermal noise (σ ≈ 2.26 mV instead of ≈ 0.75 mV) |
| OFF | off | off | off | guard gap so equalization and evaluation never overlap |
| EVAL | off | – | on | the latch regenerates; SEN fires the sense latch |

Storing the trip points on C_G cancels 63.3 % of the inverter mismatch
(with C_G = 10 fF). The bit then follows the differential-buffer model:

`P(1) = Φ((1 − η) · d / σ)`

- d is the mismatch.
- η is the compensation efficiency, 0.633.
- σ is the noise, which is larger when the HR phase was run.

`es_latch` is a behavioural model of exactly this. On evaluation it draws
Gaussian noise with `$urandom` and drives its gate outputs to the rails.
`sense_latch` compares V_GL and V_GR one time unit after SEN rises.

### Clock driver

The two input clocks are read in Gray order. The mapping from clock states
to phases is this design's choice; the thesis only says that S1–S3 and SEN
are derived from CLK1/CLK2 with complementary pairs.

| CLK1 CLK2 | phase |
|---|---|
| 11 | LR |
| 10 | HR |
| 00 | OFF |
| 01 | EVAL |

The decode is:

- `S1 = CLK1`
- `S3 = CLK1 & CLK2`
- `S2 = SEN = ~CLK1 & CLK2`

Each output also has its complement. Skipping the `10` state gives a
conversion without the HR phase, which is useful for seeing what the noise
enhancement buys.

### XOR of four sources

XORing N independent sources with biases e_i leaves a bias of
2^(N−1)·Π e_i. So four moderately biased latches give a nearly unbiased
raw stream without any calibration loop.

The example mismatches are 3, −2, 4.5 and −1 mV (parameter
`ES_MISMATCH_MV`). They give individual P(1) values between 0.16 and 0.99
without HR, yet XOR-OUT has P(1) ≈ 0.497 with HR.

### Top level

`trng_top` clocks VN_8W with CLK1. Its rising edge opens LR, and at that
moment the sense latches still hold the previous conversion. Each
conversion therefore delivers one raw bit.

## How far to trust it

**Checked exhaustively:**

- every nibble of the 4 Bits Logic;
- the full DVALID and DWAIT tables;
- one-to-one mapping within every class;
- the 890/168 totals;
- all 49 flag pairs;
- all 256 bytes through `vn8w`.

**Checked statistically:**

- ExE of VN_8W at P(1) = 0.5, 0.54, 0.6, 0.7 and 0.8, with 160 k bits
  each. The measured values are 0.621, 0.619, 0.600, 0.532 and 0.418. The
  expected value is Σ_k C(8,k) p^k (1−p)^(8−k) b_k / 8, where b_k is the
  bit yield of class k, and the measured values match it within 0.01.
- ExE at P(1) = 0.27 and 0.73. These are the edges of the raw-bit range
  the entropy core is designed to stay within. Measured 0.502 and 0.503;
  expected 0.504. The core model at its defaults delivers 0.497, well
  inside that range.
- The output ones-fraction is 0.5 ± 0.01.
- Each source's P(1) and the XOR's P(1) match the Φ model above, both with
  and without HR.
- Decorrelation on a correlated stream. The test feeds 1.6 M raw bits from
  a Markov source whose lag-1 autocorrelation is 0.032 and gets about
  989 k output bits. Their lag-1 factor is −0.0034 and their lag-2 factor
  is +0.0015, about ten times below the raw factor.

**Departures from the thesis:**

- **DOUT bit values.** The DOUT bit values and the split of the centre cell
  are this design's own. They satisfy the same masks and the same
  efficiency, but the silicon may emit different codes for a given byte.
- **Residual correlation.** The fabricated design is reported to bring
  both factors inside the 95 % band of an uncorrelated 1 M-bit stream
  (±0.002). With this code assignment lag-1 sits just outside that band.
  Under correlated input the members of a weight class are no longer
  equally likely, and the way codes are assigned decides where that
  unevenness ends up.
- **Clocking.** The CLK1/CLK2 phase decode and the choice of CLK1 as the
  VN_8W clock are assumptions.
- **Analog core model.** The analog core is a statistical model only. It
  has no supply-voltage, temperature, aging or power-injection behaviour,
  and no energy figures.
- **Not built.** VN_4, VN_4W, IVN_7 and LFSR-16 appear in the thesis only
  as comparison designs, so they are not implemented.

## Simulating

Every testbench is self-checking and ends with a `TB_RESULT checks=…
failures=…` line. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl \
  rtl/vn8w_pkg.sv tb/tb_trng_top.sv --top-module tb_trng_top
./obj_dir/Vtb_trng_top
```

Replace the testbench name as needed. `-y rtl` lets Verilator find each
module in its own file. Only the package has to be named, and it must come
first.

| Testbench | What it covers |
|---|---|
| `tb_trng_top` | The whole chain at default parameters: 40 000 conversions with HR and 40 000 without. It checks ExE against the prediction at the measured raw P(1), and output balance. It counts every mechanism and fails if any never happened: 6/3/2/1/0-bit frames, 5/4/0-bit flag pairs, VF set, both core modes. |
| `tb_vn8w` | The post-processor alone: exhaustive byte sweep, frame spacing, and the ExE-versus-bias sweep. |
| `tb_vn8w_corr` | Decorrelation of a correlated raw stream: about 1 M output bits. It checks the lag-1 and lag-2 factors, output balance and efficiency. |
| other `tb_*` | The block of the same name. |

The random sources use `$urandom`, so results are reproducible for a given
simulator seed.
