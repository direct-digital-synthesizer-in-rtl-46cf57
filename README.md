# RNS direct digital synthesizer with CRT residue-to-analog conversion

A direct digital synthesizer (DDS) adds a frequency control word (FCW) `A`
to a phase register every clock, modulo `M`. The phase then ramps through
`0 .. M-1` at `f_out = f_clk * A / M`, and a converter turns it into a
voltage. In binary, the phase adder's carry chain sets the clock rate, and
the converter usually needs a ROM and a wide DAC.

This design keeps the phase in a **residue number system (RNS)**. A value
`X < M` is stored as its remainders `x_i = X mod m_i` for a few small,
pairwise coprime moduli, with `M = m_1 * m_2 * m_3`. Additions and
multiplications then work on each 5-bit residue alone, with no carries
between channels. The phase is never converted back to binary. Each residue
goes through a tiny ROM that holds its **Chinese remainder theorem (CRT)
partial sum**. Each partial sum drives its own DAC, an op-amp adds the DAC
voltages, and an analog folding stage removes whole multiples of `M`. The
only wide addition in the design is done by the amplifier.

```
 fcw ─► bin2rns ─► rns_phase_acc ─► rns_processor ─► crt_rom ─► partial_dac ─┐
 (binary)  (B-bit     (one FSM per     (offset, mod,   (one per   (one per    ├─► summing_amp ─► analog_folding ─► x_out
           formats)    modulus)         amplitude)      channel)   channel)   ┘     (-Σ v_i)       (|v| mod M·V_LSB)
```

`x_out` is a sawtooth: the phase ramp `X * V_LSB`. The digital blocks
are synthesizable. The DACs, the summer and the folding stage are analog;
they are given as behavioural models with `real` ports.

## The number system used

| item | value |
|---|---|
| channels | 3 |
| moduli `m_1, m_2, m_3` | 32, 31, 29 (`m_1 = 2^(p+2)` with p = 3; 31 and 29 are primes) |
| residue width `k` | 5 bits |
| dynamic range `M` | 28768 phase states (< 2^15) |
| FCW and partial-sum width | 15 bits = 3k |

The moduli are this design's choice. They were picked for two reasons:
every residue fits in `k = 5` bits, and `M` fits in `3k` bits. Each channel's
ROM is then `2^k` words of `3k` bits, the size the architecture asks for.
They are set in `rtl/rns_pkg.sv`, and all modules take them as parameters.

## The CRT partial sums and the analog addition

This is the part that replaces the residue-to-binary converter. Let
`M_i = M / m_i`, and let `|M_i^-1|_{m_i}` be the inverse of `M_i` modulo
`m_i`. The CRT gives

```
X = | S_1 + S_2 + S_3 |_M ,   S_i = | x_i * |M_i^-1|_{m_i} |_{m_i} * M_i   (0 <= S_i < M)
```

`crt_rom` stores `S_i` for every possible `x_i`: 32 words of 15 bits per
channel, computed at elaboration. Per channel:

| m_i | M_i | inverse | CRT weight |
|---|---|---|---|
| 32 | 899 | 11 | 9889 |
| 31 | 928 | 15 | 13920 |
| 29 | 992 | 5 | 4960 |

Worked example for `X = 1000`:

| channel | x_i | S_i |
|---|---|---|
| 1 | 8 | (8·11 mod 32)·899 = 21576 |
| 2 | 8 | (8·15 mod 31)·928 = 25056 |
| 3 | 14 | (14·5 mod 29)·992 = 11904 |

The sum is 58536. Subtracting 2·M = 57536 leaves 1000.

The sum of the three partial sums is at least 0 and below `3M`, so the
folding stage removes 0, 1 or 2 spans of `M * V_LSB`. All DACs use the same
`V_LSB`, so the voltages add exactly as the integers do. The inverting
summer drawn with equal resistors `R_F` has a gain of -1. The folding model
therefore folds the magnitude of its input, and the result is again
`X * V_LSB`. `fold_count` reports the number of spans removed, for
observation.

The analog chain's delay is `t_rom + t_DAC + t_summer`. The models include
`T_DAC` (0.2 ns) and `T_SUM` (0.3 ns); the ROM delay is one clock.

## Digital blocks

**`bin2rns`** converts the binary FCW by distributed arithmetic. The 15-bit
word is cut into three 5-bit formats `f_j` with weights `2^(5j)`. For every
channel and format, a 32-entry table holds `|f * 2^(5j)|_{m_i}`. The three
table outputs are added modulo `m_i` by add-and-correct steps. The result is
registered. The FCW may be any 15-bit value; values at or above `M` act as
`fcw mod M`.

**`rns_phase_acc`** is one finite state machine per modulus. Its state is
the phase residue and its input is the FCW residue. Its next state is
`|state + input|_{m_i}`, written as a 6-bit add followed by a conditional
subtract of `m_i`. This is the whole critical path of the accumulator,
however large `M` is. `en` holds the phase. An assertion checks that each
state stays below its modulus.

**`rns_processor`** applies the controls, all given as residues:
`y_i = | amp_i * | phase_i + ofs_i + mod_i |_{m_i} |_{m_i}`. Here `ofs` is a
static phase offset, `mod` is a per-clock phase-modulation word, and `amp`
is a scale factor. Setting `amp = 1` and `ofs = mod = 0` passes the phase
unchanged. As with any RNS multiplication, the result equals the true
product only while the product stays below `M`; otherwise it wraps modulo
`M`.

## Timing

All registers are rising-edge, with a synchronous active-low reset to zero.
One sample is produced per clock.

| edge | register updated |
|---|---|
| 1 | `bin2rns` output holds the FCW applied before edge 1 |
| 2 | the accumulator first adds it |
| 3 | `rns_processor` output |
| 4 | `crt_rom` output, i.e. `ps_code`; `x_out` follows within 0.5 ns |

A new FCW therefore first moves the output 4 clocks after it is applied.
Changes to `ofs`, `mod` and `amp` show after 2 clocks.

## Top-level ports (`rns_dds_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `en` | in | 1 | phase accumulator advance enable |
| `fcw` | in | 15 | binary frequency control word, `f_out = f_clk * fcw / M` |
| `ofs_rns`, `mod_rns`, `amp_rns` | in | 3×5 | offset, modulation and amplitude, as residues |
| `phase_rns` | out | 3×5 | accumulator state |
| `ps_code` | out | 3×15 | CRT partial sums at the DAC inputs |
| `x_out` | out | real | analog output voltage |
| `fold_count` | out | int | spans removed by the folding stage |

Parameters: `N_CH_P`, `RES_W_P`, `MODS`, `FMT_W_P`, `PS_W_P` and `V_LSB`.
`PS_W_P` must equal `ceil(log2(prod MODS))`; an elaboration-time check
enforces this. To use other moduli, change the package constants, or
override `MODS`, `RES_W_P` and `PS_W_P` together. The moduli must be
pairwise coprime and fit in `RES_W_P` bits.

## Where this follows the architecture and where it does not

These follow the architecture:

- the chain of blocks;
- three residue channels;
- the FSM-per-modulus phase accumulator;
- distributed-arithmetic forward conversion;
- CRT partial-sum ROMs of `2^k × 3k` bits;
- one DAC per channel;
- an inverting summer with equal `R_F` resistors;
- an analog folding stage at the output.

These are this design's own choices:

- the moduli and widths (5-bit residues, 5-bit formats);
- every register stage and the reset behaviour;
- the `en` input;
- the form of the processor's three operations, which the architecture only names;
- the ideal, linear behaviour and the delays of the analog models;
- the magnitude folding.

What is not here:

- **No sine.** The output is the phase ramp that the CRT converter
  reconstructs. The sine-weighted DAC discussed alongside this scheme
  belongs to a different, binary-accumulator synthesizer. A sum of partial
  sums cannot be sine-weighted channel by channel, and no mapping from the
  folded ramp to a sine is specified, so none is built.
- No reconstruction filter after the output.
- No DAC non-idealities (quantization beyond `V_LSB`, mismatch, glitches).
- No noise or spur modelling. Spurs are expected near
  `f_clk * (1/2)^(N-1)`, with `N = 15` here.

## Files

- `rtl/rns_pkg.sv`: moduli, widths, types, modular and CRT helper functions.
- `rtl/bin2rns.sv`, `rtl/rns_phase_acc.sv`, `rtl/rns_processor.sv`,
  `rtl/crt_rom.sv`: synthesizable blocks.
- `rtl/partial_dac.sv`, `rtl/summing_amp.sv`, `rtl/analog_folding.sv`:
  analog behavioural models (not synthesizable).
- `rtl/rns_dds_top.sv`: the top level.
- `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=F`.

## Verification

Every testbench compares the design with arithmetic done independently in
plain binary modulo `M`:

- `tb_bin2rns`: all 32768 FCW values, plus the 1-clock latency.
- `tb_rns_phase_acc`: random words and enables against a binary accumulator.
- `tb_rns_processor`: 10000 random offset, modulation and amplitude sets.
- `tb_crt_rom`: all `X < M`. The partial sums must rebuild `X` and must be
  multiples of the other moduli.
- Analog models: transfer, sign, gain, delay and every fold count.
- `tb_rns_dds_top`: runs the whole design at its default parameters for
  about 75000 clocks. It checks the accumulator, the partial sums, `x_out`
  and `fold_count` every clock against a cycle model. It checks the 4-clock
  latency, and that `fcw = M/32` gives exactly 50 sawtooth periods in 1600
  clocks. It also requires that phase wraps, enable holds, FCW changes,
  offsets, modulation, amplitude scaling and fold counts 0, 1 and 2 all occur.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rns_dds_top rtl/rns_pkg.sv tb/tb_rns_dds_top.sv -o sim
./obj_dir/sim
```

Replace `tb_rns_dds_top` with any other testbench name.
