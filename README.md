# Delta-sigma fractional-N divider for a multi-band 802.15.4 synthesizer

This RTL describes the feedback divider of a PLL frequency synthesizer for
IEEE 802.15.4 (ZigBee) radios. The synthesizer serves the 780, 868 and
915 MHz bands and the 2.4 GHz band from one VCO near 5 GHz. The divider
takes the VCO/2 signal, `f_in`, at about 2.3 to 2.8 GHz and divides it down
to the 20 MHz reference rate. The division ratio must move in steps much
finer than one input period, so a delta-sigma modulator dithers the integer
ratio cycle by cycle. The long-term mean of the ratio is then the wanted
fractional value. For example, channel 868.3 MHz needs
`f_in = 3 x 868.3 MHz = 2604.9 MHz` and a mean division of exactly 130.245.

The design has three parts:

- a fast front end: a divide-by-two and a 7/8 phase-switching dual-modulus
  prescaler;
- a slow programmable counter pair, the pulse counter P and the swallow
  counter S;
- a 20-bit third-order modified MASH modulator. It is clocked by the divider
  output and adds a small signed offset to the counters' target.

In silicon the front end is custom current-mode logic and the rest is
standard cells. Here every part is written as logic.

```
 f_in ──► ÷2 ──► 7/8 prescaler ──► inverter ──► f_PRE ──► pulse counter P ──► f_div
                    ▲  (MC=1: ÷7, MC=0: ÷8)          └──► swallow counter S ──► MC
                    └────────────────────────────────────────────────────────────┘
 ctrl_code ──► channel decoder ──► m_int ─┐
                                 k_frac   ├─► (+) ──► P = sum div 7, S = sum mod 7
                                    │     │
                                    └──► MASH 1-1-1 (clocked by f_div) ──► y ∈ -3..+4
```

## How a division ratio is built

One output cycle lasts P prescaler cycles. In S of them the prescaler
divides by 8, and in the other P − S it divides by 7. One output cycle is
therefore

    7·P + S   prescaler input periods  =  2·(7·P + S)   f_in periods.

P is 4 bits wide and takes the values 7..10 in use. S is 3 bits wide and
takes 0..6. Together they reach every integer from 49 to 76 without gaps.
The adder forms `R = m_int + y` from the decoder's integer ratio `m_int` and
the modulator offset `y`. It then splits R as `P = R div 7` and
`S = R mod 7`. The modulator's mean output is `k_frac / 2^20`, so the mean
division is

    f_in / f_div = 2 · (m_int + k_frac / 2^20).

Because of the leading divide-by-two, the smallest step in the mean ratio
is 2/2^20. At `f_in` that is a step of 2 · 20 MHz / 2^20 ≈ 38 Hz. At the
sub-GHz LO (f_in/3) it is about 13 Hz.

### Why the counters run on the falling prescaler edge

The prescaler samples MC at the rising edge of its output. The MC value at
that edge sets the length of the cycle that starts there. MC comes from the
swallow counter. If the counters ran on the same rising edge, MC would
change just after the edge that samples it, and the AND gate in the
prescaler could glitch. An inverter therefore sits between the prescaler
output and the counter clock (`f_PRE = ~dmp_out`). With it, MC changes only
while the prescaler output is low. Each counter state then sets the modulus
of exactly one prescaler cycle.

## The 7/8 phase-switching prescaler

This is the hardest part to read. It contains no counter. Instead it picks
between phases:

1. `div2_scl` (full speed) halves the prescaler input.
2. A second `div2_scl` (half speed) runs on that. Its master and slave
   latch outputs I and Q are a quarter of their own period apart. I, Q and
   their complements give four phases at f/4: p0 = I+, p1 = Q+, p2 = I−,
   p3 = Q−. Each of them lags the one before by 90°, which is one input
   period.
3. `phase_select` passes one phase, chosen by a one-hot select word, to Y.
4. A third `div2_scl` clocked by Y gives `f_out` = Y/2 = input/8.
5. `phase_control` is a four-flip-flop one-hot ring clocked by
   `f_out AND MC`.

With MC = 0 the ring stands still, and f_out is input/8. With MC = 1, each
rising edge of f_out moves the selection to the phase that *leads* the
current one by 90°. That is p[j] → p[j−1], so the ring runs S1 → S4 → S3 →
S2. The next rising edge of Y then arrives one input period early, and that
output cycle lasts 7 periods.

Switching forward this way cannot glitch. At the moment of the switch, Y
has just risen with the old phase. The leading phase rose one input period
before and stays high for one more, so the output node stays high. Switching
backwards (to divide by 9) would sometimes pick a phase that is low, which
gives a runt pulse. The testbench counts exactly two rising Y edges per
output cycle.

Each latch pair in the silicon is a source-coupled-logic master-slave
divider. `div2_scl` writes it as its edge-triggered equivalent: I takes
not(Q) on the falling clock edge and Q takes I on the rising edge. The
transmission-gate selector becomes an AND-OR. The analog bias networks and
buffers in front of and behind the selector have no logic function and are
left out.

## The modified MASH 1-1-1 modulator

`mash111_modified` has three cascaded accumulators of `K_BITS` = 20 bits.
In a classic MASH 1-1-1, each stage integrates only the residue of the
stage before it. That gives short repeating output sequences for many
inputs (as short as 2 clocks), and those show up as fractional spurs. In
the modified cascade, stage 2 integrates residue1 + carry1 and stage 3
integrates residue2 + carry2. Adding the carry keeps the noise shaping,
with noise transfer (1 − z⁻¹)³/M, and stretches the sequence length for a
constant input to between 2·M² and M³ clocks (M = 2^K_BITS).

The carries are combined as

    t[n] = c2[n] + c3[n] − c3[n−1]
    y[n] = c1[n] + t[n] − t[n−1]

which gives y in −3..+4. That is eight values, carried on a 4-bit signed
port. The mean of y is exactly `k_in/M` over a whole period.

The modulator steps once per rising edge of `f_div` and registers its
output, so y is stable for the whole next divider cycle. The pulse counter
samples the sum at the start of each cycle. The offset used in cycle n is
therefore the one the modulator computed one cycle earlier; this delay does
not change the mean. `en = 0` clears the modulator and forces y = 0, which
is integer mode. `rst_n` on the modulator is a reset of its own (pad
`resetDSM` on the test chip).

Measured in simulation:

- M = 16: K = 8 (= M/2) repeats after 512 = 2·M² clocks, K = 4 after 1024,
  and odd K after 4096 = M³.
- M = 64: K = 32 repeats after 8192 clocks, K = 16 after 16384, and K = 1
  and K = 3 after 262144.

## Channel decoder

`channel_decoder` maps a 6-bit `ctrl_code` to `m_int` and `k_frac`. The
table is computed at elaboration time. Frequencies are held in 100 kHz
units: with F = f_in and D = 2·f_REF in those units,
`m_int = F div D` and `k_frac = round((F mod D)·2^20 / D)`.

| code  | channel                     | f_in   | m_int + k_frac/2^20 |
|-------|-----------------------------|--------|---------------------|
| 0–3   | 780 + 2·code MHz            | 3·Fc   | 58.5 … 58.95        |
| 4     | 868.3 MHz                   | 3·Fc   | 65 + 128451/2^20    |
| 5–14  | 906 + 2·(code−5) MHz        | 3·Fc   | 67.95 … 69.3        |
| 15–30 | 2405 + 5·(code−15) MHz      | Fc     | 60.125 … 62.0       |
| 31–63 | unused: entry 0, `valid` = 0|        |                     |

The channel frequencies are the 802.15.4 ones. The code order is this
design's own choice. It puts 868.3 MHz at code 4 (binary 000100), the
control code used for that channel in the measurement this design
reproduces. The two China channel groups have the same centre frequencies,
so they appear only once. No low-IF offset is applied: the table gives the
channel centre itself.

## Top level: `frac_n_divider`

| port         | dir | width | meaning                                          |
|--------------|-----|-------|--------------------------------------------------|
| `f_in`       | in  | 1     | divider input (VCO/2)                            |
| `rst_n`      | in  | 1     | async reset of dividers, prescaler and counters  |
| `dsm_rst_n`  | in  | 1     | async reset of the modulator                     |
| `dsm_en`     | in  | 1     | 1 = fractional mode, 0 = integer mode            |
| `ctrl_code`  | in  | 6     | channel                                          |
| `f_div`      | out | 1     | divided output, rising edge starts each cycle    |
| `mc_test`    | out | 1     | modulus control                                  |
| `dmp_test`   | out | 1     | prescaler output                                 |
| `code_valid` | out | 1     | `ctrl_code` names a channel                      |

The only parameter is `K_BITS` (default 20), the modulator width.
`f_div` is high for P − 4 of the P prescaler cycles of each output cycle;
this duty cycle is a free choice. All resets are asynchronous and active
low. Drive them low after time zero, so that the asynchronous reset sees an
edge in a two-state simulator.

All clocks in this design are rippled: each divider stage clocks the next,
and the modulator runs on `f_div`. That matches the structure of the
circuit. Synthesizing it for real needs generated-clock constraints.

## Where this RTL departs from, or adds to, the published design

- **Meaning of MC while S counts.** The source describes this in two
  conflicting ways. This design follows the ratio formula M = 7·P + S:
  divide by 8 while S counts down, then by 7. It is the only reading that
  makes P = 7..10 and S = 0..6 cover 49..76 without gaps, and the 868.3 MHz
  example needs 65.
- **Edge-triggered latches.** The current-mode latches are written as
  flip-flops on opposite clock edges.
- **Left out.** The transmission-gate selector is an AND-OR. Bias circuits,
  buffers, test buffers and pads are not modelled.
- **Own choices.** These were not specified and are this design's own:
  - the P/S split by division by 7;
  - the channel code order;
  - the modulator enable and its registered output;
  - the 4-bit signed modulator output;
  - the `f_div` duty cycle;
  - the reset values;
  - the one-hot assertion in `phase_control`.
- **Not part of this RTL.** The rest of the synthesizer is not included:
  VCO, phase detector, charge pump, loop filter, frequency calibration, and
  the LO divide-by-2 and divide-by-3.
- **Never reached.** Across the channel table, P = 7 needs the modulator's
  rarest offset and was not seen in the end-to-end runs. The pulse counter's
  own test covers it.

## Files

`rtl/` holds one unit per file:

- `fracn_pkg` – shared widths and constants
- `div2_scl` – master-slave divide-by-two
- `phase_select` – one-hot phase selector
- `phase_control` – four-flip-flop one-hot ring
- `dual_modulus_prescaler` – the 7/8 prescaler
- `pulse_counter` – counter P
- `swallow_counter` – counter S and MC
- `ratio_adder` – adds the modulator offset and splits into P and S
- `mash111_modified` – the delta-sigma modulator
- `channel_decoder` – channel table
- `frac_n_divider` – top level

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus
two more:

- `tb_mash_sequence_length` – sequence lengths at M = 64
- `tb_channel_sweep` – all 31 channels in fractional mode, at full size

`tb_frac_n_divider` runs the whole divider at its default sizes. It covers:

- integer mode on six codes;
- fractional mode on 868.3 MHz, checked cycle by cycle against a reference
  modulator, with a mean of 130.2453 over 3000 cycles;
- fractional mode on 924 MHz, with a mean of 138.601.

It also counts each mechanism and fails if one never occurs: both prescaler
moduli, phase switches, P = 8/9/10, negative, zero and positive offsets,
both modes, and modulator resets.

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_frac_n_divider \
    -y rtl -y tb +libext+.sv rtl/fracn_pkg.sv tb/tb_frac_n_divider.sv
./obj_dir/Vtb_frac_n_divider +verilator+rand+reset+2
```

Replace the top-module name to run any other testbench. Each one runs in
about a second. To try a narrower modulator, set `K_BITS` on
`frac_n_divider` or `mash111_modified`. `channel_decoder` then rounds
`k_frac` to that width.
