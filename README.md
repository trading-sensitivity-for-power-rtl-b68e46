# Adequate IEEE 802.15.4 O-QPSK demodulator

A 2.4 GHz IEEE 802.15.4 receiver usually has more sensitivity than it needs.
When the link is good, the spare signal quality can be traded for power. This
demodulator does that with three approximations you can switch at run time:

* **BCA (bypassable comparator approximation).** Each input sample is
  replaced by +C or −C by its sign, with C = 2^(N−2). That is 0x400 / 0xC00
  for 12-bit samples, the two words with the most zero bits. Much less
  toggles downstream, and the phase survives, which is all O-QPSK needs.
* **BFA (bypassable filter approximation).** Each of the two decimation
  filters can be bypassed. A bypassed filter gets zero at its input and its
  registers stop. The cost is aliased noise after decimation.
* **DIA (discard of the in-phase signal).** The whole I chain is switched off.
  The symbol is then decided from the 16 Q chips alone.

One operating mode (0 to 7) picks a setting of all three, from full
sensitivity down to lowest power. The published trade-off curve puts these
modes between 0 dB / 0 % and about 7 dB / 64 %: you give up that much
sensitivity to save that much power. This RTL reproduces the function, not
the power figures.

## Signal path

```
            +-----+                      +-----------------------------+
 i_in --DIA-| BCA |--> D (0..4 smp) ---->| PF1 ↓2 | PF2 ↓4  (BFA)      |--> RZ --DIA--+
   (gate)   +-----+                      +-----------------------------+              |
            +-----+                      +-----------------------------+              v
 q_in ----->| BCA |--------------------->| PF1 ↓2 | PF2 ↓4  (BFA)      |--> RZ ---> CORR --> sym
            +-----+                      +-----------------------------+
                         mode_ctrl: mode / cfg_in -> comparator enables, bypasses, chain enable, D
```

Rates and sizes:

* Samples are 12-bit two's complement at 8 MHz.
* PF1 decimates by 2 (to 4 MHz) and PF2 by 4 (to 1 MHz).
* After PF2 there is one sample per rail chip. Each rail carries 1 Mchip/s,
  and the two rails together carry the standard's 2 Mchip/s.
* RZ turns each sample into a chip of +1 or −1.
* The correlator collects 16 I/Q chip pairs, which make one 32-chip symbol
  (16 µs, or 128 input samples). It outputs the best of the 16 symbols.

| file | block |
|------|-------|
| `rtl/demod_pkg.sv` | shared types (`cfg_t`, `chain_ctl_t`, `tchip_t`), filter taps, chip table generator |
| `rtl/bca.sv` | comparator approximation |
| `rtl/i_delay.sv` | I-chain delay element D |
| `rtl/pp_decim_fir.sv` | poly-phase FIR core (PF1 and PF2) |
| `rtl/bfa_stage.sv` | one stage: input gate, filter, bypass mux, down-sampler |
| `rtl/bfa.sv` | PF1 ↓2 → PF2 ↓4 chain of one rail |
| `rtl/rz.sv` | chip decision |
| `rtl/dia.sv` | I-chain input gating and neutral chip for the correlator |
| `rtl/dsss_corr.sv` | 16-symbol DSSS correlator |
| `rtl/mode_ctrl.sv` | operating modes → control signals |
| `rtl/adequate_demod.sv` | top level |

## Configurations and operating modes

A configuration is a tuple (DIA, BCA, BFA):

* DIA: `ION` or `IOFF`.
* BCA: `CB` (all comparators bypassed), `CI` (comparator active in the I
  chain), `CQ` (active in the Q chain) or `CIQ` (active in both).
* BFA: `FA` (all filters in use), `FQ1`/`FQ2`/`FQ3` (Q-chain PF1, PF2 or both
  bypassed), or `FIQ1`/`FIQ2`/`FIQ3` (the same stages bypassed in both chains).
  The I chain is never bypassed on its own.

That gives 28 configurations with the I chain on and 16 with it off (FIQ has
no meaning with I off). All 44 are reachable: set `cfg_sel = 1` and give the
tuple on `cfg_in`. With `cfg_sel = 0`, the 3-bit `mode` input selects one of
the eight Pareto-optimal configurations:

| mode | configuration | approx. sensitivity loss | approx. power saving |
|------|---------------|--------------------------|----------------------|
| 0 | (ION, CB, FA)    | 0 dB   | 0 % |
| 1 | (ION, CI, FA)    | 0.9 dB | 13 % |
| 2 | (ION, CIQ, FA)   | 1.7 dB | 25 % |
| 3 | (ION, CI, FQ1)   | 2.7 dB | 36 % |
| 4 | (ION, CB, FIQ1)  | 3.6 dB | 44 % |
| 5 | (ION, CI, FIQ1)  | 4.3 dB | 51 % |
| 6 | (ION, CIQ, FIQ1) | 5.0 dB | 57 % |
| 7 | (ION, CIQ, FIQ3) | 6.6 dB | 64 % |

The last two columns are the published results for a 40-nm implementation.
They were not measured on this RTL. No operating mode discards the I chain:
in the published results, turning I off always cost more sensitivity than
a mode with the same power. DIA can still be used through `cfg_in`.

## Keeping I and Q aligned when filters are bypassed

This is the subtle part of the design. An O-QPSK transmitter sends the Q
rail half a rail chip (0.5 µs, 4 samples) after the I rail. The receiver
undoes this by delaying I by 4 samples in element D. Both chains then share
one decimation phase: the down-sample counters are never gated. So the I
chip and Q chip of a pair reach the correlator in the same clock.

Bypassing a filter removes its group delay from that chain:

* PF1 has taps 1 2 1 at 8 MHz, so bypassing it removes 1 sample.
* PF2 has taps 1 3 3 1 at 4 MHz, so bypassing it removes 1.5 × 2 = 3 samples.

If only Q-chain filters are bypassed (FQ1 to FQ3), the Q samples arrive early
and the pairs would drift apart. The design does not add a delay line to Q.
Instead it shortens D:

    D = 4 + (delay removed from I) − (delay removed from Q)

| BFA setting | D (samples) |
|-------------|-------------|
| FA, FIQ1, FIQ2, FIQ3 | 4 |
| FQ1 | 3 |
| FQ2 | 1 |
| FQ3 | 0 |

D = 0 is a straight pass-through. `mode_ctrl` computes D from the filter
lengths in `demod_pkg`. If you change the taps, D follows, but D must stay
between 0 and 4.

## Sampling phase moves when filters are bypassed

Bypassing a filter also moves the moment each chip is sampled:

* PF1 bypassed: 1 sample later in the chip.
* PF2 bypassed: 3 samples later.
* Both bypassed (mode 7): 4 samples later.

D keeps I and Q aligned with each other, but not with the transmitter. So
the chip-timing recovery in front of this block must re-acquire after a
mode change that bypasses or restores a filter. Mode 7 shows why. With chip
timing left as set for mode 0, mode 7 samples each chip near its edge, where
the half-sine pulse is small. Its symbol error rate at 5 dB
SNR is then about 30 %, against none with timing re-acquired.

## Interfaces and timing

Top level `adequate_demod` (parameter `W = 12`):

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous reset, active low (resets to mode 0) |
| `mode[2:0]` | in | operating mode |
| `cfg_sel`, `cfg_in` (`cfg_t`) | in | use a direct (DIA, BCA, BFA) tuple instead of `mode` |
| `in_valid`, `i_in`, `q_in` | in | one 12-bit sample pair; at 8 MHz, `in_valid` is high every cycle |
| `sym_sync` | in | given with `chip_valid`: this chip pair is the first of a symbol |
| `chip_valid` | out | a chip pair enters the correlator (once per 8 samples) |
| `sym_valid`, `sym[3:0]`, `peak` | out | decided symbol and its score, once per 16 chip pairs |
| `cfg_active` | out | configuration in force |

* **Mode changes.** A new mode or `cfg_in` takes effect one clock later.
  Switch only between symbols. The symbol during which a switch happens may
  decode wrongly, because the filters still hold samples from the old setting.
* **Decimation phase.** The phase counts from reset. Input strobe 8k+7
  (counting from 0) produces chip pair k. That pair appears on `chip_valid`
  three clocks later.
* **Symbol timing.** Finding symbol boundaries (preamble and start-of-frame
  detection) is not part of this block. Without `sym_sync`, the correlator
  counts chip pairs from reset.
* **Correlator score.** The correlator scores each symbol as Σ rx·ref, with
  ref = ±1 and rx ∈ {+1, 0, −1}. The peak is 32 for a clean symbol with I
  on, and 16 with I off. On a tie, the lowest symbol number wins.
* **Discarded I chain.** DIA feeds the correlator chip value 0. Every 802.15.4
  chip sequence has exactly eight ones on each rail. So any constant in place
  of the I chips shifts all 16 scores equally, and the decision does not
  change. Choosing 0 also keeps `peak` meaningful.

## What follows the published design and what is this design's own

Taken from the published description:

* The chain order (BCA → D → BFA → RZ → DIA → CORR).
* The BCA rule and the value of C.
* The BFA structure: input gating to zero, clock gating, bypass muxes, ↓2
  then ↓4.
* Re-using D for Q-only bypass alignment.
* DIA input/clock gating with a constant fed to the correlator.
* The 12-bit inputs, the 8 MHz sampling rate, and the configuration space.
* The mode list. It is read from the published Pareto curve.

Chosen here, because the description leaves it open:

* **Filters.** Tap counts, coefficients and renormalisation. Each stage shifts
  its output back to 12 bits (floor), so bypass and filter paths have the
  same scale.
* **RZ.** A sign decision with a reserved zero level.
* **Correlator.** Soft ternary scoring, and an external symbol sync.
* **Control.** The register stage in `mode_ctrl`, and the
  direct-configuration input. The published design keeps only the eight
  Pareto modes. The direct input keeps all 44 configurations reachable so
  each can be simulated.
* **Clock gating.** It is written as register enables. Synthesis maps these
  onto the library's clock-gating cells. No gated clocks appear in the RTL.
* **Chip table.** The 16 sequences are generated in `demod_pkg` from symbol 0,
  using the standard's rules (rotate by 4 chips; invert the odd chips for
  symbols 8 to 15). Chips c0, c2, ... go on I and c1, c3, ... on Q. Counted
  from 1, as the published text counts them, I carries the odd chips and Q
  the even ones.

Not included:

* The analog front end and ADC.
* The clock-gating cells themselves.
* Any logic that picks the mode from channel quality (e.g. RSSI).

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
against values it computes itself. The testbenches are:

* `tb_bca`: all 4096 inputs, with the comparator on and off.
* `tb_i_delay`: random gaps and delays, and hold while the enable is low.
* `tb_pp_decim_fir`: both filter configurations against a direct-form FIR.
* `tb_bfa`: all four bypass settings against a two-stage reference model.
  It also checks the output timing, exactly 8:1 decimation, and hold.
* `tb_rz`.
* `tb_dia`.
* `tb_dsss_corr`: clean symbols, up to 5 chip errors, I rail absent, and
  re-synchronisation. Its chip table is written out from the standard,
  independent of the RTL's generator.
* `tb_mode_ctrl`: all modes and all direct configurations.

`tb_adequate_demod` runs the whole design at its default parameters. A
transmitter model spreads random symbols, shapes them as O-QPSK half-sine
pulses, and quantises them at 40 % of full scale. The stream then goes
through:

* all eight modes;
* all 44 configurations;
* mode 0 with ±150 LSB uniform noise.

It checks:

* every symbol except those during a configuration switch;
* the peak score;
* the 128-clock symbol spacing;
* the D value for each configuration.

It also counts each mechanism (comparator per chain, each bypass per chain,
each D value, I discarded, mode switches, each mode) and fails if one never
happens. All eleven testbenches pass (the ten here and `tb_sensitivity`,
below).

`tb_sensitivity` measures symbol error rate against noise, using the same
kind of transmitter model. Its settings:

* white Gaussian noise at a per-sample SNR, where signal power is A²/2 per
  rail;
* 40 % of full scale;
* 500 symbols per point.

It also sends one maximum-length packet (133 octets = 266 symbols) at 10 dB
SNR in each mode. Each mode runs after a reset, with chip timing aligned to
that mode (see "Sampling phase moves when filters are bypassed"). With the default seed it prints:

| run | −10 dB | −7 dB | −4 dB | −1 dB | 2 dB | 5 dB | 266-symbol packet at 10 dB |
|-----|-------|-------|-------|-------|------|------|----------------|
| mode 0 | 0.034 | 0.004 | 0 | 0 | 0 | 0 | no errors |
| mode 1 | 0.080 | 0.006 | 0 | 0 | 0 | 0 | no errors |
| mode 2 | 0.122 | 0.010 | 0 | 0 | 0 | 0 | no errors |
| mode 3 | 0.244 | 0.052 | 0.002 | 0 | 0 | 0 | no errors |
| mode 4 | 0.274 | 0.084 | 0.010 | 0 | 0 | 0 | no errors |
| mode 5 | 0.360 | 0.134 | 0.010 | 0 | 0 | 0 | no errors |
| mode 6 | 0.406 | 0.186 | 0.032 | 0 | 0 | 0 | no errors |
| mode 7 | 0.430 | 0.176 | 0.038 | 0 | 0 | 0 | no errors |
| (IOFF, CB, FA) | 0.212 | 0.040 | 0.004 | 0 | 0 | 0 | no errors |

Error rates rise from mode 0 to mode 7, in the order the trade-off intends.
The published sensitivity is defined at an error rate of 3.8·10⁻⁵. That needs
many more symbols than this simulation runs, so the table ranks the modes but
does not give dB figures. The filters here are also this design's own, so
absolute numbers would differ from the published ones anyway.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_adequate_demod rtl/demod_pkg.sv tb/tb_adequate_demod.sv -o sim
./obj_dir/sim
```

Use the same command with another `tb_*` module to run a block testbench.
Each testbench ends by printing `TB_RESULT checks=N failures=M`.
