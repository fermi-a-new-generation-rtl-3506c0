# FERMI front-end readout module — SystemVerilog model

A calorimeter at a hadron collider delivers a new sample on every channel
every 25 ns, and almost all of it is background. A FERMI module sits on the
detector, serves nine channels, and does three things at once for every bunch
crossing:

1. digitises and linearises each channel and keeps the sample in a local
   memory long enough for the trigger decisions (microseconds for the
   first-level trigger, milliseconds for the second);
2. sums the nine channels and filters the sum to give the first-level trigger
   a pulse flag (which crossing) and an energy;
3. on request, reads the stored time frame of an accepted event back and ships
   it either in full or reduced to one precise amplitude per channel by a
   non-linear second-level filter.

This repository is synthesizable SystemVerilog for the digital part of such a
module, with self-checking testbenches. The analog front end (input switch,
compressing amplifier, the analog halves of the converters) is not modelled;
the module's inputs are the raw bits of each channel's ADC.

## Block map

```
             per channel (x9, fermi_channel)                     service logic
 coarse[4:0] ┌─────────────┐ code ┌─────────────┐ 16b ┌───────────────┐
 fine[5:0] ─▶│adc2s_encoder│─────▶│expansion_lut│──┬─▶│threshold_unit │──▶ channel_sum ─▶ l1_filter ─┬─▶ l1_pulse / l1_energy
             └─────────────┘      └─────────────┘  │  └───────────────┘     (mod-3 check)  fir5_bs x2 └─▶ pileup_detect ─▶ l1_pileup
 wr_addr ───────────(delayed with the sample)──────┤                                       max3_finder
                                                   ▼
                                 ┌──────────────────────────┐ rd ┌──────────────┐   ┌──────────────┐
                                 │ecc_dpram  +  patch_cam   │◀──▶│ readout_ctrl │──▶│ afosh_filter │
                                 └──────────────────────────┘    │ (pointers,   │◀──│ (2nd level)  │
                                                                 │  MPX)        │──▶ ro_word (full or reduced)
                                                                 └──────────────┘
 psa_adc (parallel SA converter core, alternative ADC) stands beside the module with its own ports.
```

`fermi_top` wires all of this together and adds the configuration decoder.

| module | role |
|---|---|
| `fermi_pkg` | widths, types, configuration targets, SEC-DED encode/decode functions |
| `adc2s_encoder` | coding stage of the two-stage pipelined ADC (5 coarse + 6 fine bits → 10 bits) |
| `sa_adc_channel`, `psa_adc` | digital part of the parallel successive-approximation ADC |
| `expansion_lut` | 1024 × 16 table: undoes the analog compression, holds calibration |
| `threshold_unit` | only samples above a programmable level enter the trigger sum |
| `ecc_dpram` | dual-port sample memory, extended Hamming (22,16) SEC-DED |
| `patch_cam` | small associative memory that replaces faulty memory cells |
| `fermi_channel` | one channel: the five blocks above in a chain |
| `channel_sum` | nine-input adder with modulo-3 residue check |
| `fir5_bs` | 5-tap FIR whose coefficients are two barrel shifters per tap |
| `max3_finder` | three-point maximum finder |
| `l1_filter` | timing FIR + maximum finder (pulse flag) and energy FIR |
| `pileup_detect` | warns when two pulse flags are close together |
| `afosh_filter` | FIR bank + order-statistic operator (second-level amplitude) |
| `readout_ctrl` | reads a time frame by pointer list, full or via the filter |
| `fermi_top` | the module |

## How a sample travels

Clocks are bunch crossings; every stage takes one sample per clock, so the
design runs at the sampling rate (40 MHz nominal) without stalls.

| clock | what happens (crossing n, coarse bits applied at clock t) |
|---|---|
| t | coarse bits and `wr_addr` enter with `adc_valid` |
| t+1 | fine bits of the same sample enter (the residue is converted one stage later) |
| t+2 | 10-bit code |
| t+3 | linear 16-bit sample; written to memory at the (delayed) write address |
| t+4 | thresholded sample leaves the channel |
| t+5 | `trig_sum` |
| t+6 | both FIR outputs |
| t+8 | `l1_valid`, `l1_pulse`, `l1_energy` for crossing n |
| t+9 | `l1_pileup` if crossing n's flag followed the previous one closely |

The first-level outputs at any clock describe the crossing *before* the newest
FIR output, because the maximum finder must see the next value to know that a
value was a peak; the energy is delayed by one clock to stay with its flag.

## The ADC coding stages

**Two-stage pipelined ADC.** A 5-bit coarse flash (one bit more than the 4
bits it nominally needs) is followed by a DAC, a subtractor and a 6-bit fine
converter. The fine range covers two coarse steps, so a coarse decision that is
off by up to half a step is still corrected. The coding stage computes

```
code = 32 * coarse + fine - 16        (clamped to 0 … 1023)
```

i.e. the fine code is assumed to be offset by half a coarse step. The test
converts random levels with coarse errors up to ±15 LSB and gets every level
back exactly.

**Parallel SA ADC (`psa_adc`).** Fourteen slow successive-approximation
channels share the input. Channel `t mod 14` samples at clock t, auto-zeroes its
comparator for 4 clocks (the sampling clock counts as the first), then decides
one bit per clock for 10 clocks, MSB first; so a result finishes every clock and
leaves the output register `K_AZ + N_BITS + 1 = 15` clocks after its sample.
The count 14 = k + n with n = 10 follows the published converter; the
start-in-rotation order and binary-search trial code are the usual choices.
Comparators, S/H and DACs are analog: the core drives `psa_sample`,
`psa_autozero` and `psa_dac_code` per channel and reads `psa_comp`.

## First-level filter: FIRs without multipliers

Each coefficient of the two 5-tap FIRs is the sum of two barrel-shifter terms,
each `±2^(1-s)` for `s = 0 … 7` or off (`bs_coef_t` = two × {en, neg, shift[2:0]}).
That covers −4 … 4, and (−3, 3) densely down to steps of 1/64, with only shifts
and adds. Outputs carry 6 fractional bits, so every term is exact and the
result is `64 ×` the real-valued convolution. The timing FIR feeds the maximum
finder; it flags `y[n-1]` when `y[n-1] > y[n-2]`, `y[n-1] >= y[n]` and
`y[n-1] > 0` (the tie rule and the positivity condition are this design's).
Coefficients come from the configuration bus; the filter shapes themselves are
left to the user (the testbenches use simple shapes).

`pileup_detect` raises `l1_pileup` with a flag that comes at most `window`
crossings after the previous one (`window` is a configuration register).

## Storage and fault tolerance

Each channel has an 8192-word dual-port memory. Words are stored as extended
Hamming (22,16) codewords (bit 0 overall parity, check bits at positions 1, 2,
4, 8, 16): a single flipped bit is corrected and reported on `ecc_sec`, two are
reported on `ecc_ded` and marked in the readout word's `err` bit. A diagnostic
mask (`CFG_ECCFLIP`) XORs chosen bits into every codeword written, so the
controller can exercise the correction in place.

`patch_cam` holds up to four faulty addresses per channel; writes there are
captured in the entry and reads are answered from it, with no ECC flags.

The trigger sum carries a modulo-3 residue check (`sum_err`). The published
design also protects sensitive logic by triplication with wired (current)
voting, which adds no logic and is not represented here.

Depth: 8192 words is this design's figure. With 1 % of crossings accepted and
kept for ~2 ms, a 40 MHz module needs about 80 + 800 × (frame length) words, i.e.
6480 for 8-sample frames. At 80 MHz sampling it would need `ADDR_BITS = 14`
(or frames of at most 5 samples). Random accepts bunch up, and frames wait in
line for the read port, so the simulated peak is a little higher (about 6700
locations; see `tb_fermi_workload` below).

## Readout and the second-level filter

Memory locations are owned by an external address generator that hands out free
pointers; the module only sees `wr_addr` for every sample, and for readout a
command followed by the frame's pointers:

1. `cmd_valid`/`cmd_ready`: `cmd_full` (1 = full readout, filter bypassed),
   `cmd_bank` (second-level coefficient bank), `cmd_len` (1 … 8 samples);
2. `cmd_len` pointers on `ptr_valid`/`ptr_ready`, oldest sample first;
3. the controller reads channel 0 samples 0…len-1, then channel 1, …, one read
   per clock on the memories' second port, while recording goes on.

Full readout emits one `ro_word` per sample two clocks after its read
(`reduced = 0`, `chan`, `idx`, `err`, `data` = sample). Reduced readout streams
each channel's samples into `afosh_filter` and emits one word per channel
(`reduced = 1`, `data` = amplitude) four clocks after that channel's last read.
There is no back-pressure on `ro_word`.

`afosh_filter` computes, for each of 4 subfilters with 8 signed 12-bit
coefficients,

```
y_j = Σ_i h[bank][j][i] · x_i          amp = r-th largest of y_0 … y_3
```

Ties rank by subfilter index. Each subfilter is meant for a different sampling
jitter, and the order statistic picks among them per event; `r` is a
configuration register, `bank` comes with each command (e.g. the second bank
for events flagged as piled up). The number of subfilters, taps and coefficient
bits are this design's choices.

## Configuration bus

`cfg_we`, `cfg_addr[19:0] = {target[3:0], channel[3:0], index[11:0]}`,
`cfg_wdata[31:0]`; channel 15 writes all nine channels.

| target | name | index | data |
|---|---|---|---|
| 0 | `CFG_LUT` | ADC code | 16-bit sample |
| 1 | `CFG_THR` | – | 16-bit threshold (reset: 0xFFFF, nothing passes) |
| 2 | `CFG_L1COEF` | [3] 0 timing / 1 energy, [2:0] tap | `bs_coef_t` in [9:0] |
| 3 | `CFG_PILEUP` | – | window [7:0] |
| 4 | `CFG_L2COEF` | [6] bank, [5:4] subfilter, [2:0] tap | signed [11:0] |
| 5 | `CFG_L2RANK` | – | r − 1 in [1:0] |
| 6 | `CFG_PATCH` | entry [1:0] | [16] valid, [12:0] address |
| 7 | `CFG_ECCFLIP` | – | codeword flip mask [21:0] |

The expansion tables have no reset content and must be loaded before use.

## What follows the published design and what does not

Follows it: nine channels; 10-bit ADC, LUT expansion to 16 bits with
calibration; thresholded nine-channel sum; first-level filter of two 5-tap FIRs
built from two negatable barrel shifters per tap, a three-point maximum finder
for timing and a separate energy FIR; module-level pile-up warning; dual-port
memories written at externally supplied addresses; ECC with single-error
correction and double-error detection; an associative patch memory; modulo-3
checking of arithmetic; full or reduced readout with the second filter
bypassable; second filter as a FIR bank plus order-statistic operator with two
coefficient banks; two-stage ADC with m = 5 and n1 + n2 = 6; PSA-ADC with
k + n = 14 channels.

This design's own choices (no figure given): memory depth; coding offset of
the two-stage ADC; pipeline registers and latencies; shift range of the
barrel-shifter terms; maximum-finder tie and sign rules; pile-up as a distance
window; AFOSH size (4 × 8 taps, 12-bit coefficients); maximum frame of 8
samples; the readout command/pointer protocol, the channel-major readout order
and the output word; the configuration map; the diagnostic ECC flip mask;
4 patch entries per channel.

Not modelled: analog switch, compressor, DACs beside the ADCs, calibration
generator, the analog parts of both converters, the external address generator
and controllers, triplicated current voting, the multichip substrate. The
freeing of memory locations after trigger decisions is the address
generator's job and happens outside this module.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/fermi_pkg.sv tb/tb_fermi_top.sv --top-module tb_fermi_top
obj_dir/Vtb_fermi_top
```

Replace the testbench name for any block (`tb_<module>`). `tb_fermi_top` runs
the module at its default size: it configures everything over the bus,
records 2000 crossings of nine channels with pulses (some piled up) through
behavioural ADCs, compares every first-level output and pile-up warning with an
integer model, reads 24 frames out in full and in reduced mode with both banks,
and checks every word. It plants single and double ECC errors and one patched
cell, and counts each mechanism (threshold suppression, pulse, pile-up, ECC
correction and detection, patch hit, full and reduced readout per bank, PSA
conversion); one that never happens counts as a failure.

`tb_fermi_workload` runs the storage and readout load the module was sized
for, also at the default size. A behavioural address generator hands each
crossing a location from a pool of free pointers. It accepts 1 % of crossings
at random, 80 crossings (2 µs) after they were recorded, and keeps their
8-sample frames. It frees everything else. Each kept frame waits 80 000
crossings (2 ms), is read out (full and reduced in turn) while recording goes
on, and is then freed. Over 400 000 crossings it checks every readout word,
that the pool of 8192 locations never runs dry, and that a frame is read in
fewer clocks than the mean spacing of accepts. With the default seed it reads
about 3 200 frames, at 85 clocks each, and peaks near 6 700 locations in use.

The whole suite runs in well under a minute.

The testbenches use two-state simulation; every register that is read is
reset or written first.
