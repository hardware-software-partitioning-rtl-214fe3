# Multi-mode UMTS receiver: hardware front end

A UMTS terminal that speaks FDD, TDD and HSDPA needs some functions that are
far too heavy for a DSP: correlating the received chip stream against long
synchronisation and training codes at several samples per chip. This design is
the hardware side of such a receiver after hardware/software partitioning. It
contains three chains that share one input stream:

```
            coefficient load
                  |
 din_i/q --> rx_pulse_shaping_fir --> requantiser --+--> cell_searcher ------> candidates, S-SCH result RAM
 (8 bit)     (65 taps, 10-bit coef)   (shift, sat)  |      (FDD or TDD)
                                                    +--> ce_correlator_bench -> per-delay power, threshold flags
```

- **Pulse-shaping filter.** A 65-tap FIR with 10-bit coefficients, loaded
  through a write port so that FDD and TDD filters can be swapped.
- **Cell searcher.** This is the largest and subtlest part. FDD and TDD use one
  set of logic: FDD is treated as a special case of TDD.
- **Channel-estimator correlator bench.** It correlates the received samples
  with a training sequence at every delay of a 297-chip search window and
  marks the delays whose power passes a threshold.

Everything that follows these chains in the receiver is outside this design.
That includes the multipath searcher, rake combiner, frequency correction,
the Viterbi and turbo decoders, H-ARQ, and the cell-search decision tables.
The partitioning puts several of these in DSP software. For the rest, only
their complexity is known, not their internals. Their inputs leave the top
level as ports: the candidate list, the result-RAM read port, the estimator
results and the filtered stream.

All parameters default to the reference study's numbers where it gives them.
Those numbers are 4 samples per chip, a 65-tap filter, 10-bit coefficients,
and a search memory of 2560 × 15 × 4 entries. Where the study is silent,
the choice is this design's own and is listed under
"Departures and open points" below.

## Cell search

The network transmits a primary synchronisation code (PSC, 256 chips) at the
start of every FDD slot. In TDD it is sent once or twice per frame, at a
cell-dependent offset. Next to the PSC it sends one of 16 secondary codes
(SSC), which tells the terminal the code group and the frame timing. Cell
search has two jobs:

1. Find where the PSC is (P-SCH).
2. Find which SSC sits beside it in each slot (S-SCH).

### P-SCH matched filter (`psch_sub_matched_filter`, `psch_matched_filter`)

The 256-chip PSC matched filter is split into four 64-tap sub-filters. Its
taps are ±1, so each tap is an add or a subtract; there are no
multipliers. With K samples per chip, the taps sit K samples apart on a
256·K-sample delay line.

The split is there because of carrier frequency error. A frequency error
rotates the signal during the 256 chips and makes a full-length coherent sum
cancel itself. Each sub-filter can therefore output either its signed sum
("short") or its magnitude ("long"). The long setting tolerates four times
the frequency error, at the cost of some non-coherent loss.

- The four sub-filter results are added, for I and for Q.
- The output is |I + Q|.
- The result is added into an averaging memory with one entry per sample
  position of the search period. The period is one slot (2560·K) in FDD and
  one frame (2560·15·K) in TDD.
- The first period writes the memory; later periods accumulate into it.
- The output is scaled by `avg_scale` (Q16).

The complex correlation before the magnitude is also brought out as
`corr_i/corr_q`. Its phase is the rotation that the S-SCH must undo.

The study draws the averaging memory as a shift register of search-period
length. Here it is a RAM addressed by the sample index, which behaves the
same way. The default holds the TDD size, 153,600 entries. In FDD only one
fifteenth of it is used, and the rest could be shared with other blocks,
as the study suggests.

Timing:
- `corr_*` is valid one clock after the input sample.
- `avg_*` is valid two clocks after it.

### Candidate search and enabling (`psch_control`)

The control waits `n_periods` averaging periods (the study's "factor I"). In
the last period it looks for local maxima. A value counts if it is larger
than its left neighbour and not smaller than its right one. It keeps the
`num_cand` largest maxima in a list sorted by value, with room for at most
L = 4.

- **FDD** uses `num_cand = 1` and a one-slot period, so the single candidate
  is the slot's absolute maximum.
- **TDD** keeps several candidates, because it is not known in advance
  whether a frame holds one burst or two.

For the next `n_enable` periods, the control pulses `ssch_start[k]` on the
first sample of the burst that ends at candidate k. The matched filter peaks
on the first sample of the PSC's last chip, so that burst starts 255·K
samples earlier. `ssch_start` is combinational, so it is valid in the same
clock as its sample. This matters because the FDD stream has a valid sample
only every other clock after down-sampling.

### S-SCH correlator (`ssch_correlator`)

All 16 SSCs are one 256-chip sequence z multiplied by a Hadamard row. That
row is constant over blocks of 16 chips. The three-stage correlator uses
this:

1. Add 16 chips, each multiplied by the sign of z, into one partial sum.
2. At the end of each 16-chip block, add or subtract the partial sum into
   each of the 16 code accumulators, according to that code's Hadamard sign.
3. After chip 255, project each accumulator onto the P-SCH phase reference:
   Re{acc · conj(ph)}. This removes the rotation caused by the carrier
   frequency error, so the results can be averaged coherently over slots.

Stage 1 takes one chip every K samples, starting at the `start` sample. The
16 results and `done` appear two clocks after the clock that takes chip 255.
The phase reference is sampled at that moment. That gives the P-SCH filter
time to deliver its correlation of the same burst.

The z and b sequences and the Hadamard construction are not printed in the
study. They are taken from the UMTS standard and live in `mumor_pkg`.

### Cell-search assembly (`cell_searcher`, `ssch_result_ram`)

`cell_searcher` puts these parts together:

- A mode multiplexer chooses the FDD or TDD stream.
- In FDD, a down-sampler (`ds_factor`, `ds_phase`) brings the stream to K
  samples per chip and lets software pick the best sample phase.
- In TDD, the down-sampler is bypassed and the matched filter runs at the
  sample rate.
- L S-SCH correlators run in parallel. TDD needs this because two
  candidates can lie closer together than one correlation length.
- Each correlator takes the coherent P-SCH correlation last seen at its
  candidate position as its phase reference. A bypass uses the correlation
  arriving in the same clock, so the first burst is not derotated with a
  stale value.

Finished results go to `ssch_result_ram`, which has 15 rows of 16 codes:

- In FDD there is one row per slot (15 × 16 = 240 cells), selected by a slot
  counter.
- In TDD the row is 2·candidate + burst number.
- The first write to a row stores the results; later writes accumulate.
- Reads are registered, scaled by `rd_scale`, and return 0 for a row that
  was never written.

The code-group tables and decision logic that read this RAM are not part of
the design.

## Channel-estimator correlator bench (`ce_correlator`, `ce_correlator_bench`)

A matched filter over the 2048-chip FDD training correlation would be huge.
The bench instead runs one ±1 correlator per delay of the search window. The
window is 297 chips × 4 samples per chip, so WIN = 1188 correlators. A
WIN-sample delay line feeds them. Every OSR samples, one training chip
(`train_chip`, requested with `train_req`) is applied to all correlators at
once. Correlator k sees the sample k positions back, so after `corr_len`
chips it holds the correlation for delay WIN−1−k.

Operation after `start`:

1. **Fill.** The delay line fills for WIN−1 samples.
2. **Correlate.** This runs for `corr_len` chips. The first chip clears the
   accumulators.
3. **Energy pass.** WIN clocks: the power I² + Q² of every correlator is
   added up to give the window energy (`energy`).
4. **Output pass.** WIN clocks, one result per clock (`res_delay`, `res_i`,
   `res_q`, `res_power`). `res_hit` is set when
   power · 256 ≥ energy · `thr_pct`, which is the study's threshold
   expressed as a percentage of the window energy. `done` marks the last
   result.

From the last chip to `done` takes 2·WIN clocks. Picking paths from the
flagged delays is left to software, as in the study.

## Top level (`mumor_rx_hw`)

The filter output is reduced to 8 bits by an arithmetic right shift of
`fir_shift` bits with saturation. The same stream goes to:

- the cell searcher's FDD input when `mode` = 0 (FDD) or 2 (HSDPA);
- the cell searcher's TDD input when `mode` = 1;
- the estimator bench, always.

The filter adds one clock. Everything else is the sub-blocks' own timing.
The ports are plain signals and arrays.

## Departures and open points

- **TDD filter length.** The study gives 65 taps for FDD but no TDD filter
  length. `TAPS` is a parameter, and the coefficients can be reloaded.
- **Word lengths.** The 8-bit input and all internal widths are this
  design's choice. The accumulators are wide enough not to overflow at the
  default sizes; for example, a 2048-chip correlation of 8-bit samples fits
  in 20 bits.
- **Magnitude.** The P-SCH output is |I + Q|, which is how the block diagram
  reads. |I| + |Q| or I² + Q² would be equally plausible.
- **Short/long select.** Which setting gives the signed sum and which the
  magnitude is this design's reading of the sub-filter figure.
- **Local maximum.** The definition (strictly greater than the left
  neighbour, not smaller than the right) and the handling of period edges
  are this design's own.
- **Number of candidates.** L = 4 is this design's choice; the study leaves
  L open.
- **Result RAM.** The TDD row mapping, the scaled read port, and the rule of
  writing the lowest-numbered correlator first when several finish together
  are this design's own.
- **Estimator threshold.** The threshold is in units of 1/256 of the window
  energy, not whole percent.
- **Outside this design.** The following are in the reference study but not
  built here:
  - the despreader and peak searcher that follow the estimator;
  - the bit-level arithmetic unit (the LFSR/XOR engine for CRC,
    convolutional coding and scrambling);
  - its bit-addressed cache;
  - TDD soft-bit descrambling.

  The study describes these only in outline. The decoders, rake combiner,
  multipath searcher and frequency correction are described only by their
  complexity, or are mapped to DSP software.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block
against a reference model written in the testbench and prints
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rx_pulse_shaping_fir` | random coefficients and samples against a convolution, one-clock latency |
| `tb_psch_sub_matched_filter` | tap sum and delay output, both short and long |
| `tb_psch_matched_filter` | every correlation and averaged value over several periods, with mode and scale changes (K = 2, short period) |
| `tb_psch_control` | sorted local-maximum list and the S-SCH start positions |
| `tb_ssch_correlator` | all 16 codes against a reference correlator, rotated bursts, two-clock latency (K = 2) |
| `tb_ssch_result_ram` | store/accumulate/clear and scaled reads |
| `tb_cell_searcher` | FDD candidate and per-slot code detection, then TDD with two bursts (reduced size) |
| `tb_ce_correlator` | the accumulator against a running sum |
| `tb_ce_correlator_bench` | every per-delay result, energy and threshold flag on a two-path channel, 2·WIN read-out (WIN = 24) |
| `tb_mumor_rx_hw` | the whole design at default parameters (see below) |

`tb_mumor_rx_hw` runs the top with no parameter overrides. It covers:

- six FDD slots at 8 samples per chip, down-sampled to 4;
- a 256-chip training sequence through the 1188-delay bench;
- one TDD frame of 153,600 samples with two bursts, averaged and then
  enabled.

It checks the candidate positions, the moment the FDD search ends, the S-SCH
code detected in every written RAM row, and the strongest estimator delay.
It counts each mechanism and fails if any never occurred:

- filter outputs;
- averaging periods;
- FDD and TDD searches;
- S-SCH runs;
- correct code detections;
- estimator runs;
- threshold hits.

It takes about 20 seconds in Verilator.

To run one testbench, compile the package first and then the other files:

```
verilator --binary --timing rtl/mumor_pkg.sv $(ls rtl/*.sv | grep -v mumor_pkg) \
          tb/tb_mumor_rx_hw.sv --top-module tb_mumor_rx_hw -o sim && ./obj_dir/sim
```
