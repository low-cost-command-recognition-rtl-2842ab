# Low-cost spoken-command recogniser in logic

This design recognises isolated spoken commands from a stream of audio samples.
The whole signal chain runs in hardware:

1. A spectrum is produced for every incoming sample. The first 128 samples go through a
   direct DFT. After that, a sliding DFT updates all 128 bins each time a new sample arrives.
2. Each spectrum becomes a vector of bin energies (Re² + Im²).
3. A segmenter merges runs of similar vectors into one averaged vector and drops silent runs.
   This shortens the sequence that has to be classified.
4. A dynamic-time-warping (DTW) classifier compares the short sequence with up to 20 stored
   command prototypes and reports the closest one.

The structure of the two transform engines follows the published design this RTL implements: a
low-cost FPGA front end for a voice-command device. The published design also specifies the
energy vectors, the two segmentation criteria and the choice of DTW. The remaining details are
choices made here, and each source file's opening comment says which parts are which.

## Signal chain and modules

```
 x(n) 12 bit ──► dft_engine ──► dft_result_transfer ──┐ (seeds, once)
          │                                           ▼
          └────────────────────────────────────► sdft_engine ──┐
                                                               ▼
               spectrum of the first block (transfer) ──► bin_energy ──► spectral_segmenter ──► dtw_classifier
```

| module | role |
|---|---|
| `cr_pkg` | shared constants; fixed-point twiddle functions |
| `twiddle_rom` | 128-entry cos and sin tables, Q1.15, computed at elaboration |
| `dft_index_counter` | n/k counters and the table address (n·k) mod N |
| `dft_engine` | direct DFT of one 128-sample block, one product pair per clock |
| `dft_result_transfer` | streams the finished DFT coefficients, one bin per clock |
| `sdft_engine` | sliding DFT: stores for x(n−N), Re and Im; one complex multiply per clock |
| `bin_energy` | Re² + Im² per bin, one-stage valid/ready register |
| `seq_divider` | restoring divider (one quotient bit per clock), used for cluster averages |
| `spectral_segmenter` | contrast and silence decisions; emits averaged vectors with a count element |
| `dtw_classifier` | prototype memory, DTW cost with two rolling rows, best-match search |
| `command_recognizer` | top level: phase control, stream muxing, back-pressure |

## Number formats

- Samples are 12-bit two's complement.
- Twiddles are `round(32768·cos(2πi/128))`, with +1.0 clamped to 32767. They are signed 16-bit (Q1.15).
- The coefficient stores are 16 bits wide. A 128-term sum of 12-bit samples needs 19 bits plus
  sign, so every stored coefficient is the true X(k) divided by 8. This shift,
  `SAMPLE_W + log2(N) − COEF_W`, is computed by `coef_shift()` in the package.
- Each product is rounded half up into the store format. Sums saturate instead of wrapping.
- In the sliding update, the old coefficient is taken three bits wider. The sample difference
  x(n) − x(n−N) is added there at full precision, and rounding happens after the complex multiply.
- Energies are 32 bits. Cluster sums and the contrast use wider internal registers, sized from
  the parameters so they cannot overflow.

## The two transform phases

**Direct DFT (`dft_engine`).** While it wants a sample, the engine raises `s_ready`. It then
accepts one sample `x(n)` and walks k = 0…127. On each clock it reads the two tables at
(n·k) mod 128 and adds `x·cos` into the Re store and `−x·sin` into the Im store. For n = 0 a
zero is selected in place of the old store contents, so no clear pass is needed. One block
therefore costs 128 clocks per sample. `read_sig` pulses 129 clocks after the last sample was
accepted. The results stay readable on `rd_k`/`rd_re`/`rd_im` until `restart`. The transfer unit reads them out one bin per clock
through an output register, starting two clocks after `read_sig`.

**Sliding DFT (`sdft_engine`).** The engine uses the recursion

    X_k(n) = (X_k(n−1) + x(n) − x(n−N)) · e^{+j2πk/N}

Let a = Re + Δx and b = Im, where Δx = x(n) − x(n−N). Let c = cos and d = sin. Each bin then
becomes Re' = ac − bd and Im' = ad + bc. The coefficient stores are first loaded from the direct
DFT through the `seed_*` port.

During the direct phase, `run` is low. Samples then only fill the 128-deep x(n−N) buffer, so
when sliding starts the buffer holds exactly the block the seeds describe. With `run` high,
every accepted sample produces 128 updated bins on a valid/ready stream.

**Drift.** The fixed-point twiddles do not have magnitude exactly 1, and every update rounds.
Errors therefore build up slowly over a long run. The testbench bounds the error against an
exact DFT at 48 LSB (of the /8 scale) over 300 slides; the end-to-end test checks it again
throughout its run. The top's `resync` input starts a fresh direct DFT. Use it between
utterances to reload exact coefficients.

**Phase control (`command_recognizer`).** After reset or `resync`, a sample goes to both the
DFT and the sliding engine's buffer, and is accepted only when both can take it. When the
direct DFT completes, the transfer unit streams the 128 coefficients. They go to the sliding
engine as seeds and also, through the energy stage, to the segmenter as the first spectrum.
While this happens the sliding stream is held off. After the last beat, `sliding` goes high and
every later sample yields a full spectrum. `dft_done` reports that a direct transform has
finished.

## Segmentation

The segmenter keeps one running cluster: a sum vector, an energy total and a count.

For each incoming 128-element energy vector, the segmenter computes two values:

- the squared Euclidean distance to the previous vector (its *contrast*);
- the vector's total energy.

It then decides as follows:

- If the cluster is empty, the vector opens a cluster.
- If the contrast is below `contrast_thr`, the vector is added to the cluster. The threshold is
  compared against a squared value, so it is given squared.
- Otherwise the cluster is closed. The vector that crossed the threshold opens the next cluster.
  - If the cluster's mean vector energy exceeds `silence_thr` (tested as
    `energy_sum > silence_thr · count`), the average vector is emitted. It has 128 elements,
    each the truncated quotient of sum / count, followed by a 129th element holding the count.
    `boundary` pulses.
  - Otherwise the cluster is discarded as silence and `silence_drop` pulses.
- A cluster whose count reaches its maximum is closed in the same way.

Output is a valid/ready stream with an element index (`o_idx`, 0…128) and `o_last` on the count
element. The averages come from the shared sequential divider, which costs about 48 clocks per
element. An emitted segment therefore occupies the segmenter for roughly 6,300 clocks. During
that time it back-pressures the energy stage, and through it the sample input.

The published design leaves the thresholds open, so they are inputs.

## Classification

`dtw_classifier` holds `NUM_CMD` = 20 prototypes of up to `MAX_SEQ` = 32 vectors of 129
elements each. The host writes them through `t_*` (element by element, then the length; length 0
marks an empty slot). Segments arriving on `q_*` are appended to a query buffer. Vectors beyond
`MAX_SEQ` are dropped, and `q_overflow` is set.

A `classify` pulse runs DTW against every non-empty prototype:

- The local distance is the L1 distance between vectors.
- The step pattern is symmetric: D(i,j) = d(i,j) + min(D(i−1,j), D(i,j−1), D(i−1,j−1)).
- Only two rows of D are kept.
- Costs are compared normalised by the path length bound M + L. The comparison is done by
  cross-multiplication, so no divider is needed.

The result is the best command index `r_cmd`, its raw cost `r_cost`, and `r_found`. `r_found`
is 0 if no prototype or no query was present. The query buffer is emptied afterwards. Each cell
costs 130 clocks, so a 32×32 comparison against 20 prototypes takes about 2.7 M clocks.

The top does not decide where an utterance ends. The controller does this, by pulsing
`classify`, and usually follows it with `resync`.

## Throughput and timing

| stage | clocks |
|---|---|
| direct DFT | 128 per sample (plus 1 at the end) |
| transfer | 128 per block |
| sliding DFT | 129 per sample when nothing stalls |
| energy + segmenter intake | ≈ 2 per bin, about 258 per sample |
| segment emission | ≈ 6,300 per emitted segment |
| DTW | 130 per cell (vector length + 1) |

To keep up with 8 kHz audio in the sliding phase, the clock must run above about 2.1 MHz, plus
headroom for segment emission. A small sample FIFO in front of `s_data` absorbs those bursts.
All handshakes are valid/ready, and a sample is taken on a clock where both are high.

## Departures from the published design

- **Sample width.** The published description mentions 16-bit sampling. Its block diagrams show
  a 12-bit sample path, and this RTL uses 12 bits (`SAMPLE_W`).
- **Sliding recursion.** The recursion is implemented in the standard form given above. The
  diagram's operands (a, b, c, d and a subtractor fed by the x(n−N) buffer) agree with it.
- **Coefficient FIFOs.** The coefficient "FIFOs" of the block diagrams are built as 128-entry
  memories addressed by k. Their behaviour is the same as a FIFO that is read and rewritten once
  per bin.
- **x(n−N) buffer width.** The x(n−N) buffer is 12 bits wide rather than 16.
- **Open details.** The published design does not specify the scaling, the energy measure
  (taken as |X|²), the silence test on the cluster mean, the average's truncation, the DTW step
  pattern and distance, the prototype count per command and sizes, or the handshakes. Each of
  these is this design's choice.
- **Location of segmentation and DTW.** In the published system a microcontroller may run the
  later stages. Here all stages are in logic.
- **`resync`.** The `resync` input is an addition.
- **Outside parts.** The microphone and ADC, the host microcontroller and the radio transmitter
  are outside this RTL. The top's sample, threshold, prototype and result ports are where they
  connect.

## Simulation

Every testbench in `tb/` checks its block against an independent model. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cr_pkg.sv tb/sdft_engine_tb.sv --top-module sdft_engine_tb
./obj_dir/Vsdft_engine_tb
```

| testbench | what it checks |
|---|---|
| `twiddle_rom_tb` | every entry against a real-valued cos/sin |
| `dft_index_counter_tb` | counting order, address, EOC |
| `dft_engine_tb` | several blocks against a bit-exact model, accuracy against a float DFT, handshake, READ_SIG latency |
| `dft_result_transfer_tb` | beat order, data, busy and last timing |
| `sdft_engine_tb` | bit-exact model over 300 slides, error bound against an exact DFT, buffer fill with `run` low, per-sample latency |
| `bin_energy_tb` | random values with random back-pressure |
| `spectral_segmenter_tb` | reduced vector length; averages, counts, silence drops, count saturation |
| `dtw_classifier_tb` | reduced sizes; costs and choice against a full-table DTW, empty slots, empty query, overflow |
| `command_recognizer_tb` | full default size, end to end |
| `command_set_tb` | full default size, all 20 prototype slots: train and recognise 20 commands |

`command_recognizer_tb` runs at the default parameters (about 3.6 M clocks). It does the
following:

- feeds a warm-up tone mixture;
- records two synthetic "words" as prototypes from the device's own segment output;
- checks that two new utterances of those words are recognised;
- forces an over-long query.

It counts how often each mechanism happens: direct transforms, seeding, spectra, input stalls,
boundaries, silence drops, resyncs, classifications and overflow. A mechanism that never happens
counts as a failure. Along the way it compares every 97th spectrum with an exact DFT of the last 128 samples,
and checks the 129-clock sample interval when nothing downstream stalls.

`command_set_tb` fills all 20 prototype slots. Each of 20 synthetic two-tone commands is
recorded once as a prototype. A second take, with other noise and tone durations 10 % longer or
shorter, must then be assigned to its own command. It runs for about 44 M clocks.

## Choosing the thresholds

The segmenter works on every sliding-DFT update, one sample apart. Adjacent spectra differ
mostly where a sound starts or stops, and through the ripple of leakage while the 128-sample
window fills. The contrast threshold is absolute. For a given input level it sets how many
segments an utterance yields, and it reacts steeply:

- In the 20-command test, 2·10¹² gives around 50 segments per command, which overflows a
  32-vector query.
- 6·10¹² to 6.5·10¹² gives 3 to 30 segments.
- 8·10¹² leaves some commands with no segment at all.

A take that is only 10 % quieter already yields other segments. Choose the threshold from
recordings at the working input level, and normalise the level before the recogniser if it
varies. The silence threshold is compared with the cluster's mean vector energy, where a
vector's energy is the sum of its 128 bins. With the /8 coefficient scaling, a sine of
amplitude A centred on a bin gives 2·(8A)² = 128·A² once it fills the window. A = 1000 gives
1.28·10⁸ against the 6·10⁷ used in the tests.

## Changing sizes

- `N` must be a power of two. The tables, counters and buffers follow it.
- Widening `COEF_W` reduces the coefficient shift. If `SAMPLE_W + log2(N) ≤ COEF_W`, the shift
  becomes 0.
- `MAX_SEQ` and `NUM_CMD` set the prototype memory: `NUM_CMD · MAX_SEQ · (N+1) · 32` bits,
  about 2.6 Mbit at the defaults. This memory dominates the area.
- `CNT_W` limits the cluster length.
