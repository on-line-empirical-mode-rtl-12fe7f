# On-line empirical mode decomposition processor

Empirical mode decomposition (EMD) splits a signal into a few intrinsic mode
functions (IMFs), each an oscillation with a locally varying frequency and
amplitude, plus a slowly varying residue. Feeding the IMFs to a Hilbert
transform gives the Hilbert-Huang time-frequency spectrum. That spectrum suits
non-stationary biomedical signals such as EEG.

EMD finds each IMF by *sifting*:

1. find the local maxima and minima of the current candidate;
2. draw an upper envelope U(t) through the maxima and a lower envelope L(t)
   through the minima, using cubic splines;
3. subtract their mean, m(t) = (U(t) + L(t)) / 2.

After R sifts the candidate is taken as an IMF c_i(t). The IMF is subtracted
from the signal, and the remainder is decomposed the same way, M times in all.
Done in software, every sift runs over a whole block of samples, so an IMF
appears only after the whole block has been collected and sifted R times.

This design sifts **on-line**. Samples go in one at a time. Every output
stream is produced continuously, each with its own delay: the M IMFs and the
residue. Two ideas make this possible:

* **Loop decomposition.** The loop over components and the loop over
  iterations become a pipeline of M×R sifting stages. When a new sample
  arrives, the controller visits every stage once and moves each sample as
  far forward as it can go.
* **On-line spline with data reuse.** An envelope is extended by one piece
  each time a new extremum appears. The piece is computed cheaply from stored
  results.

The default configuration is the one for a single EEG channel:
* M = 5 IMFs and R = 10 sifts, so 50 stages;
* 16-bit samples;
* 256 samples/s;
* 2040 clock cycles per sample, which is a 522.24 kHz clock.

## Sifting stages

Stage (i, j) holds iteration j of component i, and the stages run in the
order (0,0), (0,1), …, (0,R-1), (1,0), and so on. Each stage receives a
stream of candidate samples c_{i,j}(t) and passes on
c_{i,j+1}(t) = c_{i,j}(t) − m_{i,j}(t).

* After the last iteration of component i, the sample is the IMF sample
  c_i(t). It is sent out on `imf_*`.
* The same sample is subtracted from x_i(t), the input of that component,
  to form x_{i+1}(t). x_{i+1}(t) is the first candidate of the next
  component, or the residue after the last component.
* x_i(t) waits in a FIFO, one per component (`emd_x_buffer`), until its IMF
  sample arrives.

The decomposition is lossless by construction: x(t) = r(t) + Σ c_i(t) holds
exactly for every sample, unless a value saturated at the 16-bit limits.

All stages share one set of processing units (PUs) for each envelope. What
makes stages differ is their state, which is stored:
* a ring of candidate samples (`emd_cand_buffer`);
* the recent extrema and spline coefficients (`emd_coef_buffer`);
* a few counters in the controller's register file.

## The on-line spline

This is the core of the design, and the least obvious part.

A natural cubic spline through extrema (t_k, m_k) is defined by its second
derivatives S_k at the extrema. These solve a tridiagonal system. Row k is

    h_{k-1} S_{k-1} + 2 (h_{k-1} + h_k) S_k + h_k S_{k+1} = 6 (sl_k − sl_{k-1})

Here h_k = t_{k+1} − t_k and sl_k = (m_{k+1} − m_k) / h_k. This row is
A_k S_{k-1} + B_k S_k + C_k S_{k+1} = D_k.

The Thomas algorithm (TDMA) solves the system in two steps:
* a forward sweep
  C'_k = C_k / (B_k − C'_{k-1} A_k),
  D'_k = (D_k − D'_{k-1} A_k) / (B_k − C'_{k-1} A_k);
* a back substitution S_k = D'_k − C'_k S_{k+1}.

Once the S_k are known, piece k of the envelope is
a t'^3 + b t'^2 + c t' + d, where t' = t − t_k and

    a = (S_{k+1} − S_k) / (6 h_k)   b = S_k / 2
    c = sl_k − h_k (2 S_k + S_{k+1}) / 6   d = m_k

Solving the system again for every new extremum, over a window, would be
expensive. It would also place the window's artificial boundary conditions at
the window's edges, which are wrong there. The design avoids this in three ways:

* **Only the middle piece is used.** The design looks at the newest
  N_EXT = 8 extrema. The piece that is kept is the one between the 4th- and
  3rd-newest extrema, t_{n-4}..t_{n-3}, because it is the piece least
  affected by the boundary assumption. One new piece is produced per new
  extremum, so the pieces tile the time axis without gaps or overlaps.
* **The forward sweep is never restarted.** Row k of the forward sweep needs
  only the two extrema around it and the previous C', D'. So C' and D' are
  kept for every stored extremum, and a new extremum adds just one row: the
  row of the extremum before it. The left boundary (S = 0 at the very first
  extremum) is soon forgotten, because the sweep damps its influence.
* **The back substitution is short.** It starts at the newest extremum with
  S_n = 0, the natural boundary, and runs only NB = 4 rows down to the
  middle piece.

For each envelope of each stage, the coefficient buffer therefore holds only
the newest NB+1 = 5 extrema, each with its time, value, slope, C' and D'.

The first seven extrema of a stage produce no piece. Samples at the very
beginning of each stage therefore leave it unsifted (see below).

`emd_spline_pu` does one update. It uses a single sequential divider and
needs three divisions:
* the new slope;
* C';
* D'.

A piece needs one more division, for a. The other divisions by 6 are done by
multiplying with 1/6. At the default number format, an update takes about
200 cycles, or 270 when it produces a piece.

## When a sample may leave a stage

A stage keeps its samples in a ring of DEPTH = 256 slots. Each slot holds the
sample, and also the upper and lower envelope values once they are known.

* **Filling in the envelopes.** When a new spline piece comes out, the
  controller sweeps t' over the piece's interval and, for each sample in that
  interval that is still in the ring, writes the envelope value that
  `emd_poly_pu` computes.
* **Release.** A sample is released, oldest first, once *both* envelopes are
  final at its time, meaning a piece of each envelope has gone past it. Its
  next candidate is then s − (U + L)/2, computed by `emd_candidate_unit`.
* **Delay.** The delay of each stage therefore depends on the data. It is
  three to four periods of the local oscillation, because the middle piece
  ends three maxima (or minima) before the newest one. In the end-to-end
  test, the 10-sample tone needed about 40 samples per stage. The delays add up along the 50
  stages, so slower components come out later.
* **Overflow.** If a new sample arrives at a full ring, the oldest sample is
  released at once. A sample released without both envelope values leaves
  the stage unchanged, which treats the mean as 0. This also applies to the
  start-up samples that come before a stage's first piece. A 256-slot ring
  can therefore sift oscillations with periods of up to roughly 100–130
  samples. Slower content passes through stages unsifted and ends up in the
  last IMFs or in the residue.
* **Hand-over queue.** Released samples go through a shared queue
  (`emd_fifo`, QDEPTH = 256) into the next stage, which is visited next in
  the same sample period. If the queue is full, releases stop. The samples
  stay in the ring and are released on a later visit.

## One sample period

`emd_fsm` takes in a sample when `x_valid && x_ready` and then visits the
stages in order. In each visit it:

1. loads the stage's registers;
2. for each sample that the previous stage handed over (for the first stage,
   the raw input):
   * stores the sample in the ring;
   * asks both extremum PUs whether the previous sample of the stage was a
     maximum or a minimum;
   * for each new extremum:
     - reads that envelope's history;
     - runs its spline PU and writes the history back;
     - if a piece came out, fills in the envelope values of the piece;
3. releases every sample that is ready, as described above;
4. saves the stage's registers.

`x_ready` rises again after the last stage. The PUs work only when an
extremum was found. `pu_en` is the enable for the clock gate that switches
them off the rest of the time. Inside the spline PU, the same condition
already acts as the register enable.

The extremum PUs use a stored trend bit, so a flat top or bottom counts as
one extremum at its last sample. This makes maxima and minima alternate.

## Number formats

Samples, candidates, envelopes, IMFs and the residue are 16-bit signed
integers. Sample times are 16-bit counters that wrap; only their differences
are used, and those stay far below 2^15.

All spline arithmetic (slopes, C', D', S, a..d) uses Q31.32 in 64-bit words.
This choice is generous. The only intermediate value as narrow as the
samples is the envelope value, which is rounded and saturated to 16 bits.
Narrowing the spline format would save much of the PU area. The per-module
tests give the accuracy needed to judge such a change.

## Blocks

| File | Role |
|---|---|
| `emd_pkg.sv` | widths, types (history record, spline piece, ring entry), fixed-point helpers |
| `emd_processor.sv` | top: wires everything below |
| `emd_fsm.sv` | controller: stage visits, releases, t' generation, PU enable |
| `emd_extremum_pu.sv` | first-stage PU: is the previous sample a new maximum / minimum? |
| `emd_spline_pu.sv` | second-stage PU: forward-sweep row, back substitution, a b c d |
| `emd_divider.sv` | signed fixed-point divider, one quotient bit per cycle |
| `emd_poly_pu.sv` | last-stage PU: a t'^3 + b t'^2 + c t' + d, rounded to 16 bits |
| `emd_candidate_unit.sv` | mean of the envelopes, next candidate, next component input |
| `emd_cand_buffer.sv` | per-stage ring of samples and their envelope values |
| `emd_coef_buffer.sv` | per-stage, per-envelope extremum history (data reuse) |
| `emd_x_buffer.sv` | per-component FIFO of x_i(t) |
| `emd_fifo.sv` | hand-over queue between stages |

Each file begins with a description of its interface and timing.

## Top-level interface

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `x_valid`, `x_data[15:0]`, `x_ready` | in/in/out | one sample per period; taken when valid and ready |
| `imf_valid`, `imf_idx`, `imf_data[15:0]` | out | one-cycle pulse carrying sample c_i(t) of IMF `imf_idx` (0-based) |
| `res_valid`, `res_data[15:0]` | out | one-cycle pulse carrying a residue sample |
| `pu_en` | out | the PUs are working (clock-gate enable) |

The outputs have no back-pressure. Every stream is in time order, and the
n-th output of a stream belongs to the n-th input sample.

## Measured behaviour

The results below come from the end-to-end test at the default parameters.
The input is 12 000 samples: three tones with periods of 10, 64 and 1500
samples, plus a short flat stretch.

| Quantity | Value |
|---|---|
| IMF1 against the 10-sample tone (relative rms error) | 0.0016 |
| Reconstruction x = r + Σ c_i | exact for every time where no output saturated |
| Delay of IMF1..IMF5 | 397, 1364, 1939, 3121 and 4266 samples |
| Mean cycles per sample period | 1739, within the 2040 available at 522.24 kHz |
| Longest single sample period | about 190 000 cycles |

For comparison, the reference chip reports delays of 0.7, 2.0 and 4.7 s for
the first three IMFs of EEG, which is 179, 512 and 1203 samples at 256
samples/s. This test signal has much slower content, so its delays are longer.

## Departures and limits

* **Worst-case sample period.** The mean work per sample fits the 2040-cycle
  budget, but some periods take far longer. A run of extrema in many stages
  at once needs about 270 cycles per spline update. The reference
  architecture instead gives every stage a fixed share of each sample
  period. Here a stage takes as long as its work needs. A real-time
  deployment needs an input FIFO in front of `x_data`, or a faster clock.
* **Memory.**
  * The ring keeps the envelope values with each sample: 50 bits per slot,
    50 stages × 256 slots.
  * The x FIFOs are sized for the worst case: R×DEPTH + QDEPTH words per
    component.
  * In total this is about 1.0 Mbit (≈123 kB), where the reference chip
    reports 24.22 kB.
  * Smaller DEPTH, or a narrower spline format, reduces the memory. So does
    storing envelopes only for the samples not yet released.
* **Clock gating.** The clock-gate cell itself is not instantiated. It is a
  library cell, and `pu_en` and the PU's register enable are provided for it.
* **Spline system rows.** The rows are the standard natural-spline rows given
  above.
* **Lowest frequency.** Ring overflow limits the lowest frequency that can be
  sifted, as described above.
* **Precision study.** Precision is set by `SAMPLE_W` in `emd_pkg`. Only
  16 bits has been tested.
* **Overshoot.** In sparse-extrema regions the spline can overshoot. A few
  outputs of the slowest components then saturate; the test saw this at less
  than 5 % of times.

## Simulating

Every testbench in `tb/` checks itself. At the end it prints
`TB_RESULT checks=… failures=…`. For example:

    verilator --binary --timing -Wno-fatal rtl/emd_pkg.sv \
        $(ls rtl/*.sv | grep -v emd_pkg) tb/tb_emd_processor.sv \
        --top-module tb_emd_processor -o sim
    ./obj_dir/sim

The package must come first on the command line. The testbenches:

* `tb_emd_processor` runs the full default configuration. It takes about
  20 s of simulation and checks the following:
  * ordering;
  * exact reconstruction;
  * IMF1 accuracy;
  * the mean cycle budget;
  * that every mechanism occurs: extrema, pieces, envelope samples, sifted
    and unsifted releases, overflow, releases deferred by a full queue,
    hand-over, and stage visits with the PUs off.
* `tb_emd_fsm` runs a small configuration (M = 2, R = 3, 32-slot rings, an
  8-entry queue) with more detailed checks.
* `tb_emd_fifo` tests the hand-over queue on its own.
* The unit testbenches compare each PU and buffer with an independent model.
  The spline PU is compared with a floating-point model of the same on-line
  spline.

## Changing it

* `M`, `R`, `DEPTH` and `QDEPTH` are parameters of `emd_processor`.
* The sample, time and fixed-point widths are set in `emd_pkg`, and so is the
  window of extrema (`N_EXT`, with `NB = N_EXT/2`).
* The buffers are plain arrays with synchronous reads, ready to be mapped to
  SRAM.
* Making `DEPTH` larger lets slower components be sifted, at the cost of
  longer worst-case delays and more memory.
