# Post-Viterbi correction of dominant error events with syndrome-guided position search and list-correction

In a perpendicular magnetic recording read channel, the errors left by the
Viterbi detector are almost all short, known "dominant" error events such as
`±[2,-2]` or `±[2,-2,2]` (differences between the written and detected ±1
symbols). A very short cyclic code (here 3 CRC parity bits per 200 data bits)
is enough to detect them, and a post-processor can then repair them. It
correlates the detector's residual with a matched filter for each event type,
picks the most likely event and position, and flips those bits back.

This design is such a post-Viterbi processor, with two additions that reduce
wrong corrections:

* **Position search.** The CRC syndrome does more than flag an error. For a
  primitive degree-3 generator, an event of a given type gives the same
  syndrome again every 7 positions. So the syndrome of the received codeword
  already tells which starting positions (one in seven) each event type can
  have. The detected bits also have to be able to carry the event: flipping
  `[2,-2]` needs two unequal neighbouring bits, for instance. Positions that
  fail either test are never considered. This cuts mis-positioning: a likely
  but impossible position can no longer win.
* **List-correction.** When one correction does not clear the syndrome, the
  next most likely event type is tried. Up to L = 3 types are tried in
  descending likelihood. This cuts mis-selection when two types score almost
  the same.

The RTL contains the encoder on the write side, and on the read side a Viterbi
detector followed by the post-processor. The recording channel and the
equalizer are left out.

## Chain

```
write side:  info bits --> edc_encoder --> codeword bits (to the channel)

read side:   equalized samples q_k
               |
               v
           ml_detector (8-state Viterbi, target 1+6D+7D^2+2D^3)
               | detected bit a^_k together with its own sample q_k
               v
           post_viterbi_proc
             |- syndrome_check ............ CRC remainder of the codeword
             |- target_error_signal ....... e_k = q_k - (g * a^)_k, stored
             |- optimal_position_search ... candidate positions per type
             |- error_corr_bank ........... K matched filters, max per type
             |- list_select ............... largest untried per-type maximum
             '- correction ................ flip event bits, recompute syndrome
               |
               v
           corrected 203-bit codeword + status
```

`pvp_system` is the top-level module. It holds the write side and the read side
next to each other. Their ports are brought out separately because the channel
between them is not modelled.

## Code, bit order and syndromes

The code is a (203, 200) CRC with G(x) = 1 + x² + x³. Codeword position p
(1…203) is the coefficient of x^(p-1). Bit p-1 of every 203-bit vector in the
RTL is position p. A syndrome is held as a 3-bit polynomial, with bit i the
coefficient of xⁱ. People usually write syndromes as a decimal number that
reads the x⁰ coefficient as the most significant bit (`pvp_pkg::syn_to_dec`).
With this ordering, the six event types that start at positions 1…7 give
these syndromes:

| event                | syndrome at start position 1..7 |
|----------------------|---------------------------------|
| ±[2,-2]              | 6 3 4 2 1 5 7                   |
| ±[2,-2,2]            | 7 6 3 4 2 1 5                   |
| ±[2,-2,2,-2]         | 2 1 5 7 6 3 4                   |
| ±[2,-2,2,-2,2]       | 5 7 6 3 4 2 1                   |
| ±[2,-2,0,2,-2]       | 4 2 1 5 7 6 3                   |
| ±[2,-2,2,-2,2,-2]    | 3 4 2 1 5 7 6                   |

Each sequence repeats with period 7. A syndrome only depends on which bits
flip, not on the sign of the event. `tb_syndrome_check` checks this table.
The encoder is systematic: positions 1…200 carry the data bits unchanged and
positions 201…203 carry the parity. The parity is r = s·x⁻²⁰⁰ mod G, where s
is the remainder of the data part.

`syndrome_check` and `edc_encoder` do not use a division LFSR. They keep the
residue x^(p-1) mod G of the current position in a register, multiply it by x
at each step, and XOR it in for every 1 bit. The bits can then be taken in
transmission order, position 1 first.

## Position search

`optimal_position_search` runs in step with the scan over starting positions
i = 1…N, one position per clock. It keeps one 3-bit register per error type
that holds "the syndrome this type would give if it started at i". The
register is loaded with the type's syndrome for position 1 and multiplied by x
at each step. Position i is a candidate for type j when all three of these
hold:

1. that register equals the codeword syndrome;
2. the detected bits under the non-zero entries of the event can carry it.
   An error flips each bit it touches, so bit i+k must be
   `bit_i XOR (pattern_k < 0)`. For example, `[2,-2,2]` needs the detected
   bits 010 or 101, and `[2,-2,0,2,-2]` needs `b0≠b1`, `b3≠b4`, `b0=b3`;
3. the event ends inside the codeword.

The first detected bit also fixes the sign of the event. A detected 0 means the
written bit was 1, so the event is +pattern. The matched filter uses that
sign. Candidates always satisfy (1). So with the search on, the first
correction always clears the syndrome. List-correction then goes past one try
only with the search switched off (`ops_en = 0`), in which case every
in-range position is a candidate. That setting is a conventional post-Viterbi
processor when only one try is made. It is there for comparison, and so that
the retry path can be exercised.

## Matched filters and likelihood scaling

`error_corr_bank` holds one filter per type. Its taps h_j = g * p_j are the
target response convolved with the event's halved pattern p_j (entries ±1, 0).
They are computed at elaboration time from `pvp_pkg`. At each position the
filter forms

    lik_j(i) = s · Σ_m e(i+m) · h_j[m]  −  2^QF · Σ_m h_j[m]²

where s is the event sign and e is the stored error signal. This is the usual
normalized matched-filter output, correlation minus half the event energy,
divided by the constant 2^(QF-1). The ±2 amplitude of the events and the
sample scaling are folded into that constant. Because the same positive
constant divides every filter, the comparisons come out the same as unscaled.
An error signal that exactly matches event j gives `+eta_j`. Error-signal
samples past position N are taken as 0, which cuts each window at the end of
the codeword. Each filter keeps the largest value over its candidates and the
position where it occurred. On equal values it keeps the earlier position.

## List-correction and the result

After the scan, `list_select` returns the type with the largest maximum that
has not yet been tried. `correction` XORs that event into the detected
codeword and recomputes the syndrome as a full parity-check product (a
constant XOR tree over all 203 bits). If the syndrome is zero, that codeword
is output. If not, the type is marked as used and the next one is tried, one
try per clock, up to L = 3. When no try succeeds, or there is no candidate at
all, the detected codeword is passed on unchanged and the status reports
`failed`. Each try starts from the detected codeword; corrections are not
stacked.

`pvp_status_t` reports the following for every codeword:

* `detected`: the syndrome was non-zero;
* `corrected` / `failed`;
* `tries`: 1…3, or 0 when no correction was tried;
* `ev_type` and `ev_pos` of the accepted correction;
* the original `syndrome`.

## Interfaces and timing

All streams use valid/ready handshakes. Reset is asynchronous and active low.

* `edc_encoder`: data bits pass through with no delay. After 200 of them it
  sends 3 parity beats, during which `in_ready` is low. `out_last` marks
  position 203.
* `ml_detector` (`DEPTH` = 32 survivor bits per state): the decision for
  sample k comes out, registered, together with q_k, on the edge that accepts
  sample k+DEPTH. A stream needs DEPTH further samples to flush its last
  decisions. The trellis starts in the all-zero-bits state.
* `post_viterbi_proc`: takes 203 pairs (bit, sample) per codeword and then
  stops accepting input until its output is taken. Counted in clock edges
  after the last input beat, `out_valid` rises:
  * on edge 1 for a zero syndrome;
  * on edge N+1+t when try t succeeds;
  * on edge N+2+t after t failed tries.

  A detected codeword therefore costs about 2·203 clocks; the processor is not
  pipelined.
* The read-side framing of `pvp_system` starts with the first sample after
  reset, and codewords follow back to back.

Number formats: samples are 12-bit signed with 4 fractional bits. One unit is
the noiseless target output for ±1 symbols, so the noiseless samples span
±16·16. The error signal is 14 bits wide, the likelihoods 24 bits, and the
Viterbi path metrics 32 bits, re-based to the smallest metric at each step.

## What is specified and what is chosen here

These values follow the reference design: the code, the generator
polynomial, the 203-bit codeword, the six dominant events (K = 6), L = 3, the
target 1+6D+7D²+2D³, the structure of the post-processor, and the rules for
candidates, likelihood and list-correction. The following are choices made in
this RTL:

* where the parity sits, and the bit order. The bit order is the one that
  reproduces the published syndrome sequences;
* all number formats and widths;
* the Viterbi detector's internal structure and survivor depth. Only
  "Viterbi detector for this target" is given;
* the one-position-per-clock scan, the single codeword buffer and the
  handshakes;
* tie-breaking, and cutting the correlation window at the codeword end. The
  reference formulation lets the window run past the end of the codeword;
* checking each try's syndrome with a separate combinational parity-check
  product. The reference block diagram sends the re-estimated codeword back
  through the syndrome checker; the syndrome is the same, and a try takes one
  clock;
* the `ops_en` comparison input.

Not built: the recording channel and the equalizer (no taps are given), and
the (420, 410, 5) Reed–Solomon outer code over GF(2¹⁰), which is only used
to estimate the sector error rate. The design is fixed to N = 203 through
`pvp_pkg`. A different code length (for example the small (36, 33) case)
means changing `N` there. The period-7 rule and the bit check hold for any N.

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`. Their reference models, in
`tb/tb_ref_pkg.sv`, are written separately from the RTL:

* syndromes by polynomial long division;
* taps by direct convolution;
* a plain software version of the whole search, filter and list-correction
  algorithm.

`tb_pvp_system` runs the whole design at its default sizes. It encodes
random data, then stands in for the channel: it produces target samples with
noise and blends in samples of a wrong bit sequence, so that the detector
makes a dominant error event or a single-bit error. It then checks every
output codeword and status against the reference. The run must see parity
insertion, clean codewords, first-try corrections, retries, failures, both
`ops_en` settings and detector back-pressure.

`tb_workload_ber` is a bit-error-rate run of the read chain: 1200 codewords
at two white-Gaussian noise levels, alternating between the position search
on and off. A second copy of the detector records the decisions before
post-processing. The run prints the bit errors before and after the processor
for each setting. It checks that clean codewords pass untouched, that every
output either has a zero syndrome or is flagged as failed, and that the
search-on setting removes errors. With the search on, the processor typically
halves the residual errors at the lower noise level. With the search off,
at the higher noise level it adds more errors than it removes: wrong
positions get chosen.

With Verilator 5, packages first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/pvp_pkg.sv tb/tb_ref_pkg.sv $(ls rtl/*.sv | grep -v pvp_pkg) \
  tb/tb_pvp_system.sv --top-module tb_pvp_system -o sim && ./obj_dir/sim
```

Replace the last testbench file and the top module name to run any other
testbench. The whole-system run takes well under a second of simulation time
on a current machine; most of the time is compilation.
