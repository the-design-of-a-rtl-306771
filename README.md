# Digital coincidence trigger for an RPC-based PET

A PET scanner looks for pairs of gamma photons from the same annihilation.
Both photons of a pair reach opposite detector plates within a few hundred
picoseconds of each other, while unrelated hits are spread out in time. A
trigger that accepts only hits closely matched in time throws away most random
coincidences before any data is stored. Resistive plate chambers (RPCs) time
gamma hits to better than 300 ps FWHM, so the coincidence window can be very
narrow. That is too fine for discrete discriminators and gates.

This design does the whole job digitally, inside an FPGA. The detector signal
is oversampled by the I/O deserializers at a few GHz. Each rising edge is then
given a time stamp: a coarse clock count plus the index of the sample where the
edge appears. Two edges coincide when their time stamps differ by less than a
window. Apart from the sampler, everything is ordinary synchronous logic on one
250 MHz clock. The design is pipelined and has no dead time: a new sample word
is processed on every clock.

The RTL implements one **north-south coincidence channel**. It has two input
channels (north and south plate), a shared time base, one edge processor per
channel and a coincidence unit.

```
 n_es_pad -> edge_sample -> edge_process --(n_e_trigger, n_e_time, n_e_counter)--+
                               ^                                                 |
                          edge_time (40-bit coarse counter, shared)         edge_coinc -> ns_c_trigger
                               v                                                 |
 s_es_pad -> edge_sample -> edge_process --(s_e_trigger, s_e_time, s_e_counter)--+
```

## Time representation

All blocks share one notion of time, defined in `rtl/tdc_pkg.sv`:

| quantity | value | meaning |
|---|---|---|
| core clock | 250 MHz, 4 ns | the clock of all logic |
| `COARSE_W` | 40 bits | coarse time, the count of core clocks since reset (wraps after about 73 minutes) |
| `WORD_W` | 12 | samples per core clock, 333 ps apart (3.0 GHz) |
| `FINE_W` | 4 bits | fine time, the sample index 0..11 inside the word; 0 is the earliest |
| `edge_time_t` | 44 bits | packed struct `{coarse, fine}` |

Two time stamps are compared as whole numbers of sample periods,
`coarse*12 + fine` (`to_samples()`), so the fine field never wraps on its own.
All time stamps come from the same counter, so they share a fixed offset
against real time. This offset is the same on both channels and cancels out
when two stamps are compared.

**Sampling rate.** The target figures are three input pads per channel,
sampling on both edges of a clock (DDR), about 3.3 GHz, and about 300 ps
resolution. At a 250 MHz core clock, 3.3 GHz works out to 13.2 samples per
clock, which is not a whole number. Three DDR pads also deliver samples in
multiples of six per fast-clock period. This design therefore uses 12 samples
per word: a 500 MHz sampling clock, 333 ps per sample, 3.0 GHz. To change the
rate, edit `WORD_W`. `FINE_W` follows it automatically.

## The sampler: `edge_sample` (behavioural model)

In the FPGA, the sampler is the device's input SERDES. The signal arrives on
three pads, each with its own delay. Each pad is sampled on both edges of the
fast clock and deserialized. Interleaving the three pads' bits gives a word
that is a picture of the signal at equally spaced instants. This is the only
part that depends on the FPGA, so `rtl/edge_sample.sv` is a simulation model
and not synthesizable logic. It takes sample `k = 3*e + p` (pad `p`,
fast-clock half period `e`) at `k*CLK_PS/12` ps after the rising core-clock
edge. It shows the word for core period *k* throughout period *k+1*. To target
a real device, replace it with the vendor's deserializer and a bit-reordering
stage that keeps bit 0 as the earliest sample.

## Edge search and edge filter: `edge_process`

An edge is a low sample followed by a high one. Edges that span two words
count: the first sample of a word is compared with the last sample of the
previous word.

The **edge filter** removes glitches. An edge at sample *p* is accepted only if
samples *p* to *p+F-1* are all high, where *F* is the filter width in samples.
With *F = 1*, every transition is accepted. A pulse that starts near the end
of a word can only be confirmed by the next word. The unit therefore judges
each word one clock after it arrives and uses the following word as
look-ahead. This limits *F* to at most one word (1..12). A value of 0 is
treated as 1.

For each word containing at least one accepted edge, the unit outputs:

- `e_trigger`: a one-clock pulse. It can serve as the acquisition trigger of
  that channel.
- `e_time`: the coarse count latched with the word, plus the sample index of
  the **first** accepted edge.
- `e_counter`: a 32-bit count of accepted edges since reset. It grows by the
  number of accepted edges in the word.

A detector pulse must return low before it can produce a new edge. A second
edge within the same 4 ns word is possible only with pulses shorter than a
word. Such an edge is counted but gets no time stamp of its own.

Latency: a word presented at clock *k* shows on the outputs after clock *k+2*.
Counting from the pad, an edge in core period *k* appears after rising edge
*k+3*.

## Coincidence rule: `edge_coinc`

Two edges coincide when `|t_n - t_s| < W`, with times and window *W* counted
in sample periods:

| W | window | pairs accepted |
|---|---|---|
| 0 | - | none (trigger disabled) |
| 1 | ~300 ps | same sample |
| 2 | ~600 ps | up to one sample apart |
| 3 | ~900 ps | up to two samples apart |

The strict "less than" is deliberate. Take two hits 428 ps apart. On a 333 ps
grid they typically land one sample apart. This rule rejects such a pair with
a 300 ps window and accepts it with a 600 ps window. Because of quantization,
a real time difference *d* gives a sample difference of either `floor(d/333ps)`
or one more, depending on where the hits fall relative to the sampling grid.
The window edge is therefore about one sample wide.

The two edges of a pair can reach the unit on different clocks. This happens
when they fall in neighbouring words, for example the north edge in the last
sample of one word and the south edge in the first sample of the next. To
handle this, the unit holds the most recent edge of
each channel. When a new edge arrives, it is compared first with a new edge
from the other channel in the same clock, and otherwise with the held edge of
the other channel. Edges that formed a pair are marked as used, so one photon
pair produces one trigger. If two pairs complete in the same clock, they give
a single one-clock pulse. `ns_c_trigger` follows the completing edge trigger
by one clock.

## Programmable and hard-wired variants

`edge_process`, `edge_coinc` and the top take `PROGRAMMABLE`:

- `1` (default): the filter width (`filter_w`) and the window (`window`) are
  inputs and may change on any clock.
- `0`: they come from the `FILTER_W` and `WINDOW` parameters. The inputs are
  then ignored, and synthesis removes the logic for the other settings.

## Top level: `ns_coinc_channel`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 250 MHz core clock, synchronous active-high reset |
| `n_es_pad`, `s_es_pad` | in | 1 | north and south plate signals at the pads |
| `filter_w` | in | 4 | filter width in samples (programmable variant) |
| `window` | in | 8 | coincidence window in samples (programmable variant) |
| `n_e_trigger`, `s_e_trigger` | out | 1 | edge triggers |
| `n_e_time`, `s_e_time` | out | 44 | edge time stamps `{coarse[39:0], fine[3:0]}` |
| `n_e_counter`, `s_e_counter` | out | 32 | edge counts |
| `ns_c_trigger` | out | 1 | coincidence trigger |

Parameters: `PROGRAMMABLE = 1`, `FILTER_W = 1`, `WIN_W = 8`, `WINDOW = 1`.
Reset clears the coarse counter, the edge counters and the held edges. The
sampler model needs no reset.

## Limits and departures

- One north-south channel only. A full-body scanner split into 50 north and 50
  south channels would need 2500 pairwise checks. Replicating this channel
  pairwise scales quadratically, and a better structure for that case is not
  designed here.
- 3.0 GHz sampling instead of about 3.3 GHz (see above).
- These behaviours are this design's own choices: the filter rule (minimum
  high time after the edge), one time stamp per word, the strict window
  comparison, holding one edge per channel and consuming paired edges, the
  synchronous reset and the widths of the `window` and `filter_w` inputs.
- The sampler is a behavioural model. The detector plates and the data
  acquisition that uses the triggers are outside this design.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_edge_time`: counting, reset and wrap-around.
- `tb_edge_sample`: random pad toggles against sampling instants computed by
  the testbench.
- `tb_edge_process`: a random sample stream that includes glitches, edges on
  word boundaries and several edges per word. A reference model on the flat
  stream checks the trigger, the time stamp and the count. It covers the
  programmable variant with a changing filter and a hard-wired one (F = 4).
- `tb_edge_coinc`: directed cases (pairs one sample apart with windows 1, 2
  and 3; pairs split over two clocks; used edges; window 0) and random
  streams checked against a reference model. It covers both variants.
- `tb_ns_coinc_channel`: end to end from pad pulses placed to the picosecond,
  at default parameters. It replays one set of 40 pairs with windows of 1, 2
  and 3 samples. It checks that the first pair (428 ps apart) is refused only
  by the narrowest window, and that the number of coincidences grows with the
  window. It then runs 300 mixed events: pairs, lone hits, glitches,
  word-boundary pairs, and changes of window and filter. It requires that
  every mechanism occurs: time stamps, coincidences, window rejections, filter
  rejections, pairs completing on different clocks, window and filter
  changes. It also checks latency: every edge trigger lags the coarse time
  in its stamp by the same number of clocks, and `ns_c_trigger` comes one
  clock after the later edge trigger.
- `tb_ns_coinc_channel_hw`: the same end-to-end test on the hard-wired
  variant (filter 3 samples, window 2 samples). It drives changing values
  on `filter_w` and `window` and checks that the channel ignores them.

## Simulating

With Verilator 5, from the repository root (the package must come first):

```
verilator --binary --timing --assert -Irtl rtl/tdc_pkg.sv \
  rtl/edge_time.sv rtl/edge_sample.sv rtl/edge_process.sv rtl/edge_coinc.sv \
  rtl/ns_coinc_channel.sv tb/tb_ns_coinc_channel.sv --top tb_ns_coinc_channel
./obj_dir/Vtb_ns_coinc_channel
```

For a single block, list `rtl/tdc_pkg.sv`, the block's file and its
testbench. `--timing` is needed because the sampler model and the testbenches
use delays. All files use `` `timescale 1ps/1ps ``.
