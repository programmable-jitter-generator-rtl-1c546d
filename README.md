# Programmable jitter generator

A test signal with a known, adjustable amount of timing jitter is what you need
to measure how much jitter a receiver or a clocked system tolerates, or how a
link passes jitter on. This design injects jitter of a chosen shape into a clock
or a data stream using only digital parts: the input runs down a tapped delay
line, and for every cycle a pseudorandom draw from a stored table decides which
tap drives the output. The table is a histogram: the more often a tap appears
in it, the more often the output edge is shifted by that tap's offset. Loading
a different table changes the jitter's probability density (Gaussian,
dual-Dirac, sinusoidal, or any mix) without touching the hardware.

```
            +----- delay line: 32 cells of tau ------------------------+
  s_in ---->| D0 -> D1 -> ... -> D15 -> D16 -> ... -> D31              |
            +--|-----|-----------|------|-------------|----------------+
             r0 r1 ...          r15    r16  ...       r31
               \______________  32:1 selector ________/ ----> s_out
                                       ^ sel (5 bits)
  clk ---> LFSR (5 bit, Galois) --+    |
                                  v    |
  pattern (5 bit) -----> { pattern, lfsr } --> pattern memory 1024 x 5
  we/waddr/wdata  ------------------------------^  (registered read = sel)
```

## Phase taps

The delay line has 32 identical cells. Tap `k` (`r_k`, the output of cell
`D_k`) follows `s_in` by `(k+1)*tau`. Tap 15 is the ideal, zero-phase output
(`U_0`); choosing tap `k` shifts an edge by `(k-15)*tau`:

| tap `k` | 0 | ... | 14 | 15 | 16 | ... | 31 |
|---|---|---|---|---|---|---|---|
| shift | -15 tau | ... | -1 tau | 0 | +1 tau | ... | +16 tau |

So the generator produces 15 early phases, the reference, and 16 late phases;
the largest peak-to-peak jitter is `31*tau`. The total delay must stay below
half the signal period, `32*tau < T/2`, which is what makes tap switching
clean (next section). With the default `tau` of 50 ps the line spans 1.6 ns,
enough for clocks up to about 310 MHz; at 200 MHz (T = 5 ns) the maximal jitter
is 1.55 ns, 0.31 UI.

## When the tap may change

The selector is a plain 32:1 multiplexer. Switching it while some taps are high
and others low would put a glitch or a false edge on `s_out`. Because the whole
line is shorter than half a period, there is a window after every edge of
`s_in`, from `32*tau` after the edge until the next edge, in which all 32 taps
carry the same level. The select must change only inside that window.

`sel` changes right after the rising edge of `clk`. The simplest correct
phasing for a clock input, used by the clock-mode testbenches, is `clk = ~s_in`. A new tap is
then chosen at every falling edge of `s_in`, while all taps are still high.
That tap sets both the falling edge it arrives at and the following rising
edge. For a data stream, edges occur only at bit boundaries. There, `clk` should
rise inside each bit, at least `32*tau` after its boundary; mid-bit is the
natural choice. Any other `clk` works if its rising edge stays inside the window. A slower
`clk` (or `en` held low) changes the phase less often. This is how the rate of
phase changes, the jitter frequency, is controlled.

## Drawing a tap: the histogram logic

A 5-bit Galois LFSR (polynomial x^5 + x^3 + 1) steps through its 31 non-zero
states in a fixed pseudorandom order, one step per `clk` with `en` high. Its
state, appended below the 5-bit `pattern` number, addresses the pattern memory:
`address = {pattern, lfsr}`. The memory word read is the tap index, and the
memory's output register drives `sel` directly. On a clock with `en`, `sel`
becomes the word addressed by the LFSR state from before that clock.

Consequences worth knowing:

* The memory holds 32 patterns of 32 words. Word 0 of each pattern is never
  read, because the LFSR never reaches zero. A pattern therefore holds 31
  equally likely entries, and probabilities come in steps of 1/31.
* Over any 31 consecutive enabled clocks, every word 1..31 of the active
  pattern is used exactly once. The output histogram is exact over one LFSR
  period, not just on average. The order of the draws is pseudorandom but
  repeats every 31 clocks. The spectrum of the injected jitter therefore has
  lines at `f_clk/31` and its harmonics.
* Changing `pattern` takes effect on the next enabled clock. The LFSR carries
  on from where it was.
* After reset, `sel` is 15 (no shift) and the LFSR is `00001`. At power-up every
  memory word is 15, so an unloaded generator passes `s_in` through delayed by
  `16*tau` with no jitter.

### Building a pattern

For a target density `p(d)` over offsets `d = -15..16` (in cells), store tap
`15+d` in `round(31*p(d))` of the words 1..31. To make the counts sum to
exactly 31, round by largest remainders. Examples:

* dual-Dirac (duty-cycle distortion) of width `w` cells: taps `15 - w/2` and
  `15 + w/2`, 16 and 15 times;
* sinusoidal periodic jitter of amplitude `A`: word `i` holds
  `15 + round(A*cos(2*pi*i/31))`. The LFSR order then gives the arcsine
  density, but not a sinusoidal time sequence;
* combined jitter: the convolution of the component densities, quantised as
  above.

## Interface of `jitter_generator`

| port | dir | width | meaning |
|---|---|---|---|
| `s_in` | in | 1 | jitter-free clock or data stream |
| `clk` | in | 1 | histogram-logic clock (see timing above) |
| `rst_n` | in | 1 | synchronous, active low: LFSR to `00001`, `sel` to 15 |
| `en` | in | 1 | draw a new tap on this clock |
| `pattern` | in | 5 | active pattern, 0..31 |
| `we`, `waddr`, `wdata` | in | 1, 10, 5 | write port of the pattern memory, address `{pattern, word}` |
| `sel` | out | 5 | tap in use |
| `s_out` | out | 1 | jittered output |

Parameter: `TAU_PS` (default 50), the cell delay of the delay-line model.

A controller, such as a small microcomputer with a keyboard and display, is
expected to load the patterns, choose the active one and supply `clk`. It is
not part of this RTL.

## Files

| file | contents |
|---|---|
| `rtl/jg_pkg.sv` | constants (32 taps, reference tap 15, 32 x 32 x 5 memory) and types |
| `rtl/vcdl.sv` | delay line, **behavioural model**: a chain of `#TAU_PS` delays |
| `rtl/signal_selector.sv` | 32:1 selector |
| `rtl/galois_lfsr.sv` | 5-bit Galois LFSR |
| `rtl/pdf_memory.sv` | 1024 x 5 pattern memory, synchronous write, registered read |
| `rtl/histogram_logic.sv` | LFSR + memory |
| `rtl/jitter_generator.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_jitter_generator.sv` | end to end at default parameters: five patterns, edge timing, histograms |
| `tb/tb_jg_data_stream.sv` | data-stream use: 200 Mbit/s PRBS data, `clk` at mid-bit, every transition timed and the bit sequence checked |
| `tb/tb_jg_combined_pdfs.sv` | four combined densities (Gaussian; triangular periodic + bounded uncorrelated; sinusoidal + inter-symbol interference; all three) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` at the end. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_jitter_generator rtl/jg_pkg.sv tb/tb_jitter_generator.sv
./obj_dir/Vtb_jitter_generator
```

Every file sets `timeunit 1ps`. The end-to-end runs take a few
microseconds of simulated time and well under a second.

What the testbenches establish:
* every tap delays by exactly `(k+1)*tau`;
* every `s_out` edge lands at the delay predicted by an independent model of
  the LFSR and memory;
* each period of `s_out` has exactly one rising and one falling edge, so tap
  switching causes no glitch;
* the measured deviation histogram equals the stored one exactly;
* extremes, pattern switches, holds, writes and LFSR wrap-around all occur.


## Synthesis

`galois_lfsr`, `pdf_memory`, `histogram_logic` and `signal_selector` are
synthesizable. The histogram logic is five flip-flops plus one block RAM.
`vcdl` is a simulation model: a delay has no logic function. In silicon it is a
chain of matched buffers, or a voltage-controlled delay line whose control
voltage sets `tau`. On an FPGA it is a chain of fixed buffer cells, which must
be kept from being optimised away and placed so the cell delays match. The
multiplexer paths from the taps to `s_out` also need matched delays, or the
phase steps become uneven. Neither placement constraint is expressible in this
RTL.

## Where this design makes its own choices

These points are not fixed by the underlying concept and were chosen here:

* `tau` = 50 ps. Any value with `32*tau < T/2` works.
* The delay cells are fixed and there is no control-voltage input. A true
  voltage-controlled line would add one analog input that scales `tau`.
* The memory is organised as 32 patterns x 32 words, addressed `{pattern, lfsr}`.
* The LFSR polynomial is x^5 + x^3 + 1 with seed `00001`.
* The `en` input, the `pattern` input and the write port.
* Reset behaviour and the power-up contents (all words 15).
* Binary 5-bit select lines rather than 32 one-hot lines.
* The `clk` phasing rule. A controller that clocks the histogram logic at the
  wrong moment produces glitches on `s_out`; nothing in the RTL prevents this.
