# Multichannel long-period PRBS transceiver

A serial data bit is spread by a long pseudo-random binary sequence (PRBS) on
the transmit side and restored on the receive side. Several PRBS patterns are
built in parallel, one per "channel", and a select input decides which one
carries the link. The patterns are the long-period set PRBS-48, -51, -63, -127
and -255, plus in one variant the classic set PRBS-7, -10, -15, -23, -31 next
to PRBS-48, -51, -63. The bit rate is either the reference clock itself or one
of several clocks divided down from it by long binary counters.

The design follows a published proposal for a multichannel PRBS transceiver
meant for long-distance satellite links. That proposal describes its hardware
mostly by block diagrams, a pattern table and fragments of code; this RTL
fills the gaps with the choices listed under
[Departures and open points](#departures-and-open-points).

## How one bit crosses the link

Every channel is a linear feedback shift register of length N with the
feedback polynomial x^N + x^T + 1 (stages numbered 1..N, so the taps are
register bits N-1 and T-1).

**Transmitter channel** (`prbs_tx_channel`). On each bit strobe

    fb = reg[N-1] ^ reg[T-1] ^ tx_in
    reg <= {reg[N-2:0], fb}
    tx_out = reg[0]

The input is XORed into the feedback, so this is a *self-synchronising
(multiplicative) scrambler*. With `tx_in` held low it is an ordinary Fibonacci
LFSR, a free-running PRBS generator.

**Receiver channel** (`prbs_rx_channel`). On each strobe

    rx_out <= rx_in ^ reg[N-1] ^ reg[T-1]
    reg    <= {reg[N-2:0], rx_in}

Its register holds the last N *received* bits, which are the transmitter's
last N feedback bits. The XOR therefore cancels exactly the two terms the
transmitter added. Two consequences:

* **No alignment is needed.** Whatever the receiver register held before,
  `rx_out` is correct once N bits of one stream have arrived. After a change
  of pattern, the newly selected receiver channel resynchronises by itself
  within N+1 bits.
* **Correct from reset.** The transmitter resets to 1 and the receiver to
  all zeros. That is the transmitter's reset value delayed by the one register
  between them, so a link reset on both ends returns every bit from the first
  one.

**Latency.** `tx_in` is sampled on strobe k. `tx_out` shows its scrambled bit
one reference cycle later. `rx_out` shows the recovered bit after strobe k+1.
With the basic variant (one strobe per clock) that is two cycles from
`tx_in` to `rx_out`.

A bit error on the line is multiplied by three at the output: the wrong bit
itself, and again when it passes each of the two taps. This is the usual
price of self-synchronising scrambling.

## Channel multiplexing

`prbs_transceiver` is the multichannel core:

* `tx_in` feeds **every** transmitter channel, and all of them advance on
  every strobe.
* The PRBS multiplexer (`prbs_mux`) puts the selected channel's `tx_out` on
  the line.
* The de-multiplexer (`prbs_demux`) gives the received bit and the strobe
  only to the receiver channel with the same number. The other receivers hold
  their state.
* A second multiplexer picks that receiver's `rx_out`. Two more pick the low
  64 bits of the selected transmitter and receiver registers as the parallel
  outputs `tx_par` and `rx_par`. Shorter registers are zero-extended, and bits
  above 64 of longer ones are not brought out.

`prbs_sel` is 4 bits wide. Values beyond the last channel select channel 2
(PRBS-63 in the long-period set, PRBS-15 in the multichannel set). The source
falls back to its third pattern in the same way. An assertion in the core
checks that exactly one receiver advances per strobe.

## Clock generation and selection

`clk_freq_gen` holds one free-running counter per named clock. The widths are
20, 30, 40, 50, 60, 70, 80, 90 and 100 bits, and the names are MHz, GHz, THz,
PHz, EHz, ZHz, YHz, XHz and WHz. Each clock is its counter's top bit, so it
toggles every 2^(W-1) reference cycles and has a period of 2^W cycles. Note
what this means: the counters **divide** the reference clock. The "THz" clock
runs at f_ref / 2^40. The names are kept only as labels.

`clk_sel_mux` selects one clock. Its spare inputs are tied low, and selecting
one stops the link. The flip-flops are **not** clocked from the selected
clock. The whole design stays on the reference clock, and the selected
clock's rising edge is decoded from its counter (the count equals 2^(W-1)).
That edge becomes a one-cycle strobe (`bit_tick`) used as clock enable. Thus
there is one clock domain, and switching clocks cannot glitch anything.
`tx_in` must be held for a whole period of the selected clock.

## The three variants in the top

`prbs_transceiver_top` places three complete transceivers side by side. They
share `clk` and `rst` (synchronous, active high), and each has its own ports.

| prefix | structure | patterns | bit rate |
|---|---|---|---|
| `m1_` | core only, strobe tied high | 48, 51, 63, 127, 255 | one bit per reference cycle |
| `m2_` | 6-clock generator + 8:1 clock mux + core | 48, 51, 63, 127, 255 | f_ref / 2^W, W = 20..70 |
| `m3_` | 9-clock generator + 16-input clock mux + core | 7, 10, 15, 23, 31, 48, 51, 63 | f_ref / 2^W, W = 20..100 |

In every variant `tx_out` is looped to the receiver inside the chip, as in
the block diagrams. The variants bring out `tx_out`, `rx_out`, `tx_par` and
`rx_par`. The clocked ones also bring out `clk_out` (the selected divided
clock) and `bit_tick`.

`prbs_uhf_transceiver` is the clocked variant as one reusable block. Its
defaults are the `m2_` configuration, and the `prbs_pkg` `M3_*` tables turn it
into `m3_`.

## Patterns and polynomials

| N | taps (N, T) | source of T | primitive? |
|---|---|---|---|
| 7 | 7, 6 | ITU-T O.150 style, chosen here | yes |
| 10 | 10, 7 | chosen here | yes |
| 15 | 15, 14 | ITU-T O.150 style, chosen here | yes |
| 23 | 23, 18 | ITU-T O.150 style, chosen here | yes |
| 31 | 31, 28 | ITU-T O.150 style, chosen here | yes |
| 48 | 48, 47 | given by the source | **no** (reducible) |
| 51 | 51, 50 | read as degree-1, see below | **no** (reducible) |
| 63 | 63, 62 | read as degree-1 | yes |
| 127 | 127, 126 | read as degree-1 | yes |
| 255 | 255, 254 | read as degree-1 | **no** (reducible) |

The primitivity column was computed over GF(2). For N = 63 and 127, this
included the order test with the full factorisation of 2^N-1.

The source claims a period of 2^N-1 for each of its patterns. That holds only
for primitive polynomials. The PRBS-48, -51 and -255 generators here repeat
sooner when free-running. This does not affect the data path: scrambling and
descrambling invert each other for any polynomial.

To change a polynomial, edit `M2_TAP` / `M3_TAP` in `rtl/prbs_pkg.sv`. Useful
facts:

* No trinomial of degree 48 (a multiple of 8) or of degree 51 is
  irreducible. Proper PRBS-48 or PRBS-51 generators need four taps, which
  this channel structure does not provide.
* x^255 + x^52 + 1 is irreducible. Whether it is primitive was not checked.

## Departures and open points

Where the source is silent or self-contradictory, this design chooses:

* **Tap positions.** The pattern table's polynomials are garbled except for
  x^48 + x^47 + 1. The source's code fragments use other register lengths
  (52, 64, 128, 256) and other taps. The table's lengths are used, which are
  also the names in every diagram, and the second tap is read as N-1 in every
  row.
* **Receiver.** The source's code runs the receiver as a copy of the
  transmitter recursion fed with `tx_out`. That does not return `tx_in` once
  the two registers differ. The source's text says the receiver restores the
  original baseband signal. The receiver here is the exact inverse of the
  transmitter (descrambler), which does that.
* **Seeds, reset, clock enable, output register, hold of unselected
  receivers, behaviour of spare clock-mux inputs:** all chosen here, as
  described above.
* **Nine clocks into an "8:1" mux.** One diagram labels the clock mux 8:1 but
  draws nine clocks, and the text lists nine counters. The nine-clock variant
  uses a 16-input mux with a 4-bit select.
* **Counter widths of the six-clock variant.** Its diagram gives none. The
  first six of the nine widths are used.
* **Frequencies.** The source names THz ... VHz clocks and Tbps ... Vbps bit
  rates. No logic runs at such rates, and the counters it describes divide the
  clock rather than multiply it. The design implements the counters as
  described.
* **The RF carrier / satellite path** is only named by the source, so it is
  not modelled. `tx_out` is looped back on chip.

## Files

| file | contents |
|---|---|
| `rtl/prbs_pkg.sv` | channel and counter tables, select and parallel widths |
| `rtl/prbs_tx_channel.sv` | transmitter channel (scrambler / PRBS generator) |
| `rtl/prbs_rx_channel.sv` | receiver channel (descrambler) |
| `rtl/prbs_mux.sv`, `rtl/prbs_demux.sv` | channel multiplexer and de-multiplexer |
| `rtl/prbs_transceiver.sv` | multichannel core |
| `rtl/clk_freq_gen.sv` | divider counters |
| `rtl/clk_sel_mux.sv` | clock selector and bit strobe |
| `rtl/prbs_uhf_transceiver.sv` | clock generator + selector + core |
| `rtl/prbs_transceiver_top.sv` | the three variants side by side |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/tb_link_checker.sv` | stimulus/checker used by the top-level testbenches |

At default sizes one core synthesises to about 1.1 k flip-flops. The whole top
is about 2.4 k flip-flops and a few hundred word-level cells.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and exits through
`$finish`. A watchdog ends a hung run as a failure. Build and run one with
Verilator 5, from the project root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/prbs_pkg.sv tb/tb_prbs_transceiver_top.sv --top-module tb_prbs_transceiver_top
    ./obj_dir/Vtb_prbs_transceiver_top

| testbench | what it checks |
|---|---|
| `tb_prbs_tx_channel` | Output and register against the recurrence; hold when no strobe. PRBS-7 and PRBS-15 periods are exactly 127 and 32767. |
| `tb_prbs_rx_channel` | Output against the recurrence for PRBS-48 and PRBS-255. Self-synchronisation from an unrelated transmitter state. |
| `tb_prbs_mux`, `tb_prbs_demux`, `tb_clk_sel_mux` | Exhaustive over the select values, including out-of-range values and spare inputs. |
| `tb_clk_freq_gen` | Clock level and strobe every cycle against an independent cycle count. Short counters, and the full 20..70-bit set up to cycle 2^20+100. |
| `tb_prbs_transceiver` | Cycle-exact reference model of all channels, with random strobe spacing. Every pattern plus an out-of-range select; resync within N+1 bits. |
| `tb_prbs_uhf_transceiver` | Short counters (2..7 bits). Strobe timing, data recovery on every clock and pattern, spare clock inputs. |
| `tb_prbs_transceiver_top` | All three variants at once, with short counters. Fails if a pattern switch, clock switch, out-of-range select, spare clock input or resync never happened. |
| `tb_prbs_sel_sweep` | The pattern-sweep scenario (70 clocks, `prbs_sel` 0..4 stepped every 5 clocks), cycle-exact against the model. |
| `tb_prbs_transceiver_full` | The top at default sizes. 300 bits through PRBS-255 (basic variant); 56 and 48 bits through the 20-bit clock of the clocked variants. About 6·10^7 reference cycles, under a minute. |

The clock generator parameters (`CNT_W`, or `M2_CNT_W_P` / `M3_CNT_W_P` on the
top) are what make the clocked variants testable. With full-width counters a
bit takes 2^20 cycles on the fastest clock and 2^30 on the next one. Only the
fastest clock is simulated at full size.

## What is not verified

* Periods longer than 2^15-1; the PRBS-48 and longer patterns are checked
  only against the recurrence.
* Behaviour with line errors, and any physical-layer aspect.
* Timing closure of the 100-bit counters and the 255-bit XOR fan-in at a
  given clock rate.
