# DS-UWB chip-spaced RAKE receiver with hybrid partial/selective finger assignment

A direct-sequence ultra-wideband (DS-UWB) link spreads each BPSK bit over a
PN sequence. The received signal arrives over many resolvable multipath
components, one chip apart. A RAKE receiver recovers that energy by despreading
each path separately and adding the results, each weighted by its channel
gain (maximal ratio combining, MRC). A full RAKE needs one finger per path, and
a selective RAKE must sort every channel estimate to keep the strongest.

This design uses a cheaper rule, hybrid partial/selective (HPS) assignment.
It relies on the power-delay profile of indoor UWB channels decaying
exponentially:

* the earliest paths are almost always strong, so the 4 earliest taps are
  kept without comparison;
* the latest paths are almost always weak, so the 3 latest are dropped
  without comparison;
* only the 8 taps in between are ranked, and the 5 strongest are kept.

Of the 15 taps the channel estimator sees, 9 fingers are built in the
receiver instead of 15. The sort only needs 5 bubble-sort passes over 8
values instead of a full sort of 15.

The second idea is in the arithmetic. Every adder in the fingers and in the
combiner is a carry-select adder in which the usual second ripple-carry adder
(the one for carry-in 1) is replaced by a Binary to Excess-1 Converter (BEC).
The BEC adds one to the carry-in-0 result with a chain of AND and XOR gates.
The PN "multiplier" is a multiplexer between the sample and its two's
complement, and that two's complement is itself a BEC on the inverted sample.

All data is 8-bit two's complement. The clock runs at the chip rate: one
received sample per clock.

## Block structure

```
                 +------------+  pn_ce / pn_rr
 pn_code ------->| pn_buffer  |----------------------------+
                 +------------+                            |
                 +--------------+ ce_en, ce_acc_rst        |
 en ------------>| rake_control |------------+             |
                 +--------------+ rr_en, rr_acc_rst ---+   |
                                             v         |   v
 signal_in ---------------------------> channel_estimator (15 fingers)
     |                                       | coeff[0..14]
     |                                       v
     |                                  hps_select --- idx[0..8]
     |                                       |             |
     +-----------------------------> rake_receiver (9 fingers) ---> est_symbol
```

| module | role |
|---|---|
| `rake_top` | the subsystem; wires the five blocks below |
| `rake_control` | chip counter; opens the estimator window and the receiver bit windows |
| `pn_buffer` | circular register holding the 15-chip PN code, one chip per clock |
| `channel_estimator` | signal buffer, input-sum accumulator and 15 `ce_finger`s |
| `ce_finger` | PN multiplier, accumulator, normalising adder, output register |
| `hps_select` | partial accept/abort plus a 5-pass bubble sort over 8 candidates |
| `rake_receiver` | signal buffer, index multiplexers, 9 `rr_finger`s, combining adder chain |
| `rr_finger` | PN multiplier, accumulator, dump register, 8x8 coefficient multiplier |
| `signal_buffer` | 14-stage delay line; tap k is the input k chips ago |
| `pn_multiplier` | +/-1 multiplication as a multiplexer and a two's complement |
| `csla_bec` | square-root carry-select adder with BEC groups |
| `bec` | W-bit binary to excess-1 converter |
| `rca` | ripple-carry adder used inside `csla_bec` |
| `rake_pkg` | shared constants |

## Tap numbering

Both the estimator and the receiver delay the *signal*, not the PN code.
Finger k sees the input delayed by k chips, for k = 0 to 14, and every finger
multiplies by the same PN chip. The PN phase is aligned to the tap with the
largest delay (14). So finger 14 despreads the **first** arriving path, and
finger k despreads the path that arrives 14-k chips after it. High indices
are therefore early paths. In `hps_select`:

| taps | category |
|---|---|
| 11-14 | kept: the 4 earliest paths |
| 3-10 | ranked: the 5 largest of these 8 magnitudes are kept |
| 0-2 | dropped: the 3 latest paths |

## Packet timing

`rst` starts a packet and loads `pn_code` (bit i is chip i; a 1 is a +1
chip). The first clock with `en` high carries chip 0. `en` must then stay
high for the rest of the packet. The two signal buffers shift on every clock,
so clearing `en` only freezes the control and the PN phase, and the sample
alignment is lost. Chips are counted from 0 (NC = 15 chips per bit, NE = 3
pilot bits, L = 15 taps):

| chips | what happens |
|---|---|
| 0-44 | pilot: 3 bits, each the PN sequence itself (bit value +1) |
| 29-43 | estimator window: `ce_en` high |
| 44 | `ce_acc_rst`: each finger loads its estimate into `coeff` |
| 46 | `idx` holds the selection |
| 45 onward | data bits |
| 59 onward | receiver running: `rr_en` high |
| 74, 89, ... | `rr_acc_rst`: one bit ends and the next starts |

Every chip in the estimator window (29-43) must see a periodic pilot on all
15 taps. The 14-chip tap reaches back to chip 15, when the whole channel
response of the first pilot bit has arrived. The 0-chip tap stops at chip 43,
before any data chip can leak in. Three pilot bits is the smallest count that
allows this. Data bit i, seen on the 14-chip tap, occupies chips
59 + 15i to 73 + 15i. Its combined value appears on `est_symbol` with
`est_valid` high at chip 77 + 15i. That is three clocks after the bit ends:
dump register, product register, sum register.

## Why the estimate is exactly 16 x h

A finger's raw correlation over one pilot period is, for a 15-chip
m-sequence with periodic autocorrelation 15 at lag 0 and -1 elsewhere:

    corr_j = 15 h_j - sum_{p != j} h_p = 16 h_j - sum_p h_p

The m-sequence has 8 ones and 7 zeros, so its chips sum to +1. The sum of the
received samples over the same window is therefore sum_p h_p. The estimator
keeps one accumulator of the raw input, shared by all fingers. Each finger's
second adder adds that sum to its correlation, which cancels the leakage from
every other path:

    coeff_j = corr_j + sum(r) = 16 h_j

All estimator arithmetic is 8-bit and wraps modulo 256. Intermediate wrap
cancels, so the result is exact as long as |16 h_j| < 128, i.e. |h_j| <= 7
in units of the input LSB. The PN code must be an m-sequence with eight ones,
such as one from x^4 + x^3 + 1. With a different code the estimates keep a
bias.

## Receiver arithmetic and its limits

Each receiver finger accumulates 15 despread samples in 8 bits (wrapping),
moves the result to a dump register at the bit end, and multiplies it by its
8-bit estimate into a 16-bit product. The nine products are summed in 20 bits
by a chain of BEC carry-select adders. The sign of `est_symbol` is the BPSK
decision. The decision circuit itself is not included.

The 8-bit accumulators are as narrow as the 8-bit datapath. A despread value
of about 15 x h plus interference from the other paths must stay within
+/-127, or it wraps and the bit can be lost. The input must be scaled for
that. The end-to-end test uses taps of at most 6 LSB on the first paths and
decodes every bit. To make the receiver more robust, widen the `rr_finger`
accumulator; `DATA_W` is shared, so that takes a separate parameter.

## The BEC carry-select adder

`csla_bec` splits a W-bit addition into groups of 2, 2, 3, 4, 5, ... bits
(five groups for 16 bits). Each group works as follows:

* Group 1 is a ripple-carry adder fed by the adder's carry-in.
* Every later group of n bits has one n-bit ripple-carry adder, which
  computes {carry, sum} assuming carry-in 0.
* An (n+1)-bit BEC turns that into the carry-in-1 result.
* A multiplexer, driven by the carry out of the group below, picks one.

The BEC computes x_0 = ~b_0 and x_i = b_i ^ (b_0 & ... & b_{i-1}). The AND
terms are chained. The fingers use 8-bit instances, grouped 2, 2, 3, 1, with
the last group shortened. The combiner uses 20-bit instances. Coefficient
products use the `*` operator, which maps to a hardware multiplier block on
an FPGA.

## Departures and choices

These points are choices made for this RTL, not fixed by the architecture:

* **Window positions and strobes.** The control's window positions, the
  meaning of its four strobes (accumulate, dump-and-clear) and the
  integrate-and-dump timing are derived for this RTL.
* **Pilot and code.** The design uses three pilot bits and a 15-chip code.
  The code length is set equal to the number of estimator fingers.
* **PN buffer.** It loads the code in parallel during reset.
* **Selection.** Strength is |coeff|. Equal magnitudes go to the earlier
  path.
* **Output order.** `idx` lists the kept early taps first (earliest first),
  then the selected taps (strongest first).
* **Added outputs.** `est_valid` is an added output, and so are the `coeff`
  and `idx` debug ports on the top.
* **Finger registers.** The estimator finger has two registers: accumulator
  and output. No separate input register sits ahead of the adder.
* **Full RAKE.** The full 15-finger receiver is not instantiated. It is
  `rake_receiver` with `NRR = 15` and `idx[i] = i`.
* **Outside this RTL.** The transmitter, the channel, the pulse matched
  filter and sampler, and the decision circuit are not included.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/rake_pkg.sv \
    tb/tb_rake_top.sv --top-module tb_rake_top -o sim
./obj_dir/sim
```

Replace `tb_rake_top` with any other `tb/tb_<module>.sv`. What the main tests
cover:

* **`tb_rake_top`** runs the subsystem at its default size. It sends six
  packets, each with a new random 15-tap channel, 3 pilot bits and 24 random
  data bits, with random idle clocks before each packet. It checks that every
  estimate is exactly 16 h. It checks the selected taps, and every combined
  symbol bit-exact against a model, on the exact clock. It also checks every
  decided bit.
* **`tb_channel_estimator`** checks the closed-form 16 h result on its own.
* **`tb_hps_select`** compares the selection with a reference, including
  ties and -128. It also runs a directed case in which taps 0, 1, 2, 4, 5
  and 9 must be left out.
* **`tb_full_rake`** builds the full 15-finger RAKE from the same blocks,
  with no selection, and runs the same packets as `tb_rake_top`.
* **`tb_csla_bec`** checks the 8-bit adder exhaustively, and the 16-bit adder
  on carry-boundary and random operands.

## Parameters

`rake_top` parameters (defaults from `rake_pkg`):

| parameter | default | meaning |
|---|---|---|
| `DATA_W_P` | 8 | sample, coefficient and accumulator width |
| `NC_P` | 15 | chips per bit (PN length) |
| `NE_P` | 3 | pilot bits; needs NC*(NE-2) >= L-1 |
| `L_P` | 15 | taps, estimator fingers |
| `N_PAB_P` | 3 | latest taps always dropped |
| `N_PAC_P` | 4 | earliest taps always kept |
| `N_SEL_P` | 5 | taps selected from the middle |
| `NRR_P` | 9 | receiver fingers, must equal N_PAC_P + N_SEL_P |
| `IDX_W_P` | 4 | tap index width |
| `EST_W_P` | 20 | width of `est_symbol` |
