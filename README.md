# Charge-sharing suppression for a four-pixel neighborhood

In a photon-counting (single photon processing) pixel detector, each pixel
counts the photons whose deposited charge falls inside an energy window. When
pixels get small, the charge cloud of one photon often spreads over two to
four neighboring pixels. Each pixel then sees only a fraction of the energy,
so the photon is lost, counted at the wrong energy, or counted several times.

This RTL implements the shared digital cell of a charge-sharing suppression
scheme. The cell sits at the common corner of four pixels. It does two jobs:

* It **adds the four charges** and judges the photon's energy on the sum. The
  whole charge cloud is measured, not one piece of it.
* It **finds the pixel that collected the most charge** and gives the whole
  photon to that pixel. That pixel's output is set to 65535 and its event
  counter steps once. The other three pixels get 0 and do not count.

Each pixel keeps only its analog front end: the preamplifier, the shaper and
one comparator. All digital logic sits in one cell shared by four pixels,
which saves area.

## Data flow of one event

```
 c[0..3] ──► charge_sum ──► sum ──► window_comparator ──► lt, ut ──► adwd ──► evt_valid / evt_reject / busy
    │                                                                               │
    └──► thcom_comparator ×4 ──► d[0..3] ──────────────────────────────► eval_function ──► out_d, winner, eval_stb
                                                                                   │
                                                          event_counter ×4 ◄── eval_stb & winner[k]
```

* `c[k]` is a digitized sample of pixel k's shaped pulse, taken once per
  clock. The bus order is P(0,0), P(0,1), P(-1,0), P(-1,1) (`cs_pkg::pix_idx_e`).
* `charge_sum` computes `sum = c[0]+c[1]+c[2]+c[3]`.
* `window_comparator` sets `lt = sum > th1` and `ut = sum > th2`, with
  `th1 < th2`. These two thresholds define the energy window.
* `adwd` is the all-digital window discriminator. It classifies each pulse
  by its sequence of LT and UT edges.
* `thcom_comparator` (one per pixel) sets `d[k] = c[k] > th_com`, against a
  common threshold `th_com`.
* `eval_function` measures how long each `d[k]` stays high and picks the
  winner.
* `event_counter` (one per pixel) is a 14-bit LFSR that steps when its pixel
  wins an accepted event.

## Window discrimination (`adwd`)

A pulse on the sum produces one of three edge sequences on LT and UT:

| sum peak           | edges                      | outcome      |
|--------------------|----------------------------|--------------|
| below `th1`        | none                       | no event     |
| between the two    | LT↑ … LT↓                  | `evt_valid`  |
| above `th2`        | LT↑, UT↑, UT↓, LT↓         | `evt_reject` |

The discriminator cannot classify a pulse until LT falls. Only then is it
known whether UT rose. The FSM has three states:

* **IDLE** moves to **INWIN** on LT. It moves straight to **OVER** if UT is
  already high in the same sample.
* **INWIN** moves to **OVER** on UT.
* Both INWIN and OVER return to IDLE when LT falls. On the way they emit a
  one-cycle `evt_valid` or `evt_reject`.

`busy` is high while a pulse is being tracked.

In the original scheme the window discriminator is a self-timed
(asynchronous) circuit that sends a clock edge only for in-window pulses.
This design makes it synchronous to the same clock that samples the
charges. It also adds the reject pulse and `busy`, which the evaluation
function needs to throw away counts that belong to no accepted event.

## Choosing the pixel: the evaluation function

This block is the core of the scheme, and the part that needs the most
interpretation.

**What is measured.** A shaped pulse with more charge stays above a fixed
threshold for longer. So `eval_function` keeps one 16-bit saturating counter
per pixel. Each counter counts clock cycles while that pixel's `d[k]` is
high: the time over the common threshold. The longest count marks the pixel
with the largest charge. No charge magnitude is ever compared directly.

**When the decision is made.** The decision comes in the first cycle in
which both of these hold:

1. The window discriminator has reported the end of the event.
2. Every `d[k]` is low, so every pixel has finished its pulse.

If `evt_valid`/`evt_reject` arrives while some pixel is still above
`th_com`, the block keeps the outcome as *pending* and waits for the last
pixel to drop. This happens whenever `th_com` is low compared with `th1`.
Counting goes on while it waits.

**What happens at the decision.**

* **Accepted event:**
  * The pixel with the largest count gets `out_d = 65535` and
    `winner[k] = 1`. The other pixels get 0, and `eval_stb` pulses for one
    cycle.
  * If two pixels share the largest count, the lower index wins.
  * If no pixel crossed `th_com`, all outputs are 0, `winner` is 0 and
    `eval_stb` still pulses.
* **Rejected event:** no decision. The outputs keep their previous values.

In both cases all counters are cleared.

**Stray counts.** A pixel can cross `th_com` while the sum never reaches
`th1`. Its count is discarded as soon as all `d` are low again, provided the
discriminator is idle and nothing is pending. Without this, stray counts
would bias the next event.

## Timing

Sample `n` is applied to `c` in clock cycle `n`. Flops take it at the
following rising edge.

| signal                                | timing                                                        |
|---------------------------------------|---------------------------------------------------------------|
| `sum`, `d`, `lt`, `ut`                | combinational, cycle n                                        |
| `evt_valid` / `evt_reject`            | cycle L+2, where L is the last sample with sum > th1          |
| decision                              | cycle D = first cycle ≥ L+2 with all `d` low                  |
| `eval_stb`, new `out_d`, `winner`     | cycle D+1, `eval_stb` for one cycle                           |
| winner's `ec_q`                       | steps at the end of cycle D+1 (visible in D+2)                |

The reset `rst` is synchronous and active high. It clears the counters, the
outputs and both state machines, and it loads every LFSR with 1.

## Interface of `cs_quad`

| port                    | dir | width      | meaning                                          |
|-------------------------|-----|------------|--------------------------------------------------|
| `clk`, `rst`            | in  | 1          | clock (one charge sample per cycle), sync reset  |
| `c`                     | in  | 4 × CW     | pixel charge samples                             |
| `th_com`                | in  | CW         | common threshold                                 |
| `th1`, `th2`            | in  | CW+2       | lower and upper window thresholds (`th1 < th2`)  |
| `sum`                   | out | CW+2       | neighborhood sum                                 |
| `d`                     | out | 4          | common-threshold comparator outputs              |
| `lt`, `ut`              | out | 1          | window comparator outputs                        |
| `evt_valid`, `evt_reject` | out | 1        | end of an in-window / over-window pulse          |
| `out_d`                 | out | 4 × OW     | 65535 for the winning pixel, 0 for the others    |
| `winner`, `eval_stb`    | out | 4, 1       | one-hot winner and decision strobe               |
| `ec_q`                  | out | 4 × ECW    | per-pixel LFSR event counters                    |

## Sizes

| parameter                | default | origin                                                        |
|--------------------------|---------|---------------------------------------------------------------|
| pixels per cell          | 4       | from the original scheme                                      |
| `OW` output value width  | 16      | from the original scheme (winner gets 65535)                  |
| `ECW` event counter      | 14      | 14-bit LFSR, as in the single-pixel counter the scheme builds on |
| `CW` charge sample       | 8       | this design's choice; sum is CW+2 bits                        |
| EF counter width         | = `OW`  | this design's choice                                          |
| LFSR polynomial          | x^14+x^5+x^3+x+1 | this design's choice (maximal length, period 16383)  |

The event counter holds an LFSR state, not a binary number. To read a count,
find the state's position in the sequence that starts at 1, with the new bit
computed as `q[13]^q[4]^q[2]^q[0]` and shifted in at the bottom.

## How far this follows the original scheme

These parts follow it directly:

* the four-pixel neighborhood;
* the summation and the two-threshold energy window, with the three edge
  sequences;
* one common threshold per pixel;
* one counter per pixel, compared once all comparator outputs are low;
* 65535 for the winner and 0 for the others;
* counters cleared after each decision;
* a reset that clears counters and outputs;
* a 14-bit LFSR event counter.

These parts are this design's own:

* **One synchronous clock.** In the original, the window discriminator is
  asynchronous and the comparator outputs serve as counter clocks. Here
  every signal is sampled on one clock, and the comparator outputs are count
  enables.
* **Digital charges.** Charges are digitized samples. The original adds
  analog voltages or currents, and its comparators are analog. Its own
  behavioural model, however, also fed sampled charge values into the
  digital logic.
* **Time over threshold.** The original does not say what the per-pixel
  counters count. Here they count clock cycles above `th_com`.
* **Discriminator output.** `adwd` emits one pulse when the event ends. It
  does not emit a clock level that stays high while LT is high.
* **UT polarity.** UT is high *above* `th2`. This matches the event
  sequences, although one written form of the UT rule states the opposite
  polarity.
* **Rules of this design only:** the tie rule, the pending decision, the
  reject path, the discard of stray counts, and one event counter per pixel
  stepped by the winner.

What is not here:

* **The analog front end:** the detector, charge-sensitive preamplifier and
  shaper. No behaviour is specified for it, so the testbenches generate
  shaped pulses directly.
* **A full pixel array.** The scheme is defined for a general n × m array,
  but how the four-pixel cells tile such an array is not specified, so only
  the cell is built.
* **Readout of the counters.** Not specified.

## Files

`rtl/`:

* `cs_pkg.sv`: sizes and the pixel order enum.
* `charge_sum.sv`, `thcom_comparator.sv`, `window_comparator.sv`: the
  combinational front of the cell.
* `adwd.sv`: the window discriminator FSM, with an assertion that the two
  outcomes are exclusive.
* `eval_function.sv`: winner selection, with an assertion that `winner` is
  one-hot or zero.
* `event_counter.sv`: the LFSR counter, with an assertion that the state is
  never zero.
* `cs_quad.sv`: the top level.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_cs_quad_example.sv`.

## Verification

Every testbench computes its expected values independently of the RTL and
prints `TB_RESULT checks=N failures=M`.

* **Unit benches.**
  * The comparator bench is exhaustive.
  * The adder and window bench use random values and corner cases.
  * `tb_adwd` drives 400 random LT/UT pulse trains and checks the one-cycle
    outcome latency.
  * `tb_eval_function` checks ties, pending decisions, rejected events,
    discarded counts, no-winner events and counter saturation. The
    saturation check uses a second instance with 4-bit counters.
  * `tb_event_counter` checks each step against a bit-level reference and
    the full 16383 period.
* **`tb_cs_quad`.** Runs the cell at its default sizes on about 280 random
  photons. Each is a shaped pulse split over the pixels: mostly the
  35/25/20/15 % split, sometimes an equal split or a single pixel. It uses
  three threshold settings. Every cycle it checks `sum`, `d`, `lt`, `ut`
  and the event strobes. After every decision it checks `out_d`, `winner`
  and all event counters. It also counts how often each mechanism occurs:
  * accepted events;
  * rejected events;
  * pulses below the window;
  * discarded counts;
  * decisions that waited for a pixel;
  * accepted events with no winner;
  * ties;
  * wins for each pixel.

  A mechanism that never occurs counts as a failure.
* **`tb_cs_quad_example`.** One photon split 35/25/20/15 % with a summed peak
  of about 65. It checks that:
  * LT pulses once and UT never rises;
  * the 35 % pixel rises first, falls last, wins, and is the only one whose
    counter steps.

To simulate with Verilator (5.x), for example the top-level bench:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_cs_quad rtl/cs_pkg.sv tb/tb_cs_quad.sv
./obj_dir/Vtb_cs_quad
```

Replace `tb_cs_quad` with any other testbench name. Each run takes well
under a minute.
