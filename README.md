# Image convolution with a probabilistic AER event mapper

In Address-Event Representation (AER), an image is not sent as frames. Each
pixel fires events, and each event puts the pixel's address on a shared bus.
A pixel's value is its event rate. This design convolves such an image while
it is in flight, without arithmetic on pixel values. Every incoming event is
replaced by a few outgoing events aimed at the neighbouring pixels that the
kernel spreads it to. Each outgoing event is sent only with a probability
equal to the kernel coefficient. On average, the output event rate of pixel
(i, j) is then the sum of the coefficients times the input rates of its
neighbours, which is the convolution. The cost is random noise, and the noise
shrinks as the receiver integrates over a longer time.

The RTL follows a published method for the USB-AER board: an FPGA with a
512K x 32 SRAM, used for 256x256 images. It contains:

- the mapper itself;
- the table memory and the free-running LFSR that drive the mapper;
- signed events for negative coefficients;
- an optional stage that cancels positive against negative events on the bus;
- two reconstructions of the convolved image: an up-down counter per pixel,
  and separate counts of the positive and negative half-images;
- the AER handshakes that join these parts.

## Signal flow

```
          convolution board                                       reconstruction
 AER in  +--------+   +-------------+   +------------------+   +--------+  AER   +--------+   +----------------------+
 ------->| aer_rx |-->| prob_mapper |-->| event_simplifier |-->| aer_tx |------->| aer_rx |-+>| updown_integrator    |--> host
 16 bit  +--------+   +-------------+   +------------------+   +--------+ 17 bit +--------+ | +----------------------+
                        |        ^        (bypass when                                      +>| halfimage_integrator |--> host
                raddr   v        | rnd     simplify_en = 0)                                   +----------------------+
                      +---------+ +----------+
   host writes ------>| map_ram | | lfsr_rng |
                      +---------+ +----------+
```

`aer_conv_top` holds both boards and joins them with an internal AER bus.
That bus is also brought out as `out_req`, `out_ack` and `out_data`, so it can
be watched. Blocks inside one board talk through valid/ready streams. An event
moves when `valid` and `ready` are both high at a clock edge.

Input events are 16-bit pixel addresses `{y[7:0], x[7:0]}`. Output events
have 17 bits, `{neg, y, x}`: `neg` marks the negative half-image.

## The mapping table

For each input pixel the table holds 8 consecutive 32-bit words, called
slots. The slots sit at table address `{pixel, slot}`: 64K pixels x 8 slots =
512K words. A slot is `aer_pkg::map_word_t`:

| bits  | field  | meaning |
|-------|--------|---------|
| 31    | rsvd   | unused |
| 30    | last   | stop after this slot |
| 29:26 | rep    | repetition factor R, 0..15 (0 = empty slot, skipped) |
| 25:17 | prob   | probability P/256, 0..256 (256 = always) |
| 16    | neg    | output event goes to the negative half-image |
| 15:0  | pix    | output pixel `{y, x}` |

For an input event, the mapper reads slot 0, 1, 2, ... in order. It stops
after the slot whose `last` bit is set, or after slot 7. For each slot it
makes R draws. In a draw it takes an 8-bit number from the LFSR and sends the
slot's event if `prob > rnd`. One event thus gives on average R x P/256 output
events per slot.

**Building a table for a kernel.** The host computes the table. Take a
coefficient k at offset (dx, dy) from the kernel's anchor, and an input pixel
(x, y). The slot for that pair holds:

- `pix = (x+dx, y+dy)`. Skip the slot if that pixel is outside the image.
- `rep = ceil(|k|)`.
- `prob = round(256 * |k| / rep)`.
- `neg = (k < 0)`.

Coefficients above 1 are therefore split into R sure-or-random repeats. For
example, 1.2 becomes R = 2 with P = 154/256 (0.6). Zero coefficients take no
slot. With the anchor at the top-left of a 2x2 kernel, the output image is
shifted by the kernel's offsets. The edge kernel `[[1, 0], [0, -1]]` shows
this: each input pixel sends a positive event to itself and a negative event
to the pixel one step right and down. Its negative half-image is therefore
the input moved one pixel right and down.

Limits that follow from the table:

- at most 8 non-zero coefficients per input pixel, so a 2x2 kernel fits and a
  full 3x3 kernel does not;
- |k| ≤ 15;
- coefficients quantised to 1/256 of each repeat.

## Randomness and noise

`lfsr_rng` is a free-running 16-bit Galois LFSR with polynomial
x^16+x^14+x^13+x^11+1 and period 65535. Its clock never stops, so the number
a draw sees depends on when the event arrived. Consecutive states of a shift
register are shifted copies of one another. To avoid that correlation, the
register is advanced 8 steps per clock, and the low 8 bits are the random
number.

The count for one pixel over one frame is binomial. With V events per frame
and probability p, the variance is V·p·(1-p): zero at 0 % and 100 %, and
largest at 50 %. Averaging over more frames reduces the relative error. The
workload test at V = 255 reproduces this. Over 30 frames at 50 %, the mean
stays within a few percent of 127.5. Over 1000 frames, the per-frame variance
comes close to the 63.75 of independent draws.

A source with strictly periodic timing samples the LFSR at a fixed stride.
The counts then come out closer to the mean than independent draws would
give. This is a property of any free-running generator, not a bug.

## Signed events and on-bus cancellation

A probability cannot be negative. So a negative coefficient sends events,
with probability |k|, to a separate negative half-image (`neg = 1`). The
receiver must subtract the two halves. `updown_integrator` does that as it
counts (see below).

Alternatively, `event_simplifier` cancels the halves on the bus, so the
stream leaving the board already stands for the signed result and carries
fewer events. For each pixel it stores a small signed count c of events held
back: positive for held positive events, negative for held negative ones. The
count is bounded by |c| ≤ H = 2^HOLD_W − 1. When an event of sign s arrives:

| situation | action | c becomes |
|-----------|--------|-----------|
| c has the opposite sign | the event and one held event annihilate; nothing sent | c + s |
| \|c\| < H, same sign or zero | the event is held; nothing sent | c + s |
| \|c\| = H, same sign | an event of this pixel and sign is sent | c |

With the default HOLD_W = 1 (H = 1), the first positive event of a pixel
waits. The next event of that pixel either releases it (another positive) or
cancels it (a negative). A larger HOLD_W lets runs of one sign wait longer for
their opposites. In the 6x6 edge-kernel test, the simplifier halves the
number of events that cross the inter-board bus.

Three points to keep in mind:

- **Held events are never flushed.** Each pixel can end a run with up to H
  events unsent. The received value is then off by at most H.
- **Negative events are held as well.** The published scheme only describes
  delaying positive events. Holding both signs is a choice made here.
- **Counts at power-up and on clear.** The counts live in a 64K-entry memory
  that is zeroed one entry per clock, with `busy` high, after reset and after
  a `clear` pulse. That takes 65536 clocks.

With `enable` low, events pass through unchanged.

## Reconstruction

The reconstruction board integrates the event stream in two ways at once.
Both integrators have identical timing, so the stream is simply forked to
them. The top asserts that they stay in step.

`updown_integrator` has a 20-bit signed counter for every pixel. A positive
event counts up and a negative event counts down, so the subtraction of the
half-images is done during integration. Counters saturate instead of
wrapping. Twenty bits hold 1000 frames of a full-scale pixel (255 events per
frame).

The host starts an integration period with `rec_clear`, which zeroes all
counters in 65536 clocks. It reads any pixel through a separate port: set
`rd_en` and `rd_pix`, and the data arrives on `rd_data` with `rd_valid` one
clock later. How long to integrate is the host's choice. Longer periods give
less noise.

`halfimage_integrator` keeps two unsigned 20-bit counters per pixel, one for
positive and one for negative events. The host reads both, plus their
difference. The difference always equals the up-down count, and the
end-to-end test checks this on every read. The separate counts show what the
single counter hides: how many pixels received events of both signs. After
perfect cancellation on the bus, no pixel would. In the edge-kernel test,
simplification cuts the number of such pixels by about a factor of three.

## AER links and timing

`aer_tx` and `aer_rx` implement a four-phase handshake with active-high
`req` and `ack`. The sender puts the address on the data lines, raises
`req` one clock later, and holds the data stable until `ack` rises. Then
`req` falls, then `ack` falls. Each side passes the other's strobe through a
two-flop synchroniser, so the boards could run on separate clocks. The top
uses one clock. Assertions check that the data stay stable while `req` is
high, and that a waiting stream output holds its value.

Throughput, in clocks:

- **prob_mapper**: one idle/accept clock per input event, then for each slot
  up to the last one used, 1 read clock plus max(R, 1) draw clocks. The edge
  kernel (2 slots, R = 1) takes 5 clocks per input event. The full 8 slots
  with R = 1 take 17.
- **event_simplifier and updown_integrator**: 2 clocks per event. Each does a
  read-modify-write on a synchronous-read memory.
- **AER link**: about 8–10 clocks per event, because of the synchronisers on
  both sides. In practice, this is the bottleneck. The mapper stalls, without
  changing any decision, when its output is not taken.

## Top-level interface (`aer_conv_top`)

| port | dir | width | use |
|------|-----|-------|-----|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_req, in_ack, in_data | in/out/in | 1/1/16 | AER input from an image source or retina |
| tab_we, tab_waddr, tab_wdata | in | 1/19/32 | host writes to the mapping table |
| simplify_en | in | 1 | 1: cancel signed events on the bus; 0: bypass |
| simp_clear, simp_busy | in/out | 1 | zero the held-event counts |
| out_req, out_ack, out_data | out | 1/1/17 | inter-board AER bus, for observation |
| rec_clear, rec_busy | in/out | 1 | start a new integration period |
| rd_en, rd_pix, rd_valid, rd_data | in/in/out/out | 1/16/1/20 | read a reconstructed pixel (up-down count) |
| rd_pos, rd_neg, rd_diff | out | 20/20/21 | the same pixel's half-image counts and their difference |

The table has no reset. Load every slot of every pixel that can receive
events before sending events to it. Wait for `simp_busy` and `rec_busy` to
fall after reset.

Sizes are in `rtl/aer_pkg.sv`:

- `PIX_W` = 16 (256x256 image);
- `SLOTS` = 8;
- `PROB_W` = 9;
- `RND_W` = 8;
- `REP_W` = 4;
- `REC_W` = 20.

`HOLD_W` is a parameter of `event_simplifier`, default 1.

## What follows the published method and what is chosen here

Taken from the method:

- the 256x256 image;
- 8 slots per pixel in a 512K x 32 table;
- slot-by-slot iteration with a probability compared against a free-running
  LFSR, emitting when the probability is greater;
- repetition factors with R = ceil(k) and P = k/R;
- negative coefficients as events to a separate negative address;
- on-bus cancellation by holding events per pixel with an n-bit count;
- reconstruction by up-down counting, or by separate half-images that are
  subtracted afterwards.

Chosen here:

- the slot word layout, the `last` stop bit and R = 0 for empty slots;
- the 9-bit probability, so that exactly 1 exists;
- the LFSR polynomial, its seed and the 8-step advance per clock;
- the sign bit as bit 16 of the event;
- symmetric holding of negative events, with no flush;
- 20-bit saturating counters, and running both reconstructions side by side;
- the clear sweeps and the host ports;
- the four-phase active-high handshake with synchronisers;
- all cycle timing.

Not included:

- **The image-to-AER source.** An existing rate-coded generator; testbenches
  model it.
- **The USB micro-controller and PC software.** Represented here by the table,
  configuration and read ports.
- **Reconstruction from instantaneous event frequency.** Only mentioned as
  more sensitive to noise than integrating over frames, which is what both
  integrators here do.

The table memory is written as an on-chip array. On the original board it is
an external asynchronous SRAM, whose interface timing is not modelled.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_aer_rx`, `tb_aer_tx`: random addresses against a four-phase peer with
  random delays; order, single delivery, handshake rules.
- `tb_lfsr_rng`: state against a reference register every clock. Also checks
  the period of 65535, and that each 8-bit value appears 256 times per period
  (0 appears 255 times).
- `tb_map_ram`: random writes and read-back at full size, read latency, and
  read-during-write.
- `tb_prob_mapper`: exact slot walks (P = 0 / 256, R = 0..3, `last`, 8-slot
  limit). Also checks 14 clocks between back-to-back events, random
  back-pressure, and the statistics of P = 0.5 and of coefficient 1.2.
- `tb_event_simplifier`: a reference model of the held counts, with random
  signed events and back-pressure, in simplify, bypass and clear phases. It
  runs with HOLD_W = 1 and HOLD_W = 2, through the helper harness
  `tb/simp_check.sv`.
- `tb_updown_integrator`, `tb_halfimage_integrator`: random signed events.
  Narrow instances check saturation; both also check clear.
- `tb_aer_conv_top`: the whole chain at full size. It runs:
  - the edge kernel on a 6x6 patch, checked exactly with simplification off;
  - the same kernel with simplification on, checked exactly after adding the
    events still held;
  - the soft kernel `[[0.75, 0.1], [0.1, 0.05]]` and coefficient 1.2,
    checked statistically.

  It also counts each mechanism: multi-event output, negative events, rejected
  draws, repeats, stalls, holds, cancellations, releases, bypass and clears.
- `tb_variance_workload`: the noise experiment. It runs 255 events per frame
  for P = 0..100 % over 30 frames each, then 1000 frames at 50 %.
- `tb_image_workload`: a 16x16 synthetic image convolved with the soft
  kernel. The mean absolute error is about 15 % after one frame and about
  4 % after ten.

Run one with plain Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/aer_pkg.sv tb/tb_aer_conv_top.sv --top-module tb_aer_conv_top
./obj_dir/Vtb_aer_conv_top
```

Replace the testbench name to run another. Every testbench finishes in a few
seconds at the full design size.
