# Event-camera gesture recognition pipeline: DVS frame buffer and ternary CNN/TCN accelerator

A dynamic vision sensor (DVS) does not deliver images. It emits a sparse
stream of events, each one a pixel coordinate and a polarity (brightness went
up or down). This design turns that stream into something a ternary neural
network can classify, and then classifies it without a processor in the loop:

1. A **DVS interface** collects events into *ternary event frames*. A pixel of
   a frame is +1 or -1 if its last event in the frame interval had that
   polarity, and 0 if no event arrived. Up to 16 frames live side by side in
   one 4096 x 32 bit memory, two bits per frame in every pixel word.
2. Every `s_win` frames, the interface streams the `C_in` most recent frames
   to a memory address, one word per pixel. When the address is the
   accelerator's input memory, no copy through system memory is needed.
3. The end of the stream raises a **data-ready interrupt**. That interrupt
   starts the **ternary accelerator**. The accelerator runs a 2D CNN over the
   64 x 64 x `C_in` window and reduces it to one 96-channel feature vector.
   The vector goes into a buffer of past vectors. A 1D temporal convolutional
   network (TCN) then runs over the last `N_TCN` vectors and produces 11 class
   scores and the index of the largest one.
4. A **done interrupt** tells the host that a new class is ready.

All weights and activations are ternary (-1, 0, +1). Every multiplication is
therefore a few gates, and the accelerator can afford one compute unit per
output channel, each covering a whole 3 x 3 x 96 kernel in a single cycle.

## Ternary encoding

Each ternary value takes two bits: `00` = 0, `01` = +1, `11` = -1. Bit 0 says
"non-zero" and bit 1 gives the sign (`cutie_pkg::tern_t`). The same code is
used in the frame buffer, on the 32-bit input port of the accelerator and
inside it. A 32-bit word therefore holds 16 values. A frame-buffer word holds
the 16 frame slots of one pixel. An accelerator input word holds 16 input
channels of one pixel.

## The event frame buffer (`dvs_interface` and its parts)

### Writing events (`dvs_event_writer`)

A 4-bit counter `c_curr` names the slot of the frame being recorded. It wraps
from 15 to 0 and advances on every new-frame tick. An event at camera
coordinate (x, y) is first downsampled: both coordinates are shifted right by
`ds_shift`, which is 1 for the factor-2 downsampling of a 128 x 128 sensor.
The code of its polarity is then written into bits `[2c_curr+1 : 2c_curr]`
of word `64y + x`. The write uses the memory's per-bit write enables, so one
write touches a single slot and needs no read first. A later event on the
same pixel simply overwrites the earlier one. Events that fall outside the
64 x 64 frame after downsampling are dropped (`evt_dropped_o`).

### Reading a window (`frame_readout`)

Let `c_act` be the slot that becomes active at the tick that ends a window.
The window is then slots `c_act-C_in .. c_act-1` (mod 16), oldest first. For
each of the 4096 words the readout:

1. reads the word;
2. rotates it right by `2*(c_act-C_in)` bits, so that the oldest frame of the
   window lands in bits [1:0] and the newest in bits `[2C_in-1 : 2C_in-2]`;
3. masks bits `[31 : 2C_in]` to zero;
4. writes zeros, in one masked write, into the `s_win` slots that the next
   window will no longer use: slots `c_act - max(C_in, s_win) + k` for
   `k < s_win`. With `s_win <= C_in` these are the oldest `s_win` frames of
   the window. With `s_win > C_in` they include the frames that were never
   part of any window. Either way a slot is empty again before `c_curr`
   comes back to it, so no stale event leaks into a later frame;
5. sends the word to `dest_addr + 4*i` over a valid/ready port, and waits as
   long as the receiver is not ready.

One word takes four cycles (read, capture, clear, output), so a window takes
`4*4096 + 1` cycles when the receiver never stalls. After reset the same
unit wipes all 4096 words, because SRAM contents are undefined at power-up.
Events are held off (`evt_ready_o` low) until the wipe has finished.

`C_in` can be 1..15: 16 slots, minus the one being recorded. `s_win` can be
1..15.

A readout must finish within `16 - max(C_in, s_win)` frame intervals.
Otherwise its clearing step reaches slots that have meanwhile become active
again and erases fresh events. With `C_in = 15` the limit is one interval.
At 15 MHz a readout takes about 1.1 ms, far below a frame interval of
8.3 ms at 120 frames/s. A much faster frame clock, or a receiver that stalls
for long, breaks this rule.

### Sharing the memory (`fb_arbiter`, `frame_sram`)

The memory has one port. The event writer and the readout both use it, and
an arbiter grants it round robin when both ask in the same cycle
(`fb_conflict_o` reports this). A waiting event stays on its valid/ready
input and is not lost. The memory model (`frame_sram`) is a plain array with
a per-bit write mask and one cycle of read latency.

### Scheduling and modes (`dvs_interface`, `frame_timer`)

Frame intervals are set by `frame_timer`, a counter that pulses once every
`timer_period_i` cycles, or by a software tick. After every `s_win` ticks the
readout starts. If the previous readout is still running at that moment, the
new window is skipped and `overrun_o` pulses. The frame counter still
advances, so the slot bookkeeping stays consistent.

In **event mode** (`cfg.event_mode = 1`) the frame buffer is bypassed. Each
event is written as the word `{15'b0, pol, y[7:0], x[7:0]}` to the next
address of a ring of `evt_buf_words` words starting at `dest_addr`. This
mode serves consumers that process raw events.

All settings are in the `dvs_pkg::dvs_cfg_t` struct: mode, `C_in`, `s_win`,
downsampling shift, destination address and event ring length. They are
meant to be set while the interface is idle.

## The ternary accelerator (`cutie`)

### Output channel compute units (`cutie_ocu`)

There are `N_CH` = 96 OCUs, one per output channel. Each one sees the whole
input window: 9 taps x 96 channels of ternary values. In one cycle it forms
all 864 products with bit logic. A product is non-zero when both operands
are, and negative when their signs differ. The OCU then computes

    z = (number of +1 products) - (number of -1 products)

and applies the channel's two thresholds:

    y = -1 if z < t_lo,   0 if t_lo <= z < t_hi,   +1 if z >= t_hi.

Batch normalisation, the activation and the rescaling of a trained network
all fold into these two integers per channel. Every OCU keeps its own filter
and thresholds for all 9 layers, so weights are loaded once and never
streamed during inference. Here the weight store is a flip-flop array. A
latch-based store would be smaller in silicon.

### Feeding the OCUs (`cutie_linebuf`, `cutie_act_mem`, `cutie_tcn_buf`)

Feature maps live in two activation banks (`cutie_act_mem`) with one 96-channel
word per pixel. Layers alternate between them: one bank is read, the other
written. The input window goes into bank 0 through the 32-bit port, 16
channels per pixel word. Input channels 16..95 of the first layer read as zero.

For a 2D layer, input rows are loaded once into a three-line buffer. Each
output row's 3 x 3 windows are dispatched from there, one per cycle, with
zero padding at the borders. Tap `j` of a 2D window is row `j/3`, column
`j%3`.

For a 1D (TCN) layer, the whole input sequence (at most 64 steps) sits in
one line. Tap `j` of a window at time `t` is the vector at time
`t - dil*(ksize-1-j)`. Taps before time 0 are zero (causal padding), so tap 0
is the oldest. A 1D kernel can have up to 9 taps.

The TCN buffer (`cutie_tcn_buf`) is a ring of 24 vectors. Each inference
pushes its CNN output vector. The first TCN layer reads the newest `N_TCN`
vectors, oldest first. Entries never written read as zero, so the first
inferences after reset see a zero-padded history.

### Pooling order (`cutie_pool`)

The network is specified as convolution, then 2x2 max pooling, then
thresholding. The hardware thresholds first and pools the ternary results.
The two give the same result because the threshold function never decreases
with its argument: the threshold of a maximum equals the maximum of the
thresholds. Pooling after thresholding needs only 2-bit comparisons and a
half-row buffer.

### Layer sequencing and timing

Each layer is described by a `cutie_pkg::layer_cfg_t`:

| field | meaning |
|---|---|
| `is_1d` | 1D (TCN) layer instead of 3 x 3 2D layer |
| `pad_same` | 2D: same padding (else valid); 1D: causal same padding (else valid) |
| `pool` | 2D: 2x2 max pooling after the layer |
| `to_tcn` | 2D: push the 1 x 1 output vector into the TCN buffer |
| `src_tcn` | 1D: read the input sequence from the TCN buffer |
| `last` | final layer: its pre-activations are the class scores |
| `in_w` | input width (2D maps are square), or sequence length |
| `ksize`, `dil` | 1D kernel size (1..9) and dilation |

The intended network (9 layers):

| layer | type | output |
|---|---|---|
| 0 | 3x3 same + pool, `C_in` -> 32 channels | 32 x 32 |
| 1..3 | 3x3 same + pool | 16, 8, 4 |
| 4 | 3x3 valid + pool, `to_tcn` | 1 x 1 |
| 5..7 | 1D k=2, dilation 1, 2, 4, causal same (5 has `src_tcn`) | `N_TCN` steps |
| 8 | 1D k=`N_TCN`, valid, `last` | 11 scores |

Channels that a layer does not use are given zero weights.

A layer takes `1 + H*(W+2) + Ho*(1+Wo) + 3` cycles: loading, one cycle per
output pixel, and pipeline drain. The whole 9-layer network at 64 x 64 takes
about 11,300 cycles, or 0.75 ms at a 15 MHz clock. `done_o` pulses when the
scores are ready. `scores_o` holds the last layer's pre-activations for the
first 11 channels, and `class_o` the index of the largest score (the lowest
index on a tie). While the accelerator runs, `act_ready_o` is low. A window
readout aimed at it then simply stalls, as the end-to-end test shows.

Weights are written one OCU and one layer at a time (`wt_*` ports: the full
9 x 96 ternary kernel and both thresholds). Layer descriptors go in through
`cfg_*`. Inference starts on `start_i`.

## Top level (`dvs_tnn_top`)

The top connects the frame timer, the DVS interface and the accelerator.
The interface's write port is decoded by address:

* writes to `[ACT_BASE, ACT_BASE + 16 KiB)` go to the accelerator's input
  memory, as word `(addr - ACT_BASE)/4`. `ACT_BASE` defaults to
  `32'h1040_0000`;
* all others leave on the `mem_*` port, which stands for the SoC
  interconnect and system memory.

With `autostart_i` set, the data-ready interrupt (`irq_dvs_o`) starts the
accelerator. Events then become class scores with no host involvement; the
host only reads `scores_o`/`class_o` after `irq_cutie_o`. `cutie_start_i`
is the register start. The host CPU, system memory, interconnect, DMA
engine, processor cluster, clocking and the camera's physical interface are
not part of this RTL. They appear only as the ports described above.

## Supported configurations

With the defaults (96 channels, 64 x 64, 9 layers, TCN buffer of 24, 11
classes), the design holds all four evaluated network configurations:
60 or 120 frames/s, `C_in` of 4, 6 or 15, `N_TCN` of 5 or 9, and `s_win` of
4, 6 or 15. The limits are `C_in <= 15`, `s_win <= 15`, `N_TCN <= 9` (last
layer's kernel) and `N_TCN <= 24` (buffer). A window costs about 16.4k
readout cycles plus about 11.3k inference cycles. At 15 MHz that is under
2 ms, against window periods of 33 to 125 ms.

## Where this design departs from, or adds to, the described hardware

* Readout rotation: the rotation is defined by the window's oldest slot
  (`c_act - C_in`), so the window comes out oldest-frame-first in the low
  bits. A rotation by the current slot index alone would not place the
  window at bit 0.
* The weight buffers are flip-flops, not latches.
* Pooling is done after thresholding (equivalent, see above).
* The clearing rule for `s_win > C_in`, the four-cycle word schedule, the
  wipe after reset, the overrun rule, the event-word layout, the address map
  and the valid/ready ports are this design's own choices. So are the
  accelerator's layer schedule, memory organisation and configuration ports.
* The accelerator takes at most 16 input channels per pixel through its
  32-bit port. The last 1D layer is limited to 9 taps, and all layers use
  stride 1.
* The interface is described as able to notice rising event activity, but
  not how; no activity detector is built.

## Files

| file | contents |
|---|---|
| `rtl/cutie_pkg.sv`, `rtl/dvs_pkg.sv` | types, ternary code, layer and interface configuration |
| `rtl/frame_sram.sv`, `rtl/fb_arbiter.sv`, `rtl/dvs_event_writer.sv`, `rtl/frame_readout.sv`, `rtl/frame_timer.sv`, `rtl/dvs_interface.sv` | DVS interface |
| `rtl/cutie_ocu.sv`, `rtl/cutie_linebuf.sv`, `rtl/cutie_pool.sv`, `rtl/cutie_tcn_buf.sv`, `rtl/cutie_act_mem.sv`, `rtl/cutie.sv` | accelerator |
| `rtl/dvs_tnn_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tnn_ref_pkg.sv` | reference model of the network (convolution, pooling, thresholds, TCN history) |
| `tb/tb_dvs_tnn_top.sv` | end to end with 16 channels: 27 windows, TCN buffer wrap, stalls, overrun, both output modes |
| `tb/tb_dvs_tnn_top_full.sv` | end to end at default sizes (96 channels): 8 windows compared with the reference model |
| `tb/tb_dvs_tnn_workloads.sv` | end to end with 16 channels for the other three evaluated configurations (`C_in`/`s_win`/`N_TCN` = 4/4/9, 15/15/5, 6/6/9) |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
Example with Verilator 5:

    verilator --binary --timing --assert rtl/cutie_pkg.sv rtl/dvs_pkg.sv \
        tb/tnn_ref_pkg.sv tb/tb_dvs_tnn_top.sv -y rtl -Irtl \
        --top-module tb_dvs_tnn_top -o sim
    ./obj_dir/sim +verilator+rand+reset+2

Leave out `tb/tnn_ref_pkg.sv` for testbenches that do not import it. The
end-to-end testbenches generate random events and a random ternary network
in the reference model. They record every event in a model of the frames,
run the reference network on each window's expected input, and compare all
11 scores and the class of every inference. They also count each mechanism:
port conflicts, dropped events, slot-counter wrap, readout stalls behind the
busy accelerator, system-memory back-pressure, overrun and TCN-buffer wrap.
A mechanism that never happens counts as a failure. The full-size run
takes a few minutes; the 16-channel one about 20 seconds.

Block-level testbenches check: the frame readout against an independent
model of the slot scheme, including its cycle count (`4*WORDS + 1`); the
interface over more than 16 frames with `C_in/s_win` = 4/3 and 15/15; the
OCU against direct dot products at full size, with values exactly at the
thresholds; the accelerator against the reference model with its per-layer
latency.
