# Moving-object tracking core: Adaptive Hybrid Difference in hardware

This core finds moving objects in a fixed-camera video stream. It first learns
how much each pixel normally changes between frames. It then marks a pixel
as *moving* when its change falls outside that normal range. The method is
the Adaptive Hybrid Difference (AHD) background model. Its logic is only
subtraction, squaring, addition and comparison. The hard part is memory: the
model needs many frames at once, and they only fit in external memory. Most of
the design is therefore about streaming frames between a single-port frame
memory and two small pipelined units, across two clock domains, without
starving the units.

The RTL follows a published FPGA design of this algorithm (640×480 frames,
16-bit pixels, 256-word memory bursts, 512-word dual-clock FIFOs, a 125 MHz
memory clock and a 20 MHz processing clock). Where that design leaves
something open, this implementation makes its own choice. Those choices are
listed in [Departures and own choices](#departures-and-own-choices).

## The algorithm

For pixel (i,j) of frame t, the *frame difference* at distance k is

    D_k^t(i,j) = | G^t(i,j) - G^{t-k}(i,j) |

**Learning.** Over N = 30 frames the core accumulates, per pixel,
S1 = Σ D and S2 = Σ D². From these sums it forms the mean and the sample
standard deviation:

    mu    = S1 / N
    sigma = sqrt( (N*S2 - S1^2) / (N*(N-1)) )

The pixel's normal range is the interval T = [mu − sigma, mu + sigma].

**Tracking.** For every new frame t, the core compares the frame with the
S_MAX = 5 frames before it:

    B^t(i,j) = 1  if  D_s^t(i,j) is outside T(i,j) for any s = 1 .. S_MAX
               0  otherwise

B is the binary image: 1 means moving, 0 means still. A difference is outside
T when it is larger than mu+sigma or smaller than mu−sigma. The second case
is part of the rule: a pixel that stays unusually constant while it normally
flickers also counts as a change.

All arithmetic is in integers. The mean, the variance and the square root are
rounded down. A negative mu−sigma is stored as 0, which gives the same result
because D is never negative.

## Passes: how the work is organised

The frame memory holds nine regions of one frame each (FRAME_PIX words per
region; word address = region × FRAME_PIX + pixel index):

| region | contents |
|--------|----------|
| 0–5    | six frame slots: camera frame f lives in slot f mod 6 |
| 6      | lookup table 1: S1 during learning, then mu+sigma |
| 7      | lookup table 2: S2 during learning, then mu−sigma |
| 8      | binary image, carried from one tracking pass to the next |

All work is done in **passes**. A pass streams one whole frame's worth of
pixel positions, in raster order, through one unit. It uses up to six *read
streams* (memory region → read FIFO → unit) and up to two *write streams*
(unit → write FIFO → memory region). Only one unit works at a time. The
controller (`track_ctrl`) chooses each pass and holds its configuration
(`pass_cfg_t` in `tracking_pkg`) stable until the memory side reports the pass
finished.

| pass   | read streams 0–5                                   | write streams 0–1 | unit |
|--------|----------------------------------------------------|-------------------|------|
| INGEST | –                                                  | camera → slot     | none (camera pixels go straight to write FIFO 0) |
| TD     | t, t−k, t+1, t+1−k, LUT1, LUT2                     | LUT1, LUT2        | `td_unit` |
| FIN    | LUT1, LUT2 (streams 4, 5)                          | LUT1, LUT2        | `threshold_finalizer` |
| BIB    | t, t−s, t−s−1, binary image, LUT1, LUT2            | binary image      | `bib_unit` |

The controller runs them in this order:

1. **Learning.** It runs N/2 = 15 TD passes. Pass p uses t = k + 2p, so each
   pass adds the differences of two frames to the sums. Before each TD pass,
   INGEST passes store the camera frames that pass needs. At most k+2 frames
   are needed at once, so the six slots are enough for k ≤ 4. The first TD
   pass does not read the lookup tables; the unit sees zeros there instead.
2. **Finalising.** One FIN pass rewrites both lookup tables in place with
   mu+sigma and mu−sigma.
3. **Tracking, for every following camera frame.** One INGEST pass stores the
   frame. Then ceil(S_MAX/2) = 3 BIB passes follow. BIB pass q compares
   frame t with frames t−s and t−s−1, where s = 2q+1. The last partner is
   clamped to t−S_MAX, so the third pass compares with t−5 twice. Each pass
   ORs its two results into the binary bit left by the pass before. The first
   pass starts from 0 and does not read region 8. The last pass also sends the
   finished image out on `bin_valid`/`bin_pixel`, and `frame_done` pulses when
   it ends.

## Two clock domains and the FIFOs

```
 mem_clk (125 MHz)                         unit_clk (20 MHz)
 ┌─────────────┐  6 × async_fifo (512)   ┌──────────────────────────────┐
 │ burst_mover │ ──────────────────────► │ beat logic ─► td_unit         │
 │             │                         │            ─► threshold_fin.  │
 │  memory     │ ◄────────────────────── │            ─► bib_unit        │
 │  port       │  2 × async_fifo (512)   │ track_ctrl                    │
 └─────────────┘                         └──────────────────────────────┘
          ▲    cdc_pulse: pass start ──►      │
          └──── cdc_pulse: pass done ◄────────┘
```

**Unit side.** A *beat* is one pixel position. It is taken on a `unit_clk`
cycle when all of the following hold:

- every read FIFO the pass uses holds a word;
- every write FIFO the pass uses has room for what is still inside the
  five-stage pipelines;
- the frame is not yet complete.

The beat pops one word from each read FIFO and starts the active unit. The
unit's result is pushed into the write FIFOs five cycles later (four for the
finaliser). During an INGEST pass, the same conditions drive `cam_ready`.

**Memory side.** `burst_mover` serves the streams one burst at a time. A
burst is up to 256 words (BURST). It is shorter only at the end of a frame.

- A read stream may start a burst when its FIFO, counting words still in
  flight, has room for the whole burst.
- A write stream may start a burst when its FIFO holds the whole burst, or
  the rest of the frame.
- Among the eligible streams, the most urgent goes first: the emptiest read
  FIFO or the fullest write FIFO. Ties go round-robin.
- Read commands are issued back to back, and bursts may overlap. A small tag
  queue (MAX_OUT = 8) records which stream each outstanding read belongs to,
  so that returning data goes to the right FIFO.

When every stream has moved its frame and no read is outstanding, the mover
reports the pass done.

**Clock crossing.** The FIFOs are Gray-pointer dual-clock FIFOs. Each shows
its fill level on both sides; the level is conservative in the direction that
matters on each side. Pass start and pass done cross between the domains as
toggle-synchronised pulses (`cdc_pulse`). The pass configuration is not
synchronised. It is safe because it is stable from before the start pulse
until after the done pulse.

### Throughput, and where memory bandwidth limits it

The memory moves one word per `mem_clk` cycle. That is 6.25 words per unit
cycle. A pass keeps its unit busy only if its streams need no more than that
per pixel:

| pass            | words per pixel | unit cycles per pixel (bound) |
|-----------------|-----------------|-------------------------------|
| BIB, first      | 5 + 1 = 6       | 1.0 (unit-bound) |
| BIB, later      | 6 + 1 = 7       | 7 / 6.25 = 1.12 |
| TD              | 6 + 2 = 8       | 8 / 6.25 = 1.28 |
| FIN             | 2 + 2 = 4       | 1.0 |

Measured at full size (640×480, all defaults, `tb_tracking_full`):

- The three BIB passes of a frame take 998,604 unit cycles: 20.0 frames/s at
  20 MHz. A pure one-beat-per-cycle schedule would take 3 × 307,200 cycles,
  giving the 21.7 frames/s of the published estimate. That estimate does not
  count the read-back of the binary image between passes.
- The 15 TD passes take 5,835,960 unit cycles. The published figure is about
  4.6 M cycles (15 × 307,200), which assumes one beat per cycle.
- The INGEST pass of each frame takes one more frame time. In this design
  storing a camera frame does not overlap with processing (see below).

## The units

**`td_unit`: threshold definer.** The pipeline has five register stages:

1. Input registers (pixels and old sums).
2. The two absolute differences Dt and Dt_1.
3. Their squares, and Dt + old S1.
4. S1 + Dt + Dt_1, and Dt² + Dt_1².
5. The final S2 sum, then the output registers.

One beat per cycle, no stall, latency 5. Accumulators are PIX_W+5 and
2·PIX_W+5 bits wide (21 and 37 bits), so 30 frames cannot overflow.

**`threshold_finalizer`.** Four stages:

1. Input registers.
2. mu = S1/N, and N·S2 − S1².
3. Division by N(N−1).
4. Bitwise integer square root, then the bounds.

One beat per cycle, latency 4. It uses two constant-divisor dividers and an
unrolled square root. It is large but runs only once per learning phase.

**`bib_unit`: binary image builder.** Five stages:

1. Input registers.
2. The two absolute differences.
3. Four comparisons: > hi and < lo for each difference.
4. One OR per difference.
5. The OR with the incoming binary bit, then the output register.

Latency 5.

## Interface of `tracking_top`

| group  | signals | domain | notes |
|--------|---------|--------|-------|
| clocks | `mem_clk`, `mem_rst_n`, `unit_clk`, `unit_rst_n` | – | active-low async resets, apply both together |
| control | `start` (in), `thr_ready`, `frame_done` (out) | unit | `start` in idle begins learning; `thr_ready` stays high once tracking runs |
| camera | `cam_valid`, `cam_pixel[PIX_W]` (in), `cam_ready` (out) | unit | raster-order pixels; taken when valid && ready; frames are consecutive |
| result | `bin_valid`, `bin_pixel` (out) | unit | binary image of each tracked frame in raster order, 1 = moving |
| memory | `mem_valid`, `mem_we`, `mem_addr[ADDR_W]`, `mem_wdata[WORD_W]` (out), `mem_ready`, `mem_rvalid`, `mem_rdata[WORD_W]` (in) | mem | command taken when valid && ready; read data in command order, any latency |

Parameters, with their defaults:

- `PIX_W` = 16
- `FRAME_W` × `FRAME_H` = 640 × 480
- `N_ACC` = 30: frames in the threshold; must be even
- `K_TD` = 2: distance k used while learning
- `S_MAX` = 5: earlier frames compared while tracking
- `BURST` = 256
- `FIFO_DEPTH` = 512: a power of two, at least 2 × BURST

Derived widths: `WORD_W` = 37, `ADDR_W` = 22.

## Departures and own choices

- **Memory word width.** The published design uses a 16-bit SDRAM. A 16-bit
  word cannot hold the 30-frame sums (21 and 37 bits), and no packing is
  specified. Here the memory port is 37 bits wide, with one value per
  address. Packed into 16-bit words, the nine regions would need 3.69 M words,
  which fits a 4 M × 16 (8 MB) part. That packing is not built.
- **The memory device protocol is not modelled.** `burst_mover` drives a
  generic in-order command/return port. Row activation, refresh and CAS
  timing of a real SDRAM belong to a device-specific controller behind that
  port.
- **The camera shares write FIFO 0.** Frames are stored in their own INGEST
  passes, between processing passes. In the published design, capture runs
  continuously alongside processing. There the camera is also only a block
  name. Here it is a valid/ready pixel port. Overlapping capture with the
  BIB passes would need a seventh frame slot. While frame t is processed,
  slots t … t−5 are all read, so frame t+1 has nowhere to go.
- **Six read FIFOs.** One passage of the published design speaks of four read
  FIFOs; its unit diagrams need six. Six are built.
- **Finalising pass.** How the sums become mu±sigma is not described
  in hardware. The FIN pass and `threshold_finalizer` are this design's own.
- **Binary image between passes.** Storing it in memory region 8 is this
  design's choice. Merging the results with OR follows the tracking rule
  above.
- **k and the number of compared frames.** k = 2 and S_MAX = 5 are chosen
  here. The published design determines k experimentally. The three BIB
  passes per frame match its 3-cycles-per-pixel estimate.
- **Flow control.** The published timing argument says the FIFOs never run
  empty or full. Here the units stall safely anyway. The write FIFOs fill up
  during TD passes, which are limited by memory bandwidth.
- **Resources.** The published implementation reports 151 logic elements,
  95 registers, 8,192 memory bits and no multipliers. This RTL is much
  larger. Its eight 512-word FIFOs of 37-bit words alone hold about 143 k
  bits, and the D² term of the threshold definer needs a 16 × 16 multiplier.
  The published figures cannot hold six 512-word FIFOs of any width used
  here, so they probably cover only part of the system. The design still
  fits a 33 k-LE Cyclone II class device. Narrower FIFOs for the pixel
  streams, with wide ones kept only for the sums, would roughly halve the
  memory.
- **Not included.** Threshold re-learning at intervals, a VGA output stage,
  the camera sensor interface and clock generation.

## Simulating

Every file in `rtl/` holds one module or package. Testbenches in `tb/` are
self-checking. Each prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if it hangs. A typical run with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/tracking_pkg.sv tb/tb_tracking_top.sv -y rtl -y tb +libext+.sv \
        --top-module tb_tracking_top -o sim
    obj_dir/sim

| testbench | what it checks |
|-----------|----------------|
| `tb_td_unit` | random pixels and sums against the accumulation rule, latency 5 |
| `tb_bib_unit` | random and on-bound differences against the rule, latency 5 |
| `tb_threshold_finalizer` | bounds from 30 random differences against a floating-point reference, latency 4 |
| `tb_async_fifo` | 125/20 MHz: fill to full (exactly 512), drain, random streaming, data order |
| `tb_burst_mover` | memory wait states, short bursts, per-stream data, addresses, no FIFO overrun, one done pulse |
| `tb_track_ctrl` | the whole pass sequence against a reference built from frame numbers |
| `tb_tracking_top` | 9×4 frames, N=6, bursts of 8: every pixel's interval in memory and every binary pixel of three tracked frames; requires each mechanism (ingest, camera back-pressure, first/later TD passes, FIN, first/middle/last BIB passes, empty-FIFO and full-FIFO stalls, memory wait states, full and short bursts) to occur |
| `tb_tracking_full` | all defaults (640×480, N=30): learns the threshold, tracks one frame, checks every interval and every binary pixel, and checks the BIB cycle count against the bandwidth bound above; runs in about 1.5 minutes |

`frame_mem_model` (in `tb/`) is the behavioural frame memory used by the
testbenches. It has a fixed read latency and optional random wait states.
