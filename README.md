# Dynamic vision sensor with synchronous event-frame readout and in-array event filtering

This is synthesizable SystemVerilog for the digital part of a 132 x 104 pixel
dynamic vision sensor (DVS), the event camera published by C. Li, L. Longinotti,
F. Corradi and T. Delbruck ("A 132 by 104 10µm-Pixel 250µW 1kefps Dynamic Vision
Sensor with Pixel-Parallel Noise and Spatial Redundancy Suppression"). The
pixel's analog front end is a behavioural stand-in. A readout host is included
so that the design runs end to end.

A DVS pixel reports only changes in log intensity: an ON event when the
intensity has risen by a contrast threshold, an OFF event when it has fallen.
Earlier DVS chips read events one by one through request/acknowledge
arbitration. That lets a pixel that always requests (a "hot" pixel) hog the
bus, and it reads out noise events that carry no information. This design
works another way:

* **Synchronous event frames.** The whole array is frozen at once by a SAMPLE
  pulse. Each pixel's Event Memory then holds at most one event, so the array
  holds one *event frame*. The frame is read out, and then a RESTART pulse
  re-arms exactly the pixels that held an event. The SAMPLE rate sets the event
  frame rate. A hot pixel can report at most once per frame.
* **Filtering before readout.** The frame sits still in the Event Memories, so
  neighbouring pixels can be compared before anything leaves the array. Noise
  events (isolated in space) and redundant events (a large uniformly active
  area) are dropped inside the array.
* **Token scan readout without arbitration.** A row scan chain and a column scan
  chain pass a token that skips idle rows and columns within one clock. The
  chip therefore emits one useful bus word per clock.

## Array organisation

The array is made of 2 x 2 pixel groups: 66 group columns by 52 group rows at
the default size. Readout works on whole groups. A bus word carries the group's
column address and 8 event bits, an ON bit and an OFF bit for each of its 4
pixels. Pixel `p` of a group (`p = 2*row_in_group + col_in_group`) is the pixel
at column `2*gx + p%2`, row `2*gy + p/2`.

```
dvs_top
├── dvs_chip                      sensor
│   ├── pixel_array               NCOLS/2 x NROWS/2 groups, row requests, column lines
│   │   └── pixel_group (x3432)   2x2 pixels + GSCL
│   │       ├── pixel_frontend    behavioural analog front end (x4)
│   │       ├── pixel_digital     Event Memory, SAMPLE/RESTART (x4)
│   │       └── gscl              group filter
│   ├── cscl (x66)                column filter, one per group column
│   ├── scan_chain  (Y, 52+1)     group rows
│   │   └── scan_chain_segment
│   └── scan_chain  (X, 66+1)     group columns
│       └── scan_chain_segment
└── host_sequencer                SAMPLE / XCLK / YCLK / RESTART, bus decoding
```

`dvs_pkg` holds the shared types: `group_events_t` (the 8 event bits) and
`filter_cfg_t` (the four filter enables). It also holds the counting and
pass-rule functions.

## Event frame cycle

1. **SAMPLE** (one clock). Each `pixel_digital` copies its front end's
   comparator state into its Event Memory: ME (an event is stored) and the
   polarity.
2. **Filtering.** This is combinational, so it is ready in the next clock.
3. **Readout.** The Y chain walks the requesting group rows. For each row the
   X chain walks the requesting columns (see below).
4. **RESTART** (one clock). Every pixel with ME=1 is cleared and its front end
   is reset. This includes pixels whose events were filtered away. Pixels
   without an event keep integrating. A change that crosses a threshold during
   readout is held by the front end and taken by the next SAMPLE.

## Spatiotemporal correlation filters

There are two filter stages. Both use the same two rules on the number of
events `n` in a 2 x 2 group:

| rule | drops the events when | intent |
|------|-----------------------|--------|
| AL2 (at least 2) | `n < 2` | a lone event is almost always noise |
| AM3 (at most 3) | `n > 3`, i.e. all 4 pixels fired | the group lies in a large uniformly active area, such as flicker, that carries little spatial information |

* **GSCL** (`gscl`, one per group, inside the array). It counts events without
  regard to polarity and produces PASS. A group with PASS=0 neither requests
  nor drives the column lines. This keeps the per-group logic small.
* **CSCL** (`cscl`, one per group column, at the array edge). It filters the
  group of the row being read. It applies the rules separately to the ON events
  and the OFF events, and raises the column request XREQ if anything survives.

Each rule can be enabled on its own in each stage (`cfg.gscl_al2`,
`cfg.gscl_am3`, `cfg.cscl_al2`, `cfg.cscl_am3`). All zero turns filtering off.

## Scan chains: service path and skip path

This is the core of the readout (`scan_chain_segment`, `scan_chain`).

The token is a *rising edge*, not a pulse. Once a segment's output has gone
high it stays high until the chain is cleared, so the chain output is a
thermometer code. Each segment has two paths:

* `req=0`, **skip path**: the output is the incoming authorization
  (combinational). Any run of idle rows or columns is crossed within one clock.
* `req=1`, **service path**: the output is the *Present* flip-flop, which copies
  the incoming authorization at a clock enable. A *Past* flip-flop holds
  Present one clock later. The segment is serviced while `present & ~past`,
  which is exactly one clock.

So each clock services the next requesting segment, and the serviced segment is
one-hot. Each chain ends in an extra *end segment* that always requests. Its
service (XEND or YEND) signals that the row or the frame is complete. `addr`
encodes the serviced segment as `index+1`, the end segment as `N+1`, and 0 when
nothing is serviced.

The silicon needs transistor threshold tricks so that a long skip ripple that
reaches a Service Path late neither loses nor doubles a service. In this
synchronous description the ripple always settles within the clock, so that
problem does not exist. At the default sizes the ripple is a 67-deep (X) or
53-deep (Y) mux chain, which is the critical path.

## Chip bus protocol and timing

XCLK and YCLK, which the host generates, are modelled as clock enables
(`xclk_en`, `yclk_en`) of the single clock `clk`. The Y chain is cleared by
SAMPLE. The X chain is cleared by SAMPLE and by every YCLK. The X chain starts
as soon as a group row is serviced.

The chip bus (`bus_addr`, `bus_is_y`, `bus_ev`) is combinational from flip-flops:

| bus_is_y | bus_addr | bus_ev | meaning |
|---|---|---|---|
| 1 | `gy+1` | 0 | first clock after a YCLK: group row `gy` is being read |
| 0 | `gx+1` | 8 event bits | group (`gx`, current row), after both filters |
| 0 | `NGX+1` (XEND) | 0 | row complete |
| 1 | `NGY+1` (YEND) | 0 | frame complete |
| 0 | 0 | 0 | token travelling on skip paths (idle) |

`host_sequencer` registers the bus, so it gives YCLK one clock after it sees
XEND. The clocks for one frame are:

```
clk:   S  Y1 | Ra  G  G ... G  XE  -  | Ra  G ... XE  -  | ... | YE
       SAMPLE, first YCLK; then n+3 clocks per serviced group row
```

A serviced group row with `n` groups after filtering therefore costs `n + 3`
clocks, and a frame costs `2 + Σ(n_r + 3)` clocks up to the YEND word. Rows
with no request cost nothing. Columns with no request cost nothing. Some
consequences:

* Worst case, one event per group row: 4 clocks per row, 0.25 events per clock.
* Best case, every group full (AM3 off): `4n/(n+3)` events per clock. A full
  66-group row gives 3.83 events per clock. A fully active frame (13728
  events) reads in 3590 clocks, which is 191 Meps at a 50 MHz clock. The
  published chip reaches 180 Meps at 50 MHz.
* A row that passes the group filter but is emptied by the column filter still
  costs 3 clocks: row address, XEND, idle.

## Readout host

`host_sequencer` stands in for the external host (an FPGA or a microcontroller
in practice). Its sequence is SAMPLE, then YCLK, then XCLK every clock, YCLK
after each XEND, and RESTART after YEND. It then waits until `frame_period`
clocks have passed since the SAMPLE. At 50 MHz, `frame_period = 50000` gives
1000 event frames per second. If the readout is longer than the period, the
next SAMPLE follows the RESTART directly. The host decodes the bus into
`ev_valid / ev_gx / ev_gy / ev` (0-based group coordinates) and reports the
length of each readout in `frame_clocks`.

## Pixel front-end model

`pixel_frontend` is not a circuit. It is a sampled digital model of the
photodiode, logarithmic photoreceptor, change amplifier and comparators. It
takes an 8-bit log intensity `log_i`. It fires ON when `log_i` has risen by
`th_on` since the last reset, and OFF when it has fallen by `th_off`. It then
holds that event until `rst_pix`. After power-up the pixel memorises its first
level. The model lets the readout be simulated from a stimulus image. It carries
no information about the real analog behaviour: noise, latency, refractory
period and bias dependence are all absent. The on-chip bias generator and the
pads are not modelled. The thresholds are plain inputs.

## Parameters

| parameter | default | where |
|---|---|---|
| `NCOLS`, `NROWS` | 132, 104 | pixel array size (`dvs_top`, `dvs_chip`, `pixel_array`); must be even |
| `LOGI_W` | 8 | width of the modelled log intensity and thresholds |
| `N` | 66 | segments in a `scan_chain` (52 for the Y chain) |
| `frame_period` (port) | e.g. 50000 | clocks between SAMPLE pulses |

The address width follows from the array size: `$clog2(max(NCOLS/2, NROWS/2) + 2)`,
which is 7 bits at the default size.

## Choices made in this RTL

The published description gives the structure and behaviour above. These
details are this implementation's own:

* The unit of readout is the 2 x 2 group. Rows and columns of the scan chains
  are group rows and group columns, and a bus word carries 8 event bits.
* Addresses are 1-based, so that 0 means idle, and the end segments take
  `N+1`. The row-address marker `bus_is_y`, which shows the row address for one
  clock after each YCLK, is an added output.
* XCLK/YCLK are clock enables of one clock. There are synchronous clears
  (SAMPLE for Y, SAMPLE or YCLK for X). The X chain starts when any row is
  serviced.
* The row request is formed after the group filter only. The column filter
  acts during the row's readout.
* The GSCL and CSCL have separate AL2/AM3 enables.
* The host's registered bus input, which gives the idle clock per row and hence
  the 4-clock row minimum, and its frame-period behaviour.
* The Event Memory holds ME and one polarity bit. SAMPLE wins over a
  simultaneous RESTART.

Not covered: the analog pixel, the bias generator, pads, and the transistor
threshold safeguards of the scan chain. Clock frequency and power cannot be
derived from RTL. The published filter reductions (about 40 % of events
removed by AL2 and 87 % by AL2+AM3 on recorded scenes) depend on recordings
that are not reproduced here.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The shared reference model for the sensor-level
tests is `tb/tb_dvs_ref_pkg.sv`. To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dvs_pkg.sv tb/tb_dvs_ref_pkg.sv tb/tb_dvs_top.sv --top-module tb_dvs_top
./obj_dir/Vtb_dvs_top
```

| testbench | checks |
|---|---|
| `tb_gscl`, `tb_cscl` | every input pattern under every filter setting |
| `tb_pixel_frontend`, `tb_pixel_digital` | random stimulus against a cycle model |
| `tb_pixel_group`, `tb_pixel_array` | random frames: PASS, requests, column lines |
| `tb_scan_chain_segment`, `tb_scan_chain` | skip/service timing, one service per clock in order, END, addresses |
| `tb_host_sequencer` | control timing and decoding against a behavioural bus |
| `tb_dvs_chip` | 12x8 array: every bus word, the idle clock, the exact frame length |
| `tb_dvs_top` | 24x16 array, 200 frames end to end; counts each mechanism (AL2, AM3, column filtering, row/column skip, emptied row, empty frame, frame-rate- and readout-limited frames) and checks the best- and worst-case frame lengths |
| `tb_dvs_top_full` | the same test at the default 132x104 size, 8 frames with a 4000-clock frame period |
| `tb_dvs_workloads` | the two operating points on a full-width 132x16 strip at 50 MHz: 100 events per frame at 1000 frames/s, and every pixel firing in back-to-back frames |

`tb_dvs_top_full` needs about 4 minutes to build and under a minute to run.
It measures 13728 events in 3590 clocks for the full frame and 52 events in
210 clocks for the worst case.

Measured operating points at a 50 MHz clock:

* **Low activity.** 100 events per frame with `frame_period = 50000` gives
  1000 frames/s and 100 keps. Every event is delivered, and the readout of
  such a frame takes a few hundred clocks.
* **High activity.** With every pixel firing in every frame, consecutive frames
  are 2 + 8*69 + 4 = 558 clocks apart on the 132x16 strip, counting the
  readout, YEND detection, RESTART and the clock the pixels need to fire again.
  That is 3.79 events per clock, or 189 Meps sustained. The published figure
  is 180 Meps.
