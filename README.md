# Systolic vector median filter for colour images

A median filter removes impulse ("salt and pepper") noise from an image
while keeping edges. It replaces every pixel with the median of a small
window around it. A colour pixel is a vector (r, g, b), and taking the
median of each component on its own can produce a colour that occurs
nowhere in the window. The *vector median* avoids that: it is the window
pixel x_i whose summed distance to all the other pixels,

    D_i = sum_j ||x_i - x_j||,   ||a - b|| = (ar-br)^2 + (ag-bg)^2 + (ab-bb)^2

is the smallest. It is always one of the input pixels, so colours stay
consistent.

This RTL computes the vector median with a linear systolic array of N
processing elements, one per window pixel (N = 9 for a 3 x 3 window):

* The window's pixels enter serially, one per clock.
* All N sums D_i are computed in parallel in N clocks.
* The sums then stream out to a minimum finder.

Three windows are in flight at once, so the filter returns one median every
N + 2 clocks (11 for a 3 x 3 window). The first median appears 3N + 2
clocks (29) after the first pixel of the first window. A window scanner with
a frame buffer sits in front of the filter, so a whole image can be filtered
by writing it into the buffer and pulsing `start`.

## Structure

```
 vmf_top
 ├── vmf_window_scan   frame buffer + K x K window scanner
 └── vmf_filter        the systolic vector median filter
     ├── vmf_ctrl      N+2-clock schedule
     ├── vmf_mc        Minimum Computation block: N x vmf_pe
     │   └── vmf_pe    processing element
     │       └── vmf_distance   squared RGB distance
     └── vmf_mf        Minimum Finding block
 vmf_pkg               rgb_t, pe_ctrl_t, widths
```

Pixels have 8 bits per component (`vmf_pkg::CW`). The width of D is
`DW = ceil(log2((N-1)*3*255^2 + 2))`, which is 21 bits for N = 9. Every
reachable D is therefore strictly below the all-ones value.

## The processing element and the three chains

PE_i holds six registers:

| register | role |
|---|---|
| SR  | input shift register. The SRs form a chain PE_N → … → PE_1, and the window enters at PE_N. After N input clocks PE_i holds x_i. |
| RI  | copy of SR taken at the *load* clock. It stays x_i for the whole computation. |
| RJ  | loaded from SR at the same clock (MUX1 = SR). After that it takes RJ of the previous PE every clock (MUX1 = RJ). The RJs form a ring: PE_1 feeds PE_N. |
| D   | cleared at load. Then `D <= D + distance(RI, RJ)` for N clocks. Because the ring rotates once in that time, RJ shows every x_j once, and D ends up as D_i. |
| MIN | once per window it takes D (MUX2 = D). Otherwise it takes MIN of the previous PE, so D_1, D_2, … D_N leave PE_1 one per clock. |

The MIN register also carries the vector x_i, copied from RI when D_i
enters MIN. The minimum finder therefore receives every D_i together with
the pixel it belongs to. This departs from the published block diagram,
where the result register is fed from SR of PE_1. That does not work with
three windows overlapped: when window p's sums leave the MIN chain, the SR
chain already holds window p + 2, and SR of PE_1 is passing on window
p + 1. Carrying x_i next to D_i costs 24 flip-flops per PE and gives the
correct pixel.

## The N+2-clock schedule

`vmf_ctrl` runs a phase counter p = 0 … N+1 that starts at 0 after reset
and never stops. Within one period:

| phase | input / SR | RI, RJ, D | MIN chain / MF |
|---|---|---|---|
| 0 … N-1 | one pixel per clock (`in_ready` = 1) | accumulate (RJ rotates) | compare D_3 … D_N of an older window (phases 0 … N-3) |
| N-1 | last pixel | D → MIN, RJ holds | M := maximum |
| N | idle | **load**: RI, RJ := SR, D := 0 | compare D_1 |
| N+1 | idle | accumulate | compare D_2 |

The rows overlap at phase N-1 (last input pixel, D → MIN and the reset of
M all happen there). The N accumulate clocks are phases N+1, 0, … N-2.
Window k is loaded in period k and accumulated in period k+1. Its minimum is
found in period k+2, and its median is valid in the clock after phase N-3
of that period. That is 3N + 2 clocks after its first pixel. The exact phase
of each step is this design's choice; the architecture fixes only the
counts (N load clocks, 1 transfer clock, N accumulate clocks, N MIN shifts)
and the period N + 2. The controller needs N ≥ 3.

The SR chain shifts only in the N input clocks. The original description
shifts it every clock. Both leave the same contents in SR at the load clock.

## Minimum finding

`vmf_mf` holds the running minimum M, which is set to all-ones by `start`,
and the result register MX. On each of the N compare clocks
`min = DIS < M`. When `min` is set, M takes DIS and MX takes the vector.
Because the compare is strict, a tie keeps the earlier pixel, the one with
the lower index in the window. Two assertions check the control inputs:
`start` and `cmp` are never high together, and `done` comes only on a
compare clock.

## Interfaces

**`vmf_filter`** is the filter on its own.

* **Input.** A pixel is taken on every clock with `in_ready` high, which
  is N consecutive clocks out of every N + 2. The source must supply the N
  pixels of a window in those N clocks, P_1 … P_N in raster order. The
  order does not affect the result except for which pixel wins a tie.
* **Gaps.** If `in_valid` is low on any of a window's clocks, the window is
  still processed but produces no result. The array never stalls.
* **Output.** `med_valid` pulses for one clock per valid window.
  `med_vec` (MX) and `med_dist` (M) hold the result until the next window
  finishes.

**`vmf_top`** is the image filter.

* **Loading.** Write the IMG_W x IMG_H image (default 16 x 16) with
  `wr_en`, `wr_addr = row*IMG_W + col` and `wr_pix`. Do not write during a
  scan.
* **Scanning.** `start` (while `busy` is low) scans every pixel whose
  K x K window lies inside the image, in raster order. Border pixels get no
  result.
* **Alignment.** The scanner waits for the filter's input slot to close,
  then starts a window on the first clock of the next slot.
* **Output.** Results come one per N + 2 clocks with `med_row` / `med_col`
  of the centre pixel. A counter stepped by `med_valid` supplies the
  coordinates. This works because results leave in input order and the
  scanner never leaves a gap.

All registers use a synchronous active-low reset `rst_n`. The frame buffer is
not reset. It is a plain array with one write port and an asynchronous read
port.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| vmf_top | IMG_W, IMG_H | 16, 16 | image size |
| vmf_top, vmf_window_scan | K | 3 | window side |
| vmf_top, vmf_filter, vmf_mc, vmf_ctrl | N | 9 (K*K) | pixels per window, number of PEs |
| all but vmf_distance | DW | 21 | width of D, M and MIN, derived from N |
| vmf_pkg | CW | 8 | bits per colour component |

The 16-pixel row width matches a demonstration image whose pixel values are
their raster index (16r + c). Its first three 3 x 3 windows have the
medians 17, 18 and 19. The image height and the component width are
free choices.

## How far it is checked

Every module has a self-checking testbench in `tb/` that compares against
a model written independently in the testbench:

| testbench | what it checks |
|---|---|
| `vmf_distance_tb` | corner cases and 2000 random pairs |
| `vmf_pe_tb` | SR shift, MUX1 in both settings, D accumulation against the sum of distances, MUX2 in both settings |
| `vmf_mc_tb` | 100 windows: D_1 … D_N in order, each with its vector, then the all-ones filler |
| `vmf_mf_tb` | the `min` flag on every clock, ties, the near-maximum distance, the result and the strobe |
| `vmf_ctrl_tb` | every control output in every phase over 60 periods, and `mf_done` for exactly the gap-free windows |
| `vmf_window_scan_tb` | the exact pixel sequence of a full scan and the alignment to the input slot |
| `vmf_filter_tb` (N = 9) | 363 back-to-back windows: the 16r + c demonstration windows (medians 17, 18, 19), random colours, a deterministic tie, tiny-range windows and windows with input gaps |
| `vmf_top_tb` (all defaults) | three complete 16 x 16 images: the ramp, random colours, and a three-colour image full of ties |

In `vmf_filter_tb`, each median and D is checked, together with the
latency of 3N + 2 clocks and the spacing of N + 2 clocks between results.
In `vmf_top_tb`, every one of the 196 results per image is checked with its
coordinates, latency and spacing. Both count each mechanism and fail if one
never happens: load, ring rotation, D → MIN, replacement of the running
minimum, three windows in flight, ties, dropped windows (filter), waiting
for the input slot and row changes (top).

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/vmf_pkg.sv tb/vmf_top_tb.sv --top-module vmf_top_tb
./obj_dir/Vvmf_top_tb
```

Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Departures and open points

* **Vector paired with D_i.** The result vector travels with its D_i
  through the MIN chain instead of being taken from the input shift
  register (see above).
* **Not specified by the architecture.** These are assumptions:
  * component width (8 bits);
  * distance width;
  * reset behaviour;
  * tie rule (first wins);
  * input handshake and dropped windows;
  * the output strobe.
* **Image front end.** The scanner, frame buffer, image size and border
  rule are the simplest way to apply the filter to an image. They are not
  part of the published array.
* **Distance.** The distance is the *squared* Euclidean distance, with no
  square root. The minimum of the sum of squared distances can pick a
  different pixel than the minimum of the sum of true Euclidean distances.
  This design follows the squared definition.
* **Implementation size.** The original was implemented on an Altera
  FLEX 10K FPGA at about 65,000 gates. Nothing here targets a particular
  device.
