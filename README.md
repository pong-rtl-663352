# Two-station pong with a one-point-perspective view

Two players each sit at their own FPGA board and monitor. The boards run
identical logic and are joined by a serial link, a wire or an infra-red beam.
Each player sees their own paddle on the left wall and the opponent's on the
right. Either player can flip a switch to see the table in perspective, from
just above and behind their own paddle, instead of the usual top-down view.

The central idea is that the two stations never compute the same thing. At any
moment one station is the **master**: it moves the puck while the puck travels
towards its own paddle, and it streams the puck's state to the other station.
When its paddle returns the puck, mastership passes to the opponent, who now
owns the puck for its half of the rally. Each station always sends its own
paddle position. So every piece of state has exactly one author at a time, and
the link only has to carry that state once per video frame.

All RTL is in `rtl/` (SystemVerilog-2017, one module or package per file). The
self-checking testbenches are in `tb/`.

## Block map

```
                 +-----------+  go/state   +---------+  ready/data/busy  +----------+
 buttons ------->|pong_logic |------------>| pong_tx |------------------>| wired_tx |--> wire_out
 player_one ---->|           |             +---------+         |         +----------+
 speed --------->|           |                                  \------->|  ir_tx   |--> ir_carrier --> ir_led
                 |           |<-- rx_valid/rx_data --+                   +----------+      ^ tick_gen
                 +-----------+                       |  use_ir mux
                   |  positions              wired_rx <-- wire_in
                   v                         ir_rx + ir_idle_detect <-- ir_in
   vga_timing --> trad_renderer -------+
       |      --> one_pt_perspective --+-- view_3d mux --> vga_rgb, syncs
       |             six_points, mapping_module (divider, sine, cosine),
       |             blob3d (inside_trapezoid x2) per box
       +--> frame pulse: game step, packet burst, projection pass
```

`pong_top` is one station. A system is two `pong_top` instances with
`wire_out` of each connected to `wire_in` of the other (or LED to IR receiver),
and `player_one` set on exactly one of them.

Everything runs on one clock. The link timing assumes 27 MHz. The default
raster is 1024×768 at 60 Hz, which needs a 65 MHz pixel clock on real hardware.
The design does not reconcile these two figures: see "Departures" below.

## The frame cycle

`vga_timing` pulses `frame` once per refresh, at the first blanked line. Three
things hang off that pulse.

1. **Game step** (`pong_logic`). The local paddle moves by `PADDLE_STEP` if a
   button is held. If the station is master, the puck moves by its velocity.
   It reflects off the top and bottom walls. A hit is declared when the puck
   crosses the paddle's front face during the step and overlaps the paddle
   vertically. If the puck instead reaches the wall, the game stops: this
   station has `lost`, and it keeps sending a loss packet every frame.
2. **Packet burst** (`pong_tx`). One cycle later (`tx_go`), the scheduler
   latches the state this station owns. It marks the packets to send: always
   the paddle, plus puck x, puck y and velocity while the station is master
   (or has just handed over), plus the loss packet if needed. It passes them
   one at a time to the selected transmitter.
3. **Projection pass** (`one_pt_perspective`). The renderer latches the
   positions and projects the 18 box corners during vertical blanking.

### Packets

All packets are 15 bits: a 3-bit type and a 12-bit payload (`pong_pkg`).

| type | payload |
|---|---|
| `PKT_PADDLE` (0) | [9:0] sender's paddle centre y |
| `PKT_PUCK_X` (1) | [10:0] puck centre x in the sender's coordinates |
| `PKT_PUCK_Y` (2) | [9:0] puck centre y |
| `PKT_PUCK_V` (3) | [10] handoff, [9:5] vx, [4:0] vy (signed) |
| `PKT_LOSS` (4) | — |

Both stations draw their own paddle at x = 0. A received puck x is therefore
mirrored to `SCREEN_W − x`, and a received vx is negated.

### Mastership and handoff

This is the part to understand before changing anything.

- After reset, the station with `player_one` high is master. The puck starts in
  the middle, moving towards that station's paddle with velocity
  (−speed, +speed).
- The master ignores puck packets: it **rejects** the updates. The other
  station accepts them and only displays what it receives. Paddle packets are
  accepted by both stations.
- When the master's paddle returns the puck, its master bit clears in that same
  frame step. The station raises `handoff` and sends its final puck state with
  the handoff flag set in the velocity packet. The flag stays set in the
  scheduler until a velocity packet carrying it has actually gone out.
- The receiver of a velocity packet with the flag set takes the mirrored puck
  state and becomes master. From its next frame on, it moves the puck towards
  its own paddle.

While the packet is in flight, neither station is master. The puck then simply
stands still for that one frame. If both stations are set to `player_one`, both
are masters. Each then rejects the other's puck packets, and the game runs as
two independent single-player games until one of them hands off. The
end-to-end test uses this to provoke rejections.

### Scheduler on a slow link

A wired packet takes 153 cycles, far below one frame. An infra-red packet takes
28.8 ms, almost two frames. `pong_tx` therefore re-latches fresh values on every
frame. It serves the marked packet kinds round-robin, not in a fixed order, so
on the IR link every kind still gets through, only less often. The game is
playable over IR, but the opponent's view then updates at roughly 10 Hz per
value.

## Wired link (`wired_tx`, `wired_rx`)

Each symbol is held for `CYCLES_PER_BIT` = 9 clocks. A packet consists of:

- a preamble of three 3-cycle thirds: 1, 0, 1;
- 15 data bits, most significant first;
- one bit time of 0.

This takes (15 + 2) × 9 = 153 cycles. A new packet is offered with a one-cycle
`ready` while `busy` is low. Both transmitters carry an assertion that flags an
offer made while busy.

The receiver synchronises the line with two flip-flops. While waiting, it
shifts every sample into a 9-entry register. It treats the register as a
preamble when at most one sample differs from 111000111, which tolerates one
corrupted sample at either edge. It then samples each bit on its fifth cycle,
pulses `valid` after the last bit, and clears the shift register.

## Infra-red link (`ir_tx`, `ir_rx`, `ir_idle_detect`, `ir_carrier`, `tick_gen`)

`tick_gen` makes a 300 µs enable (8100 cycles). Each bit is six ticks long:

- 600 µs of 1;
- 600 µs of the bit value;
- 600 µs of 0.

Every bit thus has exactly one rising edge at a known position. After 15 bits,
the line rests at 0 for 1800 µs. `ir_carrier` gates a 40 kHz square wave
(toggling every 337 cycles) with the line to drive the LED. The receiver chip
is external: `ir_in` is expected high while the carrier is present.

`ir_rx` waits for a rising edge. It samples the line 900 µs (24300 cycles)
later, in the middle of the data window, and counts bits. `ir_idle_detect`
looks at the line on each tick and reports `idle` after six zero samples in a
row. Within a packet the line is at most four samples low (a 0 bit); between
packets it is at least eight. `idle` returns the bit count to zero, so a packet
that lost or gained an edge is dropped at the next gap rather than corrupting
the packets after it.

## Perspective view

The perspective renderer is the least obvious part of the design and the one
most likely to need tuning.

### Geometry

Each object (both paddles and the puck) is a box standing on the table.
`six_points` turns the box's centre, depth, width and height into six corners.
The camera looks along the table from the local end, so "near" means closer to
the local wall:

```
   P3 ------- P6        far top edge
   |  top      |
   P2 ------- P5        near top edge
   |  front    |
   P1 ------- P4        near bottom edge
```

On screen, the top face P2‑P3‑P6‑P5 and the front face P1‑P2‑P5‑P4 are two
trapezoids stacked on each other. These two faces are all a camera above and
behind the box can see. The other faces are never drawn.

### Projection (`mapping_module`)

A table point (gx along the table, gy across, h up) is placed in camera space
as a = (gy, −h, gx): x to the right, y down the screen, z into the depth. The
camera position c is placed the same way. The module then computes

```
d   = Rx(θx) · Ry(θy) · Rz(θz) · (a − c)
b_x = (e_z / d_z) · d_x − e_x
b_y = (e_z / d_z) · d_y − e_y
```

- Sines and cosines are signed values in units of 1/32. The three rotation
  stages run one per cycle at full precision, and d is shifted right by 15
  once at the end.
- The quotient e_z / d_z comes from `divider`, a radix‑2 non‑restoring divider
  that produces one quotient bit per cycle. Its dividend is e_z << 8, so the
  quotient carries 8 fraction bits.
- Results are saturated to signed 12 bits, so corners off screen stay
  representable.
- A point at or behind the camera is divided by 1 instead of by d_z.
- Latency from `start` to `done` is `DIV_N + 6` cycles (26 at the defaults).

`sine` and `cosine` are piecewise-linear approximations that avoid tables:

- cos x ≈ 1 − |x|;
- sin x ≈ x for |x| < 0.6, and 0.825·x ± 0.105 (rounded up in 1/32 units)
  up to ±π/2.

The cosine is poor away from zero: it gives −0.57 at π/2. It is adequate only
for the small tilt used here, θx = −4/32 rad.

### Camera

| parameter | default | meaning |
|---|---|---|
| `CAM_BACK` | W/4 | distance of the camera behind the local wall |
| `CAM_H` | H/4 | height above the table |
| `THETA_X/Y/Z` | −4, 0, 0 | tilt in 1/32 rad (downwards) |
| `E_X`, `E_Y`, `E_Z` | −W/2, −H/2, W/2 | viewer offset; −e moves the vanishing point to the screen centre |
| `OBJ_H` | `PUCK_SIZE` | box height |

With `locked_camera` high, the camera stays across the centre of the table.
Otherwise it follows the local paddle's y.

### Filling (`blob3d`, `inside_trapezoid`)

For each pixel, each box tests its two trapezoids. A side from (x1, y1) to
(x2, y2) is the line y·(x2−x1) + x·(y1−y2) = b. Comparing the left-hand side at
the pixel with b tells on which side the pixel lies, without any division
(`pong_pkg::line_side`). Screen y grows downwards, so the comparison senses are
the reverse of the usual mathematical ones. A pixel is inside when it is:

- right of the left side;
- left of the right side;
- below the top side;
- above the bottom side.

Pixels exactly on a side count as inside.

Three `blob3d` instances run in parallel. Priority goes local paddle, then
puck, then opponent paddle, roughly nearest first.

### Timing

A pass projects 18 points one after the other, 18 × (DIV_N + 8) ≈ 504 cycles.
That fits within the first blanked line. The corners are held in registers
until the next pass, so the renderer is stateless between frames. The output is
black until the first pass ends. Both renderers register their pixel, and
`pong_top` delays the syncs to match.

## Parameters of `pong_top`

| parameter | default | notes |
|---|---|---|
| `H_ACTIVE/H_FP/H_SYNC/H_BP` | 1024/24/136/160 | raster |
| `V_ACTIVE/V_FP/V_SYNC/V_BP` | 768/3/6/29 | |
| `PADDLE_W`, `PADDLE_H`, `PUCK_SIZE` | 16, 128, 32 | pixels |
| `PADDLE_STEP` | 4 | pixels per frame |
| `CYCLES_PER_BIT` | 9 | wired bit time |
| `TICK_DIV` | 8100 | 300 µs at 27 MHz |
| `IR_SAMPLE` | 24300 | 900 µs at 27 MHz |
| `CARRIER_HALF` | 337 | 40 kHz at 27 MHz |

Input `speed` (4 bits) sets the puck speed in pixels per frame.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` at the end and stops
itself on a watchdog. With plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/pong_pkg.sv tb/tb_wired_rx.sv --top-module tb_wired_rx -o sim
./obj_dir/sim
```

Replace `tb_wired_rx` with any testbench. The package must come first. `-Wno-fatal`
is needed because Verilator reports a few harmless width extensions in the
testbench arithmetic as warnings.

- Unit testbenches exist for every module. They compare against values
  computed independently in the testbench: reference models of the
  serialisers, a floating-point model of the projection, brute-force
  point-in-polygon tests, and exhaustive tables for sine and cosine. Where a
  latency is defined, they check it in cycles.
- `tb_pong_top` connects two stations on a reduced 256×192 raster with a fast
  IR time base. It plays:
  1. a double-master phase, which exercises the rejections;
  2. a wired rally with wall bounces, returns and handoffs;
  3. an IR rally;
  4. a deliberate miss.
  It counts each of these events and fails any that never happened. It runs in
  under a minute.
- `tb_pong_top_full` uses the defaults throughout. It runs about 50 frames at
  1024×768 until the first return and handoff, in about two minutes.

## Departures and open points

- **Clock.** The link parameters assume a 27 MHz clock, while the default
  raster needs 65 MHz. On hardware, either scale `CYCLES_PER_BIT`, `TICK_DIV`,
  `IR_SAMPLE` and `CARRIER_HALF` to the pixel clock, or run a smaller raster.
  The design has a single clock domain.
- **Preamble.** The wired preamble is 1‑0‑1 in thirds of a bit. This is the
  reading under which an all-ones packet is low for only a third of a bit. A
  1‑0‑0 preamble is the other possible reading.
- **Packet layout, handoff flag, loss packet and collision rule** are this
  design's. So are all object sizes, speeds and colours.
- **The divider** is a plain RTL non-restoring divider. The original design
  used a vendor core with the same algorithm.
- **Camera placement and angles** were chosen so that the view looks sensible.
  The perspective view is a first working version. No hardware has judged its
  look.
- **The cosine approximation** is kept as a linear 1 − |x|, although it is
  crude beyond small angles.
- **IR link speed.** The IR link is too slow for once-per-frame updates (see
  the scheduler section).
- **Not built:** the LED driver transistor, the IR receiver module and the
  ultrasonic transducers. These are analog parts; `ir_led` and `ir_in` are
  where they connect. An earlier triangle-based fill for the perspective view
  is not included: the trapezoid fill replaces it.
