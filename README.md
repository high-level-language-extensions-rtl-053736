# Run-time parametrisable shape-adaptive template matching core

This shape-adaptive template matching (SA-TM) core searches a video frame
for an object of arbitrary shape. The object is given as a rectangular
template image plus a mask that marks which template pixels belong to the
object. For every placement of the
template over the frame the core computes the sum of absolute differences
(SAD) of luminance over the masked pixels. A placement is a candidate match
when its SAD is below a threshold, or when it is the smallest SAD in the
frame.

The core is *specialised* for one template and mask at a time. In the
original design (T.K. Lee, A. Derbyshire, W. Luk, P.Y.K. Cheung, "High-level
Language Extensions for Run-time Reconfigurable Systems") the template and
mask are written into the FPGA's look-up tables by partial reconfiguration.
Here they are *run-time parameters* held in registers. The host updates
them as a block and commits them, and the commit is the reconfiguration.
The function is the same either way; the register form costs more area.
The streaming and handshake details are this implementation's own.

Default sizes: a 12×12 template over 100×100 images, with 8-bit pixels.
These are the sizes the original design was measured with.

The system top `rtr_system` pairs the core with a second, independent
block: the resource control of a reconfigurable task construct. It tracks
which tasks occupy a set of reconfigurable regions, and decides which task
to displace when another one is needed.

## How the array computes a SAD per pixel

The core of the design is `satm_array`. It is the part that needs the most
care to understand.

Pixels arrive one at a time in raster order. Each pixel is **broadcast** to
all `TMPL_H × TMPL_W` processing elements (PEs). PE (i, j) holds template
pixel `t[i][j]` and mask bit `m[i][j]`. On every pixel it adds
`m[i][j] ? |p − t[i][j]| : 0` to the partial sum it receives from its left
neighbour and registers the result.

- Partial sums start as zero at PE (0, 0) and move right along row 0.
- From the end of a row they pass through a **line-buffer shift register**
  of `IMG_W − TMPL_W` stages into PE (i+1, 0).
- The sum that leaves PE (TMPL_H−1, TMPL_W−1) is the result.

```
 pixel ──┬──────────┬──────────┬─────── (broadcast to every PE)
         v          v          v
 row 2  [PE]──>[PE]──>[PE]──────────────────────────> SAD
         ^
         └────────────────────────────┐
 row 1  [PE]──>[PE]──>[PE]──>[line buffer, IMG_W-TMPL_W]
         ^
         └────────────────────────────┐
 row 0  [PE]──>[PE]──>[PE]──>[line buffer, IMG_W-TMPL_W]
   0 ───^
```

Why it works: a partial sum spends one clock in each PE. So one row plus
its line buffer delays the sum by exactly `IMG_W` pixels, which is one
image line. A sum that meets pixel `p[n]` in PE (i, j) therefore meets, in
PE (i', j'), the pixel `(i'−i)` lines further down and `(j'−j)` columns
further right. When pixel `p[n]` arrives, the result is

```
SAD(n) = Σ_i Σ_j m[i][j] · | p[n − (TMPL_H−1−i)·IMG_W − (TMPL_W−1−j)] − t[i][j] |
```

This is the SAD of the window whose **bottom-right** pixel is `p[n]`. The
array gives one result per input pixel, valid or not.

- A window whose columns wrap around the line edge is meaningless.
  So is a window that reaches back into the previous frame.
- `satm_scan_ctrl` discards these. It keeps a window only when the pixel
  column is ≥ `TMPL_W−1` and the pixel line is ≥ `TMPL_H−1`.
- This leaves `(IMG_W−TMPL_W+1) × (IMG_H−TMPL_H+1)` windows per frame:
  89 × 89 = 7921 at the defaults.

Because invalid windows absorb any stale sums, the partial-sum registers
and line buffers have no reset. Only valid flags and control state are
reset. Registers without a reset can map onto FPGA shift-register
primitives.

**Gaps in the stream.** The PE registers and line buffers advance only when
a pixel is present, so `in_valid` may drop for any number of clocks.

**Broadcast pipelining (`IMG_PIPE`).** With `IMG_PIPE = 0` the input pixel
goes straight to every PE. This is the plain shift-register variant, and
its long broadcast net limits the clock. With `IMG_PIPE ≥ 1` (default 1)
the pixel and its valid flag pass through `IMG_PIPE` register stages first.
The last stage is duplicated once per PE row, so each row drives only
`TMPL_W` loads. This is the pipelined variant, which the original
measurements found faster. The result is the same; only the latency changes.

## Run-time parameters and reconfiguration (`satm_rtp_params`)

The host writes template pixels and mask bits one element at a time
(`cfg_we`, `cfg_row`, `cfg_col`, `cfg_tmpl`, `cfg_mask`) into a **shadow
set**. The array does not see these writes. Pulsing `cfg_commit` copies the
whole shadow set into the active set in one clock. Several parameters thus
change together, with one reconfiguration. This mirrors a parameter-update
block whose changes take effect when the block closes.

The commit has the following rules:
- A commit arriving while a frame is being processed is **deferred**:
  `cfg_pending` rises, and the copy happens in the first clock the core is
  idle. A frame is never matched against a mix of two templates.
- A write in the same clock as the commit is included in it.
- Until the first commit, `configured` is low and the core refuses to
  start. A specialised core cannot exist before its parameters are known.
  The core also does not start while a commit is pending.
- `cfg_applied` pulses once each time a new set becomes active.

Physical reconfiguration time is not modelled: a commit takes one clock.
On the original FPGA platform a partial reconfiguration took about 26 ms.

## Frame control and host synchronisation

`task_sync` implements the blocking handshake of a task declared as
synchronised with the host:

| state | left when | effect |
|-------|-----------|--------|
| IDLE  | `host_go` and ready (configured, no commit pending) | `task_start` pulses, `busy` rises |
| RUN   | last result of the frame (`frame_done`) | `host_done` rises |
| DONE  | `host_ack` | `host_done` falls |

`host_go` is sampled only in IDLE. If it is held high, the next frame starts
right after the acknowledgement. With parameter `SYNC = 0` the core
free-runs: it starts whenever it is ready, and `host_done` is a one-clock
pulse that needs no acknowledgement.

While `busy`, the core takes pixels through `pix_valid`/`pix_ready`. It
takes exactly `IMG_W × IMG_H` pixels, then drops `pix_ready` until the next
frame. `pix_ready` is also low in the start clock, so pixels may be offered
early. `satm_scan_ctrl` counts accepted pixels and array results and marks
each window's position and validity.

## Match reporting (`satm_match_detect`)

Each valid window is sent out on the match stream (`match_valid`,
`match_sad`, `match_x`, `match_y` = top-left corner, `match_hit`).
`match_hit` means `match_sad < threshold`; the comparison is strict.

At the end of the frame, `frame_done` pulses. After that pulse the
following outputs are final until the next frame starts:
- `best_sad`: the smallest SAD of the frame.
- `best_x`, `best_y`: where it first occurred in raster order.
- `hit_count`: the number of hits.

In the original system this post-processing was done by host software. Here
it is in hardware, and the per-window stream still lets a host do its own.

## Resource control for reconfigurable tasks (`rtr_task_manager`)

In the same framework, a set of tasks can be grouped into a
*reconfigurable construct*: the tasks share reconfigurable regions ("slots")
over time. `rtr_task_manager` keeps the books for one construct of
`N_TASKS` tasks and `N_SLOTS` slots.

- **Union** (`N_SLOTS = 1`): the tasks exclude each other. Every change of
  task is a reconfiguration.
- **Struct** (`N_SLOTS > 1`): up to `N_SLOTS` tasks are resident at once.
  Referring to a resident task only switches multiplexers to its slot.
  Referring to another task displaces one, much like paging.
- **Default task**: task 0, the first in the construct, is part of the
  initial configuration. It is resident in slot 0 after reset, so it can
  be used with no reconfiguration delay.

Each task reference (`req_valid`/`req_ready`, `req_task`) is looked up in
the residency table:

- **Hit.** `grant_valid` pulses one clock later, with `grant_slot` and
  `grant_hit = 1`.
- **Miss.** A slot is picked:
  - the lowest free slot if there is one;
  - otherwise, with `POLICY = REPL_FIFO`, the slot loaded longest ago;
  - otherwise, with `POLICY = REPL_LFU`, the slot whose task has been used
    least since it was loaded (lowest index on ties).

  `cfg_req` then asks for that slot to be released and for `cfg_task` to be
  loaded into `cfg_slot`. It stays high until `cfg_done`. One clock after
  `cfg_done` the table is updated and `grant_valid` pulses with
  `grant_hit = 0`.

No reference is accepted while a reconfiguration is in progress.
`slot_task`/`slot_used` expose the table, for example to drive the
multiplexer selects. Tasks are loaded only when first used; there is no
pre-loading.

The defaults, 2 tasks in 1 slot, describe two image operators that take
turns on one region. Assertions check that `cfg_done` comes only while
`cfg_req` is high and that task indices are in range.

## The system top (`rtr_system`)

`rtr_system` places the SA-TM core (`satm_top`, ports unprefixed) next to
one resource-control instance (ports prefixed `rc_`). The two share only
clock and reset and add no glue logic. The reconfigurable slots and the
device configuration port are outside this design. Connect `rc_cfg_req` /
`rc_cfg_done` to whatever loads the configurations.

## Interface of `satm_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `host_go` / `host_done` / `host_ack` / `busy` | in/out/in/out | 1 | start and finish handshake |
| `cfg_we`, `cfg_row`, `cfg_col`, `cfg_tmpl`, `cfg_mask` | in | 1, ⌈log2 TMPL_H⌉, ⌈log2 TMPL_W⌉, PIX_W, 1 | shadow-set write |
| `cfg_commit` | in | 1 | apply the shadow set |
| `cfg_pending`, `cfg_applied`, `configured` | out | 1 | commit status |
| `threshold` | in | SUM_W | hit threshold |
| `pix_valid`, `pix_ready`, `pix_data` | in/out/in | 1, 1, PIX_W | image stream, raster order |
| `match_valid`, `match_sad`, `match_x`, `match_y`, `match_hit` | out | 1, SUM_W, ⌈log2 IMG_W⌉, ⌈log2 IMG_H⌉, 1 | per-window results |
| `frame_done`, `best_sad`, `best_x`, `best_y`, `hit_count` | out | 1, SUM_W, …, ⌈log2(IMG_W·IMG_H+1)⌉ | frame results |

`SUM_W = PIX_W + ⌈log2(TMPL_W·TMPL_H)⌉` is 16 bits by default. It is just
wide enough for the largest possible SAD: 144 · 255 = 36720.

**Timing.** The core takes one pixel per clock. A window's result appears on
the match stream `IMG_PIPE + 2` clocks after the pixel that completes it.
`frame_done` comes in the same clock as the last result. A gap-free
frame therefore takes `IMG_W·IMG_H + IMG_PIPE + 1` clocks from its first
pixel to `frame_done`: 10002 at the defaults.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `IMG_W`, `IMG_H` | 100, 100 | image size of the original measurements |
| `TMPL_W`, `TMPL_H` | 12, 12 | template size of the original measurements |
| `PIX_W` | 8 | chosen (8-bit luminance) |
| `IMG_PIPE` | 1 | chosen: one stage gives the pipelined variant, 0 the plain one |
| `SYNC` | 1 | chosen: synchronised with the host |
| `N_TASKS`, `N_SLOTS` (`rtr_system`, `rtr_task_manager`) | 2, 1 | two tasks sharing one region |
| `POLICY` | `REPL_FIFO` | chosen; `REPL_LFU` is the alternative |

At the defaults the design has about 5000 flip-flop bits outside the line
buffers. The line buffers hold 11 × 88 × 16 = 15488 bits of shift register.

## Where this departs from the original

- **No bitstream specialisation.** The template and mask are held in
  registers instead of being folded into look-up tables. This costs area
  (a subtractor and comparator per PE) that the specialised circuit does
  not have.
- **Not modelled:** the reconfiguration time, and partial reconfiguration
  itself.
- **Compile-time only:** image width and height, array size and placement
  could also have been run-time parameters in the original. Here they are
  fixed at compile time.
- **Fixed array size:** the array covers the whole template and the whole
  frame. The original considered splitting a frame into top and bottom
  halves processed alternately. Only the single-array form is built.
- **Post-processing in hardware:** address generation, result handling and
  best-match search are done in hardware instead of by the host program.
- **Resource control in hardware:** the original keeps residency
  bookkeeping in the host's run-time control. Here it is a hardware block
  with request/grant handshakes, and it loads only on first use.
- **Not included:** the static-configuration designs the original compares
  against, its firewall processors, and its morphology examples.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_satm_pe`: the PE against `sum + (mask ? |p−t| : 0)`, including 0/255
  extremes and hold when disabled.
- `tb_satm_line_buffer`: depth 88, 1 and 0 against a queue model.
- `tb_satm_array`: three arrays are fed one random stream with gaps:
  - default sizes with `IMG_PIPE=1`;
  - 9-pixel lines with a 4×3 template and `IMG_PIPE=0`;
  - the same small array with `IMG_PIPE=2`.

  Every valid window is compared with the SAD formula above, and the
  latency with `IMG_PIPE+1`.
- `tb_satm_rtp_params`, `tb_satm_scan_ctrl`, `tb_satm_match_detect`,
  `tb_task_sync`: the rules described in the sections above.
- `tb_satm_top`: end to end at 16×12 with a 4×3 template, over three
  frames. A random template is planted in random images. The test checks:
  - every window's SAD, position and hit flag;
  - the minimum and its position, and the hit count;
  - the gap-free frame time.

  It also counts these events and fails if any never happens: start
  refused before configuration, reconfiguration, a commit deferred during a
  frame, input gaps, back-pressure, threshold hits and misses, and a slow
  host acknowledgement.
- `tb_rtr_task_manager`: three managers against a reference model:
  - 5 tasks in 3 slots with FIFO replacement;
  - 5 tasks in 3 slots with LFU replacement;
  - the defaults (2 tasks, 1 slot).

  It checks hit and miss, the chosen slot, grant timing and the residency
  table after each of 400 references.
- `tb_rtr_system`: the `tb_satm_top` test on the system top, with 4 tasks in
  2 slots. A second process meanwhile drives task references against a
  FIFO model. Hits, loads and displacements must each occur.
- `tb_rtr_system_full`: the same with every parameter at its default. It
  runs two 100×100 frames with a 12×12 template, plus 200 task references.

For each module there is also a broken copy that its testbench has been
shown to reject. That copy is not distributed.

To simulate with Verilator (5.x), for example the full-size test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/satm_pkg.sv rtl/rtr_pkg.sv tb/tb_rtr_system_full.sv \
    --top-module tb_rtr_system_full -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. The two packages must be
listed first: `rtl/satm_pkg.sv` holds the default sizes and the handshake
state type, and `rtl/rtr_pkg.sv` holds the replacement-policy type. The full-size test runs in well under a second.

## Files

| file | content |
|------|---------|
| `rtl/satm_pkg.sv` | default sizes, handshake state type, width helper |
| `rtl/satm_pe.sv` | processing element |
| `rtl/satm_line_buffer.sv` | scan-line shift register |
| `rtl/satm_array.sv` | PE grid, line buffers, broadcast pipeline |
| `rtl/satm_rtp_params.sv` | shadow/active template and mask, commit |
| `rtl/satm_scan_ctrl.sv` | raster counters and window validity |
| `rtl/satm_match_detect.sv` | threshold hits, minimum search |
| `rtl/task_sync.sv` | host start/finish handshake |
| `rtl/satm_top.sv` | the template matching core |
| `rtl/rtr_pkg.sv` | replacement policy and state types |
| `rtl/rtr_task_manager.sv` | resource control of a reconfigurable construct |
| `rtl/rtr_system.sv` | system top: core and resource control |
| `tb/tb_*.sv` | testbenches as listed above |
