# Anisotropic diffusion in an RRAM crossbar

This design filters a grey-level image with Perona–Malik anisotropic diffusion.
Noise inside flat regions is smoothed away while edges are kept. The arithmetic
is not done in an ALU. Each pixel is stored as the multi-level conductance of
one resistive memory cell (RRAM) in an N × M crossbar. The cell also does the
arithmetic: the pixel sits on a word line (WL) and its neighbour on a bit line
(BL). A programming pulse on both lines moves the cell's conductance by a
nonlinear function of the voltage difference across the cell. Pulses from the
four neighbours in turn sum the diffusion update inside the cell. The
subtraction, the edge-stopping weight and the accumulation all happen in the
cell, and so does the storage.

The CMOS part around the array is synthesizable SystemVerilog:

- a quantizer;
- two image memories;
- a line-buffer window generator and one window store per word line;
- the decoder/multiplexer pairs that turn pixel levels into pulse amplitudes;
- the WL and BL switch matrices and a word-line decoder with an "all lines"
  mode;
- a sequencer.

The crossbar is a behavioural model of the analog array.

## The update each cell performs

Pixels are quantized to 16 levels, `level = floor(p / 16)` for 8-bit input.
Level k is programmed with an amplitude of k × 150 mV, from 0 V to 2.25 V.

For pixel (i, j), with origin level `o` and neighbour levels `nN, nS, nW, nE`
(North is row i−1, West is column j−1), one iteration does this:

```
x  = o * 256                                  (first iteration only: origin write)
for d in N, S, W, E:
    x = clamp(x + f(n_d - o), 0, 15*256)      (one neighbour pulse each)
level after the iteration = min(15, (x + 128) >> 8)
```

`x` is the cell state: a level with 8 fraction bits. Small fluxes therefore
build up over several iterations and are not rounded away. The flux is

```
f(d) = sigma * 256 * d * kappa^2 / (kappa^2 + d^2)        sigma = 1/8, kappa = 4
```

which is the Perona–Malik edge-stopping form. f(±1) = ±30, f(±4) = ±64 and
f(±15) = ±31, in units of 1/256 level. A difference of 15 levels, a strong
edge, moves the cell about as little as a difference of one level. A brighter
neighbour raises the cell, a darker one lowers it, and an equal one leaves it
alone. Neighbours outside the image are replaced by the origin (zero flux), so
the border neither gains nor loses brightness.

Every neighbour value used in an iteration is the level at the start of that
iteration. The result therefore does not depend on the order in which cells
are pulsed. It does depend on the N, S, W, E order within a cell, because each
step saturates.

Programming sets the cell level in the first iteration only. Later iterations
keep the accumulated state and only apply neighbour pulses. The neighbour
amplitudes come from the levels read back after the previous iteration.

`sigma` (`SIGMA_SHIFT`) and `kappa` (`KAPPA`) are parameters of the top and of
the crossbar model. The flux law, the fraction width and the rounding are this
design's own choices. The architecture only asks for a conductance change that
follows the sign of the voltage difference, is zero for equal neighbours, and
falls off for large gradients.

## Pseudo-parallel programming: one cell per row and column per cycle

All cells on a word line share its voltage, and all cells on a bit line share
theirs. If two cells on one line were pulsed together, they would get the
same origin or the same neighbour amplitude. So in each *cycle* the array
pulses one cell on every row, and the chosen cells never share a column:

```
cycle c selects cell (i, i XOR c) on every row i        (N = M, a power of two)
```

For a 4 × 4 array the cells fall into cycles like this:

```
        col0 col1 col2 col3
row0     I    II   III  IV
row1     II   I    IV   III
row2     III  IV   I    II
row3     IV   III  II   I
```

Cycle I is the main diagonal. Every cycle is a permutation. After N cycles
every cell has been selected exactly once, so one iteration of the whole image
takes N cycles, against N × M single-cell updates.

Each row i has its own window store (`lb_fifo`), so row i's cell can get its
window in every cycle. The memory controller reads lane i's store at address
`i XOR c`. It drives word line i with the origin amplitude. It drives bit line
`i XOR c` with the neighbour amplitude of the current pulse slot. This routing
is the *alignment* in `mem_ctrl_align`. The word-line decoder runs in its
"activate all" mode, so every row is pulsed at once. The selector of each
cross-point enables only the cells on the current pattern.

## Pulse slots

One cycle has ten slots of one clock each. At 100 MHz that is 100 ns per
cycle.

| slot | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 |
|---|---|---|---|---|---|---|---|---|---|---|
| WL | Vo | – | Vo | – | Vo | – | Vo | – | Vo | – |
| BL | ground | – | V_N | – | V_S | – | V_W | – | V_E | – |
| operation | program (first iteration only) | read | diff | read | diff | read | diff | read | diff | read |

The read slots are non-destructive reads of the selected cells, sensed on the
bit lines. Slot 0 is left empty after the first iteration.

## Operation and timing

`ad_controller` runs one operation as follows:

1. **LOAD**: `start` begins the operation. The host then streams N·M 8-bit
   pixels in raster order with `pix_valid`/`pix_ready`. They are quantized
   (one clock of latency) and written to memory bank 0.
2. Per iteration:
   1. **Window generation**: `window_gen` scans the current bank one pixel per
      clock. With two line buffers of length M it produces each pixel's
      origin and N/S/W/E window. It writes the window to the store of the
      pixel's row, at the pixel's column. This takes (N+1)(M+1) clocks; the
      extra row and column flush out the last windows.
   2. **Crossbar**: N cycles × 10 slots = 10·N clocks, as above.
   3. **Read-back**: the decoder selects one word line per clock. The M
      levels of that row are sensed on the bit lines and written in one go
      into the *other* bank. This takes N clocks.
   4. The banks swap.
3. After `n_iter` iterations (0 is treated as 1) `done` rises. `out_addr =
   {row, col}` then reads the enhanced 4-bit levels asynchronously from
   `out_level`. A new `start` is accepted.

One iteration takes (N+1)(M+1) + 2 + 11·N clocks. That is 68,867 clocks at
256 × 256, of which 2,560 are crossbar pulses. Loading takes N·M + 1 clocks when the host never pauses.
The window scan dominates. It is not overlapped with the crossbar phase of the
previous iteration, which would be the next speed-up to make.

## Top-level interface (`ad_rram_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-clock pulse in idle or done: load and run |
| `n_iter` | in | `ITER_W` (8) | iterations to run |
| `pix_valid`, `pix_ready`, `pix_data` | in/out/in | 1/1/8 | raster-order pixel stream; a pixel moves when both valid and ready are high |
| `busy`, `done` | out | 1 | status |
| `iter_count` | out | `ITER_W` | iterations completed |
| `out_addr`, `out_level` | in/out | log2(N·M) / 4 | read-out of the result while `done` |

| parameter | default | meaning |
|---|---|---|
| `N`, `M` | 256, 256 | image and crossbar size; must be equal and a power of two |
| `VSTEP_MV` | 150 | amplitude step per level, in mV |
| `KAPPA` | 4 | edge threshold of the flux, in levels |
| `SIGMA_SHIFT` | 3 | sigma = 2^−SIGMA_SHIFT (must stay below 1/4) |
| `ITER_W` | 8 | width of the iteration count |

## Blocks

| file | block |
|---|---|
| `ad_pkg.sv` | level/amplitude/state types, window struct, pulse operations, slot schedule, flux table, read-back rounding |
| `pixel_quantizer.sv` | 8-bit pixel to 16 levels |
| `mod_counter.sv` | MOD-N counter: pixel addresses, slots, cycles, read-back rows |
| `image_memory.sv` | N × M × 4-bit bank (two instances, ping-pong) with a pixel write, a row write and an asynchronous read |
| `window_gen.sv` | raster scan with two line buffers, giving the 5-pixel window per pixel with zero-flux border |
| `lb_fifo.sv` | per-word-line window store, M entries, addressed read |
| `level_decoder.sv` | Dec 4:16, level to one-hot rail select |
| `level_mux.sv` | MUX 16:1, rail select to amplitude |
| `mem_ctrl_align.sv` | per-lane store addressing, slot-dependent code choice, Dec/MUX pairs, bit-line alignment |
| `switch_matrix.sv` | WL or BL transmission-gate row: amplitude or ground |
| `wl_decoder.sv` | one-hot word-line decoder with "activate all" mode |
| `ad_controller.sv` | sequencer |
| `rram_crossbar.sv` | **behavioural model** of the 1-selector-1-RRAM array |
| `ad_rram_top.sv` | top level |

Amplitudes travel as unsigned millivolt numbers, 12 bits wide. The rails are
k × `VSTEP_MV`, computed in the top. `level_mux` accepts any 16 rail values. A
nonlinear amplitude scheme (amplitude rising faster or slower than linearly
with the level) can be tried by changing that computation. Only the linear
scheme is built.

## The crossbar model

`rram_crossbar` is not hardware to synthesize. It stands for the analog array
and keeps one 12-bit state per cell. On a clock edge:

- `OP_PROG` sets each selected cell to the level of its WL amplitude (the BL is
  grounded).
- `OP_DIFF` adds `f(round((V_BL − V_WL) / 150 mV))` to each selected cell.
- `OP_READ` senses levels combinationally: the selected cell of each column in
  pattern mode, or the driven row in row mode.

A cell changes only if its word line and its bit line are both driven and its
selector is on. Half-selected cells are undisturbed; a real array would show
some disturb there. Device physics is not modelled: no filament dynamics,
conductance in siemens, variability, pulse-width dependence or sneak currents.
Accuracy statements about this design hold for this level model, not for a
device.

## How far to trust it, and where it departs from the architecture

Followed as described:

- 16-level quantization with a 0.15 V amplitude step.
- Two N×M memories addressed by a MOD counter.
- Line-buffer window generation at one pixel per clock, with window stores
  read by address.
- Dec 4:16 and MUX 16:1 per line.
- WL and BL switch matrices with line-to-ground switches.
- A WL decoder whose "all lines" mode drives every row together.
- One selected cell per row and column per cycle, with N cycles per iteration.
- O, N, S, W, E pulses with reads in between, 100 ns per cycle.
- The origin is written once and then only differences are accumulated.

This design's own choices:

- The XOR selection pattern. It reproduces the 4 × 4 colouring above; a
  cyclic-diagonal pattern would do as well.
- The flux law and its constants, and the 8-bit state fraction.
- Update direction: toward the neighbour, which is the smoothing direction.
- Floor quantization.
- The zero-flux border.
- The ping-pong use of the two memories and the row-wide read-back.
- A fixed iteration count instead of a stopping criterion.
- Fixed one-clock pulses. The architecture lets pulse widths grow from
  iteration to iteration.
- The host handshake and the reset.
- The window scan is not overlapped with the crossbar phase.

Not built:

- Analog pulse generators and level shifters, peripheral circuits, and the
  image sensor. The design takes a pixel stream and represents each pulse by
  its amplitude and slot.
- Nonlinear amplitude schemes.
- Non-square or non-power-of-two arrays. A 400 × 550 image, for example, would
  need a 512 × 512 instance.

## Simulation

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

- `tb/ad_ref_pkg.sv` is a reference model of the algorithm, independent of
  the RTL.
- `tb_ad_rram_top` runs the top at 8 × 8 pixels. It does 5 iterations on a
  noisy four-region image, then restarts with 1 iteration on a random image.
  It compares every output pixel and checks the per-iteration clock counts.
  It also counts each mechanism: origin programming, all-WL mode, raising and
  lowering pulses, read slots, border replication, read-back, bank swap,
  back-pressure and
  restart.
- `tb_ad_denoise` runs a denoising workload on a 64 × 64 engine. The input is
  flat regions with edges of 6 to 12 levels, plus noise of about 31 grey
  levels standard deviation. After 12 iterations the mean squared error
  against the clean quantized image falls from 2.6 to 0.8 level². The
  12-level edge of the bright square keeps about 9 levels of contrast.
  Perona–Malik diffusion slows flux across an edge but does not stop it.
- `tb_ad_rram_top_full` runs one full-size operation, 256 × 256 with default
  parameters and one iteration. It compares all 65,536 pixels. It takes about
  a minute to build and 15 s to run.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ad_pkg.sv tb/ad_ref_pkg.sv rtl/*.sv tb/tb_ad_rram_top.sv \
  --top-module tb_ad_rram_top -o sim && ./obj_dir/sim
```

For a single block, list `rtl/ad_pkg.sv`, the block and its sub-blocks
(`mem_ctrl_align` needs `level_decoder` and `level_mux`; `ad_controller`
needs `mod_counter`) and its testbench. The simulator is two-state. The
memories, window stores and crossbar cells have no reset, and each is written
before it is read.

At the default size the crossbar model keeps 65,536 states. The window stores
hold 256 × 256 windows of 20 bits each. Synthesis tools take long on these
arrays, mostly because of the crossbar model, which is not meant for
synthesis.
