# FPGA image processing validation platform

This RTL implements an FPGA platform for checking image processing hardware
against software. A PC sends an uncompressed RGB image over a serial line.
The FPGA stores it in external DDR2 memory and runs one image processing
algorithm on it. It then sends back either the processed image or the
features it extracted, and the PC compares the result with a software
implementation of the same algorithm.

The algorithms are a small library of per-pixel operations: colour channel,
negative, brightness/contrast, two grayscales and binarization. There are
also two operations that gather data over a whole image. The horizontal
projection counts white pixels per line. The GLCM computes a gray-level
co-occurrence matrix together with its contrast and energy. The per-pixel
operations were first developed as small dataflow / Petri-net models that a
tool turned into VHDL. Here they are written directly in SystemVerilog as
small registered modules with the same reset/enable behaviour.

```
 host (serial 8N1) ──► uart_rx ─► uart_rx_aux128 ─┐
                                                   ▼
                      pixel_algorithm_unit ◄──► control_imig ◄──► imig ◄──► MIG user i/f ─► DDR2
                                                   │   (hproj, GLCM inside)        (ports of the top)
 host ◄── uart_tx ◄── uart_tx_aux128 ◄─────────────┘
```

`validation_platform_top` is the top level. It does not contain the DDR2
controller itself. That controller is vendor-generated IP (the MIG), so its
user-side interface is brought out as the `mig_*` ports.

## Data layout

* **Pixels.** The host removes the BMP header and inserts one padding byte
  after every three colour bytes. Each pixel therefore occupies 32 bits:
  blue `[7:0]`, green `[15:8]`, red `[23:16]` and padding `[31:24]`.
  `imgproc_pkg::pixel_t` is this layout.
* **Words.** One DDR2 burst moves 128 bits, which is four pixels
  (`word4_t`). Pixel *k* of a word is bits `[32k+31:32k]`. Byte *n* of the
  serial stream goes to bits `[8n+7:8n]` of the word, and the same order is
  used when sending.
* **Addresses.** Addresses count 32-bit words in a 25-bit space, which
  matches a 32M x 32 DDR2. The image area starts at 0, with pixel *n* at
  address *n*, so image word *w* is at `4w`. The data area starts at
  `DATA_BASE = 2**24`. GLCM entry (x,y) is the 32-bit word at
  `DATA_BASE + 256·x + y`. Horizontal-projection line *l* is written at
  `DATA_BASE + 4·l`.

## One run of the controller (`control_imig`)

A `start` pulse begins a run for the algorithm on the `alg` input. Every
exchange with another block uses a four-phase request/acknowledge
handshake: raise `req`, wait for `ack`, drop `req`, then wait for `ack` to
fall. The run has six steps:

1. **Initialise the DDR2.** The controller asks `imig` to initialise the
   memory, unless the `init_btn` button has already done so.
2. **GLCM only: clear the matrix.** All 16384 words of the 256x256 matrix
   are written with zeros. The image area is not cleared, because the new
   image overwrites it.
3. **Receive the image.** Each 128-bit word assembled from the serial line
   is written to the image area. The controller buffers only one word, so
   the host must send only while `recv_ready` is high. At 8N1 a word takes
   160 bit times to arrive, much longer than one DDR2 write.
4. **Process.** Each image word is read back.
   * *Per-pixel algorithms:* the word goes through `pixel_algorithm_unit`,
     and the result is written back in place.
   * *Horizontal projection:* the word goes to `horizontal_projection`.
     When that block reports a line total, the total is written to the data
     area.
   * *GLCM:* the four pixels are converted to gray. Each pair of
     horizontal neighbours (x,y) then updates the matrix by
     read-modify-write of the affected entry: `M[x][y] += 1` and
     `M[y][x] += 1`, or `M[x][x] += 2` when x = y. This builds M + Mᵀ
     directly. A word that starts a line gives three pairs
     (p0p1, p1p2, p2p3). Any other word gives four: the last pixel of the
     previous word paired with p0, then the three inner pairs.
5. **GLCM only: features.** The matrix is read back, one entry per clock,
   into `glcm_features`:
   `contrast = Σ (i−j)²·M(i,j)` and `energy = Σ M(i,j)²`.
   Both sums are left undivided; dividing by the number of pairs (or its
   square) is left to the host.
6. **Send.** The controller sends one of three results:
   * per-pixel algorithms: the processed image (`IMG_W·IMG_H/4` words);
   * horizontal projection: `IMG_H` line words, with the count in bits
     `[15:0]`;
   * GLCM: the 16384 matrix words, then one feature word
     `{energy[63:0], 16'b0, contrast[47:0]}`.

   `done` then stays high until the next `start`. The features are also
   available on the `glcm_contrast` and `glcm_energy` ports.

The GLCM path costs about four DDR2 operations per pixel pair. The whole
platform is therefore limited by memory latency rather than by the
arithmetic, which is at most a few multipliers per clock.

## DDR2 access (`imig`)

This is the most timing-sensitive part. The MIG executes any command it
receives, so `imig` must keep the command sequence legal. It runs five
state machines in parallel:

| process | states | job |
|---|---|---|
| Init Ram | InitIdle → SetInitCmd → ClearInitCmd → InitDone | puts the init command `010` on `mig_cmd` for one clock, then waits for `mig_init_done` |
| Write Ram | Idle → IssueWriteCmd → WriteClk1 → WriteClk2 → WriteDone1 → WriteDone2 → WriteEnd | holds `100` and the address until `mig_cmd_ack`, waits two clocks, drives `mig_burst_done` for two clocks, waits for `mig_cmd_ack` to fall, then acknowledges the requester |
| Fill Write buffer | Idle → Lo → Hi → End | on the clock after the write acknowledge, drives data bits `[63:0]`, then `[127:64]` on the next clock |
| Read Ram | Idle → IssueReadCmd → ReadClk1 → ReadClk2 → ReadDone1 → ReadDone2 → ReadEnd | the same sequence with `110`; acknowledges only when the read buffer is full |
| Fill Read buffer | Idle → Lo → Hi → Full | stores the first valid 64-bit beat in `[63:0]` and the second in `[127:64]` |

A new write or read starts only when all of the following hold:

* the memory is initialised;
* no command is in progress (`mig_cmd_ack` low and all machines idle);
* `mig_auto_ref_req` is low.

The last condition means a pending refresh delays the request.

Two conditions must hold for the MIG core you connect:

* The codes `100` (write) and `110` (read) follow the usual MIG user
  interface convention.
* Write data is expected on the first and second clocks after the command
  acknowledge.

Check both against your core before connecting it. All logic runs on the
rising edge of a single clock. The clk90 and clk180 phases used by the DDR2
interface itself stay inside the MIG.

## The algorithm library

In the library modules, `result` is a register. Synchronous `rst` sets it
to 0, and it is updated on the clock edges where `en` is high. Results
therefore appear one clock after the pixel.

| module | operation |
|---|---|
| `channel_select` (`CHANNEL` = red / green) | result = the chosen component |
| `negative` | each component c → \|ref − c\| (the larger operand is the minuend) |
| `bright_contrast` | c → c·contrast + bright, clamped to [`LOW_REF`, `HIGH_REF`] (0 and 255 by default) |
| `simple_gray` | ((R+G+B)·683 + 1024) / 2048, i.e. the mean with rounding |
| `weighted_gray` (combinational) | (306R + 601G + 117B + 512) / 1024 ≈ 0.299R + 0.587G + 0.114B, rounded |
| `binarization` (combinational) | 255 if colour > reference, else 0 |
| `four_weighted_gray` | four `weighted_gray` side by side; also the GLCM's gray converter |
| `four_weighted_gray_reg` | the same with output registers loaded by `load` |
| `horizontal_projection` | see below |

`pixel_algorithm_unit` holds four lanes of every library module, and the
`alg` input selects the result. Algorithms that produce one value per pixel
write it to all three colour bytes, so the returned image is a gray BMP.
The padding byte is always kept. In the original platform each algorithm
was a separate build. Putting them all behind one selector is a choice made
here for testing; it does not change the per-pixel results.

**Horizontal projection.** The block takes four pixels per `load` strobe.
Each pixel goes through weighted gray and binarization against
`threshold`, and a result of 255 counts as a white pixel. The four flags
are added to a line accumulator. A counter of strobes marks the end of a
line after `IMG_WIDTH/4` strobes. On that strobe the block:

* latches the total as `count_hi = total/256` and `count_lo = total mod 256`;
* pulses `available` for one clock;
* restarts the accumulator from zero.

The 11-bit accumulator holds line widths up to 2047 pixels.

## Serial links

* **`uart_rx`**
  * Format: 8 data bits, no parity, 1 stop bit, LSB first.
  * `CLKS_PER_BIT` = clock / baud, which is 136 for 125 MHz at 921600 baud
    (about 0.3 % error).
  * The line goes through a two-flip-flop synchroniser.
  * A low level is treated as a start bit and checked again after half a
    bit. If the line is high again, it was a glitch.
  * Each of the eight data bits is sampled one bit period apart, at the
    middle of the bit.
  * After the stop bit, `rx_done` pulses for one clock.
* **`uart_rx_aux128`** collects 16 bytes and then pulses `word_valid` with
  the full word.
* **`uart_tx`**
  * States: Idle → start bit → 8 data bits → stop bit → Cleanup.
  * It takes 10·`CLKS_PER_BIT` + 2 clocks from `start` to the `tx_done`
    pulse.
* **`uart_tx_aux128`**
  * It accepts a 128-bit word with the four-phase handshake and copies it.
  * It sends the word as 16 bytes, `[7:0]` first.
  * It lowers `ack` only after the last byte has gone out and `req` has
    dropped. The controller's handshake therefore covers the whole
    transfer.

## Parameters

| parameter | default | where |
|---|---|---|
| `IMG_W`, `IMG_H` | 640, 480 | top, `control_imig` (`IMG_W` a multiple of 4) |
| `CLKS_PER_BIT` | 136 | top, `uart_rx`, `uart_tx` |
| `IMG_WIDTH` | 640 | `horizontal_projection` (set from `IMG_W` in the platform) |
| `LOW_REF`, `HIGH_REF` | 0, 255 | `bright_contrast` |
| `CHANNEL` | `CH_RED` | `channel_select` |
| grayscale coefficients | 306, 601, 117, 512 | `weighted_gray` |

## Where this RTL departs from the original platform or fills gaps

These points are choices made here and are not taken from the original
design:

* the controller's structure: the original controller ran three parallel
  processes (main, write, read), while here one state machine does all
  the work, with a shared memory-operation state that performs one
  handshake with `imig` and then returns to the calling state;
* the memory-clearing step: the original initialised the DDR2 positions to
  zero, while here only the GLCM matrix area is cleared, and only for a
  GLCM run. Every other algorithm overwrites all the words it later reads;
* the one-word receive buffer and the `recv_ready` output;
* the result word formats and the order in which results are sent;
* the `alg` selector;
* the reset values;
* the `bright_contrast` clamping limits, which are parameters;
* the use of the weighted gray value as the input of the stand-alone
  binarization;
* the undivided GLCM features.

Some behaviour comes from the MIG rather than from the original design:

* the write/read command codes;
* the 64-bit user data bus;
* the refresh interlock.

The original platform drove some DDR2 interface signals on the falling
clock edge. Here everything is on the rising edge, and the MIG handles the
phase relations.

## Simulating

Each module has a self-checking testbench `tb/<module>_tb.sv`. Each one
ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/imgproc_pkg.sv tb/validation_platform_top_tb.sv --top-module validation_platform_top_tb
./obj_dir/Vvalidation_platform_top_tb
```

`tb/mig_ddr2_model.sv` is a behavioural stand-in for the MIG and the DDR2
behind it:

* It keeps memory in a sparse array.
* It uses fixed latencies for acknowledge, read data and tail.
* It issues refresh requests at a set period.
* It flags protocol errors.

It is not synthesizable and does not model the DDR2 device timing.

The end-to-end testbench runs the top with an 8x2 image at
`CLKS_PER_BIT = 8`. It runs every algorithm once, including a GLCM run
that returns the full 16385-word result over the serial line. This takes
about 25 s. It also checks that these mechanisms each occurred:

* refresh stalls;
* equal and unequal GLCM pairs;
* line-start and mid-line words;
* projection results;
* clamping;
* both handshakes.

`control_imig_workload_tb` runs the controller at its default 640x480
size, together with `imig`, the memory model and the algorithm unit. The
serial helpers are replaced by direct word transfers. The testbench runs
two jobs and checks every result word:

* a weighted-grayscale run over a full image;
* a GLCM run, which also checks the full matrix and the features.

It takes about 30 s. The memory model's refresh period is set to
975 clocks (7.8 µs at 125 MHz). It reports two timings:

* **Per-pixel algorithms:** 42 clocks per 128-bit word.
* **GLCM:** 25.3 million clocks from the stored image to the first result
  word, which is 0.20 s at 125 MHz. The original measured 0.27 s.

`control_imig_library_tb` builds the controller with `IMG_H = 48` and runs
all ten library algorithms on a 640x48 image. It checks every result and
takes about 6 s. Timings:

* **Per-pixel algorithms:** about 322,600 clocks each from the stored
  image to the first result. The original platform measured about
  364,200.
* **Horizontal projection:** 208,280 clocks, because it writes back only
  the 48 line totals.

No testbench runs the top at its default size. A 640x480 image at 136
clocks per bit needs about 1.7·10⁹ clocks just to receive, which is far
beyond what an RTL simulator covers in minutes. The largest image run
through the whole top, serial links included, is therefore 8x2. Everything
behind the serial helpers runs at the full 640x480 size in
`control_imig_workload_tb`. The horizontal projection block is also tested
alone at its default 640-pixel line width.

## What to trust

* **Arithmetic.** The per-pixel arithmetic is checked exhaustively or with
  random vectors against independent formulas, and it reproduces the
  reference values of the original simulations. Examples: weighted gray
  (R,G,B) = (20,100,15) → 66; simple gray of the same pixel → 45; negative with reference 255 gives
  (245,205,155) for (B,G,R) = (10,50,100); contrast 2 with bright 64 gives
  (84,164,255).
* **DDR2 path.** It is verified only against the behavioural MIG model.
  Before using it on hardware, check the command codes and the
  data-versus-acknowledge timing of the real core.
* **Throughput.** The figures above come from the behavioural memory
  model, so they show only the order of magnitude. On the real board, the
  time is dominated by the serial transfer, about 13 s per 640x480 image
  each way at 921600 baud.
