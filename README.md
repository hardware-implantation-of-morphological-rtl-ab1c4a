# 3 x 3 grey-scale morphology over a serial link

This design applies a 3 x 3 grey-scale **dilation** (the largest pixel in the
neighbourhood) or **erosion** (the smallest pixel) to an 8-bit image. A host
sends the image one pixel per UART byte and gets the filtered image back on
the same kind of link. The image is never stored whole. Three line buffers,
each one image row long, hold just enough of the picture to build the 3 x 3
neighbourhood of the pixel that has just arrived. A small tree of comparators
reduces that neighbourhood to one output pixel. At the default size of
128 x 128 pixels, the whole filter needs 2 x 3 x 128 bytes of line storage,
plus a few counters and registers.

```
             +-------------------------- morph_top ---------------------------+
 uart_rxd -->| uart_rx --> morph_filter ----------------> sync_fifo --> uart_tx|--> uart_txd
             |               |  +-- dilation --------+                        |
   op_sel -->|               |  |  row_cel -> 3x max3 -> max4 -> reg          |
             |               |  +-- erosion ---------+                        |
             |               |     row_cel -> 3x min3 -> min4 -> reg          |
             |               +-- output select (operation latched per frame)  |
             +----------------------------------------------------------------+
```

## Line buffers and the sliding window (`row_cel`)

This is the part that needs the most explanation.

`row_cel` owns three row banks, `bank[0..2]`, each `IMG_W` pixels deep. Pixels
arrive in raster order. The block counts the column `col` and the line `row`,
and `sel` says which bank is being written:

* pixel (row, col) is written to `bank[sel][col]`;
* at the end of each line `sel` advances 0 -> 1 -> 2 -> 0, so the banks are
  used in turn and the oldest line is always the one overwritten;
* at the end of the frame the counters and `sel` return to 0.

While line `r` goes into `bank[sel]`, the other two banks still hold lines
`r-1` (bank `sel-1`) and `r-2` (bank `sel-2`, modulo 3). Both are read
asynchronously at the same column as the write. This gives the vertical
triple (line r-2, line r-1, line r) at column `c` in the same clock that pixel
(r, c) arrives. The triple is shifted into a 3 x 3 register window, so after
pixel (r, c) the window holds lines r-2..r and columns c-2..c:

```
            col c-2   col c-1   col c
 line r-2  win[0][0] win[0][1] win[0][2]   <- bank sel-2
 line r-1  win[1][0] win[1][1] win[1][2]   <- bank sel-1
 line r    win[2][0] win[2][1] win[2][2]   <- incoming pixel
```

`win_valid` is raised one clock after any pixel with `r >= 2` and `c >= 2`.
Only windows that lie wholly inside the image are used. There is no border
padding, so an `IMG_W x IMG_H` frame gives `(IMG_W-2) x (IMG_H-2)` results,
126 x 126 at the default size. The result for a window belongs to its centre
pixel, (r-1, c-1). Windows at the start of a line still hold pixels from the
end of the previous line, but they are never flagged valid. The banks are not
reset: a window is only flagged once all three of its lines have been
written in the current frame.

The banks are plain arrays with one write port and two read ports. They map
naturally onto distributed (LUT) RAM. For block RAM with a registered read,
the read address has to be issued one clock earlier.

## Comparator trees

Each of the three window rows goes to a `max3` (for dilation) or a `min3`
(for erosion). It picks the extreme of columns 1, 2 and 3 with two unsigned
compares. `max4` / `min4` then picks the extreme of the three row results.
That value is the value of the 3 x 3 window. It is registered, so a result
appears **two clocks** after the pixel that completes its window: one clock
in `row_cel` and one in the output register. `max4` and `min4` take three
inputs; the names are kept from the original description of the datapath.

## Operation select and frames (`morph_filter`)

`morph_filter` feeds the same pixel stream to a complete dilation unit and a
complete erosion unit, each with its own `row_cel`, and forwards one of the
two outputs. A pixel counter modulo `IMG_W*IMG_H` marks the frames. `op` is
sampled with the first pixel of a frame and holds for the whole frame, so
changing `op_sel` in the middle of an image has no effect until the next
image. The operation in force is carried down a two-stage pipeline beside
the pixels. Because of this, frames with different operations can follow
each other without a gap: the last results of one frame and the first
pixels of the next can be in flight together.

The filter cannot apply back-pressure. It accepts a pixel in any clock that
offers one, up to one per clock, and never stalls.

## Serial link and output queue

`uart_rx` and `uart_tx` use 8N1 framing: one start bit, 8 data bits LSB
first, one stop bit, no parity. A bit lasts `CLKS_PER_BIT` clocks. The
default of 434 gives 115200 baud from a 50 MHz clock.

The receiver has a two-flop synchroniser. It checks the start bit again half
a bit after the falling edge, so a shorter glitch is ignored. It samples each
bit in the middle of its bit time. A byte whose stop bit is low is dropped
and `rx_frame_err` pulses.

The transmitter has a valid/ready input and holds the line high when idle.
It takes a byte, sends it in 10 bit times, and is ready again one clock
later. An assertion checks that an offered byte stays stable until it is
taken.

`sync_fifo` (16 words, first-word fall-through) sits between the filter and
the transmitter. The filter produces at most one result per received byte,
but the transmitter needs one clock more per byte than the receiver.
Results therefore queue behind the transmitter. The backlog grows by about
one byte every `10*CLKS_PER_BIT` bytes, so 16 words cover many full frames.
If the queue is ever full, the result is dropped and the sticky
`out_overflow` flag is set.

## Top-level interface (`morph_top`)

| port           | dir | meaning |
|----------------|-----|---------|
| `clk`, `rst_n` | in  | clock; synchronous active-low reset |
| `uart_rxd`     | in  | pixels from the host, raster order, 1 byte per pixel |
| `uart_txd`     | out | results to the host, raster order of window centres |
| `op_sel`       | in  | 0 = dilation, 1 = erosion; sampled with a frame's first pixel |
| `op_active`    | out | operation of the frame in progress |
| `frame_done`   | out | pulse with the last result of a frame (before it is sent) |
| `rx_frame_err` | out | pulse: a received byte had a bad stop bit and was dropped |
| `out_overflow` | out | sticky: a result found the output queue full |

| parameter      | default | meaning |
|----------------|---------|---------|
| `PIX_W`        | 8       | bits per pixel |
| `IMG_W`        | 128     | image width (depth of each row bank) |
| `IMG_H`        | 128     | image height (frame length) |
| `CLKS_PER_BIT` | 434     | UART bit time in clocks |
| `FIFO_DEPTH`   | 16      | output queue depth |

Shared constants and the `morph_op_t` encoding are in `rtl/morph_pkg.sv`.
The UART links carry bytes, so the top is meant for `PIX_W = 8`. The filter
modules themselves accept any pixel width.

## How far this follows the original design, and where it departs

Taken from the original description:

* 8-bit grey-scale pixels and a 128 x 128 image;
* three row banks, each as long as an image line, filled in turn
  (row 1, 2, 3, then row 1 again) for the whole image;
* the per-row maximum or minimum of columns 1 to 3, combined by a final
  `max4` / `min4` stage;
* the data path from a UART receiver through the filter to a UART
  transmitter.

Choices made here where the description is silent:

* the window shift registers and the reading of the two older banks at the
  write column;
* no border padding, which gives (W-2) x (H-2) outputs;
* the two-clock latency;
* per-frame operation latching;
* the UART frame format and baud rate;
* the output queue and its depth;
* reset behaviour.

The original system is built around an embedded 32-bit soft processor. Its
local bus carries the UART and DDR memory, and a pair of FIFO point-to-point
links connects it to the filter as a co-processor. A data path that runs
directly from the UART receiver into the filter is also described, and this
is the one built here. The processor, its buses and software, the off-chip
memory and the clock managers are vendor parts and are not part of this
RTL. To use the filter as a bus co-processor, connect `morph_filter`'s
`in_valid/in_pix` and `out_valid/out_pix` to the link FIFOs instead of the
UARTs. The filter never stalls, so the output link must be able to take a
result in any clock.

The original work also shows an edge-detection result and mentions linear
filtering by 2-D convolution. It gives no operator, kernel or threshold for
either, so neither is implemented. Neither are the VGA and Ethernet cores it
mentions as platform options.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Reference results
come from `tb/morph_ref_pkg.sv`. It computes the window maximum or minimum
directly from the image array and knows nothing of line buffers.

| testbench            | what it covers |
|----------------------|----------------|
| `tb_max3`, `tb_min3`, `tb_max4`, `tb_min4` | all corner-value patterns and random triples |
| `tb_row_cel`         | window contents, `win_valid` / `win_last` timing, bank order 0-1-2-0, two frames with idle gaps |
| `tb_dilation`, `tb_erosion` | three 9 x 7 frames (random with gaps, back-to-back, spot image); exact two-clock latency |
| `tb_morph_filter`    | dilate/erode/erode/dilate frames back to back; `op` toggled inside frames has no effect |
| `tb_uart_rx`         | bytes, a bad stop bit, a glitch on an idle line |
| `tb_uart_tx`         | bit values, start and stop bits, exactly 10 bit times per byte |
| `tb_sync_fifo`       | queue model, overflow, push and pop together while full |
| `tb_morph_top`       | 8 x 6 image, 8 clocks/bit: a framing error, then five frames with operation switches; counts every mechanism (dilation and erosion frames, switches, bank wrap-around, frame ends, framing error, results queued behind the transmitter) and fails if one never happens |
| `tb_morph_top_full`  | all defaults: one 128 x 128 image dilated, then eroded, over the 115200-baud link; all 2 x 126 x 126 results compared (about 1.5 minutes of simulation) |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    -Irtl -Itb rtl/morph_pkg.sv tb/morph_ref_pkg.sv tb/tb_morph_top.sv \
    --top-module tb_morph_top -Mdir obj_tb_morph_top
./obj_tb_morph_top/Vtb_morph_top
```

Replace `tb_morph_top` with any testbench name. The testbenches initialise
whatever they read, so they also run under two-state simulation with random
initial values.

## Changing the design

* **Image size:** set `IMG_W` and `IMG_H` on `morph_top`. The row banks and
  counters follow, and the frame length is fixed by these parameters. The
  host must send exactly `IMG_W*IMG_H` bytes per frame.
* **Baud rate:** set `CLKS_PER_BIT` to the clock frequency divided by the
  baud rate.
* **Larger windows:** these would need more banks in `row_cel` and wider
  comparator trees. The 3 x 3 size is built into the port shapes.
