# Sobel edge detector with a register/block-RAM smart buffer

A Sobel edge detector needs a 3x3 neighbourhood around each output pixel. If
the neighbourhood is fetched from external memory for every output pixel,
each input pixel is read about eight or nine times. External memory is then
the bottleneck: most cycles go to memory traffic, and the memory bandwidth
needed grows by the same factor.

This design reads every input pixel from external memory exactly once. Pixels
arrive in raster order and are shifted into a "smart buffer". The buffer has
nine window registers that hold the current 3x3 window. Two block-RAM line
buffers hold the rest of the two previous image rows. Each new pixel moves the
window one step to the right. Once the pipeline is full, a 320 x 320 frame
costs 102,400 reads and takes 102,400 cycles plus a few cycles of latency.

The split between registers and block RAM is the main point of the design:

- Registers are fast and can all be read in parallel, but a whole row buffer
  built from them is large and slow to route.
- Block RAM is dense, but it gives one word per port per cycle.

So the nine pixels that the operator reads in parallel are kept in registers,
and the long row delays, which need only one access per pixel, go in block
RAM.

## Data path

```
 external memory                                             external memory
   read port                                                   write port
      |                                                             ^
 pixel_reader --rd_en/rd_addr-->                                    |
      <--------------- mem_rd_valid / mem_rd_data                   |
                              |                                     |
                     +--------v---------+   win (3x3)   +-----------+---+
                     |   smart_buffer   |-------------->| sobel_kernel  |
                     | 9 regs + 2 x RAM |               | 2 stages      |
                     +------------------+   win_valid   +---------------+
                     |    sobel_ctrl    |-------------->  tag = address
                     | row/col, done    |<-------------- out_valid
                     +------------------+
```

| module | role |
|---|---|
| `sobel_top` | Wires the blocks together. Brings out the external-memory read and write ports and start/busy/done. |
| `pixel_reader` | Requests pixels 0 .. W*H-1 in raster order, one request per pixel. A request is taken when the memory's `rd_ready` is high. |
| `smart_buffer` | Nine window registers and two `line_buffer`s. It shifts only when a pixel arrives. |
| `line_buffer` | Circular block-RAM delay line of depth W-4. It reads before it writes, and its output is registered. |
| `sobel_ctrl` | Tracks the row and column of each arriving pixel and marks complete windows. It gives the output address, counts results and pulses `done`. |
| `sobel_kernel` | Computes Gx and Gy, then min(\|Gx\|+\|Gy\|, 255), in two pipeline stages. |
| `sobel_pkg` | Holds the pixel type, the 3x3 window type and the default sizes. |

## How the smart buffer lines up three rows

This is the part that needs care. The window rows are chained like this:

    new pixel -> [w22][w21][w20] -> line_buffer -> [w12][w11][w10] -> line_buffer -> [w02][w01][w00]

Here `w<row><col>` is a window register. Row 0 is the top (oldest) row, and
column 0 is the left (oldest) column. Everything moves one step per accepted
pixel.

Two adjacent rows are W pixels apart in the stream. So the path from the
entry of one window row to the entry of the row above must delay a pixel by
exactly W accepted pixels. That path has four register stages and the RAM:

- 3 window registers
- the RAM's output register
- DEPTH positions of RAM

Hence DEPTH = W - 4 = 316 for a 320-pixel row. Two line buffers of 316 x 8 bits
hold **5,056 bits** of block RAM, and synthesis of `sobel_top` reports exactly
that. The line buffer reads the old word and writes the new one at the same
pointer in the same cycle (read-before-write). This is the usual behaviour of
a single-port block RAM with a registered output.

After the design accepts pixel n (raster index), the window holds:

    win[r][c] = p(n - (2-r)*W - (2-c))

The window is centred on pixel n-W-1. It is a real 3x3 neighbourhood only when
the newest pixel is in row 2 or later and in column 2 or later. All other
windows straddle a row end or still hold stale RAM contents, and `sobel_ctrl`
drops them. Each line buffer's pointer is cleared by reset only. A frame of
W*H pixels moves the pointer H*W/(W-4) times around the buffer, not a whole
number of times, so a second frame starts at a different position. This does
no harm, because the first two rows of every frame are never used as complete
windows.

## Sobel arithmetic

    Gx = (w02 + 2*w12 + w22) - (w00 + 2*w10 + w20)
    Gy = (w20 + 2*w21 + w22) - (w00 + 2*w01 + w02)
    out = min(|Gx| + |Gy|, 255)

Stage 1 registers Gx and Gy as 11-bit signed values (|G| <= 1020). Stage 2
registers the saturated sum. The output address (`tag`) travels through both
stages next to the data. The centre pixel is not used.

## Frames, borders and timing

- `start` (one cycle) begins a frame. `busy` stays high until `done` pulses
  with the last result.
- Only the (W-2) x (H-2) interior pixels are computed: 101,124 for 320 x 320.
  Each result is written to the same raster address in the output image. The
  one-pixel border of the output image is not written; clear it beforehand if
  it matters.
- The read interface takes any memory latency, provided data comes back in
  request order. When `mem_rd_ready` is low, the reader stalls. When
  `mem_rd_valid` is low, the buffer, the counters and the window validity all
  freeze.
- Writes (`out_wr_en/addr/data`) last one cycle and cannot be stalled.
- With a memory that is always ready and has a read latency of L cycles,
  `done` arrives W*H + L + 3 cycles after `start`. That is 102,405 cycles for
  320 x 320 at L = 2.

## Parameters

| parameter | default | where |
|---|---|---|
| `IMG_W`, `IMG_H` | 320, 320 | `sobel_top`, `pixel_reader`, `sobel_ctrl`, `smart_buffer` |
| `ADDR_W` | clog2(W*H) = 17 | `sobel_top`, `pixel_reader`, `sobel_ctrl` |
| line-buffer `DEPTH` | IMG_W - 4 = 316 | set by `smart_buffer` |
| pixel width | 8 (`sobel_pkg::PIX_W`) | package |

Any width of 5 or more and any height of 3 or more work.

## Where this design makes its own choices

The source this RTL follows fixes these points:

- the memory organisation: 9 shift registers plus two block memories
- one external read per pixel
- the 320 x 320 8-bit image
- the 5,056-bit RAM total, from which the line-buffer depth is derived

The source does not fix the following, so this design chooses them:

- **Sobel formula.** The standard masks with |Gx|+|Gy| clamped to 255. Check
  this against your own reference model if you need bit-exact agreement with
  other software.
- **Border policy.** Interior pixels only; the border is left untouched.
- **Handshakes.** A request/ready read port, in-order read data with a valid,
  and a write port that cannot be stalled.
- **Pipeline depth and cycle count.** The kernel has two stages. The
  reference implementation needed 103,683 cycles for a 320 x 320 frame, that
  is 1,283 cycles beyond one per pixel, and the source does not say where
  they went. This design needs 102,405 cycles at read latency 2.
- **Reset.** Synchronous and active high. It clears all control state and
  the window registers, but not the RAM contents.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_line_buffer` | The delay is exactly DEPTH enables under a random enable, and the output holds between enables. Reset restarts the delay. |
| `tb_smart_buffer` | All nine window positions against a history of accepted pixels, with random input gaps, at W = 12 and W = 320. |
| `tb_sobel_kernel` | Random and directed windows (flat, vertical step, horizontal step, saturating) against an integer model. Checks the exact two-cycle latency and the tag. |
| `tb_pixel_reader` | Address sequence, random stalls, a `start` while busy, and a full frame in exactly 102,400 request cycles. |
| `tb_sobel_ctrl` | Window validity and centre address for every pixel of a 7 x 5 frame with gaps, and done/busy over two frames. |
| `tb_sobel_top` | Two full 320 x 320 frames at the default parameters, using `tb/ext_mem_model.sv`. |

In `tb_sobel_top`:

- Frame 1 uses an image of blocks, ramps and a flat region, with a memory
  that is always ready.
- Frame 2 uses a random image, with the memory stalling on about one cycle in
  three.
- Every output pixel is compared with a Sobel result computed in the
  testbench. The test also checks the border, the number of reads (102,400)
  and writes (101,124), and the exact cycle count of frame 1.
- It counts memory stalls, input gaps, skipped windows, saturated and zero
  results, line-buffer wrap-arounds and back-to-back frames. A failure is
  counted for any of these that never occurs.

Assertions in the RTL check two rules: the read address holds while a request
is stalled, and the reader is never active outside a frame.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sobel_pkg.sv tb/tb_sobel_top.sv --top-module tb_sobel_top
./obj_dir/Vtb_sobel_top
```

Replace `tb_sobel_top` with any other testbench name. The full-size
end-to-end test simulates about 256,000 cycles and finishes in seconds.
