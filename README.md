# Approximate Sobel edge detector

This design finds edges in 8-bit grey-scale images. It does this with a Sobel
operator whose subtractions, multiplications and additions use approximate
arithmetic units. These units trade a small, bounded error in the low bits of
the gradient for shorter carry chains and less logic. The gradient magnitude
is approximated without squares or a square root, as `|Gx| + |Gy|`. A
threshold comparator turns it into a binary edge map.

The image lives in an external asynchronous SRAM (2^19 x 8 bits). A host
writes the image into the SRAM through an on-chip SRAM controller. It then
reads the image back in raster order. Every byte returned by the controller is
also fed to the edge-detection pipeline, so one read pass over the image
produces the edge map, one result per interior pixel.

The RTL is SystemVerilog 2017, synthesizable, and checked with Verilator lint
and the slang front end of Yosys.

## Data flow

```
 host: addr_n, re, we, rd, wr, din                          threshold
        |                                                       |
 +------v---------+ dataout, en  +-------------+ win (3x3) +-----v-----------+ mag  +------------+
 | sram_controller|------------->| pixel_      |---------->| approx_         |----->| threshold_ |--> result
 |  IDLE/RD0/RD1/ |              | window_3x3  |           | gradient_xy     | (11b)| comparator |    result_valid
 |  WR0/WR1       |              | 2 line bufs |           | x unit | y unit |      +------------+
 +------^---------+              +-------------+           +-----------------+
        | addr, d, ce_n/oe_n/we_n
   external asynchronous SRAM
```

The optional median pre-filter (`MEDIAN_EN = 1`) goes between the controller and
the window generator. It is described in its own section below.

## The approximate gradient datapath

This is the heart of the design and the part that needs the most care.

### Kernel

The window generator delivers the 3x3 neighbourhood `w[row][col]` of the
centre pixel f(x,y), where row 0 is y-1 and col 0 is x-1. Each direction is
computed by one `approx_gradient` unit from three pixel pairs. The middle pair
has weight 2:

| unit | minuend `pa[k]` | subtrahend `pb[k]` | value |
|------|-----------------|--------------------|-------|
| x    | right column `w[k][2]` | left column `w[k][0]` | Gx = (p0a-p0b) + 2(p1a-p1b) + (p2a-p2b) |
| y    | lower row `w[2][k]`    | upper row `w[0][k]`   | Gy, same form |

### One direction unit (`approx_gradient`)

1. **Three approximate subtractors.** Each subtracts two 8-bit pixels. It
   returns the low 8 bits of the difference and a *carry* flag. The flag is 1
   when the result is positive (no borrow) and 0 when it is negative. Negative
   differences are in two's complement, so `{~carry, diff}` is the 9-bit signed
   difference.
2. **Approximate multiplier.** It multiplies the middle difference, sign-extended
   to 11 bits, by the constant 2. Because the product is taken modulo 2^11, an
   unsigned multiplier gives the correct two's complement result.
3. **Two approximate adders** in a chain sum the three terms into the 11-bit
   signed G (range -1020 to +1020).
4. **Sign, two's complement, 2:1 multiplexer.** The flag (1 when G >= 0) selects
   either G or its two's complement. The result is |G|, 10 bits, saturated at
   1023 in case the approximation errors push it past the range.

There are two pipeline registers, one after the adders and one after the
multiplexer. `approx_gradient_xy` runs an x unit and a y unit in parallel. It
adds their magnitudes with one more approximate adder and registers the 11-bit
sum, so the whole gradient path has 3 cycles of latency. A new window may enter
every cycle.

### The approximations

The original design names its three arithmetic units: an adder called AA12, a
subtractor called APSC4, and a Dadda multiplier built from approximate 4-2
compressors. The internals of these units were published elsewhere and are not
reproduced here. This RTL uses simple, well-defined stand-ins instead. Each has
a parameter for the number of approximate low bits; 0 makes the unit exact.

| unit | parameter (default) | low part | upper part | error |
|------|---------------------|----------|------------|-------|
| `approx_adder` | `APPROX_BITS` (2) | bitwise OR of the operands, no carry chain; carry into the upper part = AND of the top approximate bits | exact | below 2^k; none if one operand is 0 |
| `approx_subtractor` | `APPROX_BITS` (2) | bitwise XOR, no borrow chain; borrow into the upper part = `~a & b` at the top approximate bit | exact | below 2^k; equal operands give exactly 0 |
| `approx_multiplier` | `APPROX_COLS` (4) | partial-product columns below k are ORed (carries dropped) | columns from k up summed exactly | grows with k |

The subtractor returns exactly 0 for equal pixels, so flat image regions never
produce spurious gradients. The multiplier's weight 2 has only one
partial-product row. Its low columns therefore hold at most one bit each, and
the multiplier is exact in this datapath. It is built as a general unit so that
it can be reused or studied on its own. At the default depths, the end-to-end
test image gives an edge map that differs from exact Sobel at 3 of 64,516
pixels with threshold 150. The magnitudes themselves differ in their low bits
almost everywhere, because that image carries noise.

The widths are wider than in the original block diagram. That diagram shows
8-bit buses throughout the gradient unit, a 9-bit gradient output and a 1-bit
threshold, which cannot hold the values involved. Here every stage is wide
enough to hold its full range: a 9-bit difference, an 11-bit sum, a 10-bit |G|
and an 11-bit |Gx|+|Gy|. The threshold is 11 bits and the comparator is 11 bits
wide, as in the original.

## SRAM controller and host protocol

`sram_controller` is a five-state FSM. `S_IDLE` is the idle state. A read takes
RD0 then RD1, and a write takes WR0 then WR1.

| from | re=1 | else we=1 | else |
|------|------|-----------|------|
| IDLE | RD0 | WR0 | IDLE |
| RD0  | RD1 | WR0 | IDLE |
| RD1  | RD0 | WR0 | IDLE |
| WR0  | WR1 if we=1, else RD0 | WR1 | IDLE |
| WR1  | RD0 | WR0 | IDLE |

The source gives these transitions: idle to RD0 on `re`, idle to WR0 on `we`,
RD0 to RD1, WR0 to WR1, WR1 to RD0, and RD0/WR0 back to idle when both
requests are low. The exits from RD1, the cases where `re` and `we` are both
high, and the priority of `re` over `we` in idle are choices made here. The
rule used is that an access continues while its request stays high.

Timing as seen from the host:

- The address on `addr_n` (and, for a write, `din`) is registered when an access
  enters RD0 or WR0. For a stream of accesses, change the address while the FSM
  is in RD1 or WR1.
- **Read.** Chip select and output enable are low in RD0 and RD1. The byte on
  the bus is captured into `dataout` at the end of RD1, and `en` is high for the
  next cycle. With `re` held high, reads run back to back at one byte every two
  cycles.
- **Write.** The controller drives the bus in WR0 and WR1. `sram_we_n` is low in
  WR0 only, so the SRAM takes the byte on its rising edge, and the data is held
  one more cycle. Hold `we` high for both states. If `we` drops after WR0, the
  strobe and chip select end together, and whether the byte is stored then
  depends on the SRAM's own timing.
- `rd` and `wr` qualify the data transfer. A read produces `en` and new data
  only if `rd` is high in RD1. A write pulses the strobe only if `wr` is high
  when it begins. The source lists these two signals as controller inputs
  without saying more. The chip-select, output-enable and write-enable pins and
  the `din` port were added because a real asynchronous SRAM needs them.
- The bidirectional data bus is split into `d_i`, `d_o` and `d_oe` inside the
  controller. The top joins them into the `sram_d` inout with a tristate. An
  assertion checks that the controller never drives the bus while the SRAM's
  output is enabled.
- `rst_n` is active low and asynchronous. It is active low because the signal
  name says so, even though the original prose speaks of "Rstn = 1" returning
  the FSM to idle.

## Window generation, borders and coordinates

`pixel_window_3x3` accepts one pixel per `pix_valid`, at any rate, in raster
order. It keeps the two previous rows in two `IMG_W` x 8 line buffers. Each new
pixel and the two buffered pixels of its column shift into the right-hand
column of the 3x3 window register. A window is produced only for the
(IMG_W-2) x (IMG_H-2) interior pixels, so border pixels give no result.
`win_x`/`win_y` give the window's centre. The row and column counters wrap
after a full frame, so frames can follow each other with no framing signal.
`result_x`/`result_y` at the top carry these coordinates alongside the
gradient pipeline.

## Threshold comparator

When `en` is high, `result` becomes `data > threshold` and `result_valid`
pulses. When `en` is low, the last result is held. At the top, `en` is the
gradient pipeline's valid strobe. That strobe is ultimately the controller's
read-data strobe delayed through the pipeline, so only pixels actually read
from the SRAM produce output.

## Median pre-filter (option)

The algorithm behind this design begins with median filtering, but the hardware
architecture it describes has none. The filter is therefore available but off
by default. With `MEDIAN_EN = 1`, a first window generator and
`median_filter_3x3` produce the filtered (IMG_W-2) x (IMG_H-2) image. A second
window generator then feeds it to the gradient unit. The median is found by
ranking: each pixel is compared with the other eight, ties are broken by
position, and the pixel with exactly four smaller neighbours is selected. With
the filter on, results cover pixels two or more away from the border and are
still given in input-image coordinates.

## Timing summary

| path | latency | rate |
|------|---------|------|
| read request to `en` | RD0, RD1, then `en` in the next cycle | 1 byte / 2 cycles |
| `en` of the pixel completing a window to `result_valid` | 5 cycles (7 with the median filter) | 1 result per pixel read |
| `approx_gradient` | 2 cycles | 1 per cycle |
| `approx_gradient_xy` | 3 cycles | 1 per cycle |
| `median_filter_3x3`, `threshold_comparator`, window | 1 cycle each | 1 per cycle |

A 256 x 256 frame takes 131,072 cycles to load and another 131,072 cycles to
read and process.

## Parameters of `sobel_edge_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `IMG_W`, `IMG_H` | 256, 256 | image size; `IMG_W*IMG_H` must fit the 2^19-byte SRAM |
| `SUB_APPROX` | 2 | approximate low bits of the subtractors |
| `MUL_APPROX` | 4 | approximate low columns of the multipliers |
| `ADD_APPROX` | 2 | approximate low bits of all adders |
| `MEDIAN_EN` | 0 | enable the median pre-filter |

The widths (8-bit pixels, 19-bit address, 11-bit magnitude) are in
`rtl/sobel_pkg.sv`, together with the window type and the FSM state enum.

The default image size is a choice made here; the source does not state one.
The approximation depths are also choices made here, since the published units
are replaced. At the defaults, coarse synthesis gives 198 flip-flops and 4,160
memory bits (the line buffers plus the coordinate pipeline). That is small
beside the Spartan-3E XC3S100E the original prototype used.

## Departures from the original description

- The three approximate arithmetic units are stand-ins, not the published
  AA12, APSC4 and approximate-compressor Dadda designs (see above).
- Datapath widths are sized to the value ranges, not the 8/9-bit labels of the
  block diagram. The threshold is an 11-bit port, not a 1-bit signal.
- The magnitude is `|Gx| + |Gy|`. The original pseudo code writes a square root
  of the sum, and its detection test names only |Gx|. The edge test here is
  `|Gx| + |Gy| > T`.
- The sign flag is the sign of the two's complement sum. The original takes it
  from the adder's carry bit.
- The SRAM controller has added device pins and a write-data input. It has a
  completed transition table and an active-low reset. `rd`/`wr` are read as
  transfer qualifiers.
- The SRAM is 2^19 x 8. The controller's label in the original reads "512x8",
  which is taken to mean 512K x 8, to match the 19-bit address.
- How the SRAM feeds the datapath is not shown in the original. Here the read
  stream is the pixel stream, and the read strobe enables the comparator.
- Not included: the serial-port link to the host PC and the host's image
  blocking, the JTAG configuration path, and the board's display hardware. The
  host side of the SRAM controller is brought out as ports in their place.

## Files

- `rtl/sobel_pkg.sv`: widths, `pixel_t`, `window_t`, `sram_state_t`.
- `rtl/sobel_edge_top.sv`: the top level.
- `rtl/sram_controller.sv`, `rtl/pixel_window_3x3.sv`,
  `rtl/approx_gradient_xy.sv`, `rtl/approx_gradient.sv`,
  `rtl/approx_subtractor.sv`, `rtl/approx_adder.sv`,
  `rtl/approx_multiplier.sv`, `rtl/threshold_comparator.sv`,
  `rtl/median_filter_3x3.sv`: the blocks.
- `tb/sobel_ref_pkg.sv`: integer reference models of the approximate units,
  the gradient and the exact Sobel magnitude. They are written from the
  definitions, not from the RTL.
- `tb/async_sram_model.sv`: behavioural asynchronous SRAM, for simulation only.
- `tb/tb_<block>.sv`: one self-checking testbench per block.
- `tb/tb_sobel_edge_median.sv`: the top with the median filter, on a 64 x 48
  image with salt-and-pepper noise.
- `tb/tb_sobel_edge_images.sv`: four 256 x 256 test images through the top,
  comparing the approximate edge map with exact Sobel (edge counts and SSIM).

## Verification

Each testbench compares the block against independently computed values. Each
ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.

- Arithmetic units: every operand pair at 8 bits (8 x 8 for the multiplier),
  for both the approximate and the exact configuration. The error bounds and
  exact zero for equal operands are also checked.
- Gradient units: random and structured inputs every cycle with gaps. Values,
  sign flags and latency (2 and 3 cycles) are checked, and exact instances are
  compared with exact Sobel.
- Window generator: two frames of a 9 x 6 image with random input gaps. The
  content, coordinates and count of every window are checked.
- SRAM controller: back-to-back writes and reads at random addresses against the
  SRAM model, and the 2-cycle read rate. It also covers the WR1 to RD0 switch,
  a read abandoned in RD0, both requests high at once, and writes and reads
  with `wr`/`rd` low. Every
  transition is checked against the table, and each transition named by the
  source must occur.
- `tb_sobel_edge_top`: the top at its default parameters (256 x 256). A
  synthetic image with a ramp, a rectangle, a disc, a line and noise is loaded
  and then read back twice in a row, so the second frame follows the first
  directly. Every result is checked with its coordinates and 5-cycle
  latency. It counts the mechanisms used: writes, reads, back-to-back reads,
  the write-to-read switch, both signs of both gradients, edges, non-edges,
  border pixels, the frame wrap-around, and approximate magnitudes that
  differ from exact ones. It runs in well under a second.
- `tb_sobel_edge_median`: the same flow with the median filter on, checking
  the 7-cycle latency and counting the noise pixels the filter removes.
- `tb_sobel_edge_images`: four test images at 256 x 256. The results for the
  default depths are below.

| image | edge pixels, approximate | edge pixels, exact | SSIM |
|-------|--------------------------|--------------------|------|
| shapes on a ramp | 1,243 | 1,232 | 0.9955 |
| checkerboard | 6,916 | 6,916 | 1.0000 |
| concentric rings | 53,218 | 53,219 | 0.9999 |
| texture | 4,004 | 4,001 | 0.9996 |

All images carry random noise of +/-6 grey levels, and the threshold is 150.
SSIM is computed over the whole binary map as one window, so it measures how
well the two edge maps agree, not how good they look.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_sobel_edge_top.sv \
    --top-module tb_sobel_edge_top -o sim
./obj_dir/sim
```

Replace `tb_sobel_edge_top` with any other testbench name. To lint a block:
`verilator --lint-only -Wall -Irtl -y rtl rtl/sobel_pkg.sv rtl/<block>.sv`.
The only lint messages are `SYNCASYNCNET`, from the clocked assertions that use
the asynchronous reset in `disable iff`, and unused package constants.
