# 3x3 mean filter for grey-scale images

This design smooths an 8-bit grey-scale image with a 3x3 box (mean) filter.
Each output pixel is the sum of the pixel and its eight neighbours, divided by
eight and clamped to 255. An image enters byte by byte through a UART. It is
kept in one block RAM and filtered pixel by pixel into a second block RAM. It
then leaves through the UART again. The default image size is 512 x 512.

The design is built for simplicity, not speed. There is one adder, no line
buffers and no divider. Each output pixel costs nine single-port reads of the
input RAM.

## Data flow

```
          AXI4-Lite            port B (write)   +-------+  port A (read)
 UART  <------------> uart_handler -----------> | BRAM1 | ------------> mean_filter
 Lite     interrupt        ^   ^                +-------+                 |   ^
 core                      |   |                                          |   | init_single_op,
 (outside)                 |   |                +-------+  port A (write) |   | row, col
                           |   +--------------- | BRAM2 | <---------------+   |
                           |     port B (read)  +-------+                     |
                           |                                              scheduler
                           +------ finish_flag_process ---------------------+ ^
                                                                init_process |
```

1. **Load.** `uart_handler` polls the UART core's status register. It copies
   each received byte into BRAM1 at addresses 0, 1, 2, ... After
   `IMG_SIZE*IMG_SIZE` bytes it raises `image_loaded`.
2. **Filter.** A pulse on `init_process` starts `scheduler`. For every pixel it
   sends `(row, col)` to `mean_filter`, raises `init_single_op` and waits for
   `finish_flag_single_op`. After the last pixel it pulses
   `finish_flag_process`.
3. **Send.** `uart_handler` sees `finish_flag_process`. It reads BRAM2 in
   address order and writes each byte to the UART core's TX FIFO, waiting
   whenever that FIFO is full. Then it waits for the next image.

### Pixel addressing

Pixel `(row, col)` is stored at address `col * IMG_SIZE + row`. So `row` is the
fast index, and the byte stream on the UART is column by column (column-major).
The host must send and expect pixels in this order. BRAM1 and BRAM2 use the same
mapping.

## The mean filter datapath (`rtl/mean_filter.sv`)

This is the core of the design. One operation computes one output pixel:

| cycle after `init_single_op` | action |
|---|---|
| 0 | latch `row`, `col`; clear the sum |
| 1 .. 9 | issue the read of window position k = 0..8: `col_offset = k mod 3 - 1` (fastest), `row_offset = k div 3 - 1` |
| 2 .. 10 | add the pixel returned by the RAM (one cycle of latency) |
| 11 | `wea_out` and `finish_flag_single_op` high; write the result to BRAM2 |

Four rules shape the result:

- **Division by 8, not 9.** The sum is shifted right by 3. This keeps a divider
  out of the datapath. A flat region of value v comes out as 9v/8, not v, so the
  output is about 12.5 % brighter than a true mean.
- **Clamping.** Nine pixels of 255 sum to 2295, and 2295 >> 3 is 286. Results
  above 255 are clamped to 255. Bright areas therefore saturate.
- **Zero padding at the borders.** A window position outside the image is not
  read and adds zero. The divisor stays 8. So border pixels come out darker:
  corners have 4 terms and edges have 6.
- **Optional correction step** (`THRESH_EN = 1`, threshold `THETA`). Let `I` be
  the centre pixel and `M` the mean. The output is `M` only if `I - M > THETA`,
  and `I` otherwise. This replaces only pixels that are brighter than their
  surroundings by more than the threshold. The test is one-sided as given. It is
  off by default, so the output is always `M`.

The sum register is 12 bits wide. A 4-bit counter tracks the window position.

## Timing

| quantity | cycles |
|---|---|
| one output pixel, `init_single_op` to `finish_flag_single_op` | 11 |
| one pixel in the full pass, including the scheduler handshake | 12 |
| `init_process` to `finish_flag_process` | `12 * IMG_SIZE^2 + 1` (3,145,729 for 512 x 512, 62.9 ms at 50 MHz) |
| one byte received, AXI handshakes with a zero-wait core | about 8 to 10 |

In practice the serial line sets the load and send times. At 115200 baud, a
512 x 512 image takes about 23 s each way. An earlier description of this
filter quotes 0.721 ms for a 512 x 512 image at 50 MHz. That is 36,050 cycles,
fewer than one cycle per pixel. A filter that reads nine pixels per output
through one RAM port cannot reach it, and this design makes no attempt to. A
faster variant would need line buffers and one pixel per cycle.

## Blocks

| file | role |
|---|---|
| `rtl/mean_filter_pkg.sv` | shared constants: image size, pixel width, shift, UART Lite register map |
| `rtl/mean_filter_top.sv` | system top; ports: clock, reset, `init_process`, `finish_flag_process`, `image_loaded`, `bus_error`, AXI4-Lite master, `uart_interrupt` |
| `rtl/scheduler.sv` | sweeps all `(row, col)` pairs, one pixel in flight |
| `rtl/mean_filter.sv` | one 3x3 window per operation, described above |
| `rtl/bram_tdp.sv` | true dual-port RAM with one clock, read-first, 1-cycle read latency; used for BRAM1 and BRAM2 |
| `rtl/uart_handler.sv` | AXI4-Lite master to the UART core; loads BRAM1 and drains BRAM2 |

### UART handler and the UART Lite core

The UART core itself is **not** in this RTL. The top brings out its AXI4-Lite
slave bus (4-bit address, 32-bit data) and its interrupt. The handler expects
the register map of the common AXI UART Lite core:

| offset | register | bits used |
|---|---|---|
| 0x0 | RX FIFO | [7:0] received byte |
| 0x4 | TX FIFO | [7:0] byte to send |
| 0x8 | status | bit 0 RX data valid, bit 3 TX FIFO full |
| 0xC | control | bit 0 reset TX FIFO, bit 1 reset RX FIFO, bit 4 enable interrupt |

After reset the handler writes 0x13 to the control register once. This clears
both FIFOs, so the host must not send until that write is done, a few cycles
after reset. For each byte the handler reads the status register, then either
the RX FIFO or the TX FIFO. If there is nothing to do, it waits for the
interrupt, or at most `POLL_GAP` cycles, and polls again. Only one bus
transaction is in flight at a time, and `bready`/`rready` are always high. A
response other than OKAY sets the sticky `bus_error` output.

Several AXI outputs are constant by construction: `wstrb`, the unused upper
bits of `wdata` and `awaddr`, `bready` and `rready`. Synthesis reports them as
constant outputs.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `IMG_SIZE` | 512 | top, filter, scheduler, handler | square image side in pixels; row/col width is `clog2(IMG_SIZE)`, RAM address width is `clog2(IMG_SIZE^2)` |
| `THRESH_EN` | 0 | top, filter | enable the correction step |
| `THETA` | 0 | top, filter | correction threshold (signed) |
| `POLL_GAP` | 16 | top, handler | maximum wait between status polls |
| `DIV_SHIFT` | 3 | package | divide the window sum by `2**DIV_SHIFT` |

`IMG_SIZE` need not be a power of two. The RAMs always hold `2**ADDR_W` words.
At 512 x 512 the design uses two 256 KiB RAMs (4 Mbit in all).

## Where this design departs from its source description

- The source gives the filter's sizes inconsistently: 4- or 5-bit row/column
  buses and 9-bit RAM addresses, but a 512 x 512 image. Here all widths follow
  from `IMG_SIZE`.
- The source also describes the divider as "by 9". This design uses the shift
  by 3 that the same source names as the hardware choice. To get a true mean,
  replace the shift in `mean_filter` with a divide-by-9 stage, such as a
  constant multiply followed by a shift.
- Border handling, clamping, RAM read latency, sweep order, the UART register
  map and polling, and the start/finish handshakes are this design's own
  choices. The source does not specify them.
- The correction step is described as part of the algorithm, but not as part
  of the hardware. It is built in, but off by default.

## Simulation

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A model of the UART
Lite core, `tb/axi_uart_lite_model.sv`, stands in for the real core. It has
16-entry FIFOs, a byte-level line side, a transmitter with a configurable byte
rate, interrupts, random ready delays, and assertions on the master's AXI
handshakes.

| testbench | what it checks |
|---|---|
| `tb_bram_tdp` | random traffic on both ports against a reference array (read-first, port-B priority) |
| `tb_mean_filter` | every pixel of an 8 x 8 image, default mode and correction mode: value, address, read count, 11-cycle latency, clamping |
| `tb_scheduler` | sweep order, one pixel in flight, restart gap, finish pulse, two passes |
| `tb_uart_handler` | two 64-byte images in and out; RX-empty waits, TX-full waits and interrupts must occur |
| `tb_mean_filter_top` | two 8 x 8 systems (default mode and `THRESH_EN=1, THETA=10`) end to end; pass time `12*N^2+1`; counts border windows, clamping, both outcomes of the correction step, UART waits and interrupts |
| `tb_mean_filter_top_full` | default parameters: one 512 x 512 image in, filtered and out; all 262,144 pixels checked; also prints how many pixels land in a different histogram bin than with a true rounded sum/9 mean (about 10 s of simulation) |

Run a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert --top-module tb_mean_filter_top \
  rtl/mean_filter_pkg.sv rtl/bram_tdp.sv rtl/mean_filter.sv rtl/scheduler.sv \
  rtl/uart_handler.sv rtl/mean_filter_top.sv \
  tb/axi_uart_lite_model.sv tb/tb_mean_filter_top.sv
./obj_dir/Vtb_mean_filter_top
```

The simulator has only two states. Everything that is read is reset or
written before use, so the results do not depend on initial values.
