# Two streaming accelerator kernels: 16-lane vector addition and a sliding-window 5-point stencil

This RTL implements two memory-bound kernels for an FPGA accelerator card with
DDR memory banks behind 512-bit AXI ports. Both kernels share one idea. Each
memory port moves 512 bits per clock, which is 16 32-bit items. The kernels
read every input item from external memory exactly once and compute on 16
items per clock, so the memory ports stay busy on every clock.

* **Vector addition** computes `out[i] = in1[i] + in2[i]` on IEEE single-precision
  floats. Two burst readers, a bank of 16 floating-point adders and a burst
  writer run at the same time, joined by FIFO streams.
* **5-point stencil** computes, for every point of a square `width x width`
  image of 32-bit unsigned integers,

  ```
  out(x,y) = c0*in(x,y-1) + c1*in(x-1,y) + c2*in(x,y) + c3*in(x+1,y) + c4*in(x,y+1)
  ```

  Points on the image border keep their input value. Three image rows are
  needed for each output row. Two on-chip line buffers hold them, so each
  image item crosses the memory port only once.

`fpga_hpc_top` puts both kernels side by side. It also contains the small
on-chip RAM that holds the stencil coefficients. The DDR banks and the host
link are outside the design: their signals are ports of the top.

## Block map

```
fpga_hpc_top
├── vadd_kernel                 out = in1 + in2, 16 floats per clock
│   ├── axi_read_master  x2     bursts from in1 and in2
│   ├── stream_fifo      x3     decoupling between the stages
│   ├── vadd_lanes              joins both streams, 16 x fp32_add, registered output
│   └── axi_write_master        bursts to out
├── stencil_kernel              control: load coefficients, run, drain
│   ├── axi_read_master  (32-bit)   5 coefficients from the on-chip RAM
│   ├── axi_read_master  (512-bit)  image
│   ├── stream_fifo      x2
│   ├── stencil_core            window + line buffers + 16 stencil elements
│   │   ├── line_fifo    x2     one-row delay lines, 16 banks each
│   │   └── stencil_pe   x16    2-stage multiply/add
│   └── axi_write_master        results
└── plram                       128 KB on-chip RAM, host write port + AXI read port
```

`hpc_pkg` holds the shared widths: 32-bit words, 16 lanes, 512-bit beats,
64-bit byte addresses, a maximum image width of 16384, bursts of 16 beats,
and at most 4 bursts in flight per port.

## The stencil's sliding window

This is the least obvious part of the design.

### Why a window

A point needs its up and down neighbours, which lie one whole image row away
in memory. Reading them again from DDR would triple the traffic. Instead, the
core keeps the last two image rows on chip. The image enters row by row, 16
items per beat. Every item then stays on chip until the three rows it takes
part in have been computed.

### Window rows

The window has three rows of 18 items (16 + 2): `top`, `mid` and `bot`.

* `bot` holds the newest items.
* `mid` holds the items exactly one image row older.
* `top` holds the items exactly two rows older.

Lane `i` (0..15) computes the point whose centre is `mid[i+1]`:

| neighbour | window item |
|---|---|
| up | `top[i+1]` |
| left | `mid[i]` |
| centre | `mid[i+1]` |
| right | `mid[i+2]` |
| down | `bot[i+1]` |

The two extra items per row give the leftmost and rightmost lanes their
left and right neighbours.

### One advance per input beat

When a beat enters, the window moves forward by 16 items:

1. The first 16 items of `mid` go into `fifo_up`. The first 16 items of `bot`
   go into `fifo_down`.
2. The last two items of every row (positions 16 and 17) move to positions 0
   and 1. They become the left-hand context of the next beat.
3. Positions 2..17 are refilled: `top` from `fifo_up`, `mid` from
   `fifo_down`, and `bot` from the new input beat.

### Line buffers

Each `line_fifo` is a delay line that writes 16 consecutive items and reads
16 consecutive items on every advance. At the start of a job it is "filled"
to `width - 18` items: the read pointer starts at 0, the write pointer at
`width - 18`. Together with the 18 items that sit in the window row, the
delay is exactly one image row. This is why the rows of the window stay
exactly one image row apart.

To move 16 items per clock through one memory, the storage is split into 16
banks. Item `k` lives in bank `k mod 16`. Any 16 consecutive items touch each
bank exactly once, whatever the alignment. The pointers are item indices. The
block rotates the 16 bank outputs back into stream order.

Reads are combinational, so the full window update fits in one clock. For
narrow images (width below 34) the fill is less than 16 items. An item can
then be read in the same clock it is written; the buffer forwards those
items from the write data.

Each buffer holds 16384 items. That sets the largest image width, 16384,
which is a 1 GiB image.

### Border handling

A position counter follows the image coordinates of lane 0's centre. It
starts at column `width - 17`, row -2, so that it is aligned when the first
real centre reaches `mid`. Each lane adds its own offset and flags its point
as border when any of these hold:

* the column is 0 or `width - 1`;
* the row is 0 or `width - 1`.

A flagged element outputs the centre value unchanged instead of the
weighted sum.

### Output skew

Two effects delay the results:

* the window needs one row plus 17 items before the first centre reaches
  `mid`;
* each stencil element has two pipeline stages (products, then sum).

Counting both, output item `p + width + 17` holds the result for image item
`p`. The kernel writes the whole output stream, including these
`width + 17` leading items, starting at the output address. So the image
result begins `(width + 17) * 4` bytes after the output address.

The output buffer must hold `ceil((width*width + width + 17) / 16)` beats.
After the last image beat, the kernel feeds zero beats itself to push the
last results out. The input buffer therefore needs no padding beyond a
whole number of beats.

### Flow control

The core moves one beat in and one beat out in the same clock. Once the
pipeline is full:

* `in_ready` follows `out_ready`;
* `out_valid` follows `in_valid`.

The window and the stencil elements advance only on an accepted beat. A
stall anywhere therefore freezes the whole core without losing data.

## Stencil kernel sequence

`stencil_kernel` runs on a one-clock `start` pulse with the image, output and
coefficient addresses and the width. It then goes through these steps:

1. It reads 5 words from the coefficient address through a 32-bit AXI port.
   The host first writes the coefficients into `plram` through the top's
   `plram_we/addr/wdata` port. The 5 words are kept in registers:
   0 = up, 1 = left, 2 = centre, 3 = right, 4 = down.
2. It clears the core and starts the image reader and the result writer.
3. It feeds image beats, then zero beats, until all output beats are out.
4. It waits for the last write response and pulses `done`.

The width must be from 32 to 16384. Simulation asserts on other values.

## Vector addition kernel

`vadd_kernel` gets three byte addresses and `size`, the item count. `size`
must be a multiple of 16; simulation asserts on other values.

Three independent AXI masters run at the same time. The two readers fill
their FIFOs. `vadd_lanes` takes a beat only when both operands are present
and its output has room. It adds 16 float pairs and registers the result.
The writer drains the sum stream.

`fp32_add` is a complete IEEE-754 single-precision adder:

* round-to-nearest-even;
* subnormal inputs and results;
* infinities;
* every NaN result comes out as `0x7FC00000`.

Performance depends on how the three ports are spread over DDR banks. With
`in1` and `out` on one bank and `in2` on another (one beat per clock per
bank), the kernel takes about two clocks per beat. It is limited by the
shared bank. With three separate banks it should approach one clock per beat
(not simulated).

## AXI masters

`axi_read_master` and `axi_write_master` cover the subset of AXI4 the
kernels need:

* INCR bursts of up to 16 beats;
* no IDs, byte strobes or error responses;
* a burst is cut short where it would cross a 4 KiB boundary.

The read master keeps up to 4 bursts in flight. Its `rready` follows the
output stream's `ready`, so a full downstream FIFO stalls the memory instead
of losing data.

The write master sends a burst's data only after its address. It counts
write responses and reports `done` only after the last one arrives.

All addresses must be aligned to the beat size (64 bytes for image and vector
data, 4 bytes for coefficients).

## Control and reset

Every kernel uses the same handshake. A one-clock `start` pulse starts the
kernel, with its arguments on input ports. `busy` stays high while it runs,
and `done` pulses for one clock at the end.

Reset is synchronous and active-high. It clears control state but not the
contents of memories or data registers.

## Where this design departs from the reference design it is based on

* **Stencil data type.** 32-bit unsigned integers; products and sums wrap
  modulo 2^32. The reference kernels use floats in one version and unsigned
  integers in the optimised one; the optimised one is followed.
* **Border rule.** Border points keep the input value, as the problem
  statement says. The reference's optimised code instead treats missing
  neighbours as zero.
* **End of the image.** The kernel generates the trailing zero beats
  itself. In the reference, the host appends padding to the input buffer.
* **Skipped leading outputs.** The reference host skips
  `width + 2*16` leading outputs; here the count is `width + 17`. The
  difference comes only from how the pipeline is counted.
* **Burst length, FIFO depths, outstanding limit.** These are this design's
  own choices: 16 beats, 32-beat kernel FIFOs, 4 bursts.
* **Multiple kernel instances.** Only one vector-addition kernel is
  instantiated. The reference also tried 2 and 4 instances.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=<n> failures=<n>` and stops, and a watchdog ends it if it
hangs. `tb/ddr_model.sv` is a behavioural memory used by the kernel-level
benches. It serves one beat per clock, has a fixed read latency and random
stalls, and flags bursts that cross 4 KiB or end with a misplaced `wlast`.

With Verilator 5, for example for the whole design:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    --top-module tb_fpga_hpc_top rtl/hpc_pkg.sv tb/tb_fpga_hpc_top.sv
./obj_dir/Vtb_fpga_hpc_top
```

The package comes first; `-y` lets Verilator find every other module by its
file name. Any other block is run the same way with its own testbench as the
top module. `tb_fpga_hpc_top` uses the design at its default
sizes: 16384-item line buffers and a 128 KB coefficient RAM. It runs:

* a 32 x 32 image and then a 50 x 50 image through the stencil kernel;
* two vector additions (4096 and 1024 items) at the same time, with `in1`
  and `out` sharing one memory model and `in2` on another.

The bench counts how often each mechanism was used and fails if any count is
zero: bank sharing, 4 KiB cuts, the outstanding-burst limit, back-pressure,
border and inner points, line-buffer forwarding, and zero-beat draining.

## Limits

* Everything has been checked in simulation only. No timing analysis has
  been done. The single-cycle floating-point adder and the 16 x 5 products
  per clock will need extra pipeline stages to reach a few hundred MHz.
* The line buffers use combinational reads, which map to distributed RAM
  rather than block RAM. At 16384 items x 2 buffers x 32 bits this is a
  large amount of LUT memory.
* Only 16 lanes (`P = 16`) are simulated. The core and line buffers take
  `P` as a parameter, but the kernel ties it to the 512-bit beat.
* Images narrower than 32 items are rejected by an assertion, not handled.
