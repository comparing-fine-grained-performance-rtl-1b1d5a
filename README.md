# Sobel edge detection: a pixel-per-clock pipeline and a channel-synchronised dataflow

This RTL computes the Sobel edge magnitude `G = |Gx| + |Gy|` of a stream of
8-bit greyscale pixels in two very different ways, so that the cost of each
can be measured cycle by cycle:

* **A one-pixel-per-clock pipeline** of the kind usually built on an FPGA:
  two row delay lines, a 3x3 window of flip-flops and a purely combinational
  gradient datapath. Every clock takes a pixel and every clock yields a
  result.
* **A dataflow of small sequential "processors"** joined by 2-word blocking
  channels, modelled on a massively parallel processor array in which every
  value that crosses a channel costs the processor an instruction and every
  channel access may stall. Here the Sobel stage needs 44 clocks per pixel.

A third pair of modules shrinks the comparison to its core: the top-row part
of the y-gradient, `p[n] + 2*p[n-1] + p[n-2]`, once as three registers and two
adders (one result per clock) and once as five channel-connected processors
(one result every four clocks, with arithmetic on only a quarter of each
computing processor's clocks). The gap comes from two things the register
version gets for free: sending a value to several places on the same clock,
and doing several operations on the same clock.

The top module `sobel_system` places the four designs side by side. They
share only clock and reset.

## The Sobel arithmetic

For a 3x3 neighbourhood `w[row][col]` (row 0 on top, column 2 on the right):

```
Gx = (w[0][2] + 2*w[1][2] + w[2][2]) - (w[0][0] + 2*w[1][0] + w[2][0])   right minus left
Gy = (w[0][0] + 2*w[0][1] + w[0][2]) - (w[2][0] + 2*w[2][1] + w[2][2])   top minus bottom
G  = |Gx| + |Gy|
```

The x2 weights are shifts, so no multiplier is used. Each gradient lies
within +-1020; `Gx + Gy` expands to `2*(w01 + w02 + w12 - w10 - w20 - w21)`,
so `G` never exceeds 6*255 = 1530 and needs 11 bits. Results are kept at full
precision, not clipped to 8 bits. The function `sobel_mag` in `sobel_pkg` is
shared by both Sobel implementations.

## The pixel-per-clock pipeline (`sobel_fpga`)

```
in_pix ─┬─> pix_q ───────────────────────────────> column[2] ┐
        └─> line_buffer (IMG_W) ─┬─> column[1] ────────────> ├─> 3x3 window ─> |Gx|+|Gy| ─> out_mag
                                 └─> line_buffer (IMG_W-1) ─> column[0] ┘    (combinational)  (register)
```

*Aligning the three rows.* `line_buffer` is a RAM with a circular pointer.
On each enabled clock it reads the old entry into a registered output and
writes the new sample in its place, so its output lags its input by exactly
DEPTH enables. This is the shape of one FPGA block RAM. The first delay line,
IMG_W deep, turns pixel `k` into pixel `k-IMG_W`, the pixel one row up. The
second line is fed from the first line's *registered* output, which already
lags by one enable. It is therefore one entry shorter (IMG_W-1) to land
exactly on pixel `k-2*IMG_W`. The new pixel passes through a matching input
register (`pix_q`). After each enabled clock the three registers form the
newest window column. Six more flip-flops hold the two older columns and
shift left on each enable.

*Which result belongs to which pixel.* The pixel at `(r, c)` completes the
window centred on `(r-1, c-1)`, and that is the result it produces. Where
`r < 2` or `c < 2` the window is not wholly inside the image: it holds
leftovers of the previous row or frame. There the result is forced to 0 and
`out_border` is raised. The output stream therefore has one value per input
pixel. It is the Sobel image shifted one pixel down and right, with a 2-pixel
zero frame on its top and left. The last row and last column of the image
are never the centre of a result. Row and column counters wrap at `IMG_W`
and `IMG_H`; there are no frame-start signals, so the source must send whole
frames after reset.

*Timing.* The pipeline takes a pixel on every clock where `in_valid` is
high. `out_valid` rises two clocks later, after the window register and the
output register. There is no back-pressure. A gap-free 512 x 512 frame takes
262,144 clocks, which is 1152 frames/s at 302 MHz.

## Blocking channels (`ambric_channel`)

In the processor-array model, all communication is point-to-point, in order,
and blocking. Each channel is a 2-word synchronous FIFO with valid/ready on
both ends. A full channel holds `in_ready` low and stalls its writer. An
empty channel holds `out_valid` low and stalls its reader. A word written on
one clock can be read on the next, and a steady stream passes one word per
clock. Assertions check that a stalled writer holds its word steady and that
the occupancy never exceeds the depth. The valid/ready pair stands in for the
array's tagged self-synchronising channels, whose wire-level protocol is not
reproduced.

## The two-stage channel dataflow (`mppa_sobel`)

```
in ─> channel ─> row_interleave_proc ─> channel ─> sobel_kernel_proc ─> channel ─> out
                 (2 row delays;              (3x3 shift registers,
                  3 words per column)         44-clock iteration)
```

This is the first, two-processor version of the Sobel dataflow.

* `row_interleave_proc` aligns rows like the pipeline above, with the same
  two delay lines. It does not drive three wires; it merges the three rows
  onto one channel. For every pixel from the third row on, it writes the
  top, middle and bottom pixel of that column as three successive words.
  One iteration is one read and three writes, at one operation per clock.
* `sobel_kernel_proc` reads those three words. Each word enters the right
  end of its row of a 3x3 register set, and the older pixels move one place
  left. The stage then writes `|Gx| + |Gy|`. It behaves like a processor
  running that loop: the write waits until `KERNEL_CYCLES` clocks (default
  44) have passed since the iteration began. Reads and writes still stall on
  empty or full channels. The register set is never cleared. So, exactly as
  the processor loop would, the first two results of each row mix in the
  last columns of the previous row (or frame). The design does not mark or
  zero them.

A frame of `IMG_W x IMG_H` pixels gives `(IMG_H-2) * IMG_W` results.
Unstalled, they leave 44 clocks apart; the Sobel stage is the bottleneck,
and the input channel is refused most of the time. A 512 x 512 frame takes
about 11.5 million clocks, 26 frames/s at 300 MHz. Words are 32 bits wide;
pixels travel in the low 8 bits and results in the low 11.

## The row-gradient fragment, twice (`row_grad_fpga`, `row_grad_mppa`)

Both forms compute `p[n] + 2*p[n-1] + p[n-2]`, with zeros for the pixels
before the first one.

`row_grad_fpga` uses three pixel registers in a shift chain. The first two
registers fan out to both the next register and the adders. The x2 is a
wiring shift. Two combinational adders feed one output register. Throughput
is one result per clock, with two clocks of latency.

`row_grad_mppa` uses five processors and eight 2-word channels:

```
in -> s1 (x1) -> s2 (x2) -> s3 (x1)
       |          |          |
       +--> a1 <--+          |
            a1 ------> a2 <--+ -> out
```

Every processor does one read, write or arithmetic operation per clock:

| processor | module, parameters | loop | clocks |
|---|---|---|---|
| s1 | `mppa_stage_proc` PASS=1 CAPTIVE=0 DOUBLE=0 | read p, write p to s2, write p to a1 | 3 |
| s2 | `mppa_stage_proc` PASS=1 CAPTIVE=1 DOUBLE=1 | read p, write previous p to s3, double it, write to a1 | 4 |
| s3 | `mppa_stage_proc` PASS=0 CAPTIVE=1 DOUBLE=0 | read p, write previous p to a2 | 2 |
| a1, a2 | `mppa_add_proc` | read a, read b, add, write | 4 |

Pixels shift along the row through the "captive" register of s2 and s3. Each
keeps the pixel of its previous iteration and passes that one on, so in
iteration `n` the adders see `p[n]`, `2*p[n-1]` and `p[n-2]`. Fan-out costs
s1 and s2 one extra write each, and fan-in costs each adder one extra read.
The 4-operation loops of s2, a1 and a2 set the rate at one result per four
clocks, and each spends one clock in four on arithmetic. The `op_count`
output counts arithmetic operations (three per result), so the 25% figure
can be measured directly.

## Throughput summary

| design | clocks per pixel | 512 x 512 frame | frames/s |
|---|---|---|---|
| `sobel_fpga` | 1 | 262,144 clocks | 1152 at 302 MHz |
| `mppa_sobel` (KERNEL_CYCLES=44) | 44 | 11.49 M clocks | 26 at 300 MHz |
| `sobel_fpga`, IMG_W=1920, IMG_H=1080 | 1 | 2.07 M clocks per HD frame | 145 at 302 MHz |
| `mppa_sobel`, IMG_W=1920, IMG_H=1080 | 44 | 91 M clocks per HD frame | 3.3 at 300 MHz |
| `row_grad_fpga` | 1 | - | - |
| `row_grad_mppa` | 4 | - | - |

A finer-grained processor version reaches 7 clocks per pixel (about 163
frames/s at 300 MHz). It is not included, because its processor graph is not
specified here; see *Limits* below.

## Modules and parameters

| file | what it is | parameters (default) |
|---|---|---|
| `rtl/sobel_pkg.sv` | widths, pixel/window types, `sobel_mag` | PIX_W=8, MAG_W=11, WORD_W=32 |
| `rtl/line_buffer.sv` | RAM delay line | DEPTH=512, WIDTH=8 |
| `rtl/sobel_window.sv` | delay lines + 3x3 window + row/column counters | IMG_W=512, IMG_H=512 |
| `rtl/sobel_convolve.sv` | `|Gx|+|Gy|` with output register and border zeroing | - |
| `rtl/sobel_fpga.sv` | the pixel-per-clock pipeline | IMG_W, IMG_H |
| `rtl/ambric_channel.sv` | 2-word blocking channel | WIDTH=32, DEPTH=2 |
| `rtl/row_interleave_proc.sv` | row-merging stage | IMG_W, IMG_H |
| `rtl/sobel_kernel_proc.sv` | Sobel stage with fixed iteration time | KERNEL_CYCLES=44 |
| `rtl/mppa_sobel.sv` | the two-stage channel dataflow | IMG_W, IMG_H, KERNEL_CYCLES |
| `rtl/row_grad_fpga.sv` | fragment, register form | - |
| `rtl/mppa_stage_proc.sv` | staging processor of the fragment | PASS, CAPTIVE, DOUBLE |
| `rtl/mppa_add_proc.sv` | adder processor of the fragment | - |
| `rtl/row_grad_mppa.sv` | fragment, processor form | - |
| `rtl/sobel_system.sv` | top: the four designs side by side | IMG_W, IMG_H, KERNEL_CYCLES |

Reset is synchronous and active low (`rst_n`). Delay-line RAMs and channel
storage are not reset. IMG_W must be at least 3. To process HD video, set
IMG_W and IMG_H to the frame size: the delay lines grow with IMG_W, and
nothing else depends on the image size.

## Simulation

Every module has a self-checking testbench in `tb/` named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M` and ends with `$finish`. The
testbenches compare against integer models written independently of the
RTL. They also check the timing claims above: one pixel per clock and a
2-clock latency for the pipeline, 44-clock Sobel iterations, 4-clock adder
and fragment iterations, and the 25% arithmetic share. `tb_sobel_system`
runs all four designs at once on a 16 x 9 image. It also requires that each
mechanism happens: border zeros, a blocked input channel, output
back-pressure, and fragment stalls. `tb_sobel_system_full` runs the same
checks at the default 512 x 512 size, about 11.5 million clocks (well under
a minute). `tb_sobel_system_hd` repeats them with the top sized for
1920 x 1080 frames, about 95 million clocks (a few minutes).

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/sobel_pkg.sv tb/tb_sobel_system.sv --top-module tb_sobel_system
./obj_dir/Vtb_sobel_system
```

Replace the testbench name to run any other. Lint warnings that remain are
unused upper bits of 32-bit channel words and deliberately unconnected
outputs of the last staging processor.

## Limits and departures

* Only the first, two-stage processor version of the dataflow is given as
  RTL. The 18-processor version (7 clocks per pixel) is not included,
  because its division into processors is not specified.
* The processor stages are hardware state machines, not processors. The
  Sobel stage's 44 clocks are a fixed iteration time, not an instruction
  trace. The fragment's processors cost one clock per read, write or
  arithmetic operation; the fusion of an add with a channel write, which a
  compiler sometimes achieves, is not modelled.
* The processor array itself (its DSP and light processors, bank-organised
  memory objects, the three levels of channel interconnect, DDR2, PCI
  Express, flash, JTAG and GPIO) is not modelled. The channel is the only
  part of it reproduced.
* These are this design's own choices: the border policy and output
  alignment of the pipeline, the 11-bit result width, the 2-clock latency,
  the top/middle/bottom word order of the merged row stream, dropping the
  first two rows in the row-merging stage, the extra channels at the
  dataflow's input and output, the captive-pixel alignment in the fragment,
  and the valid/ready channel signalling.
