# Membrane-potential max pooling for spiking convolutional networks

Converting a trained convolutional network into a spiking one breaks max
pooling. The converted layer outputs trains of 0/1 spikes, not activations. What
stands for the ReLU output is a neuron's firing rate. The usual fix counts every
neuron's spikes and forwards the spikes of the neuron with the highest count.
That needs a counter per neuron. Another fix adds an extra "pooling neuron" per
window, which costs extra arithmetic.

This block uses a cheaper signal that already exists. An integrate-and-fire
neuron keeps a membrane potential, which the convolutional core stores and
updates anyway. The neuron with the highest current potential is usually the one
that fires most often. So in each pooling window the block picks the neuron with
the highest potential and forwards that neuron's spike for the current time
step. It needs no spike counters and no extra neurons.

The hardware is a small streaming unit. The convolutional core sends the
potentials of one feature map in raster order, one neuron per clock. A line
buffer (shift register) holds the previous row. A multiplexer picks the neurons
of the current window. A controller tracks position and stride. A max
comparator forwards the winner's potential and spike.

```
 in_pot/in_spike ──►[ shift register, stages 0 .. n ]
        │                    │ │ │ ... │ │
        └──────────────►[   window multiplexer   ]◄── sel (frame width, Np)
                                  │ Np x Np entries        ▲
                        [      max comparator     ]◄── window complete / last
                                  │                        │
                   out_pot/out_spike/out_last      [ controller ]◄── cfg_*
```

Default build: maximum frame 32 x 32, 16-bit potentials, windows up to 2 x 2,
and any stride. Both evaluated networks use 2 x 2 pooling with stride 2
throughout.

## The pooling rule, by example

Here is a 4 x 4 map of potentials at one time step, with firing threshold 30:

```
20 15 | 12 17
16  2 | 15 25
------+------
 7  5 | 21 30
20 40 | 20 50
```

With 2 x 2 windows and stride 2, the block outputs four results:

| window       | winner potential | winner spike |
|--------------|------------------|--------------|
| top-left     | 20               | 0            |
| top-right    | 25               | 0            |
| bottom-left  | 40               | 1            |
| bottom-right | 50               | 1            |

The convolutional layer then resets each neuron that fired by subtracting the
threshold, for example 50 becomes 20. The next time step's map is pooled the
same way.

The block expects two things for every neuron, from the same time step:

- its potential **before** the reset
- the spike it emitted

The spike passes through the block untouched. So the block does not need to
know the threshold, and the neuron model stays in the convolutional core.

The testbench checks this example. It also checks a plain max-pooling example,
with stride 2 and with the overlapping stride 1.

## Forming a window from a stream

This is the least obvious part of the design.

Neurons arrive in raster order. Take a neuron arriving at row `r`, column `c` of
a frame that is `W` wide. The neuron `i` rows up and `j` columns to the left
arrived `a = i*W + j` inputs earlier. The block always evaluates the window
whose **bottom-right** corner is the arriving neuron. Window element `(i, j)` is
therefore:

- the incoming entry itself, when `a = 0`
- shift-register stage `a - 1` otherwise, where stage 0 is the newest entry

The deepest element of an `Np x Np` window is `a = (Np-1)*W + Np-1`. So the
shift register has `(NP_MAX-1)*N + NP_MAX - 1` stages. For the default 2 x 2
window that is `N + 1` stages, numbered `0 .. N`:

| window element | source              |
|----------------|---------------------|
| `(0,0)`        | the incoming neuron |
| `(0,1)`        | stage 0             |
| `(1,0)`        | stage `W-1`         |
| `(1,1)`        | stage `W`           |

The frame width `W` is set at run time, anywhere from `Np` up to `N`. So the
stage index of every element in the upper rows is chosen at run time, and that
choice is what the multiplexer (`mp_window_mux`) does. The bottom row of the
window is plain wiring.

Each stage holds 17 bits: the 16-bit potential plus the spike flag. The register
shifts only when `in_valid` is high, so idle cycles in the stream do no harm.

## Controller: when a window is complete

`mp_controller` counts the row and column of the arriving neuron. For each axis
it also keeps a stride phase. The phase is 0 when the index reaches `Np-1`, then
counts modulo `s`. A window ends at the arriving neuron when:

- both the row and the column index are at least `Np-1`, and
- both phases are 0.

This gives the usual "floor" pooling:

- There are `floor((W-Np)/s)+1` windows across and `floor((H-Np)/s)+1` down.
- Rows and columns that no window covers are passed over.
- `s < Np` gives overlapping windows.
- `s = Np` gives the usual non-overlapping pooling.

The last window of a frame ends at row `Np-1 + s*floor((H-Np)/s)`, column
`Np-1 + s*floor((W-Np)/s)`. The controller flags it, and the block outputs it
as `out_last`.

After a frame's last neuron every counter returns to zero. The next frame (the
next channel, or the next time step) can follow on the very next clock.

The configuration is `cfg_frame_w`, `cfg_frame_h`, `cfg_pool_size` and
`cfg_stride`. The controller samples it with the first neuron of each frame and
holds it to the end of that frame. The inputs may change at any time; a change
takes effect from the next frame. The held frame width and pool size drive the
multiplexer's selects.

Assertions check the configuration in force: `1 <= Np <= NP_MAX`, `s >= 1`,
and `Np <= W, H <= N`.

## Max comparator

`mp_max_cmp` compares the potentials of the `Np x Np` valid entries as signed
two's-complement numbers. Potentials can be negative after subtractive reset or
with negative weights.

If several neurons tie for the highest potential, the entry scanned first wins.
That is the neuron latest in raster order. With threshold-based firing, tied
neurons also emit the same spike.

When the controller marks a window complete, the result is registered together
with the winner's spike and the last-window flag.

## Interface and timing (`mp_maxpool`)

| port                                         | dir | width  | meaning                                        |
|----------------------------------------------|-----|--------|------------------------------------------------|
| `clk`, `rst_n`                               | in  | 1      | clock; synchronous, active-low reset           |
| `cfg_frame_w`, `cfg_frame_h`                 | in  | `CW`   | frame size, `Np..N`                            |
| `cfg_pool_size`                              | in  | `CW`   | window side `Np`, `1..NP_MAX`                  |
| `cfg_stride`                                 | in  | `CW`   | stride `s >= 1`                                |
| `in_valid`                                   | in  | 1      | a neuron is presented this cycle               |
| `in_pot`                                     | in  | `DW`   | its potential before reset, signed             |
| `in_spike`                                   | in  | 1      | its spike in this time step                    |
| `out_valid`                                  | out | 1      | a pooled result is presented                   |
| `out_pot`, `out_spike`                       | out | `DW`, 1 | the winner's potential and spike              |
| `out_last`                                   | out | 1      | last pooled result of the frame                |

`CW = clog2(N+1)`, which is 6 bits for `N = 32`.

- **Accepting input.** A neuron is accepted on every rising edge with `in_valid`
  high. There is no back-pressure, and gaps are allowed.
- **Output latency.** `out_valid` goes high for one cycle, one clock after the
  neuron that completes a window.
- **Output order.** Results come out in raster order of the pooled map.
- **Throughput.** One neuron per clock. A `W x H` frame takes `W*H` cycles, and
  frames can follow each other without a gap.

Parameters: `N` (default 32), `DW` (default 16) and `NP_MAX` (default 2). The
defaults live in `mp_pkg`. Raising `NP_MAX` to 3 costs another line of stages,
`2N+2` in total, plus a 3 x 3 comparator.

## Evaluated networks and sizes

Both networks pool with 2 x 2 windows and stride 2, and every pooled map fits
the 32 x 32 default:

- **MNIST shallow network** (`12c5-MP-64c5-MP-FC120-FC10`, 28 x 28 input):
  - pools 12 maps of 24 x 24
  - then 64 maps of 8 x 8
- **VGG16 on CIFAR-10** (3 x 3 convolutions, padding 1, 32 x 32 input):
  - pools 64 maps of 32 x 32
  - then 128 maps of 16 x 16
  - then 256 maps of 8 x 8
  - then 512 maps of 4 x 4

Two of these sizes are not printed with the networks: the MNIST map sizes
assume unpadded 5 x 5 convolutions, and both input sizes are the datasets'
standard sizes.

Channels are pooled one after another, as successive frames. Time steps repeat
the whole sequence.

The published figures are 300 MHz in a 45 nm library and 326k frames/s. At one
neuron per clock, 300 MHz gives 300e6 / 1024 ≈ 293k frames/s for 32 x 32
frames. This design does not reach the 326k figure, which would need about 920
cycles per frame. Clock rate and area (about 15k gate equivalents published)
have not been checked here.

## Where this RTL makes its own choices

The published description gives the structure only at block level:

- a shift register of stages `0 .. n`
- a multiplexer
- a max comparator
- a controller that steers the multiplexer and the comparator

It also gives the 32 x 32 frame, the 16-bit precision, and the pooling rule.
Everything below is this design's own choice:

- **Shift-register length.** Stages `0 .. n` are read as a window formed from
  the incoming neuron plus `n+1` stored neurons.
- **Spike flag.** Each neuron carries its spike flag alongside its potential, so
  the winner's spike can be forwarded. The published block diagram shows
  potentials only.
- **Handshake.** A valid-only stream in raster order, with no back-pressure.
- **Frame size and configuration.** The frame size (width and height) and `Np`
  and `s` are run-time inputs, sampled once per frame.
- **Range of `Np` and `s`.** Any `Np` up to `NP_MAX` and any stride are
  supported. The published text says only that different pool sizes and strides
  are supported.
- **Comparisons.** Signed comparison, with ties resolved toward the latest
  neuron.
- **Reset.** Synchronous, active-low reset of all registers.
- **Throughput.** One neuron per clock, which gives 293k rather than 326k frames
  per second; see above.

The spiking convolutional core that produces the potentials is not part of this
RTL. Its outputs are the block's input ports. The testbenches model its
integrate-and-fire neurons with reset by subtraction.

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog.

| testbench           | what it checks                                                                                   |
|---------------------|--------------------------------------------------------------------------------------------------|
| `tb_mp_shift_reg`   | every stage against a reference history, with random enable gaps                                 |
| `tb_mp_window_mux`  | every window element equals `frame[r-i][c-j]`, for random widths and `Np` 1..3                   |
| `tb_mp_max_cmp`     | signed maximum, winner's spike, tie rule, one-cycle latency                                      |
| `tb_mp_controller`  | window-complete and last flags against the pooling arithmetic; configuration changed mid-frame   |
| `tb_mp_maxpool`     | the whole block at its default size (details below)                                              |
| `tb_mp_maxpool_np3` | the same at `NP_MAX = 3`                                                                         |
| `tb_mp_workloads`   | every pooling layer of both networks, at full channel counts                                     |

`tb_mp_maxpool` runs the two worked examples, random frames of every shape,
stride and pool size, a 24 x 24 integrate-and-fire layer over several time
steps, and back-to-back 32 x 32 frames. It checks:

- the reference output values
- each output's exact cycle
- the 1024-cycle frame period

It also counts that each mechanism occurred: overlapping windows, pool size 1,
gaps, mid-frame configuration changes, ties, negative maxima and uncovered
edges.

`tb_mp_workloads` uses 10 time steps for MNIST and 100 for VGG16, about
12.9 million cycles, and runs in a few seconds.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mp_pkg.sv tb/tb_mp_maxpool.sv --top-module tb_mp_maxpool -o sim
./obj_dir/sim
```

Replace `tb_mp_maxpool` with any other testbench name.

## Files

- `rtl/mp_pkg.sv`: default sizes and the width helpers
- `rtl/mp_shift_reg.sv`: line buffer
- `rtl/mp_window_mux.sv`: window multiplexer
- `rtl/mp_controller.sv`: position, stride and configuration control
- `rtl/mp_max_cmp.sv`: max comparator and output register
- `rtl/mp_maxpool.sv`: top level
- `tb/`: the testbenches listed above
