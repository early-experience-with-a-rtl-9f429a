# K-Means clustering accelerators for a hybrid processor

K-Means clustering groups the pixels of a multi- or hyper-spectral image into a fixed
number of classes. Each pixel is a vector with one component per spectral band (for
example 224 bands of 8 to 14 bits). The algorithm repeatedly assigns every pixel to
the class whose center is nearest and then moves each center to the mean of its
pixels. Nearly all of the run time goes into the distance search: for every pixel,
the Manhattan distance `sum_d |pixel[d] - center[k][d]|` to every class center `k`.

This RTL is the user logic of a *hybrid processor*: a small RISC processor and
configurable logic on one chip, joined by memory-mapped busses. The processor keeps
the bookkeeping of K-Means (file I/O, loop control, moving pixels between classes,
recomputing centers). The user logic takes over the distance search, in two
alternative ways of different granularity:

1. **Distance step** (`dist_pio`, `dist_calc`). One statement of the inner loop,
   `dist = dist + |pixel - center|`, becomes a single-cycle hardware operation. The
   processor sends three operands and reads one result for every band of every
   pixel/class pair.
2. **Linear array** (`array_accel`). The whole loop over classes is unrolled into
   a chain of cells, one per class. Each cell holds its class center. Pixels stream
   through the chain, and the number of the nearest class comes out at the far end.
   The processor sends each pixel component once and reads one result per pixel.

Both accelerators sit behind one bus decoder (`kmeans_hybrid_top`). Either can be
used on its own.

## Structure

```
 processor bus (32-bit, word addresses 0..15)
        |
   pio_decoder ---- adds WAIT_STATES clocks to every access
     |        \
 dist_pio      array_accel
 (addr 0-4)    (addr 8-10)
     |          |
 dist_calc     stream_sender -> systolic_array -> result_collector
                               cell 0 .. cell NB_CLASS-1
                               (kmeans_cell + center_mem each)
```

| file | what it is |
|---|---|
| `kmeans_pkg.sv` | widths, the stream word `stream_t`, `abs_diff` |
| `pio_bus_if.sv` | register port between the decoder and each accelerator |
| `pio_decoder.sv` | wait states and address split |
| `dist_pio.sv`, `dist_calc.sv` | first accelerator |
| `array_accel.sv` | second accelerator: registers plus the three blocks below |
| `stream_sender.sv` | head of the array: numbers bands, tags center words |
| `systolic_array.sv`, `kmeans_cell.sv`, `center_mem.sv` | the chain of cells |
| `result_collector.sv` | tail of the array: result FIFO and stall |
| `kmeans_hybrid_top.sv` | both accelerators behind the decoder |

The processor, its instruction/data memory and the software outer loop are not RTL.
The bus ports of `kmeans_hybrid_top` are where the processor connects, and the
testbenches play the role of the software.

## Register map

All registers are 32-bit words. Every access takes `WAIT_STATES + 1` clocks (3 by
default). Some accesses to the array take longer, as noted below.

| address | dir | name | meaning |
|---|---|---|---|
| 0 | W/R | `ul_reset` | bit 0 = 1 holds `dist_out` at zero |
| 1 | W/R | `center` | center component (16 bits) |
| 2 | W/R | `dist_in` | running distance (16 bits) |
| 3 | W/R | `pixel` | pixel component (16 bits) |
| 4 | R | `dist_out` | `dist_in + |pixel - center|`, mod 2^16 |
| 8 | W | control | `[9]` 1 = the next `NB_BAND` data words are a center, 0 = pixels; `[8]` class active; `[7:0]` class. Always restarts the band count |
| 8 | R | status | `[15:0]` results waiting, `[16]` array stalled |
| 9 | W | data | one component (bits `[15:0]`) of a pixel or center; waits while the array is stalled |
| 10 | R | result | oldest result, `{class[31:24], distance[23:0]}`, removed by the read; waits until a result exists |
| 5-7, 11 | R | | read as zero |

## The distance step

`dist_calc` registers `dist_out <= dist_in + |pixel - center|`, truncated to 16 bits.
The result is ready one clock after the last operand register was written. Through
the decoder, the next read is always late enough. Software computes one distance
like this:

```
for each band d:  write center[d] -> 1, dist -> 2, pixel[d] -> 3;  dist = read 4
```

That is four bus accesses per band and class, so communication dominates. With 8-bit
components the 16-bit distance cannot overflow for up to 257 bands. With 14-bit
components it overflows beyond 4 bands, just as the 16-bit register it is modelled
on would.

## The linear array

### Stream words

Everything travels through the array as a 66-bit `stream_t` word (see
`kmeans_pkg.sv`). Each word carries:

- a valid bit;
- a kind (pixel or center);
- a band number and a last-band flag;
- the target class and an active flag (used by center words);
- one 16-bit component;
- the best `(distance, class)` pair found so far for the pixel (used by pixel
  words).

The sender turns each data write into one word and numbers the bands itself. Pixel
words start with the pair `(all ones, 0)`, the "no class yet" value.

### What one cell does

Every clock in which the array advances, cell `k` copies its input word to its
output register. While doing so it:

- **Stores a center.** If the word is a center word for class `k`, the cell writes
  the component into its `center_mem` at the word's band. It also keeps the word's
  active flag.
- **Accumulates a distance.** If the word is a pixel word, the cell adds
  `|component - center[band]|` to its accumulator. Band 0 restarts the accumulator.
  The center memory is read asynchronously at the incoming band number, so this fits
  in one clock.
- **Updates the best pair.** On the pixel's last band the cell compares its finished
  distance with the pair carried by that word. If its class is active and its
  distance is strictly smaller, it writes `(distance, k)` into the outgoing word.

Two rules follow from the comparison:

- A tie keeps the lower class number, which is what a sequential loop over classes
  with `if (d < min)` does.
- A class with no pixels (inactive) never wins, which matches the loop skipping
  classes whose pixel count is zero.

### Timing

The best pair rides on the pixel's *last* component. That component reaches cell `k`
exactly one clock after cell `k-1` finished with it, so no separate alignment logic
is needed.

- **Latency:** from the clock the last component enters the array to the clock its
  result reaches the collector is `NB_CLASS` clocks.
- **Throughput:** with a full stream, one pixel finishes every `NB_BAND` clocks.
- **Bubbles:** gaps in the stream (the processor is much slower than the array)
  carry no data and change nothing.

```
clock        t     t+1   t+2   ...  t+NB_CLASS
cell 0       p.L   -     -
cell 1       p.L-1 p.L   -
cell 2       p.L-2 p.L-1 p.L
...
collector                           result(p)    (p.L = last band of pixel p)
```

### Center reloads

Centers use the same path as pixels. A new set of centers can therefore follow the
last pixel of a block directly. Every pixel ahead of the centers meets the old
centers in every cell, and every pixel behind them meets the new ones.

To reload class `k`:

1. Write the control register with bit 9 set and the class in bits `[7:0]`.
2. Write `NB_BAND` data words.

After the last band the sender returns to pixel mode on its own. To mark an emptied
class inactive, reload it with bit 8 clear. The cell takes the flag from every
center word, so software only needs to send band 0 and then a control write with
bit 9 clear to restart the pixel count.

### Result buffer and stall

`result_collector` pushes each pixel's `(class, distance)` into a `RES_DEPTH`-entry
FIFO (16 entries by default). When a result reaches the collector while the FIFO is
full, the whole array stalls: every cell and the sender hold, and data writes wait.
Status bit 16 shows this state.

**Software rule:** never have more than `RES_DEPTH + 1` pixels unread before reading
results. A bus master that keeps writing into a stalled array waits forever, because
the single bus cannot read in the meantime. `tb_kmeans_hybrid_top` streams blocks of
17 pixels, sees the stall, then reads 17 results.

A result whose distance is all ones means that no class was active.

### Using it for K-Means

1. Load all centers, marking empty classes inactive.
2. For each block of at most `RES_DEPTH + 1` pixels:
   1. Stream the pixels' components.
   2. Read one result per pixel.
   3. Move the pixels whose class changed and update the per-class sums and counts.
   4. Reload the centers of the classes that changed.
3. Repeat until no pixel moves.

## Parameters

| parameter | default | where |
|---|---|---|
| `NB_CLASS` | 32 | cells in the array, at most 256 |
| `NB_BAND` | 224 | bands per pixel, at most 256 |
| `WAIT_STATES` | 2 | extra clocks per bus access |
| `RES_DEPTH` | 16 | result FIFO entries |

The 32 x 224 default is a synthesized configuration of this architecture. Field
widths are fixed in `kmeans_pkg`:

- 16-bit components;
- 24-bit distances, enough for 256 bands of 16-bit differences without overflow;
- 8-bit band and class numbers.

After coarse synthesis the top has about 3100 flip-flops and 115 kbit of memory
(32 x 224 x 16 center bits plus the FIFO).

The array holds any number of classes up to `NB_CLASS`. It can also run images with
fewer bands than `NB_BAND`: pad pixels and centers with zero bands, which does not
change the distance. Image size is unlimited, because pixels are streamed, not stored.
More classes than cells (the 224-class case, say) needs a larger `NB_CLASS` or the
first accelerator.

## Departures and choices

These points go beyond what the architecture fixes, or differ from its usual form:

- **Registered distance step.** The distance step is a registered one-cycle operation.
  It is sometimes described as purely combinational, but its reference form registers
  the result.
- **Separate clear.** `ul_reset` drives a synchronous clear rather than the
  asynchronous reset of the distance register. The asynchronous `rst` is separate.
- **Bus design.** The bus (Avalon-style waitrequest), the address map, the register
  layout and the control-word format are this design's own.
- **Wait-state count.** Only the two bus wait states of the measured 11-clock word
  transfer are modelled. The rest is processor instruction overhead.
- **Band numbers in the stream.** Each stream word carries its band number, and cells
  do not keep their own band counters.
- **Active flag.** The per-cell active flag implements the "skip empty classes" rule
  of the reference loop. The per-cell algorithm itself does not mention that rule.
- **Result FIFO and stall.** The result FIFO, its depth and the stall are this
  design's own. The architecture only says that results go back to the processor.
- **Center memory.** The center memory reads asynchronously (distributed RAM). A
  block-RAM version would need the read address one stage earlier.

Not built:

- the processor;
- its memories;
- the software outer loop;
- the proposed future variants: a dual-ported memory shared with the user logic, with
  the array fetching pixels itself, and a faster processor clock.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/kmeans_pkg.sv \
          tb/tb_kmeans_hybrid_top.sv --top-module tb_kmeans_hybrid_top
./obj_dir/Vtb_kmeans_hybrid_top
```

| testbench | covers |
|---|---|
| `tb_kmeans_hybrid_top` | default size (32 x 224), K-Means to convergence on a 120-pixel image. Checks every result against a software nearest-center search, array stalls, reloads, inactive classes, the exact 3-clock access time, and distance steps through the first accelerator |
| `tb_kmeans_workload` | 64 pixels / 8 classes / 8 bands clustered with each accelerator: same classes as software in every pass, same final result. Then 224 pixels against 224 classes with the first accelerator |
| `tb_systolic_array` | 6 x 5 array, random stalls and bubbles, reloads behind pixels, ties, `NB_CLASS`-clock latency |
| `tb_kmeans_cell`, `tb_center_mem`, `tb_stream_sender`, `tb_result_collector`, `tb_array_accel`, `tb_dist_calc`, `tb_dist_pio`, `tb_pio_decoder` | each block against a model of its rule |

All of them run in seconds.

The checks compare against models written from the algorithm, not from the RTL. They
cannot show that the behaviour matches the original hardware cycle for cycle, since
its interface timing was never specified beyond the wait-state count.
