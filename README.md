# Gaussian pyramid processor

A hardware block that builds a Gaussian image pyramid in memory. It takes an
8-bit grey image and produces a series of smaller copies of it, each
low-pass filtered and shrunk to 5/6 of the previous level's width and
height. A host processor programs it over the APB. Two AHB-Lite DMA masters
then read the source image, run it through a separable 2-D filter, and write
every further level back to memory, one level after another. No host help is
needed between levels. The image size and the number of levels are
registers, so any camera resolution up to 640 pixels per line, and up to 31
levels, runs on the same hardware.

At the default parameters and with 10 % random bus wait states, simulated
13-level pyramids take:

| source image | clock cycles | time at 30 MHz |
|--------------|--------------|----------------|
| 160 x 120    | 0.78 M       | 0.026 s        |
| 320 x 240    | 3.15 M       | 0.105 s        |
| 640 x 480    | 12.64 M      | 0.42 s         |

## The reduction step

One pyramid level is made from the previous one by a REDUCE step, which has
two parts:

1. **Low-pass filter.** A 3-tap `[1 2 1] / 4` kernel is applied along each
   line, then along each column. The 2-D kernel is separable, so two 1-D
   passes cost three multiply-free accumulations per pixel each, instead of
   nine.
2. **6-to-5 decimation.** The filtered line is resampled by linear
   interpolation. Output `k` sits at input position `1.2 k`. In each group of
   six inputs `x0..x5` the five outputs are:

   | output | value                      | weights / 256 |
   |--------|----------------------------|---------------|
   | y0     | x0                         | pass-through  |
   | y1     | 0.8 x1 + 0.2 x2            | 205, 51       |
   | y2     | 0.6 x2 + 0.4 x3            | 154, 102      |
   | y3     | 0.4 x3 + 0.6 x4            | 102, 154      |
   | y4     | 0.2 x4 + 0.8 x5            | 51, 205       |

   Because each weight pair sums to 256, an 8-bit result never overflows. The
   sum is shifted right by 8, and the result is truncated.

A line of `n` pixels gives `floor(5 (n - 1) / 6) + 1` outputs: an output is
made only when every input it needs exists. Past the ends of a line or a
column, the filter repeats the edge pixel. A 320 x 240 image therefore
shrinks to 266 x 200, then 221 x 166, 184 x 138, and so on, down to
34 x 26 at level 12.

## Datapath

Each of the four 1-D units is a small serial datapath with one adder and an
accumulator. Its multiplexer selects and register loads are named after
the control bits that drive them:

- **`hfir`, horizontal FIR.** It has a three-register shift chain
  (`h_load[0]`), a tap mux (`h_sel[1:0]`), an optional ×2 (`h_sel[2]`) and
  an adder onto 0 or the 10-bit accumulator (`h_sel[3]`, `h_load[1]`). The
  output is the accumulator `>> 2`. One output takes three accumulate
  cycles, so the filter runs at 5 cycles per pixel.
- **`hdec`, horizontal 6-to-5 decimation.** It has an input register
  (`hd_load[0]`) and a weight mux over 51/102/154/205 (`hd_sel[1:0]`), which
  feeds an 8 × 8 multiplier. Next come an adder onto 0 or the 16-bit
  accumulator (`hd_sel[2]`) and an output mux (`hd_sel[3]`). The output mux
  loads either the sum or the pixel `<< 8`, which is the pass-through output
  y0. The output is the accumulator `>> 8`.
- **`vfir`, vertical FIR.** The three pixels of a column arrive one after
  another from line memory A through one register (`v_load[0]`). They are
  accumulated with the centre one doubled (`v_sel[1]`, `v_sel[2]`,
  `v_load[1]`).
- **`vdec`, vertical decimation.** It interpolates between the same column
  of the previous filtered row and the current one. The previous row's pixel
  is held in a register loaded from line memory B (`vd_load[0]`). The
  current row's pixel comes straight from `vfir`. A mux (`vd_sel[0]`) picks
  which of the two is multiplied by the weight from `vd_sel[2:1]`. The
  phase of the row (`r mod 6`) picks the weights. Phase 1 rows produce
  nothing.

## Line memories and scheduling (`prf`)

`prf` sequences one REDUCE step, and this is the hardest part of the design
to follow.

Input words are taken from the DMA input FIFO and split into pixels, lowest
byte first. They go through `hfir` and `hdec`, and each reduced line is
written into **line memory A**. Line memory A is a ring of three reduced
lines of up to `MAX_WO = floor(5 (MAX_W - 1) / 6) + 1` pixels each, which
is 533 for `MAX_W = 640`.

The vertical pass needs rows `r-1`, `r` and `r+1`. Once all three are in
the ring, `prf` stops reading input and produces filtered row `r`, one
column at a time:

1. Over three cycles it reads column `j` of the three ring slots into
   `vfir`, one per cycle. At the top and bottom edges it reads the edge slot
   twice.
2. In the first of those cycles it also reads column `j` of **line memory
   B**, which holds the previous filtered row, into `vdec`'s register.
3. Once `vfir`'s result is ready, `vdec` combines the two pixels.
4. The new filtered pixel is written back into line memory B, in the place
   of the pixel just used.

The passes alternate, one line in and then one row out. Because of this
order, a new line never overwrites a ring slot that the vertical pass still
needs; an assertion (`a_ring_safe`) guards this rule.

Output pixels are packed four to a word into the output FIFO. Each level is
padded with zero pixels to a whole 16-pixel burst. Input words past the end
of the image are read and dropped. The source DMA reads whole bursts, so
such words can exist.

The horizontal pass costs about 5 cycles per input pixel. The vertical pass
costs about 10 cycles per pixel of a reduced line. The passes do not
overlap.

## DMA and bus

`src_dma` and `dst_dma` are AHB-Lite masters. Each moves 16 pixels per
burst, as one INCR4 burst of 32-bit words.

- `src_dma` starts a burst only when the input FIFO has room for all four
  words.
- `dst_dma` starts a burst only when the output FIFO holds four words.

The FIFOs (`sync_fifo`) are first-word-fall-through and eight words deep.
Without wait states a burst takes six cycles, so `N` bursts take `6N + 2`
cycles from start to done. Both masters hold address and control while
`HREADY` is low, and assertions check this. `HRESP` is ignored. Each master
has its own port, so an AHB interconnect in front of them must arbitrate
the two.

## Registers and the level loop

`gpp_regs` is an APB slave with no wait states:

| offset | name   | bits                                                        |
|--------|--------|-------------------------------------------------------------|
| 0x00   | CTRL   | [0] write 1 to start (ignored while busy)                   |
| 0x04   | STATUS | [0] busy, [1] done (sticky, write 1 to clear), [12:8] levels finished |
| 0x08   | SRC    | source image byte address, 16-byte aligned                  |
| 0x0C   | DST    | byte address of level 1, 16-byte aligned                    |
| 0x10   | SIZE   | [11:0] width, [27:16] height                                |
| 0x14   | LEVELS | [4:0] number of levels, the source image included           |

After reset SIZE is 320 x 240 and LEVELS is 13. `irq` follows the done flag.

`gpp_ctrl` runs the steps. For each level it does the following:

1. It starts the source DMA, the filter and the destination DMA together.
2. It waits for all three to report done.
3. It makes the level just written the next source.

The levels are stored one after another from DST, each rounded up to
16 bytes. For 320 x 240 the order is level 1 at DST, level 2 at
`DST + 53200`, and so on. LEVELS of 0 or 1, or an empty image, finishes at
once.

## Departures and choices

The filter structure is fixed by the design it follows: a separable 3-tap
filter, a 6-to-5 decimation with weights 51/102/154/205, and the datapath
registers and muxes named above. So is the overall flow: a source DMA and an
input FIFO, a horizontal pass into line memory A, a vertical pass through
line memory B, then an output FIFO and a destination DMA, with 16 pixels per
DMA transfer.

The following are this design's own choices:

- **Reduction factor.** Decimation is by 5/6, as the filter datapath implies.
  The classic factor-of-two REDUCE is not used.
- **Filter details.** The kernel weights `[1 2 1]/4` follow from the single
  ×2 stage and the `>> 2` shift. Results are truncated. Edges repeat the edge
  pixel. The output size rule is the one given above.
- **Memory layout.** Pixels are packed little-endian, and each level is
  padded to a whole burst.
- **Host interface.** The register map, the APB attachment and the hardware
  level loop are new.
- **Bus.** The bursts are INCR4. There are two separate master ports and no
  error handling.
- **Sizes.** Line memory A holds three lines, `MAX_W` is 640 and the FIFOs
  are eight words deep.
- **Start signalling.** The source DMA does not start the filter; all three
  units are started together, and the filter simply waits for input data.
  The destination DMA starts writing when a burst's worth of data is in the
  output FIFO.
- **Throughput.** No rate is given per pixel. Measured over a whole pyramid,
  this design needs fewer cycles than the 4.8 Mcycles quoted for the
  13-level 320 x 240 case.

The platform around the processor is not included: the host CPU, the AHB
decoder and multiplexer, the AHB-to-APB bridge, the SDRAM controller, the
camera interface and the I2C master.

## Files

| file | contents |
|------|----------|
| `rtl/gpp_pkg.sv` | widths, weights, AHB encodings, register map, size functions |
| `rtl/gpp_top.sv` | the processor: registers, sequencer, DMAs, FIFOs, filter, line memories |
| `rtl/gpp_regs.sv`, `rtl/gpp_ctrl.sv` | host registers, level sequencer |
| `rtl/src_dma.sv`, `rtl/dst_dma.sv`, `rtl/sync_fifo.sv` | AHB-Lite DMA masters and their FIFOs |
| `rtl/prf.sv` | one REDUCE step: unpacking, scheduling, packing |
| `rtl/hfir.sv`, `rtl/hdec.sv`, `rtl/vfir.sv`, `rtl/vdec.sv` | the four 1-D filter units |
| `rtl/line_mem.sv` | simple dual-port RAM used for line memories A and B |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/gpp_top_tb.sv` | end-to-end tests at several sizes |
| `tb/gpp_full_tb.sv` | 13-level 320 x 240 pyramid at the default parameters |
| `tb/gpp_workload_tb.sv` | 13-level pyramids of 640 x 480 and 160 x 120 images |
| `tb/gpp_ref_pkg.sv` | reference model of REDUCE used by the testbenches |
| `tb/ahb_mem.sv` | two-port AHB-Lite memory with random wait states |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one
has a watchdog. Build and run a testbench with Verilator 5, for example the
full-size run:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/gpp_pkg.sv tb/gpp_ref_pkg.sv tb/gpp_full_tb.sv --top-module gpp_full_tb
./obj_dir/Vgpp_full_tb
```

Verilator finds the other modules through `-I`. A block testbench needs only
`rtl/gpp_pkg.sv`, the block's own file and the testbench. Add
`tb/gpp_ref_pkg.sv` for `prf_tb`, `gpp_ctrl_tb` and the top-level tests.

What the testbenches cover:

- **Reference model.** The filter and top-level testbenches compare against
  the reference model on random images. Sizes run from 1 x 1 to 640 pixels
  wide, and include every width modulo 6.
- **Cycle counts.** They check the 5-cycle pixel rate of `hfir`, the
  26-cycles-per-6-pixels rate of `hdec` and the DMA burst timing.
- **Stress.** The end-to-end test forces wait states on both ports and
  stalls on both FIFOs. It fails if any of these mechanisms never occurs.

The full-size run takes a few seconds, and the 640 x 480 run under ten.
