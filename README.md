# Linear convolution with Urdhva Tiryagbhyam (Vedic) multipliers

This RTL computes the linear convolution of two short integer sequences. It
uses the *direct method*: the two sequences are written down like the
operands of a long multiplication. Every sample of one sequence is multiplied
by every sample of the other, and each column of products is summed on its
own. Unlike real multiplication, no carry passes from one column to the next.
The column sums are the convolution outputs.

The multiplications use the Vedic "vertically and crosswise" (Urdhva
Tiryagbhyam) scheme, and the column sums use carry look-ahead and carry-save
adders. There are two versions of the same computation:

* a **parallel convolver** with sixteen multipliers. It is purely
  combinational and fast.
* a **serial convolver** with one multiplier shared by all sixteen products.
  It is smaller and needs 16 clock cycles.

Both take two sequences of four unsigned 4-bit samples and return seven
outputs.

## The direct method and the output numbering

Call the sequences `x = [a b c d]` and `h = [e f g h]`. In the RTL,
`x[0] = a` and `h[0] = e`. Lay them out like a multiplication, with `d` and
`h` in the rightmost column:

```
                 a   b   c   d
                 e   f   g   h
   ---------------------------
                ah  bh  ch  dh
            ag  bg  cg  dg
        af  bf  cf  df
    ae  be  ce  de
   ---------------------------
 conv6 conv5 conv4 conv3 conv2 conv1 conv0
```

The outputs are numbered from the right. So `conv6 = a*e` is the *first*
sample of the usual convolution `y[n] = sum_j h[j] x[n-j]`, and
`conv0 = d*h` is the last. In general `conv(6-n) = y[n]`, and product
`x[i]*h[j]` lands in column `6-(i+j)`.

Worked example: `(4 4 3 2) * (4 5 6)` gives `y = (16 36 56 47 28 12)`. To
run it, pad the shorter sequence with a trailing zero:
`x = [4 4 3 2]`, `h = [4 5 6 0]`. The outputs are then conv6..conv0 =
16, 36, 56, 47, 28, 12, 0.

Output widths are the smallest that hold the worst case of 15 x 15 per
product:

| output | products          | adder                           | width |
|--------|-------------------|---------------------------------|-------|
| conv6  | ae                | none                            | 8     |
| conv5  | af+be             | carry look-ahead                | 9     |
| conv4  | ag+bf+ce          | carry-save + ripple-carry       | 10    |
| conv3  | ah+bg+cf+de       | carry-save + ripple-carry       | 10    |
| conv2  | bh+cg+df          | carry-save + ripple-carry       | 10    |
| conv1  | ch+dg             | carry look-ahead                | 9     |
| conv0  | dh                | none                            | 8     |

They are bundled in the packed struct `conv_pkg::conv_out_t`.

## The Vedic multiplier

`vedic_mul2x2` multiplies two 2-bit numbers in three column steps:

1. The *vertical* product `a0*b0` is bit 0.
2. The two *crosswise* products `a1*b0` and `a0*b1` go into a half adder.
   Its sum is bit 1.
3. The second vertical product `a1*b1` and the carry from step 2 go into a
   second half adder. This gives bits 2 and 3.

`vedic_mul4x4` applies the same idea one level up. It splits each 4-bit
operand into 2-bit halves and forms the four 2x2 products at the same time
(low x low, the two crosswise pairs, high x high). It then adds them at
weights 1, 4, 4 and 16. The adders that merge the four partial products are
plain word-level `+`. Nothing prescribes their structure, so a synthesis tool
is free to choose it. The multiplier is combinational. For example,
1101 x 1010 = 1000 0010 (13 x 10 = 130).

## Column adders

`conv_adders` holds the five adders of the table above and is shared by both
convolvers.

* `cla_adder` (two operands, default `WIDTH = 8`). Every carry is computed
  directly from the generate and propagate bits as a two-level sum of
  products. There is one flat look-ahead level with no carry groups.
* `csa_rca` (`NOPS` operands, default `WIDTH = 8`, `NOPS = 3`). `NOPS-2` rows
  of full adders reduce the operands to a sum vector and a carry vector; no
  carry moves sideways inside a row. A ripple-carry adder then adds the two
  vectors. It is used with three operands for conv2 and conv4, and with four
  for conv3. The result has `WIDTH + $clog2(NOPS)` bits.

## Parallel convolver (`conv_parallel`)

Sixteen `vedic_mul4x4` instances, one per product, feed `conv_adders`. There
is no clock, register or handshake: `conv` follows `x` and `h` after one
multiplier delay plus one adder delay.

The parallel block diagram this design follows still draws a demultiplexer
with select lines between the multipliers and the adders. With one multiplier
per product, each product always goes to the same column, so here that
demultiplexer is just wiring and there are no select inputs.

## Serial convolver (`conv_serial`)

One `vedic_mul4x4` is time-shared over the sixteen products:

```
 x,h --latch--> 8 x mux4_slice --y7..y4 / y3..y0--> vedic_mul4x4 --z7..z0-->
      demux16 --> 16 product registers --> conv_adders --> conv
                 ^ sel = {s3,s2,s1,s0}, store  (serial_ctrl)
```

* **Input multiplexers.** There are eight bit-sliced 4:1 multiplexers
  (`mux4_slice`). The one for bit k of the multiplicand sees bit k of a, b, c
  and d, and select lines s1:s0 pick the sample. The four for the multiplier
  use e..h, picked by s3:s2. Select value 0 picks a (or e) and 3 picks d
  (or h).
* **Demultiplexer.** `demux16` steers the 8-bit product to slot
  `sel = {s3,s2,s1,s0}`, that is slot `4*j + i` for `x[i]*h[j]`. It also
  raises a one-hot strobe for that slot.
* **Product registers.** Sixteen 8-bit registers load from the demultiplexer
  strobes. The adders read from them.
* **Controller.** `serial_ctrl` is a two-state FSM with a 4-bit counter that
  drives the select lines.

Timing of the serial convolver:

* `start` is sampled at a rising edge; call it edge 0. At that edge `x` and
  `h` are latched, so they may change during the run.
* At edges 1 to 16 the products for `sel` = 0 to 15 are stored, one per
  clock. `busy` is high during those 16 cycles.
* After edge 16, `done` is high for one cycle, and `conv` is valid. The
  result stays valid until the next start.
* Latency is 16 clocks. The next run can start in the cycle `done` is high.
* A `start` while `busy` is ignored.
* `rst_n` is an asynchronous, active-low reset. It clears the controller,
  the operand latches and the product registers.

Two assertions in `serial_ctrl` check the sequencing: the select lines
advance by one each clock during a run, and `done` never rises while busy.

## Top level (`conv_top`)

`conv_top` places the two convolvers side by side. They share nothing:

* `par_x`, `par_h` and `par_conv` belong to the parallel convolver.
* `clk`, `rst_n`, `ser_start`, `ser_x`, `ser_h`, `ser_busy`, `ser_done` and
  `ser_conv` belong to the serial convolver.

The serial version trades speed for area and the parallel one the reverse.
Both are built so either can be used.

## What comes from the method and what is this design's choice

These parts follow the described architecture:

* 4-bit samples, four-sample sequences and 8-bit products.
* The direct method and the column layout, with the outputs named
  conv0..conv6.
* The 2x2 Vedic rule, and a 4x4 multiplier made of four 2x2 ones.
* Carry look-ahead adders for the two-product columns, and carry-save adders
  with a ripple-carry last stage for the three- and four-product columns.
* In the serial version: bit-sliced 4:1 input multiplexers with select lines
  s1 s0 and s3 s2, one multiplier, and a 1:16 demultiplexer on s0..s3.
* In the parallel version: sixteen multipliers and no multiplexers.

These are this implementation's own choices:

* Unsigned samples and the output widths.
* The gate-level form of the half adders, and plain `+` for merging the 2x2
  products.
* A flat look-ahead, and the order of the carry-save rows.
* The select encoding.
* In the serial version: the product registers, the operand latch, the whole
  controller (start/busy/done, 16-cycle schedule, reset), and the zeroing of
  unselected demultiplexer outputs. The architecture shows the demultiplexer
  feeding the adders directly, without saying how products are held between
  cycles.
* In the parallel version: leaving out the demultiplexer (see above).

Not built: a carry-save adder with a carry look-ahead last stage, and a plain
ripple-carry adder. Both appear only as alternatives in an adder comparison.
Reported FPGA delays and slice counts (4x4 multiplier about 11.7 ns; serial
convolver about 160 ns and 212 slices; parallel about 18 ns and 340 slices,
Spartan 3E) are not reproduced here.

## Files

| file | content |
|------|---------|
| `rtl/conv_pkg.sv` | widths `DW=4`, `NSEQ=4`, `PW=8`; `sample_t`, `prod_t`, `prod_grid_t`, `conv_out_t` |
| `rtl/vedic_mul2x2.sv`, `rtl/vedic_mul4x4.sv` | Vedic multipliers |
| `rtl/cla_adder.sv`, `rtl/csa_rca.sv`, `rtl/conv_adders.sv` | column adders |
| `rtl/mux4_slice.sv`, `rtl/demux16.sv`, `rtl/serial_ctrl.sv`, `rtl/conv_serial.sv` | serial convolver |
| `rtl/conv_parallel.sv` | parallel convolver |
| `rtl/conv_top.sv` | both side by side |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/conv_ref_pkg.sv` | integer reference model of the column sums |

## Simulating

Each testbench checks its module against values computed independently of
it. Each one ends by printing `TB_RESULT checks=N failures=M`, and has a
watchdog. The tests cover:

* the multipliers exhaustively;
* the adders with long carry chains and random operands;
* the multiplexer and demultiplexer exhaustively;
* the controller's 16-cycle schedule, its done pulse and an ignored start;
* both convolvers with the worked example, all-maximum inputs and random
  sequences.

`tb_conv_top` runs the whole design at its default sizes. It applies each
sequence pair to both convolvers and compares them with the reference and
with each other. It also checks the 16-clock latency, and it counts that each
product slot was written on every run. Finally, it checks that an ignored
start, immediate restarts and a held result each occurred.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/conv_pkg.sv tb/conv_ref_pkg.sv tb/tb_conv_top.sv \
    --top-module tb_conv_top -o sim
./obj_dir/sim
```

Replace `tb_conv_top` with any other `tb_<module>` to test a single block.
The modules are found through `-Irtl` and `-Itb`, one module per file. All
simulations finish in well under a second.

## Changing the design

* The sample width and sequence length are `conv_pkg` constants, but the
  datapath is written for the 4 x 4 case. The 4x4 multiplier, the sixteen
  slots of the serial demultiplexer and the explicit column list in
  `conv_adders` would all need to grow with them.
* `cla_adder` and `csa_rca` are fully parameterised and can be reused on
  their own.
