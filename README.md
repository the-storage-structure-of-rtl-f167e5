# MPRA — a multi-precision, reconfigurable CNN convolution engine

This RTL computes the convolutional layers of a CNN with 24 processing
engines (PEs). The engines share one input window and apply different
filters. The design rests on two ideas:

* **One multiplier array, three precisions.** Each PE has nine 16x16
  multipliers. Each multiplier is built from four byte multipliers. A PE can
  therefore act as nine 16x16 MACs, eighteen 16x8 MACs or thirty-six 8x8
  MACs. The PEs can also be grouped, so the same array runs 3x3, 5x5 and 7x7
  kernels.
* **One on-chip memory read per window column.** The image sits in a 128 KB
  Data Buffer in a "set-column" layout. A small 112-byte store (T_SRAM) holds
  the lines that cross a set boundary. Every window column is therefore a
  single buffer read, and the PEs get a new window every clock.

With 24 PEs x 9 multipliers x 2 operations, a 640 MHz clock would give
276.5 GOPS at 16 bits and four times that (1105.9 GOPS) at 8 bits. That is the
figure the architecture is sized for. This RTL has not been timed at that
frequency.

All sizes are the architecture's own: 24 PEs, a 128 KB Data Buffer, a 1 KB
Parameter Buffer, a 48 KB P_SRAM and a 112-byte T_SRAM (177 KB of SRAM in
all). Section "Design choices" lists everything the architecture leaves open
and how this RTL fills it in.

## Block diagram

```
 host ──► Data Buffer 128 KB ──► Data Register Group ──► PE array (24 PEs) ──► P_SRAM 48 KB ──► host
              │   ▲               (7x7 window regs)        ▲                   (24 banks,
              ▼   │                      ▲                 │                    accumulate)
           T_SRAM 112 B ─────────────────┘       Weight Register Group
                                                          ▲
 host ──► Parameter Buffer 1 KB ──────────────────────────┘
                         Controller sequences all of it, one run at a time
```

## Set-column storage in the Data Buffer

An image of width W and height 7·N is cut into N *sets*. Set s covers the
seven image lines 7s .. 7s+6, called a0..a6. It also carries one redundant
line, a7, which is a copy of line 7s+7: the first line of the next set. The
redundant line of the last set is zero.

A Data Buffer word is 128 bits: the eight 16-bit pixels of one column of one
set (row r in bits `[16r +: 16]`). The word for set s and column c of an image
stored at `base` is at address `base + s*W + c`. So one read delivers a
vertical strip of eight lines. A 3x3 window centred on any of a0..a6 needs
at most one line that is not in that word.

Example, 56x56 image, 3x3 kernel: there are 8 sets and 448 words per channel,
and the 128 KB buffer holds 18 such channels.

The controller works one *output line* at a time. For line l of set s it
sweeps the columns from `col0-H` to `col0+S-1+H`, where H = (K-1)/2 and the
output strip is S columns wide starting at `col0`. For each column it reads
the set's word and builds the K-row slice `l-H .. l+H`:

| needed row q | comes from |
|---|---|
| q < 0 (above a0) | T_SRAM slot q+H = previous set's line a(7+q) |
| 0 ≤ q ≤ 7 | the Data Buffer word, row q (a7 is the redundant line) |
| q > 7 (below a7) | T_SRAM slot q−8 = next set's line a(q−7) |

Columns outside the image, and lines above the first set, are zero. This
gives "same" padding: the output map has the size of the input.

## T_SRAM: boundary lines without a second read

T_SRAM is 56 entries of 16 bits, with three read and three write ports. The
entry for slot j and image column c is `j*NC + (c − first column)`. NC is the
number of image columns the strip touches. In one run the same entries hold
two different things at different times:

1. **Previous-set lines (TPREV phase).** Before the first line of set s is
   swept, the last H lines a(7−H)..a6 of set s−1 are copied in. That is
   one Data Buffer read per column, with H entries written. For 3x3 this is
   line a6 alone. For a 56-wide image that fills exactly 56 entries.
2. **Next-set lines (TNEXT phase, 5x5 and 7x7 only).** Lines 0..7−H need
   nothing from below a7. Once they are done, the previous-set lines are no
   longer needed. Lines a1..a(H−1) of set s+1 are then pre-read into the same
   entries before the last H−1 output lines. For 5x5 this is one line, a1 of
   the next set (the ninth line, "a8", counted from a0), and it is read just
   before output line a6.

Capacity decides the strip width. A 3x3 kernel on a 56-wide image needs
1 x 56 entries. A 5x5 kernel on a 28-wide image needs 2 x 28. Both fit at full
width. A 7x7 kernel on a 224-wide image would need 3 x 224 entries, so it
runs in strips of at most 12 output columns (18 image columns x 3 lines ≤ 56).
The controller asserts that a run fits.

## PEs and the three precisions

`mpra_mp_mul` splits data `a` and weight `b` into high and low bytes and forms
four 9x9 signed products: hh, hl, lh and ll. A low byte is zero-extended when
it is the lower half of a 16-bit number. It is sign-extended when it is an
8-bit number of its own. The products combine as follows:

| mode | data word | weight word | lanes |
|---|---|---|---|
| `PREC_16X16` | one 16-bit pixel | one 16-bit weight | 0: a·b = hh·2¹⁶ + (hl+lh)·2⁸ + ll |
| `PREC_16X8` | one 16-bit pixel | filter H byte, filter L byte | 0: a·bH, 1: a·bL |
| `PREC_8X8` | image H byte, image L byte | filter H byte, filter L byte | 0: aH·bH, 1: aH·bL, 2: aL·bH, 3: aL·bL |

So in 8x8 mode each PE computes four 3x3 convolutions: two images (or
feature maps) packed into the data bytes, times two filters packed into the
weight bytes.

A PE adds its nine products lane by lane. The result is four 32-bit lane
sums, registered, one cycle after the window.

## PE array reconfiguration

| kernel | PEs per filter | filters at once | PE j of a group takes |
|---|---|---|---|
| 3x3 | 1 | 24 | the whole window |
| 5x5 | 3 (27 MACs) | 8 | taps 9j .. 9j+8 of the row-major window |
| 7x7 | 6 (54 MACs) | 4 | taps 9j .. 9j+8; taps past 49 are zero |

The window is broadcast to all PEs. The group's lane sums are added and
written to the P_SRAM bank of the group's first PE. The results of filter f
therefore sit in bank f·G, where G is the number of PEs per filter.

## P_SRAM: accumulating over input channels

P_SRAM has one bank per PE, each 512 x 32 bits. Each output window does a
read-modify-write to address `line*S + (column − col0)`. Back-to-back updates
of one address are forwarded. A 32-bit word holds one, two or four signed
lanes of 32, 16 or 8 bits, in the lane order above. A lane is updated as:

```
v    = saturate_n( pe_lane >>> shift )
word = saturate_n( (first ? offset : word) + v )
```

The offset (bias) is the PE's 16-bit offset word in 16x16 mode. In the 8-bit
modes, lanes 0 and 2 take its high byte and lanes 1 and 3 its low byte, so
each filter has its own offset.

A run produces 7·S words per bank, so strips are at most 73 columns wide.
The 56- and 28-wide images fit whole.

## Running a layer

A *run* is one input channel x one set x one output strip. The host:

1. writes the image words into the Data Buffer (`db_we`) and the 240
   parameter words of the channel into the Parameter Buffer (`pb_we`). The
   layout is PE p, tap t at `wbase + 9p + t`, then the offset of PE p at
   `wbase + 216 + p`. Non-first PEs of a group normally get offset 0.
2. pulses `start` with a `run_cfg_t` (fields are listed in `mpra_pkg.sv`):
   kernel, precision, width, number of sets, set index, col0, S, Data Buffer
   base, parameter base, `first` and `shift`.
3. waits for `done`, repeats for the other input channels with `first = 0`,
   then reads the set's results with `ps_rd_*`. Data appears one cycle after
   `ps_rd_en`.

The host must not write the buffers or P_SRAM while `busy` is high.

Cycle count of one run, from the `start` cycle to `done`:

```
1 + 241 (weight load) + (NC+1) (TPREV) + 7*(S+2H) (sweeps)
  + (NC+1 if K>3) (TNEXT) + 6 (drain)
```

During the sweeps the array takes one window per cycle. Only the 2H fill
columns of each line cost extra cycles.

Example: 3x3 on a 56x56 set at full width takes 1 + 241 + 57 + 406 + 6 = 711
cycles. That delivers 392 windows x 24 filters.

## Design choices

These points are not fixed by the architecture. They were decided here:

* The multi-precision multiplier built from four byte multipliers, and the
  packing of two images / two filters into the bytes of one word.
* 7x7 as groups of six PEs, the split of taps between the PEs of a group,
  and the broadcast of one window to all groups.
* The line-by-line sweep order, T_SRAM's three ports and its slot layout,
  strips for the 7x7 / 224-wide case, and zero padding at the borders.
* The P_SRAM word format: lanes, shift, saturation and offset. Accumulation
  over channels happens in P_SRAM. Intermediate results are not written back
  into the Data Buffer, although the architecture allows for that.
* Weights are reloaded at every run (240 cycles) and are not
  double-buffered.
* Numbers are signed two's-complement integers. The fixed-point scale is set
  by `shift`. PE lane sums wrap at 32 bits.
* The off-chip DRAM and its interface are not part of the RTL. Host write and
  read ports take their place. All memories are plain synchronous arrays, to
  be replaced by SRAM macros in an implementation.
* The reported AlexNet rate for this architecture (176.7 frames/s) cannot be reproduced with
  this RTL. AlexNet's first layer is 11x11 with stride 4, which the array
  does not support. Only 3x3, 5x5 and 7x7 kernels at stride 1 are built.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mpra_pkg.sv \
          tb/tb_mpra_top.sv --top-module tb_mpra_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_mpra_top` with any other testbench name to run it.

`tb_mpra_top` runs the whole design at its default sizes and compares every
output with a reference convolution computed in the testbench. It covers:

* 3x3 on a 14-wide image and on all eight sets of a 56x56 image;
* 5x5 on a partial strip of a 10-wide image and on all four sets of a
  28x28 image;
* 7x7 on a 12-wide image, and on a 12-column strip in the middle of a
  224x224 image;
* every precision mode, multi-channel accumulation, previous-set fills,
  next-set pre-reads and saturation.

It also checks every run's cycle count against the formula above, and fails
if any of these mechanisms never occurred. It takes a few seconds.

The unit testbenches check:

* the PE's lane products in every mode;
* the PE array's grouping;
* the window register's row selection;
* T_SRAM and the buffers;
* P_SRAM's update rule, including forwarding;
* the controller's address sequences and its T_SRAM traffic.

## Files

| file | content |
|---|---|
| `rtl/mpra_pkg.sv` | sizes, `prec_e`, `ker_e`, `run_cfg_t`, helper functions |
| `rtl/mpra_mp_mul.sv` | byte-split multi-precision multiplier |
| `rtl/mpra_pe.sv` | PE: nine multipliers and lane adder tree |
| `rtl/mpra_pe_array.sv` | 24 PEs, kernel-dependent grouping |
| `rtl/mpra_data_buffer.sv` | 128 KB set-column image buffer |
| `rtl/mpra_param_buffer.sv` | 1 KB weight/offset buffer |
| `rtl/mpra_tsram.sv` | 112-byte boundary-line store |
| `rtl/mpra_data_reg_group.sv` | window register and row selection |
| `rtl/mpra_weight_reg_group.sv` | per-PE weight and offset registers |
| `rtl/mpra_psram.sv` | 48 KB accumulating result store |
| `rtl/mpra_controller.sv` | run sequencer |
| `rtl/mpra_top.sv` | top level |
