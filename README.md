# Super-resolution demosaicking with a 2x bi-cubic up-scaler

This design takes a 256 x 256 colour picture, throws away everything a
single-sensor camera would not have seen, and rebuilds it as a 512 x 512
full-colour picture. It works in two stages:

1. **Demosaicking.** Only one colour per pixel is kept, following a Bayer
   colour filter array (CFA). The two missing colours of every pixel are then
   rebuilt from a 4 x 4 window of neighbouring samples. The arithmetic is only
   additions, subtractions and shifts. Every adder is a carry-skip adder.
2. **Bi-cubic up-scaling.** Each colour channel is enlarged 2x with a
   separable cubic filter. The rows are filtered first, then the columns.

The architecture follows Rao and Mandal, *An Efficient VLSI Architecture for
Bi-Cubic Interpolation using Carry Skip Adder*:

- SRD controller
- colour demosaicking machine with a boundary detector, a boundary mirror
  machine, two register banks and three hardware-sharing units
- interpolation memory controller
- bi-cubic interpolator with a coefficient generator and a two-pass control

That description names these blocks and what they do. It gives equations
only for the carry-skip adder and the cubic weights. All the other
arithmetic, every handshake and every schedule were chosen for this RTL. The
last section lists these choices.

## Frame flow and timing

```
 load port ──► R / G / B channel memories
                     │  srd_controller: merge into {R,G,B} words
                     ▼
               demosaic ──────────────── input buffer (W*H x 24)
                 demosaic_cu + boundary_mirror ─► window_regbank (4x4)
                 boundary_detector ─► hs_unit x3 (G, R, B) ─► result_regbank
                     │                            output buffer (W*H x 24)
                     │  done = acknowledgement
                     ▼
               interp_mem_ctrl: split into three channels
                     ▼
   bicubic_interp x3 (R, G, B), in parallel:
     input buffer (W*H) ─► horizontal pass ─► shared storage (H x 2W)
                        ─► vertical pass   ─► output memory (2H x 2W)
                     ▼
 read port ◄── {R,G,B} at address y*2W + x
```

Each step starts when the previous one has finished. Cycle counts, counted
from the `start` pulse:

| step | cycles |
|---|---|
| merge channels (`srd_controller`) | W*H + 2 |
| demosaicking, 4 cycles per pixel plus 12 per row | 4*(W+3)*H + 5 |
| split into channels (`interp_mem_ctrl`) | W*H + 2 |
| up-scaling, 4 cycles per output sample in each pass | 24*W*H + 7 |
| final `done` | 1 |
| **total** | **26*W*H + 4*(W+3)*H + 17** |

At the default 256 x 256 size a frame takes 1,969,169 cycles. That is about
9.8 ms at 200 MHz, the clock rate reported for the FPGA implementation.

## The Bayer pattern, the window and the border

The CFA pattern has blue at (even row, even column) and red at
(odd, odd). The other two positions are green. Green on a blue row and green
on a red row are different cases, because their horizontal neighbours have
different colours.

`boundary_detector` turns the two parity bits of a position into the
`cfa_e` class. It also flags positions whose window crosses the image edge.

`demosaic_cu` scans the image one row at a time. For centre row `i`, it slides
over virtual columns −1 to W+1. For each column it reads rows i−1 to i+2 from
the input buffer, one read per cycle. `window_regbank` gathers the four
samples of a column and shifts the column into a 4 x 4 window. After the
fourth column the window covers rows i−1..i+2 and columns j−1..j+2, with the
centre at `win[1][1]`.

Reads that fall outside the image go through `boundary_mirror`, which
reflects the coordinate about the edge sample: −1 → 1 and N → N−2. The
reflection moves a coordinate by an even number, so the parity stays the
same. A mirrored sample therefore always has the colour that the Bayer
pattern expects at the missing position, and the equations below need no
special case at the border.

## Reconstruction equations (hardware-sharing units)

In these equations:

- C is the centre sample.
- N, S, W and E are its four direct neighbours.
- The diagonal average is the mean of the four diagonal neighbours.
- S2 and E2 are the same-colour samples two pixels below and two pixels to
  the right. They are the only ones of that kind that the 4 x 4 window holds.

| centre | G | R | B |
|---|---|---|---|
| blue | (N+S+W+E)/4 + (2C − S2 − E2)/8 | diagonal average | C |
| red | (N+S+W+E)/4 + (2C − S2 − E2)/8 | C | diagonal average |
| green, blue row | C | (N+S)/2 | (W+E)/2 |
| green, red row | C | (W+E)/2 | (N+S)/2 |

The second term of the green estimate is the *linear deviation
compensation*. It measures how far the centre sample stands out from the
same-colour samples next to it, and adds a fraction of that to the green
average. This sharpens edges that a plain average would blur.

Every case above has the same form:

```
clamp( ((a+b+c+d) >> sh) + (comp_en ? (2p − n1 − n2) >>> 3 : 0) )
```

so one `hs_unit` per output colour covers all four cases of that colour. HS1
does green, HS2 red and HS3 blue. The cases differ only in which window
samples are routed to the unit's inputs.

Inside a unit there are six 12-bit carry-skip adders:

- three add the operands
- two subtract, computing a + ~b + 1
- one adds the compensation term

The shifts are wiring. Divisions truncate, and results saturate to 0..255.
`result_regbank` registers the three colours with the pixel address and
writes them to the output buffer.

## Carry-skip adder

`carry_skip_adder` divides its operands into groups of 4 bits. The last group
takes whatever bits remain. Each group is an `rca_block`, a chain of full
adders.

For each group, the propagate bits P_i = A_i xor B_i are ANDed together.
When all of them are 1, the carry out of the group equals the carry into it.
A multiplexer then passes the carry-in directly to the next group and skips
the ripple. The worst-case carry path therefore goes through one multiplexer
per group instead of one full adder per bit.

The result is bit-for-bit the same as any other adder. The only difference
is in timing and area.

## Bi-cubic 2x up-scaler

Output position x corresponds to source position x/2. Its taps are pixels
l−1, l, l+1 and l+2, with l = ⌊x/2⌋, and its fraction is a = 0 or 1/2.
`bicubic_coeff_gen` evaluates these weights for any a, with 8 fraction bits:

```
t1 = −a(1−a)²    t2 = 1 − 2a² + a³    t3 = a(1 + a − a²)    t4 = a²(a−1)
```

For a = 0 the weights are (0, 1, 0, 0), so the original pixel is copied. For
a = 1/2 they are (−1/8, 5/8, 5/8, −1/8), which Q8 represents exactly. The
weights sum to one, exactly for these two fractions and within truncation
error for others.

`bicubic_pe` multiplies the four taps by their weights and adds the products
with 24-bit carry-skip adders. It then rounds (half up) and saturates to
8 bits. The negative outer weights can overshoot near sharp edges, which is
why the result is saturated.

`bicubic_cu` runs the two passes that make the 2-D filter:

- **Pass 0 (horizontal).** Reads each input row and writes 2W filtered
  samples per row into the shared storage.
- **Pass 1 (vertical).** Reads each column of the shared storage and writes
  2H samples into the output memory.

Tap coordinates are mirrored at the borders in the same way as in the
demosaicking machine. Each pass saturates its own results, so the
intermediate values stay 8-bit.

The up-scaler reads one tap per cycle, so each output sample takes 4 cycles.
A result is written two cycles after its last tap is read. Before switching
passes, and before `done`, the control waits three cycles so that the last
write has landed.

## Using `srd_top`

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous reset, active low |
| `load_we`, `load_addr[15:0]`, `load_data` | in | write pixel y*W + x of the input picture (`rgb_t`: R in bits 23:16) |
| `start` | in | one-cycle pulse, accepted when the machine is idle |
| `busy`, `done` | out | `done` pulses once the 512 x 512 result is ready |
| `out_re`, `out_addr[17:0]`, `out_data` | in/in/out | read output pixel y*2W + x; data one cycle after `out_re` |
| `ev_*` | out | one-cycle monitoring pulses: mirrored reads, saturation, border windows, the demosaicking acknowledgement, vertical-pass writes |

Parameters `W` and `H` set the input size, 256 x 256 by default. The output
is always 2W x 2H. Small sizes such as 8 x 6 simulate in milliseconds.

Memory at the default size:

- input side: 3 x 64 K x 8 bits in the channel memories, plus 2 x 64 K x 24
  bits in the demosaicking buffers
- per channel: 64 K x 8 bits of input buffer, 128 K x 8 bits of shared
  storage and 256 K x 8 bits of output memory

That totals about 15.7 Mbit. `sdp_ram` is a generic simple-dual-port RAM
with a one-cycle read. Replace it with a vendor memory if needed.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. Expected values come
from separate integer models in `tb/srd_ref_pkg.sv`:

- `ref_demosaic` implements the table above on whole images.
- `ref_upscale2` implements the separable cubic scaler.

The module-level tests cover the following:

- **Adder:** exhaustive at 8 bits, plus random and all-propagate patterns at
  12 and 13 bits.
- **Scan order:** every read address of both control units.
- **Frame timing:** the exact cycle counts listed above.
- **Handshakes:** the handshakes between the controllers.

There are two whole-design tests:

- `tb_srd_top` runs three pictures through the whole machine at 8 x 6:
  random, pure 0/255 and a gradient. It compares every output pixel and
  counts each event output. It fails if any mechanism never occurred:
  mirroring and saturation in both stages, border windows, the
  acknowledgement, or the vertical pass.
- `tb_srd_top_full` runs one complete 256 x 256 → 512 x 512 frame at the
  default parameters. It checks all 262,144 output pixels and the cycle
  count. It takes a few seconds in Verilator.

`srd_top` and `demosaic` also carry concurrent assertions. They check that
each stage starts only after the previous one is idle, and that a window
centre is announced only with the last sample of its column. Add `--assert`
to Verilator to enable them.

To run a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/srd_pkg.sv tb/srd_ref_pkg.sv \
          tb/tb_srd_top.sv --top-module tb_srd_top -Mdir obj_tb_srd_top
./obj_tb_srd_top/Vtb_srd_top
```

Replace `tb_srd_top` with the name of any other testbench. Memories are not
reset, so load the picture before you start.

The reference models were written from the same equations as the RTL. They
show that the hardware computes those equations. They do not show that the
equations reproduce the image quality reported for the original design,
which was measured with pictures and software not available here.

## Where this RTL departs from, or goes beyond, the original description

- **Demosaicking arithmetic.** The original names the steps (green
  interpolation, red/blue interpolation, linear deviation compensation) but
  gives no equations. The table above, including the one-sided compensation
  term and its 1/8 gain, was chosen for this RTL. Reconstruction quality
  (PSNR/SSIM) has therefore not been matched to the published figures.
- **Hardware-sharing units.** The three units are described as being for
  "additions, shifts and subtractions". Here each unit does all three
  operations for one output colour. Reading them as one unit per operation
  would be a different partitioning of the same arithmetic.
- **Cubic weight t4.** t4 is printed as a²(1−a), while the matching
  vertical weight is b²(b−1). This RTL uses a²(a−1), the only version whose
  weights sum to one. The fraction is a = x − ⌊x⌋.
- **Throughput.** The original calls the design fully pipelined but gives no
  rate. This RTL reads one sample per cycle, which is 4 cycles per
  demosaicked pixel and 4 cycles per output sample of each up-scaling pass.
  The three channels are up-scaled in parallel.
- **Multipliers and number format.** The demosaicking machine uses no
  multipliers, as described. The cubic filter and the coefficient generator
  use multipliers, with Q8 fixed point in place of floating point.
- **Border treatment.** The mirror rule (reflect about the edge sample) and
  its use in the up-scaler were chosen for this RTL.
- **Interfaces.** Memory latencies, start/done handshakes, the load and read
  ports, reset, and the one-byte-per-colour packing {R,G,B} were all chosen
  for this RTL.
- **Not built.** Some parts of the original are outside this RTL:
  - the software image conversion and the PSNR/SSIM evaluation
  - the iterative estimation of registration parameters mentioned for
    multi-frame super-resolution, which is not part of the described
    hardware
  - the ripple-carry-adder version that is used only as a comparison
  - FPGA resource and power figures, which depend on a vendor flow
