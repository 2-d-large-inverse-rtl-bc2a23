# 16x16 / 32x32 HEVC inverse transform with reused butterfly elements

This RTL computes the 2-D inverse transform of HEVC's two large transform sizes:
16x16 and 32x32 transform units (TUs). The design is built around one idea.

A 1-D inverse DCT of 32 points, written as Chen's fast butterfly graph, is a
column of identical nodes repeated over 13 stages. Every node computes

    y = (a * x_own + b * x_partner) >>> 8

So one row of 16 small processing elements (PEs) can evaluate the whole graph
one stage per cycle, feeding each stage's results back as the next stage's
inputs. The PEs have no multipliers: each coefficient is a sum of at most five
shifted copies of the operand.

Two such 1-D units work as a pipeline. They share one 32x32 shift-register
transpose buffer, so the column pass of the next TU runs while the row pass of
the current TU is still reading the buffer. In steady state a 32x32 TU is
finished every 481 clock cycles, about 2.13 samples per cycle. At 117 MHz that
is enough for 3840x2160 video at 30 frames/s.

## Arithmetic of the butterfly graph

### Coefficients

Every rotation angle is a multiple of pi/64. The coefficients are
`C(k) = floor(256 * cos(k*pi/64))` for k = 0..32. That gives the table
256, 255, 254, 253, 251, 248, 244, 241, 236, ..., 37, 25, 12, 0.
The two operand coefficients of one node are a pair `C(k)` and
`S(k) = C(32-k)`, or the butterfly values ±256. Each node ends with an
arithmetic shift right by 8 (floor), so every node rescales its result.

### The 1-D result and its scale

For an N-point vector (N = 16 or 32), the 1-D result approximates

    y[n] = sum_k w_k X[k] cos((2n+1) k pi / 2N),   w_0 = 1/sqrt(2), w_k = 1 (k > 0)

This is the inverse DCT-II without its overall normalisation. It is **not**
bit-exact with the HEVC standard's integer matrix, and it does not apply the
standard's intermediate shifts. It is the graph with 8-bit cosine
coefficients described above. Across random inputs, the 1-D error against the
real-valued formula stays within about 2% of sum |X| plus 2.

### Where the values sit

The 16 upper lines (positions p = 0..15) first hold the even inputs, in
bit-reversed order. The 32-point indices are 16, 0, 8, 24, 4, 20, 12, 28, 2,
18, 10, 26, 6, 22, 14, 30. In 16-point mode, input k sits where 32-point input
2k would. The odd inputs 2*bitrev4(p)+1 are loaded later for the lower part.

A node at position p always takes its partner from position p^1, p^3, p^7 or
p^15. So each PE needs only a 4:1 partner multiplexer, not a 31:1.

### Stage program

The program is computed by `build_prog()` in `rtl/hevc_it_pkg.sv`.

| step | part | operations |
|---|---|---|
| 0..5 | upper: 16-point transform of the even inputs | first rotations on 8..15, 4..7 and 2..3; the 181/181 node on 0,1; rotations at angles 8 and 16; butterflies with partner masks 1, 3, 7, 15 |
| 6..12 | lower: odd half of the 32-point transform | first rotation (mask 15); butterflies (masks 1, 3, 7); rotations at angles 4, 20, 8 and 16 |
| last | join | `Y[q] = D[q] + L[15-q]`, `Y[31-q] = D[q] - L[15-q]` |

The signs of the inner rotations come in two forms, A and B, defined in the
package. The unique sign assignment was chosen so that the integer graph
matches the real-valued transform. The first stage of the lower part
reproduces, for example, `g16 = (12*x1 - 255*x31) >> 8` and
`g31 = (12*x31 + 255*x1) >> 8`.

## Shifter/adder modules (`it_shift_add`)

Each PE holds two of these: the "top" one for its own operand and the
"bottom" one for the partner. A module adds up to 4 terms (Type A) or 5 terms
(Type B). Each term is the operand shifted left by 0..15 places and,
optionally, negated.

Coefficients are written in canonical signed-digit (non-adjacent) form,
computed at elaboration. This choice keeps every coefficient the program needs
within the term count of its module:

- Type A top: PEs 2, 3, 14, 15.
- Type A bottom: PEs 2, 3, 15.
- Type B: every other module.

An assertion checks that no Type A module is ever given a fifth term. The two
module outputs are added at full width, then shifted right by 8.

## Processing element (`it_pe`)

A PE has:

- a 4:1 partner multiplexer, which takes the input vector in the first step
  and the feedback registers otherwise;
- an own-operand selector: input, feedback register, or register D in the
  last 32-point step;
- the two shifter/adder modules;
- a result register that feeds all PEs in the next cycle.

`y_c` is the combinational node result; `y_q` is the registered one.

## Processing unit (`it_pu`, `it_pu_seq`)

`it_pu_seq` is a cycle counter that replays the stage program. For each
vector it drives:

- which operands the PEs use;
- when register D is loaded;
- when the last step runs;
- when the output register is written.

Timing of one vector, in cycles after `start`:

| size | cycles | what happens |
|---|---|---|
| 32 | 0..5 | upper part; inputs are read in cycle 0 |
| 32 | 6..12 | lower part; odd inputs read and D loaded in cycle 6 |
| 32 | 13 | last step, into the output register |
| 32 | 14 | `out_valid` |
| 16 | 0..5 | upper part; result captured in cycle 5 |
| 16 | 6 | `out_valid` |

So one unit takes 15 cycles per 32-point vector and 7 per 16-point vector. A
new `start` is accepted in the cycle where `out_valid && out_ready`; it is
never accepted earlier. If `out_ready` is low, the unit holds its result.

Inputs and outputs are in natural order. For a 16-point vector only
`x[0..15]` are read and `y[16..31]` are 0. The data path is `W` = 24 bits
wide, with no saturation inside a unit.

## Transpose buffer (`it_tbuf`)

A 32x32 array of `BW`-bit registers that only ever shifts, one whole line per
cycle, along one of two axes:

- `AX_COL`: the new line enters the left column, everything moves one column
  right, and the right column is the line that leaves.
- `AX_ROW`: the new line enters the bottom row, everything moves up, and the
  top row leaves.

A write and a read in the same cycle are a single shift. A TU written along
one axis comes out transposed when read along the other. 16x16 TUs use only
the top-right 16x16 quarter.

The key trick is that the next TU is written along the same axis that the
current TU is being read on. Reading TU n frees exactly the lines that TU n+1
fills, so one array serves both units. The axes therefore alternate from TU to
TU:

- The first TU after reset is written `AX_COL` and read `AX_ROW`.
- The next TU is written `AX_ROW` and read `AX_COL`, and so on.

A line read along `AX_ROW` has its elements in reverse order; the top level
undoes this.

## Scheduler (`it_sched`)

Each cycle, the scheduler decides whether the buffer takes the vertical
unit's finished line, hands a line to the horizontal unit, or does both in
one shift:

- While the TU being read still has lines in the buffer and the next TU has
  started arriving, lines move only in lock step: one in, one out.
- A TU becomes readable the cycle after its last line arrives.
- A TU of the other size waits until the buffer holds no unread line.

Behind 15-cycle processing units, the one-cycle wait for readability is what
makes the steady-state period 32 x 15 + 1 = 481 cycles.

The scheduler also gives the row index of each line read. Along `AX_ROW` the
index counts up; along `AX_COL` it counts down.

## Top level (`hevc_idct2d`)

Data path: vertical unit, then saturation to `BW` bits, then transpose buffer,
then horizontal unit.

Interface:

- **Input:** one column per `in_valid && in_ready`. For a TU of size N, send
  columns 0..N-1 in order. `in_col[i]` is the coefficient in row i. Only
  `in_col[0..15]` are used for 16x16. `in_size32` must stay constant within a
  TU.
- **Output:** one row per `out_valid` cycle. There is no back-pressure.
  `out_row[j]` is sample (`out_row_idx`, j) of the 2-D result. The rows of a
  TU come out in ascending or descending order, alternating with the buffer
  axis, so use `out_row_idx`.
- **Input stalls:** `in_ready` drops while the vertical unit is busy or
  blocked by the buffer.

Throughput:

| TU size | column pass | steady-state TU period |
|---|---|---|
| 32x32 | 15 cycles per column | 481 cycles |
| 16x16 | 7 cycles per column | 16 x 7 + 1 = 113 cycles |

| Parameter | Default | Meaning |
|---|---|---|
| `IN_W` | 16 | coefficient width |
| `BW` | 16 | transpose-buffer word width; 1-D results are saturated to it |
| `W` | 24 | processing-unit width, also the output width |

## Design choices not fixed by the original architecture

The original architecture gives the PE structure, the 16-PE unit, the 4:1
partner multiplexer, the Type A/B shifter/adder split, register D, the shared
32x32 transpose buffer with its right/up shifts and top-right 16x16 placement,
and the 481-cycle TU period. This implementation chose the rest:

- all word widths (`IN_W`, `BW`, `W`) and the saturation before the buffer;
- rounding by plain floor (`>>> 8`);
- the exact stage program and rotation signs;
- the canonical-signed-digit decompositions (the original sometimes uses
  other, equal-valued ones, such as 255 = 128 + 128 - 1);
- the valid/ready handshakes, the output row index, and the output without
  back-pressure;
- the alternating buffer axes and the size-change rule in the scheduler;
- asynchronous active-low reset of the control and PE registers (the buffer
  itself is not reset).

The two 1-D units keep fixed roles: one vertical (columns), one horizontal
(rows). The original timing diagram can also be read as each unit doing both
passes of every other TU. That reading was not followed; the cycle count is
the same either way.

Not built:

- an interface buffer in front of the transform, which would absorb stalls
  from neighbouring decoder blocks; no size or form was available for it;
- anything physical (clock rate, area).

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_it_shift_add` | every coefficient -256..256 on Type A and Type B modules, against plain multiplication |
| `tb_it_pe` | random controls and operand sources against a model of the node equation and registers |
| `tb_it_pu_seq` | the program against the known first-stage coefficients and partner lines, the per-cycle control flags, and stalls |
| `tb_it_pu` | 400 random 16/32-point vectors, exact against a node-by-node reference model (`tb/it_ref_pkg.sv`) and within tolerance of the real-valued transform; also the 15/7-cycle latency and back-to-back rate |
| `tb_it_tbuf` | fills, overlapped read/write and drains, for both sizes; checks every element of the transposition |
| `tb_it_sched` | scheduler plus buffer with random producer and consumer stalls; checks data integrity, row indices, axis alternation and the full-rate period |
| `tb_hevc_idct2d` | end to end, at default parameters: 14 TUs of mixed size, with input gaps and large amplitudes; exact comparison with a 2-D reference that includes the 16-bit saturation; row indices and order; the 481-cycle period; counts of lock-step, write-only and read-only shifts, both axes, stalls, size changes and saturations, failing if any of these never happens |
| `tb_hevc_idct2d_rate` | 32x32 throughput with no stall, with the input withheld half the time, and with the input withheld a fifth of the time: 481, 961 and 601 cycles per TU. For 3840x2160 video at 30, 30 and 60 frames/s these rates need clocks of 117, 234 and 292 MHz, all within 300 MHz. A last phase measures the 113-cycle period of 16x16 TUs. Every output row is also checked |

To run one with Verilator, list the package first:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_hevc_idct2d \
        rtl/hevc_it_pkg.sv tb/it_ref_pkg.sv rtl/it_*.sv rtl/hevc_idct2d.sv \
        tb/tb_hevc_idct2d.sv
    ./obj_dir/Vtb_hevc_idct2d

What the tests do not establish:

- agreement with the HEVC standard's integer transform (a different
  arithmetic, see above);
- timing closure at any clock rate.
