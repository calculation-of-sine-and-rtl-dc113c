# 8-bit iterative CORDIC sine/cosine generator

This core computes the cosine and sine of an angle using only shifts, additions and a
table of eight constants. It has no multiplier. It uses CORDIC in rotation mode. The vector
(x, y) = (0.607253, 0) is turned towards the requested angle in eight shrinking steps. Each
step turns it by ±atan(2^-i), and a register z keeps track of how much angle is still left.
The start value 0.607253 is the inverse of the gain that the eight steps add, so the final
x and y are cos and sin themselves, not scaled copies.

One shift-add/sub stage does the work. It runs once per clock cycle, and its result is fed
back through the x, y and z registers. One result therefore takes 8 cycles, one per bit of
precision.

A second build option, `ARCH = ARCH_BIT_SERIAL`, does the same iteration one bit at a time.
It uses shift registers and one-bit serial adders. The results and the interface are
identical. It takes 64 cycles per result, but needs only three 1-bit adders instead of three
8-bit ones.

## Number formats

| signal | format | range / resolution |
|---|---|---|
| `z0`, `z` (angle) | signed 8-bit, 1 LSB = 180/256 degree | −90° … +89.3°, 45° = 64 |
| `x`, `y`, `cos_z0`, `sin_z0` | signed Q1.7, 1 LSB = 1/128 | −1.0 … +0.992 |

To convert degrees to the angle code, multiply by 256/180 and round: 30° = 43, −75° = −107.
Every angle in this ±90° range lies inside the region where CORDIC converges (about ±99.7°).

## The iteration

For i = 0 … 7:

    d     = +1 if z >= 0 else -1          (sign bit of z)
    x'    = x - d * (y >>> i)
    y'    = y + d * (x >>> i)
    z'    = z - d * alpha_i

`>>>` is an arithmetic shift, so it rounds towards −∞. All three sums wrap modulo 2^8.
The elementary angles come from `alpha_i = atan(2^-i) · 256/π` codes. Entries 0 to 6 are
rounded to the nearest code and entry 7 is truncated, which gives the table
`64 38 20 10 5 3 1 0`.

These choices are what fix the exact output bits:

- the arithmetic shift;
- treating z = 0 as positive;
- the truncated last entry;
- the 8-bit wrap-around.

With them, the core reproduces bit for bit the results published for the original 8-bit
FPGA implementation (codes in units of 1/128):

| angle | cos | sin |
|---|---|---|
| 15° | 123 | 34 |
| 30° | 113 | 64 |
| 45° | 88 | 94 (residual z = −1) |
| 60° | 64 | 113 |
| −5° | −126 | −18 |
| −75° | 34 | −123 |

Outside the wrap region (next section), every result is within 6/128 of the true value. The
typical error is a few codes.

### Wrap-around near 0° and ±90°

There are no guard bits. Near 0° the x register passes through +1.0 (code 128) during the
iterations and wraps to a negative number. Sin still comes out close. Cos comes out near
−1.0 instead of +1.0: cos(−5°) gives −126/128. Near +90° the same happens to y, and
sin comes out near −1.0. For codes −13 … 5, 122 … 127 and −128, at
least one intermediate value wraps, and the result is wrong in sign or size.

This behaviour is kept on purpose, because the published 8-bit results show it. To
get correct values over the full range, widen `WIDTH` and add a guard bit. That also means
rescaling the constants in `cordic_pkg`.

## The bit-serial datapath (`ARCH_BIT_SERIAL`)

In `cordic_bit_serial`, x, y and z are 8-bit shift registers that move one place towards
bit 0 every clock cycle:

1. Bit 0 of each register feeds a serial adder/subtractor (`cordic_serial_addsub`). This is
   a full adder with a carry flip-flop.
2. The sum bit re-enters the register at bit 7.
3. After 8 cycles the register holds the complete result of one micro-rotation, and the
   next micro-rotation begins.

A computation is 8 micro-rotations × 8 bit times = 64 cycles.

The hard part is the shifted operand, bit j of `y >>> i`, while y itself is being
overwritten. At bit time j, the cell at position k still holds the old bit j+k, for every
k ≤ 7−j. The cells above that already hold new bits. Cell 7−j holds the old sign bit. So the
**tap select** reads the other register at position

    tap = min(i, 7 - j)

When j+i ≤ 7, this gives the old bit j+i. Past the top it gives the old sign bit, so the
sign extension comes for free.

- **Direction.** The rotation direction is the sign bit of z. It is read at bit time 0,
  when z is still a whole word, and held for the other seven bit times.
- **Angle.** The elementary angle comes from `cordic_serial_rom`, one bit per cycle, least
  significant first.
- **Carries.** Each serial adder starts a word with carry = subtract flag, and its operand
  inverted when subtracting, which gives the two's-complement difference. The carry out of
  bit 7 is dropped, so words wrap exactly like the 8-bit parallel adders.

The start vector is loaded in parallel in one cycle.

## Block structure

    z0 ─┐                       ┌── cordic_atan_rom ── alpha_i
        ▼                       │                        │
  init (x0, 0, z0) ─► cordic_vec_reg ─► cordic_stage ────┘
         ▲   load/en      (x,y,z)   │  2 × cordic_shifter (tap select)
         │                          │  3 × cordic_addsub  (+/-)
         └──────── feedback ◄───────┘
                                    └─► cos_z0 / sin_z0 result registers
  cordic_ctrl: iteration counter, start/busy/last/done

| file | role |
|---|---|
| `rtl/cordic_pkg.sv` | word type, `vec_t` {x, y, z}, `X_INIT` = 78, elementary-angle table |
| `rtl/cordic_shifter.sv` | variable arithmetic right shift (2^-i) |
| `rtl/cordic_addsub.sv` | adder/subtractor: one adder with operand inversion and carry-in |
| `rtl/cordic_atan_rom.sv` | combinational table of alpha_i, indexed by the iteration counter |
| `rtl/cordic_stage.sv` | one micro-rotation: sign decision, two shifters, three add/subs |
| `rtl/cordic_vec_reg.sv` | x, y, z registers with the start-vector / feedback multiplexers |
| `rtl/cordic_ctrl.sv` | counts the iterations and handles the start/busy/done handshake |
| `rtl/cordic_bit_serial.sv` | bit-serial core: shift registers, tap select, three serial add/subs, control |
| `rtl/cordic_serial_addsub.sv` | one-bit adder/subtractor with carry flip-flop |
| `rtl/cordic_serial_rom.sv` | elementary-angle table read one bit per cycle |
| `rtl/sine_computer.sv` | top level; `ARCH` chooses the word-level datapath or `cordic_bit_serial` |

The word-level design has 45 flip-flops:

- five 8-bit registers;
- a 3-bit counter;
- `busy` and `done`.

Its datapath is three 8-bit adders and two 8-bit barrel shifters.

The bit-serial design adds, beyond the same five registers:

- three carry flip-flops;
- a 3-bit bit counter;
- the held direction bit.

Its datapath is three 1-bit adders and two 8-to-1 tap multiplexers.

## Interface and timing (`sine_computer`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active-high reset |
| `start` | in | 1 | start a computation; `z0` is sampled on the same edge |
| `z0` | in | 8 | angle |
| `cos_z0`, `sin_z0` | out | 8 | results, held until the next result |
| `x`, `y`, `z` | out | 8 | the iteration registers; after a computation they hold the final vector |
| `busy` | out | 1 | iterations in progress |
| `done` | out | 1 | one-cycle pulse: `cos_z0`/`sin_z0` have just been updated |

- **Accepting a start.** `start` is accepted when the core is idle. It is also accepted in
  the last iteration cycle of the previous computation, so computations can run
  back-to-back at one result every 8 cycles (64 with `ARCH_BIT_SERIAL`). At any other
  time while busy, `start` is ignored.
- **Latency.** `done` rises 8 clock edges after the edge that accepted `start`. With
  `ARCH_BIT_SERIAL` it is 64 edges.
- **First cycle.** The stage works on the start vector (0.607253, 0, z0) in the first
  cycle, and on the fed-back values after that.
- **Parameter.** `ITERATIONS` (default 8, allowed 1 … 8) trades accuracy for latency.
  `X_INIT` keeps its 8-iteration value, which costs little accuracy above 4 iterations.
  `WIDTH` is fixed at 8 in the package, because the angle table and `X_INIT` are written
  for that width.

The inputs `rst`, `start`, `busy` and `done` were added to make the core usable in a
system. The original port list has only `clk` and `z0` as inputs, and no handshake.

## Where this implementation departs from the original description

- **Start vector.** One passage starts the iteration from (x0, y0) = (1, 0). The
  algorithm's flow chart starts from (0.607253, 0). This core uses 0.607253 (code 78), which
  gives unscaled results and matches the reference values.
- **Sign test.** The flow chart tests `z > 0` for a positive rotation. This core rotates
  positively for `z >= 0`, the usual sign-bit test. Only this version gives the reference
  45° residual of −1.
- **Two datapaths.** The architecture drawing shows shift registers, serial adders and a
  serial ROM. The text describes one word-level iteration per clock cycle, and a latency of
  N cycles for N bits. The word-level form is the default. The drawing is built as
  `ARCH_BIT_SERIAL`. Its sign extension uses the moving tap, and its parallel start-vector
  load is this design's choice.
- **No magnitude input.** CORDIC can scale sin and cos by a magnitude for free, by starting
  from x0 = magnitude × 0.607253. The original port list has only an angle input, so x0 is
  the constant `X_INIT`. To add the feature, replace `X_INIT` in `init_v` (or in the
  serial core's load) with an input.
- **Port count.** The original implementation used 49 pins: `clk`, `z0` and five 8-bit
  outputs. The handshake here adds four more.
- **Register count.** The reported FPGA implementation used 79 registers, where this core
  has 45. What the other registers held is not known, so nothing was added to match.
- **Timing.** Timing was not analysed. The original reports 241 MHz on a Virtex-5.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog that ends a stuck run.

| testbench | what it checks |
|---|---|
| `tb_cordic_shifter` | all 256 × 8 inputs against floor division |
| `tb_cordic_addsub` | all operand pairs in both modes against modulo-256 arithmetic |
| `tb_cordic_atan_rom` | table against `$atan`, also with 5 iterations |
| `tb_cordic_stage` | 20 000 random micro-rotations against the equations, both directions and z = 0 |
| `tb_cordic_vec_reg` | random load/enable/reset sequences against a model |
| `tb_cordic_ctrl` | controllers with 8 and 3 iterations against a cycle model; latency; idle, back-to-back and ignored starts |
| `tb_cordic_serial_addsub` | 4000 random words LSB first, both modes, idle cycles inside words |
| `tb_cordic_serial_rom` | every bit of every entry against `$atan` |
| `tb_cordic_bit_serial` | the end-to-end program below, run on the bit-serial core (64-cycle latency) |
| `tb_sine_computer_serial` | the same, through the top level with `ARCH_BIT_SERIAL` |
| `tb_sine_computer` | end to end, described below |

`tb_sine_computer` runs the top level end to end at its default size:

- the six reference angles, including the 45° residual;
- an 8-cycle latency check on each computation;
- all 256 angle codes streamed back-to-back, compared with an independent integer model
  and with `$cos`/`$sin`;
- a start given while busy;
- a reset in the middle of a computation.

It counts each mechanism and fails if one never occurred: idle start, back-to-back start,
ignored start, reset, both rotation directions, and wrap-around.

Run one with Verilator (package first):

    verilator --binary --timing --assert -Wno-fatal rtl/cordic_pkg.sv \
        $(ls rtl/*.sv | grep -v cordic_pkg) tb/tb_sine_computer.sv \
        --top-module tb_sine_computer -Mdir obj
    ./obj/Vtb_sine_computer

Each testbench finishes in well under a second.
