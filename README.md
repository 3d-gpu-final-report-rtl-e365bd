# A wireframe 3D GPU in SystemVerilog

This is a small fixed-function graphics processor. It does the two core jobs
of any 3D pipeline in hardware: it transforms geometry by a 4x4 world matrix,
and it rasterizes the result into a frame buffer. A host processor puts a
transform matrix and 3D line segments into a RAM that it shares with the GPU.
It then sends two kinds of command, *load matrix* and *draw line*. For each
line the GPU:

1. fetches both endpoints,
2. multiplies them by the matrix (this gives rotation, scaling and translation),
3. drops Z (orthographic projection),
4. maps the result onto a 256 x 256 screen,
5. draws the line with Bresenham's algorithm into a 1-bit-per-pixel frame
   buffer in that same RAM.

To draw an object that is defined in its own coordinates somewhere else on
screen, the host changes only the matrix. Drawing the same object twice in two
places means reloading the matrix and resending the same line commands.

All arithmetic is integer. The design never needs a divider, and the
rasterizer never needs a multiplier.

## Number formats and memory map

**Geometry: signed 8.8 fixed point.** Every coordinate and matrix element is a
16-bit two's complement number that holds the real value times 256. So
`0x0100` is 1.0, `0x1E00` is 30, `0xE200` is -30 and `0x8100` is -127. The
usable range is -128 to 127.996, in steps of 1/256.

**Screen: 8-bit unsigned.** A transformed coordinate `v` becomes screen
coordinate `floor(v) + 128`, kept to 8 bits. World -128..127 covers the screen
0..255, and world 0 falls at the screen centre. Anything outside that range
wraps around; it is not clipped.

**RAM: 64K x 16 bits, shared with the host.**

| Words | Contents |
|---|---|
| 0 .. 4095 | frame buffer, 16 pixels per word |
| anywhere else | matrices (16 words each) and lines (6 words each) |

- **Frame buffer.** Pixel (x, y) is word `y*16 + x/16`, bit `x mod 16`. One
  screen row is 16 consecutive words.
- **Matrix.** Stored row by row: `M11 M12 M13 M14 M21 ... M44`. The fourth
  column is the translation, and only rows 1 and 2 (screen X and Y) are ever
  used.
- **Line.** Stored as `X0 Y0 Z0 X1 Y1 Z1`.

**Commands.** The host sends each command as two 16-bit words on the shared
data bus. Each word is marked valid by a rising edge of `strb_in`:

| Opcode | Argument | Action |
|---|---|---|
| `0x0001` | address | load the 16-word matrix starting at that address |
| `0x0002` | address | draw the line whose 6 words start at that address |

Any other opcode is discarded together with its address word.

## Block structure

```
             strb_in, ram_in_use, gpu_done             addr_out, re_out, we_out, data bus
                         |                                       |
                  +------+---------------------------------------+------+
                  |                   gpu_controller                    |
                  +--+--------------+--------------+-------------+------+
      strb_matrix    |   strb_cor   |  init_matrix |  init_rast  | rast_strb/addr/index
      databus_out    |              |  math_done   |  rast_done  |
          +----------v---+   +------v-------+   +--v---------+   |
          | world_matrix |   | coordinate   |   |            |   |
          | _buffer      |   | _buffer      |   |            |   |
          | 16 x 16 bit  |   | 6 x 16 bit   |   |            |   |
          +------+-------+   +------+-------+   |            |   |
       row_sel ^ | row 64    sel ^  | point 48  |            |   |
               | v                  v           |            |   |
          +----+------------------------+       |            |   |
          |        matrix_math          |<------+            |   |
          |  3 multipliers, 3 adders    |                    |   |
          +-------------+---------------+                    |   |
             strb_screen| screen_cor 8                       |   |
          +-------------v---------------+     +--------------+---+--+
          |  screen_buffer  x0 x1 y0 y1 |---->|      rasterizer      |
          +-----------------------------+     +----------------------+
```

| File | Purpose |
|---|---|
| `rtl/gpu_pkg.sv` | widths, buffer sizes and the opcode enum |
| `rtl/gpu_top.sv` | connects the six blocks; the top of the design |
| `rtl/gpu_controller.sv` | host interface, RAM master, command sequencer |
| `rtl/world_matrix_buffer.sv` | 16-word shift register; `row_sel` picks one 64-bit row |
| `rtl/coordinate_buffer.sv` | 6-word shift register; `sel` picks one 48-bit point |
| `rtl/matrix_math.sv` | dot product of one row with one point, plus the step sequencer |
| `rtl/screen_buffer.sv` | 4 x 8-bit shift register that holds the projected endpoints |
| `rtl/rasterizer.sv` | Bresenham line walker that emits a frame-buffer word and bit per pixel |

All three buffers are plain shift registers, so the controller only ever
strobes one word in at a time.

- After 16 strobes, the first matrix word received is the top 16 bits of row 0.
- After 6 strobes, `sel = 0` gives `{X0, Y0, Z0}`.
- The screen buffer shifts along the chain `screen_cor -> y1 -> y0 -> x1 -> x0`.
  The first of four values therefore ends up in `x0`.

## Transform: one dot product, reused four times

`matrix_math` contains a single combinational dot-product unit:

```
acc = (X*m0 + Y*m1) + (Z*m2 + (m3 << 8))       // 34-bit signed
screen_cor = acc[23:16] + 128                   // 8 bits
```

`{m0,m1,m2,m3}` is the row chosen by `row_sel`, and `{X,Y,Z}` is the point
chosen by `sel`.

Each product of two 8.8 numbers has 16 fraction bits. The translation `m3` is
shifted up by 8 bits to match that scale. Bits 23:16 of the sum are then the
integer part.

A small FSM walks through four (row, point) pairs in this order:

| Step | Row | Point | Result |
|---|---|---|---|
| 1 | 0 | 0 | x0 |
| 2 | 0 | 1 | x1 |
| 3 | 1 | 0 | y0 |
| 4 | 1 | 1 | y1 |

This order makes the values land in the right screen-buffer registers.

The multiply-add path runs through the buffer multiplexers and three adders
in a row, and it is longer than one 10 ns clock. The FSM therefore treats it as
a multicycle path. It holds `row_sel`/`sel` steady for `SETTLE_CYCLES` (2)
cycles before the cycle in which it pulses `strb_screen`. One result takes 3
cycles. `math_done` pulses 13 cycles after `init_math` is sampled. A timing
flow must be told about this multicycle path. The RTL alone only guarantees
that the inputs are stable.

Worked values, all checked by the testbench:

| Point | Row | `screen_cor` |
|---|---|---|
| (1, 0, 0) | identity row | `0x81` |
| (-127, 0, 0) | identity row | `0x01` |
| X = 30 | identity row | `0x9E` |
| X = -30 | identity row | `0x62` |

## Rasterizer: Bresenham with an offset error term

The rasterizer starts at the first endpoint and steps along the *major* axis,
one pixel per iteration. A running error term decides when the *minor*
coordinate also steps. Only additions, subtractions, comparisons and shifts by
one are used.

| State | What it does |
|---|---|
| DIFF | `dx = abs(x1-x0)`, `dy = abs(y1-y0)`; store the step direction of each axis |
| SWAP | `steep = dy > dx`. For a steep line, swap the roles of x and y so the major axis is always the one in X. Then `dx = 2*major delta`, `dy = 2*minor delta`, `err = 256`. |
| PLOT | put pixel (X,Y) on `rast_addr`/`rast_index`, or (Y,X) when steep; `rast_strb` high for one cycle |
| HOLD | wait for the controller's write-back; finish if X has reached the end |
| STEP | `err += dy`; X moves one pixel toward the end |
| CORR | if `err > 256`: `err -= dx`, and Y moves one pixel |

**The error term.** It carries an offset of 256, so the decision is a compare
against the constant 256. Relative to that offset, the error stays in
`(-2*major, 0]`. After `major` steps the minor coordinate has therefore moved
exactly `minor` times, and the line ends on its endpoint.

**Width.** For long, shallow lines the error drops below zero. For that reason
`err` is a 12-bit signed register, even though the algorithm itself only needs
magnitudes.

**Worked example.** For the line (100,100) -> (95,110):

- the rasterizer visits 11 pixels,
- the word addresses are 1606, 1622, 1638, 1654, ..., 1749, 1765,
- the bit indices are 4, 3, 3, 2, 2, ..., 15, 15,
- `err` alternates 256, 246.

The testbench checks exactly this sequence.

**Pixel rate.** Each pixel takes `PIXEL_CYCLES` = 5 clocks (PLOT, 2 x HOLD,
STEP, CORR). The first strobe comes 2 clocks after `init_rast`. `rast_done`
pulses 3 clocks after the last strobe. The rasterizer has **no stall input**.
Its period was chosen equal to the controller's 5-cycle read-modify-write, so
that every strobe finds the controller ready. An assertion in the controller
checks this. If you lengthen the RAM cycle, raise `PIXEL_CYCLES` to match.

## Controller and the shared RAM

The controller follows this flow:

1. receive opcode,
2. receive address,
3. wait for the RAM,
4. load the words,
5. for a line only: run the matrix math, then the rasterizer,
6. pulse `gpu_done`.

**Host handshake.** `strb_in` and `ram_in_use` come from a slower host. Each
passes through a two-flop synchroniser, and `strb_in` is edge-detected. The
host must hold each word on the bus for at least 3 GPU clocks after it raises
`strb_in`.

**Sharing the RAM.** After the address word arrives, the GPU waits until
`ram_in_use` is low. It then keeps the RAM until the command completes. While
the GPU does not own the RAM, `addr_oe` and `databus_oe` are low, so the pads
can stay in high-impedance.

**Read cycle (3 clocks per word).** The address is driven with `re_out` high
for two clocks: one access clock plus a wait state, so a RAM slightly slower
than 10 ns still works. The data is sampled at the end of the second clock.
In the third clock the word is strobed into the matrix buffer or the
coordinate buffer. A matrix load takes about 50 clocks.

**Pixel write-back (5 clocks).** Each pixel runs a read-modify-write on one
frame-buffer word:

1. latch `rast_addr`/`rast_index`,
2. read the word for 2 clocks,
3. OR in the pixel's bit,
4. write for 2 clocks with `we_out` high.

Because the word is read first, pixels that are already set in it, from this
line or from earlier ones, are preserved.

**Cost of a line.** A line of N+1 pixels costs roughly 40 clocks plus
5*(N+1) clocks. At 100 MHz a 256-pixel diagonal takes about 13 microseconds.

## Top-level pins (`gpu_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, 100 MHz target |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `strb_in` | in | 1 | host: the word on the data bus is valid |
| `ram_in_use` | in | 1 | host is using the RAM |
| `gpu_done` | out | 1 | one-clock pulse when a command completes |
| `databus_in` | in | 16 | shared data bus, input side (host words, RAM read data) |
| `databus_o`, `databus_oe` | out | 16, 1 | write data and its output enable |
| `addr_out`, `addr_oe` | out | 16, 1 | RAM address and its output enable |
| `re_out`, `we_out` | out | 1, 1 | RAM read and write enables |

The bidirectional bus is split into in, out and enable signals. The
three-state pad drivers, and the power and ground pads, belong to the chip's
pad ring and are not part of this RTL.

## Where the design makes its own choices

The overall structure follows the original design closely: the block
partition, the bus widths, the buffer orders, the opcodes and memory map, the
fixed-point format with its +128 screen offset, the three-multiplier datapath,
the two-cycle settle, the Bresenham error offset of 256 and the 5-cycle
write-back. The following points were left open or were inconsistent in the
source, and were settled as described:

- **Translation scale.** The translation element is shifted left by 8 before
  it is added, so that translations are in the same 8.8 units as the points.
- **Order of the four results.** The screen values are produced in the order
  x0, x1, y0, y1, to fit the screen buffer's shift chain. The alternative order
  x0, y0, x1, y1 would put a Y value into an X register.
- **Bresenham update.** The update adds twice the *minor* delta and subtracts
  twice the *major* delta. This is the form that reproduces the reference
  pixel sequence and always lands on the endpoint.
- **Opcodes on the data bus.** Opcodes arrive over the 16-bit data bus. There
  is no separate opcode port.
- **`re_out`.** It is a plain RAM read enable. It is not a "GPU busy"
  level.
- **`gpu_done`.** It is a one-clock pulse, not a level.
- **Width of `addr_out`.** It is 16 bits.
- **Design additions.** The following have no counterpart in the source:
  - the synchronisers on `strb_in` and `ram_in_use`,
  - dropping unknown opcodes,
  - the one-claim-per-command RAM policy,
  - the `addr_oe`/`databus_oe` outputs.
- **Overflow.** No rounding, saturation or clipping is done. Fractions are
  truncated toward minus infinity, and screen coordinates wrap modulo 256.
- **Bit order.** Bit 0 of a frame-buffer word is the pixel with `x mod 16 = 0`.
  How a display scans a word is up to the display side.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_world_matrix_buffer` | row packing and shift order against the load of `000F`..`0000`, random loads, holding without a strobe, reset |
| `tb_coordinate_buffer` | the same checks for the line buffer |
| `tb_screen_buffer` | the shift chain into x0, x1, y0, y1 |
| `tb_matrix_math` | the worked values above; scale and translate; 40 random matrices against a 64-bit reference; exact `math_done` latency; inputs held for the settle time |
| `tb_rasterizer` | the worked line pixel by pixel; all eight slope, direction and sign cases; the full diagonal (0,0)-(255,255); points; horizontal, vertical and random lines, all against an independent Bresenham model; exact pixel period and start/done timing |
| `tb_gpu_controller` | the controller with stand-ins for the math and rasterizer: word order and 3-clock spacing, every read and write exactly 2 clocks, no RAM access while `ram_in_use` is high, read-modify-write keeps existing bits, unknown opcode dropped |
| `tb_gpu_top` | the whole GPU at its default settings. It draws a scaled and translated cube, a cube rotated 30 degrees about z and 20 degrees about x, and the full-screen diagonal, then compares all 4096 frame-buffer words with a reference model. It also requires each mechanism to occur at least once: RAM wait, matrix load, line draw, steep and shallow lines, decrementing steps, merging into a non-empty word, dropped opcode. It also checks the 5-clock pixel period. |

`tb/sram_model.sv` is a behavioural model of the external asynchronous SRAM.
It reads combinationally while `re` is high and writes on the clock edge while
`we` is high.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
          rtl/gpu_pkg.sv tb/tb_gpu_top.sv --top-module tb_gpu_top
./obj_dir/Vtb_gpu_top
```

Replace `tb_gpu_top` with any other testbench name. Every testbench finishes
in well under a second.

**Known limits.**

- All verification is by simulation against models written from the same
  description. There is no gate-level or timing check.
- The two-cycle matrix path needs a matching multicycle constraint in
  synthesis.
- The reference models and the RTL share the same interpretation of the points
  listed in the previous section, so the testbenches cannot catch a
  misinterpretation there.
