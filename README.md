# A minimalist 16-lane fixed-point GPU

This is a small programmable SIMD engine for an FPGA. Sixteen fused
multiply-add (FMA) units work in lock step on 16-bit fixed-point numbers.
A tiny controller runs an assembly-style program and tells them what to do.
The design was shaped by one demonstration: it renders the Mandelbrot set,
16 pixels at a time, into a double-buffered 320 x 320 frame. The instruction
set is general enough for dot products and small matrix products as well.

The central idea is to keep all working data in wide registers instead of
block RAM. The FMAs sit between two 768-bit registers (3 operands x 16 bits
x 16 lanes):

```
             controller (16 x 16-bit registers, compare flag)
                  | instruction, values of regs a/b/c
                  v
   +------> input buffer (memory module): A,B,C for each lane
   |              | 768 bits, WRITE
   |              v
   |        16 x FMA   out = (A*B >>> 10) + C
   |              | 16 x 16 bits
   |              v
   |        output buffer: collects three rounds of results
   |              | 768 bits, after every third round
   +--------------+
                  input buffer also drives: dual frame buffer -> colour table -> display
```

Every lane can read and write its own operands in the same cycle, which one
or two BRAM ports could not allow. The cost is logic. The three-result
output buffer is what makes iterative algorithms possible without any other
memory: a program can feed the last three results of each lane back in as new
operands, permuted, doubled or negated (LOADB).

## Number format

Every data word is a signed 16-bit fixed-point number with 10 fraction bits.
The value is `raw / 1024`, so the range is [-32, 32) in steps of 1/1024.
For example, -1.25 is `16'hFB00` and 4.0 is `16'h1000`.

An FMA multiplies at full 32-bit precision, shifts the product right
arithmetically by 10 (truncation toward minus infinity), keeps the low 16
bits, and adds C. Nothing saturates: overflow wraps. The Mandelbrot program
relies on this being harmless, because it records only the first iteration
at which a pixel escapes.

## Instruction set

Each instruction is 32 bits:

| bits  | 31:28  | 27:24 | 23:8      | 7:4   | 3:0   |
|-------|--------|-------|-----------|-------|-------|
| field | opcode | reg_a | immediate | reg_b | reg_c |

For example, `addi 1 0 7` is `32'h31000700`. `r[n]` below is controller
register n. "regs a/b/c" means the values of the registers named by the
fields; the controller sends these values along with every memory
instruction.

| op | name      | effect |
|----|-----------|--------|
| 0  | NOP       | nothing |
| 1  | END       | stop; `done` goes high |
| 2  | XOR a b   | r[a] = r[a] ^ r[b] |
| 3  | ADDI a b imm | r[a] = r[b] + imm |
| 4  | BGE a b   | compare flag = (r[a] >= r[b]), signed |
| 5  | JUMP imm  | if the compare flag is set, go to line imm (lines count from 0) |
| 6  | ADD a b c | r[a] = r[b] + r[c] |
| 7  | PAUSE     | wait until `resume` is high |
| 8  | LOADI a imm | input-buffer word r[a] = imm |
| 9  | LOAD s b imm | operand s (0 A, 1 B, 2 C) of lane i = r[b] + i*imm |
| 10 | LOADB sa sb sc | A, B, C of each lane = shuffle of its last three results |
| 11 | WRITE rc ov | all FMAs compute; rc = bit 0 of field a, ov = bit 0 of field b |
| 12 | OR a      | lanes whose third result is > 4.0 and that have not escaped yet record r[a] |
| 13 | SENDITERS a | send 16 four-bit pixel codes to frame-buffer batch r[a] |
| 14 | FBSWAP    | show the frame just written |

Opcodes 0 to 5 follow a published encoding. Opcodes 6 to 14 are this
design's own assignment.

A LOADB shuffle code is 4 bits, `{mode[1:0], src[1:0]}`:

- `src` 0, 1 or 2 picks the first, second or third of the lane's last three
  results. `src` 3 gives zero.
- `mode` 0 passes the value through, 1 doubles it and 2 negates it.

The negate-y code is `4'b1001` and the double-x code is `4'b0100`.

### FMA chaining: replace_c and output_can_be_valid

Each FMA keeps its last sum. WRITE with `rc` = 1 adds the C operand from
the input buffer. With `rc` = 0, it adds the lane's own previous sum
instead, so a run of WRITEs builds a dot product. With `ov` = 0 the sum is
kept internally and the output buffer does not see it. Only a WRITE with
`ov` = 1 produces one "round" in the output buffer. After every WRITE the
input buffer clears to zero, so any operand not loaded again is 0. The
Mandelbrot recipe below depends on this.

### The output buffer and the three-result window

The output buffer places round k (k = 0, 1, 2) of lane i in word `3i+k`.
After the third round it copies all 768 bits into the input buffer's
*write buffer* and starts again. LOADB and OR read only the write buffer.
So while a new set of three results is being produced, the previous set is
still there to compute from. This is how an iteration can read x and y while
it is producing the next x and y.

## How the Mandelbrot program uses it

Each lane owns one pixel of a 16-pixel vertical strip. The invariant after
each pass is that a lane's write buffer holds (x, y, x_prev^2 + y_prev^2).
One iteration takes five groups of operations:

1. x' = x*x - y*y + x0:
   - `LOADB x,x,0`
   - `LOAD C <- x0`
   - `WRITE rc=1 ov=0`
   - `LOADB -y,y,0`
   - `WRITE rc=0 ov=1`
2. y' = 2x*y + y0:
   - `LOADB 2x,y,0`
   - `LOAD C <- y0` (the per-lane step is dy)
   - `WRITE rc=1 ov=1`
3. x*x + y*y:
   - `LOADB x,x,0`
   - `WRITE 1 0`
   - `LOADB y,y,0`
   - `WRITE 0 1`

   The third round completes, so the buffer flushes.
4. `NOP` (see the timing section)
5. `OR iters`, then the loop counter: `ADDI`, `BGE`, `JUMP`

After the loop, `SENDITERS` stores each lane's code, `min(iters >> 2, 15)`.
Pixels that never escaped give 15, which the colour table shows as black.
Before the loop, four WRITEs set up the invariant from x0 and y0. The
testbench package `tb/mandel_pkg.sv` assembles the complete program
(50 instructions) and contains a bit-exact reference model.

## Timing and the programmer-visible pipeline

- The instruction BRAM has a two-cycle read latency. The controller
  alternates between EXEC and WAIT, and in EXEC it already addresses the
  next instruction. So exactly one instruction completes every 2 cycles,
  taken jumps included.
- A memory instruction reaches the input buffer one cycle after EXEC. The
  FMA result arrives one cycle after that, and an output-buffer flush one
  cycle later still.
- **Hazard:** a LOADB or OR that must see a triplet completed by a WRITE
  has to be at least the *second* instruction after that WRITE. There is no
  interlock, so programs put one instruction, such as a NOP, in between.
  Chained WRITEs need no gap.
- PAUSE holds until `resume` is high. Debounce a button outside the design.
- Assertions in the controller and the input buffer check that memory
  instructions never arrive on consecutive cycles. If they did, a WRITE
  would reach the FMAs twice and break the rounds in the output buffer.
  A third assertion checks that the 16 FMAs stay in lock step.
- A full 320 x 320 frame at 63 iterations takes 13,930,899 cycles
  (0.188 s at 74.25 MHz). That is 17 instructions per iteration per
  16-pixel strip.

## Frame buffer and display

- There are two frames of 320 x 320 four-bit codes (819,200 bits). The GPU
  writes one while the display reads the other. FBSWAP exchanges them.
- SENDITERS writes a 64-bit batch (16 pixels, lane i in bits [4i+3:4i]) to
  address `x*20 + y/16` of the back frame.
- The display side gives `(disp_x, disp_y)` and receives `disp_rgb` three
  cycles later. That is two cycles for the frame-buffer read and one for the
  colour table.
- The colour table has 16 entries: code k < 15 is `{17k, 17k, 120+9k}`
  (red, green, blue) and code 15 is black. The gradient values are this
  design's choice.
- The HDMI transmitter (timing and TMDS) is not included. Connect a video
  timing generator to the display port.

## Where this differs from, or adds to, the original design

- **FMA output bus.** The block diagram labels the bus from the FMAs to the
  output buffer as 768 bits. Here it is 256 bits (16 results). The output
  buffer widens it to 768 over three rounds.
- **LOAD step.** LOAD takes its per-lane step as an immediate. The original
  program's zoom feature decreases dx and dy at run time. With an immediate
  step, zooming needs a rewritten program (or a rebuilt LOAD), because the
  y step cannot follow a register.
- **Escape test.** It is "greater than 4.0", as in the instruction table.
  The prose description of the escape-time algorithm says "at least 4".
- **Frame time.** It is 0.188 s against the original's 0.37 s. The speed of
  the hardware is the same (one instruction per two cycles). The difference
  lies in the program, whose exact loop was not published.
- **Bit fields.** The bit fields for LOAD's operand select, WRITE's flags
  and LOADB's codes, as well as opcodes 6 to 14, are choices of this design.
- **Operand registers.** Only C (the running sum) is a register inside each
  FMA. A and B feed the multiplier directly from the input buffer.
- **Debugging.** The controller has a register-inspection port
  (`dbg_sel` in, `dbg_value` out). A program can stop at a PAUSE
  checkpoint, and its registers can then be read, for example from board
  switches.
- **Not included:**
  - the software pre-processor and assembler (the testbench package has an
    equivalent builder)
  - the earlier instructions that the final instruction set dropped
  - HDMI
- **Added for this design.** The instruction BRAM depth (1024) and the
  program-load, start, resume and done ports are this design's own.
- **No readout path.** Results leave the GPU only through the frame buffer.
  A matrix product stays in the write buffer, where the testbenches read it
  hierarchically. A matrix workload that needs results outside the chip
  needs an extra readout path.

## Files

| file | contents |
|------|----------|
| `rtl/gpu_pkg.sv` | number format, instruction struct, opcodes, shuffle codes |
| `rtl/fma.sv`, `rtl/fma_array.sv` | one FMA; the 16-lane array |
| `rtl/shuffle_unit.sv` | LOADB shuffle for one lane |
| `rtl/input_buffer.sv` | memory module: operand buffer, write buffer, escape tracking |
| `rtl/output_buffer.sv` | three-round result collector |
| `rtl/instruction_bram.sv`, `rtl/controller.sv` | program memory and controller FSM |
| `rtl/frame_buffer.sv`, `rtl/color_lut.sv` | dual frame buffer and colour table |
| `rtl/gpu_top.sv` | everything wired together |
| `tb/tb_<module>.sv`, `tb/tb_gpu_pkg.sv` | self-checking unit tests |
| `tb/mandel_pkg.sv` | program builder and reference model |
| `tb/tb_gpu_top.sv` | end to end: small Mandelbrot window plus 4x4 matrix products, with counts of every mechanism |
| `tb/tb_gpu_workloads.sv` | 2x2 matrix products; 127 iterations with `ITER_SHIFT = 3` |
| `tb/tb_gpu_full.sv` | one full 320 x 320 frame at default parameters, every pixel checked |

Parameters: `NUM_FMA` (16), `WIDTH`/`HEIGHT` (320), `ITER_SHIFT` (2, use 3 for
127 iterations), `IMEM_DEPTH` (1024). The buffers scale with `NUM_FMA`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gpu_pkg.sv tb/mandel_pkg.sv tb/tb_gpu_top.sv --top-module tb_gpu_top
./obj_dir/Vtb_gpu_top
```

Replace `tb_gpu_top` with any other testbench. The full-frame test
(`tb_gpu_full`) runs about 14 million cycles, which takes roughly 15 seconds.
The unit tests take a second or less each.
