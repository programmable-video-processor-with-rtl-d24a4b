# A MIPS processor that generates video in software, on time

Text-mode video is a hard real-time job. A sync pulse, a porch or a pixel
that comes one clock early or late shows on the screen. A plain processor
can do it only if every instruction path is counted and padded with NOPs by
hand. This design takes another route. A small multicycle MIPS processor
gets one new instruction, `wait`, backed by four hardware down-counters.
With `wait`, a program says "continue when this interval has passed" rather
than "burn N cycles". The program can then do any amount of work between
two deadlines, as long as the work fits.

The processor drives a VGA-style monitor through a video DAC. The character
screen and the font live in the processor's own memory. Per pixel, the only
hardware is a byte-wide shift register and a register that holds the sync
and blank lines. Everything else is software: the line and frame timing,
fetching characters and fetching font rows.

## The wait instruction

```
wait $wN, V        # opcode 0x1C, I-format: rs = N (0..3), imm16 = V
```

Each wait register `$w0..$w3` is a 16-bit counter. It counts down once per
*tick* and stops at zero. In this design a tick is one pixel, which is
`TICK_DIV` = 8 clocks. When `wait $wN, V` executes:

* if counter N is zero ("ready"), it is loaded with V and execution goes on
  at once;
* if counter N is still running, the PC is set back to the `wait` and the
  instruction runs again.

`wait` arms a deadline and blocks on the previous one. The
canonical loop

```
loop:  wait $w1, 8       # once per 8 pixels = one character cell
       ...body...        # must finish in less than 8 pixels
       j loop
```

goes round exactly once per 8 ticks, however long the body takes. Counters
are re-armed when the `wait` succeeds, not when they expire. The period
therefore does not drift, but each release has a little jitter (next
section). To get a one-off delay of D ticks, use a pair of waits:
`wait $w2, D` followed by `wait $w2, 0`.

### Retry loop and release jitter

The retry is done by the controller, not by software. In state 12 (below)
the ALU computes PC-4. If the addressed counter is not ready, the PC is
loaded with that value. A blocked `wait` therefore runs fetch, decode and
state 12 again and again, one pass every 3 clocks. Two timing facts follow,
and a program author has to know both:

* **A `wait` is released 1 to 3 clocks after its counter reaches zero.** The
  counter reaches zero at the end of a tick cycle. The next state-12 visit
  sees it 1, 2 or 3 clocks later, depending on where the 3-clock retry loop
  stands.
* **The jitter does not accumulate.** A counter loaded at any clock between
  two ticks expires on the same tick. The deadline grid stays fixed to the
  tick grid, and only the release point moves within its first 3 clocks.

A store to the shift register or to the sync/blank register takes effect at
a fixed offset after the release. The program must put that offset where a
1 to 3 clock shift does not cross a pixel boundary. The shift register is
shifted at the end of the last clock of each pixel (clock 7 of 0..7). The
DAC samples in the middle of the pixel. A byte stored during clocks 0 to 3
of a pixel, or in clock 7 of the one before, is therefore shown from that
pixel on. The reference program times its shift-register store at 32 clocks
after the release. That puts the store in clocks 0 to 2 of a pixel. Its
sync/blank stores come 4 or 22 clocks after a release. Never-taken `beq`
instructions (3 clocks each) serve as padding. With that placement, the
full-size simulation shows all 960 active lines of two 640 x 480 frames
pixel-exact and starting at the same pixel.

## Processor

The processor is the classic multicycle MIPS. It has one memory for
instructions and data and one ALU. Its registers are PC, IR, MDR, A, B and
ALUOut, plus EPC and Cause for exceptions. Instructions take 3 to 5 clocks.
The Wait Register File sits beside the general register file. It is
addressed by `IR[25:21]` (low two bits) and loaded from `IR[15:0]`.

| state | name | control asserted |
|---|---|---|
| 0 | fetch | MemRead, IorD=0, IRWrite, ALUSrcA=0, ALUSrcB=01, ALUOp=00, PCWrite, PCSource=00 |
| 1 | decode | ALUSrcA=0, ALUSrcB=11, ALUOp=00 (branch target into ALUOut) |
| 2 | memory address | ALUSrcA=1, ALUSrcB=10, ALUOp=00 |
| 3 | load access | MemRead, IorD=1 |
| 4 | load write-back | RegWrite, MemtoReg=1, RegDst=0 |
| 5 | store access | MemWrite, IorD=1 |
| 6 | R-type execute | ALUSrcA=1, ALUSrcB=00, ALUOp=10 |
| 7 | R-type completion | RegDst=1, RegWrite (suppressed on overflow), MemtoReg=0; to 11 on overflow |
| 8 | beq | ALUSrcA=1, ALUSrcB=00, ALUOp=01, PCWriteCond, PCSource=01 |
| 9 | j | PCWrite, PCSource=10 |
| 10 | undefined instruction | IntCause=0, CauseWrite, ALUSrcA=0, ALUSrcB=01, ALUOp=01, EPCWrite, PCWrite, PCSource=11 |
| 11 | overflow | as 10, IntCause=1 |
| 12 | **wait** | WRWrite, ALUSrcA=0, ALUSrcB=01, ALUOp=01, PC write if not Ready (PCSource=00) |

State 1 branches on the opcode. lw and sw go to 2, R-type to 6, beq to 8,
j to 9, wait to 12, and anything else to 10. States 4, 5, 7 (no overflow),
8, 9, 10, 11 and 12 return to 0.

Instruction set: `add sub and or slt` (R-type, standard function codes),
`lw sw beq j` (standard opcodes) and `wait` (0x1C). There are no
immediates, shifts or byte loads. Constants come from memory with `lw`, and
the character and font tables keep one entry per 32-bit word.

Exceptions: on an undefined opcode, or on signed overflow of `add` or `sub`,
EPC receives the address of the offending instruction. Cause receives 0
(undefined) or 1 (overflow), and the PC jumps to `EXC_VECTOR` (0x80000180).
An overflowing `add` or `sub` leaves its destination register unchanged.

## Memory and I/O

`unified_mem` is an array of `MEM_WORDS` (8192) 32-bit words. Its read is
asynchronous: the multicycle controller reads and uses memory data within
the same state. Addresses wrap modulo the memory size, so the exception
vector 0x80000180 lands on word 0x60. A second, host port (address, write
data, read data) is used to load a program while `rst` holds the processor.
While the program runs, it can rewrite the character RAM and change the
screen.

Byte addresses with the upper 16 bits all ones are I/O. Software reaches
them as negative offsets from `r0`:

| address | access | function |
|---|---|---|
| 0xFFFFFFF0 (`-16(r0)`) | sw | load the low byte into the video shift register |
| 0xFFFFFFF4 (`-12(r0)`) | sw, lw | sync/blank register: bit 0 hsync_n, bit 1 vsync_n, bit 2 blank_n (reset 3'b011: syncs inactive, blanked) |

## Video output

`video_shift_reg` shifts its byte out MSB first, one bit per tick, and fills
with zeros. A store in the same clock as a tick wins over the shift.
`opb_video_ctrl` registers every board pin:

* `dac_r`, `dac_g`, `dac_b`: 10 bits each, all ones for a lit visible pixel
  (white on black);
* `dac_blank_n`;
* `dac_clk`: the pixel clock, with its rising edge in mid-pixel;
* `hsync_n` and `vsync_n`: these go straight to the VGA connector.

All pins lag the internal signals by one clock.

## A display program

The reference program is assembled by `tb/video_bench.sv`. It displays
`COLS x ROWS` characters of `FROWS` pixel rows each. The font RAM is laid
out `[font row][glyph]`. The address of a glyph row is then
`font_row_base + 4*code`, which takes two `add`s to multiply by 4 and one
more `add`, since there is no multiply or shift.

```
line:  wait $w0, HTOTAL           # line anchor: one line per HTOTAL pixels
       sw   hsync_low, VCTRL
       wait $w2, HS ; wait $w2, 0 # sync pulse
       sw   hsync_high, VCTRL
       wait $w1, HBP              # arm start of the visible region
       (set up pointers, unblank)
char:  wait $w1, 8                # one character cell
       lw code ; code*4 + font_row_base ; lw glyph row ; pad ; sw VSR
       advance, loop over the row
       wait $w1, 4 ; wait $w1, 0  # let the last byte leave the shift register
       sw   blank, VCTRL
```

The vertical front porch, sync and back porch are the same line loop
without the character part. At 8 clocks per pixel the character loop needs
45 of its 64 clocks. The end-of-line work fits in a 16-pixel front porch.
The full-size run uses 80 x 30 characters, a 16-row font and standard
640 x 480 timing: 800 x 525 pixels per frame, 3.36 M clocks.

## Module hierarchy

```
video_cpu                 top: tick divider, I/O decode
  control_fsm             states 0..12
  mips_datapath           PC, IR, MDR, A, B, ALUOut, EPC, Cause, muxes
    regfile               32 x 32
    alu                   with ALU-control decode
    wait_regfile          4 x 16-bit down-counters
  unified_mem             program + character RAM + font RAM, host port
  video_shift_reg         8-bit serializer
  opb_video_ctrl          sync/blank register, DAC and sync pins
mips_pkg                  opcodes, states, control word (ctrl_t), memory map
```

## Simulating

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/mips_pkg.sv tb/asm_pkg.sv tb/tb_video_cpu.sv --top-module tb_video_cpu
./obj_dir/Vtb_video_cpu
```

* `tb_video_cpu` runs the whole design end to end on a 4 x 2 character
  screen. It runs two frames, updates the character RAM between them, and
  then patches the frame loop into an undefined instruction to exercise both
  exceptions.
* `tb_video_cpu_full` does the same at full size, 80 x 30 and 640 x 480,
  with every parameter of the top at its default. It takes about 5 s.
* Both use `video_bench`. It checks line and hsync lengths (to one pixel),
  lines per frame, vsync lines, and every visible pixel against the font.
  It also counts wait stalls, shift-register loads, sync writes, taken
  branches, jumps and both exceptions, and fails if any of them never
  happened.
* `tb_mips_datapath` runs the datapath with the controller on a short
  program. It checks, to the clock, that a `wait $w2, 40` followed by
  `wait $w2, 0` with a tick every clock keeps two stores 43 clocks apart.

`tb/asm_pkg.sv` has one encoding function per instruction, for writing
further test programs.

## Where this design makes its own choices

The overall structure is set by the specification this design was built
from: the multicycle datapath, the controller states and their outputs,
four wait registers with a ready flag and a retry by PC reload, a
store-loaded byte shift register, and the DAC pin set. Where the
specification was silent, the following choices were made:

* **Unit of the wait counters.** The specification says `wait` halts "a
  number of instruction cycles". Here the counters count ticks of a pixel
  time base, so that `wait $w1, 8` is one character cell. Counting
  instructions would make the delay depend on which instructions run.
* **Memory address state.** State 2 adds the sign-extended offset
  (ALUSrcB = 10). The state diagram this design follows lists ALUSrcB = 01
  there. That would add 4 to the base register and leave the offset input
  of the multiplexer unused.
* **The wait state** returns to fetch. Its PC reload is a separate "PC write
  when not ready" control signal. The opcode 0x1C is a free MIPS opcode.
* **TICK_DIV = 8** clocks per pixel. This is a budget choice: the character
  loop needs about 45 clocks per 8 pixels.
* **Memory**: 8192 words with asynchronous read. An FPGA block RAM with a
  registered read would need one more controller state for fetch and load.
* **I/O addresses, the sync/blank register layout, the exception vector and
  the Cause codes.**
* **Overflow** suppresses the destination write.
* **The bus interface is not modelled.** The video controller is named after
  an on-chip peripheral bus, but no bus protocol is implemented. The
  processor reaches the controller through a plain single-cycle store/load
  decode.
* **Monochrome output.** One pixel bit drives all three colour buses.
* The video DAC itself is off-chip. Its digital inputs are the top's
  `dac_*` ports.
