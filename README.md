# Real-time audio waveform display on VGA

This design shows the audio that is playing as a live trace on a VGA monitor,
like a simple oscilloscope. It watches a stream of 16-bit audio samples
(48 kHz) for a rising zero crossing and captures the next 256 samples into a
small dual-port RAM. It redraws those samples on every frame as a white
waveform across the middle half of the screen. Capturing always starts at a
rising zero crossing, so a steady tone appears as a standing wave rather than
a rolling one. Capture and display run at the same time on the two ports of
the RAM.

The design is written for a 100 MHz system clock. It is driven by VGA scan
counters whose X position steps at 50 MHz (each X is held for two clocks).
Everything runs on that one clock. The slow audio rate and the pixel rate are
handled with enables, not with divided clocks.

```
 audio source ──sample[15:0], new_sample──► wave_capture ──write addr/data/en──► ram_1w2r (256 x 8)
                                                                                     │ port B, 1-cycle read
 VGA scan counters ──xpos, ypos, vga_valid──► wave_display ◄──read data─────────────┘
                                                  │      └──read addr──► ram_1w2r
                                                  └──valid_pixel──► vga_rgb (white / black)
```

The design is built from the structure of a university lab exercise: a
capture block, a display block, and a provided 256 x 8 block RAM between
them. The audio source (the music player from an earlier lab), the VGA sync
generator and the board-level top are outside this RTL. Their signals are
ports of `wave_display_top`.

## Files

| file | contents |
|---|---|
| `rtl/wave_pkg.sv` | widths, screen constants, capture state type, `sample_to_row` conversion |
| `rtl/wave_capture.sv` | zero-crossing capture FSM and RAM write port |
| `rtl/ram_1w2r.sv` | 256 x 8 dual-port RAM, one read/write port, one read port |
| `rtl/wave_display.sv` | X-to-address mapping, two-sample pipeline, pixel decision |
| `rtl/wave_display_top.sv` | the three blocks wired together, colour output |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/vga_scan_model.sv` | behavioural scan counters for the end-to-end test |

## Top-level interface (`wave_display_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 100 MHz clock |
| `reset` | in | 1 | synchronous, active high |
| `xpos` | in | 11 | VGA X position (visible 0..1287) |
| `ypos` | in | 10 | VGA Y position (visible 0..479) |
| `vga_valid` | in | 1 | the position is in the visible area |
| `vga_rgb` | out | 6 | `{R1,R0,G1,G0,B1,B0}`: `6'b111111` on the trace, `0` elsewhere |
| `sample` | in | 16 | audio sample, two's complement |
| `new_sample` | in | 1 | one-cycle strobe: `sample` is new |

`vga_rgb` is combinational from the scan inputs and internal registers. The
board top is expected to register it before the DAC. That register adds one
clock of delay, the same for every pixel.

## Sample format: from audio to screen rows

The RAM holds 8-bit unsigned screen rows, not raw audio. The display compares
them with `Y[8:1]`, the scan line divided by two, which runs from 0 to 239 on
a 480-line screen. Two operations turn a sample into a row:

1. **Invert the sign bit.** In two's complement, +1 and −1 are at opposite
   ends of the unsigned range, so a wave drawn from raw samples would split
   into two halves at the top and bottom of the screen. Inverting bit 15
   gives offset binary, where −1 and +1 are neighbours.
2. **Scale and centre.** The upper 7 bits of the offset-binary value are
   taken and 56 is added:

   `row = ((sample + 32768) >> 9) + 56`

   The full 16-bit range becomes rows 56..183, that is 128 rows centred on
   row 120, the middle of the screen.

Screen Y grows downwards, so positive samples are drawn below the centre
line. To change the scale or position, edit `sample_to_row` and `Y_CENTER` in
`wave_pkg.sv`. The testbenches compute the formula above on their own and
would need the same edit.

## Capture FSM (`wave_capture`)

Two states, `CAP_ARMED` and `CAP_ACTIVE`. The module only acts in cycles with
`new_sample_ready`.

- **ARMED.** The address register is held at 0. A one-bit register remembers
  whether the previous sample was negative. When a negative sample is
  followed by a non-negative one, that sample is the first of the capture. It
  is written to address 0 **in the same cycle as its strobe**, and the FSM
  enters ACTIVE with the address at 1. The write port is combinational for
  this reason: the crossing is only known when the crossing sample itself is
  present, and that sample has to land at address 0.
- **ACTIVE.** Every new sample is written at the address register, and the
  register increments. The write to address 255 wraps the address to 0 and
  returns the FSM to ARMED. A capture is therefore exactly 256 consecutive
  samples, 0..255. Crossings that arrive during a capture are ignored.

Zero counts as positive: only the sign bit is examined. An assertion states
that the RAM is never written without `new_sample_ready`.

Captures run continuously while audio plays. The RAM can be overwritten while
a frame is being drawn, so one frame can show parts of two captures. The
original lab accepts this, and so does this design: there is no double
buffering.

## Display pipeline (`wave_display`)

This is the part that needs the most care, because three things happen at
different rates: X steps every 2 clocks, the RAM address every 4, and the RAM
answers 1 clock after the address.

**Address mapping.** Only the middle half of the 1024-wide X range
(X = 256..767, where `X[9:8]` is `01` or `10`) is mapped onto the 256 words.
Bit 10 is ignored, bit 8 is dropped so that the two quarters join up, and bit
0 is dropped so that each word spans two X pixels:

`read_address = {X[9], X[7:1]}`

**Two-sample register.** Each cycle, the module registers the read address.
When the address differs from last cycle's, a one-cycle `take_sample` flag is
set. In the next cycle the RAM output holds the new word, and the flag shifts
it in: `prev_sample <= curr_sample; curr_sample <= read_value`. So each RAM
word enters the pair exactly once, however many cycles its address is held.

**Pixel rule.** A pixel is white when `vga_valid` is high, when
`X_FIRST <= X <= X_LAST` (all 11 bits compared), and when

`min(prev, curr) <= Y[8:1] <= max(prev, curr)`.

Both orders of the two samples are handled, so rising and falling parts of
the wave are both drawn. The two samples, together with the two X positions
they belong to, bound a rectangle on screen. The trace is a chain of such
vertical bars, and a flat stretch lights one row.

**Where the window starts and ends.** Follow word A through the pipeline.
Its address appears at X = 2A+256. The RAM data and the flag follow in the
next clock, and the pair shifts at the end of that clock, which is still
within X = 2A+256. The pair (word A−1, word A) is then held from X = 2A+257
through X = 2A+258:

| clock | X | read_address | take_sample | pair (prev, curr) |
|---|---|---|---|---|
| 0 | 2A+256 | A (changed) | 0 | (A−2, A−1) |
| 1 | 2A+256 | A | 1 (RAM gives word A) | (A−2, A−1) |
| 2 | 2A+257 | A | 0 | (A−1, A) |
| 3 | 2A+257 | A | 0 | (A−1, A) |
| 4 | 2A+258 | A+1 (changed) | 0 | (A−1, A) |
| 5 | 2A+258 | A+1 | 1 | (A−1, A) |

The first X where the older sample is word 0 is X = 259 (A = 1). The last X
where the newer sample is word 255 is X = 768 (A = 255). The window
259..768 draws exactly the 255 segments of one pass through the RAM, two
pixels each, with no segment joining word 255 back to word 0. The window must
be compared on all 11 bits. Otherwise X = 1283..1792, whose low ten bits fall
inside it, would draw a second partial copy on the right of the screen. The
bounds are parameters (`X_FIRST`, `X_LAST`). If the scan timing changes (for
example a different number of clocks per X), re-derive them with the table
above.

The pipeline assumes each X is held for exactly two clocks. The phase of the
X steps relative to anything else does not matter, because the pipeline keys
on the address change itself.

## RAM (`ram_1w2r`)

256 words of 8 bits. Port A (`wea`, `addra`, `dina`, `douta`) reads and
writes, and port B (`addrb`, `doutb`) only reads. Both reads are registered:
one clock of latency, as in an FPGA block RAM. When both ports use the same
address and port A writes, the read returns the old word (read-first). The
capture block uses only the write half of port A. `douta` is left unconnected
in the top. The array has no reset. It starts at zero in simulation.

## Choices made here that the lab leaves open

- Sample-to-row conversion (scale 1/512, centre at row 120, positive
  samples downwards).
- Zero is positive in the crossing test.
- The crossing sample is written combinationally in its own strobe cycle.
- Inclusive comparison at both ends of the bar.
- Display window 259..768, derived from this design's pipeline.
- Read-first behaviour of the RAM on a same-address collision.
- Synchronous active-high reset, which returns the FSM to ARMED and clears
  the display registers.
- White on black only. Colour effects that depend on the picture are not
  built.
- No output register inside `wave_display_top`; the board top registers the
  colour.

## Verification

Each testbench checks the block against values it works out independently,
and prints `TB_RESULT checks=N failures=M`. Each has a cycle-count watchdog.

- `tb_ram_1w2r`: fills and reads back every word. It then runs 4000 random
  cycles on both ports with forced same-address collisions. It checks the
  one-cycle latency, including that the outputs do not move when the
  addresses change between edges.
- `tb_wave_capture`: sine bursts of random period, amplitude and phase,
  noise, runs of zero, and extreme values, with random gaps between strobes.
  A reference model predicts every write (enable, address, row). The test
  checks 256 writes per capture, that a capture starts on a rising crossing,
  and that nothing is written between strobes. It also requires that
  crossings were ignored during a capture.
- `tb_wave_display`: 300 scan lines over a testbench memory with one-cycle
  latency, with random Y (including Y beyond the screen) and random
  `vga_valid` drop-outs. It checks `read_address` and `valid_pixel` in every
  cycle against the rule "pixel X shows segment (A−1, A) with
  A = (X−257)/2". Rising, flat and falling segments, X ≥ 1024, and masked
  pixels must all occur.
- `tb_wave_display_top`: end to end, at the default size, with real rates.
  One sample every 2083 clocks, a 1600 x 525 scan with 1288 x 480 visible.
  It plays three tones (full-scale 440 Hz, quieter 1 kHz, clipped 300 Hz).
  It shadows the capture rules in the testbench and checks every pixel of
  three full frames. It counts captures started and wrapped, crossings
  ignored, samples ignored while armed, writes during drawing, the three
  segment kinds, and blanked pixels. It fails if any of these never happens,
  or if the picture does not change between tones. It runs about 12 million
  clocks and takes a few seconds.

Running one test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/wave_pkg.sv rtl/ram_1w2r.sv rtl/wave_capture.sv rtl/wave_display.sv \
  rtl/wave_display_top.sv tb/vga_scan_model.sv tb/tb_wave_display_top.sv \
  --top-module tb_wave_display_top
./obj_dir/Vtb_wave_display_top
```

For a single block, list `rtl/wave_pkg.sv`, that block's file and its
testbench. Run from the repository root.

## Limits

- The VGA sync generator is not included. Only its X/Y/valid outputs are
  assumed, and the scan model's blanking lengths (1600 X counts per line, 525
  lines) are placeholders.
- The audio source is not included. Any source that provides a 16-bit two's
  complement sample and a one-cycle strobe will do.
- Hardware timing closure at 100 MHz has not been checked. The longest
  combinational path is the 8-bit min/max compare feeding `vga_rgb`, which
  the board-level output register is meant to absorb.
