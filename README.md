# Polyphase image downscaler for 8-bit video

This is a video downscaler for 8-bit pixels at one pixel per clock (13.5 MHz
BT.601 video). It shrinks a picture by any ratio up to 1:1 in each direction.
The simplest downscaler keeps every n-th pixel, and at a non-integer ratio
that leaves uneven gaps and aliasing. This one works differently. For every
output pixel it picks a small interpolation filter whose **group delay** puts
the output sample where it belongs between two input pixels:

- Horizontally there are 32 filters of 5 taps each, so the output position is
  resolved to 1/32 pixel.
- Vertically there are 16 filters of 3 taps each, so it is resolved to 1/16
  line.

Each filter has unity gain, so the set acts as an all-pass filter whose delay
varies with the output position. This is why the scaler is called "non-linear"
(time-varying). It never runs faster than the input pixel clock.

The architecture follows the paper *Optimized Image Downscaler Using
Non-linear Digital Filter* (B. Lee, H. Lee, Y. Lee, B. Kang, Dong-A
University). The RTL is written from that description. Where the paper is
silent, this design makes its own choices; they are listed under
[Departures and own choices](#departures-and-own-choices).

## Data path

```
pix_in,hin,vin -> time_alignment -> line_memory (SRAM1 -> SRAM2)
                                     |  x0 (current), x1 (1H), x2 (2H)
   vertical_scaler:   vertical_dto --> vertical_filter   3 taps, 16 phases, /64
                                     |  Data_outv
   horizontal_scaler: horizontal_dto -> horizontal_filter 5 taps, 32 phases, /256
                                     |  Data_outh
                      fifo_control ---> sync_fifo 256 x 16 -> rd_data
```

| module | role |
|---|---|
| `downscaler_top` | Wires everything together. |
| `ds_pkg` | Widths and both coefficient sets. |
| `time_alignment` | Input registers, plus line-start (`sol`) and field-start (`sof`) pulses. |
| `sram_control` | Pixel address counter for the line memories. |
| `line_memory`, `line_sram` | Two 768 x 8 one-line delays. |
| `vertical_scaler` | Holds `sram_control`, `vertical_dto`, `vertical_filter` and `sync_delay`. |
| `sync_delay` | Delays the control signals by the vertical path's latency. |
| `horizontal_scaler` | Holds `horizontal_dto`, `horizontal_filter` and `fifo_control` (write gating). |
| `sync_fifo` | Output buffer. |

## The DTO: where output pixels fall

Each direction has a discrete-time oscillator (DTO). It is a 17-bit phase
accumulator stepped by the scaling ratio in 1.16 fixed point:

| ratio | step |
|---|---|
| 1:1 | 65536 |
| 1/2.0625 | 31775 |
| 1/2.4375 | 26887 |

The horizontal DTO adds the step once per active pixel. The vertical DTO adds
it once per active line, at the line start.

- **Enable.** When the sum crosses a multiple of 2^16, its top bit differs
  from the accumulator's top bit. The registered XOR of the two top bits is
  the enable (`en_h` or `en_v`): this input pixel or line yields an output.
- **Phase.** The bits just below the top bit of the accumulator, taken
  *before* the step and registered, are the filter phase. That is 5 bits for
  `sel_h` and 4 bits for `sel_v`.

A field of L lines at step s therefore gives floor(L·s/65536) output lines. A
line of W pixels gives floor(W·s/65536) output pixels. Both accumulators
restart at 0 every line (horizontal) and every field (vertical).

The phase is the raw fraction of the accumulator. It is not the exact
sub-pixel distance to the ideal output position.

- At a carry, the old fraction lies in [1 − s, 1). So a given ratio uses only
  the upper part of the phase table. For example, 1/2.4375 uses horizontal
  phases 18–31, and 1:1 always uses phase 0.
- The output grid therefore has some position jitter. At 1/2.4375 it is about
  0.6 pixel peak to peak, against up to 1 pixel for pixel dropping.

This is how the DTO is drawn in the paper, and the RTL keeps it.

## The filters: a multiplexer-adder structure

The 32 horizontal coefficient sets (gain 256) are the paper's table. They are
in `ds_pkg::hcoef`, and row n+1 is used for phase n. Tap 1 weights the newest
sample. With this mapping, the group delay rises from about 1.5 samples
(phase 0) to 2.5 samples (phase 31) behind the newest tap.

The paper's optimisation is the order of operations:

- **Adder-multiplexer (not built).** Compute all 32 filter outputs, then
  select one.
- **Multiplexer-adder (built).** Select one coefficient set first, then use
  one adder.

In the RTL, each bit of each selected coefficient's magnitude gates a shifted
copy of its tap (x, 2x, … 128x). The gated copies are summed with the
coefficient's sign. The sum is then:

1. limited to 0 … 65535,
2. divided by 256 (truncation),
3. registered.

The vertical filter has the same structure with 3 taps, 16 phases and gain
64. The paper gives no vertical coefficients, so this design uses linear
interpolation. Phase p sits 0.5 + (p + 0.5)/16 lines behind the current line;
for example, phase 0 is (30, 34, 0)/64 and phase 15 is (0, 34, 30)/64. These
weights never need the limiter, but it is kept so that other coefficients can
be loaded by editing `ds_pkg::vcoef`.

## Line memory

`line_memory` holds two 768 x 8 single-port SRAMs with read-before-write:

- SRAM1 is written with the incoming line. At the same address it returns the
  previous line.
- SRAM2 stores that output and returns the line before it.
- SRAM2 runs one clock behind SRAM1. The current and 1H pixels are re-timed,
  so all three taps (`x0`, `x1`, `x2`) leave together, two clocks after the
  input stage.

Addresses count active pixels from 0 on every line. Only the first 768 pixels
of a line are stored.

## Timing

| stage | latency |
|---|---|
| `time_alignment` | 1 |
| `line_memory` | 2 |
| `vertical_filter` | 1 |
| `horizontal_filter` | 1 |
| `fifo_control` write | 1 |

- `sync_delay` carries `hin`, `sol` and `sof` three clocks and `en_v` two
  clocks, so they line up with the vertically filtered data.
- An output pixel whose horizontal carry falls on input pixel *i* uses input
  pixels *i*−3 … *i*+1.
- It is written into the FIFO at the sixth rising edge after pixel *i* is
  sampled on `pix_in`. The testbench checks this edge for every word.
- At the last pixel of a line the newest tap repeats the edge pixel.
- The tap chain carries the previous line's last four pixels into the start
  of the next line.

Requirements on the input:

- at least 4 clocks of horizontal blanking between lines;
- `vin` low for at least one line between fields;
- `scale_h` and `scale_v` changed only while `vin` is low.

The first two input lines of a field are filtered together with whatever
lines the memories still hold. Those are lines from the end of the previous
field, or lines sent with `hin` high and `vin` low.

## Output FIFO

`fifo_control` writes a pixel only when the horizontal and vertical enables
are both set. Each 16-bit word is:

| bits | content |
|---|---|
| 7:0 | pixel |
| 8 | first pixel of an output line |
| 9 | first pixel of an output field |
| 15:10 | zero |

The FIFO is single-clock, 256 words. A read with `rd_en` returns the word on
the next cycle, with `rd_valid`.

If the reader falls behind and the FIFO fills, further pixels are dropped and
the sticky `overflow` output is set. The full test counts the write issued in
the previous cycle. At 1:1 a line produces 720 words, far more than 256, so
the reader must keep up with the pixel rate when scaling is near 1.

## Parameters and interface

`downscaler_top` parameters:

| parameter | default |
|---|---|
| `LINE_DEPTH` | 768 |
| `FIFO_DEPTH` | 256 |
| `FIFO_W` | 16 |

Ports:

| port | meaning |
|---|---|
| `clk`, `rst_n` | Clock and reset (asynchronous, active low). |
| `pix_in[7:0]`, `hin`, `vin` | Pixel, horizontal active, vertical active. |
| `scale_h[16:0]`, `scale_v[16:0]` | Ratios in 1.16 fixed point. |
| `rd_en` | FIFO read request. |
| `rd_data[15:0]`, `rd_valid` | Read word and its valid flag. |
| `empty`, `full`, `fifo_count` | FIFO status. |
| `overflow` | Sticky: a pixel was lost to a full FIFO. |
| `h_clipped` | The horizontal limiter acted on this cycle's filter output. |

Pixel width, tap counts, phase counts and gain shifts are constants in
`ds_pkg`.

## Verification

Every module has a self-checking testbench in `tb/` that compares it with
reference arithmetic in `tb/ds_ref_pkg.sv`. That package is written
independently of the RTL:

- a separate copy of the horizontal coefficient table;
- vertical weights from a distance formula;
- plain multiply-accumulate filters;
- a 1.16 DTO model.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

**`tb_downscaler_top`** runs the whole design at its default sizes. A frame
model predicts every FIFO write (data, tags and clock edge), and every word
read back is also checked. It runs:

- small frames at six ratio pairs, including a slow reader;
- a 720 x 480 frame at 1/2.4375 (295 x 196 output, 858 clocks per line);
- a frame with no reader, which must fill the FIFO, drop words and set
  `overflow`.

It also counts, and requires, each mechanism: skipped lines, skipped pixels,
limiter clipping, FIFO backlog, drops on full, line and field tags, ratio
changes, and all 32 horizontal and 16 vertical phases.

**`tb_workload_snr`** scales 720 x 480 diagonal cosine patterns at 1–5 MHz
(13.5 MHz sampling) by 1/2.0625 and by 1/2.4375 in both directions. It
compares the result with pixel dropping at the same DTO carries. The measure
is a spectral SNR along output rows: Hann window, tone ±3 bins against all
other non-DC bins.
Measured:

| pattern | pixel drop, 1/2.0625 | this scaler, 1/2.0625 | pixel drop, 1/2.4375 | this scaler, 1/2.4375 |
|---|---|---|---|---|
| 1 MHz | 17.5 dB | 23.3 dB | 17.5 dB | 22.2 dB |
| 2 MHz | 11.3 dB | 17.2 dB | 11.2 dB | 16.0 dB |
| 3 MHz | 7.5 dB | 13.6 dB | 7.5 dB | 12.4 dB |
| 4 MHz | 4.6 dB | 11.0 dB | 8.5 dB | 12.4 dB |
| 5 MHz | 2.2 dB | 9.0 dB | 2.2 dB | 7.9 dB |

The paper reports the same ordering, but with far higher absolute numbers
(about 45–62 dB). Its SNR definition is not known, so only the ordering is
checked.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ds_pkg.sv tb/ds_ref_pkg.sv tb/tb_downscaler_top.sv \
    --top-module tb_downscaler_top -o sim
./obj_dir/sim
```

Replace `tb_downscaler_top` with any other testbench name. The end-to-end
test takes under a second. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ds_pkg.sv rtl/downscaler_top.sv`.

## Departures and own choices

Taken from the paper:

- the block structure and the order of operations;
- the horizontal coefficients;
- the DTO structure and widths (17-bit ratio, 5-bit `sel_h`);
- 3 taps, 16 phases and gain 1/64 vertically;
- the 768 x 8 line memories and the 256 x 16 FIFO;
- the limit, divide and register order after each filter.

This design's own choices:

- **Vertical coefficients.** Linear interpolation (see above).
- **Vertical DTO internals.** One step at each line start; cleared while
  `vin` is low.
- **Horizontal DTO.** Cleared between lines.
- **Phase mapping.** Row order of the coefficient table against the phase
  value, and tap 1 as the newest sample.
- **Widths and rounding.** An 18-bit signed sum, and truncation rather than
  rounding.
- **Line edges.** Edge-pixel repetition at the end of a line, and the tap
  chain kept across lines.
- **Unnamed blocks.** The contents of `time_alignment` (input registers and
  framing pulses), `sync_delay` and `sram_control`. The paper only names
  these blocks.
- **FIFO word.** The upper byte carries tags; the pixel path is 8 bits.
- **Full FIFO.** Drop-on-full and the `overflow` flag.
- **Memories.** Inferred arrays in place of compiled SRAM macros, with
  read-before-write single-port behaviour.
- **FIFO clocking.** The FIFO is single-clock, as the paper calls it
  synchronous. The paper also credits it with absorbing clock differences
  between systems; that would need a dual-clock FIFO, which is not built.
- **Reset.** Asynchronous active-low reset of all registers except the
  memory arrays.

Not built:

- The adder-multiplexer (compute-all-then-select) filter. The paper only
  uses it as the comparison baseline.
- The layout and cell-library results.

A coarse Yosys synthesis of the top gives about 290 word-level cells and 206
flip-flop bits. The memories (2 x 768 x 8 and 256 x 16) stay as memories, and
the coefficient selection shows up as ROM.
