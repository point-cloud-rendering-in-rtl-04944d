# Point cloud rendering engine in SystemVerilog

This engine draws a point cloud straight into a frame buffer, with no
conversion to triangles. Each point is an *oriented point element*: a small
disc whose projection on screen is an ellipse. A host processor projects each
element and looks up its shape in precomputed tables. It then sends the engine
one 64-bit code word per element, holding:

- the shape as up to eight horizontal pixel runs in an 8x8 bitmap;
- the screen column X and depth Z;
- the lighting inputs.

The engine computes the colour and draws the bitmap with a Z-buffer test.

The hardware needs very little memory. The whole frame and Z buffer is never
kept on chip. Only a window a few lines high is, and it slides down the image
one line at a time. This works because the host sends the elements sorted by
y. The line banks of the window are loaded and emptied over streams. Because of
that, several engines can be chained: each one renders its share of the point
cloud over the image the previous engine produced.

The RTL follows the engine architecture of the paper "Point Cloud Rendering in
FPGA" (a Virtex II implementation on a DSP/FPGA board). The paper gives:

- the block structure;
- the code word layout;
- the window and bank scheme;
- the 4-cycle element rate.

Many details are this design's own. They are listed in
[Own choices and departures](#own-choices-and-departures).

## Block structure

```
prc_chain            N_UNITS engines in a row (default 4)
 └ prc_engine        one rendering engine
    ├ prc_decoder    code word -> eight row scans, colour   (one register stage)
    │  └ prc_shader  I = I0 + kd[M]*D + ks[M]*S, kd/ks tables
    ├ prc_controller implicit y, element pacing, window advance, frame end
    ├ prc_switcher   routes row r to the bank of line y0+r
    ├ prc_writer x N_BANKS   one line bank (prc_bank_ram) + depth-tested scan drawing
    └ prc_porter     export of finished lines, import of initialised lines
prc_pkg              shared types: code word, pixel, memory word, decoded element
```

## The code word

| bits   | field    | meaning |
|--------|----------|---------|
| 0      | MODE     | 0 = small point (whole shape, mirrored), 1 = fragment of a large point |
| 1..24  | SCANS    | four scans of 6 bits; scan r (top row first) at bits `1+6r .. 6+6r` |
| 25..31 | DIFFUSE  | diffuse light intensity, 7-bit fraction |
| 32..38 | SPECULAR | specular light intensity, 7-bit fraction |
| 39..45 | MATERIAL | index into the kd and ks colour tables |
| 46..54 | X        | column of bitmap column 0 |
| 55..63 | Z        | depth; smaller is nearer |

`prc_pkg::code_t` is this layout as a packed struct. Each scan is a 3-bit start
(SoS, the low bits) and a 3-bit length (LoS, the high bits) inside the
8-column bitmap. A length of 0 is an empty row.

**Small points (MODE 0).** An ellipse is centrally symmetric, so only the
upper four rows are stored. Row `7-r` is row `r` mirrored: it starts at
`7 - SoS - LoS` and has the same length. Columns mirror as `c -> 6 - c`. As a
result, a mirrored row may begin one column left of the bitmap (offset -1).
Example: stored rows `-`, (2,1), (1,4), (1,5) give lower rows (1,5), (2,4),
(4,1), `-`.

**Large points (MODE 1).** A large point is cut into fractional 8x8 bitmaps,
usually 2x2 of them. One code word can hold only four rows. A fragment
therefore draws its four scans unmirrored into rows 0..3, and rows 4..7 stay
empty. The host sends the lower half of each fractional bitmap as another code
word, in the batch four window positions later, with its own X. The host also
sets each fragment's Z. The original large-point example marks rows 0, 2, 5
and 7 and rows 1, 3, 4 and 6 as two groups, which hints at a different split
between code words. It does not say how a code word selects its rows, so this
design keeps the simple upper-half fragment.

**Scan length.** LoS has 3 bits, so a scan is at most 7 pixels long. A full
8-pixel row cannot be described, although the writer is sized for the
three-word spans such a row would need.

The y coordinate is not in the code word. See the next section.

## The sliding window

This is the part of the design that needs the most care.

**Line banks.** An engine has `N_BANKS` line banks (default 9), one per writer.
Image line `L` always lives in bank `L mod N_BANKS`, so the banks form a ring
that the window travels around.

**Window position.** The controller keeps `y0`, the image line of the top
bitmap row. An element drawn at position `y0` covers lines `y0 .. y0+7`, and
its centre sits in the middle of those eight *active* lines. The host sends:

1. all elements whose bitmap top is `y0` (element centre y minus 4), in any
   order;
2. then one `CMD_LINE` command.

Positions run from `y0 = 0` to `IMG_H-8`. So a frame is `IMG_H-7` batches, each
ended by `CMD_LINE`. The `CMD_LINE` at the last position ends the frame.

**Drawing.** The eight active banks draw the eight rows of an element at the
same time. The switcher gives row `r` to bank `(y0_bank + r) mod N_BANKS`.

**Porter passes.** The banks outside the window belong to the porter. The
porter works in passes `q = 0 .. IMG_H+N_BANKS-1`, each over bank
`q mod N_BANKS`:

- Pass `q` exports line `q - N_BANKS`. It waits until that line is final, which
  means the window has moved past it.
- Pass `q` imports line `q`, if that line exists.
- The first `N_BANKS` passes only load. The last `N_BANKS` passes only flush.

Within a pass, each word is read from the bank and sent out, and the incoming
word is written to the same address. Export and import therefore move in
lock-step. The bank RAM has separate read and write addresses. Reads run up to
four words ahead into a small buffer, so a pass moves one word per cycle while
both streams are ready: `IMG_W/4 + 3` cycles per line.

**Controller rules.**

- An element is issued only when lines `y0..y0+7` are loaded.
- The window moves from `y0` to `y0+1` only when:
  - line `y0+8` is loaded, and
  - the last element has finished writing.

  Line `y0` is then final and the porter may export it.
- With 9 banks there is one spare bank. The swap of line `y0-1` for line
  `y0+8` therefore runs while the elements of position `y0` are drawn. If the
  swap has not finished, `CMD_LINE` stalls.
- After the frame-ending `CMD_LINE`, the controller waits for the porter's
  `frame_done`. It then starts the next frame at `y0 = 0`.

With more banks (the original description mentions a 16-line window as an
example), the porter can run further ahead. `N_BANKS` must be at least 9.

**Port sharing.** A bank is never used by the writer and the porter at the same
time:

- the porter only touches banks of lines that are not in the loaded window;
- the controller only advances when the writers are idle.

An assertion in `prc_writer` checks this.

## Drawing one row

A bank stores four pixels per memory word. Each pixel is 24-bit RGB plus 9-bit
Z, so a word is 132 bits. A scan of up to 8 pixels can straddle three words.
Every writer does three read-modify-write accesses, pipelined on a simple
dual-port RAM:

| cycle | read     | merge and write |
|-------|----------|-----------------|
| t0    | word w0  | –               |
| t0+1  | word w0+1 | word w0        |
| t0+2  | word w0+2 | word w0+1      |
| t0+3  | –        | word w0+2       |

The next element can start at t0+4, so the engine takes one element every
4 cycles. Because cycle t0+3 issues no read, the next element never reads a
word before it has been written back. No forwarding logic is needed.

**Depth test.** A covered pixel takes the element's colour and Z if the new Z
is strictly smaller. On a tie, the stored pixel stays.

**Clipping.** Pixels left of column 0 or right of `IMG_W-1` are dropped.
`z_reject` pulses for every word access in which a covered pixel lost the
depth test.

## Colour

`prc_shader` evaluates a Phong model with one specular term and white light,
per channel:

```
I = I0 + kd[MATERIAL] * DIFFUSE / 128 + ks[MATERIAL] * SPECULAR / 128,   saturated at 255
```

- `kd` and `ks` are 128-entry RGB tables (8 bits per channel).
- `I0` is an RGB register.
- All three are written through `cfg_we / cfg_addr / cfg_wdata`:

  | address | register |
  |---------|----------|
  | 0..127  | kd       |
  | 128..255 | ks      |
  | 256     | I0       |

- The tables are not reset. Load them before the first element.

The lookup is combinational, so the decoder registers geometry and colour in
the same stage.

## Chaining engines

`prc_chain` connects the engines through their frame/Z streams:

- the initial image (background colour and far Z) goes into engine 0;
- engine `k` imports what engine `k-1` exports;
- the colour leaving the last engine is the frame (four RGB pixels per word,
  left to right, top line first);
- the last engine's depth is dropped.

**Distributing the work.** Each engine has its own particle stream. The host
deals the elements to the engines at random. Every stream must still carry all
`IMG_H-7` `CMD_LINE` commands of a frame.

**Result.** The result equals drawing engine 0's elements first, then engine
1's, and so on. On a depth tie, the earlier engine wins.

**Lock-step transfers.** An engine's import and export move together, and the
valid/ready signals pass combinationally through the chain. Engine `k` runs
`N_BANKS` lines or more behind engine `k-1`.

**Speed.** Each engine issues at most one element every 4 cycles, so four
engines can start one element per cycle between them. In simulation, four
engines with randomly dealt elements rendered a 16x128 frame 2.75 times faster
than one engine. The gap to 4 is the chain fill: engine `k` cannot start a line
before engine `k-1` has exported it, which weighs more on a short frame.

## Interfaces and timing

All streams use valid/ready: a beat moves on a rising clock edge where both are
high. Reset `rst_n` is asynchronous and active low.

- **Particle stream** (`pc_valid/pc_ready/pc_cmd/pc_code`): `CMD_ELEM` with a
  code word, or `CMD_LINE`. Elements are accepted at most every 4 cycles, and
  only when their lines are loaded.
- **Import / export** (`imp_*`, `exp_*` on an engine; `init_*`, `frame_*` on
  the chain): one 132-bit word of four pixels per beat (`prc_pkg::pword_t`,
  pixel 0 leftmost). Per line, `IMG_W/4` words.
- **Status pulses**, one cycle each:
  - `elem_start`: an element was issued;
  - `large_elem`: the issued element was a large-point fragment;
  - `stall`: a command is waiting;
  - `line_advance`: the window moved or the frame ended;
  - `frame_done`: all lines of the frame are exported;
  - `z_reject`: a covered pixel lost the depth test.

Default sizes are in the table below. A porter line pass takes about
`IMG_W/4 + 3` cycles, which is 131 at 512 columns. An engine keeps the 4-cycle
element rate only while a window position has at least about 32 elements.
Otherwise the line transfer sets the pace. One 512x512 frame needs about
68,000 cycles of line transfer per engine.

| parameter | default | meaning |
|-----------|---------|---------|
| `N_UNITS` | 4 | engines in the chain (as in the original four-engine system) |
| `IMG_W`   | 512 | image width; the 9-bit X field addresses 512 columns; a multiple of 4 |
| `IMG_H`   | 512 | image height; at least 9 |
| `N_BANKS` | 9 | line banks (writers) per engine: 8 active + 1 for export/import |

## Own choices and departures

**Taken from the original description:**

- the 64-bit code word and its field positions;
- 8x8 bitmaps with start/length scans;
- symmetric storage of small points;
- splitting large points into fractional bitmaps;
- the colour formula and the tables stored in the engine;
- line banks that draw the eight element rows in parallel;
- four pixels per memory word and three accesses per row;
- 4 cycles per element;
- the sliding window with implicit y and y-sorted input;
- writers 0..8;
- export and import of the window;
- the rendering chain, with four engines.

**This design's own:**

- **Scan packing.** Bit order of SoS and LoS, and the row order.
- **Mirror rule.** Derived from a worked example of a small point.
- **MODE meaning.** Large-point fragments drawn as unmirrored upper halves.
- **Line advance.** A `CMD_LINE` command. The original only says that the
  engine generates y itself.
- **Frame protocol.** The frame-ending rule and the flush protocol.
- **Handshakes.** All valid/ready streams and the colour table write port.
- **Pixel format.** 24-bit colour, 9-bit Z, smaller Z nearer, ties keep the
  stored pixel.
- **Colour arithmetic.** The fixed-point scaling and saturation.
- **Porter.** The combined export/import pass, and its read-ahead buffer
  for one word per cycle.
- **Image size.** 512x512 (the original gives none).

**Window height.** The original text speaks of memory split into 8 parts and of
a window "e.g." 16 lines high. Its engine diagram has writers 0..8. The RTL
uses 9 banks by default and takes any `N_BANKS` of 9 or more.

**Not covered here:**

- the host side: projection, shape and lighting tables, y sorting;
- the DSP/FPGA board: PCI controller, board FPGA, DRAMs.

The engine ports are where those parts would connect.

**Memory size.** At the default sizes, one engine holds 9 x 128 words x 132
bits of window memory. That needs 36 Virtex II block RAMs (132-bit words, 36
bits per RAM). The original implementation used 17 on a 24-RAM device, so it
must have used narrower pixels or images. Reduce `IMG_W` or the pixel format
to fit such a part.

**Not verified:** timing closure at the original 100 MHz, and any FPGA
mapping.

## Verification

Each block has a self-checking testbench in `tb/`. Each one:

- compares against models written independently of the RTL (`tb/prc_ref_pkg.sv`
  holds the per-pixel reference for scans and colour);
- has a watchdog;
- prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_prc_shader` | random tables and inputs against the colour formula, including saturation |
| `tb_prc_decoder` | random code words under back-pressure: all fields, the colour, the span of all eight rows, mirrored rows reaching column -1 |
| `tb_prc_writer` | random scans back to back: clipping at both ends, three-word spans, the busy timing of 4 cycles; the line read back against a per-pixel model; `z_reject` counts |
| `tb_prc_switcher` | routing for every ring position |
| `tb_prc_controller` | against a porter model: issue only with loaded lines, 4-cycle spacing, window advance, `lines_done`/`y0_bank`, three frames with flush |
| `tb_prc_porter` | against bank models and random stalls on both streams: line order and data, no access to loaded active lines, `frame_done`; one frame with free streams must run at one word per cycle |
| `tb_prc_engine` | 32x16 frame, three frames of random small and large elements over random initial images with random stalls; exported colour and Z compared pixel by pixel; element rate and every mechanism counted |
| `tb_prc_chain` | four engines, 32x20 frame, two frames, elements dealt at random; output colour compared with the model |
| `tb_prc_chain_full` | the chain at its default parameters (4 engines, 512x512): one full frame compared pixel by pixel (122,505 cycles) |
| `tb_prc_speedup` | 16x128 frame, 1936 random elements: one engine against four chained engines, both images checked; one engine needs 4.09 cycles per element, four engines are 2.75 times faster and at their peak start 64 elements in 64 cycles |

Run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/prc_pkg.sv tb/prc_ref_pkg.sv tb/tb_prc_engine.sv \
    --top-module tb_prc_engine -Mdir obj_engine -o sim
./obj_engine/sim
```

Replace the testbench name for the others. The full-size chain test builds and
runs in well under a minute. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/prc_pkg.sv rtl/<module>.sv`.

The only lint warning left is `SYNCASYNCNET` on `rst_n`. It appears because the
assertions use the reset in `disable iff` while the flip-flops use it
asynchronously.
