# Beam-steering Opto-ULSI processors: 8-phase SRAM array and 256-phase shift-register array

An Opto-ULSI processor is a liquid-crystal-on-silicon chip that steers a light
beam. Every pixel has a metal mirror on top of the silicon; the voltage between
that mirror and a common transparent counter electrode (ITO) sets the liquid
crystal above it, and with it the optical phase of the light reflected there.
Loading a blazed phase grating into the pixel array steers the reflected beam;
changing the grating pitch changes the direction, which is how one input fibre
is switched to one of N output fibres.

This RTL models the digital part of two such processors:

* **`oup8_array`, the 8-phase processor.** Each pixel stores a 3-bit code in
  three SRAM cells. Eight phase signals `p[7:0]` are distributed to the whole
  array; the code picks one of them through an 8:1 multiplexer and an inverter
  drives the result onto the mirror. The chip is a memory: the host writes and
  reads the codes through an address/data port.
* **`oupn_array`, the 256-phase processor.** Distributing 256 phase lines is not
  practical, so each pixel keeps an 8-bit code in a serially written 8-stage
  shift register. A global clock runs 256 times per phase-clock period (one
  *frame*), and a single global circuit broadcasts a frame count and the ITO
  level. Each pixel turns its code into one of 256 drive levels from these.

`oup_top` instantiates both side by side; they share no signals.

## Array organisation (both processors)

The full chips have 1024 x 1024 pixels in four 512 x 512 blocks, arranged 2 x 2
so that word and bit lines stay short:

```
   Block2 | Block3        mirror[y][x]: y counts rows upward from Block0,
   -------+-------        x counts columns rightward from Block0
   Block0 | Block1
```

An address has three fields: a 2-bit block field `al`, a row field and a column
field. A column address selects a *word* of 8 adjacent pixels, so a full chip
row of 512 pixels is 64 words. Each block has its own row decoder and column
decoder, enabled only when its block is addressed (`nand_nor_decoder`, below).

| Field | Full chip | RTL default | Parameter |
|---|---|---|---|
| block | 2 bits | 2 bits | package `BLOCK_BITS` |
| row | 9 bits (512 rows per block) | 6 bits (64 rows) | `ROW_BITS` |
| column word | 6 bits (64 words per row) | 3 bits (8 words) | `COL_BITS` |
| pixels per word | 8 | 8 | package `PIX_PER_WORD` |
| array | 1024 x 1024 | 128 x 128 | |

**The defaults are scaled down.** Elaborating the pixel arrays with the yosys
slang front end costs roughly 2 ms and 15 KB per pixel, so the two
million-pixel arrays would need about 32 GB and more than an hour. Setting
`ROW_BITS = 9` and `COL_BITS = 6` on `oup_top`, `oup8_array` or `oupn_array`
gives the full chip; nothing else depends on the size.

## The 8-phase processor (`oup8_array`)

### Pixel (`oup8_block`)

A pixel is three storage bits `q`, and its mirror drive is `~p[q]`: the code
selects phase line `p[q]`, and the final stage is an inverter. (On silicon that
inverter also shifts the level from 1.8 V to 3.3 V; the voltage change has no
logic function.) Storage is modelled as flip-flops written on the clock edge,
not as 6-transistor cells.

Inside a block, row `r` is selected by its one-hot word-select line `ws[r]`
and word `g` by its column-select line `csel[g]`. With `we` high, the selected
word takes `wd` at the clock edge. `rd` always shows the selected word: an OR of
the rows gated by `ws` (the bit lines), then of the words gated by `csel` (the
column multiplexer). `rd` is zero when nothing is selected.

### Pins and access timing

| Port | Chip pin | Meaning |
|---|---|---|
| `cs` | CS | chip select |
| `rw_n` | R/W | 1 = read, 0 = write |
| `al[1:0]` | al[1:0] | block |
| `a_row` | A[14:6] | row |
| `a_col` | A[5:0] | column word |
| `p[7:0]` | P[7:0] | the eight phase signals |
| `dio_in`, `dio_out`, `dio_oe` | DIO[23:0] | 8 pixels x 3 bits; the chip's bidirectional bus is split into in, out and output enable |
| `rst_n` | Pad_RBN | read as an active-low reset of the control registers |
| `clk` | (none) | the model is synchronous |

The chip's port is described without a clock. This model makes it synchronous,
with one access per clock:

```
edge 0: cs=1 sampled -> address into the SR hold stage, rw_n and dio_in captured
cycle : block, row and column decoders select one word
edge 1: write: word updated         read: dio_out <= word, dio_oe = 1
```

Mirror outputs change as soon as a code or `p` changes.

### Address hold stage (`addr_sr_latch`)

The address lines pass through set/reset cells (S = load & d, R = load & ~d)
that are loaded while `cs` is high and hold otherwise. The decoders therefore
see a steady address while the pins change, which avoids glitches on the
word-select lines. The cells are sampled on the clock.

### Decoder (`nand_nor_decoder`)

Each output line is the NOR of two NAND gates. One NAND matches the upper half
of the address and also takes the enable; the other matches the lower half. The
line goes high only when both halves match and the enable is high. In silicon a
chain of buffers follows to drive the long word line; it is not modelled. The
same module decodes the block field (N = 2), the rows and the columns.

## The 256-phase processor (`oupn_array`)

This is the hardest part to follow. The chip's published description fixes only
these points:

* each pixel has an 8-bit shift register that is written through an
  addressable serial data input;
* a global clock runs at 256 times the phase clock;
* one global circuit generates the ITO signal;
* Gray code is used to cut switching power.

How these pieces combine into 256 levels is this design's own construction. It
is described here.

### Global circuit (`oupn_global`, `gray_counter`)

A counter steps once per global clock and wraps every 256 steps; one wrap is a
frame. The counter register holds its value in reflected Gray code, and this
value, `cnt`, is broadcast to every pixel. With Gray code only one of the eight
broadcast lines toggles per clock across the whole array; a binary count
toggles two on average, and eight at the wrap.

* `frame_start` is high while `cnt` is zero.
* `ito` toggles every time a frame begins. The liquid crystal therefore sees
  alternating polarity and no DC over two frames.
* The external clock `ext_clk` passes through a two-flop synchroniser. Each
  rising edge restarts the count at zero three global clocks later (and toggles
  `ito`), so frames stay locked to the external clock.
* The global clock itself is an input. On the chip it is generated internally,
  by a circuit that is not described.

### Pixel (`oupn_block`)

Each pixel has:

* an 8-stage shift register `sr`. While the pixel's word is addressed and `we`
  is high, every clock shifts `din[i]` in. A code is loaded in 8 clocks, most
  significant bit first. The code is the **Gray code** of the pixel's level
  (`oup_pkg::bin2gray`);
* one drive flip-flop `on`. At each clock, if `cnt == sr` it clears;
  otherwise it is set by `frame_start` or keeps its value;
* the output stage `mirror = on ^ ito`, so the liquid crystal sees a voltage
  exactly while `on` is high, whatever the ITO polarity.

So `on` is high for exactly *level* of the 256 clocks of each frame. Level 0
never turns on. Level 255 is on for 255/256 of the frame. The result is 256
distinct RMS drive levels. The pixel needs only an 8-bit equality compare with
the broadcast count, and no counter of its own.

A pixel rewritten during a frame passes through intermediate codes while its
bits shift in. It shows the new level from the next full frame on.

### Pins and write timing

| Port | Meaning |
|---|---|
| `gclk` | global clock, 256 per frame |
| `ext_clk` | external phase clock that aligns frames and the ITO signal |
| `cs`, `we`, `al`, `a_row`, `a_col` | select one word of 8 pixels for a serial write |
| `din[7:0]` | one serial data bit for each of the 8 pixels of the word |
| `ito` | counter-electrode level |
| `cnt` | the broadcast Gray count, for observation |
| `mirror` | drive of every pixel |

To write a word, hold `cs`, `we` and its address for 8 clocks while the code
bits appear on `din`. Address and data go through the same hold stage as on the
8-phase chip, so each bit reaches the shift registers one edge after it was
sampled. Words can follow each other with no gap. The published block diagram
shows only the address, the external clock and the global clock; the data and
control pins are this design's choice, modelled on the 8-phase chip.

## What is not modelled

* The 6-transistor SRAM cell, its large tri-state write driver and the
  high-voltage level shifter. These are transistor circuits; only their logic
  function is modelled.
* The liquid crystal, the mirror and the ITO electrode.
* The on-chip generation of the 256x global clock.
* The buffer chains after the decoders, the physical gaps between blocks, and
  power routing.
* Compensation for the non-linear response of the liquid crystal. It is a goal
  of the proposed processor, but no mechanism for it is described.
* The full 1024 x 1024 size as a default (see the table above).

## Files

| File | Content |
|---|---|
| `rtl/oup_pkg.sv` | sizes, Gray-code conversion functions |
| `rtl/nand_nor_decoder.sv` | one-hot NAND/NOR decoder |
| `rtl/addr_sr_latch.sv` | set/reset address hold stage |
| `rtl/oup8_block.sv`, `rtl/oup8_array.sv` | 8-phase pixel block and chip |
| `rtl/gray_counter.sv`, `rtl/oupn_global.sv` | Gray counter and global circuit |
| `rtl/oupn_block.sv`, `rtl/oupn_array.sv` | 256-phase pixel block and chip |
| `rtl/oup_top.sv` | both chips side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulating

Each testbench checks its results and ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_oup_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/oup_pkg.sv tb/tb_oup_top.sv
obj_dir/Vtb_oup_top
```

`tb_oup_top` runs both chips end to end at the default size:

* **8-phase chip.** It fills every word of all four blocks and runs a random
  back-to-back mix of reads and writes, checking data and latency. It then
  checks every mirror for each phase line.
* **256-phase chip.** It loads a random level into every pixel and measures one
  frame pixel by pixel. It then restarts the frame from the external clock.
* **Mechanism counts.** It reports how often each mechanism occurred, and fails
  if one never did.

Building and running it takes about a minute.

The block testbenches use smaller sizes where the module has parameters. Two
simulation notes:

* Verilator's two-state simulation starts un-reset storage at random values.
  The pixel codes have no reset, as in SRAM, so a testbench must write every
  pixel it checks.
* Changing the array size only needs `ROW_BITS`/`COL_BITS` on the array
  modules. The array testbenches compute their expectations from their own
  `RB`/`CB` constants, which must match.
