# IFPAC readout-clock generator

A CCD must be clocked in a precise pattern to move its charge out: the line
(parallel) clocks shift a whole row into the serial register, the serial
clocks shift that register pixel by pixel onto an output amplifier, and
reset, sample and ADC-convert strobes for the video chain must line up with
each pixel. The pattern depends on the detector model, which output or
outputs you read, and which part of the chip you want.

This RTL generates those clocks for the IUCAA Focal Plane Array Controller
(IFPAC) clock card. It works from four small user-written **waveform
tables**. Each table is a list of (16 bit state, hold time) pairs. From the
tables and a handful of parameters, the hardware works out the rest:

* full-frame or region-of-interest (ROI) readout;
* dark and overscan pixels;
* clearing the detector;
* exposure timing and the shutter line;
* repeated exposures;
* steering the clocks so that charge flows to one, two or four selected
  output amplifiers;
* mapping everything onto the 32 backplane clock lines, for one detector or
  for two detectors at once.

The tables are written once per detector, for the lower-left output only.
Everything else is derived from them.

## The state word and the four tables

Every table entry is two 16 bit words. The first is the state of all clock
signals. The second is how long that state is held, in units of one clock
cycle (10 ns at the intended 100 MHz clock).

| bit | 15 | 14 | 13 | 12 | 11 | 10 | 9 | 8 | 7 | 6..4 | 3..0 |
|-----|----|----|----|----|----|----|---|---|---|------|------|
| signal | EMR | HOLD | CNV | RST | SN | TGA | DG | SW | RG (reset gate, R-phi) | R3..R1 serial clocks | I4..I1 line clocks |

EMR is the EMCCD high-voltage clock. HOLD, CNV, RST and SN control the
analog video chain and its ADC. TGA is the transfer gate, DG the dump gate,
and SW the summing well.

The four tables each hold 1 K words (512 entries):

| table | used for |
|-------|----------|
| line transfer | move one row into the serial register |
| pixel transfer | shift one pixel out and digitise it |
| partial pixel | shift one pixel out fast, without digitising it (pixel skip) |
| line dump | discard a row: clear the detector, or skip lines |

`tb/tb_wave_player.sv` holds the example tables for an E2V CCD 4240. They
give 22 us per line transfer, 800 ns per pixel, 360 ns per skipped pixel and
26 us per line dump.

## Playing tables: `wave_player`

The player owns the 16 bit state register. The sequencer asks it for *table
runs*, using a valid/ready handshake that carries the table number. For each
run, the player steps through the table's entries. It puts each state on the
register for exactly its time in cycles.

The tricky part is doing this with no gap between entries, and between runs
of different tables. A table is a synchronous RAM. Fetching one entry takes
three cycles:

1. send the state address;
2. send the time address while the state word arrives;
3. receive the time word.

The player fetches the next entry into a one-entry buffer while the current
state is being held. In the third cycle, the time word goes straight from the
RAM into the hold counter. So a state held for 3 cycles (30 ns, the shortest
transition time the scheme allows) is followed on time. Times of 0 to 2 are
played as 3.

A new run request is accepted as soon as the last entry of the current run
has been fetched. So the next table's first entry is ready when the current
table's last state expires. The readout time of a frame is then exactly the
sum of its table times, plus a few cycles of start-up latency. The tests
check this to the cycle.

Other behaviour:

* From idle, the first state appears 5 cycles after the request is
  accepted.
* After the last run, the last state stays on the outputs.
* `underrun` flags a state that expired before its successor was ready.
  This cannot happen when times are 3 or more.

## From an exposure to table runs

`exposure_seq` runs the exposure, repeated **NRamps** times:

1. **NResets** clear frames.
2. The exposure: **ExpTime** milliseconds. The detector's shutter line is
   high for exactly ExpTime × `CLKS_PER_MS` cycles, if **ShutterEnable** is
   set.
3. **NGroups** × **NReads** read frames.

A CCD normally uses 1 / 1 / 1 / 1: clear once, expose, read once. Counts of
0 for NReads, NGroups and NRamps are treated as 1.

`readout_ctrl` turns each frame into table runs. The output mode decides how
the chip is split between amplifiers:

* modes 5, 6 and 9 split each row between a left and a right amplifier;
* modes 7, 8 and 9 split the rows between a lower and an upper half.

All amplifiers of a detector are clocked together. So the sequencer walks
through one *section*: `ActivePixels/2` or `ActivePixels` pixels, by `Lines/2`
or `Lines` lines.

* **Clear frame:** one line dump per line.
* **Read frame:**
  * A line outside the ROI gets one line dump, which skips it quickly.
  * A line inside the ROI gets one line transfer. Then the serial register
    is emptied, one run per pixel, in this order:
    1. the dark pixels: digitised if `dark_read` is set, otherwise skipped;
    2. the pixels before the ROI: skipped;
    3. the ROI pixels: digitised;
    4. the pixels after the ROI: skipped. This keeps the register empty for
       the next line.
    5. the overscan pixels: digitised.

With FULL readout, the ROI is the whole section. With PARTIAL readout, ROI
coordinates count from each section's own amplifier, and X2/Y2 are clipped
to the section. Each digitised pixel is reported on `pix_strobe`/`pix_kind`
when SendADCData is set.

## Steering the clocks to the chosen outputs: `clock_steer`

The tables move charge towards the **E** amplifier, at the lower left. The
other amplifiers are F (lower right), G (upper right) and H (upper left).
The detector has two sets of line clocks: A,B for the lower half and C,D for
the upper half. It has four sets of serial clocks, one per amplifier
quadrant.

You can reverse the direction a set moves charge in by exchanging two of its
clock phases. Which two depends on the detector. **LineClkSwap** picks one of
six pairs of I1..I4, and **PixelClkSwap** one of three pairs of R1..R3.

Where the unchanged clocks move charge depends on how the chip is wired.
This is the detector's *clock type*, set separately for line and pixel
clocks:

| section | single-clock type | dual-clock type |
|---------|-------------------|-----------------|
| lower half (A,B) | down | down |
| upper half (C,D) | up | down |
| E / H serial | left | left |
| F / G serial | right | left |

A single-clock detector therefore reads through all four outputs with
identical clocks. A dual-clock detector reads everything through E.

The output mode says where charge must go:

| mode | amplifiers | mode | amplifiers |
|------|------------|------|------------|
| 1 | H (upper left) | 6 | E + F (bottom) |
| 2 | G (upper right) | 7 | E + G (diagonal) |
| 3 | E (lower left) | 8 | H + F (diagonal) |
| 4 | F (lower right) | 9 | all four |
| 5 | H + G (top) | | |

For each set, `clock_steer` compares the direction the mode needs with the
set's natural direction. Where they differ, it applies the swap. A serial
register that no selected amplifier reads is clocked like the other one.
Unknown mode numbers behave as mode 3. The `swapped` output shows the
decision for each set.

## Backplane mapping: `clock_mapper`

**Single detector mode:** detector 1's clocks fill all 32 lines:

| clocks | signals |
|--------|---------|
| 1–4 | I1–I4 (C,D) |
| 5–8 | I1–I4 (A,B) |
| 9–11 | R1–R3 (E) |
| 12, 14, 15 | R1–R3 (F) |
| 16–18 | R1–R3 (G) |
| 19–21 | R1–R3 (H) |
| 22/23 | RG |
| 24/25 | SW |
| 26/27 | DG |
| 28/29 | TGA |
| 32 | EMR |

RG, SW, DG and TGA each drive two lines for drive strength.

**Multi detector mode:** each detector drives about 16 lines, with its
quadrants ganged. Each detector's line clocks drive all four sections. E,F
share one set of serial clocks, and G,H share another.

| clocks | detector 1 | clocks | detector 2 |
|--------|------------|--------|------------|
| 5–8 | line clocks | 1–4 | line clocks |
| 9–11 | serial E,F | 16–18 | serial E,F |
| 12, 14, 15 | serial G,H | 19–21 | serial G,H |
| 22/23 | RG | 30/31 | RG |
| 25 | SW | 24 | SW |
| 26 | DG | 27 | DG |
| 28 | TGA | 29 | TGA |

In both modes:

* Clock 32 carries detector 1's EMR.
* Clock 13 is held low. In single mode, clocks 30 and 31 are also held low.
* HOLD, CNV, RST and SN go to two analog chains on `analog`. In single mode,
  both chains follow detector 1.

## Host registers

The top has a plain write bus: `host_we`, `host_det` (which detector),
`host_addr[15:0]` and `host_wdata[31:0]`. The constants are in `ifpac_pkg`.

* **Table memory:** addresses with bit 15 set write table memory.
  `addr[11:10]` selects the table (0 line, 1 pixel, 2 partial, 3 dump), and
  `addr[9:0]` the word. Even words are states, odd words are times.
* **Registers** 0–18 hold:
  * the detector size;
  * the dark and overscan counts;
  * the clock type, with bit 0 for line clocks and bit 1 for pixel clocks
    (1 means dual);
  * the two swap options;
  * the output mode;
  * the flags: shutter enable, partial frame, send ADC data, read dark
    pixels;
  * the ROI;
  * ExpTime in ms;
  * NResets, NReads, NGroups, NRamps;
  * IFPACMode, where 2 means multi detector. It is read from detector 1's
    registers.
* **Registers 20–23** give the number of entries in each table.
* **Writing 1 to register 31** starts the exposure sequence.

Reset values follow a typical setup: a 4096 × 4096 detector, four outputs,
5 dark and 5 overscan pixels, 72 ms exposure, one reset, read, group and
ramp. Tables are empty after reset, so load them and their lengths before
starting.

## Files and hierarchy

```
ifpac_top            clock card: 2 x det_channel + clock_mapper
  det_channel        one detector
    param_regs       host registers
    wave_table_ram   x4, 1 K x 16 each
    exposure_seq     resets / exposure / reads
    readout_ctrl     frame -> table runs
    wave_player      table runs -> 16 bit state register
    clock_steer      per-quadrant direction
  clock_mapper       32 backplane clocks
ifpac_pkg            state bits, table ids, config struct, register map
```

Top parameters:

* `CLKS_PER_MS` (100000) sets the exposure timer. Change it for a different
  clock frequency.
* `TABLE_DEPTH` (1024) sets the words per table.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints a
`TB_RESULT checks=N failures=M` line. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ifpac_pkg.sv tb/tb_ifpac_top.sv --top-module tb_ifpac_top
./obj_dir/Vtb_ifpac_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_wave_player` | the example tables played back to back: every state and its duration to the cycle |
| `tb_readout_ctrl` | random geometries, modes and ROIs, against a reference list of table runs |
| `tb_clock_steer` | every mode, clock type and swap option |
| `tb_clock_mapper` | every backplane clock in both modes |
| `tb_exposure_seq` | random sequences; the shutter time to the cycle |
| `tb_param_regs` | the register values |
| `tb_wave_table_ram` | the table memory |
| `tb_ifpac_top` | end to end, at reduced size, with a small detector (details below) |
| `tb_ifpac_ramps` | 100 exposures in one start |
| `tb_ifpac_full` | one exposure at the default parameters (details below) |

`tb_ifpac_top` covers:

* a four-output full frame;
* a one-output dual-clock ROI readout with two ramps;
* a swapped-clock readout;
* both detectors running at once in multi detector mode.

It counts table runs, pixels, shutter time and readout time.

`tb_ifpac_full` runs one exposure at the default parameters: a 4096 × 4096
detector, a 72 ms exposure (7.2 M cycles), and a 4-line ROI read that dumps
the other 2044 lines of each section. It takes about 10 s. A full
4096 × 4096 read with the example tables takes 341.7 M cycles (3.4 s of
detector time). It was not simulated.

## Limits and choices to know about

* **Not included:**
  * the USB/Ethernet host link (replaced by the register bus);
  * reading the serial ADCs (only the CNV strobe and the pixel reports are
    provided);
  * bias DAC programming;
  * the fibre links between cards;
  * the SIDECAR interface for HxRG detectors;
  * readout of many-output (STA) detectors;
  * binning;
  * the IR sampling schemes (up-the-ramp, Fowler, drop frames).
* **Own choices** not fixed by the scheme this design implements:
  * the register map;
  * A,B driving the lower half;
  * the numeric swap encodings;
  * the pixel order within a line (dark, image, overscan);
  * ROI coordinates counted per section;
  * the `dark_read` flag;
  * how detectors are ganged in multi detector mode;
  * detector 1 driving EMR;
  * treating zero counts as 1;
  * reset values.
* **Output mode numbers** follow the drawn output-selection chart. Modes 3
  and 4 are lower-left and lower-right; 5 and 6 are the top and bottom pairs;
  7 and 8 are the diagonal pairs. The comment in the controller's sample
  parameter file numbers them differently (1 UL, 2 UR, 3 LR, 4 LL, 5 UL+LR,
  6 UR+LL, 7 the two left, 8 the two upper, 9 all). Re-map `out_mode` in
  `clock_steer` and `readout_ctrl` if you need that numbering.
* **The pixel example table** is used as its 14 listed entries, 800 ns in
  total. The timing drawing published with it is labelled 750 ns.
* **Clock type and swap registers** are plain bits and enumerations. The
  sample parameter file writes clock type as 1 (default direction) or 2
  (reverse), and swaps as names such as OneWithTwo; the host software
  translates.
* **Configuration** must not be changed while an exposure is running.
