# VIP1-style pixel readout chip for a linear-collider vertex detector

A vertex detector at a linear collider has to record every particle hit
during a bunch train with fine position (20 µm pixels) and coarse time
(about 30 µs slices of a 1 ms train). It then has about 200 ms, before the
next train, to ship those hits off the chip. Only a few per cent of pixels
are hit per train, so the chip reads out only the hit pixels
(zero-suppressed, "sparsified" readout). It does this with a token that
skips empty pixels and looks ahead to the next hit pixel while the current
one is being sent.

This RTL describes such a chip: a 64 × 64 array of pixels plus the logic
around the array. Each pixel is a three-tier stack of circuits:

| tier | contents | RTL |
|------|----------|-----|
| nearest the sensor | charge integrator, auto-zeroed discriminator, two-sample correlated double sampler, hit-pulse former | `pixel_frontend` (behavioural model) |
| middle | 5-bit digital time-stamp store, analog ramp sample/hold | `pixel_ts_mem`, `analog_ts_sh` (behavioural model) |
| far | hit latch, look-ahead token logic, `data_clk` flip-flop, injection flip-flop | `pixel_sparse`, one bit of `inject_shift_reg` |

The periphery has a Gray-code time-slice counter, bidirectional column
buffers for the time-stamp lines, X/Y address registers and a serializer.

## Two phases per bunch train

**Acquisition** (`report` low):

1. `train_start` clears the Gray counter and presets every pixel's
   time-stamp cells to `11111`.
2. The front end is reset in order. `fe_rst` and `d_rst` are high, then
   `fe_rst` falls, then `d_rst` falls. Releasing `d_rst` arms the
   discriminator and takes sample 1, the baseline.
3. `ts_adv` steps the counter once per time slice (32 slices). The column
   buffers drive the counter's Gray code up every column.
4. When a pixel's integrated charge crosses its threshold, the discriminator
   fires once. This takes sample 2 and gives a one-clock `hit` pulse. The
   pulse:
   * lets the time-stamp cells fall from 1 to 0 where the bus bit is 0,
     which stores the current Gray code;
   * freezes the analog `ramp` in the analog time-stamp cell;
   * sets the hit latch.

**Readout** (`report` high): `report` is the start token. It enters pixel
(1,1) and runs along row 1, then row 2, and so on. The next section explains
how it works. The column buffers turn around and carry the selected pixel's
stored code to the periphery.

## The look-ahead token (the core of the design)

In every pixel, `pixel_sparse` works as follows:

```
pending   = hit_latch & ~release_data
token_out = token_in & ~pending          -- combinational, ripples through the array
on data_clk:  release_data <= token_in & pending
when release_data: hit_latch <= 0
```

* A pixel with no pending hit is transparent: the token passes straight
  through it.
* The token therefore settles at the first pending pixel. If there is none,
  it leaves the array as `read_done`.
* A `data_clk` strobe selects the pixel that holds the token by setting its
  `release_data`.
* A selected pixel is no longer pending, so the token moves on at once to the
  next pending pixel. This happens while the selected pixel's data is still
  being shipped: that is the "look-ahead".
* The next `data_clk` releases the old pixel and selects the new one in the
  same edge.

While selected, a pixel:
* drives its column's X line and its row's Y line (wire-OR lines; here ORs of
  signals that are 0 when not selected);
* puts its stored time code on its column lines;
* puts both analog samples and the analog time stamp on the analog buses.

Static registers at the ends of the lines hold the addresses. `addr_encoder`
turns the active line into a 1-based address, 1..64, which is 7 bits wide
(trunc(log2 64) + 1).

`read_all` and `read_first_col` set the hit latches of all pixels, or of the
first pixel of every row, whatever the signal. Pulse them during acquisition
and drop them before readout.

On silicon the token ripples at a finite speed (about 0.2 ns per empty pixel
was the design target). Finding the next hit must take less time than sending
one word. In this RTL the ripple is combinational and settles within one
clock. A controller for a very large array must allow for the real ripple
time.

## Readout sequencing and the serial word

The chip does not sequence its own readout. The strobes come from outside,
on one clock (50 MHz, the serial clock):

```
report = 1
if read_done: array empty, stop
data_clk                                  (select first hit pixel)
loop:
  new_serial_word   (clock L)             load X, Y, time stamp, status
  data_clk          (clock L+1)           select next pixel, token runs on
  if the word loaded at L had last = 1: stop after it has been sent
  next new_serial_word at clock L + FW
```

Each hit leaves as one word, MSB first, one bit per clock, starting the clock
after the load:

```
| 1 (sync) | X (7) | Y (7) | time stamp (5, Gray) | last | parity |   FW = 22 bits
```

* `last` is `read_done` at the moment of loading: the token has already left
  the array, so no hit pixel follows.
* `parity` is the even parity of X, Y and the time stamp.
* With back-to-back loads one hit costs FW = XW + YW + 8 clocks: 22 clocks,
  0.44 µs at 50 MHz.
* The analog values for the same pixel (`an_out1`, `an_out2`, `an_ts`) are
  valid while it is selected, between its `data_clk` and the next one.

The signal amplitude is `an_out2 - an_out1`, the correlated double sample.

## Front-end model

`pixel_frontend` and `analog_ts_sh` model analog circuits. They are not
meant to be synthesised as silicon. They carry every level as an integer in
electrons at the integrator input (the ramp as an ADC code):

* The integrator sums `q_in` per clock, plus `inj_q` on an `inj_step` in
  pixels whose injection bit is set. `fe_rst` clears it.
* The threshold is 530 e⁻, the intrinsic threshold set by arming the
  discriminator, plus the chip-wide step `vth`, which can have either sign.
* The discriminator fires once per arming.
* Noise, dispersion, leakage and gain errors are not modelled. Neither is a
  measured shift of the threshold caused by coupling of the discriminator
  reset line.

## Where this RTL departs from the original chip

* **Single clock.** The hit latch, the time-stamp cells and the analog
  sample are clocked, so asynchronous hits become clocked ones. `data_clk`,
  `new_serial_word` and `ts_adv` are clock enables. An asynchronous `rst_n`
  was added everywhere.
* **Buses.** The chip's tri-state and wire-OR lines are ORs of outputs that
  are 0 when a pixel is not selected. `report` sets the direction of the
  column buffers.
* **Injection chain.** It uses static flip-flops; the chip's are dynamic and
  lose their state after tens of µs. The chain runs in token order, and the
  first bit shifted in lands at pixel (1,1).
* **Design choices.** The serial word's field order, its sync bit, the two
  status bits and the idle-low line were chosen for this design. The original
  gives only the field list and the word length.
* **Not modelled.** The serial line driver, the sensor, the pads, the
  vertical vias, the ramp generator and the external ADC. The sensor charge
  and the ramp are top-level inputs.
* **Large arrays.** These are parameter changes (`M`, `N`); address widths
  and word length follow. At 1000 × 1000 a word is 28 bits, and 101 000
  words take 57 ms at 50 MHz. That fits well inside the 200 ms between trains
  if each row has one forced read (`read_first_col`). This bounds the token's
  search distance on real silicon.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `vip1_top`, `vip_matrix` | `M`, `N` | 64, 64 | columns (X), rows (Y) |
| all with a front end | `THR_INTRINSIC` | 530 | intrinsic threshold, e⁻ |
| `vip1_top` | `XW`, `YW`, `FW` | 7, 7, 22 | derived address widths and word length |
| `vip_pkg` | `TS_W`, `Q_W`, `A_W` | 5, 16, 10 | time stamp, charge and ramp widths |

## Files

* `rtl/vip_pkg.sv`: shared widths, types and `addr_width()`.
* `rtl/vip1_top.sv`: the chip.
* `rtl/vip_matrix.sv`: the array, with the token chain, lines, buses and
  column buffers.
* `rtl/vip_pixel.sv`: one pixel.
* Pixel parts: `rtl/pixel_frontend.sv`, `rtl/pixel_ts_mem.sv`,
  `rtl/analog_ts_sh.sv`, `rtl/pixel_sparse.sv`.
* Periphery: `rtl/gray_counter.sv`, `rtl/inject_shift_reg.sv`,
  `rtl/addr_encoder.sv`, `rtl/vip_serializer.sv`.
* `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=F`.
* `tb/tb_vip1_top.sv`: the end-to-end test on an 8 × 6 array. It covers:
  * an empty array;
  * sparse random hits over all 32 slices, including charges below the
    threshold;
  * read-all and read-first-column;
  * test injection through the shift register;
  * injection blocked by a raised threshold;
  * the rate of one word every FW clocks (15 at 8 × 6, 22 at 64 × 64).

  Each train's expected hit list is worked out from the charges the test
  deposits.

The end-to-end test has been run on arrays up to 16 × 16 by changing its
`M` and `N` localparams. At 16 × 16 it passes 6297 checks; the simulation
itself takes about a second, and building the model about three minutes. At
the default 64 × 64 size, Verilator's C++ build of the 4096 pixel instances
did not finish within ten minutes, so no full-size run is included.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/vip_pkg.sv tb/tb_vip1_top.sv \
          -y rtl --top-module tb_vip1_top -Mdir obj_top
./obj_top/Vtb_vip1_top
```

Replace `tb_vip1_top` with any other testbench name. Build time grows with
the array size, because every pixel becomes separate C++ code; `-j` helps.
`vip1_top` carries an assertion: whenever a word is loaded during readout, exactly one column line
and one row line are active.
