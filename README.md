# A LUT array for measuring within-die delay variation

Reconfigurable logic can route around slow silicon, but only if it knows where
the slow silicon is. This design is an array of 2,048 FPGA-style logic blocks
(LBs), 32 rows by 64 columns. The array works as its own delay sensor. A
signal is launched into a chain of look-up tables, and one clock interval
later every LB records whether the signal has reached it. The number of LBs
passed in a known time is a direct measure of local speed. Sweeping the
interval and fitting a line gives a speed figure for each 4x4 patch of the die.

The RTL here covers the logic of the array: the LUTs, their configuration
memory, the scan flip-flops and the fractal chaining of the blocks. The
delays, which are what the chip actually measures, belong to the silicon.
One testbench adds a delay model so that the whole measurement can be
simulated.

## The logic block

```
            Lin (config chain)           Sin (= previous Sout)
             |                             |
   +---------v---------+                   |
   | 16 config FFs     |   A = prev Mout   |  B
   | (shift register,  |---->[4 x MUX4]<---+
   |  clk_l)           |        | {B,A}    |
   +---------+---------+   [MUX4] <- {D,C} |
             |                |            |
            Lout            Mout ----------+--> next LB's A
                              |            |
                           +--v--+  scan   |
                           |SDFF |<--------+
                           +--+--+  clk_s, enable
                              |
                         Sout / Dout ------> next LB's Sin and B
```

* **Configuration** (`lut_config_reg`): 16 flip-flops in a shift register
  clocked by `clk_l`. Lout of one LB feeds Lin of the next, so the whole
  array loads through one serial pin.
* **LUT read path** (`lut4`, built from five `mux4`): four first-level MUX4s
  are steered by inputs A and B, and one output MUX4 by C and D. The output is
  `mout = cfg[{D,C,B,A}]`, with A as the least significant select bit. A
  signal arriving on A passes through exactly two MUX4s on its way to Mout.
  This two-mux hop is the unit of delay being measured.
* **Scan flip-flop** (`sdff`): on `clk_s`, with `enable` high, it captures
  Mout (`scan`=0) or shifts in Sin (`scan`=1). With `enable` low it holds.
  Its output is both Sout and Dout.
* **Neighbour wiring** (`logic_block`): input A comes from the previous LB's
  Mout. Input B comes from the previous LB's Sout, the same wire as the scan
  input. C and D are ports; the array drives them from two common pins.

## The fractal chain

All 2,048 LBs sit on one chain, and configuration, scan data and the
measurement signal all follow it. If the chain ran row by row, a run of 16
LBs would be a thin line across the die, and its delay would average over
regions that are fast and regions that are slow. So the chain follows a
Hilbert curve: two 32x32 Hilbert squares placed side by side, the second
starting next to where the first ends. Under this ordering any aligned run of
4^k chain positions fills a 2^k x 2^k square. In particular, the 16 LBs
starting at a multiple of 16 form a 4x4 square, and that square is the
measurement region.

`lut_array_pkg::hilbert_d2xy(ROWS, d)` gives the (x, y) site of chain position
`d`. `lut_array` uses it only to index `dout` by site
(`dout[y*COLS + x]`). Electrically the array is just the chain.

## One measurement

For a region whose first chain position is `s`:

1. **Configure.** Shift `ROWS*COLS*16` bits into `lin` on `clk_l`, starting
   with the last LB's bit 15. Use these words (constants in `lut_array_pkg`):

   | chain position      | configuration | behaviour        |
   |---------------------|---------------|------------------|
   | before `s`          | `CFG_ZERO`     `16'h0000` | always 0 |
   | `s`                 | `CFG_ALWAYS`   `16'hFFFF` | always 1 |
   | `s+1`               | `CFG_FOLLOW_B` `16'hCCCC` | = B (previous Sout) |
   | `s+2 ... s+15`      | `CFG_FOLLOW_A` `16'hAAAA` | = A (previous Mout) |
   | after the region    | `CFG_ZERO` to stop at the edge, or `CFG_FOLLOW_A` to let the signal run on | |

2. **Clear** the SDFFs by scanning in zeros (`scan`=1). A reset would also
   erase the configuration.
3. **Launch.** Give one `clk_s` pulse with `scan`=0 and `enable`=1. LB `s`
   captures 1. LB `s+1` now sees B=1, and the 1 ripples down the Mout->A
   chain, one two-MUX4 hop per LB.
4. **Capture.** Give a second `clk_s` edge T later. Every LB the signal has
   reached by then captures 1.
5. **Read out.** Set `scan`=1 and clock `clk_s` `ROWS*COLS` times, sampling
   `sout` before each edge. The last LB's bit comes first. Shifting zeros in
   also clears the chain for the next round.

The count of ones is the number of LBs passed in T. One count is coarse,
since it only moves in whole LBs. The intended use sweeps T from 4.0 ns to
8.0 ns in 0.1 ns steps, repeats each point 100 times, and averages. A
least-squares line through (T, average count) then gives a gradient in LBs
per ns. The ratio of two regions' gradients is the ratio of their speeds.
Comparing these figures across dice separates die-to-die variation from
within-die variation. That analysis happens off chip and is not part of the
RTL.

The RTL itself has no delays. In zero-delay simulation the signal crosses
the whole chain at once, so every LB from `s` onwards captures 1, or all 16
of the region if the LBs after it are set to `CFG_ZERO`.

## Files

| file | contents |
|---|---|
| `rtl/lut_array_pkg.sv` | sizes, configuration words, `hilbert_d2xy` |
| `rtl/mux4.sv` | 4-input multiplexer |
| `rtl/lut4.sv` | five-MUX4 LUT read path |
| `rtl/lut_config_reg.sv` | 16-bit configuration shift register |
| `rtl/sdff.sv` | scan flip-flop |
| `rtl/logic_block.sv` | one LB |
| `rtl/lut_array.sv` | top: `ROWS` x `COLS` LBs on the Hilbert chain (defaults 32 x 64) |

Top-level ports of `lut_array`: `clk_l`, `clk_s`, `rst` (asynchronous, active
high, clears configuration and SDFFs), `scan`, `enable`, `lin`/`lout`
(configuration chain), `sin`/`sout` (scan chain), `a_in` (input A of the first
LB), `mout_last` (Mout of the last LB), `c`, `d`, and `dout[ROWS*COLS]`.
`ROWS` must be a power of two and `COLS` a multiple of `ROWS`.

## Testbenches

Each prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it shows |
|---|---|
| `tb_mux4`, `tb_lut4` | exhaustive / random truth-table checks; the three measurement words |
| `tb_lut_config_reg`, `tb_sdff` | shift, capture, shift-in, hold, asynchronous reset against a reference model |
| `tb_logic_block` | configuration in and out through the chain, LUT function, SDFF modes |
| `tb_lut_array` | whole array at 4 x 8: Hilbert placement, configuration-chain latency, launch/hold/capture/read-out in every region with the signal stopped at the region edge and running on |
| `tb_lut_array_full` | the same at the default 32 x 64 (three regions measured), about 20 s |
| `tb_wid_measurement` | the full delay sweep (41 intervals x 100 repeats per region) on an 8 x 16 chain of `logic_block`s with modelled wire delays. Every count is checked against the delay model, and the fitted gradients are checked too. About 35 s |

`tb_lut_array` and `tb_lut_array_full` share their stimulus in
`tb/lut_array_exerciser.sv`. To run one with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  rtl/lut_array_pkg.sv rtl/mux4.sv rtl/lut4.sv rtl/lut_config_reg.sv \
  rtl/sdff.sv rtl/logic_block.sv rtl/lut_array.sv \
  tb/lut_array_exerciser.sv tb/tb_lut_array.sv --top-module tb_lut_array
./obj_dir/Vtb_lut_array
```

The delay model in `tb_wid_measurement` uses these numbers, chosen only for
the test: 0.55 ns per LB at the corners, up to 35 % slower at the centre,
and ±5 % fixed per-LB noise. With them the central regions come out slower,
the same pattern that was observed on silicon. The gradients (about 1.4-1.6
LB/ns) illustrate the method. They are not predictions.

## Choices made where the behaviour was not pinned down

* The LUT bit order (`cfg[{D,C,B,A}]`) and which configuration flip-flop is
  nearest Lin.
* The configuration register shifts on every `clk_l` edge; there is no load
  enable.
* Reset is asynchronous and active high, and clears both the configuration
  and the SDFFs.
* `enable` is a clock enable for the SDFF in both modes. `scan`=1 selects
  Sin. Dout and Sout are the same flip-flop.
* Inputs C and D have no defined source, so the array drives all of them
  from two common pins. The measurement words ignore them.
* The fractal is a Hilbert curve, with two 32x32 squares side by side.
* I/O pads are not modelled. The chain ends and the per-site `dout` vector are
  ports of the top. The measurement pulses and the read-out counting come
  from outside the array.
