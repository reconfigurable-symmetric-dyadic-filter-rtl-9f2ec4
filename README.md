# Reconfigurable symmetric dyadic filter (SDF): a one-MAC wavelet decomposition engine

This RTL computes a multi-level discrete wavelet decomposition, the front end
of wavelet-based medical image fusion, with a single multiply-accumulate
unit. It does not give each filter of the filter bank its own hardware.
Instead a controller time-shares one MAC across every tap, both bands and
every level:

* a **coefficient ROM** holds the low-pass (LoD) and high-pass (HiD) analysis
  filters of each selectable mother wavelet;
* a **two-input multiplexer** feeds the MAC either the external signal (first
  level) or approximation coefficients read back from the RAM (deeper levels);
* the **MAC unit** (N x N multiplier, 2N-bit product, (2N+1)-bit accumulator)
  computes one filter output per convolution;
* the **approximation and detail coefficient RAM** stores every result, feeds
  the next level, and is streamed out at the end;
* the **controller** sequences it all.

With the default parameters the engine takes a 256-sample signal (one row of a
256 x 256 image) to depth 2 and returns A2 (64 words), D2 (64) and D1 (128).
The wavelet (LeGall 5/3 or CDF 9/7) and the depth (1 or 2) can be chosen for
each run.

Beside the engine, `sdf_top` also contains a **parallel window filter**. It is
the fully combinational form of the same symmetric filter: nine 8-bit samples
`p[0..8]` go in, one 9-bit `Filter_out` comes out, and five multipliers do the
work of nine because samples that share a coefficient are added first.

```
            start, cfg_wavelet, cfg_levels
                        |
                 +--------------+  ROM addr   +-------------------+
                 |  controller  |------------>| coefficient ROM   |--coef--+
                 +--------------+             +-------------------+        |
   ext_addr <-------|  |  |  sel_feedback                                  v
   ext_data ----------------------->|\                              +------------+
                       |  |         | |--operand------------------->|  MAC unit  |
                       |  |   +---->|/                              +------------+
                       |  |   |                                           | y
                       |  |   |   rd_data   +-------------------+  wr      |
                       |  +---+-------------| coefficient RAM   |<---------+
                       |      |             +-------------------+
                       +------+--> out_valid / out_index / out_data
```

## How a decomposition is scheduled

This is the part to understand before changing anything.

**Down-sampling comes from addressing.** Every level reduces a signal of
length L to L/2 approximation and L/2 detail coefficients. The MAC never
computes the odd outputs that down-sampling would throw away. Low-pass output
`n` is centred on input sample `2n`, and high-pass output `n` on sample
`2n+1`:

    a[n] = sum_{t=-K..K} lo[|t|] * x[2n + t]
    d[n] = sum_{t=-K..K} hi[|t|] * x[2n + 1 + t]

Here K is the filter's half-length: 2 and 1 for the 5/3 wavelet, 4 and 3 for
the 9/7.

**Ends of the signal.** Indices outside 0..L-1 are reflected about the end
samples (whole-sample symmetric extension): `x[-i] = x[i]` and
`x[L-1+i] = x[L-1-i]`. Because the filters are symmetric, this extension gives
coefficients that can be inverted without boundary artefacts. The shortest
level must have at least 2K+2 samples; an elaboration-time assertion checks
this.

**Loop order.** The controller runs, from outermost to innermost:

    level 1..J  ->  output n = 0..L/2-1  ->  band (low, then high)  ->  tap t = -K..K

It issues one tap per clock and never inserts a bubble:
* between taps;
* between the two bands;
* between outputs;
* between levels.

A level therefore takes `(L/2) * (taps_lo + taps_hi)` cycles.

**Pipeline.** Each tap passes through three stages:

| cycle | what happens |
|-------|--------------|
| c     | controller issues: sample address (external or RAM), ROM address `{wavelet, band, abs(t)}` |
| c+1   | ROM word and sample arrive. The multiplexer picks the operand. The MAC multiplies and accumulates. The `first` tap restarts the sum. |
| c+2   | after the `last` tap, the rounded result is written to the RAM |

Control strobes (`mac_first`, `mac_last`, `sel_feedback`) and the write
address are delayed inside the controller, so they line up with the data.

**Feedback between levels.** From level 2 on, the samples are the previous
level's approximations, and the operand is read from the RAM. A level reads
one area of the RAM and writes a different one, so the switch needs no wait
state. The last low-pass result of a level is written at least two cycles
before the next level's first read.

**Output.** After the last level the controller waits two cycles, so that the
last write lands. It then reads words 0..LEN-1, one per cycle. `out_valid`
marks each word one cycle after its read, and `done` pulses at the end.

## Memory layout

| words | contents after a depth-J run |
|-------|------------------------------|
| 0 .. LEN/2^J - 1 | A_J (final approximation) |
| LEN/2^J .. LEN/2^(J-1) - 1 | D_J |
| ... | ... |
| LEN/2 .. LEN - 1 | D_1 |
| LEN .. LEN + LEN/2 - 1 | scratch: approximation of level 1 (and of every odd non-final level) |
| LEN + LEN/2 .. LEN + 3LEN/4 - 1 | scratch: approximation of even non-final levels (only when MAX_LEVELS > 2) |

Detail bands go straight to their final place. An approximation that another
level will filter goes to a scratch area. The scratch area alternates between
odd and even levels, so a level never overwrites its own input. The RAM needs
`sdf_pkg::ram_depth(LEN, MAX_LEVELS)` words: 384 at the defaults.

## Number formats and coefficients

| quantity | format |
|----------|--------|
| external sample | 8-bit unsigned (`p[7:0]`) |
| MAC operand N | 9-bit signed: the input is zero-extended, fed-back coefficients are sign-extended |
| coefficient | 9-bit signed Q2.7 (value = integer / 128) |
| product / accumulator | 18 bits (2N) / 19 bits (2N+1) |
| result (`y`, `out_data`, `Filter_out`) | 9-bit signed: `floor((acc + 64) / 128)`, clipped to -256..255 |

The ROM stores only the centre tap and one side of each filter:

| wavelet | band | c0 | c1 | c2 | c3 | c4 |
|---------|------|----|----|----|----|----|
| LeGall 5/3 | low  | 96  | 32  | -16 | 0  | 0 |
| LeGall 5/3 | high | 128 | -64 | 0   | 0  | 0 |
| CDF 9/7    | low  | 78  | 34  | -10 | -2 | 3 |
| CDF 9/7    | high | 142 | -76 | -7  | 12 | 0 |

The 9/7 rows are the JPEG2000 irreversible analysis filters, rounded to 1/128.
Each centre tap is then moved by one LSB, so that the low-pass gain at DC is
exactly 1 and the high-pass gain at DC is exactly 0. With these values the
19-bit accumulator cannot overflow: the worst case is 332 x 256 = 84992,
against 2^18. The output can clip, though. The 9/7 high-pass on a period-3
pattern of 0s and 255s reaches about 330. `sat_flag` reports each clipped
result.

## Interface of `sdf_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the control registers (memories are not reset) |
| `start` | in | 1 | starts a run; sampled only while idle |
| `cfg_wavelet` | in | 1 | 0 = LeGall 5/3, 1 = CDF 9/7; sampled with `start` |
| `cfg_levels` | in | 2 | depth; 0 is treated as 1, values above MAX_LEVELS as MAX_LEVELS |
| `busy`, `done` | out | 1 | run in progress; one-cycle pulse at the end |
| `ext_rd_en`, `ext_addr` | out | 1, 8 | read request to the external signal memory |
| `ext_data` | in | 8 | requested sample, **one cycle after** the request |
| `out_valid`, `out_index`, `out_data` | out | 1, 8, 9 | result words 0..LEN-1, one per cycle, no back-pressure |
| `sat_flag` | out | 1 | the coefficient written this cycle was clipped |
| `res_valid`, `res_addr`, `res_data` | out | 1, 9, 9 | every MAC result as it is produced, with the RAM word it goes to (scratch words included) |
| `win_wavelet`, `win_band`, `win_p[9]` | in | 1, 1, 9x8 | window filter inputs, `win_p[4]` is the centre |
| `win_filter_out` | out | 9 | window filter output, combinational |

**Run length.** The low-pass filter has `tl` taps and the high-pass `th`
taps. Filtering a depth-2 run takes `F = (LEN/2 + LEN/4)(tl + th)` cycles.
`done` rises `F + LEN + 3` clock edges after the edge that samples `start`. At
LEN = 256 that is 1795 edges for the 5/3 wavelet and 3331 for the 9/7. A
depth-1 run drops the `LEN/4` term. The external memory is read only during
level 1.

## Relation to the published architecture

The block structure follows the Reconfigurable Symmetric Dyadic Filter
architecture:
* the controller;
* the input multiplexer with a feedback path;
* the coefficient ROM;
* the MAC with a multiplier, an adder and an accumulator register, and N / 2N
  / 2N+1 widths;
* the approximation and detail coefficient RAM written under controller
  enable.

It also follows that architecture's depth-2 LoD/HiD/down-2 tree. The
window-filter ports (nine 8-bit samples, a 9-bit output, combinational) follow
its reported implementation.

The published description gives these blocks' functions but few details. The
following are choices made here:

* **Filters.** The two wavelets, their coefficient values and the Q2.7
  format.
* **Symmetry.** Half-filter ROM storage, and the pre-adders in the window
  filter.
* **Signal size.** The 256-sample signal length and the 9-bit internal
  operand width N.
* **Arithmetic.** Rounding and saturation.
* **Scheduling.** The boundary extension, the sample alignment, the loop
  order and the three-stage pipeline.
* **Memories.** The RAM layout, and the one-cycle-latency external read port.
* **Handshakes.** The output stream, which has no back-pressure, and the
  start/done handshake.

The block diagram of the published architecture takes the output (and the
feedback to the multiplexer) from the MAC result itself, while its prose
takes the output from the RAM. Here the RAM feeds both the output stream and
the feedback, since a convolution needs stored samples. The live MAC results
are also brought out on `res_*`.

The window filter is not connected to the engine, because how it would be
fed is not described. Its reported simulation values cannot be reproduced:
the input vectors behind them are not known.

Not built:
* **The image-fusion rule.** Nothing describes how coefficients of two
  modalities are combined.
* **The inverse transform (reconstruction).** It is mentioned but not
  described.
* **A 2-D (row/column) transform.** The engine is one-dimensional; an image
  needs a row pass and a column pass driven from outside.
* **The acquisition system that supplies the samples.**

## Files

| file | contents |
|------|----------|
| `rtl/sdf_pkg.sv` | widths, wavelet/band enums, coefficient table, rounding/saturation, RAM sizing |
| `rtl/sdf_coeff_rom.sv` | coefficient ROM (synchronous read) |
| `rtl/sdf_input_router.sv` | input multiplexer and operand formatting |
| `rtl/sdf_mac.sv` | MAC unit with rounding and saturation |
| `rtl/sdf_coeff_ram.sv` | simple dual-port coefficient RAM |
| `rtl/sdf_controller.sv` | sequencing, address generation, pipeline alignment |
| `rtl/sdf_window_filter.sv` | combinational 9-tap symmetric filter |
| `rtl/sdf_top.sv` | the engine plus the window filter |
| `tb/sdf_ref_pkg.sv` | integer reference model: tap lists, reflection, full decomposition, run-length formula |
| `tb/tb_*.sv`, `tb/sdf_ctrl_harness.sv` | self-checking testbenches |

## Verification

Every testbench checks its block against values computed independently in
`sdf_ref_pkg`, and each stops itself with a watchdog. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_sdf_top` runs the whole design at its **default parameters**: six runs
  that change the wavelet and the depth on random, ramp, mixed and period-3
  signals. It compares all 256 output words of each run, the number of
  clipped results, and the run length in cycles. It also drives random windows
  through the window filter. It counts these events, and each must occur at
  least once:
  * a wavelet switch;
  * a depth-1 run and a depth-2 run;
  * approximation feedback;
  * reflection at the left end and at the right end;
  * saturation.
* `tb_sdf_controller` compares, cycle by cycle, what the controller issues
  with an independently built schedule: addresses, ROM words, strobes, write
  addresses, output order and run length. It covers both wavelets and every
  `cfg_levels` value, at 256 samples / depth 2 and at 64 samples / depth 3.
* `tb_sdf_mac`, `tb_sdf_coeff_rom`, `tb_sdf_coeff_ram`, `tb_sdf_input_router`
  and `tb_sdf_window_filter` check the blocks on their own. The ROM test also
  checks each coefficient against the real-valued filter (within 1/128) and
  checks the DC gains.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sdf_pkg.sv tb/sdf_ref_pkg.sv tb/tb_sdf_top.sv --top-module tb_sdf_top
./obj_dir/Vtb_sdf_top
```

The full-size end-to-end run takes well under a second.

## Changing it

* **Signal length and depth.** `LEN` must be a power of two. `MAX_LEVELS` may
  be raised as long as `LEN >> (MAX_LEVELS-1) >= 10`; the RAM grows to
  `LEN + 3LEN/4` from depth 3. The controller test already runs depth 3.
* **Adding a wavelet.** Widen `wavelet_e`, then add its half-length to
  `half_len` and its coefficients to `coef_value` in `sdf_pkg`. Every filter
  must be odd-length and symmetric, with at most 9 taps. A wider filter needs
  a larger `MAX_HALF`/`HALF_AW`, and the window filter must grow to match.
  Check that the absolute coefficient sum times 256 stays below 2^18.
