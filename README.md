# Multiplierless reconfigurable image resizer for four windows

This is the RTL of an image resizer that shrinks or enlarges up to four video windows at once, for
example four 320 x 200, 8-bit, 30 frame/s sources on an 800 x 600 screen. Each axis can be scaled
by 1/3, 1/2, 2/3, 3/2, 2 or 3. The resizer contains no multipliers. Every filter is built from
cascaded-integrator-comb (CIC) stages: adders, subtractors and registers. Seven such stages form a
shared pool. The host hands them out to the four windows according to each window's resizing
ratio. Two further ideas keep the design small:

* **Block-in, overlap-save filtering.** The source is read in 11 x 11 pixel blocks instead of line
  by line. A block is filtered row by row, then column by column. So each window needs only an
  11 x 33 byte buffer, not line buffers as wide as the screen.
* **Concurrent register reset.** Each row or column of a block is filtered as an independent
  section. Between sections, all registers of a filter lane are cleared in one cycle, once the
  last sample has left the pipeline.

## CIC stages and what a stage computes

One CIC stage is an integrator `y[n] = y[n-1] + x[n]` (`cic_integrator`) and a comb
`y[n] = x[n] - x[n-K]` (`cic_comb`). A *rate switch* (`rate_switch`) sits between the two sections:

| operation            | order                                              | result                         |
|----------------------|----------------------------------------------------|--------------------------------|
| decimation by R      | integrator, keep 1 of every R samples, comb (K=1)  | sum of R consecutive inputs    |
| interpolation by R   | comb (K=1), insert R-1 zeros after each sample, integrator | each input repeated R times |

Cascading S stages of interpolation puts all S combs before the zero padding and all S integrators
after it. This gives the filter `(1 + z^-1 + ... + z^-(R-1))^S`. Its gain is `R^(S-1)` for
interpolation and `R` for decimation. All registers are 13 bits, which is 9 bits for a signed pixel
plus 5 bits of growth for the largest gain, 9. Arithmetic wraps in two's complement. The final
result is still exact, because it always fits in 13 bits.

## Rational ratios 3/2 and 2/3

This is the least obvious part of the design. Resizing by U/D normally means zero-stuffing by U,
filtering, then dropping samples by D. The poly-phase rearrangement folds both rate changes into a
single stage.

**Interpolation by U/D (3/2).** The comb uses delay `K = D = 2`: `c[n] = x[n] - x[n-2]`. After every
D comb outputs, the switch inserts U-D zeros. The integrator then runs on that stream. For 3/2 the
integrator input is `c0 c1 0 c2 c3 0 ...`, which gives the output
`x0, x0+x1, x0+x1, x1+x2, x2+x3, x2+x3, x3+x4, ...`: 3 outputs for every 2 inputs, gain 2.

**Decimation by U/D (2/3).** The integrator runs first, giving `s[n] = x0 + ... + xn`. The switch
keeps the first U of every D integrator outputs (`s0 s1 s3 s4 s6 s7 ...`). A comb with delay
`K = U = 2` follows. The outputs are `s0, s1, s3-s0, s4-s1, s6-s3, ...`, which are sums of three
consecutive inputs: 2 outputs for every 3 inputs, gain 3.

Integer ratios are the special cases U=R, D=1 and U=1, D=R of the same switch. So one comb with
a selectable 1- or 2-sample delay line and one integrator serve every ratio. A rational ratio
always uses one stage, and so does every decimation. Integer interpolation may use 1 to 3 stages.

## The filter set: seven stages, four lanes

`filter_set` holds seven comb+integrator pairs. Each window has a *lane*, which owns a contiguous
run of stages (`base`, `nstages`). Two routers connect them:

* `in_idmux` chains the combs and the integrators of each run. It feeds the lane input into the
  first comb (interpolation) or the first integrator (decimation). It feeds the rate-switch output
  back into the first stage of the other section.
* `feed_out` takes the last stage of each run. It sends one section's output to the rate switch and
  the other section's output to the lane output.

Every comb and integrator is registered and the switch is combinational, so the latency of a lane
with S stages is `2S` cycles. An unowned stage is held cleared.

`reconfig_ctrl` registers the host's per-window rate codes and requested stage counts on a load
pulse. It decodes them into one lane control word (`lane_cfg_t` in `resizer_pkg`) for the
horizontal pass and one for the vertical pass.
It also allocates the stages: a window gets `max(stages_h, stages_v)`, in window order. If more
than seven stages are requested, `cfg_ok` goes low and the top ignores `frame_start`.

## Overlap-save sections

Each row, and later each column, of an 11 x 11 block is one *section* of 11 samples, filtered from
cleared registers. The first outputs of a section lack earlier samples and are discarded.
Consecutive blocks therefore overlap, so that the kept outputs of neighbouring sections join
without a gap or a phase slip. The section length 11 fits the form `6n+5`. With it, the samples a
decimation consumes are a whole number of groups, for both 1/2 and 1/3.

| rate | stages | outputs/section | discarded | kept | overlap (block step = 11 - overlap) | gain | scaling |
|------|--------|-----------------|-----------|------|--------------------------------------|------|---------|
| 1/3  | 1      | 4               | 1         | 3    | 2                                    | 3    | x 3/8   |
| 1/2  | 1      | 6               | 1         | 5    | 1                                    | 2    | >> 1    |
| 2/3  | 1      | 8               | 2         | 6    | 2                                    | 3    | x 3/8   |
| 3/2  | 1      | 16              | 1         | 15   | 1                                    | 2    | >> 1    |
| 2    | 1/2/3  | 22              | 2/2/4     | 20/20/18 | 1/1/2                            | 1/2/4 | none / >>1 / >>2 |
| 3    | 1/2/3  | 33              | 3/6/6     | 30/27/27 | 1/2/2                            | 1/3/9 | none / x3/8 / x1/8 |

For interpolation by R with S stages, the overlap is `ceil(S(R-1)/R)` input samples, and
`R x overlap` outputs are discarded.

## Section timing and the concurrent clear

`section_ctrl` runs one section on a lane:

1. It requests the 11 samples, one per cycle. For interpolation it requests D samples and then
   leaves U-D cycles free, which the rate switch fills with zeros. The data source answers one
   cycle after a request (`RD_LAT = 1`).
2. It waits `RD_LAT + 2S` cycles, plus `U-D` for interpolation. This is the time the last sample
   takes to cross the lane.
3. It raises `lane_clr` for one cycle. That clears every comb, integrator and switch counter of the
   lane at once.

It also counts the post-processed outputs, drops the first `discard` of them and numbers the rest.
A section therefore takes `2 + F + RD_LAT + 2S (+ U-D) ` cycles in the engine, where `F` is 11 for
decimation and `(10/D)*U + 10%D + 1` for interpolation. For example, 42 cycles for x3 with three
stages, or 14 + 2S for a decimation.

## Gain removal

`post_process` divides out the gain with shifts only. Gains 2 and 4 become right shifts. Gain 3 is
scaled by 3/8, computed as `(v - v/4)/2`. Gain 9 is scaled by 1/8. The result is saturated to
0..255. Because 3/8 is more than 1/3, decimation by 3 and 2/3, and x3 interpolation with two
stages, brighten the image by 12.5% and can saturate. That is how the scheme is specified.

## One window: `resize_engine`

For each 11 x 11 block, with origins stepping by `11 - overlap`, the engine does three things:

1. **Horizontal pass.** Each of the 11 rows is one section. Its kept outputs are scaled to 8 bits
   and written to the window's `sram_512x8` at `row*33 + index`, using at most 363 bytes.
2. **Vertical pass.** The lane is switched to the vertical control word. Each filled buffer column
   is read back as an 11-sample section. Its kept outputs are the output pixels, sent with their
   coordinates `(out_x, out_y)`.
3. **Next block.** The next block origin is computed. Reads past the right or bottom edge of the
   source repeat the last column or row.

Output blocks are `kept_h x kept_v` pixels and tile the output image. The first discarded outputs
of the image are not produced, so the output is slightly shifted and cropped at the top-left.

## Top level: `resizer_top`

The top holds four engines, the shared filter set and the reconfiguration controller. All ports
are unpacked arrays with one entry per window:

* **Host configuration.** The host sets `win_en`, `rate_h`, `rate_v` (the `rate_e` codes),
  `stages_h` and `stages_v` and pulses `cfg_load` when a new frame begins. The controller
  registers them, and they hold until the next load. Because the stage allocation covers all
  windows, reload only while no window is busy. `src_w` and `src_h` must stay stable during the
  window's frame. `frame_start` starts a frame. `cfg_ok`, `busy` and `frame_done` report back.
* **Source read port.** `src_rd`, `src_x`, `src_y` and `src_data`. The data must arrive one clock
  after `src_rd`. The source frame memory is outside this RTL.
* **Resized pixels.** `out_valid`, `out_x`, `out_y` and `out_pix`.

The windows run independently and concurrently. Throughput: for a 320 x 200 source scaled x3 both
ways with three stages, a frame takes 1,264,033 cycles, which is 23 ms at 55 MHz. That is within the
33 ms of a 30 frame/s source. `resizer_top_tb` runs this case next to three other
320 x 200 windows and measures the same cycle count.

## How far to trust it, and where it is this design's own

The stage structures, the supported ratios, the stage limits, the 13-bit registers, the section
length of 11, the 3/8 and 1/8 scale factors, the 512 x 8 buffers and the clear-after-latency
scheme follow the published description of the chip. The following are choices of this RTL:

* the valid-flag timing;
* the lane control word and its decode (the chip uses a PLA whose contents are not given), and
  the load strobe that registers the configuration;
* contiguous stage allocation, and sharing one lane between both passes;
* the overlap and discard values for multi-stage interpolation, derived here;
* edge clamping and the saturation;
* the buffer layout;
* the source and output interfaces. Output pixels carry window-relative coordinates; placing
  the windows on the screen is left to the display side.

The comb's differential delay is taken as 1 for integer ratios, which gives x2 with three stages a
gain of 4. Not modelled: pads, the physical SRAM macros (the buffer is an array) and the host.

Every block has a self-checking testbench. The reference model (`tb/resize_ref_pkg.sv`) computes
the section outputs from closed-form sums over the input samples, not by running a CIC structure.
It then builds whole expected frames in the same block-in order. `resizer_top_tb` compares about
810,000 pixels, including four concurrent 320 x 200 windows at the default sizes, and checks
that the slowest window finishes within the cycle budget of 30 frames/s at 55 MHz.

## Files and simulation

`rtl/resizer_pkg.sv` holds the sizes, enums and structs. Each other module is in `rtl/<module>.sv`
and each testbench is in `tb/<module>_tb.sv`. To simulate with plain Verilator, for example the
whole chip:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/resizer_pkg.sv tb/resize_ref_pkg.sv tb/resizer_top_tb.sv --top-module resizer_top_tb
./obj_dir/Vresizer_top_tb
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The top-level run takes about
25 seconds. To change the pool size or the section length, edit the constants in `resizer_pkg`.
The overlap and discard tables in `reconfig_ctrl` assume `SEC_N = 11`.
