# VDBS encoder: fewer line toggles on a sensor's serial output

A sensor that sends its samples over a serial link (SPI, I2S and similar)
spends dynamic power on every toggle of the data line. Many consumers of sensor
data, such as step counters and activity trackers, tolerate a small error in
each sample. *Value-deviation-bounded serial* (VDBS) encoding exploits that
tolerance. Before a sample `s` is shifted out, it is replaced by a nearby word
`t` whose bits, sent one after another, toggle the line fewer times. `t` is
never more than a chosen bound `m` away from `s`. The receiver reads `t` as an
ordinary sample, so the processor side needs no decoder and no change.

This repository holds synthesizable SystemVerilog for the transmit side:

* the optimal encoder for one bound `m`;
* a bank of such encoders, one per deviation setting;
* a selection interface that picks the active setting at run time;
* a serializer that sends the chosen word MSB first.

## The encoding rule

Counting transitions. For an `l`-bit word `w`, the number of serial
transitions is

    T(w) = sum over i = 0 .. l-2 of  w[i] XOR w[i+1]

This is the number of line toggles inside the word when it is sent bit by bit.
The order in which the bits are sent does not change this count.

Choosing the word. Among all `l`-bit words `t` with `|s - t| <= m`, the
encoder outputs one with the smallest `T(t)`. The sample itself is one of the
candidates, so two guarantees always hold:

* `T(t) <= T(s)`: the encoding never adds transitions;
* `|s - t| <= m`: the error is bounded by `m`.

With `m = 0` the encoder is the identity.

Breaking ties. Several words often reach the minimum. This implementation
settles ties as follows:

1. If `s` itself already has the minimum count, output `s` unchanged.
2. Otherwise, output the lowest-valued word that has the minimum count.

This rule reproduces, value for value, a published simulation of the 8-bit,
`m = 10` encoder:

| s (hex)  | T(s) | words in window with fewest T | output |
|----------|------|-------------------------------|--------|
| 00 .. 0A | 0 .. 4 | 00 (T = 0)                    | 00     |
| 0B       | 3    | 01, 03, 07, 0F (T = 1)        | 01     |
| 0C, 0D   | 2, 3 | 03, 07, 0F                    | 03     |
| 0E       | 2    | 07, 0F                        | 07     |
| 0F       | 1    | 07, 0F, and s is already minimal | 0F  |
| 10, 11   | 2, 3 | 07, 0F                        | 07     |
| 12 .. 14 | 3, 4 | 0F                            | 0F     |

A second check is the example `s = 64 = 01000000b` with `m = 15`. Its window
holds only one word with a single transition, `63 = 00111111b`. The two line
toggles become one.

Other tie rules would be equally optimal in transitions. A closest-value rule
would, for instance, output 0F for 0B and lower the error. Picking such a rule
changes only the `<` comparison in `vdbs_encoder` and the reference models in
the testbenches.

Hardware. `vdbs_encoder` is combinational. It scans the window `s-m .. s+m`
in ascending order and skips values outside `0 .. 2^l-1`. A candidate
replaces the current best only when it has strictly fewer transitions. That
is 2m+1 copies of an adder, a transition counter and a comparator, chained.
The logic grows linearly with `m`: about 940 word-level cells for
`l = 8, m = 10` after coarse synthesis. A generator that emits a minimized
lookup table for a fixed `(l, m)` can do better. Published results for such
tables are about 61 iCE40 LUTs for the 8-bit case and about 100 LUTs for a
12-bit encoder at 4.9 % FSR (`m = 200`). This RTL has not been mapped to that FPGA.

## Deviation settings and their selection

A deviation bound is naturally stated as a fraction of full-scale range
(FSR). `vdbs_top` builds `N_SET = 11` encoders, for 0 %, 0.5 %, ... 5 % FSR:

    m_k = floor(k * 0.5 % * 2^L),   k = 0 .. N_SET-1

(`vdbs_pkg::setting_m`). For `L = 8` this gives m = 0, 1, 2, 3, 5, 6, 7, 8,
10, 11, 12. Setting 0 means "encoding off". Setting 8 (nominally 4 %; m = 10 is 3.9 % FSR) is
the reference 8-bit configuration. For `L = 12` the bounds are 0, 20, 40, 61,
81, 102, 122, 143, 163, 184, 204.

`vdbs_encoder_interface` holds the active setting in a register:

* `cfg_we` with `cfg_sel` writes it. The new setting applies from the next
  clock edge.
* A write naming a setting that does not exist is ignored. `cfg_err` is then
  high for one cycle.
* After reset, setting 0 is active.
* `active_sel` and `active_m` report the setting in use and its bound.

The register, strobe, error flag and reset value are this design's choices.
Only the existence of a selection interface is given by the VDBS flow.

## Serial output and timing

`vdbs_serializer` stands in for whatever standard link carries the words. It
sends one bit per clock, MSB first:

* A sample is taken when `in_valid` and `in_ready` are both high at a rising
  edge of `dataclk`.
* The sample is encoded in the same cycle, with the setting active in that
  cycle.
* From the next cycle on, `encoderout` holds the encoded word. Its bits appear
  on `sdo` over `L` cycles, with `sdo_valid` high and `sdo_first` marking the
  MSB.
* `in_ready` is high when the shifter is idle or on a word's last bit. A
  continuous stream therefore runs at one word every `L` cycles.
* Between words, `sdo` holds its last bit, so idle time adds no toggles.

Reset (`rst_n`) is asynchronous and active low.

## What the encoding buys

The end-to-end test sends every 8-bit value once at each setting and counts
in-word toggles on `sdo`. These are uniform data. Real accelerometer data
differ, but the trend is the same.

| setting | m  | % FSR | toggles (raw = 896) | reduction |
|---------|----|-------|---------------------|-----------|
| 0       | 0  | 0.0   | 896                 | 0 %       |
| 1       | 1  | 0.5   | 706                 | 21 %      |
| 2       | 2  | 1.0   | 612                 | 32 %      |
| 4       | 5  | 2.0   | 474                 | 47 %      |
| 6       | 7  | 3.0   | 414                 | 54 %      |
| 8       | 10 | 4.0   | 364                 | 59 %      |
| 10      | 12 | 5.0   | 336                 | 63 %      |

With 12-bit samples the gain per unit of relative error is larger. On random
samples, setting 10 (m = 204, 5 % FSR) leaves 293 of 1159 in-word toggles,
a cut of about 75 %.

For comparison, a step-counting study of this encoding reported roughly 38 %
to 55 % fewer transitions on real accelerometer traces over the same range,
with step-count errors of a few percent.

## Files

| file | contents |
|------|----------|
| `rtl/vdbs_pkg.sv` | transition count, setting-to-`m` function, default setting grid |
| `rtl/vdbs_encoder.sv` | optimal encoder for one `(L, M)`; defaults 8, 10 |
| `rtl/vdbs_encoder_interface.sv` | setting register and word multiplexer |
| `rtl/vdbs_serializer.sv` | MSB-first shifter with valid/ready input |
| `rtl/vdbs_top.sv` | encoder bank + selection + serializer; defaults `L = 8`, `N_SET = 11` |
| `tb/tb_vdbs_encoder.sv` | exhaustive check of l=8/m=10, l=8/m=15, l=8/m=0 and l=12/m=200 against an independent reference, plus the 21 published trace values |
| `tb/tb_vdbs_encoder_interface.sv` | legal, illegal and absent writes; routing of every setting |
| `tb/tb_vdbs_serializer.sv` | word integrity, framing, rate, idle level |
| `tb/tb_vdbs_top.sv` | end-to-end test at default parameters (see below) |
| `tb/tb_vdbs_top_l12.sv` | the top built for 12-bit samples: edge, power-of-two and random samples under all 11 settings (m up to 204), checked on the serial line |

`tb_vdbs_top` does the following at the default parameters:

* It streams all 256 values under each setting and checks every word
  received on the line.
* It checks `encoderout`, `active_m`, the one-word-per-`L`-cycles rate and
  the per-setting toggle totals.
* It sends 3000 random samples with random gaps and random, sometimes
  illegal, setting writes.
* It counts each mechanism and fails if one never occurs: setting switches,
  refused writes, back-pressure stalls, idle gaps, words left unchanged, and
  words changed.

Each testbench prints `TB_RESULT checks=N failures=F` and stops itself through
a watchdog if it hangs.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/vdbs_pkg.sv tb/tb_vdbs_top.sv --top tb_vdbs_top
    ./obj_dir/Vtb_vdbs_top

Replace `tb_vdbs_top` by another testbench name to run it. To change the word
size or the grid, override `L` and `N_SET` on `vdbs_top`, or `STEP_PERMIL` in
`vdbs_pkg`. Each encoder costs logic in proportion to its `m`. With `L = 12`
the 5 % setting alone scans 409 candidates.

## Limits and departures

* The optimality criterion follows the published VDBS definition. The tie
  rule is inferred from a published trace and agrees with all 21 of its
  values. Ties beyond that trace have not been checked against another
  implementation.
* Setting selection, the serial framing, handshakes and reset values are this
  design's own. Check them against the link your sensor actually uses.
* Only the transmit side is here. The sensor (accelerometer) and the
  receiving processor with its step-counting software are outside this RTL.
  Their signals are the top's `datain`/`in_valid` and `sdo`-side ports.
* The setting grid follows a 0 % to 5 % FSR sweep in 0.5 % steps, rounded
  down to integers. Other grids need a change to `setting_m` or a replacement
  for it.
