# Low-power FIR filtering core (24-tap, single MAC, built-in self-test)

A 24-tap linear-phase FIR filter core for power- and area-critical devices
such as hearing aids. One multiply-accumulate unit (MAC) does all the work,
serially, one tap per clock. The filter structure, the multiplier
architecture and the number representation inside the multiplier are design
parameters. Together they give a family of seventeen cores that compute the
same result with different power and area. Memory and MAC carry built-in
self-test, and the controller has a scan path.

The architecture follows the study *Architectural trade-offs in the design of
low power FIR filtering cores*, which compares these seventeen cores. The RTL
here is an independent implementation. The sections on departures and own
choices below say where it goes beyond what that study specifies.

The filter computes

    y(n) = alpha + sum_{m=0}^{23} h(m) * x(n-m)

with 16-bit two's complement samples and coefficients and a 36-bit result:
a 32-bit product plus 4 guard bits. `alpha` is the value the accumulator
starts from. Use 0 for a plain filter, or a rounding constant. The taps are
symmetric, h(m) = h(23-m), so only h(0..11) are stored.

## The two filter structures

**Direct form (DF)**, `ARCH = ARCH_DF`. One sample and one coefficient per
cycle, so 24 MAC cycles per output. The coefficient address runs 0..11 and
then back 11..0.

**Folded direct form (FDF)**, `ARCH = ARCH_FDF`, the default. The two samples
that share a coefficient, x(n-m) and x(n-23+m), are read at once through the
RAM's second read port. They are added in a 17-bit pre-adder and multiplied
once, so 12 MAC cycles per output. The pre-added operand is 17 bits wide, so
the multiplier is 16 x 17. With `MULT_P_BOOTH` there is no separate
pre-adder. The two samples go to the multiplier separately, and its Booth
encoder adds them.

### Sample memory as a circular buffer

The 24 x 16 sample RAM is never shifted. A write pointer moves down by one,
modulo 24, for every new sample, and the new sample is written at the new
pointer. Sample x(n-m) then sits at address `(wptr + m) mod 24`.

- Read port 1 uses `wptr + m` from an adder on the read counter.
- Read port 2 (FDF only) has its own down-counter. The counter is loaded with
  `wptr - 1` when the sample is written, so it walks x(n-23), x(n-22) and so on.

### Schedule and pipeline

Cycle 0 is the cycle in which the sample is taken (`x_valid && ready`).

| Step | DF | FDF |
|---|---|---|
| write x(n), load alpha register | cycle 0 | cycle 0 |
| RAM reads (taps / tap pairs) | cycles 1..24 | cycles 1..12, into port registers |
| pre-add, load beta/gamma registers | (with the read) | cycles 2..13 |
| MAC operations (the first restarts from alpha) | cycles 2..25 | cycles 3..14 |
| output storage loaded | cycle 26 | cycle 15 |
| `y_valid` pulse, new `y_out` | cycle 27 | cycle 16 |
| next sample accepted from | cycle 25 | cycle 13 |

The pipeline tail overlaps the write of the next sample. At full rate the MAC
is busy 24 of every 25 cycles (DF) or 12 of every 13 (FDF). At a 10 MHz clock
that allows sample rates up to 400 kHz (DF) or 769 kHz (FDF), far above
audio rates.

## The MAC

`mac` evaluates, on every enabled clock edge:

    acc = 1:  s <= s     + (-1)^neg * beta * gamma
    acc = 0:  s <= alpha + (-1)^neg * beta * gamma

The product is never added up inside the multiplier. Every multiplier
delivers it in carry-save form, as two vectors `out1 + out2`. The MAC then
does the following:

1. It XORs both vectors with the effective `neg`. This is the one's
   complement of each vector.
2. A 36-bit 3:2 carry-save adder (`csa`) adds both vectors to the output of
   the alpha/accumulator multiplexer.
3. A 36-bit carry-look-ahead adder (`cla`) adds the resulting pair and feeds
   the accumulator.

Negation needs a "+1" for each of the two inverted vectors. One enters
through the carry-in of `csa` and the other through the carry-in of `cla`,
so subtraction costs no extra adder.

The carry-save pair is built directly at 36 bits. The alternative, building
32-bit vectors and sign-extending each one separately, does not preserve
their sum.

**Sign-magnitude mode** (`NUMREP = NR_SM`). Two's complement has high
switching activity at the multiplier inputs. In this mode, both operands are
first converted to sign and magnitude (`sm_conv`), and the multiplier works on
unsigned magnitudes. The effective `neg` is `neg ^ sign(beta) ^ sign(gamma)`.
Everything outside the multiplier stays two's complement, so the XOR/carry-in
negation above converts the result back. Magnitudes keep the full operand
width (16 or 17 bits), which lets -32768 convert as well.

With `PREADD = 1` the MAC adds `gamma1 + gamma2` itself, in front of the
multiplier (a pre-add MAC). The filter core does not use this mode except
with `MULT_P_BOOTH`, because FDF places its pre-adder ahead of the gamma
register.

## Multipliers

All five multipliers produce the carry-save pair described above. Each
builds its partial product rows at the 36-bit output width and reduces them
in `pp_tree`. That tree is built at elaboration, level by level, from 3:2
adders (`csa`), 4:2 compressors (`comp42`) or a mix of both.

| `MULT` | module | partial products | tree |
|---|---|---|---|
| `MULT_WD` | `mult_wd` | one AND row per bit of gamma; the sign-bit row is subtracted (inverted row plus a correction row) | 3:2 |
| `MULT_BOOTH` | `mult_booth` | radix-4 Booth: triples {y(2i+1), y(2i), y(2i-1)} of gamma select 0, +-beta, +-2 beta; negative rows inverted, their +1s collected in one correction row | 3:2 |
| `MULT_RG_BOOTH` | `mult_rg_booth` | Booth with the encoder/selector balanced to two gate levels, `(neg^x(j)) & one \| (neg^x(j-1)) & two`, to reduce glitches | 3:2 |
| `MULT_RB_BOOTH` | `mult_rb_booth` | Booth rows as in `mult_booth` | 4:2; a 4:2 compressor is the binary-coded redundant-binary adder |
| `MULT_P_BOOTH` | `mult_p_booth` | Booth encoder with a built-in pre-adder: each slice adds its two bits of both samples and passes its carry to the next slice | mixed 4:2 and 3:2 |

In sign-magnitude mode the multipliers run unsigned (`SIGNED = 0`). The
Booth types then use one extra digit. `MULT_P_BOOTH` is two's complement and
FDF only.

## The seventeen cores

`fir_core #(.ARCH(...), .MULT(...), .NUMREP(...))` covers these settings:

| core | ARCH | MULT | NUMREP |
|---|---|---|---|
| fir_df_booth, fir_df_rb_booth, fir_df_rg_booth, fir_df_wd | `ARCH_DF` | BOOTH, RB_BOOTH, RG_BOOTH, WD | `NR_2SC` |
| the same four with `_sm` | `ARCH_DF` | as above | `NR_SM` |
| fir_fdf_booth, fir_fdf_rb_booth, fir_fdf_rg_booth, fir_fdf_p_booth, fir_fdf_wd | `ARCH_FDF` | BOOTH, RB_BOOTH, RG_BOOTH, P_BOOTH, WD | `NR_2SC` |
| fir_fdf_booth_sm, fir_fdf_rb_booth_sm, fir_fdf_rg_booth_sm, fir_fdf_wd_sm | `ARCH_FDF` | BOOTH, RB_BOOTH, RG_BOOTH, WD | `NR_SM` |

The default is **fir_fdf_wd_sm**: folded, Wallace-Dadda, sign-magnitude. In
the study this was the lowest-power core. Folding roughly halves the power
per sample at under 10 % more area. With a Wallace-Dadda multiplier,
sign-magnitude operands save power. With Booth multipliers they cost power,
because the converters consume more than the multiplier saves. Booth
multipliers are faster, so where speed demands one, two's complement is the
better choice.

## Self-test and scan

**Memory** (`ram_bist`). Isolation multiplexers hand the RAM to a march-test
controller. The test is the 6n march MATS++:

- write 0 to every address, going up;
- going up, read 0 then write 1;
- going down, read 1, write 0, read 0.

"0" and "1" are all-zero and all-one words. The test takes 6 x 24 = 144
cycles. Every read is compared on all read ports, and any mismatch sets a
sticky `ram_bist_fail`. While the test runs, bypass multiplexers on the read
outputs pass the write data input straight through, so test patterns never
reach the logic behind the RAM. Afterwards the memory holds zeros, which is
a clean sample history. `tb_ram_bist_cover` forces each of the 768 cell-bit
stuck-at faults and each of the 48 stuck latch enables in turn. The test
reports every one of them.

**MAC** (`mac_bist`). For `BIST_NPAT` cycles (1024 by default) multiplexers
feed the MAC from a 32-bit LFSR, polynomial x^32+x^22+x^2+x+1 with seed
`32'hACE12468`. Every MAC input comes from a fixed combination of LFSR bits:
alpha, beta, gamma1, gamma2, acc and neg. `acc` is forced to 0 on the first
pattern, so the run does not depend on earlier accumulator contents.

A 36-bit MISR, polynomial x^36+x^25+1, compacts the accumulator value after
every pattern. The test takes 1025 cycles. `mac_signature` then holds the
signature. The core does not judge it. Compare it with the value from a
reference model; `tb_fir_core` and `tb_mac_bist` contain one.

How good are 1024 patterns? `tb_mac_bist_cover` injects every single
stuck-at fault on the MAC's internal nets of the default core, 644 in all.
The nets are the operand magnitudes, both carry-save product vectors, the
negating XORs, the alpha multiplexer, the carry-save and carry-look-ahead
adder outputs, and the effective negate. The signature catches 625 of them
(97.05 %). The 19 it misses are stuck-at-0 faults on bits that are 0
throughout the fault-free run, so no pattern set could expose them:

- bits the reduction tree never drives;
- product bits above the 33-bit unsigned range;
- the operand magnitude MSBs, which are 1 only for the most negative value.

This is a count over RTL nets, not gates, and it excludes the inside of the
reduction tree.

**Scan path.** While `scan_en` is high, the chain shifts one bit per clock:

    scan_in -> controller registers -> LFSR (32) -> MISR (36) -> scan_out

The controller contributes 28 flip-flops, so the whole chain is
96 bits. Scanning corrupts the filter state, so reset the core after use.

While either self-test runs, `ready` is low and samples are refused.

## Interface of `fir_core`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `x_valid`, `x_in` | in | 1, 16 | sample offer; taken on the clock edge where `ready` is high |
| `alpha` | in | 36 | accumulator start value, sampled with the sample |
| `ready` | out | 1 | a sample can be taken |
| `y_valid`, `y_out` | out | 1, 36 | one-cycle pulse with the new result (output storage register) |
| `ram_bist_start` / `_done` / `_fail` | in / out / out | 1 | memory self-test |
| `mac_bist_start` / `_done`, `mac_signature` | in / out / out | 1, 1, 36 | MAC self-test |
| `scan_en`, `scan_in`, `scan_out` | in, in, out | 1 | scan path |

Start self-tests only while the filter is idle. Run the memory test once
after power-up: the latch RAM has no reset, and the test clears it.

The coefficients are in `fir_pkg::DEFAULT_COEFS`. They come from a 24-tap
Hamming-windowed sinc low-pass with cut-off fs/6, normalised to a DC gain of
0.9 in Q15:

    h(m) = round(0.9 * 2^15 * w(m) s(m) / sum(w s))

The filter passes a carrier at fs/9 and suppresses a distortion at fs/3 by a
factor of about 150. To use other taps, give `coef_rom` a different `COEFS`
table.

## Departures and own choices

- **Taken from the study.** The block structure, the widths (16-bit data,
  36-bit accumulator), 24 taps with 12 stored coefficients, and the latch
  RAM with its 1:24 decoder and 24:1 read multiplexers. Also the cycle
  counts (24 and 12 MACs per output), the MAC datapath with its negate
  scheme, and the sign-magnitude scheme. Also the five multiplier families,
  the 6n memory test, the 1024-pattern MAC test, and scan on the controller.
- **Not specified there, chosen here.**
  - the coefficient values;
  - the handshake (`x_valid`/`ready`/`y_valid`), the pipeline and the
    circular-buffer pointer directions;
  - the LFSR, the MISR and the pattern mapping (the study cites a
    multiplier test it adapted, without details);
  - the march elements of the 6n test;
  - the partial-product sign handling (full sign extension);
  - the tree grouping, the 4-bit look-ahead blocks of the adder, and the
    exact two-gate form of the reduced-glitch encoder;
  - the redundant-binary tree, realised as 4:2 compressors;
  - reset behaviour;
  - `alpha` as a port.
- **Differs from the drawings.**
  - The product's XOR stage is 36 bits rather than 32, as explained above.
  - The MISR sits beside the accumulator, not around it.
  - The coefficient address counter is part of the controller, so that all
    counters are on the scan path.
- **Latches.** `ram_latch` contains intended latches. Each word's latches are
  open while `clk` is low in a write cycle. The write port is driven from
  rising-edge flip-flops, so data is stable while a latch is open. A word
  being written reads its new value late in that cycle.
- **Not modelled.** Power, area, timing and gate-level fault coverage.
  These depend on a cell library and layout. The two coverage testbenches
  above count faults on RTL nets and memory cells only.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | enums `arch_e`, `mult_e`, `numrep_e`; widths; default coefficients; tree-sizing functions |
| `rtl/fir_core.sv` | top level |
| `rtl/fir_ctrl.sv` | controller with scan path |
| `rtl/ram_latch.sv`, `rtl/ram_bist.sv` | latch sample RAM; its 6n self-test wrapper |
| `rtl/coef_rom.sv` | coefficient table and 12:1 multiplexer |
| `rtl/mac.sv`, `rtl/mac_bist.sv` | MAC; MAC with LFSR/MISR self-test |
| `rtl/sm_conv.sv` | two's complement to sign-magnitude |
| `rtl/mult_*.sv`, `rtl/pp_tree.sv`, `rtl/csa.sv`, `rtl/comp42.sv`, `rtl/cla.sv` | multipliers and adders |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_fir_family.sv` | all seventeen cores on the same stimulus |
| `tb/tb_mac_bist_cover.sv` | stuck-at fault coverage of the MAC self-test |
| `tb/tb_ram_bist_cover.sv` | stuck-at fault coverage of the memory self-test |

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. All state that is read is reset, except the
latch RAM, which the testbenches clear by running the memory self-test, so
two-state simulation works. To build and run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
        rtl/fir_pkg.sv tb/tb_fir_core.sv --top-module tb_fir_core -Mdir obj
    ./obj/Vtb_fir_core

Replace `tb_fir_core` with any other testbench name.

- `tb_fir_core` runs the default core end to end at full size: both
  self-tests with checks of cycle count and signature, a scan shift, and 306
  samples of the distorted-sine test signal and random full-scale data. It
  checks every output, the latency and the rate, and it runs in seconds.
- `tb_fir_family` runs all seventeen configurations, in about 20 s.
- `tb_mac_bist_cover` and `tb_ram_bist_cover` run one self-test per
  injected fault, about 10 s each.
- The unit testbenches check each block against integer reference models.
  The multipliers are checked in all operand shapes, signed and unsigned.
