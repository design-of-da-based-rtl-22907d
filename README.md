# Distributed-arithmetic FIR core: half-band filter and polyphase decimator

This is a multiplier-free FIR filter core. It computes `y(n) = Σ h(k)·x(n−k)` with a table
lookup and a shift-and-add. The core has two configurations:

* a **half-band filter**, which runs at a single rate;
* an **M-to-1 polyphase decimator**, built from the same parts.

Both use *distributed arithmetic* (DA), processing one input bit per clock:

1. Take bit `b` of the current sample and bit `b` of each of the N−1 previous samples. These
   N bits form an N-bit address.
2. A table with 2^N entries stores every possible sum of coefficients. The addressed entry is
   `Σ_k bit_b(x(n−k))·h(k)`.
3. After B clocks (one per input bit), the B table words are combined with weights 2^b. The
   result is the filter output.

A filter of any length therefore costs B clocks per sample, with no multiplier. What grows
with N is the table (2^N words) and the sample-history register.

The RTL is SystemVerilog-2017 and fully parameterised. The coefficient list is a parameter,
and the table is computed from it at elaboration.

## The signal chain

```
          +-----+  1 bit/clk  +------------------+  N-bit addr  +-----+  W bits  +---------------+
DIN(B) -->| PSC |------------>| TSB  (N-1)·B bits |------------->| LUT |--------->|    scaling    |--> DOUT
 ND   --> +-----+      |      +------------------+      ^       +-----+          |  accumulator  |    RDY
                       +--------------------------------+ addr[0]                +---------------+
              ^                 ^                                  ^                    ^
              +-----------------+------ control: divide-by-B counter (RFD) -------------+
```

* **Control (`da_control`).** A divide-by-B counter. After a sample is loaded it raises
  `shift` for B clocks. It also produces the accumulator flags `acc_en`, `acc_first` and
  `acc_last`, one clock later because the table is read synchronously. All four flags travel
  as one packed struct, `da_ctrl_t`. The counter also produces *ready for data* (RFD):
  * RFD is high while the counter is idle.
  * RFD is also high in the clock that processes the final bit of the current sample. A new
    sample can then be loaded at the next edge, with no gap.
* **PSC (`da_psc`).** The parallel-to-serial converter. It loads the sample and shifts it out
  LSB first.
* **TSB (`da_tsb`).** The time-skew buffer: N−1 shift registers of B bits each, in a chain
  fed by the PSC bit. One sample is exactly B shifts long. So the bit leaving segment k in a
  given clock is the same bit position of the sample k periods older. The segment boundaries
  are the address bits: `addr[0]` is the PSC bit, for x(n), and `addr[k]` is the bit for
  x(n−k). The TSB shifts only while a sample is being processed, so idle gaps between samples
  do not disturb the history.
* **LUT (`da_lut`).** Entry `a` is `Σ_k a[k]·h(k)`. A constant function fills the table at
  elaboration. The read is synchronous, one clock, like a block RAM. Zero coefficients cost
  nothing: they add nothing to any entry.
* **Scaling accumulator (`da_scaling_acc`).** Words arrive LSB first, so the accumulator adds
  and then shifts *right*:

  ```
  S_0 = P_0,     S_b = (S_{b-1} >>> 1) + P_b     (P_{B-1} subtracted for a signed input)
  ```

  Each right shift drops one bit, and that bit is a finished low-order bit of the result. The
  accumulator keeps these bits in a (B−1)-bit register. The output `{S_{B-1}, kept bits}` is
  therefore the exact sum, with no rounding. `S` needs one guard bit over the table word,
  because `|S_b| < 2·max|P|`.

### Word widths

| quantity | width | why |
|---|---|---|
| table word W | C + ⌈log2 N⌉ (+1 if coefficients are unsigned) | \|Σ of N coefficients\| ≤ N·2^(C−1) |
| accumulator | W + 1 | guard bit |
| DOUT | W + B = **B + C + ⌈log2 N⌉** | exact convolution result, two's complement |

At the default half-band sizes (B=4, C=4, N=11), DOUT is 12 bits.

## Handshake and timing

The ports follow a data-flow style. `RST` is synchronous and active high. It returns the
counter to idle and clears the sample history.

| port | dir | meaning |
|---|---|---|
| `DIN[B-1:0]` | in | input sample; unsigned by default, or two's complement with `SIGNED_IN=1` |
| `ND` | in | new data: DIN is taken at the clock edge if RFD is high; ND while RFD is low is ignored |
| `RFD` | out | ready for data |
| `RDY` | out | one-clock pulse: a new DOUT |
| `DOUT[R-1:0]` | out | result; held between RDY pulses (`REG_OUT=1`), or valid only with RDY (`REG_OUT=0`) |

Timing of the half-band core, counting clock 0 as the clock in which ND is accepted:

```
clock   0        1 .. B              2 .. B+1              B+2
        ND&RFD   PSC/TSB shift,      accumulator adds      RDY=1, DOUT valid
                 LUT read bit 0..B-1 word of bit 0..B-1
```

* **Throughput.** With ND tied high, a sample is accepted every B clocks, whatever N is.
* **Latency.** RDY comes B+2 clocks after the accepting clock.
* **Decimator.** RDY comes one clock later (B+3), after its registered output adder, or at
  B+2 with `REG_OUT=0`. The half-band core with `REG_OUT=0` keeps B+2.

## Half-band configuration (`da_halfband_filter`)

This module is the control counter plus one PSC/TSB/LUT/accumulator chain (`da_datapath`).

**Default sizes.** N = 11 taps, B = 4-bit input, C = 4-bit coefficients, 12-bit output.

**Default coefficients.** They come from the usual half-band recipe. Take a Hamming-windowed
`sinc(n/2)/2` for n = −(N−1)/2 … (N−1)/2 and quantise it as `round(h·(2^(C−1)−1))`. At 4-bit
precision this gives

    h = {0, 0, 0, 0, 2, 4, 2, 0, 0, 0, 0}

The outer taps (±3, ±5) round to zero. Give a wider C and your own list for a sharper
filter. For example, C = 8 gives `{1,0,-5,0,37,64,37,0,-5,0,1}`.

The core does not require the coefficients to be half-band. Any N-tap list works, so the
same module is also the generic single-rate DA FIR.

**Table size.** The table has 2^N entries. N = 11 means 2048 words, one block RAM's worth.
N much beyond about 16 is impractical with this architecture. For example, a 31-tap filter
would need 2^31 words.

## Polyphase decimator (`da_polyphase_decimator`)

The decimator computes the N-tap FIR output at every M-th input:

    y(m) = Σ_{k=0}^{N−1} h(k)·x(mM − k)

1. **Splitting the coefficients.** The list is split into M polyphase segments,
   `h_i(r) = h(i + M·r)`. Each segment has ⌊(N−1)/M⌋+1 taps; missing taps are zero.
2. **Distributing the samples (`da_commutator`).** The commutator hands input samples to the
   segments starting at index M−1 and counting down to 0. Within one output period, the
   oldest sample goes to segment M−1 and the newest to segment 0, so segment i sees
   `x(mM − i)`. Samples for segments M−1 … 1 wait in holding registers. The sample for
   segment 0 passes straight through.
3. **Computing.** When segment 0's sample arrives, all M segment chains load together and
   run their DA inner products in parallel, over B clocks. One divide-by-B counter drives
   them all. Each chain has its own TSB and a 2^(taps per segment) table. The arithmetic
   thus runs at the low, output rate.
4. **Adding.** An adder sums the M segment results into a registered DOUT. RDY comes B+3
   clocks after the clock that took the group-completing sample. With `REG_OUT=0` the adder
   drives DOUT directly, RDY comes at B+2, and DOUT is valid only while RDY is high.

**RFD in the decimator.** RFD is low only in one case: the sample that would complete a group
arrives while the previous group still has more than its final bit left to process. Samples
for the other segments are always taken.

* If B ≤ M, input can come on every clock.
* If B > M and inputs arrive back to back, RFD holds off the group-completing sample for
  B − M clocks per output.

**Default sizes.** M = 4, N = 4, B = 8, C = 8, 18-bit output. The default coefficients
`{5, 59, 59, 5}` are a Hamming-windowed low-pass with cutoff 0.25 (as from `fir1(3, 0.25)`),
scaled by 2^(C−1)−1 and rounded.

## Top level (`da_ipcore_top`)

The two configurations are alternatives of one generated core. The top instantiates both side
by side, at their default sizes, on a common clock and reset:

* half-band ports: `hb_din`, `hb_nd`, `hb_rfd`, `hb_rdy`, `hb_dout` (12 bits);
* decimator ports: `pd_din`, `pd_nd`, `pd_rfd`, `pd_rdy`, `pd_dout` (18 bits).

Every size and coefficient is a parameter of the top (`HB_*`, `PD_*`).

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| both | `B` | 4 (half-band), 8 (decimator) | input bits = clocks per sample; ≥ 2 |
| both | `C` | 4 / 8 | coefficient width |
| both | `N` | 11 / 4 | taps; table is 2^N (half-band) or 2^(⌊(N−1)/M⌋+1) per segment |
| decimator | `M` | 4 | decimation factor, ≥ 2 |
| both | `COEFF` | see above | `coef_t [N-1:0]`; element k is h(k); as a concatenation the list starts with h(N−1) |
| both | `COEF_SIGNED` | 1 | 0 = unsigned coefficients (adds one bit to the table word) |
| both | `SIGNED_IN` | 0 | 1 = two's complement DIN (MSB word subtracted) |
| both | `REG_OUT` | 1 | 1 = registered DOUT, 0 = unregistered |

A note on passing coefficients: pass `COEFF` as a concatenation of 32-bit signed literals, for
example `.COEFF({32'sd2, 32'sd30, 32'sd30, 32'sd2})`. Verilator does not accept an assignment
pattern for an overridden parameter whose size depends on another parameter. For this reason
the list is a packed array, not an unpacked one.

## Departures from the original design, and what is this design's own

* **Exact output.** The original reference model drops the bit shifted out of the accumulator
  on every clock. Its printed results are therefore slightly low and irregular; for example, a
  ramp gives 4, 16, 31, 46, … where the exact values step evenly. This core keeps those bits,
  so DOUT is the exact convolution. Results printed from the truncating model cannot be
  reproduced bit for bit. The original 7-tap step response, for example, ends at 15, where
  the coefficients that give its printed impulse response (0 0 3 8 3 0 0) sum to 14.
* **One clock per input bit, no pre-adder.** Symmetric coefficients are not folded. The
  original design also takes B clocks per sample.
* **Table contents.** The original design generated the table offline and loaded it. Here a
  constant function computes it at elaboration.
* **This design's own choices.** The synchronous one-clock table read, the (B−1)-bit
  low-order register, the guard bit and all word widths. Also the LSB-first serial order
  (taken from the original reference model), the load-over-shift priority in the PSC,
  ignoring ND while RFD is low, and clearing the history on reset.
* **Decimator choices.** The shared counter for all segments, the commutator holding
  registers, the registered output adder and the RFD hold-off rule.
* **Test signal.** The testbenches generate the original three-tone input:
  50·(2.24 + sin 2π·500t + sin 2π·1000t + sin 2π·2000t), sampled every 0.1 ms and floored to
  8 bits. Every fifth sample lands exactly on an integer. At those samples the floor can
  differ by one between math libraries, so individual values may not match printed ones.
  The outputs are checked against a model fed the same samples.
* **Not built.** A coefficient-reload interface, table-size optimisation and multi-channel
  operation. These are options of a vendor DA core that the original design lists; it does
  not design them.

## Verification

Each testbench in `tb/` checks its block against values computed independently in the
testbench. Each ends with `TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_da_control` | shift lasts exactly B clocks; RFD only when idle or on the final bit; accumulator flags are one clock behind; reset in mid-run |
| `tb_da_psc` | bits leave LSB first; output holds while idle; load in the final-bit clock |
| `tb_da_tsb` | `addr[k]` equals the input of k·B shifts ago, with random idle clocks |
| `tb_da_lut` | every entry of the 11-tap table, and of a strided polyphase table with negative taps |
| `tb_da_scaling_acc` | exact Σ P_b·2^b, unsigned and signed; registered hold; unregistered valid with `done` |
| `tb_da_commutator` | segment i holds the sample i places back; group flag every M samples |
| `tb_da_halfband_filter` | fourteen cores, each checked on every output value and its clock, on every RFD, and on the throughput of B clocks: the default core at full rate and with random ND; 7 taps with h={0,0,3,8,3,0,0}, whose impulse response must read 0 0 3 8 3 0 0; signed 8-bit input with unregistered output; 4 taps at 6 bits, whose ramp 0,1,2,… must give 0, 2, 34, 96, 160, 224, 288, 352, 416; 4 taps at 10 bits; 6 and 8 taps at 8 bits; the 7-tap core with a step input, which must give 0, 3, 11, 14, 14, …; 4 taps at 8 and 10 bits with h={0,8,8,0} and {0,2,2,0}, whose ramps 1,2,3,… must give 0, 8, 24, 40, 56 and 0, 2, 6, 10, 14; the 7-tap and 11-tap 8-bit half-band sets driven by the three-tone test signal (fourteen cores in all) |
| `tb_da_polyphase_decimator` | M=4/N=4 over-driven (RFD hold-off) and at random rate; M=2, M=3, and M=2/N=5 signed; the three-tone test signal at M=2, 3, 4 and M=2/N=5, once with the unregistered output; every output and its clock |
| `tb_da_ipcore_top` | the whole top at default sizes: both filters at full rate, at random rate, and through a reset mid-stream; counts back-to-back samples, idle gaps, refused ND, decimator hold-offs and outputs |

The simulations are two-state, so all state that is read is reset.

## Simulating

Verilator 5 with `--timing` is enough. From the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/da_pkg.sv tb/tb_test_signal.sv tb/tb_da_ipcore_top.sv --top-module tb_da_ipcore_top
./obj_dir/Vtb_da_ipcore_top
```

Replace the testbench name to run any other one. The two packages are named on the
command line because verilator does not look packages up in `-y` directories. To lint a module:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/da_pkg.sv rtl/da_halfband_filter.sv
```

## Files

* `rtl/da_pkg.sv`: shared type `coef_t`, the control struct `da_ctrl_t` and the width functions.
* `rtl/da_control.sv`, `da_psc.sv`, `da_tsb.sv`, `da_lut.sv`, `da_scaling_acc.sv`,
  `da_commutator.sv`: the building blocks.
* `rtl/da_datapath.sv`: one PSC → TSB → LUT → accumulator chain.
* `rtl/da_halfband_filter.sv`, `rtl/da_polyphase_decimator.sv`: the two configurations.
* `rtl/da_ipcore_top.sv`: both configurations side by side.
* `tb/`: one testbench per block and the end-to-end test. `tb_hbf_harness` and
  `tb_pd_harness` are reusable checkers that hold the reference models; `tb_test_signal` is
  the three-tone test input.
