# Distributed-arithmetic FIR filters: bit-serial, digit-serial and bit-parallel

A FIR filter with constant coefficients computes

    y(n) = h(0)·x(n) + h(1)·x(n-1) + ... + h(T-1)·x(n-T+1)

This RTL computes it with **distributed arithmetic (DA)**, so it has no
multipliers. Split each sample into its bits. Then for one bit position b, the
T taps give a T-bit pattern. Its inner product with the coefficients,
`A(b) = Σ h(i)·bit_b(x(n-i))`, can take only 2^T values, and those values can
be stored in a table ahead of time. The filter output is a shifted sum of
these table reads. The most significant bit is the two's-complement sign bit,
so its read is subtracted:

    y = Σ_{b<N-1} A(b)·2^b  −  A(N-1)·2^(N-1)

One parameterised filter, `da_fir`, covers the whole family that trades area
for speed. The only differences are how many bits it handles per clock and
whether the adder tree is pipelined:

| architecture              | digit size D | clocks per sample | pipelined |
|---------------------------|--------------|-------------------|-----------|
| bit-serial                | 1            | N                 | no / yes  |
| digit-serial              | 2, 4 (6 for 12-bit) | N/D        | no / yes  |
| bit-parallel              | N            | 1                 | no        |

`da_fir_top` places the seven 8-bit variants side by side. All seven use the
same 16 taps and coefficients, and each has its own input handshake and
output.

## Datapath

```
 x_in ─► P/S ─┬─► SRL ─┬─► SRL ─┬─ ... ─► SRL        (T-1 stages, each one sample long)
              │tap 0   │tap 1   │tap 2          │tap T-1
              ▼        ▼        ▼               ▼
        for each bit j of the digit (D copies):
          ROM(taps 0..K-1)  ROM(taps K..2K-1) ...  (ceil(T/K) ROMs of 2^K words)
                 └──── adder tree (optional register per level) ────┘
                                   │ lane_sum[j]
                                   ▼
   scaling accumulator:  acc = acc·2^-D + (Σ_j ±lane_sum[j]·2^j)·2^(N-D)  ──► y
                          (top lane subtracted on the last digit: A/S)
```

**Delay line (`da_ps_reg`, `da_srl`).** The newest sample is loaded into the
parallel-to-serial register. It leaves that register D bits per clock, least
significant digit first, and enters a chain of SRL stages. Each stage holds
exactly N/D digits, which is one whole sample. So in every clock, the outputs
of the P/S register and the T-1 stages show the same digit of x(n), x(n-1),
…, x(n-T+1). The delay line needs no separate sample memory, because the
serial shifting is also the tap delay. On an FPGA the stages fit
shift-register LUTs (SRL16).

**ROM partitions (`da_rom`).** One table of 2^T words is impractical for
T = 16 to 64. The taps are therefore split into groups of K (default 4). Each
group has a 2^K-word table whose word `a` is `Σ_m a[m]·h(base+m)`. An adder
tree (`da_adder_tree`) adds the group outputs. Setting K = T gives the
single-table form. Table contents are computed at elaboration from the
`COEFS` parameter. If T is not a multiple of K, the missing taps count as
zero coefficients.

**Digits.** With D > 1 the ROM and adder-tree bank is repeated D times. Bank j
is addressed by bit j of the current digit of every tap. The scaling
accumulator (`da_scaling_acc`) weights the D bank sums by 2^j and adds them
into one digit value. On the last digit, the top bank is subtracted, because
it carries the sign bits. The accumulator shifts right by one digit per clock
(2^-D). With D = N, one clock handles the whole sample and the accumulator
just registers the result (bit-parallel).

**Exactness.** The accumulator is `WS + N` bits wide. Each new digit value
enters at weight 2^(N-D), so no bit shifted to the right is ever lost. After
the N/D digits, the register holds the exact integer
`Σ h(i)·x(n-i)`. Samples and coefficients are plain two's-complement
integers. If you read them as fractions (Q1.N-1 and so on), scale the result
by hand.

**Pipelining.** With `PIPE = 1` there is a register rank on the ROM outputs
and one after every adder level. The longest path is then one adder instead of
log2(T/K) adders. Pipelining adds `clog2(ceil(T/K)) + 1` clocks of latency. It
does not change the number of clocks per sample: the digit flags travel
through the same number of stages as the data.

## Control and timing (`da_ctrl`)

* **Input.** A valid/ready handshake: `x_in` is taken on a clock edge where
  `in_valid && in_ready`. `in_ready` is high when the filter is idle, and also
  in the clock that processes the last digit of the current sample. A
  continuous stream is therefore taken at exactly **one sample per N/D
  clocks**. If the source pauses, the filter idles and the delay line holds its
  state.
* **Output.** `y` is registered. `y_valid` is high for one clock.
* **Latency.** Counted from the clock that takes x(n) to the clock in which
  `y_valid` is high with y(n): `N/D + 1` clocks, plus
  `clog2(ceil(T/K)) + 1` if `PIPE = 1`. With the defaults (T = 16, K = 4) the
  pipeline adds 3 clocks.
* **Reset.** `rst_n` is asynchronous and active low. It clears the control,
  the delay line (so all samples before the first one count as 0) and the
  accumulator. The adder-tree pipeline registers are not reset. Their
  contents are never used before valid data arrives.

| default top, 16 taps, 8-bit | bit-serial | +pipe | D=2 | +pipe | D=4 | +pipe | bit-parallel |
|-----------------------------|-----------:|------:|----:|------:|----:|------:|-------------:|
| clocks per sample           | 8          | 8     | 4   | 4     | 2   | 2     | 1            |
| latency (clocks)            | 9          | 12    | 5   | 8     | 3   | 6     | 2            |

The sample rate is the clock rate divided by N/D. The published FPGA results
for this family show the same ratio in every case. For example, the 8-bit,
8-tap bit-serial filter ran at 101.94 MHz clock and 12.74 MHz sample rate. The
8-bit digit-serial D = 2 pipelined filter ran at 133.69 MHz and 33.42 MHz.
Pipelining buys clock rate. A larger digit buys samples per clock. The best
rate per unit area reported was for digit size 2 with pipelining.

## Parameters

`da_fir`:

| parameter | default | meaning |
|-----------|---------|---------|
| `T`       | 16      | taps, up to 64 (`da_fir_pkg::MAX_T`) |
| `N`       | 8       | sample width (8 and 12 were evaluated) |
| `CW`      | 8       | coefficient width, up to 16 |
| `D`       | 2       | digit size; must divide N. 1 = bit-serial, N = bit-parallel |
| `K`       | 4       | taps per ROM partition (ROM address bits) |
| `PIPE`    | 1       | pipelined adder tree |
| `COEFS`   | triangular low-pass | `da_fir_pkg::coef_set_t`; entry i holds h(i) in its low CW bits |

The output width `WY` is a local parameter. It is derived from the
coefficients: it is the fewest bits that hold both the most positive and the
most negative output any input can produce. For the default set it is 19 bits.
The internal sums use the worst-case widths `CW + clog2(T)` (adder tree) and
`CW + clog2(T) + N` (accumulator).

The default coefficients are a symmetric triangular (Bartlett) low-pass:
`h(i) = round(min(i+1, T-i) · (2^(CW-1)-1) / ceil(T/2))`. For T = 16, CW = 8
this gives 16, 32, 48, 64, 79, 95, 111, 127, 127, 111, …, 16. Any other set can
be passed in through `COEFS`, for example with a function that fills a
`coef_set_t`.

`da_fir_top` takes `T`, `N`, `CW`, `K`, `COEFS`, the number of variants `NV`,
and the arrays `DIGIT[NV]` and `PIPES[NV]`. The 12-bit family evaluated
alongside the 8-bit one uses `N = CW = 12`, `NV = 9`,
`DIGIT = '{1,1,2,2,4,4,6,6,12}` and `PIPES = '{0,1,0,1,0,1,0,1,0}`.

## Files

| file | contents |
|------|----------|
| `rtl/da_fir_pkg.sv`      | coefficient bus type, sizing functions, default coefficients |
| `rtl/da_ps_reg.sv`       | parallel-to-serial input register |
| `rtl/da_srl.sv`          | one-sample digit shift register (delay-line stage) |
| `rtl/da_rom.sv`          | DA table for one partition of K taps |
| `rtl/da_adder_tree.sv`   | adder tree, optionally pipelined |
| `rtl/da_scaling_acc.sv`  | digit combine, A/S and shift-accumulate |
| `rtl/da_ctrl.sv`         | digit counter, handshake, flag delay |
| `rtl/da_fir.sv`          | the filter |
| `rtl/da_fir_top.sv`      | architectures side by side |

Testbenches in `tb/` check their results themselves and end by printing
`TB_RESULT checks=<n> failures=<m>`:

* One testbench per module (`da_*_tb.sv`). The RTL's results are compared with
  values computed separately in the testbench.
* `da_fir_tb`: eight filter configurations covering D = 1, 2, 3, 4, 6, 8 and
  12, K = 2 and 4 plus one unpartitioned 256-word table (K = T = 8),
  T = 5 to 64, and 8- and 12-bit widths. Random coefficients
  include the extremes. Each run checks exact outputs against a direct
  convolution, the latency and the sample spacing. The harness is in
  `da_fir_harness.sv`.
* `da_fir_top_tb`: the default top with no parameters changed, 400 samples
  through every architecture. It also counts back-pressure, idle input,
  negative and full-scale samples, back-to-back samples and pipelined outputs,
  and fails if any of these never happens.
* `da_fir_workloads8_tb` and `da_fir_workloads12_tb`: every evaluated size
  (8, 12, 16, 24, 32 and 64 taps) with all 8-bit and all 12-bit architectures.
  They check exact outputs. They also check that the measured clocks per
  sample equal the clock-rate / sample-rate ratio of the published 8-tap
  results. The harness is in `da_fir_top_harness.sv`.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/da_fir_pkg.sv tb/da_fir_top_tb.sv \
          --top-module da_fir_top_tb -o sim && ./obj_dir/sim
```

Swap in any other testbench name. Verilator finds the other files through
`-Irtl -Itb`. The two workload testbenches take a few minutes to compile,
because they elaborate about a hundred filters. Linting:
`verilator --lint-only -Wall -Irtl rtl/da_fir_pkg.sv rtl/da_fir_top.sv`.
Two lint warnings remain:

* The adder tree's `clk` is unused when `PIPE = 0`.
* `rst_n` is used both as an asynchronous reset and in an assertion's
  `disable iff`.

## How closely this follows the original design

These parts follow the DA architecture as published:

* the P/S register and SRL delay line;
* ROM partitioning into T/K tables plus an adder tree;
* the add/subtract accumulator with its A/S control and shift feedback;
* D copies of the ROM/tree bank for digit-serial operation;
* pipeline registers after the ROMs and after each adder level;
* the architecture list and the 8- and 12-bit widths;
* the output width derived from taps, input width and coefficient values.

These are choices made in this RTL:

* **K = 4.** The partition size is not specified. Four address bits match a
  4-input FPGA LUT, and every evaluated tap count is a multiple of 4. The
  block diagrams draw ROMs with two address lines. K = 2 is supported and
  tested.
* **Coefficients.** The evaluation used a variety of coefficient sets that
  were not published. The default set here is only an example.
* **Shift per clock.** The digit-serial diagram labels its feedback shift
  2^-1. Here the feedback shifts by a whole digit (2^-D), which is what one
  digit per clock requires.
* **Handshake, reset, latency and internal widths.** The valid/ready
  handshake, the reset behaviour, the exact latency and the internal widths
  belong to this implementation.
* **Bit-parallel pipelining.** Bit-parallel with pipelining was not part of the
  evaluated set. `da_fir` still allows it.

Not reproduced: the clock rates, slice counts and gate counts. They come from
a particular FPGA (Virtex-II) and synthesis flow with no placement
constraints. Nothing in this RTL forces a mapping to SRL16 or LUT ROMs; the
synthesis tool infers it.
