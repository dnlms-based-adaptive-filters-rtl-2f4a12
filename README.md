# Pipelined DNLMS adaptive filter for echo cancellation

An echo canceller removes from a transmitted signal the echo of the signal it
receives. It learns the echo path with an adaptive FIR filter driven by the
received (far-end) signal `x(n)`, and subtracts the filter's output `y(n)`
from the microphone or line signal `d(n)`. The residual `e(n) = d(n) - y(n)`
goes out, and it also steers the adaptation. Echo paths are long (about a
hundred taps for a telephone-network hybrid, thousands for a room), so the
filter is large. In a plain direct-form filter, the adder tree and the
error feedback then set a clock period that grows with the filter length.

This RTL implements the **delayed normalised LMS (DNLMS)** algorithm:

    y(n)     = w(n)^T x(n)
    e(n)     = d(n) - y(n)
    mu(n)    = alpha / (||x(n)||^2 + beta)
    w(n+1)   = w(n) + mu(n-D) e(n-D) x(n-D)

It is built in a **pipelined hybrid form**, whose critical path is
`(P+1)` additions and one multiplication whatever the filter length `N`. `P`
is the number of weights per processing element. The adaptation delay `D`
is the price of pipelining: the update uses the error of `D` samples ago.
The hybrid form needs `D >= N/P`.

The default configuration is N = 96 weights, P = 3 weights per element
(32 elements) and D = 32. It uses 8-bit samples and 18-bit weights, with
alpha = 0.125 and beta = 0.0625. Around the filter sits a small FPGA test
system. It streams a stored signal (11212 samples) through the filter and
records the outputs. The architecture, word lengths, parameters and test
set-up follow R. Lee, *DNLMS-based Adaptive Filters for Echo Cancellation*
(M.A.Sc. thesis, University of Windsor, 2007). The SystemVerilog is a fresh
implementation. Its own choices are listed in
[Departures and choices](#departures-and-choices).

## How the hybrid form works

This is the part that takes the most thought. The steps start from the
direct form and end at the structure built in `rtl/dnlms_hybrid_filter.sv`.

**Direct form.** One long adder chain sums the N products `w_k x(n-k)`.
The error feeds back through the step-size multiplier into all N weight
updates. The longest path is about `(N+1)` additions plus a multiplication.

**Cutset retiming.** The weights are cut into groups of P. A cutset moves
one register into the adder chain at each group boundary. It moves the
opposite register out of the path that carries the update term `mu e`
towards that group. This does not change the filter's input/output
behaviour. It does need registers on the update path to remove, and the
delay `D` provides them, hence `D >= N/P`. The result is a chain of
identical **processing elements (PEs)**:

* PE `i` (i = 0 … N/P-1) holds weights `w_{iP} … w_{iP+P-1}`.
* Partial sums flow from PE `N/P-1` towards PE 0 through one register per
  element. PE 0 delivers `y(n)`. So the contribution of PE `i` is computed
  `i` samples early, and the PE reads its regressor taps `i` samples
  "later" than in the direct form. Tap `j` of PE `i` is `x(n - i(P-1) - j)`,
  not `x(n - iP - j)`.
* The update term `mu e` enters PE `N/P-1` straight from the multiplier. It
  reaches PE `i` after `N/P-1-i` more registers, so PE `i` sees
  `mu(n-D+i) e(n-D+i)`. Its delayed regressor samples come from
  `x(n - D - i(P-1) - j)`. Both the filter and the update of weight `k`
  are therefore skewed by the same `i` samples, and the weight follows the
  DNLMS recursion with delay `D`.
* The direct form keeps two tap-delay lines, one for `x(n)` and one for
  `x(n-D)`. Here they are merged into one line of `D + N - N/P + 1` taps:
  PE `i` reads its current taps from position `i(P-1)` and its delayed
  taps from position `D + i(P-1)`.
* The divider of the step size becomes a look-up table (see below). The
  critical path is then one PE's multiply plus its `P+1` chained
  additions.

Tap positions for the defaults (N = 96, P = 3, D = 32):

| Signal                        | Where it comes from             |
|-------------------------------|---------------------------------|
| `x[k]` (97 taps)              | `x(n-k)`, k = 0 … 96            |
| PE `i` filter taps            | `x[2i]`, `x[2i+1]`, `x[2i+2]`   |
| PE `i` update taps            | `x[32+2i]` … `x[34+2i]`         |
| energy: entering / leaving    | `x[D-N/P]` = `x[0]`, `x[96]`    |
| error into the `mu e` product | `e(n - (D - N/P + 1))` = `e(n-1)` |
| `mu e` at PE `i`              | `mu(n-32+i) e(n-32+i)`          |

Choosing P is a trade. A small P shortens the critical path and the fan-out
of `mu e` inside a PE, but the minimum `D = N/P` grows, and a longer
adaptation delay slows convergence.

## The step-size path

`rtl/regressor_energy.sv` keeps the regressor energy recursively instead of
summing N squares:

    E(n) = E(n-1) - x_old^2 + x_new^2

Here `x_new = x[D-N/P]` and `x_old = x[D+N-N/P]`, the samples entering and
leaving the N-sample window that the update will use. The energy register
is loaded with `beta` at reset. Beta therefore rides along in the sum, so
`E` is never zero. The (12,7) energy word is the address of
`rtl/step_size_lut.sv`, a 4096-word table of `floor(alpha / E)` in the
(11,7) step-size format. Its read is synchronous. That single clock of
latency is the register the retiming places after the divider, and it
lines `mu` up with the error from the error delay line.

The table is filled at elaboration from the parameter `ALPHA`. It also has
a write port: at system level the host can load a table for a different
alpha (for example 0.5 for white-noise tests) without rebuilding. In reset,
the filter forces the step size to zero.

## Number formats and arithmetic

All arithmetic is two's complement. Every operation drops the bits below the
target format's LSB, which truncates toward minus infinity. On overflow it
saturates to the largest positive or negative code. `rtl/sat_trunc.sv`,
`rtl/sat_add.sv` and `rtl/sat_mult.sv` implement these rules. The
formats below are (total bits, fractional bits) and live in
`rtl/dnlms_pkg.sv`.

| Signal                                | Format  |
|---------------------------------------|---------|
| x(n), d(n), y(n), e(n)                | (8,7)   |
| weights w                             | (18,17) |
| step size mu                          | (11,7)  |
| regressor energy + beta               | (12,7)  |
| mu·e product                          | (13,12) |
| PE partial products and partial sums  | (16,15) |
| x² in the energy recursion            | (8,7)   |
| alpha (table parameter)               | (16,15) |

`y` is the top 8 bits of PE 0's (16,15) sum. The error is formed as
`d - y` at full precision and then saturated.

## Filter interface and timing (`dnlms_hybrid_filter`)

| Port        | Dir | Width  | Meaning |
|-------------|-----|--------|---------|
| `clk`, `rst`| in  | 1      | sample clock; synchronous active-high reset |
| `xin`, `din`| in  | 8      | far-end sample, desired (echo + near-end) sample |
| `beta`      | in  | 12     | beta, (12,7); the default system uses 8 = 0.0625 |
| `yout`, `e` | out | 8      | echo estimate and echo-cancelled output |
| `energy`    | out | 12     | regressor energy + beta (the table address) |
| `mu`        | out | 11     | step size in use |
| `w`         | out | N×18   | all weights, `w[iP+j]` = weight j of PE i |
| `lut_*`     | in  |        | write port of the step-size table, own clock |

Timing:

* The filter takes one sample per clock.
* `xin`/`din` are registered on entry. The `yout`/`e` belonging to the
  sample captured at edge t are valid, combinationally, during the
  following cycle. That is a latency of one clock.
* Reset clears every register, loads `beta` into the energy register and
  forces `mu` to 0. The first sample can be presented at the edge where
  reset is first seen low.
* Parameters: `N` (a multiple of `P`), `P`, `D` (at least `N/P`; checked
  at elaboration) and `ALPHA` as a (16,15) code (4096 = 0.125,
  16384 = 0.5).

## The test system (`dnlms_fpga_top`)

The top reproduces the bench used to run the filter on an FPGA board:

* `clk_divider` divides the board clock by `DIV` (default 2). The filter
  closed timing near 32 MHz on its original FPGA, below a 50 MHz board
  oscillator.
* Four `dual_clock_ram`s, 11212 × 8 bits each, hold `x`, `d`, `y` and `e`.
  The filter side runs on the divided clock. The host side runs on the
  board clock.
* `hybrid_test_fsm` waits in IDLE with the filter held in reset. On a rising
  edge of `start` it reads sample addresses 0 … NUM-1, one per clock, then
  drains its two-stage write pipeline and raises `done`. Result address k
  holds the outputs for sample address k: the memory read takes one clock
  and the filter input register another, so writes trail reads by two
  clocks. A pass takes `NUM + 3` filter clocks. Every pass starts the
  filter from reset, so repeated passes give identical results.
* Host port: `host_wr_x` / `host_wr_d` write `host_wdata` at `host_addr`.
  `host_wr_lut` writes `host_lut_wdata` into table word `host_addr[11:0]`.
  `host_y` / `host_e` return the words at `host_raddr` one board clock
  later.
* `reset_n` and `start` are push-button inputs. They are synchronised into
  the filter clock. `busy` and `done` are synchronised back to the board
  clock.

After generic synthesis, the default top has 3,461 flip-flop bits and
about 2,700 word-level cells. These include 195 multipliers: two per weight
and three in the step-size path. It has about 404 k memory bits:
4 × 89,696 for the sample and result memories and 45,056 for the table. The original table was stored as 12-bit words,
one bit more than the step-size format needs. The filter's register count
is close to the `2N + 2D` delay elements of the hybrid architecture:

| Registers            | Count |
|----------------------|-------|
| weights              | 96    |
| regressor line       | 97    |
| partial-sum pipeline | 31    |
| `mu e` skew line     | 31    |
| other                | 4     |

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

The reference for the filter is `tb/dnlms_ref_pkg.sv`. It is an integer
model of the same data flow: full products, arithmetic shifts, explicit
clamps. It builds its step-size table with a different formula from the
RTL's.

* `tb_dnlms_hybrid_filter` runs a default filter and a small one
  (N = 8, P = 2, D = 6 > N/P, alpha = 0.5) on a synthetic echo signal:
  Gaussian-like noise through a 64-tap decaying echo path, plus near-end
  noise and bursts that saturate the error. Every cycle it compares `y`,
  `e`, energy, `mu` and all weights with the model. It resets the filters
  in mid-run and checks the one-clock latency. It requires at least 10 dB
  echo return loss enhancement (ERLE) at the end; about 23 dB is reached.
* `tb_dnlms_fpga_top` is the full-size, end-to-end test at default
  parameters. It loads 11212 samples through the host port and runs a
  pass. It reads every `y`/`e` word back and compares it with the model.
  It checks the pass length, then runs a second pass and requires
  identical results. It then loads the alpha = 0.5 table and runs a third
  pass against the alpha = 0.5 model. ERLE over the last 2000 samples is
  about 26 dB. Over samples 600–999, the alpha = 0.5 pass must reach at
  least 7 dB and be 2 dB ahead of the alpha = 0.125 pass (about 11 dB
  against 8 dB). That is the faster convergence of the larger step. It counts the filter held in reset while idle, the write
  pipeline draining, error saturation, weight adaptation, several table
  entries in use, and the table reload, and fails if any never happens.
* Unit testbenches cover the PE, the energy recursion (including
  saturation), the table (every address, before and after a rewrite),
  the delay line, the three arithmetic primitives, the controller, the
  clock divider and the memory.

Running a testbench with Verilator 5 (from the project root):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_dnlms_fpga_top \
        -y rtl -y tb +libext+.sv rtl/dnlms_pkg.sv tb/dnlms_ref_pkg.sv \
        tb/tb_dnlms_fpga_top.sv -o sim && ./obj_dir/sim

Replace the top module and file for any other testbench. Once built, each
one simulates in under a second.

## Departures and choices

These follow the source design:

* the hybrid architecture and its tap positions;
* the single shared tap-delay line;
* the recursive energy with a beta-loaded register;
* the division look-up table;
* the word lengths, parameters, truncation and saturation rules;
* the sample count, the IDLE/RUN controller and the memories of the test
  bench.

Choices made here:

* **Error subtraction.** It is done at full precision before saturating,
  so `d - (-1)` saturates instead of wrapping.
* **Table contents.** Computed as `floor(alpha/E)` saturated to the largest
  step. `E = 0` gives the largest step and negative `E` gives 0; neither
  can occur in the filter.
* **Table placement.** The table sits inside the filter, with a write port
  for the host.
* **Controller.** It reacts to the rising edge of `start`, not its level.
  It has an explicit DRAIN state, and it aligns result addresses with
  sample addresses.
* **Weights.** They start from zero at every pass; no initial weights are
  loaded.
* **Clocking and I/O.** The divider ratio, the synchronisers and the plain
  host port are this design's own. On the original board, JTAG memory
  tools and the board's oscillator and buttons played these roles.

Not included:

* the reduced-complexity variants of the algorithm: power-of-two
  quantisation of the error and energy, M-Max partial update and
  stop-and-go adaptation. These are algorithm studies, not part of the
  implemented hardware.
* the ITU-T G.168 composite source signal and echo-path data. The
  testbenches generate a synthetic signal of the same length instead.

## Files

`rtl/`:

| File                      | Contents |
|---------------------------|----------|
| `dnlms_pkg.sv`            | formats and the table formula |
| `sat_trunc.sv`, `sat_add.sv`, `sat_mult.sv` | arithmetic |
| `delay_line.sv`           | delay line |
| `dnlms_pe.sv`             | processing element |
| `regressor_energy.sv`     | energy recursion |
| `step_size_lut.sv`        | step-size table |
| `dnlms_hybrid_filter.sv`  | the filter |
| `hybrid_test_fsm.sv`      | test controller |
| `clk_divider.sv`          | clock divider |
| `dual_clock_ram.sv`       | sample and result memory |
| `dnlms_fpga_top.sv`       | test system |

`tb/`: one `tb_<module>.sv` per module, plus `dnlms_ref_pkg.sv`.
