# A 4-tap FIR filter scheduled four ways: trading area for initiation rate

One small computation, a 4-tap FIR filter

    Y = a0*X + a1*X@1 + a2*X@2 + a3*X@3        (X@k = the sample k steps back)

is mapped onto hardware under four different schedules. Its data-flow graph has
four products and three sums:

    N2 = X   * a0      N4 = X@2 * a2      N7 = N4 + N5
    N3 = X@1 * a1      N5 = X@3 * a3      N6 = N3 + N7
                                          N8 = N2 + N6 = Y

The longest path (a product, then N7, N6, N8) is four operations deep. If each
operation takes one clock, no schedule can finish a sample in fewer than 4 clocks.
That is the **latency**. However, the hardware does not have to wait for one sample
to finish before it starts the next. The number of clocks between two accepted
samples is the **initiation rate** (here, a smaller number means a faster design).
When the initiation rate is below the latency, several samples are in flight at
once, i.e. the schedule is pipelined. The four designs show what that costs:

| module        | initiation rate | latency | multipliers          | adders | samples in flight |
|---------------|-----------------|---------|----------------------|--------|-------------------|
| `fir4_ir2`    | 2               | 4       | 2                    | 2      | 2                 |
| `fir4_ir1`    | 1               | 4       | 4                    | 3      | 4                 |
| `fir4_ir6_pm` | 6               | 6       | 2 (2-stage pipeline) | 1      | 1                 |
| `fir4_ir2_pm` | 2               | 6       | 2 (2-stage pipeline) | 2      | 3                 |

A rate-4 version of the filter, with 2 multipliers, 1 adder and 10 registers, is
the usual reference point. At rate 4 its multipliers are only half used. That is
why halving the interval to 2 costs only one more adder and one more register, not
twice the hardware. Its schedule is not part of this RTL.

`fir4_top` places the four designs side by side. They share clock and reset and
nothing else.

## The rate-2 schedule and its seven registers (`fir4_ir2`)

This is the central design and the least obvious one. Each sample takes four
clocks. A new sample enters every two clocks, so in any clock one sample is in its
first half and the previous one is in its second half. Because the rate (2) divides
the latency (4), the whole operation is a two-step loop, steps **I** and **I+1**.
The same seven registers serve both samples, and each register changes meaning
from step to step.

At the start of step I, sample J is about to enter and sample J-1 is halfway done:

| register | contents at step I | contents at step I+1 |
|----------|--------------------|----------------------|
| RA       | J: X@3             | J: N5                |
| RB       | J: X@2             | J: X@2               |
| RC       | J: X@1             | J: X@1               |
| RD       | J-1: N2            | J-1: N2              |
| RE       | J-1: N3            | J: X                 |
| RF       | J-1: N7            | J-1: N6              |
| RG       | (free)             | J: N4                |

The transfers are:

    step I    RF <= RE + RF        N6 of J-1      adder A
              RE <= X              sample J enters
              RG <= RB * a2        N4 of J        multiplier B
              RA <= RA * a3        N5 of J        multiplier A
    step I+1  Y   = RD + RF        N8 of J-1      adder A, straight to the output
              RD <= RE * a0        N2 of J        multiplier A
              RE <= RC * a1        N3 of J        multiplier B
              RF <= RG + RA        N7 of J        adder B
              RC <= RE             X of J    becomes X@1 of J+1
              RA <= RB             X@2 of J  becomes X@3 of J+1
              RB <= RC             X@1 of J  becomes X@2 of J+1

The key moves are these:
- The sample history has no shift register of its own. It moves through RA, RB
  and RC in step I+1, after the products that read it have been issued.
- RA is reused for N5 once X@3 has been consumed.
- RE briefly holds the new sample X. X is then moved into RC just as RE receives
  N3.

Only RG had to be added to the six registers the loop would otherwise need. With
the four coefficient registers this makes 11 registers. Both multipliers are busy
in both steps. Adder A is busy in both steps (N6, then N8) and adder B in one (N7).

## Rate 1 (`fir4_ir1`)

At one sample per clock, every clock contains one step of each of four samples:

    clock 1: N4, N5, input X    clock 2: N2, N3, N7    clock 3: N6    clock 4: N8

Every unit is therefore busy every clock: four multipliers and three adders. Here
the registers are a plain pipeline of this design's own making. A three-deep
history d1..d3 shifts every clock. Stage registers p4/p5, then p2/p3/s7, then
q2/s6 carry each sample forward. The history shifts every clock, so in a sample's
second clock d1 already holds its X and d2 its X@1. N2 and N3 read them from there.

## Pipelined multipliers (`mult_pipe`)

Shortening the clock period requires shorter combinational paths. The multiplier
is the longest path, so it is pipelined first. `mult_pipe` puts `STAGES`
flip-flop ranks inside the multiplier:
- **Operand split:** operand b is cut into `STAGES+1` slices.
- **Segments:** each segment adds the shifted partial products of its slice to a
  running sum. The top bit of b has negative weight, so signed products are exact.
- **Ranks:** the operands travel along with the sum through the flip-flop ranks.
- **Throughput and latency:** a new operand pair can enter every clock, and its
  product appears `STAGES` clocks later.

With `STAGES = 2` the datapath saves the product at the end of the third clock. So
a multiply costs 3 clocks, and the longest path of the filter grows to 3 + 1 + 1 + 1
= 6 clocks. With `STAGES = 0` it is a plain combinational multiplier, as used by
`fir4_ir2` and `fir4_ir1`.

## The two pipelined-multiplier schedules

**`fir4_ir6_pm`** (rate = latency = 6, 2 multipliers, 1 adder) finishes one sample
before it takes the next:

    clock 1: MultA N5, MultB N4, input X      clock 4: N7 = r1 + r2; N3, N2 saved
    clock 2: MultA N3, MultB N2               clock 5: N6 = r1 + r3
    clock 3: N5, N4 saved to r1, r2           clock 6: N8 = r2 + r3 = Y

N7 has to wait until clock 4 because N4 and N5 are not ready before then.

**`fir4_ir2_pm`** (rate 2, latency 6, 2 multipliers, 2 adders) overlaps three
samples. It is again a two-step loop:

    step I    MultA N5(J), MultB N4(J), input X(J);  adder A  N6(J-2)
    step I+1  MultA N3(J), MultB N2(J);              adder A  N8(J-2) = Y,
                                                     adder B  N7(J-1)

Registers pa and pb capture both multiplier outputs every clock. They hold a
sample's N5/N4 after step I and its N3/N2 after step I+1. N7 is formed from them
at I+3 and N6 at I+4. N2 would be overwritten in pb at the end of I+4, so it is
copied to r2 then and read at I+5.

## Interface and timing

The four filters share one port list (`fir4_top` brings out the same ports as
arrays indexed 0..3, in the order `ir1`, `ir2`, `ir2_pm`, `ir6_pm`):

| port        | dir | width        | meaning |
|-------------|-----|--------------|---------|
| `clk`       | in  | 1            | clock |
| `rst_n`     | in  | 1            | asynchronous, active low. Clears the history, coefficients and schedule step. |
| `coef_load` | in  | 1            | copies `coef_i` into a0..a3 at this edge |
| `coef_i`    | in  | 4 x 16 signed| a0..a3 |
| `x_in`      | in  | 16 signed    | sample, read at an edge where `x_take` is high |
| `x_take`    | out | 1            | high once every initiation-rate clocks, starting in the first clock after reset |
| `y_out`     | out | 34 signed    | Y, combinational from the last adder |
| `y_valid`   | out | 1            | high latency-1 clocks after the matching `x_take` |

- **Running:** the filters run freely from reset and cannot stall. The source must
  have a sample ready whenever `x_take` is high.
- **Output timing:** a sample's result is on `y_out` in the latency-th clock of its
  computation, counting its `x_take` clock as the first. In that clock `y_valid`
  is high, and the result is meant to be captured at the clock's closing edge.
- **Start-up:** the history starts at zero, so the first outputs are those of a
  filter that has seen only zeros.
- **Changing coefficients:** change them only when no nonzero sample is in flight,
  for example after a few zero samples. Otherwise one output mixes old and new
  coefficients.

Widths are set in `fir4_pkg`: 16-bit signed samples and coefficients, 32-bit
products, 34-bit output. That is full precision, so nothing is rounded or wraps.

## How far this follows the source schedules, and where it does not

These parts follow the worked-out schedules:
- the filter graph
- the latencies and initiation rates
- the unit counts
- which operation runs in which clock and (where given) on which unit
- the complete register transfer list of the rate-2 design

These parts are this design's own choices:
- **Not given:** word widths, reset, the accept/valid timing, coefficient loading,
  and the register allocation of `fir4_ir1`, `fir4_ir6_pm` and `fir4_ir2_pm`.
- **Product assignment:** which multiplier computes which product in `fir4_ir2`.
- **Multiplier split:** how `mult_pipe` divides the multiply into stages.
- **Two readings of the schedules:**
  - N5 is always X@3 * a3, as in the filter graph, including in the rate-2
    transfer list.
  - In the rate-2 pipelined schedule, multiplier A computes N3 and multiplier B
    computes N2 in every I+1 step.
- **Reading of "3 clks":** "pipelined by 2 stages" and "3 clks" per multiply are
  taken together to mean two internal flip-flop ranks plus the datapath register
  that saves the product.

Not built: the rate-4 reference version, and any register-count claim for rate 1,
which is left open.

## Files

`rtl/`:
- `fir4_pkg.sv`: widths and types
- `mult_pipe.sv`: pipelined multiplier
- `coef_regs.sv`: coefficient registers
- `sched_ctrl.sv`: step counter, `x_take`, `y_valid`
- `fir4_ir2.sv`, `fir4_ir1.sv`, `fir4_ir6_pm.sv`, `fir4_ir2_pm.sv`: the four
  filters
- `fir4_top.sv`: all four side by side

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each one
compares against values it computes itself and prints
`TB_RESULT checks=N failures=M`. The FIR testbenches also check:
- accept spacing and latency, clock by clock;
- extreme values (-32768, 32767);
- a coefficient reload mid-stream.

`tb_fir4_top` runs all four designs at their default sizes on the same stream. It
also counts, per design, the clocks with more than one sample in flight and the
peak number in flight (4, 2, 3 and 1). It fails if the overlap is missing where it
should occur, or present in the rate-6 design.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/fir4_pkg.sv tb/tb_fir4_top.sv \
              --top-module tb_fir4_top -o sim && ./obj_dir/sim

Replace `tb_fir4_top` with any other testbench name. Every run takes well under a
second.

To try another schedule, copy one of the filter modules:
- keep its `sched_ctrl` instance with the new `II` and `LAT`;
- rewrite the step-indexed multiplexers and register transfers;
- add it to `fir4_top` and to the `IIS`/`LATS` tables of `tb_fir4_top`.
