# Second-order IIR filter on one pipelined multiplier

A second-order IIR filter needs four multiplications and four additions per
sample:

    u_i = x_i - a*u_{i-1} - c*u_{i-2}
    y_i = u_i + b*u_{i-1} + d*u_{i-2}

    H(z) = (1 + b z^-1 + d z^-2) / (1 + a z^-1 + c z^-2)

Mapped one operator to one unit, the filter takes a sample every clock cycle.
Its clock period is then at least a multiplier plus two adders, and it needs
four multipliers. This design takes a new sample every **L = 4** cycles
instead. All four products share **one two-stage pipelined multiplier**, and
all four sums share **one adder**. Each register-to-register path holds at
most half a multiplier or one adder, so the clock period is
max(t_M/2, t_A).

The design is the worked example of "Scheduling of synchronous dataflow
graphs for datapath synthesis". That paper treats the filter as a synchronous
dataflow graph (SDF). It places every operator at a point (unit type, unit
number, clock cycle) in a three-dimensional space. Rules on those points then
give the schedule and the datapath in one step:

- two operators on the same unit must differ in cycle modulo L;
- no operator starts before its operands are ready;
- the delays around every loop of the graph must add up.

The period, the unit delays (adder 1 cycle, multiplier 2 cycles), the single
multiplier and the resulting clock period are taken from that example. The
cycle-by-cycle schedule and the datapath below were worked out again for this
RTL with the same rules. The paper's own operator placement and structure
drawing could not be reproduced in detail. See "Departures" below.

## The schedule

Everything hinges on one table. Each iteration i (one input sample) runs its
operations at fixed cycles n, counted from the start of its period:

| n | multiplier issues | adder computes (result in accumulator at n+1) | registers loaded at end of n |
|---|-------------------|-----------------------------------------------|------------------------------|
| 0 | c * u_{i-2}       | –                                             | –                            |
| 1 | a * u_{i-1}       | –                                             | x ← x_i                      |
| 2 | b * u_{i-1}       | s1 = x_i − c*u_{i-2}                          | –                            |
| 3 | d * u_{i-2}       | u_i = s1 − a*u_{i-1}                          | u_{i-1} ← u_i, u_{i-2} ← u_{i-1} |
| 4 | –                 | s2 = u_i + b*u_{i-1}                          | –                            |
| 5 | –                 | y_i = s2 + d*u_{i-2}                          | y ← y_i                      |

A product issued in cycle n reaches the adder in cycle n+2. This gives the
offset of two between the multiplier column and the adder column.

The iteration spans six cycles, but a new one starts every L = 4. So cycles 4
and 5 of iteration i are cycles 0 and 1 of iteration i+1. Folded onto the
period, the adder runs, in the four phases:

| phase | multiplier (iteration i+1) | adder |
|-------|----------------------------|-------|
| 0 | c * u_{i-1} | s2 of iteration i |
| 1 | a * u_i     | y of iteration i; x_{i+1} taken |
| 2 | b * u_i     | s1 of iteration i+1 |
| 3 | d * u_{i-1} | u_{i+1} of iteration i+1 |

Both units are busy in every cycle. This only works because of the order of
the multiplications:

- **c·u_{i-2} goes first.** It does not depend on the newest state, so it
  can be issued while the previous iteration is still finishing.
- **a·u_{i-1} goes second.** It closes the recursion: u_{i-1} is written at
  the end of cycle 3 of the previous iteration, and a·u_{i-1} is issued
  in cycle 1 of this one. The path u → a·u → u_i takes 2 + 1 = 3 cycles,
  which fits in the period with one cycle to spare. The period itself is
  bounded by the four products that share one multiplier.
- **b and d come last.** They read u_{i-1} and u_{i-2} in cycles 2 and 3,
  before the state registers shift at the end of cycle 3.

For L > 4 (a parameter), the same table is used and cycles 4 … L−1 of the
multiplier are idle. For L = 5, the output slot (n = 5) falls in phase 0 of
the next period. For L ≥ 6, no iterations overlap.

## Datapath (`iir_datapath`)

- **Multiplier operands:** a 4-input coefficient multiplexor (a, b, c, d) and
  a 2-input data multiplexor (u_{i-1}, u_{i-2}) feed `pipe_mult`.
- **Adder operands:** the first operand is a 2-input multiplexor (the input
  register x, or the accumulator). The second operand is always the product.
  The adder subtracts in cycles 2 and 3 and adds in 4 and 5.
- **Accumulator:** it is the adder's own output register. It carries
  s1 → u_i → s2 → y_i through four consecutive cycles, so no other temporary
  registers are needed.
- **u_{i-1} and u_{i-2}:** these take the adder's unregistered result in
  cycle 3. They take it at the same edge as the accumulator, so the new state
  is ready one cycle later.
- **Output register y:** it takes the adder's result in cycle 5.

That makes 8 multiplexor inputs and 5 data registers (x, u_{i-1}, u_{i-2},
accumulator, y), plus the multiplier's three pipeline registers.

### Pipelined multiplier (`pipe_mult`)

The coefficient is split into a signed upper half and an unsigned lower half.

- **Stage 1** forms and registers the two partial products with the data
  word.
- **Stage 2** aligns and adds them, shifts right by the fraction bits, and
  registers the result.

Each stage holds about half of a full multiplier. A new operand pair can
enter every cycle.

### Adder (`addsub_pu`)

The adder adds or subtracts in one cycle into its output register. It also
brings out the unregistered sum for the state and output registers.

## Control unit (`iir_ctrl`)

The control unit is a modulo-L counter with a decoder. Each cycle it supplies
one registered control word (`iir_pkg::ctrl_t`) with these fields:

- coefficient select;
- multiplier data select;
- adder operand select;
- add/subtract;
- the x, u and y load enables;
- an output-valid flag.

The word for the next phase is decoded one cycle early and registered, so the
control signals come straight from flip-flops.

After reset, the first output slot at L = 4 (phase 1) comes before any sample
has passed through the filter. Its valid flag is held low.

## Interface and timing (`iir2_filter`, the top)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears u_{i-1}, u_{i-2}, pipeline) |
| `coef_a_i` … `coef_d_i` | in | COEF_W | signed fixed point with COEF_FRAC fraction bits; static |
| `x_i` | in | DATA_W | input sample; sampled at the end of the cycle in which `x_take_o` is high |
| `x_take_o` | out | 1 | high for one cycle in every L (phase 1) |
| `y_o` | out | DATA_W | output sample; held until the next |
| `y_valid_o` | out | 1 | one-cycle pulse when `y_o` changes to a new sample |

`y_valid_o` is high exactly 5 cycles after the `x_take_o` cycle of the same
sample. That is 4 clock edges of processing, from cycle 1 to cycle 5 of the
table. Throughput is one sample per L cycles.

Parameters (defaults):

- `L = 4`
- `DATA_W = 16`
- `COEF_W = 16`
- `COEF_FRAC = 14`

With these defaults the coefficients are Q2.14 (range −2 … 2), enough for a
stable second-order denominator. Products are truncated, which rounds toward
minus infinity. All sums wrap in two's complement. There is no saturation.

## Departures and choices

- **Schedule and structure.** The paper presents its own placement of the
  operators, its own delays on the graph's edges and a structure drawing. The
  drawing marks the cycles in which each multiplexor input and register takes
  data. Those details could not be carried over unambiguously. The schedule
  above was derived again under the same rules and unit delays. It keeps the
  paper's period, unit count and critical path. Its exact register and
  multiplexor counts may differ from the paper's structure. The paper only
  states those counts relative to an earlier design: four registers and five
  multiplexor inputs fewer.
- **Own choices.** The paper specifies none of the following:
  - word widths, number format and rounding;
  - the handshake (`x_take_o`, `y_valid_o`);
  - the reset to zero state;
  - the subtract control on the adder;
  - the multiplier's internal split.
- **Other designs.** The paper mentions FFT, DCT and multistage IIR
  processors designed with the same method, but does not describe them. They
  are not included.

## Files

- `rtl/`:
  - `iir_pkg.sv`: control word and coefficient-select types;
  - `pipe_mult.sv`, `addsub_pu.sv`: the two processing units;
  - `iir_datapath.sv`: the datapath;
  - `iir_ctrl.sv`: the control unit;
  - `iir2_filter.sv`: the top.
- `tb/`:
  - `tb_pipe_mult.sv`, `tb_addsub_pu.sv`: exact product and sum checks,
    including latency;
  - `tb_iir_ctrl.sv`: the control word of every cycle against the table,
    at L = 4 and L = 6;
  - `tb_iir_datapath.sv`: random control words against a register-level
    model;
  - `iir_filter_env.sv`: stimulus and scoreboard shared by the filter tests
    (see below);
  - `tb_iir2_filter.sv`: end to end at the default sizes, and counts each
    schedule mechanism;
  - `tb_iir2_filter_periods.sv`: end to end at L = 5 and L = 6.

`iir_filter_env.sv` runs four segments, each started by a reset in mid-run:

1. an impulse response, also compared with the ideal real-valued filter to
   within 8 LSB;
2. a random stable filter;
3. random full-range coefficients, where the arithmetic wraps;
4. a pass-through, with all coefficients zero.

It checks every output bit-exactly against a sample-level model. It also
checks the sample spacing of L cycles and the 5-cycle latency.

`tb_iir2_filter.sv` fails if any of these mechanisms never occurs:

- each coefficient issued to the shared multiplier;
- the adder adding and subtracting;
- the state shift;
- overlapped iterations;
- the start-up output slot withheld;
- a reset in mid-run.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
        rtl/iir_pkg.sv tb/tb_iir2_filter.sv --top-module tb_iir2_filter -Mdir obj
    ./obj/Vtb_iir2_filter

Replace `tb_iir2_filter` with any other testbench name. The simulator is
two-state, and every register that is read is reset.

## Changing it

- **Word format.** `DATA_W`, `COEF_W` and `COEF_FRAC` are parameters of every
  module. The testbenches are written for the defaults (16, 16, 14); their
  models use 64-bit integers, so they extend to DATA_W + COEF_W ≤ 62 once
  their local widths are changed to match.
- **Period.** `L` can be 4 or more. A smaller value stops elaboration with an
  error, because four products cannot share one multiplier in fewer than four
  cycles.
- **A different schedule.** Edit `decode()` in `iir_ctrl.sv` and the table in
  `tb_iir_ctrl.sv`. Keep these rules:
  - the multiplier issues a product two cycles before the adder uses it;
  - u_{i-1} and u_{i-2} are read by b and d before they shift;
  - the accumulator is never overwritten between s1 and y of one iteration.
