# Odd-ratio clock divider with a 50% duty cycle

A counter clocked on one edge of its input can only divide by an odd number N
with an uneven output. Its output is high for (N+1)/2 input cycles and low for
(N-1)/2, which is 60% for N = 5. The usual fixes use latches or flip-flops that
work on both clock edges. This design keeps an ordinary rising-edge counter and
adds a very small *duty cycle trimming* stage behind it. In silicon that stage is
two pass transistors and a pair of cross-coupled inverters. Its rule fits on one
line:

> if `clk_in != x` then `clk_out = clk_in`, otherwise `clk_out` holds.

Here `x` is the uneven counter output. The result is a clock of period
N·T whose high time is exactly N/2·T, where T is the period of `clk_in`.

The RTL follows a published divide-by-5 circuit. That circuit has three
flip-flops and one NAND gate, followed by the trimming stage. It was designed as
the clock divider of a 1:10 clock-and-data-recovery / demultiplexer receiver in
0.13 µm CMOS. The division ratio is a parameter here (`N`, default 5, any odd
N ≥ 3).

## Structure

```
              odd_freq_divider
 clk_in ──┬──────────────────────────────┬───────────────┐
          │   odd_div_counter            │ duty_cycle_trim
          │  ┌────┐  ┌────┐  ┌────┐      │  (latch, enable = clk_in ^ x,
          └─►│DFF1│─►│DFF2│─►│DFF3│──x───┼─► data = x)  ──y──► INV ──► clk_out
             └────┘  └────┘  └────┘      │
               ▲        │       │
               └─ NAND ◄┴───────┘
```

| module | file | what it is |
|---|---|---|
| `odd_freq_divider` | `rtl/odd_freq_divider.sv` | top: counter followed by the trimming stage |
| `odd_div_counter` | `rtl/odd_div_counter.sv` | rising-edge odd counter, output `x` |
| `duty_cycle_trim` | `rtl/duty_cycle_trim.sv` | trimming stage, outputs `y` and `clk_out` |

Ports of the top:

| port | dir | meaning |
|---|---|---|
| `clk_in` | in | input clock |
| `rst_n` | in | asynchronous active-low reset of the counter (an addition, see below) |
| `x` | out | counter output: period N·T, high (N+1)/2·T |
| `y` | out | storage node of the trimming stage, always `~clk_out` |
| `clk_out` | out | divided clock: period N·T, high N/2·T |

## The odd counter

The counter has K = (N+1)/2 flip-flops in a shift chain. The first one loads
the NAND of the last two. A twisted-ring counter of K stages, which feeds back
the inverse of the last stage, would divide by 2K. The NAND loads a 1 into
the first stage one cycle early, so one state is skipped and the cycle is 2K−1 = N states long.
For N = 5, with the state written as DFF1 DFF2 DFF3 and `x` = DFF3:

```
after rising edge:  1    2    3    4    5  | 6    7    8 ...
state            : 100  110  111  011  001 | 100  110  111
x                :  0    0    1    1    1  |  0    0    1
```

All 8 states of the 3-bit chain run into this cycle within two clocks, so the
published circuit needs no reset. For longer chains this no longer holds: at
N = 9 and N = 15 the generalised chain has states that never reach the main
cycle. The reset `rst_n` was added for this reason. It clears every stage, and
`x` then goes high on the K-th rising edge.

## The trimming stage

The trimming stage is the part that needs the most thought. Its truth table:

| `clk_in` | `x` | `clk_out` |
|---|---|---|
| 0 | 0 | hold |
| 0 | 1 | 0 |
| 1 | 0 | 1 |
| 1 | 1 | hold |

In the transistor circuit, an NMOS and a PMOS pass device both connect `x` to
node `y`, and both have their gates on `clk_in`. The NMOS conducts well only when
`clk_in` = 1 and `x` = 0. The PMOS conducts well only when `clk_in` = 0 and `x` = 1.
In the other two cases, `y` is held by a strong inverter (driving `clk_out`) and a
deliberately weak feedback inverter. In RTL this is a level-sensitive latch on
`y`, with enable `clk_in ^ x` and data `x`, and `clk_out = ~y`.

**Why the output is 50%.** The counter changes `x` only just after rising edges
of `clk_in`. N = 5, one output period, half-cycle by half-cycle:

| input cycle | half | `clk_in` | `x` | row | `clk_out` |
|---|---|---|---|---|---|
| 6 | high | 1 | 0 | copy | 1 ← rises with the fall of `x` |
| 6 | low  | 0 | 0 | hold | 1 |
| 7 | high | 1 | 0 | copy | 1 |
| 7 | low  | 0 | 0 | hold | 1 |
| 8 | high | 1 | 1 | hold | 1 ← `x` has risen, but the output holds |
| 8 | low  | 0 | 1 | copy | 0 ← falls with the falling edge of `clk_in` |
| 9 | high | 1 | 1 | hold | 0 |
| 9 | low  | 0 | 1 | copy | 0 |
| 10 | high | 1 | 1 | hold | 0 |
| 10 | low  | 0 | 1 | copy | 0 |

The output rises with a rising edge of `clk_in`, because that is when `x` falls. It
falls with the first falling edge of `clk_in` after `x` has risen again. `x`
is low for (N−1)/2 cycles, so `clk_out` is high for (N−1)/2 cycles plus one
high phase of `clk_in`:

    t_high(clk_out) = (N−1)/2 · T + t_high(clk_in)

With a 50% input this is N/2·T exactly. If the input is not 50%, its error
reaches the output divided by N. A 60% input gives (2·10 + 6)/50 = 52% at
N = 5.

After a reset, `x` is low, so `clk_out` goes high on the first rising edge of
`clk_in` and stays there. Counted from the first rising edge after reset is
released, the first high phase is already N/2·T long.

## Where silicon differs from this RTL

The RTL has no delays, so its output is exactly 50% at any frequency. The real
circuit loses accuracy in three ways, and the testbench
`tb/tb_odd_freq_divider_delays.sv` models the main one:

* **Clock-to-Q delay of the last flip-flop.** `x` changes t_CQ after the
  rising edge of `clk_in`, so `clk_out` rises t_CQ late. Its falling edge comes
  straight from `clk_in` and is not late. The high time becomes N/2·T − t_CQ, and
  the duty cycle falls by t_CQ/(N·T) as the frequency rises. Circuit simulations of
  the published design report 49.5% at 1 GHz for N = 5, which corresponds to
  t_CQ ≈ 25 ps. The testbench uses that value and shows 49.99% at 20 MHz and
  48.5% at 3 GHz.
* **Compensating buffer.** A delay buffer between `clk_in` and the trimming
  stage delays the falling edge too, and cancels the error. It is not part of
  the RTL. With no delays in the RTL, it would be a wire. The delay testbench
  models it as a 24 ps delay and gets 49.94% at 3 GHz.
* **Mismatch of the two pass devices, and ripple on `y`.** The devices are sized
  so that `clk_in`→`y` and `x`→`y` have equal delay: W/L = 0.5/0.13 µm for the
  NMOS and 1/0.13 µm for the PMOS. The feedback inverter must be much weaker than
  the devices that overwrite it. These are analog properties and have no RTL
  counterpart.

The frequency limit of the whole divider is set by the counter, through the
flip-flop and NAND delays, and not by the trimming stage. For a standard-cell
implementation, note three things:

* The latch is intended.
* Its enable is derived from its own data input, as in the transistor circuit.
* Synthesis and static timing tools will treat `clk_in ^ x` as a generated clock.

A glitch-free result needs the `clk_in` path to the latch to arrive no later
than `x`. This is the same condition the buffer above must meet.

## Departures from the published circuit

* `N` is a parameter. The published circuit is the N = 5 case. Longer chains of
  the same form give the other odd ratios, which is a generalisation made here.
* `rst_n` is added. The published circuit has no reset.
* The trimming stage is a logic latch, with no transistor sizes or delays.
* `y` and `x` are brought out as ports, to observe them.

## Verification

Every testbench checks itself and ends with a line `TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_odd_div_counter` | `x` against a closed formula after reset for N = 5, 3, 7, 9; run lengths (N+1)/2 high and (N−1)/2 low; an N = 5 instance without reset settles into the 3/2 cycle from a random start |
| `tb_duty_cycle_trim` | all ordered pairs of input combinations, then 2000 random ones, against the truth table; `y == ~clk_out`; holding of both a 0 and a 1 |
| `tb_odd_freq_divider` | top at N = 5, no parameter overridden: `clk_out` high/low 25/25 ns at a 10 ns input period; period 50 ns; edges aligned to the right `clk_in` edges; `x` at 30/20 ns; 60% and 40% inputs give 26/24 and 24/26 ns; reset in mid-run; the truth table after every input edge; counts that every row of the table, both output edges, both duty corrections and the reset actually happened |
| `tb_odd_freq_divider_ratios` | N = 3, 7, 9, 11, 15: period N·T and high time (N−1)/2·T + t_high(clk_in) at 50% and 60% input |
| `tb_odd_freq_divider_delays` | duty cycle from 20 MHz to 3 GHz with a 25 ps clock-to-Q delay, with and without the compensating buffer, to the picosecond |

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv \
    --top-module tb_odd_freq_divider tb/tb_odd_freq_divider.sv
./obj_dir/Vtb_odd_freq_divider
```

Replace the module and file name for the other testbenches. All files carry
`` `timescale 1ns / 1ps``. The simulator is two-state. Before its reset the
counter starts in whatever state the simulator gives it, which
`tb_odd_div_counter` uses on purpose.

## Changing it

* Another odd ratio: set `N` on `odd_freq_divider` (or on `odd_div_counter`).
  Even values and values below 3 stop elaboration with an error.
* A different counter can drive `duty_cycle_trim`, provided its output is high
  for one cycle more than it is low and changes only on rising edges of
  `clk_in`.
