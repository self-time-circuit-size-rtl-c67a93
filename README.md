# Self-timed dual-rail domino adder stage

A clocked adder must budget its clock for the slowest possible carry chain.
A self-timed adder instead signals when *this particular* addition is done.
So its throughput follows the average completion time over the data it
actually sees. This in turn means the sizes of the transistors on each path
should depend on how often that path is used: widen the paths the input
distribution uses most, shrink the ones it rarely uses. The completion time
then falls where it counts, and so do area and switched energy.

This RTL gives the logic of that design:

- a one-bit full adder in dual-rail domino logic with a completion signal;
- an N-bit ripple-carry adder (default N = 4) built from those cells, with
  word-level completion detection;
- an enabled input latch and a four-phase handshake controller, which
  together make one self-timed pipeline stage;
- an IEEE-754 single-precision floating-point adder, standing alongside as
  the arithmetic unit the ripple-carry adder is meant for.

The gate delays in the simulation come from a logical-effort gate library
(TSMC 0.18 µm, τ = 17.52 ps). The sizing method itself optimises
transistor widths, which is electrical rather than logical. It therefore
appears here only through the delays, and only as one fixed delay per gate
type.

## Dual-rail domino encoding

Every logical bit travels on two wires, `t` (true) and `f` (false), in the
packed struct `st_pkg::dr_t`:

| `{t,f}` | meaning |
|---|---|
| `00` | empty (precharge, or not yet evaluated) |
| `10` | valid 1 |
| `01` | valid 0 |
| `11` | illegal, flagged by an assertion in the top |

Each gate is a domino gate: an n-type dynamic stage followed by a high-skew
static inverter, clocked by `phi`.

- With `phi = 0` (precharge), every output is 0.
- With `phi = 1` (evaluate), an output can only rise, and it rises once the
  gate's function of its inputs is 1.

Because every input also comes from a domino gate or from the gated latch,
all signals are 0 at the start of evaluation. Exactly one rail of each pair
then rises.

In RTL a gate therefore reduces to `y = phi & f(inputs)`, written as the
dynamic node `node = ~(phi & f)` followed by the output inverter.
`rtl/dyn_and2.sv`, `dyn_or2.sv`, `dyn_ao21.sv` and `dyn_sum.sv` each carry
a `DLY_PS` parameter: a simulation-only delay from the input to `y`.
Synthesis ignores it. The keeper and the skewed inverter only matter
electrically, so they are not modelled beyond the inverter itself.

## The one-bit adder and its completion signal

`st_full_adder` uses nine domino gates. Each rail is built the same way,
the false rail mirroring the true rail on the complemented inputs:

```
gen_t  = a.t & b.t          gen_f  = a.f & b.f          (AND)
prop_t = a.t | b.t          prop_f = a.f | b.f          (OR)
cout.t = cin.t & prop_t | gen_t
cout.f = cin.f & prop_f | gen_f                          (AND-OR, AO21)
s.t    = (a.t|b.t|cin.t) & cout.f | a.t & b.t & cin.t
s.f    = (a.f|b.f|cin.f) & cout.t | a.f & b.f & cin.f    (sum gate)
done   = cout.t | cout.f                                  (OR)
```

Propagate uses OR rather than XOR, because domino logic must be monotonic.
It gives the same carry.

The sum gate reads the *opposite* carry rail. "At least one input is 1 and
the carry is 0" means exactly one input is 1; the `abc` term covers three
ones.

The carry shortcut is the heart of the data dependence. When `a == b`, the
carry is known from the AND gate alone (the kill and generate cases), so it
does not wait for `cin`. When `a != b`, the carry must wait for `cin`.

The cell's `done` is derived from the carry rails. The sum gate sits one
gate after the carry, so `done` rises before the sum is valid. For this
reason the N-bit adder `st_rca` forms word completion as the AND over
every bit of `done_i & (s_i.t | s_i.f)`. It also gives `idle`, which is 1
once every result rail is back to 0 after precharge.

## Timing model and what it predicts

Gate delays (in `st_pkg`) are τ·(g + p), using the tabulated logical effort
g and parasitic delay p of each gate. The electrical effort h is taken as 1,
because the optimised fan-out of each gate is not tabulated.

| gate | delay |
|---|---|
| AND (NAND + inverter) | 100 ps |
| OR (NOR + inverter) | 108 ps |
| AO21 carry | 117 ps |
| sum | 136 ps |
| input latch (assumed equal to AND) | 100 ps |

Only one delay per gate is modelled: that of the slowest input.

The measured completion times from the rise of `start` are given below,
checked by the testbenches against a path model.

- One-bit adder: 425 ps for inputs 000 and 111, 453 ps for 001 and 110,
  461 ps for the rest.
- Four-bit adder, from the operands: 353 ps when no bit propagates, up to
  712 ps when the carry ripples through all four bits.

`tb_st_workloads` draws inputs {A0,B0,C0} from the binomial distribution
P(k) = C(7,k)/128 that the sizing method is demonstrated on. With equal
sizing it measures a mean of about 459 ps (26.2 τ), against 450 ps for
uniform inputs. The binomial distribution weights the slow middle words
most heavily. That is exactly the situation in which a distribution-aware
sizing speeds up the paths those words use. The original design reports a
13.4 % speed-up and 16.8 % less energy for this distribution after
resizing. Those results cannot be reproduced in logic simulation.

## The self-timed stage

`st_adder_top` wires one stage together:

```
 add_in_req/ack ──► hs_ctrl ──► add_out_req/ack
                     │ load  ▲ done, idle
                     ▼ start │
 {cin,b,a} ──► st_input_latch ──dual rail──► st_rca ──► add_sum, add_cout
```

One operation uses the four-phase (return-to-zero) protocol on both
channels:

1. `add_in_req` rises with the operands stable.
2. The controller loads the latch, raises `add_in_ack` and raises `start`.
3. `start` is both the latch's rail enable and the adder's `phi`.
4. When `done` rises, `add_out_req` rises. The result stays valid on
   `add_sum`/`add_cout`.
5. After `add_out_ack` rises, `start` drops and the adder precharges.
6. Once `idle` is 1 and `add_out_ack` has fallen, the next request is
   taken.

`add_in_ack` falls as soon as `add_in_req` falls. This lets the sender
prepare the next operand during evaluation.

`hs_ctrl` is a four-state machine (IDLE, EVAL, OUT, PRECH) that samples
the handshake on a free-running `clk`. It is not an asynchronous C-element
controller. Completion is therefore seen within one `clk` period, and the
evaluation time shows up as a number of cycles in EVAL. With the 20 ps
clock of the top-level testbench this is 23 to 41 cycles, depending on the
operands.

Assertions check three things:

- the handshake rules (request held until acknowledged, and so on);
- that no rail pair is ever `11`;
- that no rail falls while `start` is high.

## Floating-point adder

`fp_adder` (combinational, binary32, round to nearest even) works in these
steps:

1. Classify the operands.
2. Order them by magnitude.
3. Align the smaller one with guard, round and sticky bits. The shift
   saturates at 26.
4. Add or subtract in 28 bits.
5. Normalise by leading-zero count, then round.

Special cases:

- A NaN operand, or ∞ − ∞, gives quiet NaN `7FC00000` and sets `invalid`.
- An ∞ operand passes through.
- A zero operand returns the other operand.
- Exact cancellation gives +0.
- Overflow gives ±∞ and sets `overflow`.

Flags (`fpa_pkg::fpa_flags_t`): `invalid`, `infinite`, `overflow`,
`underflow`, `x_subnormal`, `y_subnormal`.

Results below the normal range are flushed to signed zero, with
`underflow` set. Subnormal results are not produced.

## Departures and own choices

- **Clocked handshake controller.** The original stage is asynchronous; the
  sampling state machine keeps the logic synthesizable with standard tools.
- **Word completion includes the sum rails.** The per-bit completion signal
  from the carry alone would report completion about 28 ps before the sum
  is valid.
- **Delays.** h = 1, one delay per gate type, and an assumed latch delay.
  The numbers shape simulation only. The actual per-path sizes (the
  tabulated capacitances per distribution) have no RTL counterpart.
- **Input latch.** Built as flip-flops written on `load`, with each rail
  AND-ed with `start`.
- **Floating-point adder.** Orders the operands by full magnitude, so it
  never negates the significand sum, and flushes results below the normal
  range to zero. Flags are bits.
- **One stage.** The top holds a single stage. Stages chain by connecting
  one stage's output channel to the next stage's input channel.

## Files

| file | contents |
|---|---|
| `rtl/st_pkg.sv` | `dr_t`, dual-rail helpers, gate delays |
| `rtl/fpa_pkg.sv` | FP flag struct, quiet NaN |
| `rtl/dyn_*.sv` | domino AND, OR, AO21, sum gates |
| `rtl/st_full_adder.sv` | one-bit dual-rail adder |
| `rtl/st_rca.sv` | N-bit ripple-carry adder, `done`/`idle` |
| `rtl/st_input_latch.sv` | operand latch, dual-rail output gated by `start` |
| `rtl/hs_ctrl.sv` | four-phase stage controller |
| `rtl/fp_adder.sv` | binary32 adder |
| `rtl/st_adder_top.sv` | top: adder stage + FP adder |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_st_workloads.sv` | completion time under input distributions |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog. `tb_st_adder_top` runs the top with its default parameters
through 2000 operations. It checks the results, the evaluation cycle counts
and the handshake. It counts every mechanism: short and full-length
carries, output stalls, input requests while busy, and precharge waits. It
also adds directed FP cases, among them ∞ − ∞ and overflow.

## Simulating

With Verilator 5 (packages first; `--timing` is needed for the gate
delays):

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl +libext+.sv rtl/st_pkg.sv rtl/fpa_pkg.sv \
  tb/tb_st_adder_top.sv --top-module tb_st_adder_top -Mdir obj
./obj/Vtb_st_adder_top
```

Replace the testbench and top-module names to run another testbench. The
adder width is the parameter `N` of `st_adder_top` and `st_rca`. The gate
delays are the `D_*_PS` constants in `st_pkg`, or the `DLY_PS` parameter of
each gate.
