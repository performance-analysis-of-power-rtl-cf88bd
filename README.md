# Clock-gated ripple-carry adder

An 8-bit adder that only spends clock power when it has work to do. A
small control unit watches an external request line and produces a clock
enable; an AND gate combines that enable with the system clock; the gated
clock loads the adder's operand register. In a cycle with no request the
gated clock stays low, the operand register keeps its contents, and since
the adder's inputs do not move, nothing inside the adder switches either.
The result simply stays on the outputs.

The arithmetic is a plain ripple-carry adder: eight full-adder cells in a
chain, the carry of each feeding the next. It is the smallest and simplest
adder structure, which suits a design whose point is the power technique
wrapped around it rather than the speed of the addition.

## Block diagram

```
            add_req                        a, b, cin
               |                               |
               v                               v
        +--------------+  clk_en  +-------+  +------------------+
clk -+->| control_unit |--------->| clock |  | operand register |
     |  | state reg on |          | gate  |  |  (a_q, b_q,      |
     |  | falling edge |          | clk&en|->|   cin_q), on gclk|
     |  +--------------+          +-------+  +------------------+
     |        |                       ^              |
     |        v                       |              v
     |   result_valid                 |    +--------------------+
     +--------------------------------+    | ripple_carry_adder |
                                           |  WIDTH full adders |
                                           +--------------------+
                                                     |
                                                     v
                                                 sum, cout
```

| Module | File | Role |
|---|---|---|
| `clock_gated_adder` | `rtl/clock_gated_adder.sv` | top level, operand register, wiring |
| `control_unit` | `rtl/control_unit.sv` | idle/active state, glitch-free clock enable, `result_valid` |
| `clock_gate` | `rtl/clock_gate.sv` | AND gate `gclk = clk & en`, with a glitch assertion |
| `ripple_carry_adder` | `rtl/ripple_carry_adder.sv` | `WIDTH`-stage carry chain |
| `full_adder` | `rtl/full_adder.sv` | one stage: `s = a^b^ci`, `co = ab | ci(a^b)` |
| `cg_adder_pkg` | `rtl/cg_adder_pkg.sv` | `DATA_W = 8`, state type `cg_state_e` |

## Making an AND gate safe as a clock gate

This is the one subtle part of the design. An AND gate used as a clock
gate produces a clean clock only if its enable never changes while the
clock is high. If the enable rose half way through a high phase, the gated
clock would rise in the middle of the cycle, giving a short pulse the
flip-flops might or might not see; if it fell half way, the pulse would be
cut short. Either way the gated clock glitches.

The control unit avoids this by registering its state on the **falling**
edge of `clk`. `clk_en` therefore only changes at the start of a low phase
and is steady for the whole of the high phase that follows. Seen from the
AND gate, each rising edge of `clk` is either passed whole or blocked
whole. The pair (falling-edge register, AND gate) behaves like the
latch-plus-AND clock-gating cell found in standard-cell libraries, with the
register taking the role of the latch.

Two things follow for whoever uses or changes this block:

* `add_req` must be settled by the falling edge of the cycle in which it
  is meant to act, i.e. within the first half of the cycle. Driving it from
  logic clocked on the rising edge of the same `clk` gives half a cycle for
  that path.
* `clock_gate` holds an immediate assertion that fires if `en` changes
  while `clk` is high, and the top asserts that the gated clock never
  pulses in the idle state. Both stay silent in synthesis.

In a real implementation the AND gate should be replaced by, or mapped
onto, a library integrated clock-gating cell, and the gated clock net
needs clock-tree treatment. The RTL keeps the gate visible as a separate
module so that such a substitution touches one file.

## Timing of an operation

```
cycle          |   n   |  n+1  |  n+2  |
clk            _/‾‾‾\___/‾‾‾\___/‾‾‾\___/
add_req        __/‾‾‾‾‾‾\_______________
a, b, cin      --< A,B,C >--------------
clk_en         ______/‾‾‾‾‾‾‾\__________   (moves on falling edges only)
gclk           _________/‾‾‾\___________   (one pulse, at the edge ending n)
sum, cout      ---------< A+B+C held ...
result_valid   _________/‾‾‾‾‾‾‾\_______
```

* Cycle *n*: `add_req`, `a`, `b`, `cin` are driven. `clk_en` goes high at
  the falling edge.
* Rising edge at the end of *n*: the gated clock pulses and the operand
  register takes `a`, `b`, `cin`.
* Cycle *n+1*: after the ripple delay `sum` and `cout` show the result,
  and `result_valid` is high.
* Idle cycles: no gated pulse, `result_valid` low, `sum`/`cout` unchanged.

Operations can be issued every cycle (back to back); the latency is one
cycle. `rst_n` is an asynchronous active-low reset that clears the
operand register (so `sum` and `cout` read 0), returns the control unit to
`CG_IDLE` and clears `result_valid`. Assert it during a low phase of
`clk`: like any change of the enable, the reset pulls `clk_en` low at once.

## Ports of `clock_gated_adder`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | free-running clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `add_req` | in | 1 | take `a`, `b`, `cin` at the next rising edge |
| `a`, `b` | in | `WIDTH` | operands |
| `cin` | in | 1 | carry in |
| `sum` | out | `WIDTH` | sum of the last accepted operands |
| `cout` | out | 1 | carry out of the last accepted operands |
| `clk_en` | out | 1 | clock enable, for observation |
| `gclk` | out | 1 | gated clock, for observation |
| `result_valid` | out | 1 | `sum`/`cout` were updated at the last rising edge |

`WIDTH` (default 8) is the only parameter. The ripple-carry structure
scales to any width; the carry path grows by one full-adder delay per
bit, which is what limits the clock frequency of wide versions.

## What is taken from the original design and what was chosen here

Taken from the original design: the three parts and their roles (a
ripple-carry adder of two 8-bit operands with carry in and carry out, an
AND-based clock gate whose enable decides whether the clock reaches the
adder, and a control unit that derives the enable from external inputs and
the idle/active state, without glitches), the 8-bit width, and the aim of
scaling the same architecture to wider adders.

Chosen here, because the original description does not go that far:

* The external input is one request line, `add_req`, one operation per
  cycle.
* Glitch freedom comes from a falling-edge state register in the control
  unit.
* The flip-flops that the gate controls are an operand register in front
  of the adder, so an idle cycle leaves both register and adder quiet.
  This fixes the latency at one cycle.
* `result_valid`, the reset style and the reset values (everything zero,
  idle).
* The full-adder cell equations, which are the standard ones.

The power, area and timing comparison against an ungated adder belongs to
synthesis and power-analysis tools and is not part of the RTL. The
end-to-end testbench prints how many rising clock edges reached the
operand register against how many the free-running clock had, which is
the activity that gating saves.

## Verification

Each testbench is self-checking, ends with a line
`TB_RESULT checks=N failures=M`, and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/tb_ripple_carry_adder.sv` | all 2^17 inputs of the 8-bit adder against integer addition; a 16-bit instance with random and carry-chain corner cases |
| `tb/tb_clock_gate.sv` | `gclk == clk & en` in both clock phases, one gated pulse per enabled cycle and none otherwise |
| `tb/tb_control_unit.sv` | `clk_en`/state equal the request of the current cycle at the rising edge, `clk_en` never changes while `clk` is high, `result_valid` one cycle later, asynchronous reset in mid-run |
| `tb/tb_clock_gated_adder.sv` | the whole design at its default width: 2000 cycles of random requests and idle gaps, results one cycle after each request, outputs held while idle, one gated pulse per request; counts and requires active and idle cycles, back-to-back operations, carry out, a carry through all 8 stages, carry in, and a reset in mid-run |
| `tb/tb_adder_scaling.sv` (with `tb/scaling_lane.sv`) | 16-, 32- and 64-bit instances of the whole design under the same kind of random traffic, including full-length carry chains |

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cg_adder_pkg.sv tb/tb_clock_gated_adder.sv \
    --top-module tb_clock_gated_adder -o sim
./obj_dir/sim
```

Swap the testbench file and `--top-module` for the others; all run in
well under a second. Time in the testbenches is in the simulator's default
unit, with a clock period of 10 units.
