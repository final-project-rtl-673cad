# Craps dice game in SystemVerilog

This is a small FPGA game of Craps played with two push buttons, two
7-segment displays and two lights. Two fast counters stand for the dice.
While the player holds the roll button the counters spin at clock speed.
The faces showing at release are as good as random. The logic then applies
the rules of Craps:

* **First roll.** A sum of 7 or 11 wins. A sum of 2, 3 or 12 ("craps") loses.
  Any other sum becomes the *point*.
* **Later rolls.** Rolling the point again wins. Rolling a 7 loses. Anything
  else means roll again.
* After a win or a loss the light stays on until the Reset button starts a
  new game.

The design follows a course project specification for a DE1-SoC board. That
specification splits the game into a **datapath** and a **controller**, with
six named signals between them. It fixes the units of the datapath and the
meaning of every signal. It leaves the controller's states, the counter
details, the widths, the reset scheme and the display coding to the
designer. The choices made here are listed under
[Departures and choices](#departures-and-choices).

## Datapath and controller

```
             roll ──────────────►┌──────────────────────────┐
             sp   ──────────────►│ craps_datapath           │──► die1, die2 ──► seven_seg_decoder x2 ──► hex1_n, hex0_n
 enter ──►┌──────────────────┐   │  dice_counter (die 2)    │
 reset ──►│ craps_controller │   │  dice_counter (die 1)    │
          │                  │◄──│  dice_adder → sum        │
 win  ◄───│                  │   │  test_logic → d7, d711,  │
 lose ◄───│                  │   │               d2312      │
          └──────────────────┘   │  point_register (sp)     │
                                 │  point_comparator → eq   │
                                 └──────────────────────────┘
```

| Signal | Direction | Meaning |
|---|---|---|
| `roll` | controller → datapath | 1 makes the dice counters count |
| `sp` | controller → datapath | 1 stores the current sum in the point register |
| `d7` | datapath → controller | the sum is 7 |
| `d711` | datapath → controller | the sum is 7 or 11 |
| `d2312` | datapath → controller | the sum is 2, 3 or 12 |
| `eq` | datapath → controller | the sum equals the stored point |

The four flags travel as one packed struct, `craps_pkg::dp_status_t`.

### The dice

`dice_counter` counts 1, 2, …, 6, 1, … on each clock edge while enabled.
The two dice are **chained**. The second die is enabled by `roll`. The first
die is enabled by the second die's `wrap` output, which is high when the
second die is enabled and showing 6. The pair therefore steps through all 36
(die1, die2) combinations in turn, like a two-digit base-6 counter. A hold
time that is random compared with the 36-cycle period makes every outcome
equally likely. This chaining is a design choice. The specification only
says that `roll` enables "the counters". Two counters enabled together would
stay locked at the same offset and give only 6 of the 36 outcomes.

The sum is combinational: `dice_adder` adds the two 3-bit faces into a 4-bit
sum (2..12). `test_logic` decodes that sum into the three flags.
`point_comparator` compares it with `point_register`. So all four flags are
valid in the same cycle as the dice values they describe.

### The controller

`craps_controller` is an eight-state machine (`craps_pkg::ctrl_state_t`):

| State | Outputs | Next |
|---|---|---|
| `ST_IDLE` | – | `ST_ROLL1` when `enter` is pressed |
| `ST_ROLL1` | `roll` | `ST_TEST1` when `enter` is released |
| `ST_TEST1` | `sp` if no decision | `d711` → `ST_WIN`; else `d2312` → `ST_LOSE`; else `ST_WAIT` |
| `ST_WAIT` | – | `ST_ROLLN` when `enter` is pressed |
| `ST_ROLLN` | `roll` | `ST_TESTN` when `enter` is released |
| `ST_TESTN` | – | `eq` → `ST_WIN`; else `d7` → `ST_LOSE`; else `ST_WAIT` |
| `ST_WIN` | `win` | stays |
| `ST_LOSE` | `lose` | stays |

`reset_game` sends every state to `ST_IDLE` on the next edge, and it
overrides `sp`. The first roll and later rolls get separate states because
they apply different rules. The controller therefore does not need a
"first roll" flag.

`roll`, `win` and `lose` are Moore outputs. `sp` is a Mealy output of
`ST_TEST1`. It is high for one cycle, and only when the first roll neither
wins nor loses. Two concurrent assertions in the controller check that
`win` and `lose` are never on together and that `sp` occurs only in
`ST_TEST1`.

### Timing of one roll

Counting edges from the one at which `enter` is first seen high:

1. Edge 0: the controller enters the roll state and `roll` goes high.
2. Every following edge with `roll` high steps the dice. This includes the
   edge at which the release is seen.
3. The release edge: the dice stop and the controller enters the test
   state. The displays now show the final faces.
4. The next edge: `win` or `lose` lights, or the game waits for the next
   roll. On a first roll that sets the point, the point register loads at
   this edge.

So the decision appears two clock edges after the release is sampled. The
dice stay frozen until the next press of `enter`. They keep their values
across Reset.

### Displays

`seven_seg_decoder` turns a 4-bit digit into the seven segments
`{g,f,e,d,c,b,a}` (bit 0 = a). The outputs are **active low**, as the
DE1-SoC displays require. Digits 0–9 are decoded and other values blank the
display. `hex1_n` shows the first die and `hex0_n` the second.

## Top-level ports (`craps_top`)

| Port | Width | Meaning |
|---|---|---|
| `clk` | 1 | clock |
| `rst_n` | 1 | asynchronous, active-low power-on reset of every register |
| `enter` | 1 | roll button, active high, debounced, synchronous to `clk` |
| `reset_game` | 1 | new-game button, active high, debounced, synchronous to `clk` |
| `hex1_n`, `hex0_n` | 7 each | active-low segments of the two dice |
| `win`, `lose` | 1 each | lights, active high |

The DE1-SoC `KEY` buttons are active low. A board wrapper must invert them
and bring them into the clock domain. The buttons are assumed to be
debounced already, so no debouncer or synchronizer is included.

## Departures and choices

Taken from the specification: the rules, the datapath units and their
connections, the six interface signals and their meanings, two push buttons,
two 7-segment displays and two lights.

Chosen here, where the specification is silent:

* The second die's wrap-around advances the first die (see [The dice](#the-dice)).
* The controller's state list, and the separate test state after each release.
* Reset starts a new game from **any** state. The specification says Reset
  starts a new game, and that it must be pressed after a win or a loss. It
  does not say what Reset does in the middle of a game.
* A separate power-on reset `rst_n` for all registers. Reset values: both dice
  show 1 and the point is 0.
* Widths: 3 bits per die and 4 bits for the sum and the point.
* Active-low segment outputs and the a..g bit order.

Nothing is scaled down: the design has no sizes beyond the die faces, and
`craps_pkg::FACES` is 6.

## Files

| File | Content |
|---|---|
| `rtl/craps_pkg.sv` | widths, `die_t`, `sum_t`, `dp_status_t`, `ctrl_state_t` |
| `rtl/dice_counter.sv` | 1-to-6 counter with wrap output |
| `rtl/dice_adder.sv` | die + die |
| `rtl/point_register.sv` | point storage, loaded by `sp` |
| `rtl/point_comparator.sv` | `eq` |
| `rtl/test_logic.sv` | `d7`, `d711`, `d2312` |
| `rtl/craps_datapath.sv` | the datapath |
| `rtl/craps_controller.sv` | the game FSM |
| `rtl/seven_seg_decoder.sv` | display decoder |
| `rtl/craps_top.sv` | the whole game |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench checks its block against expected values that it works out
itself. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

* The combinational blocks (`dice_adder`, `point_comparator`, `test_logic`,
  `seven_seg_decoder`) are tested exhaustively. The expected display patterns
  are written as lists of lit segment letters.
* `tb_dice_counter` and `tb_point_register` run random enables and loads
  against a reference model.
* `tb_craps_datapath` runs random `roll` and `sp` for 3000 cycles. Every cycle
  it checks both dice, the sum, the point and all four flags. It also
  requires every one of the 36 dice outcomes to be reached.
* `tb_craps_controller` stands in for the datapath. It plays 400 games with
  chosen sums and checks `roll`, `sp`, `win` and `lose`, including the
  two-edge decision latency.
* `tb_craps_top` plays 500 complete games through the real datapath, with
  random hold times. It reads the dice back from the segment outputs. Each of
  these must happen at least once: first-roll win, craps, point stored, point
  made, seven-out, roll again, Reset in mid-game, and a wrap of the first die.
  In a typical run each one happens dozens to hundreds of times. This
  testbench uses the top with its default configuration.

Every module was also replaced in turn by a copy with one deliberate bug. Its
testbench reported failures each time.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/craps_pkg.sv rtl/*.sv \
    tb/tb_craps_top.sv --top-module tb_craps_top
./obj_dir/Vtb_craps_top
```

Not verified: timing closure or behaviour on the board. There is also no
test of asynchronous button edges, because the buttons are assumed to be
synchronous.
