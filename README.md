# Two-digit programmable combination lock

A small synchronous design of a door-style combination lock. The combination is
two digits of 2 bits each. The user sets a digit on two code switches and
confirms it with an Enter button. After two digits the lock is either open or in
error. Error stays until Reset. Once open, the lock lets the user program a new
combination. A separate ResetCombo input restores the factory combination,
first digit `2'b11`, second digit `2'b01`.

The design is split so that the state machine never sees the digits themselves:

```
 Code[1:0] ----------->+--------------+  Decode1   +--------------+--> Open
 Enter (as Enable) --->| Lab3Compare  |----------->|   Lab3Lock   |--> Error
 ResetCombo (Reset) -->| digit regs + |  Decode2   |   7-state    |--> LED[7:0]
                  +--->| comparators  |----------->|   Moore FSM  |
                  |    +--------------+            +--------------+
                  |                     Enter, Reset --^    |
                  +------------ Prog1, Prog2 ---------------+--> Prog1, Prog2
```

| File | Contents |
| --- | --- |
| `rtl/lab3_pkg.sv` | digit type, default combination, state enum, LED bit positions |
| `rtl/Lab3Compare.sv` | combination registers and the two equality comparators |
| `rtl/Lab3Lock.sv` | lock controller FSM |
| `rtl/Lab3Top.sv` | top level that connects the two |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Operating the lock

Opening it, then setting a new combination:

1. Set the first digit on `Code` and press Enter.
2. Set the second digit and press Enter. `Open` goes high.
3. Press Enter. `Prog1` goes high.
4. Set the new first digit and press Enter. `Prog2` goes high.
5. Set the new second digit and press Enter. `Open` goes high again with the
   new combination stored, and steps 3 to 5 can repeat.

With a wrong digit, the lock still takes a second digit, whatever its value.
Then `Error` goes high and stays high through any number of Enter presses until
`Reset`. The lock never shows which of the two digits was wrong.

## The controller (`Lab3Lock`)

Seven states. Every transition needs an Enter pulse. Without Enter the state
holds, so the next-state logic tests Enter once, not on every arc.

| State | Output high | Enter & condition | Next state |
| --- | --- | --- | --- |
| INIT | — | Decode1 / !Decode1 | OK1 / BAD1 |
| OK1 | — | Decode2 / !Decode2 | OK2 / BAD2 |
| BAD1 | — | any | BAD2 |
| OK2 | Open | any | PROG1 |
| PROG1 | Prog1 | any | PROG2 |
| PROG2 | Prog2 | any | OK2 |
| BAD2 | Error | any | BAD2 |

`Reset` is synchronous and active high. It sends the FSM to INIT from every
state and wins over Enter. It does not touch the stored combination.

Two assertions are built in. At most one of `Open`, `Error`, `Prog1` and
`Prog2` is high. Once `Error` is high it stays high until Reset.

`LED[6:0]` shows the state one-hot, INIT in bit 0 through PROG2 in bit 6. The
bit positions are in `lab3_pkg`. `LED[7]` mirrors Enter, so a press can be seen
on the board.

## Programming the combination (`Lab3Compare`)

This is the least obvious part of the design. The FSM does not store digits.
Instead, its state outputs double as load strobes for the comparator. The
comparator loads the first-digit register on a clock edge where `Prog1` and
`Enable` are both high. The second-digit register loads the same way on
`Prog2` and `Enable`. `Enable` is the same Enter pulse the FSM sees.

Take the Enter press in PROG1. On that clock edge the comparator captures
`Code` as the new first digit, and the FSM moves to PROG2. Both act on the same
edge. Because of this there is no extra cycle, and no multiplexer in front of
the FSM.

`Decode1` and `Decode2` compare `Code` with the stored digits combinationally.
The FSM samples them on the edge where Enter is high.

`Reset` on this module is the top's `ResetCombo`. It is synchronous, it loads
`DEFAULT_DIGIT1`/`DEFAULT_DIGIT2`, and it wins over a load in the same cycle.
Nothing else initialises the registers, so assert ResetCombo once after power-up.

## Timing and interface rules

* Everything is clocked on the rising edge of `Clock`. There is no asynchronous
  logic.
* Enter must be one clock cycle long per button press. A held button would step
  the FSM on every cycle. Debouncing and edge detection belong to the board
  wrapper, which is not part of this RTL.
* `Open`, `Error`, `Prog1` and `Prog2` are decoded from the state register.
  They change on the clock edge that samples Enter, so they are visible one
  cycle after the pulse is applied. They never change before that edge.
* `Code` may change freely between presses. It only matters on the edge where
  Enter is high.

## Parameters

`Lab3Top` and `Lab3Compare` take `DIGIT_W` (2), `DEFAULT_DIGIT1` (`2'b11`) and
`DEFAULT_DIGIT2` (`2'b01`). The defaults come from `lab3_pkg`. `DIGIT_W` only
sizes `Code` and the comparator, because the FSM sees only the Decode bits. A
wider digit or a different factory combination therefore needs no change to the
controller. More than two digits would need more states and more digit
registers.

## Where this RTL makes its own choices

The partition and the port lists follow the original design. So do the state
names and their outputs, the default combination and the load conditions. The
following points are choices made for this RTL:

* **PROG2 goes back to OK2.** After a new second digit the lock returns to the
  open state, ready for another reprogramming pass. It does not return to INIT.
  This follows the user sequence above, which loops back to "the lock opens".
* **Synchronous resets.** Both `Reset` and `ResetCombo` are synchronous.
* **Encoding.** The state register is a 3-bit binary enum.
* **LED contents.** The debug LEDs are only loosely specified. They show the
  one-hot state and Enter.
* **Enter is a pulse.** A one-cycle Enter is assumed, not produced here.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs. With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_Lab3Top \
    rtl/lab3_pkg.sv rtl/Lab3Compare.sv rtl/Lab3Lock.sv rtl/Lab3Top.sv tb/tb_Lab3Top.sv
./obj_dir/Vtb_Lab3Top
```

The unit testbenches build the same way, each with the package and its module.

* `tb_Lab3Compare` checks both Decode outputs for every `Code` value after each
  cycle of random Reset, Prog and Enable traffic. It compares them with its own
  copy of the registers. Directed steps cover the defaults, loads that must not
  happen, and Reset beating a load.
* `tb_Lab3Lock` runs directed scenarios, then 10,000 random cycles. It checks
  the FSM against a reference transition table. It checks every output and the
  LEDs before and after each edge, which also checks the one-cycle response.
* `tb_Lab3Top` plays the user at default parameters over 400 random sessions
  (about 3,300 checks). The sessions include right and wrong first and second
  digits, Error held through extra presses, and reprogramming followed by
  attempts with the new combination. They also include Reset mid-attempt,
  Reset from the open state, and ResetCombo. The testbench counts each of these
  and fails if any never occurred.

Each testbench was also run against a deliberately broken copy of its module
and reported failures:

* a wrong second digit accepted;
* a load without Enable;
* the two Decode lines swapped.

A testbench simulates only the RTL. No FPGA board was used.
