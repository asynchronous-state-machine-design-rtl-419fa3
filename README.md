# DigilocAsyn: a push-button combination lock with no clock

A two-button combination lock, built as an **asynchronous state machine**.
There is no clock, no flip-flop and no latch. One block of two-level
sum-of-products logic (the size of one small PAL) computes the next state from
the buttons and the present state. Its outputs are wired straight back to its
inputs. The propagation delay of that loop is the only storage: the machine
"holds" a state because the logic keeps producing the same code it is given.

The lock opens after the buttons are worked in the order **B0, B1, B1, B0**.
Each button is pressed and released, with never more than one down at a time.
A wrong press sends it to an error state, which it leaves only when both
buttons are up. Once open it stays open until RESET.

## Interface

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `b0`     | in  | 1 | push button B0, 1 = pressed |
| `b1`     | in  | 1 | push button B1, 1 = pressed |
| `reset`  | in  | 1 | level sensitive, forces INIT while high |
| `unlock` | out | 1 | 1 = bolt open |
| `sreg`   | out | 4 | the four state variables, for observation |

Top module: `digilock_async`. Parameter `T_PD_PS` gives the propagation delay of
each logic output in picoseconds. It has five entries: `sreg[0]`..`sreg[3]`,
then `unlock`. The default is 5 ns each.

**Operating rule (fundamental mode).** Change one input at a time. Change
it only after the machine has settled, which is one or two output delays
after the previous change. The machine is not defined for two inputs changing
together or for a change while it is still switching. Contact bounce is not
handled: the buttons are assumed clean.

## Flow table

An asynchronous machine is described by a flow table rather than a state
diagram. Each column is a combination of inputs. An entry equal to its own
row is **stable**: the machine stays there. Any other entry is a transient
step that the loop takes on its own. The lock's ten states, with their codes
`sreg[3:0]`:

| state | code | 00 | B0 only (10) | both (11) | B1 only (01) | unlock |
|-------|------|----|----|----|----|---|
| INIT  | 0000 | **INIT** | B0P1 | ERR | ERR | 0 |
| ERR   | 1000 | INIT | **ERR** | **ERR** | **ERR** | 0 |
| B0P1  | 0001 | B0R1 | **B0P1** | ERR | ERR | 0 |
| B0R1  | 0011 | **B0R1** | ERR | ERR | B1P1 | 0 |
| B1P1  | 0010 | B1R1 | ERR | ERR | **B1P1** | 0 |
| B1R1  | 0110 | **B1R1** | ERR | ERR | B1P2 | 0 |
| B1P2  | 0111 | B1R2 | ERR | ERR | **B1P2** | 0 |
| B1R2  | 0101 | **B1R2** | B0P2 | ERR | ERR | 0 |
| B0P2  | 0100 | ULK | **B0P2** | ERR | ERR | 0 |
| ULK   | 1100 | **ULK** | **ULK** | **ULK** | **ULK** | 1 |

The names read "button B*x* Pressed / Released, *n*th time". The six codes
not in the table (1001, 1010, 1011, 1101, 1110, 1111) are never stable. Under
every input they lead to ERR (1000), and from ERR, input 00 leads to INIT.
RESET forces 0000 from anywhere.

`unlock` is a Moore output: it is 1 in ULK only.

## State assignment: why these codes

In a clocked machine any state codes work. Here every code the loop passes
through counts. If a transition changes two state variables, one of them
switches first in real hardware, and the loop briefly sees a third code and
acts on it. The codes were chosen so that every step of the opening sequence
changes **exactly one** state variable (0000, 0001, 0011, 0010, 0110, 0111,
0101, 0100, 1100 is a Gray-code walk). The step into ERR cannot be one-bit from
every state. ERR got 1000 so that the step from INIT is one bit. The unused
codes were all given the entry ERR, so that a transition that passes through
one of them still ends in ERR.

## The logic

`digilock_pal_logic` is the two-level logic fitted for these codes:

```
unlock  = s3 s2 /s1 /s0
s0'     = /s3 /s2 /s1 b0 /b1 /r  +  /s3 s2 s1 /b0 b1 /r  +  /s3 s0 /b0 /b1 /r
s1'     = /s3 /s2 s0 /b0 /b1 /r  +  /s3 s1 /b0 b1 /r     +  /s3 s1 /s0 /b0 /r
s2'     = /s3 s1 /s0 /b0 /b1 /r  +  s3 s2 /s1 /s0 /r     +  /s3 s2 /s1 /b1 /r
        + /s3 s2 s1 /b0 /r
/s3'    = /s2 /s1 /s0 /b0 /b1  +  /s3 s0 /b0 /b1  +  /s3 /s1 b0 /b1
        + /s3 s1 /b0  +  r
```

(`/x` is NOT x, `r` is reset, `'` marks the next state.) These equations
reproduce the flow table above for all 64 state/input pairs. `s3` is produced
as its complement, as the fitter chose.

## Where the state lives

`pal_feedback_delay` is a behavioural model of the output delay of the logic
device, and it is what makes the loop a memory. Each output follows its input
after its own delay, `T_PD_PS[i]`. The delay is **inertial**: a change that
reverts before the delay has passed is swallowed, as a real gate output
swallows a pulse shorter than its delay. `digilock_async` puts this model
between the logic outputs and the feedback inputs. It is the only part of
the design that is not synthesizable. In hardware it is the device itself, and
a synthesis tool sees the top as a combinational loop. That loop is intended.

With the default equal delays, all the bits of a transition switch in the
same instant. Every transition of the flow table then takes exactly one delay
(5 ns), and `unlock` follows one delay after the state. This is what a
zero-skew logic simulation shows.

## Races: what the equal-delay view hides

Give the outputs different delays and a multi-bit transition passes through
intermediate codes. Where it settles can then depend on which bit wins.

*Non-critical race, designed for.* Take B0P1 (0001) and press B1 as well. The
target is ERR (1000), two bits away. If `s3` switches first, the loop passes
through 1001, an unused code whose entry is ERR. If `s0` switches first, it
passes through INIT (0000), whose entry under 11 is also ERR. Both orders end
in ERR. `tb_digilock_races` shows both paths.

*Critical races that remain.* Not every ERR transition is protected this way.
The cases below were found by following every possible switching order through
the equations from each stable state, for one legal input change:

| from (stable) | input change | intended | can also end in |
|---|---|---|---|
| B1R2 0101 | press B1 | ERR | **ULK** (bolt opens) |
| B0P2 0100 | press B1 too | ERR | **ULK** |
| B1P2 0111 | press B0 too | ERR | **ULK** |
| B1R1 0110 | press B0 | ERR | B0P1, B0P2, **ULK** |
| B0R1 0011 | press B0 | ERR | B0P1 |

For example, from B1R2 with B1 pressed, three bits must change (0101 to 1000).
If `s0` falls first, the loop is in B0P2 (0100), which under 01 also heads for
1000. If `s3` then rises before `s2` falls, it reaches 1100 (ULK), which is
stable, and a wrong press has opened the lock. `tb_digilock_races` shows this
with delays `s0` 1 ns, `s3` 3 ns, `s2` 5 ns. With `s2` faster than `s3` the same
press ends in ERR. Whether a real device shows these races depends on its
output skew. A device with equal delays on every output does not, and no
simulation with equal delays can reveal them.

The state codes and equations are kept exactly as designed. To remove these
races, add state variables or transient states so that each step into ERR
passes only through codes that lead to ERR. That is a redesign, not done here.

## Files

| file | what it is |
|---|---|
| `rtl/digilock_pkg.sv` | state codes (`state_e`), width, `is_assigned()` |
| `rtl/digilock_pal_logic.sv` | next-state and unlock logic (synthesizable, combinational) |
| `rtl/pal_feedback_delay.sv` | per-output inertial delay (behavioural model) |
| `rtl/digilock_async.sv` | top: logic plus feedback through the delay; asserts that no unused code is ever stable |
| `tb/tb_digilock_pal_logic.sv` | all 16 codes × 4 inputs × reset against the flow table |
| `tb/tb_pal_feedback_delay.sv` | delay value per bit, pulse rejection, restart |
| `tb/tb_digilock_async.sv` | end to end at default parameters: opening, ULK hold, reset, a wrong press from every step, timing of each transition |
| `tb/tb_digilock_races.sv` | four copies with skewed delays: the non-critical race both ways and the critical race to ULK |

## Simulating

Every file sets `timeunit 1ps`. The delay model uses `fork`/`join_any`, so
Verilator needs `--timing`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/digilock_pkg.sv \
    tb/tb_digilock_async.sv --top tb_digilock_async -Mdir obj
./obj/Vtb_digilock_async
```

Replace the testbench name to run the others. Each prints
`TB_RESULT checks=N failures=M` and stops on its own. All four run in well under a second.

## Choices made in this implementation

- **Delay values.** The original design asks only for a few nanoseconds of
  output delay. The default here is 5 ns on every output. The inertial
  behaviour and the separate delay per output are modelling choices.
- **Unused codes under input 00.** The flow table sends the unused codes
  straight to INIT under 00. The fitted equations send them to ERR under
  every input, and ERR then goes to INIT. This RTL follows the equations. The
  end state is the same either way.
- **`unlock` timing.** `unlock` is treated as one more output of the logic
  device, with its own delay. So it changes one delay after the state.
- **`sreg` port.** The state variables are brought out for observation. The
  lock itself needs only `b0`, `b1`, `reset` and `unlock`.
- **Initial value.** The delay model starts its outputs at 0 (INIT). Real
  hardware powers up in an unknown code. Apply `reset` once before use. Every
  testbench does.
