# Record-and-playback position controller for a stepper robot arm

A robot arm joint is turned by a geared stepper motor and watched by a
quadrature encoder. This controller lets an operator *teach* the arm four
positions and then *replays* them forever:

1. Press **reset**. The position counter is set to its middle value and the
   controller waits in record mode.
2. Move the arm by hand to a position and press **action**. Repeat four
   times. Each press freezes the current position in one of four slots.
3. After the fourth press the controller is in playback. It drives the
   motor's direction line towards slot 1 until the arm is there, then
   towards slot 2, 3, 4, and back to slot 1, until reset is pressed.

The whole design is small: an eight-state controller, a 12-bit up/down
counter, a 4 x 8-bit register file and an 8-bit comparator, plus
synchronisers for the asynchronous inputs. It is written as synthesizable
SystemVerilog, one clock domain, about 100 cells after synthesis.

## Data path

```
 ph ──► edge_sync ──pulse──┐
                           ├─► updown_logic ──up_n/down_n──► position_counter ──position[11:0]
 qt ──► edge_sync ──sync───┘                                         │
                                                        position[11:4]│
                                    ┌──────────────────────────────────┤
                                    ▼                                  ▼
 a_btn ─► edge_sync ─pulse─► robot_arm_fsm ──W,Re,L1L0──► register_file ──goal──► comparator8
                                  ▲                                              │    │
                                  └──────────────────── E (A = B) ◄──────────────┘    └─► dir (A < B)
```

* **Encoder decoding.** One encoder count is a full quadrature cycle. On
  each rising edge of the phase channel the level of the quadrature channel
  gives the direction: quadrature low counts up, high counts down. Both
  count signals are active low, one clock long.
* **Position counter.** Three 4-bit up/down stages chained by their carry
  and borrow outputs form a 12-bit counter. Reset loads `1000_0000_0000`
  (2048), the centre of the range, so the arm can be tracked about 1.5
  output revolutions either way (1350 counts per revolution: 200 steps x
  27:1 gearing / 4). Past either end it wraps.
* **Register file.** Only the upper 8 bits of the position are kept, one
  stored step being 16 counts, about 4.3 degrees. The file is two 4 x 4-bit
  halves side by side sharing one address, an active-low write enable and
  an active-low read enable, as with the discrete register-file chips the
  design is modelled on.
* **Comparator.** Two cascaded 4-bit magnitude comparators compare the
  upper 8 position bits (A) with the goal read from the register file (B).
  `A < B` is the motor direction, `A = B` (E) tells the controller the goal
  is reached. Which way DIR = 1 turns the motor depends on the motor wiring;
  the testbench's motor counts up for DIR = 1.

## The controller

The state is three bits S2S1S0 in plain binary. S2 is the mode, S1S0 the
slot:

| state | S2S1S0 | W | Re | address | leaves on | to |
|-------|--------|---|----|---------|-----------|----|
| S0    | 000    | 1 | 0  | 0       | A=1, R=0  | S1 |
| S1    | 001    | 1 | 0  | 1       | A=1, R=0  | S2 |
| S2    | 010    | 1 | 0  | 2       | A=1, R=0  | S3 |
| S3    | 011    | 1 | 0  | 3       | A=1, R=0  | S4 |
| S4    | 100    | 0 | 1  | 0       | E=1, R=0  | S5 |
| S5    | 101    | 0 | 1  | 1       | E=1, R=0  | S6 |
| S6    | 110    | 0 | 1  | 2       | E=1, R=0  | S7 |
| S7    | 111    | 0 | 1  | 3       | E=1, R=0  | S4 |

R = 1 sends every state to S0. E is ignored in record states and A in
playback states. The outputs are decoded from the state alone: W = not S2,
Re = S2, address = S1S0. W and Re are inverted at the top to drive the
register file's active-low enables. The same table written as gate
equations, which the controller testbench uses as its reference, is

```
S2' = (S1·S0·A + S2)·R'
S1' = (S2'·S0·(S1 xor A) + S1·S0' + S2·S0·(S1 xor E))·R'
S0' = (S2'·(S0 xor A) + S2·(S0 xor E))·R'
```

### How a position gets stored

There is no explicit "store" strobe. In a record state the write enable is
on at every clock, so the addressed slot continuously follows the counter
while the operator moves the arm. The action pulse moves the state on, and
the slot keeps the value of the last clock before that. The four slots are
therefore all written before playback can read them; their contents are not
reset.

### Why the motor never stops

In playback E is high as soon as the upper 8 position bits equal the goal,
and at the next clock the controller already selects the next slot, so DIR
at once points at the next goal. The motor keeps turning through all four
positions. Two equal consecutive goals simply pass in one clock.

## Input conditioning and timing

Each of the three asynchronous inputs (phase, quadrature, action) goes
through `edge_sync`: three flip-flops in series for synchronisation, a
fourth holding the previous value, and the edge pulse `D1 and not Q1`. A
held button or a phase level that stays high gives a single one-clock
pulse. Quadrature uses the synchronised level only.

| path | latency |
|------|---------|
| input change → edge pulse | 3 clocks (`SYNC_STAGES`) |
| phase input rises → position updated | 4 clocks |
| action input rises → state updated | 4 clocks |
| position/state → E, DIR, goal | combinational |

Each encoder level must be present for at least one clock. The reference
build ran the logic at 5.29 kHz with a 481 Hz motor step clock, about 11
clocks per quadrature phase.

Reset `r` is active high and synchronous. It must be high for at least one
clock after power-up: it is the only initialisation of the state register,
the counter (load) and the synchronisers.

## Where this RTL departs from the discrete original

The original was built from 74-series logic. Its structure, widths, state
table, origin value and enable polarities are kept; these points are
changes or choices made here:

* **Fully synchronous counting.** The original 4-bit counters count on the
  rising edge of their UP/DOWN pins and load asynchronously. Here each
  stage counts on the system clock during the cycle its active-low input is
  low, and the load is synchronous. Carry and borrow are combinational, so
  the 12 bits count as one.
* **Synchronous register-file writes.** The original chips write while the
  write enable is low (level sensitive). Here the word is written at each
  clock edge while the enable is low. Reads stay combinational.
* **No high impedance.** When the read enable is off the register file
  outputs 0 instead of floating.
* **Synchronisers are cleared by reset.** In the original their clear pin is
  unused. Clearing them avoids a false edge right after start-up.
* **Lowest comparator cascade inputs** are tied to "equal", the standard
  setting for the lowest stage.
* **Not included:** the RC debounce network and Schmitt trigger on the
  action button, the two 555 oscillators (system clock and motor step
  clock), the stepper driver and the motor itself. `a_btn` is the clean
  button level (1 = pressed). The debounce network and Schmitt trigger
  exist as simulation-only models in `tb/` (`debounce_rc_model`,
  `schmitt_trigger_model`). The step clock is not generated or gated here:
  only DIR is produced.

## Files

| file | contents |
|------|----------|
| `rtl/robot_arm_pkg.sv` | widths, origin, state type |
| `rtl/robot_arm_top.sv` | top level, wiring of all blocks |
| `rtl/robot_arm_fsm.sv` | record/playback controller |
| `rtl/edge_sync.sv` | synchroniser and rising-edge detector |
| `rtl/updown_logic.sv` | encoder direction decoder |
| `rtl/position_counter.sv`, `rtl/updown_counter4.sv` | 12-bit counter from 4-bit stages |
| `rtl/register_file.sv`, `rtl/regfile_4x4.sv` | 4 x 8 position store from 4 x 4 halves |
| `rtl/comparator8.sv`, `rtl/mag_comp4.sv` | 8-bit comparator from cascaded 4-bit stages |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the system test |

Top-level ports: `clk`, `r`, `a_btn`, `ph`, `qt` in; `dir`, `e`,
`state[2:0]` (for status LEDs), `position[11:0]` and `goal[7:0]` out.
Parameters: `SYNC_STAGES` on the top (default 3); the widths live in
`robot_arm_pkg`.

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`:

* `tb_updown_logic`: all four input combinations.
* `tb_comparator8`: all 65,536 input pairs.
* `tb_edge_sync`: random input levels; sync level and pulse checked against
  a delayed copy of the input every clock; one pulse per rising edge.
* `tb_robot_arm_fsm`: directed pass through all states, then 5,000 random
  clocks against the gate equations above; every arc of the state diagram
  must be taken.
* `tb_position_counter`: 20,000 random count pulses against an integer
  model, with a second instance started near 4095 to cover wrap-around;
  carries and borrows across one and two 4-bit stages must occur.
* `tb_register_file`: random writes and reads against a reference array,
  including disabled reads and writes.
* `tb_action_button`: the action-button path with a bouncing contact,
  through behavioural models of the RC debounce network (10 kOhm, 4.7 uF,
  47 ms time constant) and the inverting Schmitt trigger, into the full
  controller clocked at about 5.3 kHz. Each of four presses must advance
  the state once and the conditioned signal must change exactly twice per
  press; the raw contact, for comparison, must show extra edges.
* `tb_robot_arm_top`: the whole system at default parameters with a
  quadrature encoder/motor model. It records four random positions
  (holding the button for up to 60 clocks), plays them back for 2.5 loops,
  resets in playback, resets in the middle of recording, records again and
  plays back. It checks the position, the stored goals, DIR, E and every
  playback transition. It also counts each mechanism (count up/down, stage
  carry/borrow, held button, S7→S4 wrap, both DIR values, both resets, action
  ignored in playback) and fails if one never happened.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_robot_arm_top \
    rtl/robot_arm_pkg.sv tb/tb_robot_arm_top.sv
./obj_dir/Vtb_robot_arm_top
```

The system test takes a few seconds.
