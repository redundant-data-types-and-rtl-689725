# Triple-redundant variables for a maze-robot controller

This design is a small robot controller in which any group of its variables can be
protected by triple modular redundancy (TMR), one group at a time. This lets you
measure how much each group matters for reliability.

The protection is written as a redundant data type, called **triple**, rather than as
a structural TMR wrapper around the whole circuit:

- A variable of type triple is stored as three independent copies.
- Every operation that has at least one triple operand is carried out on each copy
  separately.
- A vote is taken only where a triple value has to become a plain value again: when
  it is assigned to an unhardened variable, or when it is used as a branch condition.

Switching a variable between its plain type and triple changes only one parameter
bit. The datapath around it adapts, and the unhardened parts keep their original
cost.

The controller drives a robot through a grid maze with the left-hand rule. It reads
four wall sensors that face north, east, south and west. It keeps its own heading and
position, and it issues one step command per sensor sample until it reaches the goal.

## The triple data type in hardware

A value of any width `W` travels as a bundle `logic [2:0][W-1:0]`, with copy 0 in the
low slot. A plain (unhardened) value uses the same bundle with its one physical value
in all three slots. This lets hardened and plain operands meet without adapters:

| Operand combination | Result | Module |
|---|---|---|
| triple op triple ("intra" type) | triple, computed copy by copy | `rdt_op`, `TRIPLE=1` |
| triple op plain ("original" type) | triple; the plain operand is broadcast to all copies | `rdt_op`, `TRIPLE=1` |
| plain op plain | plain; only copy 0 is computed and then broadcast | `rdt_op`, `TRIPLE=0` |
| triple used as a condition | one Boolean: each copy is tested for non-zero, then 2-of-3 vote | `rdt_to_bool` |
| triple assigned to a plain variable | 2-of-3 bitwise vote, then stored once | `rdt_var`, `TRIPLE=0` |
| any value assigned to a triple variable | each copy stored separately, no vote | `rdt_var`, `TRIPLE=1` |

Two points decide how this behaves under faults:

- **No voting inside an operation, and no re-voting on store.** A corrupted copy keeps
  its wrong value and passes it on through later operations on that copy. The other two
  copies out-vote it at every conversion point. A single upset is masked for as long
  as the other two copies stay intact. A second upset in another copy of the same
  variable is not masked.
- **The control path is not hardened.** Branch decisions, the choice of turn and the
  choice of step direction are plain logic. They read triple values only through
  `rdt_to_bool` or `tmr_voter`.

Operations between two different redundancy types (such as triple against a
two-copy "duplex" type) are not part of this design. Only one redundant type exists.

## The controller (`robot_ctrl`, the top)

### Algorithm

Each sensor word has one bit per world direction: bit 0 is N, 1 is E, 2 is S and
3 is W. A set bit means there is a wall on that side of the robot's cell.

1. The word is rotated right by the heading. This gives the robot-frame view: bit 0
   front, bit 1 right, bit 2 back, bit 3 left.
2. The left-hand rule picks a turn:
   - turn left if the left is open;
   - otherwise go straight if the front is open;
   - otherwise turn right if the right is open;
   - otherwise turn back (dead end).
3. The new heading is `heading + turn` (mod 4). The robot steps one cell in that
   direction: N adds 1 to y, E adds 1 to x, S subtracts 1 from y, W subtracts 1
   from x. Coordinates wrap modulo 2^`COORD_W`.
4. If the new position equals the goal, the status flag is set. Every later sample
   is answered with a stop command, and the state no longer changes.

The command for a sample is the world direction of the step (`cmd_dir`). Once the
goal has been reached, it is a stop (`cmd_stop`).

### Variable sets

The parameter `HARDEN[6:0]` picks the type of each of seven disjoint variable sets.
Bit `k-1` makes set `k` triple.

| Set | Variables | Width | Role |
|---|---|---|---|
| 1 | `goal_x`, `goal_y` | 2 x `COORD_W` | target cell |
| 2 | `pos_x`, `pos_y` | 2 x `COORD_W` | dead-reckoned position |
| 3 | `heading` | 2 | current heading |
| 4 | `sens` | 4 | stored sensor sample (pipeline stage 1) |
| 5 | `view` | 4 | sensors in the robot's frame (a temporary, not a register) |
| 6 | `cmd` | 3 | command register `{stop, dir}` |
| 7 | `status` | 1 | goal-reached flag |

An operation becomes triple when any of its operands belongs to a hardened set. For
example, the rotation that produces `view` is triple when `sens` or `heading` is
hardened. If `view` itself is plain, the result is voted into a single copy.

The default is `7'h7F`, which hardens everything. The "versions" studied with this
design harden exactly one set each (`HARDEN = 1 << (k-1)`), and the reference version
hardens none (`HARDEN = 0`).

Set 1 (the goal coordinates) is the one group whose contents were fixed by the
method's original evaluation. Sets 2 to 7 are this design's own split of the remaining
variables.

Flip-flop cost:

| Configuration | `HARDEN` | Flip-flops |
|---|---|---|
| Reference | `0` | 44 |
| Fully hardened | `7'h7F` | 128 |

Each set adds twice its own bit count when hardened. It also adds the voters and the
triplicated operations that it pulls in.

### Pipeline and timing

The controller is a two-stage pipeline that accepts a new sample on every clock
(initiation interval 1):

| Edge | Stage | What happens |
|---|---|---|
| Edge 0 (`sens_valid` high) | Stage 1 | The sensor word is stored in `sens`. |
| Edge 1 | Stage 2 | The decision is made. `heading`, `pos_*`, `status` and `cmd` are written. `cmd_valid` is high after this edge. |

A command therefore appears two clock edges after its sample. The state is updated
only in stage 2, so back-to-back samples each see the state left by the previous one,
with no hazard.

`start` is a one-cycle pulse:

- It loads `start_x`, `start_y`, `start_dir`, `goal_x` and `goal_y`.
- It sets the status flag if the start cell is already the goal.
- It empties the pipeline.

`rst_n` is a synchronous, active-low reset that clears every copy of every variable.

In a closed loop with a real robot, one sample per move is normal. The full
one-per-clock rate only matters when samples are queued.

### Upset injection

The ports `fi_valid`, `fi_var`, `fi_copy` and `fi_mask` flip bits in one copy of one
variable:

- `fi_var`: 0 `goal_x`, 1 `goal_y`, 2 `pos_x`, 3 `pos_y`, 4 `heading`, 5 `sens`,
  6 `view`, 7 `cmd`, 8 `status`.
- `fi_mask`: the bits to flip, cut down to the variable's width.

For registers, the flip is applied on the clock edge, on top of any write in the same
cycle. For the `view` temporary, it corrupts the value for that one cycle. When the
variable is plain, `fi_copy` is ignored and the single copy is hit.

These ports model single-event upsets in storage. Tie `fi_valid` low in normal use.
Upsets in the configuration memory of an FPGA, which change logic rather than state,
are outside what RTL can model.

## Modules

| File | Purpose |
|---|---|
| `rtl/rdt_pkg.sv` | operation codes `rdt_op_e`, direction type `dir_e` |
| `rtl/tmr_voter.sv` | bitwise 2-of-3 majority, plus a `mismatch` flag |
| `rtl/rdt_op.sv` | one operation applied per copy (`OP_ADD, SUB, AND, OR, XOR, NOT, EQ, ROTR, MOV`) |
| `rtl/rdt_to_bool.sv` | Boolean cast with vote |
| `rtl/rdt_var.sv` | a variable: 1 or 3 copies, register or temporary, vote on plain assignment, flip mask |
| `rtl/robot_ctrl.sv` | the controller, the top |

All logic is synthesizable, with no memories.

`robot_ctrl` also carries three concurrent assertions on its interface:

- an upset must name an existing variable and copy;
- the position stays unchanged once the goal is reached;
- every stored sample is answered by a command on the next edge.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tmr_voter_tb` | random copies and single-copy corruption against a bit-count majority |
| `rdt_op_tb` | every operation, copy by copy, against an independent model; broadcast operands; `TRIPLE=0` |
| `rdt_to_bool_tb` | the cast for hardened and plain operands |
| `rdt_var_tb` | reset, write enable, per-copy storage, vote on plain assignment, flips, temporaries |
| `robot_ctrl_tb` | the reference version, versions 1 to 7 and the fully hardened version, each in its own maze loop (below) |
| `robot_ctrl_full_tb` | the controller at its default parameters on a 16 x 16 maze whose coordinates wrap past 255 (below) |

`tb/maze_world.sv` is a behavioural model of the robot and its maze:

- It builds a random perfect maze with a fixed seed, so every cell is reachable and
  there are dead ends.
- It feeds the controller the sensors of the robot's cell and moves the robot as
  commanded.
- It predicts every command with its own model of the left-hand rule.
- It checks the two-edge latency and the position, heading and arrival outputs.

`robot_ctrl_tb` does the following:

- It runs a clean maze on every version.
- It injects an upset into one copy of each variable of the hardened set of versions
  1 to 7. The run must stay identical.
- It shows that the same kind of upset in the reference version's position changes the
  reported position.
- It streams one sensor word per clock into the fully hardened version.

`robot_ctrl_full_tb` does the following:

- It runs a clean maze at the default parameters.
- It injects one upset into each of the 9 variables. Every upset must be masked.
- It streams 200 sensor words, one per clock.

Both controller testbenches count each of these behaviours and fail if any never
happens: left turn, straight move, right turn, turn back, arrival, masked upset,
visible upset (only in `robot_ctrl_tb`) and a complete back-to-back stream.

To simulate with Verilator, put the package first, then the other files:

```
verilator --binary --timing --assert rtl/rdt_pkg.sv rtl/tmr_voter.sv rtl/rdt_op.sv \
  rtl/rdt_to_bool.sv rtl/rdt_var.sv rtl/robot_ctrl.sv tb/maze_world.sv \
  tb/robot_ctrl_full_tb.sv --top-module robot_ctrl_full_tb -Mdir obj
./obj/Vrobot_ctrl_full_tb
```

Each testbench finishes in well under a second.

## Choices made here, and limits

These points are this design's own decisions. The method itself does not fix them:

- the grid-maze motion model;
- the sensor bit order;
- the coordinate width (8 bits);
- the start/valid interface;
- the command encoding;
- the two-stage pipeline;
- voting as the way triple values become plain;
- the contents of variable sets 2 to 7.

The method's reliability figures come from a high-level-synthesis build. They were
measured with faults in FPGA configuration bits, so they cannot be reproduced with
this RTL. This RTL reproduces the mechanism: which variables are tripled, how
operations and conversions behave, and that single upsets in a hardened variable are
masked.

The only redundant type is TMR. A two-copy type with error detection, and operations
that mix two different redundant types, are not provided.

The external parts of a test setup are not included:

- the host-side link (Ethernet to GPIO);
- the configuration-memory fault injector;
- the robot simulator.

In the testbenches, `maze_world` takes the simulator's place.
