# Q-learning policy accelerator for grid path planning

A robot learns, by Q-learning, to cross a 4 × 4 grid from a start corner to a
goal corner without stepping on obstacles. Learning is done offline in
software. What remains at run time is to *use* the learned table: in each
state, look up the chosen action, move, and see what tile you landed on.
This RTL does that in hardware, one move per clock cycle. It plays whole
episodes on its own: it detects an obstacle, the goal or a step limit, and
counts steps and episodes.

The design follows a published Q-learning accelerator chip from a 180 nm
master's thesis project. Its datapath is built from the same small parts as
that chip: two 64 × 4 SRAMs, a decoder with 2-bit adders and subtractors, a
4-to-1 multiplexer, a 4-bit adder, equality comparators, two 8-bit counters
and a reset multiplexer. Where the original leaves a detail open, this RTL
makes a choice. The section *Departures and open points* lists each choice.

## The world the hardware sees

**Grid and states.** A position is a pair (a, b) of 2-bit coordinates. `a` is
the row and `b` is the column. The state number is `4·a + b`, from 0 to 15.
The agent always starts in state 0 (a = 0, b = 0).

**Tiles.** The environment memory (SRAM1) stores one 2-bit tile code per
state, in bits [1:0] of a 4-bit word:

| code | tile |
|------|------|
| 00 | start |
| 01 | free tile |
| 10 | obstacle |
| 11 | end (goal) |

The reference grid used by the testbenches has the start at 0, obstacles at
5, 7 and 12, and the goal at 15:

```
        b=0    b=1    b=2    b=3
 a=0   Start   .      .      .
 a=1    .     Obst    .     Obst
 a=2    .      .      .      .
 a=3   Obst    .      .     End
```

**Actions.** The learned policy gives each state one of four action codes.
Each code moves exactly one coordinate by one:

| code | name (`action_t`) | move |
|------|------|------|
| 0 | `ACT_LEFT` | b + 1 |
| 1 | `ACT_RIGHT` | b − 1 |
| 2 | `ACT_FORWARD` | a + 1 |
| 3 | `ACT_BACKWARD` | a − 1 |

The names are the original's labels. The moves of codes 0 and 2 come from
the original's worked timing examples. Codes 1 and 3 are taken as their
opposites. Read the names only as labels: "left" increases b.

A move that would leave the grid is refused. The agent stays where it is and
`blocked` goes high. A move onto an obstacle is carried out, and the episode
then ends on that tile.

**Policy memory.** SRAM2 holds one 4-bit word per state (`act_word_t`):

```
 bit 3..2  action code     (argmax of the Q-table row, or any policy)
 bit 1..0  reward label    (passed out unchanged on reward_value)
```

You turn a trained Q-table into SRAM2 contents as follows. For each state s,
write `action = argmax_k Q[s][k]`. The column order of the table must match
the action codes above. The reward label is free for the user; the hardware
does not interpret it.

## One step: the datapath

```
            state_q (4b) ──────────────┐ address
                 │ a=state_q[3:2]      ▼
                 │ b=state_q[1:0]   SRAM2 ──► action, reward_value
                 ▼                    │
   ┌──────────── env_block ───────────┼──────────────────────────┐
   │  add_sub_buf: decoder2to4(action) enables one of            │
   │     b+1 (adder2)  b−1 (subtractor2)  a+1 (adder2)  a−1 (sub)│
   │     the other coordinate passes through;                    │
   │     carry/borrow out ⇒ blocked, keep (a,b)                  │
   │  mux4to1(a') → 0/4/8/12 ; adder4: + b'  ⇒ next_state        │
   │  SRAM1[next_state] ⇒ tile                                   │
   └───────────────────────────────┬─────────────────────────────┘
          tile == 10 ? ─► obstacle │ tile == 11 ? ─► finished
                                   ▼
        registered with next_state: obst_q, fin_q, state_q
```

The whole chain is combinational and settles within one cycle: SRAM2 read,
decode, add or subtract, row offset and add, then SRAM1 read. Both SRAMs
read combinationally, and a write lands on the rising edge. The long path
runs from `state_q` through both memories to the tile comparators.

## Episode control and timing

The tile results are registered together with the new state, so an episode
that ends on a tile is noticed one cycle after the move that reached it.
In that cycle three signals are ORed into `ep_reset`:

* `obstacle` (registered tile == obstacle),
* `finished` (registered tile == end),
* `limit_hit` (step counter == `step_limit`, an 8-bit equality comparator).

While `ep_reset` is high, the reset multiplexer loads state 0 instead of the
computed next state. In the same cycle the step counter clears, the episode
counter advances and `ep_end` pulses. When the episode counter equals
`num_episodes`, `done` rises and the agent stops.

Example: the policy {state 0 → forward, state 4 → left} on the reference grid.

| cycle | state | action | next_state | tile | obstacle | ep_reset | step_count |
|------:|------:|-------:|-----------:|------|:-:|:-:|--:|
| 0 | 0 | 2 | 4 | free | 0 | 0 | 0 |
| 1 | 4 | 0 | 5 | obstacle | 0 | 0 | 1 |
| 2 | 5 | – | – | – | 1 | 1 (`ep_end`) | 2 |
| 3 | 0 | 2 | 4 | free | 0 | 0 | 0 |

The rules:

* An episode that ends on a tile after k moves takes k + 1 cycles.
* An episode cut off by the step limit takes `step_limit` moves and then one
  reset cycle.
* At 62.5 MHz, the obstacle episode above takes 3 cycles = 48 ns.
* The goal path 0→1→2→6→10→14→15 takes 7 cycles = 112 ns.

The policy is fixed in SRAM2, so every episode of a run follows the same
path. The design does no exploration and no learning.

## Using the top module `qlearn_top`

Parameters:

* `SRAM_DEPTH` = 64: words per SRAM.
* `CNT_WIDTH` = 8: the width of the counters, the step limit and the
  episode count.

Change either one only together with the package constants. The coordinate
width is fixed at 2 bits by the datapath parts.

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of state, results and counters (SRAM contents are kept) |
| `env_we`, `env_addr`, `env_wdata` | in | 1, 6, 4 | write port of SRAM1 (tile in bits [1:0]) |
| `act_we`, `act_addr`, `act_wdata` | in | 1, 6, 4 | write port of SRAM2 (`{action, reward}`) |
| `run` | in | 1 | the agent moves while high (and not `done`, and no SRAM write) |
| `step_limit`, `num_episodes` | in | 8 | per-episode step limit; episodes to play |
| `state`, `next_a`, `next_b`, `next_state` | out | 4, 2, 2, 4 | current state; computed move |
| `action`, `reward_value` | out | 2, 2 | SRAM2 word of the current state |
| `tile`, `blocked` | out | 2, 1 | tile at the new position; boundary move refused |
| `obstacle`, `finished`, `limit_hit`, `ep_reset` | out | 1 | the three end conditions and their OR |
| `step_count`, `episode_count`, `done` | out | 8, 8, 1 | counters; run complete |
| `ep_end`, `ep_result`, `ep_steps`, `ep_reward` | out | 1, 2, 8, 1 | valid in the cycle an episode ends: how it ended (`ep_end_t`), moves taken, 1 if the goal was reached |

To use the module:

1. Hold `run` low and write the 16 tile codes and the 16 policy words.
   While either write enable is high, the SRAM address comes from the load
   port and the agent holds.
2. Set `step_limit` and `num_episodes`. Pulse `rst_n` to clear the counters.
3. Raise `run`. Read each episode's outcome at `ep_end`.
4. Wait for `done`. To start another run, pulse `rst_n` again.

`run` may be dropped at any cycle to pause the agent.

## Files

| file | content |
|------|---------|
| `rtl/qlearn_pkg.sv` | widths, `tile_t`, `action_t`, `act_word_t`, `ep_end_t` |
| `rtl/qlearn_top.sv` | top: SRAM2, environment, comparators, counters, reset OR and mux, state register |
| `rtl/env_block.sv` | move, state number and SRAM1 lookup |
| `rtl/add_sub_buf.sv` | action decode and coordinate update with boundary check |
| `rtl/decoder2to4.sv`, `rtl/mux4to1.sv`, `rtl/mux2.sv` | decoder and multiplexers |
| `rtl/adder2.sv`, `rtl/adder4.sv`, `rtl/subtractor2.sv`, `rtl/full_adder.sv`, `rtl/full_subtractor.sv` | ripple adders and subtractors built from 1-bit cells |
| `rtl/eq_comparator.sv`, `rtl/counter.sv` | equality comparator (8-bit default) and 8-bit counter |
| `rtl/sram.sv` | 64 × 4 single-port memory, combinational read |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/qlearn_pkg.sv tb/tb_qlearn_top.sv --top-module tb_qlearn_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_qlearn_top` with its name.

The testbenches and what they check:

* **Small blocks:** checked exhaustively wherever the input space allows it,
  including the worked adder examples: 01 + 10 + 0 = 11, and 01 + 10 + 1 = 00
  with a carry out.
* **Counter and SRAM:** checked against reference models under random
  stimulus.
* **`tb_env_block`:** loads the reference grid and checks every position
  with every action.
* **`tb_qlearn_top`:** runs at the default parameters. It plays:
  * the obstacle example above for 5 episodes;
  * the goal path for 5 episodes;
  * the greedy policy of a trained Q-table, which pushes the agent into the
    top edge at state 1 until the step limit ends each episode;
  * 30 random policies, with random step limits and random pauses.

  An independent walk of the policy predicts the states, the moves, the end
  condition and the reward of each episode. The testbench also checks one
  move per cycle. It counts obstacle ends, goal ends, step-limit ends,
  blocked moves, pauses and completed runs, and fails if any of them never
  happened. It runs in seconds.

`qlearn_top` also carries two assertions. An episode never ends as obstacle
and goal at once. Without a reset, the state register takes the computed
next state.

## Departures and open points

* **Direction of the actions.** The original names code 00 "left", 01
  "right", 10 "forward" and 11 "backward". Its timing examples show code 0
  raising b and code 2 raising a. This RTL follows the examples.
* **Grid boundary.** The original says the agent does not move when an
  action would take it off the grid. Plain 2-bit arithmetic would wrap
  around instead. Here the carry or borrow out of the 2-bit adder or
  subtractor blocks the move.
* **Position inputs.** The original chip brings coordinates a and b in on
  pins. Here they are the two halves of the internal state register, which
  closes the step loop on chip.
* **Delay buffers.** The original's add/sub block has delay buffers on the
  path of the unchanged coordinate, to match the adder delay. In
  synchronous RTL that path is a plain wire.
* **Episode counting.** The original describes the episode reset both as
  advancing the episode count and as clearing "all the counters". Here only
  the step counter clears. The episode counter counts episodes, and a
  second equality comparator against `num_episodes` produces `done`.
  `run`, `done`, the `ep_*` outputs and the SRAM load ports are additions.
* **Counter widths.** The counters are 8 bits wide, as in the original's
  counter design. The original's chip pin list gives only 3 and 4 pins to
  the episode and step settings.
* **Trained policy.** The original's hardware run (5 episodes on the 4 × 4
  grid, each ending on an obstacle after 5 steps) depends on SRAM2 contents
  that were not published. It is not reproduced here.
* **Training data.** The trained Q-table printed with the original has
  all-zero rows for states 5, 7, 11, 12 and 15. This suggests that training
  also had a hole at state 11. The published grid, used here, has none
  there. The grid is data in SRAM1, so either layout can be loaded.
* **Larger grids and 8 actions.** The original also lists 64, 256 and 1024
  states and 8 actions as possible configurations, but builds 16 states
  with 4 actions. This RTL does the same. The SRAMs already have 64 words.
  A 64-state grid would still need 3-bit coordinates, an 8-way row
  multiplexer and a 6-bit state adder. Eight actions would need a 3-bit
  action field and diagonal moves.
* **Not RTL.** Four parts of the original chip are not in this RTL:
  * the 12-transistor SRAM bit cell;
  * the standard-cell layouts;
  * the 40-pin pad ring;
  * software training.

  The SRAMs are behavioural arrays. Synthesis maps them to whatever
  memory the target offers.
