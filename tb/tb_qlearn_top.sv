// tb_qlearn_top: end-to-end test of the Q-learning test accelerator at its
// default sizes (64 x 4 SRAMs, 8-bit counters).
//
// The grid is loaded once: start at state 0, obstacles at 5, 7 and 12, end
// at 15. Then several runs, each after a register reset, load a policy into
// the action memory and let the agent play num_episodes episodes:
//   1. the policy of the obstacle example (state 0 forward, state 4 left):
//      0 -> 4 -> 5, obstacle after 2 moves, reward 0;
//   2. the policy of the goal example: 0 -> 1 -> 2 -> 6 -> 10 -> 14 -> 15,
//      end tile after 6 moves, reward 1;
//   3. the greedy policy of the trained Q-table printed with the design
//      (argmax of each row, column index taken as the action code): it pushes
//      the agent into the top edge at state 1, so the step limit ends it;
//   4. random policies with random step limits, with run dropped at random.
// A reference model walks each policy independently and predicts, per
// episode, the state sequence, the number of moves, how it ends and the
// reward; the testbench also checks one move per clock (an episode of k
// moves lasts k + 1 active cycles), that the agent holds while run is low,
// and that done rises after num_episodes. Each mechanism (obstacle end, goal
// end, step-limit end, blocked move, pause, done) is counted and must occur.
module tb_qlearn_top;
  import qlearn_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic        env_we = 1'b0, act_we = 1'b0;
  logic [5:0]  env_addr = '0, act_addr = '0;
  logic [3:0]  env_wdata = '0, act_wdata = '0;
  logic [7:0]  step_limit = 8'd20, num_episodes = 8'd1;
  logic [3:0]  state, next_state;
  action_t     action;
  logic [1:0]  reward_value, next_a, next_b;
  tile_t       tile;
  logic        blocked, obstacle, finished, limit_hit, ep_reset, done, ep_end, ep_reward;
  logic [7:0]  episode_count, step_count, ep_steps;
  ep_end_t     ep_result;

  int checks = 0, failures = 0;
  int n_obst = 0, n_goal = 0, n_limit = 0, n_blocked = 0, n_pause = 0, n_done = 0;

  qlearn_top dut (.*);

  always #8 clk = ~clk;   // 16 ns period (62.5 MHz)

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference ----------------
  function automatic tile_t grid_tile(input int s);
    case (s)
      0:        return TILE_START;
      5, 7, 12: return TILE_OBSTACLE;
      15:       return TILE_END;
      default:  return TILE_FREE;
    endcase
  endfunction

  function automatic int ref_move(input int s, input int act, output bit blk);
    int a = s / 4, b = s % 4;
    case (act)
      0: b++;
      1: b--;
      2: a++;
      default: a--;
    endcase
    blk = (a < 0 || a > 3 || b < 0 || b > 3);
    return blk ? s : 4 * a + b;
  endfunction

  logic [1:0] pol [16];
  int         exp_trace [$];
  int         exp_moves, exp_blocked;
  ep_end_t    exp_result;

  // states visited in one episode (starting with 0), how it ends
  task automatic ref_episode(input int limit);
    int s = 0;
    bit blk;
    exp_trace = {0};
    exp_moves = 0;
    exp_blocked = 0;
    exp_result = END_LIMIT;
    while (exp_moves < limit) begin
      s = ref_move(s, int'(pol[s]), blk);
      exp_blocked += int'(blk);
      exp_moves++;
      exp_trace.push_back(s);
      if (grid_tile(s) == TILE_OBSTACLE) begin exp_result = END_OBSTACLE; break; end
      if (grid_tile(s) == TILE_END)      begin exp_result = END_GOAL;     break; end
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- loading ----------------
  task automatic load_env();
    for (int s = 0; s < 16; s++) begin
      @(negedge clk);
      env_we = 1'b1; env_addr = 6'(s); env_wdata = {2'b00, grid_tile(s)};
    end
    @(negedge clk);
    env_we = 1'b0;
  endtask

  task automatic load_policy();
    for (int s = 0; s < 16; s++) begin
      @(negedge clk);
      act_we = 1'b1; act_addr = 6'(s);
      act_wdata = {pol[s], 2'(s % 4)};   // reward label: any 2-bit value
    end
    @(negedge clk);
    act_we = 1'b0;
  endtask

  // ---------------- one run ----------------
  task automatic do_run(input int episodes, input int limit, input bit pauses, input string name);
    int cyc;
    num_episodes = 8'(episodes);
    step_limit   = 8'(limit);
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    load_policy();
    ref_episode(limit);
    check(!done, {name, ": not done before start"});
    // SRAM2 read-back through the action and reward outputs
    #1;
    check(action == action_t'(pol[0]) && reward_value == 2'd0, {name, ": SRAM2 word of state 0"});
    for (int e = 0; e < episodes; e++) begin
      int moves_seen = 0;
      cyc = 0;
      forever begin
        @(negedge clk);
        if (pauses && ($urandom % 5) == 0) begin
          logic [3:0] held = state;
          run = 1'b0;
          repeat (2) @(negedge clk);
          check(state == held && step_count == 8'(moves_seen), {name, ": agent holds while run is low"});
          n_pause++;
        end
        run = 1'b1;
        #1;
        // one cycle of the episode
        check(int'(state) == exp_trace[moves_seen],
              $sformatf("%s ep %0d cycle %0d: state %0d expected %0d", name, e, cyc, state, exp_trace[moves_seen]));
        check(int'(step_count) == moves_seen, $sformatf("%s: step count %0d expected %0d", name, step_count, moves_seen));
        if (ep_end) break;
        if (blocked) n_blocked++;
        moves_seen++;
        cyc++;
        if (cyc > limit + 2) break;
      end
      check(ep_end, $sformatf("%s ep %0d: episode ended", name, e));
      check(cyc == exp_moves, $sformatf("%s ep %0d: %0d moves (%0d cycles), expected %0d moves",
                                        name, e, cyc, cyc + 1, exp_moves));
      check(ep_result == exp_result, $sformatf("%s ep %0d: result %s expected %s",
                                               name, e, ep_result.name(), exp_result.name()));
      check(int'(ep_steps) == exp_moves, $sformatf("%s: ep_steps %0d", name, ep_steps));
      check(ep_reward == (exp_result == END_GOAL), $sformatf("%s: reward %0d", name, ep_reward));
      check(int'(episode_count) == e, $sformatf("%s: episode count %0d expected %0d", name, episode_count, e));
      case (ep_result)
        END_OBSTACLE: begin n_obst++;  check(obstacle && !finished, "obstacle flag"); end
        END_GOAL:     begin n_goal++;  check(finished, "finished flag"); end
        END_LIMIT:    begin n_limit++; check(limit_hit, "limit flag"); end
        default: ;
      endcase
    end
    @(negedge clk);
    #1;
    check(done && int'(episode_count) == episodes && state == 4'd0,
          $sformatf("%s: done after %0d episodes (count %0d)", name, episodes, episode_count));
    // the agent stays put once done
    begin
      logic [7:0] sc = step_count;
      repeat (3) @(negedge clk);
      check(state == 4'd0 && step_count == sc && episode_count == 8'(episodes), {name, ": idle when done"});
    end
    if (done) n_done++;
    run = 1'b0;
  endtask

  // trained Q-table printed with the design, scaled by 1e4
  localparam int QT [16][4] = '{
    '{5428, 4951, 4905, 4880}, '{3408, 3826, 3404, 5036}, '{4162, 4275, 3988, 4748},
    '{3309, 2718, 3046, 4493}, '{5555, 1903, 2305, 4171}, '{0, 0, 0, 0},
    '{2571, 1222, 1574, 1035}, '{0, 0, 0, 0},             '{3628, 3681, 4693, 5920},
    '{4175, 6151, 4619, 3332}, '{5459, 3690, 3397, 2305}, '{0, 0, 0, 0},
    '{0, 0, 0, 0},             '{5468, 5674, 7435, 5552}, '{7016, 8673, 7304, 7287},
    '{0, 0, 0, 0}};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load_env();

    // run 1: obstacle example
    foreach (pol[s]) pol[s] = 2'(ACT_BACKWARD);
    pol[0] = ACT_FORWARD; pol[4] = ACT_LEFT;
    do_run(5, 20, 1'b0, "obstacle example");

    // run 2: goal example
    foreach (pol[s]) pol[s] = 2'(ACT_BACKWARD);
    pol[0] = ACT_LEFT; pol[1] = ACT_LEFT; pol[2] = ACT_FORWARD;
    pol[6] = ACT_FORWARD; pol[10] = ACT_FORWARD; pol[14] = ACT_LEFT;
    do_run(5, 20, 1'b0, "goal example");

    // run 3: greedy policy of the trained table
    for (int s = 0; s < 16; s++) begin
      int best = 0;
      for (int k = 1; k < 4; k++) if (QT[s][k] > QT[s][best]) best = k;
      pol[s] = 2'(best);
    end
    do_run(3, 10, 1'b0, "trained table");

    // run 4: random policies, random limits, random pauses
    for (int r = 0; r < 30; r++) begin
      foreach (pol[s]) pol[s] = 2'($urandom);
      do_run(1 + int'($urandom % 4), 1 + int'($urandom % 40), 1'b1, $sformatf("random %0d", r));
    end

    $display("mechanisms: obstacle=%0d goal=%0d limit=%0d blocked=%0d pause=%0d done=%0d",
             n_obst, n_goal, n_limit, n_blocked, n_pause, n_done);
    check(n_obst > 0,    "obstacle end never happened");
    check(n_goal > 0,    "goal end never happened");
    check(n_limit > 0,   "step-limit end never happened");
    check(n_blocked > 0, "blocked move never happened");
    check(n_pause > 0,   "pause never happened");
    check(n_done > 0,    "done never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
