// qlearn_top: Q-learning test (inference) accelerator for grid path planning.
//
// A policy learned offline is stored in SRAM2 as one word per state: the
// action in bits [3:2] and a 2-bit reward label in bits [1:0]. The grid is
// stored in SRAM1, one tile code per state (start, free, obstacle, end).
// Each clock cycle the current state addresses SRAM2, the action read moves
// the agent through env_block, and the tile under the new position is
// compared with the obstacle code (10) and the end code (11). The new state
// and those two results are registered. In the following cycle the OR of
// "obstacle", "finished" and "step count equals step_limit" is the episode
// reset: the mux in front of the state register loads state 0, the step
// counter clears and the episode counter advances. The run stops when the
// episode count equals num_episodes. This is the original design's architecture.
//
// Timing: one move per clock. An episode that ends on a tile after k moves
// occupies k + 1 cycles: k moves, then one cycle on the final tile during
// which the result and the reset are shown (ep_end high) and the state
// returns to 0. An episode cut by the step limit ends in the cycle where the
// step count reaches step_limit, without moving.
//
// Interface: rst_n is a synchronous active-low reset of the registers and
// counters (SRAM contents are kept). While env_we / act_we are high the
// matching SRAM is written at env_addr / act_addr and the agent holds.
// The agent moves only while run is high and done is low. On each
// episode end ep_end pulses for one cycle with ep_result, ep_steps (moves
// taken) and ep_reward (1 at the end tile, 0 otherwise) valid.
//
// Choices of this design where the original design is silent: the run input, the
// load ports and their address sharing, the episode-count comparator and
// done flag, a move into the boundary leaving the agent in place (carried
// out in add_sub_buf), and the agent coordinates being taken from the state
// register rather than from pins.
module qlearn_top
  import qlearn_pkg::*;
#(
  parameter int unsigned SRAM_DEPTH = 64,
  parameter int unsigned CNT_WIDTH  = CNT_W,
  localparam int unsigned AW        = $clog2(SRAM_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  // SRAM1 (environment) load port
  input  logic                 env_we,
  input  logic [AW-1:0]        env_addr,
  input  logic [WORD_W-1:0]    env_wdata,
  // SRAM2 (policy: action and reward) load port
  input  logic                 act_we,
  input  logic [AW-1:0]        act_addr,
  input  logic [WORD_W-1:0]    act_wdata,
  // run settings
  input  logic [CNT_WIDTH-1:0] step_limit,
  input  logic [CNT_WIDTH-1:0] num_episodes,
  // observation
  output logic [STATE_W-1:0]   state,
  output action_t              action,
  output logic [1:0]           reward_value,
  output logic [COORD_W-1:0]   next_a,
  output logic [COORD_W-1:0]   next_b,
  output logic [STATE_W-1:0]   next_state,
  output tile_t                tile,
  output logic                 blocked,
  output logic                 obstacle,
  output logic                 finished,
  output logic                 limit_hit,
  output logic                 ep_reset,
  output logic [CNT_WIDTH-1:0] episode_count,
  output logic [CNT_WIDTH-1:0] step_count,
  output logic                 done,
  output logic                 ep_end,
  output ep_end_t              ep_result,
  output logic [CNT_WIDTH-1:0] ep_steps,
  output logic                 ep_reward
);
  logic [STATE_W-1:0] state_q, state_d;
  logic               obst_q, fin_q;
  logic               is_obst, is_end;
  logic               active;
  logic [AW-1:0]      act_sram_addr;
  act_word_t          act_word;

  // ---------------- action side: SRAM2 ----------------
  assign act_sram_addr = act_we ? act_addr : AW'(state_q);

  sram #(.DEPTH(SRAM_DEPTH), .WIDTH(WORD_W)) u_sram2 (
    .clk(clk), .we(act_we), .addr(act_sram_addr), .wdata(act_wdata), .rdata(act_word)
  );

  assign action       = act_word.action;
  assign reward_value = act_word.reward;

  // ---------------- environment side ----------------
  env_block #(.SRAM_DEPTH(SRAM_DEPTH)) u_env (
    .clk(clk),
    .a(state_q[3:2]), .b(state_q[1:0]), .action(act_word.action),
    .cfg_we(env_we), .cfg_addr(env_addr), .cfg_wdata(env_wdata),
    .a_n(next_a), .b_n(next_b), .next_state(next_state), .tile(tile), .blocked(blocked)
  );

  // tile comparators (obstacle 10, end 11)
  eq_comparator #(.WIDTH(2)) u_cmp_obst (.a(tile), .b(TILE_OBSTACLE), .eq(is_obst));
  eq_comparator #(.WIDTH(2)) u_cmp_end  (.a(tile), .b(TILE_END),      .eq(is_end));

  // ---------------- episode control ----------------
  logic ep_done_cmp;
  assign done   = ep_done_cmp;
  assign active = run & ~done & ~env_we & ~act_we;

  // step count against the limit
  eq_comparator #(.WIDTH(CNT_WIDTH)) u_cmp_step (.a(step_count), .b(step_limit), .eq(limit_hit));
  // episode count against the requested number of episodes
  eq_comparator #(.WIDTH(CNT_WIDTH)) u_cmp_ep (.a(episode_count), .b(num_episodes), .eq(ep_done_cmp));

  // OR gates: episode result OR step limit
  assign ep_reset = obst_q | fin_q | limit_hit;

  counter #(.WIDTH(CNT_WIDTH)) u_step_cnt (
    .clk(clk), .rst_n(rst_n), .clr(active & ep_reset), .en(active), .count(step_count)
  );
  counter #(.WIDTH(CNT_WIDTH)) u_ep_cnt (
    .clk(clk), .rst_n(rst_n), .clr(1'b0), .en(active & ep_reset), .count(episode_count)
  );

  // reset mux in front of the state register
  mux2 #(.WIDTH(STATE_W)) u_state_mux (
    .sel(ep_reset), .d0(next_state), .d1('0), .y(state_d)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= '0;
      obst_q  <= 1'b0;
      fin_q   <= 1'b0;
    end else if (active) begin
      state_q <= state_d;
      obst_q  <= ~ep_reset & is_obst;
      fin_q   <= ~ep_reset & is_end;
    end
  end

  assign state     = state_q;
  assign obstacle  = obst_q;
  assign finished  = fin_q;
  assign ep_end    = active & ep_reset;
  assign ep_steps  = step_count;
  assign ep_reward = fin_q;
  always_comb begin
    if (obst_q)         ep_result = END_OBSTACLE;
    else if (fin_q)     ep_result = END_GOAL;
    else if (limit_hit) ep_result = END_LIMIT;
    else                ep_result = END_NONE;
  end

  // a position is never both an obstacle and the end
  assert property (@(posedge clk) disable iff (!rst_n) !(obst_q && fin_q));
  // the state only leaves 0 by a single move along one axis
  assert property (@(posedge clk) disable iff (!rst_n)
                   (active && !ep_reset) |=> ((state_q == $past(next_state))));
endmodule
