// qlearn_pkg: types and constants shared by the Q-learning test accelerator.
//
// The agent lives on a 4 x 4 board. A position is the pair
// (a, b): a is the row, b is the column, and the state number is 4*a + b, so
// state 0 is the start corner (a=0, b=0) and state 15 the far corner.
// Tile codes follow the original design: Start 00, Tile 01, Obstacle 10, End 11.
// Action codes follow the original design's numbering 0..3 (left, right, forward,
// backward); which coordinate each one moves is taken from the original design's
// data-flow diagrams (action 0 moves b up by one, action 2 moves a up by one),
// and the two remaining codes are taken as the opposite moves.
package qlearn_pkg;

  localparam int unsigned COORD_W = 2;   // bits per coordinate
  localparam int unsigned STATE_W = 4;   // bits of a state number (16 states)
  localparam int unsigned WORD_W  = 4;   // SRAM word width (64 x 4 SRAMs)
  localparam int unsigned CNT_W   = 8;   // episode and step counters

  typedef enum logic [1:0] {
    TILE_START    = 2'b00,
    TILE_FREE     = 2'b01,
    TILE_OBSTACLE = 2'b10,
    TILE_END      = 2'b11
  } tile_t;

  typedef enum logic [1:0] {
    ACT_LEFT     = 2'b00,   // b + 1
    ACT_RIGHT    = 2'b01,   // b - 1
    ACT_FORWARD  = 2'b10,   // a + 1
    ACT_BACKWARD = 2'b11    // a - 1
  } action_t;

  // SRAM2 word: action in the two MSBs, reward label in the rest.
  typedef struct packed {
    action_t    action;
    logic [1:0] reward;
  } act_word_t;

  // How an episode ended.
  typedef enum logic [1:0] {
    END_NONE     = 2'b00,
    END_OBSTACLE = 2'b01,
    END_GOAL     = 2'b10,
    END_LIMIT    = 2'b11
  } ep_end_t;

endpackage
