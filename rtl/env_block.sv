// env_block: the environment side of one agent step.
//
// From the current position (a, b) and the action read from the policy
// memory, add_sub_buf gives the new coordinates (a', b'). A 4-to-1 mux picks
// the row offset 0, 4, 8 or 12 for a', and a 4-bit adder adds b' to it,
// giving the new state number 4*a' + b'. That number addresses SRAM1, which
// holds the 4 x 4 grid, one tile code per word in bits [1:0]; the tile code
// of the new position leaves the block for the obstacle and end comparators.
// This structure follows the original design. Storing the tile in the low two bits
// of the 4-bit word (bits [3:2] of each SRAM1 word are left unused, which a
// lint tool reports) and the load port are this design's choices.
//
// Loading: while cfg_we is high SRAM1 takes cfg_addr / cfg_wdata on the
// rising clock edge instead of the state address. Reading is combinational:
// next_state and tile are valid in the same cycle as a, b and action.
module env_block
  import qlearn_pkg::*;
#(
  parameter int unsigned SRAM_DEPTH = 64,
  localparam int unsigned AW        = $clog2(SRAM_DEPTH)
) (
  input  logic               clk,
  input  logic [COORD_W-1:0] a,
  input  logic [COORD_W-1:0] b,
  input  action_t            action,
  input  logic               cfg_we,
  input  logic [AW-1:0]      cfg_addr,
  input  logic [WORD_W-1:0]  cfg_wdata,
  output logic [COORD_W-1:0] a_n,
  output logic [COORD_W-1:0] b_n,
  output logic [STATE_W-1:0] next_state,
  output tile_t              tile,
  output logic               blocked
);
  logic [3:0]        row_off;
  logic              unused_cout;
  logic [AW-1:0]     sram_addr;
  logic [WORD_W-1:0] sram_rdata;

  add_sub_buf u_asb (.a(a), .b(b), .action(action), .a_n(a_n), .b_n(b_n), .blocked(blocked));

  mux4to1 #(.WIDTH(4)) u_row_mux (
    .sel(a_n), .d0(4'd0), .d1(4'd4), .d2(4'd8), .d3(4'd12), .y(row_off)
  );

  adder4 u_state_add (
    .a(row_off), .b({2'b00, b_n}), .cin(1'b0), .sum(next_state), .cout(unused_cout)
  );

  assign sram_addr = cfg_we ? cfg_addr : AW'(next_state);

  sram #(.DEPTH(SRAM_DEPTH), .WIDTH(WORD_W)) u_sram1 (
    .clk(clk), .we(cfg_we), .addr(sram_addr), .wdata(cfg_wdata), .rdata(sram_rdata)
  );

  assign tile = tile_t'(sram_rdata[1:0]);
endmodule
