// tb_env_block: loads the 4 x 4 grid (start at state 0, obstacles at states
// 5, 7 and 12, end at state 15, free tiles elsewhere) into the environment
// SRAM, then applies every position with every action and checks the new
// coordinates, the state number 4*a' + b', the blocked flag and the tile
// code read for the new position against a reference model.
module tb_env_block;
  import qlearn_pkg::*;
  logic       clk = 1'b0;
  logic [1:0] a, b, a_n, b_n;
  action_t    action;
  logic       cfg_we = 1'b0;
  logic [5:0] cfg_addr;
  logic [3:0] cfg_wdata, next_state;
  tile_t      tile;
  logic       blocked;
  int checks = 0, failures = 0;

  env_block dut (.clk(clk), .a(a), .b(b), .action(action), .cfg_we(cfg_we),
                 .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .a_n(a_n), .b_n(b_n),
                 .next_state(next_state), .tile(tile), .blocked(blocked));

  always #5 clk = ~clk;

  function automatic tile_t grid_tile(input int s);
    case (s)
      0:          return TILE_START;
      5, 7, 12:   return TILE_OBSTACLE;
      15:         return TILE_END;
      default:    return TILE_FREE;
    endcase
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, es;
    bit eblk;
    a = '0; b = '0; action = ACT_LEFT;
    for (int s = 0; s < 16; s++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = 6'(s); cfg_wdata = {2'b00, grid_tile(s)};
    end
    @(negedge clk);
    cfg_we = 1'b0;
    for (int i = 0; i < 64; i++) begin
      {a, b} = 4'(i);
      action = action_t'(2'(i >> 4));
      ea = int'(a); eb = int'(b);
      case (int'(action))
        0: eb++;
        1: eb--;
        2: ea++;
        default: ea--;
      endcase
      eblk = (ea < 0 || ea > 3 || eb < 0 || eb > 3);
      if (eblk) begin ea = int'(a); eb = int'(b); end
      es = 4 * ea + eb;
      #1;
      checks++;
      if (int'(a_n) != ea || int'(b_n) != eb || int'(next_state) != es ||
          blocked != eblk || tile != grid_tile(es)) begin
        failures++;
        $display("FAIL a=%0d b=%0d act=%0d -> s=%0d tile=%0d blk=%0d, expected s=%0d tile=%0d blk=%0d",
                 a, b, action, next_state, tile, blocked, es, grid_tile(es), eblk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
