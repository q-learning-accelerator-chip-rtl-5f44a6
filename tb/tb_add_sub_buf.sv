// tb_add_sub_buf: every position (a, b) of the 4 x 4 grid with every action.
// Reference moves: action 0 b+1, action 1 b-1, action 2 a+1, action 3 a-1;
// a move that would leave the grid keeps both coordinates and sets blocked.
module tb_add_sub_buf;
  import qlearn_pkg::*;
  logic [1:0] a, b, a_n, b_n;
  action_t    action;
  logic       blocked;
  int checks = 0, failures = 0;

  add_sub_buf dut (.a(a), .b(b), .action(action), .a_n(a_n), .b_n(b_n), .blocked(blocked));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    bit eblk;
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
      #1;
      checks++;
      if (int'(a_n) != ea || int'(b_n) != eb || blocked != eblk) begin
        failures++;
        $display("FAIL a=%0d b=%0d act=%0d -> (%0d,%0d) blk=%0d, expected (%0d,%0d) blk=%0d",
                 a, b, action, a_n, b_n, blocked, ea, eb, eblk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
