// add_sub_buf: coordinate update of one agent move (the ADD/SUB/BUF block).
//
// The action is decoded to four one-hot move lines. Each line enables one of
// four 2-bit units working in parallel: b + 1 (action 0), b - 1 (action 1),
// a + 1 (action 2) and a - 1 (action 3). A coordinate that the action does
// not touch passes straight through (the original design balances this path with a
// delay buffer; in synchronous logic the plain wire does the same job).
// The decoder, adders, subtractors and pass path follow the original design; the
// direction each code moves comes from its data-flow diagrams. The original design
// states that a move into the grid boundary is not carried out; here that is
// done with the carry / borrow out of the 2-bit units: on overflow both
// coordinates stay unchanged and 'blocked' is raised. That use of the carry
// is this design's choice.
//
// Purely combinational: a_n, b_n and blocked follow a, b, action in the same
// cycle.
module add_sub_buf
  import qlearn_pkg::*;
(
  input  logic [COORD_W-1:0] a,
  input  logic [COORD_W-1:0] b,
  input  action_t            action,
  output logic [COORD_W-1:0] a_n,
  output logic [COORD_W-1:0] b_n,
  output logic               blocked
);
  logic [3:0] mv;             // one-hot move lines
  logic [1:0] a_inc, b_inc, a_dec, b_dec;
  logic       a_inc_c, b_inc_c, a_dec_b, b_dec_b;

  decoder2to4 u_dec (.sel(action), .y(mv));

  adder2      u_b_inc (.a(b), .b(2'd1), .cin(1'b0), .sum(b_inc),  .cout(b_inc_c));
  subtractor2 u_b_dec (.a(b), .b(2'd1), .bin(1'b0), .diff(b_dec), .bout(b_dec_b));
  adder2      u_a_inc (.a(a), .b(2'd1), .cin(1'b0), .sum(a_inc),  .cout(a_inc_c));
  subtractor2 u_a_dec (.a(a), .b(2'd1), .bin(1'b0), .diff(a_dec), .bout(a_dec_b));

  always_comb begin
    blocked = (mv[0] & b_inc_c) | (mv[1] & b_dec_b) |
              (mv[2] & a_inc_c) | (mv[3] & a_dec_b);
    a_n = a;
    b_n = b;
    if (!blocked) begin
      if (mv[0]) b_n = b_inc;
      if (mv[1]) b_n = b_dec;
      if (mv[2]) a_n = a_inc;
      if (mv[3]) a_n = a_dec;
    end
  end
endmodule
