// adder2: 2-bit ripple-carry adder made of two full adders, as the original design
// describes it (inputs A, B, carry in; outputs sum and carry out). It adds 1
// to a coordinate inside add_sub_buf; the carry out marks leaving the grid.
// Purely combinational.
module adder2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       cin,
  output logic [1:0] sum,
  output logic       cout
);
  logic c1;
  full_adder u_fa0 (.a(a[0]), .b(b[0]), .cin(cin), .sum(sum[0]), .cout(c1));
  full_adder u_fa1 (.a(a[1]), .b(b[1]), .cin(c1),  .sum(sum[1]), .cout(cout));
endmodule
