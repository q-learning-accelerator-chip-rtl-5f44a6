// subtractor2: 2-bit ripple-borrow subtractor of two full subtractors,
// diff = a - b - bin. It subtracts 1 from a coordinate inside add_sub_buf;
// the borrow out marks an attempt to leave the grid. Combinational.
module subtractor2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       bin,
  output logic [1:0] diff,
  output logic       bout
);
  logic b1;
  full_subtractor u_fs0 (.a(a[0]), .b(b[0]), .bin(bin), .diff(diff[0]), .bout(b1));
  full_subtractor u_fs1 (.a(a[1]), .b(b[1]), .bin(b1),  .diff(diff[1]), .bout(bout));
endmodule
