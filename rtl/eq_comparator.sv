// eq_comparator: WIDTH-bit equality comparator (8 bits by default, as in the
// original design). eq is high when every bit of a matches b: the XNOR of each bit
// pair, AND-reduced. The accelerator uses one on the step count (8 bits) and
// two narrow ones on the tile code (obstacle, end). Combinational.
module eq_comparator #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             eq
);
  assign eq = &(a ~^ b);
endmodule
