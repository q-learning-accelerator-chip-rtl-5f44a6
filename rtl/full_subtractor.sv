// full_subtractor: one-bit full subtractor, the cell of the 2-bit subtractor
// used in the coordinate update. diff = a ^ b ^ bin; a borrow goes out when
// a < b + bin. Purely combinational.
module full_subtractor (
  input  logic a,
  input  logic b,
  input  logic bin,
  output logic diff,
  output logic bout
);
  always_comb begin
    diff = a ^ b ^ bin;
    bout = (~a & b) | (~a & bin) | (b & bin);
  end
endmodule
