// full_adder: one-bit full adder, the cell the original design builds its 2-bit and
// 4-bit adders from. sum = a ^ b ^ cin, cout = majority(a, b, cin).
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
