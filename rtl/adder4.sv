// adder4: 4-bit ripple-carry adder made of four full adders. In the
// environment block it adds the row offset (0, 4, 8 or 12) chosen by the
// multiplexer to the column b, which forms the state number 4*a + b.
// Purely combinational.
module adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  logic [4:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[4];
endmodule
