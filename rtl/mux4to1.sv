// mux4to1: WIDTH-bit 4-to-1 multiplexer (4 bits wide in the original design).
// y = d[sel]. In the environment block it picks the row offset 0, 4, 8 or 12
// for row a. Combinational.
module mux4to1 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [1:0]       sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [WIDTH-1:0] d3,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    unique case (sel)
      2'd0: y = d0;
      2'd1: y = d1;
      2'd2: y = d2;
      default: y = d3;
    endcase
  end
endmodule
