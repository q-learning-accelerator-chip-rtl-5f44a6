// mux2: WIDTH-bit 2-to-1 multiplexer, y = sel ? d1 : d0. At the top of the
// accelerator it replaces the next state by 0 when an episode is reset.
// Combinational.
module mux2 #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  output logic [WIDTH-1:0] y
);
  assign y = sel ? d1 : d0;
endmodule
