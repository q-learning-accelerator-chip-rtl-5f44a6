// counter: WIDTH-bit synchronous up counter (8 bits by default, as the
// original design's episode and step counters). On a rising clock edge: rst_n low or
// clr high load 0 (clr wins over en), otherwise en high adds 1, wrapping at
// 2**WIDTH. The count is a register output, valid one cycle after the edge.
// The synchronous clear and the enable are this design's choices.
module counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk) begin
    if (!rst_n || clr) count <= '0;
    else if (en)       count <= count + 1'b1;
  end
endmodule
