// sram: DEPTH x WIDTH single-port static RAM, 64 x 4 bits by default as the
// original design's two SRAMs. One address serves both operations, like the single
// read/write pin of the chip: with we high the word at addr is written on
// the rising clock edge; the word at addr is always readable
// combinationally on rdata, so a read completes inside the cycle that
// presents the address. Contents are not reset (volatile memory) and must be
// written before use. Combinational read and the write timing are this
// design's choices; the original design gives only size and use.
module sram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
