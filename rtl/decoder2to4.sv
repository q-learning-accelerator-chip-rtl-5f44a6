// decoder2to4: 2-to-4 one-hot decoder. Input 00 gives 0001 and input 11 gives
// 1000, as in the original design; y[i] is high exactly when sel == i. It turns the
// action code into the four move-enable lines of add_sub_buf. Combinational.
module decoder2to4 (
  input  logic [1:0] sel,
  output logic [3:0] y
);
  always_comb begin
    y = '0;
    y[sel] = 1'b1;
  end
endmodule
