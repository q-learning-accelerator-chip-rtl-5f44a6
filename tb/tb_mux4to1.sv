// tb_mux4to1: random data on the four 4-bit inputs; for each select value
// the output must equal the selected input. Also the fixed use 0/4/8/12.
module tb_mux4to1;
  logic [1:0] sel;
  logic [3:0] d [4];
  logic [3:0] y;
  int checks = 0, failures = 0;

  mux4to1 #(.WIDTH(4)) dut (.sel(sel), .d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 4; k++) d[k] = 4'($urandom);
      if (t == 0) begin d[0] = 4'd0; d[1] = 4'd4; d[2] = 4'd8; d[3] = 4'd12; end
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        checks++;
        if (y != d[s]) begin
          failures++;
          $display("FAIL sel=%0d y=%0d expected %0d", s, y, d[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
