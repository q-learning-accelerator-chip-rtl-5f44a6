// tb_decoder2to4: checks every input of the 2-to-4 decoder: exactly output
// bit sel is high (00 -> 0001, 11 -> 1000).
module tb_decoder2to4;
  logic [1:0] sel;
  logic [3:0] y;
  int checks = 0, failures = 0;
  localparam logic [3:0] EXP [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};

  decoder2to4 dut (.sel(sel), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      sel = 2'(i);
      #1;
      checks++;
      if (y != EXP[i]) begin
        failures++;
        $display("FAIL sel=%0d y=%b", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
