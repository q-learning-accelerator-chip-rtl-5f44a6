// tb_subtractor2: exhaustive check of the 2-bit subtractor (32 input sets):
// a - b - bin must equal diff - 4*bout.
module tb_subtractor2;
  logic [1:0] a, b, diff;
  logic       bin, bout;
  int checks = 0, failures = 0;

  subtractor2 dut (.a(a), .b(b), .bin(bin), .diff(diff), .bout(bout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {a, b, bin} = 5'(i);
      #1;
      checks++;
      if (int'(a) - int'(b) - int'(bin) != int'(diff) - 4 * int'(bout)) begin
        failures++;
        $display("FAIL %0d-%0d-%0d -> bout=%0d diff=%0d", a, b, bin, bout, diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
