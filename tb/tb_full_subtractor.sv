// tb_full_subtractor: exhaustive check of the 1-bit full subtractor: the
// pair {bout, diff} read as a two's-complement borrow must give
// a - b - bin = diff - 2*bout for all eight input sets.
module tb_full_subtractor;
  logic a, b, bin, diff, bout;
  int checks = 0, failures = 0;

  full_subtractor dut (.a(a), .b(b), .bin(bin), .diff(diff), .bout(bout));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, bin} = 3'(i);
      #1;
      checks++;
      if (int'(a) - int'(b) - int'(bin) != int'(diff) - 2 * int'(bout)) begin
        failures++;
        $display("FAIL a=%0d b=%0d bin=%0d -> bout=%0d diff=%0d", a, b, bin, bout, diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
