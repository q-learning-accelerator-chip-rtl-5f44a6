// tb_adder4: exhaustive check of the 4-bit adder (512 input sets) against
// integer addition, and of the row-offset use: 4*a + b for every grid cell.
module tb_adder4;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  adder4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {a, b, cin} = 9'(i);
      #1;
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d", a, b, cin, {cout, sum});
      end
    end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        a = 4'(4 * r); b = 4'(c); cin = 1'b0;
        #1;
        checks++;
        if (int'(sum) != 4 * r + c || cout) begin
          failures++;
          $display("FAIL cell (%0d,%0d) -> %0d", r, c, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
