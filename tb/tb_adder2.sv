// tb_adder2: exhaustive check of the 2-bit adder (32 input sets) against
// integer addition, plus the two worked examples: 01 + 10 + 0 = 11 carry 0,
// and 01 + 10 + 1 = 00 carry 1.
module tb_adder2;
  logic [1:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0;

  adder2 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {a, b, cin} = 5'(i);
      #1;
      expect_eq(int'({cout, sum}), int'(a) + int'(b) + int'(cin), $sformatf("%0d+%0d+%0d", a, b, cin));
    end
    a = 2'b01; b = 2'b10; cin = 1'b0; #1;
    expect_eq(int'(sum), 3, "example sum"); expect_eq(int'(cout), 0, "example cout");
    cin = 1'b1; #1;
    expect_eq(int'(sum), 0, "example sum with carry"); expect_eq(int'(cout), 1, "example cout with carry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
