// tb_eq_comparator: 8-bit equality comparator. Equal pairs, pairs that
// differ in exactly one bit (each of the 8 positions) and random pairs.
module tb_eq_comparator;
  logic [7:0] a, b;
  logic       eq;
  int checks = 0, failures = 0;

  eq_comparator dut (.a(a), .b(b), .eq(eq));

  task automatic check(input logic exp);
    #1;
    checks++;
    if (eq != exp) begin
      failures++;
      $display("FAIL a=%h b=%h eq=%0d expected %0d", a, b, eq, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      a = 8'($urandom);
      b = a;              check(1'b1);
      for (int k = 0; k < 8; k++) begin
        b = a ^ (8'd1 << k); check(1'b0);
      end
      b = 8'($urandom);   check(a == b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
