// tb_mux2: random 4-bit inputs; y must equal d1 when sel is high (episode
// reset forcing state 0) and d0 otherwise.
module tb_mux2;
  logic       sel;
  logic [3:0] d0, d1, y;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(4)) dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      d0 = 4'($urandom); d1 = 4'($urandom); sel = 1'($urandom);
      #1;
      checks++;
      if (y != (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0d d0=%0d d1=%0d y=%0d", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
