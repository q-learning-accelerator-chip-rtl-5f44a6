// tb_counter: 8-bit counter driven with random clear and enable for 1000
// cycles against a reference count; also runs 300 enabled cycles without
// clear to check the wrap from 255 to 0.
module tb_counter;
  logic       clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [7:0] count;
  int         model;
  int checks = 0, failures = 0;

  counter dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_check();
    @(posedge clk);
    if (!rst_n || clr) model = 0;
    else if (en)       model = (model + 1) % 256;
    #1;
    checks++;
    if (int'(count) != model) begin
      failures++;
      $display("FAIL count=%0d expected %0d", count, model);
    end
  endtask

  initial begin
    model = 0;
    step_check();
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      clr = ($urandom % 16) == 0;
      en  = ($urandom % 4) != 0;
      step_check();
    end
    clr = 1'b0; en = 1'b1;
    for (int t = 0; t < 300; t++) step_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
