// tb_sram: 64 x 4 single-port SRAM. Writes every word with random data,
// reads all back, then mixes random writes and reads against a reference
// array. A write becomes readable after the clock edge that takes it.
module tb_sram;
  logic       clk = 1'b0, we = 1'b0;
  logic [5:0] addr;
  logic [3:0] wdata, rdata;
  logic [3:0] model [64];
  int checks = 0, failures = 0;

  sram dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input logic [5:0] ad, input logic [3:0] d);
    @(negedge clk);
    we = 1'b1; addr = ad; wdata = d;
    @(negedge clk);
    we = 1'b0;
    model[ad] = d;
  endtask

  task automatic read_check(input logic [5:0] ad);
    @(negedge clk);
    addr = ad;
    #1;
    checks++;
    if (rdata != model[ad]) begin
      failures++;
      $display("FAIL addr=%0d rdata=%h expected %h", ad, rdata, model[ad]);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) write(6'(i), 4'($urandom));
    for (int i = 0; i < 64; i++) read_check(6'(i));
    for (int t = 0; t < 400; t++) begin
      if ($urandom % 2) write(6'($urandom), 4'($urandom));
      else              read_check(6'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
