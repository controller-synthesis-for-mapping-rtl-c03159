// tb_ctrl_prop_reg: drives random control bundles into a 1-stage and a
// 3-stage propagation register and checks that each output equals the input
// of DELAY clocks before; also checks the reset value.
`timescale 1ns/1ps
module tb_ctrl_prop_reg;
  import mm_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  ctrl_t d, q1, q3;
  ctrl_t hist [4];
  always #5 clk = ~clk;

  ctrl_prop_reg #(.DELAY(1)) dut1 (.clk, .rst_n, .d, .q(q1));
  ctrl_prop_reg #(.DELAY(3)) dut3 (.clk, .rst_n, .d, .q(q3));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = ctrl_t'($urandom);
    @(posedge clk);
    #1;
    check(q1 == '0 && q3 == '0, "reset value");
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      d = ctrl_t'($urandom);
      @(posedge clk);
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = d;
      @(negedge clk);
      check(q1 == hist[0], $sformatf("delay 1 at %0d", n));
      if (n >= 2) check(q3 == hist[2], $sformatf("delay 3 at %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
