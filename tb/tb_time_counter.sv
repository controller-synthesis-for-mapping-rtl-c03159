// tb_time_counter: checks counting on ticks only, saturation at T_MAX with
// at_max, and restart on clear, against a reference count.
`timescale 1ns/1ps
module tb_time_counter;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, clear = 1'b0;
  logic [5:0] t;
  logic at_max;
  always #5 clk = ~clk;

  time_counter #(.T_MAX(32), .TW(6)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_t = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      checks++;
      if (int'(t) != ref_t || at_max != (ref_t == 32)) begin
        failures++;
        $display("FAIL: step %0d t=%0d expected %0d", n, t, ref_t);
      end
      tick  = ($urandom_range(0, 3) != 0);
      clear = (n % 50 == 49) ? 1'b1 : (tick && ref_t == 32 && $urandom_range(0, 1) == 1);
      if (clear)                  ref_t = 0;
      else if (tick && ref_t < 32) ref_t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
