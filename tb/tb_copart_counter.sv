// tb_copart_counter: checks the global counter's scan order, run length,
// `last` strobe and that a start while running is ignored.
// Expected values: step n of a run is j2 = n mod 2, j1 = n/2 mod 2,
// l2 = n/4 mod 2, l1 = n/8 mod 2, l3 = n/16 (the schedule's digit weights).
`timescale 1ns/1ps
module tb_copart_counter;
  import mm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic en, last;
  idx_t idx;
  always #5 clk = ~clk;

  copart_counter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!en, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int n = 0; n < int'(T_PE); n++) begin
        check(en, $sformatf("en at step %0d", n));
        check(int'(idx.j2) == n % 2 && int'(idx.j1) == (n / 2) % 2 &&
              int'(idx.l2) == (n / 4) % 2 && int'(idx.l1) == (n / 8) % 2 &&
              int'(idx.l3) == n / 16, $sformatf("index at step %0d: %p", n, idx));
        check(last == (n == int'(T_PE) - 1), $sformatf("last at step %0d", n));
        if (n == 40) start = 1'b1;   // ignored while running
        @(negedge clk);
        start = 1'b0;
      end
      check(!en, "en low after the run");
      repeat (3) @(negedge clk);
      check(!en, "stays idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
