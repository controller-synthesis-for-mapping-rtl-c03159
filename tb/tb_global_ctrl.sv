// tb_global_ctrl: exhaustive check of the global predicates over every
// counter value (j2 > 0, j1 > 0, l3 > 0, l3 = N-1).
`timescale 1ns/1ps
module tb_global_ctrl;
  import mm_pkg::*;
  idx_t  idx;
  gctr_t g;
  global_ctrl dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << $bits(idx_t)); v++) begin
      idx = idx_t'(v);
      #1;
      checks++;
      if (g.j2_pos  != (int'(idx.j2) > 0) || g.j1_pos != (int'(idx.j1) > 0) ||
          g.l3_pos  != (int'(idx.l3) > 0) || g.l3_last != (int'(idx.l3) == int'(N) - 1)) begin
        failures++;
        $display("FAIL: idx=%p g=%p", idx, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
