// tb_addr_gen: exhaustive check of the A and B address generators of every
// border PE against the index expressions A[2p1+j1+4l1][l3] and
// B[l3][2p2+j2+4l2] (address = row*N + col).
`timescale 1ns/1ps
module tb_addr_gen;
  import mm_pkg::*;
  idx_t idx;
  logic [AW-1:0] a0, a1, b0, b1;
  addr_gen #(.IS_B(1'b0), .P(0)) ga0 (.idx, .addr(a0));
  addr_gen #(.IS_B(1'b0), .P(1)) ga1 (.idx, .addr(a1));
  addr_gen #(.IS_B(1'b1), .P(0)) gb0 (.idx, .addr(b0));
  addr_gen #(.IS_B(1'b1), .P(1)) gb1 (.idx, .addr(b1));

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << $bits(idx_t)); v++) begin
      int ea [2], eb [2];
      idx = idx_t'(v);
      #1;
      for (int p = 0; p < 2; p++) begin
        ea[p] = (2 * p + int'(idx.j1) + 4 * int'(idx.l1)) * 8 + int'(idx.l3);
        eb[p] = int'(idx.l3) * 8 + 2 * p + int'(idx.j2) + 4 * int'(idx.l2);
      end
      checks++;
      if (int'(a0) != ea[0] || int'(a1) != ea[1] || int'(b0) != eb[0] || int'(b1) != eb[1]) begin
        failures++;
        $display("FAIL: idx=%p a=%0d,%0d b=%0d,%0d", idx, a0, a1, b0, b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
