// tb_matrix_mem: writes a random matrix through the write port and reads
// every element back through both read ports, in random order.
`timescale 1ns/1ps
module tb_matrix_mem;
  import mm_pkg::*;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0]     waddr = '0;
  logic [DATA_W-1:0] wdata = '0;
  logic [AW-1:0]     raddr [2];
  logic [DATA_W-1:0] rdata [2];
  logic [DATA_W-1:0] ref_m [N*N];
  always #5 clk = ~clk;

  matrix_mem #(.NRD(2)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(N * N); i++) begin
      @(negedge clk);
      ref_m[i] = DATA_W'($urandom);
      we = 1'b1; waddr = AW'(i); wdata = ref_m[i];
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 300; n++) begin
      raddr[0] = AW'($urandom_range(0, N * N - 1));
      raddr[1] = AW'($urandom_range(0, N * N - 1));
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rdata[p] != ref_m[raddr[p]]) begin
          failures++;
          $display("FAIL: port %0d addr %0d read %h expected %h", p, raddr[p], rdata[p], ref_m[raddr[p]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
