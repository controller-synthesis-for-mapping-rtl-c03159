// tb_mm_array: the processor array alone. Three runs with random matrices
// (the last one with full-scale 16-bit values): every element of C must
// equal the reference product, appear once, come from the PE that owns its
// LS tile, and appear at its scheduled time step
// t = 2j1 + j2 + p1 + p2 + 8l1 + 4l2 + 16*7 + 1; `done` must come at time
// step 130 and `busy` must cover the run. PE(p) must start exactly p1 + p2
// cycles after PE(0,0) (control propagation delay).
`timescale 1ns/1ps
module tb_mm_array;
  import mm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start, busy, done;
  logic              a_we, b_we;
  logic [AW-1:0]     a_waddr, b_waddr;
  logic [DATA_W-1:0] a_wdata, b_wdata;
  logic              c_valid [PA][PA];
  logic [ACC_W-1:0]  c_data  [PA][PA];
  logic [IW-1:0]     c_row   [PA][PA];
  logic [IW-1:0]     c_col   [PA][PA];

  mm_array dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] A [N][N], B [N][N];
  logic [ACC_W-1:0]  C_ref [N][N];
  int                seen [N][N];
  int                first_en [PA][PA];

  task automatic run_once(input int mode);
    int cyc;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        A[r][c] = (mode == 2) ? DATA_W'($urandom) : DATA_W'($urandom_range(0, 255));
        B[r][c] = (mode == 2) ? DATA_W'($urandom) : DATA_W'($urandom_range(0, 255));
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        C_ref[r][c] = '0;
        for (int k = 0; k < N; k++) C_ref[r][c] += ACC_W'(A[r][k]) * ACC_W'(B[k][c]);
        seen[r][c] = 0;
      end
    for (int i = 0; i < int'(N * N); i++) begin
      @(negedge clk);
      a_we = 1'b1; a_waddr = AW'(i); a_wdata = A[i / N][i % N];
      b_we = 1'b1; b_waddr = AW'(i); b_wdata = B[i / N][i % N];
    end
    @(negedge clk);
    a_we = 1'b0; b_we = 1'b0; start = 1'b1;
    for (int p1 = 0; p1 < PA; p1++)
      for (int p2 = 0; p2 < PA; p2++) first_en[p1][p2] = -1;
    cyc = 0;   // time step of the period now starting
    @(negedge clk);
    start = 1'b0;
    while (1) begin
      cyc++;
      #1;
      check(busy, $sformatf("busy at t=%0d", cyc));
      if (first_en[0][0] < 0 && dut.ctl[0][0].en) first_en[0][0] = cyc;
      if (first_en[0][1] < 0 && dut.ctl[0][1].en) first_en[0][1] = cyc;
      if (first_en[1][0] < 0 && dut.ctl[1][0].en) first_en[1][0] = cyc;
      if (first_en[1][1] < 0 && dut.ctl[1][1].en) first_en[1][1] = cyc;
      for (int p1 = 0; p1 < PA; p1++)
        for (int p2 = 0; p2 < PA; p2++)
          if (c_valid[p1][p2]) begin
            int r, c, t_exp;
            r = int'(c_row[p1][p2]); c = int'(c_col[p1][p2]);
            check(c_data[p1][p2] == C_ref[r][c],
                  $sformatf("C[%0d][%0d]=%0d expected %0d", r, c, c_data[p1][p2], C_ref[r][c]));
            check((r / 2) % 2 == p1 && (c / 2) % 2 == p2, $sformatf("C[%0d][%0d] owner", r, c));
            t_exp = 2 * (r % 2) + (c % 2) + p1 + p2 + 8 * (r / 4) + 4 * (c / 4) + 16 * 7 + 1;
            check(cyc == t_exp, $sformatf("C[%0d][%0d] at t=%0d expected %0d", r, c, cyc, t_exp));
            seen[r][c]++;
          end
      if (done) break;
      @(negedge clk);
    end
    check(cyc == 130, $sformatf("done at t=%0d, expected 130", cyc));
    for (int p1 = 0; p1 < PA; p1++)
      for (int p2 = 0; p2 < PA; p2++)
        check(first_en[p1][p2] == 1 + p1 + p2, $sformatf("PE(%0d,%0d) starts at t=%0d", p1, p2, first_en[p1][p2]));
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        check(seen[r][c] == 1, $sformatf("C[%0d][%0d] seen %0d times", r, c, seen[r][c]));
    @(negedge clk);
    check(!busy, "busy cleared");
  endtask

  initial begin
    start = 1'b0; a_we = 1'b0; b_we = 1'b0;
    a_waddr = '0; b_waddr = '0; a_wdata = '0; b_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 3; m++) run_once(m);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
