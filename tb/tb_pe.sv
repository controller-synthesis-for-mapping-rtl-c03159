// tb_pe: runs a border PE (0,0) and an inner PE (1,1) through two complete
// schedules, back to back, with new matrices for the second. The testbench plays the counter, the memories and the
// neighbours: memory ports carry A[2p1+j1+4l1][l3] / B[l3][2p2+j2+4l2] only
// when the PE should read them and a wrong value otherwise; the neighbour
// ports carry the correct value only at j2 = 0 (a) or j1 = 0 (b). The final
// sums must equal the reference product for the PE's 16 elements of C in each run, and
// a_out/b_out must repeat the a and b used one cycle earlier.
`timescale 1ns/1ps
module tb_pe;
  import mm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ctrl_t ctl;
  logic [DATA_W-1:0] a_mem [2], a_west [2], b_mem [2], b_north [2], a_out [2], b_out [2];
  logic              c_valid [2];
  logic [ACC_W-1:0]  c_data [2];
  logic [IW-1:0]     c_row [2], c_col [2];

  pe #(.P1(0), .P2(0)) dut00 (.clk, .rst_n, .ctl, .a_mem(a_mem[0]), .a_west(a_west[0]),
    .b_mem(b_mem[0]), .b_north(b_north[0]), .a_out(a_out[0]), .b_out(b_out[0]),
    .c_valid(c_valid[0]), .c_data(c_data[0]), .c_row(c_row[0]), .c_col(c_col[0]));
  pe #(.P1(1), .P2(1)) dut11 (.clk, .rst_n, .ctl, .a_mem(a_mem[1]), .a_west(a_west[1]),
    .b_mem(b_mem[1]), .b_north(b_north[1]), .a_out(a_out[1]), .b_out(b_out[1]),
    .c_valid(c_valid[1]), .c_data(c_data[1]), .c_row(c_row[1]), .c_col(c_col[1]));

  logic [DATA_W-1:0] A [N][N], B [N][N];

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
    int n_res [2];
    logic [DATA_W-1:0] a_prev [2], b_prev [2];
    n_res = '{0, 0};
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        A[r][c] = DATA_W'($urandom);
        B[r][c] = DATA_W'($urandom);
      end
    ctl = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // two runs: the second starts with the partial-sum store full of the
    // first run's results, so a sum that fails to restart at l3 = 0 shows
    for (int n = 0; n < 2 * int'(T_PE); n++) begin
      if (n == int'(T_PE)) begin
        for (int r = 0; r < N; r++)
          for (int c = 0; c < N; c++) begin
            A[r][c] = DATA_W'($urandom);
            B[r][c] = DATA_W'($urandom);
          end
      end
      @(negedge clk);
      ctl.en     = 1'b1;
      ctl.idx.j2 = JW'(n % 2);       ctl.idx.j1 = JW'((n / 2) % 2);
      ctl.idx.l2 = GW'((n / 4) % 2); ctl.idx.l1 = GW'((n / 8) % 2);
      ctl.idx.l3 = KW'((n / 16) % int'(N));
      ctl.g.j2_pos  = ctl.idx.j2 != 0;
      ctl.g.j1_pos  = ctl.idx.j1 != 0;
      ctl.g.l3_pos  = ctl.idx.l3 != 0;
      ctl.g.l3_last = int'(ctl.idx.l3) == int'(N) - 1;
      for (int p = 0; p < 2; p++) begin
        int row, col, k;
        row = 2 * p + int'(ctl.idx.j1) + 4 * int'(ctl.idx.l1);
        col = 2 * p + int'(ctl.idx.j2) + 4 * int'(ctl.idx.l2);
        k   = int'(ctl.idx.l3);
        // memory only when this is a first use of the value
        a_mem[p]   = (ctl.idx.j2 == 0 && ctl.idx.l2 == 0) ? A[row][k] : 16'hDEAD;
        b_mem[p]   = (ctl.idx.j1 == 0 && ctl.idx.l1 == 0) ? B[k][col] : 16'hBEEF;
        a_west[p]  = (ctl.idx.j2 == 0) ? A[row][k] : 16'h1234;
        b_north[p] = (ctl.idx.j1 == 0) ? B[k][col] : 16'h4321;
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        if (n > 0) check(a_out[p] == a_prev[p] && b_out[p] == b_prev[p],
                         $sformatf("PE%0d link registers at step %0d", p, n));
        a_prev[p] = A[2 * p + int'(ctl.idx.j1) + 4 * int'(ctl.idx.l1)][ctl.idx.l3];
        b_prev[p] = B[ctl.idx.l3][2 * p + int'(ctl.idx.j2) + 4 * int'(ctl.idx.l2)];
        if (c_valid[p]) begin
          logic [ACC_W-1:0] exp_c;
          int r, c;
          r = int'(c_row[p]); c = int'(c_col[p]);
          check(r == 2 * p + int'(ctl.idx.j1) + 4 * int'(ctl.idx.l1) &&
                c == 2 * p + int'(ctl.idx.j2) + 4 * int'(ctl.idx.l2),
                $sformatf("PE%0d output index (%0d,%0d)", p, r, c));
          exp_c = '0;
          for (int k = 0; k < N; k++) exp_c += ACC_W'(A[r][k]) * ACC_W'(B[k][c]);
          check(c_data[p] == exp_c, $sformatf("PE%0d C[%0d][%0d]=%0d expected %0d", p, r, c, c_data[p], exp_c));
          n_res[p]++;
        end
      end
    end
    @(negedge clk);
    ctl.en = 1'b0;
    check(n_res[0] == 32 && n_res[1] == 32, $sformatf("result counts %0d %0d", n_res[0], n_res[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
