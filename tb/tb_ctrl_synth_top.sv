// tb_ctrl_synth_top: end-to-end test of the top level at default sizes.
//
// Matrix array: loads random 8 x 8 matrices A and B, starts a run and checks
// every element of C against a reference product computed here, that each
// element appears exactly once, at the time step the schedule assigns to it
// (t = 2j1 + j2 + p1 + p2 + 8l1 + 4l2 + 16*7 + 1 after start), and that
// `done` comes with time step 130. Two runs are made, the second with new data
// and maximal element values (wide products). It counts how often each input
// source of a and b (own register, neighbour, long delay line, memory), the
// accumulation and the result output are used, and fails if one never is.
// Tile counter: runs two tile periods and compares every step with the
// expected counter table (schedule (3 4), stalls at t = 3, 7, 14, 18, 25, 29,
// Reset at t = 32), counting stalls and resets.
`timescale 1ns/1ps
module tb_ctrl_synth_top;
  import mm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              mm_start, mm_busy, mm_done;
  logic              mm_a_we, mm_b_we;
  logic [AW-1:0]     mm_a_waddr, mm_b_waddr;
  logic [DATA_W-1:0] mm_a_wdata, mm_b_wdata;
  logic              mm_c_valid [PA][PA];
  logic [ACC_W-1:0]  mm_c_data  [PA][PA];
  logic [IW-1:0]     mm_c_row   [PA][PA];
  logic [IW-1:0]     mm_c_col   [PA][PA];
  logic              sc_run, sc_enable, sc_reset;
  logic [5:0]        sc_t;
  logic [4:0]        sc_y1, sc_y2;
  logic signed [5:0] sc_j1, sc_j2;
  logic signed [6:0] sc_s;

  ctrl_synth_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters (probing the PEs' selects)
  int n_sel_a [4], n_sel_b [4], n_acc, n_out;
  always @(posedge clk) begin
    if (dut.u_mm.g_pe_row[0].g_pe_col[0].u_pe.ctl.en) begin
      n_sel_a[dut.u_mm.g_pe_row[0].g_pe_col[0].u_pe.sel_a]++;
      n_sel_b[dut.u_mm.g_pe_row[0].g_pe_col[0].u_pe.sel_b]++;
      if (dut.u_mm.g_pe_row[0].g_pe_col[0].u_pe.acc) n_acc++;
    end
    if (dut.u_mm.g_pe_row[1].g_pe_col[1].u_pe.ctl.en) begin
      n_sel_a[dut.u_mm.g_pe_row[1].g_pe_col[1].u_pe.sel_a]++;
      n_sel_b[dut.u_mm.g_pe_row[1].g_pe_col[1].u_pe.sel_b]++;
    end
  end

  // ---------------- matrix array test
  logic [DATA_W-1:0] A [N][N], B [N][N];
  logic [ACC_W-1:0]  C_ref [N][N];
  int                seen [N][N];
  int                cyc;   // clock edges since the edge that sampled start;
                            // the period after edge cyc is time step cyc + 1

  task automatic load_and_run(input bit maxval);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        A[r][c] = maxval ? DATA_W'(16'hFFFF - 16'(r)) : DATA_W'($urandom_range(0, 1000));
        B[r][c] = maxval ? DATA_W'(16'hFFFF - 16'(c)) : DATA_W'($urandom_range(0, 1000));
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        logic [ACC_W-1:0] acc;
        acc = '0;
        for (int k = 0; k < N; k++) acc += ACC_W'(A[r][k]) * ACC_W'(B[k][c]);
        C_ref[r][c] = acc;
        seen[r][c]  = 0;
      end
    // load through the write ports
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        mm_a_we = 1'b1; mm_a_waddr = AW'(r * N + c); mm_a_wdata = A[r][c];
        mm_b_we = 1'b1; mm_b_waddr = AW'(r * N + c); mm_b_wdata = B[r][c];
      end
    @(negedge clk);
    mm_a_we = 1'b0; mm_b_we = 1'b0;
    mm_start = 1'b1;
    @(posedge clk);
    cyc = 0;
    @(negedge clk);
    mm_start = 1'b0;
    check(mm_busy, "busy after start");
    // collect results until done
    while (1) begin
      @(posedge clk);
      cyc++;
      #1;
      for (int p1 = 0; p1 < PA; p1++)
        for (int p2 = 0; p2 < PA; p2++)
          if (mm_c_valid[p1][p2]) begin
            int r, c, j1, j2, l1, l2, t_exp;
            r = int'(mm_c_row[p1][p2]);
            c = int'(mm_c_col[p1][p2]);
            n_out++;
            check(mm_c_data[p1][p2] == C_ref[r][c],
                  $sformatf("C[%0d][%0d] = %0d, expected %0d", r, c, mm_c_data[p1][p2], C_ref[r][c]));
            // ownership and timing of the element
            j1 = r % LS; l1 = r / (LS * PA);
            j2 = c % LS; l2 = c / (LS * PA);
            check((r / LS) % PA == p1 && (c / LS) % PA == p2,
                  $sformatf("C[%0d][%0d] from wrong PE (%0d,%0d)", r, c, p1, p2));
            t_exp = LS * j1 + j2 + p1 + p2 + LAM_L1 * l1 + LAM_L2 * l2 + LAM_L3 * (N - 1) + 1;
            check(cyc + 1 == t_exp, $sformatf("C[%0d][%0d] at t=%0d, expected %0d", r, c, cyc + 1, t_exp));
            seen[r][c]++;
          end
      if (mm_done) break;
    end
    check(cyc + 1 == T_PE + 2 * (PA - 1), $sformatf("done at t=%0d, expected %0d", cyc + 1, T_PE + 2 * (PA - 1)));
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        check(seen[r][c] == 1, $sformatf("C[%0d][%0d] seen %0d times", r, c, seen[r][c]));
    @(posedge clk); #1;
    check(!mm_busy, "busy cleared after done");
  endtask

  // ---------------- tile counter expected table (schedule (3 4))
  // expected point for each enabled step, and the stall steps
  function automatic bit is_stall(int t);
    return t == 3 || t == 7 || t == 14 || t == 18 || t == 25 || t == 29;
  endfunction

  int n_stall, n_reset;

  task automatic run_tile_counter();
    int exp_y1, exp_y2;
    @(negedge clk);
    sc_run = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      exp_y1 = 0; exp_y2 = 0;
      for (int t = 0; t <= 32; t++) begin
        #1;
        check(int'(sc_t) == t, $sformatf("tile counter t=%0d expected %0d", sc_t, t));
        check(sc_enable == !is_stall(t), $sformatf("enable at t=%0d", t));
        check(sc_reset == (t == 32), $sformatf("reset at t=%0d", t));
        if (!sc_enable) n_stall++;
        if (sc_reset) n_reset++;
        if (sc_enable) begin
          int ej1, ej2;
          ej1 = (exp_y2 - exp_y1) / 3;
          ej2 = (exp_y1 + 2 * exp_y2) / 3;
          check(int'(sc_y1) == exp_y1 && int'(sc_y2) == exp_y2,
                $sformatf("t=%0d y=(%0d,%0d) expected (%0d,%0d)", t, sc_y1, sc_y2, exp_y1, exp_y2));
          check(int'(sc_j1) == ej1 && int'(sc_j2) == ej2 && int'(sc_s) == t,
                $sformatf("t=%0d j=(%0d,%0d) s=%0d", t, sc_j1, sc_j2, sc_s));
          // next point of the expected scan
          if (exp_y1 + 3 > 8) begin exp_y2++; exp_y1 = exp_y2 % 3; end
          else exp_y1 += 3;
        end
        @(negedge clk);
      end
    end
    sc_run = 1'b0;
  endtask

  initial begin
    mm_start = 1'b0; mm_a_we = 1'b0; mm_b_we = 1'b0;
    mm_a_waddr = '0; mm_b_waddr = '0; mm_a_wdata = '0; mm_b_wdata = '0;
    sc_run = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        load_and_run(1'b0);
        load_and_run(1'b1);
      end
      run_tile_counter();
    join
    // every mechanism must have happened
    check(n_sel_a[SEL_SELF] > 0,  "a reuse from own register never used");
    check(n_sel_a[SEL_NEIGH] > 0, "a from neighbour never used");
    check(n_sel_a[SEL_FIFO] > 0,  "a from long delay line never used");
    check(n_sel_a[SEL_MEM] > 0,   "a from memory never used");
    check(n_sel_b[SEL_SELF] > 0,  "b reuse from own registers never used");
    check(n_sel_b[SEL_NEIGH] > 0, "b from neighbour never used");
    check(n_sel_b[SEL_FIFO] > 0,  "b from long delay line never used");
    check(n_sel_b[SEL_MEM] > 0,   "b from memory never used");
    check(n_acc > 0, "accumulation never happened");
    check(n_out == 2 * N * N, $sformatf("%0d results, expected %0d", n_out, 2 * N * N));
    check(n_stall == 12, $sformatf("%0d stalls, expected 12", n_stall));
    check(n_reset == 2, $sformatf("%0d resets, expected 2", n_reset));
    $display("mechanisms: a sel %0d/%0d/%0d/%0d b sel %0d/%0d/%0d/%0d acc %0d out %0d stall %0d reset %0d",
             n_sel_a[0], n_sel_a[1], n_sel_a[2], n_sel_a[3], n_sel_b[0], n_sel_b[1], n_sel_b[2], n_sel_b[3],
             n_acc, n_out, n_stall, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
