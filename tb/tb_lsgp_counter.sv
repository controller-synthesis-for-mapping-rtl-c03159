// tb_lsgp_counter: compares the counter with enable mechanism step by step
// with its expected table for the tile of schedule vector (3 4): t, y1, y2,
// j1, j2, s on the 27 enabled steps, Enable low exactly at t = 3, 7, 14, 18,
// 25, 29 and Reset at t = 32, over three tile periods; checks that the scan
// repeats after Reset and that `run` low holds everything at the start.
// A second instance with DELTA = 2 must produce the same sequence with every
// time step lasting two clocks.
`timescale 1ns/1ps
module tb_lsgp_counter;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  always #5 clk = ~clk;

  logic [5:0] t [2];
  logic [4:0] y1 [2], y2 [2];
  logic signed [5:0] j1 [2], j2 [2];
  logic signed [6:0] s [2];
  logic enable [2], reset [2];

  lsgp_counter #(.DELTA(1)) dut1 (.clk, .rst_n, .run, .t(t[0]), .y1(y1[0]), .y2(y2[0]),
    .j1(j1[0]), .j2(j2[0]), .s(s[0]), .enable(enable[0]), .reset(reset[0]));
  lsgp_counter #(.DELTA(2)) dut2 (.clk, .rst_n, .run, .t(t[1]), .y1(y1[1]), .y2(y2[1]),
    .j1(j1[1]), .j2(j2[1]), .s(s[1]), .enable(enable[1]), .reset(reset[1]));

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

  function automatic bit is_stall(int tt);
    return tt == 3 || tt == 7 || tt == 14 || tt == 18 || tt == 25 || tt == 29;
  endfunction

  // one DUT: i = 0 (DELTA 1) or 1 (DELTA 2)
  task automatic follow(int i, int periods);
    int ey1, ey2, nst;
    nst = 0;
    for (int rep = 0; rep < periods; rep++) begin
      ey1 = 0; ey2 = 0;
      for (int tt = 0; tt <= 32; tt++) begin
        for (int d = 0; d <= i; d++) begin
          #1;
          check(int'(t[i]) == tt, $sformatf("dut%0d t=%0d expected %0d", i, t[i], tt));
          check(enable[i] == !is_stall(tt), $sformatf("dut%0d enable at t=%0d", i, tt));
          check(reset[i] == (tt == 32), $sformatf("dut%0d reset at t=%0d", i, tt));
          if (!is_stall(tt)) begin
            check(int'(y1[i]) == ey1 && int'(y2[i]) == ey2 && int'(s[i]) == tt &&
                  int'(j1[i]) == (ey2 - ey1) / 3 && int'(j2[i]) == (ey1 + 2 * ey2) / 3,
                  $sformatf("dut%0d point at t=%0d: y=(%0d,%0d) j=(%0d,%0d) s=%0d", i, tt,
                            y1[i], y2[i], j1[i], j2[i], s[i]));
          end else begin
            nst++;
            check(int'(s[i]) > tt, $sformatf("dut%0d stall at t=%0d with s=%0d", i, tt, s[i]));
          end
          @(negedge clk);
        end
        if (!is_stall(tt)) begin
          if (ey1 + 3 > 8) begin ey2++; ey1 = ey2 % 3; end
          else ey1 += 3;
        end
      end
    end
    check(nst == 6 * periods * (i + 1), $sformatf("dut%0d stall count %0d", i, nst));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    repeat (3) @(negedge clk);
    #1;
    check(t[0] == 0 && y1[0] == 0 && y2[0] == 0 && !enable[0] && !reset[0], "held while run is low");
    @(negedge clk);
    run = 1'b1;
    fork
      follow(0, 3);
      follow(1, 1);
    join
    run = 1'b0;
    @(negedge clk);
    #1;
    check(t[0] == 0 && t[1] == 0 && y2[0] == 0, "back to start when run drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
