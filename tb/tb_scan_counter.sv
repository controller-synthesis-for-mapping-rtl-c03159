// tb_scan_counter: steps the ScanCounter of the (3 4)-schedule tile through
// its 27 points and checks y1, y2 (row lower bound y2 mod 3, stride 3, both
// at most 8) and the recovered j1 = (y2 - y1)/3, j2 = (y1 + 2 y2)/3; checks
// that every point is a lattice point of the tile (inside its four bounding
// inequalities), that the scan holds after the last point, that `step` low
// holds it, and that clear restarts it.
`timescale 1ns/1ps
module tb_scan_counter;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0, clear = 1'b0;
  logic [4:0] y1, y2;
  logic signed [5:0] j1, j2;
  logic last;
  always #5 clk = ~clk;

  scan_counter dut (.*);

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
    for (int rep = 0; rep < 2; rep++) begin
      int ey1, ey2, npts;
      ey1 = 0; ey2 = 0; npts = 0;
      while (1) begin
        @(negedge clk);
        step = ($urandom_range(0, 3) != 0);
        #1;
        check(int'(y1) == ey1 && int'(y2) == ey2, $sformatf("y=(%0d,%0d) expected (%0d,%0d)", y1, y2, ey1, ey2));
        check(int'(j1) == (ey2 - ey1) / 3 && int'(j2) == (ey1 + 2 * ey2) / 3,
              $sformatf("j=(%0d,%0d) at y=(%0d,%0d)", j1, j2, ey1, ey2));
        // inside the tile: -6j1+3j2 >= 0, 3j1+3j2 >= 0, 6j1-3j2 >= -26, -3j1-3j2 >= -26
        check(-6 * j1 + 3 * j2 >= 0 && 3 * j1 + 3 * j2 >= 0 &&
              6 * j1 - 3 * j2 >= -26 && -3 * j1 - 3 * j2 >= -26, "point outside the tile");
        check(last == (ey1 == 8 && ey2 == 8), "last flag");
        if (step) begin
          if (ey1 == 8 && ey2 == 8) begin
            npts++;
            break;
          end
          npts++;
          if (ey1 + 3 > 8) begin ey2++; ey1 = ey2 % 3; end
          else ey1 += 3;
        end
      end
      check(npts == 27, $sformatf("%0d points, expected 27", npts));
      @(negedge clk);
      step = 1'b1;
      #1;
      check(int'(y1) == 8 && int'(y2) == 8, "holds after the last point");
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0; step = 1'b0;
      #1;
      check(y1 == 0 && y2 == 0, "clear restarts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
