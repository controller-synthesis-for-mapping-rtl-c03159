// scan_counter: ScanCounter for a parallelepiped LSGP tile (Example 3.2).
//
// The tile is scanned in the order of its loop matrix R, not lexicographically
// in (j1, j2). The counter therefore runs in the transformed, orthogonal
// domain Y = T*J: an outer loop over y2 = 0..Y2_MAX and an inner loop over
// y1 = lower(y2), lower(y2) + STRIDE, ... <= Y1_MAX, where STRIDE is the
// diagonal of the Hermite normal form of T and lower(y2) = y2 mod STRIDE
// skips the holes of the lattice. The tile coordinates are recovered with
// the inverse transformation J = T^-1 * Y, written with integer numerators
// TI and common denominator TDET:
//   j1 = (TI11*y1 + TI12*y2) / TDET,  j2 = (TI21*y1 + TI22*y2) / TDET.
// Defaults are Example 3.2: R = (-3 3; 3 6), T = (-2 1; 1 1), stride 3,
// 0 <= y1, y2 <= 8, T^-1 = (1/3)(-1 1; 1 2); the tile has 27 points.
//
// Interface: the counter moves to the next point on a clock with `step`
// high and returns to the first point on a clock with `clear` high (clear
// wins). After the last point it holds. Outputs are registered y and the
// combinational j1/j2 derived from them (signed).
// Loop structure, bounds, strides and inverse transformation follow the
// document; the lower bound y2 mod STRIDE is taken from its counter table.
module scan_counter #(
  parameter int Y1_MAX = 8,
  parameter int Y2_MAX = 8,
  parameter int STRIDE = 3,
  parameter int TI11   = -1,
  parameter int TI12   = 1,
  parameter int TI21   = 1,
  parameter int TI22   = 2,
  parameter int TDET   = 3,
  parameter int YW     = 5,    // width of y1, y2 (unsigned)
  parameter int JW     = 6     // width of j1, j2 (signed)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 step,
  input  logic                 clear,
  output logic        [YW-1:0] y1,
  output logic        [YW-1:0] y2,
  output logic signed [JW-1:0] j1,
  output logic signed [JW-1:0] j2,
  output logic                 last     // current point is the last one
);

  logic [YW-1:0] y1_next, y2_next;
  logic          y1_wrap;

  always_comb begin
    y1_wrap = (int'(y1) + STRIDE > Y1_MAX);
    last    = y1_wrap && (int'(y2) == Y2_MAX);
    y1_next = y1;
    y2_next = y2;
    if (!last) begin
      if (y1_wrap) begin
        y2_next = y2 + 1'b1;
        y1_next = YW'((int'(y2) + 1) % STRIDE);   // lower bound of the new row
      end else begin
        y1_next = YW'(int'(y1) + STRIDE);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 <= '0;
      y2 <= '0;
    end else if (clear) begin
      y1 <= '0;
      y2 <= '0;
    end else if (step) begin
      y1 <= y1_next;
      y2 <= y2_next;
    end
  end

  // inverse transformation (the divisions are exact on lattice points)
  always_comb begin
    int n1, n2;
    n1 = TI11 * int'(y1) + TI12 * int'(y2);
    n2 = TI21 * int'(y1) + TI22 * int'(y2);
    j1 = JW'(n1 / TDET);
    j2 = JW'(n2 / TDET);
  end

endmodule
