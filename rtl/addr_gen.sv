// addr_gen: address generator of a matrix memory for one border PE.
//
// For matrix A and PE(P, 0) the element read is A[LS*P + j1 + LS*PA*l1][l3];
// for matrix B and PE(0, P) it is B[l3][LS*P + j2 + LS*PA*l2] (the input
// cases of the a and b recurrences). The address is row*N + col, computed
// combinationally from the counter values the PE receives, so it is aligned
// with the PE's own point in time.
// The index expressions follow the document; the linear address layout is
// this design's choice.
module addr_gen
  import mm_pkg::*;
#(
  parameter bit          IS_B = 1'b0,   // 0: matrix A, 1: matrix B
  parameter int unsigned P    = 0       // p1 (matrix A) or p2 (matrix B)
) (
  input  idx_t          idx,
  output logic [AW-1:0] addr
);

  logic [IW-1:0] row, col;

  always_comb begin
    if (!IS_B) begin
      row = IW'(LS * P) + IW'(idx.j1) + IW'(LS * PA) * IW'(idx.l1);
      col = IW'(idx.l3);
    end else begin
      row = IW'(idx.l3);
      col = IW'(LS * P) + IW'(idx.j2) + IW'(LS * PA) * IW'(idx.l2);
    end
    addr = AW'(row) * AW'(N) + AW'(col);
  end

endmodule
