// global_ctrl: global controller of the co-partitioned array.
//
// Evaluates, once for the whole array, the iteration conditionals that do
// not depend on the processor index (type G): j2 > 0 and j1 > 0 (reuse of a
// and b inside an LS tile), l3 > 0 (accumulate onto the partial sum of the
// previous k) and l3 = N-1 (the sum is final and is output). It is purely
// combinational; its outputs travel through the array together with the
// counter values, so every PE sees them aligned with its own J and L.
// Which predicates are global follows the document's split (no processor
// term, A_K = 0); the register-free form is this design's choice.
module global_ctrl
  import mm_pkg::*;
(
  input  idx_t  idx,
  output gctr_t g
);

  always_comb begin
    g.j2_pos  = (idx.j2 != '0);
    g.j1_pos  = (idx.j1 != '0);
    g.l3_pos  = (idx.l3 != '0);
    g.l3_last = (idx.l3 == KW'(N - 1));
  end

endmodule
