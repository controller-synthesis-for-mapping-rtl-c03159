// local_ctrl: local controller of one PE.
//
// Evaluates the iteration conditionals that involve the processor index
// (type L, A_K != 0) for PE (P1, P2), ANDs each with the global predicate
// received from the global controller, and encodes the mutually exclusive
// results into the mux selects of the a and b inputs (Eq. 12):
//   a: SEL_SELF  if j2 > 0                                (global)
//      SEL_NEIGH if j2 = 0 and j2+p2 > 0
//      SEL_FIFO  if j2 = 0 and j2+p2 = 0 and j2+p2+l2 > 0
//      SEL_MEM   if j2 = 0 and j2+p2 = 0 and j2+p2+l2 = 0
//   b: the same with j1, p1, l1 in place of j2, p2, l2.
// The c selection (accumulate when l3 > 0) and the output strobe (l3 = N-1)
// are global predicates and pass through. P1 and P2 are constants, so each
// PE type gets a reduced controller after constant folding; this is how the
// PE types of the document appear in hardware. Purely combinational.
// The predicates and the encoding order follow the document; the select
// codes themselves are this design's choice.
module local_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned P1 = 0,
  parameter int unsigned P2 = 0
) (
  input  ctrl_t ctl,
  output sel_e  sel_a,
  output sel_e  sel_b,
  output logic  acc,      // c = c[t-LAM_L3] + z instead of c = z
  output logic  c_out     // c is a final result this cycle
);

  // local control bits lctr for a (index 0..3 = encoding order)
  logic [3:0] hit_a, hit_b;

  always_comb begin
    // sums of non-negative terms: "> 0" is "any term non-zero"
    logic jp2_zero, jpl2_zero, jp1_zero, jpl1_zero;
    jp2_zero  = (ctl.idx.j2 == '0) && (P2 == 0);
    jpl2_zero = jp2_zero && (ctl.idx.l2 == '0);
    jp1_zero  = (ctl.idx.j1 == '0) && (P1 == 0);
    jpl1_zero = jp1_zero && (ctl.idx.l1 == '0);

    hit_a[0] = ctl.g.j2_pos;
    hit_a[1] = !ctl.g.j2_pos && !jp2_zero;
    hit_a[2] = !ctl.g.j2_pos && jp2_zero && !jpl2_zero;
    hit_a[3] = !ctl.g.j2_pos && jp2_zero && jpl2_zero;

    hit_b[0] = ctl.g.j1_pos;
    hit_b[1] = !ctl.g.j1_pos && !jp1_zero;
    hit_b[2] = !ctl.g.j1_pos && jp1_zero && !jpl1_zero;
    hit_b[3] = !ctl.g.j1_pos && jp1_zero && jpl1_zero;
  end

  // encoders: one-hot to binary
  always_comb begin
    sel_a = SEL_SELF;
    sel_b = SEL_SELF;
    for (int i = 0; i < 4; i++) begin
      if (hit_a[i]) sel_a = sel_e'(i);
      if (hit_b[i]) sel_b = sel_e'(i);
    end
  end

  assign acc   = ctl.g.l3_pos;
  assign c_out = ctl.en && ctl.g.l3_last;

  // the conditionals of one variable are mutually exclusive and complete
  always_comb begin
    if (ctl.en) begin
      assert ($onehot(hit_a)) else $error("local_ctrl: a conditionals not exclusive");
      assert ($onehot(hit_b)) else $error("local_ctrl: b conditionals not exclusive");
    end
  end

endmodule
