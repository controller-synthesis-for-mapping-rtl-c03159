// pe: processing element of the co-partitioned matrix-multiplication array.
//
// Executes, one point per clock while its control bundle is enabled, the
// recurrences of the space-time mapped program:
//   a = a[t-1]             if j2 > 0          (own register)
//     = a of PE(p1,p2-1)   if j2 = 0, p2 > 0  (west neighbour, via a_out)
//     = a[t-LAM_L2]        if ..., l2 > 0     (own delay line, next GS tile)
//     = A[LS*p1+j1+LS*PA*l1][l3]  otherwise   (memory)
//   b likewise with j1, p1, l1, delays LAM_J1 and LAM_L1 and matrix B,
//   z = a * b,  c = c[t-LAM_L3] + z if l3 > 0, else z; c is final if l3 = N-1.
// The local controller turns the counter values and global control signals
// into the mux selects. The PE type (P1, P2 zero or not) decides which
// inputs and delay lines exist: only PEs in column 0 have the memory port and
// long delay line for a, only PEs in row 0 those for b.
//
// Timing: a_out and b_out are registered (the link register between PEs),
// so a neighbour sees this PE's a and b one cycle later. c_valid/c_data are
// combinational in the cycle the final sum is formed; c_row/c_col give its
// position in C. Storage is enabled only while `ctl.en` is high.
// All four PE types share this port list, so each type leaves the inputs it
// has no use for (memory or neighbour) unconnected inside; lint reports them
// as unused, which is intended.
// Recurrences, PE types and delay depths follow the document; data widths,
// resets and the output indices are this design's choices.
module pe
  import mm_pkg::*;
#(
  parameter int unsigned P1 = 0,
  parameter int unsigned P2 = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_t             ctl,
  input  logic [DATA_W-1:0] a_mem,    // from memory A (used when P2 = 0)
  input  logic [DATA_W-1:0] a_west,   // from PE(p1, p2-1) (used when P2 > 0)
  input  logic [DATA_W-1:0] b_mem,    // from memory B (used when P1 = 0)
  input  logic [DATA_W-1:0] b_north,  // from PE(p1-1, p2) (used when P1 > 0)
  output logic [DATA_W-1:0] a_out,
  output logic [DATA_W-1:0] b_out,
  output logic              c_valid,
  output logic [ACC_W-1:0]  c_data,
  output logic [IW-1:0]     c_row,
  output logic [IW-1:0]     c_col
);

  sel_e sel_a, sel_b;
  logic acc, c_fin;

  local_ctrl #(.P1(P1), .P2(P2)) u_lctrl (
    .ctl   (ctl),
    .sel_a (sel_a),
    .sel_b (sel_b),
    .acc   (acc),
    .c_out (c_fin)
  );

  logic [DATA_W-1:0] a_cur, b_cur, a_self, b_self, a_long, b_long;
  logic [ACC_W-1:0]  z, c_cur, c_prev;

  // a input selection (PE type decides which sources exist)
  generate
    if (P2 == 0) begin : g_a_border
      delay_line #(.W(DATA_W), .DEPTH(LAM_L2)) u_a_long (
        .clk, .rst_n, .en(ctl.en), .d(a_cur), .q(a_long));
      always_comb begin
        unique case (sel_a)
          SEL_SELF: a_cur = a_self;
          SEL_FIFO: a_cur = a_long;
          default:  a_cur = a_mem;     // SEL_MEM (SEL_NEIGH cannot occur)
        endcase
      end
    end else begin : g_a_inner
      assign a_long = '0;
      assign a_cur  = (sel_a == SEL_SELF) ? a_self : a_west;
    end

    if (P1 == 0) begin : g_b_border
      delay_line #(.W(DATA_W), .DEPTH(LAM_L1)) u_b_long (
        .clk, .rst_n, .en(ctl.en), .d(b_cur), .q(b_long));
      always_comb begin
        unique case (sel_b)
          SEL_SELF: b_cur = b_self;
          SEL_FIFO: b_cur = b_long;
          default:  b_cur = b_mem;     // SEL_MEM (SEL_NEIGH cannot occur)
        endcase
      end
    end else begin : g_b_inner
      assign b_long = '0;
      assign b_cur  = (sel_b == SEL_SELF) ? b_self : b_north;
    end
  endgenerate

  // short reuse registers inside an LS tile
  delay_line #(.W(DATA_W), .DEPTH(LAM_J2)) u_a_self (
    .clk, .rst_n, .en(ctl.en), .d(a_cur), .q(a_self));
  delay_line #(.W(DATA_W), .DEPTH(LAM_J1)) u_b_self (
    .clk, .rst_n, .en(ctl.en), .d(b_cur), .q(b_self));

  // multiply-accumulate with the partial sum of the previous k
  always_comb begin
    z     = ACC_W'(a_cur) * ACC_W'(b_cur);
    c_cur = (acc ? c_prev : '0) + z;
  end

  delay_line #(.W(ACC_W), .DEPTH(LAM_L3)) u_c_mem (
    .clk, .rst_n, .en(ctl.en), .d(c_cur), .q(c_prev));

  // link registers towards the east and south neighbours
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out <= '0;
      b_out <= '0;
    end else if (ctl.en) begin
      a_out <= a_cur;
      b_out <= b_cur;
    end
  end

  assign c_valid = c_fin;
  assign c_data  = c_cur;
  assign c_row   = IW'(ctl.idx.j1) + IW'(LS * P1) + IW'(LS * PA) * IW'(ctl.idx.l1);
  assign c_col   = IW'(ctl.idx.j2) + IW'(LS * P2) + IW'(LS * PA) * IW'(ctl.idx.l2);

endmodule
