// ctrl_prop_reg: propagation delay registers for counter values and global
// control signals.
//
// Instead of being broadcast, the global counter values and control signals
// travel from PE to PE. A PE p takes them from the neighbour p - d_p through
// DELAY = lambda_K * d_p registers, so that gctr(p, t) = gctr(p - d_p, t -
// DELAY). With lambda_K = (1 1) and unit propagation vectors, DELAY is 1.
// The register chain follows the document; the reset value (all zero, so
// `en` is low) is this design's choice.
module ctrl_prop_reg
  import mm_pkg::*;
#(
  parameter int unsigned DELAY = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t d,
  output ctrl_t q
);

  generate
    if (DELAY == 0) begin : g_wire
      assign q = d;
    end else begin : g_regs
      ctrl_t stage [DELAY];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < int'(DELAY); i++) stage[i] <= '0;
        end else begin
          stage[0] <= d;
          for (int i = 1; i < int'(DELAY); i++) stage[i] <= stage[i-1];
        end
      end
      assign q = stage[DELAY-1];
    end
  endgenerate

endmodule
