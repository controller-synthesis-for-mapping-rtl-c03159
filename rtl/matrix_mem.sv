// matrix_mem: storage for one N x N input matrix (matrix A or matrix B).
//
// Element (r, c) is held at address r*N + c. One synchronous write port
// loads the matrix before a run; NRD asynchronous read ports, one per border
// PE, deliver the element addressed by that PE's address generator in the
// same cycle. Written as a register array (the case study keeps local
// memory in registers too). Contents are not reset.
// The document shows the memory and its connection to the border PEs; the
// port structure and timing are this design's choices.
module matrix_mem
  import mm_pkg::*;
#(
  parameter int unsigned NRD = PA
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr [NRD],
  output logic [DATA_W-1:0] rdata [NRD]
);

  logic [DATA_W-1:0] mem [N*N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < int'(NRD); i++) rdata[i] = mem[raddr[i]];
  end

endmodule
