// delay_line: enabled shift register of DEPTH words of W bits.
//
// On each clock with `en` high the input is shifted in; `q` is the word
// shifted in DEPTH enabled cycles earlier. Used for the local reuse and
// partial-sum storage of a PE (the register chains drawn inside the PEs).
// Cleared by the asynchronous active-low reset.
module delay_line #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
    end
  end

  assign q = sr[DEPTH-1];

endmodule
