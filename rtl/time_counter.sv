// time_counter: TimeCounter of the enable mechanism.
//
// Counts time steps t = 0, 1, ..., T_MAX, advancing on every clock with
// `tick` high (every clock when the iteration interval is 1). `at_max`
// flags t = T_MAX, the last execution time of the tile; a clock with `clear`
// high restarts the count at 0. Active-low asynchronous reset to 0.
// The count range follows the document; the clear/tick ports are this
// design's way of closing the loop with the conditional unit.
module time_counter #(
  parameter int unsigned T_MAX = 32,
  parameter int unsigned TW    = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tick,
  input  logic          clear,
  output logic [TW-1:0] t,
  output logic          at_max
);

  assign at_max = (t == TW'(T_MAX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                t <= '0;
    else if (clear)            t <= '0;
    else if (tick && !at_max)  t <= t + 1'b1;
  end

endmodule
