// copart_counter: global counter of the co-partitioned array.
//
// Produces, one per clock, the index-space coordinates J = (j1, j2) and
// L = (l1, l2, l3) of the point that PE(0,0) executes, in the order fixed by
// the schedule: j2 is the innermost loop, then j1, l2, l1 and l3 outermost
// (the schedule weights 1, LS, LS*LS, LS*LS*NG, LS*LS*NG*NG). Because the
// number of cycles a tile takes equals its number of points, the scan has no
// stall states and needs no enable mechanism; the counter is a chain of
// wrapping sub-counters, each advancing when all inner ones wrap.
//
// Interface: a one-cycle `start` begins a run of T_PE cycles during which
// `en` is high and `idx` is valid; `last` marks the final point. A `start`
// while running is ignored. The active-low reset is asynchronous and
// returns the counter to idle.
// The scan order and the two-counter (J and L) structure follow the
// document; the start/last handshake is this design's own.
module copart_counter
  import mm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic en,
  output idx_t idx,
  output logic last
);

  idx_t q;
  logic running;

  logic wrap_j2, wrap_j1, wrap_l2, wrap_l1, wrap_l3;

  always_comb begin
    wrap_j2 = (q.j2 == JW'(LS - 1));
    wrap_j1 = wrap_j2 && (q.j1 == JW'(LS - 1));
    wrap_l2 = wrap_j1 && (q.l2 == GW'(NG - 1));
    wrap_l1 = wrap_l2 && (q.l1 == GW'(NG - 1));
    wrap_l3 = wrap_l1 && (q.l3 == KW'(N - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      running <= 1'b0;
    end else if (!running) begin
      q <= '0;
      if (start) running <= 1'b1;
    end else begin
      // J counter: advances every cycle (iteration interval 1)
      q.j2 <= wrap_j2 ? '0 : q.j2 + 1'b1;
      if (wrap_j2) q.j1 <= wrap_j1 ? '0 : q.j1 + 1'b1;
      // L counter: advances once per LS tile (every LS*LS cycles)
      if (wrap_j1) q.l2 <= wrap_l2 ? '0 : q.l2 + 1'b1;
      if (wrap_l2) q.l1 <= wrap_l1 ? '0 : q.l1 + 1'b1;
      if (wrap_l1) q.l3 <= wrap_l3 ? '0 : q.l3 + 1'b1;
      if (wrap_l3) running <= 1'b0;
    end
  end

  assign en   = running;
  assign idx  = q;
  assign last = running && wrap_l3;

endmodule
