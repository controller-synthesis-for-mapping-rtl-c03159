// lsgp_counter: counter with enable mechanism for a tile whose schedule has
// stall states (Example 3.2: schedule vector (3 4), 27 points in 33 steps).
//
// The ScanCounter produces the tile points in scheduling order, but the
// schedule leaves gaps: at some time steps no point executes. The conditional
// unit computes s = LAM1*j1 + LAM2*j2, the time step at which the current
// point is due, and compares it with the TimeCounter t. Enable is high if
// and only if s = t; only then does the ScanCounter advance, so it waits on
// the point until its time has come. When t reaches T_TILE, Reset restarts
// both counters at the next step and the tile scan repeats.
//
// Interface: `run` high lets the counter work; with `run` low it is held at
// the start of the tile. One time step lasts DELTA clocks (the iteration
// interval); all outputs describe the current time step: t, the current
// point (j1, j2, y1, y2), s, `enable` (the point executes now) and `reset`
// (t = T_TILE). With the defaults the output sequence is the document's
// counter table, step by step.
// The structure (ScanCounter, TimeCounter, s = t conditional unit, Reset at
// t_tile) follows the document; the `run` input is this design's own.
module lsgp_counter #(
  parameter int          LAM1   = 3,
  parameter int          LAM2   = 4,
  parameter int unsigned T_TILE = 32,
  parameter int unsigned DELTA  = 1,
  parameter int          YW     = 5,
  parameter int          JW     = 6,
  parameter int          TW     = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  output logic        [TW-1:0] t,
  output logic        [YW-1:0] y1,
  output logic        [YW-1:0] y2,
  output logic signed [JW-1:0] j1,
  output logic signed [JW-1:0] j2,
  output logic signed [TW:0]   s,
  output logic                 enable,
  output logic                 reset
);

  // time-step tick every DELTA clocks
  logic tick;
  generate
    if (DELTA <= 1) begin : g_no_div
      assign tick = run;
    end else begin : g_div
      logic [$clog2(DELTA)-1:0] div;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                        div <= '0;
        else if (!run)                     div <= '0;
        else if (div == ($clog2(DELTA))'(DELTA - 1)) div <= '0;
        else                               div <= div + 1'b1;
      end
      assign tick = run && (div == ($clog2(DELTA))'(DELTA - 1));
    end
  endgenerate

  logic at_max;

  time_counter #(.T_MAX(T_TILE), .TW(TW)) u_time (
    .clk, .rst_n, .tick, .clear((tick && at_max) || !run), .t, .at_max);

  scan_counter #(.YW(YW), .JW(JW)) u_scan (
    .clk, .rst_n,
    .step  (tick && enable),
    .clear ((tick && at_max) || !run),
    .y1, .y2, .j1, .j2, .last());

  // conditional unit: s = lambda * J, enable iff s = t
  always_comb begin
    s      = (TW+1)'(LAM1 * int'(j1) + LAM2 * int'(j2));
    enable = run && (s == $signed({1'b0, t}));
    reset  = run && at_max;
  end

endmodule
