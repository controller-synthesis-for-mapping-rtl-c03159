// ctrl_synth_top: top level with the two control-path designs side by side.
//
// * mm_array: the 2 x 2 processor array that multiplies two 8 x 8 matrices
//   with a co-partitioned schedule, driven by one global counter and global
//   controller whose outputs are propagated through the array, plus a local
//   controller in each PE.
// * lsgp_counter: the counter with enable mechanism for a parallelepiped
//   tile scanned in loop-matrix order (schedule vector (3 4)), which stalls
//   the scan on the time steps at which no point is scheduled.
// The two share only clock and reset; each has its own ports (prefix mm_ and
// sc_). See the two modules for interface and timing.
module ctrl_synth_top
  import mm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // ---- matrix-multiplication array
  input  logic              mm_start,
  output logic              mm_busy,
  output logic              mm_done,
  input  logic              mm_a_we,
  input  logic [AW-1:0]     mm_a_waddr,
  input  logic [DATA_W-1:0] mm_a_wdata,
  input  logic              mm_b_we,
  input  logic [AW-1:0]     mm_b_waddr,
  input  logic [DATA_W-1:0] mm_b_wdata,
  output logic              mm_c_valid [PA][PA],
  output logic [ACC_W-1:0]  mm_c_data  [PA][PA],
  output logic [IW-1:0]     mm_c_row   [PA][PA],
  output logic [IW-1:0]     mm_c_col   [PA][PA],
  // ---- tile counter with enable mechanism
  input  logic              sc_run,
  output logic [5:0]        sc_t,
  output logic [4:0]        sc_y1,
  output logic [4:0]        sc_y2,
  output logic signed [5:0] sc_j1,
  output logic signed [5:0] sc_j2,
  output logic signed [6:0] sc_s,
  output logic              sc_enable,
  output logic              sc_reset
);

  mm_array u_mm (
    .clk, .rst_n,
    .start   (mm_start),
    .busy    (mm_busy),
    .done    (mm_done),
    .a_we    (mm_a_we),
    .a_waddr (mm_a_waddr),
    .a_wdata (mm_a_wdata),
    .b_we    (mm_b_we),
    .b_waddr (mm_b_waddr),
    .b_wdata (mm_b_wdata),
    .c_valid (mm_c_valid),
    .c_data  (mm_c_data),
    .c_row   (mm_c_row),
    .c_col   (mm_c_col)
  );

  lsgp_counter u_sc (
    .clk, .rst_n,
    .run    (sc_run),
    .t      (sc_t),
    .y1     (sc_y1),
    .y2     (sc_y2),
    .j1     (sc_j1),
    .j2     (sc_j2),
    .s      (sc_s),
    .enable (sc_enable),
    .reset  (sc_reset)
  );

endmodule
