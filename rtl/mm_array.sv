// mm_array: PA x PA processor array for co-partitioned N x N matrix
// multiplication with a global/local control path.
//
// Structure (defaults: 2 x 2 PEs, 8 x 8 matrices):
//  * copart_counter scans J and L in schedule order for PE(0,0);
//  * global_ctrl evaluates the processor-independent predicates once;
//  * the bundle {en, J, L, gctr} enters PE(0,0) directly and reaches every
//    other PE through one ctrl_prop_reg per hop (lambda_K * d_p = 1 cycle):
//    PEs in column 0 take it from the north neighbour, all others from the
//    west neighbour, so PE p runs exactly p1 + p2 cycles after PE(0,0);
//  * each PE has its own local controller for the processor-dependent
//    predicates;
//  * memory A feeds the PEs of column 0, memory B those of row 0, each read
//    port addressed by an address generator fed with that PE's counter values;
//  * a values move east and b values south through the PEs' link registers.
//
// Interface: load A and B through the write ports (address r*N + c), then
// pulse `start`. PE p works for T_PE cycles starting p1 + p2 + 1 cycles after
// `start`; each element of C appears once on its PE's c_valid/c_data with
// its row and column. `done` pulses with the last point of the last PE;
// `busy` is high from start until then. A run takes T_PE + 2*(PA-1) cycles.
// The propagation tree follows the document's Algorithm 2 with the tie broken
// as in its array drawing; the load/start/done interface is this design's own.
module mm_array
  import mm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // matrix loading
  input  logic              a_we,
  input  logic [AW-1:0]     a_waddr,
  input  logic [DATA_W-1:0] a_wdata,
  input  logic              b_we,
  input  logic [AW-1:0]     b_waddr,
  input  logic [DATA_W-1:0] b_wdata,
  // results, one stream per PE
  output logic              c_valid [PA][PA],
  output logic [ACC_W-1:0]  c_data  [PA][PA],
  output logic [IW-1:0]     c_row   [PA][PA],
  output logic [IW-1:0]     c_col   [PA][PA]
);

  // ---------------- global counter and global controller
  logic  cnt_en;
  idx_t  cnt_idx;
  gctr_t gctr;

  copart_counter u_counter (
    .clk, .rst_n, .start(start && !busy),
    .en(cnt_en), .idx(cnt_idx), .last()
  );

  global_ctrl u_gctrl (.idx(cnt_idx), .g(gctr));

  // ---------------- control propagation
  ctrl_t ctl [PA][PA];

  assign ctl[0][0] = '{en: cnt_en, idx: cnt_idx, g: gctr};

  for (genvar p1 = 0; p1 < PA; p1++) begin : g_row
    for (genvar p2 = 0; p2 < PA; p2++) begin : g_col
      if (p2 > 0) begin : g_from_west
        ctrl_prop_reg #(.DELAY(1)) u_prop (
          .clk, .rst_n, .d(ctl[p1][p2-1]), .q(ctl[p1][p2]));
      end else if (p1 > 0) begin : g_from_north
        ctrl_prop_reg #(.DELAY(1)) u_prop (
          .clk, .rst_n, .d(ctl[p1-1][p2]), .q(ctl[p1][p2]));
      end
    end
  end

  // ---------------- memories and address generators
  logic [AW-1:0]     a_raddr [PA], b_raddr [PA];
  logic [DATA_W-1:0] a_rdata [PA], b_rdata [PA];

  for (genvar p = 0; p < PA; p++) begin : g_agen
    addr_gen #(.IS_B(1'b0), .P(p)) u_agen_a (.idx(ctl[p][0].idx), .addr(a_raddr[p]));
    addr_gen #(.IS_B(1'b1), .P(p)) u_agen_b (.idx(ctl[0][p].idx), .addr(b_raddr[p]));
  end

  matrix_mem #(.NRD(PA)) u_mem_a (
    .clk, .we(a_we), .waddr(a_waddr), .wdata(a_wdata),
    .raddr(a_raddr), .rdata(a_rdata));

  matrix_mem #(.NRD(PA)) u_mem_b (
    .clk, .we(b_we), .waddr(b_waddr), .wdata(b_wdata),
    .raddr(b_raddr), .rdata(b_rdata));

  // ---------------- processing elements
  logic [DATA_W-1:0] a_lnk [PA][PA];
  logic [DATA_W-1:0] b_lnk [PA][PA];

  for (genvar p1 = 0; p1 < PA; p1++) begin : g_pe_row
    for (genvar p2 = 0; p2 < PA; p2++) begin : g_pe_col
      logic [DATA_W-1:0] a_w, b_n;
      if (p2 > 0) begin : g_aw
        assign a_w = a_lnk[p1][p2-1];
      end else begin : g_aw0
        assign a_w = '0;
      end
      if (p1 > 0) begin : g_bn
        assign b_n = b_lnk[p1-1][p2];
      end else begin : g_bn0
        assign b_n = '0;
      end

      pe #(.P1(p1), .P2(p2)) u_pe (
        .clk, .rst_n,
        .ctl     (ctl[p1][p2]),
        .a_mem   (a_rdata[p1]),
        .a_west  (a_w),
        .b_mem   (b_rdata[p2]),
        .b_north (b_n),
        .a_out   (a_lnk[p1][p2]),
        .b_out   (b_lnk[p1][p2]),
        .c_valid (c_valid[p1][p2]),
        .c_data  (c_data[p1][p2]),
        .c_row   (c_row[p1][p2]),
        .c_col   (c_col[p1][p2])
      );
    end
  end

  // ---------------- run status
  ctrl_t ctl_last;
  assign ctl_last = ctl[PA-1][PA-1];

  always_comb begin
    done = ctl_last.en
        && ctl_last.idx.j1 == JW'(LS - 1) && ctl_last.idx.j2 == JW'(LS - 1)
        && ctl_last.idx.l1 == GW'(NG - 1) && ctl_last.idx.l2 == GW'(NG - 1)
        && ctl_last.idx.l3 == KW'(N - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     busy <= 1'b0;
    else if (start) busy <= 1'b1;
    else if (done)  busy <= 1'b0;
  end

endmodule
