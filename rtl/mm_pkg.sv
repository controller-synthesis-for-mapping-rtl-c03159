// mm_pkg: sizes, schedule constants and shared types of the co-partitioned
// matrix-multiplication processor array.
//
// The array computes C = A * B for N x N matrices. The index space
// (i, j, k) is co-partitioned: LS x LS local-sequential (LS) tiles are run
// one point per cycle inside a PE, PA x PA LS tiles form one global-sequential
// (GS) tile and run in parallel on a PA x PA array, and the GS tiles
// (NG x NG of them, times the N steps of k) run one after another.
//
// Coordinates: J = (j1, j2) inside an LS tile, K = p = (p1, p2) the PE,
// L = (l1, l2, l3) the GS tile and the k index. The schedule is
//   t = LS*j1 + j2 + p1 + p2 + LAM_L1*l1 + LAM_L2*l2 + LAM_L3*l3 + 1
// which for the defaults is (2 1 | 1 1 | 8 4 16) with offset 1.
// The defaults (N = 8, LS = 2, PA = 2) are the example configuration; the
// schedule constants below are derived from them.
package mm_pkg;

  parameter int unsigned N  = 8;            // matrix size
  parameter int unsigned LS = 2;            // LS tile side (points per PE per row)
  parameter int unsigned PA = 2;            // array side (LS tiles per GS tile side)
  parameter int unsigned NG = N / (LS * PA); // GS tiles per matrix side

  parameter int unsigned DATA_W = 16;       // width of an element of A and B
  parameter int unsigned ACC_W  = 2 * DATA_W + $clog2(N); // width of C: no overflow

  // Schedule vector entries (time distance of a unit step in each index).
  parameter int unsigned LAM_J1 = LS;                 // 2
  parameter int unsigned LAM_J2 = 1;                  // 1
  parameter int unsigned LAM_L2 = LS * LS;            // 4
  parameter int unsigned LAM_L1 = LS * LS * NG;       // 8
  parameter int unsigned LAM_L3 = LS * LS * NG * NG;  // 16
  parameter int unsigned T_PE   = LAM_L3 * N;         // cycles each PE is busy (128)

  parameter int unsigned JW  = (LS > 1) ? $clog2(LS) : 1;  // width of j1, j2
  parameter int unsigned GW  = (NG > 1) ? $clog2(NG) : 1;  // width of l1, l2
  parameter int unsigned KW  = (N  > 1) ? $clog2(N)  : 1;  // width of l3
  parameter int unsigned IW  = (N  > 1) ? $clog2(N)  : 1;  // width of a row/column index
  parameter int unsigned AW  = 2 * IW;                     // matrix memory address width

  // Counter values: one point of the co-partitioned index space (without K).
  typedef struct packed {
    logic [JW-1:0] j1;
    logic [JW-1:0] j2;
    logic [GW-1:0] l1;
    logic [GW-1:0] l2;
    logic [KW-1:0] l3;
  } idx_t;

  // Global control signals: predicates that do not depend on the processor
  // index, evaluated once by the global controller.
  typedef struct packed {
    logic j2_pos;   // j2 > 0   : a is reused from the PE's own register
    logic j1_pos;   // j1 > 0   : b is reused from the PE's own registers
    logic l3_pos;   // l3 > 0   : c accumulates on the partial sum of k-1
    logic l3_last;  // l3 = N-1 : c is a final result
  } gctr_t;

  // Bundle propagated from PE to PE: enable, counter values, global control.
  typedef struct packed {
    logic  en;
    idx_t  idx;
    gctr_t g;
  } ctrl_t;

  // Mux select encodings produced by the local controller (Eq. 12 order).
  typedef enum logic [1:0] {
    SEL_SELF  = 2'd0,   // reuse: own short delay register
    SEL_NEIGH = 2'd1,   // from the neighbouring PE
    SEL_FIFO  = 2'd2,   // from the own long delay line (next GS tile)
    SEL_MEM   = 2'd3    // fresh value from the matrix memory
  } sel_e;

endpackage
