// rc_array: the 8x8 array of Reconfigurable Cells and its interconnect.
//
// Contexts: in row mode (col_mode=0) a broadcast loads context bus word i into
// every cell of row i; in column mode word j goes to every cell of column j.
// A single cell can also be reconfigured alone (ctx_single, sel_row/sel_col).
// Execution: every cell executes its own context in a cycle with `exec` high,
// so each row (or column) acts as an 8-wide SIMD machine.
//
// Data buses: bus_a/bus_b are the two 64-bit frame-buffer read buses (operands
// IA and IB). Byte k of each bus runs along column k in row mode and along row
// k in column mode, so the cells of a row (column) get eight different bytes.
// The 64-bit write bus carries the low output byte of the eight cells of row
// (column) wb_sel; wb_mask bit k is the WRITE_BUS context bit of cell k.
//
// Interconnect (all combinational from the neighbours' output registers):
//  * NSEW: port B gets Up (north), Down (south) and Left-B (west).
//  * Quadrant row/column: of the three other cells in the cell's quadrant row,
//    the leftmost feeds LA, the rightmost R and the remaining one M; likewise
//    T, C, B along the quadrant column.
//  * XQ: the cell at the same position in the horizontally adjacent quadrant.
//  * Express lanes: for each row and each column, one lane in each direction
//    between the two quadrants it crosses. A cell drives a lane when its
//    WRITE_EXP context bit is set; every cell of the corresponding row/column
//    in the adjacent quadrant sees it on input E. The tristate lane of the
//    source is modelled as a mux: the lowest-numbered enabled driver wins, an
//    undriven lane reads 0. E carries the row lane in row mode and the column
//    lane in column mode.
// From the source: 8x8 size, quadrants, the named connections, row/column
// context and data broadcast, single-cell reconfiguration, 8 bytes written
// back per row/column. This design's own choices: zero at array edges, the
// XQ partner, the lane arbitration and the mode-dependent E input.
module rc_array
  import morphosys_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   col_mode,
  input  logic                   ctx_bcast,
  input  logic [7:0][31:0]       ctx_bus,
  input  logic                   ctx_single,
  input  logic [2:0]             sel_row,
  input  logic [2:0]             sel_col,
  input  logic [31:0]            ctx_word,
  input  logic                   exec,
  input  logic [63:0]            bus_a,
  input  logic [63:0]            bus_b,
  input  logic [2:0]             wb_sel,
  output logic [63:0]            wb_data,
  output logic [7:0]             wb_mask,
  output logic [7:0][7:0][15:0]  cell_out
);

  localparam int N = RC_DIM;

  logic [15:0] o     [N][N];
  logic [7:0]  o8    [N][N];
  rc_ctx_t     cq    [N][N];
  // express lanes: [row or col][0: low quadrant -> high quadrant, 1: high -> low]
  logic [15:0] row_lane [N][2];
  logic [15:0] col_lane [N][2];

  always_comb begin
    for (int r = 0; r < N; r++) begin
      for (int d = 0; d < 2; d++) begin
        row_lane[r][d] = '0;
        col_lane[r][d] = '0;
        for (int k = QUAD-1; k >= 0; k--) begin
          if (cq[r][d*QUAD+k].wr_exp) row_lane[r][d] = o[r][d*QUAD+k];
          if (cq[d*QUAD+k][r].wr_exp) col_lane[r][d] = o[d*QUAD+k][r];
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      // quadrant-row partners: the three other cells in order, left to right
      localparam int QJ = j & ~(QUAD-1), PJ = j & (QUAD-1);
      localparam int JA = QJ + ((PJ == 0) ? 1 : 0);
      localparam int JM = QJ + ((PJ <= 1) ? 2 : 1);
      localparam int JR = QJ + ((PJ == 3) ? 2 : 3);
      localparam int QI = i & ~(QUAD-1), PI = i & (QUAD-1);
      localparam int IT = QI + ((PI == 0) ? 1 : 0);
      localparam int IC = QI + ((PI <= 1) ? 2 : 1);
      localparam int IB = QI + ((PI == 3) ? 2 : 3);

      logic        we;
      rc_ctx_t     cin;
      logic [15:0] up, dn, lb, e;

      assign up  = (i > 0)     ? o[(i > 0) ? i-1 : 0][j] : '0;
      assign dn  = (i < N-1)   ? o[(i < N-1) ? i+1 : N-1][j] : '0;
      assign lb  = (j > 0)     ? o[i][(j > 0) ? j-1 : 0] : '0;
      assign e   = col_mode ? col_lane[j][(i < QUAD) ? 1 : 0] : row_lane[i][(j < QUAD) ? 1 : 0];
      assign we  = ctx_bcast || (ctx_single && sel_row == 3'(i) && sel_col == 3'(j));
      assign cin = ctx_bcast ? rc_ctx_t'(col_mode ? ctx_bus[j] : ctx_bus[i]) : rc_ctx_t'(ctx_word);

      rc u_rc (
        .clk, .rst_n,
        .ctx_we (we),
        .ctx_in (cin),
        .ctx_q  (cq[i][j]),
        .exec,
        .ia     (col_mode ? bus_a[8*i +: 8] : bus_a[8*j +: 8]),
        .ib     (col_mode ? bus_b[8*i +: 8] : bus_b[8*j +: 8]),
        .in_la  (o[i][JA]), .in_m (o[i][JM]), .in_r (o[i][JR]),
        .in_t   (o[IT][j]), .in_c (o[IC][j]), .in_b (o[IB][j]),
        .in_xq  (o[i][j ^ QUAD]),
        .in_e   (e),
        .in_u   (up), .in_d (dn), .in_lb (lb),
        .out16  (o[i][j]),
        .out8   (o8[i][j]),
        .out_reg()
      );
      assign cell_out[i][j] = o[i][j];
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) begin
      wb_data[8*k +: 8] = col_mode ? o8[k][wb_sel] : o8[wb_sel][k];
      wb_mask[k]        = col_mode ? cq[k][wb_sel].wr_bus : cq[wb_sel][k].wr_bus;
    end
  end

endmodule
