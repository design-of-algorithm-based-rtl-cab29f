// mm_array_2d: two-dimensional systolic array for C = A B, obtained by
// projecting the dependence graph of the multiplication along j.
//
// The transformation T = [W; S] = [1 1 1; 1 0 0; 0 0 1] maps node (i,j,k) to
// PE (i,k) at time i + j + k. So the array has ROWS = M+2 rows (the M data rows
// of A plus its two weighted-checksum rows) and R columns:
//   * a(i,k) is stationary in PE (i,k);
//   * b(k,j) enters the top of column k and moves down one PE per cycle;
//   * c(i,j) starts at zero in column 0 and moves right one PE per cycle,
//     leaving row i after column R-1.
// Column k of B must be presented k cycles after column 0 (input skew is the
// caller's job). Row i then delivers c(i,j) i cycles after row 0. A faulty PE
// (i,k) can corrupt only row i of C, i.e. one element of each column of C,
// which is what lets the column checksums correct it.
//
// The fault_* inputs select one PE whose c output is XORed with fault_mask
// (a test hook of this design).
module mm_array_2d #(
  parameter int unsigned M  = abft_pkg::MM_M,
  parameter int unsigned R  = abft_pkg::MM_R,
  parameter int unsigned AW = abft_pkg::MM_DW + abft_pkg::MM_M,
  parameter int unsigned BW = abft_pkg::MM_DW,
  parameter int unsigned CW = 32,
  localparam int unsigned ROWS = M + 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          a_load,
  input  logic signed [AW-1:0]          a_mat  [ROWS][R],
  input  logic                          b_vld  [R],   // top of each column (pre-skewed)
  input  logic signed [BW-1:0]          b_in   [R],
  input  logic                          fault_en,
  input  logic [$clog2(ROWS)-1:0]       fault_row,
  input  logic [$clog2(R+1)-1:0]        fault_col,
  input  logic [CW-1:0]                 fault_mask,
  output logic                          c_vld  [ROWS], // right edge of each row
  output logic signed [CW-1:0]          c_out  [ROWS]
);

  // Vertical b links: index i is the input of row i (row ROWS is the bottom edge).
  logic                 bv  [ROWS+1][R];
  logic signed [BW-1:0] bd  [ROWS+1][R];
  // Horizontal c links: index k is the input of column k.
  logic signed [CW-1:0] cd  [ROWS][R+1];

  for (genvar k = 0; k < int'(R); k++) begin : g_top
    assign bv[0][k] = b_vld[k];
    assign bd[0][k] = b_in[k];
  end

  for (genvar i = 0; i < int'(ROWS); i++) begin : g_row
    assign cd[i][0] = '0;
    for (genvar k = 0; k < int'(R); k++) begin : g_col
      logic [CW-1:0] mask;
      assign mask = (fault_en && fault_row == i && fault_col == k) ? fault_mask : '0;
      mm_pe #(.AW(AW), .BW(BW), .CW(CW)) u_pe (
        .clk, .rst_n,
        .a_load     (a_load),
        .a_in       (a_mat[i][k]),
        .b_vld_in   (bv[i][k]),
        .b_in       (bd[i][k]),
        .c_in       (cd[i][k]),
        .fault_mask (mask),
        .b_vld_out  (bv[i+1][k]),
        .b_out      (bd[i+1][k]),
        .c_out      (cd[i][k+1])
      );
    end
    // c leaving PE (i,R-1) is valid whenever b left that PE valid.
    assign c_vld[i] = bv[i+1][R-1];
    assign c_out[i] = cd[i][R];
  end

endmodule
