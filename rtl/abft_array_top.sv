// abft_array_top: four algorithm-based fault-tolerant array processors side by
// side, each derived from a dependence graph by a linear space-time mapping
// and each protected by a checksum code carried through the computation.
//
//   mm2d_*  matrix-matrix multiplication, 2-D array (projection along j):
//           (M+2) x R PEs, one column of C per cycle, single-error correction.
//   mml_*   matrix-matrix multiplication, linear array (projection along j
//           and k): M+2 PEs with local memory, single-error correction.
//   gv_*    Givens reduction, triangular array (projection along i):
//           N(N+3)/2 PEs, error detection through one checksum column.
//   gvl_*   Givens reduction, linear array (projection along i and k):
//           N+1 PEs with local memory, one row every N cycles, same check.
//
// The four share no state; each keeps its own ports, clock and reset being
// common. See the sub-modules for interfaces and timing. The fault_* ports
// are test hooks that make one PE produce wrong values.
module abft_array_top
  import abft_pkg::*;
#(
  parameter int unsigned M    = abft_pkg::MM_M,
  parameter int unsigned R    = abft_pkg::MM_R,
  parameter int unsigned N    = abft_pkg::MM_N,
  parameter int unsigned DW   = abft_pkg::MM_DW,
  parameter int unsigned GM   = abft_pkg::GV_M,
  parameter int unsigned GN   = abft_pkg::GV_N,
  parameter int unsigned GDW  = abft_pkg::GV_DW,
  parameter int unsigned GW   = abft_pkg::GV_W,
  parameter int unsigned GF   = abft_pkg::GV_F,
  parameter int unsigned GTOL = abft_pkg::GV_TOL,
  localparam int unsigned ROWS = M + 2,
  localparam int unsigned CW   = DW + M + DW + $clog2(R) + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // ---- 2-D matrix multiplier ----
  input  logic                       mm2d_a_load,
  input  logic signed [DW-1:0]       mm2d_a_data   [M][R],
  input  logic                       mm2d_b_vld,
  input  logic signed [DW-1:0]       mm2d_b_col    [R],
  input  logic                       mm2d_fault_en,
  input  logic [$clog2(ROWS)-1:0]    mm2d_fault_row,
  input  logic [$clog2(R+1)-1:0]     mm2d_fault_col,
  input  logic [CW-1:0]              mm2d_fault_mask,
  output logic                       mm2d_out_vld,
  output logic signed [CW-1:0]       mm2d_out_col  [M],
  output wcc_status_e                mm2d_out_status,
  output logic [$clog2(ROWS)-1:0]    mm2d_out_pos,
  // ---- linear matrix multiplier ----
  input  logic                       mml_a_load,
  input  logic signed [DW-1:0]       mml_a_data    [M][R],
  input  logic                       mml_b_vld,
  input  logic signed [DW-1:0]       mml_b_in,
  input  logic                       mml_fault_en,
  input  logic [$clog2(ROWS)-1:0]    mml_fault_row,
  input  logic [CW-1:0]              mml_fault_mask,
  output logic                       mml_out_vld,
  output logic signed [CW-1:0]       mml_out_col   [M],
  output wcc_status_e                mml_out_status,
  output logic [$clog2(ROWS)-1:0]    mml_out_pos,
  // ---- Givens reduction ----
  input  logic                       gv_clear,
  input  logic                       gv_row_vld,
  input  logic signed [GDW-1:0]      gv_row_in     [GN],
  input  logic                       gv_fault_en,
  input  logic [$clog2(GN)-1:0]      gv_fault_k,
  input  logic [$clog2(GN+1)-1:0]    gv_fault_j,
  input  logic [GW-1:0]              gv_fault_mask,
  output logic signed [GW-1:0]       gv_r_mat      [GN][GN+1],
  output logic                       gv_done,
  output logic [GN-1:0]              gv_row_err,
  output logic                       gv_any_err,
  // ---- Givens reduction, linear array ----
  input  logic                       gvl_clear,
  output logic                       gvl_row_rdy,
  input  logic                       gvl_row_vld,
  input  logic signed [GDW-1:0]      gvl_row_in    [GN],
  input  logic                       gvl_fault_en,
  input  logic [$clog2(GN+1)-1:0]    gvl_fault_j,
  input  logic [GW-1:0]              gvl_fault_mask,
  output logic signed [GW-1:0]       gvl_r_mat     [GN][GN+1],
  output logic                       gvl_done,
  output logic [GN-1:0]              gvl_row_err,
  output logic                       gvl_any_err
);

  mm_ft_2d #(.M(M), .R(R), .DW(DW)) u_mm2d (
    .clk, .rst_n,
    .a_load(mm2d_a_load), .a_data(mm2d_a_data),
    .b_vld(mm2d_b_vld), .b_col(mm2d_b_col),
    .fault_en(mm2d_fault_en), .fault_row(mm2d_fault_row), .fault_col(mm2d_fault_col),
    .fault_mask(mm2d_fault_mask),
    .out_vld(mm2d_out_vld), .out_col(mm2d_out_col), .out_status(mm2d_out_status),
    .out_pos(mm2d_out_pos)
  );

  mm_ft_linear #(.M(M), .R(R), .N(N), .DW(DW)) u_mml (
    .clk, .rst_n,
    .a_load(mml_a_load), .a_data(mml_a_data),
    .b_vld(mml_b_vld), .b_in(mml_b_in),
    .fault_en(mml_fault_en), .fault_row(mml_fault_row), .fault_mask(mml_fault_mask),
    .out_vld(mml_out_vld), .out_col(mml_out_col), .out_status(mml_out_status),
    .out_pos(mml_out_pos)
  );

  givens_ft_2d #(.M(GM), .N(GN), .DW(GDW), .W(GW), .F(GF), .TOL(GTOL)) u_gv (
    .clk, .rst_n,
    .clear(gv_clear), .row_vld(gv_row_vld), .row_in(gv_row_in),
    .fault_en(gv_fault_en), .fault_k(gv_fault_k), .fault_j(gv_fault_j),
    .fault_mask(gv_fault_mask),
    .r_mat(gv_r_mat), .done(gv_done), .row_err(gv_row_err), .any_err(gv_any_err)
  );

  givens_ft_linear #(.M(GM), .N(GN), .DW(GDW), .W(GW), .F(GF), .TOL(GTOL)) u_gvl (
    .clk, .rst_n,
    .clear(gvl_clear), .row_rdy(gvl_row_rdy), .row_vld(gvl_row_vld), .row_in(gvl_row_in),
    .fault_en(gvl_fault_en), .fault_j(gvl_fault_j), .fault_mask(gvl_fault_mask),
    .r_mat(gvl_r_mat), .done(gvl_done), .row_err(gvl_row_err), .any_err(gvl_any_err)
  );

endmodule
