// mm_ft_2d: fault-tolerant matrix multiplier on the two-dimensional array.
//
// It computes C = A B with A of M x R and B of R x N, using the column-coded
// form A' C' : A' is A with two weighted-checksum rows appended (M+2 rows), so
// every column of the product C' = A' B is itself a weighted checksum code
// vector. A single faulty PE spoils at most one element of any column, and the
// checker corrects it.
//
//   a_load/a_data : A is loaded whole; R encoders form the two checksum rows,
//                   and all (M+2) x R coded elements are latched in the PEs.
//   b_vld/b_col   : one column of B per cycle (any cycles may be idle).
//                   Element k is skewed by k cycles into array column k.
//   out_*         : the matching column of C, corrected, with its status.
//                   Row i of the array output is delayed by M+1-i cycles so
//                   the whole column reaches the checker in one cycle.
//
// Latency from b_vld to out_vld is R + M + 2 cycles; the throughput is one
// column of C per cycle. The check and correction after the array are as the
// weighted checksum code prescribes; skew registers and the parallel loading
// of A are this design's choices.
module mm_ft_2d
  import abft_pkg::*;
#(
  parameter int unsigned M  = abft_pkg::MM_M,
  parameter int unsigned R  = abft_pkg::MM_R,
  parameter int unsigned DW = abft_pkg::MM_DW,
  localparam int unsigned ROWS = M + 2,
  localparam int unsigned AW   = DW + M,                  // coded A element
  localparam int unsigned CW   = AW + DW + $clog2(R) + 1  // C element
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        a_load,
  input  logic signed [DW-1:0]        a_data   [M][R],
  input  logic                        b_vld,
  input  logic signed [DW-1:0]        b_col    [R],
  input  logic                        fault_en,
  input  logic [$clog2(ROWS)-1:0]     fault_row,
  input  logic [$clog2(R+1)-1:0]      fault_col,
  input  logic [CW-1:0]               fault_mask,
  output logic                        out_vld,
  output logic signed [CW-1:0]        out_col  [M],
  output wcc_status_e                 out_status,
  output logic [$clog2(ROWS)-1:0]     out_pos
);

  // ---- column-checksum encoding of A ----
  logic signed [AW-1:0] a_coded [ROWS][R];
  for (genvar k = 0; k < int'(R); k++) begin : g_enc
    logic signed [DW-1:0] col [M];
    for (genvar i = 0; i < int'(M); i++) begin : g_i
      assign col[i]        = a_data[i][k];
      assign a_coded[i][k] = AW'(a_data[i][k]);
    end
    wcc_encoder #(.L(M), .IW(DW), .OW(AW)) u_enc (
      .d(col), .wcs1(a_coded[M][k]), .wcs2(a_coded[M+1][k])
    );
  end

  // ---- input skew ----
  logic                 bs_vld [R];
  logic signed [DW-1:0] bs     [R];
  for (genvar k = 0; k < int'(R); k++) begin : g_skew
    delay_line #(.W(DW), .D(k)) u_dl (
      .clk, .rst_n, .in_vld(b_vld), .in_data(b_col[k]),
      .out_vld(bs_vld[k]), .out_data(bs[k])
    );
  end

  // ---- array ----
  logic                 c_vld [ROWS];
  logic signed [CW-1:0] c_out [ROWS];
  mm_array_2d #(.M(M), .R(R), .AW(AW), .BW(DW), .CW(CW)) u_array (
    .clk, .rst_n, .a_load, .a_mat(a_coded), .b_vld(bs_vld), .b_in(bs),
    .fault_en, .fault_row, .fault_col, .fault_mask, .c_vld, .c_out
  );

  // ---- output de-skew ----
  logic                 dv  [ROWS];
  logic signed [CW-1:0] dd  [ROWS];
  for (genvar i = 0; i < int'(ROWS); i++) begin : g_deskew
    delay_line #(.W(CW), .D(ROWS - 1 - i)) u_dl (
      .clk, .rst_n, .in_vld(c_vld[i]), .in_data(c_out[i]),
      .out_vld(dv[i]), .out_data(dd[i])
    );
  end

  // ---- weighted checksum check and correction ----
  wcc_checker #(.L(M), .W(CW)) u_chk (
    .clk, .rst_n, .in_vld(dv[ROWS-1]), .in_vec(dd),
    .out_vld, .out_data(out_col), .out_status, .out_pos
  );

endmodule
