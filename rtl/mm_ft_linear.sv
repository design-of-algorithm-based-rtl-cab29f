// mm_ft_linear: fault-tolerant matrix multiplier on the linear array.
//
// Same code as mm_ft_2d (A carries two weighted-checksum rows, so each column
// of the product is a distance-3 code vector), but the product is computed by
// the M+2 PE linear array: one PE per row of coded A, each holding its row of
// C in local memory.
//
//   a_load/a_data : A loaded whole, coded by R column encoders.
//   b_vld/b_in    : B streamed one element per cycle, row by row
//                   (b(0,0), b(0,1), ..., b(0,N-1), b(1,0), ...).
//   out_*         : the columns of C in order j = 0..N-1, corrected, one per
//                   cycle once the last row of B is streaming in.
//
// Latency from the b carrying (k = R-1, j) to out_vld for column j is M+3
// cycles (M+1 through the chain and de-skew, one into the PE register, one in
// the checker). The coding follows the weighted checksum code; the streaming
// order and de-skew are this design's choices.
module mm_ft_linear
  import abft_pkg::*;
#(
  parameter int unsigned M  = abft_pkg::MM_M,
  parameter int unsigned R  = abft_pkg::MM_R,
  parameter int unsigned N  = abft_pkg::MM_N,
  parameter int unsigned DW = abft_pkg::MM_DW,
  localparam int unsigned ROWS = M + 2,
  localparam int unsigned AW   = DW + M,
  localparam int unsigned CW   = AW + DW + $clog2(R) + 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        a_load,
  input  logic signed [DW-1:0]        a_data   [M][R],
  input  logic                        b_vld,
  input  logic signed [DW-1:0]        b_in,
  input  logic                        fault_en,
  input  logic [$clog2(ROWS)-1:0]     fault_row,
  input  logic [CW-1:0]               fault_mask,
  output logic                        out_vld,
  output logic signed [CW-1:0]        out_col  [M],
  output wcc_status_e                 out_status,
  output logic [$clog2(ROWS)-1:0]     out_pos
);

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

  logic                 c_vld [ROWS];
  logic signed [CW-1:0] c_out [ROWS];
  mm_array_linear #(.M(M), .R(R), .N(N), .AW(AW), .BW(DW), .CW(CW)) u_array (
    .clk, .rst_n, .a_load, .a_mat(a_coded), .b_vld, .b_in,
    .fault_en, .fault_row, .fault_mask, .c_vld, .c_out
  );

  logic                 dv [ROWS];
  logic signed [CW-1:0] dd [ROWS];
  for (genvar i = 0; i < int'(ROWS); i++) begin : g_deskew
    delay_line #(.W(CW), .D(ROWS - 1 - i)) u_dl (
      .clk, .rst_n, .in_vld(c_vld[i]), .in_data(c_out[i]),
      .out_vld(dv[i]), .out_data(dd[i])
    );
  end

  wcc_checker #(.L(M), .W(CW)) u_chk (
    .clk, .rst_n, .in_vld(dv[ROWS-1]), .in_vec(dd),
    .out_vld, .out_data(out_col), .out_status, .out_pos
  );

endmodule
