// givens_array_2d: triangular systolic array for Givens reduction (QR
// triangularisation) of an M x (N+1) matrix, obtained by projecting the
// dependence graph along i (T = [1 1 1; 0 1 0; 0 0 1]).
//
// PE (k,j), 0 <= k < N, k <= j <= N, keeps element r(k,j) of the triangular
// factor R; node (i,j,k) runs at time i + j + k:
//   * row i of A enters the top level, element j in column j, j cycles after
//     element 0 (the caller skews the input);
//   * the boundary PE (k,k) turns the arriving element into a rotation (c, s)
//     that moves right along level k, one PE per cycle;
//   * internal PEs rotate their r against the arriving element and pass the
//     rotated element down to level k+1, one cycle later.
// Column N is the checksum column of the code; it is rotated like any other
// column, so row k of R still sums to r(k,N). A faulty PE (k,j) spoils only
// column j of R, i.e. one element of each row's code vector.
//
// r_mat is the live content of the PEs (zero below the diagonal). last_vld
// pulses when the bottom-right PE has consumed a row, i.e. when a row has
// passed the whole array. clear starts a new matrix. The fault_* inputs XOR
// fault_mask onto the stored r of one PE (test hook of this design).
module givens_array_2d #(
  parameter int unsigned N = abft_pkg::GV_N,
  parameter int unsigned W = abft_pkg::GV_W,
  parameter int unsigned F = abft_pkg::GV_F,
  localparam int unsigned NC = N + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       x_vld  [NC],  // top of each column (pre-skewed)
  input  logic signed [W-1:0]        x_in   [NC],
  input  logic                       fault_en,
  input  logic [$clog2(N)-1:0]       fault_k,
  input  logic [$clog2(NC)-1:0]      fault_j,
  input  logic [W-1:0]               fault_mask,
  output logic signed [W-1:0]        r_mat  [N][NC],
  output logic                       last_vld
);

  // xv/xd[k][j]: element entering level k in column j.
  logic                xv [N+1][NC];
  logic signed [W-1:0] xd [N+1][NC];
  // cc/ss[k][j]: rotation entering PE (k,j) from the left.
  logic signed [W-1:0] cc [N][NC+1];
  logic signed [W-1:0] ss [N][NC+1];

  for (genvar j = 0; j < int'(NC); j++) begin : g_top
    assign xv[0][j] = x_vld[j];
    assign xd[0][j] = x_in[j];
  end

  for (genvar k = 0; k < int'(N); k++) begin : g_lvl
    for (genvar j = 0; j < int'(NC); j++) begin : g_col
      if (j < k) begin : g_none
        assign r_mat[k][j] = '0;
        assign xv[k+1][j]  = 1'b0;
        assign xd[k+1][j]  = '0;
      end else if (j == k) begin : g_bnd
        logic         unused_vld;
        logic [W-1:0] mask;
        assign mask = (fault_en && fault_k == k && fault_j == j) ? fault_mask : '0;
        givens_bpe #(.W(W), .F(F)) u_bpe (
          .clk, .rst_n, .clear,
          .x_vld(xv[k][j]), .x_in(xd[k][j]), .fault_mask(mask),
          .cs_vld(unused_vld), .c_out(cc[k][j+1]), .s_out(ss[k][j+1]), .r_out(r_mat[k][j])
        );
        // The diagonal column ends at its boundary PE.
        assign xv[k+1][j] = 1'b0;
        assign xd[k+1][j] = '0;
      end else begin : g_int
        logic [W-1:0] mask;
        assign mask = (fault_en && fault_k == k && fault_j == j) ? fault_mask : '0;
        givens_ipe #(.W(W), .F(F)) u_ipe (
          .clk, .rst_n, .clear,
          .x_vld(xv[k][j]), .x_in(xd[k][j]), .c_in(cc[k][j]), .s_in(ss[k][j]),
          .fault_mask(mask),
          .x_vld_out(xv[k+1][j]), .x_out(xd[k+1][j]),
          .c_out(cc[k][j+1]), .s_out(ss[k][j+1]), .r_out(r_mat[k][j])
        );
      end
    end
    for (genvar j = 0; j <= k; j++) begin : g_nocs
      assign cc[k][j] = '0;
      assign ss[k][j] = '0;
    end
  end

  assign last_vld = xv[N][N];

endmodule
