// givens_ft_2d: fault-detecting Givens reduction on the triangular array.
//
// It reduces an M x N integer matrix A to the upper-triangular factor R of
// its QR decomposition, carried out in the coded form A_{M x (N+1)} ->
// R_{N x (N+1)}: each arriving row gets its sum appended as column N, and the
// checker tests every row of the final R against that checksum column.
//
//   clear           : zeroes the array and the row counter (start of a matrix).
//   row_vld/row_in  : one row of A per cycle (idle cycles allowed). Elements
//                     are integers, turned into fixed point with F fraction
//                     bits; element j is delayed j cycles into column j.
//   r_mat           : R in fixed point, with column N its checksum column.
//   done            : one-cycle pulse when all M rows have passed the array
//                     and the check is ready; row_err/any_err hold its result.
//
// With back-to-back rows, done follows the first row_vld by M + 2N cycles
// (the schedule's computation time M + 2N - 1 plus the checker register).
// The coding and array follow the coded Givens algorithm; the integer input,
// the fixed-point format and the tolerance test are this design's choices.
module givens_ft_2d #(
  parameter int unsigned M   = abft_pkg::GV_M,
  parameter int unsigned N   = abft_pkg::GV_N,
  parameter int unsigned DW  = abft_pkg::GV_DW,
  parameter int unsigned W   = abft_pkg::GV_W,
  parameter int unsigned F   = abft_pkg::GV_F,
  parameter int unsigned TOL = abft_pkg::GV_TOL,
  localparam int unsigned NC = N + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       row_vld,
  input  logic signed [DW-1:0]       row_in  [N],
  input  logic                       fault_en,
  input  logic [$clog2(N)-1:0]       fault_k,
  input  logic [$clog2(NC)-1:0]      fault_j,
  input  logic [W-1:0]               fault_mask,
  output logic signed [W-1:0]        r_mat   [N][NC],
  output logic                       done,
  output logic [N-1:0]               row_err,
  output logic                       any_err
);

  // ---- row-sum encoding and conversion to fixed point ----
  logic signed [W-1:0] coded [NC];
  always_comb begin
    coded[N] = '0;
    for (int j = 0; j < int'(N); j++) begin
      coded[j] = W'(row_in[j]) <<< F;
      coded[N] = coded[N] + coded[j];
    end
  end

  // ---- input skew ----
  logic                xv [NC];
  logic signed [W-1:0] xd [NC];
  for (genvar j = 0; j < int'(NC); j++) begin : g_skew
    delay_line #(.W(W), .D(j)) u_dl (
      .clk, .rst_n, .in_vld(row_vld && !clear), .in_data(coded[j]),
      .out_vld(xv[j]), .out_data(xd[j])
    );
  end

  // ---- array ----
  logic last_vld;
  givens_array_2d #(.N(N), .W(W), .F(F)) u_array (
    .clk, .rst_n, .clear, .x_vld(xv), .x_in(xd),
    .fault_en, .fault_k, .fault_j, .fault_mask, .r_mat, .last_vld
  );

  // ---- completion: count rows leaving the bottom-right PE ----
  logic [$clog2(M+1)-1:0] rows_q;
  logic                   complete;
  assign complete = last_vld && (rows_q == ($clog2(M+1))'(M - 1));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        rows_q <= '0;
    else if (clear)    rows_q <= '0;
    else if (complete) rows_q <= '0;
    else if (last_vld) rows_q <= rows_q + 1'b1;
  end

  givens_checker #(.N(N), .W(W), .TOL(TOL)) u_chk (
    .clk, .rst_n, .in_vld(complete), .r_mat, .out_vld(done), .row_err, .any_err
  );

endmodule
