// givens_ft_linear: fault-detecting Givens reduction on the linear array.
//
// Same function and code as givens_ft_2d (each row of A gets its sum appended
// as column N, and each row of the final R is tested against it), computed by
// the N+1 PE linear array. A new row can be taken every N cycles: row_rdy is
// high when the next row_vld will be accepted; a row offered while row_rdy is
// low is ignored.
//
// With rows sent as fast as allowed, done follows the first row_vld by
// N(M+1) + 1 cycles: the schedule's computation time N(M-1) + 2N plus the
// checker register.
// Encoding, skew and check follow givens_ft_2d; the row pacing is this
// design's choice.
module givens_ft_linear #(
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
  output logic                       row_rdy,
  input  logic                       row_vld,
  input  logic signed [DW-1:0]       row_in  [N],
  input  logic                       fault_en,
  input  logic [$clog2(NC)-1:0]      fault_j,
  input  logic [W-1:0]               fault_mask,
  output logic signed [W-1:0]        r_mat   [N][NC],
  output logic                       done,
  output logic [N-1:0]               row_err,
  output logic                       any_err
);

  // ---- row pacing: one row per N cycles ----
  logic [$clog2(N+1)-1:0] gap_q;
  logic                   take;
  assign row_rdy = (gap_q == '0);
  assign take    = row_vld && row_rdy && !clear;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           gap_q <= '0;
    else if (clear)       gap_q <= '0;
    else if (take)        gap_q <= ($clog2(N+1))'(N - 1);
    else if (gap_q != '0) gap_q <= gap_q - 1'b1;
  end

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
      .clk, .rst_n, .in_vld(take), .in_data(coded[j]),
      .out_vld(xv[j]), .out_data(xd[j])
    );
  end

  logic last_vld;
  givens_linear #(.N(N), .W(W), .F(F)) u_array (
    .clk, .rst_n, .clear, .x_vld(xv), .x_in(xd),
    .fault_en, .fault_j, .fault_mask, .r_mat, .last_vld
  );

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
