// givens_checker: checksum test of the triangular factor R of a Givens
// reduction.
//
// The input matrix A carries one checksum column (each row's sum), and every
// rotation is linear, so in a fault-free R each row k satisfies
//     r(k,N) = sum_{j=k}^{N-1} r(k,j).
// Row k's difference between the two sides is compared against TOL LSBs,
// which absorbs fixed-point rounding; a larger difference flags row k. With
// one checksum the code detects a single wrong element but cannot locate it.
// The checksum relation is that of the coded Givens algorithm; the tolerance
// and the one-register output are this design's choices.
//
// Timing: all N rows checked in parallel, results one cycle after in_vld.
module givens_checker #(
  parameter int unsigned N   = abft_pkg::GV_N,
  parameter int unsigned W   = abft_pkg::GV_W,
  parameter int unsigned TOL = abft_pkg::GV_TOL,
  localparam int unsigned NC = N + 1,
  localparam int unsigned EW = W + $clog2(NC) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_vld,
  input  logic signed [W-1:0] r_mat [N][NC],
  output logic                out_vld,
  output logic [N-1:0]        row_err,
  output logic                any_err
);

  localparam logic signed [EW-1:0] LIM = EW'(TOL);
  logic [N-1:0] err;

  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      logic signed [EW-1:0] diff;
      diff = EW'(r_mat[k][N]);
      for (int j = 0; j < int'(N); j++) begin
        if (j >= k) diff = diff - EW'(r_mat[k][j]);
      end
      err[k] = (diff > LIM) || (diff < -LIM);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld <= 1'b0;
      row_err <= '0;
      any_err <= 1'b0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) begin
        row_err <= err;
        any_err <= |err;
      end
    end
  end

endmodule
