// givens_linear: linear systolic array for Givens reduction, obtained by
// projecting the dependence graph along both i and k (S = [0 1 0]) with the
// schedule W = [N 1 1], i.e. T = [N 1 1; 0 1 0].
//
// N+1 PEs (givens_lpe), PE j owning column j of R (column N being the
// checksum column). Node (i,j,k) runs at time N i + j + k: a new row enters
// every N cycles, element j of it reaching PE j j cycles after element 0
// (the caller skews the input), and rotations move right one PE per cycle.
// PE j works on min(j+1, N) of the N levels of each row and idles on the
// rest (the triangular node space under a linear schedule), so the PEs are
// busy in N(N+3)/2 of the N(N+1) level slots of each row.
//
// r_mat is the live content of the PEs (zero below the diagonal). last_vld
// pulses when PE N has finished the last level of a row. The fault_* inputs
// make one PE store wrong r values (test hook of this design).
module givens_linear #(
  parameter int unsigned N = abft_pkg::GV_N,
  parameter int unsigned W = abft_pkg::GV_W,
  parameter int unsigned F = abft_pkg::GV_F,
  localparam int unsigned NC = N + 1,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       x_vld  [NC],  // element j of a row, pre-skewed
  input  logic signed [W-1:0]        x_in   [NC],
  input  logic                       fault_en,
  input  logic [$clog2(NC)-1:0]      fault_j,
  input  logic [W-1:0]               fault_mask,
  output logic signed [W-1:0]        r_mat  [N][NC],
  output logic                       last_vld
);

  logic                cv [NC+1];
  logic [KW-1:0]       ck [NC+1];
  logic signed [W-1:0] cc [NC+1];
  logic signed [W-1:0] ss [NC+1];
  logic                done [NC];

  assign cv[0] = 1'b0;
  assign ck[0] = '0;
  assign cc[0] = '0;
  assign ss[0] = '0;

  for (genvar j = 0; j < int'(NC); j++) begin : g_pe
    logic [W-1:0]        mask;
    logic signed [W-1:0] col [N];
    assign mask = (fault_en && fault_j == j) ? fault_mask : '0;
    givens_lpe #(.N(N), .J(j), .W(W), .F(F)) u_pe (
      .clk, .rst_n, .clear,
      .x_vld(x_vld[j]), .x_in(x_in[j]),
      .cs_vld_in(cv[j]), .cs_k_in(ck[j]), .c_in(cc[j]), .s_in(ss[j]),
      .fault_mask(mask),
      .cs_vld_out(cv[j+1]), .cs_k_out(ck[j+1]), .c_out(cc[j+1]), .s_out(ss[j+1]),
      .row_done(done[j]), .r_col(col)
    );
    for (genvar k = 0; k < int'(N); k++) begin : g_r
      assign r_mat[k][j] = (k <= j) ? col[k] : '0;
    end
  end

  assign last_vld = done[N];

endmodule
