// mm_lpe: processing element of the linear matrix-multiplication array.
//
// The linear array comes from projecting the dependence graph along both j
// and k (S = [1 0 0], W = [1 1 N]), so PE i executes every node (i,j,k) of
// its row, one per cycle in the order k outer, j inner. The two projected
// dependences become local storage:
//   * a(i,k) is reused for the N consecutive nodes of one k: the PE keeps
//     row i of the coded A in an R-word register file (loaded with a_load);
//   * c(i,j) returns to the same PE after N cycles (link delay W d_c = N):
//     an N-word circulating accumulator memory holds the partial sums.
// b(k,j) passes to the next PE through one register (delay W d_b = 1),
// together with its tags: its k index, and whether k is the first or last.
// On the last k the finished c(i,j) is put on c_out with c_vld for one cycle.
// fault_mask is XORed onto every accumulated value (test hook of this design).
//
// Timing: one node per cycle; c_out follows the b carrying k = R-1 by one cycle.
module mm_lpe #(
  parameter int unsigned R  = abft_pkg::MM_R,
  parameter int unsigned N  = abft_pkg::MM_N,
  parameter int unsigned AW = abft_pkg::MM_DW + abft_pkg::MM_M,
  parameter int unsigned BW = abft_pkg::MM_DW,
  parameter int unsigned CW = 32,
  localparam int unsigned KW = (R > 1) ? $clog2(R) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 a_load,
  input  logic signed [AW-1:0] a_row [R],
  input  logic                 b_vld_in,
  input  logic signed [BW-1:0] b_in,
  input  logic [KW-1:0]        b_k_in,
  input  logic                 b_first_in,
  input  logic                 b_last_in,
  input  logic        [CW-1:0] fault_mask,
  output logic                 b_vld_out,
  output logic signed [BW-1:0] b_out,
  output logic [KW-1:0]        b_k_out,
  output logic                 b_first_out,
  output logic                 b_last_out,
  output logic                 c_vld,
  output logic signed [CW-1:0] c_out
);

  logic signed [AW-1:0] a_q   [R];
  logic signed [CW-1:0] acc_q [N];   // acc_q[N-1] is the oldest partial sum
  logic signed [CW-1:0] acc_new;

  assign acc_new = ((b_first_in ? '0 : acc_q[N-1]) + CW'(a_q[b_k_in]) * CW'(b_in)) ^ fault_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(R); k++) a_q[k] <= '0;
      for (int j = 0; j < int'(N); j++) acc_q[j] <= '0;
      b_vld_out   <= 1'b0;
      b_out       <= '0;
      b_k_out     <= '0;
      b_first_out <= 1'b0;
      b_last_out  <= 1'b0;
      c_vld       <= 1'b0;
      c_out       <= '0;
    end else begin
      if (a_load) a_q <= a_row;
      b_vld_out <= b_vld_in;
      c_vld     <= b_vld_in && b_last_in;
      if (b_vld_in) begin
        b_out       <= b_in;
        b_k_out     <= b_k_in;
        b_first_out <= b_first_in;
        b_last_out  <= b_last_in;
        acc_q[0]    <= acc_new;
        for (int j = 1; j < int'(N); j++) acc_q[j] <= acc_q[j-1];
        if (b_last_in) c_out <= acc_new;
      end
    end
  end

endmodule
