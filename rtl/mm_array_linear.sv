// mm_array_linear: linear systolic array for C = A B after double projection
// of the dependence graph (along j and k), S = [1 0 0], W = [1 1 N].
//
// ROWS = M+2 PEs in a chain, PE i owning row i of the coded A and of C. The
// elements of B enter PE 0 one per cycle in the order b(0,0..N-1),
// b(1,0..N-1), ..., b(R-1,0..N-1) and move one PE per cycle down the chain,
// so node (i,j,k) runs at time i + j + N k. The array sequences the stream
// itself: a counter tags each accepted b with its k index and with first/last
// flags, which travel with it. PE i delivers c(i,j) on its own c port,
// i cycles after PE 0 delivers c(0,j). A faulty PE spoils only row i of C,
// i.e. one element of each coded column.
//
// One product of size M x R x N takes N R cycles of input; the last node runs
// M+1 cycles after the last input (computation time N R + M + 1 cycles,
// as given by the schedule).
module mm_array_linear #(
  parameter int unsigned M  = abft_pkg::MM_M,
  parameter int unsigned R  = abft_pkg::MM_R,
  parameter int unsigned N  = abft_pkg::MM_N,
  parameter int unsigned AW = abft_pkg::MM_DW + abft_pkg::MM_M,
  parameter int unsigned BW = abft_pkg::MM_DW,
  parameter int unsigned CW = 32,
  localparam int unsigned ROWS = M + 2,
  localparam int unsigned KW   = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned JW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      a_load,
  input  logic signed [AW-1:0]      a_mat [ROWS][R],
  input  logic                      b_vld,
  input  logic signed [BW-1:0]      b_in,
  input  logic                      fault_en,
  input  logic [$clog2(ROWS)-1:0]   fault_row,
  input  logic [CW-1:0]             fault_mask,
  output logic                      c_vld [ROWS],
  output logic signed [CW-1:0]      c_out [ROWS]
);

  // Stream sequencer: position (k, j) of the next b element.
  logic [KW-1:0] k_q;
  logic [JW-1:0] j_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q <= '0;
      j_q <= '0;
    end else if (a_load) begin
      k_q <= '0;
      j_q <= '0;
    end else if (b_vld) begin
      if (j_q == JW'(N - 1)) begin
        j_q <= '0;
        k_q <= (k_q == KW'(R - 1)) ? '0 : k_q + 1'b1;
      end else begin
        j_q <= j_q + 1'b1;
      end
    end
  end

  logic                 bv  [ROWS+1];
  logic signed [BW-1:0] bd  [ROWS+1];
  logic [KW-1:0]        bk  [ROWS+1];
  logic                 bf  [ROWS+1];
  logic                 bl  [ROWS+1];

  assign bv[0] = b_vld;
  assign bd[0] = b_in;
  assign bk[0] = k_q;
  assign bf[0] = (k_q == '0);
  assign bl[0] = (k_q == KW'(R - 1));

  for (genvar i = 0; i < int'(ROWS); i++) begin : g_pe
    logic [CW-1:0] mask;
    assign mask = (fault_en && fault_row == i) ? fault_mask : '0;
    mm_lpe #(.R(R), .N(N), .AW(AW), .BW(BW), .CW(CW)) u_pe (
      .clk, .rst_n,
      .a_load, .a_row(a_mat[i]),
      .b_vld_in(bv[i]), .b_in(bd[i]), .b_k_in(bk[i]), .b_first_in(bf[i]), .b_last_in(bl[i]),
      .fault_mask(mask),
      .b_vld_out(bv[i+1]), .b_out(bd[i+1]), .b_k_out(bk[i+1]), .b_first_out(bf[i+1]),
      .b_last_out(bl[i+1]),
      .c_vld(c_vld[i]), .c_out(c_out[i])
    );
  end

endmodule
