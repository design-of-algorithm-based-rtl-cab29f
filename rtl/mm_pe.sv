// mm_pe: processing element of the two-dimensional matrix-multiplication array.
//
// PE (i,k) holds one element a(i,k) of the coded matrix A (loaded once with
// a_load: it stays put, because the dependence of a along j is projected onto
// the PE). Each cycle that b_vld_in is high it forms
//     c_out <= c_in + a * b_in      (the recurrence c(k) = c(k-1) + a b)
// and passes b on to the PE below, both through one register, so b moves one
// PE down and c one PE right per cycle, as the schedule t = i + j + k demands.
// fault_mask is XORed onto the c result: all zeros is a healthy PE, any other
// value models the arbitrary wrong output of a faulty PE (a test hook of this
// design, not part of the arithmetic).
//
// Timing: one multiply-accumulate per cycle, one cycle latency on b and c.
module mm_pe #(
  parameter int unsigned AW = 16,  // width of the stationary a element
  parameter int unsigned BW = 8,   // width of b
  parameter int unsigned CW = 32   // width of the c partial sum
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 a_load,
  input  logic signed [AW-1:0] a_in,
  input  logic                 b_vld_in,
  input  logic signed [BW-1:0] b_in,
  input  logic signed [CW-1:0] c_in,
  input  logic        [CW-1:0] fault_mask,
  output logic                 b_vld_out,
  output logic signed [BW-1:0] b_out,
  output logic signed [CW-1:0] c_out
);

  logic signed [AW-1:0] a_q;
  logic signed [CW-1:0] mac;

  assign mac = (c_in + CW'(a_q) * CW'(b_in)) ^ fault_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q       <= '0;
      b_vld_out <= 1'b0;
      b_out     <= '0;
      c_out     <= '0;
    end else begin
      if (a_load) a_q <= a_in;
      b_vld_out <= b_vld_in;
      if (b_vld_in) begin
        b_out <= b_in;
        c_out <= mac;
      end
    end
  end

endmodule
