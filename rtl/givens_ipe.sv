// givens_ipe: internal PE of the Givens triangular array.
//
// PE (k,j), j > k, keeps one element r = r(k,j) of R. With a row element x
// from above and a rotation (c, s) from the left it computes
//     r <= c r + s x          (updated element of row k of R)
//     x_out <= c x - s r      (element passed down to row k+1)
// and passes (c, s) to the right, each through one register. Signed fixed
// point, W bits with F fraction bits, products rounded to nearest.
// clear zeroes r. fault_mask is XORed onto the stored r (test hook).
//
// Timing: one rotation per cycle, x and (c, s) must arrive in the same cycle
// (x_vld); all outputs one cycle later. The rotation follows Givens
// reduction; the number format is this design's choice.
module givens_ipe #(
  parameter int unsigned W = abft_pkg::GV_W,
  parameter int unsigned F = abft_pkg::GV_F
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                x_vld,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] c_in,
  input  logic signed [W-1:0] s_in,
  input  logic        [W-1:0] fault_mask,
  output logic                x_vld_out,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] c_out,
  output logic signed [W-1:0] s_out,
  output logic signed [W-1:0] r_out
);

  logic signed [W-1:0]   r_q;
  logic signed [2*W-1:0] pr, px;
  localparam logic signed [2*W-1:0] HALF = (2*W)'(1) <<< (F - 1);

  always_comb begin
    pr = (2*W)'(c_in) * (2*W)'(r_q) + (2*W)'(s_in) * (2*W)'(x_in) + HALF;
    px = (2*W)'(c_in) * (2*W)'(x_in) - (2*W)'(s_in) * (2*W)'(r_q) + HALF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q       <= '0;
      x_vld_out <= 1'b0;
      x_out     <= '0;
      c_out     <= '0;
      s_out     <= '0;
    end else begin
      x_vld_out <= x_vld && !clear;
      if (clear) begin
        r_q <= '0;
      end else if (x_vld) begin
        r_q   <= W'(pr >>> F) ^ fault_mask;
        x_out <= W'(px >>> F);
        c_out <= c_in;
        s_out <= s_in;
      end
    end
  end

  assign r_out = r_q;

endmodule
