// givens_bpe: boundary (diagonal) PE of the Givens triangular array.
//
// PE (k,k) keeps the diagonal element r = r(k,k) of R. When a row element x
// arrives (x_vld) it forms the rotation that zeroes x against r:
//     rn = sqrt(r^2 + x^2),  c = r / rn,  s = x / rn   (c = 1, s = 0 if rn = 0)
// and sends (c, s) to its right neighbour through one register. The stored
// element is updated with the same rounded rotation the internal PEs use,
//     r <= c r + s x          (equal to rn up to rounding),
// so that every element of a row of R, checksum column included, sees the
// identical linear operation and the row checksum survives up to rounding.
// Numbers are signed fixed point, W bits with F fraction bits; r stays
// non-negative. clear zeroes r for a new matrix.
// fault_mask is XORed onto the stored r (test hook of this design).
//
// Timing: one rotation per cycle; c, s and cs_vld one cycle after x_vld.
// The formulas are those of Givens reduction; fixed point, the square root
// (bit-serial, unrolled) and the divider are this design's choices.
module givens_bpe #(
  parameter int unsigned W = abft_pkg::GV_W,
  parameter int unsigned F = abft_pkg::GV_F
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                x_vld,
  input  logic signed [W-1:0] x_in,
  input  logic        [W-1:0] fault_mask,
  output logic                cs_vld,
  output logic signed [W-1:0] c_out,
  output logic signed [W-1:0] s_out,
  output logic signed [W-1:0] r_out
);

  logic signed [W-1:0]   r_q;
  logic        [63:0]    sq;
  logic signed [W-1:0]   rn, c_n, s_n;
  logic signed [W+F-1:0] num_c, num_s, den;
  logic signed [2*W-1:0] pr;
  localparam logic signed [2*W-1:0] HALF = (2*W)'(1) <<< (F - 1);

  always_comb begin
    sq    = 64'(unsigned'(64'(r_q) * 64'(r_q))) + 64'(unsigned'(64'(x_in) * 64'(x_in)));
    rn    = W'(abft_pkg::isqrt64(sq));
    num_c = (W+F)'(r_q)  <<< F;
    num_s = (W+F)'(x_in) <<< F;
    den   = (W+F)'(rn);
    if (rn == '0) begin
      c_n = W'(1) <<< F;
      s_n = '0;
    end else begin
      c_n = W'(num_c / den);
      s_n = W'(num_s / den);
    end
    pr = (2*W)'(c_n) * (2*W)'(r_q) + (2*W)'(s_n) * (2*W)'(x_in) + HALF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q    <= '0;
      cs_vld <= 1'b0;
      c_out  <= '0;
      s_out  <= '0;
    end else begin
      cs_vld <= x_vld && !clear;
      if (clear) begin
        r_q <= '0;
      end else if (x_vld) begin
        r_q   <= W'(pr >>> F) ^ fault_mask;
        c_out <= c_n;
        s_out <= s_n;
      end
    end
  end

  assign r_out = r_q;

endmodule
