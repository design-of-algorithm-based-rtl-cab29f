// givens_lpe: processing element J of the linear Givens array.
//
// The linear array comes from projecting the Givens dependence graph along i
// and k, so PE J executes every node (i, J, k) of column J. Under the schedule
// W = [N 1 1] node (i,J,k) runs at time N i + J + k: each row of A occupies
// the PE for N consecutive cycles, one per level k = 0..N-1. At level k the
// PE is
//   * the boundary cell when k == J: from its r(J,J) and the element x it
//     forms c = r/rn, s = x/rn (rn = sqrt(r^2 + x^2)) and r <= c r + s x;
//   * an internal cell when k < J: with (c, s) of level k from the left it
//     updates r(k,J) <= c r + s x and keeps x <= c x - s r for level k+1;
//   * idle when k > J (the null computations of the triangular node space).
// The projected dependences become local storage: an N-word memory holds
// r(0..N-1, J) (link delay N) and one register carries x from level to level
// (delay 1). Rotations reaching the PE for levels k < J are forwarded right
// together with the one it makes at level J, each with its level tag.
//
// Interface: x_vld/x_in bring element J of a new row (level 0); rows must be
// at least N cycles apart. cs_*_in come from PE J-1 and arrive on the cycle
// of the matching level. r_col is the memory content. fault_mask is XORed
// onto every r this PE stores (test hook). Arithmetic and number format are
// those of givens_bpe and givens_ipe.
module givens_lpe #(
  parameter int unsigned N = abft_pkg::GV_N,
  parameter int unsigned J = 0,
  parameter int unsigned W = abft_pkg::GV_W,
  parameter int unsigned F = abft_pkg::GV_F,
  localparam int unsigned KW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                x_vld,
  input  logic signed [W-1:0] x_in,
  input  logic                cs_vld_in,
  input  logic [KW-1:0]       cs_k_in,
  input  logic signed [W-1:0] c_in,
  input  logic signed [W-1:0] s_in,
  input  logic        [W-1:0] fault_mask,
  output logic                cs_vld_out,
  output logic [KW-1:0]       cs_k_out,
  output logic signed [W-1:0] c_out,
  output logic signed [W-1:0] s_out,
  output logic                row_done,    // pulses after level N-1 of a row
  output logic signed [W-1:0] r_col [N]
);

  localparam logic signed [2*W-1:0] HALF = (2*W)'(1) <<< (F - 1);

  logic signed [W-1:0] r_q [N];
  logic signed [W-1:0] x_q;
  logic                busy_q;
  logic [KW-1:0]       k_q;

  // Level executed this cycle and the element it works on.
  logic                active;
  logic [KW-1:0]       k_now;
  logic signed [W-1:0] x_now, r_now;
  assign active = x_vld || busy_q;
  assign k_now  = x_vld ? '0 : k_q;
  assign x_now  = x_vld ? x_in : x_q;
  assign r_now  = r_q[k_now];

  // Boundary-cell rotation.
  logic        [63:0]    sq;
  logic signed [W-1:0]   rn, cb, sb;
  logic signed [W+F-1:0] num_c, num_s, den;
  always_comb begin
    sq    = 64'(unsigned'(64'(r_now) * 64'(r_now))) + 64'(unsigned'(64'(x_now) * 64'(x_now)));
    rn    = W'(abft_pkg::isqrt64(sq));
    num_c = (W+F)'(r_now) <<< F;
    num_s = (W+F)'(x_now) <<< F;
    den   = (W+F)'(rn);
    if (rn == '0) begin
      cb = W'(1) <<< F;
      sb = '0;
    end else begin
      cb = W'(num_c / den);
      sb = W'(num_s / den);
    end
  end

  // Rotation applied this cycle: own at the boundary level, else from the left.
  logic                  is_bnd, is_int;
  logic signed [W-1:0]   c_use, s_use;
  logic signed [2*W-1:0] pr, px;
  always_comb begin
    is_bnd = active && (32'(k_now) == J);
    is_int = active && (int'(k_now) < int'(J));
    c_use  = is_bnd ? cb : c_in;
    s_use  = is_bnd ? sb : s_in;
    pr = (2*W)'(c_use) * (2*W)'(r_now) + (2*W)'(s_use) * (2*W)'(x_now) + HALF;
    px = (2*W)'(c_use) * (2*W)'(x_now) - (2*W)'(s_use) * (2*W)'(r_now) + HALF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N); k++) r_q[k] <= '0;
      x_q        <= '0;
      busy_q     <= 1'b0;
      k_q        <= '0;
      cs_vld_out <= 1'b0;
      cs_k_out   <= '0;
      c_out      <= '0;
      s_out      <= '0;
      row_done   <= 1'b0;
    end else if (clear) begin
      for (int k = 0; k < int'(N); k++) r_q[k] <= '0;
      busy_q     <= 1'b0;
      k_q        <= '0;
      cs_vld_out <= 1'b0;
      row_done   <= 1'b0;
    end else begin
      cs_vld_out <= is_bnd || (is_int && cs_vld_in);
      row_done   <= active && (k_now == KW'(N - 1));
      if (active) begin
        busy_q <= (k_now != KW'(N - 1));
        k_q    <= k_now + 1'b1;
        if (is_bnd || is_int) begin
          r_q[k_now] <= W'(pr >>> F) ^ fault_mask;
          x_q        <= W'(px >>> F);
          cs_k_out   <= k_now;
          c_out      <= c_use;
          s_out      <= s_use;
        end
      end
    end
  end

  assign r_col = r_q;

  // A new row may only start once the previous one has finished its levels,
  // and a rotation from the left must belong to the level executed now.
  // (Linters may note that rst_n is used both as an asynchronous reset and
  // in these disable conditions; that is intended and creates no logic.)
  a_row_spacing: assert property (@(posedge clk) disable iff (!rst_n) x_vld |-> !busy_q);
  a_level_match: assert property (@(posedge clk) disable iff (!rst_n || clear)
                                  is_int |-> (cs_vld_in && cs_k_in == k_now));

endmodule
