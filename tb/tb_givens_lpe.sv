// tb_givens_lpe: drives PE J = 1 of a linear Givens array with N = 2 levels.
// Per row it gets a fresh element (level 0, internal: rotated by a random
// (c, s) supplied here as if from PE 0) and then works as the boundary cell
// on level 1. The stored r(0,1), r(1,1), the forwarded and generated
// rotations and their level tags are compared with a floating-point model.
module tb_givens_lpe;
  localparam int N = 2, J = 1, W = 32, F = 12, KW = 1;
  localparam real ONE = 4096.0;
  logic clk = 0, rst_n = 0, clear = 0, x_vld = 0, cs_vld_in = 0;
  logic signed [W-1:0] x_in = '0, c_in = '0, s_in = '0;
  logic [KW-1:0] cs_k_in = '0;
  logic [W-1:0] fault_mask = '0;
  logic cs_vld_out, row_done;
  logic [KW-1:0] cs_k_out;
  logic signed [W-1:0] c_out, s_out;
  logic signed [W-1:0] r_col [N];
  int checks = 0, failures = 0;

  givens_lpe #(.N(N), .J(J), .W(W), .F(F)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real a, real b, real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    real r0, r1, x, c, s, th, xp, rn, cb, sb;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1;
    @(negedge clk);
    clear = 0;
    r0 = 0.0; r1 = 0.0;
    for (int t = 0; t < 60; t++) begin
      x = real'(int'($urandom_range(0, 2000)) - 1000) / 64.0;
      th = real'($urandom_range(0, 3141)) / 1000.0 - 1.5707;
      c = real'(int'($cos(th) * ONE)) / ONE;
      s = real'(int'($sin(th) * ONE)) / ONE;
      // level 0: internal
      x_in = W'(int'(x * ONE)); x = real'(int'(x * ONE)) / ONE;
      c_in = W'(int'(c * ONE)); s_in = W'(int'(s * ONE));
      x_vld = 1; cs_vld_in = 1; cs_k_in = 0;
      @(negedge clk);
      x_vld = 0; cs_vld_in = 0;
      xp = c * x - s * r0;
      r0 = c * r0 + s * x;
      checks++;
      if (!cs_vld_out || cs_k_out != 0 || c_out != c_in || s_out != s_in ||
          !near(real'(r_col[0]) / ONE, r0, 0.002) || row_done) begin
        failures++;
        $display("FAIL level 0: r0=%f (%f) fwd=%0d k=%0d", real'(r_col[0]) / ONE, r0, cs_vld_out, cs_k_out);
      end
      r0 = real'(r_col[0]) / ONE;
      // level 1: boundary
      @(negedge clk);
      rn = $sqrt(r1 * r1 + xp * xp);
      cb = (rn == 0.0) ? 1.0 : r1 / rn;
      sb = (rn == 0.0) ? 0.0 : xp / rn;
      checks++;
      if (!cs_vld_out || cs_k_out != 1 || !near(real'(c_out) / ONE, cb, 0.003) ||
          !near(real'(s_out) / ONE, sb, 0.003) || !near(real'(r_col[1]) / ONE, rn, 0.01 + 0.002 * rn) ||
          !row_done) begin
        failures++;
        $display("FAIL level 1: c=%f (%f) s=%f (%f) r1=%f (%f) done=%0d", real'(c_out) / ONE, cb,
                 real'(s_out) / ONE, sb, real'(r_col[1]) / ONE, rn, row_done);
      end
      r1 = real'(r_col[1]) / ONE;
      if (t % 3 == 0) begin
        @(negedge clk);
        checks++;
        if (cs_vld_out || row_done) begin
          failures++;
          $display("FAIL: activity while idle");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
