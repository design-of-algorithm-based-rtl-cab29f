// tb_givens_ipe: applies random rotations to an internal PE and checks the
// stored element (c r + s x), the element passed down (c x - s r) and the
// one-cycle pass-through of (c, s) against a floating-point model.
module tb_givens_ipe;
  localparam int W = 32, F = 12;
  localparam real ONE = 4096.0;
  logic clk = 0, rst_n = 0, clear = 0, x_vld = 0;
  logic signed [W-1:0] x_in = '0, c_in = '0, s_in = '0;
  logic [W-1:0] fault_mask = '0;
  logic x_vld_out;
  logic signed [W-1:0] x_out, c_out, s_out, r_out;
  int checks = 0, failures = 0;

  givens_ipe #(.W(W), .F(F)) dut (.*);
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
    real r, x, c, s, th, rr, xx;
    repeat (2) @(negedge clk);
    rst_n = 1;
    clear = 1;
    @(negedge clk);
    clear = 0;
    r = 0.0;
    for (int t = 0; t < 100; t++) begin
      x = real'(int'($urandom_range(0, 2000)) - 1000) / 64.0;
      th = real'($urandom_range(0, 6283)) / 1000.0;
      c = real'(int'($cos(th) * ONE)) / ONE;
      s = real'(int'($sin(th) * ONE)) / ONE;
      x_in = W'(int'(x * ONE));
      c_in = W'(int'(c * ONE));
      s_in = W'(int'(s * ONE));
      x = real'(int'(x * ONE)) / ONE;
      rr = c * r + s * x;
      xx = c * x - s * r;
      x_vld = 1;
      @(negedge clk);
      x_vld = 0;
      checks++;
      if (!x_vld_out || !near(real'(r_out) / ONE, rr, 0.001) || !near(real'(x_out) / ONE, xx, 0.001) ||
          c_out != c_in || s_out != s_in) begin
        failures++;
        $display("FAIL: r=%f (%f) x=%f (%f)", real'(r_out) / ONE, rr, real'(x_out) / ONE, xx);
      end
      r = real'(r_out) / ONE;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
