// tb_givens_bpe: feeds a boundary PE a sequence of values and checks, against
// a floating-point model, the rotation (c, s) it emits and the diagonal
// element it keeps (the running norm of the values seen), including the
// r = x = 0 case and clear.
module tb_givens_bpe;
  localparam int W = 32, F = 12;
  localparam real ONE = 4096.0;
  logic clk = 0, rst_n = 0, clear = 0, x_vld = 0;
  logic signed [W-1:0] x_in = '0;
  logic [W-1:0] fault_mask = '0;
  logic cs_vld;
  logic signed [W-1:0] c_out, s_out, r_out;
  int checks = 0, failures = 0;

  givens_bpe #(.W(W), .F(F)) dut (.*);
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
    real r, x, rn, c, s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 8; rep++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      r = 0.0;
      for (int t = 0; t < 10; t++) begin
        x = (rep == 0 && t < 2) ? 0.0 : real'(int'($urandom_range(0, 2000)) - 1000) / 64.0;
        rn = $sqrt(r * r + x * x);
        c = (rn == 0.0) ? 1.0 : r / rn;
        s = (rn == 0.0) ? 0.0 : x / rn;
        x_in = W'(int'(x * ONE));
        x_vld = 1;
        @(negedge clk);
        x_vld = 0;
        checks++;
        if (!cs_vld || !near(real'(c_out) / ONE, c, 0.002) || !near(real'(s_out) / ONE, s, 0.002) ||
            !near(real'(r_out) / ONE, rn, 0.01 + rn * 0.001)) begin
          failures++;
          $display("FAIL: x=%f c=%f (%f) s=%f (%f) r=%f (%f)", x, real'(c_out) / ONE, c,
                   real'(s_out) / ONE, s, real'(r_out) / ONE, rn);
        end
        r = rn;
        @(negedge clk);
        checks++;
        if (cs_vld) begin
          failures++;
          $display("FAIL: cs_vld without x_vld");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
