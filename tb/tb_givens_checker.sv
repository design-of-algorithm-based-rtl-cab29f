// tb_givens_checker: builds upper-triangular matrices whose last column is
// the row sum, perturbs nothing, one element by less than the tolerance, or
// one element by more, and checks the per-row flags one cycle later.
module tb_givens_checker;
  localparam int N = 4, W = 32, TOL = 256, NC = N + 1;
  logic clk = 0, rst_n = 0, in_vld = 0;
  logic signed [W-1:0] r_mat [N][NC];
  logic out_vld, any_err;
  logic [N-1:0] row_err;
  int checks = 0, failures = 0;

  givens_checker #(.N(N), .W(W), .TOL(TOL)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, sum, row, col, kind;
    logic [N-1:0] exp_err;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      for (int k = 0; k < N; k++) begin
        sum = 0;
        for (int j = 0; j < N; j++) begin
          v = (j >= k) ? int'($urandom_range(0, 400000)) - 200000 : int'($urandom_range(0, 1000));
          r_mat[k][j] = W'(v);
          if (j >= k) sum += v;
        end
        r_mat[k][N] = W'(sum + int'($urandom_range(0, 2 * TOL)) - TOL);  // rounding noise
      end
      kind = t % 3;
      row = $urandom_range(0, N - 1);
      col = $urandom_range(row, N);
      exp_err = '0;
      if (kind == 1) begin
        r_mat[row][col] = r_mat[row][col] + W'(4 * TOL + $urandom_range(0, 100000));
        exp_err[row] = 1'b1;
      end
      in_vld = 1;
      @(negedge clk);
      in_vld = 0;
      checks++;
      // kind 2 leaves the noise alone: any row near the edge of the
      // tolerance is judged by the same rule here.
      if (!out_vld || row_err != exp_err || any_err != (exp_err != 0)) begin
        failures++;
        $display("FAIL: kind %0d row %0d: row_err=%b exp %b", kind, row, row_err, exp_err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
