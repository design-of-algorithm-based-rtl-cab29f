// tb_givens_linear: pushes the rows of random coded matrices (last column =
// row sum) through the triangular array with the j-cycle input skew and
// compares the final R with a floating-point Givens reduction done here. It
// checks that the last row leaves the bottom-right PE M - 1 + 2N cycles after
// the first row enters. With a faulty PE 2 at level 1 the level above it must still
// match the model, and row 1 of R must violate its checksum (the rows below
// may take other rotation angles, which keeps their own checksums).
module tb_givens_linear;
  localparam int M = 5, N = 3, W = 32, F = 12, NC = N + 1;
  localparam real ONE = 4096.0;
  logic clk = 0, rst_n = 0, clear = 0;
  logic x_vld [NC];
  logic signed [W-1:0] x_in [NC];
  logic fault_en = 0;
  logic [$clog2(NC)-1:0] fault_j = 2;
  bit fault_req = 0;
  logic [W-1:0] fault_mask = 32'h0004_0000;
  logic signed [W-1:0] r_mat [N][NC];
  logic last_vld;
  int checks = 0, failures = 0;
  int cyc = 0, p0, nlast, last_cyc;
  real A [M][NC], Rr [N][NC];

  givens_linear #(.N(N), .W(W), .F(F)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && last_vld) begin nlast++; last_cyc = cyc; end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model();
    real x [NC];
    real rn, c, s, r;
    for (int k = 0; k < N; k++) for (int j = 0; j < NC; j++) Rr[k][j] = 0.0;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < NC; j++) x[j] = A[i][j];
      for (int k = 0; k < N; k++) begin
        rn = $sqrt(Rr[k][k] * Rr[k][k] + x[k] * x[k]);
        c = (rn == 0.0) ? 1.0 : Rr[k][k] / rn;
        s = (rn == 0.0) ? 0.0 : x[k] / rn;
        Rr[k][k] = rn;
        for (int j = k + 1; j < NC; j++) begin
          r = Rr[k][j];
          Rr[k][j] = c * r + s * x[j];
          x[j] = c * x[j] - s * r;
        end
      end
    end
  endtask

  task automatic run(output int bad_cols [NC], output int bad_rows [N], output real csum_err [N]);
    for (int i = 0; i < M; i++) begin
      A[i][N] = 0.0;
      for (int j = 0; j < N; j++) begin
        A[i][j] = real'(int'($urandom_range(0, 16)) - 8);
        A[i][N] += A[i][j];
      end
    end
    model();
    clear = 1;
    @(negedge clk);
    clear = 0;
    nlast = 0;
    p0 = cyc;
    // Skewed input: element j of row i at cycle N i + j; a requested fault
    // hits PE 2 while it works on level 1 of the last row.
    for (int t = 0; t < N * (M - 1) + NC; t++) begin
      for (int j = 0; j < NC; j++) begin
        x_vld[j] = (t - j >= 0 && (t - j) % N == 0 && (t - j) / N < M);
        x_in[j] = x_vld[j] ? W'(int'(A[(t-j)/N][j] * ONE)) : '0;
      end
      fault_en = fault_req && (t == N * (M - 1) + 2 + 1);
      @(negedge clk);
    end
    fault_en = 0;
    for (int j = 0; j < NC; j++) x_vld[j] = 0;
    repeat (2 * N + 2) @(negedge clk);
    checks++;
    if (nlast != M || last_cyc - p0 != N * (M - 1) + 2 * N) begin
      failures++;
      $display("FAIL: %0d rows left the array, last at cycle %0d (expected %0d at %0d)", nlast,
               last_cyc - p0, M, N * (M - 1) + 2 * N);
    end
    for (int j = 0; j < NC; j++) bad_cols[j] = 0;
    for (int k = 0; k < N; k++) begin
      bad_rows[k] = 0;
      csum_err[k] = real'(r_mat[k][N]) / ONE;
      for (int j = k; j < N; j++) csum_err[k] -= real'(r_mat[k][j]) / ONE;
      for (int j = k; j < NC; j++) begin
        real d;
        d = real'(r_mat[k][j]) / ONE - Rr[k][j];
        if (d > 0.05 || d < -0.05) begin
          bad_cols[j]++;
          bad_rows[k]++;
        end
      end
    end
  endtask

  initial begin
    int bad [NC];
    int badr [N];
    real cse [N];
    for (int j = 0; j < NC; j++) begin x_vld[j] = 0; x_in[j] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      run(bad, badr, cse);
      for (int j = 0; j < NC; j++) begin
        checks++;
        if (bad[j] != 0) begin
          failures++;
          $display("FAIL: rep %0d column %0d of R has %0d wrong elements", rep, j, bad[j]);
        end
      end
    end
    fault_req = 1;
    run(bad, badr, cse);
    checks++;
    if (badr[0] != 0 || badr[1] == 0) begin
      failures++;
      $display("FAIL: faulty PE 2 at level 1: wrong elements per row %0d %0d", badr[0], badr[1]);
    end
    checks++;
    if (cse[1] < 0.5 && cse[1] > -0.5) begin
      failures++;
      $display("FAIL: faulty PE 2 at level 1: row 1 checksum still holds (%f)", cse[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
