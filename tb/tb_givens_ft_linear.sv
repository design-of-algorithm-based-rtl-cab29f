// tb_givens_ft_linear: end-to-end test of the fault-detecting Givens
// reduction on the linear array at its default size. Random integer matrices
// are fed as fast as row_rdy allows (one row per N cycles), with an extra
// offer while row_rdy is low that must be ignored; R must match a
// floating-point Givens reduction done here, done must come N(M+1) + 1 cycles
// after the first row, and no row may be flagged. Then each PE is made faulty
// at each level it works on, for the one cycle it spends on that level of the
// last row; exactly the row of R for that level must be flagged.
module tb_givens_ft_linear;
  localparam int M = abft_pkg::GV_M, N = abft_pkg::GV_N, DW = abft_pkg::GV_DW;
  localparam int W = abft_pkg::GV_W, F = abft_pkg::GV_F, NC = N + 1;
  localparam real ONE = real'(1 << F);
  logic clk = 0, rst_n = 0, clear = 0, row_vld = 0, row_rdy;
  logic signed [DW-1:0] row_in [N];
  logic fault_en = 0;
  logic [$clog2(NC)-1:0] fault_j = '0;
  logic [W-1:0] fault_mask = W'(1) << (F + 8);
  logic signed [W-1:0] r_mat [N][NC];
  logic done;
  logic [N-1:0] row_err;
  logic any_err;
  int checks = 0, failures = 0;
  int cyc = 0, p0, done_cyc, ndone;
  real A [M][NC], Rr [N][NC];

  givens_ft_linear dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (rst_n && done) begin ndone++; done_cyc = cyc; end

  initial begin
    #2000000;
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

  // fk < 0: fault-free run.
  task automatic run(input int fk, input int fj);
    logic [N-1:0] exp_err;
    for (int i = 0; i < M; i++) begin
      A[i][N] = 0.0;
      for (int j = 0; j < N; j++) begin
        A[i][j] = real'(int'($urandom_range(0, 40)) - 20);
        A[i][N] += A[i][j];
      end
    end
    model();
    exp_err = '0;
    if (fk >= 0) exp_err[fk] = 1'b1;
    fault_j = ($clog2(NC))'(fj);
    clear = 1;
    @(negedge clk);
    clear = 0;
    ndone = 0;
    p0 = cyc;
    fork
      begin
        for (int i = 0; i < M; i++) begin
          while (!row_rdy) begin
            // An offer while not ready carries garbage and must be ignored.
            row_vld = (i == 1);
            for (int j = 0; j < N; j++) row_in[j] = DW'(99);
            @(negedge clk);
          end
          row_vld = 1;
          for (int j = 0; j < N; j++) row_in[j] = DW'(int'(A[i][j]));
          @(negedge clk);
        end
        row_vld = 0;
      end
      if (fk >= 0) begin
        while (cyc != p0 + N * (M - 1) + fj + fk) @(negedge clk);
        fault_en = 1;
        @(negedge clk);
        fault_en = 0;
      end
    join
    repeat (2 * N + 4) @(negedge clk);
    checks++;
    if (ndone != 1 || done_cyc - p0 != N * (M + 1) + 1) begin
      failures++;
      $display("FAIL: done seen %0d times, at cycle %0d (expected once at %0d)", ndone,
               done_cyc - p0, N * (M + 1) + 1);
    end
    checks++;
    if (row_err != exp_err || any_err != (fk >= 0)) begin
      failures++;
      $display("FAIL: fault at (%0d,%0d): row_err=%b expected %b", fk, fj, row_err, exp_err);
    end
    if (fk < 0) begin
      for (int k = 0; k < N; k++)
        for (int j = k; j < NC; j++) begin
          real d;
          d = real'(r_mat[k][j]) / ONE - Rr[k][j];
          checks++;
          if (d > 0.05 || d < -0.05) begin
            failures++;
            $display("FAIL: r(%0d,%0d)=%f expected %f", k, j, real'(r_mat[k][j]) / ONE, Rr[k][j]);
          end
        end
    end
  endtask

  initial begin
    for (int j = 0; j < N; j++) row_in[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 6; rep++) run(-1, 0);
    for (int k = 0; k < N; k++)
      for (int j = k; j < NC; j++) run(k, j);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
