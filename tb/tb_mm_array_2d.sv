// tb_mm_array_2d: drives a skewed B through the 2-D array holding a random
// coded A and checks every c(i,j) and the cycle it leaves row i
// (i + j + R cycles after b(0,0) is driven). A second pass makes PE (1,1)
// faulty and checks that only row 1 of C is wrong.
module tb_mm_array_2d;
  localparam int M = 2, R = 3, N = 5, AW = 12, BW = 8, CW = 32, ROWS = M + 2;
  logic clk = 0, rst_n = 0, a_load = 0;
  logic signed [AW-1:0] a_mat [ROWS][R];
  logic b_vld [R];
  logic signed [BW-1:0] b_in [R];
  logic fault_en = 0;
  logic [$clog2(ROWS)-1:0] fault_row = 1;
  logic [$clog2(R+1)-1:0] fault_col = 1;
  logic [CW-1:0] fault_mask = 32'h100;
  logic c_vld [ROWS];
  logic signed [CW-1:0] c_out [ROWS];
  int checks = 0, failures = 0;
  int A [ROWS][R], B [R][N], C [ROWS][N];
  int cyc = 0, p0, got [ROWS], bad_rows [ROWS];

  mm_array_2d #(.M(M), .R(R), .AW(AW), .BW(BW), .CW(CW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: row outputs, value and arrival cycle.
  always @(negedge clk) begin
    for (int i = 0; i < ROWS; i++) begin
      if (rst_n && c_vld[i]) begin
        int j;
        j = got[i];
        checks++;
        if (cyc != p0 + i + j + R) begin
          failures++;
          $display("FAIL: c(%0d,%0d) at cycle %0d, expected %0d", i, j, cyc - p0, i + j + R);
        end
        if (!fault_en) checks++;
        if (int'(c_out[i]) != C[i][j]) begin
          bad_rows[i]++;
          if (!fault_en) begin
            failures++;
            $display("FAIL: c(%0d,%0d)=%0d exp %0d", i, j, c_out[i], C[i][j]);
          end
        end
        got[i]++;
      end
    end
  end

  task automatic run();
    for (int i = 0; i < ROWS; i++) begin
      got[i] = 0; bad_rows[i] = 0;
      for (int k = 0; k < R; k++) begin
        A[i][k] = int'($urandom_range(0, 2000)) - 1000;
        a_mat[i][k] = AW'(A[i][k]);
      end
    end
    for (int k = 0; k < R; k++)
      for (int j = 0; j < N; j++) B[k][j] = int'($urandom_range(0, 255)) - 128;
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < N; j++) begin
        C[i][j] = 0;
        for (int k = 0; k < R; k++) C[i][j] += A[i][k] * B[k][j];
      end
    @(negedge clk);
    a_load = 1;
    @(negedge clk);
    a_load = 0;
    p0 = cyc;
    for (int t = 0; t < N + R - 1; t++) begin
      for (int k = 0; k < R; k++) begin
        b_vld[k] = (t - k >= 0 && t - k < N);
        b_in[k] = b_vld[k] ? BW'(B[k][t-k]) : '0;
      end
      @(negedge clk);
    end
    for (int k = 0; k < R; k++) b_vld[k] = 0;
    repeat (ROWS + R + 2) @(negedge clk);
    for (int i = 0; i < ROWS; i++) begin
      checks++;
      if (got[i] != N) begin
        failures++;
        $display("FAIL: row %0d delivered %0d results", i, got[i]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < R; k++) begin b_vld[k] = 0; b_in[k] = '0; end
    for (int i = 0; i < ROWS; i++) for (int k = 0; k < R; k++) a_mat[i][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run();
    run();
    fault_en = 1;
    run();
    for (int i = 0; i < ROWS; i++) begin
      checks++;
      if ((i == 1) != (bad_rows[i] > 0)) begin
        failures++;
        $display("FAIL: faulty PE in row 1, row %0d has %0d wrong results", i, bad_rows[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
