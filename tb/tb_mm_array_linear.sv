// tb_mm_array_linear: streams B (row by row) into the linear array holding a
// random coded A and checks every c(i,j), the cycle it leaves PE i
// ((R-1)N + j + i + 1 cycles after b(0,0) is driven, so the last result
// appears N R + M + 1 cycles after the first input: the computation time
// (M+1) + (N-1) + (R-1)N + 1 of the schedule W = [1 1 N]), and that a
// faulty PE spoils only its own row.
module tb_mm_array_linear;
  localparam int M = 2, R = 3, N = 4, AW = 12, BW = 8, CW = 32, ROWS = M + 2;
  logic clk = 0, rst_n = 0, a_load = 0, b_vld = 0;
  logic signed [AW-1:0] a_mat [ROWS][R];
  logic signed [BW-1:0] b_in = '0;
  logic fault_en = 0;
  logic [$clog2(ROWS)-1:0] fault_row = 2;
  logic [CW-1:0] fault_mask = 32'h40;
  logic c_vld [ROWS];
  logic signed [CW-1:0] c_out [ROWS];
  int checks = 0, failures = 0;
  int A [ROWS][R], B [R][N], C [ROWS][N];
  int cyc = 0, p0, got [ROWS], bad_rows [ROWS], last_cyc;

  mm_array_linear #(.M(M), .R(R), .N(N), .AW(AW), .BW(BW), .CW(CW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    for (int i = 0; i < ROWS; i++) begin
      if (rst_n && c_vld[i]) begin
        int j;
        j = got[i];
        checks++;
        if (cyc != p0 + (R - 1) * N + j + i + 1) begin
          failures++;
          $display("FAIL: c(%0d,%0d) at cycle %0d, expected %0d", i, j, cyc - p0,
                   (R - 1) * N + j + i + 1);
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
        last_cyc = cyc;
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
    for (int k = 0; k < R; k++)
      for (int j = 0; j < N; j++) begin
        b_vld = 1;
        b_in = BW'(B[k][j]);
        @(negedge clk);
      end
    b_vld = 0;
    repeat (ROWS + 3) @(negedge clk);
    for (int i = 0; i < ROWS; i++) begin
      checks++;
      if (got[i] != N) begin
        failures++;
        $display("FAIL: PE %0d delivered %0d results", i, got[i]);
      end
    end
    checks++;
    if (last_cyc - p0 != N * R + ROWS - 1) begin
      failures++;
      $display("FAIL: product took %0d cycles, expected %0d", last_cyc - p0, N * R + ROWS - 1);
    end
  endtask

  initial begin
    for (int i = 0; i < ROWS; i++) for (int k = 0; k < R; k++) a_mat[i][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run();
    run();
    fault_en = 1;
    run();
    for (int i = 0; i < ROWS; i++) begin
      checks++;
      if ((i == 2) != (bad_rows[i] > 0)) begin
        failures++;
        $display("FAIL: faulty PE 2, row %0d has %0d wrong results", i, bad_rows[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
