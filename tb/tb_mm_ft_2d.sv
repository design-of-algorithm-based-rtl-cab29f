// tb_mm_ft_2d: end-to-end test of the fault-tolerant 2-D matrix multiplier.
// For random A (M x R) and B (R x N) it streams B one column per cycle and
// checks each delivered column of C against a product formed here, its
// status, and its latency of R + M + 2 cycles. It then makes one PE faulty,
// in a data row and in each checksum row, and checks that the data still come
// out right with the status and position of the error.
module tb_mm_ft_2d;
  import abft_pkg::*;
  localparam int M = abft_pkg::MM_M, R = abft_pkg::MM_R, DW = abft_pkg::MM_DW, N = 6;
  localparam int ROWS = M + 2, CW = DW + M + DW + $clog2(R) + 1;
  logic clk = 0, rst_n = 0, a_load = 0, b_vld = 0;
  logic signed [DW-1:0] a_data [M][R];
  logic signed [DW-1:0] b_col [R];
  logic fault_en = 0;
  logic [$clog2(ROWS)-1:0] fault_row = '0;
  logic [$clog2(R+1)-1:0] fault_col = '0;
  logic [CW-1:0] fault_mask = '0;
  logic out_vld;
  logic signed [CW-1:0] out_col [M];
  wcc_status_e out_status;
  logic [$clog2(ROWS)-1:0] out_pos;
  int checks = 0, failures = 0;
  int A [M][R], B [R][N], C [M][N];
  int cyc = 0, p0, got;
  wcc_status_e exp_st;
  int exp_pos;

  mm_ft_2d dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (rst_n && out_vld) begin
      checks++;
      if (cyc != p0 + got + R + M + 2) begin
        failures++;
        $display("FAIL: column %0d after %0d cycles, expected %0d", got, cyc - p0 - got, R + M + 2);
      end
      checks++;
      if (out_status != exp_st || (exp_st != WCC_OK && int'(out_pos) != exp_pos)) begin
        failures++;
        $display("FAIL: column %0d status %s pos %0d, expected %s %0d", got, out_status.name(),
                 out_pos, exp_st.name(), exp_pos);
      end
      for (int i = 0; i < M; i++) begin
        checks++;
        if (int'(out_col[i]) != C[i][got]) begin
          failures++;
          $display("FAIL: c(%0d,%0d)=%0d exp %0d", i, got, out_col[i], C[i][got]);
        end
      end
      got++;
    end
  end

  task automatic run(input bit fault, input int frow);
    for (int i = 0; i < M; i++)
      for (int k = 0; k < R; k++) begin
        A[i][k] = int'($urandom_range(0, 255)) - 128;
        a_data[i][k] = DW'(A[i][k]);
      end
    for (int k = 0; k < R; k++)
      for (int j = 0; j < N; j++) B[k][j] = int'($urandom_range(0, 255)) - 128;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        C[i][j] = 0;
        for (int k = 0; k < R; k++) C[i][j] += A[i][k] * B[k][j];
      end
    fault_en = fault;
    fault_row = ($clog2(ROWS))'(frow);
    fault_col = ($clog2(R+1))'($urandom_range(0, R - 1));
    fault_mask = CW'(1) << $urandom_range(0, CW - 2);
    exp_st = !fault ? WCC_OK : (frow < M ? WCC_DATA_FIXED : WCC_CHECK_ERR);
    exp_pos = frow;
    got = 0;
    @(negedge clk);
    a_load = 1;
    @(negedge clk);
    a_load = 0;
    p0 = cyc;
    for (int j = 0; j < N; j++) begin
      b_vld = 1;
      for (int k = 0; k < R; k++) b_col[k] = DW'(B[k][j]);
      @(negedge clk);
    end
    b_vld = 0;
    repeat (R + M + 4) @(negedge clk);
    checks++;
    if (got != N) begin
      failures++;
      $display("FAIL: %0d columns delivered, expected %0d", got, N);
    end
  endtask

  initial begin
    for (int k = 0; k < R; k++) b_col[k] = '0;
    for (int i = 0; i < M; i++) for (int k = 0; k < R; k++) a_data[i][k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0);
    run(0, 0);
    for (int r = 0; r < ROWS; r++) run(1, r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
