// tb_mm_ft_linear: end-to-end test of the fault-tolerant linear matrix
// multiplier at its default size. B is streamed row by row; each column of C
// must come out M + 3 cycles after the element b(R-1, j) that completes it,
// equal to a product formed here. Runs with one faulty PE in each data row
// and each checksum row check the correction, its status and position.
module tb_mm_ft_linear;
  import abft_pkg::*;
  localparam int M = abft_pkg::MM_M, R = abft_pkg::MM_R, N = abft_pkg::MM_N, DW = abft_pkg::MM_DW;
  localparam int ROWS = M + 2, CW = DW + M + DW + $clog2(R) + 1;
  logic clk = 0, rst_n = 0, a_load = 0, b_vld = 0;
  logic signed [DW-1:0] a_data [M][R];
  logic signed [DW-1:0] b_in = '0;
  logic fault_en = 0;
  logic [$clog2(ROWS)-1:0] fault_row = '0;
  logic [CW-1:0] fault_mask = '0;
  logic out_vld;
  logic signed [CW-1:0] out_col [M];
  wcc_status_e out_status;
  logic [$clog2(ROWS)-1:0] out_pos;
  int checks = 0, failures = 0;
  int A [M][R], B [R][N], C [M][N];
  int cyc = 0, p0, got;
  wcc_status_e exp_st [N];
  int exp_pos;

  mm_ft_linear dut (.*);
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
      if (cyc != p0 + (R - 1) * N + got + M + 3) begin
        failures++;
        $display("FAIL: column %0d at cycle %0d, expected %0d", got, cyc - p0, (R - 1) * N + got + M + 3);
      end
      checks++;
      if (out_status != exp_st[got] || (exp_st[got] != WCC_OK && int'(out_pos) != exp_pos)) begin
        failures++;
        $display("FAIL: column %0d status %s pos %0d, expected %s %0d", got, out_status.name(),
                 out_pos, exp_st[got].name(), exp_pos);
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
    fault_mask = CW'(1) << $urandom_range(0, CW - 2);
    exp_pos = frow;
    // Model of the faulty PE: the mask is XORed onto every partial sum, so
    // the error may cancel in some columns; those must come out as OK.
    for (int j = 0; j < N; j++) begin
      logic signed [CW-1:0] good, bad;
      int coef;
      good = '0;
      bad = '0;
      for (int k = 0; k < R; k++) begin
        coef = 0;
        for (int i = 0; i < M; i++)
          coef += (frow < M) ? ((i == frow) ? A[i][k] : 0) : (frow == M ? A[i][k] : A[i][k] * (1 << i));
        good = good + CW'(coef * B[k][j]);
        bad = (bad + CW'(coef * B[k][j])) ^ fault_mask;
      end
      exp_st[j] = (!fault || good == bad) ? WCC_OK : (frow < M ? WCC_DATA_FIXED : WCC_CHECK_ERR);
    end
    got = 0;
    @(negedge clk);
    a_load = 1;
    @(negedge clk);
    a_load = 0;
    p0 = cyc;
    for (int k = 0; k < R; k++)
      for (int j = 0; j < N; j++) begin
        b_vld = 1;
        b_in = DW'(B[k][j]);
        @(negedge clk);
      end
    b_vld = 0;
    repeat (M + 5) @(negedge clk);
    checks++;
    if (got != N) begin
      failures++;
      $display("FAIL: %0d columns delivered, expected %0d", got, N);
    end
  endtask

  initial begin
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
