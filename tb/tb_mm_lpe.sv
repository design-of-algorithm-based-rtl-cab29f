// tb_mm_lpe: feeds one linear-array PE the tagged b stream of a full R x N
// block (k outer, j inner) and checks the finished row of C (value and the
// cycle after the last k), the one-cycle pass-through of b and its tags,
// and that an idle cycle in the stream changes nothing.
module tb_mm_lpe;
  localparam int R = 3, N = 4, AW = 12, BW = 8, CW = 32, KW = $clog2(R);
  logic clk = 0, rst_n = 0, a_load = 0;
  logic signed [AW-1:0] a_row [R];
  logic b_vld_in = 0, b_first_in = 0, b_last_in = 0;
  logic signed [BW-1:0] b_in = '0;
  logic [KW-1:0] b_k_in = '0;
  logic [CW-1:0] fault_mask = '0;
  logic b_vld_out, b_first_out, b_last_out, c_vld;
  logic signed [BW-1:0] b_out;
  logic [KW-1:0] b_k_out;
  logic signed [CW-1:0] c_out;
  int checks = 0, failures = 0;
  int A [R], B [R][N], C [N];

  mm_lpe #(.R(R), .N(N), .AW(AW), .BW(BW), .CW(CW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < R; k++) a_row[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      for (int k = 0; k < R; k++) begin
        A[k] = int'($urandom_range(0, 2000)) - 1000;
        a_row[k] = AW'(A[k]);
      end
      for (int j = 0; j < N; j++) begin
        C[j] = 0;
        for (int k = 0; k < R; k++) begin
          B[k][j] = int'($urandom_range(0, 255)) - 128;
          C[j] += A[k] * B[k][j];
        end
      end
      a_load = 1;
      @(negedge clk);
      a_load = 0;
      for (int k = 0; k < R; k++) begin
        for (int j = 0; j < N; j++) begin
          if (rep % 2 == 1 && j == 1) begin  // an idle cycle inside the stream
            b_vld_in = 0;
            @(negedge clk);
            checks++;
            if (b_vld_out || c_vld) begin
              failures++;
              $display("FAIL: outputs valid after an idle input");
            end
          end
          b_vld_in = 1; b_in = BW'(B[k][j]); b_k_in = KW'(k);
          b_first_in = (k == 0); b_last_in = (k == R - 1);
          @(negedge clk);
          checks++;
          if (!b_vld_out || int'(b_out) != B[k][j] || int'(b_k_out) != k ||
              b_first_out != (k == 0) || b_last_out != (k == R - 1)) begin
            failures++;
            $display("FAIL: b pass-through at k=%0d j=%0d", k, j);
          end
          checks++;
          if (c_vld != (k == R - 1) || (k == R - 1 && int'(c_out) != C[j])) begin
            failures++;
            $display("FAIL: k=%0d j=%0d c_vld=%0d c_out=%0d exp %0d", k, j, c_vld, c_out, C[j]);
          end
        end
      end
      b_vld_in = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
