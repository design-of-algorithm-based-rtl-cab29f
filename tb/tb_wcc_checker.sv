// tb_wcc_checker: builds code vectors here, corrupts none, one data element,
// one checksum or two data elements, and checks status, error position and
// the corrected data one cycle later.
module tb_wcc_checker;
  import abft_pkg::*;
  localparam int L = 4, W = 24;
  logic clk = 0, rst_n = 0, in_vld = 0;
  logic signed [W-1:0] in_vec [L+2];
  logic out_vld;
  logic signed [W-1:0] out_data [L];
  wcc_status_e out_status;
  logic [$clog2(L+2)-1:0] out_pos;
  int checks = 0, failures = 0;
  int cnt_ok = 0, cnt_fix = 0, cnt_chk = 0, cnt_unc = 0;

  wcc_checker #(.L(L), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 none, 1 data error, 2 WCS1 error, 3 WCS2 error, 4 double data error
  task automatic run(input int kind);
    int d [L];
    int w1, w2, p, e;
    wcc_status_e exp_st;
    int exp_pos;
    w1 = 0; w2 = 0;
    for (int i = 0; i < L; i++) begin
      d[i] = int'($urandom_range(0, 2000)) - 1000;
      w1 += d[i];
      w2 += d[i] * (1 << i);
    end
    for (int i = 0; i < L; i++) in_vec[i] = W'(d[i]);
    in_vec[L] = W'(w1);
    in_vec[L+1] = W'(w2);
    p = $urandom_range(0, L - 1);
    e = int'($urandom_range(1, 500)) * (($urandom & 1) != 0 ? 1 : -1);
    exp_pos = 0;
    case (kind)
      1: begin in_vec[p] = W'(d[p] + e); exp_st = WCC_DATA_FIXED; exp_pos = p; end
      2: begin in_vec[L] = W'(w1 + e); exp_st = WCC_CHECK_ERR; exp_pos = L; end
      3: begin in_vec[L+1] = W'(w2 + e); exp_st = WCC_CHECK_ERR; exp_pos = L + 1; end
      4: begin in_vec[0] = W'(d[0] + 1); in_vec[1] = W'(d[1] + 1); exp_st = WCC_UNCORRECTABLE; end
      default: exp_st = WCC_OK;
    endcase
    @(negedge clk);
    in_vld = 1;
    @(negedge clk);
    in_vld = 0;
    checks++;
    if (!out_vld || out_status != exp_st || (kind inside {1, 2, 3} && int'(out_pos) != exp_pos)) begin
      failures++;
      $display("FAIL kind %0d: vld=%0d status=%s pos=%0d (exp %s %0d)", kind, out_vld,
               out_status.name(), out_pos, exp_st.name(), exp_pos);
    end
    if (kind != 4) begin
      for (int i = 0; i < L; i++) begin
        checks++;
        if (int'(out_data[i]) != d[i]) begin
          failures++;
          $display("FAIL kind %0d: data[%0d]=%0d exp %0d", kind, i, out_data[i], d[i]);
        end
      end
    end
    case (out_status)
      WCC_OK: cnt_ok++;
      WCC_DATA_FIXED: cnt_fix++;
      WCC_CHECK_ERR: cnt_chk++;
      default: cnt_unc++;
    endcase
  endtask

  initial begin
    for (int i = 0; i < L + 2; i++) in_vec[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) run(t % 5);
    $display("ok=%0d fixed=%0d checksum_err=%0d uncorrectable=%0d", cnt_ok, cnt_fix, cnt_chk, cnt_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
