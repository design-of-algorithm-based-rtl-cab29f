// tb_wcc_encoder: checks both weighted checksums of random and extreme
// vectors against sums formed here with integer arithmetic.
module tb_wcc_encoder;
  localparam int L = 4, IW = 8, OW = IW + L;
  logic signed [IW-1:0] d [L];
  logic signed [OW-1:0] wcs1, wcs2;
  int checks = 0, failures = 0;

  wcc_encoder #(.L(L), .IW(IW), .OW(OW)) dut (.d, .wcs1, .wcs2);

  task automatic check_vec();
    int e1, e2;
    e1 = 0; e2 = 0;
    for (int i = 0; i < L; i++) begin
      e1 += int'(d[i]);
      e2 += int'(d[i]) * (1 << i);
    end
    #1;
    checks++;
    if (int'(wcs1) != e1 || int'(wcs2) != e2) begin
      failures++;
      $display("FAIL: wcs1=%0d (exp %0d) wcs2=%0d (exp %0d)", wcs1, e1, wcs2, e2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < L; i++) d[i] = -128;
    check_vec();
    for (int i = 0; i < L; i++) d[i] = 127;
    check_vec();
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < L; i++) d[i] = IW'($urandom);
      check_vec();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
