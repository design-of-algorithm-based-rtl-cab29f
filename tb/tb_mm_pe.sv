// tb_mm_pe: loads a stationary a, then checks c_out = c_in + a*b and the
// one-cycle pass-through of b and its valid bit, with and without an
// injected fault mask.
module tb_mm_pe;
  localparam int AW = 12, BW = 8, CW = 32;
  logic clk = 0, rst_n = 0, a_load = 0, b_vld_in = 0;
  logic signed [AW-1:0] a_in = '0;
  logic signed [BW-1:0] b_in = '0;
  logic signed [CW-1:0] c_in = '0;
  logic [CW-1:0] fault_mask = '0;
  logic b_vld_out;
  logic signed [BW-1:0] b_out;
  logic signed [CW-1:0] c_out;
  int checks = 0, failures = 0;

  mm_pe #(.AW(AW), .BW(BW), .CW(CW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, c, m;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      a = int'($urandom_range(0, 4000)) - 2000;
      b = int'($urandom_range(0, 255)) - 128;
      c = int'($urandom_range(0, 200000)) - 100000;
      m = (t % 4 == 3) ? (1 << ($urandom % 20)) : 0;
      a_in = AW'(a); a_load = 1;
      @(negedge clk);
      a_load = 0; a_in = '0;
      b_in = BW'(b); c_in = CW'(c); b_vld_in = 1; fault_mask = CW'(m);
      @(negedge clk);
      b_vld_in = 0; fault_mask = '0;
      checks++;
      if (!b_vld_out || int'(b_out) != b || int'(c_out) != ((c + a * b) ^ m)) begin
        failures++;
        $display("FAIL: a=%0d b=%0d c=%0d m=%0h -> b_out=%0d c_out=%0d", a, b, c, m, b_out, c_out);
      end
      // No valid input: outputs hold, valid drops.
      c_in = 12345; b_in = 7;
      @(negedge clk);
      checks++;
      if (b_vld_out || int'(c_out) != ((c + a * b) ^ m)) begin
        failures++;
        $display("FAIL: PE changed state without a valid input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
