// tb_abft_array_top: end-to-end test of the four fault-tolerant array
// processors at their default sizes, run side by side.
// Each matrix multiplier computes random products, fault-free and with one
// faulty PE in each row of the coded array; every delivered column of C must
// equal the product formed here. Each Givens reducer runs fault-free (R must
// match a floating-point model and no row may be flagged) and with a fault
// injected in a PE (the row of R it belongs to must be flagged); the linear
// one is fed through its row_rdy pacing.
// Mechanisms counted, each of which must occur: clean columns, corrected data
// elements and checksum-only errors on both multipliers; clean runs and
// detected faults on both Givens reducers; rows held back by row_rdy.
module tb_abft_array_top;
  import abft_pkg::*;
  localparam int M = MM_M, R = MM_R, N = MM_N, DW = MM_DW, ROWS = M + 2;
  localparam int CW = DW + M + DW + $clog2(R) + 1;
  localparam int GM = GV_M, GN = GV_N, GDW = GV_DW, GW = GV_W, GF = GV_F, GNC = GN + 1;
  localparam real ONE = real'(1 << GF);

  logic clk = 0, rst_n = 0;
  logic mm2d_a_load = 0, mm2d_b_vld = 0, mm2d_fault_en = 0;
  logic signed [DW-1:0] mm2d_a_data [M][R];
  logic signed [DW-1:0] mm2d_b_col [R];
  logic [$clog2(ROWS)-1:0] mm2d_fault_row = '0;
  logic [$clog2(R+1)-1:0] mm2d_fault_col = '0;
  logic [CW-1:0] mm2d_fault_mask = '0;
  logic mm2d_out_vld;
  logic signed [CW-1:0] mm2d_out_col [M];
  wcc_status_e mm2d_out_status;
  logic [$clog2(ROWS)-1:0] mm2d_out_pos;
  logic mml_a_load = 0, mml_b_vld = 0, mml_fault_en = 0;
  logic signed [DW-1:0] mml_a_data [M][R];
  logic signed [DW-1:0] mml_b_in = '0;
  logic [$clog2(ROWS)-1:0] mml_fault_row = '0;
  logic [CW-1:0] mml_fault_mask = '0;
  logic mml_out_vld;
  logic signed [CW-1:0] mml_out_col [M];
  wcc_status_e mml_out_status;
  logic [$clog2(ROWS)-1:0] mml_out_pos;
  logic gv_clear = 0, gv_row_vld = 0, gv_fault_en = 0;
  logic signed [GDW-1:0] gv_row_in [GN];
  logic [$clog2(GN)-1:0] gv_fault_k = '0;
  logic [$clog2(GN+1)-1:0] gv_fault_j = '0;
  logic [GW-1:0] gv_fault_mask = GW'(1) << (GF + 8);
  logic signed [GW-1:0] gv_r_mat [GN][GN+1];
  logic gv_done, gv_any_err;
  logic [GN-1:0] gv_row_err;
  logic gvl_clear = 0, gvl_row_vld = 0, gvl_fault_en = 0, gvl_row_rdy;
  logic signed [GDW-1:0] gvl_row_in [GN];
  logic [$clog2(GN+1)-1:0] gvl_fault_j = '0;
  logic [GW-1:0] gvl_fault_mask = GW'(1) << (GF + 8);
  logic signed [GW-1:0] gvl_r_mat [GN][GN+1];
  logic gvl_done, gvl_any_err;
  logic [GN-1:0] gvl_row_err;
  int n_lok = 0, n_ldet = 0, n_wait = 0;

  int checks = 0, failures = 0, cyc = 0;
  int n_ok2 = 0, n_fix2 = 0, n_chk2 = 0, n_okl = 0, n_fixl = 0, n_chkl = 0, n_gok = 0, n_gdet = 0;

  abft_array_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ 2-D multiplier
  int A2 [M][R], B2 [R][N], C2 [M][N], got2;
  bit fault2;
  always @(negedge clk) begin
    if (rst_n && mm2d_out_vld) begin
      for (int i = 0; i < M; i++) begin
        checks++;
        if (int'(mm2d_out_col[i]) != C2[i][got2]) begin
          failures++;
          $display("FAIL mm2d: c(%0d,%0d)=%0d exp %0d", i, got2, mm2d_out_col[i], C2[i][got2]);
        end
      end
      checks++;
      if ((mm2d_out_status == WCC_OK) == fault2 || mm2d_out_status == WCC_UNCORRECTABLE) begin
        failures++;
        $display("FAIL mm2d: status %s with fault=%0d", mm2d_out_status.name(), fault2);
      end
      case (mm2d_out_status)
        WCC_OK: n_ok2++;
        WCC_DATA_FIXED: n_fix2++;
        WCC_CHECK_ERR: n_chk2++;
        default: ;
      endcase
      got2++;
    end
  end

  task automatic mm2d_run(input bit fault, input int frow);
    for (int i = 0; i < M; i++)
      for (int k = 0; k < R; k++) begin
        A2[i][k] = int'($urandom_range(0, 255)) - 128;
        mm2d_a_data[i][k] = DW'(A2[i][k]);
      end
    for (int k = 0; k < R; k++)
      for (int j = 0; j < N; j++) B2[k][j] = int'($urandom_range(0, 255)) - 128;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        C2[i][j] = 0;
        for (int k = 0; k < R; k++) C2[i][j] += A2[i][k] * B2[k][j];
      end
    fault2 = fault;
    mm2d_fault_en = fault;
    mm2d_fault_row = ($clog2(ROWS))'(frow);
    mm2d_fault_col = ($clog2(R+1))'($urandom_range(0, R - 1));
    mm2d_fault_mask = CW'(1) << $urandom_range(0, CW - 2);
    got2 = 0;
    mm2d_a_load = 1;
    @(negedge clk);
    mm2d_a_load = 0;
    for (int j = 0; j < N; j++) begin
      mm2d_b_vld = 1;
      for (int k = 0; k < R; k++) mm2d_b_col[k] = DW'(B2[k][j]);
      @(negedge clk);
    end
    mm2d_b_vld = 0;
    repeat (R + M + 4) @(negedge clk);
    checks++;
    if (got2 != N) begin
      failures++;
      $display("FAIL mm2d: %0d columns delivered", got2);
    end
  endtask

  // ------------------------------------------------------- linear multiplier
  int AL [M][R], BL [R][N], CL [M][N], gotl;
  bit faultl;
  always @(negedge clk) begin
    if (rst_n && mml_out_vld) begin
      for (int i = 0; i < M; i++) begin
        checks++;
        if (int'(mml_out_col[i]) != CL[i][gotl]) begin
          failures++;
          $display("FAIL mml: c(%0d,%0d)=%0d exp %0d", i, gotl, mml_out_col[i], CL[i][gotl]);
        end
      end
      checks++;
      if ((!faultl && mml_out_status != WCC_OK) || mml_out_status == WCC_UNCORRECTABLE) begin
        failures++;
        $display("FAIL mml: status %s with fault=%0d", mml_out_status.name(), faultl);
      end
      case (mml_out_status)
        WCC_OK: n_okl++;
        WCC_DATA_FIXED: n_fixl++;
        WCC_CHECK_ERR: n_chkl++;
        default: ;
      endcase
      gotl++;
    end
  end

  task automatic mml_run(input bit fault, input int frow);
    for (int i = 0; i < M; i++)
      for (int k = 0; k < R; k++) begin
        AL[i][k] = int'($urandom_range(0, 255)) - 128;
        mml_a_data[i][k] = DW'(AL[i][k]);
      end
    for (int k = 0; k < R; k++)
      for (int j = 0; j < N; j++) BL[k][j] = int'($urandom_range(0, 255)) - 128;
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        CL[i][j] = 0;
        for (int k = 0; k < R; k++) CL[i][j] += AL[i][k] * BL[k][j];
      end
    faultl = fault;
    mml_fault_en = fault;
    mml_fault_row = ($clog2(ROWS))'(frow);
    mml_fault_mask = CW'(1) << $urandom_range(0, CW - 2);
    gotl = 0;
    mml_a_load = 1;
    @(negedge clk);
    mml_a_load = 0;
    for (int k = 0; k < R; k++)
      for (int j = 0; j < N; j++) begin
        mml_b_vld = 1;
        mml_b_in = DW'(BL[k][j]);
        @(negedge clk);
      end
    mml_b_vld = 0;
    repeat (M + 5) @(negedge clk);
    checks++;
    if (gotl != N) begin
      failures++;
      $display("FAIL mml: %0d columns delivered", gotl);
    end
  endtask

  // ---------------------------------------------------------- Givens reducer
  real GA [GM][GNC], GR [GN][GNC];
  int gdone;
  always @(negedge clk) if (rst_n && gv_done) gdone++;

  task automatic gv_model();
    real x [GNC];
    real rn, c, s, r;
    for (int k = 0; k < GN; k++) for (int j = 0; j < GNC; j++) GR[k][j] = 0.0;
    for (int i = 0; i < GM; i++) begin
      for (int j = 0; j < GNC; j++) x[j] = GA[i][j];
      for (int k = 0; k < GN; k++) begin
        rn = $sqrt(GR[k][k] * GR[k][k] + x[k] * x[k]);
        c = (rn == 0.0) ? 1.0 : GR[k][k] / rn;
        s = (rn == 0.0) ? 0.0 : x[k] / rn;
        GR[k][k] = rn;
        for (int j = k + 1; j < GNC; j++) begin
          r = GR[k][j];
          GR[k][j] = c * r + s * x[j];
          x[j] = c * x[j] - s * r;
        end
      end
    end
  endtask

  task automatic gv_run(input int fk, input int fj);
    int p0;
    for (int i = 0; i < GM; i++) begin
      GA[i][GN] = 0.0;
      for (int j = 0; j < GN; j++) begin
        GA[i][j] = real'(int'($urandom_range(0, 40)) - 20);
        GA[i][GN] += GA[i][j];
      end
    end
    gv_model();
    gv_fault_k = ($clog2(GN))'(fk < 0 ? 0 : fk);
    gv_fault_j = ($clog2(GN+1))'(fj);
    gv_clear = 1;
    @(negedge clk);
    gv_clear = 0;
    gdone = 0;
    p0 = cyc;
    fork
      begin
        for (int i = 0; i < GM; i++) begin
          gv_row_vld = 1;
          for (int j = 0; j < GN; j++) gv_row_in[j] = GDW'(int'(GA[i][j]));
          @(negedge clk);
        end
        gv_row_vld = 0;
      end
      if (fk >= 0) begin
        while (cyc != p0 + GM - 1 + fj + fk) @(negedge clk);
        gv_fault_en = 1;
        @(negedge clk);
        gv_fault_en = 0;
      end
    join
    repeat (2 * GN + 3) @(negedge clk);
    checks++;
    if (gdone != 1 || gv_any_err != (fk >= 0) || (fk >= 0 && gv_row_err != (GN)'(1 << fk))) begin
      failures++;
      $display("FAIL gv: fault (%0d,%0d) done=%0d row_err=%b", fk, fj, gdone, gv_row_err);
    end
    if (fk < 0 && !gv_any_err) n_gok++;
    if (fk >= 0 && gv_any_err) n_gdet++;
    if (fk < 0) begin
      for (int k = 0; k < GN; k++)
        for (int j = k; j < GNC; j++) begin
          real d;
          d = real'(gv_r_mat[k][j]) / ONE - GR[k][j];
          checks++;
          if (d > 0.05 || d < -0.05) begin
            failures++;
            $display("FAIL gv: r(%0d,%0d)=%f expected %f", k, j, real'(gv_r_mat[k][j]) / ONE, GR[k][j]);
          end
        end
    end
  endtask

  // ------------------------------------------------- Givens reducer, linear
  real LA [GM][GNC], LR [GN][GNC];
  int ldone;
  always @(negedge clk) if (rst_n && gvl_done) ldone++;

  task automatic gvl_run(input int fk, input int fj);
    int p0;
    real x [GNC];
    real rn, c, s, r;
    for (int i = 0; i < GM; i++) begin
      LA[i][GN] = 0.0;
      for (int j = 0; j < GN; j++) begin
        LA[i][j] = real'(int'($urandom_range(0, 40)) - 20);
        LA[i][GN] += LA[i][j];
      end
    end
    for (int k = 0; k < GN; k++) for (int j = 0; j < GNC; j++) LR[k][j] = 0.0;
    for (int i = 0; i < GM; i++) begin
      for (int j = 0; j < GNC; j++) x[j] = LA[i][j];
      for (int k = 0; k < GN; k++) begin
        rn = $sqrt(LR[k][k] * LR[k][k] + x[k] * x[k]);
        c = (rn == 0.0) ? 1.0 : LR[k][k] / rn;
        s = (rn == 0.0) ? 0.0 : x[k] / rn;
        LR[k][k] = rn;
        for (int j = k + 1; j < GNC; j++) begin
          r = LR[k][j];
          LR[k][j] = c * r + s * x[j];
          x[j] = c * x[j] - s * r;
        end
      end
    end
    gvl_fault_j = ($clog2(GN+1))'(fj);
    gvl_clear = 1;
    @(negedge clk);
    gvl_clear = 0;
    ldone = 0;
    p0 = cyc;
    fork
      begin
        for (int i = 0; i < GM; i++) begin
          while (!gvl_row_rdy) begin
            n_wait++;
            @(negedge clk);
          end
          gvl_row_vld = 1;
          for (int j = 0; j < GN; j++) gvl_row_in[j] = GDW'(int'(LA[i][j]));
          @(negedge clk);
        end
        gvl_row_vld = 0;
      end
      if (fk >= 0) begin
        while (cyc != p0 + GN * (GM - 1) + fj + fk) @(negedge clk);
        gvl_fault_en = 1;
        @(negedge clk);
        gvl_fault_en = 0;
      end
    join
    repeat (2 * GN + 4) @(negedge clk);
    checks++;
    if (ldone != 1 || gvl_any_err != (fk >= 0) || (fk >= 0 && gvl_row_err != (GN)'(1 << fk))) begin
      failures++;
      $display("FAIL gvl: fault (%0d,%0d) done=%0d row_err=%b", fk, fj, ldone, gvl_row_err);
    end
    if (fk < 0 && !gvl_any_err) n_lok++;
    if (fk >= 0 && gvl_any_err) n_ldet++;
    if (fk < 0) begin
      for (int k = 0; k < GN; k++)
        for (int j = k; j < GNC; j++) begin
          real d;
          d = real'(gvl_r_mat[k][j]) / ONE - LR[k][j];
          checks++;
          if (d > 0.05 || d < -0.05) begin
            failures++;
            $display("FAIL gvl: r(%0d,%0d)=%f expected %f", k, j, real'(gvl_r_mat[k][j]) / ONE, LR[k][j]);
          end
        end
    end
  endtask

  initial begin
    for (int j = 0; j < GN; j++) gvl_row_in[j] = '0;
    for (int k = 0; k < R; k++) mm2d_b_col[k] = '0;
    for (int j = 0; j < GN; j++) gv_row_in[j] = '0;
    for (int i = 0; i < M; i++)
      for (int k = 0; k < R; k++) begin
        mm2d_a_data[i][k] = '0;
        mml_a_data[i][k] = '0;
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      begin
        mm2d_run(0, 0);
        for (int r = 0; r < ROWS; r++) mm2d_run(1, r);
      end
      begin
        mml_run(0, 0);
        for (int r = 0; r < ROWS; r++) mml_run(1, r);
      end
      begin
        gv_run(-1, 0);
        for (int k = 0; k < GN; k++) gv_run(k, GN - $urandom_range(0, GN - k));
        gv_run(-1, 0);
      end
      begin
        gvl_run(-1, 0);
        for (int k = 0; k < GN; k++) gvl_run(k, GN - $urandom_range(0, GN - k));
      end
    join
    $display("mm2d: clean=%0d corrected=%0d checksum_only=%0d", n_ok2, n_fix2, n_chk2);
    $display("mml : clean=%0d corrected=%0d checksum_only=%0d", n_okl, n_fixl, n_chkl);
    $display("gv  : clean=%0d detected=%0d", n_gok, n_gdet);
    $display("gvl : clean=%0d detected=%0d rows_held=%0d", n_lok, n_ldet, n_wait);
    checks++;
    if (n_ok2 == 0 || n_fix2 == 0 || n_chk2 == 0 || n_okl == 0 || n_fixl == 0 || n_chkl == 0 ||
        n_gok == 0 || n_gdet == 0 || n_lok == 0 || n_ldet == 0 || n_wait == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
