// abft_pkg: shared constants, types and arithmetic helpers of the
// algorithm-based fault-tolerant (ABFT) array processors.
//
// The matrix sizes below are this design's own defaults; the arrays are
// parametric in them. The weighted checksum code (WCC) status encoding and the
// fixed-point format of the Givens arrays are likewise design choices.
package abft_pkg;

  // ---------------- matrix-matrix multiplication (C = A B) -----------------
  localparam int unsigned MM_M  = 4;  // data rows of A (A is coded to M+2 rows)
  localparam int unsigned MM_R  = 4;  // columns of A / rows of B
  localparam int unsigned MM_N  = 4;  // columns of B and C
  localparam int unsigned MM_DW = 8;  // signed width of one raw A or B element

  // ---------------- Givens reduction (A -> R) ------------------------------
  localparam int unsigned GV_M   = 6;   // rows of A
  localparam int unsigned GV_N   = 4;   // data columns of A (plus 1 checksum column)
  localparam int unsigned GV_DW  = 8;   // signed integer width of a raw A element
  localparam int unsigned GV_W   = 32;  // fixed-point word width inside the array
  localparam int unsigned GV_F   = 12;  // fraction bits of the fixed-point word
  localparam int unsigned GV_TOL = 256; // checksum tolerance, in LSBs (1/16 here)

  // Outcome of checking one distance-3 WCC vector.
  typedef enum logic [1:0] {
    WCC_OK            = 2'd0,  // both syndromes zero
    WCC_DATA_FIXED    = 2'd1,  // one data element was wrong and has been corrected
    WCC_CHECK_ERR     = 2'd2,  // only a checksum element was wrong; data is good
    WCC_UNCORRECTABLE = 2'd3   // syndromes fit no single-element error
  } wcc_status_e;

  // Integer square root (floor) of a 64-bit unsigned value, digit by digit.
  function automatic logic [31:0] isqrt64(input logic [63:0] v);
    logic [63:0] rem;
    logic [31:0] root;
    logic [33:0] trial;
    rem  = '0;
    root = '0;
    for (int b = 31; b >= 0; b--) begin
      rem   = {rem[61:0], v[2*b+1], v[2*b]};
      trial = {root, 2'b01};
      if (rem >= 64'(trial)) begin
        rem  = rem - 64'(trial);
        root = {root[30:0], 1'b1};
      end else begin
        root = {root[30:0], 1'b0};
      end
    end
    return root;
  endfunction

endpackage
