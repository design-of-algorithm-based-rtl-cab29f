// wcc_checker: syndrome former and single-error corrector for a distance-3
// weighted checksum code (WCC) vector.
//
// The input vector holds L data elements followed by WCS1 and WCS2. The two
// syndromes are the rows of the check matrix
//   H = [ 1   1  ...  1        -1  0 ]
//       [ 2^0 2^1 ... 2^(L-1)   0 -1 ]
// applied to the vector:  s1 = sum d[i] - WCS1,  s2 = sum 2^i d[i] - WCS2.
//   s1 = 0, s2 = 0            : no error
//   s1 = e, s2 = 2^p * e      : data element p is off by e; it is corrected
//   s1 != 0, s2 = 0           : WCS1 alone is wrong (data good)
//   s1 = 0, s2 != 0           : WCS2 alone is wrong (data good)
//   anything else             : more than one element wrong, flagged
// The check matrix follows the weighted checksum code; the decision rules are
// the standard ones for it; the status encoding is this design's own.
//
// Timing: one vector per cycle, one register stage (outputs one cycle after
// in_vld). Sums are formed in EW bits, wide enough that they do not overflow.
module wcc_checker
  import abft_pkg::*;
#(
  parameter int unsigned L  = abft_pkg::MM_M,  // data elements per vector
  parameter int unsigned W  = 32,              // element width (data and checksums)
  parameter int unsigned EW = W + L + 2        // internal syndrome width
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_vld,
  input  logic signed [W-1:0]           in_vec [L+2],
  output logic                          out_vld,
  output logic signed [W-1:0]           out_data [L],  // corrected data elements
  output wcc_status_e                   out_status,
  output logic [$clog2(L+2)-1:0]        out_pos        // faulty element (data index, L, or L+1)
);

  logic signed [EW-1:0]    s1, s2;
  logic signed [W-1:0]     fixed [L];
  wcc_status_e             status;
  logic [$clog2(L+2)-1:0]  pos;

  always_comb begin
    s1 = -EW'(in_vec[L]);
    s2 = -EW'(in_vec[L+1]);
    for (int i = 0; i < int'(L); i++) begin
      s1 = s1 + EW'(in_vec[i]);
      s2 = s2 + (EW'(in_vec[i]) <<< i);
    end
    for (int i = 0; i < int'(L); i++) fixed[i] = in_vec[i];
    status = WCC_OK;
    pos    = '0;
    if (s1 == '0 && s2 == '0) begin
      status = WCC_OK;
    end else if (s1 != '0 && s2 == '0) begin
      status = WCC_CHECK_ERR;
      pos    = ($clog2(L+2))'(L);
    end else if (s1 == '0) begin
      status = WCC_CHECK_ERR;
      pos    = ($clog2(L+2))'(L + 1);
    end else begin
      status = WCC_UNCORRECTABLE;
      for (int i = 0; i < int'(L); i++) begin
        if ((s1 <<< i) == s2 && status == WCC_UNCORRECTABLE) begin
          status   = WCC_DATA_FIXED;
          pos      = ($clog2(L+2))'(i);
          fixed[i] = in_vec[i] - W'(s1);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_vld    <= 1'b0;
      out_status <= WCC_OK;
      out_pos    <= '0;
      for (int i = 0; i < int'(L); i++) out_data[i] <= '0;
    end else begin
      out_vld <= in_vld;
      if (in_vld) begin
        out_status <= status;
        out_pos    <= pos;
        for (int i = 0; i < int'(L); i++) out_data[i] <= fixed[i];
      end
    end
  end

endmodule
