// wcc_encoder: weighted checksum encoder for one vector of L signed elements.
//
// It produces the two check elements of a distance-3 weighted checksum code:
//   WCS1 = sum_i d[i]             (weights 1)
//   WCS2 = sum_i d[i] * 2^i       (weights 2^0 .. 2^(L-1), i counted from 0)
// Appending them to the vector gives a code word in which any single wrong
// element can be located and corrected. The weights are those of the
// weighted checksum code; the output width (IW+L bits, enough that neither
// sum can overflow) is this design's choice.
//
// Purely combinational: outputs follow the inputs in the same cycle.
module wcc_encoder #(
  parameter int unsigned L  = abft_pkg::MM_M,   // data elements per vector
  parameter int unsigned IW = abft_pkg::MM_DW,  // input element width
  parameter int unsigned OW = IW + L            // checksum width
) (
  input  logic signed [IW-1:0] d    [L],
  output logic signed [OW-1:0] wcs1,
  output logic signed [OW-1:0] wcs2
);

  always_comb begin
    wcs1 = '0;
    wcs2 = '0;
    for (int i = 0; i < int'(L); i++) begin
      wcs1 = wcs1 + OW'(d[i]);
      wcs2 = wcs2 + (OW'(d[i]) <<< i);
    end
  end

endmodule
