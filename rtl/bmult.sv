// bmult: biased multiplication of two 2-bit samples.
//
// Each sample is {sign, magnitude}; its value is +/-1 for magnitude 0 and
// +/-HI_LEVEL (3) for magnitude 1.  The output is the signed product plus BIAS
// (9), so it is never negative and can be summed by an unsigned accumulator:
// equal signs give BIAS + |a*b|, different signs give BIAS - |a*b|.  With the
// default levels the output is one of 0, 6, 8, 10, 12 or 18.
//
// Purely combinational.  The specification names the biased multiplication
// but gives neither the sample levels nor the bias; both are this design's
// choice (the common four-level scheme with an outer level of 3).
module bmult
  import corr_pkg::*;
(
  input  sample_t a,   // delayed sample {sign, magnitude}
  input  sample_t b,   // undelayed sample {sign, magnitude}
  output prod_t   p    // biased product
);

  logic [PROD_W-1:0] mag;  // |a*b|

  always_comb begin
    unique case ({a[0], b[0]})
      2'b00:   mag = PROD_W'(1);
      2'b01,
      2'b10:   mag = PROD_W'(HI_LEVEL);
      default: mag = PROD_W'(HI_LEVEL * HI_LEVEL);
    endcase
    if (a[1] == b[1]) p = PROD_W'(BIAS) + mag;
    else              p = PROD_W'(BIAS) - mag;
  end

endmodule
