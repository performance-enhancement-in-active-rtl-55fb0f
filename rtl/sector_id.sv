// sector_id: sector identification decoder of the directed current
// controller.
//
// Finds which of six 60-degree sectors, centred on the six active voltage
// vectors, the error-current vector lies in (sector I = -30..30 degrees,
// II = 30..90, ..., VI = 270..330). Three sign bits feed a decoder table:
//   xa = alpha >= 0,  xb = beta >= 0,
//   xc = |alpha| > sqrt(3)|beta|   (vector within 30 degrees of the alpha axis)
//   xa xb xc : 1 x 1 -> I, 1 1 0 -> II, 0 1 0 -> III, 0 x 1 -> IV,
//              0 0 0 -> V, 1 0 0 -> VI
// With alpha scaled by 1.5 and dbc = sqrt(3)*beta, xc becomes the exact
// integer test 3|dbc| < 2|alpha|. A zero vector gives SEC_NONE (code 000).
// The decoder and codes follow the original design's sector table; the exact
// integer form of xc is this design's own. Combinational.
module sector_id
  import apf_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W + 2
) (
  input  logic signed [W-1:0] alpha,   // 1.5 * alpha
  input  logic signed [W-2:0] dbc,     // sqrt(3) * beta
  output sector_t             sector
);

  logic signed [W+1:0] ae, de;
  logic        [W+1:0] a2, d3;
  logic                xa, xb, xc;

  always_comb begin
    ae = (W+2)'(alpha);
    de = (W+2)'(dbc);
    a2 = (ae[W+1] ? -ae : ae) <<< 1;
    d3 = (de[W+1] ? -de : de) * 3;
    xa = ~alpha[W-1];
    xb = ~dbc[W-2];
    xc = d3 < a2;
    if (alpha == '0 && dbc == '0)  sector = SEC_NONE;
    else if (xc)                   sector = xa ? SEC_I : SEC_IV;
    else case ({xa, xb})
      2'b11:   sector = SEC_II;
      2'b01:   sector = SEC_III;
      2'b00:   sector = SEC_V;
      default: sector = SEC_VI;
    endcase
  end

endmodule
