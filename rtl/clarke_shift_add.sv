// clarke_shift_add: 3-phase to 2-phase (alpha-beta) conversion with
// shifters and adders only, as the original design's directed current controller
// does it.
//   alpha = a - (b + c)/2                      (= 1.5 * alpha_amplitude-invariant)
//   dbc   = b - c                              (= sqrt(3) * beta)
//   beta  = dbc * sqrt(3)/2 ~ dbc*(1 - 1/8 - 1/128)  (= 1.5 * beta, 0.13 % low)
// Both axes thus carry the same 1.5 gain, which the switching generator
// applies to its tolerances as well. dbc is passed on unscaled because the
// sector decoder can compare it with alpha exactly. The 1.5 scaling and the
// sqrt(3)/2 approximation are this design's own choices. Combinational.
module clarke_shift_add
  import apf_pkg::*;
(
  input  sample_t                     a, b, c,
  output logic signed [SAMPLE_W+1:0]  alpha,
  output logic signed [SAMPLE_W+1:0]  beta,
  output logic signed [SAMPLE_W:0]    dbc
);

  localparam int unsigned W = SAMPLE_W + 2;

  logic signed [W-1:0] bc_sum, d;

  always_comb begin
    bc_sum = W'(b) + W'(c);
    alpha  = W'(a) - (bc_sum >>> 1);
    d      = W'(b) - W'(c);
    dbc    = d[SAMPLE_W:0];
    beta   = d - (d >>> 3) - (d >>> 7);
  end

endmodule
