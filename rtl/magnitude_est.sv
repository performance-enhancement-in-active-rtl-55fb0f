// magnitude_est: magnitude module of the directed current controller.
//
// Estimates |(alpha, beta)| without multipliers by the max/min rule
//   mag = max(M, M - M/8 + m/2),  M = max(|alpha|,|beta|), m = min(...)
// whose error lies between -3 % and +1 % over all angles. The original design only
// names a magnitude module; this estimator is this design's choice.
// Combinational.
module magnitude_est #(
  parameter int unsigned W = 18
) (
  input  logic signed [W-1:0] alpha,
  input  logic signed [W-1:0] beta,
  output logic        [W-1:0] mag
);

  logic [W-1:0] aa, ab, mx, mn;
  logic [W:0]   est;

  always_comb begin
    aa  = alpha[W-1] ? W'(-alpha) : W'(alpha);
    ab  = beta[W-1]  ? W'(-beta)  : W'(beta);
    mx  = (aa > ab) ? aa : ab;
    mn  = (aa > ab) ? ab : aa;
    est = (W+1)'(mx) - (W+1)'(mx >> 3) + (W+1)'(mn >> 1);
    mag = (est > (W+1)'(mx)) ? est[W-1:0] : mx;
  end

endmodule
