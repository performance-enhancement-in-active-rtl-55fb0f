// phase_accumulator: the PLL's output integrator.
//
// Integrates the angular frequency from the loop filter into the phase:
// theta <= theta + omega on every PLL step (en high). The phase wraps
// modulo 2^PHASE_W, which is one electrical turn, so no range check is
// needed. Reset sets theta to zero. Result one clock after en.
module phase_accumulator
  import apf_pkg::*;
#(
  parameter int unsigned OMEGA_W = 32
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic signed [OMEGA_W-1:0] omega,
  output phase_t                    theta
);

  always_ff @(posedge clk) begin
    if (rst)     theta <= '0;
    else if (en) theta <= theta + PHASE_W'(omega);
  end

endmodule
