// pll_pi: proportional-integral loop filter of the PLL built from shifters.
//
// Gains are powers of two, so the multiplications by Kp and Ki become
// arithmetic shifts, as the original design proposes: the proportional path is the
// error shifted right by NP bits; the integral path accumulates the error
// and shifts the sum right by NI bits, bringing it to the width of the
// proportional result. Their sum plus the nominal grid frequency OMEGA0
// (a feed-forward term, this design's own addition so the loop starts near
// the right frequency) is the phase increment per PLL step:
//   acc   <= acc + delta
//   omega <= OMEGA0 + (delta >>> NP) + ((acc + delta) >>> NI)
// Registered when en is high; omega is valid one clock later.
module pll_pi #(
  parameter int unsigned         DELTA_W = 26,
  parameter int unsigned         ACC_W   = 48,
  parameter int unsigned         OMEGA_W = 32,
  parameter int unsigned         NP      = 7,
  parameter int unsigned         NI      = 23,
  parameter logic [OMEGA_W-1:0]  OMEGA0  = 32'd51540
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic signed [DELTA_W-1:0] delta,
  output logic signed [OMEGA_W-1:0] omega,
  output logic signed [ACC_W-1:0]   integ
);

  logic signed [ACC_W-1:0] acc_next;
  logic signed [ACC_W-1:0] p_term, i_term;

  always_comb begin
    acc_next = integ + ACC_W'(delta);
    p_term   = ACC_W'(delta) >>> NP;
    i_term   = acc_next >>> NI;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      integ <= '0;
      omega <= OMEGA0;
    end else if (en) begin
      integ <= acc_next;
      omega <= OMEGA_W'(ACC_W'(OMEGA0) + p_term + i_term);
    end
  end

endmodule
