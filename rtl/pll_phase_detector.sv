// pll_phase_detector: phase-error detector of the three-phase PLL.
//
// Computes the d-axis component of the Park transform of the grid
// voltages, which for a sine grid equals the phase error:
//   delta = va*cos(theta) + vb*cos(theta-2pi/3) + vc*cos(theta+2pi/3)
// (Park's 2/3 factor is left out and absorbed into the loop gains). Only
// Vd is formed; Vq and Vz are not computed, as the original design proposes to save
// resources. With va = sin(theta_in) the sum equals 1.5*sin(theta_in-theta),
// positive when the grid leads the PLL.
//
// Scaling: samples with 1 p.u. = 2^14 times Q15 cosines give products with
// 1 p.u. = 2^29; the sum is shifted right by SHIFT (default 8), so a
// 1-radian error at 1 p.u. gives about 1.5 * 2^21. The register loads when
// en is high; result one clock later.
module pll_phase_detector
  import apf_pkg::*;
#(
  parameter int unsigned DELTA_W = 26,
  parameter int unsigned SHIFT   = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  sample_t                   va, vb, vc,
  input  trig_t                     cosa, cosb, cosc,
  output logic signed [DELTA_W-1:0] delta
);

  localparam int unsigned PROD_W = SAMPLE_W + TRIG_W;
  localparam int unsigned SUM_W  = PROD_W + 2;

  logic signed [PROD_W-1:0] pa, pb, pc;
  logic signed [SUM_W-1:0]  sum;

  always_comb begin
    pa  = va * cosa;
    pb  = vb * cosb;
    pc  = vc * cosc;
    sum = SUM_W'(pa) + SUM_W'(pb) + SUM_W'(pc);
  end

  always_ff @(posedge clk) begin
    if (rst)     delta <= '0;
    else if (en) delta <= DELTA_W'(sum >>> SHIFT);
  end

endmodule
