// pll_addr_gen: address generator of the PLL's compact sine table.
//
// From the single phase theta it forms, one at a time, the six table
// addresses needed for sin and cos of the three phases a, b, c. For
// look-up k the angle theta + offset(k) is formed (offsets 0, -/+2*pi/3
// for the sines, pi/2 added for the cosines). Its two top bits give the
// quadrant; the next AW bits index the quarter-wave table, mirrored
// (bitwise inverted) in the 2nd and 4th quadrants. neg tells the
// postprocessor to negate the table value (3rd and 4th quadrants).
// Combinational. The six-address scheme follows the original design; the offset
// arithmetic on a 32-bit phase is this design's own choice.
module pll_addr_gen
  import apf_pkg::*;
#(
  parameter int unsigned AW = LUT_AW
) (
  input  phase_t          theta,
  input  lookup_t         sel,
  output logic [AW-1:0]   addr,
  output logic            neg
);

  phase_t          ph;
  logic [1:0]      quad;
  logic [AW-1:0]   idx;

  always_comb begin
    ph   = theta + lookup_offset(sel);
    quad = ph[PHASE_W-1 -: 2];
    idx  = ph[PHASE_W-3 -: AW];
    addr = quad[0] ? ~idx : idx;
    neg  = quad[1];
  end

endmodule
