// apf_pkg: types and constants shared by the shunt active power filter
// controller (three-phase PLL, current-reference generator, DC-link
// regulator and directed current controller).
//
// Number formats (this design's own choice; the original design gives no widths):
//   * ADC samples (voltages, currents) are 16-bit two's complement with
//     1 p.u. = 2^14, leaving headroom up to +/-2 p.u.
//   * Sine/cosine values are 16-bit two's complement, amplitude 32767 (Q15).
//   * Phase is a 32-bit unsigned angle, 2^32 = one electrical turn.
// Space-vector switching states are the three upper-switch bits {Sa,Sb,Sc};
// 0 (000) and 7 (111) are the two zero vectors.
package apf_pkg;

  localparam int unsigned SAMPLE_W = 16;   // ADC sample width
  localparam int unsigned TRIG_W   = 16;   // sine / cosine width
  localparam int unsigned PHASE_W  = 32;   // phase accumulator width
  localparam int unsigned LUT_AW   = 10;   // quarter-wave table address bits
  localparam int unsigned LUT_DW   = 15;   // quarter-wave table magnitude bits

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [TRIG_W-1:0]   trig_t;
  typedef logic [PHASE_W-1:0]         phase_t;

  // Phase offsets (2^32 = 2*pi)
  localparam phase_t PH_120 = 32'h5555_5555;   // 2*pi/3
  localparam phase_t PH_90  = 32'h4000_0000;   // pi/2

  // The six look-ups the PLL makes from one phase value, in FSM order.
  typedef enum logic [2:0] {
    LK_SINA = 3'd0, LK_SINB = 3'd1, LK_SINC = 3'd2,
    LK_COSA = 3'd3, LK_COSB = 3'd4, LK_COSC = 3'd5
  } lookup_t;

  // Phase offset added to theta for each look-up.
  function automatic phase_t lookup_offset(lookup_t k);
    case (k)
      LK_SINA: return '0;
      LK_SINB: return -PH_120;
      LK_SINC: return PH_120;
      LK_COSA: return PH_90;
      LK_COSB: return PH_90 - PH_120;
      default: return PH_90 + PH_120;   // LK_COSC
    endcase
  endfunction

  // Sector of the error-current vector (code of the sector decoder).
  typedef enum logic [2:0] {
    SEC_NONE = 3'd0, SEC_I = 3'd1, SEC_II = 3'd2, SEC_III = 3'd3,
    SEC_IV = 3'd4, SEC_V = 3'd5, SEC_VI = 3'd6
  } sector_t;

  // Operating loop of the directed current controller.
  typedef enum logic [1:0] {
    MODE_HOLD  = 2'd0,   // |dI| below inner tolerance: keep the vector
    MODE_INNER = 2'd1,   // inner tolerance <= |dI| < outer tolerance
    MODE_OUTER = 2'd2    // |dI| at or beyond outer tolerance
  } dcc_mode_t;

  typedef logic [2:0] sw_vec_t;   // {Sa,Sb,Sc}

endpackage
