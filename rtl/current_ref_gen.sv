// current_ref_gen: current-reference generator of the active power filter
// (synchronous-reference-frame harmonic and reactive current detection).
//
// The load currents are Park-transformed with the PLL's angle; the active
// (p-axis) component becomes a dc term plus ac ripple from the harmonics.
// A low-pass filter keeps the dc term ipd. The reactive (q-axis) dc term is
// set to zero, so reactive power is compensated, and the zero-sequence term
// is zero in a three-wire system; neither is computed. The inverse Park
// transform then gives the fundamental active currents
//   if_x = (ipd + idc) * s_x ,   s_x = sin of phase x from the PLL
// where idc is the DC-link regulator's demand. The inverter reference is
// what remains of the load current: ir_x = iL_x - if_x.
// Since the PLL's sine outputs are in phase with the grid voltages, the
// p axis is aligned with the voltage by using sin where the textbook
// transform uses cos:
//   ip = 2/3 * (iLa*sa + iLb*sb + iLc*sc)
// Park/inverse-Park, the zero q and z terms and the subtraction follow the
// original design. The first-order filter ipd += (ip - ipd) / 2^LPF_SHIFT and its
// cut-off (about 10 Hz at the default 4.17 MHz step rate) are this
// design's choice; the original design names no filter.
//
// Timing: en (the PLL's valid strobe) starts a three-clock pipeline; the
// references change, and valid pulses, three clocks after en. Currents use
// 1 p.u. = 2^14; results saturate to 16 bits.
module current_ref_gen
  import apf_pkg::*;
#(
  parameter int unsigned LPF_SHIFT = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  sample_t ila, ilb, ilc,
  input  trig_t   sina, sinb, sinc,
  input  sample_t idc,
  output sample_t ira, irb, irc,
  output sample_t ipd,
  output logic    valid
);

  localparam int unsigned PW   = SAMPLE_W + TRIG_W;     // product width
  localparam int unsigned SW   = PW + 2;                // sum of three
  localparam int unsigned ACC_W = SAMPLE_W + LPF_SHIFT + 2;
  localparam logic signed [16:0] TWO_THIRDS = 17'sd21845; // 2/3 in Q15

  sample_t             il_q [3];
  trig_t               s_q  [3];
  logic signed [SW-1:0] psum;
  logic signed [SW+16:0] ip_full;
  logic signed [SAMPLE_W+1:0] ip;
  logic signed [ACC_W-1:0] lpf_acc;
  logic signed [SAMPLE_W+1:0] ipd_w, iact;
  logic [2:0] pipe;

  function automatic sample_t sat16(input logic signed [PW+1:0] x);
    if (x > (PW+2)'(32767))       return 16'sh7fff;
    else if (x < -(PW+2)'(32768)) return 16'sh8000;
    else                      return sample_t'(x);
  endfunction

  // stage 1: Park p-axis sum
  always_ff @(posedge clk) begin
    if (rst) begin
      psum <= '0;
      for (int i = 0; i < 3; i++) begin il_q[i] <= '0; s_q[i] <= '0; end
    end else if (en) begin
      psum <= SW'(ila * sina) + SW'(ilb * sinb) + SW'(ilc * sinc);
      il_q[0] <= ila;  il_q[1] <= ilb;  il_q[2] <= ilc;
      s_q[0]  <= sina; s_q[1]  <= sinb; s_q[2]  <= sinc;
    end
  end

  // stage 2: 2/3 scaling and low-pass filter
  always_comb begin
    ip_full = (SW+17)'(psum) * (SW+17)'(TWO_THIRDS);
    ip      = (SAMPLE_W+2)'(ip_full >>> 30);
    ipd_w   = (SAMPLE_W+2)'(lpf_acc >>> LPF_SHIFT);
    iact    = ipd_w + (SAMPLE_W+2)'(idc);
  end

  always_ff @(posedge clk) begin
    if (rst)          lpf_acc <= '0;
    else if (pipe[0]) lpf_acc <= lpf_acc + ACC_W'(ip) - ACC_W'(ipd_w);
  end

  // stage 3: inverse Park of the active dc term and subtraction
  always_ff @(posedge clk) begin
    if (rst) begin
      ira <= '0; irb <= '0; irc <= '0; ipd <= '0;
    end else if (pipe[1]) begin
      ira <= sat16((PW+2)'(il_q[0]) - (((PW+2)'(iact) * (PW+2)'(s_q[0])) >>> 15));
      irb <= sat16((PW+2)'(il_q[1]) - (((PW+2)'(iact) * (PW+2)'(s_q[1])) >>> 15));
      irc <= sat16((PW+2)'(il_q[2]) - (((PW+2)'(iact) * (PW+2)'(s_q[2])) >>> 15));
      ipd <= sat16((PW+2)'(ipd_w));
    end
  end

  always_ff @(posedge clk) begin
    if (rst) pipe <= '0;
    else     pipe <= {pipe[1:0], en};
  end

  assign valid = pipe[2];

endmodule
