// direct_current_controller: space-vector hysteresis controller of the
// inverter current (the "directed current controller").
//
// Input is the three-phase current error dI = i_ref - i_inverter. Each
// sample it is converted to alpha-beta with shifters and adders, its
// magnitude is estimated and its sector decoded; the switching generator
// then picks the inverter switching state from the optimal switching
// table (outer loop when |dI| >= mo, inner loop when mi <= |dI| < mo,
// unchanged below mi). pwma/pwmb/pwmc are the upper-switch gate commands of
// the three inverter legs. The structure (3-to-2 phase conversion, magnitude
// module, sector decoder, switching generator and table) follows the original design.
//
// Timing: one sample per clock with sample_en high (the original design's clk, rst,
// delta and tolerance ports; sample_en is this design's addition so the
// controller can run slower than the clock). Outputs are registered: a
// new error affects pwm one clock later. rst is active high, synchronous,
// and turns all lower switches on (state 000).
module direct_current_controller
  import apf_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                sample_en,
  input  sample_t             delta_a, delta_b, delta_c,
  input  logic [SAMPLE_W-1:0] mi,
  input  logic [SAMPLE_W-1:0] mo,
  output logic                pwma, pwmb, pwmc,
  output sector_t             sector,
  output dcc_mode_t           mode
);

  localparam int unsigned W = SAMPLE_W + 2;

  logic signed [W-1:0] alpha, beta;
  logic signed [W-2:0] dbc;
  logic [W-1:0]        mag;
  sw_vec_t             vec;

  clarke_shift_add u_clarke (.a(delta_a), .b(delta_b), .c(delta_c),
                             .alpha, .beta, .dbc);

  magnitude_est #(.W(W)) u_mag (.alpha, .beta, .mag);

  sector_id #(.W(W)) u_si (.alpha, .dbc, .sector);

  switching_generator #(.W(W)) u_sg (
    .clk, .rst, .ce(sample_en), .mag, .mi, .mo, .sector, .vec, .mode
  );

  assign {pwma, pwmb, pwmc} = vec;

endmodule
