// pll3ph: compact three-phase phase-locked loop.
//
// Locks to the three grid voltages and produces sine and cosine of all
// three phases. Each PLL step (PERIOD clocks, sequenced by pll_fsm):
//   1. phase detector: delta = va cos(th) + vb cos(th-2pi/3) + vc cos(th+2pi/3),
//      using the cosines of the previous step (the Park d-axis voltage,
//      driven to zero at lock);
//   2. PI loop filter with power-of-two gains (shifts NP, NI);
//   3. phase integrator theta += omega;
//   4. six look-ups in one quarter-wave sine table via the address
//      generator, sign-corrected and collected by the postprocessor.
// At lock sina is in phase with va. The loop structure, the shift-based
// gains, the quarter-wave table and the FSM-controlled address
// generator/postprocessor follow the original design. Clock, step length, word
// widths, gains and the nominal-frequency feed-forward are this design's
// choices: with a 50 MHz clock and PERIOD = 12 the step rate is 4.17 MHz;
// NP = 7, NI = 23 give a loop of about 15 Hz natural frequency and 0.77
// damping at 1 p.u. input.
//
// Ports: active-high synchronous reset; va_in..vc_in are sampled at the
// start of each step; the six outputs change together, and valid pulses
// for one clock one cycle after they change. theta is the PLL phase
// (2^32 = one turn).
module pll3ph
  import apf_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned GRID_HZ = 50,
  parameter int unsigned PERIOD  = 12,
  parameter int unsigned NP      = 7,
  parameter int unsigned NI      = 23
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t va_in, vb_in, vc_in,
  output trig_t   sina, sinb, sinc,
  output trig_t   cosa, cosb, cosc,
  output logic    valid,
  output phase_t  theta
);

  localparam int unsigned DELTA_W = 26;
  localparam int unsigned OMEGA_W = 32;
  // Nominal phase step: GRID_HZ * 2^32 * PERIOD / CLK_HZ, rounded.
  localparam longint unsigned OMEGA0_L =
    ((longint'(GRID_HZ) << 32) * longint'(PERIOD) + longint'(CLK_HZ) / 2) / longint'(CLK_HZ);
  localparam logic [OMEGA_W-1:0] OMEGA0 = OMEGA_W'(OMEGA0_L);

  logic                      det_en, pi_en, int_en, lk_valid, publish;
  lookup_t                   lk_sel;
  logic signed [DELTA_W-1:0] delta;
  logic signed [OMEGA_W-1:0] omega;
  logic signed [47:0]        integ;
  logic [LUT_AW-1:0]         addr;
  logic                      neg;
  logic [LUT_DW-1:0]         rom_data;

  pll_fsm #(.PERIOD(PERIOD)) u_fsm (
    .clk, .rst, .det_en, .pi_en, .int_en, .lk_valid, .lk_sel, .publish
  );

  pll_phase_detector #(.DELTA_W(DELTA_W)) u_pd (
    .clk, .rst, .en(det_en),
    .va(va_in), .vb(vb_in), .vc(vc_in),
    .cosa, .cosb, .cosc,
    .delta
  );

  pll_pi #(.DELTA_W(DELTA_W), .OMEGA_W(OMEGA_W), .NP(NP), .NI(NI),
           .OMEGA0(OMEGA0)) u_pi (
    .clk, .rst, .en(pi_en), .delta, .omega, .integ
  );

  phase_accumulator #(.OMEGA_W(OMEGA_W)) u_acc (
    .clk, .rst, .en(int_en), .omega, .theta
  );

  pll_addr_gen u_ag (.theta, .sel(lk_sel), .addr, .neg);

  sine_rom u_rom (.clk, .addr, .data(rom_data));

  pll_postproc u_pp (
    .clk, .rst, .lk_valid, .lk_sel, .lk_neg(neg), .rom_data, .publish,
    .sina, .sinb, .sinc, .cosa, .cosb, .cosc
  );

  always_ff @(posedge clk) begin
    if (rst) valid <= 1'b0;
    else     valid <= publish;
  end

endmodule
