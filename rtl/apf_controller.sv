// apf_controller: digital controller of a three-phase shunt active power
// filter.
//
// Measures the grid voltages, the load currents, the inverter (filter)
// currents and the DC-link voltage, and drives the three legs of the
// voltage-source inverter so that it injects the harmonic and reactive
// part of the load current, leaving the grid with a sinusoidal current in
// phase with its voltage. Chain:
//   pll3ph               -> sin/cos of the three grid phases, step strobe
//   dc_voltage_regulator -> extra active current idc for the dc capacitor
//   current_ref_gen      -> inverter reference currents ir_x
//   (ir_x - ic_x)        -> current error, saturated to 16 bits
//   direct_current_controller -> gate commands pwma/b/c
// The ADC drivers, gate drivers, protection and the inverter itself are
// outside: their signals are the ports. Partitioning follows the original design's
// system architecture; the connections of idc and of the error
// subtraction are this design's reading of it.
//
// Timing: one clock domain; the PLL, reference generator and regulator
// update once per PLL step (PLL_PERIOD clocks); the current controller
// samples every clock. rst is active high and synchronous. All analog
// quantities are 16-bit signed with 1 p.u. = 2^14.
module apf_controller
  import apf_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned GRID_HZ    = 50,
  parameter int unsigned PLL_PERIOD = 12,
  parameter int unsigned PLL_NP     = 7,
  parameter int unsigned PLL_NI     = 23,
  parameter int unsigned LPF_SHIFT  = 16,
  parameter int unsigned DC_KP_SHL  = 2,
  parameter int unsigned DC_KI_SHR  = 12
) (
  input  logic                clk,
  input  logic                rst,
  // ADC samples
  input  sample_t             va, vb, vc,       // grid voltages
  input  sample_t             ila, ilb, ilc,    // load currents
  input  sample_t             ica, icb, icc,    // inverter currents
  input  sample_t             vdc,              // dc-link voltage
  // settings
  input  sample_t             vdc_ref,
  input  logic [SAMPLE_W-1:0] mi, mo,           // hysteresis tolerances
  // gate commands (upper switches)
  output logic                pwma, pwmb, pwmc,
  // observation
  output trig_t               sina, sinb, sinc,
  output trig_t               cosa, cosb, cosc,
  output phase_t              theta,
  output sample_t             ira, irb, irc,
  output sample_t             idc,
  output sample_t             ipd,              // filtered active current
  output logic                ref_valid,
  output sector_t             sector,
  output dcc_mode_t           mode,
  output logic                step
);

  sample_t da, db, dc;

  pll3ph #(.CLK_HZ(CLK_HZ), .GRID_HZ(GRID_HZ), .PERIOD(PLL_PERIOD),
           .NP(PLL_NP), .NI(PLL_NI)) u_pll (
    .clk, .rst, .va_in(va), .vb_in(vb), .vc_in(vc),
    .sina, .sinb, .sinc, .cosa, .cosb, .cosc, .valid(step), .theta
  );

  dc_voltage_regulator #(.KP_SHL(DC_KP_SHL), .KI_SHR(DC_KI_SHR)) u_dcreg (
    .clk, .rst, .en(step), .vdc, .vref(vdc_ref), .idc
  );

  current_ref_gen #(.LPF_SHIFT(LPF_SHIFT)) u_crg (
    .clk, .rst, .en(step), .ila, .ilb, .ilc, .sina, .sinb, .sinc, .idc,
    .ira, .irb, .irc, .ipd, .valid(ref_valid)
  );

  function automatic sample_t sat_diff(sample_t r, sample_t m);
    logic signed [SAMPLE_W:0] d;
    d = (SAMPLE_W+1)'(r) - (SAMPLE_W+1)'(m);
    if (d > (SAMPLE_W+1)'(32767))       return 16'sh7fff;
    else if (d < -(SAMPLE_W+1)'(32768)) return 16'sh8000;
    else                                return sample_t'(d);
  endfunction

  always_comb begin
    da = sat_diff(ira, ica);
    db = sat_diff(irb, icb);
    dc = sat_diff(irc, icc);
  end

  direct_current_controller u_dcc (
    .clk, .rst, .sample_en(1'b1),
    .delta_a(da), .delta_b(db), .delta_c(dc), .mi, .mo,
    .pwma, .pwmb, .pwmc, .sector, .mode
  );

endmodule
