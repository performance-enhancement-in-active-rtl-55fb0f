// dc_voltage_regulator: DC-link voltage regulator of the active power filter.
//
// Keeps the inverter's dc capacitor at its reference by asking the grid for
// a little extra active current: a PI controller on e = vref - vdc whose
// output idc is added to the active current term of the current-reference
// generator (more source current charges the capacitor). As in the PLL,
// both gains are powers of two, so the controller needs only shifts:
//   acc <= clamp(acc + e),  idc = clamp((e <<< KP_SHL) + (acc >>> KI_SHR))
// The original design states only that idc follows the difference between the
// reference and the dc-bus voltage; the PI form, shift gains, anti-windup
// clamp and limit IDC_MAX are this design's choices.
//
// Timing: updates when en is high; idc is registered (one clock). Voltages
// and currents are 16-bit signed; 1 p.u. = 2^14.
module dc_voltage_regulator
  import apf_pkg::*;
#(
  parameter int unsigned KP_SHL  = 2,
  parameter int unsigned KI_SHR  = 12,
  parameter int          IDC_MAX = 8192
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  sample_t vdc,
  input  sample_t vref,
  output sample_t idc
);

  localparam int unsigned AW = SAMPLE_W + KI_SHR + 2;
  localparam logic signed [AW-1:0] ACC_MAX = AW'(IDC_MAX) <<< KI_SHR;

  logic signed [AW-1:0] acc, acc_sum, acc_next, out;
  logic signed [SAMPLE_W:0] err;

  always_comb begin
    err      = (SAMPLE_W+1)'(vref) - (SAMPLE_W+1)'(vdc);
    acc_sum  = acc + AW'(err);
    if (acc_sum > ACC_MAX)       acc_next = ACC_MAX;
    else if (acc_sum < -ACC_MAX) acc_next = -ACC_MAX;
    else                         acc_next = acc_sum;
    out = (AW'(err) <<< KP_SHL) + (acc_next >>> KI_SHR);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      idc <= '0;
    end else if (en) begin
      acc <= acc_next;
      if (out > AW'(IDC_MAX))       idc <= SAMPLE_W'(IDC_MAX);
      else if (out < -AW'(IDC_MAX)) idc <= SAMPLE_W'(-IDC_MAX);
      else                          idc <= SAMPLE_W'(out);
    end
  end

endmodule
