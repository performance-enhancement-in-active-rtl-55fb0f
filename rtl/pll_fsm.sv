// pll_fsm: finite-state machine sequencing one step of the three-phase PLL.
//
// One PLL step takes PERIOD clocks (at least 11). In order:
//   DETECT   : the phase detector registers the error from the inputs
//   FILTER   : the PI loop filter updates the frequency
//   INTEGRATE: the phase accumulator advances theta
//   LOOKUP   : six cycles, one table address per cycle (sel = 0..5);
//              the postprocessor stores each value one cycle later
//   DRAIN    : the last table value is stored
//   PUBLISH  : the six new sine/cosine values go to the outputs; the
//              sample strobe pulses
//   WAIT     : idle until the step has lasted PERIOD clocks
// The original design says the address generator and postprocessor are controlled
// by an FSM; the state sequence and the fixed step length are this
// design's own choices.
module pll_fsm
  import apf_pkg::*;
#(
  parameter int unsigned PERIOD = 12
) (
  input  logic    clk,
  input  logic    rst,
  output logic    det_en,
  output logic    pi_en,
  output logic    int_en,
  output logic    lk_valid,
  output lookup_t lk_sel,
  output logic    publish
);

  typedef enum logic [2:0] {
    S_DETECT, S_FILTER, S_INTEGRATE, S_LOOKUP, S_DRAIN, S_PUBLISH, S_WAIT
  } state_t;

  localparam int unsigned CNT_W = $clog2(PERIOD + 1);

  state_t           state;
  logic [CNT_W-1:0] cnt;    // clocks spent in the current step
  logic [2:0]       k;      // look-up counter

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_DETECT;
      cnt   <= '0;
      k     <= '0;
    end else begin
      cnt <= (cnt == CNT_W'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      case (state)
        S_DETECT:    state <= S_FILTER;
        S_FILTER:    state <= S_INTEGRATE;
        S_INTEGRATE: begin state <= S_LOOKUP; k <= '0; end
        S_LOOKUP:    begin
                       k <= k + 1'b1;
                       if (k == 3'd5) state <= S_DRAIN;
                     end
        S_DRAIN:     state <= S_PUBLISH;
        S_PUBLISH:   state <= (cnt == CNT_W'(PERIOD - 1)) ? S_DETECT : S_WAIT;
        default:     if (cnt == CNT_W'(PERIOD - 1)) state <= S_DETECT;
      endcase
    end
  end

  always_comb begin
    det_en   = (state == S_DETECT);
    pi_en    = (state == S_FILTER);
    int_en   = (state == S_INTEGRATE);
    lk_valid = (state == S_LOOKUP);
    lk_sel   = lookup_t'(k);
    publish  = (state == S_PUBLISH);
  end

  initial assert (PERIOD >= 11) else $error("pll_fsm: PERIOD must be at least 11");

endmodule
