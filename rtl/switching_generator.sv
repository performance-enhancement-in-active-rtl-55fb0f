// switching_generator: hysteresis mode selection and switching-state
// register of the directed current controller.
//
// On every sample (ce high) the error magnitude is compared with the two
// tolerances. At or beyond the outer tolerance mo the outer loop is active;
// between the inner tolerance mi and mo the inner loop; below mi the
// present state is kept. The next state comes from switching_table and is
// registered; it drives the gate signals pwm = {Sa,Sb,Sc} and is the
// previous state of the next sample. mag is in the 1.5-scaled units of
// clarke_shift_add, so the tolerances (given in phase-current units) are
// scaled by 1.5 with a shift and an add. The two-tolerance scheme follows
// the original design; keeping the state below mi and the reset state 000 are this
// design's choices. State and mode change one clock after ce.
module switching_generator
  import apf_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W + 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            ce,
  input  logic [W-1:0]    mag,
  input  logic [SAMPLE_W-1:0] mi,
  input  logic [SAMPLE_W-1:0] mo,
  input  sector_t         sector,
  output sw_vec_t         vec,
  output dcc_mode_t       mode
);

  logic [W-1:0] mi_s, mo_s;
  dcc_mode_t    mode_next;
  sw_vec_t      table_out;

  always_comb begin
    mi_s = W'(mi) + W'(mi >> 1);
    mo_s = W'(mo) + W'(mo >> 1);
    if (mag >= mo_s)      mode_next = MODE_OUTER;
    else if (mag >= mi_s) mode_next = MODE_INNER;
    else                  mode_next = MODE_HOLD;
  end

  switching_table u_st (
    .sector, .prev(vec), .outer(mode_next == MODE_OUTER), .next(table_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      vec  <= '0;
      mode <= MODE_HOLD;
    end else if (ce) begin
      mode <= mode_next;
      if (mode_next != MODE_HOLD) vec <= table_out;
    end
  end

endmodule
