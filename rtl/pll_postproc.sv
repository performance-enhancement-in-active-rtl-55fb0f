// pll_postproc: postprocessor of the PLL's compact sine table.
//
// Turns the unsigned quarter-wave table output into signed sine/cosine
// values and collects the six results of one PLL step. The sign flag and
// the destination of a look-up are delayed one clock to line up with the
// table's read latency; each returning value is negated if needed and
// written to a staging register. On publish all six staging registers are
// copied to the outputs at once, so the outputs always belong to one
// phase value. The postprocessor and its FSM control follow the original design;
// the staging/publish scheme is this design's own choice.
//
// Timing: lk_valid/lk_sel/lk_neg describe the address presented to the
// table in the same cycle; the table value arrives one cycle later.
module pll_postproc
  import apf_pkg::*;
#(
  parameter int unsigned DW = LUT_DW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          lk_valid,
  input  lookup_t       lk_sel,
  input  logic          lk_neg,
  input  logic [DW-1:0] rom_data,
  input  logic          publish,
  output trig_t         sina, sinb, sinc,
  output trig_t         cosa, cosb, cosc
);

  logic    wr_valid, wr_neg;
  lookup_t wr_sel;
  trig_t   value;
  trig_t   stage [6];

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_valid <= 1'b0;
      wr_neg   <= 1'b0;
      wr_sel   <= LK_SINA;
    end else begin
      wr_valid <= lk_valid;
      wr_neg   <= lk_neg;
      wr_sel   <= lk_sel;
    end
  end

  always_comb begin
    value = trig_t'({1'b0, rom_data});
    if (wr_neg) value = -value;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 6; i++) stage[i] <= '0;
    end else if (wr_valid) begin
      stage[wr_sel] <= value;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sina <= '0; sinb <= '0; sinc <= '0;
      cosa <= '0; cosb <= '0; cosc <= '0;
    end else if (publish) begin
      sina <= stage[LK_SINA]; sinb <= stage[LK_SINB]; sinc <= stage[LK_SINC];
      cosa <= stage[LK_COSA]; cosb <= stage[LK_COSB]; cosc <= stage[LK_COSC];
    end
  end

endmodule
