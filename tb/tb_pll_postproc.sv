// tb_pll_postproc: issues six look-ups with random magnitudes and signs,
// returns the table data one clock later as the RAM would, and checks
// that the outputs stay unchanged until publish and then carry each value
// with the right sign in the right place.
module tb_pll_postproc;
  import apf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic lk_valid = 1'b0, lk_neg = 1'b0, publish = 1'b0;
  lookup_t lk_sel = LK_SINA;
  logic [14:0] rom_data = '0;
  trig_t sina, sinb, sinc, cosa, cosb, cosc;
  int checks = 0, failures = 0;

  pll_postproc dut (.clk, .rst, .lk_valid, .lk_sel, .lk_neg, .rom_data, .publish,
                    .sina, .sinb, .sinc, .cosa, .cosb, .cosc);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    int mag [6], sgn [6], expv [6], order [6];
    trig_t prev_out;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int round = 0; round < 20; round++) begin
      for (int k = 0; k < 6; k++) begin
        mag[k] = $urandom_range(0, 32767);
        sgn[k] = $urandom_range(0, 1);
        expv[k] = sgn[k] ? -mag[k] : mag[k];
        order[k] = (round % 2) ? 5 - k : k;
      end
      prev_out = sina;
      for (int k = 0; k <= 6; k++) begin
        // table data of the previous look-up arrives now
        if (k > 0) rom_data = 15'(mag[order[k-1]]);
        lk_valid = (k < 6);
        if (k < 6) begin
          lk_sel = lookup_t'(order[k]);
          lk_neg = sgn[order[k]][0];
        end
        @(negedge clk);
      end
      lk_valid = 1'b0;
      check(int'(sina), int'(prev_out), "output changed prev_out publish");
      publish = 1'b1;
      @(negedge clk);
      publish = 1'b0;
      check(int'(sina), expv[0], "sina");
      check(int'(sinb), expv[1], "sinb");
      check(int'(sinc), expv[2], "sinc");
      check(int'(cosa), expv[3], "cosa");
      check(int'(cosb), expv[4], "cosb");
      check(int'(cosc), expv[5], "cosc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
