// tb_pll_fsm: runs several PLL steps and checks that each step lasts
// PERIOD clocks and has the order detect, filter, integrate, six look-ups
// 0..5, one idle clock, publish.
module tb_pll_fsm;
  import apf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic det_en, pi_en, int_en, lk_valid, publish;
  lookup_t lk_sel;
  int checks = 0, failures = 0;
  localparam int PERIOD = 12;

  pll_fsm #(.PERIOD(PERIOD)) dut (.clk, .rst, .det_en, .pi_en, .int_en, .lk_valid, .lk_sel, .publish);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected pattern per cycle offset within a step
  function automatic logic [9:0] expected(int c);
    // {det, pi, int, lkv, lksel(3), pub, 2'b0}
    case (c)
      0: return 10'b1000_000_0_00;
      1: return 10'b0100_000_0_00;
      2: return 10'b0010_000_0_00;
      3,4,5,6,7,8: return {4'b0001, 3'(c - 3), 3'b000};
      10: return 10'b0000_000_1_00;
      default: return 10'b0;
    endcase
  endfunction

  initial begin
    logic [9:0] got;
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 8 * PERIOD; n++) begin
      got = {det_en, pi_en, int_en, lk_valid, lk_valid ? 3'(lk_sel) : 3'b000, publish, 2'b00};
      checks++;
      if (got != expected(n % PERIOD)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %b exp %b", n, got, expected(n % PERIOD));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
