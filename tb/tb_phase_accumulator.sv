// tb_phase_accumulator: random signed steps, random enables, checks the
// modulo-2^32 phase against a model.
module tb_phase_accumulator;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [31:0] omega;
  logic [31:0] theta;
  int checks = 0, failures = 0;

  phase_accumulator dut (.clk, .rst, .en, .omega, .theta);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model;
    int wraps = 0;
    model = '0;
    @(negedge clk); rst = 1'b0;
    checks++; if (theta != 0) failures++;
    for (int n = 0; n < 3000; n++) begin
      omega = (n < 1500) ? 32'($urandom_range(0, 32'h1000_0000)) : $urandom;
      en = $urandom_range(0, 1);
      @(negedge clk);
      if (en) begin
        if (model + omega < model && omega > 0) wraps++;
        model = model + omega;
      end
      checks++;
      if (theta != model) begin
        failures++;
        if (failures < 10) $display("n=%0d theta %h exp %h", n, theta, model);
      end
    end
    checks++; if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
