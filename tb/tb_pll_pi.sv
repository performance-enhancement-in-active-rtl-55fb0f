// tb_pll_pi: drives random errors, some steps with en low, and compares
// omega and the integrator with a 64-bit model of
// omega = OMEGA0 + (delta >>> NP) + (sum(delta) >>> NI).
module tb_pll_pi;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [25:0] delta;
  logic signed [31:0] omega;
  logic signed [47:0] integ;
  int checks = 0, failures = 0;
  localparam int NP = 7, NI = 23;
  localparam longint OMEGA0 = 51540;

  pll_pi dut (.clk, .rst, .en, .delta, .omega, .integ);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, expw;
    acc = 0;
    @(negedge clk);
    checks++; if (longint'(omega) != OMEGA0) failures++;
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      // long runs of one sign make the integral term visible
      delta = (n < 1000) ? 26'sd3000000 + 26'($urandom_range(0, 100000))
                         : -26'sd2000000 - 26'($urandom_range(0, 100000));
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) begin
        acc  = acc + longint'(delta);
        expw = OMEGA0 + (longint'(delta) >>> NP) + (acc >>> NI);
        checks += 2;
        if (longint'(omega) != expw) begin
          failures++;
          if (failures < 10) $display("n=%0d omega %0d exp %0d", n, omega, expw);
        end
        if (longint'(integ) != acc) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
