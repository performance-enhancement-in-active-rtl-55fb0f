// tb_pll_phase_detector: (1) random operands against a 64-bit integer
// model of the weighted sum; (2) balanced sine voltages with phase theta_in
// and cosines of theta: the result must be 1.5 sin(theta_in - theta) in the
// detector's scale (1 p.u. x Q15 >> 8 = 2^21).
module tb_pll_phase_detector;
  import apf_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  sample_t va, vb, vc;
  trig_t cosa, cosb, cosc;
  logic signed [25:0] delta;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  pll_phase_detector dut (.clk, .rst, .en, .va, .vb, .vc, .cosa, .cosb, .cosc, .delta);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s;
    real ti, th, expr;
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      va = $urandom; vb = $urandom; vc = $urandom;
      cosa = $urandom; cosb = $urandom; cosc = $urandom;
      en = 1'b1;
      @(negedge clk);
      s = longint'(va) * longint'(cosa) + longint'(vb) * longint'(cosb) + longint'(vc) * longint'(cosc);
      checks++;
      if (longint'(delta) != (s >>> 8)) begin
        failures++;
        if (failures < 10) $display("random: got %0d exp %0d", delta, s >>> 8);
      end
    end
    // hold: en low keeps the register
    en = 1'b0; s = longint'(delta);
    va = 16'sd100; @(negedge clk);
    checks++; if (longint'(delta) != s) failures++;
    for (int n = 0; n < 300; n++) begin
      ti = real'($urandom_range(0, 3599)) * PI / 1800.0;
      th = ti + (real'($urandom_range(0, 400)) - 200.0) * PI / 1800.0;  // +/-20 deg
      va = sample_t'($rtoi(16384.0 * $sin(ti)));
      vb = sample_t'($rtoi(16384.0 * $sin(ti - 2.0*PI/3.0)));
      vc = sample_t'($rtoi(16384.0 * $sin(ti + 2.0*PI/3.0)));
      cosa = trig_t'($rtoi(32767.0 * $cos(th)));
      cosb = trig_t'($rtoi(32767.0 * $cos(th - 2.0*PI/3.0)));
      cosc = trig_t'($rtoi(32767.0 * $cos(th + 2.0*PI/3.0)));
      en = 1'b1;
      @(negedge clk);
      expr = 1.5 * $sin(ti - th) * 16384.0 * 32767.0 / 256.0;
      checks++;
      if (real'(delta) - expr > 1000.0 || expr - real'(delta) > 1000.0) begin
        failures++;
        if (failures < 10) $display("sine: got %0d exp %f", delta, expr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
