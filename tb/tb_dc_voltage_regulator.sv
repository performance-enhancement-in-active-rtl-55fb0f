// tb_dc_voltage_regulator: random voltage errors against a 64-bit model of
// the shift-gain PI with clamped integrator and output; then a dc-link
// voltage below and above the reference must drive idc positive and
// negative, and a long large error must reach the output limit.
module tb_dc_voltage_regulator;
  import apf_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  sample_t vdc, vref, idc;
  int checks = 0, failures = 0;
  localparam longint KP = 2, KI = 12, IMAX = 8192;

  dc_voltage_regulator dut (.clk, .rst, .en, .vdc, .vref, .idc);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, e, o, expv, amax;
    bit hit_max = 0;
    acc = 0; amax = IMAX <<< KI;
    vdc = '0; vref = '0;
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      vref = 16'sd24000;
      if (n < 10000) vdc = sample_t'(24000 + $urandom_range(0, 2000) - 1200);
      else           vdc = sample_t'(24000 + $urandom_range(0, 2000) - 800);
      if (n > 18000) vdc = 16'sd10000;
      en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (en) begin
        e = longint'(vref) - longint'(vdc);
        acc = acc + e;
        if (acc > amax) acc = amax;
        if (acc < -amax) acc = -amax;
        o = (e <<< KP) + (acc >>> KI);
        expv = (o > IMAX) ? IMAX : (o < -IMAX) ? -IMAX : o;
        if (expv == IMAX) hit_max = 1;
        checks++;
        if (longint'(idc) != expv) begin
          failures++;
          if (failures < 10) $display("n=%0d idc %0d exp %0d", n, idc, expv);
        end
      end
    end
    checks++; if (!hit_max) failures++;
    // sign behaviour
    vdc = 16'sd23000; vref = 16'sd24000; en = 1'b1;
    repeat (200) @(negedge clk);
    checks++; if (idc <= 0) failures++;
    vdc = 16'sd25000;
    repeat (20000) @(negedge clk);
    checks++; if (idc >= 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
