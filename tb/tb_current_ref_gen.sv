// tb_current_ref_gen: a load drawing 0.5 p.u. active, 0.3 p.u. reactive
// and 0.15 p.u. fifth-harmonic current, with exact sines supplied as the
// PLL would. After the low-pass filter settles, the reference of each
// phase must equal the reactive plus harmonic part (within 0.02 p.u.), ipd
// the active amplitude, and an idc demand must lower the reference by
// idc*sin. Also checks the three-clock latency of valid. The filter shift
// is reduced to 8 to keep the run short.
module tb_current_ref_gen;
  import apf_pkg::*;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  sample_t ila, ilb, ilc, idc, ira, irb, irc, ipd;
  trig_t sina, sinb, sinc;
  logic valid;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real I1 = 0.5, IQ = 0.3, I5 = 0.15;

  current_ref_gen #(.LPF_SHIFT(8)) dut (.clk, .rst, .en, .ila, .ilb, .ilc,
      .sina, .sinb, .sinc, .idc, .ira, .irb, .irc, .ipd, .valid);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real th = 0.3;
  real exp_r [3];
  int  lat_bad = 0;

  task automatic step(input real idc_pu, input bit check_it);
    real tx, il [3];
    for (int k = 0; k < 3; k++) begin
      tx = th - real'(k) * 2.0 * PI / 3.0;
      il[k] = I1 * $sin(tx) + IQ * $cos(tx) + I5 * $sin(5.0 * tx);
      exp_r[k] = il[k] - (I1 + idc_pu) * $sin(tx);
    end
    ila = sample_t'($rtoi(il[0] * 16384.0));
    ilb = sample_t'($rtoi(il[1] * 16384.0));
    ilc = sample_t'($rtoi(il[2] * 16384.0));
    sina = trig_t'($rtoi(32767.0 * $sin(th)));
    sinb = trig_t'($rtoi(32767.0 * $sin(th - 2.0*PI/3.0)));
    sinc = trig_t'($rtoi(32767.0 * $sin(th + 2.0*PI/3.0)));
    idc  = sample_t'($rtoi(idc_pu * 16384.0));
    en = 1'b1;
    @(negedge clk); en = 1'b0;
    for (int d = 1; d <= 3; d++) begin
      if (valid != (d == 3)) lat_bad++;
      @(negedge clk);
    end
    if (check_it) begin
      real g [3];
      g[0] = real'(ira) / 16384.0; g[1] = real'(irb) / 16384.0; g[2] = real'(irc) / 16384.0;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (g[k] - exp_r[k] > 0.02 || exp_r[k] - g[k] > 0.02) begin
          failures++;
          if (failures < 10) $display("phase %0d: got %f exp %f", k, g[k], exp_r[k]);
        end
      end
      checks++;
      if (real'(ipd) / 16384.0 - I1 > 0.02 || I1 - real'(ipd) / 16384.0 > 0.02) failures++;
    end
    th = th + 2.0 * PI / 400.0;
  endtask

  initial begin
    ila = '0; ilb = '0; ilc = '0; idc = '0; sina = '0; sinb = '0; sinc = '0;
    repeat (2) @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 4000; n++) step(0.0, 1'b0);
    for (int n = 0; n < 800; n++)  step(0.0, 1'b1);
    for (int n = 0; n < 800; n++)  step(0.1, 1'b1);
    checks++;
    if (lat_bad != 0) begin failures++; $display("valid latency wrong %0d times", lat_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
