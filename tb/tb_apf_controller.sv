// tb_apf_controller: end-to-end run of the complete controller at its
// default parameters (50 MHz clock, 50 Hz grid), closed around a simple
// model of the power stage:
//   grid      : balanced 1 p.u. sine voltages
//   load      : 0.5 p.u. active, 0.3 p.u. lagging reactive, 0.15 p.u. 5th
//               and 0.08 p.u. 7th harmonic current
//   inverter  : two-level, leg voltage vdc*(S_x - mean(S)), one inductor per
//               phase: ic_x += K_L*(vinv_x - v_x) per clock
//   dc link   : capacitor fed by -sum(S_x*ic_x), with a small leakage
// At 100 ms the capacitor is given a charge step so the regulator must
// push energy back. Over one grid period from 150 ms the source current
// is = iL - ic is analysed: its 5th and 7th harmonics and its reactive
// component must be far below the load's, and its active component near
// 0.5 p.u. Each mechanism must occur at least once: PLL lock, all three
// current-controller loops, all six sectors, positive and negative idc.
module tb_apf_controller;
  import apf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sample_t va, vb, vc, ila, ilb, ilc, ica, icb, icc, vdc, vdc_ref;
  logic [15:0] mi, mo;
  logic pwma, pwmb, pwmc;
  trig_t sina, sinb, sinc, cosa, cosb, cosc;
  phase_t theta;
  sample_t ira, irb, irc, idc, ipd;
  logic ref_valid, step;
  sector_t sector;
  dcc_mode_t mode;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real TCLK = 20.0e-9;
  localparam real K_L = 1.0e-4;     // inductor: p.u. current per p.u. volt per clock
  localparam real K_C = 4.0e-7;     // capacitor: p.u. volt per p.u. current per clock
  localparam real LEAK = 0.0158;    // leakage current of the dc link (p.u.)
  localparam real VDC0 = 1.8;

  apf_controller dut (
    .clk, .rst, .va, .vb, .vc, .ila, .ilb, .ilc, .ica, .icb, .icc, .vdc,
    .vdc_ref, .mi, .mo, .pwma, .pwmb, .pwmc,
    .sina, .sinb, .sinc, .cosa, .cosb, .cosc, .theta,
    .ira, .irb, .irc, .idc, .ipd, .ref_valid, .sector, .mode, .step
  );

  always #5 clk = ~clk;

  real ph = 0.7, vdc_r = VDC0;
  real v [3], il [3], ic [3] = '{0.0, 0.0, 0.0};
  longint cyc = 0;
  longint nmode [3], nsec [7], npos = 0, nneg = 0;

  initial begin
    #250000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t pu(real x);
    if (x > 1.99) x = 1.99;
    if (x < -1.99) x = -1.99;
    return sample_t'($rtoi(x * 16384.0));
  endfunction

  // power stage and sensors, one step per clock
  always @(negedge clk) begin
    real tx, sm, vinv, idcl;
    int s [3];
    cyc++;
    ph = ph + 2.0 * PI * 50.0 * TCLK;
    if (ph > 2.0 * PI) ph = ph - 2.0 * PI;
    s[0] = int'(pwma); s[1] = int'(pwmb); s[2] = int'(pwmc);
    sm = real'(s[0] + s[1] + s[2]) / 3.0;
    idcl = 0.0;
    for (int k = 0; k < 3; k++) begin
      tx = ph - real'(k) * 2.0 * PI / 3.0;
      v[k]  = $sin(tx);
      il[k] = 0.5 * $sin(tx) - 0.3 * $cos(tx) + 0.15 * $sin(5.0 * tx) + 0.08 * $sin(7.0 * tx);
      vinv  = vdc_r * (real'(s[k]) - sm);
      ic[k] = ic[k] + K_L * (vinv - v[k]);
      idcl  = idcl + real'(s[k]) * ic[k];
    end
    vdc_r = vdc_r - K_C * (idcl + LEAK);
    if (cyc == 5000000) vdc_r = vdc_r + 0.06;   // charge step at 100 ms
    va = pu(v[0]); vb = pu(v[1]); vc = pu(v[2]);
    ila = pu(il[0]); ilb = pu(il[1]); ilc = pu(il[2]);
    ica = pu(ic[0]); icb = pu(ic[1]); icc = pu(ic[2]);
    vdc = pu(vdc_r);
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    nmode[int'(mode)]++;
    nsec[int'(sector)]++;
    if (idc > 0) npos++;
    if (idc < 0) nneg++;
  end

  initial begin
    real a1, b1, c5, s5, c7, s7, la5, isrc, tx, h5, h7, pll_err, e;
    int nsamp;
    vdc_ref = pu(VDC0);
    mi = 16'd164;   // 0.01 p.u.
    mo = 16'd492;   // 0.03 p.u.
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (7500000) @(posedge clk);     // 150 ms
    a1 = 0; b1 = 0; c5 = 0; s5 = 0; c7 = 0; s7 = 0; nsamp = 0; pll_err = 0;
    for (int n = 0; n < 1000000; n++) begin   // one grid period
      @(posedge clk);
      if (n % 50 == 0) begin
        tx = ph;
        isrc = il[0] - ic[0];
        a1 += isrc * $sin(tx);        b1 += isrc * $cos(tx);
        c5 += isrc * $cos(5.0 * tx);  s5 += isrc * $sin(5.0 * tx);
        c7 += isrc * $cos(7.0 * tx);  s7 += isrc * $sin(7.0 * tx);
        nsamp++;
        e = real'(sina) / 32767.0 - $sin(tx);
        if (e < 0) e = -e;
        if (e > pll_err) pll_err = e;
      end
    end
    a1 = 2.0 * a1 / nsamp; b1 = 2.0 * b1 / nsamp;
    h5 = 2.0 * $sqrt(c5 * c5 + s5 * s5) / nsamp;
    h7 = 2.0 * $sqrt(c7 * c7 + s7 * s7) / nsamp;
    $display("source current: active %f reactive %f 5th %f 7th %f (load: 0.5, 0.3, 0.15, 0.08)", a1, b1, h5, h7);
    $display("PLL error %f p.u., vdc %f p.u., idc %0d, ipd %0d", pll_err, vdc_r, idc, ipd);
    checks++; if (pll_err > 0.03) begin failures++; $display("PLL not locked"); end
    checks++; if (h5 > 0.03) begin failures++; $display("5th harmonic not compensated"); end
    checks++; if (h7 > 0.03) begin failures++; $display("7th harmonic not compensated"); end
    checks++; if (b1 > 0.03 || b1 < -0.03) begin failures++; $display("reactive current not compensated"); end
    checks++; if (a1 < 0.4 || a1 > 0.65) begin failures++; $display("active current wrong"); end
    checks++; if (vdc_r < VDC0 - 0.1 || vdc_r > VDC0 + 0.1) begin failures++; $display("dc link not regulated"); end
    $display("loops hold/inner/outer: %0d %0d %0d", nmode[0], nmode[1], nmode[2]);
    $display("sectors: %0d %0d %0d %0d %0d %0d; idc>0 %0d idc<0 %0d", nsec[1], nsec[2], nsec[3], nsec[4], nsec[5], nsec[6], npos, nneg);
    for (int k = 0; k < 3; k++) begin checks++; if (nmode[k] == 0) failures++; end
    for (int k = 1; k < 7; k++) begin checks++; if (nsec[k] == 0) failures++; end
    checks++; if (npos == 0) failures++;
    checks++; if (nneg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
