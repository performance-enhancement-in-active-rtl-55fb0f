// tb_pll3ph: the PLL at its default parameters (50 MHz clock, 50 Hz grid)
// is fed balanced three-phase voltages starting at an arbitrary phase.
// Phase 1: after 120 ms the six outputs must match sin/cos of the input
// phases (error below 0.03 p.u. over one full grid period) and the step
// strobe must come every 12 clocks. Phase 2: the grid jumps to 51 Hz with a
// 5 % fifth harmonic; the PLL must lock again. Phase 3: phase a drops to
// 0.8 p.u. (unbalance) and +/-0.02 p.u. noise is added; the outputs must
// still follow the phase of the fundamental within 0.05 p.u.
module tb_pll3ph;
  import apf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sample_t va, vb, vc;
  trig_t sina, sinb, sinc, cosa, cosb, cosc;
  logic valid;
  phase_t theta;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;
  localparam real TCLK = 20.0e-9;

  pll3ph dut (.clk, .rst, .va_in(va), .vb_in(vb), .vc_in(vc),
              .sina, .sinb, .sinc, .cosa, .cosb, .cosc, .valid, .theta);

  always #5 clk = ~clk;

  real ph_in = 1.0;     // input phase (rad)
  real f_in  = 50.0;
  real h5    = 0.0;
  real ua    = 1.0;     // amplitude of phase a
  real nz    = 0.0;     // noise amplitude
  longint cyc = 0;

  initial begin
    #300000000;   // 30 M clocks
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grid source, advanced every clock
  always @(negedge clk) begin
    cyc++;
    ph_in = ph_in + 2.0 * PI * f_in * TCLK;
    if (ph_in > 2.0 * PI) ph_in = ph_in - 2.0 * PI;
    va = sample_t'($rtoi(16384.0 * (ua * $sin(ph_in) + h5 * $sin(5.0 * ph_in)
                                    + nz * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0))));
    vb = sample_t'($rtoi(16384.0 * ($sin(ph_in - 2.0*PI/3.0) + h5 * $sin(5.0 * (ph_in - 2.0*PI/3.0)))));
    vc = sample_t'($rtoi(16384.0 * ($sin(ph_in + 2.0*PI/3.0) + h5 * $sin(5.0 * (ph_in + 2.0*PI/3.0)))));
  end

  real maxerr;
  task automatic measure(input string what, input real tol);
    real e, r [6], g [6];
    maxerr = 0.0;
    // one grid period
    for (int n = 0; n < 1000000; n++) begin
      @(posedge clk);
      if (valid) begin
        // outputs were computed from the phase at the start of the step
        r[0] = $sin(ph_in); r[1] = $sin(ph_in - 2.0*PI/3.0); r[2] = $sin(ph_in + 2.0*PI/3.0);
        r[3] = $cos(ph_in); r[4] = $cos(ph_in - 2.0*PI/3.0); r[5] = $cos(ph_in + 2.0*PI/3.0);
        g[0] = real'(sina); g[1] = real'(sinb); g[2] = real'(sinc);
        g[3] = real'(cosa); g[4] = real'(cosb); g[5] = real'(cosc);
        for (int k = 0; k < 6; k++) begin
          e = g[k] / 32767.0 - r[k];
          if (e < 0.0) e = -e;
          if (e > maxerr) maxerr = e;
        end
      end
    end
    checks++;
    $display("%s: max output error %f p.u.", what, maxerr);
    if (maxerr > tol) failures++;
  endtask

  initial begin
    longint last, gap_bad, strobes;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // step timing
    last = -1; gap_bad = 0; strobes = 0;
    for (int n = 0; n < 1200; n++) begin
      @(posedge clk);
      if (valid) begin
        if (last >= 0 && cyc - last != 12) gap_bad++;
        last = cyc; strobes++;
      end
    end
    checks++;
    if (gap_bad != 0 || strobes < 99) begin
      failures++;
      $display("strobe spacing wrong: %0d bad of %0d", gap_bad, strobes);
    end
    // wait for lock: 120 ms
    repeat (6000000) @(posedge clk);
    measure("locked at 50 Hz", 0.03);
    f_in = 51.0; h5 = 0.05;
    repeat (6000000 - 1000000) @(posedge clk);
    measure("locked at 51 Hz with 5% fifth harmonic", 0.06);
    ua = 0.8; nz = 0.02;
    repeat (6000000 - 1000000) @(posedge clk);
    measure("locked with phase a at 0.8 p.u. and noise", 0.05);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
