// tb_direct_current_controller: random error vectors (angle kept away from
// sector borders, magnitude kept 5 % away from the tolerances) drive the
// controller; a model built from real-valued geometry (sector from the
// angle, loop from the exact magnitude) and the rotated sector-I table
// predicts the switching state each clock. Also checks that the outer loop
// picks the active vector closest to the error direction, and sample_en.
module tb_direct_current_controller;
  import apf_pkg::*;
  logic clk = 1'b0, rst = 1'b1, sample_en = 1'b0;
  sample_t delta_a, delta_b, delta_c;
  logic [15:0] mi, mo;
  logic pwma, pwmb, pwmc;
  sector_t sector;
  dcc_mode_t mode;
  int checks = 0, failures = 0;
  int nmode [3], nsec [7];
  localparam real PI = 3.14159265358979;

  direct_current_controller dut (.clk, .rst, .sample_en, .delta_a, .delta_b, .delta_c,
                                 .mi, .mo, .pwma, .pwmb, .pwmc, .sector, .mode);

  always #5 clk = ~clk;

  function automatic sw_vec_t rot(sw_vec_t v, int k);
    sw_vec_t x = v;
    for (int i = 0; i < k; i++) x = ~{x[1], x[0], x[2]};
    return x;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw_vec_t row_i [8] = '{3'd4, 3'd5, 3'd6, 3'd7, 3'd4, 3'd4, 3'd4, 3'd4};
    sw_vec_t model, vang;
    real ang, amp, rel, z, va_ang;
    int s, emode;
    model = 3'd0;
    mi = 16'd300; mo = 16'd900;
    delta_a = '0; delta_b = '0; delta_c = '0;
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      do begin
        ang = real'($urandom_range(0, 359999)) / 1000.0;
        rel = ang + 30.0; if (rel >= 360.0) rel -= 360.0;
      end while (rel - 60.0 * $floor(rel / 60.0) < 0.5 || rel - 60.0 * $floor(rel / 60.0) > 59.5);
      s = int'($floor(rel / 60.0)) + 1;
      case ($urandom_range(0, 2))
        0: amp = 0.95 * 300.0 * real'($urandom_range(10, 100)) / 100.0;
        1: amp = 300.0 * (1.05 + 0.9 * real'($urandom_range(0, 100)) / 100.0);
        default: amp = 900.0 * (1.05 + 3.0 * real'($urandom_range(0, 100)) / 100.0);
      endcase
      if (amp >= 900.0)      emode = 2;
      else if (amp >= 300.0) emode = 1;
      else                   emode = 0;
      z = real'($urandom_range(0, 2000)) - 1000.0;
      delta_a = sample_t'($rtoi(amp * $cos(ang * PI / 180.0) + z));
      delta_b = sample_t'($rtoi(amp * $cos((ang - 120.0) * PI / 180.0) + z));
      delta_c = sample_t'($rtoi(amp * $cos((ang + 120.0) * PI / 180.0) + z));
      sample_en = ($urandom_range(0, 7) != 0);
      @(negedge clk);
      if (sample_en) begin
        nmode[emode]++; nsec[s]++;
        if (emode == 2) begin
          model = rot(3'd4, s - 1);
          // the chosen active vector points within 30 degrees of the error
          va_ang = 60.0 * real'(s - 1);
          vang = {pwma, pwmb, pwmc};
          checks++;
          if (vang != rot(3'd4, s - 1)) failures++;
        end else if (emode == 1) model = rot(row_i[rot(model, 7 - s)], s - 1);
        checks += 2;
        if (int'(mode) != emode) begin failures++; if (failures < 10) $display("n=%0d mode %0d exp %0d amp %f", n, mode, emode, amp); end
        if (int'(sector) != s) failures++;
      end
      checks++;
      if ({pwma, pwmb, pwmc} != model) begin
        failures++;
        if (failures < 10) $display("n=%0d pwm %b exp %b", n, {pwma, pwmb, pwmc}, model);
      end
    end
    for (int k = 0; k < 3; k++) begin checks++; if (nmode[k] == 0) failures++; end
    for (int k = 1; k < 7; k++) begin checks++; if (nsec[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
