// tb_switching_generator: checks loop selection against the 1.5-scaled
// tolerances (including the exact threshold values), that the state is
// kept below the inner tolerance and while ce is low, and the register
// timing, using the rotated sector-I model of the switching table.
module tb_switching_generator;
  import apf_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic [17:0] mag;
  logic [15:0] mi, mo;
  sector_t sector;
  sw_vec_t vec;
  dcc_mode_t mode;
  int checks = 0, failures = 0;
  int nmode [3];

  switching_generator dut (.clk, .rst, .ce, .mag, .mi, .mo, .sector, .vec, .mode);

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
    sw_vec_t model;
    dcc_mode_t emode;
    int s, mis, mos;
    model = 3'd0;
    mi = 16'd200; mo = 16'd600;
    mag = '0; sector = SEC_I;
    @(negedge clk); rst = 1'b0;
    checks++; if (vec != 3'd0 || mode != MODE_HOLD) failures++;
    for (int n = 0; n < 3000; n++) begin
      mi = 16'($urandom_range(50, 400));
      mo = mi + 16'($urandom_range(10, 600));
      mis = int'(mi) + int'(mi) / 2;
      mos = int'(mo) + int'(mo) / 2;
      case ($urandom_range(0, 5))
        0: mag = 18'(mis);
        1: mag = 18'(mis - 1);
        2: mag = 18'(mos);
        3: mag = 18'(mos - 1);
        default: mag = 18'($urandom_range(0, 1500));
      endcase
      s = $urandom_range(1, 6);
      sector = sector_t'(s);
      ce = ($urandom_range(0, 4) != 0);
      if (int'(mag) >= mos)      emode = MODE_OUTER;
      else if (int'(mag) >= mis) emode = MODE_INNER;
      else                       emode = MODE_HOLD;
      @(negedge clk);
      if (ce) begin
        nmode[int'(emode)]++;
        if (emode == MODE_OUTER)      model = rot(3'd4, s - 1);
        else if (emode == MODE_INNER) model = rot(row_i[rot(model, 7 - s)], s - 1);
        checks++;
        if (mode != emode) begin failures++; if (failures < 10) $display("n=%0d mode %0d exp %0d", n, mode, emode); end
      end
      checks++;
      if (vec != model) begin
        failures++;
        if (failures < 10) $display("n=%0d vec %0d exp %0d", n, vec, model);
      end
    end
    for (int k = 0; k < 3; k++) begin checks++; if (nmode[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
