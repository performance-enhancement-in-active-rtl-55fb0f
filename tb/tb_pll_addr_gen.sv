// tb_pll_addr_gen: for random phases and all six look-ups, rebuilds the
// signed value from a real-valued model of the quarter table and compares
// it with sin/cos of the intended angle.
module tb_pll_addr_gen;
  import apf_pkg::*;
  phase_t      theta;
  lookup_t     sel;
  logic [9:0]  addr;
  logic        neg;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  pll_addr_gen dut (.theta, .sel, .addr, .neg);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ang, expv, gotv, offs [6];
    offs[0] = 0.0;       offs[1] = -2.0*PI/3.0; offs[2] = 2.0*PI/3.0;
    offs[3] = PI/2.0;    offs[4] = PI/2.0 - 2.0*PI/3.0; offs[5] = PI/2.0 + 2.0*PI/3.0;
    for (int n = 0; n < 3000; n++) begin
      theta = (n < 8) ? phase_t'(n) << 29 : $urandom;
      for (int k = 0; k < 6; k++) begin
        sel = lookup_t'(k);
        #1;
        ang  = real'(theta) * 2.0 * PI / 4294967296.0 + offs[k];
        expv = (k < 3) ? $sin(ang - offs[k] + offs[k]) : $sin(ang);
        gotv = $sin((real'(addr) + 0.5) * PI / 2048.0);
        if (neg) gotv = -gotv;
        checks++;
        if (gotv - expv > 0.0012 || expv - gotv > 0.0012) begin
          failures++;
          if (failures < 10) $display("theta=%h sel=%0d addr=%0d neg=%0d got %f exp %f", theta, k, addr, neg, gotv, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
