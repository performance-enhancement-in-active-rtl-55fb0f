// tb_clarke_shift_add: random three-phase values against the real-valued
// transform alpha = a-(b+c)/2, beta = (sqrt3/2)(b-c), dbc = b-c.
module tb_clarke_shift_add;
  import apf_pkg::*;
  sample_t a, b, c;
  logic signed [17:0] alpha, beta;
  logic signed [16:0] dbc;
  int checks = 0, failures = 0;

  clarke_shift_add dut (.a, .b, .c, .alpha, .beta, .dbc);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ea, eb, tol;
    for (int n = 0; n < 5000; n++) begin
      a = $urandom; b = $urandom; c = $urandom;
      if (n == 0) begin a = 16'sh7fff; b = 16'sh8000; c = 16'sh8000; end
      #1;
      ea = real'(a) - (real'(b) + real'(c)) / 2.0;
      eb = 0.8660254 * (real'(b) - real'(c));
      tol = 2.0 + 0.0015 * (eb < 0.0 ? -eb : eb);
      checks += 3;
      if (real'(alpha) - ea > 1.0 || ea - real'(alpha) > 1.0) failures++;
      if (real'(beta) - eb > tol || eb - real'(beta) > tol) begin
        failures++;
        if (failures < 10) $display("beta got %0d exp %f", beta, eb);
      end
      if (int'(dbc) != int'(b) - int'(c)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
