// tb_magnitude_est: random vectors; the estimate must lie within -3.5 %
// and +1.5 % (plus 2 LSB) of sqrt(alpha^2 + beta^2).
module tb_magnitude_est;
  logic signed [17:0] alpha, beta;
  logic [17:0] mag;
  int checks = 0, failures = 0;

  magnitude_est #(.W(18)) dut (.alpha, .beta, .mag);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, r;
    for (int n = 0; n < 5000; n++) begin
      alpha = 18'($signed(17'($urandom)));
      beta  = 18'($signed(17'($urandom)));
      if (n < 4) begin alpha = (n % 2) ? 18'sd60000 : -18'sd60000; beta = (n < 2) ? 18'sd0 : 18'sd60000; end
      #1;
      m = $sqrt(real'(alpha) * real'(alpha) + real'(beta) * real'(beta));
      r = real'(mag);
      checks++;
      if (r > 1.015 * m + 2.0 || r < 0.965 * m - 2.0) begin
        failures++;
        if (failures < 10) $display("(%0d,%0d): got %0d true %f", alpha, beta, mag, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
