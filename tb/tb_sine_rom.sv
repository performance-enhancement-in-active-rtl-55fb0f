// tb_sine_rom: checks every entry of the quarter-wave sine table against
// round(32767 sin((k+0.5) pi/2048)) computed in real arithmetic, and the
// one-clock read latency.
module tb_sine_rom;
  logic clk = 1'b0;
  logic [9:0] addr;
  logic [14:0] data;
  int checks = 0, failures = 0;

  sine_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_v;
    int  exp_v;
    addr = '0;
    @(negedge clk);
    for (int k = 0; k < 1024; k++) begin
      addr = 10'(k);
      @(posedge clk);       // address captured here
      #1;
      addr = 10'(1023 - k); // a later address must not disturb the value
      #1;
      ref_v = 32767.0 * $sin((real'(k) + 0.5) * 3.14159265358979 / 2048.0);
      exp_v = int'(ref_v);
      checks++;
      if (int'(data) - exp_v > 1 || exp_v - int'(data) > 1) begin
        failures++;
        if (failures < 10) $display("entry %0d: got %0d expected %0d", k, data, exp_v);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
