// tb_sector_id: error vectors of random length and angle (kept 0.3 degree
// away from the sector borders), with a random zero-sequence part added to
// all three phases; the decoded sector must match floor((angle+30)/60)+1.
module tb_sector_id;
  import apf_pkg::*;
  sample_t a, b, c;
  logic signed [17:0] alpha, beta;
  logic signed [16:0] dbc;
  sector_t sector;
  int checks = 0, failures = 0;
  int seen [7];
  localparam real PI = 3.14159265358979;

  clarke_shift_add u_c (.a, .b, .c, .alpha, .beta, .dbc);
  sector_id dut (.alpha, .dbc, .sector);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ang, amp, z, rel;
    int exps;
    for (int n = 0; n < 6000; n++) begin
      ang = real'($urandom_range(0, 359999)) / 1000.0;
      rel = ang + 30.0; if (rel >= 360.0) rel -= 360.0;
      if (rel - 60.0 * $floor(rel / 60.0) < 0.3 || rel - 60.0 * $floor(rel / 60.0) > 59.7) continue;
      exps = int'($floor(rel / 60.0)) + 1;
      amp = real'($urandom_range(200, 14000));
      z   = real'($urandom_range(0, 8000)) - 4000.0;
      a = sample_t'($rtoi(amp * $cos(ang * PI / 180.0) + z));
      b = sample_t'($rtoi(amp * $cos((ang - 120.0) * PI / 180.0) + z));
      c = sample_t'($rtoi(amp * $cos((ang + 120.0) * PI / 180.0) + z));
      #1;
      checks++;
      seen[int'(sector)]++;
      if (int'(sector) != exps) begin
        failures++;
        if (failures < 10) $display("angle %f: got %0d exp %0d", ang, sector, exps);
      end
    end
    a = 16'sd123; b = 16'sd123; c = 16'sd123; #1;
    checks++; if (sector != SEC_NONE) failures++;
    for (int s = 1; s <= 6; s++) begin checks++; if (seen[s] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
