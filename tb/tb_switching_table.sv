// tb_switching_table: checks every entry of the switching table against an
// independent model: sector I's row (4 5 6 7 4 4 4 4 for previous states
// 0..7, outer vector 4) rotated by 60 degrees per sector. Rotating a
// switching state by 60 degrees is r({Sa,Sb,Sc}) = ~{Sb,Sc,Sa}.
module tb_switching_table;
  import apf_pkg::*;
  sector_t sector;
  sw_vec_t prev, next;
  logic outer;
  int checks = 0, failures = 0;

  switching_table dut (.sector, .prev, .outer, .next);

  function automatic sw_vec_t rot(sw_vec_t v, int k);
    sw_vec_t x = v;
    for (int i = 0; i < k; i++) x = ~{x[1], x[0], x[2]};
    return x;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw_vec_t row_i [8] = '{3'd4, 3'd5, 3'd6, 3'd7, 3'd4, 3'd4, 3'd4, 3'd4};
    sw_vec_t expv;
    // rotation sanity: 100 -> 110 -> 010 -> 011 -> 001 -> 101 -> 100
    checks++;
    if (rot(3'd4, 1) != 3'd6 || rot(3'd4, 2) != 3'd2 || rot(3'd4, 3) != 3'd3 ||
        rot(3'd4, 4) != 3'd1 || rot(3'd4, 5) != 3'd5 || rot(3'd4, 6) != 3'd4) failures++;
    for (int s = 1; s <= 6; s++) begin
      for (int p = 0; p < 8; p++) begin
        for (int o = 0; o < 2; o++) begin
          sector = sector_t'(s); prev = sw_vec_t'(p); outer = o[0];
          #1;
          if (o) expv = rot(3'd4, s - 1);
          else   expv = rot(row_i[rot(sw_vec_t'(p), 6 - (s - 1))], s - 1);
          checks++;
          if (next != expv) begin
            failures++;
            $display("sector %0d prev %0d outer %0d: got %0d exp %0d", s, p, o, next, expv);
          end
        end
      end
    end
    // source text: previous V6 (state 101) in sector VI, inner loop -> check a few printed values
    sector = SEC_II; prev = 3'd3; outer = 1'b0; #1; checks++; if (next != 3'd2) failures++;
    sector = SEC_V;  prev = 3'd6; outer = 1'b0; #1; checks++; if (next != 3'd7) failures++;
    // no sector: state kept
    sector = SEC_NONE; prev = 3'd5; outer = 1'b1; #1; checks++; if (next != 3'd5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
