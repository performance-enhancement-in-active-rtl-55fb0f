// switching_table: optimal switching-state table of the directed current
// controller.
//
// Gives the next inverter switching state {Sa,Sb,Sc} from the sector of the
// error current, the previous state and the active loop. Outer loop: the
// active vector pointing along the sector centre, so the error is driven
// back as fast as possible. Inner loop: chosen from sector and previous
// state so the voltage across the ac inductor, and with it the switching
// rate, stays low. Contents as in the original design's table; rows are 60-degree
// rotations of each other. Vectors: 4=100 (0 deg), 6=110 (60), 2=010 (120),
// 3=011 (180), 1=001 (240), 5=101 (300), 0/7 zero. Combinational.
module switching_table
  import apf_pkg::*;
(
  input  sector_t sector,
  input  sw_vec_t prev,
  input  logic    outer,
  output sw_vec_t next
);

  // Inner-loop rows, indexed by the previous state 0..7.
  function automatic sw_vec_t inner_lookup(sector_t s, sw_vec_t p);
    logic [2:0] row [8];
    case (s)
      SEC_I:   row = '{3'd4, 3'd5, 3'd6, 3'd7, 3'd4, 3'd4, 3'd4, 3'd4};
      SEC_II:  row = '{3'd6, 3'd0, 3'd6, 3'd2, 3'd6, 3'd4, 3'd6, 3'd6};
      SEC_III: row = '{3'd2, 3'd3, 3'd2, 3'd2, 3'd6, 3'd7, 3'd2, 3'd2};
      SEC_IV:  row = '{3'd3, 3'd3, 3'd3, 3'd3, 3'd0, 3'd1, 3'd2, 3'd3};
      SEC_V:   row = '{3'd1, 3'd1, 3'd3, 3'd1, 3'd5, 3'd1, 3'd7, 3'd1};
      SEC_VI:  row = '{3'd5, 3'd5, 3'd0, 3'd1, 3'd5, 3'd5, 3'd4, 3'd5};
      default: row = '{3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd7};
    endcase
    return row[p];
  endfunction

  always_comb begin
    if (outer) begin
      case (sector)
        SEC_I:   next = 3'd4;
        SEC_II:  next = 3'd6;
        SEC_III: next = 3'd2;
        SEC_IV:  next = 3'd3;
        SEC_V:   next = 3'd1;
        SEC_VI:  next = 3'd5;
        default: next = prev;
      endcase
    end else begin
      next = inner_lookup(sector, prev);
    end
  end

endmodule
