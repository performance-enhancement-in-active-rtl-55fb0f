// sine_rom: quarter-wave sine table held in on-chip RAM (ROM use).
//
// Holds one quarter of a sine period, 0 .. pi/2, as unsigned magnitudes;
// the rest of the period is rebuilt outside by mirroring the address and
// negating the result (pll_addr_gen, pll_postproc). Entry k holds
//   round((2^DW - 1) * sin((k + 0.5) * pi / 2^(AW+1)))
// computed at elaboration by a constant function. The half-step offset
// makes the table exactly symmetric, so the mirrored address ~k of the
// second quadrant needs no correction term. The quarter-wave table
// follows the original design; its size, the half-step offset and the
// read latency are this design's choices.
//
// Interface: addr is registered; data appears one clock after addr
// (synchronous read, maps to block RAM).
module sine_rom #(
  parameter int unsigned AW = apf_pkg::LUT_AW,
  parameter int unsigned DW = apf_pkg::LUT_DW
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  typedef logic [DW-1:0] table_t [2**AW];

  function automatic table_t gen_table();
    table_t t;
    real    pi, amp;
    pi  = 3.14159265358979323846;
    amp = real'((64'd1 << DW) - 64'd1);
    for (int k = 0; k < 2**AW; k++)
      t[k] = DW'($rtoi(amp * $sin((real'(k) + 0.5) * pi / real'(2 ** (AW + 1))) + 0.5));
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  always_ff @(posedge clk) data <= TABLE[addr];

endmodule
