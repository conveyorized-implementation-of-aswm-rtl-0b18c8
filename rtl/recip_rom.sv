// recip_rom: the division table that replaces the nine per-unit weight
// divisions w = 1/(|X - M_w| + delta) of the ASWM weight estimation step.
//
// The dividend is constant and the divisor is the integer part of
// |X - M_w|, at most 255, so the quotient is read from a 256-word table
// with an 8-bit address and a 32-bit word (8 Kbit), as the filter's
// division study proposes. The fractional part of the divisor is dropped.
// Word d holds floor(2**31 / (8*d + 1)), which is 2**28 / (d + delta) with
// delta = 1/8: the scale 2**28 (weight 1.0) and delta are this design's
// choice.
//
// Timing: synchronous read, data is valid one clock after addr (a block
// RAM used as ROM). The contents are computed at elaboration from the
// formula, so no data file is needed.
module recip_rom
  import aswm_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] addr,
  output weight_t    data
);

  weight_t table_q [256];

  for (genvar i = 0; i < 256; i++) begin : g_table
    assign table_q[i] = recip_entry(i);
  end

  always_ff @(posedge clk) data <= table_q[addr];

endmodule
