// qam16_mapper -- QAM-16 symbol to I/Q amplitude levels.
//
// A 4-bit symbol is split into two 2-bit halves, bits [3:2] for the in-phase
// and bits [1:0] for the quadrature branch. Each half selects one of the four
// levels -3, -1, +1, +3 with Gray coding (00 -> -3, 01 -> -1, 11 -> +1,
// 10 -> +3), so neighbouring constellation points differ in one bit. The
// modulation (QAM-16, 4 bits per symbol, 12 Mbit/s at 3 Mbaud) follows the
// design example; the bit-to-level assignment is a choice of this
// implementation.
//
// Purely combinational: the pulse shapers sample the levels on the symbol
// enable.
module qam16_mapper
  import upconv_pkg::*;
(
  input  logic [3:0]              sym,
  output logic signed [LVL_W-1:0] i_lvl,
  output logic signed [LVL_W-1:0] q_lvl
);
  function automatic logic signed [LVL_W-1:0] gray_level(input logic [1:0] b);
    case (b)
      2'b00:   return -3;
      2'b01:   return -1;
      2'b11:   return  1;
      default: return  3;
    endcase
  endfunction

  always_comb begin
    i_lvl = gray_level(sym[3:2]);
    q_lvl = gray_level(sym[1:0]);
  end
endmodule
