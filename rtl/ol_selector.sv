// Selector: multiplication of a two's complement word by a radix-2 signed digit.
//
// Implements the per-bit 4-input selection of the online multiplier: for digit 1 the word
// passes, for digit -1 its bitwise complement passes and the negation ulp (cx or cy) is raised
// so that a later adder can complete the two's complement negation, for digit 0 the output is
// zero. The multiplier feeds it words that are already scaled by 2^-3 and truncated, so the
// ulp weighs one unit of the truncated word. Combinational; W-bit words.
module ol_selector
  import ol_pkg::*;
#(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0] a_i,    // x[j] or y[j+1] (scaled)
  input  sd_t          d_i,    // y_{j+4} or x_{j+4}
  output logic [W-1:0] sel_o,  // a, ~a or 0
  output logic         neg_o   // 1 when the digit is -1: add one ulp
);
  always_comb begin
    unique case ({d_i.p, d_i.m})
      2'b10:   sel_o = a_i;
      2'b01:   sel_o = ~a_i;
      default: sel_o = '0;
    endcase
    neg_o = d_i.m & ~d_i.p;
  end
endmodule
