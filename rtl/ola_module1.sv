// Module 1 of a radix-2 online adder digit (first full-adder level).
//
// For operand digits x = x+ - x- and y = y+ - y- of the same position i, one full adder adds
// x+, NOT x- and y+:  x+ + (1 - x-) + y+ = 2*h + g.  The transfer h (weight of position i-1)
// leaves combinationally towards the module 2 of the next more significant position; the
// position sum g and the still unused y- are registered for this position's module 2, which
// uses them one clock later, when the next less significant digits (and their transfer) arrive.
// Registers reset to zero (synchronous, active high).
module ola_module1
  import ol_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  sd_t  x_i,
  input  sd_t  y_i,
  output logic h_o,    // transfer to position i-1 (combinational)
  output logic g_o,    // registered sum g_i
  output logic ym_o    // registered y-_i
);
  logic a, b, c;
  assign a = x_i.p;
  assign b = ~x_i.m;
  assign c = y_i.p;
  assign h_o = (a & b) | (a & c) | (b & c);

  always_ff @(posedge clk) begin
    if (rst) begin
      g_o  <= 1'b0;
      ym_o <= 1'b0;
    end else begin
      g_o  <= a ^ b ^ c;
      ym_o <= y_i.m;
    end
  end
endmodule
