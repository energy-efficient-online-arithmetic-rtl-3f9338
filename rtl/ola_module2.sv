// Module 2 of a radix-2 online adder digit (second full-adder level).
//
// Adds the registered sum g_i, NOT y-_i and the transfer h_{i+1} arriving from module 1 of the
// next less significant position:  g + (1 - y-) + h = 2*t + w.
// Summed over all positions this gives the result digit of position i as (w_i, NOT t_{i+1}):
// the positive half is this module's w, the negative half is the complemented carry of the
// module one position lower. t leaves through one register (zm_o = NOT t_i, negative half of
// result digit i-1 in the next-higher position); w passes two registers (zp_o, positive half
// of result digit i) so that both halves of a result digit come out in the same clock.
// Registers reset to zero (synchronous, active high).
module ola_module2
  import ol_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic g_i,    // from module 1 of this position (registered there)
  input  logic ym_i,   // y- of this position (registered in module 1)
  input  logic h_i,    // transfer from module 1 of the next less significant position
  output logic zm_o,   // NOT t, registered once
  output logic zp_o    // w, registered twice
);
  logic a, b, c, t, w, w_q;
  assign a = g_i;
  assign b = ~ym_i;
  assign c = h_i;
  assign t = (a & b) | (a & c) | (b & c);
  assign w = a ^ b ^ c;

  always_ff @(posedge clk) begin
    if (rst) begin
      zm_o <= 1'b0;
      w_q  <= 1'b0;
      zp_o <= 1'b0;
    end else begin
      zm_o <= ~t;
      w_q  <= w;
      zp_o <= w_q;
    end
  end
endmodule
