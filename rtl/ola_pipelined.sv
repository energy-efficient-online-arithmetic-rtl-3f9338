// Digit-level pipelined radix-2 online adder.
//
// The serial online adder (two full adders per digit, online delay 2) is unrolled over the
// digit positions: every position i = 0..W-1 has its own module 1 (first full adder) and
// module 2 (second full adder). Module 1 of position i sends its transfer h to module 2 of
// position i-1 and its registered sum to module 2 of position i. Inputs are stair-case timed:
// digit i of an operand pair arrives i cycles after digit 0, so the transfer from position i
// reaches position i-1 exactly when that module 2 works on the same operand pair. A new pair
// can enter every cycle, with no idle cycles between streams.
//
// Result: W+1 signed digits s_o[0..W]; s_o[0] is a new most significant digit, so
// a + b = sum_d s_o[d] * 2^-d where the operands weigh a = sum_i a_i[i] * 2^-(i+1).
// s_o[0] = (h of position 0 twice registered, NOT t of position 0),
// s_o[d] = (w of position d-1, NOT t of position d), s_o[W] = (w of position W-1, 0).
// Timing: if digit 0 of a pair is presented in cycle c (digit i in cycle c+i), result digit
// d is on s_o[d] in cycle c+d+2 (online delay 2 in stair-case form).
module ola_pipelined
  import ol_pkg::*;
#(
  parameter int unsigned W = 8   // operand digits
) (
  input  logic         clk,
  input  logic         rst,
  input  sd_t [W-1:0]  a_i,   // a_i[0] = most significant digit, stair-case timed
  input  sd_t [W-1:0]  b_i,
  output sd_t [W:0]    s_o    // stair-case timed sum, one extra leading digit
);
  logic [W:0]   h;      // h[i]: transfer out of position i (h[W] = 0: no lower position)
  logic [W-1:0] g, ym, zm, zp;
  logic         h0_q1, h0_q2;

  assign h[W] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_pos
    ola_module1 u_m1 (.clk(clk), .rst(rst), .x_i(a_i[i]), .y_i(b_i[i]),
                      .h_o(h[i]), .g_o(g[i]), .ym_o(ym[i]));
    ola_module2 u_m2 (.clk(clk), .rst(rst), .g_i(g[i]), .ym_i(ym[i]), .h_i(h[i+1]),
                      .zm_o(zm[i]), .zp_o(zp[i]));
  end

  // the transfer out of the most significant position becomes the new leading digit
  always_ff @(posedge clk) begin
    if (rst) begin
      h0_q1 <= 1'b0;
      h0_q2 <= 1'b0;
    end else begin
      h0_q1 <= h[0];
      h0_q2 <= h0_q1;
    end
  end

  assign s_o[0] = '{p: h0_q2, m: zm[0]};
  for (genvar d = 1; d < W; d++) begin : g_out
    assign s_o[d] = '{p: zp[d-1], m: zm[d]};
  end
  assign s_o[W] = '{p: zp[W-1], m: 1'b0};
endmodule
