// Adder tree of pipelined online adders.
//
// Sums NUM stair-case timed signed-digit operands with log2(NUM) levels of ola_pipelined.
// Every adder level adds one leading digit, and its result is passed on as a fraction again,
// so each level halves the scale: the tree output is (sum of the operands) / NUM, with
// W + log2(NUM) digits, sum_o[0] weighing 2^-1. No carry ever propagates across a word, so
// the clock period does not depend on W or NUM.
// Timing: digit i of every operand in cycle c + i (stair-case) gives output digit d in cycle
// c + d + 2*log2(NUM). A new set of operands can enter every cycle.
// NUM must be a power of two (2 or more).
module ola_tree
  import ol_pkg::*;
#(
  parameter int unsigned NUM = 16,   // number of operands
  parameter int unsigned W   = 8     // operand digits
) (
  input  logic                     clk,
  input  logic                     rst,
  input  sd_t [NUM-1:0][W-1:0]     op_i,
  output sd_t [W+$clog2(NUM)-1:0]  sum_o
);
  localparam int unsigned L  = $clog2(NUM);
  localparam int unsigned WL = W + L;

  initial assert (NUM >= 2 && (1 << L) == NUM) else $error("ola_tree: NUM must be a power of two");

  // lvl[l][k]: operand k entering level l (digits above W+l-1 unused)
  sd_t [WL-1:0] lvl [L+1][NUM];

  for (genvar k = 0; k < NUM; k++) begin : g_leaf
    assign lvl[0][k] = {{L{2'b00}}, op_i[k]};
  end

  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int unsigned WI = W + l;
    for (genvar k = 0; k < (NUM >> (l + 1)); k++) begin : g_add
      sd_t [WI:0] s;
      ola_pipelined #(.W(WI)) u_add (.clk(clk), .rst(rst),
        .a_i(lvl[l][2*k][WI-1:0]), .b_i(lvl[l][2*k+1][WI-1:0]), .s_o(s));
      if (WI + 1 < WL) begin : g_pad
        assign lvl[l+1][k] = {{(WL-WI-1){2'b00}}, s};
      end else begin : g_full
        assign lvl[l+1][k] = s;
      end
    end
    for (genvar k = (NUM >> (l + 1)); k < NUM; k++) begin : g_unused
      assign lvl[l+1][k] = '0;
    end
  end

  assign sum_o = lvl[L][0];
endmodule
