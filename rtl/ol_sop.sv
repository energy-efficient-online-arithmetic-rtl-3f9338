// Pipelined online sum-of-products (SoP) unit.
//
// Computes S = (x_0*y_0 + x_1*y_1 + ... + x_{NUM-1}*y_{NUM-1}) / NUM for NUM pairs of N-digit
// radix-2 signed-digit fractions, one new set of NUM pairs per clock. NUM pipelined online
// multipliers (reduced working precision P) feed a tree of pipelined online adders. All of it
// works most significant digit first, so the clock period is that of one digit slice whatever
// N and NUM are, and the leading digits of S exist long before its last digit: a following
// online unit could start on them at once.
//
// Interface: x_i/y_i carry the NUM operand pairs, all digits in parallel (digit [k][0] is the
// most significant), qualified by in_valid_i. Two views of the result, of WS = N + log2(NUM)
// digits (weight of digit d: 2^-(d+1)):
//   stair_o   MSD-first stair-case stream: digit d of the set presented in cycle c is on
//             stair_o[d] in cycle c + 4 + 2*log2(NUM) + d; stair_valid_o marks digit 0.
//   sum_o     the same digits re-aligned into one parallel word in cycle
//             c + 4 + 2*log2(NUM) + WS - 1, marked by sum_valid_o.
// The parallel re-alignment and the valid flags are additions for using the unit from
// conventional logic; the arithmetic path is multipliers plus adder tree only.
// Reset: synchronous, active high; outputs are meaningful for sets entered after reset.
module ol_sop
  import ol_pkg::*;
#(
  parameter int unsigned NUM = 16,                     // number of products (power of two)
  parameter int unsigned N   = 8,                      // operand digits
  parameter int unsigned P   = reduced_precision(N),   // multiplier working precision
  localparam int unsigned WS = N + $clog2(NUM)         // result digits
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid_i,
  input  sd_t [NUM-1:0][N-1:0]  x_i,
  input  sd_t [NUM-1:0][N-1:0]  y_i,
  output sd_t [WS-1:0]          stair_o,
  output logic                  stair_valid_o,
  output sd_t [WS-1:0]          sum_o,
  output logic                  sum_valid_o
);
  localparam int unsigned LAT_MSD = sop_msd_latency(NUM);
  localparam int unsigned LAT_PAR = LAT_MSD + WS - 1;

  sd_t [NUM-1:0][N-1:0] prod;

  for (genvar k = 0; k < NUM; k++) begin : g_mul
    olm_pipelined #(.N(N), .P(P)) u_mul (
      .clk(clk), .rst(rst), .x_i(x_i[k]), .y_i(y_i[k]), .z_o(prod[k]));
  end

  ola_tree #(.NUM(NUM), .W(N)) u_tree (.clk(clk), .rst(rst), .op_i(prod), .sum_o(stair_o));

  ol_staircase #(.NDIG(WS), .REVERSE(1'b1)) u_deskew (
    .clk(clk), .rst(rst), .d_i(stair_o), .d_o(sum_o));

  logic [LAT_PAR:1] vpipe;
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[LAT_PAR-1:1], in_valid_i};
  end
  assign stair_valid_o = vpipe[LAT_MSD];
  assign sum_valid_o   = vpipe[LAT_PAR];
endmodule
