// Radix-2 pipelined online multiplier with reduced working precision.
//
// The online multiplication recurrence (online delay 3) is unfolded into N+3 stages, one per
// iteration j = -3 .. N-1, each a register stage (olm_stage). A new operand pair can enter every
// clock, so N+3 products are in flight at once. Stage j consumes operand digit j+4, so the
// parallel inputs pass through a stair-case shifter that delays digit k (index 0 = MSD) by k
// cycles. Stage j >= 0 emits product digit z_{j+1}; the output is therefore a stair-case too:
// for an operand pair presented (parallel, all digits) in cycle c, product digit z_o[k]
// (k = 0 .. N-1, weight 2^-(k+1)) is valid in cycle c + k + 4, i.e. the
// most significant digit 4 cycles later and one further digit every cycle; z_o[k] is held for one
// cycle. The error of the N-digit product is below 2^-N for N >= 8.
// Working precision per stage follows ol_pkg::frac_bits with p = P.
// Operands are N-digit signed-digit fractions in (-1, 1); digits "11" read as 0.
module olm_pipelined
  import ol_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = reduced_precision(N)
) (
  input  logic           clk,
  input  logic           rst,
  input  sd_t [N-1:0]    x_i,   // multiplicand, x_i[0] = x_1 (MSD)
  input  sd_t [N-1:0]    y_i,   // multiplier
  output sd_t [N-1:0]    z_o    // product, stair-case timed, z_o[0] = z_1
);
  localparam int unsigned W = N + 2;
  localparam int unsigned S = N + MUL_DELAY;  // number of stages

  initial assert (N >= 8 && P <= N) else $error("olm_pipelined: needs N >= 8 and P <= N");

  sd_t [N-1:0] xd, yd;
  ol_staircase #(.NDIG(N)) u_skew_x (.clk(clk), .rst(rst), .d_i(x_i), .d_o(xd));
  ol_staircase #(.NDIG(N)) u_skew_y (.clk(clk), .rst(rst), .d_i(y_i), .d_o(yd));

  // links between stages: index s carries the state entering stage s (j = s-3)
  logic [W-1:0] xq [S+1], xqm [S+1], yq [S+1], yqm [S+1], ws [S+1], wc [S+1];
  sd_t          zs [S];

  assign xq[0]  = '0;
  assign yq[0]  = '0;
  assign xqm[0] = {2'b11, {N{1'b0}}};   // QM = -1 before the first digit
  assign yqm[0] = {2'b11, {N{1'b0}}};
  assign ws[0]  = '0;
  assign wc[0]  = '0;

  for (genvar s = 0; s < S; s++) begin : g_stage
    localparam int J = s - int'(MUL_DELAY);
    sd_t xdig, ydig;
    assign xdig = (J + 4 <= int'(N)) ? xd[(J + 4 <= int'(N)) ? J + 3 : 0] : '0;
    assign ydig = (J + 4 <= int'(N)) ? yd[(J + 4 <= int'(N)) ? J + 3 : 0] : '0;
    olm_stage #(.N(N), .P(P), .J(J)) u_stage (
      .clk(clk), .rst(rst), .x_i(xdig), .y_i(ydig),
      .xq_i(xq[s]), .xqm_i(xqm[s]), .yq_i(yq[s]), .yqm_i(yqm[s]), .ws_i(ws[s]), .wc_i(wc[s]),
      .xq_o(xq[s+1]), .xqm_o(xqm[s+1]), .yq_o(yq[s+1]), .yqm_o(yqm[s+1]),
      .ws_o(ws[s+1]), .wc_o(wc[s+1]), .z_o(zs[s]));
    if (J >= 0) begin : g_out
      assign z_o[J] = zs[s];
    end
  end
endmodule
