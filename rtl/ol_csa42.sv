// [4:2] carry-save adder of the online multiplier recurrence.
//
// Adds the two selector words A = x[j]*y_{j+4}*2^-3 and B = y[j+1]*x_{j+4}*2^-3 to the shifted
// residual 2w[j] = WS + WC with two rows of full adders:
//   row 1: (A, WS, WC)   -> intermediate sum VS and carry VC
//   row 2: (VS, VC, B)   -> final sum vs and carry vc
// The carry words are shifted one place left, which frees their least significant bit at the
// working precision's ulp (bit LSB). The negation ulps of the two selectors are put there:
// cy (A negated, y_{j+4} = -1) into VC and cx (B negated, x_{j+4} = -1) into vc, in the
// least significant digit slices of the two adder rows.
// Bits below LSB are ignored (truncated working precision); the slices there are constant
// zero. All words are W-bit two's complement in the common frame; the sum wraps modulo 2^W
// (the integer bits that fall off are discarded). Combinational.
module ol_csa42
  import ol_pkg::*;
#(
  parameter int unsigned W   = 18,
  parameter int unsigned LSB = 0
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic [W-1:0] ws_i,
  input  logic [W-1:0] wc_i,
  input  logic         cx_i,   // ulp completing the negation of B (x_{j+4} = -1)
  input  logic         cy_i,   // ulp completing the negation of A (y_{j+4} = -1)
  output logic [W-1:0] vs_o,
  output logic [W-1:0] vc_o
);
  logic [W-1:0] keep, a, b, ws, wc, s1, c1, s2, c2;

  always_comb begin
    keep = '0;
    for (int i = LSB; i < W; i++) keep[i] = 1'b1;
    a  = a_i & keep;
    b  = b_i & keep;
    ws = ws_i & keep;
    wc = wc_i & keep;
    // row 1
    s1 = a ^ ws ^ wc;
    c1 = ((a & ws) | (a & wc) | (ws & wc)) << 1;
    c1[LSB] = cy_i;
    // row 2
    s2 = s1 ^ c1 ^ b;
    c2 = ((s1 & c1) | (s1 & b) | (c1 & b)) << 1;
    c2[LSB] = cx_i;
    vs_o = s2;
    vc_o = c2;
  end
endmodule
