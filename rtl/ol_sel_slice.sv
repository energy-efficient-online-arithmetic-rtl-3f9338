// SEL digit slice of the online multiplier: V block, SELM and M block.
//
// V block: a 4-bit carry-propagate adder over the two integer bits and the two most
//   significant fractional bits (positions -1, 0, 1, 2) of the carry-save pair vs/vc, giving
//   the residual estimate v^ = v_-1 v_0 . v_1 v_2. Carries from the bits below are not
//   propagated; those bits stay in carry-save form, so v = v^ + (rest) holds exactly.
// SELM: output digit from the three bits v_-1 v_0 . v_1 (t = 2, v_2 unused):
//   v^ >= 1/2 -> z = 1,  -1/2 <= v^ <= 1/4 -> z = 0,  v^ <= -3/4 -> z = -1.
// M block: w = v^ - z. Adding or subtracting 1 only flips v_0 once v_-1 is dropped:
//   v_0* = v_0 XOR |z|; the residual keeps v_0* v_1 . v_2 (one integer bit).
// In the last delta stages the same slice is fed the shifted residual (WS, WC) directly.
// Combinational.
module ol_sel_slice
  import ol_pkg::*;
(
  input  logic [3:0] vs_top_i,  // vs_-1 vs_0 vs_1 vs_2
  input  logic [3:0] vc_top_i,  // vc_-1 vc_0 vc_1 vc_2
  output sd_t        z_o,       // output digit z_{j+1}
  output logic [2:0] w_top_o,   // v_0* v_1 v_2: top bits of the new residual w[j+1]
  output logic [3:0] vhat_o     // residual estimate v^ (observation only)
);
  logic [3:0] vhat;
  logic       vm1, v0, v1, v2;

  always_comb begin
    vhat = vs_top_i + vc_top_i;          // V block (CPA), wraps modulo 4
    {vm1, v0, v1, v2} = vhat;
    // SELM, the selection rule above
    z_o.p = ~vm1 & (v0 | v1);
    z_o.m =  vm1 & ~(v0 & v1);
    // M block
    w_top_o = {v0 ^ (z_o.p | z_o.m), v1, v2};
    vhat_o  = vhat;
  end
endmodule
