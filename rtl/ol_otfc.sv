// On-the-fly conversion / append (OTFC) digit slice.
//
// Converts a most-significant-digit-first stream of radix-2 signed digits into two's complement
// without carry propagation. Two words are kept: Q = value of the digits received so far and
// QM = Q - ulp. Appending digit q at bit position BIT (one bit below the previous ulp):
//   q =  1 : Q' = Q  | 1,  QM' = Q  | 0
//   q =  0 : Q' = Q  | 0,  QM' = QM | 1
//   q = -1 : Q' = QM | 1,  QM' = QM | 0
// so each new word is a 2:1 selection between Q and QM plus one appended bit: Q takes
// (q+ OR q-), QM takes (NOT q+ AND NOT q-). Starting from Q = 0 and QM = -1 (integer bits "11")
// the integer bits settle to "00" or "11" with the sign of the first nonzero digit.
//
// This is the combinational append only; in the unfolded multiplier the Q/QM registers are the
// pipeline registers of the stages (CA-Reg). Interface: W-bit words, BIT selects the bit that
// receives the new digit; all bits below BIT must be zero in q_i and qm_i. No timing of its own.
module ol_otfc
  import ol_pkg::*;
#(
  parameter int unsigned W   = 18,
  parameter int unsigned BIT = 15
) (
  input  logic [W-1:0] q_i,   // Q[j]
  input  logic [W-1:0] qm_i,  // QM[j] = Q[j] - ulp
  input  sd_t          d_i,   // appended digit q_{j+1}
  output logic [W-1:0] q_o,   // Q[j+1]
  output logic [W-1:0] qm_o   // QM[j+1]
);
  logic nz;
  assign nz = d_i.p ^ d_i.m;  // digit is nonzero ("11" counts as zero)

  always_comb begin
    // 2:1 selections of the converter
    q_o  = (d_i.m && !d_i.p) ? qm_i : q_i;
    qm_o = (d_i.p && !d_i.m) ? q_i  : qm_i;
    // appended least-significant digit
    q_o[BIT]  = nz;
    qm_o[BIT] = !nz;
  end
endmodule
