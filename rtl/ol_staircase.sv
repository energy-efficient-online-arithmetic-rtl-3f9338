// Stair-case shifter array for digit vectors.
//
// Skews a parallel vector of signed digits so that a digit pipeline sees digit k exactly k
// cycles after digit 0: digit k (index 0 = most significant) passes through a k-stage shift
// register. With REVERSE = 1 the delays are mirrored (digit k is delayed NDIG-1-k cycles),
// which undoes the skew of a stair-case stream and re-assembles a parallel word.
// Digit 0 of the forward array (and digit NDIG-1 of the reversed one) is combinational.
// Registers reset to zero digits (synchronous, active high).
module ol_staircase
  import ol_pkg::*;
#(
  parameter int unsigned NDIG    = 16,
  parameter bit          REVERSE = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  sd_t [NDIG-1:0]   d_i,
  output sd_t [NDIG-1:0]   d_o
);
  for (genvar k = 0; k < NDIG; k++) begin : g_digit
    localparam int unsigned DEPTH = REVERSE ? NDIG - 1 - k : k;
    if (DEPTH == 0) begin : g_wire
      assign d_o[k] = d_i[k];
    end else begin : g_shift
      sd_t sr [DEPTH];
      always_ff @(posedge clk) begin
        if (rst) begin
          for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
        end else begin
          sr[0] <= d_i[k];
          for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
        end
      end
      assign d_o[k] = sr[DEPTH-1];
    end
  end
endmodule
