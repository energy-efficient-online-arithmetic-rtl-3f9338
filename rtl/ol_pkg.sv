// Shared types and sizing rules of the radix-2 online (most-significant-digit-first)
// arithmetic units.
//
// Signed digits: every digit is a radix-2 signed digit in {-1, 0, 1}, carried on two wires,
// value = p - m (digit "1" is p=1,m=0, "-1" is p=0,m=1, "0" is 00; "11" also reads as 0).
//
// Fixed-point frame of the multiplier: every two's complement word (the converted operands
// x[j], y[j], the residual words WS/WC and the adder outputs VS/VC) uses the same frame of
// N+2 bits, two integer bits and N fractional bits. Bit N+1 weighs -2, bit N weighs 1 and the
// fractional digit position i (weight 2^-i) sits at bit N-i.
//
// Working precision: stage j of the unfolded multiplier keeps only the frac_bits(j) most
// significant fractional bits; the rest of the frame is held at zero, so those digit slices
// and register bits are constants that synthesis removes. The rule (see frac_bits) grows the
// precision by one bit per stage while operand digits arrive, truncates it to p = ceil((2n+5)/3)
// bits one stage after step p-delta, drops three slices in the stage after that and one per
// stage from then on.
package ol_pkg;

  typedef struct packed {
    logic p;  // positive half of the digit
    logic m;  // negative half of the digit
  } sd_t;

  localparam int unsigned MUL_DELAY = 3;  // online delay of the multiplier (delta)
  localparam int unsigned ADD_DELAY = 2;  // online delay of the adder

  // Reduced maximum working precision p = ceil((2n + delta + t) / 3), delta = 3, t = 2.
  function automatic int unsigned reduced_precision(int unsigned n);
    return (2 * n + MUL_DELAY + 2 + 2) / 3;
  endfunction

  // Number of fractional bits of v[j] kept in iteration j (j = -3 .. n-1).
  function automatic int frac_bits(int j, int n, int p);
    int f;
    f = 4;  // j = -3: x[-3]*y_1 = 0, y[-2]*x_1*2^-3 has 4 fractional bits
    for (int i = -2; i <= j; i++) begin
      if (i <= p - int'(MUL_DELAY)) f = (i + 7 < n) ? i + 7 : n;
      else if (i == p - int'(MUL_DELAY) + 1) f = (p < f) ? p : f;
      else if (i == p - int'(MUL_DELAY) + 2) f = f - 3;
      else f = f - 1;
    end
    return f;
  endfunction

  // Cycles from a parallel operand set to the first result digit of a sum-of-products unit:
  // multiplier online delay plus its output register, then ADD_DELAY per adder tree level.
  function automatic int unsigned sop_msd_latency(int unsigned num);
    return MUL_DELAY + 1 + ADD_DELAY * $clog2(num);
  endfunction

  function automatic int sd_value(sd_t d);
    return int'(d.p) - int'(d.m);
  endfunction

endpackage
