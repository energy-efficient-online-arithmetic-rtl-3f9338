// Self-checking testbench of olm_pipelined at the other operand sizes of the multiplier
// comparison: n = 8, 24 and 32 digits (the 16-digit case has its own testbench), each at its
// reduced working precision p = ceil((2n+5)/3), i.e. 7, 18 and 23.
// For each size a stream of random operand pairs enters back to back, one per clock. Product
// digit k (0-based) of a pair is read k + 3 clock edges after the edge that took the pair in,
// and every prefix of k digits must lie within 2^-k of the exact product x*y (the online
// error bound); the full n-digit product is therefore within 2^-n. Digits coded "11" fail.
// Values are kept as 128-bit integers in units of 2^-2n so the 32-digit case is exact.
module tb_olm_sizes;
  import ol_pkg::*;
  localparam int NS = 3;
  localparam int SIZES [NS] = '{8, 24, 32};
  localparam int NT = 300;   // operand pairs per size

  int checks = 0, failures = 0;
  int done = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sd_t dig(int v);
    return (v > 0) ? '{p: 1'b1, m: 1'b0} : (v < 0) ? '{p: 1'b0, m: 1'b1} : '{p: 1'b0, m: 1'b0};
  endfunction

  for (genvar s = 0; s < NS; s++) begin : g_size
    localparam int N = SIZES[s];
    sd_t [N-1:0] x, y, z;
    sd_t [N-1:0] xs [NT], ys [NT], zs [NT];

    olm_pipelined #(.N(N)) u_dut (.clk(clk), .rst(rst), .x_i(x), .y_i(y), .z_o(z));

    // value of the leading k digits, in units of 2^-N
    function automatic logic signed [127:0] val(sd_t [N-1:0] v, int k);
      logic signed [127:0] r = 0;
      for (int i = 0; i < k; i++) r += 128'(sd_value(v[i])) <<< (N - 1 - i);
      return r;
    endfunction

    initial begin
      for (int t = 0; t < NT; t++)
        for (int i = 0; i < N; i++) begin
          // every 40th pair is all ones times all minus-ones (largest magnitude)
          xs[t][i] = (t % 40 == 5) ? dig(1)  : dig($urandom_range(0, 2) - 1);
          ys[t][i] = (t % 40 == 5) ? dig(-1) : dig($urandom_range(0, 2) - 1);
        end
      x = '0; y = '0;
      repeat (3) @(posedge clk);
      @(negedge clk);
      for (int e = 0; e < NT + N + 4; e++) begin
        x = (e < NT) ? xs[e] : '0;
        y = (e < NT) ? ys[e] : '0;
        @(posedge clk);
        #1;
        for (int k = 0; k < N; k++)
          if (e - k - 3 >= 0 && e - k - 3 < NT) zs[e-k-3][k] = z[k];
        @(negedge clk);
      end
      for (int t = 0; t < NT; t++) begin
        logic signed [127:0] prod, err;
        prod = val(xs[t], N) * val(ys[t], N);
        for (int k = 1; k <= N; k++) begin
          err = prod - (val(zs[t], k) <<< N);
          if (err < 0) err = -err;
          checks++;
          if (err >= (128'sd1 <<< (2 * N - k))) begin
            failures++;
            if (failures < 10) $display("n=%0d pair %0d: prefix %0d out of bound", N, t, k);
          end
        end
        for (int k = 0; k < N; k++) begin
          checks++;
          if (zs[t][k].p && zs[t][k].m) failures++;
        end
      end
      $display("n=%0d (p=%0d): %0d products checked", N, reduced_precision(N), NT);
      done++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    wait (done == NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
