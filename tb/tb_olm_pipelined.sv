// Self-checking testbench of olm_pipelined at its default size (N = 16, P = 13).
// A new operand pair enters every clock (no gaps). The first pair is the worked example
// x = 0.66644287109375, y = -0.3156280517578125, whose 16-digit online product must be
// exactly -0.2103424072265625 with the digits 0 -1 0 1 -1 0 1 0 0 1 -1 0 1 0 -1 1 of the
// well-known step-by-step example (reduced precision p = 13); the other pairs are random.
// For every pair the testbench collects product digit k exactly k + 3 clock edges after the
// edge that took the operands in (the stair-case latency), and checks
//   |x*y - z[1..k]| < 2^-k for every prefix k (the online error bound), and k = 16 at the end.
// It also checks that no digit is coded "11".
module tb_olm_pipelined;
  import ol_pkg::*;
  localparam int N  = 16;
  localparam int NT = 400;   // operand pairs

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  sd_t [N-1:0] x, y, z;
  sd_t [N-1:0] xs [NT], ys [NT], zs [NT];

  olm_pipelined u_dut (.clk(clk), .rst(rst), .x_i(x), .y_i(y), .z_o(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sd_t dig(int v);
    return (v > 0) ? '{p: 1'b1, m: 1'b0} : (v < 0) ? '{p: 1'b0, m: 1'b1} : '{p: 1'b0, m: 1'b0};
  endfunction

  // value of the leading k digits of an N-digit vector, in units of 2^-N
  function automatic longint val(sd_t [N-1:0] v, int k);
    longint r = 0;
    for (int i = 0; i < k; i++) r += longint'(sd_value(v[i])) <<< (N - 1 - i);
    return r;
  endfunction

  int ex_x [N] = '{1, 1, 0, -1, 0, -1, -1, 0, 1, 1, -1, 0, -1, 1, 0, 0};
  int ex_y [N] = '{-1, 1, -1, 1, 0, 0, -1, 1, 0, 1, -1, 1, 1, -1, 0, -1};
  int ex_z [N] = '{0, -1, 0, 1, -1, 0, 1, 0, 0, 1, -1, 0, 1, 0, -1, 1};

  initial begin
    int e;
    for (int i = 0; i < N; i++) begin
      xs[0][i] = dig(ex_x[i]);
      ys[0][i] = dig(ex_y[i]);
    end
    for (int t = 1; t < NT; t++)
      for (int i = 0; i < N; i++) begin
        xs[t][i] = dig($urandom_range(0, 2) - 1);
        ys[t][i] = dig($urandom_range(0, 2) - 1);
      end
    x = '0; y = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (e = 0; e < NT + N + 4; e++) begin
      x = (e < NT) ? xs[e] : '0;
      y = (e < NT) ? ys[e] : '0;
      @(posedge clk);
      #1;
      // after edge e, digit k of pair e-k-3 is on z[k]
      for (int k = 0; k < N; k++) begin
        int t;
        t = e - k - 3;
        if (t >= 0 && t < NT) zs[t][k] = z[k];
      end
      @(negedge clk);
    end
    for (int t = 0; t < NT; t++) begin
      longint prod, err;
      prod = val(xs[t], N) * val(ys[t], N);          // units 2^-2N
      for (int k = 1; k <= N; k++) begin
        err = prod - (val(zs[t], k) <<< N);
        if (err < 0) err = -err;
        checks++;
        if (err >= (longint'(1) <<< (2 * N - k))) begin
          failures++;
          if (failures < 10) $display("pair %0d prefix %0d out of bound", t, k);
        end
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (zs[t][k].p && zs[t][k].m) failures++;
      end
    end
    // the worked example
    checks++;
    if (val(zs[0], N) != -13785) begin
      failures++;
      $display("example product %0d, expected -13785", val(zs[0], N));
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (sd_value(zs[0][k]) != ex_z[k]) begin
        failures++;
        $display("example digit %0d = %0d, expected %0d", k + 1, sd_value(zs[0][k]), ex_z[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
