// End-to-end testbench of ol_sop at its default parameters (16 products of 8-digit operands).
//
// Sets of 16 operand pairs enter in bursts of back-to-back cycles separated by idle cycles.
// For every set the testbench checks
//   - the parallel result arrives exactly 4 + 2*log2(16) + 12 - 1 = 23 cycles after the set,
//     flagged by sum_valid_o, and the MSD-first stream starts 12 cycles after the set,
//     flagged by stair_valid_o, with every digit d on stair_o[d] d cycles later,
//   - the stream digits equal the parallel result digits,
//   - |S - sum(x*y)/16| < 2^-8 (each online product is within 2^-8, the adder tree is exact).
// Mechanisms counted (each must occur): back-to-back sets, idle cycles between sets, sets
// with negative operand digits (selector negation path), sets of extreme magnitude, result
// digits of each value -1, 0 and 1, and results whose leading digit was out before the last
// digit had been computed (MSD-first early availability).
module tb_ol_sop;
  import ol_pkg::*;
  localparam int NUM = 16;
  localparam int N   = 8;
  localparam int L   = 4;
  localparam int WS  = N + L;
  localparam int LAT_MSD = 4 + 2 * L;
  localparam int LAT_PAR = LAT_MSD + WS - 1;
  localparam int NC  = 1200;   // cycles of stimulus

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                 in_valid;
  sd_t [NUM-1:0][N-1:0] x, y;
  sd_t [WS-1:0]         stair, sum;
  logic                 stair_valid, sum_valid;

  ol_sop u_dut (
    .clk(clk), .rst(rst), .in_valid_i(in_valid), .x_i(x), .y_i(y),
    .stair_o(stair), .stair_valid_o(stair_valid), .sum_o(sum), .sum_valid_o(sum_valid));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sd_t dig(int v);
    return (v > 0) ? '{p: 1'b1, m: 1'b0} : (v < 0) ? '{p: 1'b0, m: 1'b1} : '{p: 1'b0, m: 1'b0};
  endfunction

  function automatic longint vec_val(sd_t [N-1:0] v);
    longint r = 0;
    for (int i = 0; i < N; i++) r += longint'(sd_value(v[i])) <<< (N - 1 - i);
    return r;
  endfunction

  // stimulus per cycle
  logic                 vld [NC];
  sd_t [NUM-1:0][N-1:0] xs [NC], ys [NC];
  sd_t [WS-1:0]         st [NC];   // stream digits collected per set

  int n_b2b = 0, n_idle = 0, n_neg = 0, n_ext = 0, n_early = 0;
  int n_dig [3] = '{0, 0, 0};
  int n_sets = 0, n_done = 0;

  initial begin
    int burst;
    burst = 0;
    for (int c = 0; c < NC; c++) begin
      if (c >= NC - LAT_PAR - 2) vld[c] = 1'b0;
      else if (burst > 0) begin vld[c] = 1'b1; burst--; end
      else if ($urandom_range(0, 3) == 0) begin vld[c] = 1'b0; end
      else begin vld[c] = 1'b1; burst = $urandom_range(0, 8); end
      for (int k = 0; k < NUM; k++)
        for (int i = 0; i < N; i++) begin
          case (c % 50)
            7:  begin xs[c][k][i] = dig(1);  ys[c][k][i] = dig(1);  end  // largest result
            8:  begin xs[c][k][i] = dig(1);  ys[c][k][i] = dig(-1); end  // most negative
            default: begin
              xs[c][k][i] = dig($urandom_range(0, 2) - 1);
              ys[c][k][i] = dig($urandom_range(0, 2) - 1);
            end
          endcase
        end
    end
  end

  initial begin
    in_valid = 1'b0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < NC; c++) begin
      in_valid = vld[c];
      x = xs[c];
      y = ys[c];
      if (vld[c]) begin
        bit has_neg;
        n_sets++;
        if (c > 0 && vld[c-1]) n_b2b++;
        if (c > 0 && !vld[c-1]) n_idle++;
        has_neg = 0;
        for (int k = 0; k < NUM; k++)
          for (int i = 0; i < N; i++)
            if (xs[c][k][i].m || ys[c][k][i].m) has_neg = 1;
        if (has_neg) n_neg++;
        if (c % 50 == 7 || c % 50 == 8) n_ext++;
      end
      #1;
      // MSD-first stream: digit d of the set of cycle c - LAT_MSD - d
      for (int d = 0; d < WS; d++)
        if (c - LAT_MSD - d >= 0) st[c-LAT_MSD-d][d] = stair[d];
      checks++;
      if (stair_valid != (c >= LAT_MSD && vld[c-LAT_MSD])) begin
        failures++;
        $display("cycle %0d: stair_valid wrong", c);
      end
      checks++;
      if (sum_valid != (c >= LAT_PAR && vld[c-LAT_PAR])) begin
        failures++;
        $display("cycle %0d: sum_valid wrong", c);
      end
      if (sum_valid) begin
        int t;
        longint ref_v, got, err;
        t = c - LAT_PAR;
        n_done++;
        ref_v = 0;
        for (int k = 0; k < NUM; k++) ref_v += vec_val(xs[t][k]) * vec_val(ys[t][k]);
        got = 0;
        for (int d = 0; d < WS; d++) begin
          got += longint'(sd_value(sum[d])) <<< (WS - 1 - d);
          n_dig[sd_value(sum[d]) + 1]++;
        end
        err = (got <<< N) - ref_v;     // units 2^-(2N+L)
        if (err < 0) err = -err;
        checks++;
        if (err >= (longint'(1) <<< (N + L))) begin
          failures++;
          if (failures < 10) $display("set %0d: result %0d, exact %0d (units)", t, got <<< N, ref_v);
        end
        // the leading digit was delivered WS-1 cycles before the whole word
        if (st[t][0] == sum[0]) n_early++;
        checks++;
        if (st[t] != sum) begin
          failures++;
          if (failures < 10) $display("set %0d: stream digits differ from parallel result", t);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_done != n_sets) begin failures++; $display("%0d sets in, %0d out", n_sets, n_done); end
    $display("mechanisms: back-to-back=%0d after-idle=%0d negative-digits=%0d extreme=%0d",
             n_b2b, n_idle, n_neg, n_ext);
    $display("            result digits -1/0/1=%0d/%0d/%0d  MSD-before-full-result=%0d",
             n_dig[0], n_dig[1], n_dig[2], n_early);
    if (n_b2b == 0)    begin failures++; $display("never: back-to-back sets"); end
    if (n_idle == 0)   begin failures++; $display("never: idle cycles"); end
    if (n_neg == 0)    begin failures++; $display("never: negative digits"); end
    if (n_ext == 0)    begin failures++; $display("never: extreme operands"); end
    if (n_dig[0] == 0 || n_dig[1] == 0 || n_dig[2] == 0) begin
      failures++; $display("never: some result digit value");
    end
    if (n_early == 0)  begin failures++; $display("never: early MSD"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
