// Convolution workload on the online sum-of-products unit.
//
// One output channel of an AlexNet layer-3-shaped tile: a 3x3 kernel over Tn = 5 input
// channels, so every output pixel is a dot product of P = 3*3*5 = 45 weight/pixel pairs.
// The products map onto an ol_sop with NUM = 64 inputs (the unused 19 are held at zero), as
// in an im2col arrangement: each clock one receptive field (45 pixels) enters together with
// the fixed 45 weights, and one output pixel leaves per clock after the pipeline has filled.
// The feature map is 10x10 per channel (8x8 = 64 output pixels, stride 1), much smaller than
// the real 13x13 layer so the test stays short; only the number of fields streamed differs.
// Pixels and weights are random 8-bit fractions k/128, |k| <= 127, converted to 8-digit signed
// digit vectors (sign-magnitude: every nonzero digit carries the sign).
// Checks: each output S of the unit satisfies |S - conv/64| < 2^-8, where conv is the exact
// convolution sum computed here from the integers; outputs come one per clock, in order; the
// whole tile takes (fields) + latency - 1 cycles, latency = 4 + 2*log2(64) + (8 + 6) - 1.
module tb_sop_conv_layer;
  import ol_pkg::*;
  localparam int K    = 3;
  localparam int TN   = 5;
  localparam int P    = K * K * TN;
  localparam int NUM  = 64;
  localparam int N    = 8;
  localparam int L    = $clog2(NUM);
  localparam int WS   = N + L;
  localparam int HI   = 10;
  localparam int HO   = HI - K + 1;
  localparam int NF   = HO * HO;                 // receptive fields = output pixels
  localparam int LAT_PAR = 4 + 2 * L + WS - 1;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                 in_valid;
  sd_t [NUM-1:0][N-1:0] x, y;
  sd_t [WS-1:0]         stair, sum;
  logic                 stair_valid, sum_valid;

  ol_sop #(.NUM(NUM), .N(N)) u_dut (
    .clk(clk), .rst(rst), .in_valid_i(in_valid), .x_i(x), .y_i(y),
    .stair_o(stair), .stair_valid_o(stair_valid), .sum_o(sum), .sum_valid_o(sum_valid));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // integer k/128 -> 8 signed digits, MSD first (weight of digit i: 2^-(i+1))
  function automatic logic [N-1:0][1:0] to_sd(int k);
    logic [N-1:0][1:0] r;
    int a;
    a = (k < 0) ? -k : k;
    r = '0;
    for (int i = 0; i < N - 1; i++)
      if (a[N-2-i]) r[i] = (k < 0) ? 2'b01 : 2'b10;
    return r;
  endfunction

  int img [TN][HI][HI];
  int wgt [TN][K][K];
  longint conv [NF];

  initial begin
    int n_out, first_out, last_out, prev_out;
    n_out = 0; first_out = -1; last_out = -1; prev_out = -1;
    for (int c = 0; c < TN; c++)
      for (int r = 0; r < HI; r++)
        for (int q = 0; q < HI; q++) img[c][r][q] = $urandom_range(0, 254) - 127;
    for (int c = 0; c < TN; c++)
      for (int r = 0; r < K; r++)
        for (int q = 0; q < K; q++) wgt[c][r][q] = $urandom_range(0, 254) - 127;
    // one extreme field: all pixels and weights at +127
    for (int c = 0; c < TN; c++)
      for (int r = 0; r < K; r++)
        for (int q = 0; q < K; q++) img[c][r][q] = 127;
    for (int f = 0; f < NF; f++) begin
      conv[f] = 0;
      for (int c = 0; c < TN; c++)
        for (int r = 0; r < K; r++)
          for (int q = 0; q < K; q++)
            conv[f] += longint'(img[c][f / HO + r][f % HO + q]) * wgt[c][r][q];
    end
    in_valid = 1'b0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < NF + LAT_PAR + 2; cyc++) begin
      x = '0; y = '0;
      in_valid = (cyc < NF);
      if (cyc < NF) begin
        int idx;
        idx = 0;
        for (int c = 0; c < TN; c++)
          for (int r = 0; r < K; r++)
            for (int q = 0; q < K; q++) begin
              x[idx] = to_sd(img[c][cyc / HO + r][cyc % HO + q]);
              y[idx] = to_sd(wgt[c][r][q]);
              idx++;
            end
      end
      #1;
      if (sum_valid) begin
        longint got, err;
        got = 0;
        for (int d = 0; d < WS; d++) got += longint'(sd_value(sum[d])) <<< (WS - 1 - d);
        // got in units 2^-WS of S; conv in units 2^-14 of NUM*S
        err = (got <<< N) - conv[n_out] * 4;
        if (err < 0) err = -err;
        checks++;
        if (err >= (longint'(1) <<< (N + L))) begin
          failures++;
          if (failures < 10) $display("pixel %0d: %0d vs %0d", n_out, got <<< N, conv[n_out] * 4);
        end
        checks++;
        if (prev_out >= 0 && cyc != prev_out + 1) begin
          failures++;
          $display("pixel %0d not in the cycle after the previous one", n_out);
        end
        if (first_out < 0) first_out = cyc;
        prev_out = cyc;
        last_out = cyc;
        n_out++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_out != NF) begin failures++; $display("%0d output pixels, expected %0d", n_out, NF); end
    checks++;
    if (last_out + 1 != NF + LAT_PAR) begin
      failures++;
      $display("tile took %0d cycles, expected %0d", last_out + 1, NF + LAT_PAR);
    end
    $display("tile of %0d pixels, P = %0d products each: %0d cycles (first pixel after %0d)",
             NF, P, last_out + 1, first_out + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
