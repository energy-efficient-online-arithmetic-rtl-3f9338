// Self-checking testbench of ol_sop at the larger unit sizes of the SoP comparison: 32 and
// 128 products of 8-digit operands (the 16-product unit is the default and has its own
// end-to-end testbench).
// Each unit gets NSET random sets back to back, one per clock, with a largest-magnitude set
// (all digits 1 times all digits 1) among them. For every set it checks that
//   - sum_valid_o rises exactly 4 + 2*log2(NUM) + (8 + log2(NUM)) - 1 cycles after the set,
//   - the result S satisfies |S - sum(x*y)/NUM| < 2^-8.
// Values are 64-bit integers in units of 2^-(2n + log2 NUM).
module tb_ol_sop_sizes;
  import ol_pkg::*;
  localparam int NS = 2;
  localparam int NUMS [NS] = '{32, 128};
  localparam int N    = 8;
  localparam int NSET = 60;

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

  function automatic longint vec_val(sd_t [N-1:0] v);
    longint r = 0;
    for (int i = 0; i < N; i++) r += longint'(sd_value(v[i])) <<< (N - 1 - i);
    return r;
  endfunction

  for (genvar s = 0; s < NS; s++) begin : g_unit
    localparam int NUM = NUMS[s];
    localparam int L   = $clog2(NUM);
    localparam int WS  = N + L;
    localparam int LAT_PAR = 4 + 2 * L + WS - 1;

    logic                 in_valid;
    sd_t [NUM-1:0][N-1:0] x, y;
    sd_t [WS-1:0]         stair, sum;
    logic                 stair_valid, sum_valid;
    sd_t [NUM-1:0][N-1:0] xs [NSET], ys [NSET];

    ol_sop #(.NUM(NUM), .N(N)) u_dut (
      .clk(clk), .rst(rst), .in_valid_i(in_valid), .x_i(x), .y_i(y),
      .stair_o(stair), .stair_valid_o(stair_valid), .sum_o(sum), .sum_valid_o(sum_valid));

    initial begin
      int n_out;
      n_out = 0;
      for (int t = 0; t < NSET; t++)
        for (int k = 0; k < NUM; k++)
          for (int i = 0; i < N; i++) begin
            xs[t][k][i] = (t == 3) ? dig(1) : dig($urandom_range(0, 2) - 1);
            ys[t][k][i] = (t == 3) ? dig(1) : dig($urandom_range(0, 2) - 1);
          end
      in_valid = 1'b0; x = '0; y = '0;
      repeat (3) @(posedge clk);
      @(negedge clk);
      for (int c = 0; c < NSET + LAT_PAR + 2; c++) begin
        in_valid = (c < NSET);
        x = (c < NSET) ? xs[c] : '0;
        y = (c < NSET) ? ys[c] : '0;
        #1;
        checks++;
        if (sum_valid != (c >= LAT_PAR && c - LAT_PAR < NSET)) begin
          failures++;
          $display("NUM=%0d cycle %0d: sum_valid wrong", NUM, c);
        end
        if (sum_valid && c >= LAT_PAR) begin
          longint ref_v, got, err;
          int t;
          t = c - LAT_PAR;
          n_out++;
          ref_v = 0;
          for (int k = 0; k < NUM; k++) ref_v += vec_val(xs[t][k]) * vec_val(ys[t][k]);
          got = 0;
          for (int d = 0; d < WS; d++) got += longint'(sd_value(sum[d])) <<< (WS - 1 - d);
          err = (got <<< N) - ref_v;
          if (err < 0) err = -err;
          checks++;
          if (err >= (longint'(1) <<< (N + L))) begin
            failures++;
            if (failures < 10) $display("NUM=%0d set %0d: %0d vs %0d", NUM, t, got <<< N, ref_v);
          end
        end
        @(negedge clk);
      end
      checks++;
      if (n_out != NSET) begin failures++; $display("NUM=%0d: %0d results", NUM, n_out); end
      $display("NUM=%0d: %0d sets checked, latency %0d cycles", NUM, n_out, LAT_PAR);
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
