// Self-checking testbench of olm_stage (N = 16, P = 13). Three stages are driven with random,
// consistent states: an initialization stage (J = -2), a recurrence stage (J = 2) and a
// last-delta stage (J = 14). After each clock the testbench checks, against values computed
// here from the recurrence v = 2w + (x[j]*y_{j+4} + y[j+1]*x_{j+4})/8:
//   - the appended operand words Q and QM,
//   - initialization: no output digit and WS + WC = 2v,
//   - recurrence / last: z in {-1,0,1}, WS + WC = 2(v - z) and |v - z| < 1.
module tb_olm_stage;
  import ol_pkg::*;
  localparam int N = 16;
  localparam int P = 13;
  localparam int W = N + 2;
  localparam int NS = 3;
  localparam int JS [NS] = '{-2, 2, 14};

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  sd_t          xd [NS], yd [NS], z [NS];
  logic [W-1:0] xq [NS], xqm [NS], yq [NS], yqm [NS], ws [NS], wc [NS];
  logic [W-1:0] xq_o [NS], xqm_o [NS], yq_o [NS], yqm_o [NS], ws_o [NS], wc_o [NS];

  for (genvar s = 0; s < NS; s++) begin : g_dut
    olm_stage #(.N(N), .P(P), .J(JS[s])) u_dut (
      .clk(clk), .rst(rst), .x_i(xd[s]), .y_i(yd[s]),
      .xq_i(xq[s]), .xqm_i(xqm[s]), .yq_i(yq[s]), .yqm_i(yqm[s]), .ws_i(ws[s]), .wc_i(wc[s]),
      .xq_o(xq_o[s]), .xqm_o(xqm_o[s]), .yq_o(yq_o[s]), .yqm_o(yqm_o[s]),
      .ws_o(ws_o[s]), .wc_o(wc_o[s]), .z_o(z[s]));
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sd_t rnd_digit();
    case ($urandom_range(0, 2))
      0: return '{p: 1'b1, m: 1'b0};
      1: return '{p: 1'b0, m: 1'b1};
      default: return '{p: 1'b0, m: 1'b0};
    endcase
  endfunction

  // random multiple of 2^lsb in [-lim, lim)
  function automatic longint rnd_val(longint lim, int lsb);
    longint r;
    r = longint'($urandom_range(0, 32'(2 * lim - 1))) - lim;
    return (r >>> lsb) <<< lsb;
  endfunction

  function automatic longint sx(logic [W-1:0] v);
    return longint'($signed(v));
  endfunction

  longint exp_x [NS], exp_y [NS], exp_v [NS];
  int     ulpn [NS];

  initial begin
    longint one, x, y, yn, w2, a, b;
    int j, f, lsb, dbit;
    one = longint'(1) <<< N;
    for (int s = 0; s < NS; s++) begin
      xd[s] = '0; yd[s] = '0; xq[s] = '0; yq[s] = '0; xqm[s] = '0; yqm[s] = '0;
      ws[s] = '0; wc[s] = '0;
    end
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        j = JS[s];
        f = frac_bits(j, N, P);
        lsb = N - f;
        dbit = N - (j + 4);
        if (j + 4 <= N) begin
          x = rnd_val(one, N - (j + 3));
          y = rnd_val(one, N - (j + 3));
          xd[s] = rnd_digit(); yd[s] = rnd_digit();
          xq[s] = W'(x); xqm[s] = W'(x - (longint'(1) <<< (N - (j + 3))));
          yq[s] = W'(y); yqm[s] = W'(y - (longint'(1) <<< (N - (j + 3))));
          yn = y + (longint'(sd_value(yd[s])) <<< dbit);
          a = (x >>> 3) * sd_value(yd[s]);
          b = (yn >>> 3) * sd_value(xd[s]);
          exp_x[s] = x + (longint'(sd_value(xd[s])) <<< dbit);
          exp_y[s] = yn;
          ulpn[s] = dbit;
        end else begin
          xd[s] = '0; yd[s] = '0; a = 0; b = 0;
        end
        w2 = rnd_val(one + one / 4, lsb);          // 2w[j] in [-1.25, 1.25)
        wc[s] = W'(rnd_val(2 * one, lsb));
        ws[s] = W'(w2 - sx(wc[s]));
        exp_v[s] = w2 + a + b;
      end
      @(posedge clk);
      #1;
      for (int s = 0; s < NS; s++) begin
        longint got, wn;
        j = JS[s];
        if (j + 4 <= N) begin
          checks++;
          if (sx(xq_o[s]) != exp_x[s] || sx(yq_o[s]) != exp_y[s] ||
              sx(xqm_o[s]) != exp_x[s] - (longint'(1) <<< ulpn[s]) ||
              sx(yqm_o[s]) != exp_y[s] - (longint'(1) <<< ulpn[s])) begin
            failures++;
            if (failures < 10) $display("J=%0d operand words wrong", j);
          end
        end
        got = sx(W'(ws_o[s] + wc_o[s]));
        checks++;
        if (j < 0) begin
          if (z[s] != '0 || got != sx(W'(2 * exp_v[s]))) begin
            failures++;
            if (failures < 10) $display("J=%0d init residual %0d expected %0d", j, got, 2 * exp_v[s]);
          end
        end else begin
          wn = exp_v[s] - longint'(sd_value(z[s])) * one;
          if ((z[s].p && z[s].m) || got != sx(W'(2 * wn)) || wn >= one || wn < -one) begin
            failures++;
            if (failures < 10)
              $display("J=%0d v=%0d z=%0d 2w=%0d", j, exp_v[s], sd_value(z[s]), got);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
