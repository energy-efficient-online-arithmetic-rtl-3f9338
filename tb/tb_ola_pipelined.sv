// Self-checking testbench of ola_pipelined (W = 8): a new random operand pair enters every
// clock in stair-case form (digit i of pair t in cycle t + i). Result digit d of pair t must
// appear in cycle t + d + 2, and the W+1 result digits must add up exactly to a + b.
module tb_ola_pipelined;
  import ol_pkg::*;
  localparam int W  = 8;
  localparam int NT = 300;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  sd_t [W-1:0] a, b, as [NT], bs [NT];
  sd_t [W:0]   s, ss [NT];

  ola_pipelined #(.W(W)) u_dut (.clk(clk), .rst(rst), .a_i(a), .b_i(b), .s_o(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sd_t dig(int v);
    return (v > 0) ? '{p: 1'b1, m: 1'b0} : (v < 0) ? '{p: 1'b0, m: 1'b1} : '{p: 1'b0, m: 1'b0};
  endfunction

  initial begin
    for (int t = 0; t < NT; t++)
      for (int i = 0; i < W; i++) begin
        as[t][i] = dig($urandom_range(0, 2) - 1);
        bs[t][i] = dig($urandom_range(0, 2) - 1);
      end
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < NT + W + 4; c++) begin
      for (int i = 0; i < W; i++) begin
        a[i] = (c - i >= 0 && c - i < NT) ? as[c-i][i] : '0;
        b[i] = (c - i >= 0 && c - i < NT) ? bs[c-i][i] : '0;
      end
      #1;
      for (int d = 0; d <= W; d++)
        if (c - d - 2 >= 0 && c - d - 2 < NT) ss[c-d-2][d] = s[d];
      @(negedge clk);
    end
    for (int t = 0; t < NT; t++) begin
      int va, vb, vs;
      va = 0; vb = 0; vs = 0;
      for (int i = 0; i < W; i++) begin
        va += sd_value(as[t][i]) <<< (W - 1 - i);
        vb += sd_value(bs[t][i]) <<< (W - 1 - i);
      end
      for (int d = 0; d <= W; d++) vs += sd_value(ss[t][d]) <<< (W - d);
      checks++;
      if (vs != va + vb) begin
        failures++;
        if (failures < 10) $display("pair %0d: sum %0d expected %0d", t, vs, va + vb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
