// Self-checking testbench of ola_tree (NUM = 8 operands of W = 6 digits): a new random set
// enters every clock in stair-case form. Output digit d of set t must appear in cycle
// t + d + 2*log2(NUM) and the output must equal (sum of the operands) / NUM exactly.
module tb_ola_tree;
  import ol_pkg::*;
  localparam int NUM = 8;
  localparam int W   = 6;
  localparam int L   = 3;
  localparam int WO  = W + L;
  localparam int NT  = 200;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  sd_t [NUM-1:0][W-1:0] op, ops [NT];
  sd_t [WO-1:0]         s, ss [NT];

  ola_tree #(.NUM(NUM), .W(W)) u_dut (.clk(clk), .rst(rst), .op_i(op), .sum_o(s));

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
      for (int k = 0; k < NUM; k++)
        for (int i = 0; i < W; i++)
          // a few sets with all digits 1 or all -1 reach the range limits
          ops[t][k][i] = (t == 5) ? dig(1) : (t == 6) ? dig(-1) : dig($urandom_range(0, 2) - 1);
    op = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < NT + WO + 2 * L + 2; c++) begin
      for (int k = 0; k < NUM; k++)
        for (int i = 0; i < W; i++)
          op[k][i] = (c - i >= 0 && c - i < NT) ? ops[c-i][k][i] : '0;
      #1;
      for (int d = 0; d < WO; d++)
        if (c - d - 2 * L >= 0 && c - d - 2 * L < NT) ss[c-d-2*L][d] = s[d];
      @(negedge clk);
    end
    for (int t = 0; t < NT; t++) begin
      int vin, vout;
      vin = 0; vout = 0;
      for (int k = 0; k < NUM; k++)
        for (int i = 0; i < W; i++) vin += sd_value(ops[t][k][i]) <<< (W - 1 - i);
      for (int d = 0; d < WO; d++) vout += sd_value(ss[t][d]) <<< (WO - 1 - d);
      checks++;
      if (vout != vin) begin   // vout is in units 2^-WO = 2^-W / NUM
        failures++;
        if (failures < 10) $display("set %0d: %0d expected %0d", t, vout, vin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
