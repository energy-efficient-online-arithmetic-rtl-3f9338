// Self-checking testbench of ola_module1: all digit pairs, random order. The combinational
// transfer must satisfy x+ + (1 - x-) + y+ = 2h + g, with g and y- appearing one clock later.
module tb_ola_module1;
  import ol_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  sd_t  x, y;
  logic h, g, ym;

  ola_module1 u_dut (.clk(clk), .rst(rst), .x_i(x), .y_i(y), .h_o(h), .g_o(g), .ym_o(ym));

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, exp_g, exp_ym;
    x = '0; y = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 400; t++) begin
      {x, y} = 4'($urandom);
      #1;
      s = int'(x.p) + int'(!x.m) + int'(y.p);
      checks++;
      if (int'(h) != s / 2) failures++;
      exp_g = s % 2;
      exp_ym = int'(y.m);
      @(posedge clk);
      #1;
      checks++;
      if (int'(g) != exp_g || int'(ym) != exp_ym) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
