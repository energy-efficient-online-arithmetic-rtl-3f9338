// Self-checking testbench of ola_module2: random inputs every clock. With
// g + (1 - y-) + h = 2t + w, NOT t must appear after one clock edge and w after two.
module tb_ola_module2;
  import ol_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic g, ym, h, zm, zp;
  int   ws [600], ts [600];

  ola_module2 u_dut (.clk(clk), .rst(rst), .g_i(g), .ym_i(ym), .h_i(h), .zm_o(zm), .zp_o(zp));

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    {g, ym, h} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int t = 0; t < 500; t++) begin
      {g, ym, h} = 3'($urandom);
      s = int'(g) + int'(!ym) + int'(h);
      ts[t] = s / 2;
      ws[t] = s % 2;
      @(posedge clk);
      #1;
      checks++;
      if (int'(zm) != 1 - ts[t]) failures++;
      if (t >= 1) begin
        checks++;
        if (int'(zp) != ws[t-1]) failures++;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
