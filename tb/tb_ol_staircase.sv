// Self-checking testbench of ol_staircase: random digit vectors every cycle; digit k must come
// out k cycles later (forward array) or NDIG-1-k cycles later (reversed array).
module tb_ol_staircase;
  import ol_pkg::*;
  localparam int ND = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  sd_t [ND-1:0] din, dfw, drv;
  sd_t [ND-1:0] hist [64];

  ol_staircase #(.NDIG(ND), .REVERSE(1'b0)) u_fw (.clk(clk), .rst(rst), .d_i(din), .d_o(dfw));
  ol_staircase #(.NDIG(ND), .REVERSE(1'b1)) u_rv (.clk(clk), .rst(rst), .d_i(din), .d_o(drv));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      din = (2 * ND)'($urandom);
      hist[t] = din;
      #1;
      for (int k = 0; k < ND; k++) begin
        if (t >= k) begin
          checks++;
          if (dfw[k] != hist[t-k][k]) failures++;
        end
        if (t >= ND - 1 - k) begin
          checks++;
          if (drv[k] != hist[t-(ND-1-k)][k]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
