// Self-checking testbench of ol_sel_slice: all 256 input pairs. The estimate is the 4-bit sum,
// the digit follows the selection table (v^ >= 1/2 -> 1, v^ <= -3/4 -> -1, else 0, judged on
// v_-1 v_0 . v_1) and the residual bits equal v^ - z in one-integer-bit two's complement.
module tb_ol_sel_slice;
  import ol_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] vs, vc, vhat;
  logic [2:0] wt;
  sd_t        z;

  ol_sel_slice u_dut (.vs_top_i(vs), .vc_top_i(vc), .z_o(z), .w_top_o(wt), .vhat_o(vhat));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, halves, ez, w;
    for (int i = 0; i < 256; i++) begin
      {vs, vc} = 8'(i);
      #1;
      e = int'($signed(4'(vs + vc)));   // quarters, -8 .. 7
      halves = e >>> 1;                 // v_-1 v_0 . v_1 in halves
      ez = (halves >= 1) ? 1 : (halves >= -1 ? 0 : -1);
      w  = e - 4 * ez;                  // quarters, must fit -4 .. 3
      checks++;
      if (vhat != 4'(vs + vc) || sd_value(z) != ez || (z.p && z.m) ||
          int'($signed(wt)) != w || w < -4 || w > 3) begin
        failures++;
        if (failures < 10) $display("mismatch vs=%b vc=%b z=%0d w=%b", vs, vc, sd_value(z), wt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
