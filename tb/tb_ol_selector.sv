// Self-checking testbench of ol_selector: for random words and all digit codes the output plus
// the negation ulp must equal digit * word (mod 2^W).
module tb_ol_selector;
  import ol_pkg::*;
  localparam int W = 18;
  int checks = 0, failures = 0;
  logic [W-1:0] a, s;
  sd_t          d;
  logic         neg;

  ol_selector #(.W(W)) u_dut (.a_i(a), .d_i(d), .sel_o(s), .neg_o(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expv;
    for (int t = 0; t < 4000; t++) begin
      a = W'($urandom);
      d = sd_t'(2'(t));
      #1;
      expv = W'(longint'(sd_value(d)) * longint'($signed(a)));
      checks++;
      if (W'(s + W'(neg)) != expv || (neg != (d.m && !d.p))) begin
        failures++;
        if (failures < 10) $display("mismatch a=%h d=%b s=%h neg=%b", a, d, s, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
