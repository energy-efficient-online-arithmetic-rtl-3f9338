// Self-checking testbench of ol_csa42: vs + vc must equal the sum of the four truncated input
// words plus cx and cy at the working-precision ulp, modulo 2^W; nothing below the ulp is set.
module tb_ol_csa42;
  import ol_pkg::*;
  localparam int W   = 18;
  localparam int LSB = 3;
  int checks = 0, failures = 0;
  logic [W-1:0] a, b, ws, wc, vs, vc;
  logic         cx, cy;

  ol_csa42 #(.W(W), .LSB(LSB)) u_dut (
    .a_i(a), .b_i(b), .ws_i(ws), .wc_i(wc), .cx_i(cx), .cy_i(cy), .vs_o(vs), .vc_o(vc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] keep, expv;
    keep = ~W'((1 << LSB) - 1);
    for (int t = 0; t < 5000; t++) begin
      a = W'($urandom); b = W'($urandom); ws = W'($urandom); wc = W'($urandom);
      cx = 1'($urandom); cy = 1'($urandom);
      #1;
      expv = (a & keep) + (b & keep) + (ws & keep) + (wc & keep)
           + (W'(cx) << LSB) + (W'(cy) << LSB);
      checks++;
      if (W'(vs + vc) != expv || ((vs | vc) & ~keep) != '0) begin
        failures++;
        if (failures < 10) $display("mismatch: vs+vc=%h expected %h", W'(vs + vc), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
