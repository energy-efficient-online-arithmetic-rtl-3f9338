// Self-checking testbench of ol_otfc: a chain of 16 append slices converts random 16-digit
// signed-digit numbers; after every digit Q must equal the exact prefix value and QM = Q - ulp.
module tb_ol_otfc;
  import ol_pkg::*;
  localparam int N = 16;
  localparam int W = N + 2;
  int checks = 0, failures = 0;

  sd_t          d [N];
  logic [W-1:0] q [N+1], qm [N+1];
  assign q[0]  = '0;
  assign qm[0] = {2'b11, {N{1'b0}}};
  for (genvar i = 0; i < N; i++) begin : g_chain
    ol_otfc #(.W(W), .BIT(N - 1 - i)) u_dut (
      .q_i(q[i]), .qm_i(qm[i]), .d_i(d[i]), .q_o(q[i+1]), .qm_o(qm[i+1]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_v;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < N; i++) begin
        case ($urandom_range(0, 3))
          0: d[i] = '{p: 1'b1, m: 1'b0};
          1: d[i] = '{p: 1'b0, m: 1'b1};
          2: d[i] = '{p: 1'b0, m: 1'b0};
          default: d[i] = '{p: 1'b1, m: 1'b1};  // also reads as zero
        endcase
      end
      #1;
      ref_v = 0;
      for (int i = 0; i < N; i++) begin
        ref_v += longint'(sd_value(d[i])) <<< (N - 1 - i);
        checks++;
        if (longint'($signed(q[i+1])) != ref_v ||
            longint'($signed(qm[i+1])) != ref_v - (longint'(1) <<< (N - 1 - i))) begin
          failures++;
          if (failures < 10)
            $display("mismatch t=%0d digit %0d: q=%0d qm=%0d expected %0d", t, i,
                     $signed(q[i+1]), $signed(qm[i+1]), ref_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
