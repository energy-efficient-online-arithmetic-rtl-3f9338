// One unfolded iteration j of the radix-2 online multiplier (delta = 3, t = 2).
//
// The pipelined multiplier is the online recurrence unrolled in space: stage J computes
//   v[j]   = 2w[j] + (x[j]*y_{j+4} + y[j+1]*x_{j+4}) * 2^-3
//   z_{j+1} = SELM(v^[j]),   w[j+1] = v[j] - z_{j+1}
// for one operand pair, then hands x[j+1], y[j+1] (as OTFC words Q and QM) and 2w[j+1]
// (carry-save WS/WC) to stage J+1 through its output registers. Three kinds of stage, chosen
// by J at elaboration:
//   J = -3..-1       initialization: OTFC, selectors and [4:2] adder; no output digit;
//                    2w[j+1] is vs/vc shifted left (the integer MSBs are dropped).
//   J = 0..N-4       recurrence: as above plus the SEL slice (V, SELM, M); emits z_{j+1}.
//   J = N-3..N-1     last delta cycles: no operand digits left, so no OTFC, selector or adder;
//                    the SEL slice works on the shifted residual; emits z_{j+1}.
// All words share the N+2 bit frame of ol_pkg. Only the frac_bits(J) most significant
// fractional bits are computed (reduced working precision P); lower bits are forced to zero
// and vanish in synthesis, so the unused digit slices do not exist in hardware.
//
// Timing: everything is registered at the stage output, one clock per stage; the digits
// x_i/y_i must be those of the operand pair that is in this stage now (the stair-case
// shifter provides that). z_o is the registered digit z_{J+1} (zero for initialization).
// Reset (synchronous, active high) loads the state of an all-zero operand pair.
// In the last delta stages the operand and converter inputs have no use (no digits are left),
// and the residual estimate of the selection slice is only observed, never needed here; lint
// reports those signals as unused.
module olm_stage
  import ol_pkg::*;
#(
  parameter int unsigned N = 16,                     // operand digits n
  parameter int unsigned P = reduced_precision(N),   // reduced working precision p
  parameter int          J = 0,                      // iteration index, -3 .. N-1
  localparam int unsigned W = N + 2
) (
  input  logic         clk,
  input  logic         rst,
  input  sd_t          x_i,      // x_{j+4}
  input  sd_t          y_i,      // y_{j+4}
  input  logic [W-1:0] xq_i,     // x[j]  (Q)
  input  logic [W-1:0] xqm_i,    // x[j] - ulp (QM)
  input  logic [W-1:0] yq_i,     // y[j]
  input  logic [W-1:0] yqm_i,
  input  logic [W-1:0] ws_i,     // 2w[j], sum word
  input  logic [W-1:0] wc_i,     // 2w[j], carry word
  output logic [W-1:0] xq_o,     // x[j+1]
  output logic [W-1:0] xqm_o,
  output logic [W-1:0] yq_o,     // y[j+1]
  output logic [W-1:0] yqm_o,
  output logic [W-1:0] ws_o,     // 2w[j+1]
  output logic [W-1:0] wc_o,
  output sd_t          z_o       // z_{j+1}, registered
);
  localparam int          F     = frac_bits(J, N, P);
  localparam int unsigned LSB   = N - F;
  localparam bit          INIT  = (J < 0);
  localparam bit          LAST  = (J > int'(N) - int'(MUL_DELAY) - 1);
  localparam int unsigned DBIT  = LAST ? 0 : N - (J + 4);   // bit of digit j+4
  // reset state of QM = the value after all-zero digits: -ulp
  localparam logic [W-1:0] QM_RST = {W{1'b1}} << DBIT;

  initial begin
    assert (J >= -3 && J < int'(N)) else $error("olm_stage: J out of range");
    assert (F >= 2 && F <= int'(N)) else $error("olm_stage: working precision out of range");
  end

  logic [W-1:0] keep;  // kept (working-precision) bits of this stage
  always_comb begin
    keep = '0;
    for (int i = LSB; i < W; i++) keep[i] = 1'b1;
  end

  logic [W-1:0] vs, vc;       // v[j] in carry-save form
  logic [W-1:0] ws_nx, wc_nx; // 2w[j+1]
  sd_t          z_nx;

  if (!LAST) begin : g_operands
    logic [W-1:0] xq_nx, xqm_nx, yq_nx, yqm_nx;
    logic [W-1:0] xs, ys, a, b;
    logic         cx, cy;

    ol_otfc #(.W(W), .BIT(DBIT)) u_ca_x (
      .q_i(xq_i), .qm_i(xqm_i), .d_i(x_i), .q_o(xq_nx), .qm_o(xqm_nx));
    ol_otfc #(.W(W), .BIT(DBIT)) u_ca_y (
      .q_i(yq_i), .qm_i(yqm_i), .d_i(y_i), .q_o(yq_nx), .qm_o(yqm_nx));

    // 2^-3 scaling is an arithmetic right shift (sign extension, pure wiring)
    assign xs = W'($signed(xq_i) >>> MUL_DELAY);   // x[j]   * 2^-3
    assign ys = W'($signed(yq_nx) >>> MUL_DELAY);  // y[j+1] * 2^-3

    ol_selector #(.W(W)) u_sel_x (.a_i(xs), .d_i(y_i), .sel_o(a), .neg_o(cy));
    ol_selector #(.W(W)) u_sel_y (.a_i(ys), .d_i(x_i), .sel_o(b), .neg_o(cx));

    ol_csa42 #(.W(W), .LSB(LSB)) u_add (
      .a_i(a), .b_i(b), .ws_i(ws_i), .wc_i(wc_i), .cx_i(cx), .cy_i(cy),
      .vs_o(vs), .vc_o(vc));

    always_ff @(posedge clk) begin
      if (rst) begin
        xq_o <= '0; xqm_o <= QM_RST; yq_o <= '0; yqm_o <= QM_RST;
      end else begin
        xq_o <= xq_nx; xqm_o <= xqm_nx; yq_o <= yq_nx; yqm_o <= yqm_nx;
      end
    end
  end else begin : g_no_operands
    // last delta cycles: v[j] = 2w[j]; no operand registers are needed
    assign vs = ws_i & keep;
    assign vc = wc_i & keep;
    assign xq_o = '0; assign xqm_o = '0; assign yq_o = '0; assign yqm_o = '0;
  end

  if (INIT) begin : g_init
    assign ws_nx = vs << 1;
    assign wc_nx = vc << 1;
    assign z_nx  = '0;
  end else begin : g_select
    logic [2:0] w_top;
    logic [3:0] vhat;
    ol_sel_slice u_sel (
      .vs_top_i(vs[W-1 -: 4]), .vc_top_i(vc[W-1 -: 4]),
      .z_o(z_nx), .w_top_o(w_top), .vhat_o(vhat));
    assign ws_nx = {w_top, vs[W-5:0], 1'b0};
    assign wc_nx = {3'b000, vc[W-5:0], 1'b0};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ws_o <= '0; wc_o <= '0; z_o <= '0;
    end else begin
      ws_o <= ws_nx; wc_o <= wc_nx; z_o <= z_nx;
    end
  end
endmodule
