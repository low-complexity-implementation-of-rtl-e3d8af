// tb_mms_vnu: random check of the MMS variable-node unit at degrees 2 and 3
// with W = 6, w = 2, T_M = 6. The expected messages and decision are worked
// out with plain integer arithmetic: f() as a table, the extrinsic sum as the
// LLR plus the other edges, g() as four threshold cases.
module tb_mms_vnu;
  import mms_pkg::*;

  localparam int W = 6, WL = 2, T = 6;

  int checks = 0, failures = 0;
  int n_strong = 0, n_weak = 0;

  logic signed [5:0] llr2, llr3;
  msg_t [1:0] c2v2, v2c2;
  msg_t [2:0] c2v3, v2c3;
  logic use2, use3, hard2, hard3;

  mms_vnu #(.DV(2), .LLR_W(6), .W_HI(W), .W_LO(WL), .T_M(T)) dut2 (
    .llr(llr2), .c2v(c2v2), .use_c2v(use2), .v2c(v2c2), .hard(hard2), .total());
  mms_vnu #(.DV(3), .LLR_W(6), .W_HI(W), .W_LO(WL), .T_M(T)) dut3 (
    .llr(llr3), .c2v(c2v3), .use_c2v(use3), .v2c(v2c3), .hard(hard3), .total());

  function automatic int fval(msg_t m);
    case (m)
      2'b01: return W;
      2'b00: return WL;
      2'b10: return -WL;
      default: return -W;
    endcase
  endfunction

  function automatic msg_t gval(int y);
    if (y > T) return 2'b01;
    if (y >= 0) return 2'b00;
    if (y >= -T) return 2'b10;
    return 2'b11;
  endfunction

  task automatic chk(input msg_t got, input msg_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000) begin
      int l, tot;
      msg_t m [3];
      bit u;
      l = int'($urandom_range(63)) - 32;
      u = 1'($urandom);
      for (int j = 0; j < 3; j++) m[j] = 2'($urandom);
      llr2 = 6'(l); llr3 = 6'(l); use2 = u; use3 = u;
      for (int j = 0; j < 2; j++) c2v2[j] = m[j];
      for (int j = 0; j < 3; j++) c2v3[j] = m[j];
      #1;
      // degree 2
      tot = l;
      if (u) for (int j = 0; j < 2; j++) tot += fval(m[j]);
      for (int k = 0; k < 2; k++) begin
        int ext;
        ext = l;
        if (u) for (int j = 0; j < 2; j++) if (j != k) ext += fval(m[j]);
        chk(v2c2[k], gval(ext), "dv2 v2c");
        if (gval(ext)[0]) n_strong++; else n_weak++;
      end
      chk(msg_t'(hard2), msg_t'(tot < 0), "dv2 hard");
      // degree 3
      tot = l;
      if (u) for (int j = 0; j < 3; j++) tot += fval(m[j]);
      for (int k = 0; k < 3; k++) begin
        int ext;
        ext = l;
        if (u) for (int j = 0; j < 3; j++) if (j != k) ext += fval(m[j]);
        chk(v2c3[k], gval(ext), "dv3 v2c");
      end
      chk(msg_t'(hard3), msg_t'(tot < 0), "dv3 hard");
    end
    // threshold corners of g(): LLR exactly 0, T, T+1, -1, -T, -T-1, no messages
    begin
      int corner [6] = '{0, T, T + 1, -1, -T, -T - 1};
      for (int i = 0; i < 6; i++) begin
        llr2 = 6'(corner[i]); use2 = 1'b0; #1;
        chk(v2c2[0], gval(corner[i]), "corner");
      end
    end
    if (n_strong == 0 || n_weak == 0) begin failures++; $display("FAIL: message classes not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
