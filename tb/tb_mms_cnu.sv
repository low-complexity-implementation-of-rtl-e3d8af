// tb_mms_cnu: exhaustive check of the MMS check-node unit at degree 4 and a
// random check at degree 6. The expected output on edge k is worked out by
// counting, over the other edges, the negative messages (odd count -> sign 1)
// and the nweak messages (none -> strong).
module tb_mms_cnu;
  import mms_pkg::*;

  int checks = 0, failures = 0;

  msg_t [3:0] in4, out4;
  msg_t [5:0] in6, out6;

  mms_cnu #(.DC(4)) dut4 (.v2c(in4), .c2v(out4));
  mms_cnu #(.DC(6)) dut6 (.v2c(in6), .c2v(out6));

  task automatic check_edge(input int d, input msg_t ins[], input msg_t got, input int k);
    int neg = 0, nweak = 0;
    msg_t expv;
    for (int l = 0; l < d; l++) if (l != k) begin
      if (ins[l] == 2'b10 || ins[l] == 2'b11) neg++;
      if (ins[l] == 2'b00 || ins[l] == 2'b10) nweak++;
    end
    expv = {1'(neg % 2), 1'(nweak == 0)};
    checks++;
    if (got !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL d=%0d k=%0d got=%b expv=%b", d, k, got, expv);
    end
  endtask

  initial begin
    msg_t a4[] = new[4];
    msg_t a6[] = new[6];
    for (int v = 0; v < 256; v++) begin
      in4 = 8'(v);
      #1;
      for (int l = 0; l < 4; l++) a4[l] = in4[l];
      for (int k = 0; k < 4; k++) check_edge(4, a4, out4[k], k);
    end
    repeat (500) begin
      in6 = 12'($urandom);
      #1;
      for (int l = 0; l < 6; l++) a6[l] = in6[l];
      for (int k = 0; k < 6; k++) check_edge(6, a6, out6[k], k);
    end
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
