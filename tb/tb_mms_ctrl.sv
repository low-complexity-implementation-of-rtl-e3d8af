// tb_mms_ctrl: runs the sequencer through two codewords with N = 12,
// 3 column and 3 row partitions and 10 iterations, with a gap in the sample
// stream. It checks that exactly N samples are accepted, that the LLR write
// addresses run 0..N-1, that the phases come as VN (masked), then 10 x (CN,
// VN) with the partitions in order, and that done comes
// 2 + 3 + 10*(3+3) cycles after the last sample was accepted.
module tb_mms_ctrl;
  import mms_pkg::*;
  localparam int N = 12, NGV = 3, NGC = 3, MI = 10;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0, q_valid = 0;
  logic in_ready, llr_we, vn_en, cn_en, first, done;
  logic [3:0] llr_waddr;
  logic [1:0] grp_v, grp_c;
  logic [3:0] iter;
  dec_state_t state;

  always #5 clk = ~clk;

  mms_ctrl #(.N(N), .NGV(NGV), .NGC(NGC), .MAX_ITER(MI)) dut (.*);

  // quantizer stand-in: one-cycle delayed accept
  always_ff @(posedge clk) q_valid <= in_valid && in_ready;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s @%0t", what, $time); end
  endtask

  int accepted, waddr_exp, cycle, last_acc, vn_cycles, cn_cycles, phase_idx;
  bit seen_done;
  string seq;

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (in_valid && in_ready) begin accepted++; last_acc = cycle; end
    if (llr_we) begin chk(int'(llr_waddr) == waddr_exp, "write address"); waddr_exp++; end
    if (vn_en) begin
      chk(int'(grp_v) == vn_cycles % NGV, "vn partition order");
      chk(first == (vn_cycles < NGV), "first pass masking");
      vn_cycles++;
    end
    if (cn_en) begin
      chk(int'(grp_c) == cn_cycles % NGC, "cn partition order");
      chk(vn_cycles == NGV * (cn_cycles / NGC + 1), "cn after vn");
      cn_cycles++;
    end
    if (done) begin
      seen_done = 1;
      chk(cycle - last_acc == 2 + NGV + MI * (NGC + NGV), $sformatf("latency %0d", cycle - last_acc));
      chk(int'(iter) == MI, "iteration count");
      chk(vn_cycles == NGV * (MI + 1), "vn cycles");
      chk(cn_cycles == NGC * MI, "cn cycles");
      chk(accepted == N, "samples accepted");
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) begin
      accepted = 0; waddr_exp = 0; vn_cycles = 0; cn_cycles = 0; seen_done = 0;
      @(negedge clk);
      in_valid = 1;
      repeat (5) @(negedge clk);
      in_valid = 0;
      repeat (3) @(negedge clk);
      in_valid = 1;
      // keep offering beyond N: the extra offers must be refused
      repeat (12) @(negedge clk);
      in_valid = 0;
      while (!seen_done) @(negedge clk);
      chk(state == ST_IDLE, "back to idle");
      chk(accepted == N, "no extra samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
