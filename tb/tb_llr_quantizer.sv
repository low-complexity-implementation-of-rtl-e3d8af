// tb_llr_quantizer: checks the channel quantizer at its default format
// (y: 8 bits, 5 fraction bits; 2/sigma^2: 8 bits, 4 fraction bits; LLR:
// 6 bits, 1 fraction bit). The expected LLR is computed in real arithmetic,
// 2*y/sigma^2 in units of 0.5, rounded half-up and clipped to +/-31, and is
// compared one clock after the sample is presented (one-cycle latency).
module tb_llr_quantizer;
  int checks = 0, failures = 0, n_clip = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [7:0] y = '0;
  logic [7:0] scale = '0;
  logic signed [5:0] llr;

  always #5 clk = ~clk;

  llr_quantizer dut (.clk, .rst_n, .in_valid, .y, .scale, .out_valid, .llr);

  function automatic int expect_llr(int yi, int si);
    real v = (real'(yi) / 32.0) * (real'(si) / 16.0) / 0.5;  // in LLR units
    int r = int'($floor(v + 0.5));
    if (r > 31) r = 31;
    if (r < -31) r = -31;
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      int yi, si, e;
      yi = int'($urandom_range(255)) - 128;
      si = int'($urandom_range(255));
      @(negedge clk);
      y = 8'(yi); scale = 8'(si); in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      e = expect_llr(yi, si);
      if (e == 31 || e == -31) n_clip++;
      checks++;
      if (!out_valid || int'(llr) != e) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d s=%0d llr=%0d exp=%0d v=%b", yi, si, llr, e, out_valid);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid held"); end
    end
    checks++;
    if (n_clip == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
