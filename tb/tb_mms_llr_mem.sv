// tb_mms_llr_mem: fills the LLR store with random values, then reads every
// partition base (0, 4, 8 for N = 12, 4 read ports) and compares each port
// with the reference array; repeats with a second fill.
module tb_mms_llr_mem;
  localparam int N = 12, NR = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [3:0] wr_addr = '0, rd_base = '0;
  logic signed [5:0] wr_data = '0;
  logic [NR-1:0][5:0] rd_data;
  logic [5:0] ref_mem [N];

  always #5 clk = ~clk;

  mms_llr_mem #(.N(N), .LLR_W(6), .NR(NR)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 4'(i); wr_data = 6'($urandom);
        ref_mem[i] = wr_data;
      end
      @(negedge clk);
      wr_en = 0;
      for (int g = 0; g < N / NR; g++) begin
        rd_base = 4'(g * NR);
        #1;
        for (int u = 0; u < NR; u++) begin
          checks++;
          if (rd_data[u] !== ref_mem[g * NR + u]) begin
            failures++;
            if (failures < 10) $display("FAIL base %0d port %0d", g * NR, u);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
