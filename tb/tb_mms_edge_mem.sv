// tb_mms_edge_mem: writes random messages through either write-port group
// (never both in one cycle, distinct addresses within a cycle) and compares
// the whole store with a reference array after every clock.
module tb_mms_edge_mem;
  import mms_pkg::*;
  localparam int E = 24, NA = 8, NB = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we_a = 0, we_b = 0;
  logic [NA-1:0][4:0] addr_a = '0;
  logic [NB-1:0][4:0] addr_b = '0;
  msg_t [NA-1:0] data_a = '0;
  msg_t [NB-1:0] data_b = '0;
  msg_t [E-1:0] rd_data;
  msg_t ref_mem [E];

  always #5 clk = ~clk;

  mms_edge_mem #(.E(E), .NA(NA), .NB(NB)) dut (.*);

  task automatic compare();
    for (int e = 0; e < E; e++) begin
      checks++;
      if (rd_data[e] !== ref_mem[e]) begin
        failures++;
        if (failures < 10) $display("FAIL edge %0d got %b exp %b", e, rd_data[e], ref_mem[e]);
      end
    end
  endtask

  initial begin
    int perm [E];
    for (int e = 0; e < E; e++) ref_mem[e] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    repeat (300) begin
      bit side;
      side = 1'($urandom);
      for (int e = 0; e < E; e++) perm[e] = e;
      perm.shuffle();
      we_a = 0; we_b = 0;
      if ($urandom_range(3) != 0) begin
        if (side) we_a = 1; else we_b = 1;
      end
      for (int p = 0; p < NA; p++) begin
        addr_a[p] = 5'(perm[p]);      data_a[p] = 2'($urandom);
        addr_b[p] = 5'(perm[p + NA]); data_b[p] = 2'($urandom);
      end
      if (we_a) for (int p = 0; p < NA; p++) ref_mem[perm[p]] = data_a[p];
      if (we_b) for (int p = 0; p < NB; p++) ref_mem[perm[p + NA]] = data_b[p];
      @(negedge clk);
      compare();
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
