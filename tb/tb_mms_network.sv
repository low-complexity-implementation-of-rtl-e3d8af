// tb_mms_network: checks both interconnection networks on the 6 x 12 example
// code. The testbench lists the edges of H itself (row by row) and checks,
// for every partition: unit u, port k of the check side reaches the k-th
// edge of row g*2+u; unit u, port k of the variable side reaches the k-th
// edge of column g*4+u (rows in ascending order); each message equals the
// store entry at the reported address; every edge is reached exactly once
// per side over all partitions.
module tb_mms_network;
  import mms_pkg::*;
  localparam int M = 6, N = 12, E = 24;
  int checks = 0, failures = 0;

  logic [1:0] grp_c = '0, grp_v = '0;
  msg_t [E-1:0] store;
  logic [1:0][3:0][4:0] addr_c;
  msg_t [1:0][3:0] msg_c;
  logic [3:0][1:0][4:0] addr_v;
  msg_t [3:0][1:0] msg_v;

  mms_network #(.ROWS(1'b1), .D(4), .P(2)) dut_c (.grp(grp_c), .rd_data(store), .addr(addr_c), .msg(msg_c));
  mms_network #(.ROWS(1'b0), .D(2), .P(4)) dut_v (.grp(grp_v), .rd_data(store), .addr(addr_v), .msg(msg_v));

  int edge_row [E], edge_col [E];
  int seen_c [E], seen_v [E];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int e = 0;
    for (int r = 0; r < M; r++)
      for (int c = 0; c < N; c++)
        if (H_EXAMPLE[r][c]) begin edge_row[e] = r; edge_col[e] = c; e++; end
    chk(e == E, "edge count");
    for (int i = 0; i < E; i++) begin seen_c[i] = 0; seen_v[i] = 0; end
    repeat (4) begin
      for (int i = 0; i < E; i++) store[i] = 2'($urandom);
      for (int g = 0; g < 3; g++) begin
        grp_c = 2'(g); grp_v = 2'(g);
        #1;
        for (int u = 0; u < 2; u++) begin
          int prev;
          prev = -1;
          for (int k = 0; k < 4; k++) begin
            int a;
            a = int'(addr_c[u][k]);
            chk(edge_row[a] == g * 2 + u, $sformatf("cn row g%0d u%0d k%0d", g, u, k));
            chk(edge_col[a] > prev, "cn column order");
            prev = edge_col[a];
            chk(msg_c[u][k] === store[a], "cn message");
            seen_c[a]++;
          end
        end
        for (int u = 0; u < 4; u++) begin
          int prev;
          prev = -1;
          for (int k = 0; k < 2; k++) begin
            int a;
            a = int'(addr_v[u][k]);
            chk(edge_col[a] == g * 4 + u, $sformatf("vn col g%0d u%0d k%0d", g, u, k));
            chk(edge_row[a] > prev, "vn row order");
            prev = edge_row[a];
            chk(msg_v[u][k] === store[a], "vn message");
            seen_v[a]++;
          end
        end
      end
    end
    for (int i = 0; i < E; i++) begin
      chk(seen_c[i] == 4, "cn coverage");
      chk(seen_v[i] == 4, "vn coverage");
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
