// mms_network: interconnection network between the edge-message store and
// the implemented node units of the partially parallel decoder.
//
// The parity-check matrix H is split into partitions of P consecutive rows
// (check side, ROWS = 1) or P consecutive columns (variable side, ROWS = 0).
// For the partition selected by grp, unit u, port k is connected to the k-th
// edge of row/column grp*P+u, edges being numbered row by row in H. The
// network delivers that edge's message (msg) and its store address (addr),
// so the unit's result is written back to the same edge. The routing table is
// worked out from H when the design is elaborated, so changing H re-routes
// the decoder. Changing the routing per partition follows the partially
// parallel architecture; the table form, the edge numbering and the
// partition order are this design's choices. H must have the same number D of
// ones in every row (ROWS = 1) or column (ROWS = 0).
//
// Interface: combinational. grp in, addr/msg out, rd_data is the store.
module mms_network
  import mms_pkg::*;
#(
  parameter int unsigned M    = H_M,
  parameter int unsigned N    = H_N,
  parameter logic [0:M-1][0:N-1] H = H_EXAMPLE,
  parameter bit          ROWS = 1'b1,             // 1: check side, 0: variable side
  parameter int unsigned D    = ROWS ? H_DC : H_DV,  // edges per row/column
  parameter int unsigned P    = ROWS ? 2 : 4,        // units served at once
  parameter int unsigned E    = M * H_DC,            // edges in H
  localparam int unsigned NL  = ROWS ? M : N,        // rows or columns
  localparam int unsigned NG  = NL / P,              // partitions
  localparam int unsigned GW  = (NG > 1) ? $clog2(NG) : 1,
  localparam int unsigned AW  = (E > 1) ? $clog2(E) : 1
) (
  input  logic [GW-1:0]         grp,
  input  msg_t [E-1:0]          rd_data,
  output logic [P-1:0][D-1:0][AW-1:0] addr,
  output msg_t [P-1:0][D-1:0]   msg
);

  typedef logic [NG-1:0][P-1:0][D-1:0][AW-1:0] table_t;

  // One pass over H in row order: the running count of ones is the edge
  // index; each edge is appended to the port list of its row (check side)
  // or of its column (variable side).
  function automatic table_t build_table();
    table_t t = '0;
    int     fill [NL];
    int     e = 0;
    for (int i = 0; i < NL; i++) fill[i] = 0;
    for (int r = 0; r < M; r++) begin
      logic [0:N-1] row = H[r];
      for (int c = 0; c < N; c++) begin
        if (row[c]) begin
          int line = ROWS ? r : c;
          if (fill[line] < D)
            t[line / P][line % P][fill[line]] = AW'(e);
          fill[line]++;
          e++;
        end
      end
    end
    return t;
  endfunction

  localparam table_t ROUTE = build_table();

  always_comb begin
    for (int u = 0; u < P; u++) begin
      for (int k = 0; k < D; k++) begin
        addr[u][k] = ROUTE[grp][u][k];
        msg[u][k]  = rd_data[ROUTE[grp][u][k]];
      end
    end
  end

  initial begin
    assert (NL % P == 0) else $error("mms_network: P must divide the number of rows/columns");
  end

endmodule
